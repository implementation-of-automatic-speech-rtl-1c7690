// dsp_pkg: widths, instruction encoding and control-word types shared by the
// 16-bit speech-recognition DSP (a DSP56001-like core with separate X and Y
// data spaces, a 40-bit MAC ALU, a dual address generation unit and a
// micro-programmed controller).
//
// The data width (16), address width (11), instruction width (24), program
// address width (10) and accumulator width (40 = 8 + 32) follow the document.
// The binary encoding of the 24-bit instruction word is this design's own; the
// document only says the encoding was chosen to minimise decoding logic.
//
// Instruction formats (bit 23 first):
//   0 | alu op[22:19] | srca[18:17] | srcb[16:15] | dst[14] | xmove[13:7] | ymove[6:0]
//       xmove/ymove = en | store | reg[1:0] | rn[0] | mode[1:0]
//         X reg: 0 X0, 1 X1, 2 A, 3 B   (R0/R1)   Y reg: 0 Y0, 1 Y1, 2 A, 3 B (R4/R5)
//         mode: 0 (Rn), 1 (Rn)+, 2 (Rn)-, 3 (Rn)+Nn
//   10 | dst[21:16] | imm[15:0]                         MOVE #imm,dst
//   11 | op[21:18] | operands[17:0]                     other instructions:
//       OP_MOVR  src[11:6] dst[5:0]                       MOVE src,dst
//       OP_MOVM  space[17] store[16] reg[15:10] rn[9:7] mode[6:4]   MOVE X/Y:ea <-> reg
//       OP_JMP   cond[17:15] topm[10] addr[9:0]           Jcc addr (topm leaves boot ROM)
//       OP_DOI   count[17:10] end[9:0]                    DO #count,end
//       OP_DOR   reg[15:10] end[9:0]                      DO reg,end
//       OP_WAIT                                           WAIT DATAPC,P:(R0)+
//       OP_NORM  dst[3] rn[2:0]                           NORM Rn,A/B
package dsp_pkg;

  localparam int unsigned DW   = 16;  // data word
  localparam int unsigned AW   = 11;  // data address
  localparam int unsigned IW   = 24;  // instruction word
  localparam int unsigned PAW  = 10;  // program address
  localparam int unsigned ACCW = 40;  // accumulator

  typedef enum logic [3:0] {
    ALU_NOP, ALU_MPY, ALU_MPYR, ALU_MAC, ALU_MACR, ALU_ADD, ALU_SUB, ALU_NEG,
    ALU_ABS, ALU_RND, ALU_DIV, ALU_CLR, ALU_TFR, ALU_CMP, ALU_ASL, ALU_ASR
  } alu_op_e;

  // multiplier / ALU source registers
  localparam logic [1:0] M_X0 = 2'd0, M_X1 = 2'd1, M_Y0 = 2'd2, M_Y1 = 2'd3;
  // srcb value that selects the other accumulator as source of ADD/SUB/CMP/TFR
  localparam logic [1:0] SRC_ACC = 2'd1;

  typedef enum logic [2:0] {
    AM_IND = 3'd0, AM_POSTINC = 3'd1, AM_POSTDEC = 3'd2, AM_POSTINCN = 3'd3,
    AM_POSTDECN = 3'd4, AM_INDEXN = 3'd5, AM_INDEXMN = 3'd6
  } amode_e;

  // register codes on the global bus (6 bits)
  localparam logic [5:0] G_X0 = 6'd0, G_X1 = 6'd1, G_Y0 = 6'd2, G_Y1 = 6'd3,
                         G_A = 6'd4, G_B = 6'd5, G_A0 = 6'd6, G_B0 = 6'd7,
                         G_A2 = 6'd8, G_B2 = 6'd9, G_HID = 6'd10, G_HIS = 6'd11,
                         G_LC = 6'd12, G_R0 = 6'd16, G_N0 = 6'd24, G_M0 = 6'd32;

  typedef enum logic [2:0] {CC_AL, CC_EQ, CC_NE, CC_GE, CC_LT, CC_GT, CC_LE, CC_CS} cond_e;

  typedef enum logic [3:0] {
    OP_MOVR = 4'd0, OP_MOVM = 4'd1, OP_JMP = 4'd2, OP_DOI = 4'd3, OP_DOR = 4'd4,
    OP_WAIT = 4'd5, OP_NORM = 4'd6
  } op_e;

  // data bus switch routes
  typedef enum logic [2:0] {
    RT_NONE, RT_GD2XD, RT_GD2YD, RT_XD2GD, RT_YD2GD, RT_XD2YD, RT_YD2XD
  } route_e;

  // global bus sources that are not behind the switch
  typedef enum logic [2:0] {GS_NONE, GS_IMM, GS_AGU, GS_HID, GS_HIF, GS_LC} gsrc_e;

  typedef struct packed {
    logic n, z, v, c, e;
  } ccr_t;

  // ALU_CNT
  typedef struct packed {
    alu_op_e    op;
    logic [1:0] srca;
    logic [1:0] srcb;
    logic       dst;      // 0 A, 1 B
    logic       norm;     // one normalisation step on dst
    logic       xd_we;
    logic [3:0] xd_wsel;  // register code 0..9
    logic       yd_we;
    logic [3:0] yd_wsel;
    logic       xd_oe;
    logic [3:0] xd_rsel;
    logic       yd_oe;
    logic [3:0] yd_rsel;
  } alu_cnt_t;

  // AGU_CNT
  typedef struct packed {
    logic       xen;
    logic [1:0] xrn;      // R0..R3
    amode_e     xmode;
    logic       yen;
    logic [1:0] yrn;      // R4..R7
    amode_e     ymode;
    logic       gd_we;
    logic [4:0] gd_wsel;  // 0..7 R, 8..15 N, 16..23 M
    logic [4:0] gd_rsel;
    logic       norm_en;
    logic [2:0] norm_rn;
  } agu_cnt_t;

  // ---------------------------------------------------------------------------
  // Encoding helpers (used by the boot ROM and by test programs)
  function automatic logic [6:0] xmv(input logic en, input logic st, input logic [1:0] rg,
                                     input logic rn, input logic [1:0] md);
    return {en, st, rg, rn, md};
  endfunction

  function automatic logic [23:0] i_par(input alu_op_e op, input logic [1:0] sa,
                                        input logic [1:0] sb, input logic d,
                                        input logic [6:0] xm, input logic [6:0] ym);
    return {1'b0, op, sa, sb, d, xm, ym};
  endfunction

  function automatic logic [23:0] i_movi(input logic [5:0] dst, input logic [15:0] imm);
    return {2'b10, dst, imm};
  endfunction

  function automatic logic [23:0] i_movr(input logic [5:0] src, input logic [5:0] dst);
    return {2'b11, OP_MOVR, 6'd0, src, dst};
  endfunction

  function automatic logic [23:0] i_movm(input logic space, input logic st, input logic [5:0] rg,
                                         input logic [2:0] rn, input amode_e md);
    return {2'b11, OP_MOVM, space, st, rg, rn, md, 4'd0};
  endfunction

  function automatic logic [23:0] i_jmp(input cond_e cc, input logic topm, input logic [9:0] a);
    return {2'b11, OP_JMP, cc, 4'd0, topm, a};
  endfunction

  function automatic logic [23:0] i_doi(input logic [7:0] cnt, input logic [9:0] e);
    return {2'b11, OP_DOI, cnt, e};
  endfunction

  function automatic logic [23:0] i_dor(input logic [5:0] rg, input logic [9:0] e);
    return {2'b11, OP_DOR, 2'd0, rg, e};
  endfunction

  function automatic logic [23:0] i_wait();
    return {2'b11, OP_WAIT, 18'd0};
  endfunction

  function automatic logic [23:0] i_norm(input logic d, input logic [2:0] rn);
    return {2'b11, OP_NORM, 14'd0, d, rn};
  endfunction

  localparam logic [23:0] I_NOP = 24'h000000;

endpackage
