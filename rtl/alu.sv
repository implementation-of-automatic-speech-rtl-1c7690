// alu: the arithmetic logic unit of the DSP, fractional two's complement.
//
// Four 16-bit input registers (X0, X1, Y0, Y1), a 16x16 -> 32-bit signed
// multiplier whose output feeds one adder input, a 40-bit adder and two 40-bit
// accumulators A and B (8-bit extension, 16-bit high word A1, 16-bit low word
// A0). Between the adder and the accumulators sits a shift / saturate / round /
// normalise stage. Any register can be loaded from the X data bus or the Y data
// bus, and the accumulators can be read onto either bus. All of this follows
// the document, as do the operations: multiply and multiply-accumulate with
// and without rounding, rounding, one non-restoring division step, one
// normalisation step, add, subtract, negate and absolute value. No logical
// operations exist. CLR, TFR (copy), CMP, ASL and ASR are this design's
// additions, needed to program the machine.
//
// Design choices (not given by the document):
//  * The 32-bit product is sign-extended and shifted left once so that the
//    binary point sits between bits 31 and 30 of the accumulator.
//  * Rounding adds 2^15 and clears the low word (round half up).
//  * If the 40-bit adder overflows, the result saturates to the largest
//    positive or negative 40-bit value (the "saturation" of the shift unit).
//  * Reading A or B onto a 16-bit bus limits the value to 0x7FFF / 0x8000 when
//    the extension byte is in use, as on the DSP56001.
//  * DIV: D = 2*D + C +/- S (S aligned to the high word); C becomes the
//    quotient bit. After CLR (C = 0) and 16 steps with a positive dividend
//    below the divisor, A0 holds the 15-bit fractional quotient.
//  * NORM: if the extension is in use, shift right and ask the AGU to
//    increment the chosen address register; if the value is unnormalised and
//    not zero, shift left and ask for a decrement (NORM signal of Fig. 1).
//  * A bus write to an accumulator in the same instruction as an arithmetic
//    result to the same accumulator wins; a Y-bus write wins over an X-bus
//    write to the same register. Bus reads see the values before the
//    instruction, so parallel moves and arithmetic overlap freely.
//
// Register codes on the buses: 0 X0, 1 X1, 2 Y0, 3 Y1, 4 A, 5 B, 6 A0, 7 B0,
// 8 A2, 9 B2. Writing A/B loads the high word, sign-extends and clears the low
// word. ccr_next is the condition code the instruction in execution will leave
// (the controller evaluates conditional jumps on it). Everything updates on the
// rising clock edge; bus outputs and ccr_next are combinational.
module alu
  import dsp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  alu_cnt_t      cnt,
  input  logic [DW-1:0] xd_in,
  input  logic [DW-1:0] yd_in,
  output logic [DW-1:0] xd_out,
  output logic [DW-1:0] yd_out,
  output ccr_t          ccr,
  output ccr_t          ccr_next,
  output logic          norm_inc,
  output logic          norm_dec
);
  localparam logic [ACCW-1:0] ACC_MAX = {1'b0, {(ACCW-1){1'b1}}};
  localparam logic [ACCW-1:0] ACC_MIN = {1'b1, {(ACCW-1){1'b0}}};
  localparam logic [ACCW-1:0] RND_K   = ACCW'(1) << 15;

  logic [DW-1:0]   x0, x1, y0, y1;
  logic [ACCW-1:0] a, b;

  function automatic logic [DW-1:0] in_reg(input logic [1:0] s, input logic [DW-1:0] r0,
                                           input logic [DW-1:0] r1, input logic [DW-1:0] r2,
                                           input logic [DW-1:0] r3);
    case (s)
      2'd0: return r0;
      2'd1: return r1;
      2'd2: return r2;
      default: return r3;
    endcase
  endfunction

  function automatic logic ext_used(input logic [ACCW-1:0] v);
    return !((v[39:31] == '0) || (v[39:31] == '1));
  endfunction

  function automatic logic [DW-1:0] limit(input logic [ACCW-1:0] v);
    if (ext_used(v)) return v[39] ? 16'h8000 : 16'h7FFF;
    return v[31:16];
  endfunction

  function automatic logic [ACCW-1:0] from_word(input logic [DW-1:0] w);
    return {{8{w[15]}}, w, 16'h0000};
  endfunction

  function automatic logic [DW-1:0] rd(input logic [3:0] s, input logic [DW-1:0] r0,
                                       input logic [DW-1:0] r1, input logic [DW-1:0] r2,
                                       input logic [DW-1:0] r3, input logic [ACCW-1:0] aa,
                                       input logic [ACCW-1:0] bb);
    case (s)
      4'd0: return r0;
      4'd1: return r1;
      4'd2: return r2;
      4'd3: return r3;
      4'd4: return limit(aa);
      4'd5: return limit(bb);
      4'd6: return aa[15:0];
      4'd7: return bb[15:0];
      4'd8: return {{8{aa[39]}}, aa[39:32]};
      4'd9: return {{8{bb[39]}}, bb[39:32]};
      default: return '0;
    endcase
  endfunction

  assign xd_out = cnt.xd_oe ? rd(cnt.xd_rsel, x0, x1, y0, y1, a, b) : '0;
  assign yd_out = cnt.yd_oe ? rd(cnt.yd_rsel, x0, x1, y0, y1, a, b) : '0;

  // ---------------------------------------------------------------- datapath
  logic [DW-1:0]     ma, mb, sreg;
  logic signed [31:0] prod;
  logic [ACCW-1:0]   p40, d, other, src40, src40w, dsh, res;
  logic [ACCW:0]     sum;
  logic              wr_acc, upd_ccr, v_flag, c_flag, ovf_sat;

  always_comb begin
    ma    = in_reg(cnt.srca, x0, x1, y0, y1);
    mb    = in_reg(cnt.srcb, x0, x1, y0, y1);
    sreg  = ma;
    prod  = $signed(ma) * $signed(mb);
    p40   = {{7{prod[31]}}, prod, 1'b0};
    d     = cnt.dst ? b : a;
    other = cnt.dst ? a : b;
    src40w = from_word(sreg);
    src40 = (cnt.srcb == SRC_ACC) ? other : src40w;
    dsh   = {d[38:0], ccr.c};

    sum     = '0;
    res     = d;
    wr_acc  = 1'b0;
    upd_ccr = 1'b0;
    v_flag  = 1'b0;
    c_flag  = ccr.c;
    ovf_sat = 1'b0;
    norm_inc = 1'b0;
    norm_dec = 1'b0;

    if (cnt.norm) begin
      wr_acc  = 1'b1;
      upd_ccr = 1'b1;
      if (ext_used(d)) begin
        res      = {d[39], d[39:1]};
        norm_inc = 1'b1;
      end else if ((d[31] == d[30]) && (d != '0)) begin
        res      = {d[38:0], 1'b0};
        norm_dec = 1'b1;
      end
    end else begin
      unique case (cnt.op)
        ALU_MPY, ALU_MPYR: begin
          sum    = {p40[39], p40} + ((cnt.op == ALU_MPYR) ? {1'b0, RND_K} : '0);
          ovf_sat = 1'b1;
        end
        ALU_MAC, ALU_MACR: begin
          sum    = {d[39], d} + {p40[39], p40} + ((cnt.op == ALU_MACR) ? {1'b0, RND_K} : '0);
          ovf_sat = 1'b1;
        end
        ALU_ADD: begin
          sum    = {d[39], d} + {src40[39], src40};
          ovf_sat = 1'b1;
          c_flag = ({1'b0, d} + {1'b0, src40}) >> ACCW != 0;
        end
        ALU_SUB, ALU_CMP: begin
          sum    = {d[39], d} - {src40[39], src40};
          ovf_sat = 1'b1;
          c_flag = d < src40;
        end
        ALU_NEG: begin
          sum    = '0 - {d[39], d};
          ovf_sat = 1'b1;
        end
        ALU_ABS: begin
          sum    = d[39] ? ('0 - {d[39], d}) : {d[39], d};
          ovf_sat = 1'b1;
        end
        ALU_RND: begin
          sum    = {d[39], d} + {1'b0, RND_K};
          ovf_sat = 1'b1;
        end
        ALU_DIV: begin
          res = (d[39] ^ sreg[15]) ? dsh + src40w : dsh - src40w;
          c_flag = ~(res[39] ^ sreg[15]);
        end
        ALU_CLR: begin
          res    = '0;
          c_flag = 1'b0;
        end
        ALU_TFR: res = src40;
        ALU_ASL: begin
          res    = {d[38:0], 1'b0};
          c_flag = d[39];
          v_flag = d[39] ^ d[38];
        end
        ALU_ASR: begin
          res    = {d[39], d[39:1]};
          c_flag = d[0];
        end
        default: ;
      endcase
      if (ovf_sat) begin
        v_flag = sum[40] ^ sum[39];
        if (v_flag) res = sum[40] ? ACC_MIN : ACC_MAX;
        else        res = sum[39:0];
      end
      if ((cnt.op == ALU_MPYR) || (cnt.op == ALU_MACR) || (cnt.op == ALU_RND))
        res[15:0] = '0;
      wr_acc  = (cnt.op != ALU_NOP) && (cnt.op != ALU_CMP);
      upd_ccr = (cnt.op != ALU_NOP) && (cnt.op != ALU_TFR);
    end

    ccr_next = ccr;
    if (upd_ccr) begin
      ccr_next.n = res[39];
      ccr_next.z = (res == '0);
      ccr_next.v = v_flag;
      ccr_next.c = c_flag;
      ccr_next.e = ext_used(res);
    end
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '0; x1 <= '0; y0 <= '0; y1 <= '0;
      a  <= '0; b  <= '0;
      ccr <= '0;
    end else begin
      ccr <= ccr_next;
      if (wr_acc) begin
        if (cnt.dst) b <= res;
        else         a <= res;
      end
      if (cnt.xd_we) begin
        case (cnt.xd_wsel)
          4'd0: x0 <= xd_in;
          4'd1: x1 <= xd_in;
          4'd2: y0 <= xd_in;
          4'd3: y1 <= xd_in;
          4'd4: a <= from_word(xd_in);
          4'd5: b <= from_word(xd_in);
          4'd6: a[15:0] <= xd_in;
          4'd7: b[15:0] <= xd_in;
          4'd8: a[39:32] <= xd_in[7:0];
          4'd9: b[39:32] <= xd_in[7:0];
          default: ;
        endcase
      end
      if (cnt.yd_we) begin
        case (cnt.yd_wsel)
          4'd0: x0 <= yd_in;
          4'd1: x1 <= yd_in;
          4'd2: y0 <= yd_in;
          4'd3: y1 <= yd_in;
          4'd4: a <= from_word(yd_in);
          4'd5: b <= from_word(yd_in);
          4'd6: a[15:0] <= yd_in;
          4'd7: b[15:0] <= yd_in;
          4'd8: a[39:32] <= yd_in[7:0];
          4'd9: b[39:32] <= yd_in[7:0];
          default: ;
        endcase
      end
    end
  end


endmodule
