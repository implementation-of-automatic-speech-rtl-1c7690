// cu: controller unit of the DSP.
//
// Fetches 24-bit instructions, decodes them into the control words of the
// other units (ALU_CNT, AGU_CNT, MX_CNT, MY_CNT, bus switch route, host
// interface control) and runs the program counter, conditional jumps and
// nested hardware DO loops. As in the document, every instruction executes in
// one cycle, and the fetch and decode of the next instruction overlap the
// execution of the current one: the fetch stage reads the program word
// combinationally, decodes it and registers the control word, which drives
// the datapath in the next cycle. The 64-word boot ROM is inside this unit
// and is fetched from after reset; a JMP with its "to program memory" bit set
// leaves it for good. The 1024-word program memory sits outside (Fig. 1) on
// PA / PD.
//
// Branches and loops cost no extra cycle (document): jumps are resolved in
// the fetch stage; a conditional jump tests the condition codes the
// instruction in execution is producing (ccr_next from the ALU). DO saves
// the loop counter, start and end address, pushing the enclosing loop onto a
// hardware stack of LOOP_DEPTH entries, and the fetch stage returns to the
// start address when it fetches the end address until the counter runs out.
// The DO itself executes in the execute stage, taking its count from the
// global bus (an immediate or any register); the loop registers are bypassed
// to the fetch stage in that cycle so a one-instruction loop works.
//
// This design's choices: the encoding (see dsp_pkg); stack depth 4 (the
// document gives none); a count of 0 runs the body once; a jump must not be
// the last instruction of a loop body; pushing more than LOOP_DEPTH loops
// loses the outermost one. WAIT DATAPC,P:(R0)+ and any move of the host data
// word stall the pipeline while the host interface flags say the word is not
// there (or, for a write, the output word is still full). When the host word
// is there, WAIT places R0 (from the X address bus) on PA and writes program
// memory; as PA then carries no fetch, one empty cycle follows.
module cu
  import dsp_pkg::*;
#(
  parameter int unsigned LOOP_DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  // program memory
  output logic [PAW-1:0]  pa,
  input  logic [IW-1:0]   pd,
  output logic            pm_we,
  // datapath control
  output alu_cnt_t        alu_cnt,
  output agu_cnt_t        agu_cnt,
  output logic            mx_we,
  output logic            my_we,
  output logic            mx_re,
  output logic            my_re,
  output route_e          route,
  output gsrc_e           gsrc,
  output logic [DW-1:0]   gd_out,
  input  logic [DW-1:0]   gd_in,
  input  logic [AW-1:0]   xa,
  input  ccr_t            ccr_next,
  // host interface control and flags
  output logic            hi_rd,
  output logic            hi_rd24,
  output logic            hi_wr,
  output logic            hi_st_wr,
  input  logic            hi_in_full,
  input  logic            hi_out_full,
  // status
  output logic [PAW-1:0]  pc,
  output logic            boot,
  output logic            stall
);
  typedef struct packed {
    alu_cnt_t       alu;
    agu_cnt_t       agu;
    logic           mx_we, my_we, mx_re, my_re;
    route_e         route;
    gsrc_e          gsrc;
    logic [DW-1:0]  imm;
    logic           hi_rd, hi_wr, hi_st_wr;
    logic           do_en;
    logic [PAW-1:0] do_end;
    logic           wait_pc;
  } ctrl_t;

  function automatic logic is_alu(input logic [5:0] c);
    return c <= 6'd9;
  endfunction

  // put register c on GD (c is not an ALU register)
  function automatic ctrl_t gd_src(input ctrl_t k, input logic [5:0] c);
    ctrl_t t = k;
    case (c)
      G_HID:   begin t.gsrc = GS_HID; t.hi_rd = 1'b1; end
      G_HIS:   t.gsrc = GS_HIF;
      G_LC:    t.gsrc = GS_LC;
      default: begin t.gsrc = GS_AGU; t.agu.gd_rsel = 5'(c - G_R0); end
    endcase
    return t;
  endfunction

  // write register c from GD (c is not an ALU register)
  function automatic ctrl_t gd_dst(input ctrl_t k, input logic [5:0] c);
    ctrl_t t = k;
    case (c)
      G_HID:   t.hi_wr = 1'b1;
      G_HIS:   t.hi_st_wr = 1'b1;
      G_LC:    ;
      default: begin t.agu.gd_we = (c >= G_R0) && (c < G_M0 + 6'd8); t.agu.gd_wsel = 5'(c - G_R0); end
    endcase
    return t;
  endfunction

  // value already on GD goes to register d
  function automatic ctrl_t to_dst(input ctrl_t k, input logic [5:0] d);
    ctrl_t t = k;
    if (is_alu(d)) begin
      t.route = RT_GD2XD; t.alu.xd_we = 1'b1; t.alu.xd_wsel = d[3:0];
    end else t = gd_dst(t, d);
    return t;
  endfunction

  function automatic ctrl_t decode(input logic [IW-1:0] w);
    ctrl_t k = '0;
    logic [5:0] s, d;
    if (!w[23]) begin
      // parallel instruction: ALU operation + X move + Y move
      k.alu.op   = alu_op_e'(w[22:19]);
      k.alu.srca = w[18:17];
      k.alu.srcb = w[16:15];
      k.alu.dst  = w[14];
      if (w[13]) begin
        k.agu.xen   = 1'b1;
        k.agu.xrn   = {1'b0, w[9]};
        k.agu.xmode = amode_e'({1'b0, w[8:7]});
        if (w[12]) begin
          k.alu.xd_oe = 1'b1; k.alu.xd_rsel = w[11] ? {3'b010, w[10]} : {3'b000, w[10]};
          k.mx_we = 1'b1;
        end else begin
          k.mx_re = 1'b1;
          k.alu.xd_we = 1'b1; k.alu.xd_wsel = w[11] ? {3'b010, w[10]} : {3'b000, w[10]};
        end
      end
      if (w[6]) begin
        k.agu.yen   = 1'b1;
        k.agu.yrn   = {1'b0, w[2]};
        k.agu.ymode = amode_e'({1'b0, w[1:0]});
        if (w[5]) begin
          k.alu.yd_oe = 1'b1; k.alu.yd_rsel = w[4] ? {3'b010, w[3]} : {3'b001, w[3]};
          k.my_we = 1'b1;
        end else begin
          k.my_re = 1'b1;
          k.alu.yd_we = 1'b1; k.alu.yd_wsel = w[4] ? {3'b010, w[3]} : {3'b001, w[3]};
        end
      end
    end else if (!w[22]) begin
      // MOVE #imm,d
      k.gsrc = GS_IMM;
      k.imm  = w[15:0];
      k = to_dst(k, w[21:16]);
    end else begin
      case (op_e'(w[21:18]))
        OP_MOVR: begin
          s = w[11:6];
          d = w[5:0];
          if (is_alu(s)) begin
            k.alu.xd_oe = 1'b1; k.alu.xd_rsel = s[3:0];
            if (is_alu(d)) begin
              k.alu.xd_we = 1'b1; k.alu.xd_wsel = d[3:0];
            end else begin
              k.route = RT_XD2GD; k = gd_dst(k, d);
            end
          end else begin
            k = gd_src(k, s);
            k = to_dst(k, d);
          end
        end
        OP_MOVM: begin
          d = w[15:10];
          if (!w[17]) begin
            k.agu.xen = 1'b1; k.agu.xrn = w[8:7]; k.agu.xmode = amode_e'(w[6:4]);
            if (w[16]) begin
              k.mx_we = 1'b1;
              if (is_alu(d)) begin k.alu.xd_oe = 1'b1; k.alu.xd_rsel = d[3:0]; end
              else begin k = gd_src(k, d); k.route = RT_GD2XD; end
            end else begin
              k.mx_re = 1'b1;
              if (is_alu(d)) begin k.alu.xd_we = 1'b1; k.alu.xd_wsel = d[3:0]; end
              else begin k.route = RT_XD2GD; k = gd_dst(k, d); end
            end
          end else begin
            k.agu.yen = 1'b1; k.agu.yrn = w[8:7]; k.agu.ymode = amode_e'(w[6:4]);
            if (w[16]) begin
              k.my_we = 1'b1;
              if (is_alu(d)) begin k.alu.yd_oe = 1'b1; k.alu.yd_rsel = d[3:0]; end
              else begin k = gd_src(k, d); k.route = RT_GD2YD; end
            end else begin
              k.my_re = 1'b1;
              if (is_alu(d)) begin k.alu.yd_we = 1'b1; k.alu.yd_wsel = d[3:0]; end
              else begin k.route = RT_YD2GD; k = gd_dst(k, d); end
            end
          end
        end
        OP_DOI: begin
          k.do_en = 1'b1; k.do_end = w[9:0];
          k.gsrc = GS_IMM; k.imm = {8'd0, w[17:10]};
        end
        OP_DOR: begin
          k.do_en = 1'b1; k.do_end = w[9:0];
          s = w[15:10];
          if (is_alu(s)) begin
            k.alu.xd_oe = 1'b1; k.alu.xd_rsel = s[3:0]; k.route = RT_XD2GD;
          end else k = gd_src(k, s);
        end
        OP_WAIT: begin
          k.wait_pc = 1'b1;
          k.agu.xen = 1'b1; k.agu.xrn = 2'd0; k.agu.xmode = AM_POSTINC;
        end
        OP_NORM: begin
          k.alu.norm = 1'b1; k.alu.dst = w[3];
          k.agu.norm_en = 1'b1; k.agu.norm_rn = w[2:0];
        end
        default: ;  // OP_JMP acts in the fetch stage only
      endcase
    end
    return k;
  endfunction

  function automatic logic cond_true(input cond_e cc, input ccr_t f);
    case (cc)
      CC_AL: return 1'b1;
      CC_EQ: return f.z;
      CC_NE: return !f.z;
      CC_GE: return f.n == f.v;
      CC_LT: return f.n != f.v;
      CC_GT: return !f.z && (f.n == f.v);
      CC_LE: return f.z || (f.n != f.v);
      default: return f.c;
    endcase
  endfunction

  // ------------------------------------------------------------------ state
  ctrl_t          ex;                  // control word in execution
  logic [DW-1:0]  lc;                  // loop counter
  logic [PAW-1:0] ls, le;              // loop start / end address
  logic [$clog2(LOOP_DEPTH+1)-1:0] sp; // number of active loops
  logic [DW-1:0]  stk_lc [LOOP_DEPTH];
  logic [PAW-1:0] stk_ls [LOOP_DEPTH];
  logic [PAW-1:0] stk_le [LOOP_DEPTH];

  logic [IW-1:0]  instr, brom_q;
  logic           wgo, adv, do_now, jmp_take, loop_end;
  logic [DW-1:0]  lc_n;
  logic [PAW-1:0] ls_n, le_n, pc_n;
  logic [$clog2(LOOP_DEPTH+1)-1:0] sp_n;
  logic           push, pop;

  boot_rom u_boot (.addr(pc[5:0]), .data(brom_q));

  assign instr  = boot ? brom_q : pd;
  assign stall  = ((ex.hi_rd || ex.wait_pc) && !hi_in_full) || (ex.hi_wr && hi_out_full);
  assign wgo    = ex.wait_pc && hi_in_full;
  assign adv    = !stall && !wgo;
  assign do_now = ex.do_en && !stall;
  assign pa     = wgo ? xa[PAW-1:0] : pc;
  assign pm_we  = wgo;

  // gated control outputs: nothing happens while stalled
  always_comb begin
    alu_cnt  = stall ? '0 : ex.alu;
    agu_cnt  = stall ? '0 : ex.agu;
    mx_we    = ex.mx_we && !stall;
    my_we    = ex.my_we && !stall;
    mx_re    = ex.mx_re;
    my_re    = ex.my_re;
    route    = ex.route;
    gsrc     = ex.gsrc;
    gd_out   = (ex.gsrc == GS_LC) ? lc : ex.imm;
    hi_rd    = ex.hi_rd && !stall;
    hi_rd24  = wgo;
    hi_wr    = ex.hi_wr && !stall;
    hi_st_wr = ex.hi_st_wr && !stall;
  end

  // fetch stage: next PC and loop registers
  always_comb begin
    lc_n = lc; ls_n = ls; le_n = le; sp_n = sp;
    push = 1'b0; pop = 1'b0;
    // DO in execution: its loop becomes the current one at once
    if (do_now) begin
      push = (sp != 0);
      lc_n = gd_in;
      ls_n = pc;
      le_n = ex.do_end;
      sp_n = (32'(sp) == LOOP_DEPTH) ? sp : sp + 1'b1;
    end
    jmp_take = adv && instr[23] && instr[22] && (op_e'(instr[21:18]) == OP_JMP) &&
               cond_true(cond_e'(instr[17:15]), ccr_next);
    loop_end = adv && !jmp_take && (sp_n != 0) && (pc == le_n);
    pc_n = pc;
    if (adv) pc_n = pc + 1'b1;
    if (jmp_take) pc_n = instr[9:0];
    else if (loop_end) begin
      if (lc_n > 1) begin
        pc_n = ls_n;
        lc_n = lc_n - 1'b1;
      end else begin
        pop  = 1'b1;
        sp_n = sp_n - 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      boot <= 1'b1;
      ex   <= '0;
      lc   <= '0;
      ls   <= '0;
      le   <= '0;
      sp   <= '0;
      for (int i = 0; i < LOOP_DEPTH; i++) begin
        stk_lc[i] <= '0; stk_ls[i] <= '0; stk_le[i] <= '0;
      end
    end else begin
      pc <= pc_n;
      if (adv) ex <= decode(instr);
      else if (wgo) ex <= '0;
      if (jmp_take && instr[10]) boot <= 1'b0;
      if (push && !pop) begin
        // a new loop starts: the enclosing one goes onto the stack
        for (int i = LOOP_DEPTH - 1; i > 0; i--) begin
          stk_lc[i] <= stk_lc[i-1]; stk_ls[i] <= stk_ls[i-1]; stk_le[i] <= stk_le[i-1];
        end
        stk_lc[0] <= lc; stk_ls[0] <= ls; stk_le[0] <= le;
        lc <= lc_n; ls <= ls_n; le <= le_n;
      end else if (pop && !push) begin
        // the innermost loop ends: the enclosing one comes back
        for (int i = 0; i < LOOP_DEPTH - 1; i++) begin
          stk_lc[i] <= stk_lc[i+1]; stk_ls[i] <= stk_ls[i+1]; stk_le[i] <= stk_le[i+1];
        end
        lc <= stk_lc[0]; ls <= stk_ls[0]; le <= stk_le[0];
      end else if (!pop) begin
        lc <= lc_n; ls <= ls_n; le <= le_n;
      end
      sp <= sp_n;
    end
  end

  a_no_stall_on_write: assert property (@(posedge clk) disable iff (!rst_n) pm_we |-> !stall);
endmodule
