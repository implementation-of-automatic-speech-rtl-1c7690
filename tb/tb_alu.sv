// tb_alu: self-checking test of the ALU.
//
// Loads the input registers over the X and Y buses, then runs a few hundred
// random operations (MPY, MPYR, MAC, MACR, ADD, SUB, CMP, NEG, ABS, RND, CLR,
// TFR, ASL, ASR) on random data. A reference model in plain 64-bit integer
// arithmetic tracks A and B; after every operation both accumulators are read
// back over the buses (limited high word, low word, extension) and the N and
// Z flags are compared. Separate phases check the 16-step division, the
// normalisation step and its NORM signal, 40-bit saturation and the
// limiting of bus reads.
`timescale 1ns/1ps
module tb_alu;
  import dsp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  alu_cnt_t    cnt = '0;
  logic [15:0] xd_in = '0, yd_in = '0, xd_out, yd_out;
  ccr_t        ccr, ccr_next;
  logic        norm_inc, norm_dec;
  int checks = 0, failures = 0;

  alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint MAXV = (64'sd1 <<< 39) - 1;
  localparam longint MINV = -(64'sd1 <<< 39);

  longint ra = 0, rb = 0;
  logic signed [15:0] rg [4];   // X0 X1 Y0 Y1
  logic last_n, last_z;

  function automatic longint sat(input longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  function automatic longint wrap40(input longint v);
    logic [39:0] t = v[39:0];
    return longint'(signed'(t));
  endfunction

  function automatic logic [15:0] lim(input longint v);
    if (v > 64'sh7FFFFFFF) return 16'h7FFF;
    if (v < -64'sh80000000) return 16'h8000;
    return v[31:16];
  endfunction

  task automatic chk(input string n, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", n, g, e);
    end
  endtask

  // write a register over the X bus
  task automatic wreg(input logic [3:0] code, input logic [15:0] v);
    @(negedge clk);
    cnt = '0; cnt.xd_we = 1'b1; cnt.xd_wsel = code; xd_in = v;
    @(negedge clk);
    cnt = '0;
    if (code < 4) rg[code] = v;
    if (code == 4) ra = longint'(signed'(v)) <<< 16;
    if (code == 5) rb = longint'(signed'(v)) <<< 16;
  endtask

  // read back both accumulators (A over X bus, B over Y bus)
  task automatic check_acc(input string n);
    @(negedge clk);
    cnt = '0;
    cnt.xd_oe = 1'b1; cnt.yd_oe = 1'b1;
    cnt.xd_rsel = 4; cnt.yd_rsel = 5; #1;
    chk({n, " A"}, xd_out, lim(ra)); chk({n, " B"}, yd_out, lim(rb));
    cnt.xd_rsel = 6; cnt.yd_rsel = 7; #1;
    chk({n, " A0"}, xd_out, ra[15:0]); chk({n, " B0"}, yd_out, rb[15:0]);
    cnt.xd_rsel = 8; cnt.yd_rsel = 9; #1;
    chk({n, " A2"}, xd_out, {{8{ra[39]}}, ra[39:32]}); chk({n, " B2"}, yd_out, {{8{rb[39]}}, rb[39:32]});
    cnt = '0;
  endtask

  task automatic op(input alu_op_e o, input logic [1:0] sa, input logic [1:0] sb, input logic dst);
    longint d, s, r, p;
    logic wr;
    d = dst ? rb : ra;
    s = (sb == SRC_ACC) ? (dst ? ra : rb) : (longint'(rg[sa]) <<< 16);
    p = 2 * longint'(rg[sa]) * longint'(rg[sb]);
    wr = 1'b1;
    case (o)
      ALU_MPY:  r = sat(p);
      ALU_MPYR: r = sat(p + 32768) & ~64'hFFFF;
      ALU_MAC:  r = sat(d + p);
      ALU_MACR: r = sat(d + p + 32768) & ~64'hFFFF;
      ALU_ADD:  r = sat(d + s);
      ALU_SUB:  r = sat(d - s);
      ALU_CMP:  begin r = sat(d - s); wr = 1'b0; end
      ALU_NEG:  r = sat(-d);
      ALU_ABS:  r = sat(d < 0 ? -d : d);
      ALU_RND:  r = sat(d + 32768) & ~64'hFFFF;
      ALU_CLR:  r = 0;
      ALU_TFR:  r = s;
      ALU_ASL:  r = wrap40(d <<< 1);
      ALU_ASR:  r = d >>> 1;
      default:  begin r = d; wr = 1'b0; end
    endcase
    @(negedge clk);
    cnt = '0; cnt.op = o; cnt.srca = sa; cnt.srcb = sb; cnt.dst = dst;
    @(negedge clk);
    cnt = '0;
    if (wr) begin
      if (dst) rb = r; else ra = r;
    end
    if (o != ALU_TFR) begin
      chk($sformatf("op %s N", o.name()), ccr.n, r < 0);
      chk($sformatf("op %s Z", o.name()), ccr.z, r == 0);
    end
  endtask

  initial begin
    alu_op_e ops [14] = '{ALU_MPY, ALU_MPYR, ALU_MAC, ALU_MACR, ALU_ADD, ALU_SUB, ALU_CMP,
                          ALU_NEG, ALU_ABS, ALU_RND, ALU_CLR, ALU_TFR, ALU_ASL, ALU_ASR};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) wreg(4'(i), 16'($urandom));
    wreg(4'd4, 16'($urandom));
    wreg(4'd5, 16'($urandom));
    check_acc("load");

    // random operation sequence
    for (int i = 0; i < 300; i++) begin
      alu_op_e o;
      logic [1:0] sb;
      o = ops[$urandom_range(0, 13)];
      sb = 2'($urandom);
      if (o inside {ALU_ADD, ALU_SUB, ALU_CMP, ALU_TFR}) sb = ($urandom_range(0, 1) == 1) ? SRC_ACC : 2'd0;
      op(o, 2'($urandom), sb, 1'($urandom));
      check_acc($sformatf("step %0d %s", i, o.name()));
      if (i % 25 == 0) wreg(4'($urandom_range(0, 3)), 16'($urandom));
    end

    // division: 16 steps of DIV give the 15-bit quotient in A0
    for (int k = 0; k < 10; k++) begin
      logic [15:0] dv, dd;
      dv = 16'($urandom_range(16'h0100, 16'h7FFF));
      dd = 16'($urandom_range(0, dv - 1));
      wreg(4'd0, dv);
      op(ALU_CLR, 2'd0, 2'd0, 1'b1);      // clears C
      wreg(4'd4, dd);
      for (int s = 0; s < 16; s++) begin
        @(negedge clk); cnt = '0; cnt.op = ALU_DIV; cnt.srca = 2'd0;
      end
      @(negedge clk); cnt = '0;
      cnt.xd_oe = 1'b1; cnt.xd_rsel = 4'd6; #1;
      chk($sformatf("div %h/%h", dd, dv), xd_out, 16'((32'(dd) << 15) / 32'(dv)));
      cnt = '0;
    end

    // normalisation: count left shifts until normalised
    for (int k = 0; k < 10; k++) begin
      logic [15:0] w;
      int n_exp, n_got;
      w = 16'($urandom) >> $urandom_range(0, 14);
      if (k == 0) w = 16'hFFFF;
      if (w == 0) w = 16'h0001;
      wreg(4'd4, w);
      n_exp = 0;
      while ((w[15] == w[14]) && (w != 0)) begin w = w << 1; n_exp++; end
      n_got = 0;
      for (int s = 0; s < 18; s++) begin
        @(negedge clk); cnt = '0; cnt.norm = 1'b1; cnt.dst = 1'b0; #1;
        if (norm_dec) n_got++;
        chk("no NORM increment", norm_inc, 1'b0);
      end
      @(negedge clk); cnt = '0;
      chk("NORM shift count", n_got, n_exp);
      ra = longint'(signed'(w)) <<< 16;
      check_acc("NORM result");
    end

    // extension in use: limited read, NORM shifts right and increments
    wreg(4'd0, 16'h6000);
    wreg(4'd4, 16'h6000);
    op(ALU_ADD, 2'd0, 2'd0, 1'b0);
    check_acc("extension");
    chk("E flag", ccr.e, 1'b1);
    @(negedge clk); cnt = '0; cnt.norm = 1'b1; #1;
    chk("NORM increment", norm_inc, 1'b1);
    @(negedge clk); cnt = '0;
    ra = ra >>> 1;
    check_acc("NORM right");

    // saturation: repeated +1.0 products
    wreg(4'd0, 16'h8000);
    op(ALU_CLR, 2'd0, 2'd0, 1'b0);
    for (int s = 0; s < 260; s++) op(ALU_MAC, 2'd0, 2'd0, 1'b0);
    chk("saturated to max", ra == MAXV, 1'b1);
    check_acc("saturation");
    chk("V flag", ccr.v, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
