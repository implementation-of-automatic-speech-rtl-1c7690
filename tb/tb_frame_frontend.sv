// tb_frame_frontend: one speech frame through the recogniser's acoustic front
// end, run as a program on the whole DSP (dsp_top at its default sizes).
//
// The testbench plays the PC: it boots a 34-word program, then sends one
// 30 ms frame at 8 kHz (240 random samples of small amplitude) into X memory
// and 240 Hamming window coefficients, 0.54 - 0.46 cos(2 pi n / 239) in
// Q15, into Y memory. The program then computes on the DSP:
//   * pre-emphasis s'[n] = s[n] - 0.98 s[n-1]           (3 instructions/sample)
//   * windowing w[n] = s'[n] h[n], copied to X and Y     (2 instructions/sample)
//   * autocorrelation r[k] = sum w[n+k] w[n], k = 0..16  (one MAC per product)
// and sends the 17 autocorrelation values (high and low word) back.
// A bit-true integer model of the same fixed-point steps (fractional
// products, rounding, limiting) gives the expected values. The number of
// executed instructions of each stage is checked against the count that
// follows from the program (one instruction per cycle, no loop overhead) and
// printed next to the cycle budget reported for the original implementation.
`timescale 1ns/1ps
module tb_frame_frontend;
  import dsp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] pc_addr = '0;
  logic [7:0]  pc_wdata = '0;
  logic [7:0]  pc_rdata;
  logic        pc_wr = 1'b0;
  logic        pc_rd = 1'b0;
  int checks = 0;
  int failures = 0;

  dsp_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------- PC bus
  task automatic pc_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); pc_addr = {13'd0, a}; pc_wdata = d; pc_wr = 1'b1;
    @(negedge clk); pc_wr = 1'b0;
  endtask

  task automatic pc_read(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); pc_addr = {13'd0, a}; #1 d = pc_rdata; pc_rd = 1'b1;
    @(negedge clk); pc_rd = 1'b0;
  endtask

  task automatic send(input logic [23:0] w);
    logic [7:0] f;
    do pc_read(3'd6, f); while (f[0]);
    pc_write(3'd2, w[23:16]);
    pc_write(3'd1, w[15:8]);
    pc_write(3'd0, w[7:0]);
  endtask

  task automatic recv16(output logic [15:0] w);
    logic [7:0] f, h, l;
    do pc_read(3'd6, f); while (!f[1]);
    pc_read(3'd4, h);
    pc_read(3'd3, l);
    w = {h, l};
  endtask

  // ------------------------------------------------------------- program
  localparam int PLEN = 34;
  localparam int N = 240;
  localparam int P = 16;
  logic [23:0] prog [PLEN];

  initial begin
    prog[0]  = i_movi(G_R0, 16'd0);
    prog[1]  = i_movi(G_R0 + 6'd4, 16'd0);
    prog[2]  = i_doi(8'(N), 10'd4);
    prog[3]  = i_movm(1'b0, 1'b1, G_HID, 3'd0, AM_POSTINC);
    prog[4]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    // pre-emphasis in place; X1 = previous sample, Y1 = -0.98
    prog[5]  = i_movi(G_R0, 16'd0);
    prog[6]  = i_movi(G_X1, 16'd0);
    prog[7]  = i_movi(G_Y1, 16'h828F);
    prog[8]  = i_doi(8'(N), 10'd11);
    prog[9]  = i_movm(1'b0, 1'b0, G_A, 3'd0, AM_IND);
    prog[10] = i_par(ALU_MACR, M_X1, M_Y1, 1'b0, xmv(1'b1, 1'b0, 2'd1, 1'b0, 2'd0), 7'd0);
    prog[11] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b1, 2'd2, 1'b0, 2'd1), 7'd0);
    // windowing: result to X[256..] and Y[256..]
    prog[12] = i_movi(G_R0, 16'd0);
    prog[13] = i_movi(G_R0 + 6'd4, 16'd0);
    prog[14] = i_movi(G_R0 + 6'd1, 16'd256);
    prog[15] = i_movi(G_R0 + 6'd5, 16'd256);
    prog[16] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1));
    prog[17] = i_doi(8'(N), 10'd19);
    prog[18] = i_par(ALU_MPYR, M_X0, M_Y0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1));
    prog[19] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b1, 2'd2, 1'b1, 2'd1), xmv(1'b1, 1'b1, 2'd2, 1'b1, 2'd1));
    // autocorrelation, lags 0..16; R2 = 256 + k, R3 = 239 - k
    prog[20] = i_movi(G_R0 + 6'd2, 16'd256);
    prog[21] = i_movi(G_R0 + 6'd3, 16'(N - 1));
    prog[22] = i_doi(8'(P + 1), 10'd32);
    prog[23] = i_movr(G_R0 + 6'd2, G_R0);
    prog[24] = i_movi(G_R0 + 6'd4, 16'd256);
    prog[25] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1));
    prog[26] = i_dor(G_R0 + 6'd3, 10'd27);
    prog[27] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1));
    prog[28] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, 7'd0, 7'd0);
    prog[29] = i_movr(G_A, G_HID);
    prog[30] = i_movr(G_A0, G_HID);
    prog[31] = i_movm(1'b0, 1'b0, G_X1, 3'd2, AM_POSTINC);
    prog[32] = i_movm(1'b0, 1'b0, G_X1, 3'd3, AM_POSTDEC);
    prog[33] = i_jmp(CC_AL, 1'b0, 10'd33);
  end

  // ------------------------------------------------------------- stage timing
  // instructions executed from the first fetch of one address to the next
  longint n_adv = 0;
  longint t_at [int];
  always @(posedge clk) if (rst_n && !dut.boot) begin
    if (dut.u_cu.adv) begin
      if (!t_at.exists(int'(dut.pc))) t_at[int'(dut.pc)] = n_adv;
      n_adv++;
    end
  end

  // ------------------------------------------------------------- reference
  function automatic logic signed [15:0] lim(input longint v);
    if (v > 64'sh7FFFFFFF) return 16'sh7FFF;
    if (v < -64'sh80000000) return -16'sh8000;
    return 16'(v >>> 16);
  endfunction

  initial begin
    logic signed [15:0] s [N], h [N], sp [N], w [N];
    logic signed [15:0] x1;
    longint a;
    logic [15:0] hi, lo;
    real pi;
    pi = 3.14159265358979;
    for (int n = 0; n < N; n++) begin
      s[n] = 16'($signed($urandom_range(0, 1966)) - 983);   // about +-0.03
      h[n] = 16'($rtoi(32767.0 * (0.54 - 0.46 * $cos(2.0 * pi * n / (N - 1))) + 0.5));
    end
    // bit-true model of the three stages
    x1 = 0;
    for (int n = 0; n < N; n++) begin
      a = (longint'(s[n]) <<< 16) + 2 * longint'(x1) * longint'(16'sh828F) + 32768;
      a = a & ~64'hFFFF;
      x1 = s[n];
      sp[n] = lim(a);
    end
    for (int n = 0; n < N; n++) begin
      a = (2 * longint'(sp[n]) * longint'(h[n]) + 32768) & ~64'hFFFF;
      w[n] = lim(a);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int n = 0; n < N; n++) begin
      send({8'd0, s[n]});
      send({8'd0, h[n]});
    end
    for (int k = 0; k <= P; k++) begin
      a = 0;
      for (int n = 0; n < N - k; n++) a += 2 * longint'(w[n + k]) * longint'(w[n]);
      recv16(hi);
      recv16(lo);
      check($sformatf("r[%0d] high word", k), longint'($signed(hi)), lim(a));
      check($sformatf("r[%0d] low word", k), lo, a & 'hFFFF);
    end
    repeat (20) @(negedge clk);
    // instruction counts: pre-emphasis 3 + 1 + 3N, windowing 5 + 1 + 2N,
    // autocorrelation 3 + sum over k of (9 + 239 - k)
    check("pre-emphasis instructions", t_at[12] - t_at[5], 4 + 3 * N);
    check("windowing instructions", t_at[20] - t_at[12], 6 + 2 * N);
    check("autocorrelation instructions", t_at[33] - t_at[20], 3 + 17 * 248 - 136);
    $display("cycles: pre-emphasis %0d (reported 659 incl. segmentation), windowing %0d (reported 489), autocorrelation %0d (reported 4707)",
             t_at[12] - t_at[5], t_at[20] - t_at[12], t_at[33] - t_at[20]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
