// tb_lpc_cepstrum: conversion of 16 LPC coefficients into cepstral
// coefficients c_1..c_16, run as a program on the whole DSP (dsp_top at its
// default sizes).
//
// For a predictor polynomial 1 + sum a_k z^-k the minimum-phase recursion is
//     c_n = -a_n - (1/n) sum_{k=1}^{n-1} k c_k a_{n-k}
// The program keeps h_k = (k/16) c_k, so every stored value stays a
// fraction. For each n it forms S = sum_{k=0}^{n-1} h_k a_{n-k} with one MAC
// per term (h_0 = 0 lets the loop run n times, never zero times). It then
// multiplies the 16-bit S by the constant 1/n and shifts left four places to
// undo the 1/16. It adds a_n and negates to get c_n, and stores
// h_n = c_n * (n/16) for the later terms. The inner loop count grows with n,
// so the program uses a register-count DO loop nested in an immediate one.
// The constant fractions 1/n and n/16 are sent by the PC with the
// coefficients.
//
// Expected values come from a bit-true integer model of the same steps
// (truncation on 16-bit reads, rounding in MPYR). The instruction count is
// checked exactly: 20 + n per coefficient, with no loop overhead.
`timescale 1ns/1ps
module tb_lpc_cepstrum;
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
    repeat (100000) @(posedge clk);
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

  task automatic recv16(output logic signed [15:0] w);
    logic [7:0] f, h, l;
    do pc_read(3'd6, f); while (!f[1]);
    pc_read(3'd4, h);
    pc_read(3'd3, l);
    w = {h, l};
  endtask

  // ------------------------------------------------------------- program
  // X: h_k at X[k] (h_0 = 0), c_n at X[32 + n]
  // Y: a_k at Y[k], 1/n at Y[64 + n], n/16 at Y[96 + n]
  localparam int P = 16;
  localparam int PLEN = 45;
  logic [23:0] prog [PLEN];

  initial begin
    prog[0]  = i_movi(G_R0 + 6'd4, 16'd1);
    prog[1]  = i_doi(8'(P), 10'd2);
    prog[2]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[3]  = i_movi(G_R0 + 6'd4, 16'd65);
    prog[4]  = i_doi(8'(P), 10'd5);
    prog[5]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[6]  = i_movi(G_R0 + 6'd4, 16'd97);
    prog[7]  = i_doi(8'(P), 10'd8);
    prog[8]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[9]  = i_movi(G_R0 + 6'd3, 16'd1);      // n
    prog[10] = i_movi(G_R0 + 6'd5, 16'd1);      // -> a_n
    prog[11] = i_movi(G_R0 + 6'd6, 16'd65);     // -> 1/n
    prog[12] = i_movi(G_R0 + 6'd7, 16'd97);     // -> n/16
    prog[13] = i_movi(G_R0 + 6'd2, 16'd33);     // -> c_n
    prog[14] = i_movi(G_R0 + 6'd1, 16'd1);      // -> h_n
    prog[15] = i_movi(G_R0, 16'd0);
    prog[16] = i_movi(G_X1, 16'd0);
    prog[17] = i_movm(1'b0, 1'b1, G_X1, 3'd0, AM_IND);   // h_0 = 0
    prog[18] = i_doi(8'(P), 10'd39);
    prog[19] = i_movi(G_R0, 16'd0);
    prog[20] = i_movr(G_R0 + 6'd3, G_R0 + 6'd4);
    prog[21] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd2));
    prog[22] = i_dor(G_R0 + 6'd3, 10'd23);
    prog[23] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd1), xmv(1'b1, 1'b0, 2'd0, 1'b0, 2'd2));
    prog[24] = i_movr(G_A, G_X1);
    prog[25] = i_movm(1'b1, 1'b0, G_Y1, 3'd6, AM_POSTINC);
    prog[26] = i_par(ALU_MPY, M_X1, M_Y1, 1'b0, 7'd0, 7'd0);
    prog[27] = i_par(ALU_ASL, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[28] = i_par(ALU_ASL, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[29] = i_par(ALU_ASL, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[30] = i_par(ALU_ASL, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[31] = i_movm(1'b1, 1'b0, G_B, 3'd5, AM_POSTINC);
    prog[32] = i_par(ALU_ADD, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[33] = i_par(ALU_NEG, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[34] = i_movm(1'b0, 1'b1, G_A, 3'd2, AM_POSTINC);
    prog[35] = i_movr(G_A, G_X1);
    prog[36] = i_movm(1'b1, 1'b0, G_Y1, 3'd7, AM_POSTINC);
    prog[37] = i_par(ALU_MPYR, M_X1, M_Y1, 1'b0, 7'd0, 7'd0);
    prog[38] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b1, 2'd2, 1'b1, 2'd1), 7'd0);
    prog[39] = i_movm(1'b0, 1'b0, G_X1, 3'd3, AM_POSTINC);  // n = n + 1
    prog[40] = i_movi(G_R0 + 6'd2, 16'd33);
    prog[41] = i_doi(8'(P), 10'd43);
    prog[42] = i_movm(1'b0, 1'b0, G_X1, 3'd2, AM_POSTINC);
    prog[43] = i_movr(G_X1, G_HID);
    prog[44] = i_jmp(CC_AL, 1'b0, 10'd44);
  end

  // ------------------------------------------------------------- timing
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
    if (v < -64'sh80000000) return 16'sh8000;
    return 16'(v >>> 16);
  endfunction

  initial begin
    logic signed [15:0] a [P+1], q [P+1], e [P+1], h [P+1], c [P+1];
    logic signed [15:0] x1, got;
    longint s;
    a[0] = 0; q[0] = 0; e[0] = 0;
    for (int n = 1; n <= P; n++) begin
      a[n] = 16'($signed($urandom_range(0, 6554)) - 3277);   // about +-0.1
      q[n] = (n == 1) ? 16'sh7FFF : 16'((32768 + n / 2) / n);
      e[n] = (n == P) ? 16'sh7FFF : 16'(n * 2048);
    end
    h[0] = 0;
    for (int n = 1; n <= P; n++) begin
      s = 0;
      for (int k = 0; k < n; k++) s += 2 * longint'(h[k]) * longint'(a[n - k]);
      x1 = lim(s);
      s = (2 * longint'(x1) * longint'(q[n])) <<< 4;
      s = -(s + (longint'(a[n]) <<< 16));
      c[n] = lim(s);
      h[n] = lim((2 * longint'(c[n]) * longint'(e[n]) + 32768) & ~64'hFFFF);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int n = 1; n <= P; n++) send({8'd0, a[n]});
    for (int n = 1; n <= P; n++) send({8'd0, q[n]});
    for (int n = 1; n <= P; n++) send({8'd0, e[n]});
    for (int n = 1; n <= P; n++) begin
      recv16(got);
      check($sformatf("c_%0d", n), got, c[n]);
    end
    repeat (20) @(negedge clk);
    check("cepstrum instructions", t_at[40] - t_at[18], 1 + 20 * P + P * (P + 1) / 2);
    $display("cycles: LPC to cepstrum %0d (reported 1050 incl. c_0)", t_at[40] - t_at[18]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
