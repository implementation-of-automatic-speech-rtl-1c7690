// tb_levinson: Levinson-Durbin recursion of order 16, run as a program on
// the whole DSP (dsp_top at its default sizes). It turns 17 autocorrelation
// values into 16 LPC coefficients, the reflection coefficients and the
// prediction error energy.
//
// For i = 1..16 the program computes
//     num = r_i + sum_{j<i} a_j r_{i-j}          (one MAC per term)
//     k_i = -num / E                            (16 DIV steps on |num|, then
//                                                the sign from num)
//     a_j <- a_j + k_i a_{i-j} for j < i, a_i = k_i   (MACR per term)
//     E   <- E - E k_i^2
// with E starting at r_0. The coefficient vectors of two successive orders
// live in two buffers that swap roles each iteration (base addresses in N2
// and N3). Each buffer is kept in both X and Y memory, so one MAC can read
// a_j and a_{i-j} at once. Slot 0 of each buffer holds 0, so every inner
// loop runs i times and never zero times. The program sends each k_i as it
// is found, then a_1..a_16 and the final E.
//
// The input is the autocorrelation of a first-order autoregressive test
// signal (pole 0.7) scaled to r_0 = 0.5. Expected values come from a
// bit-true integer model of the same steps, the division step included.
// The number of instructions depends on the sign branches and is printed
// with the cycle budget reported for the original implementation.
`timescale 1ns/1ps
module tb_levinson;
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
  // X: r_0..r_16 at X[0..16]; buffers at X/Y[64..80] and X/Y[96..112]
  // Y: E at Y[32]
  localparam int P = 16;
  localparam int PLEN = 67;
  logic [23:0] prog [PLEN];

  function automatic logic [6:0] ld(input logic [1:0] rg, input logic rn, input logic [1:0] md);
    return xmv(1'b1, 1'b0, rg, rn, md);
  endfunction
  function automatic logic [6:0] st(input logic [1:0] rg, input logic rn, input logic [1:0] md);
    return xmv(1'b1, 1'b1, rg, rn, md);
  endfunction

  initial begin
    // clear both buffers, load r, E = r_0
    prog[0]  = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[1]  = i_movi(G_R0, 16'd64);
    prog[2]  = i_movi(G_R0 + 6'd4, 16'd64);
    prog[3]  = i_doi(8'd64, 10'd4);
    prog[4]  = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, st(2'd2, 1'b0, 2'd1), st(2'd2, 1'b0, 2'd1));
    prog[5]  = i_movi(G_R0, 16'd0);
    prog[6]  = i_doi(8'(P + 1), 10'd7);
    prog[7]  = i_movm(1'b0, 1'b1, G_HID, 3'd0, AM_POSTINC);
    prog[8]  = i_movi(G_R0 + 6'd6, 16'd32);
    prog[9]  = i_movi(G_R0 + 6'd1, 16'd0);
    prog[10] = i_movm(1'b0, 1'b0, G_X1, 3'd1, AM_IND);
    prog[11] = i_movm(1'b1, 1'b1, G_X1, 3'd6, AM_IND);
    prog[12] = i_movi(G_N0 + 6'd2, 16'd64);     // previous order
    prog[13] = i_movi(G_N0 + 6'd3, 16'd96);     // order being built
    prog[14] = i_movi(G_R0 + 6'd2, 16'd1);      // i
    prog[15] = i_doi(8'(P), 10'd58);
    // num = r_i + sum_{j=0}^{i-1} a_j r_{i-j}
    prog[16] = i_movr(G_R0 + 6'd2, G_R0);
    prog[17] = i_movr(G_N0 + 6'd2, G_R0 + 6'd4);
    prog[18] = i_movm(1'b0, 1'b0, G_A, 3'd0, AM_IND);
    prog[19] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, ld(2'd0, 1'b0, 2'd2), ld(2'd0, 1'b0, 2'd1));
    prog[20] = i_dor(G_R0 + 6'd2, 10'd21);
    prog[21] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, ld(2'd0, 1'b0, 2'd2), ld(2'd0, 1'b0, 2'd1));
    // k = -num / E
    prog[22] = i_movr(G_A, G_X1);
    prog[23] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[24] = i_movr(G_X1, G_A);
    prog[25] = i_par(ALU_ABS, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[26] = i_movm(1'b1, 1'b0, G_X0, 3'd6, AM_IND);
    prog[27] = i_doi(8'd16, 10'd28);
    prog[28] = i_par(ALU_DIV, M_X0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[29] = i_movr(G_A0, G_Y1);
    prog[30] = i_movr(G_Y1, G_A);
    prog[31] = i_par(ALU_CMP, M_X1, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[32] = i_jmp(CC_GT, 1'b0, 10'd34);
    prog[33] = i_par(ALU_NEG, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[34] = i_movr(G_A, G_Y1);
    prog[35] = i_movr(G_A, G_HID);
    // a_j + k a_{i-j} into the other buffer, j = 0..i-1; then a_i = k
    prog[36] = i_movr(G_N0 + 6'd2, G_R0 + 6'd4);
    prog[37] = i_movr(G_N0 + 6'd2, G_R0);
    prog[38] = i_movr(G_R0 + 6'd2, G_N0);
    prog[39] = i_movm(1'b0, 1'b0, G_X1, 3'd0, AM_POSTINCN);
    prog[40] = i_movr(G_N0 + 6'd3, G_R0 + 6'd1);
    prog[41] = i_movr(G_N0 + 6'd3, G_R0 + 6'd5);
    prog[42] = i_dor(G_R0 + 6'd2, 10'd45);
    prog[43] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, ld(2'd0, 1'b0, 2'd2), ld(2'd2, 1'b0, 2'd1));
    prog[44] = i_par(ALU_MACR, M_X0, M_Y1, 1'b0, 7'd0, 7'd0);
    prog[45] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, st(2'd2, 1'b1, 2'd1), st(2'd2, 1'b1, 2'd1));
    prog[46] = i_movm(1'b0, 1'b1, G_Y1, 3'd1, AM_IND);
    prog[47] = i_movm(1'b1, 1'b1, G_Y1, 3'd5, AM_IND);
    // E = E - E k^2
    prog[48] = i_par(ALU_MPYR, M_Y1, M_Y1, 1'b0, 7'd0, 7'd0);
    prog[49] = i_movr(G_A, G_X1);
    prog[50] = i_movm(1'b1, 1'b0, G_Y0, 3'd6, AM_IND);
    prog[51] = i_par(ALU_MPY, M_X1, M_Y0, 1'b0, 7'd0, 7'd0);
    prog[52] = i_movm(1'b1, 1'b0, G_B, 3'd6, AM_IND);
    prog[53] = i_par(ALU_SUB, 2'd0, SRC_ACC, 1'b1, 7'd0, 7'd0);
    prog[54] = i_movm(1'b1, 1'b1, G_B, 3'd6, AM_IND);
    // swap the buffers, next order
    prog[55] = i_movr(G_N0 + 6'd2, G_X1);
    prog[56] = i_movr(G_N0 + 6'd3, G_N0 + 6'd2);
    prog[57] = i_movr(G_X1, G_N0 + 6'd3);
    prog[58] = i_movm(1'b0, 1'b0, G_X1, 3'd2, AM_POSTINC);
    // results
    prog[59] = i_movr(G_N0 + 6'd2, G_R0 + 6'd4);
    prog[60] = i_movm(1'b1, 1'b0, G_X1, 3'd4, AM_POSTINC);
    prog[61] = i_doi(8'(P), 10'd63);
    prog[62] = i_movm(1'b1, 1'b0, G_X1, 3'd4, AM_POSTINC);
    prog[63] = i_movr(G_X1, G_HID);
    prog[64] = i_movm(1'b1, 1'b0, G_X1, 3'd6, AM_IND);
    prog[65] = i_movr(G_X1, G_HID);
    prog[66] = i_jmp(CC_AL, 1'b0, 10'd66);
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

  function automatic longint wrap40(input longint v);
    return (v <<< 24) >>> 24;
  endfunction

  initial begin
    localparam int NSIG = 240;
    longint sig [NSIG];
    longint acc [P+1];
    logic signed [15:0] r [P+1], old [P+1], nw [P+1], kk [P+1];
    logic signed [15:0] e_q, num, q, x1, got;
    longint a, b, d, dsh;
    logic c;

    // test signal: s[n] = e[n] + 0.7 s[n-1], e uniform
    sig[0] = 0;
    for (int n = 1; n < NSIG; n++)
      sig[n] = longint'($signed($urandom_range(0, 2000)) - 1000) + ((sig[n - 1] * 22938) >>> 15);
    for (int k = 0; k <= P; k++) begin
      acc[k] = 0;
      for (int n = 0; n + k < NSIG; n++) acc[k] += sig[n] * sig[n + k];
    end
    for (int k = 0; k <= P; k++) r[k] = 16'((acc[k] * 16384) / acc[0]);

    // bit-true model
    for (int j = 0; j <= P; j++) old[j] = 0;
    e_q = r[0];
    for (int i = 1; i <= P; i++) begin
      a = longint'(r[i]) <<< 16;
      for (int j = 0; j < i; j++) a += 2 * longint'(old[j]) * longint'(r[i - j]);
      num = lim(a);
      d = longint'(num) <<< 16;
      if (d < 0) d = -d;
      c = 1'b0;
      for (int s = 0; s < 16; s++) begin
        dsh = wrap40((d <<< 1) | longint'(c));
        if ((d < 0) != (e_q < 0)) d = wrap40(dsh + (longint'(e_q) <<< 16));
        else                      d = wrap40(dsh - (longint'(e_q) <<< 16));
        c = !((d < 0) != (e_q < 0));
      end
      q = 16'(d & 'hFFFF);
      a = longint'(q) <<< 16;
      if (!(-(longint'(num) <<< 16) > 0)) a = -a;
      kk[i] = lim(a);
      for (int j = 0; j <= P; j++) nw[j] = old[j];
      for (int j = 0; j < i; j++)
        nw[j] = lim(((longint'(old[j]) <<< 16) + 2 * longint'(kk[i]) * longint'(old[i - j]) + 32768) & ~64'hFFFF);
      nw[i] = kk[i];
      x1 = lim((2 * longint'(kk[i]) * longint'(kk[i]) + 32768) & ~64'hFFFF);
      b = (longint'(e_q) <<< 16) - 2 * longint'(x1) * longint'(e_q);
      e_q = lim(b);
      old = nw;
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int k = 0; k <= P; k++) send({8'd0, r[k]});
    for (int i = 1; i <= P; i++) begin
      recv16(got);
      check($sformatf("k_%0d", i), got, kk[i]);
    end
    for (int j = 1; j <= P; j++) begin
      recv16(got);
      check($sformatf("a_%0d", j), got, old[j]);
    end
    recv16(got);
    check("prediction error", got, e_q);
    repeat (20) @(negedge clk);
    $display("a_1 = %0d (about -0.7 expected from the test signal), E = %0d", old[1], e_q);
    $display("cycles: Levinson-Durbin %0d without host waits (reported 1345)", t_at[59] - t_at[15]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
