// tb_segmentation: segmentation of a continuous sample stream into
// overlapping frames, run as a program on the whole DSP (dsp_top at its
// default sizes). Frames are 240 samples long and start every 160 samples
// (30 ms every 20 ms at 8 kHz), so consecutive frames share 80 samples.
//
// The pre-emphasised samples go into a 240-word circular buffer in X memory
// at base 256, addressed through R0 with M0 = 239. The base is a multiple of
// 256 because modulo addressing needs an aligned buffer. Each frame, the
// program takes 160 new samples from the host and pre-emphasises each one
// (s[n] - 0.98 s[n-1], with s[n-1] kept in X1 from one frame to the next).
// It writes them with (R0)+, which overwrites the oldest samples. R0 then
// points at the oldest of the 240 samples in the buffer, so one pass of 240
// reads with (R0)+ gives the frame in time order. That pass also returns R0
// to the same place. The pass multiplies each sample by a Hamming window
// held in Y memory, and accumulates the squared windowed samples in B. The
// result is the frame energy, the lag-0 autocorrelation, which is sent as B1
// and B0.
//
// Checks, over 4 frames: every frame energy equals a bit-true integer model
// of the same steps (rounding in MACR and MPYR, round half up), and is large
// enough that a wrong frame boundary would change it. The
// instruction count of the frame loop is checked exactly:
// 1846 per frame (4 per new sample, 5 per windowed sample, 6 of overhead).
// The buffer layout and this program are this design's own.
`timescale 1ns/1ps
module tb_segmentation;
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
    repeat (200000) @(posedge clk);
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
  localparam int N = 240;       // frame length
  localparam int H = 160;       // frame shift
  localparam int F = 4;         // frames
  localparam int PLEN = 29;
  logic [23:0] prog [PLEN];

  initial begin
    // window into Y[0..239]
    prog[0]  = i_movi(G_R0 + 6'd4, 16'd0);
    prog[1]  = i_doi(8'(N), 10'd2);
    prog[2]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[3]  = i_movi(G_R0, 16'd256);
    prog[4]  = i_movi(G_M0, 16'(N - 1));
    prog[5]  = i_movi(G_X1, 16'd0);
    prog[6]  = i_movi(G_Y1, 16'h828F);
    // first N - H samples of the stream
    prog[7]  = i_doi(8'(N - H), 10'd11);
    prog[8]  = i_movm(1'b0, 1'b1, G_HID, 3'd0, AM_IND);
    prog[9]  = i_movm(1'b0, 1'b0, G_A, 3'd0, AM_IND);
    prog[10] = i_par(ALU_MACR, M_X1, M_Y1, 1'b0, xmv(1'b1, 1'b0, 2'd1, 1'b0, 2'd0), 7'd0);
    prog[11] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b1, 2'd2, 1'b0, 2'd1), 7'd0);
    // one frame per iteration
    prog[12] = i_doi(8'(F), 10'd27);
    prog[13] = i_doi(8'(H), 10'd17);
    prog[14] = i_movm(1'b0, 1'b1, G_HID, 3'd0, AM_IND);
    prog[15] = i_movm(1'b0, 1'b0, G_A, 3'd0, AM_IND);
    prog[16] = i_par(ALU_MACR, M_X1, M_Y1, 1'b0, xmv(1'b1, 1'b0, 2'd1, 1'b0, 2'd0), 7'd0);
    prog[17] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b1, 2'd2, 1'b0, 2'd1), 7'd0);
    prog[18] = i_movi(G_R0 + 6'd4, 16'd0);
    prog[19] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[20] = i_doi(8'(N), 10'd25);
    prog[21] = i_movm(1'b0, 1'b0, G_X0, 3'd0, AM_POSTINC);
    prog[22] = i_movm(1'b1, 1'b0, G_Y0, 3'd4, AM_POSTINC);
    prog[23] = i_par(ALU_MPYR, M_X0, M_Y0, 1'b0, 7'd0, 7'd0);
    prog[24] = i_movr(G_A, G_X0);
    prog[25] = i_par(ALU_MAC, M_X0, M_X0, 1'b1, 7'd0, 7'd0);
    prog[26] = i_movr(G_B, G_HID);
    prog[27] = i_movr(G_B0, G_HID);
    prog[28] = i_jmp(CC_AL, 1'b0, 10'd28);
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

  localparam int NS = N - H + F * H;   // samples in the stream

  initial begin
    logic signed [15:0] s [NS], sp [NS], w [N];
    logic signed [15:0] x1, wv, got_hi;
    logic [15:0] got_lo;
    longint a, b;
    real pi;
    pi = 3.14159265358979;
    for (int n = 0; n < N; n++)
      w[n] = 16'($rtoi(32767.0 * (0.54 - 0.46 * $cos(2.0 * pi * n / (N - 1))) + 0.5));
    for (int n = 0; n < NS; n++)
      s[n] = 16'($rtoi(3000.0 * $sin(2.0 * pi * n / 7.0)) + $signed($urandom_range(0, 1200)) - 600);
    x1 = 0;
    for (int n = 0; n < NS; n++) begin
      a = ((longint'(s[n]) <<< 16) + 2 * longint'(x1) * longint'(16'sh828F) + 32768) & ~64'hFFFF;
      x1 = s[n];
      sp[n] = lim(a);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int n = 0; n < N; n++) send({8'd0, w[n]});
    for (int n = 0; n < N - H; n++) send({8'd0, s[n]});
    for (int f = 0; f < F; f++) begin
      for (int n = 0; n < H; n++) send({8'd0, s[N - H + f * H + n]});
      b = 0;
      for (int n = 0; n < N; n++) begin
        wv = lim((2 * longint'(sp[f * H + n]) * longint'(w[n]) + 32768) & ~64'hFFFF);
        b += 2 * longint'(wv) * longint'(wv);
      end
      recv16(got_hi);
      recv16(got_lo);
      check($sformatf("frame %0d energy high", f), got_hi, lim(b));
      check($sformatf("frame %0d energy low", f), got_lo, b & 64'hFFFF);
      check($sformatf("frame %0d energy is not trivially small", f), longint'(got_hi > 16'sd256), 1);
    end
    repeat (20) @(negedge clk);
    check("frame loop instructions", t_at[28] - t_at[12], 1 + F * (1 + 4 * H + 3 + 5 * N + 2));
    $display("cycles: one frame %0d", (t_at[28] - t_at[12] - 1) / F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
