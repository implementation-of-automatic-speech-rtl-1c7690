// tb_hmm_classify: the recogniser's pattern classification run as a program
// on the whole DSP (dsp_top at its default sizes): Gaussian state scores,
// one Viterbi step per frame and class determination, for 10 word models of
// 5 left-right states and 17-dimensional feature vectors.
//
// The testbench plays the PC. It boots a 67-word program, then sends the
// model parameters and six feature vectors. Per state s the score is the
// log of a diagonal-covariance Gaussian, written as
//     log b_s(x) = c_s + sum_d ( w_sd * x_d^2 + v_sd * x_d )
// with w = -1/(2 sigma^2), v = mu/sigma^2 and c_s holding the constant
// terms. This form needs two MACs per dimension and one auxiliary value per
// state. Per model it stores 85 w, 85 v, 5 c and, in its own layout, the self
// and next-state log transition weights. The program keeps the frame as
// interleaved x_d^2, x_d in a 34-word circular buffer (modulo addressing),
// so each state rereads it without pointer reloads. The Viterbi step
// updates, in place and from the last state down,
//     delta_j = max(delta_j + a_jj, delta_j-1 + a_j-1,j) + log b_j(x)
// using compare and conditional jump. After the last frame the program picks
// the model with the largest final-state score (first one on a tie) and
// sends its index, its score and all 60 words of the delta table.
//
// Expected values come from a bit-true integer model of the same steps.
// The Gaussian stage's instruction count is checked exactly; the Viterbi and
// class-determination counts depend on the branches and are printed with the
// cycle budget reported for the original implementation.
`timescale 1ns/1ps
module tb_hmm_classify;
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

  task automatic recv16(output logic signed [15:0] w);
    logic [7:0] f, h, l;
    do pc_read(3'd6, f); while (!f[1]);
    pc_read(3'd4, h);
    pc_read(3'd3, l);
    w = {h, l};
  endtask

  // ------------------------------------------------------------- sizes
  localparam int NM = 10;            // word models
  localparam int NS = 5;             // states per model
  localparam int D = 17;             // feature dimension
  localparam int F = 6;              // frames (state 4 is first reachable in frame 5)
  localparam int PSTRIDE = 2 * D + 1;   // Y words per state: w, v pairs, then c
  localparam int TBASE = 1792;       // Y address of the transition weights
  localparam int DBASE = 64;         // X address of the delta table (6 per model)
  localparam int LBASE = 192;        // X address of the state scores
  localparam int PLEN = 67;

  // ------------------------------------------------------------- program
  logic [23:0] prog [PLEN];
  function automatic logic [6:0] ld(input logic [1:0] rg, input logic rn, input logic [1:0] md);
    return xmv(1'b1, 1'b0, rg, rn, md);
  endfunction
  function automatic logic [6:0] st(input logic [1:0] rg, input logic rn, input logic [1:0] md);
    return xmv(1'b1, 1'b1, rg, rn, md);
  endfunction

  initial begin
    // load parameters, transitions and initial deltas
    prog[0]  = i_movi(G_M0, 16'd33);
    prog[1]  = i_movi(G_R0, 16'd0);
    prog[2]  = i_movi(G_R0 + 6'd4, 16'd0);
    prog[3]  = i_movi(G_N0 + 6'd5, 16'(NM * NS * PSTRIDE));
    prog[4]  = i_dor(G_N0 + 6'd5, 10'd5);
    prog[5]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[6]  = i_movi(G_R0 + 6'd4, 16'(TBASE));
    prog[7]  = i_doi(8'(NM * 2 * NS), 10'd8);
    prog[8]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[9]  = i_movi(G_R0 + 6'd1, 16'(DBASE));
    prog[10] = i_doi(8'(NM * (NS + 1)), 10'd11);
    prog[11] = i_movm(1'b0, 1'b1, G_HID, 3'd1, AM_POSTINC);
    // one pass per frame
    prog[12] = i_doi(8'(F), 10'd47);
    // frame: x_d^2, x_d into the circular buffer at X[0..33]
    prog[13] = i_doi(8'(D), 10'd17);
    prog[14] = i_movr(G_HID, G_X1);
    prog[15] = i_par(ALU_MPYR, M_X1, M_X1, 1'b0, 7'd0, 7'd0);
    prog[16] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, st(2'd2, 1'b0, 2'd1), 7'd0);
    prog[17] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, st(2'd1, 1'b0, 2'd1), 7'd0);
    // Gaussian scores of all 50 states
    prog[18] = i_movi(G_R0 + 6'd4, 16'd0);
    prog[19] = i_movi(G_R0 + 6'd1, 16'(LBASE));
    prog[20] = i_doi(8'(NM * NS), 10'd28);
    prog[21] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, ld(2'd0, 1'b0, 2'd1), ld(2'd0, 1'b0, 2'd1));
    prog[22] = i_doi(8'(D - 1), 10'd24);
    prog[23] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, ld(2'd1, 1'b0, 2'd1), ld(2'd1, 1'b0, 2'd1));
    prog[24] = i_par(ALU_MAC, M_X1, M_Y1, 1'b0, ld(2'd0, 1'b0, 2'd1), ld(2'd0, 1'b0, 2'd1));
    prog[25] = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, ld(2'd1, 1'b0, 2'd1), ld(2'd1, 1'b0, 2'd1));
    prog[26] = i_par(ALU_MAC, M_X1, M_Y1, 1'b0, 7'd0, ld(2'd0, 1'b0, 2'd1));
    prog[27] = i_par(ALU_ADD, M_Y0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[28] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, st(2'd2, 1'b1, 2'd1), 7'd0);
    // Viterbi step, last model and last state first
    prog[29] = i_movi(G_M0, 16'h07FF);
    prog[30] = i_movi(G_R0, 16'(DBASE + 6 * NM - 1));
    prog[31] = i_movi(G_R0 + 6'd2, 16'(DBASE + 6 * NM - 1));
    prog[32] = i_movi(G_R0 + 6'd1, 16'(LBASE + NM * NS - 1));
    prog[33] = i_movi(G_R0 + 6'd4, 16'(TBASE + 2 * NS * NM - 1));
    prog[34] = i_doi(8'(NM), 10'd45);
    prog[35] = i_doi(8'(NS), 10'd43);
    prog[36] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, ld(2'd2, 1'b0, 2'd2), ld(2'd0, 1'b0, 2'd2));
    prog[37] = i_par(ALU_ADD, M_Y0, 2'd0, 1'b0, ld(2'd3, 1'b0, 2'd0), ld(2'd1, 1'b0, 2'd2));
    prog[38] = i_par(ALU_ADD, M_Y1, 2'd0, 1'b1, ld(2'd0, 1'b1, 2'd2), 7'd0);
    prog[39] = i_par(ALU_CMP, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[40] = i_jmp(CC_GE, 1'b0, 10'd42);
    prog[41] = i_par(ALU_TFR, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[42] = i_par(ALU_ADD, M_X0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[43] = i_movm(1'b0, 1'b1, G_A, 3'd2, AM_POSTDEC);
    prog[44] = i_movm(1'b0, 1'b0, G_X1, 3'd0, AM_POSTDEC);
    prog[45] = i_movm(1'b0, 1'b0, G_X1, 3'd2, AM_POSTDEC);
    prog[46] = i_movi(G_M0, 16'd33);
    prog[47] = i_movi(G_R0, 16'd0);
    // class determination: largest final-state score
    prog[48] = i_movi(G_R0 + 6'd1, 16'(DBASE + NS));
    prog[49] = i_movi(G_N0 + 6'd1, 16'd6);
    prog[50] = i_movi(G_R0 + 6'd3, 16'd0);
    prog[51] = i_movi(G_R0 + 6'd5, 16'd0);
    prog[52] = i_movm(1'b0, 1'b0, G_B, 3'd1, AM_IND);
    prog[53] = i_doi(8'(NM), 10'd59);
    prog[54] = i_movm(1'b0, 1'b0, G_A, 3'd1, AM_POSTINCN);
    prog[55] = i_par(ALU_CMP, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[56] = i_jmp(CC_LE, 1'b0, 10'd59);
    prog[57] = i_par(ALU_TFR, 2'd0, SRC_ACC, 1'b1, 7'd0, 7'd0);
    prog[58] = i_movr(G_R0 + 6'd3, G_R0 + 6'd5);
    prog[59] = i_movm(1'b0, 1'b0, G_X1, 3'd3, AM_POSTINC);
    prog[60] = i_movr(G_R0 + 6'd5, G_HID);
    prog[61] = i_movr(G_B, G_HID);
    prog[62] = i_movi(G_R0 + 6'd1, 16'(DBASE));
    prog[63] = i_doi(8'(NM * (NS + 1)), 10'd65);
    prog[64] = i_movm(1'b0, 1'b0, G_X1, 3'd1, AM_POSTINC);
    prog[65] = i_movr(G_X1, G_HID);
    prog[66] = i_jmp(CC_AL, 1'b0, 10'd66);
  end

  // ------------------------------------------------------------- stage timing
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

  function automatic logic signed [15:0] rnd_in(input int lo, input int hi);
    return 16'($signed($urandom_range(0, hi - lo)) + lo);
  endfunction

  initial begin
    logic signed [15:0] w [NM*NS][D], v [NM*NS][D], c [NM*NS];
    logic signed [15:0] aself [NM][NS], anext [NM][NS];
    logic signed [15:0] dl [NM][NS];
    logic signed [15:0] x [F][D], z [D], lb [NM*NS];
    logic signed [15:0] got;
    longint a, b;
    int best;

    for (int s = 0; s < NM * NS; s++) begin
      for (int d = 0; d < D; d++) begin
        w[s][d] = rnd_in(-655, 0);      // about -0.02 .. 0
        v[s][d] = rnd_in(-328, 328);    // about +-0.01
      end
      c[s] = rnd_in(-1638, 0);          // about -0.05 .. 0
    end
    for (int m = 0; m < NM; m++)
      for (int j = 0; j < NS; j++) begin
        aself[m][j] = rnd_in(-1638, 0);
        anext[m][j] = rnd_in(-1638, 0);
        dl[m][j] = (j == 0) ? 16'sd0 : 16'sh8000;
      end
    for (int f = 0; f < F; f++)
      for (int d = 0; d < D; d++) x[f][d] = rnd_in(-16384, 16383);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int s = 0; s < NM * NS; s++) begin
      for (int d = 0; d < D; d++) begin
        send({8'd0, w[s][d]});
        send({8'd0, v[s][d]});
      end
      send({8'd0, c[s]});
    end
    // transitions: Y[TBASE + 10m + 2j] = a_j-1,j, Y[TBASE + 10m + 2j + 1] = a_jj
    for (int m = 0; m < NM; m++)
      for (int j = 0; j < NS; j++) begin
        send({8'd0, anext[m][j]});
        send({8'd0, aself[m][j]});
      end
    // deltas: X[DBASE + 6m] = -1 (no predecessor of state 0), then delta_0..4
    for (int m = 0; m < NM; m++) begin
      send({8'd0, 16'h8000});
      for (int j = 0; j < NS; j++) send({8'd0, dl[m][j]});
    end

    for (int f = 0; f < F; f++) begin
      for (int d = 0; d < D; d++) send({8'd0, x[f][d]});
      // bit-true model of the frame
      for (int d = 0; d < D; d++)
        z[d] = lim((2 * longint'(x[f][d]) * longint'(x[f][d]) + 32768) & ~64'hFFFF);
      for (int s = 0; s < NM * NS; s++) begin
        a = longint'(c[s]) <<< 16;
        for (int d = 0; d < D; d++)
          a += 2 * longint'(z[d]) * longint'(w[s][d]) + 2 * longint'(x[f][d]) * longint'(v[s][d]);
        lb[s] = lim(a);
      end
      for (int m = 0; m < NM; m++)
        for (int j = NS - 1; j >= 0; j--) begin
          a = (longint'(dl[m][j]) + longint'(aself[m][j])) <<< 16;
          b = (longint'((j == 0) ? 16'sh8000 : dl[m][j - 1]) + longint'(anext[m][j])) <<< 16;
          if (a < b) a = b;
          a += longint'(lb[m * NS + j]) <<< 16;
          dl[m][j] = lim(a);
        end
    end
    best = 0;
    for (int m = 1; m < NM; m++) if (dl[m][NS - 1] > dl[best][NS - 1]) best = m;
    // the decision must rest on real scores, not on saturated or tied ones
    checks++;
    for (int m = 0; m < NM; m++)
      if ((m != best && dl[m][NS - 1] == dl[best][NS - 1]) || dl[m][NS - 1] == 16'sh8000) begin
        failures++;
        $display("FAIL final score of model %0d is saturated or tied", m);
        break;
      end

    recv16(got);
    check("recognised model", got, best);
    recv16(got);
    check("its score", got, dl[best][NS - 1]);
    for (int m = 0; m < NM; m++) begin
      recv16(got);
      check($sformatf("model %0d sentinel", m), got, 16'sh8000);
      for (int j = 0; j < NS; j++) begin
        recv16(got);
        check($sformatf("model %0d delta %0d", m, j), got, dl[m][j]);
      end
    end
    repeat (20) @(negedge clk);
    // Gaussian stage: 2 set-up + DO + 50 x (CLR + DO + 32 + 4)
    check("Gaussian stage instructions", t_at[29] - t_at[18], 3 + NM * NS * (2 + 2 * (D - 1) + 4));
    $display("cycles per frame: Gaussian scores %0d (reported 3609), Viterbi %0d (reported 1429), class determination %0d (reported 87)",
             t_at[29] - t_at[18], t_at[46] - t_at[29], t_at[60] - t_at[48]);
    $display("recognised model %0d", best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
