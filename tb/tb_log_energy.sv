// tb_log_energy: the cepstral coefficient c_0 = ln(E), E being the energy of
// the LPC residual, computed by a program on the whole DSP (dsp_top at its
// default sizes). It shows the normalisation path from the ALU to the
// address unit in the role it was built for.
//
// The program works on c_0 / 16 so that the result stays a fraction. With
// E = m * 2^-e, 0.5 <= m < 1:
//     ln(E) / 16 = ln(m) / 16 - ln 2 + (16 - e) * ln(2) / 16
// NORM R3,A repeated 15 times shifts E into the range of m and counts the
// shifts down in R3 (starting from 16, so R3 ends at 16 - e). The four bits
// of m below its leading one index a 16-entry table of ln(m)/16 at the
// middle of each interval, read with (R4+N4) addressing. The table is
// computed by the testbench and sent with the program. A DO loop whose count
// is R3 then adds ln(2)/16 R3 times. The table size and this exponent method
// are this design's choices.
//
// Checks, for 40 values of E spread over all exponents: the result equals a
// bit-true integer model of the same steps, and it lies within 0.003 of
// ln(E)/16 computed in floating point. The instruction count is checked
// exactly: 35 + (16 - e) per value, with no loop overhead.
`timescale 1ns/1ps
module tb_log_energy;
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
  localparam int NV = 40;                 // values of E
  localparam int PLEN = 22;
  localparam logic signed [15:0] MLN2 = -16'sd22713;   // -ln 2
  localparam logic signed [15:0] LN2_16 = 16'sd1420;   // ln(2) / 16
  logic [23:0] prog [PLEN];

  initial begin
    prog[0]  = i_movi(G_R0 + 6'd4, 16'd64);
    prog[1]  = i_doi(8'd16, 10'd2);
    prog[2]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    prog[3]  = i_movi(G_R0 + 6'd4, 16'd64);
    prog[4]  = i_movi(G_X0, 16'h4000);
    prog[5]  = i_movi(G_Y0, MLN2);
    prog[6]  = i_movi(G_Y1, LN2_16);
    prog[7]  = i_doi(8'(NV), 10'd20);
    prog[8]  = i_movr(G_HID, G_A);
    prog[9]  = i_movi(G_R0 + 6'd3, 16'd16);
    prog[10] = i_doi(8'd15, 10'd11);
    prog[11] = i_norm(1'b0, 3'd3);
    prog[12] = i_par(ALU_SUB, M_X0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[13] = i_doi(8'd10, 10'd14);
    prog[14] = i_par(ALU_ASR, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[15] = i_movr(G_A, G_N0 + 6'd4);
    prog[16] = i_movm(1'b1, 1'b0, G_A, 3'd4, AM_INDEXN);
    prog[17] = i_par(ALU_ADD, M_Y0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[18] = i_dor(G_R0 + 6'd3, 10'd19);
    prog[19] = i_par(ALU_ADD, M_Y1, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[20] = i_movr(G_A, G_HID);
    prog[21] = i_jmp(CC_AL, 1'b0, 10'd21);
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

  initial begin
    logic signed [15:0] tbl [16];
    longint n_exp = 1;
    logic [15:0] e [NV];
    logic signed [15:0] got;
    longint a;
    int r, idx, expv;
    real exact;
    for (int i = 0; i < 16; i++)
      tbl[i] = 16'($rtoi($floor(32768.0 * $ln((16384.0 + 1024.0 * i + 512.0) / 32768.0) / 16.0 + 0.5)));
    for (int v = 0; v < NV; v++) begin
      int sh;
      sh = v % 15;                                    // spread over all exponents
      e[v] = 16'($urandom_range(16384, 32767) >> sh);
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(24'(PLEN));
    for (int i = 0; i < PLEN; i++) send(prog[i]);
    for (int i = 0; i < 16; i++) send({8'd0, tbl[i]});
    for (int v = 0; v < NV; v++) begin
      send({8'd0, e[v]});
      // bit-true model
      a = longint'(e[v]) <<< 16;
      r = 16;
      for (int s = 0; s < 15; s++) if (a < 64'sh40000000) begin a = a <<< 1; r--; end
      idx = int'(((a >>> 16) - 'h4000) >>> 10);
      expv = int'(tbl[idx]) + int'(MLN2) + r * int'(LN2_16);
      n_exp += 35 + r;
      recv16(got);
      check($sformatf("c0 for E=%0d", e[v]), got, expv);
      exact = 32768.0 * $ln(real'(e[v]) / 32768.0) / 16.0;
      checks++;
      if ((real'(got) - exact > 98.0) || (exact - real'(got) > 98.0)) begin
        failures++;
        $display("FAIL c0 for E=%0d: %0d is too far from ln(E)/16 = %f", e[v], got, exact);
      end
    end
    repeat (20) @(negedge clk);
    check("c0 instructions", t_at[21] - t_at[7], n_exp);
    $display("cycles: c0 for %0d values %0d", NV, t_at[21] - t_at[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
