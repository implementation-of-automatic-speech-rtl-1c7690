// tb_dsp_top: end-to-end test of the whole DSP at its default sizes.
//
// The testbench plays the PC. Through the 8-bit host port it boots the DSP:
// it sends the program length and the program (three bytes per instruction)
// to the boot ROM loader, then 16 X words and 16 Y words of random data. The
// loaded program runs kernels of the kind a speech recogniser needs and
// sends each result back through the host port:
//   * dot product with MAC and two parallel memory moves per cycle, ending in
//     a rounding MACR (autocorrelation / Gaussian distance style)
//   * sum of squares over a 16-word circular buffer read 20 times (modulo)
//   * nested DO loops
//   * maximum search with compare and conditional jump (class determination)
//   * normalisation steps (left and right) with the NORM signal to the AGU
//   * a 16-step non-restoring division
//   * 40-bit saturation and 16-bit limiting
//   * a write of the status register
// Expected values are computed here with plain integer arithmetic. The
// testbench also counts how often each mechanism happened (host stalls,
// program-memory writes, loop returns, nesting, taken and untaken branches,
// NORM up/down, saturation, every bus switch route used) and checks the
// cycle count of the dot product (one instruction per cycle, no loop cost).
`timescale 1ns/1ps
module tb_dsp_top;
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

  // ------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------- PC bus
  task automatic pc_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    pc_addr = {13'd0, a}; pc_wdata = d; pc_wr = 1'b1;
    @(negedge clk);
    pc_wr = 1'b0;
  endtask

  task automatic pc_read(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk);
    pc_addr = {13'd0, a};
    #1 d = pc_rdata;
    pc_rd = 1'b1;
    @(negedge clk);
    pc_rd = 1'b0;
  endtask

  task automatic wait_in_free();
    logic [7:0] f;
    do pc_read(3'd6, f); while (f[0]);
  endtask

  task automatic send16(input logic [15:0] w);
    wait_in_free();
    pc_write(3'd1, w[15:8]);
    pc_write(3'd0, w[7:0]);
  endtask

  task automatic send24(input logic [23:0] w);
    wait_in_free();
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
  localparam int PLEN = 72;
  logic [23:0] prog [PLEN];
  localparam logic [6:0] XIN = 7'b1000001;  // X:(R0)+,X0
  localparam logic [6:0] YIN = 7'b1000001;  // Y:(R4)+,Y0

  initial begin
    for (int i = 0; i < PLEN; i++) prog[i] = I_NOP;
    // load 16 X and 16 Y words from the host
    prog[0]  = i_movi(G_R0, 16'd0);
    prog[1]  = i_movi(G_R0 + 6'd4, 16'd0);
    prog[2]  = i_doi(8'd16, 10'd4);
    prog[3]  = i_movm(1'b0, 1'b1, G_HID, 3'd0, AM_POSTINC);
    prog[4]  = i_movm(1'b1, 1'b1, G_HID, 3'd4, AM_POSTINC);
    // dot product
    prog[5]  = i_movi(G_R0, 16'd0);
    prog[6]  = i_movi(G_R0 + 6'd4, 16'd0);
    prog[7]  = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, XIN, YIN);
    prog[8]  = i_doi(8'd15, 10'd9);
    prog[9]  = i_par(ALU_MAC, M_X0, M_Y0, 1'b0, XIN, YIN);
    prog[10] = i_par(ALU_MACR, M_X0, M_Y0, 1'b0, 7'd0, 7'd0);
    prog[11] = i_movr(G_A, G_HID);
    prog[12] = i_movr(G_A0, G_HID);
    // modulo-16 buffer read 20 times from index 5
    prog[13] = i_movi(G_M0 + 6'd1, 16'd15);
    prog[14] = i_movi(G_R0 + 6'd1, 16'd5);
    prog[15] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[16] = i_doi(8'd20, 10'd18);
    prog[17] = i_par(ALU_NOP, 2'd0, 2'd0, 1'b0, xmv(1'b1, 1'b0, 2'd0, 1'b1, 2'd1), 7'd0);
    prog[18] = i_par(ALU_MAC, M_X0, M_X0, 1'b1, 7'd0, 7'd0);
    prog[19] = i_movr(G_B, G_HID);
    prog[20] = i_movr(G_B0, G_HID);
    prog[21] = i_movr(G_R0 + 6'd1, G_HID);
    // nested loops: 3 x (4 + 1) additions
    prog[22] = i_movi(G_X1, 16'h0100);
    prog[23] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[24] = i_doi(8'd3, 10'd27);
    prog[25] = i_doi(8'd4, 10'd26);
    prog[26] = i_par(ALU_ADD, M_X1, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[27] = i_par(ALU_ADD, M_X1, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[28] = i_movr(G_B, G_HID);
    // maximum of Y[7..0], scanned downwards; R3 = scan position, R2 = best
    prog[29] = i_movi(G_R0 + 6'd5, 16'd7);
    prog[30] = i_movi(G_R0 + 6'd3, 16'd1);
    prog[31] = i_movi(G_R0 + 6'd2, 16'd0);
    prog[32] = i_movm(1'b1, 1'b0, G_A, 3'd5, AM_POSTDEC);
    prog[33] = i_doi(8'd7, 10'd39);
    prog[34] = i_movm(1'b1, 1'b0, G_B, 3'd5, AM_POSTDEC);
    prog[35] = i_par(ALU_CMP, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[36] = i_jmp(CC_GE, 1'b0, 10'd39);
    prog[37] = i_par(ALU_TFR, 2'd0, SRC_ACC, 1'b0, 7'd0, 7'd0);
    prog[38] = i_movr(G_R0 + 6'd3, G_R0 + 6'd2);
    prog[39] = i_movm(1'b0, 1'b0, G_X1, 3'd3, AM_POSTINC);
    prog[40] = i_movr(G_A, G_HID);
    prog[41] = i_movr(G_R0 + 6'd2, G_HID);
    // normalisation of a small value: 16 NORM steps
    prog[42] = i_movi(G_A, 16'h0100);
    prog[43] = i_movi(G_R0 + 6'd6, 16'd0);
    prog[44] = i_doi(8'd16, 10'd45);
    prog[45] = i_norm(1'b0, 3'd6);
    prog[46] = i_movr(G_R0 + 6'd6, G_HID);
    prog[47] = i_movr(G_A, G_HID);
    // extension in use: limiting on read, NORM shifts right
    prog[48] = i_movi(G_X0, 16'h7000);
    prog[49] = i_movi(G_A, 16'h7000);
    prog[50] = i_par(ALU_ADD, M_X0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[51] = i_movr(G_A, G_HID);
    prog[52] = i_movi(G_R0 + 6'd7, 16'd0);
    prog[53] = i_norm(1'b0, 3'd7);
    prog[54] = i_movr(G_R0 + 6'd7, G_HID);
    prog[55] = i_movr(G_A, G_HID);
    // division 0.25 / 0.75
    prog[56] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b1, 7'd0, 7'd0);
    prog[57] = i_movi(G_X0, 16'h6000);
    prog[58] = i_movi(G_A, 16'h2000);
    prog[59] = i_doi(8'd16, 10'd60);
    prog[60] = i_par(ALU_DIV, M_X0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[61] = i_movr(G_A0, G_HID);
    // saturation: 257 x (-1 * -1)
    prog[62] = i_movi(G_X0, 16'h8000);
    prog[63] = i_par(ALU_CLR, 2'd0, 2'd0, 1'b0, 7'd0, 7'd0);
    prog[64] = i_doi(8'd255, 10'd65);
    prog[65] = i_par(ALU_MAC, M_X0, M_X0, 1'b0, 7'd0, 7'd0);
    prog[66] = i_par(ALU_MAC, M_X0, M_X0, 1'b0, 7'd0, 7'd0);
    prog[67] = i_par(ALU_MAC, M_X0, M_X0, 1'b0, 7'd0, 7'd0);
    prog[68] = i_movr(G_A2, G_HID);
    prog[69] = i_movr(G_A0, G_HID);
    prog[70] = i_movi(G_HIS, 16'h005A);
    prog[71] = i_jmp(CC_AL, 1'b0, 10'd71);
  end

  // ------------------------------------------------------------- mechanisms
  int n_stall = 0, n_pmw = 0, n_loopback = 0, n_nested = 0, n_jtaken = 0, n_jnot = 0;
  int n_ninc = 0, n_ndec = 0, n_sat = 0, n_dual = 0, n_mod = 0;
  int n_route [8];
  longint cyc = 0, t5 = -1, t11 = -1;

  initial for (int i = 0; i < 8; i++) n_route[i] = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_cu.stall) n_stall++;
    if (dut.u_cu.pm_we) n_pmw++;
    if (dut.u_cu.loop_end && !dut.u_cu.pop) n_loopback++;
    if (dut.u_cu.sp >= 2) n_nested++;
    if (dut.u_cu.adv && dut.u_cu.instr[23:18] == {2'b11, OP_JMP} && dut.u_cu.instr[17:15] != CC_AL) begin
      if (dut.u_cu.jmp_take) n_jtaken++; else n_jnot++;
    end
    if (dut.u_agu.cnt.norm_en && dut.norm_inc) n_ninc++;
    if (dut.u_agu.cnt.norm_en && dut.norm_dec) n_ndec++;
    if (dut.alu_cnt.op == ALU_MAC && dut.u_alu.ccr_next.v) n_sat++;
    if (dut.mx_re && dut.my_re && dut.alu_cnt.op != ALU_NOP) n_dual++;
    if (dut.agu_cnt.xen && dut.agu_cnt.xrn == 2'd1 && dut.u_agu.r[1] == 11'd15) n_mod++;
    if (!dut.u_cu.stall) n_route[dut.route]++;
    if (!dut.boot && dut.u_cu.adv && dut.pc == 10'd5 && t5 < 0) t5 = cyc;
    if (!dut.boot && dut.u_cu.adv && dut.pc == 10'd11 && t11 < 0) t11 = cyc;
  end

  // ------------------------------------------------------------- stimulus
  logic signed [15:0] xv [16];
  logic signed [15:0] yv [16];
  logic [15:0] got;

  function automatic logic [15:0] lim(input logic signed [39:0] v);
    if (v > 40'sh007FFFFFFF) return 16'h7FFF;
    if (v < -40'sh0080000000) return 16'h8000;
    return v[31:16];
  endfunction

  initial begin
    logic signed [39:0] acc, accb;
    logic signed [15:0] best;
    int bidx;
    logic [7:0] st;
    for (int i = 0; i < 16; i++) begin
      xv[i] = 16'($urandom);
      yv[i] = 16'($urandom);
    end
    // the scan starts at the most negative value, so a new maximum (branch not
    // taken) is found at least once
    yv[7] = 16'sh8000;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // boot: length, then the program
    send16(16'(PLEN));
    for (int i = 0; i < PLEN; i++) send24(prog[i]);
    for (int i = 0; i < 16; i++) begin
      send16(xv[i]);
      send16(yv[i]);
    end

    // dot product with final rounding
    acc = 0;
    for (int i = 0; i < 16; i++) acc += 40'(2 * (longint'(xv[i]) * longint'(yv[i])));
    acc = acc + 40'sh8000;
    acc[15:0] = '0;
    recv16(got); check("dot product", got, lim(acc));
    recv16(got); check("dot product low word", got, acc[15:0]);

    // circular buffer
    accb = 0;
    for (int i = 0; i < 20; i++) accb += 40'(2 * (longint'(xv[(5 + i) % 16]) * longint'(xv[(5 + i) % 16])));
    recv16(got); check("modulo sum of squares", got, lim(accb));
    recv16(got); check("modulo sum low word", got, accb[15:0]);
    recv16(got); check("modulo pointer", got, 16'd9);

    recv16(got); check("nested loops", got, 16'h0F00);

    best = yv[7]; bidx = 0;
    for (int p = 1; p < 8; p++) if (yv[7 - p] > best) begin best = yv[7 - p]; bidx = p; end
    recv16(got); check("maximum", got, best);
    recv16(got); check("argmax", got, 16'(bidx));

    recv16(got); check("NORM exponent", got, 16'h07FA);
    recv16(got); check("NORM mantissa", got, 16'h4000);
    recv16(got); check("limited read", got, 16'h7FFF);
    recv16(got); check("NORM right exponent", got, 16'h0001);
    recv16(got); check("NORM right mantissa", got, 16'h7000);
    recv16(got); check("division", got, 16'((32'h2000 << 15) / 32'h6000));
    recv16(got); check("saturated extension", got, 16'h007F);
    recv16(got); check("saturated low word", got, 16'hFFFF);

    repeat (10) @(negedge clk);
    pc_read(3'd5, st);
    check("status register", st, 8'h5A);

    // cycle count of the dot product: 4 + 15 + 1 instructions
    check("dot product cycles", 32'(t11 - t5), 32'd20);

    // every mechanism at least once
    check("host stalls seen", n_stall > 0, 1);
    check("program words written", n_pmw, PLEN);
    check("loop returns seen", n_loopback > 0, 1);
    check("nested loops seen", n_nested > 0, 1);
    check("branch taken seen", n_jtaken > 0, 1);
    check("branch not taken seen", n_jnot > 0, 1);
    check("NORM increment seen", n_ninc, 1);
    check("NORM decrement seen", n_ndec, 6);
    check("saturation seen", n_sat > 0, 1);
    check("dual parallel moves seen", n_dual > 0, 1);
    check("modulo wrap seen", n_mod > 0, 1);
    check("route GD->XD seen", n_route[RT_GD2XD] > 0, 1);
    check("route XD->GD seen", n_route[RT_XD2GD] > 0, 1);
    check("route GD->YD seen", n_route[RT_GD2YD] > 0, 1);
    $display("mechanisms: stall=%0d pmw=%0d loopback=%0d nested=%0d jt=%0d jn=%0d ninc=%0d ndec=%0d sat=%0d dual=%0d mod=%0d",
             n_stall, n_pmw, n_loopback, n_nested, n_jtaken, n_jnot, n_ninc, n_ndec, n_sat, n_dual, n_mod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
