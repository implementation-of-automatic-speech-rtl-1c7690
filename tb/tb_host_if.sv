// tb_host_if: self-checking test of the host interface.
//
// Plays both sides: the PC writes bytes and the DSP reads the concatenated
// 16-bit and 24-bit words; the DSP writes 16-bit words and the status
// register and the PC reads them as bytes. Checks the in_full / out_full
// handshake flags (set, cleared, and visible in the PC flag register), that
// PC writes are ignored while the input word is full, and that addresses outside BASE do not
// respond.
`timescale 1ns/1ps
module tb_host_if;
  import dsp_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] pc_addr = '0;
  logic [7:0]  pc_wdata = '0, pc_rdata;
  logic        pc_wr = 1'b0, pc_rd = 1'b0;
  logic        dsp_rd = 1'b0, dsp_rd24 = 1'b0, dsp_wr = 1'b0, dsp_st_wr = 1'b0;
  logic [15:0] gd_in = '0, din, flags_out;
  logic [23:0] pd_out;
  logic        in_full, out_full;
  int checks = 0, failures = 0;

  host_if #(.BASE(16'h0300)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string s, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", s, g, e);
    end
  endtask

  task automatic pcw(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); pc_addr = a; pc_wdata = d; pc_wr = 1'b1;
    @(negedge clk); pc_wr = 1'b0;
  endtask

  task automatic pcr(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); pc_addr = a; #1 d = pc_rdata; pc_rd = 1'b1;
    @(negedge clk); pc_rd = 1'b0;
  endtask

  initial begin
    logic [7:0] b, h, l;
    logic [23:0] w;
    logic [15:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk("empty after reset", {out_full, in_full}, 2'b00);
    for (int k = 0; k < 40; k++) begin
      // 24-bit word PC -> DSP
      w = 24'($urandom);
      pcw(16'h0302, w[23:16]);
      pcw(16'h0301, w[15:8]);
      chk("not full before low byte", in_full, 1'b0);
      pcw(16'h0300, w[7:0]);
      chk("full after low byte", in_full, 1'b1);
      pcr(16'h0306, b);
      chk("PC sees in_full", b[0], 1'b1);
      chk("DSP flag word", flags_out, {14'd0, out_full, 1'b1});
      // PC must not overwrite a full word
      pcw(16'h0300, ~w[7:0]);
      chk("24-bit word", pd_out, w);
      chk("16-bit word", din, w[15:0]);
      @(negedge clk); if (k % 2 == 0) dsp_rd24 = 1'b1; else dsp_rd = 1'b1;
      @(negedge clk); dsp_rd24 = 1'b0; dsp_rd = 1'b0;
      chk("empty after DSP read", in_full, 1'b0);

      // 16-bit word DSP -> PC
      v = 16'($urandom);
      @(negedge clk); gd_in = v; dsp_wr = 1'b1;
      @(negedge clk); dsp_wr = 1'b0;
      chk("out_full after DSP write", out_full, 1'b1);
      pcr(16'h0306, b);
      chk("PC sees out_full", b[1], 1'b1);
      pcr(16'h0304, h);
      chk("still full after high byte", out_full, 1'b1);
      pcr(16'h0303, l);
      chk("DSP word", {h, l}, v);
      chk("out empty after low byte", out_full, 1'b0);

      // status register
      v = 16'($urandom);
      @(negedge clk); gd_in = v; dsp_st_wr = 1'b1;
      @(negedge clk); dsp_st_wr = 1'b0;
      pcr(16'h0305, b);
      chk("status", b, v[7:0]);
      // other base address: no response
      pcr(16'h0105, b);
      chk("other address reads 0", b, 8'h00);
      pcw(16'h0100, 8'h55);
      chk("other address writes nothing", in_full, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
