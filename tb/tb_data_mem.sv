// tb_data_mem: self-checking test of one 2048 x 16 data memory space.
// Writes random words to random addresses, keeping a copy in an associative
// array, and checks that every read returns the last word written there in
// the same cycle the address is applied (asynchronous read). Also checks the
// lowest and highest address and that a cycle without write enable leaves the
// memory unchanged.
`timescale 1ns/1ps
module tb_data_mem;
  logic        clk = 1'b0;
  logic        we = 1'b0;
  logic [10:0] addr = '0;
  logic [15:0] wdata = '0;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [int];

  data_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [10:0] a, input logic [15:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1'b1;
    @(negedge clk); we = 1'b0;
    model[int'(a)] = d;
  endtask

  task automatic rd_check(input logic [10:0] a);
    @(negedge clk); addr = a; wdata = ~wdata;
    #1;
    checks++;
    if (rdata !== model[int'(a)]) begin
      failures++;
      $display("FAIL addr %h: got %h expected %h", a, rdata, model[int'(a)]);
    end
  endtask

  initial begin
    logic [10:0] a;
    wr(11'd0, 16'h1234);
    wr(11'h7FF, 16'hBEEF);
    for (int i = 0; i < 300; i++) wr(11'($urandom), 16'($urandom));
    // a cycle with a different wdata and no write must change nothing
    @(negedge clk); addr = 11'd0; wdata = 16'hDEAD; we = 1'b0;
    rd_check(11'd0);
    rd_check(11'h7FF);
    foreach (model[k]) rd_check(11'(k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
