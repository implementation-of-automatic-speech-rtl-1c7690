// tb_prog_mem: self-checking test of the 1024 x 24 program memory. Writes
// random instruction words at random addresses (as the host interface does
// during program load), then reads every written address back through PD
// combinationally and compares with a copy kept by the testbench.
`timescale 1ns/1ps
module tb_prog_mem;
  logic        clk = 1'b0;
  logic        we = 1'b0;
  logic [9:0]  pa = '0;
  logic [23:0] wdata = '0;
  logic [23:0] pd;
  int checks = 0, failures = 0;
  logic [23:0] model [int];

  prog_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      pa = (i == 0) ? 10'h3FF : 10'($urandom); wdata = 24'($urandom); we = 1'b1;
      model[int'(pa)] = wdata;
    end
    @(negedge clk); we = 1'b0;
    foreach (model[k]) begin
      @(negedge clk); pa = 10'(k);
      #1;
      checks++;
      if (pd !== model[k]) begin
        failures++;
        $display("FAIL pa %h: got %h expected %h", k, pd, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
