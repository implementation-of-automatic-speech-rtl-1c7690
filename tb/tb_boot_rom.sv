// tb_boot_rom: checks every one of the 64 boot ROM words against the loader's
// machine code, written out here by hand in hexadecimal:
//   0 MOVE #0,R0 = 900000   1 MOVE HID,N1 = C00299   2 DO N1,3 = D06403
//   3 WAIT DATAPC,P:(R0)+ = D40000   4 JMP P:0 = C80400   others NOP = 000000
`timescale 1ns/1ps
module tb_boot_rom;
  logic [5:0]  addr = '0;
  logic [23:0] data;
  int checks = 0, failures = 0;
  logic [23:0] exp;

  boot_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i);
      case (i)
        0: exp = 24'h900000;
        1: exp = 24'hC00299;
        2: exp = 24'hD06403;
        3: exp = 24'hD40000;
        4: exp = 24'hC80400;
        default: exp = 24'h000000;
      endcase
      #1;
      checks++;
      if (data !== exp) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", i, data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
