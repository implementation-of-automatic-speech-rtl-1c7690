// tb_bus_switch: drives random local values on XD, YD and GD and checks, for
// every route, that exactly the receiving bus shows the source bus' value and
// the other buses keep their own.
`timescale 1ns/1ps
module tb_bus_switch;
  import dsp_pkg::*;
  route_e      route = RT_NONE;
  logic [15:0] xd_loc = '0, yd_loc = '0, gd_loc = '0;
  logic [15:0] xd, yd, gd;
  int checks = 0, failures = 0;

  bus_switch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string n, input logic [15:0] g, input logic [15:0] e);
    checks++;
    if (g !== e) begin
      failures++;
      $display("FAIL route %0d %s: got %h expected %h", route, n, g, e);
    end
  endtask

  initial begin
    logic [15:0] ex, ey, eg;
    for (int i = 0; i < 70; i++) begin
      route  = route_e'(i % 7);
      xd_loc = 16'($urandom); yd_loc = 16'($urandom); gd_loc = 16'($urandom);
      ex = xd_loc; ey = yd_loc; eg = gd_loc;
      case (i % 7)
        1: ex = gd_loc;
        2: ey = gd_loc;
        3: eg = xd_loc;
        4: eg = yd_loc;
        5: ey = xd_loc;
        6: ex = yd_loc;
        default: ;
      endcase
      #1;
      chk("xd", xd, ex); chk("yd", yd, ey); chk("gd", gd, eg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
