// bus_switch: the 16-bit data bus switch between the X data bus (XD), the
// Y data bus (YD) and the global data bus (GD).
//
// The three buses are bidirectional in the document; here each bus is a
// multiplexed net. Every bus has a "local" value, driven by the unit attached
// to it (X memory or ALU on XD, Y memory or ALU on YD, controller, AGU or host
// interface on GD). The switch copies one bus onto another when the controller
// asks for it, so that for example an immediate on GD reaches an ALU register
// through XD, or a word read from Y memory reaches an address register through
// GD. One route is active per cycle; the bus that receives a route shows the
// source bus' value instead of its own local value. Purely combinational.
module bus_switch
  import dsp_pkg::*;
(
  input  route_e        route,
  input  logic [DW-1:0] xd_loc,
  input  logic [DW-1:0] yd_loc,
  input  logic [DW-1:0] gd_loc,
  output logic [DW-1:0] xd,
  output logic [DW-1:0] yd,
  output logic [DW-1:0] gd
);
  always_comb begin
    xd = xd_loc;
    yd = yd_loc;
    gd = gd_loc;
    unique case (route)
      RT_GD2XD: xd = gd_loc;
      RT_GD2YD: yd = gd_loc;
      RT_XD2GD: gd = xd_loc;
      RT_YD2GD: gd = yd_loc;
      RT_XD2YD: yd = xd_loc;
      RT_YD2XD: xd = yd_loc;
      default: ;
    endcase
  end
endmodule
