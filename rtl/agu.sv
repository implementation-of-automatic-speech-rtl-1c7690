// agu: address generation unit of the DSP.
//
// Holds eight address registers R0-R7, eight offset registers N0-N7 and eight
// modifier registers M0-M7, all 11 bits wide (2048 words per memory space).
// Two independent address units work in parallel, so two addresses are made
// per cycle: the X unit owns R0-R3/N0-N3/M0-M3 and drives the X address bus
// XA, the Y unit owns R4-R7/N4-N7/M4-M7 and drives YA. Each supports
//   (Rn)      indirect
//   (Rn)+     post-increment          (Rn)-     post-decrement
//   (Rn)+Nn   post-increment by Nn    (Rn)-Nn   post-decrement by Nn
//   (Rn+Nn)   (Rn-Nn)  indexed, Rn unchanged
// in linear or modulo arithmetic. All of this is from the document.
//
// The modifier encoding follows the DSP56001 (this design's choice): Mn = all
// ones selects linear arithmetic; any other value selects modulo (Mn + 1)
// arithmetic over a buffer whose base is Rn with its low k bits cleared, where
// 2^k is the smallest power of two above Mn. The address registers can hold
// generic data and are read and written over the global bus GD (zero-extended
// to 16 bits). A NORM instruction names one Rn that the ALU's NORM signal
// increments or decrements. If a GD write and an address update hit the same
// register in one cycle, the GD write wins. Reset: R = 0, N = 0, M = linear.
//
// Timing: XA / YA and gd_out are combinational from the registers and the
// AGU control word (AGU_CNT); register updates happen on the rising edge.
module agu
  import dsp_pkg::*;
#(
  parameter int unsigned AAW = 11   // address register width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  agu_cnt_t       cnt,
  input  logic [DW-1:0]  gd_in,
  output logic [DW-1:0]  gd_out,
  input  logic           norm_inc,
  input  logic           norm_dec,
  output logic [AAW-1:0] xa,
  output logic [AAW-1:0] ya
);
  logic [AAW-1:0] r [8];
  logic [AAW-1:0] n [8];
  logic [AAW-1:0] m [8];

  // r + delta (delta in two's complement) under modifier mm
  function automatic logic [AAW-1:0] modify(input logic [AAW-1:0] rr, input logic [AAW-1:0] delta,
                                            input logic [AAW-1:0] mm);
    logic [AAW-1:0] mask;
    logic signed [AAW+1:0] t;
    if (mm == '1) return rr + delta;
    mask = mm;
    for (int i = 1; i < AAW; i++) mask = mask | (mask >> i);
    t = $signed({2'b00, rr & mask}) + $signed({delta[AAW-1], delta[AAW-1], delta});
    if (t > $signed({2'b00, mm})) t = t - $signed({2'b00, mm} + 1'b1);
    else if (t < 0) t = t + $signed({2'b00, mm} + 1'b1);
    return (rr & ~mask) | (t[AAW-1:0] & mask);
  endfunction

  function automatic logic [AAW-1:0] delta_of(input amode_e md, input logic [AAW-1:0] nn);
    case (md)
      AM_POSTINC:  return AAW'(1);
      AM_POSTDEC:  return '1;
      AM_POSTINCN: return nn;
      AM_POSTDECN: return '0 - nn;
      default:     return '0;
    endcase
  endfunction

  // address put on the bus: Rn, or Rn +/- Nn in the indexed modes
  function automatic logic [AAW-1:0] ea_of(input amode_e md, input logic [AAW-1:0] rr,
                                           input logic [AAW-1:0] nn, input logic [AAW-1:0] mm);
    case (md)
      AM_INDEXN:  return modify(rr, nn, mm);
      AM_INDEXMN: return modify(rr, '0 - nn, mm);
      default:    return rr;
    endcase
  endfunction

  // modes that write the updated address back to Rn
  function automatic logic updates(input amode_e md);
    return md inside {AM_POSTINC, AM_POSTDEC, AM_POSTINCN, AM_POSTDECN};
  endfunction

  logic [2:0] xi, yi;
  logic [AAW-1:0] x_new, y_new;

  always_comb begin
    xi = {1'b0, cnt.xrn};
    yi = {1'b1, cnt.yrn};
    xa = ea_of(cnt.xmode, r[xi], n[xi], m[xi]);
    ya = ea_of(cnt.ymode, r[yi], n[yi], m[yi]);
    x_new = modify(r[xi], delta_of(cnt.xmode, n[xi]), m[xi]);
    y_new = modify(r[yi], delta_of(cnt.ymode, n[yi]), m[yi]);
    case (cnt.gd_rsel[4:3])
      2'd0:    gd_out = DW'(r[cnt.gd_rsel[2:0]]);
      2'd1:    gd_out = DW'(n[cnt.gd_rsel[2:0]]);
      2'd2:    gd_out = DW'(m[cnt.gd_rsel[2:0]]);
      default: gd_out = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        r[i] <= '0;
        n[i] <= '0;
        m[i] <= '1;
      end
    end else begin
      if (cnt.xen && updates(cnt.xmode)) r[xi] <= x_new;
      if (cnt.yen && updates(cnt.ymode)) r[yi] <= y_new;
      if (cnt.norm_en && norm_inc) r[cnt.norm_rn] <= r[cnt.norm_rn] + 1'b1;
      if (cnt.norm_en && norm_dec) r[cnt.norm_rn] <= r[cnt.norm_rn] - 1'b1;
      if (cnt.gd_we) begin
        case (cnt.gd_wsel[4:3])
          2'd0:    r[cnt.gd_wsel[2:0]] <= gd_in[AAW-1:0];
          2'd1:    n[cnt.gd_wsel[2:0]] <= gd_in[AAW-1:0];
          2'd2:    m[cnt.gd_wsel[2:0]] <= gd_in[AAW-1:0];
          default: ;
        endcase
      end
    end
  end
endmodule
