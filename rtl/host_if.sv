// host_if: host interface between an 8-bit PC bus and the 16-bit DSP.
//
// From the document: the PC writes two or three 8-bit registers that the DSP
// reads as one concatenated 16-bit (data) or 24-bit (program) word; the DSP
// writes one 16-bit register that the PC reads as two bytes; the PC can read
// an 8-bit "status DSP" register whose flags the DSP sets; hardware flags keep
// either side from overwriting a register or reading invalid data; and the
// special instruction WAIT DATAPC,P:(R0)+ moves the 24-bit word into program
// memory once the PC has written it.
//
// This design's choices:
//  * PC register map (pc_addr[2:0], upper bits must equal BASE[15:3]):
//      0 IN_L (w)  1 IN_M (w)  2 IN_H (w)   -> DSP word {IN_H, IN_M, IN_L}
//      3 OUT_L (r) 4 OUT_H (r)              <- 16-bit DSP output word
//      5 STATUS_DSP (r)                     <- 8-bit flags set by the DSP
//      6 FLAGS (r) = {6'b0, out_full, in_full}
//  * The PC writes IN_H and IN_M first; writing IN_L sets in_full. While
//    in_full is set, PC writes to IN_* are ignored. A DSP read of the 16-bit
//    word (dsp_rd) or of the 24-bit word (dsp_rd24, the WAIT instruction)
//    clears in_full.
//  * A DSP write (dsp_wr) loads OUT and sets out_full; the PC reads OUT_H then
//    OUT_L, and the read of OUT_L clears out_full.
//  * The DSP side does not check the flags itself: the controller stalls an
//    instruction that would read while in_full is clear or write while
//    out_full is set.
// pc_rdata is combinational from pc_addr; all updates are on the rising edge.
module host_if
  import dsp_pkg::*;
#(
  parameter logic [15:0] BASE = 16'h0000
) (
  input  logic          clk,
  input  logic          rst_n,
  // PC side
  input  logic [15:0]   pc_addr,
  input  logic [7:0]    pc_wdata,
  output logic [7:0]    pc_rdata,
  input  logic          pc_wr,
  input  logic          pc_rd,
  // DSP side
  input  logic          dsp_rd,      // read 16-bit word onto GD
  input  logic          dsp_rd24,    // read 24-bit word onto PD
  input  logic          dsp_wr,      // write OUT from GD
  input  logic          dsp_st_wr,   // write STATUS_DSP from GD[7:0]
  input  logic [DW-1:0] gd_in,
  output logic [DW-1:0] din,
  output logic [IW-1:0] pd_out,
  output logic          in_full,
  output logic          out_full,
  output logic [DW-1:0] flags_out
);
  logic [7:0]    in_l, in_m, in_h, status_dsp;
  logic [DW-1:0] out_w;
  logic          sel;

  assign sel       = (pc_addr[15:3] == BASE[15:3]);
  assign din       = {in_m, in_l};
  assign pd_out    = {in_h, in_m, in_l};
  assign flags_out = {14'd0, out_full, in_full};

  always_comb begin
    pc_rdata = '0;
    if (sel) begin
      case (pc_addr[2:0])
        3'd3: pc_rdata = out_w[7:0];
        3'd4: pc_rdata = out_w[15:8];
        3'd5: pc_rdata = status_dsp;
        3'd6: pc_rdata = {6'd0, out_full, in_full};
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_l <= '0; in_m <= '0; in_h <= '0;
      out_w <= '0; status_dsp <= '0;
      in_full <= 1'b0; out_full <= 1'b0;
    end else begin
      if (pc_wr && sel && !in_full) begin
        case (pc_addr[2:0])
          3'd0: begin in_l <= pc_wdata; in_full <= 1'b1; end
          3'd1: in_m <= pc_wdata;
          3'd2: in_h <= pc_wdata;
          default: ;
        endcase
      end
      if ((dsp_rd || dsp_rd24) && in_full) in_full <= 1'b0;
      if (pc_rd && sel && (pc_addr[2:0] == 3'd3)) out_full <= 1'b0;
      if (dsp_wr && !out_full) begin
        out_w    <= gd_in;
        out_full <= 1'b1;
      end
      if (dsp_st_wr) status_dsp <= gd_in[7:0];
    end
  end

  // the controller must not read an empty word or overwrite a full one
  a_no_empty_read: assert property (@(posedge clk) disable iff (!rst_n)
                                    (dsp_rd || dsp_rd24) |-> in_full);
  a_no_full_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    dsp_wr |-> !out_full);
endmodule
