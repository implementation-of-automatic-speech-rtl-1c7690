// boot_rom: 64 x 24-bit boot ROM holding the start-up loader of the DSP.
//
// After reset the controller fetches from this ROM. The loader receives the
// real program from the PC through the host interface, stores it in program
// memory and then hands control to it, as the document describes. The
// loader itself and its protocol are this design's own:
//   0: MOVE #0,R0            program memory pointer
//   1: MOVE HID,N1           first host word = number of instructions L
//   2: DO N1,3               repeat L times (L = 0 behaves as 1)
//   3: WAIT DATAPC,P:(R0)+   stall for a 24-bit host word, store it, R0++
//   4: JMP P:0               leave the ROM, start at program address 0
// All other locations hold NOP. Read is combinational.
module boot_rom
  import dsp_pkg::*;
(
  input  logic [5:0]    addr,
  output logic [IW-1:0] data
);
  always_comb begin
    case (addr)
      6'd0:    data = i_movi(G_R0, 16'd0);
      6'd1:    data = i_movr(G_HID, G_N0 + 6'd1);
      6'd2:    data = i_dor(G_N0 + 6'd1, 10'd3);
      6'd3:    data = i_wait();
      6'd4:    data = i_jmp(CC_AL, 1'b1, 10'd0);
      default: data = I_NOP;
    endcase
  end
endmodule
