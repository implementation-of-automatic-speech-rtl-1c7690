// data_mem: one data memory space of the DSP (X or Y), 2048 words of 16 bits.
//
// The document describes each space as asynchronous static RAM, addressed by
// an 11-bit address bus (XA or YA) and connected to its own 16-bit data bus
// (XD or YD). Read is therefore combinational: rdata follows addr in the same
// cycle. The write strobe of the real SRAM is modelled as a write on the rising
// clock edge while we is high (this design's choice, so that the memory fits a
// synchronous core). The array is not reset.
//
// Interface: addr, we and wdata come from the address bus, the memory control
// word (MX_CNT / MY_CNT) and the data bus; rdata goes back to the data bus.
module data_mem #(
  parameter int unsigned AW = 11,   // 2048 words
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
