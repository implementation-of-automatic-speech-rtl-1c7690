// prog_mem: program memory of the DSP, 1024 instructions of 24 bits.
//
// Addressed by the 10-bit program address bus PA from the controller. The
// controller reads the next instruction through PD combinationally (fetch and
// decode happen in the same cycle as the previous instruction executes). The
// host interface writes 24-bit words into it, at the address the controller
// places on PA, during the WAIT DATAPC,P:(R0)+ instruction; the write takes
// effect on the rising clock edge. Size follows the document; the
// asynchronous-read / clocked-write timing is this design's choice.
module prog_mem #(
  parameter int unsigned PAW = 10,  // 1024 words
  parameter int unsigned IW  = 24
) (
  input  logic           clk,
  input  logic           we,
  input  logic [PAW-1:0] pa,
  input  logic [IW-1:0]  wdata,
  output logic [IW-1:0]  pd
);
  logic [IW-1:0] mem [2**PAW];

  always_ff @(posedge clk) begin
    if (we) mem[pa] <= wdata;
  end

  assign pd = mem[pa];
endmodule
