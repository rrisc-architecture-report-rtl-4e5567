// rrisc_dmem: data memory, 8192 words of 8 bits.
//
// One port addressed by the memory pipe: asynchronous read, write on the rising clock edge
// when we is high. A store followed on the next cycle by a load of the same address returns
// the stored value. The size follows the architecture (13-bit data addresses); the single
// port with asynchronous read models the static RAM it was built with and is this design's
// choice of timing.
module rrisc_dmem
  import rrisc_pkg::*;
#(
  parameter int ABITS = DAW
) (
  input  logic             clk,
  input  logic [ABITS-1:0] addr,
  input  logic             we,
  input  word_t            wdata,
  output word_t            rdata
);

  word_t mem [2**ABITS];

  always_ff @(posedge clk) if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
