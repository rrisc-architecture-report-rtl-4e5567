// rrisc_imem: instruction memory, 16384 words of 13 bits in two banks of 8192 words.
//
// Instruction addresses are 14 bits wide. Bit 0 picks the bank (0 = even, 1 = odd) and the
// upper 13 bits address a word inside each bank, so one read returns the instruction pair at
// addresses {pair,0} and {pair,1} together, as the dispatch needs. Reads are asynchronous, like
// the static RAM chips the architecture was built with: the pair for a PC value is valid in
// the same cycle. The banked organisation and the sizes follow the architecture. The write
// port, one instruction per rising clock edge at a full 14-bit address, is this design's way
// of loading a program; the processor is held in reset while it is used.
module rrisc_imem
  import rrisc_pkg::*;
#(
  parameter int ABITS = IAW  // instruction address bits; each bank holds 2**(ABITS-1) words
) (
  input  logic             clk,
  input  logic [ABITS-2:0] pair_addr,
  output instr_t           even_instr,
  output instr_t           odd_instr,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  instr_t           wdata
);

  instr_t bank0 [2**(ABITS-1)];
  instr_t bank1 [2**(ABITS-1)];

  always_ff @(posedge clk) begin
    if (we && !waddr[0]) bank0[waddr[ABITS-1:1]] <= wdata;
    if (we &&  waddr[0]) bank1[waddr[ABITS-1:1]] <= wdata;
  end

  assign even_instr = bank0[pair_addr];
  assign odd_instr  = bank1[pair_addr];

endmodule
