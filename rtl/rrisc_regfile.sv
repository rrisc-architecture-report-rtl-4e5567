// rrisc_regfile: the eight 8-bit general purpose registers $0..$7.
//
// The registers are plain flip-flops. Reads are combinational on NREAD independent ports;
// register $0 always reads 0x00. Writes come from the third stage of each of the NWRITE
// execution pipes and are taken on the falling clock edge, half a cycle before the rising
// edge on which the reading pipe latches its operands. A value written by one instruction is
// therefore seen by an instruction whose register-read stage is in the same cycle, which is
// what lets two dependent instructions be separated by a single NOP. Writes to $0 are
// dropped. Writing on the falling edge, the $0 rule and the flip-flop build follow the
// architecture; the port counts (five reads: two per ALU pipe, one for the memory pipe; three
// writes: one per pipe) and the priority of the highest-numbered port when two pipes write
// the same register (a program error flagged by TRAP) are this design's choices.
// rst is synchronous (sampled on the falling edge) and clears every register.
module rrisc_regfile
  import rrisc_pkg::*;
#(
  parameter int NREAD  = 5,
  parameter int NWRITE = 3
) (
  input  logic  clk,
  input  logic  rst,
  input  reg_t  raddr [NREAD],
  output word_t rdata [NREAD],
  input  logic  we    [NWRITE],
  input  reg_t  waddr [NWRITE],
  input  word_t wdata [NWRITE]
);

  word_t regs [NREGS];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < NWRITE; w++)
        if (we[w] && waddr[w] != 3'd0) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int p = 0; p < NREAD; p++)
      rdata[p] = (raddr[p] == 3'd0) ? '0 : regs[raddr[p]];
  end

endmodule
