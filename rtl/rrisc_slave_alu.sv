// rrisc_slave_alu: the slave ALU pipe, three stages, ALU instructions only.
//
// Stage 1 latches the instruction issued by the dispatch (issue_valid low is the NOP flag:
// the slot is empty) and reads registers [5:3] and [2:0]. Stage 2 latches the operands and
// runs rrisc_alu, reading CY from the master pipe. Stage 3 holds the result: the register
// file writes it on the falling edge of that cycle, and the SET and CY updates go out on wb
// for the master pipe, which owns those two registers and loads them on the next rising
// edge. A result is thus readable by an instruction issued two cycles later. The split into
// a master and a slave pipe, the slave reporting SET/CY changes to the master, and the three
// stages follow the architecture; what each stage does is this design's reading of it.
module rrisc_slave_alu
  import rrisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   issue_valid,
  input  instr_t issue_instr,
  output reg_t   raddr_a,
  output reg_t   raddr_b,
  input  word_t  rdata_a,
  input  word_t  rdata_b,
  input  logic   cy,
  output wb_t    wb
);

  logic   s1_valid, s2_valid;
  instr_t s1_instr, s2_instr;
  word_t  s2_a, s2_b;
  wb_t    alu_wb;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_instr <= NOP_INSTR;
      s2_instr <= NOP_INSTR;
      s2_a     <= '0;
      s2_b     <= '0;
      wb       <= '0;
    end else begin
      s1_valid <= issue_valid;
      s1_instr <= issue_instr;
      s2_valid <= s1_valid;
      s2_instr <= s1_instr;
      s2_a     <= rdata_a;
      s2_b     <= rdata_b;
      wb       <= s2_valid ? alu_wb : '0;
    end
  end

  assign raddr_a = f_r1(s1_instr);
  assign raddr_b = f_r2(s1_instr);

  rrisc_alu u_alu (
    .instr  (s2_instr),
    .a      (s2_a),
    .b      (s2_b),
    .cy_in  (cy),
    .y      (alu_wb.wdata),
    .reg_we (alu_wb.reg_we),
    .waddr  (alu_wb.waddr),
    .set_we (alu_wb.set_we),
    .set_val(alu_wb.set_val),
    .cy_we  (alu_wb.cy_we),
    .cy_val (alu_wb.cy_val)
  );

endmodule
