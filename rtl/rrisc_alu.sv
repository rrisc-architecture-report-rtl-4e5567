// rrisc_alu: combinational ALU shared by the master and slave ALU pipes.
//
// It executes the ALU-pipe subset of the instruction set: add, sub, and, or, addc, not (R-type),
// sll, srl, sra, lru (O-type, operating on the register named in [5:3]) and the tests slt and
// seq (S-type, writing SET). The caller supplies the instruction, operand a (register [5:3]),
// operand b (register [2:0]) and the current CY bit; the ALU returns the result and which of
// register, SET and CY the instruction writes. The operations follow the instruction set.
// Where it is silent this design chooses: sub and the tests form a + ~b + 1 and CY is its carry
// out (1 = no borrow); not clears CY; a shift puts the last bit shifted out in CY (0 for a
// shift by 0); slt compares unsigned; and, or, lru and the I/O instructions leave CY alone.
// Instructions that are not ALU instructions give no writes.
module rrisc_alu
  import rrisc_pkg::*;
(
  input  instr_t instr,
  input  word_t  a,
  input  word_t  b,
  input  logic   cy_in,
  output word_t  y,
  output logic   reg_we,
  output reg_t   waddr,
  output logic   set_we,
  output logic   set_val,
  output logic   cy_we,
  output logic   cy_val
);

  logic [DW:0] sum, diff;
  logic [2:0]  sh;
  logic [2*DW-1:0] lext;
  logic [3*DW-1:0] rext;

  assign sum  = {1'b0, a} + {1'b0, b} + {{DW{1'b0}}, (f_op(instr) == OP_ADDC) ? cy_in : 1'b0};
  assign diff = {1'b0, a} + {1'b0, ~b} + 9'd1;
  assign sh   = instr[2:0];
  // shift through a double-width word so the last bit shifted out is at a fixed place
  assign lext = {8'h00, a} << sh;                          // lext[8]: last bit out of sll
  assign rext = {(instr[8:6] == O_SRA) ? {DW{a[DW-1]}} : {DW{1'b0}}, a, 8'h00} >> sh;
                                                           // rext[7]: last bit out of srl/sra

  always_comb begin
    y       = '0;
    reg_we  = 1'b0;
    waddr   = f_rd(instr);
    set_we  = 1'b0;
    set_val = 1'b0;
    cy_we   = 1'b0;
    cy_val  = 1'b0;
    unique case (f_op(instr))
      OP_ADD, OP_ADDC: begin y = sum[DW-1:0]; reg_we = 1'b1; cy_we = 1'b1; cy_val = sum[DW]; end
      OP_SUB:          begin y = diff[DW-1:0]; reg_we = 1'b1; cy_we = 1'b1; cy_val = diff[DW]; end
      OP_AND:          begin y = a & b; reg_we = 1'b1; end
      OP_OR:           begin y = a | b; reg_we = 1'b1; end
      OP_NOT:          begin y = ~a; reg_we = 1'b1; cy_we = 1'b1; cy_val = 1'b0; end
      OP_OALU: begin
        waddr = f_r1(instr);
        unique case (f_sub(instr))
          O_SLL: begin y = lext[DW-1:0]; reg_we = 1'b1; cy_we = 1'b1;
                       cy_val = (sh != 3'd0) && lext[DW]; end
          O_SRL, O_SRA: begin y = rext[2*DW-1:DW]; reg_we = 1'b1; cy_we = 1'b1;
                       cy_val = (sh != 3'd0) && rext[DW-1]; end
          O_LRU: begin y = {instr[1:0], a[DW-3:0]}; reg_we = 1'b1; end
          default: ;  // I/O instructions are handled by the master pipe
        endcase
      end
      OP_SX: begin
        if (f_sub(instr) == X_SLT || f_sub(instr) == X_SEQ) begin
          set_we  = 1'b1;
          set_val = (f_sub(instr) == X_SLT) ? !diff[DW] : (a == b);
          cy_we   = 1'b1;
          cy_val  = diff[DW];
        end
      end
      default: ;
    endcase
  end

endmodule
