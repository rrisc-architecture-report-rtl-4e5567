// rrisc_asm_pkg: instruction encoders used by the RRISC testbenches to build programs.
// Each function returns one 13-bit instruction word in the encoding of rrisc_pkg
// (opcode in [12:9], see the format table there).
package rrisc_asm_pkg;
  import rrisc_pkg::*;

  function automatic instr_t a_r(opcode_e op, int rd, int r1, int r2);
    return {op, 3'(rd), 3'(r1), 3'(r2)};
  endfunction
  function automatic instr_t a_add (int rd, int r1, int r2); return a_r(OP_ADD,  rd, r1, r2); endfunction
  function automatic instr_t a_sub (int rd, int r1, int r2); return a_r(OP_SUB,  rd, r1, r2); endfunction
  function automatic instr_t a_and (int rd, int r1, int r2); return a_r(OP_AND,  rd, r1, r2); endfunction
  function automatic instr_t a_or  (int rd, int r1, int r2); return a_r(OP_OR,   rd, r1, r2); endfunction
  function automatic instr_t a_addc(int rd, int r1, int r2); return a_r(OP_ADDC, rd, r1, r2); endfunction
  function automatic instr_t a_not (int rd, int r1);         return a_r(OP_NOT,  rd, r1, 0);  endfunction

  function automatic instr_t a_m(opcode_e op, int rd, int imm6);
    return {op, 3'(rd), 6'(imm6)};
  endfunction
  function automatic instr_t a_lrl (int rd, int imm6); return a_m(OP_LRL,  rd, imm6); endfunction
  function automatic instr_t a_lw  (int rd, int imm6); return a_m(OP_LW,   rd, imm6); endfunction
  function automatic instr_t a_sw  (int rd, int imm6); return a_m(OP_SW,   rd, imm6); endfunction
  function automatic instr_t a_larl(int rd);           return a_m(OP_LARL, rd, 0);    endfunction

  function automatic instr_t a_o(logic [2:0] sub, int r, int imm3);
    return {OP_OALU, sub, 3'(r), 3'(imm3)};
  endfunction
  function automatic instr_t a_sll (int r, int sh); return a_o(O_SLL, r, sh); endfunction
  function automatic instr_t a_srl (int r, int sh); return a_o(O_SRL, r, sh); endfunction
  function automatic instr_t a_sra (int r, int sh); return a_o(O_SRA, r, sh); endfunction
  function automatic instr_t a_lru (int r, int i2); return a_o(O_LRU, r, i2); endfunction
  function automatic instr_t a_iotr(int r);         return a_o(O_IOTR, r, 0); endfunction
  function automatic instr_t a_iora(int r);         return a_o(O_IORA, r, 0); endfunction
  function automatic instr_t a_iot (int r);         return a_o(O_IOT,  r, 0); endfunction
  function automatic instr_t a_ior (int r);         return a_o(O_IOR,  r, 0); endfunction

  function automatic instr_t a_x(logic [2:0] sub, int r1, int r2);
    return {OP_SX, sub, 3'(r1), 3'(r2)};
  endfunction
  function automatic instr_t a_slt  (int r1, int r2); return a_x(X_SLT, r1, r2); endfunction
  function automatic instr_t a_seq  (int r1, int r2); return a_x(X_SEQ, r1, r2); endfunction
  function automatic instr_t a_laru (int r);          return a_x(X_LARU, r, 0);  endfunction
  function automatic instr_t a_pushr(int r);          return a_x(X_PUSHR, r, 0); endfunction
  function automatic instr_t a_popr (int r);          return a_x(X_POPR, r, 0);  endfunction

  function automatic instr_t a_n(logic [2:0] sub);
    return {OP_NGRP, sub, 6'd0};
  endfunction
  function automatic instr_t a_nop  (); return a_n(N_NOP);   endfunction
  function automatic instr_t a_pushl(); return a_n(N_PUSHL); endfunction
  function automatic instr_t a_pushh(); return a_n(N_PUSHH); endfunction
  function automatic instr_t a_popl (); return a_n(N_POPL);  endfunction
  function automatic instr_t a_poph (); return a_n(N_POPH);  endfunction
  function automatic instr_t a_sptar(); return a_n(N_SPTAR); endfunction
  function automatic instr_t a_artsp(); return a_n(N_ARTSP); endfunction
  function automatic instr_t a_ret  (); return a_n(N_RET);   endfunction

  function automatic instr_t a_j(opcode_e op, logic j, int imm8);
    return {op, j, 8'(imm8)};
  endfunction
  function automatic instr_t a_bs  (int off); return a_j(OP_BR, 1'b0, off); endfunction
  function automatic instr_t a_bns (int off); return a_j(OP_BR, 1'b1, off); endfunction
  function automatic instr_t a_jn  (int off); return a_j(OP_JN, 1'b0, off); endfunction
  function automatic instr_t a_jaln(int off); return a_j(OP_JN, 1'b1, off); endfunction
  function automatic instr_t a_jf  ();        return a_j(OP_JF, 1'b0, 0);   endfunction
  function automatic instr_t a_jalf();        return a_j(OP_JF, 1'b1, 0);   endfunction
endpackage
