// rrisc_pkg: types, widths and the instruction encoding shared by every RRISC block.
//
// RRISC is an 8-bit superscalar machine with 13-bit instructions. Every instruction starts
// with a 4-bit opcode in bits [12:9]. The remaining nine bits are laid out as one of six
// formats:
//   R  op | rd[8:6]  | r1[5:3] | r2[2:0]        add sub and or addc not
//   M  op | rd[8:6]  | imm6[5:0]                lrl lw sw larl
//   S  op | sub[8:6] | r1[5:3] | r2[2:0]        slt seq
//   O  op | sub[8:6] | r[5:3]  | imm3[2:0]      sll srl sra lru iotr iora iot ior laru pushr popr
//   N  op | sub[8:6] | unused[5:0]              nop pushl pushh popl poph sptar artsp ret
//   J  op | j[8]     | imm8[7:0]                bs bns jn jaln jf jalf
// The formats, field widths and the meaning of every instruction follow the architecture's
// instruction set. The numeric values of the opcodes and sub-opcodes are this design's own
// choice (the architecture names the instructions but gives no numbers). The all-zero word
// is nop. Sixteen opcodes do not leave room for a separate S-type opcode, so slt and seq
// share opcode OP_SX with the memory-pipe O-type instructions laru, pushr and popr; the
// dispatch sends each to its pipe by sub-opcode.
package rrisc_pkg;

  localparam int DW    = 8;    // data word
  localparam int IW    = 13;   // instruction word
  localparam int IAW   = 14;   // instruction address (PC, AR, SP width)
  localparam int DAW   = 13;   // data memory address
  localparam int NREGS = 8;

  typedef logic [DW-1:0]  word_t;
  typedef logic [IW-1:0]  instr_t;
  typedef logic [IAW-1:0] iaddr_t;
  typedef logic [DAW-1:0] daddr_t;
  typedef logic [2:0]     reg_t;

  typedef enum logic [3:0] {
    OP_NGRP = 4'h0,  // N-type group, sub-opcode in [8:6]
    OP_ADD  = 4'h1,
    OP_SUB  = 4'h2,
    OP_AND  = 4'h3,
    OP_OR   = 4'h4,
    OP_ADDC = 4'h5,
    OP_NOT  = 4'h6,
    OP_LRL  = 4'h7,
    OP_LW   = 4'h8,
    OP_SW   = 4'h9,
    OP_LARL = 4'hA,
    OP_OALU = 4'hB,  // O-type ALU/IO group
    OP_SX   = 4'hC,  // S-type tests and O-type memory-pipe group
    OP_BR   = 4'hD,  // bs (j=0) / bns (j=1)
    OP_JN   = 4'hE,  // jn (j=0) / jaln (j=1)
    OP_JF   = 4'hF   // jf (j=0) / jalf (j=1)
  } opcode_e;

  // sub-opcodes of OP_NGRP
  localparam logic [2:0] N_NOP = 3'd0, N_PUSHL = 3'd1, N_PUSHH = 3'd2, N_POPL = 3'd3,
                         N_POPH = 3'd4, N_SPTAR = 3'd5, N_ARTSP = 3'd6, N_RET = 3'd7;
  // sub-opcodes of OP_OALU
  localparam logic [2:0] O_SLL = 3'd0, O_SRL = 3'd1, O_SRA = 3'd2, O_LRU = 3'd3,
                         O_IOTR = 3'd4, O_IORA = 3'd5, O_IOT = 3'd6, O_IOR = 3'd7;
  // sub-opcodes of OP_SX (5..7 are reserved and do nothing in the memory pipe)
  localparam logic [2:0] X_SLT = 3'd0, X_SEQ = 3'd1, X_LARU = 3'd2, X_PUSHR = 3'd3,
                         X_POPR = 3'd4;

  localparam instr_t NOP_INSTR = '0;

  // Which execution pipe an instruction needs.
  typedef enum logic [1:0] {
    P_NOP = 2'd0,  // barrier, goes to no pipe
    P_ALU = 2'd1,  // either ALU pipe
    P_IO  = 2'd2,  // master ALU pipe only
    P_MEM = 2'd3   // memory pipe
  } pipe_e;

  function automatic opcode_e f_op(instr_t i);
    return opcode_e'(i[12:9]);
  endfunction
  function automatic logic [2:0] f_sub(instr_t i);
    return i[8:6];
  endfunction
  function automatic reg_t f_rd(instr_t i);  // R/M-type destination
    return i[8:6];
  endfunction
  function automatic reg_t f_r1(instr_t i);  // R/S/O-type first register
    return i[5:3];
  endfunction
  function automatic reg_t f_r2(instr_t i);  // R/S-type second register
    return i[2:0];
  endfunction

  function automatic pipe_e pipe_of(instr_t i);
    unique case (f_op(i))
      OP_NGRP: return (f_sub(i) == N_NOP) ? P_NOP : P_MEM;
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_ADDC, OP_NOT: return P_ALU;
      OP_OALU: return (f_sub(i) inside {O_IOTR, O_IORA, O_IOT, O_IOR}) ? P_IO : P_ALU;
      OP_SX:   return (f_sub(i) inside {X_SLT, X_SEQ}) ? P_ALU : P_MEM;
      default: return P_MEM;  // lrl lw sw larl and all jumps/branches
    endcase
  endfunction

  // Instructions that may change the PC: the dispatch waits for PCC after issuing one.
  function automatic logic is_pcmod(instr_t i);
    return (f_op(i) inside {OP_BR, OP_JN, OP_JF}) ||
           (f_op(i) == OP_NGRP && f_sub(i) == N_RET);
  endfunction

  // Write-back of one pipe's third stage, as seen by the register file and TRAP logic.
  typedef struct packed {
    logic  reg_we;
    reg_t  waddr;
    word_t wdata;
    logic  set_we;
    logic  set_val;
    logic  cy_we;
    logic  cy_val;
  } wb_t;

endpackage
