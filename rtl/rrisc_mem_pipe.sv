// rrisc_mem_pipe: the memory pipe, three stages, and the PC, AR and SP registers.
//
// It executes every instruction that is neither an ALU nor an I/O instruction: lw, sw, the
// stack operations (pushr popr pushl pushh popl poph), the address-register operations (laru
// larl sptar artsp), lrl, and all jumps and branches (jn jaln jf jalf bs bns ret).
// Stage 1 latches the issued instruction and its own instruction address and reads one
// register (rd [8:6] for M-type, [5:3] otherwise). Stage 2 does the work: it drives the data
// memory (asynchronous read, write on the rising edge), updates SP, AR and, for a jump or a
// taken branch, PC; all three change on the rising edge that ends stage 2, so back-to-back
// stack operations need no gap. Stage 3 holds the register write (lw, popr, lrl; taken by the
// register file on the falling edge) and reports the end of a PC-modifying instruction to the
// dispatch: pcc for one cycle, with cont also high when a branch was not taken. While the
// dispatch keeps nofetch low, PC advances on every rising edge to the next even address (the
// next instruction pair).
// Instruction meanings, the register widths (PC, AR, SP 14 bits), PCC, CONT and NOFETCH follow
// the architecture. This design's choices: lw/sw add the 6-bit immediate unsigned to AR; the
// data address is the low 13 bits of AR+imm or SP; pushes write at SP and then increment,
// pops decrement and then read; jump and branch offsets and the link address (the address
// after the jump) are relative to the jump's own address; lrl keeps bits 7:6 of rd; all
// registers reset to 0. AR is written one stage earlier than the architecture requires, so
// its rule of one NOP after popping AR is safe but not needed here.
module rrisc_mem_pipe
  import rrisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   issue_valid,
  input  instr_t issue_instr,
  input  iaddr_t issue_iaddr,   // address of the issued instruction
  input  logic   nofetch,       // from dispatch: hold PC
  input  logic   set_flag,      // SET, from the master ALU pipe
  output reg_t   raddr,
  input  word_t  rdata,
  output wb_t    wb,
  // data memory
  output daddr_t dmem_addr,
  output logic   dmem_we,
  output word_t  dmem_wdata,
  input  word_t  dmem_rdata,
  // special registers and control
  output iaddr_t pc,
  output iaddr_t ar,
  output iaddr_t sp,
  output logic   pcc,
  output logic   cont
);

  logic   s1_valid, s2_valid;
  instr_t s1_instr, s2_instr;
  iaddr_t s1_iaddr, s2_iaddr;
  word_t  s2_r;

  // stage 2 results
  iaddr_t pc_n, ar_n, sp_n, target, link;
  logic   jump, taken, s2_we;
  word_t  s2_wdata;
  reg_t   s2_waddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_instr <= NOP_INSTR;
      s2_instr <= NOP_INSTR;
      s1_iaddr <= '0;
      s2_iaddr <= '0;
      s2_r     <= '0;
      pc       <= '0;
      ar       <= '0;
      sp       <= '0;
      wb       <= '0;
      pcc      <= 1'b0;
      cont     <= 1'b0;
    end else begin
      s1_valid <= issue_valid;
      s1_instr <= issue_instr;
      s1_iaddr <= issue_iaddr;
      s2_valid <= s1_valid;
      s2_instr <= s1_instr;
      s2_iaddr <= s1_iaddr;
      s2_r     <= rdata;
      pc       <= pc_n;
      ar       <= ar_n;
      sp       <= sp_n;
      wb       <= '{reg_we: s2_we, waddr: s2_waddr, wdata: s2_wdata, default: '0};
      pcc      <= jump;
      cont     <= jump && !taken;
    end
  end

  assign raddr = (f_op(s1_instr) inside {OP_LRL, OP_LW, OP_SW, OP_LARL}) ? f_rd(s1_instr)
                                                                         : f_r1(s1_instr);

  assign target = s2_iaddr + iaddr_t'({{(IAW-8){s2_instr[7]}}, s2_instr[7:0]});
  assign link   = s2_iaddr + iaddr_t'(1);

  logic   is_push, is_pop;
  iaddr_t sp_dec;

  assign sp_dec = sp - iaddr_t'(1);

  // Data-memory request. Kept apart from the block below, which consumes the read data.
  always_comb begin
    is_push = 1'b0;
    is_pop  = 1'b0;
    if (s2_valid) begin
      unique case (f_op(s2_instr))
        OP_SX:   begin is_push = f_sub(s2_instr) == X_PUSHR; is_pop = f_sub(s2_instr) == X_POPR; end
        OP_NGRP: begin is_push = f_sub(s2_instr) inside {N_PUSHL, N_PUSHH};
                       is_pop  = f_sub(s2_instr) inside {N_POPL, N_POPH}; end
        default: ;
      endcase
    end
    dmem_addr  = is_pop ? sp_dec[DAW-1:0] : sp[DAW-1:0];
    dmem_we    = is_push;
    dmem_wdata = s2_r;
    if (s2_valid && f_op(s2_instr) inside {OP_LW, OP_SW}) begin
      dmem_addr = daddr_t'(ar + iaddr_t'(s2_instr[5:0]));
      dmem_we   = f_op(s2_instr) == OP_SW;
    end
    if (s2_valid && f_op(s2_instr) == OP_NGRP) begin
      if (f_sub(s2_instr) == N_PUSHL) dmem_wdata = ar[7:0];
      if (f_sub(s2_instr) == N_PUSHH) dmem_wdata = {2'b00, ar[13:8]};
    end
  end

  // Register, AR, SP and PC updates.
  always_comb begin
    ar_n       = ar;
    sp_n       = is_push ? sp + iaddr_t'(1) : is_pop ? sp_dec : sp;
    jump       = 1'b0;
    taken      = 1'b0;
    s2_we      = 1'b0;
    s2_waddr   = f_r1(s2_instr);
    s2_wdata   = dmem_rdata;
    pc_n       = nofetch ? pc : {pc[IAW-1:1] + 1'b1, 1'b0};
    if (s2_valid) begin
      unique case (f_op(s2_instr))
        OP_LRL: begin
          s2_we = 1'b1; s2_waddr = f_rd(s2_instr); s2_wdata = {s2_r[7:6], s2_instr[5:0]};
        end
        OP_LW:   begin s2_we = 1'b1; s2_waddr = f_rd(s2_instr); end
        OP_LARL: ar_n[7:0] = s2_r;
        OP_SX: begin
          unique case (f_sub(s2_instr))
            X_LARU:  ar_n[13:8] = s2_r[5:0];
            X_POPR:  s2_we = 1'b1;
            default: ;  // pushr handled above; slt/seq go to the ALU pipes; 5..7 reserved
          endcase
        end
        OP_NGRP: begin
          unique case (f_sub(s2_instr))
            N_POPL:  ar_n[7:0]  = dmem_rdata;
            N_POPH:  ar_n[13:8] = dmem_rdata[5:0];
            N_SPTAR: ar_n = sp;
            N_ARTSP: sp_n = ar;
            N_RET:   begin jump = 1'b1; taken = 1'b1; pc_n = ar; end
            default: ;  // pushes handled above; nop never reaches a pipe
          endcase
        end
        OP_BR: begin
          jump  = 1'b1;
          taken = s2_instr[8] ? !set_flag : set_flag;  // bns : bs
          if (taken) pc_n = target;
        end
        OP_JN: begin
          jump = 1'b1; taken = 1'b1; pc_n = target;
          if (s2_instr[8]) ar_n = link;                // jaln
        end
        OP_JF: begin
          jump = 1'b1; taken = 1'b1; pc_n = ar;
          if (s2_instr[8]) ar_n = link;                // jalf: AR and PC exchanged
        end
        default: ;  // sw handled above
      endcase
    end
  end

endmodule
