// rrisc_dispatch: the dispatch unit, issuing up to two instructions per cycle to the three
// execution pipes.
//
// Every cycle the instruction memory presents the pair of instructions at the PC (even word
// from bank 0, odd word from bank 1); when the PC is odd only the odd word belongs to the
// program stream. The dispatch issues the pair in program order, deciding in the same cycle,
// so the pipes latch what it chose on the next rising edge (an empty slot, the NOP flag, is
// issue valid low):
//  * An ALU instruction goes to either ALU pipe, an I/O instruction only to the master ALU
//    pipe, everything else to the memory pipe. An ALU instruction takes the master pipe when
//    it is free, the slave otherwise, so two ALU instructions issue together (first on the
//    master, second on the slave) and an ALU and an I/O instruction issue together with the
//    I/O one on the master.
//  * Two instructions that need the same pipe cannot issue together: the first issues alone
//    and the second waits a cycle (a pipe-conflict stall).
//  * nop is a barrier: it issues alone, to no pipe, after everything before it.
//  * After issuing a jump or branch the dispatch issues nothing until the memory pipe reports
//    pcc. If the jump was the even word, the odd word is held; it issues if cont says the
//    branch was not taken and is dropped otherwise. If the jump was the odd word the PC has
//    already moved to the next pair, which waits the same way.
//  * Once TRAP is set nothing more issues and the PC stays.
// nofetch is high whenever the current pair is not finished this cycle; the memory pipe then
// holds the PC instead of moving it to the next pair.
// The issue rules, the stall causes, NOFETCH, PCC, CONT and the held odd word follow the
// architecture. The way pipes are shared between an ALU and an I/O instruction and the
// bookkeeping (a two-bit mask of issued words and a wait flag) are this design's. The
// architecture forbids a jump or branch right after a branch at an odd address; this
// dispatch would handle it, and the rule is kept for program compatibility only.
module rrisc_dispatch
  import rrisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  iaddr_t pc,
  input  instr_t even_instr,
  input  instr_t odd_instr,
  input  logic   pcc,
  input  logic   cont,
  input  logic   trap,
  output logic   nofetch,
  // issue to the pipes
  output logic   m_valid,      // master ALU pipe
  output instr_t m_instr,
  output logic   s_valid,      // slave ALU pipe
  output instr_t s_instr,
  output logic   mem_valid,    // memory pipe
  output instr_t mem_instr,
  output iaddr_t mem_iaddr,
  // what happened this cycle, for observation
  output logic   ev_conflict,  // a second word had to wait for its pipe
  output logic   ev_nop,       // a nop barrier issued
  output logic   ev_wait       // waiting for a jump or branch to finish
);

  logic [1:0] done_q, done_eff, done_n, issued;
  logic       wait_q, waiting, wait_n;
  logic       v0, v1, have0, have1;
  instr_t     first, second;
  logic       first_slot;       // slot of first (0 = even word, 1 = odd word)
  pipe_e      p1, p2;
  logic       issue1, issue2;

  // a taken jump restarts at a new pair: nothing of it has been issued yet
  assign done_eff = (wait_q && pcc && !cont) ? 2'b00 : done_q;
  assign waiting  = wait_q && !pcc;

  assign v0 = !pc[0] && !done_eff[0];
  assign v1 = !done_eff[1];

  always_comb begin
    first_slot = v0 ? 1'b0 : 1'b1;
    first      = v0 ? even_instr : odd_instr;
    have0      = v0 || v1;
    have1      = v0 && v1;
    second     = odd_instr;
    p1         = pipe_of(first);
    p2         = pipe_of(second);

    issue1    = 1'b0;
    issue2    = 1'b0;
    m_valid   = 1'b0; m_instr   = NOP_INSTR;
    s_valid   = 1'b0; s_instr   = NOP_INSTR;
    mem_valid = 1'b0; mem_instr = NOP_INSTR;
    mem_iaddr = {pc[IAW-1:1], first_slot};
    ev_conflict = 1'b0;
    ev_nop      = 1'b0;
    wait_n      = waiting;

    if (!waiting && !trap && have0) begin
      issue1 = 1'b1;
      if (p1 == P_NOP) begin
        ev_nop = 1'b1;
      end else begin
        unique case (p1)
          P_MEM:   begin mem_valid = 1'b1; mem_instr = first; end
          P_IO:    begin m_valid = 1'b1; m_instr = first; end
          default: begin  // P_ALU: take the slave if an I/O word follows, else the master
            if (have1 && p2 == P_IO) begin
              s_valid = 1'b1; s_instr = first;
            end else begin
              m_valid = 1'b1; m_instr = first;
            end
          end
        endcase
        if (is_pcmod(first)) begin
          wait_n = 1'b1;
        end else if (have1 && p2 != P_NOP) begin
          unique case (p2)
            P_MEM: if (!mem_valid) begin
                     issue2 = 1'b1; mem_valid = 1'b1; mem_instr = second;
                     mem_iaddr = {pc[IAW-1:1], 1'b1};
                   end
            P_IO:  if (!m_valid) begin issue2 = 1'b1; m_valid = 1'b1; m_instr = second; end
            default: if (!m_valid) begin
                       issue2 = 1'b1; m_valid = 1'b1; m_instr = second;
                     end else if (!s_valid) begin
                       issue2 = 1'b1; s_valid = 1'b1; s_instr = second;
                     end
          endcase
          ev_conflict = !issue2;
          if (issue2 && is_pcmod(second)) wait_n = 1'b1;
        end
      end
    end

    issued = 2'b00;
    if (issue1) issued[first_slot] = 1'b1;
    if (issue2) issued[1] = 1'b1;
    done_n = done_eff | issued;
    // the pair is finished when its odd word (always the last) has issued
    nofetch = !done_n[1];
  end

  assign ev_wait = waiting;

  always_ff @(posedge clk) begin
    if (rst) begin
      done_q <= 2'b00;
      wait_q <= 1'b0;
    end else begin
      done_q <= nofetch ? done_n : 2'b00;
      wait_q <= wait_n;
    end
  end

endmodule
