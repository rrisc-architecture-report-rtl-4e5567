// tb_rrisc_dispatch: directed scenarios for the dispatch unit, each worked out by hand from
// the issue rules: pairs that issue together, pipe-conflict stalls, nop barriers in either
// slot, an odd start address, a branch in the even slot (not taken: the held odd word
// issues; taken: it is dropped and the new pair issues), a jump in the odd slot, and TRAP.
// For every cycle the testbench sets PC, the instruction pair and PCC/CONT/TRAP, then checks
// what goes to each pipe, the memory pipe's instruction address and NOFETCH.
module tb_rrisc_dispatch;
  import rrisc_pkg::*;
  import rrisc_asm_pkg::*;

  logic   clk = 0, rst;
  iaddr_t pc;
  instr_t even_instr, odd_instr;
  logic   pcc, cont, trap, nofetch;
  logic   m_valid, s_valid, mem_valid;
  instr_t m_instr, s_instr, mem_instr;
  iaddr_t mem_iaddr;
  logic   ev_conflict, ev_nop, ev_wait;
  int     checks = 0, failures = 0;
  int     line = 0;

  rrisc_dispatch dut (.*);

  always #5 clk = ~clk;

  localparam instr_t X = '1;  // "nothing issued" marker for the expectations

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL step %0d %s: got %h exp %h", line, what, got, exp);
    end
  endtask

  // one cycle: inputs, then expected master / slave / memory issue, memory address, nofetch
  task automatic cyc(int p, instr_t e, instr_t o, logic c_pcc, logic c_cont, logic c_trap,
                     instr_t em, instr_t es, instr_t emem, int eaddr, logic enof);
    line++;
    pc = iaddr_t'(p); even_instr = e; odd_instr = o; pcc = c_pcc; cont = c_cont; trap = c_trap;
    #1;
    chk("m_valid", 32'(m_valid), 32'(em != X));
    if (em != X) chk("m_instr", 32'(m_instr), 32'(em));
    chk("s_valid", 32'(s_valid), 32'(es != X));
    if (es != X) chk("s_instr", 32'(s_instr), 32'(es));
    chk("mem_valid", 32'(mem_valid), 32'(emem != X));
    if (emem != X) begin
      chk("mem_instr", 32'(mem_instr), 32'(emem));
      chk("mem_iaddr", 32'(mem_iaddr), 32'(eaddr));
    end
    chk("nofetch", 32'(nofetch), 32'(enof));
    @(posedge clk); #1;
  endtask

  initial begin
    instr_t add1, sub1, or1, and1, not1, lw1, sw1, iot1, ior1, nop1, bs1, jn1, addx;
    add1 = a_add(1, 2, 3); sub1 = a_sub(4, 5, 6); or1 = a_or(7, 1, 2); and1 = a_and(3, 3, 3);
    not1 = a_not(2, 5); lw1 = a_lw(3, 4); sw1 = a_sw(5, 6); iot1 = a_iot(2); ior1 = a_ior(4);
    nop1 = a_nop(); bs1 = a_bs(12); jn1 = a_jn(-4); addx = a_add(6, 6, 6);
    rst = 1; pc = 0; even_instr = 0; odd_instr = 0; pcc = 0; cont = 0; trap = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    //   pc  even  odd   pcc cont trap  master slave memory addr nofetch
    // two ALU words issue together
    cyc(0, add1, sub1, 0, 0, 0, add1, sub1, X, 0, 0);
    // two memory words: conflict, the odd one waits a cycle
    cyc(2, lw1, sw1,   0, 0, 0, X, X, lw1, 2, 1);
    cyc(2, lw1, sw1,   0, 0, 0, X, X, sw1, 3, 0);
    // nop in the even slot issues alone, then the odd word
    cyc(4, nop1, add1, 0, 0, 0, X, X, X, 0, 1);
    cyc(4, nop1, add1, 0, 0, 0, add1, X, X, 0, 0);
    // nop in the odd slot: the even word first, the nop alone next
    cyc(6, add1, nop1, 0, 0, 0, add1, X, X, 0, 1);
    cyc(6, add1, nop1, 0, 0, 0, X, X, X, 0, 0);
    // ALU then I/O: the I/O word takes the master, the ALU word the slave
    cyc(8, add1, iot1, 0, 0, 0, iot1, add1, X, 0, 0);
    // I/O then ALU
    cyc(10, iot1, sub1, 0, 0, 0, iot1, sub1, X, 0, 0);
    // two I/O words: conflict on the master
    cyc(12, iot1, ior1, 0, 0, 0, iot1, X, X, 0, 1);
    cyc(12, iot1, ior1, 0, 0, 0, ior1, X, X, 0, 0);
    // ALU and memory word together
    cyc(14, lw1, or1,  0, 0, 0, or1, X, lw1, 14, 0);
    // odd PC: only the odd word belongs to the stream
    cyc(17, addx, sw1, 0, 0, 0, X, X, sw1, 17, 0);
    // branch in the even slot, not taken: odd word held, then issued on pcc+cont
    cyc(20, bs1, add1, 0, 0, 0, X, X, bs1, 20, 1);
    cyc(20, bs1, add1, 0, 0, 0, X, X, X, 0, 1);
    cyc(20, bs1, add1, 0, 0, 0, X, X, X, 0, 1);
    cyc(20, bs1, add1, 1, 1, 0, add1, X, X, 0, 0);
    // branch in the even slot, taken: odd word dropped, new pair at 40 issues on pcc
    cyc(22, bs1, add1, 0, 0, 0, X, X, bs1, 22, 1);
    cyc(22, bs1, add1, 0, 0, 0, X, X, X, 0, 1);
    cyc(22, bs1, add1, 0, 0, 0, X, X, X, 0, 1);
    cyc(40, sub1, or1, 1, 0, 0, sub1, or1, X, 0, 0);
    // jump in the odd slot with an ALU word: both issue, PC moves on, next pair waits
    cyc(42, not1, jn1, 0, 0, 0, not1, X, jn1, 43, 0);
    cyc(44, and1, or1, 0, 0, 0, X, X, X, 0, 1);
    cyc(44, and1, or1, 0, 0, 0, X, X, X, 0, 1);
    // jump taken to an odd address: only the odd word issues
    cyc(51, addx, lw1, 1, 0, 0, X, X, lw1, 51, 0);
    // branch in the odd slot, not taken: the next pair issues on pcc+cont
    cyc(52, add1, bs1, 0, 0, 0, add1, X, bs1, 53, 0);
    cyc(54, and1, or1, 0, 0, 0, X, X, X, 0, 1);
    cyc(54, and1, or1, 0, 0, 0, X, X, X, 0, 1);
    cyc(54, and1, or1, 1, 1, 0, and1, or1, X, 0, 0);
    // TRAP: nothing issues and the PC is held
    cyc(56, add1, sub1, 0, 0, 1, X, X, X, 0, 1);
    cyc(56, add1, sub1, 0, 0, 1, X, X, X, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
