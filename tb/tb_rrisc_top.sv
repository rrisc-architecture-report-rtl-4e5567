// tb_rrisc_top: end-to-end test of the RRISC processor at its full size (no parameter is
// overridden). Five programs are loaded through the program port while reset is held and run
// from address 0; results leave through iot and are compared with values worked out by hand:
//  1. the arithmetic example (lrl, add, sub, not, shifts, and, or), rescheduled so that no
//     two CY-writing instructions issue in one cycle, including the exact cycles at which its
//     six results appear on the transmitter;
//  2. the function-call example: jaln into a function that saves AR and three registers on
//     the stack, clobbers them, restores them and returns with ret;
//  3. a counting loop closed by slt/bs (taken four times, then not taken), a carry chain
//     with lru, add and addc, and a store/load through AR;
//  4. the I/O status and receive instructions against a terminal model in this testbench;
//  5. the arithmetic example exactly as the architecture lists it, where add and sub issue
//     together and both write CY: this must raise TRAP and freeze the PC;
//  6. two instructions writing $1 in the same cycle, which must raise TRAP as well;
//  7. readers of a register issued zero, one and two cycles after its writer: only the last
//     sees the new value (the two-cycle dependency distance).
// It counts how often each mechanism of the design happens (dual issue, pipe-conflict stall,
// nop barrier, waiting on a jump, taken and not-taken branch, held odd word issued after a
// not-taken branch, TRAP) and fails if one never does.
module tb_rrisc_top;
  import rrisc_pkg::*;
  import rrisc_asm_pkg::*;

  logic   clk = 0, rst;
  logic   prog_we;
  iaddr_t prog_addr;
  instr_t prog_data;
  logic   tis_tbr, tis_rda, tis_recv_re, tis_xmit_we;
  word_t  tis_recv_data, tis_xmit_data;
  logic   trap;
  iaddr_t pc;

  rrisc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle;                       // cycles since reset was released
  word_t xq [$];                   // transmitted bytes
  int    xc [$];                   // cycle of each transmitted byte
  int    n_dual = 0, n_conflict = 0, n_nop = 0, n_wait = 0, n_taken = 0, n_not_taken = 0,
         n_held = 0, n_trap = 0, n_recv = 0;

  // terminal model: transmitter always ready, one received byte waiting until read
  word_t recv_byte;
  logic  rda_q;
  assign tis_tbr       = 1'b1;
  assign tis_rda       = rda_q;
  assign tis_recv_data = recv_byte;

  always @(posedge clk) begin
    if (rst) cycle <= 0; else cycle <= cycle + 1;
    if (!rst && tis_xmit_we) begin xq.push_back(tis_xmit_data); xc.push_back(cycle); end
    if (!rst && tis_recv_re) begin rda_q <= 1'b0; n_recv++; end
    if (!rst) begin
      if (dut.m_valid && dut.s_valid) n_dual++;
      if (dut.ev_conflict) n_conflict++;
      if (dut.ev_nop) n_nop++;
      if (dut.ev_wait) n_wait++;
      if (dut.pcc && !dut.cont) n_taken++;
      if (dut.pcc && dut.cont) begin
        n_not_taken++;
        if (dut.u_dispatch.done_q == 2'b01) n_held++;
      end
    end
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // load a program with reset held, then release reset
  task automatic run(instr_t prog [$]);
    rst = 1; prog_we = 0;
    @(negedge clk);
    foreach (prog[a]) begin
      prog_we = 1; prog_addr = iaddr_t'(a); prog_data = prog[a];
      @(negedge clk);
    end
    prog_we = 0;
    xq.delete(); xc.delete();
    rda_q = 1'b1; recv_byte = 8'h5A;
    @(negedge clk);
    rst = 0;
  endtask

  task automatic wait_bytes(int n, int limit);
    int t = 0;
    while (xq.size() < n && t < limit) begin @(posedge clk); t++; end
    repeat (3) @(posedge clk);
  endtask

  task automatic expect_bytes(string name, word_t exp [$]);
    chk({name, " byte count"}, 32'(xq.size()), 32'(exp.size()));
    foreach (exp[i]) if (i < xq.size()) chk($sformatf("%s byte %0d", name, i), 32'(xq[i]), 32'(exp[i]));
  endtask

  initial begin
    instr_t p [$];
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0; rda_q = 0; recv_byte = 0;
    repeat (2) @(posedge clk);

    // ---- 1. arithmetic example, rescheduled so that no two CY writers issue together ----
    p = {a_lrl(1, 6), a_nop(),
         a_add(2, 1, 0), a_nop(), a_sub(3, 0, 1), a_nop(),
         a_not(4, 1), a_nop(), a_sll(2, 1), a_nop(),
         a_and(5, 1, 2), a_or(6, 1, 2), a_srl(4, 1), a_nop(), a_sra(2, 3), a_nop(),
         a_iot(1), a_iot(2), a_iot(3), a_iot(4), a_iot(5), a_iot(6), a_jn(0)};
    run(p);
    wait_bytes(6, 200);
    expect_bytes("arith", '{8'h06, 8'h01, 8'hFA, 8'h7C, 8'h04, 8'h0E});
    // issue plan: lrl c0, nop c1, add c2, nop c3, sub c4, nop c5, not c6, nop c7, sll c8,
    // nop c9, and+or c10, srl c11, nop c12, sra c13, nop c14, then one iot per cycle
    // c15..c20 (two I/O words cannot share a cycle); a word issued in cycle c transmits in
    // cycle c+2
    if (xc.size() == 6) begin
      chk("arith first byte cycle", 32'(xc[0]), 32'd17);
      chk("arith last byte cycle", 32'(xc[5]), 32'd22);
    end
    chk("arith no trap", 32'(trap), 32'd0);

    // ---- 2. function call example ----
    p = {a_lrl(1, 6'h11), a_lrl(2, 6'h22), a_lrl(3, 6'h33), a_nop(),
         a_jaln(8),                                   // 4: call 12, AR <- 5
         a_iot(1), a_iot(2), a_iot(3), a_iot(4),      // 5..8 after return
         a_jn(0), a_nop(), a_nop(),                   // 9: stop; 10, 11 padding
         a_pushl(), a_pushh(), a_pushr(1), a_pushr(2), a_pushr(3),     // 12..16
         a_lrl(1, 5), a_lrl(2, 7), a_nop(), a_add(4, 1, 2), a_lrl(3, 9), a_nop(),
         a_popr(3), a_popr(2), a_popr(1), a_poph(), a_popl(), a_nop(), a_ret()};
    run(p);
    wait_bytes(4, 300);
    expect_bytes("call", '{8'h11, 8'h22, 8'h33, 8'h0C});
    chk("call sp back to 0", 32'(dut.u_mem.sp), 32'd0);
    chk("call ar restored", 32'(dut.u_mem.ar), 32'd5);
    chk("call stack low byte of AR", 32'(dut.u_dmem.mem[0]), 32'h05);

    // ---- 3. branch loop, carry chain, store/load ----
    p = {a_lrl(3, 1), a_lrl(1, 0), a_lrl(2, 5), a_nop(),
         a_add(1, 1, 3), a_nop(), a_slt(1, 2), a_nop(), a_bs(-4), a_iot(1),   // 4..9
         a_lrl(5, 6'h3F), a_nop(), a_lru(5, 3), a_nop(),                      // 10..13
         a_add(6, 5, 3), a_nop(), a_addc(7, 0, 0), a_nop(),                  // 14..17
         a_iot(6), a_iot(7), a_sw(5, 3), a_nop(), a_lw(4, 3), a_nop(),        // 18..23
         a_iot(4), a_jn(0)};
    run(p);
    wait_bytes(4, 400);
    expect_bytes("loop", '{8'h05, 8'h00, 8'h01, 8'hFF});

    // ---- 4. terminal input ----
    p = {a_iora(1), a_iotr(2), a_nop(), a_ior(3), a_nop(), a_iora(4), a_nop(),
         a_iot(1), a_iot(2), a_iot(3), a_iot(4), a_jn(0)};
    run(p);
    wait_bytes(4, 200);
    expect_bytes("io", '{8'h01, 8'h01, 8'h5A, 8'h00});

    // ---- 5. the arithmetic example as printed: add and sub issue together and both write
    //      CY (as do srl and sra later), which raises TRAP and halts the PC before any iot ----
    p = {a_lrl(1, 6), a_nop(),
         a_add(2, 1, 0), a_sub(3, 0, 1), a_nop(),
         a_not(4, 1), a_sll(2, 1), a_nop(),
         a_and(5, 1, 2), a_or(6, 1, 2), a_srl(4, 1), a_sra(2, 3), a_nop(),
         a_iot(1), a_iot(2), a_iot(3), a_iot(4), a_iot(5), a_iot(6), a_jn(0)};
    run(p);
    begin
      iaddr_t pc_at_trap;
      int t = 0;
      while (!trap && t < 100) begin @(posedge clk); t++; end
      chk("trap raised", 32'(trap), 32'd1);
      // add/sub issue in cycle 2, reach stage 3 in cycle 5, trap is set from cycle 6
      chk("trap cycle", 32'(cycle), 32'd6);
      if (trap) n_trap++;
      pc_at_trap = pc;
      repeat (20) @(posedge clk);
      chk("pc frozen by trap", 32'(pc), 32'(pc_at_trap));
      chk("nothing sent after trap", 32'(xq.size()), 32'd0);
    end

    // ---- 6. two instructions writing $1 in the same cycle also raise TRAP ----
    p = {a_lrl(2, 1), a_lrl(3, 2), a_nop(), a_nop(),
         a_or(1, 2, 3), a_and(1, 3, 2),
         a_nop(), a_nop(), a_nop(), a_nop(), a_nop(), a_nop(), a_iot(2), a_jn(0)};
    run(p);
    begin
      int t = 0;
      while (!trap && t < 100) begin @(posedge clk); t++; end
      chk("register collision trap", 32'(trap), 32'd1);
      if (trap) n_trap++;
      repeat (20) @(posedge clk);
      chk("nothing sent after register trap", 32'(xq.size()), 32'd0);
    end

    // ---- 7. the hazard distance: lrl $1 issues in cycle 0; readers issued in cycles 0 and
    //      1 still see the old $1 (0), the reader issued in cycle 2 sees the new value ----
    p = {a_lrl(1, 6'h15), a_or(2, 1, 0),          // cycle 0: both issue
         a_or(3, 1, 0), a_and(4, 1, 1),           // cycle 1: distance 1
         a_or(5, 1, 0), a_nop(),                  // cycle 2: distance 2
         a_nop(), a_nop(),
         a_iot(2), a_iot(3), a_iot(4), a_iot(5), a_jn(0)};
    run(p);
    wait_bytes(4, 200);
    expect_bytes("hazard", '{8'h00, 8'h00, 8'h00, 8'h15});

    // every mechanism must have happened
    chk("dual issue seen", 32'(n_dual > 0), 1);
    chk("pipe conflict stall seen", 32'(n_conflict > 0), 1);
    chk("nop barrier seen", 32'(n_nop > 0), 1);
    chk("jump wait seen", 32'(n_wait > 0), 1);
    chk("taken jump/branch seen", 32'(n_taken > 0), 1);
    chk("not-taken branch seen", 32'(n_not_taken > 0), 1);
    chk("held odd word after not-taken branch seen", 32'(n_held > 0), 1);
    chk("trap seen", 32'(n_trap > 0), 1);
    chk("receive strobe seen", 32'(n_recv > 0), 1);
    $display("mechanisms: dual=%0d conflict=%0d nop=%0d wait=%0d taken=%0d not_taken=%0d held=%0d trap=%0d recv=%0d",
             n_dual, n_conflict, n_nop, n_wait, n_taken, n_not_taken, n_held, n_trap, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
