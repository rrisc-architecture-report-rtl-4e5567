// tb_rrisc_imem: fills the full instruction memory through the write port with a pattern
// computed from the address, then reads every pair back and checks both banks.
module tb_rrisc_imem;
  import rrisc_pkg::*;

  logic        clk = 0;
  logic [12:0] pair_addr;
  instr_t      even_instr, odd_instr;
  logic        we;
  iaddr_t      waddr;
  instr_t      wdata;
  int          checks = 0, failures = 0;

  rrisc_imem dut (.*);

  always #5 clk = ~clk;

  function automatic instr_t pat(int a);
    return instr_t'((a * 2654435761) >> 7) ^ instr_t'(a);
  endfunction

  initial begin
    we = 0; waddr = 0; wdata = 0; pair_addr = 0;
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk); we = 1; waddr = iaddr_t'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int p = 0; p < 8192; p++) begin
      pair_addr = 13'(p); #1;
      checks += 2;
      if (even_instr !== pat(2 * p))     begin failures++; $display("FAIL even %0d", p); end
      if (odd_instr  !== pat(2 * p + 1)) begin failures++; $display("FAIL odd %0d", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
