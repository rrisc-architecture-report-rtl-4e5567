// tb_rrisc_dmem: writes all 8192 data words with an address-derived pattern, checks them
// back, then checks that a store is readable on the very next cycle and that a cycle without
// we leaves the word alone.
module tb_rrisc_dmem;
  import rrisc_pkg::*;

  logic   clk = 0;
  daddr_t addr;
  logic   we;
  word_t  wdata, rdata;
  int     checks = 0, failures = 0;

  rrisc_dmem dut (.*);

  always #5 clk = ~clk;

  function automatic word_t pat(int a);
    return word_t'(a * 37 + (a >> 8));
  endfunction

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk); we = 1; addr = daddr_t'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 8192; a++) begin
      addr = daddr_t'(a); #1;
      chk($sformatf("addr %0d", a), rdata, pat(a));
    end
    @(negedge clk); addr = 13'd100; we = 1; wdata = 8'h5A;
    @(negedge clk); we = 0; wdata = 8'hFF; #1;
    chk("next-cycle read", rdata, 8'h5A);
    @(negedge clk); #1;
    chk("no write without we", rdata, 8'h5A);
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
