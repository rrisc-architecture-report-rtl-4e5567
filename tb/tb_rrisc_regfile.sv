// tb_rrisc_regfile: random self-check of the register file against a model array.
// Checks that $0 reads zero and ignores writes, that every read port returns the model value,
// and that a value written on the falling edge is visible to a read in the second half of
// the same cycle (the read-after-write the falling-edge write provides).
module tb_rrisc_regfile;
  import rrisc_pkg::*;

  logic  clk = 0, rst;
  reg_t  raddr [5];
  word_t rdata [5];
  logic  we    [3];
  reg_t  waddr [3];
  word_t wdata [3];
  word_t model [8];
  int    checks = 0, failures = 0;

  rrisc_regfile #(.NREAD(5), .NWRITE(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin we[i] = 0; waddr[i] = 0; wdata[i] = 0; end
    for (int i = 0; i < 5; i++) raddr[i] = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    rst = 1;
    @(posedge clk); @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      // drive writes just after a rising edge (start of the write-back cycle)
      @(posedge clk); #1;
      for (int w = 0; w < 3; w++) begin
        we[w] = 1'($urandom);
        waddr[w] = reg_t'($urandom);
        wdata[w] = word_t'($urandom);
      end
      // distinct write addresses (the same address twice is a program error)
      if (waddr[1] == waddr[0]) we[1] = 0;
      if (waddr[2] == waddr[0] || waddr[2] == waddr[1]) we[2] = 0;
      for (int r = 0; r < 5; r++) raddr[r] = reg_t'($urandom);
      // after the falling edge, in the same cycle, the new values must be readable
      @(negedge clk); #1;
      for (int w = 0; w < 3; w++) if (we[w] && waddr[w] != 0) model[waddr[w]] = wdata[w];
      for (int r = 0; r < 5; r++) chk($sformatf("port %0d reg %0d", r, raddr[r]), rdata[r], model[raddr[r]]);
      for (int w = 0; w < 3; w++) we[w] = 0;
    end
    // $0 stays zero after explicit writes
    @(posedge clk); #1; we[0] = 1; waddr[0] = 0; wdata[0] = 8'hA5; raddr[0] = 0;
    @(negedge clk); #1; chk("$0", rdata[0], 8'h00); we[0] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
