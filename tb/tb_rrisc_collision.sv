// tb_rrisc_collision: checks that TRAP rises one edge after two pipes write the same register
// ($1..$7), SET or CY in one cycle, stays set until reset, and does not rise for distinct
// destinations or for two writes to $0.
module tb_rrisc_collision;
  import rrisc_pkg::*;

  logic clk = 0, rst, collide, trap;
  wb_t  wb [3];
  int   checks = 0, failures = 0;

  rrisc_collision #(.NPIPES(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", what, got, exp); end
  endtask

  task automatic clear();
    for (int i = 0; i < 3; i++) wb[i] = '0;
  endtask

  // apply one cycle of write-backs and check whether trap follows
  task automatic one(string what, logic exp);
    @(negedge clk); rst = 1; clear();
    @(negedge clk); rst = 0;
    case (what)
      "reg01":   begin wb[0].reg_we = 1; wb[0].waddr = 3; wb[1].reg_we = 1; wb[1].waddr = 3; end
      "reg02":   begin wb[0].reg_we = 1; wb[0].waddr = 7; wb[2].reg_we = 1; wb[2].waddr = 7; end
      "reg12":   begin wb[1].reg_we = 1; wb[1].waddr = 1; wb[2].reg_we = 1; wb[2].waddr = 1; end
      "set":     begin wb[0].set_we = 1; wb[1].set_we = 1; end
      "cy":      begin wb[0].cy_we = 1; wb[1].cy_we = 1; end
      "distinct":begin wb[0].reg_we = 1; wb[0].waddr = 2; wb[1].reg_we = 1; wb[1].waddr = 3;
                       wb[2].reg_we = 1; wb[2].waddr = 4; wb[0].set_we = 1; wb[1].cy_we = 1; end
      "zero":    begin wb[0].reg_we = 1; wb[0].waddr = 0; wb[2].reg_we = 1; wb[2].waddr = 0; end
      "onlyone": begin wb[1].reg_we = 1; wb[1].waddr = 5; wb[1].set_we = 1; wb[1].cy_we = 1; end
      default: ;
    endcase
    #1 chk({what, " trap before edge"}, trap, 1'b0);
    @(negedge clk); clear();
    chk({what, " trap"}, trap, exp);
    repeat (3) @(negedge clk);
    chk({what, " trap held"}, trap, exp);
  endtask

  initial begin
    clear(); rst = 1;
    one("reg01", 1); one("reg02", 1); one("reg12", 1); one("set", 1); one("cy", 1);
    one("distinct", 0); one("zero", 0); one("onlyone", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
