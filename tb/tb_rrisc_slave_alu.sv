// tb_rrisc_slave_alu: drives a random stream of ALU instructions (with random empty slots)
// into the slave ALU pipe and checks every write-back against the reference model, three
// cycles after issue (latched at the first edge, read in stage 1, computed in stage 2,
// presented in stage 3). The register file is a fixed random array served by the testbench;
// CY changes randomly every cycle to check that stage 2 is where it is read.
module tb_rrisc_slave_alu;
  import rrisc_pkg::*;
  import rrisc_ref_pkg::*;

  localparam int N = 3000;
  logic   clk = 0, rst, issue_valid, cy;
  instr_t issue_instr;
  reg_t   raddr_a, raddr_b;
  word_t  rdata_a, rdata_b;
  wb_t    wb;
  word_t  regs [8];
  instr_t hi [N+4];
  logic   hv [N+4];
  int     hcy [N+4];
  int     checks = 0, failures = 0;

  rrisc_slave_alu dut (.*);

  always #5 clk = ~clk;
  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

  initial begin
    ref_t r;
    regs[0] = 0;
    for (int i = 1; i < 8; i++) regs[i] = word_t'($urandom);
    rst = 1; issue_valid = 0; issue_instr = 0; cy = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < N + 4; n++) begin
      hv[n] = (n < N) && ($urandom_range(0, 4) != 0);
      hi[n] = rand_alu_instr(0);
      hcy[n] = int'($urandom_range(0, 1));
      issue_valid = hv[n]; issue_instr = hi[n]; cy = 1'(hcy[n]);
      if (n >= 3) begin
        #1;
        checks++;
        if (hv[n-3]) begin
          r = ref_exec(hi[n-3], int'(regs[hi[n-3][5:3]]), int'(regs[hi[n-3][2:0]]), hcy[n-1], 0, 0, 0);
          if (wb !== r.wb) begin
            failures++;
            $display("FAIL cycle %0d instr %h: wb %h exp %h", n, hi[n-3], wb, r.wb);
          end
        end else if (wb !== '0) begin
          failures++;
          $display("FAIL cycle %0d: write-back from an empty slot %h", n, wb);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
