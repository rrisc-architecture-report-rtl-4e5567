// tb_rrisc_master_alu: drives a random stream of ALU and I/O instructions into the master
// ALU pipe, with random terminal inputs and random SET/CY reports from a slave pipe. Checks
// every cycle: the stage-3 write-back against the reference model (three cycles after
// issue), the terminal strobes and data in stage 2 (two cycles after issue), and the SET and
// CY registers against a model updated from the pipe's own and the slave's write-backs.
module tb_rrisc_master_alu;
  import rrisc_pkg::*;
  import rrisc_ref_pkg::*;

  localparam int N = 3000;
  logic   clk = 0, rst, issue_valid;
  instr_t issue_instr;
  reg_t   raddr_a, raddr_b;
  word_t  rdata_a, rdata_b;
  wb_t    wb, slave_wb;
  logic   set_flag, cy;
  logic   tis_tbr, tis_rda, tis_recv_re, tis_xmit_we;
  word_t  tis_recv_data, tis_xmit_data;
  word_t  regs [8];
  instr_t hi [N+4];
  logic   hv [N+4];
  int     hcy [N+4], htbr [N+4], hrda [N+4], hrecv [N+4];
  wb_t    hwb [N+4];
  logic   m_set, m_cy;
  int     checks = 0, failures = 0;

  rrisc_master_alu dut (.*);

  always #5 clk = ~clk;
  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

  task automatic chk(string what, int n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h exp %h", n, what, got, exp);
    end
  endtask

  initial begin
    ref_t r, r2;
    regs[0] = 0;
    for (int i = 1; i < 8; i++) regs[i] = word_t'($urandom);
    rst = 1; issue_valid = 0; issue_instr = 0; slave_wb = '0;
    tis_tbr = 0; tis_rda = 0; tis_recv_data = 0;
    m_set = 0; m_cy = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < N + 4; n++) begin
      hv[n] = (n < N) && ($urandom_range(0, 4) != 0);
      hi[n] = rand_alu_instr(1);
      htbr[n] = int'($urandom_range(0, 1)); hrda[n] = int'($urandom_range(0, 1));
      hrecv[n] = int'($urandom_range(0, 255));
      hwb[n] = '0;
      if ($urandom_range(0, 3) == 0) begin
        hwb[n].set_we = 1'($urandom); hwb[n].set_val = 1'($urandom);
        hwb[n].cy_we = 1'($urandom); hwb[n].cy_val = 1'($urandom);
      end
      issue_valid = hv[n]; issue_instr = hi[n];
      tis_tbr = 1'(htbr[n]); tis_rda = 1'(hrda[n]); tis_recv_data = word_t'(hrecv[n]);
      slave_wb = hwb[n];
      hcy[n] = int'(m_cy);   // CY during this cycle (model)
      #1;
      chk("set", n, 32'(set_flag), 32'(m_set));
      chk("cy", n, 32'(cy), 32'(m_cy));
      // stage 2: terminal strobes of the instruction issued two cycles ago
      if (n >= 2 && hv[n-2]) begin
        r2 = ref_exec(hi[n-2], int'(regs[hi[n-2][5:3]]), int'(regs[hi[n-2][2:0]]), hcy[n], htbr[n], hrda[n], hrecv[n]);
        chk("xmit_we", n, 32'(tis_xmit_we), 32'(r2.xmit_we));
        if (r2.xmit_we) chk("xmit_data", n, 32'(tis_xmit_data), 32'(r2.xmit_data));
        chk("recv_re", n, 32'(tis_recv_re), 32'(r2.recv_re));
      end else if (n >= 2) begin
        chk("idle strobes", n, 32'({tis_xmit_we, tis_recv_re}), 32'(0));
      end
      // stage 3: write-back of the instruction issued three cycles ago
      if (n >= 3) begin
        if (hv[n-3]) begin
          r = ref_exec(hi[n-3], int'(regs[hi[n-3][5:3]]), int'(regs[hi[n-3][2:0]]), hcy[n-1],
                       htbr[n-1], hrda[n-1], hrecv[n-1]);
          chk($sformatf("wb of %h", hi[n-3]), n, 32'(wb), 32'(r.wb));
        end else chk("empty wb", n, 32'(wb), 32'(0));
      end
      // SET/CY model: the slave's report, then this pipe's own write-back, land at the edge
      if (hwb[n].set_we) m_set = hwb[n].set_val;
      if (hwb[n].cy_we)  m_cy  = hwb[n].cy_val;
      if (n >= 3 && hv[n-3]) begin
        if (r.wb.set_we) m_set = r.wb.set_val;
        if (r.wb.cy_we)  m_cy  = r.wb.cy_val;
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
