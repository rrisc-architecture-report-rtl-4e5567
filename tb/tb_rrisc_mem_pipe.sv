// tb_rrisc_mem_pipe: random self-check of the memory pipe against a sequential model of the
// memory-pipe instructions written here. A random stream of loads, stores, stack, AR/SP,
// lrl, jump and branch instructions (with random empty slots, random SET and random
// NOFETCH) is issued one per cycle. The testbench serves the data memory and a fixed register
// array. Every cycle it checks the data-memory request of the instruction in stage 2, and
// after each edge the PC, AR and SP, the stage-3 register write and the PCC/CONT pair.
module tb_rrisc_mem_pipe;
  import rrisc_pkg::*;
  import rrisc_asm_pkg::*;

  localparam int N = 4000;
  logic   clk = 0, rst, issue_valid, nofetch, set_flag;
  instr_t issue_instr;
  iaddr_t issue_iaddr;
  reg_t   raddr;
  word_t  rdata;
  wb_t    wb;
  daddr_t dmem_addr;
  logic   dmem_we;
  word_t  dmem_wdata, dmem_rdata;
  iaddr_t pc, ar, sp;
  logic   pcc, cont;

  word_t  regs [8];
  word_t  mem [8192];     // served to the DUT
  word_t  mmem [8192];    // model
  instr_t hi [N+4];
  iaddr_t ha [N+4];
  logic   hv [N+4];
  int     checks = 0, failures = 0;
  int     n_taken = 0, n_not_taken = 0;

  rrisc_mem_pipe dut (.*);

  always #5 clk = ~clk;
  assign rdata = regs[raddr];
  assign dmem_rdata = mem[dmem_addr];
  always @(posedge clk) if (dmem_we) mem[dmem_addr] <= dmem_wdata;

  task automatic chk(string what, int n, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h exp %h", n, what, got, exp);
    end
  endtask

  function automatic instr_t rand_mem_instr();
    case ($urandom_range(0, 19))
      0: return a_lrl($urandom_range(0, 7), $urandom_range(0, 63));
      1, 2: return a_lw($urandom_range(0, 7), $urandom_range(0, 63));
      3, 4: return a_sw($urandom_range(0, 7), $urandom_range(0, 63));
      5: return a_larl($urandom_range(0, 7));
      6: return a_laru($urandom_range(0, 7));
      7: return a_pushr($urandom_range(0, 7));
      8: return a_popr($urandom_range(0, 7));
      9: return a_pushl();
      10: return a_pushh();
      11: return a_popl();
      12: return a_poph();
      13: return a_sptar();
      14: return a_artsp();
      15: return $urandom_range(0, 1) ? a_jn($urandom) : a_jaln($urandom);
      16: return $urandom_range(0, 1) ? a_jf() : a_jalf();
      17: return a_ret();
      default: return $urandom_range(0, 1) ? a_bs($urandom) : a_bns($urandom);
    endcase
  endfunction

  initial begin
    // model state
    int m_pc, m_ar, m_sp;
    int op, sub, rv, imm6, addr, tgt;
    logic e_we; int e_addr, e_data;     // expected data-memory write in stage 2
    int   e_raddr;                      // expected data-memory read address (-1: none)
    logic w_we; int w_addr, w_data;     // expected stage-3 register write
    logic e_jump, e_taken;
    logic sf, nf;
    regs[0] = 0;
    for (int i = 1; i < 8; i++) regs[i] = word_t'($urandom);
    for (int i = 0; i < 8192; i++) begin mem[i] = word_t'($urandom); mmem[i] = mem[i]; end
    rst = 1; issue_valid = 0; issue_instr = 0; issue_iaddr = 0; nofetch = 1; set_flag = 0;
    m_pc = 0; m_ar = 0; m_sp = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < N + 4; n++) begin
      hv[n] = (n < N) && ($urandom_range(0, 3) != 0);
      hi[n] = rand_mem_instr();
      ha[n] = iaddr_t'($urandom);
      issue_valid = hv[n]; issue_instr = hi[n]; issue_iaddr = ha[n];
      sf = 1'($urandom); nf = 1'($urandom);
      set_flag = sf; nofetch = nf;
      #1;
      // ---- model the instruction in stage 2 (issued two cycles ago) ----
      e_we = 0; e_addr = 0; e_data = 0; e_raddr = -1; w_we = 0; w_addr = 0; w_data = 0;
      e_jump = 0; e_taken = 0; tgt = 0;
      if (n >= 2 && hv[n-2]) begin
        op = int'(hi[n-2][12:9]); sub = int'(hi[n-2][8:6]); imm6 = int'(hi[n-2][5:0]);
        rv = (op inside {7, 8, 9, 10}) ? int'(regs[hi[n-2][8:6]]) : int'(regs[hi[n-2][5:3]]);
        tgt = (int'(ha[n-2]) + int'($signed(hi[n-2][7:0]))) & 16383;
        case (op)
          7: begin w_we = 1; w_addr = sub; w_data = (rv & 8'hC0) | imm6; end
          8: begin addr = (m_ar + imm6) & 8191; e_raddr = addr; w_we = 1; w_addr = sub; w_data = mmem[addr]; end
          9: begin addr = (m_ar + imm6) & 8191; e_we = 1; e_addr = addr; e_data = rv; end
          10: m_ar = (m_ar & 16'h3F00) | rv;
          12: case (sub)
                2: m_ar = (m_ar & 8'hFF) | ((rv & 63) << 8);
                3: begin e_we = 1; e_addr = m_sp & 8191; e_data = rv; m_sp = (m_sp + 1) & 16383; end
                4: begin m_sp = (m_sp + 16383) & 16383; e_raddr = m_sp & 8191;
                         w_we = 1; w_addr = int'(hi[n-2][5:3]); w_data = mmem[m_sp & 8191]; end
                default: ;
              endcase
          0: case (sub)
                1: begin e_we = 1; e_addr = m_sp & 8191; e_data = m_ar & 255; m_sp = (m_sp + 1) & 16383; end
                2: begin e_we = 1; e_addr = m_sp & 8191; e_data = m_ar >> 8; m_sp = (m_sp + 1) & 16383; end
                3: begin m_sp = (m_sp + 16383) & 16383; e_raddr = m_sp & 8191; m_ar = (m_ar & 16'h3F00) | mmem[m_sp & 8191]; end
                4: begin m_sp = (m_sp + 16383) & 16383; e_raddr = m_sp & 8191;
                         m_ar = (m_ar & 255) | ((mmem[m_sp & 8191] & 63) << 8); end
                5: m_ar = m_sp;
                6: m_sp = m_ar;
                7: begin e_jump = 1; e_taken = 1; tgt = m_ar; end
                default: ;
              endcase
          13: begin e_jump = 1; e_taken = hi[n-2][8] ? !sf : sf; end
          14: begin e_jump = 1; e_taken = 1; if (hi[n-2][8]) m_ar = (int'(ha[n-2]) + 1) & 16383; end
          15: begin e_jump = 1; e_taken = 1; tgt = m_ar; if (hi[n-2][8]) m_ar = (int'(ha[n-2]) + 1) & 16383; end
          default: ;
        endcase
      end
      // ---- stage-2 data memory request ----
      chk("dmem_we", n, 32'(dmem_we), 32'(e_we));
      if (e_we) begin
        chk("dmem_addr(w)", n, 32'(dmem_addr), 32'(e_addr));
        chk("dmem_wdata", n, 32'(dmem_wdata), 32'(e_data));
        mmem[e_addr] = word_t'(e_data);
      end
      if (e_raddr >= 0) chk("dmem_addr(r)", n, 32'(dmem_addr), 32'(e_raddr));
      if (e_taken) n_taken++; else if (e_jump) n_not_taken++;
      // ---- PC model for the coming edge ----
      if (e_taken) m_pc = tgt;
      else if (!nf) m_pc = ((m_pc >> 1) + 1 << 1) & 16383;
      @(posedge clk); #1;
      chk("pc", n, 32'(pc), 32'(m_pc));
      chk("ar", n, 32'(ar), 32'(m_ar));
      chk("sp", n, 32'(sp), 32'(m_sp));
      chk("pcc", n, 32'(pcc), 32'(e_jump));
      chk("cont", n, 32'(cont), 32'(e_jump && !e_taken));
      chk("wb.reg_we", n, 32'(wb.reg_we), 32'(w_we));
      if (w_we) begin
        chk("wb.waddr", n, 32'(wb.waddr), 32'(w_addr));
        chk($sformatf("wb.wdata %h", hi[n-2]), n, 32'(wb.wdata), 32'(w_data));
      end
    end
    if (n_taken == 0 || n_not_taken == 0) begin
      failures++; $display("FAIL branch outcomes not both exercised");
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
