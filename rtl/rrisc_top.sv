// rrisc_top: the RRISC processor, an 8-bit superscalar computer with 13-bit instructions.
//
// The dispatch reads an instruction pair from the two-bank instruction memory at the PC and
// issues up to two instructions per cycle to three independent three-stage pipes: the master
// ALU pipe (ALU and I/O instructions, owner of SET and CY), the slave ALU pipe (ALU
// instructions) and the memory pipe (loads, stores, stack, AR/SP and jumps; owner of PC, AR
// and SP, and the only user of the data memory). All three read and write the shared
// register file, whose writes land on the falling clock edge. The collision detector raises
// trap, which halts the dispatch, when two pipes write one destination in the same cycle.
// Data hazards are the program's responsibility: an instruction must issue at least two
// cycles after the one producing its operand (one nop between them is enough).
// Interface: clk, synchronous active-high rst. While rst is high a program can be written
// into the instruction memory through prog_we/prog_addr/prog_data (one word per clock);
// execution starts at address 0 when rst falls. The terminal interface signals (TBR, RDA,
// received byte with its read strobe, transmitted byte with its write strobe) connect to an
// external terminal interface, which is not part of this design. trap drives the error LED;
// pc is brought out for observation.
// The block partition and the control signals between blocks follow the architecture; the
// program-load port is this design's addition.
module rrisc_top
  import rrisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  // program load
  input  logic   prog_we,
  input  iaddr_t prog_addr,
  input  instr_t prog_data,
  // terminal interface
  input  logic   tis_tbr,
  input  logic   tis_rda,
  input  word_t  tis_recv_data,
  output logic   tis_recv_re,
  output logic   tis_xmit_we,
  output word_t  tis_xmit_data,
  // status
  output logic   trap,
  output iaddr_t pc
);

  instr_t even_instr, odd_instr;
  logic   nofetch, pcc, cont, set_flag, cy, collide;
  logic   m_valid, s_valid, mem_valid;
  instr_t m_instr, s_instr, mem_instr;
  iaddr_t mem_iaddr, ar, sp;
  logic   ev_conflict, ev_nop, ev_wait;

  reg_t   raddr [5];
  word_t  rdata [5];
  wb_t    wb    [3];   // 0 master ALU, 1 slave ALU, 2 memory
  logic   rf_we [3];
  reg_t   rf_wa [3];
  word_t  rf_wd [3];

  daddr_t dmem_addr;
  logic   dmem_we;
  word_t  dmem_wdata, dmem_rdata;

  rrisc_imem u_imem (
    .clk       (clk),
    .pair_addr (pc[IAW-1:1]),
    .even_instr(even_instr),
    .odd_instr (odd_instr),
    .we        (prog_we),
    .waddr     (prog_addr),
    .wdata     (prog_data)
  );

  rrisc_dispatch u_dispatch (
    .clk        (clk),
    .rst        (rst),
    .pc         (pc),
    .even_instr (even_instr),
    .odd_instr  (odd_instr),
    .pcc        (pcc),
    .cont       (cont),
    .trap       (trap),
    .nofetch    (nofetch),
    .m_valid    (m_valid),
    .m_instr    (m_instr),
    .s_valid    (s_valid),
    .s_instr    (s_instr),
    .mem_valid  (mem_valid),
    .mem_instr  (mem_instr),
    .mem_iaddr  (mem_iaddr),
    .ev_conflict(ev_conflict),
    .ev_nop     (ev_nop),
    .ev_wait    (ev_wait)
  );

  rrisc_master_alu u_master (
    .clk          (clk),
    .rst          (rst),
    .issue_valid  (m_valid),
    .issue_instr  (m_instr),
    .raddr_a      (raddr[0]),
    .raddr_b      (raddr[1]),
    .rdata_a      (rdata[0]),
    .rdata_b      (rdata[1]),
    .wb           (wb[0]),
    .slave_wb     (wb[1]),
    .set_flag     (set_flag),
    .cy           (cy),
    .tis_tbr      (tis_tbr),
    .tis_rda      (tis_rda),
    .tis_recv_data(tis_recv_data),
    .tis_recv_re  (tis_recv_re),
    .tis_xmit_we  (tis_xmit_we),
    .tis_xmit_data(tis_xmit_data)
  );

  rrisc_slave_alu u_slave (
    .clk        (clk),
    .rst        (rst),
    .issue_valid(s_valid),
    .issue_instr(s_instr),
    .raddr_a    (raddr[2]),
    .raddr_b    (raddr[3]),
    .rdata_a    (rdata[2]),
    .rdata_b    (rdata[3]),
    .cy         (cy),
    .wb         (wb[1])
  );

  rrisc_mem_pipe u_mem (
    .clk        (clk),
    .rst        (rst),
    .issue_valid(mem_valid),
    .issue_instr(mem_instr),
    .issue_iaddr(mem_iaddr),
    .nofetch    (nofetch),
    .set_flag   (set_flag),
    .raddr      (raddr[4]),
    .rdata      (rdata[4]),
    .wb         (wb[2]),
    .dmem_addr  (dmem_addr),
    .dmem_we    (dmem_we),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .pc         (pc),
    .ar         (ar),
    .sp         (sp),
    .pcc        (pcc),
    .cont       (cont)
  );

  rrisc_dmem u_dmem (
    .clk  (clk),
    .addr (dmem_addr),
    .we   (dmem_we),
    .wdata(dmem_wdata),
    .rdata(dmem_rdata)
  );

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rf_we[p] = wb[p].reg_we;
      rf_wa[p] = wb[p].waddr;
      rf_wd[p] = wb[p].wdata;
    end
  end

  rrisc_regfile #(.NREAD(5), .NWRITE(3)) u_rf (
    .clk  (clk),
    .rst  (rst),
    .raddr(raddr),
    .rdata(rdata),
    .we   (rf_we),
    .waddr(rf_wa),
    .wdata(rf_wd)
  );

  rrisc_collision #(.NPIPES(3)) u_coll (
    .clk    (clk),
    .rst    (rst),
    .wb     (wb),
    .collide(collide),
    .trap   (trap)
  );

endmodule
