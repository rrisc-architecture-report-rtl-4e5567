// rrisc_master_alu: the master ALU pipe, three stages, ALU and I/O instructions, plus the
// SET and CY special registers.
//
// The pipe works like the slave pipe: stage 1 latches the issued instruction and reads
// registers [5:3] and [2:0], stage 2 computes with rrisc_alu, stage 3 holds the register
// write that the register file takes on the falling edge. In stage 2 it also performs the I/O
// instructions against the terminal interface: iotr and iora read the transmit-buffer-ready
// (TBR) and receive-data-available (RDA) flags into bit 0 of a register, iot sends a register
// to the transmitter (xmit_we pulses for one cycle with xmit_data) and ior loads the received
// byte (recv_re pulses for one cycle to take it). SET and CY are loaded on the rising edge that
// ends stage 3, from this pipe's own result and from the update the slave pipe reports; if both
// write the same bit in one cycle (a program error that raises TRAP) this pipe's value wins.
// SET goes to the memory pipe for branches and CY to both ALU pipes for addc. The I/O
// instruction meanings and the location of SET/CY follow the architecture; the strobe
// handshake with the terminal interface is this design's choice.
module rrisc_master_alu
  import rrisc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   issue_valid,
  input  instr_t issue_instr,
  output reg_t   raddr_a,
  output reg_t   raddr_b,
  input  word_t  rdata_a,
  input  word_t  rdata_b,
  output wb_t    wb,
  input  wb_t    slave_wb,
  output logic   set_flag,
  output logic   cy,
  // terminal interface
  input  logic   tis_tbr,
  input  logic   tis_rda,
  input  word_t  tis_recv_data,
  output logic   tis_recv_re,
  output logic   tis_xmit_we,
  output word_t  tis_xmit_data
);

  logic   s1_valid, s2_valid;
  instr_t s1_instr, s2_instr;
  word_t  s2_a, s2_b;
  wb_t    alu_wb, s2_wb;
  logic   s2_io;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      s1_instr <= NOP_INSTR;
      s2_instr <= NOP_INSTR;
      s2_a     <= '0;
      s2_b     <= '0;
      wb       <= '0;
      set_flag <= 1'b0;
      cy       <= 1'b0;
    end else begin
      s1_valid <= issue_valid;
      s1_instr <= issue_instr;
      s2_valid <= s1_valid;
      s2_instr <= s1_instr;
      s2_a     <= rdata_a;
      s2_b     <= rdata_b;
      wb       <= s2_valid ? s2_wb : '0;
      if (slave_wb.set_we) set_flag <= slave_wb.set_val;
      if (slave_wb.cy_we)  cy       <= slave_wb.cy_val;
      if (wb.set_we)       set_flag <= wb.set_val;
      if (wb.cy_we)        cy       <= wb.cy_val;
    end
  end

  assign raddr_a = f_r1(s1_instr);
  assign raddr_b = f_r2(s1_instr);

  rrisc_alu u_alu (
    .instr  (s2_instr),
    .a      (s2_a),
    .b      (s2_b),
    .cy_in  (cy),
    .y      (alu_wb.wdata),
    .reg_we (alu_wb.reg_we),
    .waddr  (alu_wb.waddr),
    .set_we (alu_wb.set_we),
    .set_val(alu_wb.set_val),
    .cy_we  (alu_wb.cy_we),
    .cy_val (alu_wb.cy_val)
  );

  assign s2_io = s2_valid && f_op(s2_instr) == OP_OALU &&
                 f_sub(s2_instr) inside {O_IOTR, O_IORA, O_IOT, O_IOR};

  always_comb begin
    s2_wb         = alu_wb;
    tis_xmit_we   = 1'b0;
    tis_xmit_data = s2_a;
    tis_recv_re   = 1'b0;
    if (s2_io) begin
      s2_wb.reg_we = 1'b1;
      s2_wb.waddr  = f_r1(s2_instr);
      unique case (f_sub(s2_instr))
        O_IOTR:  s2_wb.wdata = {7'b0, tis_tbr};
        O_IORA:  s2_wb.wdata = {7'b0, tis_rda};
        O_IOT:   begin s2_wb.reg_we = 1'b0; tis_xmit_we = 1'b1; end
        default: begin s2_wb.wdata = tis_recv_data; tis_recv_re = 1'b1; end  // ior
      endcase
    end
  end

endmodule
