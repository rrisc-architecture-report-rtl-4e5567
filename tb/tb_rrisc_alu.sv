// tb_rrisc_alu: random self-check of the combinational ALU against a reference model
// written independently here (plain arithmetic on integers), for every ALU instruction.
module tb_rrisc_alu;
  import rrisc_pkg::*;
  import rrisc_asm_pkg::*;

  instr_t instr;
  word_t  a, b, y;
  logic   cy_in, reg_we, set_we, set_val, cy_we, cy_val;
  reg_t   waddr;
  int     checks = 0, failures = 0;

  rrisc_alu dut (.*);

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h a=%h b=%h cy=%b: got %h exp %h", what, instr, a, b, cy_in, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int kind, rd, r1, r2, sh;
      int ia, ib, t;
      int ey, ecy, eset;
      logic ewe, ecywe, esetwe;
      int ewa;
      kind = $urandom_range(0, 11);
      rd = $urandom_range(0, 7); r1 = $urandom_range(0, 7); r2 = $urandom_range(0, 7);
      sh = $urandom_range(0, 7);
      a = word_t'($urandom); b = word_t'($urandom); cy_in = 1'($urandom);
      ia = int'(a); ib = int'(b);
      ewe = 1; ecywe = 0; esetwe = 0; ey = 0; ecy = 0; eset = 0; ewa = rd;
      case (kind)
        0: begin instr = a_add(rd, r1, r2);  t = ia + ib;  ey = t % 256; ecy = t / 256; ecywe = 1; end
        1: begin instr = a_sub(rd, r1, r2);  t = ia - ib;  ey = (t + 256) % 256; ecy = (ia >= ib); ecywe = 1; end
        2: begin instr = a_and(rd, r1, r2);  ey = ia & ib; end
        3: begin instr = a_or(rd, r1, r2);   ey = ia | ib; end
        4: begin instr = a_addc(rd, r1, r2); t = ia + ib + int'(cy_in); ey = t % 256; ecy = t / 256; ecywe = 1; end
        5: begin instr = a_not(rd, r1);      ey = 255 - ia; ecy = 0; ecywe = 1; end
        6: begin instr = a_sll(r1, sh); ewa = r1; ey = (ia * (1 << sh)) % 256;
                 ecy = (sh == 0) ? 0 : (ia >> (8 - sh)) & 1; ecywe = 1; end
        7: begin instr = a_srl(r1, sh); ewa = r1; ey = ia / (1 << sh);
                 ecy = (sh == 0) ? 0 : (ia >> (sh - 1)) & 1; ecywe = 1; end
        8: begin instr = a_sra(r1, sh); ewa = r1;
                 t = (ia >= 128) ? ia - 256 : ia;   // signed value
                 ey = ((t >>> sh) + 256) % 256;
                 ecy = (sh == 0) ? 0 : (ia >> (sh - 1)) & 1; ecywe = 1; end
        9: begin instr = a_lru(r1, sh & 3); ewa = r1; ey = (sh & 3) * 64 + (ia % 64); end
        10: begin instr = a_slt(r1, r2); ewe = 0; esetwe = 1; eset = (ia < ib); ecy = (ia >= ib); ecywe = 1; end
        default: begin instr = a_seq(r1, r2); ewe = 0; esetwe = 1; eset = (ia == ib); ecy = (ia >= ib); ecywe = 1; end
      endcase
      #1;
      check("reg_we", 16'(reg_we), 16'(ewe));
      if (ewe) begin
        check("y", 16'(y), 16'(ey));
        check("waddr", 16'(waddr), 16'(ewa));
      end
      check("cy_we", 16'(cy_we), 16'(ecywe));
      if (ecywe) check("cy", 16'(cy_val), 16'(ecy));
      check("set_we", 16'(set_we), 16'(esetwe));
      if (esetwe) check("set", 16'(set_val), 16'(eset));
    end
    // non-ALU instructions write nothing
    instr = a_lw(3, 5); #1;
    check("lw no write", 16'({reg_we, set_we, cy_we}), 16'd0);
    instr = a_iot(2); #1;
    check("iot no write", 16'({reg_we, set_we, cy_we}), 16'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
