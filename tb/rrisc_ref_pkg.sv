// rrisc_ref_pkg: instruction-level reference model of the ALU and I/O instructions for the
// RRISC testbenches, written with integer arithmetic and independent of the RTL. Given an
// instruction, its two register operands (a = register [5:3], b = register [2:0]), CY and the
// terminal inputs, it returns the expected write-back and terminal strobes.
package rrisc_ref_pkg;
  import rrisc_pkg::*;

  typedef struct {
    wb_t   wb;
    logic  xmit_we;
    word_t xmit_data;
    logic  recv_re;
  } ref_t;

  function automatic ref_t ref_exec(instr_t i, int a, int b, int cy, int tbr, int rda, int recv);
    ref_t r;
    int op, sub, t, sh;
    op  = int'(i[12:9]);
    sub = int'(i[8:6]);
    sh  = int'(i[2:0]);
    r.wb = '0; r.xmit_we = 0; r.xmit_data = word_t'(a); r.recv_re = 0;
    r.wb.waddr = i[8:6];
    case (op)
      1, 5: begin t = a + b + ((op == 5) ? cy : 0);
                  r.wb.reg_we = 1; r.wb.wdata = word_t'(t % 256); r.wb.cy_we = 1; r.wb.cy_val = (t > 255); end
      2: begin r.wb.reg_we = 1; r.wb.wdata = word_t'((a - b + 256) % 256); r.wb.cy_we = 1; r.wb.cy_val = (a >= b); end
      3: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(a & b); end
      4: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(a | b); end
      6: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(255 - a); r.wb.cy_we = 1; r.wb.cy_val = 0; end
      11: begin
        r.wb.waddr = i[5:3];
        case (sub)
          0: begin r.wb.reg_we = 1; r.wb.wdata = word_t'((a << sh) % 256); r.wb.cy_we = 1;
                   r.wb.cy_val = (sh != 0) && (((a << sh) >> 8) & 1); end
          1, 2: begin
                   t = (sub == 2 && a >= 128) ? a - 256 : a;
                   r.wb.reg_we = 1; r.wb.wdata = word_t'(((t >>> sh) + 256) % 256); r.wb.cy_we = 1;
                   r.wb.cy_val = (sh != 0) && ((a >> (sh - 1)) & 1); end
          3: begin r.wb.reg_we = 1; r.wb.wdata = word_t'((sh % 4) * 64 + a % 64); end
          4: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(tbr); end
          5: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(rda); end
          6: begin r.xmit_we = 1; end
          default: begin r.wb.reg_we = 1; r.wb.wdata = word_t'(recv); r.recv_re = 1; end
        endcase
      end
      12: if (sub <= 1) begin
            r.wb.set_we = 1; r.wb.set_val = (sub == 0) ? (a < b) : (a == b);
            r.wb.cy_we = 1; r.wb.cy_val = (a >= b);
          end
      default: ;
    endcase
    return r;
  endfunction

  // a random ALU-pipe instruction (io=1 also allows the I/O instructions)
  function automatic instr_t rand_alu_instr(bit io);
    int k;
    k = $urandom_range(0, io ? 11 : 9);
    case (k)
      0, 1, 2, 3, 4, 5: return {4'(k + 1), 9'($urandom)};            // R-type
      6, 7: return {4'hB, 3'($urandom_range(0, 3)), 6'($urandom)};    // shifts, lru
      8, 9: return {4'hC, 3'($urandom_range(0, 1)), 6'($urandom)};    // slt, seq
      default: return {4'hB, 3'($urandom_range(4, 7)), 6'($urandom)}; // I/O
    endcase
  endfunction
endpackage
