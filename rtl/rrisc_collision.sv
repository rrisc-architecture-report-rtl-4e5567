// rrisc_collision: collision detection, the TRAP flag.
//
// Data dependencies are left to the program, but two instructions that write the same
// destination in the same cycle are caught in hardware: the third stages of the three pipes
// are compared every cycle, and if two or more write the same register $1..$7, or both ALU
// pipes write SET, or both write CY, trap is set on the next rising edge. trap then stays set
// until reset and the dispatch stops issuing, which halts the PC. A write to $0 is no
// collision because it has no effect. What is compared and that TRAP halts the PC follow the
// architecture; checking at the write-back stage and holding TRAP until reset are this
// design's choices. collide is the unregistered detection for the cycle.
module rrisc_collision
  import rrisc_pkg::*;
#(
  parameter int NPIPES = 3   // pipe 0 = master ALU, 1 = slave ALU, 2 = memory
) (
  input  logic clk,
  input  logic rst,
  input  wb_t  wb [NPIPES],
  output logic collide,
  output logic trap
);

  always_comb begin
    collide = 1'b0;
    for (int i = 0; i < NPIPES; i++)
      for (int j = i + 1; j < NPIPES; j++) begin
        if (wb[i].reg_we && wb[j].reg_we && wb[i].waddr == wb[j].waddr && wb[i].waddr != 3'd0)
          collide = 1'b1;
        if (wb[i].set_we && wb[j].set_we) collide = 1'b1;
        if (wb[i].cy_we && wb[j].cy_we)   collide = 1'b1;
      end
  end

  always_ff @(posedge clk) begin
    if (rst)          trap <= 1'b0;
    else if (collide) trap <= 1'b1;
  end

endmodule
