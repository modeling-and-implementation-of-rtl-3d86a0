// program_counter: 8-bit up-counter whose value addresses the program memory.
//
// The document gives the width (8 bits), the increment on INC_PC and the
// parallel load of the first 8 bits of the instruction code on WR_PC (jump).
// This design's choices: synchronous active-high reset to 0, everything on
// the rising clock edge, and load having priority over increment. The count
// wraps from 255 to 0.
//
// Timing: the new value appears one clock after inc_pc or wr_pc is sampled.
module program_counter #(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            inc_pc,   // INC_PC: advance to the next instruction
  input  logic            wr_pc,    // WR_PC: load the jump target
  input  logic [PC_W-1:0] pc_in,    // jump target, IC[7:0]
  output logic [PC_W-1:0] pc        // program memory address
);
  always_ff @(posedge clk) begin
    if (rst)         pc <= '0;
    else if (wr_pc)  pc <= pc_in;
    else if (inc_pc) pc <= pc + 1'b1;
  end
endmodule
