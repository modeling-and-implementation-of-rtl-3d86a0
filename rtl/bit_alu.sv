// bit_alu: the ALU for 1-bit operands, used for ladder-style contact and
// coil logic.
//
// The document gives the eight operations LD, AND, OR, XOR, ORN, ANDN, XNOR
// and ST, selected by a 4-bit ALU_sel, between A (the operand chosen by the
// operands selector) and B (the current bit result CRb). Following IL, the
// result is B op A, ORN is B | ~A, ANDN is B & ~A, LD passes A and ST passes
// B. The document draws the bit ALU as a pure multiplexer of these results;
// this design adds an output register, loaded in the last execution cycle
// (exe high and VAL_CC zero) exactly like the word ALU's. It keeps the result
// steady in the fetch state, while the CRb port address moves to the slot
// being written, and it holds the current bit result for ST.
module bit_alu
  import plc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] alu_sel,   // ALU2_SEL
  input  logic       a,         // operand, ALU2_IN_1
  input  logic       b,         // current result CRb
  input  logic       exe,       // execution state of a bit instruction
  input  logic [2:0] val_cc,    // command counter
  output logic       alu_res,   // combinational result
  output logic       alu_out    // ALU output register
);
  always_comb begin
    case (bit_op_e'(alu_sel))
      B_LD:    alu_res = a;
      B_AND:   alu_res = b & a;
      B_OR:    alu_res = b | a;
      B_XOR:   alu_res = b ^ a;
      B_ORN:   alu_res = b | ~a;
      B_ANDN:  alu_res = b & ~a;
      B_XNOR:  alu_res = ~(b ^ a);
      B_ST:    alu_res = b;
      default: alu_res = b;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)                       alu_out <= 1'b0;
    else if (exe && val_cc == '0)  alu_out <= alu_res;
  end
endmodule
