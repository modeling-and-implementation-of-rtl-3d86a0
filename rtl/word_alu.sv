// word_alu: the ALU for 32-bit words.
//
// It performs the 23 word operations of the instruction set between A, the
// operand delivered by the operands selector, and B, the current word result
// read from the CRW stack. As in IL, the result is B op A: SUB_I is B - A,
// DIV_I is B / A, SL shifts B left by A[4:0], GT gives 1 when B > A. Integer
// operations treat words as signed two's complement (DINT); the _R operations
// are IEEE-754 single precision (REAL) through fp_addsub, fp_mul and fp_div.
// LD_W passes A and ST_W passes B. SQRT_R gives the square root of B
// through fp_sqrt and ignores A.
//
// Following the document, all operation units are combinational and feed a
// multiplexer; an output register captures the selected result only in the
// execution state (exe) when the command counter VAL_CC has counted down to
// zero, so slow operations such as division get several clock periods to
// settle (a multicycle path in the implementation). This design gates with
// a clock enable rather than with the clock itself.
//
// This design's choices: integer division by zero gives all ones (-1), and
// the overflowing -2^31 / -1 gives -2^31. Shifts are logical, rotations move
// bits around the 32-bit word. The document draws a square-root unit but
// names no instruction for it; select 22 (SQRT_R) is this design's.
module word_alu
  import plc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  alu_sel,  // ALU1_SEL
  input  logic [31:0] a,        // operand, ALU1_IN_1
  input  logic [31:0] b,        // current result CRW
  input  logic        exe,      // execution state of a word instruction
  input  logic [2:0]  val_cc,   // command counter
  output logic [31:0] alu_res,  // combinational result
  output logic [31:0] alu_out   // ALU output register
);
  logic signed [31:0] sa, sb;
  logic [4:0]         sh;
  logic [31:0]        fp_add_z, fp_sub_z, fp_mul_z, fp_div_z, fp_sqrt_z;
  logic [31:0]        idiv;

  assign sa = a;
  assign sb = b;
  assign sh = a[4:0];

  fp_addsub u_fp_add (.x(b), .y(a), .sub(1'b0), .z(fp_add_z));
  fp_addsub u_fp_sub (.x(b), .y(a), .sub(1'b1), .z(fp_sub_z));
  fp_mul    u_fp_mul (.x(b), .y(a), .z(fp_mul_z));
  fp_div    u_fp_div (.x(b), .y(a), .z(fp_div_z));
  fp_sqrt   u_fp_sqrt (.x(b), .z(fp_sqrt_z));

  always_comb begin
    if (a == '0)                 idiv = '1;
    else if (sa == -32'sd1)      idiv = 32'(-sb);
    else                         idiv = 32'(sb / sa);
  end

  always_comb begin
    case (word_op_e'(alu_sel))
      W_ADD_I:  alu_res = b + a;
      W_SUB_I:  alu_res = b - a;
      W_MUL_I:  alu_res = 32'(sb * sa);
      W_DIV_I:  alu_res = idiv;
      W_ADD_R:  alu_res = fp_add_z;
      W_SUB_R:  alu_res = fp_sub_z;
      W_MUL_R:  alu_res = fp_mul_z;
      W_DIV_R:  alu_res = fp_div_z;
      W_SL:     alu_res = b << sh;
      W_SR:     alu_res = b >> sh;
      W_RL:     alu_res = (b << sh) | (b >> (6'd32 - {1'b0, sh}));
      W_RR:     alu_res = (b >> sh) | (b << (6'd32 - {1'b0, sh}));
      W_AND_W:  alu_res = b & a;
      W_OR_W:   alu_res = b | a;
      W_XOR_W:  alu_res = b ^ a;
      W_NOR_W:  alu_res = ~(b | a);
      W_NAND_W: alu_res = ~(b & a);
      W_XNOR_W: alu_res = ~(b ^ a);
      W_GT:     alu_res = {31'd0, sb > sa};
      W_ET:     alu_res = {31'd0, b == a};
      W_ST_W:   alu_res = b;
      W_LD_W:   alu_res = a;
      W_SQRT_R: alu_res = fp_sqrt_z;
      default:  alu_res = b;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)                       alu_out <= '0;
    else if (exe && val_cc == '0)  alu_out <= alu_res;
  end
endmodule
