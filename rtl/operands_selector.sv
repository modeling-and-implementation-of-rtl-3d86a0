// operands_selector: chooses the operand each ALU receives and routes ALU
// results back to the outputs and the memory banks.
//
// On the rising clock edge that ends the decoding state (dec high) it
//  - registers the word ALU operand ALU1_IN_1 according to the word data
//    type in IC[39:38]: the 32-bit literal in the suffix, the stacked
//    register CRW_X (the dual-port RAM's port A, which the decoder points at
//    the suffix index), or memory word M1_X[suffix];
//  - registers the bit ALU operand ALU2_IN_1 according to the bit data type:
//    input I0_X[suffix], memory bit M0_X[suffix], stacked register CRb_X, or
//    output Q0_X[suffix];
//  - registers the operation selects OP_SIG_W and OP_SIG_b as ALU1_SEL and
//    ALU2_SEL;
//  - performs the stores: ST_W to a memory word writes ALU1_Out into
//    M1_X[suffix], ST to an output writes ALU2_Out into Q0_X[suffix], ST to a
//    memory bit writes ALU2_Out into M0_X[suffix].
// The operand sources and the store paths are the document's. At that edge
// the ALU output registers still hold the previous result of their ALU, that
// is the current result B, which is what a store must write; sampling the
// store at the end of decoding is this design's reading of "enabled by the
// dec input". The data-type codes are this design's (see plc_pkg). Q0_X
// resets to 0. A store to a literal, an input or a CRW_X/CRb_X entry is
// ignored.
module operands_selector
  import plc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [39:0]  ic,          // instruction code
  input  logic         dec,         // decoding state
  input  logic [4:0]   op_sig_w,    // word ALU operation from the decoder
  input  logic [3:0]   op_sig_b,    // bit ALU operation from the decoder
  input  logic [7:0]   i0_x,        // microprocessor inputs
  input  logic [31:0]  crw_x,       // CRW stack read (port A)
  input  logic         crb_x,       // CRb stack read (port B)
  input  logic [31:0]  alu1_out,    // word ALU output register
  input  logic         alu2_out,    // bit ALU output register
  // M0_X bank (32 x 1)
  output logic [4:0]   m0_addr,
  input  logic         m0_rd,
  output logic         m0_we,
  output logic         m0_wd,
  // M1_X bank (32 x 32)
  output logic [4:0]   m1_addr,
  input  logic [31:0]  m1_rd,
  output logic         m1_we,
  output logic [31:0]  m1_wd,
  // to the ALUs and the outside
  output logic [31:0]  alu1_in_1,
  output logic         alu2_in_1,
  output logic [4:0]   alu1_sel,
  output logic [3:0]   alu2_sel,
  output logic [7:0]   q0_x
);
  logic [1:0]  dt;
  logic [5:0]  opc;
  logic [31:0] suffix;
  logic [2:0]  io_idx;
  logic        st_w, st_b;
  logic [31:0] w_operand;
  logic        b_operand;

  assign dt     = ic[39:38];
  assign opc    = ic[37:32];
  assign suffix = ic[31:0];
  assign io_idx = suffix[2:0];
  assign st_w   = (opc == 6'(W_ST_W));
  assign st_b   = (opc == (OPC_BIT_BASE | 6'(B_ST)));

  assign m0_addr = suffix[4:0];
  assign m1_addr = suffix[4:0];

  always_comb begin
    case (dt)
      DT_W_CRW: w_operand = crw_x;
      DT_W_MEM: w_operand = m1_rd;
      default:  w_operand = suffix;
    endcase
    case (dt)
      DT_B_IN:  b_operand = i0_x[io_idx];
      DT_B_MEM: b_operand = m0_rd;
      DT_B_CRB: b_operand = crb_x;
      default:  b_operand = q0_x[io_idx];
    endcase
  end

  // bank writes happen at the clock edge that ends decoding
  assign m1_we = dec && st_w && (dt == DT_W_MEM);
  assign m1_wd = alu1_out;
  assign m0_we = dec && st_b && (dt == DT_B_MEM);
  assign m0_wd = alu2_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      alu1_in_1 <= '0;
      alu2_in_1 <= 1'b0;
      alu1_sel  <= 5'(W_LD_W);
      alu2_sel  <= 4'(B_LD);
      q0_x      <= '0;
    end else if (dec) begin
      alu1_in_1 <= w_operand;
      alu2_in_1 <= b_operand;
      alu1_sel  <= op_sig_w;
      alu2_sel  <= op_sig_b;
      if (st_b && dt == DT_B_OUT) q0_x[io_idx] <= alu2_out;
    end
  end
endmodule
