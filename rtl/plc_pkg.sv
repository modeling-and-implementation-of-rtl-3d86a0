// plc_pkg: types, instruction encoding and timing tables shared by the IL
// (Instruction List) PLC microprocessor.
//
// Instruction word, 40 bits:  [39:38] data type | [37:32] operation code | [31:0] suffix.
// The field split and widths are the document's. The numeric values of the
// operation codes and data types are this design's choice, except that the
// 5-bit word ALU select follows the published waveforms: LD_W = 5'b10101,
// MUL_I = 5'b00010 and DIV_I = 3. That fits numbering the operations in the
// order ADD_I..ET = 0..19, then ST_W = 20 and LD_W = 21, which is used here.
// SQRT_R = 22 is this design's addition: it reaches the square-root unit the
// document draws in the word ALU, for which it names no instruction.
// Word operations use opcodes 0..22 (opcode = word ALU select), bit
// operations use 32..39 (opcode[2:0] = bit ALU select), JMP is 63.
//
// The execution length of every instruction is taken from the measured ALU
// clock-cycle columns of the document's timing table: one table for the
// 100 MHz Xilinx build (the default) and one for the 50 MHz Intel build.
// The command counter is loaded with cycles-1, so it fits 3 bits (max 8).
// SQRT_R is not in that table; it is given the length of DIV_R, the slowest
// floating-point operation (this design's choice).
package plc_pkg;

  localparam int unsigned IC_W      = 40;
  localparam int unsigned PC_W      = 8;
  localparam int unsigned WORD_W    = 32;
  localparam int unsigned CC_W      = 3;
  localparam int unsigned CRW_AW    = 7;   // 128 x 32-bit port
  localparam int unsigned CRB_AW    = 12;  // 4096 x 1-bit port
  localparam int unsigned BANK_AW   = 5;   // M0_X 32 x 1, M1_X 32 x 32
  localparam int unsigned IO_W      = 8;   // I0_X[7:0], Q0_X[7:0]

  // Word ALU operation select (ALU1_SEL, 5 bits)
  typedef enum logic [4:0] {
    W_ADD_I  = 5'd0,  W_SUB_I  = 5'd1,  W_MUL_I  = 5'd2,  W_DIV_I  = 5'd3,
    W_ADD_R  = 5'd4,  W_SUB_R  = 5'd5,  W_MUL_R  = 5'd6,  W_DIV_R  = 5'd7,
    W_SL     = 5'd8,  W_SR     = 5'd9,  W_RL     = 5'd10, W_RR     = 5'd11,
    W_AND_W  = 5'd12, W_OR_W   = 5'd13, W_XOR_W  = 5'd14, W_NOR_W  = 5'd15,
    W_NAND_W = 5'd16, W_XNOR_W = 5'd17, W_GT     = 5'd18, W_ET     = 5'd19,
    W_ST_W   = 5'd20, W_LD_W   = 5'd21, W_SQRT_R = 5'd22
  } word_op_e;

  // Bit ALU operation select (ALU2_SEL, 4 bits)
  typedef enum logic [3:0] {
    B_LD = 4'd0, B_AND = 4'd1, B_OR = 4'd2, B_XOR = 4'd3,
    B_ORN = 4'd4, B_ANDN = 4'd5, B_XNOR = 4'd6, B_ST = 4'd7
  } bit_op_e;

  localparam logic [5:0] OPC_BIT_BASE = 6'd32;
  localparam logic [5:0] OPC_JMP      = 6'd63;

  // Data type field [39:38] for word instructions
  localparam logic [1:0] DT_W_LIT = 2'd0;  // literal in the suffix
  localparam logic [1:0] DT_W_CRW = 2'd1;  // stacked current register CRW_X
  localparam logic [1:0] DT_W_MEM = 2'd2;  // memory word M1_X

  // Data type field [39:38] for bit instructions
  localparam logic [1:0] DT_B_IN  = 2'd0;  // input I0_X
  localparam logic [1:0] DT_B_MEM = 2'd1;  // memory bit M0_X
  localparam logic [1:0] DT_B_CRB = 2'd2;  // stacked current register CRb_X
  localparam logic [1:0] DT_B_OUT = 2'd3;  // output Q0_X

  typedef enum logic [1:0] {CLS_NONE, CLS_WORD, CLS_BIT, CLS_JMP} op_class_e;

  typedef enum logic [1:0] {ST_INIT, ST_DEC, ST_EXEC, ST_FETCH} fsm_state_e;

  typedef enum logic {TIMING_XPLC, TIMING_IPLC} timing_e;

  function automatic op_class_e op_class(input logic [5:0] opc);
    if (opc <= 6'd22)                             return CLS_WORD;
    if (opc >= OPC_BIT_BASE && opc <= 6'd39)      return CLS_BIT;
    if (opc == OPC_JMP)                           return CLS_JMP;
    return CLS_NONE;
  endfunction

  // Execution-state length in clock cycles for a word operation.
  function automatic int unsigned exec_cycles(input timing_e t, input logic [4:0] wop);
    if (t == TIMING_XPLC) begin
      case (wop)
        W_ADD_I: return 2;
        W_DIV_I: return 8;
        W_ADD_R: return 3;
        W_SUB_R: return 4;
        W_MUL_R: return 3;
        W_DIV_R: return 8;
        W_SQRT_R: return 8;
        default: return 1;
      endcase
    end else begin
      case (wop)
        W_SUB_R: return 2;
        W_MUL_R: return 2;
        W_DIV_R: return 4;
        W_SQRT_R: return 4;
        default: return 1;
      endcase
    end
  endfunction

  // Instruction builder used by programs and testbenches.
  function automatic logic [IC_W-1:0] mk_instr(input logic [1:0] dt, input logic [5:0] opc,
                                               input logic [31:0] suffix);
    return {dt, opc, suffix};
  endfunction

endpackage
