// instruction_decoder: control unit of the IL microprocessor.
//
// A four-state machine runs every instruction: initialization, decoding,
// execution and instruction fetch (this order and these names are the
// document's). Around it, combinational selectors driven by the operation
// code IC[37:32] give the command-counter load (WR_CC), the word and bit ALU
// operation selects (OP_SIG_W, OP_SIG_b) and the jump enable (WR_PC), and a
// memory-pointer process keeps the CRW and CRb stack pointers.
//
//  initialization  WR_CC_en loads the command counter with the instruction's
//                  execution length minus one; the stack pointer of the
//                  instruction's ALU is incremented. A JMP met here (after
//                  reset or a jump to a jump) loads the PC and stays here.
//  decoding        dec: the operands selector registers operands and selects
//                  and performs stores. The CRW/CRb address is the suffix
//                  for a CRW_X/CRb_X operand, else the current result.
//  execution       exe (word) or exe_b (bit) while VAL_CC counts down; the
//                  stack address points at the current result, which is the
//                  ALU's B operand. When VAL_CC is 0 the ALU output register
//                  loads, INC_PC is asserted and the machine moves on.
//  fetch           WR_W or WR_b writes the ALU output register into the new
//                  stack slot. The PC already shows the next instruction; if
//                  it is a JMP, WR_PC loads its target, so a JMP following
//                  an instruction costs no extra cycles, as in the
//                  document's simulation.
// An instruction takes 3 + (execution cycles) clocks: 4 for one-cycle
// operations, up to 11 for division, as in the document's timing table.
//
// This design's choices: the stack pointers reset to all ones so that the
// first word result lands in CRW_0 and the first bit result in CRb_0 (the
// document's second test program reads the result of line n from CRW_n); only
// the pointer of the ALU the instruction uses moves; a taken JMP (the only,
// unconditional, jump, which closes the PLC scan loop) resets both pointers,
// so every scan numbers its results from 0 again and stack references such
// as CRW_2 stay valid from one scan to the next; INC_PC is asserted in
// the last execution cycle so the PC changes as fetch begins; undefined
// operation codes run as four-cycle no-operations. The document's figure
// shows a single exe line to the word ALU; exe_b is added for the bit ALU's
// output register. TIMING selects the Xilinx (default) or Intel cycle table.
module instruction_decoder
  import plc_pkg::*;
#(
  parameter timing_e TIMING = TIMING_XPLC
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [39:0]  ic,          // instruction code
  input  logic [2:0]   val_cc,      // command counter value
  output logic         inc_pc,
  output logic         wr_pc,
  output logic [2:0]   wr_cc,
  output logic         wr_cc_en,
  output logic [6:0]   crw_ch,      // CRW stack address (port A)
  output logic         wr_w,
  output logic [4:0]   op_sig_w,
  output logic [11:0]  crb_ch,      // CRb stack address (port B)
  output logic         wr_b,
  output logic [3:0]   op_sig_b,
  output logic         exe,         // execution of a word instruction
  output logic         exe_b,       // execution of a bit instruction
  output logic         dec,
  output fsm_state_e   state
);
  fsm_state_e  next;
  op_class_e   cls_ic;     // class of the instruction on IC
  op_class_e   cls_q;      // class of the instruction being executed
  logic [6:0]  ptr_w;
  logic [11:0] ptr_b;
  logic [5:0]  opc;
  logic [1:0]  dt;

  assign opc    = ic[37:32];
  assign dt     = ic[39:38];
  assign cls_ic = op_class(opc);

  // command counter selector, ALU_1 and ALU_2 operation selectors
  assign wr_cc    = (cls_ic == CLS_WORD) ? 3'(exec_cycles(TIMING, opc[4:0]) - 1) : 3'd0;
  assign op_sig_w = (cls_ic == CLS_WORD) ? opc[4:0] : 5'(W_ST_W);
  assign op_sig_b = (cls_ic == CLS_BIT)  ? {1'b0, opc[2:0]} : 4'(B_ST);

  // WR_PC enable: compares the operation code with JMP
  assign wr_pc = (cls_ic == CLS_JMP) && (state == ST_INIT || state == ST_FETCH);

  always_comb begin
    next = state;
    case (state)
      ST_INIT:  next = (cls_ic == CLS_JMP) ? ST_INIT : ST_DEC;
      ST_DEC:   next = ST_EXEC;
      ST_EXEC:  next = (val_cc == '0) ? ST_FETCH : ST_EXEC;
      ST_FETCH: next = ST_INIT;
      default:  next = ST_INIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_INIT;
      cls_q <= CLS_NONE;
      ptr_w <= '1;
      ptr_b <= '1;
    end else begin
      state <= next;
      if (wr_pc) begin
        // a taken jump starts a new scan with empty result stacks
        ptr_w <= '1;
        ptr_b <= '1;
      end else if (state == ST_INIT && cls_ic != CLS_JMP) begin
        cls_q <= cls_ic;
        if (cls_ic == CLS_WORD) ptr_w <= ptr_w + 1'b1;
        if (cls_ic == CLS_BIT)  ptr_b <= ptr_b + 1'b1;
      end
    end
  end

  assign wr_cc_en = (state == ST_INIT);
  assign dec      = (state == ST_DEC);
  assign exe      = (state == ST_EXEC) && (cls_q == CLS_WORD);
  assign exe_b    = (state == ST_EXEC) && (cls_q == CLS_BIT);
  assign inc_pc   = (state == ST_EXEC) && (val_cc == '0);
  assign wr_w     = (state == ST_FETCH) && (cls_q == CLS_WORD);
  assign wr_b     = (state == ST_FETCH) && (cls_q == CLS_BIT);

  // memory pointer process: stack addresses per state
  always_comb begin
    case (state)
      ST_INIT: begin
        crw_ch = ptr_w;
        crb_ch = ptr_b;
      end
      ST_DEC: begin
        crw_ch = (cls_q == CLS_WORD && dt == DT_W_CRW) ? ic[6:0]  : ptr_w - 1'b1;
        crb_ch = (cls_q == CLS_BIT  && dt == DT_B_CRB) ? ic[11:0] : ptr_b - 1'b1;
      end
      ST_EXEC: begin
        crw_ch = (cls_q == CLS_WORD) ? ptr_w - 1'b1 : ptr_w;
        crb_ch = (cls_q == CLS_BIT)  ? ptr_b - 1'b1 : ptr_b;
      end
      default: begin   // fetch: write address
        crw_ch = ptr_w;
        crb_ch = ptr_b;
      end
    endcase
  end

  // the two stacks share one array and are never written together
  a_one_write: assert property (@(posedge clk) disable iff (rst) !(wr_w && wr_b));
  // the execution state is left within eight cycles
  a_exec_bound: assert property (@(posedge clk) disable iff (rst)
                                 (state == ST_EXEC) |-> ##[0:7] (state == ST_EXEC && val_cc == '0));
endmodule
