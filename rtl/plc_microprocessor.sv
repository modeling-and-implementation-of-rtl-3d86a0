// plc_microprocessor: a microprocessor that executes IEC 61131-3 Instruction
// List (IL) directly in hardware, for use as the CPU of a PLC.
//
// Every instruction is one 40-bit word (data type, operation code, suffix)
// and runs in four states: initialization, decoding, execution (one to
// eight clock cycles, counted by the command counter) and instruction fetch.
// Two ALUs work on the "current result" of IL: a word ALU (integer, REAL
// floating point, shift/rotate, logic, compare) and a bit ALU (contact and
// coil logic). Each result is pushed onto a stack of current results held in
// a dual-port RAM (CRW for words, CRb for bits); the top of the stack is the
// B operand of the next instruction and older entries can be named as
// operands, which is how bracketed IL expressions are evaluated. The
// operands selector brings literals, inputs I0_X, outputs Q0_X, memory bits
// M0_X, memory words M1_X and stack entries to the ALUs, and stores results
// into M0_X, M1_X and Q0_X.
//
// The block structure and connections follow the document's block diagram.
// This design adds a program download port (prog_we/prog_addr/prog_data), as
// the document does not say how programs are loaded, and brings out the PC,
// the FSM state and the word result for observation. rst is synchronous and
// active high; hold it while downloading a program.
module plc_microprocessor
  import plc_pkg::*;
#(
  parameter timing_e TIMING = TIMING_XPLC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [IO_W-1:0]   i0_x,       // PLC inputs
  output logic [IO_W-1:0]   q0_x,       // PLC outputs
  // program download
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  logic [IC_W-1:0]   prog_data,
  // observation
  output logic [PC_W-1:0]   pc,
  output fsm_state_e        state,
  output logic [WORD_W-1:0] word_result,  // word ALU output register
  output logic              bit_result    // bit ALU output register
);
  logic [IC_W-1:0]   ic;
  logic              inc_pc, wr_pc;
  logic [CC_W-1:0]   wr_cc, val_cc;
  logic              wr_cc_en;
  logic [CRW_AW-1:0] crw_ch;
  logic [CRB_AW-1:0] crb_ch;
  logic              wr_w, wr_b;
  logic [4:0]        op_sig_w, alu1_sel;
  logic [3:0]        op_sig_b, alu2_sel;
  logic              exe, exe_b, dec;
  logic [31:0]       porta_out;
  logic              portb_out;
  logic [31:0]       alu1_in_1, alu1_res, alu1_out;
  logic              alu2_in_1, alu2_res, alu2_out;
  logic [4:0]        m0_addr, m1_addr;
  logic              m0_rd, m0_we, m0_wd;
  logic [31:0]       m1_rd, m1_wd;
  logic              m1_we;

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk, .rst, .inc_pc, .wr_pc, .pc_in(ic[PC_W-1:0]), .pc
  );

  program_memory #(.DEPTH(2**PC_W), .WIDTH(IC_W)) u_pm (
    .clk, .addr(pc), .ic,
    .wr_en(prog_we), .wr_addr(prog_addr), .wr_data(prog_data)
  );

  command_counter #(.CC_W(CC_W)) u_cc (
    .clk, .rst, .wr_cc_en, .wr_cc, .exe(exe | exe_b), .val_cc
  );

  instruction_decoder #(.TIMING(TIMING)) u_dec (
    .clk, .rst, .ic, .val_cc,
    .inc_pc, .wr_pc, .wr_cc, .wr_cc_en,
    .crw_ch, .wr_w, .op_sig_w,
    .crb_ch, .wr_b, .op_sig_b,
    .exe, .exe_b, .dec, .state
  );

  dual_port_ram #(.A_AW(CRW_AW), .A_W(WORD_W), .B_AW(CRB_AW)) u_cr (
    .clk,
    .porta_addr(crw_ch), .porta_in(alu1_out), .porta_wren(wr_w), .porta_out,
    .portb_addr(crb_ch), .portb_in(alu2_out), .portb_wren(wr_b), .portb_out
  );

  operands_selector u_ops (
    .clk, .rst, .ic, .dec, .op_sig_w, .op_sig_b, .i0_x,
    .crw_x(porta_out), .crb_x(portb_out),
    .alu1_out, .alu2_out,
    .m0_addr, .m0_rd, .m0_we, .m0_wd,
    .m1_addr, .m1_rd, .m1_we, .m1_wd,
    .alu1_in_1, .alu2_in_1, .alu1_sel, .alu2_sel, .q0_x
  );

  mem_bank #(.WIDTH(1), .DEPTH(32)) u_m0 (
    .clk, .rst, .rd_addr(m0_addr), .rd_data(m0_rd),
    .wr_en(m0_we), .wr_addr(m0_addr), .wr_data(m0_wd)
  );

  mem_bank #(.WIDTH(32), .DEPTH(32)) u_m1 (
    .clk, .rst, .rd_addr(m1_addr), .rd_data(m1_rd),
    .wr_en(m1_we), .wr_addr(m1_addr), .wr_data(m1_wd)
  );

  word_alu u_walu (
    .clk, .rst, .alu_sel(alu1_sel), .a(alu1_in_1), .b(porta_out),
    .exe, .val_cc, .alu_res(alu1_res), .alu_out(alu1_out)
  );

  bit_alu u_balu (
    .clk, .rst, .alu_sel(alu2_sel), .a(alu2_in_1), .b(portb_out),
    .exe(exe_b), .val_cc, .alu_res(alu2_res), .alu_out(alu2_out)
  );

  assign word_result = alu1_out;
  assign bit_result  = alu2_out;
endmodule
