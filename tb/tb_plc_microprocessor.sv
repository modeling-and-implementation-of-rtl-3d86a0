// tb_plc_microprocessor: end-to-end test of the IL microprocessor at its
// default configuration (Xilinx cycle table).
//
// Phase 1 runs the document's first test program (LD 124, MUL_I 5, JMP 00)
// and checks the results 124 and 620, the four-clock instruction cycle and
// the zero-cost jump back to address 0, loop after loop.
//
// Phase 2 runs a program built around the document's second test program, a
// floating-point PID step: a preamble stores the constants into memory words
// with LD_W/ST_W, jumps (through a second jump) to the PID code, which uses
// the stacked results CRW_2 and CRW_5 as bracket operands, then a bit-logic
// section (inputs, outputs, memory bits, a CRb_X operand, all eight bit
// operations), an integer section and a square root (SQRT_R), and jumps
// back for a second scan. The
// testbench computes every expected value itself: the PID values with the
// double-precision reference model, one rounding per IL operation, and the
// bit results from the IL text. It checks the PID execution time against the
// sum of the document's per-instruction clock counts.
//
// It counts each mechanism of the design (jump from fetch, jump reached by a
// jump, multi-cycle execution, CRW_X and CRb_X stack operands, stores to
// M1_X, M0_X and Q0_X, input reads, square root) and fails if one never happened.
module tb_plc_microprocessor;
  import plc_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [7:0]  i0_x = 0, q0_x;
  logic        prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [39:0] prog_data = 0;
  logic [7:0]  pc;
  fsm_state_e  state;
  logic [31:0] word_result;
  logic        bit_result;

  int checks = 0, failures = 0;
  longint cycle = 0;

  plc_microprocessor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- mechanisms
  int n_jmp_fetch = 0, n_jmp_init = 0, n_multi = 0, n_crw_op = 0, n_crb_op = 0;
  int n_st_m1 = 0, n_st_m0 = 0, n_st_q = 0, n_in_rd = 0, n_fp = 0, n_int_div = 0, n_sqrt = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.wr_pc && state == ST_FETCH) n_jmp_fetch++;
    if (dut.wr_pc && state == ST_INIT)  n_jmp_init++;
    if (state == ST_EXEC && dut.val_cc != 0) n_multi++;
    if (dut.dec && dut.ic[37:32] < 23 && dut.ic[39:38] == DT_W_CRW) n_crw_op++;
    if (dut.dec && dut.ic[37:32] >= 32 && dut.ic[37:32] < 40 && dut.ic[39:38] == DT_B_CRB) n_crb_op++;
    if (dut.dec && dut.ic[37:32] >= 32 && dut.ic[37:32] < 40 && dut.ic[39:38] == DT_B_IN) n_in_rd++;
    if (dut.m1_we) n_st_m1++;
    if (dut.m0_we) n_st_m0++;
    if (dut.dec && dut.ic[37:32] == 6'd39 && dut.ic[39:38] == DT_B_OUT) n_st_q++;
    if (dut.exe && dut.alu1_sel >= 5'd4 && dut.alu1_sel <= 5'd7 && dut.val_cc == 0) n_fp++;
    if (dut.exe && dut.alu1_sel == 5'd22 && dut.val_cc == 0) n_sqrt++;
    if (dut.exe && dut.alu1_sel == 5'd3 && dut.val_cc == 0) n_int_div++;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d pc=%h)", what, cycle, pc); end
  endtask

  // ---------------------------------------------------------------- programs
  logic [39:0] prog [256];
  function automatic logic [39:0] I(logic [1:0] dt, int opc, int unsigned sfx);
    return {dt, 6'(opc), 32'(sfx)};
  endfunction
  localparam int SQRT_R = 22;
  localparam int LD_W = 21, ST_W = 20, ADD_I = 0, SUB_I = 1, MUL_I = 2, DIV_I = 3,
                 ADD_R = 4, SUB_R = 5, MUL_R = 6, DIV_R = 7, SL = 8, GT = 18,
                 LD = 32, AND = 33, OR = 34, XOR = 35, ORN = 36, ANDN = 37, XNOR = 38, ST = 39,
                 JMP = 63;
  localparam logic [1:0] LIT = 0, CRW = 1, MEM = 2, BIN = 0, BMEM = 1, BCRB = 2, BOUT = 3;
  // memory words of the PID
  localparam int SP = 0, PV = 1, KP = 2, KI = 3, II = 4, PE = 5, KD = 6, TS = 7, OUTW = 8, FLAG = 9, ROOT = 10;

  task automatic download(int n);
    rst = 1;
    for (int a = 0; a < n; a++) begin
      prog_we = 1; prog_addr = 8'(a); prog_data = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1;
  endtask

  task automatic wait_pc_init(logic [7:0] target, int limit);
    int n = 0;
    while (!(state == ST_INIT && pc == target) && n < limit) begin
      @(posedge clk); #1 n++;
    end
    chk(n < limit, $sformatf("reached address %h", target));
  endtask

  // ---------------------------------------------------------------- reference
  function automatic logic [31:0] f(real r);   // constant as single precision
    return real_to_sp(r);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    logic [31:0] sp_v, pv_v, kp_v, ki_v, i_v, pe_v, kd_v, ts_v;
    logic [31:0] t1, t2, t4, t5, t7, t8, t9, outv, i_new;
    int exp_cyc;
    logic r1, r2, r3, r4, r5, r6, r7, r8, r9;

    // ============ phase 1: test program 1 ============
    prog[0] = I(LIT, LD_W, 124);
    prog[1] = I(LIT, MUL_I, 5);
    prog[2] = I(LIT, JMP, 0);
    download(3);
    rst = 0;
    for (int loop = 0; loop < 3; loop++) begin
      t0 = cycle;
      chk(state == ST_INIT && pc == 8'h00, "program 1 starts at 00");
      repeat (4) @(posedge clk);
      #1;
      chk(word_result == 32'd124, "LD 124");
      chk(pc == 8'h01 && state == ST_INIT, "next instruction after 4 clocks");
      repeat (3) @(posedge clk);
      #1;
      chk(pc == 8'h02 && state == ST_FETCH, "JMP visible during fetch");
      @(posedge clk); #1;
      chk(word_result == 32'd620, "MUL_I 5 gives 620");
      chk(pc == 8'h00 && state == ST_INIT, "JMP 00 taken in fetch");
      chk(cycle - t0 == 8, "loop of two instructions takes 8 clocks");
    end

    // ============ phase 2: PID, bits, integers ============
    sp_v = f(50.0); pv_v = f(42.5); kp_v = f(1.2); ki_v = f(0.35);
    i_v = f(0.0);   pe_v = f(40.0); kd_v = f(0.05); ts_v = f(0.1);
    // preamble: constants into M1_X
    prog[8'h00] = I(LIT, LD_W, sp_v); prog[8'h01] = I(MEM, ST_W, SP);
    prog[8'h02] = I(LIT, LD_W, pv_v); prog[8'h03] = I(MEM, ST_W, PV);
    prog[8'h04] = I(LIT, LD_W, kp_v); prog[8'h05] = I(MEM, ST_W, KP);
    prog[8'h06] = I(LIT, LD_W, ki_v); prog[8'h07] = I(MEM, ST_W, KI);
    prog[8'h08] = I(LIT, LD_W, i_v);  prog[8'h09] = I(MEM, ST_W, II);
    prog[8'h0A] = I(LIT, LD_W, pe_v); prog[8'h0B] = I(MEM, ST_W, PE);
    prog[8'h0C] = I(LIT, LD_W, kd_v); prog[8'h0D] = I(MEM, ST_W, KD);
    prog[8'h0E] = I(LIT, LD_W, ts_v); prog[8'h0F] = I(MEM, ST_W, TS);
    prog[8'h10] = I(LIT, JMP, 32'h1F);
    prog[8'h1F] = I(LIT, JMP, 32'h20);          // jump reached by a jump
    // PID (lines 00..12 of the document's listing at 0x20..0x32)
    prog[8'h20] = I(MEM, LD_W,  SP);
    prog[8'h21] = I(MEM, SUB_R, PV);
    prog[8'h22] = I(MEM, MUL_R, KP);
    prog[8'h23] = I(MEM, LD_W,  KI);           // ADD_R( Ki
    prog[8'h24] = I(MEM, MUL_R, II);
    prog[8'h25] = I(CRW, ADD_R, 2);            // )  with CRW_2
    prog[8'h26] = I(MEM, LD_W,  PV);           // ADD_R( PV
    prog[8'h27] = I(MEM, SUB_R, PE);
    prog[8'h28] = I(MEM, MUL_R, KD);
    prog[8'h29] = I(MEM, DIV_R, TS);
    prog[8'h2A] = I(CRW, ADD_R, 5);            // )  with CRW_5
    prog[8'h2B] = I(MEM, ST_W,  OUTW);
    prog[8'h2C] = I(MEM, LD_W,  SP);
    prog[8'h2D] = I(MEM, SUB_R, PV);
    prog[8'h2E] = I(MEM, MUL_R, TS);
    prog[8'h2F] = I(MEM, ADD_R, II);
    prog[8'h30] = I(MEM, ST_W,  II);
    prog[8'h31] = I(MEM, LD_W,  PV);
    prog[8'h32] = I(MEM, ST_W,  PE);
    // bit logic
    prog[8'h33] = I(BIN,  LD,   0);
    prog[8'h34] = I(BIN,  AND,  1);
    prog[8'h35] = I(BIN,  OR,   2);
    prog[8'h36] = I(BOUT, ST,   0);
    prog[8'h37] = I(BIN,  ANDN, 2);
    prog[8'h38] = I(BMEM, ST,   3);
    prog[8'h39] = I(BMEM, XNOR, 3);
    prog[8'h3A] = I(BIN,  ORN,  1);
    prog[8'h3B] = I(BCRB, XOR,  1);            // CRb_1: result of 0x34
    prog[8'h3C] = I(BOUT, ST,   1);
    prog[8'h3D] = I(BOUT, AND,  0);
    prog[8'h3E] = I(BIN,  XOR,  1);
    prog[8'h3F] = I(BOUT, ST,   2);
    // integers
    prog[8'h40] = I(LIT, LD_W,  802);
    prog[8'h41] = I(LIT, DIV_I, 67);
    prog[8'h42] = I(LIT, SL,    2);
    prog[8'h43] = I(LIT, GT,    40);
    prog[8'h44] = I(MEM, ST_W,  FLAG);
    prog[8'h45] = I(MEM, LD_W,  KP);
    prog[8'h46] = I(LIT, SQRT_R, 0);
    prog[8'h47] = I(MEM, ST_W,  ROOT);
    prog[8'h48] = I(LIT, JMP,   32'h20);
    for (int a = 32'h11; a < 32'h1F; a++) prog[a] = I(LIT, JMP, 32'h10);   // never reached
    download(32'h49);

    i0_x = 8'b0000_0101;
    rst = 0;
    for (int scan = 0; scan < 2; scan++) begin
      wait_pc_init(8'h20, 2000);
      t0 = cycle;
      // reference PID, one rounding per IL operation
      t1 = ref_op(1, sp_v, pv_v);
      t2 = ref_op(2, t1, kp_v);
      t4 = ref_op(2, ki_v, i_v);
      t5 = ref_op(0, t4, t2);
      t7 = ref_op(1, pv_v, pe_v);
      t8 = ref_op(2, t7, kd_v);
      t9 = ref_op(3, t8, ts_v);
      outv = ref_op(0, t9, t5);
      i_new = ref_op(0, ref_op(2, ref_op(1, sp_v, pv_v), ts_v), i_v);
      // expected clocks: 3 + ALU cycles (document's Xilinx column) per line
      exp_cyc = 4 + 7 + 6 + 4 + 6 + 6 + 4 + 7 + 6 + 11 + 6 + 4 + 4 + 7 + 6 + 6 + 4 + 4 + 4;
      wait_pc_init(8'h33, 2000);
      chk(cycle - t0 == longint'(exp_cyc), $sformatf("PID takes %0d clocks, expected %0d", cycle - t0, exp_cyc));
      chk(dut.u_cr.mem[2] == t2, "CRW_2 holds Kp*(SP-PV)");
      chk(dut.u_cr.mem[5] == t5, "CRW_5 holds the P+I terms");
      chk(dut.u_m1.regs[OUTW] == outv, $sformatf("PID output %h expected %h", dut.u_m1.regs[OUTW], outv));
      chk(dut.u_m1.regs[II] == i_new, "integral updated");
      chk(dut.u_m1.regs[PE] == pv_v, "previous value updated");
      i_v = i_new; pe_v = pv_v;
      // bit section, reference from the IL text
      r1 = i0_x[0]; r2 = r1 & i0_x[1]; r3 = r2 | i0_x[2];
      r4 = r3 & ~i0_x[2]; r5 = ~(r4 ^ r4); r6 = r5 | ~i0_x[1]; r7 = r6 ^ r2;
      r8 = r7 & r3; r9 = r8 ^ i0_x[1];
      wait_pc_init(8'h40, 200);
      chk(q0_x[2:0] == {r9, r7, r3}, $sformatf("outputs %b expected %b", q0_x[2:0], {r9, r7, r3}));
      chk(dut.u_m0.regs[3] == r4, "memory bit M0_3");
      wait_pc_init(8'h45, 200);
      chk(dut.u_m1.regs[FLAG] == 32'd1, "802/67 = 11, 11<<2 = 44 > 40");
      chk(word_result == 32'd1, "GT result");
      // the JMP at 0x48 is taken in the fetch state of 0x47
      wait_pc_init(8'h47, 200);
      chk(word_result == ref_op(4, kp_v, 32'd0), "square root of Kp");
      repeat (3) @(posedge clk);
      #1 chk(state == ST_FETCH && pc == 8'h48, "JMP visible in fetch");
      chk(dut.u_m1.regs[ROOT] == ref_op(4, kp_v, 32'd0), "stored square root");
      i0_x = 8'b0000_0011;   // other inputs for the second scan
    end
    $display("mechanisms: jump_fetch=%0d jump_init=%0d multicycle=%0d crw_operand=%0d crb_operand=%0d st_m1=%0d st_m0=%0d st_q=%0d input=%0d fp=%0d div_i=%0d sqrt=%0d",
             n_jmp_fetch, n_jmp_init, n_multi, n_crw_op, n_crb_op, n_st_m1, n_st_m0, n_st_q, n_in_rd, n_fp, n_int_div, n_sqrt);
    chk(n_jmp_fetch > 0, "jump taken in fetch");
    chk(n_jmp_init > 0,  "jump reached by a jump");
    chk(n_multi > 0,     "multi-cycle execution");
    chk(n_crw_op > 0,    "CRW_X operand");
    chk(n_crb_op > 0,    "CRb_X operand");
    chk(n_st_m1 > 0,     "store to M1_X");
    chk(n_st_m0 > 0,     "store to M0_X");
    chk(n_st_q > 0,      "store to Q0_X");
    chk(n_in_rd > 0,     "input read");
    chk(n_fp > 0,        "floating-point operation");
    chk(n_int_div > 0,   "integer division");
    chk(n_sqrt > 0,      "square root");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
