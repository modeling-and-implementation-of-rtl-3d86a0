// tb_instruction_decoder: self-checking test of the control unit, for the
// Xilinx (instance 0) and the Intel (instance 1) cycle tables. The testbench
// plays the command counter and presents random instructions, each held
// from initialization to the end of execution; in fetch it presents the next
// instruction, sometimes a JMP. It checks the state sequence, the length of
// the execution state against the document's table of ALU clock cycles, the
// control strobes in every state, the CRW/CRb stack addresses (first result
// in slot 0, B = previous slot, operand slot = suffix, slots restart after
// a jump) and the jump enable.
module tb_instruction_decoder;
  import plc_pkg::*;
  logic        clk = 0, rst = 1;
  logic [39:0] ic [2];
  logic [2:0]  val_cc [2];
  logic        inc_pc [2], wr_pc [2], wr_cc_en [2], wr_w [2], wr_b [2];
  logic        exe [2], exe_b [2], dec [2];
  logic [2:0]  wr_cc [2];
  logic [6:0]  crw_ch [2];
  logic [11:0] crb_ch [2];
  logic [4:0]  op_sig_w [2];
  logic [3:0]  op_sig_b [2];
  fsm_state_e  state [2];
  int checks = 0, failures = 0;
  int n_jmp = 0, n_long = 0;
  bit done [2];

  // ALU clock cycles from the document's timing table, per word operation
  // ADD_I SUB_I MUL_I DIV_I ADD_R SUB_R MUL_R DIV_R, others 1; SQRT_R (22)
  // is given the length of DIV_R
  int xplc [8] = '{2, 1, 1, 8, 3, 4, 3, 8};
  int iplc [8] = '{1, 1, 1, 1, 1, 2, 2, 4};

  instruction_decoder #(.TIMING(TIMING_XPLC)) dut0 (
    .clk, .rst, .ic(ic[0]), .val_cc(val_cc[0]), .inc_pc(inc_pc[0]), .wr_pc(wr_pc[0]),
    .wr_cc(wr_cc[0]), .wr_cc_en(wr_cc_en[0]), .crw_ch(crw_ch[0]), .wr_w(wr_w[0]),
    .op_sig_w(op_sig_w[0]), .crb_ch(crb_ch[0]), .wr_b(wr_b[0]), .op_sig_b(op_sig_b[0]),
    .exe(exe[0]), .exe_b(exe_b[0]), .dec(dec[0]), .state(state[0]));
  instruction_decoder #(.TIMING(TIMING_IPLC)) dut1 (
    .clk, .rst, .ic(ic[1]), .val_cc(val_cc[1]), .inc_pc(inc_pc[1]), .wr_pc(wr_pc[1]),
    .wr_cc(wr_cc[1]), .wr_cc_en(wr_cc_en[1]), .crw_ch(crw_ch[1]), .wr_w(wr_w[1]),
    .op_sig_w(op_sig_w[1]), .crb_ch(crb_ch[1]), .wr_b(wr_b[1]), .op_sig_b(op_sig_b[1]),
    .exe(exe[1]), .exe_b(exe_b[1]), .dec(dec[1]), .state(state[1]));

  // command counter played by the testbench
  for (genvar k = 0; k < 2; k++) begin : g_cc
    always_ff @(posedge clk) begin
      if (rst)                                  val_cc[k] <= 0;
      else if (wr_cc_en[k])                     val_cc[k] <= wr_cc[k];
      else if ((exe[k] || exe_b[k]) && val_cc[k] != 0) val_cc[k] <= val_cc[k] - 1;
    end
  end

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what, int k);
    checks++;
    if (!ok) begin failures++; $display("FAIL[%0d] %s ic=%h state=%0d", k, what, ic[k], state[k]); end
  endtask

  function automatic logic [39:0] rand_instr();
    logic [5:0] opc;
    case ($urandom % 5)
      0, 1: opc = 6'($urandom % 23);
      2, 3: opc = 6'(32 + $urandom % 8);
      default: opc = 6'(23 + $urandom % 9);   // undefined: no operation
    endcase
    return {2'($urandom), opc, 32'($urandom)};
  endfunction

  task automatic run(int k);
    int nw = 0, nb = 0, cyc, expc;
    logic [39:0] cur, nxt;
    logic [5:0]  opc;
    bit is_w, is_b;
    cur = rand_instr();
    for (int i = 0; i < 2000; i++) begin
      ic[k] = cur; opc = cur[37:32];
      is_w = opc < 23; is_b = opc >= 32 && opc < 40;
      #1;
      chk(state[k] == ST_INIT && wr_cc_en[k] && !inc_pc[k] && !wr_w[k] && !wr_b[k], "initialization", k);
      expc = is_w ? ((opc < 8) ? ((k == 0) ? xplc[opc[2:0]] : iplc[opc[2:0]])
                         : (opc == 22) ? ((k == 0) ? 8 : 4) : 1) : 1;
      chk(int'(wr_cc[k]) == expc - 1, "command counter load", k);
      if (is_w) chk(op_sig_w[k] == opc[4:0], "word select", k);
      if (is_b) chk(op_sig_b[k] == {1'b0, opc[2:0]}, "bit select", k);
      @(posedge clk); #1;
      if (is_w) nw++;
      if (is_b) nb++;
      chk(state[k] == ST_DEC && dec[k] && !exe[k] && !exe_b[k], "decoding", k);
      if (is_w) chk(crw_ch[k] == ((cur[39:38] == 2'd1) ? cur[6:0] : 7'(nw - 2)), "CRW address in decoding", k);
      if (is_b) chk(crb_ch[k] == ((cur[39:38] == 2'd2) ? cur[11:0] : 12'(nb - 2)), "CRb address in decoding", k);
      @(posedge clk); #1;
      cyc = 0;
      while (state[k] == ST_EXEC && cyc < 20) begin
        cyc++;
        chk(exe[k] == is_w && exe_b[k] == is_b && !dec[k], "execution strobes", k);
        if (is_w) chk(crw_ch[k] == 7'(nw - 2), "B address", k);
        if (is_b) chk(crb_ch[k] == 12'(nb - 2), $sformatf("B bit address %0d nb=%0d jumps=%0d", crb_ch[k], nb, n_jmp), k);
        chk(inc_pc[k] == (val_cc[k] == 0), "INC_PC", k);
        @(posedge clk); #1;
      end
      chk(cyc == expc, $sformatf("execution length %0d expected %0d", cyc, expc), k);
      if (expc > 1) n_long++;
      // fetch: next instruction is visible, maybe a JMP
      nxt = (($urandom % 6) == 0) ? {2'b00, OPC_JMP, 32'($urandom)} : rand_instr();
      ic[k] = nxt; #1;
      chk(state[k] == ST_FETCH && wr_w[k] == is_w && wr_b[k] == is_b, "fetch strobes", k);
      if (is_w) chk(crw_ch[k] == 7'(nw - 1), "CRW write slot", k);
      if (is_b) chk(crb_ch[k] == 12'(nb - 1), "CRb write slot", k);
      chk(wr_pc[k] == (nxt[37:32] == OPC_JMP), "WR_PC in fetch", k);
      @(posedge clk);
      #1;
      if (nxt[37:32] == OPC_JMP) begin
        n_jmp++;
        nw = 0;   // a taken jump empties the result stacks
        nb = 0;
        // a JMP reached by a jump: loads the PC again and stays in initialization
        if ($urandom % 2 == 0) begin
          chk(state[k] == ST_INIT && wr_pc[k], "JMP in initialization", k);
          @(posedge clk);
          #1 chk(state[k] == ST_INIT, "stays in initialization", k);
        end
        nxt = rand_instr();
      end
      cur = nxt;
    end
    done[k] = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ic[0] = 0; ic[1] = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    fork
      run(0);
      run(1);
    join
    chk(n_jmp > 0 && n_long > 0, "jumps and multi-cycle operations seen", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
