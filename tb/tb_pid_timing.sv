// tb_pid_timing: the PID control step (test program 2) on both timing
// configurations of the processor, side by side: the default Xilinx cycle
// table (100 MHz) and the Intel cycle table (50 MHz).
//
// A preamble stores the eight PID constants into memory words, then a jump
// enters the 19-line PID loop, which ends with a jump back to its first
// line. Because a jump placed after an instruction costs no clocks, the
// loop period is exactly the PID execution time. At each loop start the
// testbench records the period and takes a snapshot of the memory words. For
// three scans on each processor it compares the period with the sum of the
// per-instruction clock counts (3 clocks plus the table's ALU cycles).
// Expected values: 106 clocks (1.06 us at 10 ns) and 86 clocks (1.72 us at
// 20 ns). Every scan's output, integral and previous value are compared with
// the double-precision reference model, one rounding per IL operation.
module tb_pid_timing;
  import plc_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 0, rst = 1;
  logic [7:0]  i0_x = 0;
  logic        prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [39:0] prog_data = 0;
  logic [7:0]  q0_x [2];
  logic [7:0]  pc [2];
  fsm_state_e  state [2];
  logic [31:0] word_result [2];
  logic        bit_result [2];

  int checks = 0, failures = 0;
  longint cycle = 0;

  plc_microprocessor dut_x (
    .clk, .rst, .i0_x, .q0_x(q0_x[0]), .prog_we, .prog_addr, .prog_data,
    .pc(pc[0]), .state(state[0]), .word_result(word_result[0]), .bit_result(bit_result[0])
  );
  plc_microprocessor #(.TIMING(TIMING_IPLC)) dut_i (
    .clk, .rst, .i0_x, .q0_x(q0_x[1]), .prog_we, .prog_addr, .prog_data,
    .pc(pc[1]), .state(state[1]), .word_result(word_result[1]), .bit_result(bit_result[1])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  localparam int LD_W = 21, ST_W = 20, ADD_R = 4, SUB_R = 5, MUL_R = 6, DIV_R = 7, JMP = 63;
  localparam logic [1:0] LIT = 0, CRW = 1, MEM = 2;
  localparam int SP = 0, PV = 1, KP = 2, KI = 3, II = 4, PE = 5, KD = 6, TS = 7, OUTW = 8;
  localparam logic [7:0] LOOP = 8'h11;

  function automatic logic [39:0] I(logic [1:0] dt, int opc, int unsigned sfx);
    return {dt, 6'(opc), 32'(sfx)};
  endfunction

  // ALU clock cycles of the two tables, for the operations the PID uses
  function automatic int alu_cycles(int k, int opc);
    case (opc)
      ADD_R:   return (k == 0) ? 3 : 1;
      SUB_R:   return (k == 0) ? 4 : 2;
      MUL_R:   return (k == 0) ? 3 : 2;
      DIV_R:   return (k == 0) ? 8 : 4;
      default: return 1;
    endcase
  endfunction

  // loop-period measurement and a snapshot of the PID memory words at every
  // loop start, one per processor
  longint last_start [2] = '{-1, -1};
  longint period [2][8];
  int     scans [2] = '{0, 0};
  logic [31:0] snap_out [2][8], snap_i [2][8], snap_pe [2][8];
  for (genvar k = 0; k < 2; k++) begin : g_meas
    always @(posedge clk) if (!rst && state[k] == ST_INIT && pc[k] == LOOP && scans[k] < 8) begin
      period[k][scans[k]]   <= (last_start[k] >= 0) ? cycle - last_start[k] : 0;
      snap_out[k][scans[k]] <= (k == 0) ? dut_x.u_m1.regs[OUTW] : dut_i.u_m1.regs[OUTW];
      snap_i[k][scans[k]]   <= (k == 0) ? dut_x.u_m1.regs[II]   : dut_i.u_m1.regs[II];
      snap_pe[k][scans[k]]  <= (k == 0) ? dut_x.u_m1.regs[PE]   : dut_i.u_m1.regs[PE];
      last_start[k] <= cycle;
      scans[k] <= scans[k] + 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] prog [64];
    logic [31:0] sp_v, pv_v, kp_v, ki_v, i_v, pe_v, kd_v, ts_v, outv, i_new;
    int n, exp_cyc [2];

    sp_v = real_to_sp(75.0);  pv_v = real_to_sp(61.25); kp_v = real_to_sp(2.5);
    ki_v = real_to_sp(0.125); i_v = real_to_sp(3.0);    pe_v = real_to_sp(60.0);
    kd_v = real_to_sp(0.75);  ts_v = real_to_sp(0.01);
    n = 0;
    prog[n++] = I(LIT, LD_W, sp_v); prog[n++] = I(MEM, ST_W, SP);
    prog[n++] = I(LIT, LD_W, pv_v); prog[n++] = I(MEM, ST_W, PV);
    prog[n++] = I(LIT, LD_W, kp_v); prog[n++] = I(MEM, ST_W, KP);
    prog[n++] = I(LIT, LD_W, ki_v); prog[n++] = I(MEM, ST_W, KI);
    prog[n++] = I(LIT, LD_W, i_v);  prog[n++] = I(MEM, ST_W, II);
    prog[n++] = I(LIT, LD_W, pe_v); prog[n++] = I(MEM, ST_W, PE);
    prog[n++] = I(LIT, LD_W, kd_v); prog[n++] = I(MEM, ST_W, KD);
    prog[n++] = I(LIT, LD_W, ts_v); prog[n++] = I(MEM, ST_W, TS);
    prog[n++] = I(LIT, JMP, 32'(LOOP));
    // the PID loop, 19 lines from LOOP
    prog[n++] = I(MEM, LD_W,  SP);
    prog[n++] = I(MEM, SUB_R, PV);
    prog[n++] = I(MEM, MUL_R, KP);
    prog[n++] = I(MEM, LD_W,  KI);
    prog[n++] = I(MEM, MUL_R, II);
    prog[n++] = I(CRW, ADD_R, 2);
    prog[n++] = I(MEM, LD_W,  PV);
    prog[n++] = I(MEM, SUB_R, PE);
    prog[n++] = I(MEM, MUL_R, KD);
    prog[n++] = I(MEM, DIV_R, TS);
    prog[n++] = I(CRW, ADD_R, 5);
    prog[n++] = I(MEM, ST_W,  OUTW);
    prog[n++] = I(MEM, LD_W,  SP);
    prog[n++] = I(MEM, SUB_R, PV);
    prog[n++] = I(MEM, MUL_R, TS);
    prog[n++] = I(MEM, ADD_R, II);
    prog[n++] = I(MEM, ST_W,  II);
    prog[n++] = I(MEM, LD_W,  PV);
    prog[n++] = I(MEM, ST_W,  PE);
    prog[n++] = I(LIT, JMP, 32'(LOOP));

    for (int k = 0; k < 2; k++) begin
      exp_cyc[k] = 0;
      for (int a = int'(LOOP); a < n - 1; a++) exp_cyc[k] += 3 + alu_cycles(k, int'(prog[a][37:32]));
    end
    chk(exp_cyc[0] == 106 && exp_cyc[1] == 86, "clock sums of the two tables");

    for (int a = 0; a < n; a++) begin
      prog_we = 1; prog_addr = 8'(a); prog_data = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1 rst = 0;

    while (!(scans[0] > 3 && scans[1] > 3)) @(posedge clk);
    #1;
    // snapshot s (taken at loop start s) holds the results of s PID steps
    for (int scan = 1; scan <= 3; scan++) begin
      logic [31:0] e, t5;
      e    = ref_op(1, sp_v, pv_v);
      t5   = ref_op(0, ref_op(2, ki_v, i_v), ref_op(2, e, kp_v));
      outv = ref_op(0, ref_op(3, ref_op(2, ref_op(1, pv_v, pe_v), kd_v), ts_v), t5);
      i_new = ref_op(0, ref_op(2, e, ts_v), i_v);
      for (int k = 0; k < 2; k++) begin
        chk(period[k][scan] == longint'(exp_cyc[k]),
            $sformatf("%s PID takes %0d clocks, expected %0d", (k == 0) ? "XPLC" : "IPLC", period[k][scan], exp_cyc[k]));
        chk(snap_out[k][scan] == outv, $sformatf("scan %0d output %h expected %h", scan, snap_out[k][scan], outv));
        chk(snap_i[k][scan] == i_new, "integral");
        chk(snap_pe[k][scan] == pv_v, "previous value");
      end
      i_v = i_new; pe_v = pv_v;
    end
    $display("PID step: %0d clocks = %0d ns at 100 MHz, %0d clocks = %0d ns at 50 MHz",
             period[0][1], period[0][1] * 10, period[1][1], period[1][1] * 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
