// tb_instruction_timing: runs every instruction of the document's timing
// table on two complete processors, the default (Xilinx, 100 MHz cycle
// table) and the Intel variant (50 MHz cycle table), and checks each
// instruction's total clock count, from its initialization state to the
// next instruction's, against the "complete instruction" clock columns of
// that table (ADD_I 5 / 4, DIV_R 11 / 7, ...). Results of a few operations
// are also checked so that the right operation ran.
module tb_instruction_timing;
  import plc_pkg::*;

  logic        clk = 0, rst = 1;
  logic [7:0]  i0_x = 8'h5A;
  logic [7:0]  q0_x [2];
  logic        prog_we = 0;
  logic [7:0]  prog_addr = 0;
  logic [39:0] prog_data = 0;
  logic [7:0]  pc [2];
  fsm_state_e  state [2];
  logic [31:0] word_result [2];
  logic        bit_result [2];
  int checks = 0, failures = 0;

  plc_microprocessor dut_x (
    .clk, .rst, .i0_x, .q0_x(q0_x[0]), .prog_we, .prog_addr, .prog_data,
    .pc(pc[0]), .state(state[0]), .word_result(word_result[0]), .bit_result(bit_result[0]));
  plc_microprocessor #(.TIMING(TIMING_IPLC)) dut_i (
    .clk, .rst, .i0_x, .q0_x(q0_x[1]), .prog_we, .prog_addr, .prog_data,
    .pc(pc[1]), .state(state[1]), .word_result(word_result[1]), .bit_result(bit_result[1]));

  always #5 clk = ~clk;

  // table rows in program order: opcode and complete-instruction clocks for
  // Micro-XPLC and Micro-IPLC
  typedef struct { int opc; int x; int i; string name; } row_t;
  row_t rows [26] = '{
    '{0, 5, 4, "ADD_I"},  '{1, 4, 4, "SUB_I"},  '{2, 4, 4, "MUL_I"},  '{3, 11, 4, "DIV_I"},
    '{4, 6, 4, "ADD_R"},  '{5, 7, 5, "SUB_R"},  '{6, 6, 5, "MUL_R"},  '{7, 11, 7, "DIV_R"},
    '{8, 4, 4, "SL"},     '{9, 4, 4, "SR"},     '{10, 4, 4, "RL"},    '{11, 4, 4, "RR"},
    '{12, 4, 4, "AND_W"}, '{13, 4, 4, "OR_W"},  '{14, 4, 4, "XOR_W"}, '{15, 4, 4, "NOR_W"},
    '{16, 4, 4, "NAND_W"},'{17, 4, 4, "XNOR_W"},'{18, 4, 4, "GT"},    '{19, 4, 4, "ET"},
    '{33, 4, 4, "AND"},   '{34, 4, 4, "OR"},    '{35, 4, 4, "XOR"},   '{36, 4, 4, "ORN"},
    '{37, 4, 4, "ANDN"},  '{38, 4, 4, "XNOR"}};

  int start [2][64];

  // record the cycle at which each address enters initialization
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  for (genvar k = 0; k < 2; k++) begin : g_mon
    always @(posedge clk) if (!rst && state[k] == ST_INIT && pc[k] < 64) start[k][pc[k][5:0]] <= int'(cycle);
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
    int n;
    // operands: words use the literal 3 (REAL operations see a tiny value,
    // which only matters for timing), bits use input 1
    n = 0;
    prog[n++] = {2'd0, 6'd21, 32'd100};                   // LD_W 100
    for (int r = 0; r < 20; r++) prog[n++] = {2'd0, 6'(rows[r].opc), 32'd3};
    prog[n++] = {2'd0, 6'd32, 32'd1};                     // LD I0_1
    for (int r = 20; r < 26; r++) prog[n++] = {2'd0, 6'(rows[r].opc), 32'd1};
    prog[n++] = {2'd0, 6'd21, 32'd7};                     // LD_W 7, end marker
    prog[n++] = {2'd0, 6'd63, 32'(n - 1)};                // JMP to itself
    for (int a = 0; a < n; a++) begin
      prog_we = 1; prog_addr = 8'(a); prog_data = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 0;
    @(posedge clk); #1 rst = 0;
    repeat (600) @(posedge clk);
    #1;
    for (int r = 0; r < 26; r++) begin
      int a;
      a = (r < 20) ? r + 1 : r + 2;
      for (int k = 0; k < 2; k++) begin
        int got, want;
        got  = start[k][a + 1] - start[k][a];
        want = (k == 0) ? rows[r].x : rows[r].i;
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL %s %s: %0d clocks, table gives %0d", (k == 0) ? "XPLC" : "IPLC", rows[r].name, got, want);
        end
      end
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (word_result[k] != 32'd7 || pc[k] != 8'(n - 1)) begin
        failures++; $display("FAIL program did not finish (%0d)", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
