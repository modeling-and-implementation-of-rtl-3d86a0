// tb_program_counter: self-checking test of the 8-bit program counter:
// reset to 0, increment, wrap from 255 to 0, load of a jump target and the
// priority of load over increment, against a counter kept by the testbench.
module tb_program_counter;
  logic       clk = 0, rst = 1, inc_pc = 0, wr_pc = 0;
  logic [7:0] pc_in = 0, pc, model;
  int checks = 0, failures = 0;

  program_counter #(.PC_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (pc !== model) begin
      failures++;
      $display("FAIL %s: pc=%0d expected %0d", what, pc, model);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0; model = 0;
    check("reset");
    for (int i = 0; i < 3000; i++) begin
      inc_pc = 1'($urandom);
      wr_pc  = ($urandom % 8) == 0;
      pc_in  = 8'($urandom);
      @(posedge clk);
      if (wr_pc) model = pc_in;
      else if (inc_pc) model = model + 1;
      #1 check("step");
    end
    // wrap-around
    wr_pc = 1; inc_pc = 0; pc_in = 8'd254; @(posedge clk); #1 model = 254; check("load 254");
    wr_pc = 0; inc_pc = 1;
    @(posedge clk); #1 model = 255; check("255");
    @(posedge clk); #1 model = 0;   check("wrap");
    // load wins over increment
    wr_pc = 1; inc_pc = 1; pc_in = 8'd77; @(posedge clk); #1 model = 77; check("priority");
    rst = 1; @(posedge clk); #1 model = 0; check("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
