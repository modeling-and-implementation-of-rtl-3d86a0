// tb_command_counter: self-checking test of the 3-bit execution-length
// counter: every load value 0..7 must keep VAL_CC non-zero for exactly that
// many counting cycles, counting pauses when exe is low, and the counter
// stays at zero.
module tb_command_counter;
  logic       clk = 0, rst = 1, wr_cc_en = 0, exe = 0;
  logic [2:0] wr_cc = 0, val_cc;
  int checks = 0, failures = 0;

  command_counter #(.CC_W(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    @(posedge clk); #1 rst = 0;
    checks++; if (val_cc !== 0) begin failures++; $display("FAIL reset"); end
    for (int rep = 0; rep < 4; rep++) begin
      for (int ld = 0; ld < 8; ld++) begin
        wr_cc_en = 1; wr_cc = 3'(ld); exe = 0;
        @(posedge clk); #1 wr_cc_en = 0;
        checks++; if (val_cc !== 3'(ld)) begin failures++; $display("FAIL load %0d got %0d", ld, val_cc); end
        // a pause with exe low must hold the value
        if (rep == 1) begin
          @(posedge clk); #1;
          checks++; if (val_cc !== 3'(ld)) begin failures++; $display("FAIL hold %0d", ld); end
        end
        exe = 1; n = 0;
        while (val_cc != 0 && n < 20) begin
          @(posedge clk); #1 n++;
        end
        checks++;
        if (n != ld) begin failures++; $display("FAIL load %0d counted %0d cycles", ld, n); end
        @(posedge clk); #1;
        checks++; if (val_cc !== 0) begin failures++; $display("FAIL saturate %0d", val_cc); end
        exe = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
