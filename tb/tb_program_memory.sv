// tb_program_memory: self-checking test of the 256 x 40-bit program memory:
// random downloads through the write port, then every address is read back
// combinationally and compared with a copy kept by the testbench.
module tb_program_memory;
  logic        clk = 0, wr_en = 0;
  logic [7:0]  addr = 0, wr_addr = 0;
  logic [39:0] ic, wr_data = 0;
  logic [39:0] model [256];
  int checks = 0, failures = 0;

  program_memory #(.DEPTH(256), .WIDTH(40)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      wr_en = 1; wr_addr = 8'(i); wr_data = {8'($urandom), 32'($urandom)};
      model[i] = wr_data;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 500; i++) begin
      wr_addr = 8'($urandom); wr_data = {8'($urandom), 32'($urandom)};
      model[wr_addr] = wr_data;
      @(posedge clk); #1;
    end
    wr_en = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (ic !== model[i]) begin failures++; $display("FAIL addr %0d: %h vs %h", i, ic, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
