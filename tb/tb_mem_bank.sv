// tb_mem_bank: self-checking test of the M0_X (32 x 1) and M1_X (32 x 32)
// register banks: reset clears every entry, random writes and reads follow a
// model array, reads are combinational.
module tb_mem_bank;
  logic        clk = 0, rst = 1;
  logic [4:0]  ra0 = 0, wa0 = 0, ra1 = 0, wa1 = 0;
  logic        rd0, we0 = 0, wd0 = 0, we1 = 0;
  logic [31:0] rd1, wd1 = 0;
  logic        m0 [32];
  logic [31:0] m1 [32];
  int checks = 0, failures = 0;

  mem_bank #(.WIDTH(1),  .DEPTH(32)) u_m0 (.clk, .rst, .rd_addr(ra0), .rd_data(rd0),
                                           .wr_en(we0), .wr_addr(wa0), .wr_data(wd0));
  mem_bank #(.WIDTH(32), .DEPTH(32)) u_m1 (.clk, .rst, .rd_addr(ra1), .rd_data(rd1),
                                           .wr_en(we1), .wr_addr(wa1), .wr_data(wd1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      m0[i] = 0; m1[i] = 0;
      ra0 = 5'(i); ra1 = 5'(i); #1;
      checks += 2;
      if (rd0 !== 1'b0) begin failures++; $display("FAIL M0 reset %0d", i); end
      if (rd1 !== 32'd0) begin failures++; $display("FAIL M1 reset %0d", i); end
    end
    for (int i = 0; i < 4000; i++) begin
      we0 = 1'($urandom); wa0 = 5'($urandom); wd0 = 1'($urandom); ra0 = 5'($urandom);
      we1 = 1'($urandom); wa1 = 5'($urandom); wd1 = $urandom;     ra1 = 5'($urandom);
      #1;
      checks += 2;
      if (rd0 !== m0[ra0]) begin failures++; $display("FAIL M0[%0d]", ra0); end
      if (rd1 !== m1[ra1]) begin failures++; $display("FAIL M1[%0d] %h vs %h", ra1, rd1, m1[ra1]); end
      @(posedge clk);
      if (we0) m0[wa0] = wd0;
      if (we1) m1[wa1] = wd1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
