// tb_fp_div: self-checking test of the floating-point divider against the
// double-precision reference model: the two divisions shown in the
// document's timing simulations, special cases and random operands.
module tb_fp_div;
  import fp_ref_pkg::*;
  logic [31:0] x, y, z, e;
  int checks = 0, failures = 0;

  fp_div dut (.*);

  task automatic run(input logic [31:0] a, input logic [31:0] b);
    x = a; y = b;
    #1;
    e = ref_op(3, a, b);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %h / %h = %h expected %h", a, b, z, e);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(32'h4311_B333, 32'h40A8_0000);   // 145.7 / 5.25
    run(32'h45FA_AB9E, 32'h4423_AE56);   // 8021.45 / 654.724
    run(32'h0000_0000, 32'h0000_0000);   // 0 / 0
    run(32'h3F80_0000, 32'h0000_0000);   // 1 / 0
    run(32'h7F80_0000, 32'h7F80_0000);   // inf / inf
    run(32'h4040_0000, 32'h4040_0000);   // 3 / 3
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] eb;
      eb = 8'(20 + $urandom % 216);
      run(rand_sp(eb), rand_sp(eb));
    end
    // the document's example: 145.7 / 5.25 is about 27.7524
    x = 32'h4311_B333; y = 32'h40A8_0000; #1;
    checks++;
    if (!(sp_to_real(z) > 27.752 && sp_to_real(z) < 27.753)) begin
      failures++; $display("FAIL 145.7/5.25 = %f", sp_to_real(z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
