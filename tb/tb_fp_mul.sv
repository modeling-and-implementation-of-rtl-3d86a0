// tb_fp_mul: self-checking test of the floating-point multiplier against
// the double-precision reference model, with directed and random operands
// (including overflow, underflow, zero times infinity and NaN).
module tb_fp_mul;
  import fp_ref_pkg::*;
  logic [31:0] x, y, z, e;
  int checks = 0, failures = 0;

  fp_mul dut (.*);

  task automatic run(input logic [31:0] a, input logic [31:0] b);
    x = a; y = b;
    #1;
    e = ref_op(2, a, b);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %h * %h = %h expected %h", a, b, z, e);
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
    run(32'h42F8_0000, 32'h40A0_0000);   // 124 * 5
    run(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5 * 1.5
    run(32'h0000_0000, 32'h7F80_0000);   // 0 * inf
    run(32'h7F00_0000, 32'h4000_0000);   // overflow
    run(32'h0080_0000, 32'h3F00_0000);   // underflow
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] ea, eb;
      ea = 8'(20 + $urandom % 216);
      eb = 8'(254 - int'(ea) + int'($urandom % 40) - 20 + 1);
      if (eb < 16) eb = 16;
      if (eb > 240) eb = 240;
      run(rand_sp(ea), rand_sp(eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
