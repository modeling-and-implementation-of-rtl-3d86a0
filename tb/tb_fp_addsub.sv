// tb_fp_addsub: self-checking test of the floating-point adder/subtractor
// against the double-precision reference model: directed cases (exact
// cancellation, carry-out, rounding ties, infinities, NaN) and random
// operands with nearby exponents, for both addition and subtraction.
module tb_fp_addsub;
  import fp_ref_pkg::*;
  logic [31:0] x, y, z, e;
  logic        sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.*);

  task automatic run(input logic [31:0] a, input logic [31:0] b, input logic s);
    x = a; y = b; sub = s;
    #1;
    e = ref_op(s ? 1 : 0, a, b);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 20) $display("FAIL %h %s %h = %h expected %h", a, s ? "-" : "+", b, z, e);
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
    run(32'h3F80_0000, 32'h3F80_0000, 0);   // 1 + 1
    run(32'h3F80_0000, 32'h3F80_0000, 1);   // 1 - 1
    run(32'h4B7F_FFFF, 32'h3F80_0000, 0);   // carry into a new exponent
    run(32'h3F80_0000, 32'h3380_0000, 0);   // tie, round to even
    run(32'h3F80_0001, 32'h3380_0000, 0);   // tie, round up
    run(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0);   // overflow
    run(32'h7F80_0000, 32'h7F80_0000, 1);   // inf - inf
    run(32'h4500_0000, 32'h4500_0001, 1);   // cancellation
    for (int i = 0; i < 20000; i++) begin
      logic [7:0] eb;
      eb = 8'(20 + $urandom % 216);
      run(rand_sp(eb), rand_sp(eb), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
