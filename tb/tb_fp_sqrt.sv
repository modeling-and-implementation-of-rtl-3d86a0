// tb_fp_sqrt: self-checking test of the floating-point square root against
// the double-precision reference model. It covers perfect squares, the
// special cases (signed zeros, infinities, NaN, negative numbers,
// subnormals) and random operands of every exponent, both odd and even.
module tb_fp_sqrt;
  import fp_ref_pkg::*;
  logic [31:0] x, z, e;
  int checks = 0, failures = 0;

  fp_sqrt dut (.*);

  task automatic run(input logic [31:0] a);
    x = a;
    #1;
    e = ref_op(4, a, 32'd0);
    checks++;
    if (z !== e) begin
      failures++;
      if (failures < 20) $display("FAIL sqrt(%h) = %h expected %h", a, z, e);
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
    run(32'h4080_0000);   // 4
    run(32'h4110_0000);   // 9
    run(32'h4000_0000);   // 2
    run(32'h3F80_0000);   // 1
    run(32'h3E80_0000);   // 0.25
    run(32'h0000_0000);   // +0
    run(32'h8000_0000);   // -0
    run(32'h7F80_0000);   // +inf
    run(32'hFF80_0000);   // -inf
    run(32'hBF80_0000);   // -1
    run(32'h7FC0_0001);   // NaN
    run(32'h0040_0000);   // subnormal, read as zero
    run(32'h7F7F_FFFF);   // largest normal
    run(32'h0080_0000);   // smallest normal
    for (int i = 0; i < 20000; i++) begin
      if (i % 8 == 0) run(rand_sp(8'd127));
      else            run({1'b0, 8'(1 + $urandom % 254), 23'($urandom)});
    end
    // exact results
    for (int k = 1; k < 200; k++) begin
      x = real_to_sp(real'(k * k)); #1;
      checks++;
      if (z !== real_to_sp(real'(k))) begin
        failures++; $display("FAIL sqrt(%0d) = %h", k * k, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
