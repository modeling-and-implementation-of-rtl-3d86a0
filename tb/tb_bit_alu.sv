// tb_bit_alu: self-checking test of the bit ALU: all eight operations for
// all four operand combinations against the IL truth tables, and the output
// register, which may load only when exe is high and VAL_CC is zero.
module tb_bit_alu;
  logic       clk = 0, rst = 1, a = 0, b = 0, exe = 0;
  logic [3:0] alu_sel = 0;
  logic [2:0] val_cc = 0;
  logic       alu_res, alu_out, exp_res, held;
  int checks = 0, failures = 0;

  bit_alu dut (.*);

  always #5 clk = ~clk;

  function automatic logic ref_op(int op, logic ra, logic rb);
    case (op)
      0: return ra;            // LD
      1: return rb & ra;       // AND
      2: return rb | ra;       // OR
      3: return rb ^ ra;       // XOR
      4: return rb | !ra;      // ORN
      5: return rb & !ra;      // ANDN
      6: return !(rb ^ ra);    // XNOR
      default: return rb;      // ST
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (alu_out !== 0) begin failures++; $display("FAIL reset"); end
    for (int op = 0; op < 8; op++)
      for (int v = 0; v < 4; v++) begin
        alu_sel = 4'(op); a = v[0]; b = v[1];
        exp_res = ref_op(op, a, b);
        // no load while counting or outside exe
        held = alu_out;
        exe = 1; val_cc = 3'd2; @(posedge clk); #1;
        exe = 0; val_cc = 3'd0; @(posedge clk); #1;
        checks++; if (alu_out !== held) begin failures++; $display("FAIL loaded early op %0d", op); end
        checks++; if (alu_res !== exp_res) begin failures++; $display("FAIL op %0d a=%b b=%b res=%b", op, a, b, alu_res); end
        exe = 1; val_cc = 3'd0; @(posedge clk); #1 exe = 0;
        checks++; if (alu_out !== exp_res) begin failures++; $display("FAIL reg op %0d a=%b b=%b", op, a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
