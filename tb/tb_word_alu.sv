// tb_word_alu: self-checking test of the word ALU. Every one of the 23
// operations is applied to random operands (B op A, signed integers, REAL
// through the double-precision reference model) and checked both on the
// combinational result and on the output register, which must hold its
// value while VAL_CC is non-zero or exe is low and load when exe is high and
// VAL_CC is zero. Includes the document's examples 124 * 5 = 620 and
// 802 / 67 = 11.
module tb_word_alu;
  import fp_ref_pkg::*;
  logic        clk = 0, rst = 1, exe = 0;
  logic [4:0]  alu_sel = 0;
  logic [31:0] a = 0, b = 0, alu_res, alu_out, held, expv;
  logic [2:0]  val_cc = 0;
  int checks = 0, failures = 0;

  word_alu dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_word(int op, logic [31:0] ra, logic [31:0] rb);
    int signed sa, sb;
    int        n;
    sa = ra; sb = rb; n = int'(ra[4:0]);
    case (op)
      0:  return rb + ra;
      1:  return rb - ra;
      2:  return 32'(sb * sa);
      3:  return (ra == 0) ? 32'hFFFF_FFFF : (sa == -1) ? 32'(-sb) : 32'(sb / sa);
      4:  return ref_op(0, rb, ra);
      5:  return ref_op(1, rb, ra);
      6:  return ref_op(2, rb, ra);
      7:  return ref_op(3, rb, ra);
      8:  return rb << n;
      9:  return rb >> n;
      10: begin logic [63:0] d; d = {rb, rb} << n; return d[63:32]; end
      11: begin logic [63:0] d; d = {rb, rb} >> n; return d[31:0];  end
      12: return rb & ra;
      13: return rb | ra;
      14: return rb ^ ra;
      15: return ~(rb | ra);
      16: return ~(rb & ra);
      17: return ~(rb ^ ra);
      18: return (sb > sa) ? 32'd1 : 32'd0;
      19: return (rb == ra) ? 32'd1 : 32'd0;
      20: return rb;
      22: return ref_op(4, rb, 32'd0);
      default: return ra;
    endcase
  endfunction

  task automatic apply(int op, logic [31:0] ra, logic [31:0] rb);
    alu_sel = 5'(op); a = ra; b = rb;
    expv = ref_word(op, ra, rb);
    held = alu_out;
    exe = 1; val_cc = 3'(1 + $urandom % 7); @(posedge clk); #1;
    exe = 0; val_cc = 0; @(posedge clk); #1;
    checks++;
    if (alu_out !== held) begin failures++; $display("FAIL op %0d register loaded early", op); end
    checks++;
    if (alu_res !== expv) begin
      failures++; $display("FAIL op %0d B=%h A=%h res=%h expected %h", op, rb, ra, alu_res, expv);
    end
    exe = 1; val_cc = 0; @(posedge clk); #1 exe = 0;
    checks++;
    if (alu_out !== expv) begin failures++; $display("FAIL op %0d register %h expected %h", op, alu_out, expv); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    checks++; if (alu_out !== 0) begin failures++; $display("FAIL reset"); end
    apply(21, 32'd124, 32'd0);   // LD 124
    apply(2, 32'd5, 32'd124);    // MUL_I 5 -> 620
    checks++; if (alu_out !== 32'd620) begin failures++; $display("FAIL 124*5"); end
    apply(3, 32'd67, 32'd802);   // DIV_I -> 11
    checks++; if (alu_out !== 32'd11) begin failures++; $display("FAIL 802/67"); end
    apply(3, 32'd0, 32'd5);
    apply(3, 32'hFFFF_FFFF, 32'h8000_0000);
    apply(10, 32'd0, 32'h1234_5678);
    apply(11, 32'd31, 32'h1234_5678);
    apply(22, 32'd0, 32'h4210_0000);   // SQRT_R of 36.0
    checks++; if (alu_out !== 32'h40C0_0000) begin failures++; $display("FAIL sqrt(36)"); end
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = int'($urandom % 23);
      if ((op >= 4 && op <= 7) || op == 22) begin
        logic [7:0] eb;
        eb = 8'(60 + $urandom % 136);
        apply(op, rand_sp(eb), rand_sp(eb));
      end else if ((op == 18 || op == 19) && $urandom % 2 == 0) begin
        logic [31:0] v;
        v = $urandom;
        apply(op, v, v + 32'(int'($urandom % 3) - 1));
      end else begin
        apply(op, $urandom, $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
