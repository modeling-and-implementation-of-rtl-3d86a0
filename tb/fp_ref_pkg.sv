// fp_ref_pkg: reference model for the single-precision units, independent of
// the RTL. Operands are widened to the simulator's double precision, the
// operation is done there, and the double result is rounded to single
// precision (round to nearest even) by integer manipulation of its bits.
// Double precision carries more than twice the single-precision significand
// plus two bits, so this double rounding gives the correctly rounded single
// result for +, -, *, / and square root. Subnormal operands and results are
// read as zero to match the RTL's flush-to-zero; every NaN becomes
// 32'h7FC0_0000.
package fp_ref_pkg;

  function automatic real sp_to_real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) begin
      d = {x[31], 63'd0};
    end else if (x[30:23] == 8'hFF) begin
      d = {x[31], 11'h7FF, x[22:0], 29'd0};
    end else begin
      d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_sp(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] k;
    int          e;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'd0)   return {d[63], 31'd0};
    m = {1'b1, d[51:0]};
    e = int'(d[62:52]) - 1023 + 127;
    k = {1'b0, m[52:29]};
    g = m[28];
    s = |m[27:0];
    if (g && (s || k[0])) k = k + 1;
    if (k[24]) begin
      k = k >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), k[22:0]};
  endfunction

  // 0 add, 1 sub, 2 mul, 3 div, 4 square root of x (y unused)
  function automatic logic [31:0] ref_op(input int op, input logic [31:0] x, input logic [31:0] y);
    real a, b;
    a = sp_to_real(x);
    b = sp_to_real(y);
    case (op)
      0: return real_to_sp(a + b);
      1: return real_to_sp(a - b);
      2: return real_to_sp(a * b);
      4: begin
        if (x[30:23] == 8'hFF && x[22:0] != 0) return 32'h7FC0_0000;
        if (a == 0.0) return {x[31], 31'd0};
        if (a < 0.0)  return 32'h7FC0_0000;
        return real_to_sp($sqrt(a));
      end
      default: return real_to_sp(a / b);
    endcase
  endfunction

  // random operand: mostly normal numbers with exponents near each other,
  // sometimes specials
  function automatic logic [31:0] rand_sp(input logic [7:0] ebase);
    int unsigned k;
    logic [7:0]  e;
    k = $urandom % 40;
    case (k)
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return 32'h7F80_0000;
      3: return 32'hFF80_0000;
      4: return 32'h7FC0_0001;
      5: return {1'($urandom), 8'd0, 23'($urandom)};        // subnormal
      6: return {1'($urandom), 8'd254, 23'($urandom)};      // near overflow
      7: return {1'($urandom), 8'd1, 23'($urandom)};        // near underflow
      default: begin
        e = ebase + 8'($urandom % 30) - 8'd15;
        if (e == 0 || e == 8'hFF) e = 8'd127;
        return {1'($urandom), e, 23'($urandom)};
      end
    endcase
  endfunction

endpackage
