// fp_mul: combinational IEEE-754 single-precision multiplier, z = x * y.
//
// The document names the unit (FP_MUL) and notes that the multiplications
// map onto the FPGA's DSP multipliers; the structure here is this design's:
// the 24 x 24-bit product of the significands is normalized by at most one
// position, rounded to nearest even and packed, with the exponents added.
// NaN, infinity and zero operands are handled first (0 * inf gives NaN).
// Subnormals are flushed to zero (see fp_pkg). No clock: the word ALU waits
// the cycles set by the command counter before sampling the result.
module fp_mul
  import fp_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] z
);
  fp_unpacked_t ux, uy;
  logic         s;
  logic [47:0]  p;
  int           e;

  always_comb begin
    ux = fp_unpack(x);
    uy = fp_unpack(y);
    s  = ux.sign ^ uy.sign;
    p  = ux.sig * uy.sig;
    e  = int'(ux.exp) + int'(uy.exp) - 127;
    if (ux.is_nan || uy.is_nan)                                   z = QNAN;
    else if ((ux.is_inf && uy.is_zero) || (uy.is_inf && ux.is_zero)) z = QNAN;
    else if (ux.is_inf || uy.is_inf)                              z = {s, 8'hFF, 23'd0};
    else if (ux.is_zero || uy.is_zero)                            z = {s, 31'd0};
    else if (p[47]) z = fp_round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else            z = fp_round_pack(s, e,     p[46:23], p[22], |p[21:0]);
  end
endmodule
