// fp_sqrt: combinational IEEE-754 single-precision square root, z = sqrt(x).
//
// The document draws a square-root unit (FP_SQRT) among the floating-point
// operations of the word ALU but gives neither its structure nor the
// instruction that uses it. Here it serves the SQRT_R instruction, word ALU
// select 22, which takes the square root of the current result (this
// design's choice, as in IL where SQRT acts on the current result).
//
// How it works: the exponent is unbiased and, when odd, one is moved into
// the significand so that the exponent halves exactly. The 24-bit
// significand, shifted left by 27 or 28 places, is a 51- or 52-bit
// radicand. A restoring digit-by-digit square root takes two radicand bits
// per step, 26 steps, and yields a 26-bit root with its leading one at bit
// 25. The two low root bits and the final remainder give the guard and
// sticky bits for round to nearest even (fp_pkg). The result can neither
// overflow nor underflow.
// Special cases: sqrt(+-0) = +-0, sqrt(+inf) = +inf, a NaN or any negative
// non-zero operand gives NaN. Subnormals are read as zero (see fp_pkg).
module fp_sqrt
  import fp_pkg::*;
(
  input  logic [31:0] x,
  output logic [31:0] z
);
  fp_unpacked_t ux;
  logic [51:0]  rad;
  logic [29:0]  rem;
  logic [29:0]  trial;
  logic [25:0]  root;
  int           ue;

  always_comb begin
    ux  = fp_unpack(x);
    ue  = int'(ux.exp) - 127;
    rad = ue[0] ? {ux.sig, 28'd0} : {1'b0, ux.sig, 27'd0};
    rem  = '0;
    root = '0;
    for (int i = 25; i >= 0; i--) begin
      rem   = {rem[27:0], rad[2*i+:2]};
      trial = {2'b00, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[24:0], 1'b1};
      end else begin
        root = {root[24:0], 1'b0};
      end
    end
    if (ux.is_nan)                   z = QNAN;
    else if (ux.is_zero)             z = {ux.sign, 31'd0};
    else if (ux.sign)                z = QNAN;
    else if (ux.is_inf)              z = {1'b0, 8'hFF, 23'd0};
    else z = fp_round_pack(1'b0, (ue >>> 1) + 127, root[25:2], root[1], root[0] | (rem != '0));
  end
endmodule
