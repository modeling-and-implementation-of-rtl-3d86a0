// fp_addsub: combinational IEEE-754 single-precision adder/subtractor,
// z = x + y (sub = 0) or z = x - y (sub = 1).
//
// The structure follows the document's five steps plus condition detection:
//  1. unpack: sign, exponent, significand and zero / infinity / NaN flags;
//  2. alignment: the operand of smaller magnitude is shifted right by the
//     exponent difference, keeping a guard bit, a round bit and a sticky bit;
//  3. addition or subtraction of the aligned significands, depending on the
//     effective operation (the XOR of the signs);
//  4. normalization (one-bit right shift on carry, left shift by the leading
//     zero count after cancellation) and round to nearest even;
//  5. pack, with condition detection deciding NaN, infinity, overflow,
//     underflow and zero results.
// The document does not print the internal widths or the rounding mode; the
// ones here are this design's. Subnormals are flushed to zero (see fp_pkg).
// The unit has no clock: the word ALU gives it several clock cycles, set by
// the command counter, before it samples the result.
module fp_addsub
  import fp_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  input  logic        sub,
  output logic [31:0] z
);
  fp_unpacked_t ux, uy;
  logic         sy;          // sign of y after the operation
  logic         swap;
  logic [7:0]   e_big, e_small, ediff;
  logic [23:0]  m_big, m_small;
  logic         s_big, s_small;
  logic [49:0]  shifted;
  logic [26:0]  a_big, a_small;   // significand, guard, round, sticky
  logic [27:0]  sum;
  logic         eff_sub;
  logic [26:0]  norm;
  int           lz;
  int           e_norm;

  always_comb begin
    // 1. unpack
    ux = fp_unpack(x);
    uy = fp_unpack(y);
    sy = uy.sign ^ sub;

    // 2. alignment: the larger magnitude goes first
    swap    = {uy.exp, uy.sig} > {ux.exp, ux.sig};
    e_big   = swap ? uy.exp : ux.exp;
    m_big   = swap ? uy.sig : ux.sig;
    s_big   = swap ? sy     : ux.sign;
    e_small = swap ? ux.exp : uy.exp;
    m_small = swap ? ux.sig : uy.sig;
    s_small = swap ? ux.sign : sy;
    ediff   = e_big - e_small;
    shifted = {m_small, 26'd0} >> ((ediff > 8'd50) ? 8'd50 : ediff);
    a_big   = {m_big, 3'b000};
    a_small = {shifted[49:24], |shifted[23:0]};

    // 3. addition / subtraction
    eff_sub = s_big ^ s_small;
    sum     = eff_sub ? ({1'b0, a_big} - {1'b0, a_small})
                      : ({1'b0, a_big} + {1'b0, a_small});

    // 4. normalization
    lz = 0;
    if (sum[27]) begin
      norm   = {sum[27:2], sum[1] | sum[0]};
      e_norm = int'(e_big) + 1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) begin
          lz = 26 - i;
          break;
        end
      end
      norm   = sum[26:0] << lz;
      e_norm = int'(e_big) - lz;
    end

    // 5. condition detection and pack
    if (ux.is_nan || uy.is_nan)                                 z = QNAN;
    else if (ux.is_inf && uy.is_inf)                            z = (ux.sign != sy) ? QNAN : {ux.sign, 8'hFF, 23'd0};
    else if (ux.is_inf)                                         z = {ux.sign, 8'hFF, 23'd0};
    else if (uy.is_inf)                                         z = {sy, 8'hFF, 23'd0};
    else if (ux.is_zero && uy.is_zero)                          z = {ux.sign & sy, 31'd0};
    else if (ux.is_zero)                                        z = {sy, y[30:0]};
    else if (uy.is_zero)                                        z = x;
    else if (sum == '0)                                         z = 32'd0;
    else z = fp_round_pack(s_big, e_norm, norm[26:3], norm[2], norm[1] | norm[0]);
  end
endmodule
