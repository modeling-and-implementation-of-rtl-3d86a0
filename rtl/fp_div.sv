// fp_div: combinational IEEE-754 single-precision divider, z = x / y.
//
// The document names the unit (FP_DIV) and reports it as the slowest word
// operation (eight 10 ns cycles on the Xilinx build). The structure here is
// this design's: the dividend significand, extended by 26 zero bits, is
// divided by the divisor significand, giving a 26- or 27-bit quotient; the
// remainder feeds the sticky bit, and the result is rounded to nearest even.
// 0/0 and inf/inf give NaN, x/0 gives infinity, 0/x and x/inf give zero.
// Subnormals are flushed to zero (see fp_pkg).
module fp_div
  import fp_pkg::*;
(
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] z
);
  fp_unpacked_t ux, uy;
  logic         s;
  logic [49:0]  num;
  logic [49:0]  q;
  logic [49:0]  r;
  logic         rem_nz;
  int           e;

  always_comb begin
    ux     = fp_unpack(x);
    uy     = fp_unpack(y);
    s      = ux.sign ^ uy.sign;
    num    = {ux.sig, 26'd0};
    q      = (uy.sig == '0) ? '0 : num / {26'd0, uy.sig};
    r      = (uy.sig == '0) ? '0 : num % {26'd0, uy.sig};
    rem_nz = (r != '0);
    e      = int'(ux.exp) - int'(uy.exp) + 127;
    if (ux.is_nan || uy.is_nan)                         z = QNAN;
    else if (ux.is_zero && uy.is_zero)                  z = QNAN;
    else if (ux.is_inf && uy.is_inf)                    z = QNAN;
    else if (ux.is_inf || uy.is_zero)                   z = {s, 8'hFF, 23'd0};
    else if (ux.is_zero || uy.is_inf)                   z = {s, 31'd0};
    else if (q[26]) z = fp_round_pack(s, e,     q[26:3], q[2], q[1] | q[0] | rem_nz);
    else            z = fp_round_pack(s, e - 1, q[25:2], q[1], q[0] | rem_nz);
  end
endmodule
