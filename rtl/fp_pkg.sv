// fp_pkg: helpers shared by the IEEE-754 single-precision units fp_addsub,
// fp_mul and fp_div: unpacking into sign, exponent, significand and class
// flags, and the final round-to-nearest-even and pack step with overflow to
// infinity and underflow to zero.
//
// Subnormal numbers are not supported (this design's choice, the document
// does not discuss them): a subnormal operand is read as zero and a result
// below the smallest normal number becomes a zero of the right sign. Every
// NaN result is the quiet NaN 32'h7FC0_0000.
package fp_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [23:0] sig;    // with the hidden one, 0 for zero
    logic        is_zero;
    logic        is_inf;
    logic        is_nan;
  } fp_unpacked_t;

  function automatic fp_unpacked_t fp_unpack(input logic [31:0] x);
    fp_unpacked_t u;
    u.sign    = x[31];
    u.exp     = x[30:23];
    u.is_zero = (x[30:23] == 8'd0);
    u.is_inf  = (x[30:23] == 8'hFF) && (x[22:0] == '0);
    u.is_nan  = (x[30:23] == 8'hFF) && (x[22:0] != '0);
    u.sig     = u.is_zero ? 24'd0 : {1'b1, x[22:0]};
    return u;
  endfunction

  // sig has its leading one at bit 23, exp is the biased exponent of that
  // one (may be out of range), guard is the first dropped bit and sticky the
  // OR of all further dropped bits.
  function automatic logic [31:0] fp_round_pack(input logic sign, input int exp,
                                                input logic [23:0] sig,
                                                input logic guard, input logic sticky);
    logic [24:0] r;
    int          e;
    r = {1'b0, sig} + {24'd0, guard & (sticky | sig[0])};
    e = exp;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, e[7:0], r[22:0]};
  endfunction

endpackage
