// fp32_mul: combinational IEEE-754 single-precision multiplier.
//
// The 24x24-bit significand product is normalised by at most one position and
// rounded to nearest, ties to even, using a guard bit and a sticky bit.
// Subnormal inputs are read as zero and results below the normal range are
// flushed to signed zero; overflow gives infinity, and a NaN input or
// infinity times zero gives the quiet NaN 0x7fc00000. The multiplier is the
// first half of the PE's multiply-accumulate unit; its number format and its
// handling of special values are this design's own choices.
module fp32_mul
  import spa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sign;
  logic [7:0]  ea, eb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [24:0] mant;       // one extra bit for the rounding carry
  logic        guard, sticky;
  logic signed [10:0] exp;

  always_comb begin
    sign = a[31] ^ b[31];
    ea   = a[30:23];
    eb   = b[30:23];
    za   = (ea == 8'd0);
    zb   = (eb == 8'd0);
    ia   = (ea == 8'hff) && (a[22:0] == 23'd0);
    ib   = (eb == 8'hff) && (b[22:0] == 23'd0);
    na   = (ea == 8'hff) && (a[22:0] != 23'd0);
    nb   = (eb == 8'hff) && (b[22:0] != 23'd0);
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp  = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = {1'b0, prod[47:24]};
      guard  = prod[23];
      sticky = |prod[22:0];
      exp    = exp + 11'sd1;
    end else begin
      mant   = {1'b0, prod[46:23]};
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    if (guard && (sticky || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      exp  = exp + 11'sd1;
    end
    if (na || nb || (ia && zb) || (ib && za)) y = 32'h7fc0_0000;
    else if (ia || ib)                        y = {sign, 8'hff, 23'd0};
    else if (za || zb)                        y = {sign, 31'd0};
    else if (exp >= 11'sd255)                 y = {sign, 8'hff, 23'd0};
    else if (exp <= 11'sd0)                   y = {sign, 31'd0};
    else                                      y = {sign, exp[7:0], mant[22:0]};
  end

endmodule
