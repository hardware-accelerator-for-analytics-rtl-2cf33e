// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
//
// Products and sums are formed in double precision (exact for the operand
// ranges the testbenches use: values are multiples of 2^-26 below 2^26) and
// then rounded to single precision, round to nearest, ties to even, by
// taking the double's bit pattern apart. Subnormal results are flushed to
// zero, matching the accelerator's number format. This path shares no code
// with the RTL adder and multiplier.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mant;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return 32'd0;
    m = {1'b1, d[51:0]};
    e = int'(d[62:52]) - 1023 + 127;
    mant = {1'b0, m[52:29]};
    if (m[28] && ((|m[27:0]) || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), mant[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // random value with magnitude in [0.5, 4), 16 significant bits, random sign
  function automatic logic [31:0] rand_val();
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(126 + ($urandom % 3));
    f[22:0]  = {15'($urandom), 8'd0};
    return f;
  endfunction

endpackage
