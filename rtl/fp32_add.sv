// fp32_add: combinational IEEE-754 single-precision adder.
//
// The operand with the smaller magnitude is aligned to the larger one with a
// guard, a round and a sticky bit; the significands are added or subtracted,
// the result is normalised (one position right after a carry, or left by the
// leading-zero count after a cancellation) and rounded to nearest, ties to
// even. An exact zero difference is +0. Subnormal inputs are read as zero and
// results below the normal range are flushed to signed zero; overflow gives
// infinity; NaN inputs and infinity minus infinity give 0x7fc00000. The adder
// serves the PE's multiply-accumulate unit and the reduction unit; its number
// format and special-value handling are this design's own choices.
module fp32_add
  import spa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t       opa, opb;
  logic [7:0]  eb, es;
  logic [7:0]  d;
  logic [26:0] mb, ms, ms_al, lost_mask;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [24:0] mant;
  logic        sticky, rnd_up;
  logic signed [10:0] exp;
  logic [4:0]  lz;
  logic        sign, a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    a_nan = (a[30:23] == 8'hff) && (a[22:0] != 23'd0);
    b_nan = (b[30:23] == 8'hff) && (b[22:0] != 23'd0);
    a_inf = (a[30:23] == 8'hff) && (a[22:0] == 23'd0);
    b_inf = (b[30:23] == 8'hff) && (b[22:0] == 23'd0);

    if (a[30:0] >= b[30:0]) begin
      opa   = a;
      opb = b;
    end else begin
      opa   = b;
      opb = a;
    end
    eb   = opa[30:23];
    es   = opb[30:23];
    sign = opa[31];
    mb   = (eb == 8'd0) ? 27'd0 : {1'b1, opa[22:0], 3'b000};
    ms   = (es == 8'd0) ? 27'd0 : {1'b1, opb[22:0], 3'b000};
    d    = (es == 8'd0) ? 8'd0 : eb - es;

    // align the smaller operand; bits shifted out collapse into the sticky bit
    lost_mask = (d >= 8'd27) ? '1 : ((27'd1 << d) - 27'd1);
    sticky    = |(ms & lost_mask);
    ms_al     = (d >= 8'd27) ? 27'd0 : (ms >> d);
    ms_al[0]  = ms_al[0] | sticky;

    exp = 11'(signed'({3'b0, eb}));
    lz  = 5'd0;
    if (opa[31] == opb[31]) begin
      sum = {1'b0, mb} + {1'b0, ms_al};
      if (sum[27]) begin
        norm = {sum[27:2], sum[1] | sum[0]};
        exp  = exp + 11'sd1;
      end else begin
        norm = sum[26:0];
      end
    end else begin
      sum  = {1'b0, mb} - {1'b0, ms_al};
      norm = sum[26:0];
      for (int i = 26; i >= 0; i--) begin
        if (norm[i]) begin
          lz = 5'(26 - i);
          break;
        end
      end
      norm = norm << lz;
      exp  = exp - 11'(signed'({6'b0, lz}));
    end

    mant   = {1'b0, norm[26:3]};
    rnd_up = norm[2] && (norm[1] || norm[0] || mant[0]);
    if (rnd_up) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      exp  = exp + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]))) y = 32'h7fc0_0000;
    else if (a_inf)                    y = a;
    else if (b_inf)                    y = b;
    else if (mb == 27'd0)              y = {a[31] & b[31], 31'd0};
    else if (sum == 28'd0)             y = 32'd0;
    else if (exp >= 11'sd255)          y = {sign, 8'hff, 23'd0};
    else if (exp <= 11'sd0)            y = {sign, 31'd0};
    else                               y = {sign, exp[7:0], mant[22:0]};
  end

endmodule
