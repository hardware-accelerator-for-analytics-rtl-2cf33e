// fma_unit: the PE's floating-point multiply-accumulate unit, y = a * b + c.
//
// The product is rounded to single precision and then added to the
// accumulator input, so there are two roundings (a multiply-accumulate
// rather than a single-rounding fused operation). The unit is combinational:
// the PE registers its result, into the sum register or back into the PE RAM,
// so one element is processed per clock. The document names the unit and
// what it computes; the single-precision format, the two-step rounding and
// the single-cycle timing are this design's own choices.
module fma_unit
  import spa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t c,
  output fp32_t y
);

  fp32_t prod;

  fp32_mul u_mul (.a(a),    .b(b), .y(prod));
  fp32_add u_add (.a(prod), .b(c), .y(y));

endmodule
