// tb_fma_unit: checks y = a * b + c of the multiply-accumulate unit against
// the double-precision reference with single-precision rounding after the
// product and after the sum. Covers random operands, cancellation to zero,
// zero operands, and an overflow to infinity.
module tb_fma_unit;
  import tb_fp_pkg::*;

  logic [31:0] a, b, c, y, exp_y;
  int checks = 0, failures = 0;

  fma_unit dut (.a(a), .b(b), .c(c), .y(y));

  task automatic check(input logic [31:0] ta, tb_, tc, input logic [31:0] ey);
    a = ta; b = tb_; c = tc;
    #1;
    checks++;
    if (y !== ey) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h expected %h", ta, tb_, tc, y, ey);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ra, rb, rc;
    for (int i = 0; i < 3000; i++) begin
      ra = rand_val(); rb = rand_val();
      // accumulators with a wider exponent range, including small ones
      rc = rand_val();
      rc[30:23] = 8'(118 + ($urandom % 14));
      check(ra, rb, rc, ref_add(ref_mul(ra, rb), rc));
    end
    // a*b + (-(a*b)) cancels to +0
    ra = rand_val(); rb = rand_val();
    rc = ref_mul(ra, rb); rc[31] = ~rc[31];
    check(ra, rb, rc, 32'h0000_0000);
    // zero multiplicand returns the accumulator
    check(32'h0000_0000, 32'h4040_0000, 32'h3fc0_0000, 32'h3fc0_0000);
    // 1.5 * 2 + 0 = 3
    check(32'h3fc0_0000, 32'h4000_0000, 32'h0000_0000, 32'h4040_0000);
    // 1.0 * 1.0 + 2^-24 rounds to 1.0 (tie to even)
    check(32'h3f80_0000, 32'h3f80_0000, 32'h3380_0000, 32'h3f80_0000);
    // 1.0 * 1.0 + 3*2^-24 rounds up to 1+2^-22
    check(32'h3f80_0000, 32'h3f80_0000, 32'h3440_0000, 32'h3f80_0002);
    // overflow
    check(32'h7f00_0000, 32'h7f00_0000, 32'h0000_0000, 32'h7f80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
