// tb_reduction_unit: feeds four PE sum streams that arrive at random times;
// each output must be (s0 + s1) + (s2 + s3) of the next sum from every PE,
// tagged with consecutive row numbers, and clear must restart the row count.
module tb_reduction_unit;
  import spa_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, ROWS = 400;
  logic clk = 0, rst_n = 0, clear;
  logic [N-1:0] in_valid, in_ready;
  fp32_t [N-1:0] in_sum;
  logic out_valid, out_ready;
  mem_word_t out_word;
  fp32_t sums [N][ROWS];
  int sent [N];
  int got = 0, checks = 0, failures = 0;

  reduction_unit #(.NUM_PE(N)) dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_sum,
                                    .out_valid, .out_ready, .out_word);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each source holds its value until taken
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          sent[p]++;
          in_valid[p] <= 1'b0;
        end else if (!in_valid[p] && sent[p] < ROWS && ($urandom % 3 == 0)) begin
          in_valid[p] <= 1'b1;
        end
      end
    end
  end
  always_comb for (int p = 0; p < N; p++) in_sum[p] = sums[p][sent[p] % ROWS];

  initial begin
    fp32_t e;
    for (int p = 0; p < N; p++) begin
      sent[p] = 0;
      for (int r = 0; r < ROWS; r++) sums[p][r] = rand_val();
    end
    in_valid = '0; out_ready = 0; clear = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (got < ROWS) begin
      @(negedge clk);
      out_ready = ($urandom % 4 != 0);
      #1;
      if (out_valid && out_ready) begin
        e = ref_add(ref_add(sums[0][got], sums[1][got]), ref_add(sums[2][got], sums[3][got]));
        checks += 2;
        if (out_word.val !== e) begin failures++; $display("FAIL row %0d val %h exp %h", got, out_word.val, e); end
        if (out_word.idx !== 32'(got)) begin failures++; $display("FAIL row index %0d", out_word.idx); end
        got++;
      end
    end
    @(negedge clk); out_ready = 0; clear = 1;
    @(negedge clk); clear = 0; #1;
    checks++;
    if (out_word.idx !== 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
