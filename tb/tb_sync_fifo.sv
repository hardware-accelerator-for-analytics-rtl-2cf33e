// tb_sync_fifo: random pushes and pops on a 16-entry buffer against a
// queue model; checks data order, the valid and ready flags, the occupancy
// count, and simultaneous push and pop when full.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [4:0] count;
  logic [31:0] model [$];
  int checks = 0, failures = 0, full_seen = 0;

  sync_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // phases biased towards filling and towards draining
      in_valid  = ((i / 500) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      out_ready = ((i / 500) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      in_data   = $urandom;
      #1;
      checks += 3;
      if (count !== 5'(model.size())) begin failures++; $display("FAIL count"); end
      if (out_valid !== (model.size() != 0)) begin failures++; $display("FAIL out_valid"); end
      if (in_ready !== (model.size() < DEPTH || out_ready)) begin failures++; $display("FAIL in_ready"); end
      if (out_valid) begin
        checks++;
        if (out_data !== model[0]) begin failures++; $display("FAIL data"); end
      end
      if (model.size() == DEPTH) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
