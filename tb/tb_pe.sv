// tb_pe: drives one processing element (PE 1 of 4) through both datapath
// configurations.
//  * dot mode (spMdV_csr): loads an x subset, sends rows of elements and
//    end-of-row markers, and checks every row sum against the reference
//    sum = A.val * x[A.idx] + sum, in element order. The sum queue is
//    drained slowly so that an end-of-row marker has to wait.
//  * update mode (spMspV_csc / scale_update): loads a y subset, sends
//    elements with x values, many hitting the same entry back to back, and
//    reads the RAM back through the drain port, checking
//    y[A.idx] = A.val * x.val + y[A.idx].
// Words owned by another PE must be ignored. Checks one command per cycle
// when the input is never idle.
module tb_pe;
  import spa_pkg::*;
  import tb_fp_pkg::*;
  localparam int DEPTH = 4096, PE_ID = 1, NV = 64;
  logic clk = 0, rst_n = 0, dot_mode;
  logic in_valid, in_ready, sum_valid, sum_ready, idle;
  pe_cmd_t in_cmd;
  fp32_t sum_data, drain_data;
  logic [11:0] drain_addr;
  fp32_t vec [NV];
  fp32_t exp_sums [$];
  int checks = 0, failures = 0, eor_stalls = 0;
  bit sink_slow;

  pe #(.PE_ID(PE_ID), .NUM_PE(4), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .dot_mode, .in_valid, .in_ready, .in_cmd,
    .sum_valid, .sum_ready, .sum_data, .drain_addr, .drain_data, .idle);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sum sink
  always @(posedge clk) begin
    if (rst_n) begin
      if (sum_valid && sum_ready) begin
        checks++;
        if (exp_sums.size() == 0) begin failures++; $display("FAIL unexpected sum"); end
        else begin
          fp32_t e;
          e = exp_sums.pop_front();
          if (sum_data !== e) begin failures++; $display("FAIL sum %h expected %h", sum_data, e); end
        end
      end
      sum_ready <= sink_slow ? ($urandom % 8 == 0) : 1'b1;
      if (dut.cmd_valid && dut.cmd.kind == CMD_EOR && !dut.cmd_pop) eor_stalls++;
    end
  end

  task automatic send(input pe_cmd_kind_e k, input logic [31:0] idx, input fp32_t val, input fp32_t xv);
    in_cmd.kind = k; in_cmd.word.idx = idx; in_cmd.word.val = val; in_cmd.xval = xv;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic load_vec();
    for (int i = 0; i < NV; i++) begin
      vec[i] = rand_val();
      send(CMD_LOAD, 32'(4 * i + PE_ID), vec[i], '0);
    end
  endtask

  initial begin
    int t0, t1;
    in_valid = 0; in_cmd = '0; dot_mode = 1; sum_ready = 0; drain_addr = 0; sink_slow = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---------------- dot mode
    load_vec();
    for (int r = 0; r < 200; r++) begin
      fp32_t s;
      int len;
      s = '0;
      len = $urandom % 12;
      for (int k = 0; k < len; k++) begin
        int a;
        fp32_t v;
        a = $urandom % NV;
        v = rand_val();
        send(CMD_ELEM, 32'(4 * a + PE_ID), v, '0);
        s = ref_add(ref_mul(v, vec[a]), s);
        // a word of another PE in between
        if (k == 0) send(CMD_ELEM, 32'(4 * a + PE_ID + 1), rand_val(), '0);
      end
      exp_sums.push_back(s);
      send(CMD_EOR, 0, '0, '0);
    end
    sink_slow = 0;
    wait (exp_sums.size() == 0);
    // throughput: a long row sent back to back takes one cycle per element
    @(negedge clk);
    t0 = $time;
    for (int k = 0; k < 40; k++) begin
      in_cmd.kind = CMD_ELEM; in_cmd.word.idx = 32'(4 * k + PE_ID); in_cmd.word.val = 32'h3f80_0000;
      in_valid = 1;
      @(posedge clk); #1;
    end
    in_valid = 0;
    wait (idle);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 42) begin failures++; $display("FAIL 40 elements took %0d cycles", (t1 - t0) / 10); end
    send(CMD_EOR, 0, '0, '0);
    begin
      fp32_t s;
      s = '0;
      for (int k = 0; k < 40; k++) s = ref_add(ref_mul(32'h3f80_0000, vec[k]), s);
      exp_sums.push_back(s);
    end
    wait (exp_sums.size() == 0);
    // ---------------- update mode
    repeat (2) @(posedge clk);
    dot_mode = 0;
    load_vec();
    for (int k = 0; k < 2000; k++) begin
      int a;
      fp32_t v, xv;
      a = (k % 5 < 3) ? (k / 5) % 8 : $urandom % NV;
      v = rand_val(); xv = rand_val();
      send(CMD_ELEM, 32'(4 * a + PE_ID), v, xv);
      vec[a] = ref_add(ref_mul(v, xv), vec[a]);
      if (k % 100 == 0) send(CMD_ELEM, 32'(4 * a + PE_ID + 2), v, xv);
    end
    wait (idle);
    @(negedge clk);
    for (int i = 0; i < NV; i++) begin
      drain_addr = 12'(i); #1;
      checks++;
      if (drain_data !== vec[i]) begin failures++; $display("FAIL y[%0d] %h expected %h", i, drain_data, vec[i]); end
    end
    checks++;
    if (eor_stalls == 0) begin failures++; $display("FAIL end-of-row never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
