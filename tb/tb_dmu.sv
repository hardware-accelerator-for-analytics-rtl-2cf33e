// tb_dmu: the data management unit with two PEs of 256 entries (a 512-entry
// block), driven directly through its operation descriptor and start input.
// Runs spMdV_csr (with empty rows, and a second run that keeps the x subset
// in the PE RAMs) and spMspV_csc against a behavioural memory with random
// back-pressure, and checks every result word, the completion pulse, the
// busy flag and that the DMU returns to idle with nothing outstanding.
module tb_dmu;
  import spa_pkg::*;
  import tb_fp_pkg::*;

  localparam int NUM_PE = 2, DEPTH = 256, NV = NUM_PE * DEPTH;
  localparam int X_BASE = 0, PTR_BASE = 2000, ELEM_BASE = 3001,
                 XL_BASE = 9001, OUT_BASE = 10000, Y_BASE = 12000;

  logic clk = 0, rst_n = 0;
  cfg_t cfg;
  logic start, busy, done_pulse, dot_mode, ev_sched_stall;
  logic mem_rreq_valid, mem_rreq_ready, mem_rrsp_valid;
  logic [31:0] mem_rreq_addr, mem_wreq_addr;
  logic [BEAT_W-1:0] mem_rrsp_data, mem_wreq_data;
  logic mem_wreq_valid, mem_wreq_ready;
  logic [WORDS_PER_BEAT-1:0] mem_wreq_mask;
  logic    [NUM_PE-1:0] pe_valid, pe_ready, pe_sum_valid, pe_sum_ready, pe_idle;
  pe_cmd_t [NUM_PE-1:0] pe_cmd;
  fp32_t   [NUM_PE-1:0] pe_sum, drain_data;
  logic    [7:0]        drain_addr;
  int unsigned stall_pct = 15;
  int checks = 0, failures = 0, dones = 0;

  dmu #(.NUM_PE(NUM_PE), .DEPTH(DEPTH), .RB_DEPTH(8), .OB_DEPTH(4)) dut (
    .clk, .rst_n, .cfg, .start, .busy, .done_pulse,
    .mem_rreq_valid, .mem_rreq_ready, .mem_rreq_addr, .mem_rrsp_valid, .mem_rrsp_data,
    .mem_wreq_valid, .mem_wreq_ready, .mem_wreq_addr, .mem_wreq_data, .mem_wreq_mask,
    .dot_mode, .ev_sched_stall, .pe_valid, .pe_ready, .pe_cmd,
    .pe_sum_valid, .pe_sum_ready, .pe_sum, .drain_addr, .drain_data, .pe_idle);

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe #(.PE_ID(p), .NUM_PE(NUM_PE), .DEPTH(DEPTH)) u_pe (
      .clk, .rst_n, .dot_mode,
      .in_valid(pe_valid[p]), .in_ready(pe_ready[p]), .in_cmd(pe_cmd[p]),
      .sum_valid(pe_sum_valid[p]), .sum_ready(pe_sum_ready[p]), .sum_data(pe_sum[p]),
      .drain_addr, .drain_data(drain_data[p]), .idle(pe_idle[p]));
  end

  tb_mem_model #(.WORDS(1 << 14), .LATENCY(12)) mem (
    .clk, .stall_pct,
    .rreq_valid(mem_rreq_valid), .rreq_ready(mem_rreq_ready), .rreq_addr(mem_rreq_addr),
    .rrsp_valid(mem_rrsp_valid), .rrsp_data(mem_rrsp_data),
    .wreq_valid(mem_wreq_valid), .wreq_ready(mem_wreq_ready), .wreq_addr(mem_wreq_addr),
    .wreq_data(mem_wreq_data), .wreq_mask(mem_wreq_mask));

  always #5 clk = ~clk;
  always @(posedge clk) if (done_pulse) dones++;

  initial begin
    repeat (400_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    ptr [];
  int    eidx [$];
  fp32_t eval [$];
  fp32_t vecv [NV];

  task automatic gen_matrix(input int nmaj, input int maxlen);
    ptr = new[nmaj + 1];
    eidx.delete(); eval.delete();
    ptr[0] = 0;
    for (int r = 0; r < nmaj; r++) begin
      int len;
      int cols [$];
      len = ($urandom % 6 == 0) ? 0 : 1 + $urandom % maxlen;
      for (int k = 0; k < len; k++) cols.push_back($urandom % NV);
      cols.sort();
      foreach (cols[k]) begin eidx.push_back(cols[k]); eval.push_back(rand_val()); end
      ptr[r + 1] = eidx.size();
    end
    for (int r = 0; r <= nmaj; r++) mem.mem[PTR_BASE + r] = {32'd0, 32'(ptr[r])};
    foreach (eidx[k]) mem.mem[ELEM_BASE + k] = {eval[k], 32'(eidx[k])};
  endtask

  task automatic run(input op_e op, input int vbase, input int vlen, input int cnt, input int xl);
    int d0;
    d0 = dones;
    @(negedge clk);
    cfg = '{op: op, vec_base: 32'(vbase), vec_len: 32'(vlen), ptr_base: PTR_BASE,
            elem_base: ELEM_BASE, count: 32'(cnt), xlist_base: 32'(xl), out_base: OUT_BASE};
    start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    while (dones == d0) @(negedge clk);
    checks++;
    if (busy || dones != d0 + 1) begin failures++; $display("FAIL completion"); end
  endtask

  task automatic dot(input int nrows, input bit reload);
    fp32_t part [NUM_PE];
    fp32_t y;
    gen_matrix(nrows, 30);
    if (reload)
      for (int i = 0; i < NV; i++) begin vecv[i] = rand_val(); mem.mem[X_BASE + i] = {vecv[i], 32'd0}; end
    run(OP_SPMDV_CSR, X_BASE, reload ? NV : 0, nrows, 0);
    for (int r = 0; r < nrows; r++) begin
      for (int p = 0; p < NUM_PE; p++) part[p] = '0;
      for (int k = ptr[r]; k < ptr[r + 1]; k++)
        part[eidx[k] % NUM_PE] = ref_add(ref_mul(eval[k], vecv[eidx[k]]), part[eidx[k] % NUM_PE]);
      y = ref_add(part[0], part[1]);
      checks++;
      if (mem.mem[OUT_BASE + r] !== {y, 32'(r)}) begin
        failures++; $display("FAIL row %0d got %h expected %h", r, mem.mem[OUT_BASE + r], {y, 32'(r)});
      end
    end
  endtask

  initial begin
    fp32_t xv [$];
    int xl [$];
    cfg = '0; start = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    dot(120, 1'b1);
    dot(60, 1'b0);
    // spMspV_csc
    gen_matrix(100, 40);
    for (int i = 0; i < NV; i++) begin vecv[i] = rand_val(); mem.mem[Y_BASE + i] = {vecv[i], 32'd0}; end
    for (int j = 0; j < 100; j++) if ($urandom % 2) xl.push_back(j);
    foreach (xl[j]) begin xv.push_back(rand_val()); mem.mem[XL_BASE + j] = {xv[j], 32'(xl[j])}; end
    run(OP_SPMSPV_CSC, Y_BASE, NV, xl.size(), XL_BASE);
    foreach (xl[j])
      for (int k = ptr[xl[j]]; k < ptr[xl[j] + 1]; k++)
        vecv[eidx[k]] = ref_add(ref_mul(eval[k], xv[j]), vecv[eidx[k]]);
    for (int i = 0; i < NV; i++) begin
      checks++;
      if (mem.mem[OUT_BASE + i] !== {vecv[i], 32'(i)}) begin
        failures++; $display("FAIL y[%0d] got %h expected %h", i, mem.mem[OUT_BASE + i], {vecv[i], 32'(i)});
      end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (dut.inflight != 0 || mem_rreq_valid || mem_wreq_valid) begin failures++; $display("FAIL not idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
