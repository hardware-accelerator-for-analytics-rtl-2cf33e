// tb_sparse_accel: end-to-end test of one accelerator block at its default
// size (4 PEs, 4096-entry PE RAMs, so a full 16384-entry vector subset).
//
// A host task programs the control registers and waits for the completion
// pulse; a behavioural memory with 20 cycles of latency and random
// back-pressure holds the data. Runs, in order:
//   1. spMdV_csr   y = A x, CSR A with 300 rows (some empty) over 16384
//                  columns, elements starting at an odd word address
//   1b. spMdV_csr throughput: 4 rows of 2000 elements with the x subset kept
//                  in the PE RAMs and no back-pressure; the block must
//                  sustain at least one element per cycle
//   2. spMspV_csc  y += A x, CSC A with 400 columns, sparse x of 150 entries
//   3. scale_update y += sum_r x_r * A[r,:], CSR A, dense list of row factors
//   4. spMdV_csc   y += A x, every column of a CSC A
// Every result word is compared with a reference computed in double precision
// with single-precision rounding after each operation, in the accumulation
// order the hardware defines (per PE, index mod 4, in stream order, then (s0+s1)+(s2+s3)).
// It also counts, and requires, each mechanism of the design at least once:
// empty rows, two words dispatched in one cycle, PE conflict stalls,
// read-buffer-full throttling, memory read and write back-pressure, and all
// four operation types.
module tb_sparse_accel;
  import spa_pkg::*;
  import tb_fp_pkg::*;

  localparam int NUM_PE = 4, DEPTH = 4096, NV = NUM_PE * DEPTH;
  localparam int X_BASE = 0, PTR_BASE = 20000, ELEM_BASE = 21001,
                 XL_BASE = 70001, OUT_BASE = 80000, Y_BASE = 100000;

  logic clk = 0, rst_n = 0;
  logic reg_we, irq, sched_stall;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic mem_rreq_valid, mem_rreq_ready, mem_rrsp_valid;
  logic [31:0] mem_rreq_addr, mem_wreq_addr;
  logic [BEAT_W-1:0] mem_rrsp_data, mem_wreq_data;
  logic mem_wreq_valid, mem_wreq_ready;
  logic [WORDS_PER_BEAT-1:0] mem_wreq_mask;
  int unsigned stall_pct = 10;
  int checks = 0, failures = 0;

  sparse_accel dut (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .irq, .sched_stall,
    .mem_rreq_valid, .mem_rreq_ready, .mem_rreq_addr, .mem_rrsp_valid, .mem_rrsp_data,
    .mem_wreq_valid, .mem_wreq_ready, .mem_wreq_addr, .mem_wreq_data, .mem_wreq_mask);

  tb_mem_model #(.WORDS(1 << 17), .LATENCY(20)) mem (
    .clk, .stall_pct,
    .rreq_valid(mem_rreq_valid), .rreq_ready(mem_rreq_ready), .rreq_addr(mem_rreq_addr),
    .rrsp_valid(mem_rrsp_valid), .rrsp_data(mem_rrsp_data),
    .wreq_valid(mem_wreq_valid), .wreq_ready(mem_wreq_ready), .wreq_addr(mem_wreq_addr),
    .wreq_data(mem_wreq_data), .wreq_mask(mem_wreq_mask));

  always #5 clk = ~clk;

  // ------------------------------------------------------------ mechanisms
  int ev_empty_row = 0, ev_dual = 0, ev_conflict = 0, ev_rb_full = 0;
  int ev_rd_bp = 0, ev_wr_bp = 0;
  bit ev_op [4];

  always @(posedge clk) if (rst_n) begin
    if (mem_rrsp_valid && !dut.u_dmu.mq_out.is_ptr && dut.u_dmu.mq_out.eor &&
        dut.u_dmu.mq_out.mask == '0) ev_empty_row++;
    if ($countones(dut.u_dmu.pe_valid & dut.pe_ready) >= 2 &&
        !(&dut.u_dmu.pe_valid)) ev_dual++;
    if (sched_stall) ev_conflict++;
    if (dut.u_dmu.state == dut.u_dmu.S_STREAM && !dut.u_dmu.credit_ok) ev_rb_full++;
    if (mem_rreq_valid && !mem_rreq_ready) ev_rd_bp++;
    if (mem_wreq_valid && !mem_wreq_ready) ev_wr_bp++;
    if (dut.start) ev_op[dut.cfg.op] = 1;
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ host
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic run_op(input op_e op, input int vbase, input int vlen, input int cnt,
                        input int xlbase, output int cycles);
    int t0;
    wr(3'd1, 32'(vbase)); wr(3'd2, 32'(vlen)); wr(3'd3, PTR_BASE); wr(3'd4, ELEM_BASE);
    wr(3'd5, 32'(cnt)); wr(3'd6, 32'(xlbase)); wr(3'd7, OUT_BASE);
    t0 = $time;
    wr(3'd0, {29'd0, 2'(op), 1'b1});
    @(posedge clk);
    while (!irq) @(posedge clk);
    cycles = ($time - t0) / 10;
    reg_addr = 0; #1;
    checks++;
    if (reg_rdata[1:0] != 2'b10) begin failures++; $display("FAIL status %h", reg_rdata); end
  endtask

  // --------------------------------------------------------- test matrices
  int          ptr [];
  int          eidx [$];
  fp32_t       eval [$];
  fp32_t       vecv [NV];

  // nmaj rows (or columns) with minor indices in [0, NV), sorted
  task automatic gen_matrix(input int nmaj, input int maxlen, input int empty_pct);
    ptr = new[nmaj + 1];
    eidx.delete(); eval.delete();
    ptr[0] = 0;
    for (int r = 0; r < nmaj; r++) begin
      int len;
      int cols [$];
      len = (($urandom % 100) < empty_pct) ? 0 : 1 + $urandom % maxlen;
      for (int k = 0; k < len; k++) cols.push_back($urandom % NV);
      cols.sort();
      foreach (cols[k]) begin eidx.push_back(cols[k]); eval.push_back(rand_val()); end
      ptr[r + 1] = eidx.size();
    end
    for (int r = 0; r <= nmaj; r++) mem.mem[PTR_BASE + r] = {32'd0, 32'(ptr[r])};
    foreach (eidx[k]) mem.mem[ELEM_BASE + k] = {eval[k], 32'(eidx[k])};
  endtask

  task automatic load_vector(input int base);
    for (int i = 0; i < NV; i++) begin
      vecv[i] = rand_val();
      mem.mem[base + i] = {vecv[i], 32'hdead_0000 ^ 32'(i)};
    end
  endtask

  // reload = 0 keeps the x subset already in the PE RAMs (vec_len = 0)
  task automatic test_dot(input int nrows, input int maxlen, input int empty_pct,
                          input bit reload, output int cyc);
    fp32_t part [NUM_PE];
    fp32_t y;
    gen_matrix(nrows, maxlen, empty_pct);
    if (reload) load_vector(X_BASE);
    for (int r = 0; r < nrows; r++) mem.mem[OUT_BASE + r] = '0;
    run_op(OP_SPMDV_CSR, X_BASE, reload ? NV : 0, nrows, 0, cyc);
    for (int r = 0; r < nrows; r++) begin
      for (int p = 0; p < NUM_PE; p++) part[p] = '0;
      for (int k = ptr[r]; k < ptr[r + 1]; k++)
        part[eidx[k] % NUM_PE] = ref_add(ref_mul(eval[k], vecv[eidx[k]]), part[eidx[k] % NUM_PE]);
      y = ref_add(ref_add(part[0], part[1]), ref_add(part[2], part[3]));
      checks++;
      if (mem.mem[OUT_BASE + r] !== {y, 32'(r)}) begin
        failures++;
        $display("FAIL spMdV_csr row %0d got %h expected %h", r, mem.mem[OUT_BASE + r], {y, 32'(r)});
      end
    end
  endtask

  task automatic test_update(input op_e op, input int nmaj, input int maxlen, input int nx);
    int xl [$];
    fp32_t xv [$];
    int cyc;
    gen_matrix(nmaj, maxlen, 5);
    load_vector(Y_BASE);
    // x list: nx distinct majors in random order (all of them when nx == nmaj)
    for (int j = 0; j < nmaj; j++) xl.push_back(j);
    xl.shuffle();
    while (xl.size() > nx) void'(xl.pop_back());
    foreach (xl[j]) begin
      xv.push_back(rand_val());
      mem.mem[XL_BASE + j] = {xv[j], 32'(xl[j])};
    end
    for (int i = 0; i < NV; i++) mem.mem[OUT_BASE + i] = '0;
    run_op(op, Y_BASE, NV, nx, XL_BASE, cyc);
    foreach (xl[j])
      for (int k = ptr[xl[j]]; k < ptr[xl[j] + 1]; k++)
        vecv[eidx[k]] = ref_add(ref_mul(eval[k], xv[j]), vecv[eidx[k]]);
    for (int i = 0; i < NV; i++) begin
      checks++;
      if (mem.mem[OUT_BASE + i] !== {vecv[i], 32'(i)}) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s y[%0d] got %h expected %h", op.name(), i, mem.mem[OUT_BASE + i], {vecv[i], 32'(i)});
      end
    end
    $display("%s: %0d x entries, %0d cycles", op.name(), nx, cyc);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    int cyc, nel;
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    test_dot(300, 40, 15, 1'b1, cyc);
    $display("spMdV_csr: 300 rows, %0d elements, %0d cycles", eidx.size(), cyc);

    // throughput: x stays loaded, no memory back-pressure
    stall_pct = 0;
    test_dot(4, 2000, 0, 1'b0, cyc);
    nel = eidx.size();
    $display("spMdV_csr throughput: %0d elements in %0d cycles", nel, cyc);
    checks++;
    if (nel < cyc) begin failures++; $display("FAIL below one element per cycle"); end
    stall_pct = 10;
    test_update(OP_SPMSPV_CSC, 400, 60, 150);
    test_update(OP_SCALE_UPDATE, 300, 60, 300);
    test_update(OP_SPMDV_CSC, 200, 60, 200);

    $display("mechanisms:");
    need("empty rows", ev_empty_row);
    need("two words in one cycle", ev_dual);
    need("PE conflict stalls", ev_conflict);
    need("read buffer full", ev_rb_full);
    need("memory read back-pressure", ev_rd_bp);
    need("memory write back-pressure", ev_wr_bp);
    for (int o = 0; o < 4; o++) need($sformatf("operation %s", op_e'(o)), int'(ev_op[o]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
