// tb_accel_agent: host and memory for one accelerator block in the
// multi-block testbench. Holds a behavioural memory, builds a random sparse
// matrix and vectors for operation OP over a full 16384-entry block, programs
// the block's registers (memory latency LAT cycles), waits for its completion pulse and checks every
// result word against a reference computed in double precision with
// single-precision rounding after each operation, in the hardware's
// accumulation order. Reports its check and failure counts, its cycle
// count and the number of matrix elements the operation processes. Row lengths: with
// AVG10 = 0, 10% empty rows and otherwise 1..50 elements; with AVG10 > 0,
// uniform with a mean of about AVG10/10 elements (used to mimic the row
// lengths of a dataset after column blocking). The memory regions follow one
// another: pointers, elements (at most MAXE), x list, output, vector.
module tb_accel_agent
  import spa_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int OP    = 0,
  parameter int NMAJ  = 200,
  parameter int LAT   = 20,
  parameter int AVG10 = 0,
  parameter int MAXE  = 49000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      reg_we,
  output logic [2:0]                reg_addr,
  output logic [31:0]               reg_wdata,
  input  logic [31:0]               reg_rdata,
  input  logic                      irq,
  input  logic                      mem_rreq_valid,
  output logic                      mem_rreq_ready,
  input  logic [31:0]               mem_rreq_addr,
  output logic                      mem_rrsp_valid,
  output logic [BEAT_W-1:0]         mem_rrsp_data,
  input  logic                      mem_wreq_valid,
  output logic                      mem_wreq_ready,
  input  logic [31:0]               mem_wreq_addr,
  input  logic [BEAT_W-1:0]         mem_wreq_data,
  input  logic [WORDS_PER_BEAT-1:0] mem_wreq_mask,
  output int                        checks,
  output int                        failures,
  output int                        cycles,
  output int                        elems,
  output bit                        finished
);

  localparam int NUM_PE = 4, DEPTH = 4096, NV = NUM_PE * DEPTH;
  localparam int X_BASE = 0, PTR_BASE = NV + 3616, ELEM_BASE = PTR_BASE + NMAJ + 1,
                 XL_BASE = ELEM_BASE + MAXE, OUT_BASE = XL_BASE + NMAJ,
                 Y_BASE = OUT_BASE + (NMAJ > NV ? NMAJ : NV), MEM_WORDS = Y_BASE + NV;

  int unsigned stall_pct = 10;

  tb_mem_model #(.WORDS(MEM_WORDS + MEM_WORDS % 2), .LATENCY(LAT)) mem (
    .clk, .stall_pct,
    .rreq_valid(mem_rreq_valid), .rreq_ready(mem_rreq_ready), .rreq_addr(mem_rreq_addr),
    .rrsp_valid(mem_rrsp_valid), .rrsp_data(mem_rrsp_data),
    .wreq_valid(mem_wreq_valid), .wreq_ready(mem_wreq_ready), .wreq_addr(mem_wreq_addr),
    .wreq_data(mem_wreq_data), .wreq_mask(mem_wreq_mask));

  int    ptr [];
  int    eidx [$];
  fp32_t eval [$];
  fp32_t vecv [NV];

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  initial begin
    op_e   op;
    int    xl [$];
    fp32_t xv [$];
    fp32_t part [NUM_PE];
    fp32_t y;
    int    t0, cnt;
    op = op_e'(OP);
    checks = 0; failures = 0; finished = 0; cycles = 0; elems = 0;
    reg_we = 0; reg_addr = 0; reg_wdata = 0;
    // matrix
    ptr = new[NMAJ + 1];
    ptr[0] = 0;
    for (int r = 0; r < NMAJ; r++) begin
      automatic int len;
      automatic int cols [$];
      if (AVG10 == 0) len = ($urandom % 10 == 0) ? 0 : 1 + $urandom % 50;
      else            len = (int'($urandom % (2 * AVG10 + 1)) + 5) / 10;
      if (int'(eidx.size()) + len > MAXE) len = MAXE - eidx.size();
      for (int k = 0; k < len; k++) cols.push_back($urandom % NV);
      cols.sort();
      foreach (cols[k]) begin eidx.push_back(cols[k]); eval.push_back(rand_val()); end
      ptr[r + 1] = eidx.size();
    end
    elems = eidx.size();
    for (int r = 0; r <= NMAJ; r++) mem.mem[PTR_BASE + r] = {32'd0, 32'(ptr[r])};
    foreach (eidx[k]) mem.mem[ELEM_BASE + k] = {eval[k], 32'(eidx[k])};
    for (int i = 0; i < NV; i++) begin
      vecv[i] = rand_val();
      mem.mem[(is_dot(op) ? X_BASE : Y_BASE) + i] = {vecv[i], 32'd0};
    end
    // x list for the update patterns: all majors for the dense variants
    for (int j = 0; j < NMAJ; j++)
      if (op != OP_SPMSPV_CSC || ($urandom % 3 == 0)) xl.push_back(j);
    xl.shuffle();
    foreach (xl[j]) begin xv.push_back(rand_val()); mem.mem[XL_BASE + j] = {xv[j], 32'(xl[j])}; end
    cnt = is_dot(op) ? NMAJ : xl.size();
    if (!is_dot(op)) begin
      elems = 0;
      foreach (xl[j]) elems += ptr[xl[j] + 1] - ptr[xl[j]];
    end

    wait (rst_n);
    repeat (2) @(posedge clk);
    wr(3'd1, is_dot(op) ? X_BASE : Y_BASE); wr(3'd2, NV); wr(3'd3, PTR_BASE);
    wr(3'd4, ELEM_BASE); wr(3'd5, 32'(cnt)); wr(3'd6, XL_BASE); wr(3'd7, OUT_BASE);
    t0 = $time;
    wr(3'd0, {29'd0, 2'(op), 1'b1});
    @(posedge clk);
    while (!irq) @(posedge clk);
    cycles = ($time - t0) / 10;

    if (is_dot(op)) begin
      for (int r = 0; r < NMAJ; r++) begin
        for (int p = 0; p < NUM_PE; p++) part[p] = '0;
        for (int k = ptr[r]; k < ptr[r + 1]; k++)
          part[eidx[k] % NUM_PE] = ref_add(ref_mul(eval[k], vecv[eidx[k]]), part[eidx[k] % NUM_PE]);
        y = ref_add(ref_add(part[0], part[1]), ref_add(part[2], part[3]));
        checks++;
        if (mem.mem[OUT_BASE + r] !== {y, 32'(r)}) begin
          failures++;
          $display("FAIL %s row %0d got %h expected %h", op.name(), r, mem.mem[OUT_BASE + r], {y, 32'(r)});
        end
      end
    end else begin
      foreach (xl[j])
        for (int k = ptr[xl[j]]; k < ptr[xl[j] + 1]; k++)
          vecv[eidx[k]] = ref_add(ref_mul(eval[k], xv[j]), vecv[eidx[k]]);
      for (int i = 0; i < NV; i++) begin
        checks++;
        if (mem.mem[OUT_BASE + i] !== {vecv[i], 32'(i)}) begin
          failures++;
          if (failures < 5) $display("FAIL %s y[%0d] got %h expected %h", op.name(), i, mem.mem[OUT_BASE + i], {vecv[i], 32'(i)});
        end
      end
    end
    finished = 1;
  end

endmodule
