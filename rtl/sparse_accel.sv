// sparse_accel: one accelerator block for sparse matrix analytics.
//
// The block executes the four sparse compute patterns that dominate machine
// learning training on sparse data: spMdV_csr (y = A x, A in CSR, x dense),
// spMspV_csc (y += A x, A in CSC, x sparse), spMdV_csc (the same with every
// column) and scale_update (y += the rows of a CSR matrix, each scaled by its
// factor in x). The host library writes an operation descriptor into the
// control registers (ctrl_regs) and starts the block; the data management
// unit (dmu) then reads the matrix, pointers and vectors from memory on its
// own, distributes the matrix elements over NUM_PE processing elements (pe)
// and writes the result vector back. The randomly accessed vector subset
// lives in the PE RAMs, so memory is only ever streamed.
//
// Interfaces: a 3-bit register port for the host (reg_we/reg_addr/reg_wdata,
// combinational reg_rdata), and a memory port with an in-order read channel
// (beat address request with valid/ready, response valid with 128-bit data,
// no back-pressure) and a write channel (beat address, data, two-bit word
// mask, valid/ready). `irq` pulses for one cycle when an operation completes;
// `sched_stall` is a performance event, high in each cycle in which the PE
// scheduler holds back a word because its PE cannot take it.
// The DMU/PE organisation and the four PEs per block follow the document; the
// register map, memory protocol and data layout are this design's own.
module sparse_accel
  import spa_pkg::*;
#(
  parameter int unsigned NUM_PE   = 4,
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned RB_DEPTH = 64,
  parameter int unsigned OB_DEPTH = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host register port
  input  logic                      reg_we,
  input  logic [2:0]                reg_addr,
  input  logic [31:0]               reg_wdata,
  output logic [31:0]               reg_rdata,
  output logic                      irq,
  output logic                      sched_stall,
  // memory read channel
  output logic                      mem_rreq_valid,
  input  logic                      mem_rreq_ready,
  output logic [31:0]               mem_rreq_addr,
  input  logic                      mem_rrsp_valid,
  input  logic [BEAT_W-1:0]         mem_rrsp_data,
  // memory write channel
  output logic                      mem_wreq_valid,
  input  logic                      mem_wreq_ready,
  output logic [31:0]               mem_wreq_addr,
  output logic [BEAT_W-1:0]         mem_wreq_data,
  output logic [WORDS_PER_BEAT-1:0] mem_wreq_mask
);

  localparam int unsigned AW = $clog2(DEPTH);

  cfg_t                 cfg;
  logic                 start, busy, done_pulse, dot_mode, ev_sched_stall;
  logic    [NUM_PE-1:0] pe_valid, pe_ready, pe_sum_valid, pe_sum_ready, pe_idle;
  pe_cmd_t [NUM_PE-1:0] pe_cmd;
  fp32_t   [NUM_PE-1:0] pe_sum, drain_data;
  logic    [AW-1:0]     drain_addr;

  ctrl_regs u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .busy, .done_pulse, .cfg, .start
  );

  dmu #(.NUM_PE(NUM_PE), .DEPTH(DEPTH), .RB_DEPTH(RB_DEPTH), .OB_DEPTH(OB_DEPTH)) u_dmu (
    .clk, .rst_n, .cfg, .start, .busy, .done_pulse,
    .mem_rreq_valid, .mem_rreq_ready, .mem_rreq_addr, .mem_rrsp_valid, .mem_rrsp_data,
    .mem_wreq_valid, .mem_wreq_ready, .mem_wreq_addr, .mem_wreq_data, .mem_wreq_mask,
    .dot_mode, .ev_sched_stall,
    .pe_valid, .pe_ready, .pe_cmd,
    .pe_sum_valid, .pe_sum_ready, .pe_sum,
    .drain_addr, .drain_data, .pe_idle
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe #(.PE_ID(p), .NUM_PE(NUM_PE), .DEPTH(DEPTH)) u_pe (
      .clk, .rst_n, .dot_mode,
      .in_valid (pe_valid[p]),     .in_ready (pe_ready[p]),     .in_cmd(pe_cmd[p]),
      .sum_valid(pe_sum_valid[p]), .sum_ready(pe_sum_ready[p]), .sum_data(pe_sum[p]),
      .drain_addr, .drain_data(drain_data[p]),
      .idle(pe_idle[p])
    );
  end

  assign irq         = done_pulse;
  assign sched_stall = ev_sched_stall;

endmodule
