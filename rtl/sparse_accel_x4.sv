// sparse_accel_x4: the multi-block accelerator configuration.
//
// Performance is scaled by placing several accelerator blocks in the system,
// each with its own PEs, its own host register port and its own memory port
// (each block taps the memory interface of one processor core), so that the
// blocks together match the aggregate memory bandwidth: four blocks of four
// PEs for four cores' worth of bandwidth. The blocks work on different matrix
// blocks, or different operations, independently; there is no connection
// between them. Port arrays are indexed by block number and carry exactly the
// signals of sparse_accel. The number of blocks and of PEs per block follow
// the document; giving every block separate ports is this design's choice,
// since the shared interconnect lies outside the accelerator.
module sparse_accel_x4
  import spa_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 4,
  parameter int unsigned NUM_PE     = 4,
  parameter int unsigned DEPTH      = 4096,
  parameter int unsigned RB_DEPTH   = 64,
  parameter int unsigned OB_DEPTH   = 16
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic [NUM_BLOCKS-1:0]                      reg_we,
  input  logic [NUM_BLOCKS-1:0][2:0]                 reg_addr,
  input  logic [NUM_BLOCKS-1:0][31:0]                reg_wdata,
  output logic [NUM_BLOCKS-1:0][31:0]                reg_rdata,
  output logic [NUM_BLOCKS-1:0]                      irq,
  output logic [NUM_BLOCKS-1:0]                      sched_stall,
  output logic [NUM_BLOCKS-1:0]                      mem_rreq_valid,
  input  logic [NUM_BLOCKS-1:0]                      mem_rreq_ready,
  output logic [NUM_BLOCKS-1:0][31:0]                mem_rreq_addr,
  input  logic [NUM_BLOCKS-1:0]                      mem_rrsp_valid,
  input  logic [NUM_BLOCKS-1:0][BEAT_W-1:0]          mem_rrsp_data,
  output logic [NUM_BLOCKS-1:0]                      mem_wreq_valid,
  input  logic [NUM_BLOCKS-1:0]                      mem_wreq_ready,
  output logic [NUM_BLOCKS-1:0][31:0]                mem_wreq_addr,
  output logic [NUM_BLOCKS-1:0][BEAT_W-1:0]          mem_wreq_data,
  output logic [NUM_BLOCKS-1:0][WORDS_PER_BEAT-1:0]  mem_wreq_mask
);

  for (genvar b = 0; b < NUM_BLOCKS; b++) begin : g_blk
    sparse_accel #(.NUM_PE(NUM_PE), .DEPTH(DEPTH), .RB_DEPTH(RB_DEPTH), .OB_DEPTH(OB_DEPTH)) u_acc (
      .clk, .rst_n,
      .reg_we(reg_we[b]), .reg_addr(reg_addr[b]), .reg_wdata(reg_wdata[b]), .reg_rdata(reg_rdata[b]),
      .irq(irq[b]), .sched_stall(sched_stall[b]),
      .mem_rreq_valid(mem_rreq_valid[b]), .mem_rreq_ready(mem_rreq_ready[b]),
      .mem_rreq_addr(mem_rreq_addr[b]), .mem_rrsp_valid(mem_rrsp_valid[b]),
      .mem_rrsp_data(mem_rrsp_data[b]),
      .mem_wreq_valid(mem_wreq_valid[b]), .mem_wreq_ready(mem_wreq_ready[b]),
      .mem_wreq_addr(mem_wreq_addr[b]), .mem_wreq_data(mem_wreq_data[b]),
      .mem_wreq_mask(mem_wreq_mask[b])
    );
  end

endmodule
