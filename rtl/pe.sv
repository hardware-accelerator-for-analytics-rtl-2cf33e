// pe: processing element.
//
// A PE owns one sub-block of the matrix block: the vector entries whose index
// it owns (index mod NUM_PE == PE_ID, see pe_unpack) live in its RAM (pe_ram). Commands from the PE scheduler
// wait in a small queue and are executed one per clock:
//   CMD_LOAD  RAM[idx] <= val                       (vector load by the DMU)
//   CMD_ELEM, dot_mode (spMdV_csr):
//             sum <= A.val * RAM[A.idx] + sum       (dot product of a row part)
//   CMD_ELEM, update mode (spMspV_csc, spMdV_csc, scale_update):
//             RAM[A.idx] <= A.val * x.val + RAM[A.idx]
//   CMD_EOR   end-of-row marker: the sum register is pushed to the PE's sum
//             queue for the reduction unit and cleared (dot_mode only).
// The unpack logic (pe_unpack) extracts value and local address from each
// command word; a word the PE does not own is ignored. An EOR waits while the
// sum queue is full, stalling the command queue behind it. The RAM write of
// one update is visible to the next element's read, so back-to-back updates
// of the same entry need no forwarding. idle is high when the command queue
// is empty. drain_addr/drain_data give the DMU a second, combinational RAM
// read port for writing the vector back. The datapath configurations follow
// the document's description of the PE; the queue depths, single-cycle
// execution and the command encoding are this design's own choices.
module pe
  import spa_pkg::*;
#(
  parameter int unsigned PE_ID  = 0,
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned QDEPTH = 4,
  parameter int unsigned SDEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dot_mode,
  // commands from the PE scheduler
  input  logic                     in_valid,
  output logic                     in_ready,
  input  pe_cmd_t                  in_cmd,
  // row sub-block sums to the reduction unit
  output logic                     sum_valid,
  input  logic                     sum_ready,
  output fp32_t                    sum_data,
  // vector read-back
  input  logic [$clog2(DEPTH)-1:0] drain_addr,
  output fp32_t                    drain_data,
  output logic                     idle
);

  localparam int unsigned AW = $clog2(DEPTH);

  pe_cmd_t                 cmd;
  logic                    cmd_valid, cmd_pop;
  fp32_t                   val, ram_rd, fma_a, fma_b, fma_c, fma_y;
  logic [AW-1:0]           addr;
  logic                    own;
  fp32_t                   sum_q;
  logic                    sq_in_valid, sq_in_ready;
  logic                    ram_we;
  // occupancies are not needed by the PE itself

  sync_fifo #(.T(pe_cmd_t), .DEPTH(QDEPTH)) u_cmdq (
    .clk, .rst_n,
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_cmd),
    .out_valid(cmd_valid), .out_ready(cmd_pop), .out_data(cmd),
    .count    ()
  );

  pe_unpack #(.PE_ID(PE_ID), .NUM_PE(NUM_PE), .DEPTH(DEPTH)) u_unpack (
    .word(cmd.word), .val(val), .addr(addr), .own(own)
  );

  pe_ram #(.DEPTH(DEPTH), .WIDTH(32)) u_ram (
    .clk,
    .we     (ram_we),
    .waddr  (addr),
    .wdata  ((cmd.kind == CMD_LOAD) ? val : fma_y),
    .raddr_a(addr),
    .rdata_a(ram_rd),
    .raddr_b(drain_addr),
    .rdata_b(drain_data)
  );

  // datapath configuration (the two FMA hookups of the document's PE figure)
  always_comb begin
    fma_a = val;
    if (dot_mode) begin
      fma_b = ram_rd;
      fma_c = sum_q;
    end else begin
      fma_b = cmd.xval;
      fma_c = ram_rd;
    end
  end

  fma_unit u_fma (.a(fma_a), .b(fma_b), .c(fma_c), .y(fma_y));

  always_comb begin
    ram_we      = 1'b0;
    sq_in_valid = 1'b0;
    cmd_pop     = 1'b0;
    if (cmd_valid) begin
      unique case (cmd.kind)
        CMD_LOAD: begin
          ram_we  = own;
          cmd_pop = 1'b1;
        end
        CMD_ELEM: begin
          ram_we  = own && !dot_mode;
          cmd_pop = 1'b1;
        end
        CMD_EOR: begin
          sq_in_valid = dot_mode;
          cmd_pop     = !dot_mode || sq_in_ready;
        end
        default: cmd_pop = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
    end else if (cmd_valid && dot_mode) begin
      if (cmd.kind == CMD_ELEM && own)                sum_q <= fma_y;
      else if (cmd.kind == CMD_EOR && sq_in_ready)    sum_q <= '0;
    end
  end

  sync_fifo #(.T(fp32_t), .DEPTH(SDEPTH)) u_sumq (
    .clk, .rst_n,
    .in_valid (sq_in_valid), .in_ready (sq_in_ready), .in_data (sum_q),
    .out_valid(sum_valid), .out_ready(sum_ready), .out_data(sum_data),
    .count    ()
  );

  assign idle = !cmd_valid;

endmodule
