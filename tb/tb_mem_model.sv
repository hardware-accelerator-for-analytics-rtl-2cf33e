// tb_mem_model: behavioural memory for the accelerator testbenches.
//
// WORDS 64-bit words, addressed by 128-bit beats (beat b holds words 2b and
// 2b+1, word 2b in the low half). Read requests are accepted when the model
// is not stalling (random, STALL percent of cycles, set by stall_pct) and are
// answered in order LATENCY cycles later, at most one beat per cycle. Write
// requests are accepted under the same random stall and update the words
// selected by the mask. Stands in for the memory system the accelerator
// shares with the host processors; it is not part of the design.
module tb_mem_model
  import spa_pkg::*;
#(
  parameter int unsigned WORDS   = 1 << 17,
  parameter int unsigned LATENCY = 20
) (
  input  logic                      clk,
  input  int unsigned               stall_pct,
  input  logic                      rreq_valid,
  output logic                      rreq_ready,
  input  logic [31:0]               rreq_addr,
  output logic                      rrsp_valid,
  output logic [BEAT_W-1:0]         rrsp_data,
  input  logic                      wreq_valid,
  output logic                      wreq_ready,
  input  logic [31:0]               wreq_addr,
  input  logic [BEAT_W-1:0]         wreq_data,
  input  logic [WORDS_PER_BEAT-1:0] wreq_mask
);

  logic [63:0] mem [WORDS];
  longint unsigned cycle = 0;
  longint unsigned due [$];
  logic [31:0]     addrq [$];
  int unsigned     rd_beats = 0, wr_words = 0, rd_stalls = 0, wr_stalls = 0;

  initial begin
    rreq_ready = 1'b0;
    wreq_ready = 1'b0;
    rrsp_valid = 1'b0;
    rrsp_data  = '0;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    // accept
    if (rreq_valid && rreq_ready) begin
      due.push_back(cycle + LATENCY);
      addrq.push_back(rreq_addr);
      rd_beats++;
    end
    if (rreq_valid && !rreq_ready) rd_stalls++;
    if (wreq_valid && !wreq_ready) wr_stalls++;
    if (wreq_valid && wreq_ready) begin
      for (int w = 0; w < WORDS_PER_BEAT; w++)
        if (wreq_mask[w]) begin
          mem[(2 * wreq_addr + w) % WORDS] <= wreq_data[64*w +: 64];
          wr_words++;
        end
    end
    // respond
    if (due.size() != 0 && due[0] <= cycle) begin
      logic [31:0] a;
      void'(due.pop_front());
      a = addrq.pop_front();
      rrsp_valid <= 1'b1;
      rrsp_data  <= {mem[(2 * a + 1) % WORDS], mem[(2 * a) % WORDS]};
    end else begin
      rrsp_valid <= 1'b0;
    end
    rreq_ready <= ($urandom % 100) >= stall_pct;
    wreq_ready <= ($urandom % 100) >= stall_pct;
  end

endmodule
