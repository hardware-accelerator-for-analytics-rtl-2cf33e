// pe_scheduler: distributes read-buffer entries across the PEs.
//
// Each read-buffer entry carries up to two words of one memory beat. A word
// goes to the PE that owns its index (index mod NUM_PE, see pe_unpack); words
// whose index lies outside the block (index >= NUM_PE * DEPTH) are dropped. In one cycle every word whose target PE can accept a command is
// dispatched, at most one word per PE; word 1 waits while word 0 is still
// pending for the same PE so that each PE sees its elements in stream order.
// An entry flagged with an end-of-row marker is followed, once all its words
// are out, by an EOR command broadcast to all PEs in one cycle (it waits
// until every PE queue has room). The entry is popped in the cycle its last
// command leaves. Dispatch is therefore dynamic: a slow or full PE only holds
// up words that target it, and up to two elements leave per cycle.
// stall_conflict is high in a cycle in which a pending word could not leave,
// either because the other word of the beat took its PE or because the PE's
// queue was full. The document
// gives the scheduler's role; this ownership-based dispatch rule is this
// design's own choice.
module pe_scheduler
  import spa_pkg::*;
#(
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned DEPTH  = 4096
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  rb_entry_t             in_entry,
  output logic    [NUM_PE-1:0]  pe_valid,
  input  logic    [NUM_PE-1:0]  pe_ready,
  output pe_cmd_t [NUM_PE-1:0]  pe_cmd,
  output logic                  stall_conflict,
  output logic                  idle
);

  localparam int unsigned PW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  localparam int unsigned W  = WORDS_PER_BEAT;

  logic [W-1:0]  done_q, rem, sent, drop;
  logic [PW-1:0] tgt   [W];
  logic [W-1:0]  inrng;
  logic [NUM_PE-1:0] claimed;
  logic          eor_send;
  logic          blocked;

  always_comb begin
    pe_valid       = '0;
    pe_cmd         = '0;
    sent           = '0;
    drop           = '0;
    claimed        = '0;
    eor_send       = 1'b0;
    stall_conflict = 1'b0;
    blocked        = 1'b0;
    rem            = in_valid ? (in_entry.mask & ~done_q) : '0;
    for (int w = 0; w < W; w++) begin
      tgt[w]   = (NUM_PE > 1) ? in_entry.words[w].idx[PW-1:0] : '0;
      inrng[w] = ((in_entry.words[w].idx >> PW) < 32'(DEPTH));
    end
    for (int w = 0; w < W; w++) begin
      if (rem[w]) begin
        if (!inrng[w]) begin
          drop[w] = 1'b1;
        end else begin
          blocked = claimed[tgt[w]];
          for (int v = 0; v < w; v++)
            if (rem[v] && !drop[v] && inrng[v] && tgt[v] == tgt[w]) blocked = 1'b1;
          if (!blocked && pe_ready[tgt[w]]) begin
            sent[w]               = 1'b1;
            claimed[tgt[w]]       = 1'b1;
            pe_valid[tgt[w]]      = 1'b1;
            pe_cmd[tgt[w]].kind   = in_entry.load ? CMD_LOAD : CMD_ELEM;
            pe_cmd[tgt[w]].word   = in_entry.words[w];
            pe_cmd[tgt[w]].xval   = in_entry.xval;
          end
        end
      end
    end
    // end-of-row marker once every word of the entry has been dispatched
    if (in_valid && rem == '0 && in_entry.eor && (&pe_ready)) begin
      eor_send = 1'b1;
      for (int p = 0; p < NUM_PE; p++) begin
        pe_valid[p]       = 1'b1;
        pe_cmd[p].kind    = CMD_EOR;
        pe_cmd[p].word    = '0;
        pe_cmd[p].xval    = '0;
      end
    end
    stall_conflict = |(rem & ~(sent | drop));
    in_ready = in_valid && ((rem & ~(sent | drop)) == '0) &&
               (!in_entry.eor || eor_send);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        done_q <= '0;
    else if (in_ready) done_q <= '0;
    else if (in_valid) done_q <= done_q | sent | drop;
  end

  assign idle = !in_valid;

endmodule
