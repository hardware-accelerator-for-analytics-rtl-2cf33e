// tb_pe_scheduler: random read-buffer entries (element beats with random
// masks and indices, some out of the block, load beats, end-of-row markers)
// are offered to the scheduler while each PE accepts at random. Every PE must
// receive exactly its own words in stream order, with the right command kind
// and x value, and an EOR after the words of each marked entry. Also checks
// that two words can leave in one cycle and that conflicts stall.
module tb_pe_scheduler;
  import spa_pkg::*;
  localparam int N = 4, DEPTH = 4096, ENTRIES = 3000;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, stall, idle;
  rb_entry_t in_entry;
  logic [N-1:0] pe_valid, pe_ready;
  pe_cmd_t [N-1:0] pe_cmd;
  pe_cmd_t expq [N][$];
  rb_entry_t entries [ENTRIES];
  int checks = 0, failures = 0, ent = 0, dual = 0, stalls = 0;

  pe_scheduler #(.NUM_PE(N), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_entry, .pe_valid, .pe_ready, .pe_cmd,
    .stall_conflict(stall), .idle);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build entries and the expected per-PE command sequences
  initial begin
    for (int e = 0; e < ENTRIES; e++) begin
      rb_entry_t r;
      r = '0;
      r.load = ($urandom % 8 == 0);
      r.eor  = !r.load && ($urandom % 3 == 0);
      r.mask = 2'($urandom);
      r.xval = $urandom;
      for (int w = 0; w < 2; w++) begin
        r.words[w].val = $urandom;
        r.words[w].idx = ($urandom % 20 == 0) ? 32'(N * DEPTH + $urandom % 100)
                                              : 32'($urandom % (N * DEPTH));
      end
      entries[e] = r;
      for (int w = 0; w < 2; w++) begin
        if (r.mask[w] && r.words[w].idx < N * DEPTH) begin
          pe_cmd_t c;
          c.kind = r.load ? CMD_LOAD : CMD_ELEM;
          c.word = r.words[w];
          c.xval = r.xval;
          expq[r.words[w].idx % N].push_back(c);
        end
      end
      if (r.eor)
        for (int p = 0; p < N; p++) expq[p].push_back('{kind: CMD_EOR, word: '0, xval: '0});
    end
  end

  assign in_valid = rst_n && (ent < ENTRIES);
  assign in_entry = entries[ent % ENTRIES];

  always @(posedge clk) begin
    if (rst_n) begin
      pe_ready <= N'($urandom);
      if (in_valid && in_ready) ent <= ent + 1;
      if ($countones(pe_valid & pe_ready) >= 2 && !(&pe_valid)) dual++;
      if (stall) stalls++;
      for (int p = 0; p < N; p++) begin
        if (pe_valid[p] && pe_ready[p]) begin
          checks++;
          if (expq[p].size() == 0) begin
            failures++; $display("FAIL PE %0d: unexpected command", p);
          end else begin
            pe_cmd_t e;
            e = expq[p].pop_front();
            if (pe_cmd[p].kind != e.kind || pe_cmd[p].word != e.word ||
                (e.kind != CMD_EOR && pe_cmd[p].xval != e.xval)) begin
              failures++;
              $display("FAIL PE %0d: got %p expected %p", p, pe_cmd[p], e);
            end
          end
        end
      end
    end
  end

  initial begin
    pe_ready = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (ent == ENTRIES);
    repeat (3) @(posedge clk);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (expq[p].size() != 0) begin failures++; $display("FAIL PE %0d missing %0d", p, expq[p].size()); end
    end
    checks += 2;
    if (dual == 0)   begin failures++; $display("FAIL never two words in a cycle"); end
    if (stalls == 0) begin failures++; $display("FAIL never stalled"); end
    $display("dual-issue cycles %0d, conflict stalls %0d", dual, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
