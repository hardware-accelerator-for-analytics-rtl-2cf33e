// dmu: data management unit of one accelerator block.
//
// The DMU turns an operation descriptor (cfg_t, from the control registers)
// into memory traffic and PE commands, and writes the results back:
//
//  * Vector load. If vec_len is non-zero, vec_len words starting at vec_base
//    are streamed into the PE RAMs (entry k goes to PE k % NUM_PE, address
//    k / NUM_PE): the x subset for spMdV_csr, the initial y subset otherwise.
//  * spMdV_csr. For each of the `count` rows the DMU takes the next row
//    pointer from the pointer queue, streams the row's {A.val, A.idx} elements and tags the last beat of the
//    row with an end-of-row marker (an empty row gets a beat with no valid
//    word, only the marker). The reduction unit adds the PEs' row sums and the
//    output buffer holds the results until the write channel stores row r as
//    {y_r, r} at out_base + r.
//  * spMspV_csc, spMdV_csc, scale_update. For each of the `count` entries of
//    the {x.val, x.idx} list at xlist_base (from the prefetch queue), the DMU
//    reads the two pointers of column (or row) x.idx and streams its
//    elements together with x.val; the
//    PEs update their RAMs. When everything has drained, the vector is read
//    back out of the PE RAMs and written as {y_k, k} to out_base + k.
//
// Memory port: reads are requested one 128-bit beat (two words) at a time by
// beat address (word address / 2) and answered in order, any number of
// cycles later, without back-pressure. A request-bookkeeping queue remembers
// what each outstanding beat is for. Element beats are only requested while
// the read buffer (RB_DEPTH entries) has room for every outstanding one, so a
// response can always be accepted; pointer beats go to the control state
// machine. Writes are one word per request with a two-bit word mask.
// Sequential control data is read ahead into a prefetch queue of PQ words,
// one word per request: the row pointers for spMdV_csr, the x-list entries
// for the other patterns. A prefetch request takes the read port whenever the
// queue has room, unless another request is already waiting for the memory,
// so a row only waits for its pointer when the queue has run dry.
// The read buffer feeds the PE scheduler, which spreads the words over the
// PEs. The structure (read buffer, PE scheduler, reduction unit, output
// buffer) follows the document's block diagram; the memory protocol, the data
// layout, the buffer sizes and the control sequencing are this design's own
// choices. In the update patterns the two pointers of each column (whose
// address depends on the x-list entry) are requested back to back and waited
// for, so each column costs one memory round trip on top of streaming its
// elements.
module dmu
  import spa_pkg::*;
#(
  parameter int unsigned NUM_PE   = 4,
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned RB_DEPTH = 64,
  parameter int unsigned OB_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cfg_t                        cfg,
  input  logic                        start,
  output logic                        busy,
  output logic                        done_pulse,
  // memory read channel
  output logic                        mem_rreq_valid,
  input  logic                        mem_rreq_ready,
  output logic [31:0]                 mem_rreq_addr,
  input  logic                        mem_rrsp_valid,
  input  logic [BEAT_W-1:0]           mem_rrsp_data,
  // memory write channel
  output logic                        mem_wreq_valid,
  input  logic                        mem_wreq_ready,
  output logic [31:0]                 mem_wreq_addr,
  output logic [BEAT_W-1:0]           mem_wreq_data,
  output logic [WORDS_PER_BEAT-1:0]   mem_wreq_mask,
  // PE side
  output logic                        dot_mode,
  output logic                        ev_sched_stall,
  output logic    [NUM_PE-1:0]        pe_valid,
  input  logic    [NUM_PE-1:0]        pe_ready,
  output pe_cmd_t [NUM_PE-1:0]        pe_cmd,
  input  logic    [NUM_PE-1:0]        pe_sum_valid,
  output logic    [NUM_PE-1:0]        pe_sum_ready,
  input  fp32_t   [NUM_PE-1:0]        pe_sum,
  output logic    [$clog2(DEPTH)-1:0] drain_addr,
  input  fp32_t   [NUM_PE-1:0]        drain_data,
  input  logic    [NUM_PE-1:0]        pe_idle
);

  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned PW  = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  localparam int unsigned MQ  = RB_DEPTH + 2;
  localparam int unsigned RBC = $clog2(RB_DEPTH + 1);
  localparam int unsigned PQ  = 16;
  localparam int unsigned PQC = $clog2(PQ + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_STREAM, S_PTR_ISSUE, S_PTR_WAIT,
    S_D_ROW,
    S_U_X, S_U_P1GOT,
    S_DRAIN, S_STORE, S_FINISH
  } state_e;

  // what an outstanding read beat is for
  typedef struct packed {
    logic                      is_ptr;
    logic                      pf;        // prefetched row pointer
    logic                      sel;       // pointer word within the beat
    logic                      sec;       // second pointer of a column
    logic                      eor;
    logic                      load;
    logic [WORDS_PER_BEAT-1:0] mask;
    fp32_t                     xval;
    logic [31:0]               base_idx;  // vector index of word 0 (load)
  } meta_t;

  state_e      state, ptr_ret, st_after;
  cfg_t        cq;
  logic [31:0] st_cur, st_last, st_s, st_e;
  logic        st_load, st_eor;
  fp32_t       st_xval;
  logic [31:0] ptr_addr;
  logic        ptr_sec;
  mem_word_t   ptr_word;
  logic [31:0] row, prev_ptr, jx, kst, rows_written;
  logic [31:0] p0;
  fp32_t       xval_q;
  logic [RBC:0] inflight;
  logic         have_prev;
  logic [31:0]  pf_addr, pf_left;
  logic [PQC:0] pf_inflight;
  logic         el_hold;

  // ------------------------------------------------------------------ buffers
  meta_t     mq_in, mq_out;
  logic      mq_push, mq_ready, mq_valid;

  rb_entry_t rb_in, rb_out;
  logic      rb_push, rb_ready, rb_valid, rb_pop;
  logic [RBC-1:0] rb_count;

  mem_word_t red_word, ob_out;
  logic      red_valid, red_ready, ob_valid, ob_pop;
  logic [$clog2(OB_DEPTH+1)-1:0] ob_count;

  logic      pq_push, pq_ready, pq_valid, pq_pop;
  mem_word_t pq_out;
  logic [PQC-1:0] pq_count;

  logic      sched_idle;
  logic      red_clear;

  sync_fifo #(.T(meta_t), .DEPTH(MQ)) u_reqq (
    .clk, .rst_n,
    .in_valid(mq_push), .in_ready(mq_ready), .in_data(mq_in),
    .out_valid(mq_valid), .out_ready(mem_rrsp_valid), .out_data(mq_out),
    .count()
  );

  // prefetch queue: row pointers (spMdV_csr) or x-list entries (others)
  sync_fifo #(.T(mem_word_t), .DEPTH(PQ)) u_ptrq (
    .clk, .rst_n,
    .in_valid(pq_push), .in_ready(pq_ready), .in_data(mem_rrsp_data[64*mq_out.sel +: 64]),
    .out_valid(pq_valid), .out_ready(pq_pop), .out_data(pq_out),
    .count(pq_count)
  );
  assign pq_push = mem_rrsp_valid && mq_out.pf;
  assign pq_pop  = pq_valid && (((state == S_D_ROW) && !(have_prev && row == cq.count)) ||
                                ((state == S_U_X) && (jx != cq.count)));

  // read buffer
  sync_fifo #(.T(rb_entry_t), .DEPTH(RB_DEPTH)) u_read_buffer (
    .clk, .rst_n,
    .in_valid(rb_push), .in_ready(rb_ready), .in_data(rb_in),
    .out_valid(rb_valid), .out_ready(rb_pop), .out_data(rb_out),
    .count(rb_count)
  );

  pe_scheduler #(.NUM_PE(NUM_PE), .DEPTH(DEPTH)) u_sched (
    .clk, .rst_n,
    .in_valid(rb_valid), .in_ready(rb_pop), .in_entry(rb_out),
    .pe_valid, .pe_ready, .pe_cmd,
    .stall_conflict(ev_sched_stall), .idle(sched_idle)
  );

  reduction_unit #(.NUM_PE(NUM_PE)) u_reduce (
    .clk, .rst_n, .clear(red_clear),
    .in_valid(pe_sum_valid), .in_ready(pe_sum_ready), .in_sum(pe_sum),
    .out_valid(red_valid), .out_ready(red_ready), .out_word(red_word)
  );

  // output buffer
  sync_fifo #(.T(mem_word_t), .DEPTH(OB_DEPTH)) u_output_buffer (
    .clk, .rst_n,
    .in_valid(red_valid), .in_ready(red_ready), .in_data(red_word),
    .out_valid(ob_valid), .out_ready(ob_pop), .out_data(ob_out),
    .count(ob_count)
  );

  // ------------------------------------------------------- read responses
  always_comb begin
    rb_in.eor  = mq_out.eor;
    rb_in.load = mq_out.load;
    rb_in.mask = mq_out.mask;
    rb_in.xval = mq_out.xval;
    for (int w = 0; w < WORDS_PER_BEAT; w++) begin
      rb_in.words[w] = mem_rrsp_data[64*w +: 64];
      if (mq_out.load) rb_in.words[w].idx = mq_out.base_idx + 32'(w);
    end
    rb_push = mem_rrsp_valid && !mq_out.is_ptr && !mq_out.pf;
  end

  // ---------------------------------------------------------- read requests
  logic        credit_ok, quiet, pf_req, el_fire, rp_fire, pf_fire;
  logic [31:0] st_word0;

  assign credit_ok = (32'(rb_count) + 32'(inflight)) < 32'(RB_DEPTH);
  assign st_word0  = {st_cur[30:0], 1'b0};
  assign quiet     = (inflight == '0) && !rb_valid && sched_idle && (&pe_idle) &&
                     !mq_valid;

  // a pointer prefetch needs room in the pointer queue for every pointer in
  // flight, and yields to an element request that is already waiting
  assign pf_req = (pf_left != '0) && !el_hold &&
                  ((32'(pq_count) + 32'(pf_inflight)) < 32'(PQ));

  always_comb begin
    mq_push        = 1'b0;
    mq_in          = '0;
    mem_rreq_valid = 1'b0;
    mem_rreq_addr  = '0;
    el_fire        = 1'b0;
    rp_fire        = 1'b0;
    pf_fire        = 1'b0;
    if (pf_req) begin
      mem_rreq_valid = mq_ready;
      mem_rreq_addr  = {1'b0, pf_addr[31:1]};
      mq_in.pf       = 1'b1;
      mq_in.sel      = pf_addr[0];
      mq_push        = mem_rreq_valid && mem_rreq_ready;
      pf_fire        = mq_push;
    end else if (state == S_STREAM) begin
      mem_rreq_valid = credit_ok && mq_ready;
      mem_rreq_addr  = st_cur;
      mq_in.eor      = st_eor && (st_cur == st_last);
      mq_in.load     = st_load;
      mq_in.xval     = st_xval;
      mq_in.base_idx = st_word0 - cq.vec_base;
      for (int w = 0; w < WORDS_PER_BEAT; w++)
        mq_in.mask[w] = (st_word0 + 32'(w) >= st_s) && (st_word0 + 32'(w) < st_e);
      mq_push        = mem_rreq_valid && mem_rreq_ready;
      el_fire        = mq_push;
    end else if (state == S_PTR_ISSUE) begin
      mem_rreq_valid = mq_ready;
      mem_rreq_addr  = {1'b0, ptr_addr[31:1]};
      mq_in.is_ptr   = 1'b1;
      mq_in.sel      = ptr_addr[0];
      mq_in.sec      = ptr_sec;
      mq_push        = mem_rreq_valid && mem_rreq_ready;
      rp_fire        = mq_push;
    end
  end

  // -------------------------------------------------------------- write side
  logic [31:0] st_waddr, ob_waddr;
  fp32_t       store_val;

  assign drain_addr = AW'(kst >> PW);
  assign store_val  = drain_data[(NUM_PE > 1) ? kst[PW-1:0] : '0];
  assign st_waddr   = cq.out_base + kst;
  assign ob_waddr   = cq.out_base + ob_out.idx;

  always_comb begin
    mem_wreq_valid = 1'b0;
    mem_wreq_addr  = '0;
    mem_wreq_data  = '0;
    mem_wreq_mask  = '0;
    ob_pop         = 1'b0;
    if (state == S_STORE) begin
      mem_wreq_valid = 1'b1;
      mem_wreq_addr  = {1'b0, st_waddr[31:1]};
      mem_wreq_data  = {WORDS_PER_BEAT{store_val, kst}};
      mem_wreq_mask  = WORDS_PER_BEAT'(1) << st_waddr[0];
    end else if (ob_valid) begin
      mem_wreq_valid = 1'b1;
      mem_wreq_addr  = {1'b0, ob_waddr[31:1]};
      mem_wreq_data  = {WORDS_PER_BEAT{ob_out}};
      mem_wreq_mask  = WORDS_PER_BEAT'(1) << ob_waddr[0];
      ob_pop         = mem_wreq_ready;
    end
  end

  // ----------------------------------------------------------- control FSM
  assign busy     = (state != S_IDLE);
  assign dot_mode = is_dot(cq.op);

  // stream / pointer-read requests raised by the state machine below
  logic        bs, rp;
  logic [31:0] bs_s, bs_e, rp_a;
  logic        bs_load, bs_eor;
  fp32_t       bs_x;
  state_e      bs_after, rp_ret;

  always_comb begin
    bs = 1'b0; bs_s = '0; bs_e = '0; bs_load = 1'b0; bs_eor = 1'b0; bs_x = '0;
    bs_after = S_IDLE;
    rp = 1'b0; rp_a = '0; rp_ret = S_IDLE;
    unique case (state)
      S_IDLE: if (start && cfg.vec_len != '0) begin
        bs = 1'b1; bs_s = cfg.vec_base; bs_e = cfg.vec_base + cfg.vec_len; bs_load = 1'b1;
        bs_after = is_dot(cfg.op) ? S_D_ROW : S_U_X;
      end
      S_D_ROW: if (row != cq.count && have_prev && pq_valid) begin
        bs = 1'b1; bs_s = cq.elem_base + prev_ptr; bs_e = cq.elem_base + pq_out.idx;
        bs_eor = 1'b1; bs_after = S_D_ROW;
      end
      S_U_X: if (jx != cq.count && pq_valid) begin
        rp = 1'b1; rp_a = cq.ptr_base + pq_out.idx; rp_ret = S_U_P1GOT;
      end
      S_U_P1GOT: if (ptr_word.idx > p0) begin
        bs = 1'b1; bs_s = cq.elem_base + p0; bs_e = cq.elem_base + ptr_word.idx;
        bs_x = xval_q; bs_after = S_U_X;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      ptr_ret      <= S_IDLE;
      st_after     <= S_IDLE;
      cq           <= '0;
      st_cur       <= '0;
      st_last      <= '0;
      st_s         <= '0;
      st_e         <= '0;
      st_load      <= 1'b0;
      st_eor       <= 1'b0;
      st_xval      <= '0;
      ptr_addr     <= '0;
      ptr_sec      <= 1'b0;
      ptr_word     <= '0;
      have_prev    <= 1'b0;
      pf_addr      <= '0;
      pf_left      <= '0;
      pf_inflight  <= '0;
      el_hold      <= 1'b0;
      row          <= '0;
      prev_ptr     <= '0;
      jx           <= '0;
      xval_q       <= '0;
      p0           <= '0;
      kst          <= '0;
      rows_written <= '0;
      inflight     <= '0;
      done_pulse   <= 1'b0;
      red_clear    <= 1'b0;
    end else begin
      done_pulse <= 1'b0;
      red_clear  <= 1'b0;

      // outstanding element beats
      case ({el_fire, rb_push})
        2'b10:   inflight <= inflight + 1'b1;
        2'b01:   inflight <= inflight - 1'b1;
        default: ;
      endcase
      case ({pf_fire, pq_push})
        2'b10:   pf_inflight <= pf_inflight + 1'b1;
        2'b01:   pf_inflight <= pf_inflight - 1'b1;
        default: ;
      endcase
      if (pf_fire) begin
        pf_addr <= pf_addr + 32'd1;
        pf_left <= pf_left - 32'd1;
      end
      el_hold <= (state inside {S_STREAM, S_PTR_ISSUE}) && mem_rreq_valid && !mem_rreq_ready &&
                 !pf_req;
      // the first pointer of a column is its start, the second its end
      if (mem_rrsp_valid && mq_out.is_ptr) begin
        ptr_word <= mem_rrsp_data[64*mq_out.sel +: 64];
        if (!mq_out.sec) p0 <= mem_rrsp_data[64*mq_out.sel +: 32];
      end
      if (ob_pop) rows_written <= rows_written + 32'd1;

      unique case (state)
        S_IDLE: if (start) begin
          cq           <= cfg;
          row          <= '0;
          jx           <= '0;
          kst          <= '0;
          rows_written <= '0;
          red_clear    <= 1'b1;
          have_prev    <= 1'b0;
          if (cfg.vec_len != '0)
            ;  // vector load first (below)
          else if (is_dot(cfg.op))
            state <= S_D_ROW;
          else
            state <= S_U_X;
          // spMdV_csr reads the count + 1 row pointers ahead, the other
          // patterns their count x-list entries
          pf_addr <= is_dot(cfg.op) ? cfg.ptr_base : cfg.xlist_base;
          pf_left <= is_dot(cfg.op) ? cfg.count + 32'd1 : cfg.count;
        end

        S_STREAM: if (el_fire) begin
          st_cur <= st_cur + 32'd1;
          if (st_cur == st_last) state <= st_after;
        end

        // the two pointers of a column are requested back to back
        S_PTR_ISSUE: if (rp_fire) begin
          ptr_addr <= ptr_addr + 32'd1;
          ptr_sec  <= 1'b1;
          if (ptr_sec) state <= S_PTR_WAIT;
        end

        S_PTR_WAIT: if (mem_rrsp_valid && mq_out.is_ptr && mq_out.sec) state <= ptr_ret;

        // prev_ptr holds row pointer `row` once have_prev is set; the head
        // of the pointer queue is row pointer `row + 1`
        S_D_ROW: begin
          if (have_prev && row == cq.count) state <= S_FINISH;
          else if (pq_valid) begin
            prev_ptr  <= pq_out.idx;
            have_prev <= 1'b1;
            if (have_prev) row <= row + 32'd1;
          end
        end

        S_U_X: begin
          if (jx == cq.count) state <= S_DRAIN;
        end

        S_U_P1GOT: begin
          jx <= jx + 32'd1;
          if (ptr_word.idx <= p0) state <= S_U_X;
        end

        S_DRAIN: if (quiet) begin
          if (cq.vec_len == '0) state <= S_FINISH;
          else                  state <= S_STORE;
        end

        S_STORE: if (mem_wreq_ready) begin
          kst <= kst + 32'd1;
          if (kst + 32'd1 == cq.vec_len) state <= S_FINISH;
        end

        S_FINISH: begin
          if (quiet && (!dot_mode || (rows_written == cq.count && !ob_valid))) begin
            done_pulse <= 1'b1;
            state      <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase

      if (bs) begin
        st_s     <= bs_s;
        st_e     <= bs_e;
        st_cur   <= {1'b0, bs_s[31:1]};
        st_last  <= (bs_e > bs_s) ? {1'b0, bs_e[31:1] - {30'd0, ~bs_e[0]}}
                                  : {1'b0, bs_s[31:1]};
        st_load  <= bs_load;
        st_eor   <= bs_eor;
        st_xval  <= bs_x;
        st_after <= bs_after;
        state    <= S_STREAM;
      end
      if (rp) begin
        ptr_addr <= rp_a;
        ptr_sec  <= 1'b0;
        ptr_ret  <= rp_ret;
        xval_q   <= pq_out.val;
        state    <= S_PTR_ISSUE;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  // A response always has its bookkeeping entry, and an element beat or a
  // prefetched pointer always finds room in its queue.
  a_pq_room: assert property (@(posedge clk) disable iff (!rst_n)
    pq_push |-> pq_ready);
  a_rsp_has_meta: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rrsp_valid |-> mq_valid);
  a_rb_room: assert property (@(posedge clk) disable iff (!rst_n)
    rb_push |-> rb_ready);

endmodule
