// tb_sparse_accel_x4: the four-block configuration at its default size
// (four blocks of four PEs with 4096-entry RAMs). Each block has its own
// host agent and memory and runs a different operation at the same time:
// spMdV_csr, spMspV_csc, scale_update and spMdV_csc, each over a full
// 16384-entry vector block; block 0 sees a 100-cycle memory latency, the
// others 20 cycles. Every result word is checked by the agents. The
// testbench also counts, over all blocks, and requires at least once: all
// four blocks busy in the same cycle, empty rows (end-of-row markers without
// elements), two words dispatched in one cycle, scheduler stalls, read
// buffer full, memory read and write back-pressure, and each of the four
// operation types; it reports each block's cycle count.
module tb_sparse_accel_x4;
  import spa_pkg::*;
  localparam int NB = 4;

  logic clk = 0, rst_n = 0;
  logic [NB-1:0]                     reg_we, irq, sched_stall;
  logic [NB-1:0][2:0]                reg_addr;
  logic [NB-1:0][31:0]               reg_wdata, reg_rdata;
  logic [NB-1:0]                     mem_rreq_valid, mem_rreq_ready, mem_rrsp_valid;
  logic [NB-1:0][31:0]               mem_rreq_addr, mem_wreq_addr;
  logic [NB-1:0][BEAT_W-1:0]         mem_rrsp_data, mem_wreq_data;
  logic [NB-1:0]                     mem_wreq_valid, mem_wreq_ready;
  logic [NB-1:0][WORDS_PER_BEAT-1:0] mem_wreq_mask;
  int  ag_checks [NB], ag_failures [NB], ag_cycles [NB], ag_elems [NB];
  bit  ag_done [NB];
  int  checks = 0, failures = 0, all_busy = 0;

  sparse_accel_x4 dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_ag
    tb_accel_agent #(.OP(b), .NMAJ(200), .LAT(b == 0 ? 100 : 20)) u_ag (
      .clk, .rst_n,
      .reg_we(reg_we[b]), .reg_addr(reg_addr[b]), .reg_wdata(reg_wdata[b]),
      .reg_rdata(reg_rdata[b]), .irq(irq[b]),
      .mem_rreq_valid(mem_rreq_valid[b]), .mem_rreq_ready(mem_rreq_ready[b]),
      .mem_rreq_addr(mem_rreq_addr[b]), .mem_rrsp_valid(mem_rrsp_valid[b]),
      .mem_rrsp_data(mem_rrsp_data[b]),
      .mem_wreq_valid(mem_wreq_valid[b]), .mem_wreq_ready(mem_wreq_ready[b]),
      .mem_wreq_addr(mem_wreq_addr[b]), .mem_wreq_data(mem_wreq_data[b]),
      .mem_wreq_mask(mem_wreq_mask[b]),
      .checks(ag_checks[b]), .failures(ag_failures[b]), .cycles(ag_cycles[b]), .elems(ag_elems[b]),
      .finished(ag_done[b]));
  end

  always #5 clk = ~clk;

  int ev_empty_row = 0, ev_dual = 0, ev_stall = 0, ev_rb_full = 0, ev_rd_bp = 0, ev_wr_bp = 0;
  bit ev_op [4];

  for (genvar b = 0; b < NB; b++) begin : g_ev
    always @(posedge clk) if (rst_n) begin
      if (mem_rrsp_valid[b] && !dut.g_blk[b].u_acc.u_dmu.mq_out.is_ptr &&
          dut.g_blk[b].u_acc.u_dmu.mq_out.eor && dut.g_blk[b].u_acc.u_dmu.mq_out.mask == '0)
        ev_empty_row++;
      if ($countones(dut.g_blk[b].u_acc.pe_valid & dut.g_blk[b].u_acc.pe_ready) >= 2 &&
          !(&dut.g_blk[b].u_acc.pe_valid)) ev_dual++;
      if (sched_stall[b]) ev_stall++;
      if (dut.g_blk[b].u_acc.u_dmu.state == dut.g_blk[b].u_acc.u_dmu.S_STREAM &&
          !dut.g_blk[b].u_acc.u_dmu.credit_ok) ev_rb_full++;
      if (mem_rreq_valid[b] && !mem_rreq_ready[b]) ev_rd_bp++;
      if (mem_wreq_valid[b] && !mem_wreq_ready[b]) ev_wr_bp++;
      if (dut.g_blk[b].u_acc.start) ev_op[dut.g_blk[b].u_acc.cfg.op] = 1;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  always @(posedge clk)
    if (dut.g_blk[0].u_acc.u_dmu.busy && dut.g_blk[1].u_acc.u_dmu.busy &&
        dut.g_blk[2].u_acc.u_dmu.busy && dut.g_blk[3].u_acc.u_dmu.busy) all_busy++;

  initial begin
    repeat (400_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (ag_done[0] && ag_done[1] && ag_done[2] && ag_done[3]);
    for (int b = 0; b < NB; b++) begin
      checks += ag_checks[b];
      failures += ag_failures[b];
      $display("block %0d (%s): %0d cycles, %0d words checked", b, op_e'(b), ag_cycles[b], ag_checks[b]);
    end
    $display("mechanisms:");
    need("all four blocks busy", all_busy);
    need("empty rows", ev_empty_row);
    need("two words in one cycle", ev_dual);
    need("scheduler stalls", ev_stall);
    need("read buffer full", ev_rb_full);
    need("memory read back-pressure", ev_rd_bp);
    need("memory write back-pressure", ev_wr_bp);
    for (int o = 0; o < 4; o++) need($sformatf("operation %s", op_e'(o)), int'(ev_op[o]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
