// tb_workloads: the dataset workloads, as far as they can be simulated.
//
// Two four-block accelerators (default parameters) run eight jobs at once,
// one per block, each on a full 16384-entry vector block with synthetic
// random data whose row lengths mimic one dataset after column blocking
// (average non-zeros per row times 16384 / number of features, capped at the
// dataset's own average):
//   E2006     1242 per row, 150360 features -> ~135 per block row
//   RCV         74 per row,  47236 features -> ~26
//   Webspam     86 per row,    254 features -> 86 (one block)
//   Gamevideo  221 per row, feature count unknown, taken as one block
//   URL        117 per row, 3.2 M features  -> ~0.6 (very sparse blocks)
//   MovieLens  143 ratings per user, 10681 movies -> 143 (one block)
// Samples and averages are the datasets' published sizes; the feature counts
// of the public datasets are general knowledge. Six jobs run spMdV_csr; Webspam
// also runs scale_update and MovieLens spMspV_csc. The number of rows is
// scaled down to keep each job to about 16 K elements (2.4 K for URL). Every
// result word is checked by the agents. The streaming rate (elements per
// cycle from the first pointer read to the last result, vector load and
// write-back excluded) is reported for each job and must reach one element
// per cycle for the spMdV_csr jobs with rows of 26 or more elements. The URL
// profile is reported only: with under one element per row and block, each
// row costs its pointer read and at least one beat, about three cycles.
module tb_workloads;
  import spa_pkg::*;
  localparam int NB = 4, NJ = 2 * NB;
  localparam string NAME [NJ] = '{"E2006 spMdV_csr", "RCV spMdV_csr", "Webspam spMdV_csr",
                                  "Gamevideo spMdV_csr", "URL spMdV_csr", "MovieLens spMdV_csr",
                                  "Webspam scale_update", "MovieLens spMspV_csc"};
  localparam int OPS   [NJ] = '{0, 0, 0, 0, 0, 0, 2, 1};
  localparam int AVG   [NJ] = '{1350, 260, 860, 2210, 6, 1430, 860, 1430};
  localparam int ROWS  [NJ] = '{120, 600, 180, 70, 4000, 110, 150, 110};
  localparam bit RATE  [NJ] = '{1, 1, 1, 1, 0, 1, 0, 0};

  logic clk = 0, rst_n = 0;
  logic [NJ-1:0]                     reg_we, irq, sched_stall;
  logic [NJ-1:0][2:0]                reg_addr;
  logic [NJ-1:0][31:0]               reg_wdata, reg_rdata;
  logic [NJ-1:0]                     mem_rreq_valid, mem_rreq_ready, mem_rrsp_valid;
  logic [NJ-1:0][31:0]               mem_rreq_addr, mem_wreq_addr;
  logic [NJ-1:0][BEAT_W-1:0]         mem_rrsp_data, mem_wreq_data;
  logic [NJ-1:0]                     mem_wreq_valid, mem_wreq_ready;
  logic [NJ-1:0][WORDS_PER_BEAT-1:0] mem_wreq_mask;
  int  ag_checks [NJ], ag_failures [NJ], ag_cycles [NJ], ag_elems [NJ];
  bit  ag_done [NJ];
  int  checks = 0, failures = 0;
  int  stream_cycles [NJ];
  bit  streaming [NJ];

  for (genvar a = 0; a < 2; a++) begin : g_acc
    sparse_accel_x4 dut (
      .clk, .rst_n,
      .reg_we(reg_we[a*NB +: NB]), .reg_addr(reg_addr[a*NB +: NB]),
      .reg_wdata(reg_wdata[a*NB +: NB]), .reg_rdata(reg_rdata[a*NB +: NB]),
      .irq(irq[a*NB +: NB]), .sched_stall(sched_stall[a*NB +: NB]),
      .mem_rreq_valid(mem_rreq_valid[a*NB +: NB]), .mem_rreq_ready(mem_rreq_ready[a*NB +: NB]),
      .mem_rreq_addr(mem_rreq_addr[a*NB +: NB]), .mem_rrsp_valid(mem_rrsp_valid[a*NB +: NB]),
      .mem_rrsp_data(mem_rrsp_data[a*NB +: NB]),
      .mem_wreq_valid(mem_wreq_valid[a*NB +: NB]), .mem_wreq_ready(mem_wreq_ready[a*NB +: NB]),
      .mem_wreq_addr(mem_wreq_addr[a*NB +: NB]), .mem_wreq_data(mem_wreq_data[a*NB +: NB]),
      .mem_wreq_mask(mem_wreq_mask[a*NB +: NB]));

    for (genvar b = 0; b < NB; b++) begin : g_job
      localparam int J = a * NB + b;
      tb_accel_agent #(.OP(OPS[J]), .NMAJ(ROWS[J]), .LAT(20), .AVG10(AVG[J]), .MAXE(20000)) u_ag (
        .clk, .rst_n,
        .reg_we(reg_we[J]), .reg_addr(reg_addr[J]), .reg_wdata(reg_wdata[J]),
        .reg_rdata(reg_rdata[J]), .irq(irq[J]),
        .mem_rreq_valid(mem_rreq_valid[J]), .mem_rreq_ready(mem_rreq_ready[J]),
        .mem_rreq_addr(mem_rreq_addr[J]), .mem_rrsp_valid(mem_rrsp_valid[J]),
        .mem_rrsp_data(mem_rrsp_data[J]),
        .mem_wreq_valid(mem_wreq_valid[J]), .mem_wreq_ready(mem_wreq_ready[J]),
        .mem_wreq_addr(mem_wreq_addr[J]), .mem_wreq_data(mem_wreq_data[J]),
        .mem_wreq_mask(mem_wreq_mask[J]),
        .checks(ag_checks[J]), .failures(ag_failures[J]), .cycles(ag_cycles[J]),
        .elems(ag_elems[J]), .finished(ag_done[J]));

      // streaming phase: from the first pointer or x-list read until the
      // write-back of the vector starts (or the operation ends)
      always @(posedge clk) if (rst_n) begin
        if (dut.g_blk[b].u_acc.u_dmu.state inside {dut.g_blk[b].u_acc.u_dmu.S_D_ROW,
                                                   dut.g_blk[b].u_acc.u_dmu.S_U_X})
          streaming[J] <= 1'b1;
        if (dut.g_blk[b].u_acc.u_dmu.state inside {dut.g_blk[b].u_acc.u_dmu.S_DRAIN,
                                                   dut.g_blk[b].u_acc.u_dmu.S_STORE,
                                                   dut.g_blk[b].u_acc.u_dmu.S_FINISH,
                                                   dut.g_blk[b].u_acc.u_dmu.S_IDLE})
          streaming[J] <= 1'b0;
        if (streaming[J]) stream_cycles[J]++;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    int cyc = 0;
    while (cyc < 400000) begin @(posedge clk); cyc++; end
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate;
    foreach (stream_cycles[j]) begin stream_cycles[j] = 0; streaming[j] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NJ; j++) wait (ag_done[j]);
    for (int j = 0; j < NJ; j++) begin
      checks   += ag_checks[j];
      failures += ag_failures[j];
      rate = real'(ag_elems[j]) / real'(stream_cycles[j] > 0 ? stream_cycles[j] : 1);
      $display("%-22s %5d rows %6d elements: %7d cycles in all, %6d streaming, %0.2f elements/cycle",
               NAME[j], ROWS[j], ag_elems[j], ag_cycles[j], stream_cycles[j], rate);
      if (RATE[j]) begin
        checks++;
        if (rate < 1.0) begin
          failures++;
          $display("FAIL %s: below one element per cycle", NAME[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
