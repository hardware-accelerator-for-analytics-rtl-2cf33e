// reduction_unit: adds the PEs' row sub-block sums into final row sums.
//
// In spMdV_csr every PE produces one partial sum per row (the dot product of
// its column sub-block of the row with its x subset). The unit waits until
// every PE has a sum queued, adds them in a balanced tree of fp32_add adders
// (for four PEs: (s0 + s1) + (s2 + s3)), and offers the result with the row
// number as a {val, idx} word for the output buffer. All PE sums are taken in
// the same cycle the result is accepted, so one row completes per cycle at
// most. The row counter restarts on clear. The unit is combinational apart
// from the row counter. The document places the unit in the DMU and says what
// it adds; the tree order and handshake are this design's own choices.
module reduction_unit
  import spa_pkg::*;
#(
  parameter int unsigned NUM_PE = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic [NUM_PE-1:0]   in_valid,
  output logic [NUM_PE-1:0]   in_ready,
  input  fp32_t [NUM_PE-1:0]  in_sum,
  output logic                out_valid,
  input  logic                out_ready,
  output mem_word_t           out_word
);

  // heap-ordered adder tree: node i = node 2i+1 + node 2i+2, leaves NUM_PE-1 ..
  fp32_t node [2*NUM_PE-1];
  logic [31:0] row_q;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_leaf
    assign node[NUM_PE-1+p] = in_sum[p];
  end
  for (genvar i = 0; i < NUM_PE-1; i++) begin : g_add
    fp32_add u_add (.a(node[2*i+1]), .b(node[2*i+2]), .y(node[i]));
  end

  assign out_valid    = &in_valid;
  assign out_word.val = node[0];
  assign out_word.idx = row_q;
  assign in_ready     = {NUM_PE{out_valid && out_ready}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      row_q <= '0;
    else if (clear)                  row_q <= '0;
    else if (out_valid && out_ready) row_q <= row_q + 32'd1;
  end

endmodule
