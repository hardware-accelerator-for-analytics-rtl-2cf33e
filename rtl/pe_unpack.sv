// pe_unpack: the PE's unpack logic.
//
// Splits a 64-bit {val, idx} word delivered to the PE into the element value,
// the local RAM address and an ownership flag. The indices of a matrix block
// (NUM_PE * DEPTH of them) are dealt out to the PEs round robin: the low
// log2(NUM_PE) index bits name the PE that owns the index, the next
// log2(DEPTH) bits are the address in that PE's RAM, and an index beyond the
// block belongs to no PE. Interleaving lets consecutive indices of a sorted
// row or column reach different PEs in the same cycle. Purely combinational. The document only names the unpack logic; the
// word layout and the index split are this design's own choices.
module pe_unpack
  import spa_pkg::*;
#(
  parameter int unsigned PE_ID  = 0,
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned DEPTH  = 4096
) (
  input  mem_word_t                word,
  output fp32_t                    val,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     own
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned PW = $clog2(NUM_PE);

  logic [31:0] local_idx;

  always_comb begin
    val       = word.val;
    local_idx = word.idx >> PW;
    addr      = local_idx[AW-1:0];
    own       = (local_idx < 32'(DEPTH)) &&
                ((word.idx & 32'(NUM_PE - 1)) == 32'(PE_ID));
  end

endmodule
