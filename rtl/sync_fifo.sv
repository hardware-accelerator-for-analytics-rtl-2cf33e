// sync_fifo: synchronous first-in first-out buffer with valid/ready ports.
//
// Used for the DMU's read buffer (memory beats waiting for the PE scheduler),
// its output buffer (results waiting to be written to memory), the request
// bookkeeping queue, and the small command queue and sum queue of each PE.
// Storage is a circular array of DEPTH entries of type T with read and write
// pointers and an occupancy counter. A push happens when in_valid and
// in_ready are both high, a pop when out_valid and out_ready are; both may
// happen in the same cycle, also when the buffer is full. The head entry is
// read combinationally (out_data is valid in the cycle out_valid is high).
// Reset empties the buffer; the storage itself is not cleared. The document
// names the read and output buffers but not their organisation or size.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                             mem [DEPTH];
  logic [AW-1:0]                wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0]   cnt;
  logic                         do_push, do_pop;

  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rptr];
  assign count     = cnt;
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= in_data;
  end

endmodule
