// pe_ram: the PE's on-chip vector RAM.
//
// Holds the part of a vector that the compute patterns access at random: the
// x-vector subset for spMdV_csr, the y-vector subset for spMspV_csc,
// spMdV_csc and scale_update. DEPTH words of WIDTH bits, one synchronous
// write port and two asynchronous read ports: port A serves the
// multiply-accumulate datapath, port B lets the DMU read the vector back out
// after an update pattern. A write becomes visible to the read ports in the
// following cycle. The contents are not reset; the DMU loads the RAM before
// it is read. The document gives the RAM's purpose; its size (4096 words,
// 16 KiB per PE) and port arrangement are this design's own choices.
module pe_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr_a,
  output logic [WIDTH-1:0]         rdata_a,
  input  logic [$clog2(DEPTH)-1:0] raddr_b,
  output logic [WIDTH-1:0]         rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
