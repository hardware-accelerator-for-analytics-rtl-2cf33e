// ctrl_regs: control and status registers written by the host library.
//
// The host describes an operation by writing the registers below and then
// writing CTRL with bit 0 set, which starts the accelerator (ignored while it
// is busy). Registers are 32 bits, one per address:
//   0 CTRL      write: bit 0 start, bits 2:1 op (op_e); read: bit 0 busy,
//               bit 1 done (set when an operation completes, cleared by start),
//               bits 3:2 op
//   1 VEC_BASE  2 VEC_LEN  3 PTR_BASE  4 ELEM_BASE  5 COUNT  6 XLIST_BASE
//   7 OUT_BASE  (word addresses and counts, see cfg_t)
// Writes take effect at the clock edge; reads are combinational. start is a
// one-cycle pulse. All registers reset to zero. The document says that the
// library sets control registers with the computation type and memory
// pointers and then starts the accelerator; the register map is this
// design's own.
module ctrl_regs
  import spa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        busy,
  input  logic        done_pulse,
  output cfg_t        cfg,
  output logic        start
);

  logic done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg    <= '0;
      start  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      start <= 1'b0;
      if (done_pulse) done_q <= 1'b1;
      if (reg_we) begin
        unique case (reg_addr)
          3'd0: begin
            cfg.op <= op_e'(reg_wdata[2:1]);
            if (reg_wdata[0] && !busy) begin
              start  <= 1'b1;
              done_q <= 1'b0;
            end
          end
          3'd1: cfg.vec_base   <= reg_wdata;
          3'd2: cfg.vec_len    <= reg_wdata;
          3'd3: cfg.ptr_base   <= reg_wdata;
          3'd4: cfg.elem_base  <= reg_wdata;
          3'd5: cfg.count      <= reg_wdata;
          3'd6: cfg.xlist_base <= reg_wdata;
          3'd7: cfg.out_base   <= reg_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      3'd0:    reg_rdata = {28'd0, cfg.op, done_q, busy};
      3'd1:    reg_rdata = cfg.vec_base;
      3'd2:    reg_rdata = cfg.vec_len;
      3'd3:    reg_rdata = cfg.ptr_base;
      3'd4:    reg_rdata = cfg.elem_base;
      3'd5:    reg_rdata = cfg.count;
      3'd6:    reg_rdata = cfg.xlist_base;
      3'd7:    reg_rdata = cfg.out_base;
      default: reg_rdata = '0;
    endcase
  end

endmodule
