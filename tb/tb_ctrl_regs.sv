// tb_ctrl_regs: writes every register with random values and reads them
// back, checks the op field, the one-cycle start pulse, that start is ignored
// while busy, and the done bit (set by a completion, cleared by start).
module tb_ctrl_regs;
  import spa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_we, busy, done_pulse, start;
  logic [2:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  cfg_t cfg;
  logic [31:0] vals [8];
  int checks = 0, failures = 0, starts = 0;

  ctrl_regs dut (.clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
                 .busy, .done_pulse, .cfg, .start);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    reg_we = 0; reg_addr = 0; reg_wdata = 0; busy = 0; done_pulse = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int a = 1; a < 8; a++) begin vals[a] = $urandom; wr(3'(a), vals[a]); end
      for (int a = 1; a < 8; a++) begin reg_addr = 3'(a); #1; chk("readback", reg_rdata, vals[a]); end
      chk("vec_base", cfg.vec_base, vals[1]);   chk("vec_len", cfg.vec_len, vals[2]);
      chk("ptr_base", cfg.ptr_base, vals[3]);   chk("elem_base", cfg.elem_base, vals[4]);
      chk("count", cfg.count, vals[5]);         chk("xlist_base", cfg.xlist_base, vals[6]);
      chk("out_base", cfg.out_base, vals[7]);
    end
    // start with op = scale_update
    starts = 0;
    wr(3'd0, {29'd0, 2'(OP_SCALE_UPDATE), 1'b1});
    @(negedge clk);
    chk("one start pulse", 32'(starts), 1);
    chk("op", 32'(cfg.op), 32'(OP_SCALE_UPDATE));
    busy = 1;
    reg_addr = 0; #1; chk("status busy", reg_rdata, {28'd0, 2'(OP_SCALE_UPDATE), 1'b0, 1'b1});
    wr(3'd0, {29'd0, 2'(OP_SPMDV_CSR), 1'b1});
    @(negedge clk);
    chk("start ignored while busy", 32'(starts), 1);
    @(negedge clk); done_pulse = 1; busy = 0;
    @(negedge clk); done_pulse = 0;
    reg_addr = 0; #1; chk("status done", reg_rdata[1:0], 2'b10);
    wr(3'd0, {29'd0, 2'(OP_SPMSPV_CSC), 1'b1});
    @(negedge clk);
    chk("second start", 32'(starts), 2);
    reg_addr = 0; #1; chk("done cleared", reg_rdata[1], 0);
    chk("op2", 32'(cfg.op), 32'(OP_SPMSPV_CSC));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
