// tb_pe_ram: writes random words to random addresses of the PE vector RAM,
// keeps a shadow copy, and checks both read ports against it, including the
// rule that a write is visible from the next cycle on.
module tb_pe_ram;
  localparam int DEPTH = 4096;
  logic clk = 0, we;
  logic [11:0] waddr, ra, rb;
  logic [31:0] wdata, da, db;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  pe_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (
    .clk, .we, .waddr, .wdata, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    // fill every entry
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 12'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ra = 12'($urandom); rb = 12'($urandom);
      #1;
      checks += 2;
      if (da !== shadow[ra]) begin failures++; $display("FAIL port A %0d", ra); end
      if (db !== shadow[rb]) begin failures++; $display("FAIL port B %0d", rb); end
      // random write, read back in the next cycle
      we = 1; waddr = 12'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      shadow[waddr] = wdata; we = 0;
      ra = waddr;
      #1;
      checks++;
      if (da !== wdata) begin failures++; $display("FAIL write-then-read %0d", waddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
