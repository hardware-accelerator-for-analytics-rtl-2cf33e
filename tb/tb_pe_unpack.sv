// tb_pe_unpack: random {val, idx} words; the value must pass unchanged, the
// local address must be idx / 4 (mod DEPTH) and ownership must hold exactly
// when idx mod 4 equals the PE number and idx lies inside the 4 * DEPTH block.
module tb_pe_unpack;
  import spa_pkg::*;
  localparam int DEPTH = 4096;
  localparam int PE_ID = 2;
  mem_word_t w;
  fp32_t val;
  logic [11:0] addr;
  logic own;
  int checks = 0, failures = 0;

  pe_unpack #(.PE_ID(PE_ID), .NUM_PE(4), .DEPTH(DEPTH)) dut (.word(w), .val, .addr, .own);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      w.val = $urandom;
      case (i % 4)
        0: w.idx = $urandom;
        1: w.idx = 4 * ($urandom % DEPTH) + PE_ID;
        2: w.idx = $urandom % (4 * DEPTH);
        default: w.idx = 4 * DEPTH + 4 * ($urandom % 100) + PE_ID;
      endcase
      #1;
      checks += 3;
      if (val !== w.val) failures++;
      if (addr !== 12'((w.idx / 4) % DEPTH)) failures++;
      if (own !== (w.idx % 4 == PE_ID && w.idx < 4 * DEPTH)) begin
        failures++;
        $display("FAIL own idx=%h own=%b", w.idx, own);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
