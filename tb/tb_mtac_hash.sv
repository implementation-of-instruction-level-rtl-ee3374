// tb_mtac_hash: self-checking test of the memory-location hash.
//
// Checks the module number against an independent computation for random
// addresses and hash functions, that an even multiplier behaves as the next
// odd one, and that a sequential block of 4096 word addresses spreads
// evenly over the 16 memory modules (no module gets more than twice its
// share), which is the purpose of randomized hashing. Combinational.
module tb_mtac_hash;
  import ipsm_pkg::*;
  localparam int MODW = 4;
  word_t addr, mult, key;
  logic [MODW-1:0] mid;
  int checks = 0, failures = 0;
  int hist [1 << MODW];

  mtac_hash #(.MODW(MODW)) dut (.addr(addr), .mult(mult), .key(key), .module_id(mid));

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint unsigned p;
    logic [MODW-1:0] e;
    for (int n = 0; n < 2000; n++) begin
      addr = $urandom; mult = $urandom; key = $urandom;
      #1;
      p = (longint'(addr) * longint'(mult | 1)) & 64'hFFFF_FFFF;
      e = MODW'((p ^ longint'(key)) >> (32 - MODW));
      checks++;
      if (mid !== e) begin failures++; if (failures < 10) $display("FAIL a=%h m=%h k=%h got %0d exp %0d", addr, mult, key, mid, e); end
    end
    mult = 32'h9E37_79B9; key = 32'h1234_5678;
    foreach (hist[m]) hist[m] = 0;
    for (int a = 0; a < 4096; a++) begin addr = a; #1; hist[mid]++; end
    foreach (hist[m]) begin
      checks++;
      if (hist[m] > 512 || hist[m] == 0) begin failures++; $display("FAIL module %0d got %0d of 4096", m, hist[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
