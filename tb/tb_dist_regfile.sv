// tb_dist_regfile: self-checking test of the distributed register file.
//
// Each register has its own input multiplexer. The test resets the file,
// then for many clock cycles loads random source values and a random select
// per register (including KEEP), and checks after the edge that every
// register holds the chosen source or its old value, all updated in the
// same cycle. As in the processors, register outputs feed back as sources
// 0..NREG-1, so register-to-register moves and swaps are covered. Cycles with en low must change nothing.
module tb_dist_regfile;
  import ipsm_pkg::*;

  localparam int NREG = 32;
  logic  clk = 0, rst_n = 0, en = 0;
  word_t srcs [NSRC];
  src_t  sel  [NREG];
  word_t regs [NREG];
  word_t model [NREG];
  int    checks = 0, failures = 0;

  dist_regfile #(.NREG(NREG)) dut (.clk(clk), .rst_n(rst_n), .en(en), .srcs(srcs), .sel(sel), .regs(regs));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic compare(string tag);
    foreach (model[r]) begin
      checks++;
      if (regs[r] !== model[r]) begin
        failures++;
        if (failures < 10) $display("FAIL %s R%0d got %h exp %h", tag, r, regs[r], model[r]);
      end
    end
  endtask

  initial begin
    foreach (srcs[k]) srcs[k] = '0;
    foreach (sel[r]) sel[r] = SRC_KEEP;
    foreach (model[r]) model[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare("reset");
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      en = (cyc % 7 != 3);
      foreach (srcs[k]) srcs[k] = (k < NREG) ? regs[k] : $urandom;
      foreach (sel[r]) sel[r] = ($urandom % 4 == 0) ? SRC_KEEP : src_t'($urandom % 63);
      if (en) foreach (model[r]) if (sel[r] != SRC_KEEP) model[r] = srcs[sel[r]];
      @(posedge clk); #1;
      compare(en ? "write" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
