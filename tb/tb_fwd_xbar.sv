// tb_fwd_xbar: self-checking test of the general forwarding cross-bar.
//
// Every source (registers, immediates, flags, unit results) gets a distinct
// random value; every output is then steered to every source code in turn
// and to random codes, and must show exactly that source. Combinational.
module tb_fwd_xbar;
  import ipsm_pkg::*;

  localparam int NOUT = 4;
  word_t srcs [NSRC];
  src_t  sel  [NOUT];
  word_t outs [NOUT];
  int    checks = 0, failures = 0;

  fwd_xbar #(.NOUT(NOUT)) dut (.srcs(srcs), .sel(sel), .outs(outs));

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      foreach (srcs[k]) srcs[k] = {$urandom, 6'(k)} [31:0];
      for (int s = 0; s < NSRC; s++) begin
        foreach (sel[o]) sel[o] = (o == 0) ? src_t'(s) : src_t'($urandom);
        #1;
        foreach (sel[o]) begin
          checks++;
          if (outs[o] !== srcs[sel[o]]) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d sel %0d got %h", o, sel[o], outs[o]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
