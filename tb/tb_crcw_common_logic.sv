// tb_crcw_common_logic: self-checking test of the CRCW common cell logic.
//
// The cell logic of one storage cell of a 16-port CRCW memory is driven
// with random select lines (row AND column select per port), write lines,
// input data and stored value. The test checks the cell write signal, the
// value written, that every selected port sees the stored value on its
// output and unselected ports see zero, and the write-conflict rule:
// Common - the written value is the OR of all writing ports' data, which is
// the common value whenever all writers agree. Combinational.
module tb_crcw_common_logic;
  localparam int N = 16, W = 4;
  logic [N-1:0]        s, w;
  logic [N-1:0][W-1:0] i, o;
  logic [W-1:0]        q, inp, e_inp;
  logic                wri, sel;
  int checks = 0, failures = 0, conflicts = 0;

  crcw_common_logic #(.N(N), .W(W)) dut (.s(s), .w(w), .i(i), .q(q), .wri(wri), .inp(inp), .sel(sel), .o(o));

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic ok;
    logic [W-1:0] common;
    for (int n = 0; n < 4000; n++) begin
      s = N'($urandom) & N'($urandom); w = N'($urandom); q = W'($urandom);
      common = W'($urandom);
      // half of the vectors are legal Common writes: all writers agree
      for (int k = 0; k < N; k++) i[k] = (n % 2 == 0) ? common : W'($urandom);
      #1;
      e_inp = '0;
      for (int k = 0; k < N; k++) if (s[k] && w[k]) e_inp |= i[k];
      if ($countones(s & w) > 1) conflicts++;
      ok = (wri === |(s & w)) && (sel === |s) && (!wri || inp === e_inp);
      if (n % 2 == 0 && wri && inp !== common) ok = 0;
      for (int k = 0; k < N; k++) if (o[k] !== (s[k] ? q : '0)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b w=%b inp=%h exp %h", s, w, inp, e_inp);
      end
    end
    $display("concurrent-write conflicts resolved: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
