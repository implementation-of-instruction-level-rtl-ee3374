// tb_crcw_priority_logic: self-checking test of the CRCW priority cell logic.
//
// The cell logic of one storage cell of a 16-port CRCW memory is driven
// with random select lines (row AND column select per port), write lines,
// input data and stored value. The test checks the cell write signal, the
// value written, that every selected port sees the stored value on its
// output and unselected ports see zero, and the write-conflict rule:
// Priority - the writing port with the lowest index wins, and only it is
// reported as winner. Combinational.
module tb_crcw_priority_logic;
  localparam int N = 16, W = 4;
  logic [N-1:0]        s, w, win, e_win;
  logic [N-1:0][W-1:0] i, o;
  logic [W-1:0]        q, inp, e_inp;
  logic                wri, sel;
  int checks = 0, failures = 0, conflicts = 0;

  crcw_priority_logic #(.N(N), .W(W)) dut (.s(s), .w(w), .i(i), .q(q), .wri(wri), .inp(inp),
                                           .sel(sel), .o(o), .win(win));

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic ok;
    for (int n = 0; n < 4000; n++) begin
      s = N'($urandom) | N'($urandom); w = N'($urandom); q = W'($urandom);
      for (int k = 0; k < N; k++) i[k] = W'($urandom);
      #1;
      e_inp = '0; e_win = '0;
      for (int k = N - 1; k >= 0; k--) if (s[k] && w[k]) begin e_inp = i[k]; e_win = N'(1) << k; end
      if ($countones(s & w) > 1) conflicts++;
      ok = (wri === |(s & w)) && (sel === |s) && (win === e_win) && (!wri || inp === e_inp);
      for (int k = 0; k < N; k++) if (o[k] !== (s[k] ? q : '0)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b w=%b win=%b inp=%h exp %h", s, w, win, inp, e_inp);
      end
    end
    $display("concurrent-write conflicts resolved: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
