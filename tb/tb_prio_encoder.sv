// tb_prio_encoder: self-checking test of the parallel priority encoder.
//
// All 65536 request patterns of the 16-input encoder are applied; the grant
// must be one-hot on the lowest-numbered request (or zero with no request)
// and "any" must equal the OR of the requests. Combinational.
module tb_prio_encoder;
  localparam int N = 16;
  logic [N-1:0] req, grant, e_grant;
  logic         any;
  int           checks = 0, failures = 0;

  prio_encoder #(.N(N)) dut (.req(req), .grant(grant), .any(any));

  initial begin : watchdog
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      req = N'(v);
      #1;
      e_grant = '0;
      for (int k = N - 1; k >= 0; k--) if (req[k]) e_grant = N'(1) << k;
      checks++;
      if (grant !== e_grant || any !== (v != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL req=%b grant=%b", req, grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
