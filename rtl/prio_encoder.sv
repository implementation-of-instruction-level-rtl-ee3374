// prio_encoder: parallel priority encoder of the CRCW Priority memory cell.
//
// Among the N request lines, the one with the lowest index wins. All grant
// lines are computed in parallel from a prefix OR of the requests: grant[i]
// is high when req[i] is high and no lower-indexed request is.
//
// Interface: req[N]; grant[N] (one-hot or zero), any (some request is high).
// Timing: combinational.
//
// Taken from the architecture: the lowest-index port wins, and the encoder is
// parallel. The prefix-OR structure is this design's own; the architecture description costs
// an optimized encoder at N + 2N log N gate inputs without giving its gates.
module prio_encoder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         any
);

  logic [N:0] seen;   // seen[i]: some request among 0..i-1

  assign seen[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_pe
    assign seen[i+1] = seen[i] | req[i];
    assign grant[i]  = req[i] & ~seen[i];
  end
  assign any = seen[N];

endmodule
