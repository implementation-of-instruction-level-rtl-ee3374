// crcw_priority_logic: port logic of a CRCW Priority multiport memory cell.
//
// In a CRCW Priority memory several ports may write different data to the
// same cell in one cycle; the port with the lowest index succeeds. A
// parallel priority encoder keeps only the first of the selected write
// requests; each port's data-in is ANDed with its encoder output, and the
// results are ORed into the input of the storage element. The encoder
// outputs ORed together form the write line. The output circuitry is
// duplicated per port.
//
// Interface (N ports, W-bit word): s[N] cell select, w[N] write request,
// i[N] data in, q stored word; wri, inp, sel, o[N] as in crcw_common_logic,
// and win[N], the one-hot winning port.
// Timing: combinational.
//
// Follows the architecture description: lowest index wins, parallel priority encoder,
// AND-OR data selection, OR of write lines, per-port outputs. This design's
// own choices: write requests are active high (the architecture description selects the
// "first inactive read/write line", writing on an inactive line); a W-bit
// word per cell.
module crcw_priority_logic #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 1
) (
  input  logic [N-1:0]         s,
  input  logic [N-1:0]         w,
  input  logic [N-1:0][W-1:0]  i,
  input  logic [W-1:0]         q,
  output logic                 wri,
  output logic [W-1:0]         inp,
  output logic                 sel,
  output logic [N-1:0][W-1:0]  o,
  output logic [N-1:0]         win
);

  prio_encoder #(.N(N)) u_pe (
    .req   (s & w),
    .grant (win),
    .any   (wri)
  );

  always_comb begin
    inp = '0;
    for (int k = 0; k < N; k++) begin
      inp  = inp | (i[k] & {W{win[k]}});
      o[k] = s[k] ? q : '0;
    end
  end

  assign sel = |s;

endmodule
