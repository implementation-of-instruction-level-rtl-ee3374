// crcw_common_logic: port logic of a CRCW Common multiport memory cell.
//
// In a CRCW Common memory several ports may write the same cell in the same
// cycle, all with the same data. The cell therefore ORs the gated data-in
// lines of all ports into the single input of the storage element, ORs the
// write requests into one write line and ORs the select lines into one cell
// select. The output circuitry is duplicated: each port sees the stored word
// only when it selects the cell.
//
// Interface (N ports, W-bit word): s[N] cell select per port (row AND
// column select), w[N] write request per port, i[N] data in per port, q the
// stored word; wri (write the cell), inp (word to write), sel (cell selected
// by any port), o[N] data out per port.
// Timing: combinational; the storage element (an SR latch in the architecture description,
// a clocked word in mpram) is outside.
//
// Follows the architecture description: OR of inputs, OR of read/write lines, OR of select
// lines, per-port output gating. This design's own choices: write requests
// are active high; a port's data-in is gated by its select AND its write
// request (so a reading port cannot disturb a write); one cell is a W-bit
// word, the reference cell duplicated per data bit.
module crcw_common_logic #(
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
  output logic [N-1:0][W-1:0]  o
);

  always_comb begin
    inp = '0;
    for (int k = 0; k < N; k++) begin
      if (s[k] && w[k]) inp = inp | i[k];
      o[k] = s[k] ? q : '0;
    end
  end

  assign wri = |(s & w);
  assign sel = |s;

endmodule
