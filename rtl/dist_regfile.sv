// dist_regfile: distributed register file.
//
// Instead of one multiported register array, each register R0..R(NREG-1) is
// a separate unit with its own input multiplexer on the forwarding cross-bar
// and its own output onto it. Every register can therefore be read by every
// unit and written in the same cycle, which general forwarding needs. A
// register whose write-back code is KEEP (63) keeps its value.
//
// Interface: clk, rst_n (asynchronous, active low: all registers to zero),
// en (write enable for the whole file, low while the processor is halted),
// srcs (the cross-bar source words), sel (one write-back source code per
// register, the WBn fields of the instruction); regs (all register values).
// Timing: registers load on the rising clock edge ("R <- MuxR" in the latch
// phase of the execute stage).
//
// Taken from the architecture: registers as separate units on the cross-bar
// with one input multiplexer each; "WBn Xx" writes Xx to Rn. This design's own
// choices: the KEEP code, reset to zero, NREG = 32 (the number of registers is
// not given; 32 as in the DLX architecture the instruction set is derived
// from).
module dist_regfile
  import ipsm_pkg::*;
#(
  parameter int unsigned NREG = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t srcs [NSRC],
  input  src_t  sel  [NREG],
  output word_t regs [NREG]
);

  word_t muxed [NREG];

  fwd_xbar #(.NOUT(NREG)) u_mux (
    .srcs (srcs),
    .sel  (sel),
    .outs (muxed)
  );

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                         regs[i] <= '0;
      else if (en && sel[i] != SRC_KEEP)  regs[i] <= muxed[i];
    end
  end

endmodule
