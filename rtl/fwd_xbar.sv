// fwd_xbar: the general forwarding cross-bar.
//
// Every functional unit input (ALU operand registers AA/AB, compare unit
// inputs, memory address/data registers, register write-back inputs, the
// jump address of the sequencer) has its own multiplexer onto a common bus
// that carries all results: the register contents, the two immediate
// operands of the instruction, the compare flag and result, and the results
// of every ALU and memory unit. The select code of each multiplexer is a
// bit field of the (uncoded) instruction, so no decode stage is needed.
//
// Interface: srcs (the NSRC source words, indexed by the src_t code of
// ipsm_pkg), sel (one code per output); outs.
// Timing: combinational.
//
// Taken from the architecture: a cross-bar that connects every result to the
// input multiplexer of every unit, selected by operation-code bits. The source
// numbering is this design's own.
module fwd_xbar
  import ipsm_pkg::*;
#(
  parameter int unsigned NOUT = 4
) (
  input  word_t srcs [NSRC],
  input  src_t  sel  [NOUT],
  output word_t outs [NOUT]
);

  for (genvar i = 0; i < NOUT; i++) begin : g_mux
    assign outs[i] = srcs[sel[i]];
  end

endmodule
