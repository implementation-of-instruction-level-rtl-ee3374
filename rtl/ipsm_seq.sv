// ipsm_seq: the sequencer (S) with fast branching.
//
// Combinational next-PC selection. Fast branching applies general forwarding
// to the sequencer: the compare flag IC (or the condition codes) drives the
// multiplexer that picks the next fetch address among PC+1 (the sequencer
// adder), the absolute branch target held in an immediate operand of the
// instruction (O0 or O1), and a forwarded jump address x. All of this settles
// before the next fetch starts, so a branch has no delay slot.
//
// Interface: sub (sequencer subinstruction), pc, o0, o1, x (value selected by
// sub.x through the cross-bar), ic, icc; next_pc, taken, link (JMPL: write
// link_value = PC+1 into the link register RA), trap (TRAP: stop), sync (SYNC,
// MTAC barrier).
// Timing: combinational.
//
// Taken from the architecture: the control operations and the fast-branching
// principle (the scalar processor's block diagram has a PC adder, PC and
// a temporary register next to the sequencer). This design's own choices: the
// "other" flag, which makes a not-taken branch go to the second operand
// instead of PC+1 (two-target branches such as "BNEZ O1,O0" in the example
// code); branch conditions on N, Z, V, C follow SPARC; TRAP leaves the PC
// unchanged and raises trap; BN (branch never) falls through.
module ipsm_seq
  import ipsm_pkg::*;
#(
  parameter int unsigned PCW = 10
) (
  input  seq_sub_t        sub,
  input  logic [PCW-1:0]  pc,
  input  word_t           o0,
  input  word_t           o1,
  input  word_t           x,
  input  logic            ic,
  input  icc_t            icc,
  output logic [PCW-1:0]  next_pc,
  output logic            taken,
  output logic            link,
  output word_t           link_value,
  output logic            trap,
  output logic            sync
);

  logic [PCW-1:0] pc_inc;
  logic [PCW-1:0] target;
  logic [PCW-1:0] not_taken;
  logic           cond;
  logic           is_branch;

  assign pc_inc     = pc + 1'b1;
  assign target     = sub.tgt ? o1[PCW-1:0] : o0[PCW-1:0];
  assign not_taken  = sub.other ? (sub.tgt ? o0[PCW-1:0] : o1[PCW-1:0]) : pc_inc;
  assign link_value = word_t'(pc_inc);

  always_comb begin
    is_branch = 1'b1;
    unique case (sub.op)
      SEQ_BEQZ: cond = !ic;
      SEQ_BNEZ: cond = ic;
      SEQ_BA:   cond = 1'b1;
      SEQ_BN:   cond = 1'b0;
      SEQ_BNE:  cond = !icc.z;
      SEQ_BE:   cond = icc.z;
      SEQ_BG:   cond = !(icc.z || (icc.n ^ icc.v));
      SEQ_BLE:  cond = icc.z || (icc.n ^ icc.v);
      SEQ_BGE:  cond = !(icc.n ^ icc.v);
      SEQ_BL:   cond = icc.n ^ icc.v;
      SEQ_BGU:  cond = !(icc.c || icc.z);
      SEQ_BLEU: cond = icc.c || icc.z;
      SEQ_BCC:  cond = !icc.c;
      SEQ_BCS:  cond = icc.c;
      SEQ_BPOS: cond = !icc.n;
      SEQ_BNEG: cond = icc.n;
      SEQ_BVC:  cond = !icc.v;
      SEQ_BVS:  cond = icc.v;
      default: begin cond = 1'b0; is_branch = 1'b0; end
    endcase
  end

  always_comb begin
    link  = 1'b0;
    trap  = 1'b0;
    sync  = 1'b0;
    taken = 1'b0;
    if (is_branch) begin
      taken   = cond;
      next_pc = cond ? target : not_taken;
    end else begin
      unique case (sub.op)
        SEQ_JMP:  begin next_pc = x[PCW-1:0]; taken = 1'b1; end
        SEQ_JMPL: begin next_pc = x[PCW-1:0]; taken = 1'b1; link = 1'b1; end
        SEQ_TRAP: begin next_pc = pc;         trap  = 1'b1; end
        SEQ_SYNC: begin next_pc = pc_inc;     sync  = 1'b1; end
        default:  next_pc = pc_inc;
      endcase
    end
  end

endmodule
