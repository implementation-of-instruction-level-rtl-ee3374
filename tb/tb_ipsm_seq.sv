// tb_ipsm_seq: self-checking test of the sequencer (next-PC logic).
//
// For every sequencer operation and every combination of IC flag, condition
// codes, target select and two-way flag, the next PC, taken, link, trap and
// sync outputs are compared with a reference model. The sequencer decides
// the next PC in the same cycle (single-cycle branching, no delay slot), so
// each vector is checked 1 ns after it is applied.
module tb_ipsm_seq;
  import ipsm_pkg::*;

  localparam int PCW = 10;
  seq_sub_t       sub;
  logic [PCW-1:0] pc, npc;
  word_t          o0, o1, x, lv;
  logic           ic, taken, link, trap, sync;
  icc_t           icc;
  int             checks = 0, failures = 0;

  ipsm_seq #(.PCW(PCW)) dut (.sub(sub), .pc(pc), .o0(o0), .o1(o1), .x(x), .ic(ic), .icc(icc),
    .next_pc(npc), .taken(taken), .link(link), .link_value(lv), .trap(trap), .sync(sync));

  function automatic logic cond_of(seq_op_e o, logic f, icc_t c, output logic br);
    logic lt;
    lt = c.n != c.v;
    br = 1'b1;
    case (o)
      SEQ_BEQZ: return f == 0;
      SEQ_BNEZ: return f == 1;
      SEQ_BA:   return 1;
      SEQ_BN:   return 0;
      SEQ_BNE:  return c.z == 0;
      SEQ_BE:   return c.z == 1;
      SEQ_BG:   return !c.z && !lt;
      SEQ_BLE:  return c.z || lt;
      SEQ_BGE:  return !lt;
      SEQ_BL:   return lt;
      SEQ_BGU:  return !c.c && !c.z;
      SEQ_BLEU: return c.c || c.z;
      SEQ_BCC:  return !c.c;
      SEQ_BCS:  return c.c;
      SEQ_BPOS: return !c.n;
      SEQ_BNEG: return c.n;
      SEQ_BVC:  return !c.v;
      SEQ_BVS:  return c.v;
      default:  begin br = 0; return 0; end
    endcase
  endfunction

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic c, br;
    logic [PCW-1:0] e_pc, tg, ot;
    logic e_taken, e_link, e_trap, e_sync;
    for (int v = 0; v <= int'(SEQ_SYNC); v++)
      for (int m = 0; m < 64; m++) begin
        sub.op = seq_op_e'(v); sub.tgt = m[0]; sub.other = m[1]; sub.x = 6'($urandom);
        ic = m[2]; icc = icc_t'(m[5:2] ^ 4'(v));
        pc = PCW'($urandom); o0 = $urandom; o1 = $urandom; x = $urandom;
        #1;
        c = cond_of(sub.op, ic, icc, br);
        tg = sub.tgt ? o1[PCW-1:0] : o0[PCW-1:0];
        ot = sub.other ? (sub.tgt ? o0[PCW-1:0] : o1[PCW-1:0]) : pc + 1;
        e_taken = 0; e_link = 0; e_trap = 0; e_sync = 0;
        if (br) begin e_pc = c ? tg : ot; e_taken = c; end
        else case (sub.op)
          SEQ_JMP:  begin e_pc = x[PCW-1:0]; e_taken = 1; end
          SEQ_JMPL: begin e_pc = x[PCW-1:0]; e_taken = 1; e_link = 1; end
          SEQ_TRAP: begin e_pc = pc; e_trap = 1; end
          SEQ_SYNC: begin e_pc = pc + 1; e_sync = 1; end
          default:  e_pc = pc + 1;
        endcase
        checks++;
        if (npc !== e_pc || taken !== e_taken || link !== e_link || trap !== e_trap ||
            sync !== e_sync || lv !== word_t'(PCW'(pc + 1))) begin
          failures++;
          if (failures < 10) $display("FAIL %s m=%0d npc=%h exp %h", sub.op.name(), m, npc, e_pc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
