// tb_ipsm_cmp: self-checking test of the compare / condition-code unit.
//
// Every set-on-compare operation is checked for the 0/1 flag it returns and
// for leaving the condition codes alone; every operation that sets the
// integer condition codes is checked for N, Z, V and C against a 64-bit
// integer reference model. Directed corner operands are followed by random
// ones. Combinational: each vector is checked 1 ns after it is applied.
module tb_ipsm_cmp;
  import ipsm_pkg::*;

  cmp_op_e op;
  word_t   x, y, res;
  icc_t    icc_in, icc;
  logic    set_ic, ic, set_cc;
  int      checks = 0, failures = 0;

  ipsm_cmp dut (.op(op), .x(x), .y(y), .icc_in(icc_in), .set_ic(set_ic), .ic(ic),
                .set_cc(set_cc), .icc(icc), .result(res));

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL %s op=%s x=%h y=%h", m, op.name(), x, y);
  endtask

  task automatic check(cmp_op_e o, word_t a, word_t b, icc_t ci);
    longint sa, sb, ua, ub, w;
    logic   e_ic, is_set, tg;
    word_t  e_res;
    icc_t   e_icc;
    op = o; x = a; y = b; icc_in = ci;
    #1;
    sa = longint'(signed'(a)); sb = longint'(signed'(b));
    ua = longint'(a);          ub = longint'(b);
    is_set = 1'b1;
    case (o)
      CMP_SEQ:  e_ic = (a == b);
      CMP_SNE:  e_ic = (a != b);
      CMP_SLT:  e_ic = (sa <  sb);
      CMP_SLE:  e_ic = (sa <= sb);
      CMP_SGT:  e_ic = (sa >  sb);
      CMP_SGE:  e_ic = (sa >= sb);
      CMP_SLTU: e_ic = (ua <  ub);
      CMP_SLEU: e_ic = (ua <= ub);
      CMP_SGTU: e_ic = (ua >  ub);
      CMP_SGEU: e_ic = (ua >= ub);
      default:  begin e_ic = 1'b0; is_set = 1'b0; end
    endcase
    if (o == CMP_NOP) begin
      checks++;
      if (set_ic !== 1'b0 || set_cc !== 1'b0) fail("nop");
      return;
    end
    if (is_set) begin
      checks++;
      if (set_ic !== 1'b1 || set_cc !== 1'b0 || ic !== e_ic || res !== word_t'(e_ic)) fail("set");
      return;
    end
    // condition code operations
    e_icc.v = 1'b0; e_icc.c = 1'b0;
    tg = (a[1:0] != 0) || (b[1:0] != 0);
    case (o)
      CMP_ADDCC, CMP_ADDXCC, CMP_TADDCC: begin
        w = ua + ub + ((o == CMP_ADDXCC) ? longint'(ci.c) : 0);
        e_res = word_t'(w);
        e_icc.c = w[32];
        e_icc.v = (a[31] == b[31]) && (e_res[31] != a[31]);
        if (o == CMP_TADDCC && tg) e_icc.v = 1'b1;
      end
      CMP_SUBCC, CMP_SUBXCC, CMP_TSUBCC: begin
        w = ua - ub - ((o == CMP_SUBXCC) ? longint'(ci.c) : 0);
        e_res = word_t'(w);
        e_icc.c = (w < 0);
        e_icc.v = (a[31] != b[31]) && (e_res[31] != a[31]);
        if (o == CMP_TSUBCC && tg) e_icc.v = 1'b1;
      end
      CMP_MULCC:  e_res = word_t'(sa * sb);
      CMP_MULUCC: e_res = word_t'(ua * ub);
      CMP_DIVCC:  e_res = (b == 0) ? '1 : (sb == -1) ? word_t'(-sa) : word_t'(sa / sb);
      CMP_DIVUCC: e_res = (b == 0) ? '1 : a / b;
      CMP_MODCC:  e_res = (b == 0) ? a : (sb == -1) ? 0 : word_t'(sa % sb);
      CMP_MODUCC: e_res = (b == 0) ? a : a % b;
      CMP_ANDCC:  e_res = a & b;
      CMP_ORCC:   e_res = a | b;
      CMP_XORCC:  e_res = a ^ b;
      CMP_ANDNCC: e_res = a & ~b;
      CMP_ORNCC:  e_res = a | ~b;
      default:    e_res = ~(a ^ b);
    endcase
    e_icc.n = e_res[31];
    e_icc.z = (e_res == 0);
    checks++;
    if (set_cc !== 1'b1 || set_ic !== 1'b0 || icc !== e_icc || res !== e_res) begin
      fail("cc");
      if (failures < 10) $display("   got icc=%b res=%h exp icc=%b res=%h", icc, res, e_icc, e_res);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  word_t corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                        32'h0000_0004, 32'hFFFF_FFFE};

  initial begin
    op = CMP_NOP; x = 0; y = 0; icc_in = '0;
    for (int v = 0; v <= int'(CMP_XNORCC); v++) begin
      foreach (corner[i]) foreach (corner[j]) check(cmp_op_e'(v), corner[i], corner[j], icc_t'(4'(i + j)));
      for (int n = 0; n < 200; n++)
        check(cmp_op_e'(v), $urandom, (n % 3 == 0) ? word_t'($urandom % 8) : $urandom, icc_t'(4'($urandom)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
