// tb_ipsm_alu: self-checking test of the ALU.
//
// Drives every ALU operation with directed corner values (zero divisor,
// most negative number, shift by 0/31, every byte lane) and with random
// operands, and compares the result against a reference model written in
// plain integer arithmetic. The ALU is combinational, so each vector is
// checked 1 ns after it is applied.
module tb_ipsm_alu;
  import ipsm_pkg::*;

  alu_op_e op;
  word_t   x, y, r;
  logic    cin, self;
  int      checks = 0, failures = 0;

  ipsm_alu dut (.op(op), .x(x), .y(y), .carry_in(cin), .sel_flag(self), .result(r));

  function automatic word_t ref_alu(alu_op_e o, word_t a, word_t b, logic c, logic s);
    longint sa, sb;
    int     k;
    word_t  t;
    sa = longint'(signed'(a));
    sb = longint'(signed'(b));
    k  = int'(b[4:0]);
    case (o)
      ALU_ADD, ALU_TADD:  return a + b;
      ALU_SUB, ALU_TSUB:  return a - b;
      ALU_MUL, ALU_MULU:  return word_t'(sa * sb);
      ALU_DIV:  return (b == 0) ? 32'hFFFF_FFFF : (sb == -1) ? word_t'(-sa) : word_t'(sa / sb);
      ALU_DIVU: return (b == 0) ? 32'hFFFF_FFFF : a / b;
      ALU_MOD:  return (b == 0) ? a : (sb == -1) ? 32'd0 : word_t'(sa % sb);
      ALU_MODU: return (b == 0) ? a : a % b;
      ALU_AND:  return a & b;
      ALU_OR:   return a | b;
      ALU_XOR:  return a ^ b;
      ALU_ANDN: return a & ~b;
      ALU_ORN:  return a | ~b;
      ALU_XNOR: return ~(a ^ b);
      ALU_SHR:  return a >> k;
      ALU_SHL:  return a << k;
      ALU_SHRA: return word_t'(sa >>> k);
      ALU_ROR:  begin t = a; repeat (k) t = {t[0], t[31:1]}; return t; end
      ALU_ROL:  begin t = a; repeat (k) t = {t[30:0], t[31]}; return t; end
      ALU_ALB:  begin t = a >> (24 - 8 * int'(b[1:0])); return {{24{t[7]}}, t[7:0]}; end
      ALU_ALBU: begin t = a >> (24 - 8 * int'(b[1:0])); return {24'h0, t[7:0]}; end
      ALU_ALH:  begin t = b[1] ? a : a >> 16; return {{16{t[15]}}, t[15:0]}; end
      ALU_ALHU: begin t = b[1] ? a : a >> 16; return {16'h0, t[15:0]}; end
      ALU_ASSB: return {24'h0, a[7:0]} << (24 - 8 * int'(b[1:0]));
      ALU_ASSH: return b[1] ? {16'h0, a[15:0]} : {a[15:0], 16'h0};
      ALU_ASDB: return a & ~(32'hFF << (24 - 8 * int'(b[1:0])));
      ALU_ASDH: return b[1] ? (a & 32'hFFFF_0000) : (a & 32'h0000_FFFF);
      ALU_ADDX: return a + b + c;
      ALU_SUBX: return a - b - c;
      ALU_SEL:  return s ? a : b;
      default:  return 0;
    endcase
  endfunction

  task automatic check(alu_op_e o, word_t a, word_t b, logic c, logic s);
    word_t e;
    op = o; x = a; y = b; cin = c; self = s;
    #1;
    e = ref_alu(o, a, b, c, s);
    checks++;
    if (r !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%h y=%h c=%b s=%b got %h exp %h", o.name(), a, b, c, s, r, e);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  word_t corner [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                        32'h1234_5678, 32'h0000_001F, 32'h8765_4321};

  initial begin
    alu_op_e o;
    op = ALU_NOP; x = 0; y = 0; cin = 0; self = 0;
    for (int v = 0; v <= int'(ALU_SEL); v++) begin
      o = alu_op_e'(v);
      foreach (corner[i]) foreach (corner[j]) check(o, corner[i], corner[j], 1'(i), 1'(j));
      for (int n = 0; n < 200; n++)
        check(o, $urandom, (n % 4 == 0) ? word_t'($urandom % 40) : $urandom, 1'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
