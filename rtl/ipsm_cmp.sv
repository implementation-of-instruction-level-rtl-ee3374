// ipsm_cmp: the compare unit (AIC in the MPA, CMP in the MTAC).
//
// Combinational. The set-on-compare operations (SEQ .. SGEU) produce the
// one-bit integer compare flag IC that the sequencer branches on (BEQZ/BNEZ)
// and that SEL uses. The "...CC" operations compute an arithmetic or logical
// result and set the integer condition codes N, Z, V, C that the SPARC-style
// conditional branches (BG, BLE, BCS, ...) test.
//
// Interface: op, x, y, icc_in (current codes; C feeds ADDXCC/SUBXCC);
// set_ic/ic, set_cc/icc, result (the result word of a CC operation, or IC as
// 0/1 for a set operation).
// Timing: combinational; the caller keeps IC and the codes in state
// registers and updates them only when set_ic / set_cc is high.
//
// Taken from the architecture: the list of compare and CC operations.
// This design's own choices: condition codes follow the SPARC definitions
// (C is the carry out of an add and the borrow of a subtract; V is two's
// complement overflow; for multiply, divide, modulo and logical operations
// V and C are cleared); TADDCC/TSUBCC also set V when a low tag bit
// (bits 1:0) of either operand is non-zero; division by zero behaves as in
// ipsm_alu.
module ipsm_cmp
  import ipsm_pkg::*;
(
  input  cmp_op_e op,
  input  word_t   x,
  input  word_t   y,
  input  icc_t    icc_in,
  output logic    set_ic,
  output logic    ic,
  output logic    set_cc,
  output icc_t    icc,
  output word_t   result
);

  logic signed [31:0] xs;
  logic signed [31:0] ys;
  logic [32:0] sum;
  logic [32:0] dif;
  logic [32:0] sumx;
  logic [32:0] difx;
  logic        v_add;
  logic        v_sub;
  logic        v_addx;
  logic        v_subx;
  logic        tag;
  logic [63:0] prod_s;
  logic [63:0] prod_u;

  assign xs     = $signed(x);
  assign ys     = $signed(y);
  assign sum    = {1'b0, x} + {1'b0, y};
  assign dif    = {1'b0, x} - {1'b0, y};
  assign sumx   = {1'b0, x} + {1'b0, y} + 33'(icc_in.c);
  assign difx   = {1'b0, x} - {1'b0, y} - 33'(icc_in.c);
  assign v_add  = (x[31] == y[31]) && (sum[31] != x[31]);
  assign v_sub  = (x[31] != y[31]) && (dif[31] != x[31]);
  assign v_addx = (x[31] == y[31]) && (sumx[31] != x[31]);
  assign v_subx = (x[31] != y[31]) && (difx[31] != x[31]);
  assign tag    = (x[1:0] != 2'b00) || (y[1:0] != 2'b00);
  assign prod_s = 64'(xs * ys);
  assign prod_u = 64'(x * y);

  function automatic word_t sdiv(word_t a, word_t b);
    if (b == '0)                            return '1;
    else if (a == 32'h8000_0000 && b == '1) return a;
    else                                    return word_t'($signed(a) / $signed(b));
  endfunction

  function automatic word_t smod(word_t a, word_t b);
    if (b == '0)                            return a;
    else if (a == 32'h8000_0000 && b == '1) return '0;
    else                                    return word_t'($signed(a) % $signed(b));
  endfunction

  always_comb begin
    word_t r;
    logic  v;
    logic  c;
    set_ic = 1'b0;
    ic     = 1'b0;
    set_cc = 1'b0;
    r      = '0;
    v      = 1'b0;
    c      = 1'b0;
    unique case (op)
      CMP_SEQ:  begin set_ic = 1'b1; ic = (x == y);  end
      CMP_SNE:  begin set_ic = 1'b1; ic = (x != y);  end
      CMP_SLT:  begin set_ic = 1'b1; ic = (xs <  ys); end
      CMP_SLE:  begin set_ic = 1'b1; ic = (xs <= ys); end
      CMP_SGT:  begin set_ic = 1'b1; ic = (xs >  ys); end
      CMP_SGE:  begin set_ic = 1'b1; ic = (xs >= ys); end
      CMP_SLTU: begin set_ic = 1'b1; ic = (x <  y);  end
      CMP_SLEU: begin set_ic = 1'b1; ic = (x <= y);  end
      CMP_SGTU: begin set_ic = 1'b1; ic = (x >  y);  end
      CMP_SGEU: begin set_ic = 1'b1; ic = (x >= y);  end
      CMP_ADDCC:  begin set_cc = 1'b1; r = sum[31:0];  v = v_add;  c = sum[32];  end
      CMP_SUBCC:  begin set_cc = 1'b1; r = dif[31:0];  v = v_sub;  c = dif[32];  end
      CMP_ADDXCC: begin set_cc = 1'b1; r = sumx[31:0]; v = v_addx; c = sumx[32]; end
      CMP_SUBXCC: begin set_cc = 1'b1; r = difx[31:0]; v = v_subx; c = difx[32]; end
      CMP_TADDCC: begin set_cc = 1'b1; r = sum[31:0];  v = v_add | tag; c = sum[32]; end
      CMP_TSUBCC: begin set_cc = 1'b1; r = dif[31:0];  v = v_sub | tag; c = dif[32]; end
      CMP_MULCC:  begin set_cc = 1'b1; r = prod_s[31:0]; end
      CMP_MULUCC: begin set_cc = 1'b1; r = prod_u[31:0]; end
      CMP_DIVCC:  begin set_cc = 1'b1; r = sdiv(x, y); end
      CMP_DIVUCC: begin set_cc = 1'b1; r = (y == '0) ? '1 : x / y; end
      CMP_MODCC:  begin set_cc = 1'b1; r = smod(x, y); end
      CMP_MODUCC: begin set_cc = 1'b1; r = (y == '0) ? x : x % y; end
      CMP_ANDCC:  begin set_cc = 1'b1; r = x & y;    end
      CMP_ORCC:   begin set_cc = 1'b1; r = x | y;    end
      CMP_XORCC:  begin set_cc = 1'b1; r = x ^ y;    end
      CMP_ANDNCC: begin set_cc = 1'b1; r = x & ~y;   end
      CMP_ORNCC:  begin set_cc = 1'b1; r = x | ~y;   end
      CMP_XNORCC: begin set_cc = 1'b1; r = ~(x ^ y); end
      default: ;
    endcase
    icc    = '{n: r[31], z: (r == '0), v: v, c: c};
    result = set_ic ? word_t'(ic) : r;
  end

endmodule
