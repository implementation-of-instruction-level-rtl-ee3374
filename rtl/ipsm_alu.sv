// ipsm_alu: the arithmetic and logic unit of the MPA and MTAC processors.
//
// A purely combinational unit: result = op(x, y). It executes the integer
// ALU subinstructions of the instruction set (arithmetic, logical, shifts and
// rotates, the byte/halfword align operations used to build sub-word loads and
// stores out of word accesses, add/subtract with carry, tagged add/subtract)
// and, for the MTAC, SEL, which picks x or y by the result of the latest
// compare operation earlier in the functional unit chain (sel_flag).
//
// Interface: op, x, y, carry_in (C flag of the condition codes, used by
// ADDX/SUBX), sel_flag (compare result, used by SEL); result.
// Timing: combinational; the surrounding pipeline registers the operands
// (AA/AB) and the result.
//
// Taken from the architecture: the list of operations and what each does.
// This design's own choices: byte lanes are big-endian (byte 0 = bits 31:24);
// ALB/ALH extract a byte/halfword of x at byte offset y[1:0]; ASSB/ASSH move
// the low byte/halfword of x into the lane at offset y[1:0]; ASDB/ASDH clear
// that lane in x (so OR of the two merges a sub-word store into a word);
// shift and rotate amounts are y[4:0]; division by zero gives all ones and
// modulo by zero gives x; TADD/TSUB compute the plain sum/difference (tag
// checking only affects the condition codes, in ipsm_cmp).
module ipsm_alu
  import ipsm_pkg::*;
(
  input  alu_op_e op,
  input  word_t   x,
  input  word_t   y,
  input  logic    carry_in,
  input  logic    sel_flag,
  output word_t   result
);

  logic [4:0]  sh;
  logic [1:0]  lane;
  logic [63:0] prod_s;
  logic [63:0] prod_u;
  word_t       byte_mask;
  word_t       half_mask;

  assign sh   = y[4:0];
  assign lane = y[1:0];
  assign prod_s = 64'($signed(x) * $signed(y));
  assign prod_u = 64'(x * y);
  assign byte_mask = 32'hFF00_0000 >> (8 * lane);
  assign half_mask = lane[1] ? 32'h0000_FFFF : 32'hFFFF_0000;

  function automatic word_t sdiv(word_t a, word_t b);
    if (b == '0)                               return '1;
    else if (a == 32'h8000_0000 && b == '1)    return a;
    else                                       return word_t'($signed(a) / $signed(b));
  endfunction

  function automatic word_t smod(word_t a, word_t b);
    if (b == '0)                               return a;
    else if (a == 32'h8000_0000 && b == '1)    return '0;
    else                                       return word_t'($signed(a) % $signed(b));
  endfunction

  always_comb begin
    unique case (op)
      ALU_ADD:  result = x + y;
      ALU_SUB:  result = x - y;
      ALU_MUL:  result = prod_s[31:0];
      ALU_MULU: result = prod_u[31:0];
      ALU_DIV:  result = sdiv(x, y);
      ALU_DIVU: result = (y == '0) ? '1 : x / y;
      ALU_MOD:  result = smod(x, y);
      ALU_MODU: result = (y == '0) ? x : x % y;
      ALU_AND:  result = x & y;
      ALU_OR:   result = x | y;
      ALU_XOR:  result = x ^ y;
      ALU_ANDN: result = x & ~y;
      ALU_ORN:  result = x | ~y;
      ALU_XNOR: result = ~(x ^ y);
      ALU_SHR:  result = x >> sh;
      ALU_SHL:  result = x << sh;
      ALU_SHRA: result = word_t'($signed(x) >>> sh);
      ALU_ROR:  result = (x >> sh) | (x << (6'd32 - {1'b0, sh}));
      ALU_ROL:  result = (x << sh) | (x >> (6'd32 - {1'b0, sh}));
      ALU_ALB:  result = load_align(MEM_LDB,  lane, x);
      ALU_ALBU: result = load_align(MEM_LDBU, lane, x);
      ALU_ALH:  result = load_align(MEM_LDH,  lane, x);
      ALU_ALHU: result = load_align(MEM_LDHU, lane, x);
      ALU_ASSB: result = store_align(MEM_STB, lane, x);
      ALU_ASSH: result = store_align(MEM_STH, lane, x);
      ALU_ASDB: result = x & ~byte_mask;
      ALU_ASDH: result = x & ~half_mask;
      ALU_ADDX: result = x + y + word_t'(carry_in);
      ALU_SUBX: result = x - y - word_t'(carry_in);
      ALU_TADD: result = x + y;
      ALU_TSUB: result = x - y;
      ALU_SEL:  result = sel_flag ? x : y;
      default:  result = '0;   // NOP
    endcase
  end

endmodule
