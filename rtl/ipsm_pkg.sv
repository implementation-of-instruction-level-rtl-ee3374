// ipsm_pkg: types and constants shared by the scalar unit (MPA) and the
// parallel unit (MTAC) of the instruction-level parallel shared-memory machine.
//
// Both processors use the same uncoded, VLIW-style instruction set: one very
// long instruction word holds two 32-bit immediate operands (O0, O1) and one
// subinstruction field per functional unit. Every operand of every unit is
// picked through a forwarding cross-bar with a 6-bit source code (src_t).
// The names of the operations follow the instruction lists of the
// architecture; their binary codes, the field widths and the source code map
// are this design's own choices.
package ipsm_pkg;

  localparam int unsigned XLEN = 32;
  typedef logic [XLEN-1:0] word_t;

  // ---------------------------------------------------------------------
  // Cross-bar source codes (6 bits)
  //   0..31  registers R0..R31
  //   32     O0 immediate operand      33  O1 immediate operand
  //   34     IC flag as 0/1            35  ID (MTAC thread id) / RA (MPA link)
  //   36     AIC/CMP unit result word
  //   40..55 results of ALUs A0..A15   56..62 results of memory units M0..M6
  //   63     KEEP: a write back with this code leaves the register unchanged
  // ---------------------------------------------------------------------
  localparam int unsigned SRCW = 6;
  typedef logic [SRCW-1:0] src_t;
  localparam src_t SRC_O0   = 6'd32;
  localparam src_t SRC_O1   = 6'd33;
  localparam src_t SRC_IC   = 6'd34;
  localparam src_t SRC_ID   = 6'd35;
  localparam src_t SRC_CMP  = 6'd36;
  localparam src_t SRC_A0   = 6'd40;
  localparam src_t SRC_M0   = 6'd56;
  localparam src_t SRC_KEEP = 6'd63;
  localparam int unsigned NSRC = 64;
  localparam int unsigned MAX_REGS = 32;
  localparam int unsigned MAX_ALUS = 16;
  localparam int unsigned MAX_MUS  = 7;

  // ---------------------------------------------------------------------
  // ALU subinstruction
  // ---------------------------------------------------------------------
  typedef enum logic [5:0] {
    ALU_NOP  = 6'd0,
    ALU_ADD  = 6'd1,  ALU_SUB  = 6'd2,  ALU_MUL  = 6'd3,  ALU_MULU = 6'd4,
    ALU_DIV  = 6'd5,  ALU_DIVU = 6'd6,  ALU_MOD  = 6'd7,  ALU_MODU = 6'd8,
    ALU_AND  = 6'd9,  ALU_OR   = 6'd10, ALU_XOR  = 6'd11, ALU_ANDN = 6'd12,
    ALU_ORN  = 6'd13, ALU_XNOR = 6'd14,
    ALU_SHR  = 6'd15, ALU_SHL  = 6'd16, ALU_SHRA = 6'd17, ALU_ROR  = 6'd18,
    ALU_ROL  = 6'd19,
    ALU_ALB  = 6'd20, ALU_ALBU = 6'd21, ALU_ALH  = 6'd22, ALU_ALHU = 6'd23,
    ALU_ASSB = 6'd24, ALU_ASSH = 6'd25, ALU_ASDB = 6'd26, ALU_ASDH = 6'd27,
    ALU_ADDX = 6'd28, ALU_SUBX = 6'd29, ALU_TADD = 6'd30, ALU_TSUB = 6'd31,
    ALU_SEL  = 6'd32
  } alu_op_e;

  typedef struct packed {
    alu_op_e op;
    src_t    x;
    src_t    y;
  } alu_sub_t;   // 18 bits

  // ---------------------------------------------------------------------
  // Compare (AIC / CMP) subinstruction
  // ---------------------------------------------------------------------
  typedef enum logic [4:0] {
    CMP_NOP   = 5'd0,
    CMP_SEQ   = 5'd1,  CMP_SNE   = 5'd2,  CMP_SLT   = 5'd3,  CMP_SLE   = 5'd4,
    CMP_SGT   = 5'd5,  CMP_SGE   = 5'd6,  CMP_SLTU  = 5'd7,  CMP_SLEU  = 5'd8,
    CMP_SGTU  = 5'd9,  CMP_SGEU  = 5'd10,
    CMP_ADDCC = 5'd11, CMP_SUBCC = 5'd12, CMP_MULCC = 5'd13, CMP_MULUCC = 5'd14,
    CMP_DIVCC = 5'd15, CMP_DIVUCC = 5'd16, CMP_MODCC = 5'd17, CMP_MODUCC = 5'd18,
    CMP_ADDXCC = 5'd19, CMP_SUBXCC = 5'd20, CMP_TADDCC = 5'd21, CMP_TSUBCC = 5'd22,
    CMP_ANDCC = 5'd23, CMP_ORCC  = 5'd24, CMP_XORCC = 5'd25, CMP_ANDNCC = 5'd26,
    CMP_ORNCC = 5'd27, CMP_XNORCC = 5'd28
  } cmp_op_e;

  typedef struct packed {
    cmp_op_e op;
    src_t    x;
    src_t    y;
  } cmp_sub_t;   // 17 bits

  // Integer condition codes, SPARC-style
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

  // ---------------------------------------------------------------------
  // Memory unit subinstruction: address source x, store data source y
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    MEM_NOP = 4'd0,
    MEM_LDB = 4'd1, MEM_LDBU = 4'd2, MEM_LDH = 4'd3, MEM_LDHU = 4'd4,
    MEM_LD  = 4'd5,
    MEM_STB = 4'd6, MEM_STH  = 4'd7, MEM_ST  = 4'd8
  } mem_op_e;

  typedef struct packed {
    mem_op_e op;
    src_t    addr;
    src_t    data;
  } mem_sub_t;   // 16 bits

  function automatic logic mem_is_load(mem_op_e op);
    return op inside {MEM_LDB, MEM_LDBU, MEM_LDH, MEM_LDHU, MEM_LD};
  endfunction

  function automatic logic mem_is_store(mem_op_e op);
    return op inside {MEM_STB, MEM_STH, MEM_ST};
  endfunction

  // ---------------------------------------------------------------------
  // Sequencer subinstruction
  //   tgt   : branch target operand, 0 = O0, 1 = O1
  //   other : when set, a branch not taken goes to the other operand
  //           instead of PC+1 (two-way branch)
  //   x     : source of the address of JMP / JMPL / TRAP
  // ---------------------------------------------------------------------
  typedef enum logic [4:0] {
    SEQ_NEXT = 5'd0,
    SEQ_BEQZ = 5'd1,  SEQ_BNEZ = 5'd2,
    SEQ_JMP  = 5'd3,  SEQ_JMPL = 5'd4,  SEQ_TRAP = 5'd5,
    SEQ_BA   = 5'd6,  SEQ_BN   = 5'd7,  SEQ_BNE  = 5'd8,  SEQ_BE   = 5'd9,
    SEQ_BG   = 5'd10, SEQ_BLE  = 5'd11, SEQ_BGE  = 5'd12, SEQ_BL   = 5'd13,
    SEQ_BGU  = 5'd14, SEQ_BLEU = 5'd15, SEQ_BCC  = 5'd16, SEQ_BCS  = 5'd17,
    SEQ_BPOS = 5'd18, SEQ_BNEG = 5'd19, SEQ_BVC  = 5'd20, SEQ_BVS  = 5'd21,
    SEQ_SYNC = 5'd22
  } seq_op_e;

  typedef struct packed {
    seq_op_e op;
    logic    tgt;
    logic    other;
    src_t    x;
  } seq_sub_t;   // 13 bits

  // Byte lanes are big-endian, as in the DLX instruction set the MPA and MTAC
  // instruction sets are derived from: byte address 0 is bits 31:24.
  function automatic logic [3:0] lane_mask(mem_op_e op, logic [1:0] a);
    unique case (op)
      MEM_STB, MEM_LDB, MEM_LDBU: return 4'b1000 >> a;
      MEM_STH, MEM_LDH, MEM_LDHU: return a[1] ? 4'b0011 : 4'b1100;
      default:                    return 4'b1111;
    endcase
  endfunction

  // Place store data in its byte lane(s)
  function automatic word_t store_align(mem_op_e op, logic [1:0] a, word_t d);
    unique case (op)
      MEM_STB: return word_t'(d[7:0])  << (8 * (3 - int'(a)));
      MEM_STH: return a[1] ? {16'h0, d[15:0]} : {d[15:0], 16'h0};
      default: return d;
    endcase
  endfunction

  // Extract and extend loaded data from its byte lane(s)
  function automatic word_t load_align(mem_op_e op, logic [1:0] a, word_t d);
    logic [7:0]  b;
    logic [15:0] h;
    b = 8'(d >> (8 * (3 - int'(a))));
    h = a[1] ? d[15:0] : d[31:16];
    unique case (op)
      MEM_LDB:  return {{24{b[7]}}, b};
      MEM_LDBU: return {24'h0, b};
      MEM_LDH:  return {{16{h[15]}}, h};
      MEM_LDHU: return {16'h0, h};
      default:  return d;
    endcase
  endfunction

endpackage
