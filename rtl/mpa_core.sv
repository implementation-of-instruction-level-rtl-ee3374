// mpa_core: Minimal Pipeline Architecture processor (the scalar unit).
//
// A VLIW processor whose pipeline has only two stages, instruction fetch (IF)
// and execute (EX), so that neither data nor branch dependencies cost a
// cycle. Four techniques make that possible:
//   * general forwarding: every unit input has its own multiplexer on a
//     cross-bar that carries all results, register contents and immediate
//     operands (fwd_xbar); registers are separate units on the cross-bar
//     (dist_regfile);
//   * a simple instruction set: each subinstruction occupies exactly one
//     unit, addressing is forwarded absolute (the address comes through the
//     cross-bar from an ALU, a memory unit, an operand or a register);
//   * an uncoded instruction format: the fetched word OO directly drives the
//     multiplexers before it is even latched into the operation register O;
//   * fast branching: the compare flag selects the next fetch address
//     (ipsm_seq) before the next fetch starts.
//
// One instruction completes per clock. In the cycle in which instruction k
// is in O, its units execute from their operand registers (A <- AA op AB,
// AIC <- AIA op AIB, M <- M[MA]) while instruction k+1 is fetched from the
// instruction memory at PC (OO <- I[PC]) and its cross-bar selects settle.
// At the rising edge the operand registers, the registers R (write back),
// O and PC are all loaded ("latch" phase) and stores of instruction k are
// written. Results of instruction k are thus available to instruction k+1
// without delay, and a branch in instruction k+1 tests the compare result of
// instruction k.
//
// Configuration M5 (default): NALU = 1 ALU, one compare unit (AIC),
// NMU = 1 memory unit, the sequencer, NREG = 32 registers. The instruction
// word is then 320 bits: O0, O1 (2 x 32), ALU 18, AIC 17, memory 16,
// sequencer 13, write back 32 x 6.
//
// Interface: clk, rst_n (async, active low), run (execute while high);
// imem_we/imem_addr/imem_wdata load the instruction memory; the data memory
// is an mpram with one port per memory unit plus a host port (host_*), CRCW
// Priority so that a memory unit wins over the host; halted (after TRAP),
// pc, retired (count of executed instructions).
//
// Taken from the architecture: units, cross-bar, phases of the two-stage
// pipeline, instruction set (integer part), multiport data cache.
// This design's own choices: bit encodings and field order; the immediate
// operands O0/O1 on the cross-bar are those of the instruction being latched
// (the same instruction, as in the code examples); a unit with no
// subinstruction produces 0; IC and the condition codes are state registers
// changed only by compare operations; the link register RA (source 35) takes
// PC+1 on JMPL; byte addressing with big-endian lanes; sub-word stores are
// merged with the addressed word inside the cycle. Not built: floating point,
// register windows (SAVE/REST) and the exception registers.
module mpa_core
  import ipsm_pkg::*;
#(
  parameter int unsigned NALU       = 1,
  parameter int unsigned NMU        = 1,
  parameter int unsigned NREG       = 32,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_WORDS = 4096,
  localparam int unsigned PCW = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW = $clog2(DMEM_WORDS),
  localparam int unsigned IW  = 2 * XLEN + NALU * $bits(alu_sub_t) + $bits(cmp_sub_t)
                                + NMU * $bits(mem_sub_t) + $bits(seq_sub_t) + NREG * SRCW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  logic            imem_we,
  input  logic [PCW-1:0]  imem_addr,
  input  logic [IW-1:0]   imem_wdata,
  input  logic            host_cs,
  input  logic            host_we,
  input  logic [DAW-1:0]  host_addr,
  input  word_t           host_wdata,
  output word_t           host_rdata,
  output logic            halted,
  output logic [PCW-1:0]  pc,
  output logic [31:0]     retired
);

  typedef struct packed {
    word_t                          o0;
    word_t                          o1;
    alu_sub_t [NALU-1:0]            alu;
    cmp_sub_t                       cmp;
    mem_sub_t [NMU-1:0]             mem;
    seq_sub_t                       seq;
    src_t     [NREG-1:0]            wb;
  } instr_t;

  // ---------------------------------------------------------------- state
  logic [IW-1:0] imem [IMEM_DEPTH];
  instr_t        oo;               // instruction bus (fetched word)
  instr_t        o_reg;            // operation register O
  word_t         aa [NALU];
  word_t         ab [NALU];
  word_t         aia;
  word_t         aib;
  word_t         ma [NMU];
  word_t         md [NMU];
  logic          ic_reg;
  icc_t          icc_reg;
  word_t         ra;
  word_t         regs [NREG];
  logic          step;

  assign step = run && !halted;

  // ---------------------------------------------------------------- fetch
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end
  assign oo = instr_t'(imem[pc]);

  // ---------------------------------------------------------------- execute phase of O
  word_t a_res [NALU];
  for (genvar k = 0; k < NALU; k++) begin : g_alu
    ipsm_alu u_alu (
      .op       (o_reg.alu[k].op),
      .x        (aa[k]),
      .y        (ab[k]),
      .carry_in (icc_reg.c),
      .sel_flag (ic_reg),
      .result   (a_res[k])
    );
  end

  logic  cmp_set_ic;
  logic  cmp_ic;
  logic  cmp_set_cc;
  icc_t  cmp_icc;
  word_t cmp_res;
  ipsm_cmp u_aic (
    .op     (o_reg.cmp.op),
    .x      (aia),
    .y      (aib),
    .icc_in (icc_reg),
    .set_ic (cmp_set_ic),
    .ic     (cmp_ic),
    .set_cc (cmp_set_cc),
    .icc    (cmp_icc),
    .result (cmp_res)
  );

  logic  ic_cur;
  icc_t  icc_cur;
  assign ic_cur  = cmp_set_ic ? cmp_ic  : ic_reg;
  assign icc_cur = cmp_set_cc ? cmp_icc : icc_reg;

  // Multiport data cache: ports 0..NMU-1 are the memory units, port NMU the host
  localparam int unsigned NP = NMU + 1;
  logic [NP-1:0]            dm_cs;
  logic [NP-1:0]            dm_we;
  logic [NP-1:0][DAW-1:0]   dm_addr;
  logic [NP-1:0][XLEN-1:0]  dm_din;
  logic [NP-1:0][XLEN-1:0]  dm_dout;
  word_t                    m_res [NMU];

  for (genvar k = 0; k < NMU; k++) begin : g_mu
    mem_op_e    op;
    logic [3:0] lanes;
    word_t      bitmask;
    assign op      = o_reg.mem[k].op;
    assign lanes   = lane_mask(op, ma[k][1:0]);
    assign bitmask = {{8{lanes[3]}}, {8{lanes[2]}}, {8{lanes[1]}}, {8{lanes[0]}}};
    assign dm_cs[k]   = (op != MEM_NOP);
    assign dm_we[k]   = mem_is_store(op);
    assign dm_addr[k] = ma[k][DAW+1:2];
    assign dm_din[k]  = (dm_dout[k] & ~bitmask) | (store_align(op, ma[k][1:0], md[k]) & bitmask);
    assign m_res[k]   = mem_is_load(op) ? load_align(op, ma[k][1:0], dm_dout[k]) : '0;
  end
  assign dm_cs[NMU]   = host_cs;
  assign dm_we[NMU]   = host_we;
  assign dm_addr[NMU] = host_addr;
  assign dm_din[NMU]  = host_wdata;
  assign host_rdata   = dm_dout[NMU];

  mpram #(.PORTS(NP), .WORDS(DMEM_WORDS), .WIDTH(XLEN), .PRIORITY(1'b1)) u_dcache (
    .clk  (clk),
    .cs   (dm_cs),
    .we   (dm_we),
    .addr (dm_addr),
    .din  (dm_din),
    .dout (dm_dout)
  );

  // ---------------------------------------------------------------- cross-bar
  word_t srcs [NSRC];
  always_comb begin
    for (int s = 0; s < NSRC; s++) srcs[s] = '0;
    for (int r = 0; r < NREG; r++) srcs[r] = regs[r];
    srcs[SRC_O0]  = oo.o0;
    srcs[SRC_O1]  = oo.o1;
    srcs[SRC_IC]  = word_t'(ic_cur);
    srcs[SRC_ID]  = ra;
    srcs[SRC_CMP] = cmp_res;
    for (int k = 0; k < NALU; k++) srcs[int'(SRC_A0) + k] = a_res[k];
    for (int k = 0; k < NMU; k++)  srcs[int'(SRC_M0) + k] = m_res[k];
  end

  // Unit input multiplexers: 2 per ALU, 2 for AIC, 2 per memory unit, 1 jump
  localparam int unsigned NSEL = 2 * NALU + 2 + 2 * NMU + 1;
  src_t  sel  [NSEL];
  word_t muxo [NSEL];
  always_comb begin
    for (int k = 0; k < NALU; k++) begin
      sel[2*k]   = oo.alu[k].x;
      sel[2*k+1] = oo.alu[k].y;
    end
    sel[2*NALU]   = oo.cmp.x;
    sel[2*NALU+1] = oo.cmp.y;
    for (int k = 0; k < NMU; k++) begin
      sel[2*NALU+2+2*k]   = oo.mem[k].addr;
      sel[2*NALU+2+2*k+1] = oo.mem[k].data;
    end
    sel[NSEL-1] = oo.seq.x;
  end

  fwd_xbar #(.NOUT(NSEL)) u_xbar (
    .srcs (srcs),
    .sel  (sel),
    .outs (muxo)
  );

  // ---------------------------------------------------------------- registers
  src_t wb_sel [NREG];
  always_comb begin
    for (int r = 0; r < NREG; r++) wb_sel[r] = oo.wb[r];
  end

  dist_regfile #(.NREG(NREG)) u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (step),
    .srcs  (srcs),
    .sel   (wb_sel),
    .regs  (regs)
  );

  // ---------------------------------------------------------------- sequencer
  logic [PCW-1:0] next_pc;
  logic           br_taken;
  logic           do_link;
  word_t          link_val;
  logic           do_trap;
  logic           do_sync;
  ipsm_seq #(.PCW(PCW)) u_seq (
    .sub        (oo.seq),
    .pc         (pc),
    .o0         (oo.o0),
    .o1         (oo.o1),
    .x          (muxo[NSEL-1]),
    .ic         (ic_cur),
    .icc        (icc_cur),
    .next_pc    (next_pc),
    .taken      (br_taken),
    .link       (do_link),
    .link_value (link_val),
    .trap       (do_trap),
    .sync       (do_sync)
  );

  // ---------------------------------------------------------------- latch phase
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      o_reg   <= '0;
      ic_reg  <= 1'b0;
      icc_reg <= '0;
      ra      <= '0;
      halted  <= 1'b0;
      retired <= '0;
      aia     <= '0;
      aib     <= '0;
      for (int k = 0; k < NALU; k++) begin aa[k] <= '0; ab[k] <= '0; end
      for (int k = 0; k < NMU; k++)  begin ma[k] <= '0; md[k] <= '0; end
    end else if (step) begin
      for (int k = 0; k < NALU; k++) begin
        aa[k] <= muxo[2*k];
        ab[k] <= muxo[2*k+1];
      end
      aia <= muxo[2*NALU];
      aib <= muxo[2*NALU+1];
      for (int k = 0; k < NMU; k++) begin
        ma[k] <= muxo[2*NALU+2+2*k];
        md[k] <= muxo[2*NALU+2+2*k+1];
      end
      o_reg   <= oo;
      pc      <= next_pc;
      ic_reg  <= ic_cur;
      icc_reg <= icc_cur;
      if (do_link) ra <= link_val;
      halted  <= do_trap;
      retired <= retired + 1'b1;
    end else begin
      // The last instruction still executes its units; then O idles.
      o_reg   <= '0;
      ic_reg  <= ic_cur;
      icc_reg <= icc_cur;
    end
  end

endmodule
