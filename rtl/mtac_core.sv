// mtac_core: Multithreaded VLIW Architecture with functional-unit Chaining
// (the parallel unit).
//
// A processor built to simulate a PRAM on a distributed memory. Instead of
// caches and branch prediction it hides memory, network and branch latency
// with many threads, switching to a new thread every clock at no cost:
//   * The pipeline is a ring of TMAX slices. A slice is a horizontal line of
//     latches that holds one whole thread: ID, PC, condition flags, its
//     registers R0..R(NREG-1) and the results of its current instruction.
//     Every clock all threads move one slice forward; a thread executes one
//     instruction per trip round the ring.
//   * The number of threads is variable between TMIN and TMAX: any of the last
//     TMAX-TMIN+1 slices (thread-management stages TM) can be looped back to
//     the first slice. Slots with no real thread carry null threads.
//   * The functional units are chained in the order of a typical basic block,
//     one pipeline stage each: IF, ALUs A0..A(NPRE-1), HA (operand selection
//     and address hashing for the memory units), U memory stages ME, ALUs
//     A(NPRE)..A(NALU-1), compare unit CMP, sequencer SE (write back and next
//     PC), TM stages. Each unit selects its operands through its own
//     cross-bar from the thread's registers, the immediates O0/O1, IC, ID and
//     the results of all units before it, so a chain of dependent
//     subinstructions runs within one instruction of one thread.
//   * All memory references of an instruction leave together at the start of
//     the ME stages, tagged with the thread ID; replies are matched by tag
//     while the thread travels through ME. If a thread with an unanswered
//     read reaches the last ME stage, the whole processor halts until the
//     reply arrives. Memory units are not chained (stores and loads of one
//     instruction are independent).
//   * SYNC freezes a thread: while frozen it makes no memory references and
//     no register or PC change, until sync_in (from a separate
//     synchronization network) releases all frozen threads.
//
// Default configuration T5: one ALU placed before the memory unit (NPRE=1),
// one memory unit, CMP, sequencer; 32 registers; TMIN = 64, TMAX = 512
// slices; U = TMIN - NALU - 5 = 58 memory stages.
//
// Interface: clk, rst_n (async, active low), n_threads (number of real
// threads, static while running; the ring length is max(n_threads, TMIN));
// imem_* loads the instruction memory (shared by all threads);
// hash_mult/hash_key select the hash function; per memory unit a request
// port req_* (valid, we, byte enables, word address, module, data, tag) and
// a reply port rep_* (valid, tag, data) towards the network; sync_in;
// all_done (every real thread executed TRAP), all_frozen, stall, retired.
// Timing: one slice per clock; a request is presented for one cycle and is
// not back-pressured; a read reply must come within U-1 cycles to avoid a
// halt, later replies halt the processor but are still accepted.
//
// Follows the architecture description: slices, thread ring with TMIN..TMAX threads,
// chain order (ALUs before and after the memory units, compare, sequencer
// last), HA and ME stages, halt on a missing reply, SYNC freezing, null
// threads, ID register, SEL using an earlier compare, T5 unit counts.
// This design's own choices: one stage per unit, one IF stage, no separate
// decode stages (the instruction is uncoded), the stage count U, the
// instruction and source encodings (ipsm_pkg), word addresses with byte
// enables towards the network, JMPL linking into R(NREG-1), thread i starting
// at PC 0 in slice i with registers cleared (it fetches its first instruction
// when it reaches slice 0).
module mtac_core
  import ipsm_pkg::*;
#(
  parameter int unsigned NALU       = 1,
  parameter int unsigned NPRE       = 1,
  parameter int unsigned NMU        = 1,
  parameter int unsigned NREG       = 32,
  parameter int unsigned TMIN       = 64,
  parameter int unsigned TMAX       = 512,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned MODW       = 4,
  localparam int unsigned PCW = $clog2(IMEM_DEPTH),
  localparam int unsigned TW  = $clog2(TMAX),
  localparam int unsigned IW  = 2 * XLEN + NALU * $bits(alu_sub_t) + $bits(cmp_sub_t)
                                + NMU * $bits(mem_sub_t) + $bits(seq_sub_t) + NREG * SRCW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [TW:0]                   n_threads,
  input  logic                          imem_we,
  input  logic [PCW-1:0]                imem_addr,
  input  logic [IW-1:0]                 imem_wdata,
  input  word_t                         hash_mult,
  input  word_t                         hash_key,
  output logic [NMU-1:0]                req_valid,
  output logic [NMU-1:0]                req_we,
  output logic [NMU-1:0][3:0]           req_be,
  output logic [NMU-1:0][XLEN-1:0]      req_addr,
  output logic [NMU-1:0][MODW-1:0]      req_module,
  output logic [NMU-1:0][XLEN-1:0]      req_data,
  output logic [NMU-1:0][TW-1:0]        req_tag,
  input  logic [NMU-1:0]                rep_valid,
  input  logic [NMU-1:0][TW-1:0]        rep_tag,
  input  logic [NMU-1:0][XLEN-1:0]      rep_data,
  input  logic                          sync_in,
  output logic                          all_done,
  output logic                          all_frozen,
  output logic                          stall,
  output logic [31:0]                   retired
);

  // ------------------------------------------------------------- stage map
  localparam int unsigned U      = TMIN - NALU - 5;
  localparam int unsigned S_IF   = 0;
  localparam int unsigned S_HA   = 1 + NPRE;
  localparam int unsigned S_ME0  = S_HA + 1;
  localparam int unsigned S_MEL  = S_ME0 + U - 1;
  localparam int unsigned S_POST = S_MEL + 1;
  localparam int unsigned S_CMP  = S_POST + (NALU - NPRE);
  localparam int unsigned S_SE   = S_CMP + 1;

  typedef struct packed {
    word_t                 o0;
    word_t                 o1;
    alu_sub_t [NALU-1:0]   alu;
    cmp_sub_t              cmp;
    mem_sub_t [NMU-1:0]    mem;
    seq_sub_t              seq;
    src_t     [NREG-1:0]   wb;
  } instr_t;

  typedef struct packed {
    logic                        valid;    // a real thread (not a null thread)
    logic                        done;     // executed TRAP
    logic                        frozen;   // waiting at a SYNC
    logic                        exec;     // the instruction in flight takes effect
    logic [TW-1:0]               id;
    logic [PCW-1:0]              pc;
    logic                        ic;
    icc_t                        icc;
    logic [NREG-1:0][XLEN-1:0]   regs;
    instr_t                      ins;
    logic [NALU-1:0][XLEN-1:0]   a_res;
    word_t                       cmp_res;
    logic [NMU-1:0][XLEN-1:0]    m_res;
    logic [NMU-1:0]              m_pend;
    logic [NMU-1:0][XLEN-1:0]    m_addr;
    logic [NMU-1:0][XLEN-1:0]    m_data;
  } slice_t;

  slice_t cur    [TMAX];
  slice_t merged [TMAX];
  slice_t nxt    [TMAX];

  logic [IW-1:0] imem [IMEM_DEPTH];
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  // Ring length: the slice that loops back to slice 0
  logic [TW:0] ring_len;
  logic [TW:0] loop_s;
  always_comb begin
    if (n_threads < (TW+1)'(TMIN))      ring_len = (TW+1)'(TMIN);
    else if (n_threads > (TW+1)'(TMAX)) ring_len = (TW+1)'(TMAX);
    else                                ring_len = n_threads;
    loop_s = ring_len - 1'b1;
  end

  // Cross-bar source vector of a slice
  function automatic void slice_srcs(input slice_t t, output word_t s [NSRC]);
    for (int k = 0; k < NSRC; k++) s[k] = '0;
    for (int r = 0; r < NREG; r++) s[r] = t.regs[r];
    s[SRC_O0]  = t.ins.o0;
    s[SRC_O1]  = t.ins.o1;
    s[SRC_IC]  = word_t'(t.ic);
    s[SRC_ID]  = word_t'(t.id);
    s[SRC_CMP] = t.cmp_res;
    for (int k = 0; k < NALU; k++) s[int'(SRC_A0) + k] = t.a_res[k];
    for (int k = 0; k < NMU; k++)  s[int'(SRC_M0) + k] = t.m_res[k];
  endfunction

  // ------------------------------------------------------------- replies, sync release
  for (genvar s = 0; s < TMAX; s++) begin : g_merge
    always_comb begin
      merged[s] = cur[s];
      if (sync_in) merged[s].frozen = 1'b0;
      if (s >= S_ME0 && s <= S_MEL) begin
        for (int k = 0; k < NMU; k++) begin
          if (rep_valid[k] && cur[s].m_pend[k] && rep_tag[k] == cur[s].id) begin
            merged[s].m_pend[k] = 1'b0;
            merged[s].m_res[k]  = load_align(cur[s].ins.mem[k].op, cur[s].m_addr[k][1:0],
                                             rep_data[k]);
          end
        end
      end
    end
  end

  // ------------------------------------------------------------- stage functions
  for (genvar s = 0; s < TMAX; s++) begin : g_stage
    if (s == S_IF) begin : g_if
      always_comb begin
        nxt[s]        = merged[s];
        nxt[s].ins    = instr_t'(imem[merged[s].pc]);
        nxt[s].exec   = merged[s].valid && !merged[s].done && !merged[s].frozen;
        nxt[s].a_res  = '0;
        nxt[s].m_res  = '0;
        nxt[s].m_pend = '0;
        nxt[s].cmp_res = '0;
      end
    end else if ((s >= 1 && s < 1 + NPRE) || (s >= S_POST && s < S_CMP)) begin : g_alu
      localparam int unsigned K = (s < 1 + NPRE) ? s - 1 : NPRE + (s - S_POST);
      word_t srcs [NSRC];
      src_t  sel  [2];
      word_t opnd [2];
      word_t res;
      always_comb begin
        slice_srcs(merged[s], srcs);
        sel[0] = merged[s].ins.alu[K].x;
        sel[1] = merged[s].ins.alu[K].y;
      end
      fwd_xbar #(.NOUT(2)) u_xbar (.srcs(srcs), .sel(sel), .outs(opnd));
      ipsm_alu u_alu (
        .op       (merged[s].ins.alu[K].op),
        .x        (opnd[0]),
        .y        (opnd[1]),
        .carry_in (merged[s].icc.c),
        .sel_flag (merged[s].ic),
        .result   (res)
      );
      always_comb begin
        nxt[s] = merged[s];
        nxt[s].a_res[K] = res;
      end
    end else if (s == S_HA) begin : g_ha
      word_t srcs [NSRC];
      src_t  sel  [2*NMU];
      word_t opnd [2*NMU];
      always_comb begin
        slice_srcs(merged[s], srcs);
        for (int k = 0; k < NMU; k++) begin
          sel[2*k]   = merged[s].ins.mem[k].addr;
          sel[2*k+1] = merged[s].ins.mem[k].data;
        end
      end
      fwd_xbar #(.NOUT(2*NMU)) u_xbar (.srcs(srcs), .sel(sel), .outs(opnd));
      for (genvar k = 0; k < NMU; k++) begin : g_mu
        mem_op_e op;
        assign op = merged[s].ins.mem[k].op;
        mtac_hash #(.MODW(MODW)) u_hash (
          .addr      ({2'b00, opnd[2*k][31:2]}),
          .mult      (hash_mult),
          .key       (hash_key),
          .module_id (req_module[k])
        );
        assign req_valid[k] = !stall && merged[s].exec && op != MEM_NOP;
        assign req_we[k]    = mem_is_store(op);
        assign req_be[k]    = lane_mask(op, opnd[2*k][1:0]);
        assign req_addr[k]  = {2'b00, opnd[2*k][31:2]};
        assign req_data[k]  = store_align(op, opnd[2*k][1:0], opnd[2*k+1]);
        assign req_tag[k]   = merged[s].id;
      end
      always_comb begin
        nxt[s] = merged[s];
        for (int k = 0; k < NMU; k++) begin
          nxt[s].m_addr[k] = opnd[2*k];
          nxt[s].m_data[k] = opnd[2*k+1];
          nxt[s].m_pend[k] = merged[s].exec && mem_is_load(merged[s].ins.mem[k].op);
        end
      end
    end else if (s == S_CMP) begin : g_cmp
      word_t srcs [NSRC];
      src_t  sel  [2];
      word_t opnd [2];
      logic  set_ic;
      logic  ic;
      logic  set_cc;
      icc_t  icc;
      word_t res;
      always_comb begin
        slice_srcs(merged[s], srcs);
        sel[0] = merged[s].ins.cmp.x;
        sel[1] = merged[s].ins.cmp.y;
      end
      fwd_xbar #(.NOUT(2)) u_xbar (.srcs(srcs), .sel(sel), .outs(opnd));
      ipsm_cmp u_cmp (
        .op (merged[s].ins.cmp.op), .x (opnd[0]), .y (opnd[1]), .icc_in (merged[s].icc),
        .set_ic (set_ic), .ic (ic), .set_cc (set_cc), .icc (icc), .result (res)
      );
      always_comb begin
        nxt[s] = merged[s];
        nxt[s].cmp_res = res;
        if (merged[s].exec && set_ic) nxt[s].ic  = ic;
        if (merged[s].exec && set_cc) nxt[s].icc = icc;
      end
    end else if (s == S_SE) begin : g_se
      word_t srcs [NSRC];
      src_t  sel  [NREG+1];
      word_t opnd [NREG+1];
      logic [PCW-1:0] next_pc;
      logic  taken;
      logic  link;
      word_t link_value;
      logic  trap;
      logic  sync;
      always_comb begin
        slice_srcs(merged[s], srcs);
        for (int r = 0; r < NREG; r++) sel[r] = merged[s].ins.wb[r];
        sel[NREG] = merged[s].ins.seq.x;
      end
      fwd_xbar #(.NOUT(NREG+1)) u_xbar (.srcs(srcs), .sel(sel), .outs(opnd));
      ipsm_seq #(.PCW(PCW)) u_seq (
        .sub (merged[s].ins.seq), .pc (merged[s].pc), .o0 (merged[s].ins.o0),
        .o1 (merged[s].ins.o1), .x (opnd[NREG]), .ic (merged[s].ic), .icc (merged[s].icc),
        .next_pc (next_pc), .taken (taken), .link (link), .link_value (link_value),
        .trap (trap), .sync (sync)
      );
      always_comb begin
        nxt[s] = merged[s];
        if (merged[s].exec) begin
          for (int r = 0; r < NREG; r++)
            if (merged[s].ins.wb[r] != SRC_KEEP) nxt[s].regs[r] = opnd[r];
          if (link) nxt[s].regs[NREG-1] = link_value;
          nxt[s].pc     = next_pc;
          nxt[s].done   = trap;
          nxt[s].frozen = sync;
        end
      end
    end else begin : g_pass
      always_comb nxt[s] = merged[s];
    end
  end

  // ------------------------------------------------------------- halt on a missing reply
  assign stall = cur[S_MEL].exec && (merged[S_MEL].m_pend != '0);

  // ------------------------------------------------------------- ring
  for (genvar s = 0; s < TMAX; s++) begin : g_ring
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cur[s]       <= '0;
        cur[s].id    <= TW'(s);
        cur[s].valid <= ((TW+1)'(s) < n_threads);
      end else if (stall) begin
        cur[s] <= merged[s];
      end else if (s == 0) begin
        cur[s] <= nxt[loop_s[TW-1:0]];
      end else begin
        cur[s] <= nxt[s-1];
      end
    end
  end

  // ------------------------------------------------------------- status
  always_comb begin
    all_done   = 1'b1;
    all_frozen = 1'b1;
    for (int s = 0; s < TMAX; s++) begin
      if ((TW+1)'(s) < ring_len && cur[s].valid && !cur[s].done) begin
        all_done = 1'b0;
        if (!cur[s].frozen) all_frozen = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        retired <= '0;
    else if (!stall && cur[S_SE].exec) retired <= retired + 1'b1;
  end

endmodule
