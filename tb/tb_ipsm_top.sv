// tb_ipsm_top: end-to-end test of the machine: M5 scalar unit at its default
// size and T5 parallel unit with its thread ring reduced to TMIN = 16,
// TMAX = 32 (U = 10 memory stages) so that the simulation stays short; the
// 512-slice ring at default size is too large to simulate in reasonable time.
//
// Scalar unit: runs a Fibonacci program (N = 24) out of its multiport data
// cache. While it runs, the testbench watches the memory unit and writes
// garbage through the host port to the very word the memory unit stores in
// the same clock: the CRCW Priority rule must let the memory unit win.
// Checked: results, one instruction per clock (2 + 3N + 1 cycles), and the
// number of forwarded results and branches.
// Parallel unit: 32 threads each compute C[t] = A[t] + B[t], SYNC, then
// D[t] = (C[t^1] > C[t]) ? 2 : 1, TRAP. A memory/network model serves
// requests after a fixed latency and checks each module number against the
// hash; a synchronization-network model releases the frozen threads.
// Run 1: latency 4 (< 10 memory stages): no halts, exact cycle count for
// one instruction per thread per 32-cycle trip. Run 2: latency 16: the
// processor must halt on missing replies and still get every result right.
// Both units run at the same time in run 1.
// The testbench prints the counts of every mechanism exercised.
module tb_ipsm_top;
  import ipsm_pkg::*;

  localparam int NREG = 32, PCW = 10, DAW = 12, TMAX = 32, TW = 5, MODW = 4;
  localparam int TMIN = 16, U = TMIN - 1 - 5, S_SE = 3 + U + 1;
  localparam word_t BASE_B = 32'h1000, BASE_C = 32'h2000, BASE_D = 32'h3000;

  typedef struct packed {
    word_t o0; word_t o1;
    alu_sub_t [0:0] alu;
    cmp_sub_t cmp;
    mem_sub_t [0:0] mem;
    seq_sub_t seq;
    src_t [NREG-1:0] wb;
  } instr_t;

  logic clk = 0, rst_n = 0;
  // scalar unit
  logic mpa_run = 0, mpa_imem_we = 0, mpa_host_cs = 0, mpa_host_we = 0;
  logic [PCW-1:0] mpa_imem_addr = '0, mpa_pc;
  instr_t mpa_imem_wdata;
  logic [DAW-1:0] mpa_host_addr = '0;
  word_t mpa_host_wdata = '0, mpa_host_rdata;
  logic mpa_halted;
  logic [31:0] mpa_retired;
  // parallel unit
  logic [TW:0] mt_n_threads = '0;
  logic mt_imem_we = 0;
  logic [PCW-1:0] mt_imem_addr = '0;
  instr_t mt_imem_wdata;
  word_t mt_hash_mult = 32'h9E37_79B9, mt_hash_key = 32'h0BAD_F00D;
  logic [0:0] mt_req_valid, mt_req_we;
  logic [0:0][3:0] mt_req_be;
  logic [0:0][31:0] mt_req_addr, mt_req_data;
  logic [0:0][MODW-1:0] mt_req_module;
  logic [0:0][TW-1:0] mt_req_tag;
  logic [0:0] mt_rep_valid = '0;
  logic [0:0][TW-1:0] mt_rep_tag = '0;
  logic [0:0][31:0] mt_rep_data = '0;
  logic mt_sync_in = 0, mt_all_done, mt_all_frozen, mt_stall;
  logic [31:0] mt_retired;

  ipsm_top #(.MT_TMIN(TMIN), .MT_TMAX(TMAX)) dut (
    .clk(clk), .rst_n(rst_n),
    .mpa_run(mpa_run), .mpa_imem_we(mpa_imem_we), .mpa_imem_addr(mpa_imem_addr),
    .mpa_imem_wdata(mpa_imem_wdata), .mpa_host_cs(mpa_host_cs), .mpa_host_we(mpa_host_we),
    .mpa_host_addr(mpa_host_addr), .mpa_host_wdata(mpa_host_wdata), .mpa_host_rdata(mpa_host_rdata),
    .mpa_halted(mpa_halted), .mpa_pc(mpa_pc), .mpa_retired(mpa_retired),
    .mt_n_threads(mt_n_threads), .mt_imem_we(mt_imem_we), .mt_imem_addr(mt_imem_addr),
    .mt_imem_wdata(mt_imem_wdata), .mt_hash_mult(mt_hash_mult), .mt_hash_key(mt_hash_key),
    .mt_req_valid(mt_req_valid), .mt_req_we(mt_req_we), .mt_req_be(mt_req_be),
    .mt_req_addr(mt_req_addr), .mt_req_module(mt_req_module), .mt_req_data(mt_req_data),
    .mt_req_tag(mt_req_tag), .mt_rep_valid(mt_rep_valid), .mt_rep_tag(mt_rep_tag),
    .mt_rep_data(mt_rep_data), .mt_sync_in(mt_sync_in), .mt_all_done(mt_all_done),
    .mt_all_frozen(mt_all_frozen), .mt_stall(mt_stall), .mt_retired(mt_retired));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int stalls = 0, syncs = 0, branches = 0, forwards = 0, hashes = 0, crcw_conflicts = 0;
  int modules_used [1 << MODW];
  int latency = 4;
  word_t shmem [int];

  initial begin : watchdog
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic instr_t nop();
    instr_t i;
    i = '0;
    foreach (i.wb[r]) i.wb[r] = SRC_KEEP;
    return i;
  endfunction

  function automatic seq_sub_t sq(seq_op_e op, logic tgt, logic oth, src_t x);
    seq_sub_t s;
    s.op = op; s.tgt = tgt; s.other = oth; s.x = x;
    return s;
  endfunction

  // ---------------------------------------------------------------- network and memory model
  typedef struct { int due; logic [TW-1:0] tag; word_t data; } reply_t;
  reply_t pending [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (mt_stall) stalls++;
    if (rst_n && mt_req_valid[0]) begin
      word_t old, m, p;
      p = (mt_req_addr[0] * (mt_hash_mult | 1)) ^ mt_hash_key;
      hashes++;
      modules_used[mt_req_module[0]]++;
      checks++;
      if (mt_req_module[0] !== p[31 -: MODW]) begin failures++; $display("FAIL hash"); end
      old = shmem.exists(int'(mt_req_addr[0])) ? shmem[int'(mt_req_addr[0])] : '0;
      if (mt_req_we[0]) begin
        m = {{8{mt_req_be[0][3]}}, {8{mt_req_be[0][2]}}, {8{mt_req_be[0][1]}}, {8{mt_req_be[0][0]}}};
        shmem[int'(mt_req_addr[0])] = (old & ~m) | (mt_req_data[0] & m);
      end else begin
        pending.push_back('{due: cycle + latency, tag: mt_req_tag[0], data: old});
      end
    end
  end

  always @(negedge clk) begin
    mt_rep_valid <= '0;
    if (pending.size() > 0 && pending[0].due <= cycle) begin
      mt_rep_valid[0] <= 1'b1;
      mt_rep_tag[0]   <= pending[0].tag;
      mt_rep_data[0]  <= pending[0].data;
      void'(pending.pop_front());
    end
  end

  always @(negedge clk) begin
    mt_sync_in <= 1'b0;
    if (rst_n && mt_all_frozen && !mt_all_done && !mt_sync_in) begin
      mt_sync_in <= 1'b1;
      syncs++;
    end
  end

  // ---------------------------------------------------------------- CRCW conflict injector
  // Whenever the scalar unit's memory unit stores, the host port writes
  // garbage to the same word in the same clock.
  always @(negedge clk) begin
    if (mpa_run && !mpa_halted && dut.u_scalar.dm_cs[0] && dut.u_scalar.dm_we[0]) begin
      mpa_host_cs = 1; mpa_host_we = 1;
      mpa_host_addr = dut.u_scalar.dm_addr[0];
      mpa_host_wdata = 32'hDEAD_BEEF;
      crcw_conflicts++;
    end else if (mpa_run) begin
      mpa_host_cs = 0; mpa_host_we = 0;
    end
  end

  // ---------------------------------------------------------------- programs
  instr_t mpa_prog [$];
  instr_t mt_prog [$];

  task automatic build_programs();
    instr_t i;
    // scalar: Fibonacci numbers into words 16.., N read from word 0
    i = nop(); i.o0 = 0; i.o1 = 1;
    i.mem[0] = '{op: MEM_LD, addr: SRC_O0, data: SRC_O0};
    i.wb[1] = SRC_O0; i.wb[2] = SRC_O1; i.wb[3] = SRC_O0;
    mpa_prog.push_back(i);
    i = nop(); i.o0 = 64; i.wb[4] = SRC_O0; i.wb[5] = SRC_M0;
    mpa_prog.push_back(i);
    i = nop(); i.o1 = 1;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: 6'd2};
    i.cmp    = '{op: CMP_ADDCC, x: 6'd3, y: SRC_O1};
    i.mem[0] = '{op: MEM_ST, addr: 6'd4, data: 6'd1};
    mpa_prog.push_back(i);
    i = nop(); i.o0 = 4;
    i.wb[1] = 6'd2; i.wb[2] = SRC_A0; i.wb[3] = SRC_CMP;
    i.alu[0] = '{op: ALU_ADD, x: 6'd4, y: SRC_O0};
    i.cmp    = '{op: CMP_SLT, x: SRC_CMP, y: 6'd5};
    mpa_prog.push_back(i);
    i = nop(); i.o0 = 2; i.wb[4] = SRC_A0; i.seq = sq(SEQ_BNEZ, 0, 0, SRC_O0);
    mpa_prog.push_back(i);
    i = nop(); i.seq = sq(SEQ_TRAP, 0, 0, SRC_O0);
    mpa_prog.push_back(i);
    // parallel: see header
    i = nop(); i.o1 = 2;
    i.alu[0] = '{op: ALU_SHL, x: SRC_ID, y: SRC_O1};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[1] = SRC_A0; i.wb[2] = SRC_M0;
    mt_prog.push_back(i);
    i = nop(); i.o0 = BASE_B;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[3] = SRC_M0;
    mt_prog.push_back(i);
    i = nop(); i.o0 = BASE_C;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.cmp = '{op: CMP_ADDCC, x: 6'd2, y: 6'd3};
    i.wb[4] = SRC_A0; i.wb[5] = SRC_CMP;
    mt_prog.push_back(i);
    i = nop(); i.mem[0] = '{op: MEM_ST, addr: 6'd4, data: 6'd5}; i.seq = sq(SEQ_SYNC, 0, 0, SRC_O0);
    mt_prog.push_back(i);
    i = nop(); i.o0 = 4;
    i.alu[0] = '{op: ALU_XOR, x: 6'd4, y: SRC_O0};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[6] = SRC_M0;
    mt_prog.push_back(i);
    i = nop(); i.o0 = 7; i.cmp = '{op: CMP_SGT, x: 6'd6, y: 6'd5}; i.seq = sq(SEQ_BNEZ, 0, 0, SRC_O0);
    mt_prog.push_back(i);
    i = nop(); i.o0 = 1; i.o1 = 8; i.wb[7] = SRC_O0; i.seq = sq(SEQ_JMP, 0, 0, SRC_O1);
    mt_prog.push_back(i);
    i = nop(); i.o0 = 2; i.wb[7] = SRC_O0;
    mt_prog.push_back(i);
    i = nop(); i.o0 = BASE_D;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.mem[0] = '{op: MEM_ST, addr: SRC_A0, data: 6'd7};
    i.seq = sq(SEQ_TRAP, 0, 0, SRC_O0);
    mt_prog.push_back(i);
  endtask

  word_t a [TMAX];
  word_t b [TMAX];

  task automatic init_shared(int n);
    shmem.delete();
    pending.delete();
    for (int t = 0; t < n; t++) begin
      a[t] = $urandom % 100000; b[t] = $urandom % 100000;
      shmem[t] = a[t];
      shmem[int'(BASE_B >> 2) + t] = b[t];
    end
  endtask

  task automatic check_parallel(int n);
    word_t c, cn;
    expect_eq("parallel retired", mt_retired, 8 * n);
    for (int t = 0; t < n; t++) begin
      c  = a[t] + b[t];
      cn = a[t ^ 1] + b[t ^ 1];
      if (cn > c) branches++;
      expect_eq($sformatf("C[%0d]", t), shmem[int'(BASE_C >> 2) + t], c);
      expect_eq($sformatf("D[%0d]", t), shmem[int'(BASE_D >> 2) + t], (cn > c) ? 2 : 1);
    end
  endtask

  initial begin
    int n_fib, mpa_cycles, c0, c_frozen, stalls0;
    word_t fa, fb, ft, d;
    logic mpa_seen_halt;
    mpa_imem_wdata = '0; mt_imem_wdata = '0;
    build_programs();
    n_fib = 24;
    mt_n_threads = (TW+1)'(TMAX);
    #12 rst_n = 1;
    foreach (mpa_prog[k]) begin
      @(negedge clk); mpa_imem_we = 1; mpa_imem_addr = PCW'(k); mpa_imem_wdata = mpa_prog[k];
    end
    foreach (mt_prog[k]) begin
      @(negedge clk); mt_imem_we = 1; mt_imem_addr = PCW'(k); mt_imem_wdata = mt_prog[k];
    end
    @(negedge clk); mpa_imem_we = 0; mt_imem_we = 0;
    mpa_host_cs = 1; mpa_host_we = 1; mpa_host_addr = 0; mpa_host_wdata = word_t'(n_fib);
    @(negedge clk); mpa_host_cs = 0; mpa_host_we = 0;
    init_shared(TMAX);

    // ---------------- run 1: both units together, short network latency
    latency = 4;
    rst_n = 0;
    @(negedge clk); rst_n = 1; mpa_run = 1;
    c0 = cycle; c_frozen = -1; mpa_cycles = -1; stalls0 = stalls;
    while (!mt_all_done || mpa_cycles < 0) begin
      @(posedge clk); #1;
      if (mt_all_frozen && c_frozen < 0) c_frozen = cycle - c0;
      if (mpa_halted && mpa_cycles < 0) mpa_cycles = cycle - c0;
    end
    @(negedge clk); mpa_run = 0; mpa_host_cs = 0; mpa_host_we = 0;
    forwards += 2 * n_fib; branches += n_fib;
    expect_eq("scalar cycles", mpa_cycles, 2 + 3 * n_fib + 1);
    expect_eq("scalar retired", mpa_retired, 2 + 3 * n_fib + 1);
    fa = 0; fb = 1;
    for (int k = 0; k < n_fib; k++) begin
      @(negedge clk); mpa_host_cs = 1; mpa_host_we = 0; mpa_host_addr = DAW'(16 + k);
      #1 d = mpa_host_rdata;
      expect_eq($sformatf("fib[%0d] (memory unit wins)", k), d, fa);
      ft = fa + fb; fa = fb; fb = ft;
    end
    @(negedge clk); mpa_host_cs = 0;
    expect_eq("parallel cycles to SYNC", c_frozen, 3 * TMAX + TMAX - 1 + S_SE + 1);
    expect_eq("no halt at latency 4", stalls - stalls0, 0);
    check_parallel(TMAX);

    // ---------------- run 2: parallel unit alone, latency beyond the memory stages
    init_shared(TMAX);
    latency = U + 6;
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    stalls0 = stalls;
    while (!mt_all_done) begin @(posedge clk); #1; end
    checks++;
    if (stalls - stalls0 == 0) begin failures++; $display("FAIL no halt at long latency"); end
    check_parallel(TMAX);

    foreach (modules_used[m]) begin
      checks++;
      if (modules_used[m] == 0) begin failures++; $display("FAIL module %0d never used", m); end
    end
    $display("mechanisms: stall_cycles=%0d forwards=%0d branches=%0d syncs=%0d hashes=%0d crcw_conflicts=%0d",
             stalls, forwards, branches, syncs, hashes, crcw_conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
