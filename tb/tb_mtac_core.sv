// tb_mtac_core: self-checking program test of the MTAC parallel processor.
//
// A reduced ring (TMIN = 16, TMAX = 32, so U = 10 memory stages) keeps the
// run short; the stage layout is the same as at full size. The testbench
// models the shared memory and the network: every request is served after a
// fixed latency (stores take effect when issued, loads reply with the tag),
// and a synchronization-network model pulses sync_in once all threads are
// frozen. Each thread t runs the same program:
//   C[t] = A[t] + B[t]            (chained ALU -> memory -> compare -> write)
//   SYNC
//   D[t] = (C[t^1] > C[t]) ? 2 : 1  (reads a neighbour's result, branches)
//   TRAP
// The program is run three times:
//   1. 10 threads (fewer than TMIN, null threads fill the ring), latency 4;
//   2. 32 threads (TMAX), latency 4;
//   3. 20 threads with latency U + 3, longer than the memory stages, so the
//      processor must halt and wait for every read reply.
// Checked: all D values and C values; retired = 8 instructions per thread;
// one instruction per thread per trip round the ring (cycle at which every
// thread is frozen at SYNC); no halt when latency < U, and halts when
// latency > U; every memory module number equals the hash of the address.
module tb_mtac_core;
  import ipsm_pkg::*;

  localparam int NALU = 1, NMU = 1, NREG = 32, TMIN = 16, TMAX = 32, MODW = 4;
  localparam int PCW = 10, TW = $clog2(TMAX);
  localparam int U = TMIN - NALU - 5;
  localparam int S_SE = 1 + 1 + 1 + U + 1;   // IF, A0, HA, ME x U, CMP, SE
  localparam word_t BASE_A = 32'h0000, BASE_B = 32'h1000, BASE_C = 32'h2000, BASE_D = 32'h3000;

  typedef struct packed {
    word_t o0; word_t o1;
    alu_sub_t [NALU-1:0] alu;
    cmp_sub_t cmp;
    mem_sub_t [NMU-1:0] mem;
    seq_sub_t seq;
    src_t [NREG-1:0] wb;
  } instr_t;

  logic clk = 0, rst_n = 0;
  logic [TW:0] n_threads = '0;
  logic imem_we = 0;
  logic [PCW-1:0] imem_addr = '0;
  instr_t imem_wdata;
  word_t hash_mult = 32'h9E37_79B9, hash_key = 32'h0BAD_F00D;
  logic [NMU-1:0] req_valid, req_we;
  logic [NMU-1:0][3:0] req_be;
  logic [NMU-1:0][31:0] req_addr, req_data;
  logic [NMU-1:0][MODW-1:0] req_module;
  logic [NMU-1:0][TW-1:0] req_tag;
  logic [NMU-1:0] rep_valid = '0;
  logic [NMU-1:0][TW-1:0] rep_tag = '0;
  logic [NMU-1:0][31:0] rep_data = '0;
  logic sync_in = 0, all_done, all_frozen, stall;
  logic [31:0] retired;

  mtac_core #(.NALU(NALU), .NPRE(1), .NMU(NMU), .NREG(NREG), .TMIN(TMIN), .TMAX(TMAX),
              .IMEM_DEPTH(1 << PCW), .MODW(MODW)) dut (
    .clk(clk), .rst_n(rst_n), .n_threads(n_threads), .imem_we(imem_we), .imem_addr(imem_addr),
    .imem_wdata(imem_wdata), .hash_mult(hash_mult), .hash_key(hash_key),
    .req_valid(req_valid), .req_we(req_we), .req_be(req_be), .req_addr(req_addr),
    .req_module(req_module), .req_data(req_data), .req_tag(req_tag),
    .rep_valid(rep_valid), .rep_tag(rep_tag), .rep_data(rep_data), .sync_in(sync_in),
    .all_done(all_done), .all_frozen(all_frozen), .stall(stall), .retired(retired));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stalls = 0, syncs = 0, branches_taken = 0, hashes = 0, requests = 0;
  int latency = 4;
  word_t shmem [int];
  int cycle = 0;

  initial begin : watchdog
    #5_000_000;
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

  function automatic logic [MODW-1:0] ref_hash(word_t a);
    word_t p;
    p = (a * (hash_mult | 1)) ^ hash_key;
    return p[31 -: MODW];
  endfunction

  // ---------------------------------------------------------------- memory + network model
  typedef struct { int due; logic [TW-1:0] tag; word_t data; } reply_t;
  reply_t pending [$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stall) stalls++;
    if (rst_n && req_valid[0]) begin
      word_t old, m;
      requests++;
      hashes++;
      if (req_module[0] !== ref_hash(req_addr[0])) begin
        failures++;
        $display("FAIL hash of %h: %0d", req_addr[0], req_module[0]);
      end
      checks++;
      old = shmem.exists(int'(req_addr[0])) ? shmem[int'(req_addr[0])] : '0;
      if (req_we[0]) begin
        m = {{8{req_be[0][3]}}, {8{req_be[0][2]}}, {8{req_be[0][1]}}, {8{req_be[0][0]}}};
        shmem[int'(req_addr[0])] = (old & ~m) | (req_data[0] & m);
      end else begin
        pending.push_back('{due: cycle + latency, tag: req_tag[0], data: old});
      end
    end
  end

  always @(negedge clk) begin
    rep_valid <= '0;
    if (pending.size() > 0 && pending[0].due <= cycle) begin
      rep_valid[0] <= 1'b1;
      rep_tag[0]   <= pending[0].tag;
      rep_data[0]  <= pending[0].data;
      void'(pending.pop_front());
    end
  end

  // ---------------------------------------------------------------- synchronization network model
  always @(negedge clk) begin
    sync_in <= 1'b0;
    if (rst_n && all_frozen && !all_done && !sync_in) begin
      sync_in <= 1'b1;
      syncs++;
    end
  end

  // ---------------------------------------------------------------- program
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

  instr_t prog [$];

  task automatic build_program();
    instr_t i;
    // 0: A0 = ID << 2; M0 = [A0] (A[t]); R1 = A0; R2 = M0
    i = nop(); i.o1 = 2;
    i.alu[0] = '{op: ALU_SHL, x: SRC_ID, y: SRC_O1};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[1] = SRC_A0; i.wb[2] = SRC_M0;
    prog.push_back(i);
    // 1: A0 = R1 + BASE_B; M0 = [A0]; R3 = M0
    i = nop(); i.o0 = BASE_B;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[3] = SRC_M0;
    prog.push_back(i);
    // 2: A0 = R1 + BASE_C; CMP = R2 + R3 (ADDCC); R4 = A0; R5 = CMP
    i = nop(); i.o0 = BASE_C;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.cmp = '{op: CMP_ADDCC, x: 6'd2, y: 6'd3};
    i.wb[4] = SRC_A0; i.wb[5] = SRC_CMP;
    prog.push_back(i);
    // 3: [R4] = R5; SYNC
    i = nop();
    i.mem[0] = '{op: MEM_ST, addr: 6'd4, data: 6'd5};
    i.seq = sq(SEQ_SYNC, 0, 0, SRC_O0);
    prog.push_back(i);
    // 4: A0 = R4 ^ 4; M0 = [A0] (C[t^1]); R6 = M0
    i = nop(); i.o0 = 4;
    i.alu[0] = '{op: ALU_XOR, x: 6'd4, y: SRC_O0};
    i.mem[0] = '{op: MEM_LD, addr: SRC_A0, data: SRC_O0};
    i.wb[6] = SRC_M0;
    prog.push_back(i);
    // 5: IC = R6 > R5; branch to 7 if IC
    i = nop(); i.o0 = 7;
    i.cmp = '{op: CMP_SGT, x: 6'd6, y: 6'd5};
    i.seq = sq(SEQ_BNEZ, 0, 0, SRC_O0);
    prog.push_back(i);
    // 6: R7 = 1; jump to 8
    i = nop(); i.o0 = 1; i.o1 = 8; i.wb[7] = SRC_O0;
    i.seq = sq(SEQ_JMP, 0, 0, SRC_O1);
    prog.push_back(i);
    // 7: R7 = 2
    i = nop(); i.o0 = 2; i.wb[7] = SRC_O0;
    prog.push_back(i);
    // 8: A0 = R1 + BASE_D; [A0] = R7; TRAP
    i = nop(); i.o0 = BASE_D;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: SRC_O0};
    i.mem[0] = '{op: MEM_ST, addr: SRC_A0, data: 6'd7};
    i.seq = sq(SEQ_TRAP, 0, 0, SRC_O0);
    prog.push_back(i);
  endtask

  task automatic run_case(int n, int lat);
    int ring, last, c_frozen, c0, stalls0;
    word_t a [TMAX];
    word_t b [TMAX];
    word_t c, cn;
    latency = lat;
    shmem.delete();
    pending.delete();
    for (int t = 0; t < n; t++) begin
      a[t] = $urandom % 1000; b[t] = $urandom % 1000;
      shmem[int'((BASE_A >> 2) + t)] = a[t];
      shmem[int'((BASE_B >> 2) + t)] = b[t];
    end
    @(negedge clk); rst_n = 0; n_threads = (TW+1)'(n);
    @(negedge clk); rst_n = 1;
    c0 = cycle; stalls0 = stalls;
    ring = (n < TMIN) ? TMIN : n;
    // a thread starting in slice t > 0 first fetches when it reaches slice 0
    last = (n > 1) ? ring - 1 + S_SE : S_SE;
    c_frozen = -1;
    while (!all_done) begin
      @(posedge clk); #1;
      if (all_frozen && c_frozen < 0) c_frozen = cycle - c0;
    end
    if (lat < U) begin
      expect_eq("cycles to SYNC (one instruction per trip)", c_frozen, 3 * ring + last + 1);
      expect_eq("no halt with short latency", stalls - stalls0, 0);
    end else begin
      checks++;
      if (stalls - stalls0 == 0) begin failures++; $display("FAIL expected halts with latency %0d", lat); end
    end
    expect_eq("retired", retired, 8 * n);
    for (int t = 0; t < n; t++) begin
      c  = a[t] + b[t];
      cn = ((t ^ 1) < n) ? a[t ^ 1] + b[t ^ 1] : 0;
      if (cn > c) branches_taken++;
      expect_eq($sformatf("C[%0d]", t), shmem[int'((BASE_C >> 2) + t)], c);
      expect_eq($sformatf("D[%0d]", t), shmem[int'((BASE_D >> 2) + t)], (cn > c) ? 2 : 1);
    end
  endtask

  initial begin
    imem_wdata = '0;
    build_program();
    #12 rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk); imem_we = 1; imem_addr = PCW'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 0;
    run_case(10, 4);
    run_case(32, 4);
    run_case(20, U + 3);
    $display("mechanisms: stalls=%0d syncs=%0d branches_taken=%0d hashes=%0d requests=%0d",
             stalls, syncs, branches_taken, hashes, requests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
