// tb_mpa_core: self-checking program test of the MPA scalar processor (M5).
//
// Loads a Fibonacci program into the instruction memory and N into data
// word 0, runs it and checks:
//   * the N Fibonacci numbers stored at data words 16.. (read back through
//     the host port of the multiport data cache);
//   * the cycle count: with a two-stage pipeline, general forwarding and
//     single-cycle branching, every instruction takes exactly one clock,
//     so the run takes 2 + 3N + 1 cycles (no stall, no branch penalty);
//   * forwarding: the loop uses a compare result and an ALU result in the
//     instruction right after the one that produced them.
// Then a second program checks byte and halfword loads and stores
// (big-endian lanes), a two-way branch and JMPL/JMP with the link register.
// N is drawn from 12..20.
module tb_mpa_core;
  import ipsm_pkg::*;

  localparam int NALU = 1, NMU = 1, NREG = 32, PCW = 10, DAW = 12;
  typedef struct packed {
    word_t o0; word_t o1;
    alu_sub_t [NALU-1:0] alu;
    cmp_sub_t cmp;
    mem_sub_t [NMU-1:0] mem;
    seq_sub_t seq;
    src_t [NREG-1:0] wb;
  } instr_t;

  logic clk = 0, rst_n = 0, run = 0;
  logic imem_we = 0, host_cs = 0, host_we = 0;
  logic [PCW-1:0] imem_addr = '0, pc;
  instr_t imem_wdata;
  logic [DAW-1:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  logic halted;
  logic [31:0] retired;
  int checks = 0, failures = 0;
  int branches = 0, forwards = 0;

  mpa_core dut (.clk(clk), .rst_n(rst_n), .run(run), .imem_we(imem_we), .imem_addr(imem_addr),
    .imem_wdata(imem_wdata), .host_cs(host_cs), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata), .halted(halted), .pc(pc), .retired(retired));

  always #5 clk = ~clk;

  initial begin : watchdog
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_eq(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic instr_t nop();
    instr_t i;
    i = '0;
    foreach (i.wb[r]) i.wb[r] = SRC_KEEP;
    return i;
  endfunction

  instr_t prog [$];

  task automatic load_and_run(output int cycles);
    rst_n = 0; run = 0;
    @(negedge clk); rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk); imem_we = 1; imem_addr = PCW'(k); imem_wdata = prog[k];
    end
    @(negedge clk); imem_we = 0; run = 1;
    cycles = 0;
    while (!halted) begin @(posedge clk); cycles++; #1; end
    @(negedge clk); run = 0;
  endtask

  task automatic host_write(int a, word_t d);
    @(negedge clk); host_cs = 1; host_we = 1; host_addr = DAW'(a); host_wdata = d;
    @(negedge clk); host_cs = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output word_t d);
    @(negedge clk); host_cs = 1; host_we = 0; host_addr = DAW'(a);
    #1 d = host_rdata;
    @(negedge clk); host_cs = 0;
  endtask

  initial begin
    instr_t i;
    int n, cycles;
    word_t a, b, t, d;
    imem_wdata = '0;
    n = 12 + int'($urandom % 9);
    // ---------------- program 1: Fibonacci numbers into words 16..16+N-1
    // 0: M0 <- [0] (N); R1 <- 0, R2 <- 1, R3 <- 0
    i = nop(); i.o0 = 0; i.o1 = 1;
    i.mem[0] = '{op: MEM_LD, addr: SRC_O0, data: SRC_O0};
    i.wb[1] = SRC_O0; i.wb[2] = SRC_O1; i.wb[3] = SRC_O0;
    prog.push_back(i);
    // 1: R4 <- 64 (byte address of word 16), R5 <- M0
    i = nop(); i.o0 = 64; i.wb[4] = SRC_O0; i.wb[5] = SRC_M0;
    prog.push_back(i);
    // 2 (loop): A0 <- R1 + R2; CMP <- R3 + 1 (ADDCC); [R4] <- R1
    i = nop(); i.o1 = 1;
    i.alu[0] = '{op: ALU_ADD, x: 6'd1, y: 6'd2};
    i.cmp    = '{op: CMP_ADDCC, x: 6'd3, y: SRC_O1};
    i.mem[0] = '{op: MEM_ST, addr: 6'd4, data: 6'd1};
    prog.push_back(i);
    // 3: R1 <- R2, R2 <- A0, R3 <- CMP; A0 <- R4 + 4; IC <- (CMP < R5)
    i = nop(); i.o0 = 4;
    i.wb[1] = 6'd2; i.wb[2] = SRC_A0; i.wb[3] = SRC_CMP;
    i.alu[0] = '{op: ALU_ADD, x: 6'd4, y: SRC_O0};
    i.cmp    = '{op: CMP_SLT, x: SRC_CMP, y: 6'd5};
    prog.push_back(i);
    // 4: R4 <- A0; if IC goto 2
    i = nop(); i.o0 = 2; i.wb[4] = SRC_A0;
    i.seq = '{op: SEQ_BNEZ, tgt: 1'b0, other: 1'b0, x: SRC_O0};
    prog.push_back(i);
    // 5: trap
    i = nop(); i.seq = '{op: SEQ_TRAP, tgt: 1'b0, other: 1'b0, x: SRC_O0};
    prog.push_back(i);

    rst_n = 0; #12; rst_n = 1;
    host_write(0, word_t'(n));
    host_write(16 + n, 32'hA5A5_5A5A);   // guard word after the last result
    load_and_run(cycles);
    branches += n; forwards += 2 * n;
    expect_eq("fib cycles", word_t'(cycles), word_t'(2 + 3 * n + 1));
    expect_eq("fib retired", retired, word_t'(2 + 3 * n + 1));
    expect_eq("fib halt pc", word_t'(pc), 5);
    a = 0; b = 1;
    for (int k = 0; k < n; k++) begin
      host_read(16 + k, d);
      expect_eq($sformatf("fib[%0d]", k), d, a);
      t = a + b; a = b; b = t;
    end
    host_read(16 + n, d);
    expect_eq("no store past N", d, 32'hA5A5_5A5A);

    // ---------------- program 2: lanes, two-way branch, JMPL / JMP
    prog.delete();
    // 0: [O0] <- O1 word store; R1 <- O0
    i = nop(); i.o0 = 32'h100; i.o1 = 32'h1122_3344;
    i.mem[0] = '{op: MEM_ST, addr: SRC_O0, data: SRC_O1}; i.wb[1] = SRC_O0;
    prog.push_back(i);
    // 1: byte store 0xAB to address 0x101
    i = nop(); i.o0 = 32'h101; i.o1 = 32'h0000_00AB;
    i.mem[0] = '{op: MEM_STB, addr: SRC_O0, data: SRC_O1};
    prog.push_back(i);
    // 2: halfword store 0xBEEF to address 0x102
    i = nop(); i.o0 = 32'h102; i.o1 = 32'h0000_BEEF;
    i.mem[0] = '{op: MEM_STH, addr: SRC_O0, data: SRC_O1};
    prog.push_back(i);
    // 3: signed byte load from 0x101
    i = nop(); i.o0 = 32'h101; i.mem[0] = '{op: MEM_LDB, addr: SRC_O0, data: SRC_O0};
    prog.push_back(i);
    // 4: R6 <- M0; unsigned half load from 0x102; IC <- (O0 == O1) false
    i = nop(); i.o0 = 32'h102; i.o1 = 32'h5;
    i.wb[6] = SRC_M0; i.mem[0] = '{op: MEM_LDHU, addr: SRC_O0, data: SRC_O0};
    i.cmp = '{op: CMP_SEQ, x: SRC_O0, y: SRC_O1};
    prog.push_back(i);
    // 5: R7 <- M0; two-way branch on IC: taken -> O0 (20), not taken -> O1 (8)
    i = nop(); i.o0 = 20; i.o1 = 8; i.wb[7] = SRC_M0;
    i.seq = '{op: SEQ_BNEZ, tgt: 1'b0, other: 1'b1, x: SRC_O0};
    prog.push_back(i);
    for (int k = 6; k < 8; k++) begin   // never executed
      i = nop(); i.seq = '{op: SEQ_TRAP, tgt: 1'b0, other: 1'b0, x: SRC_O0}; i.wb[9] = SRC_O0; i.o0 = 32'hDEAD;
      prog.push_back(i);
    end
    // 8: JMPL to 12 (subroutine), link in RA
    i = nop(); i.o0 = 12; i.seq = '{op: SEQ_JMPL, tgt: 1'b0, other: 1'b0, x: SRC_O0};
    prog.push_back(i);
    // 9: R8 <- RA (return lands here); trap
    i = nop(); i.wb[8] = SRC_ID; i.seq = '{op: SEQ_TRAP, tgt: 1'b0, other: 1'b0, x: SRC_O0};
    prog.push_back(i);
    for (int k = 10; k < 12; k++) begin
      i = nop(); i.seq = '{op: SEQ_TRAP, tgt: 1'b0, other: 1'b0, x: SRC_O0}; i.wb[9] = SRC_O0; i.o0 = 32'hDEAD;
      prog.push_back(i);
    end
    // 12: R10 <- O1; return: JMP RA
    i = nop(); i.o1 = 32'h77; i.wb[10] = SRC_O1; i.seq = '{op: SEQ_JMP, tgt: 1'b0, other: 1'b0, x: SRC_ID};
    prog.push_back(i);

    load_and_run(cycles);
    branches += 3;
    expect_eq("prog2 cycles", word_t'(cycles), 9);   // 0-5, 8, 12, 9
    host_read(32'h100 >> 2, d);
    expect_eq("merged word", d, 32'h11AB_BEEF);
    expect_eq("R1", dut.regs[1], 32'h100);
    expect_eq("LDB sign", dut.regs[6], 32'hFFFF_FFAB);
    expect_eq("LDHU", dut.regs[7], 32'h0000_BEEF);
    expect_eq("link", dut.regs[8], 9);
    expect_eq("subroutine", dut.regs[10], 32'h77);
    expect_eq("skipped code", dut.regs[9], 0);
    $display("mechanisms: branches=%0d forwards=%0d stalls=0", branches, forwards);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
