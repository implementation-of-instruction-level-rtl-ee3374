# A two-unit shared-memory machine: minimal-pipeline scalar unit and multithreaded chained parallel unit

This design is one node of a machine that aims to run PRAM-style parallel programs at full speed
on real hardware. A single architecture cannot serve both kinds of code well, so the node has
two processors:

* **The scalar unit (MPA, "minimal pipeline architecture").** A VLIW processor with only two
  pipeline stages. It runs the sequential parts of a program, where dependencies between
  instructions dominate. Forwarding is general and branching is single-cycle, so no dependency
  and no branch ever costs a cycle: one long instruction completes every clock.
* **The parallel unit (MTAC, "multithreaded architecture with chaining").** A deep pipeline
  built as a ring of up to 512 thread slots. It runs the parallel parts. A new thread enters
  the pipeline every clock, so the latency of a shared memory reached over a network is hidden
  behind the other threads. The functional units are *chained* in pipeline order, so one
  instruction of a thread can contain a whole dependent sequence: ALU → memory → compare →
  branch/write-back.

Both processors share one uncoded instruction format and the same integer operations. The RTL
also contains the building blocks of a CRCW multiport RAM: concurrent reads and writes to one
cell, with *Common* or *Priority* conflict resolution. The scalar unit uses it as its data
cache.

All RTL is synthesizable SystemVerilog-2017. Default parameters are the main configuration:
M5 (one ALU, one compare unit, one memory unit, sequencer) for the scalar unit, and T5 (same
unit mix, 64 to 512 threads, 16 memory modules) for the parallel unit.

## The shared instruction format

An instruction is one wide word with no opcode decoding. It holds:

| Field | Width | Meaning |
|---|---|---|
| `O0`, `O1` | 2 × 32 | immediate operands |
| ALU subinstruction, per ALU | 18 | op, x source, y source |
| compare subinstruction | 17 | op, x, y |
| memory subinstruction, per memory unit | 16 | op, address source, data source |
| sequencer subinstruction | 13 | op, target select, two-way flag, jump source |
| write-back field, per register | 6 | source code, or KEEP |

With 32 registers and the M5/T5 unit mix this comes to 320 bits.

Every operand is chosen by a 6-bit *source code* on a crossbar (`ipsm_pkg.sv`):

| Code | Source |
|---|---|
| 0–31 | registers R0–R31 |
| 32, 33 | immediates O0, O1 |
| 34 | IC flag, as 0 or 1 |
| 35 | thread ID (parallel unit) or link register RA (scalar unit) |
| 36 | compare-unit result |
| 40–55 | ALU results A0–A15 |
| 56–62 | memory-unit results M0–M6 |
| 63 | KEEP (write-back only: leave the register unchanged) |

Registers are written only by write-back fields. Writing `WB3 = A0` sends the ALU result to R3.
Several registers can be written in one instruction, and two registers can be swapped.

Operation groups:

* **ALU:** add/sub with and without carry; signed and unsigned mul, div and mod; six logic
  operations; shifts and rotates; byte/halfword align operations for sub-word data; SEL, which
  picks x or y by the IC flag.
* **Compare unit:** set-on-compare, which writes the IC flag; condition-code versions of the
  arithmetic and logic operations, which write N, Z, V and C.
* **Memory unit:** signed and unsigned byte and halfword loads, word loads, byte/halfword/word
  stores.
* **Sequencer:** branches on IC (BEQZ/BNEZ) and on the condition codes (BA … BVS); JMP, JMPL,
  TRAP and SYNC.

A branch may be *two-way*: with the `other` bit set, the not-taken path goes to the other
immediate instead of PC+1.

Addresses are byte addresses. Byte order is big-endian: byte 0 is bits 31:24.

The operation names follow the instruction set of the architecture. The binary encodings and
field order are this implementation's own.

## Scalar unit: the two-stage pipeline (`mpa_core`)

### Timing

The hard part to understand is which instruction sees which value. In one clock cycle:

1. Instruction *k* sits in the operation register `O`. Its units compute from operand
   registers latched at the previous edge: `A = AA op AB`, compare, and the data-cache access.
2. At the same time, instruction *k+1* is read from the instruction memory at `PC`.
   Because the format is uncoded, its crossbar selects work straight off the fetched word. Its
   unit operands, its register write-backs and its branch decision all settle in the same
   cycle, and they already see the results of instruction *k*.
3. At the rising edge the following all load together: the operand registers, the registers
   (write-back), `O`, `PC`, IC and the condition codes. Stores of instruction *k* are also
   written.

Consequences for software:

* A result is available to the very next instruction. There is no load-use or ALU-use delay.
* A branch in instruction *k+1* tests a compare done by instruction *k*. The branch decides
  the next fetch address in the same cycle, so there is no branch delay slot and no penalty.
* A unit result is valid for exactly one following instruction. To keep it longer, write it
  to a register.
* The immediates O0/O1 that appear as sources belong to the instruction being fetched.
* One instruction retires every clock while `run` is high. TRAP stops the unit (`halted`).

### Data cache

The data cache is an `mpram` with one port per memory unit plus a host port. It uses Priority
mode, so if a memory unit and the host write the same word in the same clock, the memory unit
(lower port number) wins. Sub-word stores are read, merged and written back within the cycle.

### Not built

Floating point, register windows and the exception registers.

## Parallel unit: the thread ring (`mtac_core`)

### Slices and the ring

The pipeline is an array of `TMAX` *slices*. A slice holds one complete thread:

* valid, done and frozen flags;
* thread ID, PC, IC and condition codes;
* all 32 registers;
* the instruction in flight and the results of its units.

Every clock each slice passes its thread to the next one, so the thread state itself flows
through the pipeline. A thread therefore executes one instruction per trip round the ring.
Switching threads costs nothing, and a thread never sees a dependency on its own previous
instruction, because that instruction has always finished.

### Stage map

With `NPRE` ALUs before the memory units:

```
slice 0            IF    fetch the thread's instruction (shared instruction memory)
1 .. NPRE          A0..  pre-memory ALUs, one per stage
NPRE+1             HA    select address/data, hash the address, send requests
NPRE+2 ..          ME    U = TMIN - NALU - 5 stages waiting for replies
                   A..   post-memory ALUs (none in T5)
                   CMP   compare unit
                   SE    write-back, next PC, TRAP / SYNC / JMPL
rest               TM    thread-management stages, passive
```

For T5 (`TMIN = 64`) this gives U = 58, with HA in slice 2, CMP in slice 61, SE in slice 62
and one TM stage.

The ring length is `max(n_threads, TMIN)`, at most `TMAX`. The slot at that length is wired
back to slice 0. Slots beyond `n_threads` hold *null threads*, which execute nothing.

### Chaining

Each stage selects its operands through its own crossbar. The sources are the thread's
registers, O0/O1, IC, the thread ID, and the results of all earlier stages of the same
instruction. So `A0 = ID << 2; M0 = load [A0]; R2 = M0` is one instruction.

The memory units are not chained to each other.

### Memory and the halt rule

All requests of an instruction leave in the HA stage: word address, byte enables, store data,
the target module number from `mtac_hash`, and the thread ID as tag. A reply is matched by tag
while its thread is in the ME stages. The reply must arrive within about U cycles.

If a thread reaches the last ME stage with a read still unanswered, `stall` rises and the
whole ring holds. Requests are held back during the stall; replies are still accepted. The
ring moves on once the reply is in.

A request is valid for exactly one non-stalled cycle and has no back-pressure. The network
must accept it.

### SYNC

SYNC *freezes* a thread. Its PC moves past the SYNC, but the thread executes nothing until
`sync_in` pulses, which releases every frozen thread. `all_frozen` tells an external
synchronization network that every live thread has arrived. `all_done` means every thread has
executed TRAP.

### Start-up

At reset, thread *t* sits in slice *t* with PC 0 and cleared registers. It fetches its first
instruction when it reaches slice 0. So thread 0 starts at once, and thread *t* after
`ring - t` cycles.

### Hashing

`mtac_hash` spreads word addresses over `2^MODW` modules:

`module = ((addr × (mult | 1)) XOR key) >> (32 − MODW)`

If an access pattern collides badly, load a new `mult`/`key` pair. Which family of functions to
use is this design's choice.

### Cost and simulation size

The whole thread state travels in the slice latches. That is simple and correct, but large.
At 512 slices it is about 0.8 million flip-flops, and the slices with a crossbar add large
multiplexers. Synthesis of the default parallel unit takes longer than 10 minutes, and its
Verilator model takes very long to compile. Simulate with a smaller ring, for example
`TMIN = 16, TMAX = 32`, which keeps the same stage layout with U = 10. A cheaper structure
would keep the registers in per-stage register-file RAMs indexed by thread ID. That is not
done here.

## CRCW multiport RAM (`mpram`, `crcw_common_logic`, `crcw_priority_logic`, `prio_encoder`)

Each port has its own row and column decoder, data lines, chip select and write line. A word
is selected by a port when both its row and its column lines are active. Concurrent reads of
a word all succeed. Concurrent writes are resolved by the cell logic:

* **Common:** the write data is the OR of all writing ports. This is correct when the
  writers agree, which is the CRCW-Common rule.
* **Priority:** a parallel priority encoder (a prefix-OR chain) lets the lowest-numbered
  writing port through.

The cell logic is instantiated once per port, for the word that port addresses, not once per
storage cell. Words that no port selects keep their value, so the function is the same.

Reads are combinational. Writes happen at the clock edge. The default size is 16 ports,
16384 words × 1 bit.

## The top (`ipsm_top`)

The top places one scalar unit (M5) and one parallel unit (T5) side by side. All their ports
are brought out, prefixed `mpa_` and `mt_`. The following are outside the node and appear only
as ports:

* the interconnection network and the distributed memory modules: the `mt_req_*` / `mt_rep_*`
  ports;
* the synchronization network: `mt_sync_in`, `mt_all_frozen`.

The two units share only clock and reset. Handing work between them is up to software and the
surrounding system.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`, and has a watchdog. For example:

```
verilator --binary -Wno-fatal --top-module tb_mtac_core -Irtl -y rtl rtl/ipsm_pkg.sv tb/tb_mtac_core.sv
obj_dir/Vtb_mtac_core
```

| Testbench | What it checks |
|---|---|
| `tb_ipsm_alu`, `tb_ipsm_cmp`, `tb_ipsm_seq` | every operation against an integer reference model, with corner and random operands |
| `tb_fwd_xbar`, `tb_dist_regfile` | every source code; simultaneous register updates, KEEP, enable |
| `tb_prio_encoder` | all 65536 request patterns |
| `tb_crcw_*_logic` | write rules and output gating, under heavy write conflicts |
| `tb_mpram` | the 16-port 16K×1 Common memory and a 16-port Priority memory against a model, 16 accesses per clock |
| `tb_mtac_hash` | the formula, and an even spread of a sequential block over 16 modules |
| `tb_mpa_core` | a Fibonacci program: results and an exact 2+3N+1 cycle count (one instruction per clock, no branch penalty); byte/halfword lanes; two-way branch; JMPL/JMP |
| `tb_mtac_core` | a per-thread add / SYNC / neighbour compare / branch program, with 10, 32 and 20 threads; exact cycle count (one instruction per thread per trip); no halt below U cycles of latency, halts above; module numbers against the hash |
| `tb_ipsm_top` | both units running at once, with injected CRCW conflicts on the scalar cache. Reports how often each mechanism occurred: halts, forwards, branches, syncs, hashed requests, write conflicts |

`tb_ipsm_top` and `tb_mtac_core` reduce the ring to 16–32 slices. No testbench runs the
parallel unit at its full 512-slice size.

## Limits and departures

* Not built:
  * floating-point units and operations;
  * register windows;
  * exception registers;
  * the mesh network and its routers;
  * the memory modules;
  * the synchronization network;
  * more than one processor of each kind.
* Choices of this design that the architecture leaves open:
  * encodings and field order;
  * the number of registers (32);
  * instruction and data memory sizes;
  * one pipeline stage per unit and no separate decode stages in the parallel unit;
  * the value of U;
  * the request/reply format;
  * the SYNC release protocol;
  * JMPL linking into R31 in the parallel unit and into RA in the scalar unit;
  * division by zero returning all ones (remainder by zero returns the dividend);
  * reset values.
* The storage arrays are clocked flip-flop or memory arrays, not latch cells.
