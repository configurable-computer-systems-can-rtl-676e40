# D²-CPU: a data-driven processor with intelligent memory

This is synthesizable SystemVerilog for a small dataflow machine, the D²-CPU
(data-driven CPU). It was originally described in the thesis *Configurable
Computer Systems Can Support Dataflow Computing* as an FPGA prototype.
There is no program counter and no instruction fetch. Every instruction sits
in memory together with its operands and the IDs of the instructions that
will produce the operands it still lacks. Results travel as **tokens**
`{IAD, RESULT}`, where IAD is the address of the producing instruction. Each
token is broadcast to every memory level at once. Every memory block compares
the token with its producer IDs, copies the result in on a match, and moves
up towards the execution unit once it is complete. Only instructions whose
data is ready ever reach the execution unit, so that unit needs no scheduler,
no register file and no caches for data.

The RTL covers the whole prototype:
- the execution unit with its three pipelines;
- the hardware manager that renames instruction IDs;
- the out-buffer;
- two EXT-CACHE modules;
- two main-memory modules with their "processor-in-memory" controllers;
- the main-controller that loads and unloads programs through a dual-port
  block RAM.

The host's view of the design is only that block RAM, plus a done flag.

## The path an instruction takes

```
 host ──port A──▶ block_ram ◀──port B── main_controller
                                           │ load / unload (64-block host ports)
            ┌──────────────────────────────┴───────────────┐
       dram_pupim (DRAM1, 64 blocks)              dram_pupim (DRAM2, 64 blocks)
            │ one instruction / clock                       │
       ext_cache (DSRAM1, 16 blocks)              ext_cache (DSRAM2, 16 blocks)
            └──────────────┐                 ┌──────────────┘
                       out_buffer (12 blocks, physical IDs)
                               │ ≤ 2 instructions / clock   ▲ READ
                       hw_manager (64 virtual IDs)           │ 2 tokens / clock
                               │                             │
                        eru: SRAM* ─▶ ERU-SRAM ─▶ unit   ──▶ token FIFO
                             (ADD/SUB, 8×8 MUL, shift/logic/compare)
```

1. **Main memory (`dram_pupim`).** This is where the program lives. A block
   is *ready* when its clause allows it (see below). It leaves for the
   EXT-CACHE once it has at least one operand, or even with none. After
   leaving, the block is "dissolved": its valid bit V drops. It keeps
   recording any operand that arrives later, so the memory image read back at
   the end shows every operand each instruction used. Loop blocks stay
   instead, as described below.
2. **EXT-CACHE (`ext_cache`).** Sixteen blocks work in parallel and each one
   snoops the token bus. A block missing at most one operand is passed to the
   out-buffer. This stage converts the instruction to the execution-unit
   format, which can name only one missing operand.
3. **Out-buffer (`out_buffer`).** Twelve blocks. A block is *eligible* when
   two conditions hold:
   - its functional unit's SRAM* is not full;
   - it is complete, or the producer it waits for is already inside the
     execution unit.

   Up to two eligible instructions go out per clock, and the two never need
   the same unit.
4. **Hardware manager (`hw_manager`).**
   - Inside the execution unit, instructions are known by a 6-bit *virtual*
     ID, not their 7-bit physical address.
   - The manager gives each entering instruction a free virtual ID.
   - It translates the waiting operand's producer ID to that producer's
     virtual ID.
   - On the way out it turns each token's virtual IAD back into the physical
     one and frees the virtual ID.
5. **Execution unit (`eru`).** There are three pipelines, one per functional
   unit, and each has three stages:
   - **SRAM\*:** a 12-entry reservation store. Waiting entries scan the whole
     token FIFO every clock.
   - **ERU-SRAM:** a 2-entry queue of ready instructions.
   - **The functional unit itself.**

   Results go into a **token FIFO**, which the memory side empties two tokens
   at a time. The FIFO has two flags:
   - **BUFFERHALF** tells the memory side to stop sending and read.
   - **BUFFERFULL** stalls all three pipelines. While they are stalled, the
     SRAM\*s may still fill up.

## Tokens, the shared bus and why nothing moves when a token passes

The bus between the memory system and the execution unit carries either
instructions or tokens in a given clock, never both. The out-buffer decides
which:

```
read    = resultout && (bufferhalf || nothing_eligible || !two_virtual_ids_free)
send    = something_eligible && two_virtual_ids_free && !read && !local_token
```

The token bus seen by the memory levels has four slots:
- **Slots 0 and 1:** the two tokens the hardware manager translated in this
  clock.
- **Slots 2 and 3:** one per main-memory module. They carry results of the
  nodes that run inside main memory (MERGE and LOCK). These slots are used
  only in clocks in which the hardware manager sends nothing.

**The consistency rule.** In any clock with a token on the bus, no
instruction moves between memory levels:
- DRAM to EXT-CACHE: no moves;
- EXT-CACHE to out-buffer: no moves;
- out-buffer to execution unit: no sends.

Every block is therefore standing still when the token passes, and no block
can miss its token because it was in transit. The rule costs some
throughput, but it is what makes a plain broadcast sufficient.

A dependent instruction may enter the execution unit only while its producer
is still inside, meaning its virtual ID is still allocated. The producer's
token cannot have left yet, so the SRAM\* is sure to see it in the FIFO. In
all other cases the instruction waits in memory for the broadcast token.

## Instruction and program format

A main-memory block holds these fields:

| field | bits | meaning |
|---|---|---|
| V | 1 | block holds a live instruction |
| CR | 1 | clause required: run only when CAN = 1 |
| CAN | 1 | clause answer (bit 0 of the result of instruction CAD) |
| CAD | 7 | clause address |
| OPCODE | 6 | low two bits select the unit: 01 adder, 10 multiplier, 11 shift/logic/compare, 00 runs in memory |
| ORE | 2 | operand reuse inside a loop: bit 0 keeps OPD1, bit 1 keeps OPD2 |
| LP | 2 | loop role: 00 none, 01 MERGE, 10 SWITCH, 11 LOCK/STOP |
| OPFL | 2 | bit 0: OPD1 still missing, bit 1: OPD2 still missing |
| IID2, IID1 | 7 each | physical address of the producers |
| OPD2, OPD1 | 16 each | operands |

Physical addresses are assigned as follows:
- **1..63** are DRAM1 blocks 1..63.
- **64..127** are DRAM2 blocks 0..63.
- **0** means "no producer", so DRAM1 block 0 is never loaded.

The host writes block *n* as three 32-bit words at block-RAM addresses
3(n−1), 3(n−1)+1 and 3(n−1)+2:

```
word 0: {28'b0, ORE[1:0], LP[1:0]}
word 1: {V, CR, CAN, CAD[6:0], OPCODE[5:0], OPFL[1:0], IID2[6:0], IID1[6:0]}
word 2: {OPD2[15:0], OPD1[15:0]}
```

After the run the same words hold the results. For example, the program
`ADD 1,1; MUL 2,2; SHL 2; LOCK *1,*2; LOCK *3,*4` is written as
`00000000 A0010000 00010001 …`. It reads back with every V bit cleared and
with `00040002` and `00040004` in the two LOCK blocks' operand words.

Opcodes:

| class | operations |
|---|---|
| adder | ADD 000001, SUB 000101 |
| multiplier | MUL 000010 (low 8 bits of each operand, 16-bit product) |
| shift/logic/compare | AND 000011, OR 000111, NAND 001011, NOR 001111, XOR 010011, NOT 010111, EQT 011011, NEQT 011111, GT 100011, LT 100111, GET 101011, LET 101111, SHL 110011, SHR 110111, RAL 111011, RAR 111111 |
| in memory | MERGE 000000 (LP 01), LOCK 000000 (LP 11), STOP 100000 (LP 11) |

More on the operations:
- Compares are signed and return 0 or 1.
- NOT, the shifts and the rotates use OPD1 only, and move by one bit.

## Clauses and loops

The hardest part of the design to follow is how conditionals and loops work
without a program counter. All of it happens inside the main-memory
controller.

- **Clause.** An instruction with CR = 1 does nothing until a token from
  instruction CAD arrives. That token's result bit 0 is copied into CAN. If
  CAN becomes 1, the instruction runs. If it stays 0, the instruction is
  skipped and stays in memory with V = 1. Its operands are still recorded.
- **LOCK (LP 11, opcode 000000).** Fires once both operands are present and
  emits a token carrying OPD2. It orders two results: the second cannot
  travel on before the first exists.
- **STOP (LP 11, opcode 100000).** Fires when its operands are present and
  ends the run.
- **MERGE (LP 01).** Fires when either input has a value and passes that
  value on. On the first iteration this is the initial value. On later
  iterations it is the value fed back from the loop body. After firing it
  waits for a fresh token.
- **ORE and SWITCH blocks stay resident.** A block with ORE ≠ 00, or with
  LP = MERGE or SWITCH, is not dissolved after it runs:
  - its OPFL bits are set again for the operands it must receive anew;
  - ORE marks the operands it keeps, such as a loop constant.

  A resident block may leave main memory only when complete, so the copy
  left behind can never fire twice.
- **SWITCH.** The loop test, typically LET, is a SWITCH block whose own
  address is the CAD of the loop body and of itself. The body runs while
  the test answers 1. When the test answers 0, everything gated by it stops.

The system testbench contains a three-block counting loop built this way:
MERGE i; SWITCH LET i,3; ADD i,1, where ADD keeps its constant through ORE.

## Keeping the memory hierarchy from clogging

Space is finite at every level. Consider an out-buffer full of instructions
that wait for producers. If those producers are still in main memory, behind
the full buffer, the machine deadlocks. The original description accepts
this risk and asks the programmer to load the memory modules carefully. This
implementation closes the hole with three rules:

- The EXT-CACHE and the out-buffer keep their last `RESERVE` (2) free blocks
  for complete instructions. An instruction still waiting for an operand is
  accepted only while more blocks than that are free.
- Main memory and the EXT-CACHE both forward complete blocks first. Main
  memory then forwards blocks missing one operand, then blocks missing two.
- Resident loop blocks leave main memory only when complete.

A complete instruction can therefore always advance to the execution unit
and produce its token. Every dependency chain starts with such an
instruction, so the machine always makes progress.

## Load, run, unload

`main_controller` runs as a small state machine.
- **Load.** While `global_reset` is high the host fills the block RAM through
  port A. When the reset drops, the controller copies the 127 blocks into the
  two DRAMs, taking 4 clocks per block. The processor is held in reset
  meanwhile.
- **Run.** The processor runs until one of two things happens:
  - a STOP fires;
  - the whole machine has been idle for `QUIET` (8) clocks. Idle means
    nothing can be sent, nothing is in flight and no token is on the bus.
- **Unload.** The controller writes every block back, taking 3 clocks per
  block, and raises `done`.

With the five-instruction example above, the whole sequence takes about 900
clocks from reset release to `done`. Almost all of that is loading and
unloading.

## Modules

| file | contents | main parameters (default) |
|---|---|---|
| `d2_pkg.sv` | widths, instruction/token structs, opcodes, snoop helpers | |
| `d2cpu_top.sv` | whole system; ports `clk, global_reset, ena, wea, addra, dia, doa, done, busy` | `N_PAIRS` 2, `FIFO_DEPTH` 16, `SRAMS_DEPTH` 12 |
| `block_ram.sv` | dual-port 512 × 36 RAM (32 data + 4 even-parity bits), write-first | `DEPTH` 512, `WIDTH` 36 |
| `main_controller.sv` | load / run / unload sequencer | `DEPTH` 64, `QUIET` 8 |
| `dram_pupim.sv` | main memory + controller: clauses, loops, local nodes, host port | `DEPTH` 64, `BASE` |
| `ext_cache.sv` | EXT-CACHE with controller | `DEPTH` 16, `RESERVE` 2 |
| `out_buffer.sv` | out-buffer, pair selection, bus turn-around | `DEPTH` 12, `RESERVE` 2 |
| `hw_manager.sv` | virtual/physical ID table, translation both ways | `NVID` 64 |
| `eru.sv` | three pipelines + token FIFO | `SRAMS_DEPTH` 12, `ERUSRAM_DEPTH` 2, `FIFO_DEPTH` 16 |
| `sram_star.sv` | reservation store, scans the FIFO | `DEPTH` 12, `FU`, `SCAN` |
| `eru_sram.sv` | two-entry ready queue | `DEPTH` 2 |
| `fu_add.sv`, `fu_mul.sv`, `fu_slc.sv` | functional units, one clock, stall on BUFFERFULL | |
| `token_fifo.sv` | token FIFO with BUFFERHALF / BUFFERFULL and scan outputs | `DEPTH` 16 (power of two) |

Design-wide conventions:
- Everything runs on one clock with synchronous, active-high reset.
- Every stage is a registered ready/valid stage.
- Assertions check the handshake rules: two instructions on the bus never
  need the same unit, a full SRAM\* is never written, and instructions are
  sent only when two virtual IDs are free.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/d2_pkg.sv tb/tb_d2cpu_full.sv \
          --top-module tb_d2cpu_full -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other test. Unit tests:
- They exist for every module.
- They check against models written inside the testbench.
- Each one is also run against a deliberately broken copy of its module, and
  the checks catch the breakage.

The two system testbenches run five programs each:
- **P1:** the five-instruction example above, against hand-written words.
- **P2:** about 120 random instructions over both memories. They use every
  opcode, random dependencies, LOCK nodes and clause-gated instructions, and
  are checked against a model.
- **P3:** the counting loop.
- **P4:** a STOP.
- **P5:** two long dependent chains.

**`tb_d2cpu_sample`**, also at the defaults, runs the original's sample program
`y = 2x − 10; if y > 0 then 10 × (y = 7y) else y = 7·7`. It is written as 11
blocks in this design's format and run for three values of x. The test checks:
- which branch ran;
- that the loop body fires exactly ten times;
- the final y, which wraps through the 8 × 8 multiplier.

The loop-taken runs take about 1100 clocks from reset release to `done`.

The testbenches differ in size:
- **`tb_d2cpu_full`** uses every parameter at its default. It runs in well
  under a second.
- **`tb_d2cpu_top`** shrinks the FIFO to 4 tokens and the SRAM\*s to 3 blocks.
  It counts each mechanism and fails if one never happens. The mechanisms
  are paired sends, dependent instructions entering the execution unit,
  token reads, BUFFERHALF, BUFFERFULL, a full SRAM\*, local LOCK/MERGE
  tokens, virtual-ID reuse, a skipped clause and STOP.

## How far this follows the original, and where it departs

**Taken from the original:**
- the block structure and sizes: 2 memory pairs of 64 + 16 blocks, a
  12-block out-buffer, 12-block SRAM\*s, 2-entry ERU-SRAMs;
- 64 virtual IDs with 6/7-bit IDs;
- 16-bit data, the opcode table and the 8 × 8 multiplier;
- the BUFFERHALF/BUFFERFULL behaviour and FIFO scanning;
- the clause fields, the loop fields and the in-memory MERGE/LOCK/STOP nodes;
- the block-RAM load/unload scheme, with the word layout fitted to the
  original's example read/write buffers, which it reproduces exactly.

**This design's own choices**, where the original is silent:
- token FIFO depth 16, and the exact BUFFERFULL threshold (fewer than three
  free entries);
- selection by lowest block number instead of true arrival order;
- the exact read/send turn-around formula;
- the out-buffer's lookup into the ID table;
- the separate token slots for in-memory nodes;
- what MERGE passes on and when it re-arms;
- LOCK passing OPD2;
- one-bit shifts and signed compares;
- parity and write-first behaviour of the RAM;
- idle-based end-of-run detection;
- load and unload timing;
- one clock for the whole design;
- the anti-clogging reserve described above.

**Two bidirectional buses are split.** The original uses a bidirectional
memory bus and a bidirectional execution-unit bus. Here each is two one-way
buses, never active in the same clock.

**Left out:**
- The board's local-bus, clock and reset interface cores. The block RAM's
  host port is brought out as the top's ports instead.
- The per-instruction recipient count in the execution unit. The original
  leaves it out of its implemented version as well.
- Instruction relocation and exception handling. The original only outlines
  these.

**Limits to keep in mind:**
- A program holds at most 127 instructions.
- The same physical instruction must not be inside the execution unit twice
  at once. A loop body block re-fires only after its new operands arrive,
  which in practice keeps it out until its previous token has left.
- The sample program in `tb_d2cpu_sample` follows the original's structure,
  but not its exact table. Blocks that the original gates on the
  conditional are started here by a clause-gated `ADD D,0`. The loop test
  gates itself, and the running y is merged without a clause. Under this
  design's rules, a clause answer is used up each time its block fires.
