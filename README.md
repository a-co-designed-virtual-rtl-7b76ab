# ILDP core: an accumulator-strand processor for a co-designed virtual machine

Instruction-level distributed processing (ILDP) splits a wide out-of-order core into
a row of small, simple, in-order processing elements (PEs). The trick is the
instruction set. Most values a program computes are used once, by the next
instruction in a dependence chain. ILDP gives such values a home that never
leaves a PE: an **accumulator**. A chain of dependent instructions that passes its
temporaries through one accumulator is a **strand**. Each strand is steered to
one PE and runs there in order, so no PE needs wakeup/select logic. Only values
that live long or cross strands go through the 64 general-purpose registers
(GPRs). GPRs are renamed and broadcast to every PE.

Nobody writes ILDP code by hand. A virtual machine monitor translates a
conventional ISA (Alpha in the original study) into ILDP strands at run time and
keeps the translations in a hidden code cache. That software is not hardware and
is not part of this RTL. This repository is the hardware side: the core that
runs translated code, plus the support the translator relies on for register
jumps and returns.

## The instruction set as implemented

Three formats; the field positions are fixed by the ILDP definition:

| format  | bits | fields |
|---------|------|--------|
| short   | 16   | `Op[15:10] A[9:7] M[6] Rd[5:0]` |
| operate | 32   | `Op[31:26] A[25:23] Mode[22:19] R/Imm[18:11] Func[10:6] Rd[5:0]` |
| memory  | 32   | `Op[31:26] A[25:23] Mode[22:19] Ra[18:13] Offset[12:6] Rd[5:0]` |

`A` names one of 8 accumulators. `Mode[22]` is the end-of-strand bit: after that
instruction the accumulator is dead and its PE is free for another strand.

The definition gives fields but no code points, so the values below are this
design's own (`rtl/ildp_pkg.sv`):

* `Op[5]=1` is the short format. It computes `A <- A func R` (M=0) or
  `A <- R func A` (M=1), where the 6-bit field names the GPR source. It writes no
  GPR.
* For the 32-bit formats, `Op[4:2]` is the class and `Op[1:0]` the GPR write kind.
  * Classes: ALU, LD, ST, BR, JMP, PUSH, JTW, HALT.
  * Write kind 0: no GPR write.
  * Write kind 1: the value goes to the architected register file only. It is
    needed just to rebuild precise state.
  * Write kind 2: a *global* value, written to a physical register that other
    strands read.
* `Mode[21:19]` selects the operands.
  * 0: `A op R`. 1: `R op A`. 2: `A op Imm`.
  * 3: `A <- R`, which starts a strand. 4: `A <- Imm`, which also starts one.
  * The result always lands in A. `Rd` is written as well when the write kind
    asks for it.
* Loads use `A <- mem[A + 8*off]` (mode 0) or `A <- mem[R + 8*off]` (mode 3).
* Stores use `mem[A + 8*off] <- R` (mode 0) or `mem[R + 8*off] <- A` (mode 1).
* `BR` tests A for EQ, NE, LT, GE or always (the Func field). Its 14-bit
  displacement, counted in 16-bit parcels, is split over the R/Imm and Rd fields.
* `JMP` jumps to the *source* PC (SPC) held in GPR R.
  * Func 0 looks the SPC up in the jump target-address lookup table (JTLT).
  * Func 1 is a return, predicted by the dual return address stack.
* `PUSH` is 64 bits long. It pushes the pair (SPC, TPC) on the dual RAS.
  * TPC is the PC of the translated return point, given as a displacement.
  * SPC, the matching source PC, is the 32-bit literal in the second word.
* `JTW` writes the JTLT entry `SPC = R -> TPC = A`. The translator uses it to fill
  the table.
* `HALT` stops fetch. It is used to end a test program.

## Pipeline

```
 code cache --> fetch --> rename + steer + ROB allocate --> per-PE FIFOs --> PEs
   (TB array)   gshare      (a group of 4 goes all at once)    16 deep      | | |
                BTB, RAS                                                    v v v
                                       ROB (128) <-- completions -----------+ | |
                                        | in-order retire, 4/cycle            | |
                                        v                                     | |
   architected RF, D-cache write, JTLT/RAS/BTB/gshare training      global network
                                                                   (GPR broadcast)
```

* **Fetch** (`fetch.sv`):
  * Reads a 32-byte window of translated code each cycle. Instructions are
    1, 2 or 4 parcels long.
  * Decodes every parcel offset in parallel, then chains through the lengths. It
    takes up to 4 instructions that fit in the window, and the group ends after
    the first control transfer.
  * Branches are predicted by a 16K-entry, 12-bit-history gshare. Register jumps
    use a 512-entry 4-way BTB. Returns use the speculative copy of the dual RAS.
* **Dispatch** (`ildp_top.sv` with `gpr_rename.sv`, `steer.sv`, `rob.sv`). A
  fetched group leaves the fetch buffer only if all of these have room: physical
  registers, the ROB, every target FIFO, and the load and store queues. If not, it
  waits and counts a dispatch stall.
* **Rename** only allocates for write kind 2. The accumulators are "renamed" by
  steering, which maps accumulators to PEs:
  * An instruction that reads its accumulator goes to the PE that holds the
    strand.
  * A strand start takes the lowest-numbered PE that no live strand owns.
  * An end-of-strand instruction releases the PE.
  * An instruction that touches no accumulator (a jump, a push) goes to the PE
    with the most free FIFO entries.
* **Processing element** (`pe.sv`). Each PE has:
  * an in-order FIFO;
  * a local accumulator;
  * its own copy of the physical GPR file with ready bits;
  * its own copy of the store queue;
  * a port on one of the data cache copies.

  The FIFO head issues when its GPR source is ready. There is no wakeup and no
  select: the head either goes or waits. The functional unit is not pipelined, and
  a load holds the PE for the 2-cycle cache latency.
* **Global network** (`global_net.sv`). A global result reaches the producing PE's
  own register copy at once, and the other PEs after `COMM_LAT` cycles. At the
  default `COMM_LAT=0` the network is only wiring. At 1 or 2 it adds register
  stages, which a flush clears.
* **Retire** (`rob.sv`, `arch_rf.sv`):
  * Up to 4 instructions per cycle leave in order. A store, branch, jump, push or
    JTLT write closes the retirement group.
  * Writes of both kinds reach the architected register file here. That file
    alone holds precise state.
  * Stores write all data cache copies at retirement.

## Control transfers in translated code

This is where the virtual machine and the hardware meet.

* **Register jumps.** A jump's target is a source-ISA address (SPC), but fetch
  needs the translated address (TPC).
  * The JTLT (`jtlt.sv`, 256 entries, direct mapped, full-SPC tag) maps SPC to
    TPC. The translator fills it with `JTW`, like a software-managed TLB. A hit is
    always correct.
  * Fetch predicts the TPC with the BTB. At retirement the ROB looks up the jump's
    SPC in the JTLT.
  * On a hit, execution continues at the table's TPC. That is a flush only if the
    BTB guessed otherwise, and the BTB is then trained with the correct TPC.
  * On a miss, execution continues at the translator's dispatch code, at
    `DISPATCH_TPC`.
* **Returns.** `PUSH` puts both addresses of the return point on the dual RAS
  (`dual_ras.sv`, 16 entries).
  * Fetch predicts with the TPC. Retirement checks the popped SPC against the SPC
    that the return actually holds in its register.
  * On a mismatch, the return is resolved through the JTLT like any register jump.
* **Recovery.**
  * The RAS and gshare each keep a speculative copy and a copy updated at
    retirement.
  * A flush copies the committed state back into the speculative one. The rename
    map is restored the same way.

## Memory ordering

PEs issue loads and stores out of program order with respect to each other.

* Every store broadcasts its address and data to all store-queue copies
  (`store_queue.sv`). A load takes data from the youngest older store with the
  same address, and otherwise reads the cache.
* Each load records its address in the shared load queue (`load_queue.sv`).
* A store that executes late is checked against all younger loads that have
  already executed with the same address. This includes loads recording in the
  same cycle. The oldest such load is marked.
* When the marked load reaches the head of the ROB, the core flushes and refetches
  from that load.

The store and load queue positions use one extra wrap bit, so age comparisons
are modular.

## Recovery and its cost

Every misprediction and every ordering violation is resolved at retirement by a
full flush:

* FIFOs, in-flight loads, store-queue contents and network stages are dropped;
* rename and steering state are restored from the retirement copies;
* fetch is redirected.

This is simple and always correct. It makes the misprediction penalty as long as
the ROB occupancy. A faster design would resolve branches in the PEs.

## Parameters (`ildp_top`)

| parameter | default | meaning |
|-----------|---------|---------|
| `NPE` | 8 | processing elements; must be at least 8, the accumulator count |
| `W` | 4 | fetch / dispatch / retire width |
| `ROB_DEPTH` | 128 | reorder buffer entries |
| `FIFO_DEPTH` | 16 | per-PE instruction FIFO |
| `NPHYS` | 192 | physical GPRs (64 architected + ROB size) |
| `SQ_DEPTH`, `LQ_DEPTH` | 32 | store / load queue entries |
| `COMM_LAT` | 0 | global bypass latency between PEs (1 and 2 also work) |
| `DC_WORDS` | 4096 | words per data cache copy (32 KB) |
| `DC_COPIES` | 2 | data cache copies; PE `p` reads copy `p*DC_COPIES/NPE` |
| `DC_LAT` | 2 | load-to-use latency of the cache |
| `GS_ENTRIES`, `BTB_ENTRIES`, `BTB_WAYS`, `RAS_DEPTH`, `JTLT_ENTRIES` | 16384, 512, 4, 16, 256 | predictor sizes |
| `RESET_TPC`, `DISPATCH_TPC` | 0, 0x100 | start address; address of the translator's dispatch code |

The tag types in `ildp_pkg` are 8 bits wide. That limits `NPHYS` and `ROB_DEPTH`
to 256 and the queues to 128 entries.

The top's ports:

* `imem_addr` / `imem_data`: the code-cache read, 16 parcels combinational, first
  parcel in the top bits.
* `dinit_*`: preloads data into every cache copy.
* `halted`.
* `arch_regs`: the architected register file.
* `perf`: event counters for cycles, retired instructions, branch and jump
  mispredictions, replays, JTLT hits and misses, RAS hits, strands started and
  ended, operand stalls, dispatch stalls, forwarded loads, and remote operand
  arrivals.

## Where this departs from the original design

* **Fetch.** It follows one basic block per cycle with one prediction. The
  original fetch was tuned to fetch several sequential basic blocks at once.
* **Caches and memory.**
  * There is no I-cache and no L2: the code cache is read directly.
  * The data cache is an always-hit array. It has no tags, no lines, and no
    write-through or miss path.
  * Each PE has its own read port instead of two ports shared per copy.
* **Strands and PEs.** Steering needs a PE per live strand, so the 4- and 6-PE
  configurations of the original study cannot be built without a policy for
  sharing PEs. That policy was never specified.
* **Encoding.** All opcode, mode, function and condition code points, the
  control-transfer instructions, and the 64-bit push are this design's own. So
  are the ×8 scaling of memory offsets and the parcel-scaled branch
  displacements.
* **Recovery.** Everything resolves at retirement (see above), and only one
  store or control transfer retires per cycle.
* **Out of scope.** The translator, interpreter, code cache management and trap
  handling are software and are not here.

## Verification

Each block has a self-checking testbench in `tb/` that compares it against an
independent reference. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. The main tests:

* `tb_ildp_top` runs the whole core at its default parameters on a hand-assembled
  translated program and compares all 64 architected registers and the retired
  count against an instruction-level interpreter (`ildp_tb_pkg::ref_machine`).
  * The program covers a loop, short instructions, both GPR write kinds, a
    pointer chase, a long strand, and a store-to-load forward.
  * It also forces a memory-ordering violation and replay, JTLT hits and a JTLT
    miss that goes through the dispatch code, and a call/return through the dual
    RAS.
  * The test fails any event counter that stays at zero.
* `tb_ildp_top_lat2` runs the same program with a 2-cycle network between PEs
  (`COMM_LAT=2`). The architected result must be identical. Only the cycle
  count may change.
* `tb_pe` drives one PE with random strands, delayed remote operands, forwarding
  and branches.
* `tb_rob` checks in-order retirement, flushes, replays and JTLT resolution
  against a queue model.
* `tb_fetch`, `tb_steer`, `tb_gpr_rename`, `tb_store_queue`, `tb_load_queue` and
  the predictor tests are randomized against small reference models.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ildp_pkg.sv tb/ildp_tb_pkg.sv \
          tb/tb_ildp_top.sv --top-module tb_ildp_top
./obj_dir/Vtb_ildp_top
```

Replace `tb_ildp_top` with any testbench name. Tests that do not use the test
package still compile with it on the command line.

To try your own program, use the encoder functions in `tb/ildp_tb_pkg.sv`
(`e_alu`, `e_mem`, `e_br`, `e_jmp`, `e_push`, `e_jtw`, `e_short`, `e_halt`) and
the two-pass label assembler in `tb_ildp_top.sv`.

Expected lint output: some warnings remain and are benign.

* Unused package constants, and the clock of `global_net` at `COMM_LAT=0`.
* Open store-queue head outputs inside `pe`.
* The unused `in_reads` hint of `gpr_rename`.
* FIFO and table storage without reset (`SYNCASYNCNET`). It is never read before
  it is written.

## Files

* `rtl/`: one module per file.
  * `ildp_pkg` holds types, encodings and the ALU.
  * `ildp_top` wires the core.
* `tb/`: `tb_<module>.sv` per block, plus `ildp_tb_pkg.sv` (encoders, reference
  ALU, reference interpreter).
