# MorphCore: one core that is both a big out-of-order core and an 8-thread in-order SMT core

A large out-of-order (OOO) core spends most of its energy finding parallelism inside one
instruction stream. When a program has many threads, that work is wasted: the threads already
supply independent instructions. MorphCore reuses the same hardware in two ways:

* **OutofOrder mode** (one or two active threads): a 4-wide, 2-context SMT out-of-order core
  with a 192-entry window. It can also shrink itself to save energy in one of four sub-modes:
  4-wide or 2-wide, with a full window (192 ROB / 60 RS / 192 PRF / 70 LQ / 50 SQ) or a
  reduced one (48 / 20 / 60 / 20 / 10).
* **InOrder mode** (more than two active threads): a 4-wide, 8-thread in-order SMT core. The
  renaming logic, the wide wakeup broadcast and the load queue are idle. The physical register
  file becomes eight fixed register sets, one per thread, and the reservation station becomes eight
  small in-order FIFOs.

The core switches between these modes by itself. A controller watches how many threads are
active. A sampling policy picks the width and window size in OutofOrder mode.

This repository is a synthesizable SystemVerilog (IEEE 1800-2017) model of the core. It runs a
small 64-bit micro-ISA that is this design's own (see "Instruction set"). It does not run x86.

## Pipeline

```
fetch_unit -> decode_stage -> rename_unit -> reservation_station -> exec_unit -> rob commit
   |  icache                     |  (RAT / concat)   |  reg_scoreboard     | prf, lsq, dcache
   |                             |                   |                     | inorder_wb_buffer
tlp_mode_ctrl (mode, contexts, spill/fill)      sampling_policy (width/window in OOO mode)
```

| Stage | Cycle | What happens |
|---|---|---|
| fetch | F | Pick the next enabled context round-robin. Read 4 words (2 in reduced width). Cut the group after a JMP/CALL/RET, which are resolved here using the context's return stack. |
| decode | D | Register the group as micro-ops. In reduced width the two upper lanes are forced Not Valid and their latches hold. |
| rename/dispatch | D→ | OOO mode: speculative RAT per context, lowest-numbered free registers, intra-group bypass. InOrder mode: `preg = tid*16 + areg`. Entries are allocated in the RS, ROB and LSQ in the same cycle. The group waits (`dispatch_stall`) if any of them is full. |
| issue | t | The RS fires up to 4 instructions (2 in reduced width). Memory operations go to units 0 and 1, the two D-cache ports. |
| register read | t+1 | PRF read. Bypass priority: functional-unit results, then the delayed-write buffer, then the PRF. |
| execute | t+1 … t+L | ALU L=1, multiplier L=4 (pipelined), load L=3: address, then SQ search and D-cache read, then data. |
| write back | end of t+1+L | Result to the PRF and ROB. |
| commit | ≥ t+2+L | Up to 4 (or 2) per cycle, round-robin over ROB partitions. The permanent RAT is updated and the old register freed in OOO mode. Committed stores drain to the D-cache one per cycle. |

An instruction that fires in cycle t can feed a dependent instruction that fires in cycle
t+L. For an ALU chain that is back to back.

## The two schedulers in one reservation station

This is the heart of the design (`reservation_station.sv`, `reg_scoreboard.sv`).

**OutofOrder.** Any free entry below the active size (60 or 20) is used. Each source keeps a
MATCH bit and a SHIFT field. A firing instruction broadcasts its destination tag and latency.
A matching source loads a one-hot `1 << (L-1)` and shifts it right each cycle. The source is
ready when SHIFT reaches zero, so the consumer fires exactly L cycles after the producer.
Sources that are already counting down at insertion take their state from `reg_scoreboard`.

Select uses an age matrix: `ob[i][j]` is set when entry j is older than entry i. An entry's rank is
the number of older eligible entries, and the entries of rank below the width are granted.
Two rules are this design's own:

* a load is not eligible while an older store of its thread is still in the RS;
* only the two oldest memory requests are eligible.

**InOrder.** The RS is eight circular FIFOs of 7 entries (60/8). Only the two oldest instructions
of each thread are considered. The oldest is ready when `reg_scoreboard` says its sources are
ready and its destination has no write in flight. The second may fire in the same cycle when it is
ready, the oldest fires too, and it neither reads nor writes the oldest's destination. Eight
per-thread selectors feed a round-robin choice across threads.

**Why InOrder mode needs a write buffer (`inorder_wb_buffer.sv`).** In InOrder mode the PRF
entry *is* the architectural register. A short instruction fired after a long one of the same
thread would finish first. Nothing renames it, and nothing in the ROB undoes it, so its write must
not overtake the older one. The buffer keeps, per thread, the cycle at which the last fired
instruction will write (`rel`). An instruction of latency L writes after R = max(L, rel) cycles.
If R > L it takes one of the thread's 4 buffer entries. The entry catches the result when it is
produced and writes the PRF when its count-down ends. Until then, readers get the value from the
buffer.

A thread only fires while it has two free entries. A register with a buffered write (`pend`) is
not written again until the buffer has released it. Without that rule, a release and a younger
direct write can land in the same cycle, and the older value would win.

## Mode switching (`tlp_mode_ctrl.sv`)

The core is in InOrder mode when more than two threads are active. Otherwise it is in OutofOrder
mode, and the two OOO contexts hold the active threads. A change of active threads, a context
exchange, or a new width/window choice from the policy runs one routine:

1. **DRAIN.** Fetch stops. The routine waits until the ROB, the store queue, the write buffer and
   the front-end latches are empty.
2. **SPILL.** The architectural registers are read through 4 extra PRF read ports, 4 per cycle,
   into a save array. In InOrder mode all 8 threads are saved (32 cycles); in OOO mode both
   contexts are saved, through the permanent RAT (8 cycles). The Active Threads Table holds an
   8-byte pointer per thread to its saved state.
3. **RECONF.** The new mode, width, window and context assignment take effect.
4. **FILL.** The new register images are written through 4 extra PRF write ports. In the first
   FILL cycle `reinit` empties the RS, ROB and LSQ, and resets the RATs. Context s register r
   maps to `s*16+r`, and the rest of the active PRF becomes the free list.

Each thread's PC, branch history and return stack stay in the fetch unit across switches.

## Width and window reduction

* **Half width.** Fetch, decode, dispatch, select and commit are limited to lanes 0–1. The
  upper valid latches are forced Not Valid, and the upper data latches are not loaded.
* **Small window.** The RS, ROB, LSQ and PRF use only their low entries (20/48/10+20/60). The
  PRF drops writes and returns zero for reads above its `active` limit, and an assertion flags any
  such access. This stands in for the segmented bit lines of the real circuit.

## Sampling policy (`sampling_policy.sv`)

Execution is cut into quanta of `QUANTUM` = 10M committed instructions. The first 4·`REPL`
intervals of `INTERVAL` = 100K instructions each run one OOO sub-mode: interval index mod 4, in
the order 4W/192, 4W/48, 2W/192, 2W/48. For each interval the policy records cycles and energy.
It then picks, for the rest of the quantum:

* `objective=0`: fewest cycles;
* `objective=1`: least energy;
* `objective=2`: least energy among modes with `cycles*(100-x) <= best_cycles*100`, which is
  performance within x %.

Energy is an input (`energy`, per cycle). The core has no energy model of its own. The policy holds
while the core is in InOrder mode or switching.

## Instruction set

Encoding: `op[31:28] rd[27:24] rs1[23:20] rs2[19:16] imm[15:0]`. There are 16 registers of 64
bits, and `imm` is sign-extended.

| op | name | effect |
|---|---|---|
| 0 | NOP | – |
| 1, 2, 3 | ADD, SUB, XOR | `rd = rs1 op rs2` |
| 4 | ADDI | `rd = rs1 + imm` |
| 5 | MUL | `rd = rs1 * rs2` (low 64 bits) |
| 6 | LD | `rd = mem[rs1 + imm]` (64-bit word address, 12 bits) |
| 7 | ST | `mem[rs1 + imm] = rs2` |
| 8 | JMP | `pc = imm` |
| 9 | CALL | push `pc+1`, `pc = imm` |
| 10 | RET | pop `pc` |

Control flow is resolved at fetch, so nothing is ever mispredicted and the core has no flush
path. Stores reach memory only after commit. Loads take data from the youngest older store in
the SQ when the addresses match.

## Top-level interface (`morphcore_top`)

* **Parameters:** `QUANTUM`, `INTERVAL`, `REPL`.
* **Loading:** `imem_we/addr/data`, `dmem_we/addr/data` and `ctx_init_*`, which sets a thread's
  start PC.
* **Inputs:**
  * `thread_active[7:0]`;
  * `energy` (per cycle, for the policy);
  * `objective` and `x_pct`.
* **Outputs:**
  * the commit trace `cm_v/cm_tid/cm_pc/cm_wen/cm_rd/cm_data`, 4 lanes;
  * `mode_inorder`, `half_width`, `win_small`, `running`;
  * `dispatch_stall`, `policy_decided`, `lsq_violation`;
  * `n_mode_switch` and `n_delayed_writes`.

## Testing

Run the tests with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/morph_pkg.sv tb/tb_morphcore_top.sv --top-module tb_morphcore_top
./obj_dir/Vtb_morphcore_top
```

**`tb_morphcore_top`** uses a short quantum (3000) and interval (150), and takes under a second.
* Each of the 8 threads gets a random program: ALU, MUL, loads, stores, calls and returns, and a
  loop.
* The active threads change in phases: {0}, all 8, {1,2}, {3,4,5}, {0}. This forces switches to
  InOrder and back, a context exchange, and all four OOO sub-modes.
* Every committed instruction is checked against an instruction-level reference model: its PC,
  destination and value.
* The test fails if any counted mechanism never happened:
  * mode switches and context swaps;
  * dispatch stalls;
  * store-to-load forwarding;
  * delayed in-order writes;
  * policy decisions;
  * each reduced mode.

It passes with about 76,000 checked commits on several seeds.

**`tb_morphcore_full`** is the same test at the default parameters (10M quantum, 100K interval).
Its single-thread phase is 300,000 cycles long, enough for all four 100K-instruction sampling
intervals and one decision. It passes with about 893,000 checked commits in a few seconds.

The testbenches print `TB_RESULT checks=N failures=M`. They have a watchdog.

**Unit testbenches**, each against its own reference model:

* `tb_fetch_unit`: round-robin order, group cutting, the return stack, stall hold and half width.
* `tb_decode_stage`: decoded fields, stall, and gating of the upper lanes.
* `tb_reg_scoreboard`: a register becomes ready exactly L cycles after its producer fires. Also
  checks clear, reinit and the lookup ports.
* `tb_prf`: port priority and the active limit.
* `tb_icache` and `tb_dcache`: the read and write timing of the two memories.
* `tb_sampling_policy`: intervals, mode order, decision timing, and the choice for all three
  objectives.

**Known gap:** the rename unit, reservation station, execution unit, delayed-write buffer,
ROB, LSQ and mode controller have no unit testbenches. They are covered only by the two
whole-core tests, which check every committed instruction.

## Where this design departs from the MorphCore description

* **Instruction set and front end.** The micro-ISA above replaces x86. There is no branch predictor.
  Control flow is resolved at fetch, so the core never mispredicts or flushes.
* **Queue sizes.** Two sets of numbers are given for the queues: 50/40 load/store entries, and
  70/50. This design uses the second set, the one that comes with the reduced sizes (20/10).
* **Latencies.** ALU 1, MUL 4 and load 3 cycles are this design's choice.
* **Memory system.** There are no cache misses and no L2/L3/DRAM. Both caches are flat, single-cycle
  memories (32 KB each). The two D-cache read ports match the four-unit, two-port configuration.
* **Saved register state.** It is kept in an on-chip array with an Active Threads Table of
  pointers, not written to memory with full-line stores.
* **Scheduler and buffer details.** The InOrder partition sizes (RS 7, ROB 24 and SQ 6 per thread)
  come from dividing evenly. The write buffer of 4 entries per thread, the WAW rule and the
  load-after-store rule are this design's own.
* **Not modelled:** clock and power gating are represented only by enables and limits. There is no
  energy model and no floating point.

## Files

* `rtl/morph_pkg.sv`: constants, micro-op structs, encoder/decoder and ALU function.
* One module per file, each with a header describing its timing and choices:
  `fetch_unit`, `icache`, `decode_stage`, `rename_unit`, `reg_scoreboard`, `reservation_station`,
  `prf`, `exec_unit`, `inorder_wb_buffer`, `rob`, `lsq`, `dcache`, `tlp_mode_ctrl`,
  `sampling_policy`, `morphcore_top`.
* `tb/tb_morphcore_top.sv` and `tb/tb_morphcore_full.sv` (whole core), and `tb/tb_<block>.sv` (unit tests).

Synthesis of the whole core is slow. The 192×192 and 60×60 select and broadcast structures, and a
PRF with 48 write ports, make a large netlist.
