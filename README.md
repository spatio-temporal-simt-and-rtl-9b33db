# STSIMT core: a GPU core that runs warps over time instead of across a wide SIMD array

A conventional GPU core executes a 32-thread warp instruction on a 32-wide (or
8-wide, over four cycles) SIMD array. Threads that are switched off by a
divergent branch still occupy their SIMD slots, so divergent code wastes most
of the machine.

This core uses the other axis. It consists of a few narrow **lanes**. Each warp
is bound to one lane for its whole life. The lane takes a warp instruction
together with its active mask and steps through the warp's threads over
several cycles, a few threads per cycle. Groups of threads with no active
thread are skipped altogether, which is called **compaction**. A warp with only
5 active threads is therefore done in 2 cycles instead of 8.

The organisation built here by default is "STSIMT4" (spatio-temporal SIMT with
4-wide lanes):

- 2 lanes, each 4 threads wide, so 8 thread slots per cycle.
- A warp of 32 threads is 8 groups of 4 threads.
- A group can be skipped only when all 4 of its threads are inactive.

Setting `NLANES=8, LW=1` gives pure temporal SIMT instead: 8 one-wide lanes
with perfect, per-thread compaction.

The core also supports **scalarization**. An instruction that the compiler has
proven to compute the same value in every thread of a warp is marked scalar:

- It is executed once per warp, on one thread, using the same lane datapath.
- Its result goes into a scalar register.
- A scalar register is stored once per warp, packed densely in the same
  register file as the vector registers. Only a second addressing mode is
  needed for it.

The design follows the architecture in the paper "Spatio-Temporal SIMT and
Scalarization for Improving GPU Efficiency". The sections below say where it
follows that architecture and where it fills gaps with its own choices.

## Why the lanes need a fast front end

A lane stays busy for as many cycles as its instruction has active thread
groups, from 1 to 8. With perfectly convergent code, each lane needs a new
instruction only every 8 cycles. With divergent or scalar code it may need one
every cycle.

The core therefore has one shared front end that can issue one warp
instruction per cycle to whichever lane is free:

```
  icache --> fetch_decode --> instr_buffer (1 slot per warp)
                                   |
                  scoreboard --> warp_scheduler (1 issue / cycle)
                                   |
                 +-----------------+-----------------+
              tsimt_lane 0                      tsimt_lane 1
   (even warps: instr/mask regs,       (odd warps: same structure)
    sequencer, RF slice, operand
    collector, 4 x INT/BRU, LD/ST)
                 +-----------------+-----------------+
                            shared_mem (8 ports, 32 banks)
   simt_stack x 32 (one per warp) feeds PC and active mask to fetch_decode
```

- **Warp-to-lane binding.** Warp `w` lives in lane `w mod NLANES`, at local
  slot `w / NLANES`. Its registers are stored only in that lane's register
  file, so no other lane can execute it.
- **Fetch** (`fetch_decode`):
  - Fetch picks, round-robin, one warp per cycle that has an empty
    instruction-buffer slot, a valid stack top, and no fetch in flight.
  - The instruction word arrives one cycle later. It is stored in the warp's
    buffer slot together with the active mask read from the warp's stack at
    fetch time.
  - After a branch, the warp is not fetched again until its lane reports the
    branch outcome.
  - After `EXIT`, the warp is not fetched again.
- **Issue** (`warp_scheduler` + `scoreboard`):
  - A warp is issuable when all of these hold:
    - its slot is full;
    - none of its source or destination registers has a write pending;
    - its lane can take an instruction this cycle.
  - One issuable warp is chosen round-robin.
  - The scoreboard tracks a pending bit per register per warp, separately for
    the vector and scalar spaces. The bit is set at issue and cleared when the
    lane writes back the instruction's last group.
- **Issue conflicts.** When several lanes want an instruction in the same
  cycle, all but one wait. The scheduler reports, for every cycle, how many
  ready lanes were left unserved. The core counts the cycles with 1, 2, and 3
  or more unserved lanes (`st_issue_conf1/2/3p`).

## Inside a lane

`tsimt_lane` is the part that needs the most care. It is a four-stage pipeline
that handles one thread group per stage:

| stage | what happens |
|-------|--------------|
| S0 | `lane_sequencer` presents the lowest remaining active group. The operand collector requests that group's two source entries from the register file. |
| S1 | SRAM data arrives one cycle after the grant. It is merged with any operand captured earlier. An immediate replaces the second operand. |
| EX | `LW` copies of `lane_alu` compute. For `LDS`/`STS`, the group's `LW` addresses go to shared memory instead. |
| WB | Results, or load data that arrives one cycle after the grant, are written back. `done` and the branch outcome are reported after the last group. |

**Sequencer and compaction.** The lane holds the issued instruction and active
mask in its own registers, so it is decoupled from the scheduler while it
works.

- The sequencer keeps a bit per 4-thread group that still has to run. Each
  cycle it hands out the lowest such group, with that group's 4-bit thread
  mask.
- `issue_ready` is high when the lane is empty, or when the last group leaves
  S0 in this cycle. The next instruction therefore follows with no bubble.
- An instruction with `k` non-empty groups occupies the lane for exactly `k`
  cycles when nothing conflicts. The lane testbench checks this.

**Register file slice and operand collector.** `lane_regfile` holds this
lane's share of the 64 KB register file: 2048 entries of 4 x 32 bits, spread
over 8 single-ported SRAM banks.

- One entry holds one register of one thread group. One access therefore
  delivers the operands of all 4 threads that run together. Inactive groups
  are never read.
- Vector register `r` of local warp `w`, group `g`, lives at entry
  `(w*NV + r)*8 + g`. `NV` is the per-kernel vector-register count.
- The bank of entry `e` is `(e + e/8) mod 8`. This rotating interleave makes
  the two sources of one instruction usually fall into different banks.
- Each cycle the banks serve at most two reads and one write:
  - The write always wins.
  - Read port 0 beats read port 1.
  - Two reads of the same entry share one access.
  - A source that loses its bank is requested again in the next cycle. A
    source that was already read is kept. The group leaves S0 only when both
    sources have been obtained.
- These bank conflicts are the register-file stalls of a banked design
  (`rf_conflict` / `st_rf_conflicts`).

**Scalar registers and scalar instructions.**

- Scalar register `s` of local warp `w` is word `w*NS + s` of a region that
  grows down from the top entry, four words to an entry. It therefore costs
  one word per warp instead of 32.
  - A scalar read returns that word copied to all 4 thread slots. Scalar
    sources therefore mix freely with vector sources.
  - A scalar write stores the value of the single active thread.
- A scalar instruction is handled as an ordinary instruction with one active
  thread: the sequencer keeps only the lowest active thread of the mask. No
  separate scalar unit exists, so any mix of scalar and vector work uses the
  same ALUs.
- A scalar branch applies its single outcome to the whole active mask.

**Shared memory from a lane.** A 4-wide lane presents up to 4 addresses per
cycle, one port per thread slot.

- Threads whose bank access is refused stay pending.
- The whole lane stalls (`mem_stall`) until every thread of the group has been
  served.
- Stores complete at the grant. Loads are written back when their data
  arrives. Data that arrives while the lane is stalled is collected in a
  buffer first.

**Branches.** `BRA` evaluates its condition (`src0 != 0`, or always with
`use_imm`) per thread. It accumulates a 32-bit taken mask over the groups, and
after the last group reports `(warp, taken mask)` to the core.

## Divergence and reconvergence

Each warp has a `simt_stack`, a conventional immediate-post-dominator
reconvergence stack. Each entry is `(pc, reconvergence pc, mask)`. The branch
instruction carries its target and its reconvergence PC, both computed by
whoever generates the code. When a branch outcome arrives:

- **All active threads taken:** the top entry jumps to the target.
- **None taken:** the warp simply continues at the fall-through PC.
- **Mixed:**
  1. The top entry becomes the reconvergence entry (its PC is set to the
     reconvergence PC).
  2. The not-taken path (fall-through PC) is pushed.
  3. The taken path (target) is pushed and runs first.

An entry whose PC reaches its reconvergence PC is popped. The stack does not
pop while the warp waits for a branch outcome, so an outcome always applies
to the path that fetched the branch. The default depth is 8 entries. An
overflow is flagged (`st_stack_overflow`) and caught by an assertion.

Compaction is what makes divergence cheap here. After a split, each path runs
only its own active groups, so the two paths together take about as long as
the original warp instruction. A SIMD array would need a full warp slot for
each path.

## Shared memory

`shared_mem` is 64 KB organised as 32 word-interleaved banks (bank = word
address mod 32), behind a crossbar with 8 ports: one per thread slot of each
lane.

- Each bank serves one port per cycle. The search for a winner starts at a
  pointer that rotates every cycle, so no port starves.
- A grant is combinational in the request cycle. Load data follows in the
  next cycle.
- A host port, with priority over the lanes, loads inputs and reads results.

Threads of one warp run in different cycles, so they rarely collide with each
other. Conflicts come mainly from warps on different lanes, and from the 4
threads of one group, that hit the same bank in the same cycle.

## Instruction format

The instruction set is this design's own small integer ISA. It is just large
enough to exercise everything above. Each instruction is a 64-bit `instr_t`
(see `rtl/tsimt_pkg.sv`), made of these fields:

| field | meaning |
|-------|---------|
| `op` | operation, one of those listed below |
| `scalar` | execute once per warp |
| `dst_s`, `src0_s`, `src1_s` | this operand is a scalar register (the second addressing mode) |
| `dst`, `src0`, `src1` | register numbers (64 per space) |
| `use_imm` | the second operand is `imm`; for `BRA`, the branch is always taken |
| `imm` | 16-bit signed immediate; the `LDS`/`STS` word offset; the `BRA` target |
| `rpc` | reconvergence PC of a `BRA` |

Operations:

- Integer: `ADD SUB MUL AND OR XOR SHL SHR MIN MAX SLT SEQ MOV`.
- `TID`: global thread id.
- `WID`: warp id.
- `LDS dst = smem[src0+imm]` and `STS smem[src0+imm] = src1`.
- `BRA`: branch.
- `EXIT`: end the warp.
- `NOP`.

The helper functions `mk_alu` and `mk_bra` build instruction words.

Which instructions and registers are scalar is decided by the code generator.
The compiler analysis that finds them is not part of the RTL. The testbench
kernels mark them by hand: thread-id-derived values are vectors, and values
derived from the warp id or constants are scalars.

## Using the core

Top module: `stsimt_core`.

1. Write the program into the instruction store: `im_we`, `im_addr`,
   `im_wdata`.
2. Put the inputs into shared memory through the host port: `h_*`.
3. Pulse `start` with the launch configuration:
   - `cfg_nthreads`: up to 1024.
   - `cfg_nv`: vector registers per thread.
   - `cfg_ns`: scalar registers per warp.

The threads form warps of 32, all starting at PC 0. A partly filled last warp
starts with only its present threads active. `done` rises when every warp has
executed `EXIT` and the lanes have drained.

The register budget must fit one lane:
`(warps per lane) * NV * 8 + ceil((warps per lane) * NS / 4) <= 2048` entries.
With 32 warps (16 per lane) this allows about 15 vector registers per thread
plus a few scalars. With 16 warps it allows about 31.

The `st_*` outputs are counters since launch:

| counter | counts |
|---------|--------|
| `st_cycles` | cycles |
| `st_issued` | instructions issued |
| `st_scalar_issued` | scalar instructions issued |
| `st_thread_ops` | thread operations executed |
| `st_compacted` | vector instructions issued with at least one thread group skipped by compaction |
| `st_div_branches` | divergent branches |
| `st_reconverge` | reconvergences |
| `st_issue_conf1/2/3p` | cycles with 1, 2, or 3 or more ready lanes left unserved |
| `st_rf_conflicts` | register-bank conflict cycles |
| `st_smem_conflicts` | shared-memory bank conflicts |
| `st_mem_stall` | lane stall cycles waiting for shared memory |
| `st_stack_overflow` | stack overflows |

## Parameters

| parameter (module) | default | meaning |
|--------------------|---------|---------|
| `NLANES` (core) | 2 | lanes per core; `NLANES*LW` = 8 thread slots, as in the evaluated GPU's 8 SP units |
| `LW` (core, lane) | 4 | threads per lane per cycle (1 = pure temporal SIMT) |
| `NW` (core) | 32 | warps per core |
| `RF_BYTES` (core) | 65536 | register file per core, split evenly over the lanes |
| `RF_BANKS` (core) | 8 | single-ported SRAM banks per lane |
| `SMEM_BYTES` (core) | 65536 | shared memory |
| `SMEM_BANKS` (core) | 32 | shared-memory banks (own choice) |
| `STACK_DEPTH` (core) | 8 | reconvergence-stack entries per warp (own choice) |
| `WARP_SIZE`, `MAX_WARPS`, `IMEM_BYTES` (package) | 32, 32, 4096 | warp size, warp limit, instruction store |

At the defaults, coarse synthesis gives about 15k cells, 21.7k flip-flop bits
and about 1.09 Mbit of memory. Most of the memory is the two 64 KB arrays.

## Simulating

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example:

```
verilator --binary --timing --assert -Irtl rtl/tsimt_pkg.sv tb/tb_stsimt_core.sv \
          --top-module tb_stsimt_core -Mdir obj_core -o sim && obj_core/sim
```

Every other testbench builds the same way: replace `stsimt_core` with the
block name.

`tb_stsimt_core` runs the core at its default size. The kernel has a
divergent if/else, scalar instructions, a deliberate register-bank conflict
and a strided shared-memory gather. It runs twice:

- **200 threads** (six full warps and one 8-thread warp): 657 cycles, IPC 5.2.
- **1024 threads**: 3410 cycles, IPC 5.1.

The testbench checks:

- every result word (2474 checks in total);
- instruction, thread-operation, divergence and reconvergence counts, computed
  from the kernel;
- the limits of 1 issue and 8 thread slots per cycle;
- that every mechanism above happens at least once.

The same testbench also passes with `NLANES=8, LW=1` (pure temporal SIMT,
IPC 4.8 on 1024 threads).

The block testbenches:

| testbench | what it checks |
|-----------|----------------|
| `tb_lane_sequencer` | compaction order, timing and scalar reduction against a model |
| `tb_lane_regfile` | vector writes with partial thread masks read back through both ports, scalar writes read back broadcast without disturbing vectors, and the bank arbitration rules |
| `tb_lane_alu` | every operation against a reference |
| `tb_tsimt_lane` | short programs on one lane with a randomly stalling memory: results, the taken mask, `k` groups in `k` cycles, and thread-operation counts (scalar instructions run once) |
| `tb_shared_mem` | random multi-port traffic against a reference array: one port per bank, no idle bank while a request for it waits, load data, same-bank serialisation, host priority |
| `tb_simt_stack` | a hand-walked nested if/else, then 20000 cycles of random structured branching against a reference model |
| `tb_scoreboard` | random traffic against a model |
| `tb_warp_scheduler` | random traffic against a model |
| `tb_instr_buffer` | random traffic against a model |
| `tb_icache` | random traffic against a model |
| `tb_fetch_decode` | fetch rules, the branch-pending flag against a model, and fill contents |

## How far it goes, and where it differs from the published architecture

These parts follow the published architecture:

- warps locked to lanes;
- a per-lane instruction register and active-mask register;
- compaction of aligned all-inactive thread groups;
- per-lane register files built from single-ported banks, with an operand
  collector that fetches only active groups;
- one shared front end with per-warp buffer slots, a scoreboard and one issue
  per cycle;
- an unchanged reconvergence stack;
- a banked shared memory with conflict checking and a crossbar;
- scalar execution on the vector datapath with a packed scalar register
  space;
- the sizes: 8 thread slots, 32 warps, 64 KB register file, 64 KB shared
  memory, 4 KB instruction store.

These are this design's own, because the published description leaves them
open:

- the ISA and its encoding;
- the pipeline staging of the lane;
- register-file address layout, bank mapping and port arbitration;
- round-robin fetch and issue policies;
- 32 shared-memory banks and their arbitration;
- stack depth;
- how branches block fetch;
- how the statistics are defined.

Known differences and omissions:

- **Lane assignment.** The published block diagram draws consecutive warps on
  the same lane. This design interleaves warps (`w mod NLANES`), which matches
  the published description of how a block's full and partial warps spread
  over lanes.
- **Shared-memory ports.** Here a 4-wide lane has 4 shared-memory ports. The
  published text speaks of one address per lane per cycle, which describes the
  one-wide case.
- **Global memory is not built.** There is no coalescer, L1/L2 cache,
  interconnect or DRAM. Loads and stores reach only shared memory. Real GPU
  kernels, which read their inputs from global memory, can therefore not run
  unchanged.
- **No floating-point or special-function units.** The lane has integer and
  branch units only.
- **One kernel launch at a time.** There is no block scheduler and no dynamic
  register allocation. The register layout is static, per warp slot. The
  "free registers at warp exit" and "allocate only active threads of a partial
  warp" optimizations are therefore not present.
- **No scalarization compiler.** The compiler analysis that marks scalar
  instructions and registers is not included.
- **No instruction-cache misses.** The instruction store is a plain 4 KB
  memory.
