# DSMT thread-control core in SystemVerilog

This repository holds the thread-control core of a Dynamic Simultaneous
Multithreaded (DSMT) processor, with one self-checking testbench per block.

A DSMT processor is an out-of-order superscalar core with several hardware
contexts. It runs one ordinary program. When the hardware finds a loop, it
starts later iterations of that loop speculatively on the other contexts, and
keeps them correct with hardware alone.

The repository also holds a hardware thread scheduler for a second machine
described in the same work, the "hybrid-model" multithreaded processor. It is
a separate block that sits beside the core in the top module.

## How a DSMT loop runs

1. **Non-DSMT mode.** One context runs the program. The branch target buffer,
   which also detects loops, watches taken backward branches that are not
   calls. When it sees a loop that has iterated before and was not marked bad,
   it reports the loop.
2. **Pre-DSMT mode.** The single thread runs two more iterations. In each one
   the register file records, per register:
   - R: the register was written;
   - D: the register was read before being written while an earlier
     iteration had written it.

   At the end of each iteration these bits are copied into the R_Anchor and
   D_Anchor registers. The stride table learns the add-immediate
   induction variables (`r = r + imm`). The IPC monitor counts cycles and
   committed instructions.
3. **Full-DSMT mode.** Every other context is cloned from the running one, one
   per cycle. Context k places later starts k iterations ahead. Its induction
   registers are preset to `r + k*imm` by the stride table. Each context runs
   one iteration and stops at the loop-end branch, where its J bit is set. A
   speculative context that gets there first waits in the synchronizing state.
   Only the non-speculative context writes memory.
   - When it commits the loop-end branch, the non-speculative flag moves to the
     next context. The finished context is cloned again as the newest
     iteration.
   - The register files and the memory dependence table squash a context that
     used a value too early, together with all later contexts.
   - DSMT mode ends when the loop-end branch falls through, or when the IPC in
     full-DSMT mode falls below the IPC in pre-DSMT mode. In the second case
     the loop is marked bad.

## Blocks (`rtl/`)

| File | What it does |
|---|---|
| `dsmt_pkg.sv` | Sizes, the context-state and mode types, the decoded-instruction and ROB-flag records |
| `dsmt_top.sv` | Connects everything below; fetch PCs, one-per-cycle dispatch, commit selection, branch recovery, memory-port routing |
| `tciu.sv` | Thread creation and initiation unit. Holds the mode, the continuation register, the V/S/J bits and state of each context, and the head pointer. It also handles spawn, squash, flag transfer and exit, and the anchors. Contains `conf_table` |
| `conf_table.sv` | 2-bit confidence counter per register for register dependence speculation |
| `ldbtb.sv` | Loop-detecting BTB: 1024 sets × 2 ways, with a loop flag, iteration count and good/bad mark |
| `loop_stack.sv` | Stack of nested detected loops with the IPC result of each |
| `ipc_monitor.sv` | Cycle and commit counters for pre-DSMT and full-DSMT mode, and the comparison |
| `lsst.sv` | Loop stride speculation table: strides, start-value predictions for clones, the check at the end of each iteration |
| `ctx_regfile.sv` | Register files of all contexts with the R/L/D bits. Handles speculative reads from predecessors, the squash check on commit writes, clone, merge on flag transfer |
| `fetch_sched.sv` | Two fetch ports, ICount-style. The non-speculative context is served first |
| `iq.sv` | Instruction queue of each context (64 entries) |
| `rob.sv` | Reorder buffer of each context (32 entries), with operand lookup |
| `mob.sv` | Memory order buffer of each context (64 entries): forwarding, committed stores waiting, drain |
| `mdrt.sv` | Memory dependence table: catches a speculative load that read an address a less speculative context later stored |
| `dcache_arb.sv` | Shares the four data-cache ports. One port is kept for the non-speculative context, leftover ports go back to it |
| `hw_scheduler.sv` | Hybrid-model scheduler. Ready and sleeping thread queues; a thread sleeps after a long miss and wakes after a 500-cycle timer or on a resolve of its cache line. Switching costs 2 cycles |

Every file starts with a comment covering:
- what the block does and how;
- its interface and timing;
- which parts follow the architecture and which are choices made here.

## What the top leaves outside

The instruction set of the original machine is not specified here, so the
following are reached through `dsmt_top` ports rather than built:
- instruction cache and decoder;
- reservation stations and execution units;
- load unit;
- data cache and L2 cache.

The front end hands in decoded records (`uop_t`). Dispatched instructions
leave on `exe_*` together with their operand values. Results come back on
`wb_*`. Loads ask for a cache port on `ld_req`. The data cache is reached
through `dc_*`.

## Simplifications

Measured against the full processor, this core:
- dispatches one instruction per cycle, and only once its operands are
  available;
- commits one instruction per cycle;
- lets speculative contexts commit into their own register file, while their
  stores wait in their MOB;
- uses the loop stack only as a monitor; it does not choose which loop of a
  nest to run.

## Testbenches (`tb/`)

Each block has `tb/tb_<block>.sv`. Each compares the block with a reference
model or with directed expectations and ends with
`TB_RESULT checks=N failures=M`.

`tb_dsmt_top.sv` runs the top at its default size. It acts as the parts
left outside the core:
- a program built from four loops;
- execution units with random latency;
- a one-cycle data cache.

It checks every store that reaches memory against the sequential program,
and the final registers. It also counts each mechanism and fails if any of
them never happened:
- loop detection;
- both mode entries;
- spawn and predicted clones;
- flag transfer;
- register squash and memory squash;
- hold and synchronize;
- branch recovery;
- both kinds of exit;
- dual fetch and extra cache ports;
- scheduler switch and wake-up.

To run one testbench with Verilator:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl rtl/dsmt_pkg.sv tb/tb_dsmt_top.sv --top-module tb_dsmt_top
./obj_dir/Vtb_dsmt_top
```

## Known limits

- If both writeback ports report a mispredicted branch of the same context
  in one cycle, only the one on port 0 is acted on. The environment must not
  do this.
- A load must not ask for a cache port before the older stores of its
  context have their addresses.
- When the memory dependence table delays a load, no grant is given. The load
  unit outside the core keeps its request up and tries again.
- The full top takes a long time in logic synthesis. It is mostly flip-flop
  arrays: eight IQs, ROBs and MOBs, and the register files.
