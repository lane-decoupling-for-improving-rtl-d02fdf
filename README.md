# DPSP: a SIMD core whose lanes recover from timing errors on their own

Timing speculation runs logic at a supply voltage too low to guarantee
timing on every path. Each speculative pipeline register gets a second,
later sample, so the register can tell when a value arrived late. When that
happens, the pipeline loses one cycle and continues from the correct value.
In a scalar pipeline this costs little, because errors are rare. In a wide
SIMD pipeline, where all lanes run in lock-step, an error in *any* lane
stalls *every* lane. The per-lane error rate is then in effect multiplied by
the number of lanes, and most of the gain is lost.

The **decoupled parallel SIMD pipeline (DPSP)** removes that coupling. The
pipeline latch between the instruction sequencer and the lanes is replaced
by one short FIFO per lane, the *decoupling queue*. The sequencer still
sends the same instruction to every lane in the same cycle. Each lane,
though, drains its own queue. A lane that is recovering from a timing error
stalls alone, for one cycle, and falls a little behind. The other lanes keep
going. The whole core only waits when one queue is completely full. Lanes
also have to be brought back into step wherever they might communicate: at
barriers and, in the default configuration, before every load or store.

This repository holds synthesizable SystemVerilog for such a core, sized as
one core of a GT200-class GPU:

* 8 lanes;
* each warp instruction repeated for 4 thread groups, so one warp is 32 threads;
* 4-entry queues;
* a 32-bit datapath;
* a 16 KB shared memory.

```
            +-----+   push (same instr to all lanes)   each lane:
 program -> | SEQ |---+--> [opQ] -> RF -> ALU =DS=> MEM -> WB    lane 0
  (imem)    +-----+   +--> [opQ] -> RF -> ALU =DS=> MEM -> WB    lane 1
              ^  ^    :        ...                    |
   any queue  |  |    +--> [opQ] -> RF -> ALU =DS=> MEM -> WB    lane 7
   full ------+  |                                    |
   all lanes idle+                           shared memory (16 KB, 1 port/lane + host)
```

`=DS=>` marks the double-sampling register that catches a late ALU result.

## Catching and repairing a late value (`ds_reg`)

Two samples of the stage output are taken:

* the main flip-flop samples it at the clock edge;
* a shadow element samples it a fixed time later, on a delayed clock.

The delay is chosen so that even the slowest path has settled by the time
the shadow sample is taken. The supply voltage may only be lowered until the
critical path is 1.5 times its nominal delay, so that this remains true. If
the two samples differ, the main flip-flop caught a value that had not yet
arrived.

Cycle by cycle, with a late result captured at edge *k*:

| after edge | `q`                        | `error` | lane                              |
|------------|----------------------------|---------|-----------------------------------|
| k          | wrong value (main sample)  | 1       | stalls: nothing upstream advances, the MEM stage treats `q` as a bubble |
| k+1        | correct value (shadow)     | 0       | continues                         |

A synchronous RTL model cannot actually miss a setup time. `ds_reg`
therefore takes the two samples as two inputs: `d_main`, what the main
flip-flop saw, and `d_shadow`, the settled value. In normal operation the
lane drives both inputs with the ALU output. The core's `timing_err_inject[l]`
input inverts the main sample in lane *l*, which stands in for a late
arrival. The delayed clock is not modelled: the shadow element is a register
on the same edge.

Only the ALU result register carries this detection. Real designs put
detectors only on critical paths, and here the ALU is the lane's only
arithmetic.

## One lane (`simd_lane`)

A lane has five stages: queue, RF (register read), EX (ALU), MEM (shared
memory), WB (write-back). An instruction at the head of the queue is
executed four times, once for each thread group. The queue is popped after
the fourth. Thread *t* = group × 8 + lane runs in lane `t % 8`, group
`t / 8`. Consecutive instructions of the same thread are therefore at least
four cycles apart. That is exactly enough for write-back to finish before
the next register read, so the lane has no forwarding and no interlock. An
elaboration-time error rejects `REPEAT < 4`.

The recovery stall is local to the lane. While `error` is high:

* RF and EX hold;
* the queue is not read and the thread-group counter does not move;
* MEM neither stores nor forwards anything to WB.

One cycle later the lane continues. A lane reports `idle` when its queue is
empty and RF, EX and MEM hold nothing. At that point everything the lane was
given has reached the shared memory.

## Slip and the decoupling queue (`decoupling_queue`)

Each queue is a 4-entry, 32-bit circular buffer, and one entry is one
instruction word. The sequencer pushes one instruction per cycle into all
queues, which is faster than a lane consumes them (one every 4 cycles). The
queues therefore normally run nearly full. A lane that has lost cycles to
recovery holds a fuller queue than the others. Only when its queue is full
does the sequencer stop, and the other lanes keep draining theirs in the
meantime. Lanes can thus drift apart by up to four instructions (16 cycles
of work) without slowing one another. Over time the core behaves like one
scalar pipeline with the per-lane error rate, not like a pipeline with
8 times that rate.

## Bringing lanes back together (`sequencer`)

Slip is only safe while lanes do not communicate. The sequencer synchronises
them in three cases:

* **BAR** – the sequencer stops until every lane is idle, then moves past
  the barrier. The barrier itself never enters the queues.
* **LD / ST**, with `SYNC_ON_MEM = 1` (the default) – the same wait happens
  before each memory instruction is pushed, so all lanes start every memory
  access together. Synchronising on every memory operation keeps the access
  order and grouping of lock-step execution. In the evaluation of this
  scheme it was the most efficient configuration. With `SYNC_ON_MEM = 0`,
  only barriers synchronise. In this RTL the shared memory serves every
  lane every cycle and has no coalescing to lose, so that setting is
  faster here: the test program of `dpsp_core_tb` takes 357 instead of 441
  cycles without violations. The advantage of synchronising comes from a
  real GPU memory system, which is not modelled.
* **HALT** – the sequencer waits until every lane is idle, then raises `done`.

The source design stops the sequencer until the *queues* are empty. This
RTL also waits for RF, EX and MEM to empty. The reason is a lane that stalls
repeatedly: it could still hold a store from before the barrier in EX while
another lane's load from after the barrier reaches memory. Waiting for the
pipelines costs at most two extra cycles per synchronisation.

## Instruction set (`dpsp_pkg`)

The source design runs CUDA programs on a GPU simulator and defines no
instruction set. This minimal one is this design's own.

Encoding: `[31:28]` opcode, `[27:24]` rd, `[23:20]` rs1, `[19:16]` rs2,
`[15:0]` imm. The immediate is sign-extended. Each thread has 16 registers,
all reset to 0.

| op | meaning | op | meaning |
|----|---------|----|---------|
| NOP 0 | – | SHR 8 | rd = rs1 >> rs2[4:0] (logical) |
| ADD 1 | rd = rs1 + rs2 | ADDI 9 | rd = rs1 + imm |
| SUB 2 | rd = rs1 − rs2 | TID A | rd = thread id + imm |
| MUL 3 | rd = rs1[15:0] × rs2[15:0] (32-bit product) | LD B | rd = smem[rs1 + imm] |
| AND 4, OR 5, XOR 6 | bitwise | ST C | smem[rs1 + imm] = rs2 |
| SHL 7 | rd = rs1 << rs2[4:0] | BAR D, HALT F | see above |

There are no branches. Shared-memory addresses are word addresses modulo
4096.

## Using the core (`dpsp_core`)

1. Hold `rst_n` low, then release it.
2. Write the program through `prog_we/prog_addr/prog_wdata`, one word per
   cycle.
3. Initialise the shared memory through `host_we/host_addr/host_wdata`.
4. Pulse `start`. `busy` is high while the program runs, and `done` rises
   after HALT once every lane is idle.
5. Read the results through `host_addr` → `host_rdata`. The read is
   combinational.

The host port is an extra memory port. Use it only while the core is not
busy.

Status outputs, one pulse per cycle of occurrence:

| output | pulses when |
|--------|-------------|
| `lane_err_stall[l]` | lane *l* lost a cycle to recovery |
| `lane_op_issue[l]` | lane *l* issued one thread-group operation |
| `seq_stall_full` | the sequencer waited on a full queue |
| `seq_stall_sync` | the sequencer waited for the lanes to drain |
| `seq_barrier` | a barrier was passed |
| `seq_mem_sync` | a synchronised memory operation was issued |

`lane_q_count` gives each lane's queue occupancy, and shows slip directly.

| parameter | default | origin |
|-----------|---------|--------|
| `LANES` | 8 | evaluated GPU (8 lanes × 4) |
| `REPEAT` | 4 | evaluated GPU (32-thread warp); must be ≥ 4 |
| `QDEPTH` | 4 | evaluation: 4 entries suffice |
| `SMEM_WORDS` | 4096 | 16 KB shared memory |
| `SYNC_ON_MEM` | 1 | best configuration in the evaluation |
| `IMEM_DEPTH` | 256 | own choice |

Timing: an instruction pushed at edge *e* is at the queue head after *e*. It
is read in the next free cycle, executes one cycle later and accesses memory
the cycle after that. It is written back one cycle after that. Each
recovery adds a cycle to its own lane only. Without errors and without
memory operations, every lane issues one thread-group operation per cycle.

## How it behaves

`tb/compute_bound_tb.sv` runs a 220-instruction arithmetic kernel on the
default 8-lane core and, side by side, on a 16-lane core. Each lane gets an
injected violation with probability *p* per operation. The table gives
throughput in operations per lane per cycle, from one run (the values move
by about 0.01 with the random seed):

| p | 8 lanes | 16 lanes | one scalar pipeline, 1/(1+p) | lock-step, 8 lanes, 1/(2−(1−p)^8) | lock-step, 16 lanes |
|---|---------|----------|------------------------------|-----------------------------------|---------------------|
| 0    | 1.000 | 1.000 | 1.000 | 1.000 | 1.000 |
| 0.02 | 0.967 | 0.972 | 0.980 | 0.870 | 0.784 |
| 0.05 | 0.945 | 0.945 | 0.952 | 0.748 | 0.641 |
| 0.10 | 0.898 | 0.888 | 0.909 | 0.637 | 0.551 |

The lock-step columns are estimates, not simulations: every lane loses a
cycle whenever any lane has an error. The decoupled core stays close to the
scalar estimate at both widths. The small gap comes from the unluckiest
lane. Its extra errors can no longer be absorbed once its queue is full.

`tb/dpsp_core_tb.sv` covers the full program path. In its program, threads
exchange values through shared memory across a barrier, then run random
arithmetic and private loads and stores, then dump their registers. The
program runs three times: with no violations, with violations in every
lane, and with violations in one lane only. Each time the whole memory is
compared with an instruction-level model (`tb/dpsp_model.sv`). In a typical
run, 189 recovery stalls spread over 8 lanes cost only 57 cycles.

## What is not here

* **One warp, one core.** The evaluated GPU runs up to 1024 threads per core
  with round-robin warp scheduling, and 30 cores. This core runs a single
  32-thread warp. The register file holds only that warp, 16 registers per
  thread.
* **No control flow.** No branches, so no divergence or reconvergence
  handling. (Reconvergence would add synchronisation points in the same way
  as barriers.)
* **No GPU memory hierarchy.** There are no constant or texture caches, no
  global memory, DRAM channels or interconnect. The shared memory is a plain
  array with one port per lane, not a banked memory with conflicts.
* **No coalesce buffer.** The variant that lets lanes slip across memory
  operations (`SYNC_ON_MEM = 0`) would, in the source design, rely on a
  coalesce buffer. That buffer is not built: with `SYNC_ON_MEM = 0` the
  lanes simply access memory whenever they reach it.
* **No delayed clock or circuit-level detector.** See `ds_reg` above.
  Timing violations are injected, not caused.
* **No model-level results.** The energy and error-probability models
  behind the efficiency figures (ET², error rate against supply voltage)
  are analysis, not hardware, and are not part of the RTL.

## Files and simulation

`rtl/` – `dpsp_pkg` (types, ISA), `ds_reg`, `decoupling_queue`, `lane_alu`,
`lane_regfile`, `simd_lane`, `sequencer`, `shared_memory`, `dpsp_core` (top).

`tb/` – one self-checking testbench per module (`<module>_tb.sv`), plus
`dpsp_core_nosync_tb.sv` (the core with `SYNC_ON_MEM = 0`),
`compute_bound_tb.sv` (with its bench `throughput_bench.sv`) and the
reference-model package `dpsp_model.sv`. Each testbench prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpsp_pkg.sv tb/dpsp_model.sv tb/dpsp_core_tb.sv --top-module dpsp_core_tb
./obj_dir/Vdpsp_core_tb
```

Replace `dpsp_core_tb` with any other testbench name to run that one. All of
them run in seconds. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dpsp_pkg.sv rtl/dpsp_core.sv`.
It reports one style warning: `rst_n` is used both as an asynchronous reset
and in assertions' `disable iff`.
