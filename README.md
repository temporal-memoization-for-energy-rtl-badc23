# Temporal memoization for timing-error recovery in GPU floating-point units

When supply voltage is lowered or margins are cut, pipeline stages sometimes
miss their clock edge. Error-detection flip-flops can flag such a late
transition. The usual recovery is to flush the pipeline and replay the errant
instruction, which costs many cycles. In a wide SIMD machine with deep
floating-point (FP) pipelines, that cost grows with both the width and the
depth.

This design cuts the cost by exploiting value locality. Work-items of a
data-parallel kernel often send an FPU the same operands again and again.
Every FPU therefore gets a tiny lookup table (LUT) of its last few error-free
executions: the operands and the result of each.

- **Hit.** When the operands being issued match a LUT entry, the stored
  result is used. The FPU's remaining stages are clock-gated, and any timing
  error raised inside them is ignored, because the result does not come from
  them.
- **Miss with an error.** Only in this case does the classic flush-and-replay
  recovery run.

Matching can be exact or approximate. In approximate mode, a programmable mask
ignores the low fraction bits, which suits error-tolerant code such as image
filters.

The RTL covers the execute stage of one GPU compute unit:

- 16 SIMD lanes.
- Each lane has one FPU of each of six types: ADD, MUL, FP2FIX, MULADD, SQRT
  and RECIP.
- Each FPU has its own LUT and its own recovery controller.
- One register block per FPU type holds the memoization settings.

Everything is synthesizable SystemVerilog-2017.

## The four cases at the end of the pipeline

Every instruction carries a small record down the pipeline alongside its
data: valid, tag, hit, the LUT result `Q_L`, and a sticky error bit. The error
bit ORs together the error sensors of the stages the instruction passed
through. When the record reaches the last stage, the four cases below decide
what happens:

| hit | error | what happens | result |
|---|---|---|---|
| 0 | 0 | normal execution, LUT updated (`W_en`) | FPU result `Q_S` |
| 0 | 1 | `error_pipe`: flush and replay by the error control unit | `Q_S` is on `out_q` but marked invalid; the correct result follows after the replay |
| 1 | 0 | reuse; stages 2..N were clock-gated | `Q_L` |
| 1 | 1 | reuse; the error is masked (`masked_error`) | `Q_L` |

The LUT is searched in the issue cycle, in parallel with FPU stage 1. A hit
therefore always lets stage 1 run. The enable of each later stage register
is dropped cycle by cycle as the hit travels down the pipeline (`en[k] =
valid[k-1] & ~hit[k-1]`), and `stage_gated` reports those gated stages. A
hit costs no extra cycles: the result appears after the same 4 cycles (16 for
RECIP) as a normal execution.

## The lookup table (`tm_lut`, `tm_comparator`)

- **Entries.** Each LUT has `DEPTH` = 4 entries, ordered as a FIFO. An entry
  holds the unit's operands (two for ADD/MUL, three for MULADD, one for the
  others) and the 32-bit result.
- **Matching.** Four comparators test the issued operands against all
  entries at once. Bit `i` of the 32-bit mask set to 1 means bit `i` of every
  operand is ignored.
  - `0x00000000` gives exact matching.
  - `0x00000FFF` gives approximate matching: the 12 least-significant
    fraction bits are ignored.
- **Commutativity.** For ADD, MUL and MULADD, operands 0 and 1 may also match
  swapped. This is controlled by a register bit.
- **Several matches.** If more than one entry matches, the newest entry wins.
- **Update.** The issued operands are delayed in a `STAGES`-deep buffer, so
  they reach the LUT together with `Q_S`. When `W_en` is set (a miss that
  completed every stage without an error), the operands and `Q_S` are pushed
  in at the head of the FIFO and the oldest entry falls out.
  - A result produced under an error is never stored.
  - A replayed copy is stored only once.
  - Duplicates are not filtered on insert, so two misses on the same operands
    in flight together can occupy two entries.
- **Preload.** Software can push an entry through the registers. In the same
  cycle a preload wins over a hardware update.
- **Disable.** Clearing the enable models power-gating: no hits, no updates,
  and every entry is invalidated.

## Recovery: the error control unit (`tm_ecu`)

A miss that arrives at the end of the pipeline with its error bit set raises
`error_pipe`. In that cycle, the unit flushes every younger instruction in
the pipeline and the one being issued. The ECU takes a snapshot of all of
them in age order, with the errant instruction first.

For the next `K × REPLAY_N` cycles, where `K` is the number of snapshot
entries:

- **Issue is held.** `in_ready` is low.
- **Multiple-issue replay.** The ECU re-issues each snapshot instruction
  `REPLAY_N` times back to back. The first copies produce no result and no
  LUT write (they only let the logic settle). The last copy is marked safe:
  its sensor errors are ignored and its result is written back and stored in
  the LUT.
- **Ordering.** Results still leave in issue order, with their tags.

The errant instruction's result arrives `REPLAY_N + STAGES` cycles later than
normal, i.e. 8 cycles for a 4-stage unit with the default `REPLAY_N` = 4.
Replayed instructions also search the LUT, so a replayed copy can hit.

Why the whole flushed window is replayed in multiple-issue mode: a replay
then cannot itself be interrupted by a second recovery. The ECU asserts this
(no error while busy).

## Floating-point pipelines

Every unit has these properties:

- **Pipelining.** One instruction per cycle, with a per-stage register enable
  `en[k]`.
- **Latency.** 4 stages, except RECIP, which has 16.
- **Number format.** IEEE-754 single precision, round to nearest-even.
- **Subnormals.** Subnormal inputs and results are flushed to signed zero.
- **NaN.** Any NaN result is the quiet NaN `0x7FC00000`.

The stage split of each unit is as follows:

| module | operation | stage split |
|---|---|---|
| `fp_add_pipe` | a + b | order by magnitude / align and add / normalise / round |
| `fp_mul_pipe` | a × b | unpack / 24×24 product / normalise / round |
| `fp_muladd_pipe` | a × b + c | product / round product / align, add, normalise / round. Not fused: the product is rounded first |
| `fp_sqrt_pipe` | √a | restoring square root, 25 result bits over 4 stages (7/6/6/6); negative input gives NaN, −0 gives −0 |
| `fp_recip_pipe` | 1 / a | restoring division of 2^48 by the mantissa, 2 bits per stage in stages 1–9 and 1 bit in 10–16, then rounding |
| `fp2fix_pipe` | float → int32 | round toward zero, saturating; NaN gives 0 |

An exact cancellation in ADD/MULADD gives +0. The internal stage splits are
this design's own. Only the operations, the 4- and 16-cycle latencies and
the one-per-cycle rate are fixed by the architecture it implements.

## Top level: `tm_exec_stage`

Parameters:

- `LANES` = 16
- `DEPTH` = 4 (LUT entries)
- `REPLAY_N` = 4
- `TAG_W` = 8

Per lane `l` and unit `f` (the unit index follows `tm_pkg::fpu_kind_e`:
ADD=0, MUL=1, FP2FIX=2, MULADD=3, SQRT=4, RECIP=5), the ports are:

| port | meaning |
|---|---|
| `in_valid[l][f]`, `in_ready[l][f]` | issue handshake; an instruction is taken when both are high at a clock edge |
| `in_ops[l][f][0..2]`, `in_tag[l][f]` | operands (MULADD computes op0·op1+op2; one-operand units use op0) and a tag returned with the result |
| `stage_err[l][f][k]` | error-sensor output of the register ending stage k+1 (bits 0..3 for 4-stage units, 0..15 for RECIP) |
| `out_valid`, `out_q`, `out_tag`, `out_hit` | one result per cycle, in issue order |
| `error_pipe`, `masked_error`, `lut_write`, `stage_gated` | event outputs for energy and hit-rate accounting |
| `csr_we`, `csr_addr[5:0]`, `csr_wdata`, `csr_rdata` | register bus; `csr_addr[5:3]` selects the FPU type, `[2:0]` the register |

`stage_err[k]` is sampled in the cycle in which that register captures the
instruction. Errors raised in a clock-gated stage are ignored.

The lanes are fully independent. A recovery in one FPU stalls only that
FPU's `in_ready`, not the other lanes or units. Keeping lanes in step, if
the surrounding machine needs that, is left to whatever drives the ports.

### Registers (`tm_csr`, one block per FPU type, shared by all lanes)

| addr | name | meaning | reset |
|---|---|---|---|
| 0 | CTRL | bit 0: memoization enable (0 = power-gated, contents lost); bit 1: commutative matching | 3 |
| 1 | MASK | masking vector, 1 = ignore bit | 0 (exact) |
| 2–4 | PL_OP0..2 | operands of an entry to preload | 0 |
| 5 | PL_Q | its result | 0 |
| 6 | PL_GO | any write inserts the preload entry into that type's LUT in every lane | – |

Writes take effect at the next clock edge; reads are combinational.

## What lies outside the RTL

These parts are outside the RTL:

- **Error-detection sensors.** They are circuit-level flip-flops that compare
  a signal sampled late against the clock-edge sample. In a zero-delay
  simulation they have no function, so their outputs are the `stage_err`
  inputs. To exercise the design, drive those inputs at any error rate.
- **Per-lane decoupling queues.** The surrounding machine's queues, which
  allow lanes to slip against each other, are not built. Each lane's
  handshake is brought out instead.
- **The rest of the GPU.** Instruction fetch, wavefront scheduling, the
  five-wide processing elements of a stream core, register files, local and
  global memories and the other compute units are not part of this RTL.

## How far to trust it, and where it departs from the reference architecture

- **What comes from the technique.** These parts follow the published
  technique:
  - the four-case behaviour;
  - the single-cycle LUT searched in parallel with stage 1;
  - the 4-entry FIFO;
  - the 32-bit mask with the 12-bit approximate setting;
  - commutative matching;
  - the hit-driven clock gating forwarded stage by stage;
  - the operand buffer feeding `W_en`/`Q_S`;
  - preloading, power-gating, the unit types and their latencies.
- **This design's own choices.** The following are its own:
  - mask polarity, and one mask shared by all operands;
  - newest-match-wins;
  - preload priority;
  - the register map and reset values;
  - tags and the ready handshake;
  - `REPLAY_N` = 4 and replaying the whole flushed window;
  - the FP cores' internals and their FTZ/NaN conventions.
- **Replay length.** The number of replay copies in multiple-issue mode is
  not fixed by the architecture. `REPLAY_N` changes it, and RECIP uses the
  same value as the other units.
- **FP cores are not a full IEEE-754 implementation.** They have no
  subnormals, no exception flags and no other rounding modes. MULADD rounds
  twice.
- **Testing.** Every module has a self-checking testbench. The FP cores were
  compared on 5,000 random operand sets each against a double-precision
  reference, including specials and cancellations. The top-level tests run
  all 96 FPUs at the default size with random timing errors. Every mode is
  exercised, and each mechanism (hit, commutative and approximate hit,
  update, recovery with stall, masked error, gating, preload, power-gating)
  is counted and required to occur.
- **Workload results.** Small kernels run through the full-size stage with
  1% stage errors reached these LUT hit rates:
  - 60% for a Sobel filter on a clean image with exact matching;
  - 0% exact and 49% approximate on the same image with noise in the low
    fraction bits;
  - 17% for a Haar wavelet transform.

  These are small generated inputs, not the original benchmark data.

## Simulating

All modules import `tm_pkg`; the testbenches also import `tb/tb_fp_ref_pkg.sv`,
the reference arithmetic. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tm_exec_stage_tb \
    rtl/tm_pkg.sv tb/tb_fp_ref_pkg.sv $(ls rtl/*.sv | grep -v tm_pkg) \
    tb/tm_exec_stage_tb.sv
./obj_dir/Vtm_exec_stage_tb
```

The packages must come first on the command line. Each testbench
prints one line `TB_RESULT checks=N failures=M` and finishes.

| testbench | what it covers |
|---|---|
| `fp_*_pipe_tb`, `fp2fix_pipe_tb` | arithmetic against the reference, latency, stage enables freezing the pipeline |
| `tm_comparator_tb`, `tm_lut_tb` | masked and commutative matching, FIFO order and eviction against a model, preload, disable |
| `tm_csr_tb`, `tm_ecu_tb` | register map and reset values; snapshot and replay order and busy time |
| `resilient_fpu_tb` | one ADD unit: all four cases, latencies with and without recovery, gated stage registers holding, approximate and disabled modes, preload |
| `tm_exec_stage_tb` | the whole stage at its default size: random traffic on all 96 FPUs with errors, register programming, every mechanism counted |
| `tm_workload_tb` | the arithmetic of two kernels through the full-size stage with 1% stage errors: a Sobel edge filter on a generated 16×16 image (one output pixel per lane; exact results bit for bit, then a noisy image with exact and with 12-bit approximate matching, which must hit more often and keep magnitudes within tolerance) and a five-level Haar wavelet of a 512-sample signal with exact matching, every coefficient bit for bit |

Building the full-size top with Verilator takes two to three minutes; the
simulations themselves take seconds.
