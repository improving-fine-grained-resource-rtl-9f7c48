# Fine-grained core mapping for a tightly coupled big/little core

Picture a processor with one fetch engine that feeds two back ends: a 3-wide
out-of-order (OoO) back end and a 2-wide in-order back end. Only one runs at a
time, and switching between them is cheap. So the program can be moved every
**epoch of 512 retired instructions**, to whichever back end gives the better
balance of performance and energy. The hard part is deciding, at each epoch
boundary, where the *next* epoch should run. This RTL implements that decision
logic. It has two independent engines:

* **Engine A, CHILL tracking.** "CHILL" stands for chained high-impact
  long-latency loads. The engine watches retired instructions for chains of
  dependent long-latency loads (LLLs: loads that miss the L2). Such chains
  clog an in-order pipeline, while the OoO core can overlap them with the
  "shadow" instructions that depend on them. The engine remembers where each
  chain started, which is the loop head behind it. When the program returns
  there, the engine moves the program to the OoO core *before* the stall
  happens. When no chain is active, a conventional reactive mapper decides.
  That mapper uses a regression estimate of the other core's performance with
  a proportional-integral (PI) correction.
* **Engine B, regression mapping.** It uses the same reactive estimate, plus
  two corrections from trained linear regressions:
  * *branch impact*: the cycles the other core would waste on branch
    mispredictions;
  * *ESI*: the number of early-scheduled instructions the OoO core actually
    exploits, which predicts how much the in-order core would lose.

  A mode input selects the performance estimate alone, plus branch impact,
  ESI, or ESI plus branch impact.

The cores, caches, fetch unit, branch predictor and state transfer are not
part of this RTL. Neither are the ILP/MLP measurement and the per-type
counting of flushed instructions. The core supplies retirement information (signatures,
branches, per-cycle event counts) through ports. The chosen core comes back
out.

```
 retire stream ─► sig_fifo (89 × 19 b) ─► chill_cdt ─► chill_pct ─► chill_cct ─┐
 branches ──────► last-backward-branch tag ─┘                 │          ▲  │
 event counts ──► epoch_stats ─► reactive_mapper ─────────────┼──────────┼──┤
                         │ (512-instr epochs)                 ▼          │  ▼
                         └──────────────────────────────► chill_predictor ─► a_core
 event counts ──► epoch_stats ─► regression_mapper ─────────────────────────► b_core
```

## 1. Following chains of long-latency loads

This is the least obvious part of the design, and it is all in `chill_cdt`
and `chill_pct`.

### Signatures

Each retired instruction gives a 19-bit signature: destination register,
source 1, source 2 (6 bits each, so 64 register numbers), and one bit that
says "this is a long-latency load". Register number 0 means "no operand".
The signatures go through an 89-entry FIFO (`sig_fifo`), so that the tracker
can fall behind during a slow kill and catch up afterwards.

### Current Dependencies Table (CDT)

There is one row per register. Row *N* is a 64-bit vector. Bit *k* set means
that register *N*'s current value depends, directly or through other
instructions, on the long-latency load that last wrote register *k*. For each
signature:

* The new row of the destination is `row[src1] | row[src2] | row[dst]`. The
  old row of the destination is kept: a register keeps its earlier
  dependences until its load is killed.
* An LLL also sets its own *identity bit* (bit *dst* of row *dst*). It also
  stamps the row with the current 10-bit loop tag and the 5-bit epoch number.
* A non-load instruction whose sources carry any dependence is a **shadow**
  instruction.

A write to a register whose identity bit is set **kills** that load: the value
the chain was waiting for is overwritten. The kill walks the whole table
before the killing instruction's own write is applied. Let *K* be the killed
row (register *d*):

* every row that has bit *d* set is OR-ed into the **current full chain**,
  meaning all loads connected to the killed one;
* every row that contains *all* bits of *K* has exactly those bits removed.

Worked example. The program, with loads marked, and the rows after it
(leftmost bit is r5, rightmost is r1):

| # | instruction        | row after        |
|---|--------------------|------------------|
| A | `ld r1`            | r1 = 00001       |
| B | `add r2 = r1, r3`  | r2 = 00001       |
| C | `add r3 = r2, r4`  | r3 = 00001       |
| D | `ld r4 = [r1]`     | r4 = 01001       |
| E | `ld r5 = [r4]`     | r5 = 11001       |
| F | `add r6 = r4, r7`  | r6 = 01001       |
| G | `add r7 = r6, r8`  | r7 = 01001       |
| H | `add r8 = r5, r4`  | r8 = 11001       |

Killing r4 gives the chain 01001 \| 11001 \| 01001 \| 01001 \| 11001 =
**11001**. The bits 01001 are then removed from every row that contains them
all. Rows r4, r6 and r7 become empty, and rows r5 and r8 become 10000.
`tb_chill_cdt` checks this example and the kills of r5 and r1 from the same
starting state.

### Pending Chains Table (PCT, 5 entries)

Each entry is a chain vector with the tag and start epoch of its first load.
On every kill:

1. If the current full chain shares a bit with any entry, the two are merged.
   If it matches several entries, they all fold into the first one.
2. Otherwise, if the chain holds two or more loads, a new entry is created
   with the killed row's tag and epoch. A lone load is not a chain. If the
   table is full, the new chain is dropped and `pct_overflow` pulses.
3. The killed register's bit is cleared in the entry.

In the example, killing r4 creates {r1, r4, r5}, and clearing r4 leaves
10001. An entry that becomes empty is a **completed chain**. Its duration in
epochs is the current epoch minus the start epoch, modulo 32.

### Completed Chains Table (CCT, 5 entries)

Each entry holds a tag, a duration and a countdown.

* **Recording.** A completed chain with a known tag keeps the longer of the
  two durations. Otherwise a new entry is written; when the table is full,
  entries are replaced in round-robin order. The countdown is cleared either
  way.
* **Entering a known chain.** Every retiring branch target is compared with
  the stored tags. A match means the program is entering a known chain: the
  countdown is loaded with the duration and `cct_hit` pulses.
* **Countdown.** All positive countdowns drop by one at each epoch end.

**The loop tag.** The tag is the target of the last *backward* branch, which
is the loop head, truncated to 10 bits. Branch targets are then compared
directly with stored tags. The tracker uses the tag that is current when it
*analyses* a signature, not the one current when the signature retired. With
a deep backlog in the FIFO, a chain can therefore pick up a later loop's tag.

### Tracker timing

| event                      | cycles in the tracker | effect on input       |
|----------------------------|-----------------------|-----------------------|
| ordinary signature         | 1                     | none                  |
| killing signature          | ⌈64/3⌉+2 = 24         | tracker takes no new signature for 23 cycles; FIFO fills |
| FIFO full                  | –                     | `sig_ready` low: retirement must stall |

The walk examines `ROWS` = 3 rows per cycle, so it takes ⌈64/3⌉ = 22 cycles.
That is close to the roughly 22 cycles the original timing analysis allows
for a kill. An ordinary signature, including a load that kills nothing, takes
one cycle. The heaviest epochs seen in the evaluation had 46 long-latency
loads and 6 kills. Such an epoch costs 6 × 24 + 506 = 650 tracker cycles. The
average OoO epoch *with* kills lasts about 1660 cycles, so the tracker keeps
up. The real limit is the rate of ordinary signatures: the tracker takes one
per cycle, while the OoO core can retire three. An epoch faster than
512 − 89 = 423 cycles (IPC above about 1.2) therefore fills the 89-entry FIFO.
The original sizing assumed 0.87 cycles per signature, which puts the worst
measured epoch of 357 cycles just inside the FIFO. When the FIFO is full, the
tracker back-pressures retirement, and each refused cycle is reported as
`sig_stall`. Accepting two signatures per cycle would remove this stall. That
is not done here, because two signatures in the same cycle may depend on each
other. `ROWS` trades walk time against the number of rows
the table must read and update at once; `ROWS = 1` gives a 66-cycle kill with
a single row port.

## 2. Choosing the core in engine A

`chill_predictor` latches the events of the epoch: a shadow write, a new
pending chain, a branch entering a known chain. At the epoch end it applies
the first rule that matches, and reports which one in `a_why`:

| `why`            | condition                                 | next core |
|------------------|-------------------------------------------|-----------|
| `WHY_CHILL_EVENT`| new pending chain or known chain entered  | OoO; shadow counter set to 15 if coming from in-order |
| `WHY_SAT_LOW`    | chains live, on OoO, counter < 8          | in-order  |
| `WHY_SAT_HIGH`   | chains live, on OoO, counter ≥ 8          | OoO       |
| `WHY_INO_HOLD`   | chains live, on in-order                  | in-order  |
| `WHY_COLD_START` | shadow seen, no chain live                | OoO       |
| `WHY_REACTIVE`   | none of the above                         | reactive mapper's choice |

"Chains live" means a PCT entry exists or a CCT countdown is positive. The
4-bit shadow counter counts up in an epoch with shadows and down in one
without, and saturates at 0 and 15. The rule order, the reset state (OoO core,
counter 0) and holding the in-order core while chains are live are this
design's own reading. The source lists the rules without a priority.

## 3. The reactive estimate and its PI correction

**Units.** All CPI values are **cycles per 512-instruction epoch**: a signed
24-bit number, with the epoch's cycle count used directly. Regression weights
and the PI gains α and β are signed Q8.8. A product `w·x` is `(w*x) >>> 8`,
rounded toward minus infinity. Weights, constants and gains are configuration
inputs, because they come from offline training. No values are built in.

`lin_regress` computes `est = k + Σ w[i]·x[i]`. Its inputs are the epoch's
event counts for the core that ran (engine A: L2 misses, L2 hits, branch
misses, MLP, ILP, cycles). The result is the CPI estimated for the *other*
core. There are two weight sets: OoO→in-order and in-order→OoO.

`pi_controller` adds `α·(sum of the last 5 errors) + β·(current error)`, with
error = estimate − observed. At each epoch end the error is pushed into the
history. In `reactive_mapper`:

```
delta = observed + α·Σpast_err + β·err − estimate
delta > 0  →  switch to the other core, else stay
```

**Sign convention.** The source describes this sign rule in two places, and
the two descriptions disagree. This design follows the one that matches the
arithmetic: a positive delta means the running core does worse than the other
core's estimate. The source also says in one place "all past errors" and in
another "the past 5 epochs". The 5-epoch window is used throughout.

## 4. Engine B: branch impact and ESI

`regression_mapper` evaluates three corrected regressions each epoch:

| value      | regression inputs                 | PI error reference | used on |
|------------|-----------------------------------|--------------------|---------|
| `delta_cc` | performance counts + cycles       | observed CPI       | both cores |
| `bi`       | waste after mispredictions: L2 miss + hit, branch miss, int + fp, control, cycles wasted | `bi_meas` input | both cores |
| `esi_loss` | early-scheduled instructions: L2 miss, L2 hit, int, fp, control, plus cycles used | `esi_meas` input | OoO only (history advances only after OoO epochs) |

The ESI counts come from `esi_tracker`. Each cycle, the OoO core reports:

* the ROB index of its oldest instruction;
* the ROB index of the oldest instruction that has not issued yet;
* up to three issuing instructions, by ROB index;
* up to three retiring instructions, each with its class: L2-miss load,
  L2-hit load, integer, floating point or control.

An issuing instruction is **early scheduled** when its age is larger than the
waiting instruction's. Age means distance from the oldest entry, modulo the
128-entry ROB. A flag per ROB entry records the result at issue. The flag is
read at retirement, so instructions squashed by a flush never count. The
retirement-time counts per class go to the epoch counters, next to the
branch-waste counts from the core. The age test and the mark-at-issue,
count-at-retire scheme are this design's own way of producing the count.

The decision rules:

| mode        | on OoO: go in-order when      | on in-order: go OoO when |
|-------------|-------------------------------|--------------------------|
| `MODE_CC`   | `delta_cc > 0`                | `delta_cc > 0`           |
| `MODE_BI`   | `delta_cc − bi > 0`           | `delta_cc − bi > 0`      |
| `MODE_ESI`  | `esi_loss ≥ 0`                | `delta_cc > 0`           |
| `MODE_COMB` | `esi_loss − bi ≥ 0`           | `delta_cc − bi > 0`      |

ESI can only be counted on the OoO core. On the in-order core, the ESI modes
therefore fall back to the performance estimate. The source does not say what
the branch-impact and ESI estimates are compared with to form their errors.
Here they are the measurement inputs `b_bi_meas` and `b_esi_meas`, which the
core must supply.

## 5. Top-level interface (`fgmap_top`)

The top has no parameters; everything runs at the sizes above. Engine A ports:

* Inputs:
  * `a_retire_cnt`: instructions retired per cycle.
  * `a_sig_valid/a_sig_ready/a_sig`: signature handshake. When ready is low,
    retirement must stall.
  * `a_br_valid/a_br_backward/a_br_target`: retired branches.
  * `a_ev_inc[5]`: 4-bit per-cycle event increments.
  * `a_cc_o2i`, `a_cc_i2o`, `a_gains`: trained weights and gains.
* Outputs:
  * `a_core`, `a_why`, `a_sat`, `a_switched`.
  * `a_ev`: one-cycle pulses for lll, kill, shadow, pct_created, pct_merged,
    pct_overflow, chain_done, cct_hit, cct_replaced and sig_stall.
  * `a_epoch_end`, `a_epoch_num`, `a_delta`.

Engine B ports:

* Inputs:
  * `b_mode`, `b_retire_cnt`.
  * `b_ev_inc[10]`: 4-bit per-cycle increments, in this order:
    * 5 performance counts, ordered as `a_ev_inc`;
    * 5 branch-waste counts.

    The ESI counts and the epoch cycle count are added inside.
  * `b_rob_head`, `b_wait_valid/b_wait_idx`, `b_iss_valid/b_iss_idx[3]`,
    `b_ret_valid/b_ret_idx[3]/b_ret_cls[3]`: the OoO issue and retirement
    stream for `esi_tracker`.
  * `b_bi_meas`, `b_esi_meas`, `b_cfg`.
* Outputs: `b_core`, `b_switched`, `b_epoch_end`, `b_delta_cc`, `b_bi`,
  `b_esi_loss`, and `b_iss_early`, which flags the issues that are early
  scheduled.

Cores change on the clock edge where `*_epoch_end` is high. `epoch_end` comes
one cycle after the retirement that completes the 512th instruction. Extra
instructions retired in that cycle count toward the next epoch. Both engines
reset to the OoO core.

## 6. Where this design fills gaps or departs from the source

* **Kill walk.** Three rows per cycle, so a kill takes 24 cycles in the
  tracker (section 1). That matches the original timing estimate of about
  22 cycles. Non-killing loads take 1 cycle here, not the roughly 18 cycles
  estimated there, because the rows are flip-flops, not a RAM.
* **Signature rate.** The tracker analyses one signature per cycle, so epochs
  faster than 423 cycles stall retirement (section 1).
* **Full signature FIFO.** It back-pressures retirement. The source sizes the
  FIFO but does not say what happens when it is full.
* **Single loads.** A lone killed load creates no pending chain.
* **Several matching pending entries.** They are merged into the first one.
  When the PCT is full, the new chain is dropped.
* **CCT replacement.** Round-robin when the table is full.
* **Loop tag.** The tag is the backward branch's target, 10 bits.
* **Predictor.** The rule priority and reset state are this design's own
  (section 2).
* **Fixed point.** Formats and rounding are this design's own (section 3).
* **Sign rule and error history.** The positive-means-switch sign rule and the
  5-epoch error history resolve the conflicts described in section 3.
* **Regression weights.** The feature lists come from the source's regression
  breakdowns, but the source gives only the relative weights. Trained values
  must be loaded through the configuration ports.
* **Table storage.** The CDT (64 × 79 bits), PCT and CCT are flip-flop arrays.
  The FIFO storage is a plain array without reset.

## 7. Verification and simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_chill_cdt`: the worked example, three kills, the busy time, and a
  random stream checked against a reference model.
* `tb_chill_pct`, `tb_chill_cct`, `tb_chill_predictor`: table and decision
  rules, with random sequences checked against models.
* `tb_sig_fifo`, `tb_epoch_stats`, `tb_lin_regress`, `tb_pi_controller`,
  `tb_reactive_mapper`, `tb_regression_mapper`: arithmetic compared with
  plain-integer references from `tb/tb_ref_pkg.sv`.
* `tb_esi_tracker`: directed age cases, including ROB wrap, and a random
  issue/retire stream checked against a reference.
* `tb_chill_system`: the whole tracker, including the kill latency and FIFO
  overrun.
* `tb_fgmap_top`: both engines at full size, with no parameter overrides.
  * It runs about 40,000 instructions through engine A.
  * It checks the load, kill and shadow counts against a model.
  * It requires every tracker mechanism and every decision reason to occur.
  * It checks engine B's decisions in all four modes against a closed form.
  * It checks engine B's ESI counts against a per-ROB-entry reference.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_fgmap_top \
  -y rtl -y tb +libext+.sv rtl/chill_pkg.sv tb/tb_ref_pkg.sv tb/tb_fgmap_top.sv
./obj_dir/Vtb_fgmap_top
```

Substitute any other `tb_*` name. `rtl/chill_pkg.sv` must come first, and
`tb/tb_ref_pkg.sv` is needed by the mapper testbenches.

## 8. Files

| file | contents |
|------|----------|
| `rtl/chill_pkg.sv` | sizes, signature struct, enums, regression records, Q8.8 helpers |
| `rtl/sig_fifo.sv` | 89-entry signature FIFO with back-pressure |
| `rtl/chill_cdt.sv` | dependence table, kill detection and walk |
| `rtl/chill_pct.sv` | pending chains table |
| `rtl/chill_cct.sv` | completed chains table |
| `rtl/chill_predictor.sv` | epoch decision with the shadow counter |
| `rtl/chill_system.sv` | tracker: FIFO + tables + predictor + loop tag |
| `rtl/epoch_stats.sv` | 512-instruction epoch counter and event snapshots |
| `rtl/lin_regress.sv` | `k + Σ w·x` evaluator |
| `rtl/pi_controller.sv` | PI correction with 5-epoch history |
| `rtl/reactive_mapper.sv` | base reactive decision |
| `rtl/regression_mapper.sv` | branch-impact / ESI / combined decision |
| `rtl/esi_tracker.sv` | early-scheduled-instruction detection and per-class counts |
| `rtl/fgmap_top.sv` | both engines side by side |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_ref_pkg.sv` |
