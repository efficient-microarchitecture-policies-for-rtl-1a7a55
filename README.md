# Power-token budget manager: keeping an out-of-order core under a power cap

This RTL keeps a superscalar out-of-order processor under a power budget
cycle by cycle. It does not rely on voltage and frequency scaling alone. DVFS
decides from averages over hundreds of thousands of cycles, so it cannot see
the short power spikes that push a core over its cap. This design estimates
power every cycle instead. It then applies cheap microarchitectural brakes
only in the cycles and code regions that need them.

The scheme has two levels:

* **Coarse level.** A DVFS controller lowers the average power. By default it
  may only use the three mildest voltage/frequency modes.
* **Fine level.** The *Basic Block Level Manager* (BBLM) removes what is left
  of the spikes. At every branch prediction it forecasts how far the next
  basic block will push power over the budget. It then switches on one, two
  or three techniques, from least to most intrusive:
  1. delaying instructions predicted to be non-critical;
  2. throttling fetch while low-confidence branches are in flight;
  3. throttling fetch when the decode/commit ratio shows wasted work.

A third, stricter mechanism can run alongside. *Power-Token Throttling*
(PTT) refuses to fetch any instruction whose cost would take the estimate
over the budget.

The design follows the paper *Efficient Microarchitecture Policies for
Accurately Adapting to Power Constraints*. The table sizes, thresholds and
DVFS modes are the published ones. The paper leaves many details open: widths,
encodings, reset, the exact forecast formula and the core interface. This RTL
fills those gaps with its own choices, listed under
[Choices made here](#choices-made-here-and-how-far-to-trust-them).

## Power tokens: the cycle-level power estimate

Everything rests on a cheap power estimate that needs no performance
counters.

* **The unit.** One *power token* is the energy of one instruction spending
  one cycle in the RUU (the combined issue window and reorder buffer). That
  is the share of wakeup/select energy charged to each waiting instruction.
* **Cost of an instruction.** Its cost is the *base tokens* of its power
  group, which cover all its regular structure accesses, plus the number of
  cycles it spent in the RUU. Instruction types are grouped offline into 8
  groups of similar base power. The core's decoder supplies the 3-bit group
  id with each instruction.
  * `token_calc` stamps a 16-bit cycle counter into a per-RUU-entry register
    at dispatch.
  * At commit it returns `BASE_TOK[group] + (now - stamp)`, saturated to 8
    bits.
  * The per-group base costs are placeholders (`1, 2, 3, 4, 6, 8, 12, 16`).
    Calibrate them for a real core.
* **History table.** `ptht` is an 8K-entry table indexed by PC. It stores
  each instruction's cost from its last commit. It is read combinationally
  for every fetch lane, so an instruction's cost is known before it enters
  the pipeline.
* **Power now.** `token_meter` adds the predicted cost of every admitted
  instruction. It subtracts the same predicted cost when the instruction
  commits or is squashed. The core carries the fetch-time estimate to
  commit for this purpose, so the sum always returns to zero. The result,
  `power`, is the number of tokens in flight. `over_budget` is
  `power > budget`.

The budget is a 16-bit token count written by software. In the original
evaluation, 100 % corresponds to the clock-gated peak of the reference core
(48 W). Budgets from 95 % down to 40 % were studied.

## The Basic Block Level Manager

This is the part that needs the most explanation.

### Storing block power in the branch predictor

`gshare_bbp` is a gshare predictor with 64 KB of 2-bit counters
(256K entries, 16-bit global history xor-ed into the PC index). Each entry
also has a **9-bit field** holding the tokens last consumed by the basic block
that follows the branch. A prediction therefore returns the direction and
the expected power of the code that will be fetched next.

`bb_accum` fills that field at commit:

* A basic block is the instructions after a branch, up to and including the
  next branch.
* The measured costs of committing instructions are summed.
* When the branch that closes a block commits, the sum is written into the
  predictor entry of the branch that *led into* the block.
* The core keeps the predictor index `bp_idx` (and the history `bp_ghr`) with
  every branch, so the right entry can be found at commit.
* Only one block write fits per cycle. If two blocks close in one commit
  group, the younger one is kept.

### Choosing a level

On every prediction, `bblm_ctrl` forms a forecast:

```
est    = power + predicted block tokens
excess = (est - budget) / budget          (as a percentage)

excess <= 0          -> none
0  < excess < 15 %   -> level 1: critical-path delaying
15 <= excess < 65 %  -> level 2: + JRS confidence throttling
excess >= 65 %       -> level 3: + decode/commit-ratio throttling
```

The percentages come from the thresholds X = 15 and Y = 65. The comparison
uses multiplication only, with no divider: `(est-budget)*100 < X*budget`.

How the level changes:

* Levels are cumulative: level 3 enables all three techniques.
* A new forecast can only raise the level.
* Once the measured `power` is back at or under the budget, the techniques
  are released in reverse order, one level every `DOWN_CYC` = 3 cycles.

The forecast does not need to be precise. It only needs to pick the same
technique each time the same block comes round.

### The three techniques

| level | technique | module | acts on |
|---|---|---|---|
| 1 | critical-path delaying | `crit_pred`, `qold_marker`, `cp_issue_gate` | issue |
| 2 | JRS confidence throttling | `jrs_conf`, `fe_throttle` | fetch/decode width |
| 3 | DCR throttling | `dcr_monitor`, `fe_throttle` | fetch/decode width |

**Critical-path delaying.**

* `crit_pred` is an 8K-entry table of 6-bit saturating counters: +8 when a
  committing instruction was critical, −1 otherwise. It also stores one bit
  that says whether the instruction last issued while over budget.
* An instruction is predicted critical when its counter is at least 8.
* `fe_delayable` marks instructions predicted non-critical whose last run was
  over budget.
* Training uses the QOld rule in `qold_marker`. Each cycle the core names the
  oldest instruction in its issue queue, and that instruction is marked
  critical if it is not ready.
* While level ≥ 1 and the core is over budget, `cp_issue_gate` refuses to
  issue delayable instructions. It holds each one for at most `MAX_DELAY` = 2
  cycles, so that it does not become critical itself.

**JRS throttling.**

* `jrs_conf` is a 64K-entry table of 2-bit counters. A counter counts
  consecutive correct predictions and resets on a misprediction.
* A branch is confident only when its counter is saturated (value 3).
* The number of low-confidence branches in flight is counted. While it is
  non-zero and level ≥ 2, `fe_throttle` halves the fetch/decode width.

**DCR throttling.**

* `dcr_monitor` counts decoded and committed instructions over 64-cycle
  windows.
* If a window decoded at least 3× what it committed, the trigger is set for
  the next window.
* At level 3, while the trigger is set and the core is over budget, the width
  is cut to a quarter.

Each throttle stays on for 3 cycles after its condition ends. A divider of 0
(`JRS_DIV`/`DCR_DIV`) means a full fetch stop.

## Power-Token Throttling

`ptt_gate` goes through the fetch lanes in program order. A lane is admitted
while `power` plus the costs already admitted this cycle, plus its own cost,
stays within the budget. The first lane that does not fit blocks itself and
every younger lane, until commits release tokens.

Some lanes are always admitted:

* Branches, so that mispredictions are found early.
* With `ptt_cp` set, instructions predicted critical.

PTT is off unless `ptt_en` is set. It combines with the BBLM: the throttled
width is applied first, then the token check.

## Coarse level: DVFS

`dvfs_ctrl` sums `power` over a search interval of 500 000 cycles. At the
end of the interval it looks at the first `N_MODES` entries of this mode
table:

| mode | V | f | relative V²f |
|---|---|---|---|
| 0 | 100 % | 100 % | 1.000 |
| 1 | 95 % | 95 % | 0.857 |
| 2 | 90 % | 90 % | 0.729 |
| 3 | 90 % | 75 % | 0.608 |
| 4 | 90 % | 65 % | 0.527 |

It picks the fastest mode whose projected power,
`average tokens × V²f / nominal`, fits the budget. If no mode fits, it picks
the slowest allowed mode.

* A switch makes `busy` high for 6 cycles. This is 50 mV at 50 mV/ns at
  5.6 GHz. `mode` then takes the new value.
* The default `N_MODES = 3` is the limited set used in the two-level scheme.
  Set it to 5 for the full set.
* The regulator and clock generator that apply the mode are outside this
  RTL: `mode` and `busy` are outputs.

## Block map

```
power_manager (top)
 ├─ ptht            8K x 8b   history of instruction token costs  (fetch read, commit write)
 ├─ token_calc      128 x 16b dispatch stamps -> cost at commit
 ├─ token_meter               tokens in flight, over_budget
 ├─ ptt_gate                  Power-Token Throttling admission
 ├─ crit_pred       8K x 7b   criticality counters + over-budget bit
 ├─ qold_marker     128 x 2b  QOld marks / over-budget samples per RUU entry
 ├─ cp_issue_gate   128 x 2b  per-entry delay counters
 ├─ jrs_conf        64K x 2b  branch confidence, low-confidence branches in flight
 ├─ dcr_monitor               decode/commit ratio trigger
 ├─ fe_throttle               fetch/decode width (4, 2, 1 or 0)
 ├─ gshare_bbp      256K x (2b + 9b)  direction + next-block tokens
 ├─ bb_accum                  basic-block power measurement
 ├─ bblm_ctrl                 technique level (none / CP / JRS / DCR)
 └─ dvfs_ctrl                 voltage/frequency mode
pt_pkg: widths, level enum, DVFS mode table
```

The four large tables (`ptht`, `crit_pred`, `jrs_conf`, `gshare_bbp`) clear
themselves after reset, one entry per cycle. `init_done` rises after the
largest of them, 262 144 cycles for the predictor. Keep the core idle until
then. Every table size is a parameter of the top.

## Connecting a core

The manager sits beside the core's pipeline. The core must:

* **Fetch** (`fe_*`). Present up to 4 lanes, in program order, ending at the
  first branch. Only lanes with `fe_allow` enter. `fe_allow` already honours
  `fe_width`.
  * Keep `fe_tok` and `fe_delayable` with each admitted instruction.
  * Dispatch admitted instructions into the RUU with `dp_valid`/`dp_ruu`
    (the same cycle is fine).
* **Predict** (`bp_*`). Make at most one prediction per cycle, for the
  admitted branch lane. Keep `bp_idx`, `bp_ghr` and `bp_lowconf` with the
  branch.
* **Issue**. Report the oldest waiting instruction (`iq_old_*`) every cycle.
  Present issue candidates with their `delayable` flag, and issue only those
  with `is_ok`.
* **Resolve** (`br_*`). Resolve at most one branch per cycle, returning its
  index and history. Count low-confidence branches that resolve or are
  squashed in `lc_release`.
* **Commit** (`cm_*`). Commit in order, giving the PC, RUU entry, group,
  fetch-time estimate `cm_tok_est`, branch flag and predictor index.
  * `cm_tok` is the measured cost, available in the same cycle.
  * Put the total estimate of squashed instructions on `squash_tok`.
  * Pulse `bb_flush` when a partially committed block must be discarded.
* **Decode**. Give the decode count in `dec_count`.

Timing:

* `fe_allow`, `fe_tok`, `is_ok`, `bp_*` and `cm_tok` are combinational.
* `power`, `level`, the throttle hold counters and `dvfs_mode` are
  registered.
* An admission or release shows in `power` one cycle later.

## Choices made here, and how far to trust them

The published description stops at the level of a simulator study. These
parts are this design's own and are the first things to revisit:

* **Forecast formula.** The source says only that the manager estimates how
  far from the budget executing the next block would take it. Here the
  estimate is `power` plus the block's stored tokens.
* **Release pace.** Techniques are released "progressively, in reverse
  order". The pace here is one level every 3 cycles.
* **Direction of the DCR trigger.** Its footnote literally says "three times
  more committed than decoded". The heuristic it names is the
  decode-to-commit ratio, which detects wasted work. The trigger here is
  *decoded ≥ 3 × committed*.
* **QOld mark.** The source says both that the oldest non-ready instruction is
  marked critical and that it becomes non-critical once ready. Here the mark
  is kept until commit, so the predictor learns which instructions stalled
  the queue head.
* **Unspecified parameters.**
  * The prediction threshold of 8 in `crit_pred`.
  * The JRS confidence threshold (3).
  * The throttle dividers inside the BBLM (JRS 1/2, DCR 1/4).
  * The 2-cycle delay limit (1 to 8 were studied).
  * The 64-cycle DCR window.
* **DVFS projection.** It treats token activity as frequency-independent and
  scales it by V²f. The published controller uses simulator power directly.
* **Base token values.** Per-group costs and the value of an untrained history
  entry (4) are placeholders.
* **Interface limits.** One prediction and one resolution per cycle. Fetch
  groups end at a branch. Tables index with PC bits [n+1:2]. Same-entry
  writes from two commit lanes in one cycle keep only the last.

Not included:

* the out-of-order core itself;
* the voltage regulator and clock generator;
* the offline clustering that assigns instructions to power groups.

The tables are written as plain arrays with combinational reads. A
synthesis flow for silicon would map them to SRAM macros, which adds a read
cycle the front end would have to absorb.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one compares the module against a reference model written independently in
the testbench, and ends with `TB_RESULT checks=N failures=M`.

`tb_power_manager` runs the whole design at its default sizes. It uses a
behavioural 4-wide out-of-order core model running a synthetic 48-instruction
loop, with cache-miss latencies, mispredictions and squashes. It runs for
520 000 cycles after the 262 144-cycle table clear. It checks these every
cycle:

* every commit cost;
* every history-table estimate;
* the power estimate and the over-budget flag;
* width and PTT admission.

It also requires each mechanism to happen at least once: every BBLM level,
level release, critical-path holds, JRS and DCR throttling, a PTT stall, a
squash, a misprediction, a stored block power read back, and a DVFS switch
at the end of the first search interval. It takes a few seconds.

`tb_budget_sweep` drives the same core model through smaller tables (4K
JRS and predictor entries, a 5 000-cycle DVFS interval) for 20 000 cycles.
First it measures the peak of the unconstrained estimate. Then it runs four
configurations at budgets of 95, 80, 70, 60, 50 and 40 % of that peak:

* no limit;
* the BBLM alone;
* the BBLM plus DVFS;
* the BBLM plus PTT (critical-path variant).

Every cycle it checks that `power` equals the model's own sum of in-flight
estimates. It prints these, per run:

* the share of cycles over the budget;
* the area over the budget;
* committed instructions;
* cycles with a level raised;
* the slowest DVFS mode used;
* average activity: one token per waiting instruction per cycle, plus the
  group's base cost at issue.

It checks these results:

* PTT at least halves the area over the budget, at every budget.
* The BBLM engages wherever the budget is exceeded, and lowers activity
  there.
* Only the DVFS runs leave the nominal mode.
* The tightest budget drives DVFS to its slowest limited mode.

In this model the BBLM cuts activity by about 15 % (143 to 122 tokens per
cycle), but at less than half the committed instructions. Measured by the
in-flight estimate, its area over the budget is **larger** than without a
limit. The loop is memory-bound and keeps the instruction window full. Under
an active level almost every waiting instruction is predicted non-critical,
so the issue delay cuts issue to about 1.3 per cycle. The fetch throttles
slow the core too, but neither empties the window. Each token cost includes
the cycles spent in the RUU. Slower progress therefore means larger learned
costs and a higher in-flight sum, which keeps the level raised. Only PTT, which
stops fetch on that sum, holds the sum down. With a real core, check the
BBLM's benefit against measured power, not against the estimate.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Itb \
    rtl/pt_pkg.sv $(ls rtl/*.sv | grep -v pt_pkg) tb/tb_power_manager.sv \
    --top-module tb_power_manager
./obj_dir/Vtb_power_manager
```

The package must be read first. The testbenches use plain integer arithmetic on
narrower signals, so `-Wno-fatal` keeps their width warnings from stopping the build.
The unit testbenches override sizes (for example 64-entry tables or
a 100-cycle DVFS interval) to stay short. Lint is clean apart from warnings
about table-index PC bits that are deliberately unused.
