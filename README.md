# Turbo decoder with dynamic power management

A turbo decoder is normally built for the worst case: it must finish a fixed
maximum number of iterations (here 8 full iterations, 16 half-iterations)
before the next codeblock arrives. Most codeblocks need far fewer. This design
uses that slack twice. First, it stops decoding as soon as a block has
converged, or as soon as it looks hopeless. Second, once a block is clearly
converging, it predicts how many half-iterations are left. If they still fit
before the deadline at a lower voltage and frequency, it finishes the block
there. The slow mode (0.9 V, 160 MHz) spends about 56 % of the switching
energy per cycle of the fast mode (1.2 V, 266 MHz). Running slower therefore
saves energy whenever the deadline allows it.

The decision is driven by one cheap signal, the **convergence metric**. This
is the number of bits whose hard decision changed during the last
half-iteration. For a block that will not decode, the metric wanders around a
mean value. For a block that will decode, it wanders for a while (the
*critical period*) and then falls steadily towards zero.

The RTL is SystemVerilog-2017. It simulates with Verilator 5 and elaborates
with the slang front end of Yosys.

## System structure

```
            channel LLRs                         decoded bits
 host ──────────────────────►┌───────────────────┐──────────────► host
                             │   turbo_decoder   │
                             │  (6 SISOs, QPP,   │ metric, half_done
                             │   memories,       │──────────────┐
                             │   hd counter)     │◄───────┐     ▼
                             └─────────▲─────────┘ go/stop│ ┌───────────────┐
                                       │ clk, VDD         └─│ power_manager │
                             ┌─────────┴─────────┐  mode    │  (policy)     │
                             │    DVFS unit      │◄─────────└───────────────┘
                             │ (regulator+clock, │  ready
                             │  outside the RTL) │─────────► turbo_dpm_top
                             └───────────────────┘
```

`turbo_dpm_top` holds the decoder and the power manager. The DVFS unit is an
analog buck regulator plus a clock source, so it is not RTL. The top sends it
`power_mode` and receives the decoder clock `clk` and `dvfs_ready`. In
simulation, `tb/dvfs_model.sv` plays this role. It switches between the two
modes after a 50 ns settling time, and `ready` is low while the supply moves.

The decoder and the power manager exchange one handshake per half-iteration:

1. The decoder finishes a half-iteration and pulses `half_done` with `metric`.
2. One cycle later, the power manager pulses `dec_valid` with `dec_stop`, the
   stop reason and the mode for the next half-iteration.
3. If decoding continues, the top holds the decision until `dvfs_ready` is
   high, so that no work runs on a supply that is still moving. The decoder
   then starts the next half-iteration.

## The power-management policy (`power_manager`)

This is the heart of the design. Time is counted in units of "one
half-iteration in mode 0", as 8.8 fixed point (`elapsed_q8`). Mode *k* is
slower by a factor alpha_k. The defaults are `ALPHA_Q8 = '{256, 426}`, that is
1 and 266/160 = 1.6625, rounded up to 426/256 so that the deadline is never
underestimated. The deadline is `MAX_HALF` = 16 half-iterations in mode 0.

After each half-iteration with metric *m*, the policy does the following, in
this order:

| step | rule |
|---|---|
| time | `elapsed += ALPHA_Q8[mode used for that half-iteration]` |
| trend | if *m* < previous *m*, the decrease count goes up by one; otherwise it returns to 0 |
| convergence mode | entered when the decrease count reaches `MONO_N` (2). Any rise of the metric leaves it again |
| critical count | counts the half-iterations spent outside convergence mode |
| stop: converged | *m* = 0: no hard decision changed |
| stop: undecodable | still critical after `CRIT_MAX` (10) half-iterations |
| prediction | in convergence mode, the last decrease *d* is extended linearly to zero: `rem = ceil(m / d)` half-iterations, capped at `MAX_HALF` |
| mode choice | the slowest mode *k* with `elapsed + rem * ALPHA_Q8[k] <= deadline`. Outside convergence mode, or if nothing fits, mode 0 |
| guard | if even one more half-iteration in the chosen mode would miss the deadline, mode 0 is used. If mode 0 also misses it, stop (deadline) |

Worked example (this is case A of `tb_power_manager`). Metrics 500, 600, 400,
200, 100, 0:

* Half-iterations 1–3 are critical and run in mode 0.
* After the 4th, the metric has fallen twice in a row (600→400→200). With
  *d* = 200, the prediction is 1 half-iteration more. Mode 1 fits
  (1024 + 426 ≤ 4096), so mode 1 is selected.
* The 5th half-iteration runs slowly (elapsed becomes 1450) and again predicts
  one more.
* The 6th reports 0 changes, and the block stops as converged.

The policy is very small: 131 word-level cells and 68 flip-flops before
technology mapping. The one divider (`ceil(m/d)`) is combinational. The
policy is generic in the number of modes (`N_MODES`, `ALPHA_Q8`), provided
the modes are ordered from fastest to slowest.

What is fixed by the technique and what is this design's choice:

* **From the technique:** stay fast during the critical period, use
  monotonic decrease as the sign of convergence, slow down only when the
  predicted remaining work still meets the deadline, stop early on
  convergence and on non-convergence, the two modes, and the deadline of
  8 full iterations.
* **This design's choices:** the linear predictor, `MONO_N = 2`,
  `CRIT_MAX = 10`, stop-on-zero-changes as the convergence test, the
  fixed-point time base, and ignoring the regulator's transition time in the
  time budget. The transition time is tens of nanoseconds against
  microseconds per half-iteration.

## The decoder (`turbo_decoder`)

The code is the LTE turbo code: two 8-state recursive systematic
convolutional encoders (feedback 1+D²+D³, parity 1+D+D³) joined by a
quadratic permutation polynomial (QPP) interleaver. LLRs use
L = ln P(0)/P(1), so a negative LLR decides 1. Channel LLRs and exchanged
extrinsics are 6 bits.

**Six SISO units.** The block is split into six sub-blocks of equal length,
a whole number of 32-step windows each (224 bits for K = 1280, 1024 for
K = 6144). SISO unit *p* decodes sub-block *p*, and the six units work in
lockstep, window by window. Each memory has one read and one write port per
unit. Two units never touch the same bit in a cycle: each bit belongs to one
sub-block, and the interleaver is a permutation. Each unit has its own
interleaver address generator. At the start of a block, the decoder computes
π and its increment g at each sub-block start *s*: t = f2·s mod K,
π(s) = s·(f1 + t) mod K and g(s) = (f1 + f2 + 2t) mod K. Each product is
done by double-and-add, one bit per cycle, so the six start points take 158
cycles. Each unit's generator restarts from its start point in every even
half-iteration.

**Half-iterations.** The units serve both constituent codes:

* In odd half-iterations (the first code), the decoder reads the systematic
  and extrinsic memories at address *i*, with parity 1.
* In even half-iterations (the second code), it reads them at π(*i*), with
  parity 2.

The extrinsic memory always holds one value per bit, in natural order. Each
half-iteration overwrites, in place, the entries it has just read. The result
is the a-priori input of the next half-iteration. A one-bit hard-decision
memory holds the current decision for every bit:

* it is loaded from the sign of the systematic LLR;
* its old value is read along with the other inputs;
* the new decision is written back when the posterior LLR is known.

`hd_change_counter` counts the bits where old and new differ, and that count
is the metric.

**Windows.** Each SISO (`siso_maxlogmap`) handles its sub-block in windows of
32 trellis steps, one step per clock. It has two window buffers, so the
backward pass of one window runs while the forward pass fills the other
with the next window:

1. *Forward pass.* For each of the 32 steps, the unit stores the step's
   inputs and the forward metrics alpha in a small window buffer, then
   advances alpha. Alpha runs on continuously from one window to the next
   inside a sub-block. Unit 0 starts from state 0. Every other unit starts
   from the alpha that its left neighbour reached at the end of its own
   sub-block in the previous iteration of the same half. In the first
   iteration it starts equiprobable.
2. *Backward pass.* The unit walks the window backwards. At each step it
   updates beta and emits the posterior LLR
   `max_{u=0}(α+γ+β) − max_{u=1}(α+γ+β)` and the extrinsic LLR
   `posterior − (Ls + La)`, saturated to 6 bits. The branch metric is
   `γ = −u·(Ls+La) − p·Lp`.
3. *Window boundaries.* Each backward pass starts from the beta that the
   same half-iteration found, in the previous iteration, at the first step of
   the following window. These boundary betas are kept in a small memory with
   one word per window and half-iteration. At the end of a sub-block, the
   beta comes from the first window of the right neighbour. In the first
   iteration, and at the end of the block (treated as unterminated), beta
   starts equiprobable.

State metrics are 16 bits and are normalised every step by subtracting the
metric of state 0.

**Interleaver.** `qpp_interleaver` computes π(i) = (f1·i + f2·i²) mod K with
two modular additions per step and no multiplier. The host supplies f1 and f2
from the LTE table; for example K = 1280 uses f1 = 199, f2 = 240.

**Timing.**

* Each unit takes one trellis step per cycle. A window is handed to the
  backward pass together with its last forward step, and the next window's
  forward steps follow at once.
* A half-iteration takes one cycle per step of a sub-block, plus the
  backward pass of the last window, plus 6 cycles between `half_done`
  pulses when the power manager answers at once. That is 262 cycles for
  K = 1280 (224 steps per unit) and 1062 for K = 6144 (1024 steps per unit).
* The interleaver start points take 158 cycles once per block.
* Eight full iterations of a K = 6144 block therefore take about 17150
  cycles, 64.5 µs at 266 MHz. That is the 95 Mbit/s rate: 8 iterations of
  the largest LTE block within 65 µs.
* The handshake with the power manager and the DVFS unit adds a few cycles
  per half-iteration, plus the settling time after a mode change.

**Host interface.**

* Configuration: set `k_len`, `f1` and `f2`.
* Loading: write every bit's `ld_sys`, `ld_p1` and `ld_p2` at `ld_addr` with
  `ld_valid`, while the decoder is not busy. Punctured parity is written as 0.
  Loading also clears that bit's extrinsic.
* Decoding: pulse `start`, then wait for `done`.
* Readout: read the bits with `rd_addr`; `rd_bit` follows one cycle later.
  `stop_reason`, `halves`, `elapsed_q8` and `pred_rem` tell how the task
  ended.

## Where this design departs from the original

* **Sub-block split, boundaries and schedule.** The original gives the
  decoder's six radix-2 SISO units, the window length and the throughput,
  not how the units share a block. The split, the hand-over of alpha and
  beta between neighbouring units, the start-point computation and the
  window pipelining are this design's choices. 95 Mbit/s at 266 MHz leaves
  only a few percent of slack: the handshake per half-iteration and the
  start points must stay a few cycles long.
* **Multi-port memories.** The LLR, extrinsic and hard-decision memories
  have one read and one write port per unit (`ram_mp`). That is simple to
  simulate but costly in silicon. Splitting them into single-port banks
  needs a conflict-free assignment of interleaved addresses to banks, which
  is not done here.
* **The deadline is counted in half-iterations.** 16 half-iterations in the
  fast mode, rather than a time in µs. At 266 MHz that is the 65 µs budget
  for the largest block.
* **Max-log-MAP** without the log-MAP correction term, and no extrinsic
  scaling.
* **Unterminated trellis.** Tail bits are not used.
* **QPP coefficients are inputs.** The LTE table is not stored.
* **The DVFS unit is not RTL.** Only its handshake is defined here. The
  regulator itself (buck converter, 0.9–1.3 V) is taken as given.
* **Policy constants** `MONO_N`, `CRIT_MAX` and the predictor are this
  design's choices (see above). They are parameters of `turbo_dpm_top` and
  `power_manager`.
* **Metric reference for the first half-iteration.** It compares against the
  hard decisions of the channel LLRs.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Reference models
(QPP by its closed formula, an RSC encoder written as a shift register, an
AWGN channel, a 6-bit quantiser) are in `tb/tb_turbo_pkg.sv`, written
independently of the RTL.

| testbench | what it shows |
|---|---|
| `tb_qpp_interleaver` | addresses equal the closed formula for K = 40, 1280, 6144, and each sequence is a permutation |
| `tb_hd_change_counter` | count equals a reference count over random streams with gaps, and is cleared between half-iterations |
| `tb_siso_maxlogmap` | posterior, extrinsic, hard decision, address order and rate equal an integer BCJR reference. This covers a full window, a partial window, and a two-window block started from the reference boundary beta, which also checks the returned `beta_first`. A three-window stream checks that windows overlap with no idle cycles |
| `tb_power_manager` | hand-worked metric sequences cover convergence with a switch to mode 1, an undecodable block, a deadline stop, and a return to mode 0 when the metric rises |
| `tb_turbo_decoder` | six units; 16 half-iterations of a K = 6144 block within 17290 cycles (65 µs at 266 MHz); error-free decoding of K = 40 (two units with data, four idle) and K = 1280 (last unit with a shorter sub-block); metric of half-iteration *h* equals the changes between hard decisions read out after *h*−1 and *h* half-iterations; half-iteration period |
| `tb_turbo_dpm_top` | whole system at default parameters, clocked by the DVFS model. Runs 52 K = 1280 rate-2/3 blocks from −1 dB to 3.5 dB and one K = 6144 block. Checks the deadline of every task, error-free decoding of converged blocks at ≥ 2.7 dB, and that every mechanism occurred |

Rate 2/3 in the system test keeps one parity bit in four from each encoder.
Typical results from `tb_turbo_dpm_top`, with energy taken as Σ V² over
decoder clock cycles relative to a decoder that always runs 8 iterations at
1.2 V:

* At 2.7–3.5 dB, blocks stop after 4–8 half-iterations at 0.26–0.43 of
  that energy.
* Below about 2 dB, blocks are dropped as undecodable after 10–16
  half-iterations at 0.66–1.03. The ratio can exceed 1 when a block runs
  all 16 half-iterations at 1.2 V, because the start points and handshakes
  count too.
* Around 2–2.2 dB, some blocks converge late and some stop at the deadline.

These figures come from a small random sample. They are not an error-rate
curve.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/turbo_pkg.sv tb/tb_turbo_pkg.sv tb/tb_turbo_dpm_top.sv \
    --top-module tb_turbo_dpm_top -o sim
./obj_dir/sim
```

Replace `tb_turbo_dpm_top` with any other testbench name to run that one.
The system test takes a few seconds. `tb/dvfs_model.sv` uses delays in the
simulator's default time unit, read as picoseconds.

Parameters worth changing:

* `K_MAX` sets the memory depth. The 6144 default is the largest LTE block.
* `WIN` is the window length.
* `N_SISO` is the number of parallel SISO units. `tb_turbo_decoder` takes it
  from a local parameter; with fewer units everything but its 65 µs check
  still passes.
* `MAX_HALF` sets the deadline in half-iterations.
* `N_MODES` / `ALPHA_Q8` describe the power modes.
* `MONO_N` and `CRIT_MAX` tune the policy.
* `EXT_W` in `turbo_pkg` is the extrinsic width.

## Files

* `rtl/turbo_pkg.sv`: widths, LLR types, trellis functions, stop reasons
* `rtl/turbo_dpm_top.sv`: decoder plus power manager, DVFS handshake
* `rtl/power_manager.sv`: the control policy
* `rtl/turbo_decoder.sv`: half-iteration control, memories, window boundaries
* `rtl/siso_maxlogmap.sv`: windowed radix-2 max-log-MAP unit
* `rtl/qpp_interleaver.sv`: incremental QPP address generator
* `rtl/hd_change_counter.sv`: convergence metric
* `rtl/ram_1r1w.sv`: synchronous one-read, one-write memory
* `rtl/ram_mp.sv`: memory with one synchronous read and one write port per SISO unit
* `tb/`: testbenches, reference models, and the DVFS behavioural model
