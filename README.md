# Dynamic scan clock control for test-per-scan BIST

Scan testing is usually run at a clock slow enough for the worst case, in
which every scan flip-flop toggles on every shift. Power is proportional to
activity times frequency, so most shifts, which move far fewer transitions
through the circuit, could run faster without ever exceeding the power budget.
This design measures the activity of the scan chains on chip while they shift
and changes the scan clock period shift by shift: every scan-in starts at the
slowest clock, the clock is stepped up as the chains fill with
non-transitions (adjacent equal bits), and stepped down again when
non-transitions leave the chains.

The RTL contains the complete control path (activity monitor, up-down
counter, frequency control, variable divider, clock multiplexer, reset
generator), the scan chains, and a test-per-scan BIST around them (LFSR
pattern source, signature register, controller). The combinational logic of
the circuit under test is not part of it: it connects through two ports.

## The idea in numbers

Let the circuit have N scan flip-flops, let the test vectors never exceed a
peak activity factor k (fraction of adjacent bit pairs that differ), and let
the scan clock have v possible speeds. The slowest clock, with period v·T
(T = period of the fast tester clock), is the one the power budget allows
for a chain holding k·N transitions. The i-th speed has period (v−i+1)·T, so
the ladder runs v·T, (v−1)·T, ..., T. With v = 8 and T = 10 ns that is 80, 70,
..., 10 ns.

A chain never holds fewer than N(1−k) non-transitions. Every further k·N/v
non-transitions buy one step up the ladder. Two XNOR gates watch each chain:

* across the first flip-flop: 1 when the bit entering equals the bit already
  at the head, a non-transition **entering** (`count_up`);
* across the last flip-flop: 1 when the two bits at the tail are equal, a
  non-transition **leaving** (`count_down`).

Their difference, summed over the shifts of one scan-in, is the change in the
number of non-transitions held in the chains since the scan-in began. Because
each scan-in starts at the slowest clock, under the assumption that the
captured response had the peak activity k, the clock is only ever as fast as
the non-transitions gained since then allow.

For vectors whose peak activity is 1 (k = 1) the captured response is assumed
to be all transitions, leaving non-transitions can be ignored, and the
output-side XNOR is dropped (`COUNT_DOWN_EN = 0`). Then a stream with no
transitions at all, fed into 1000 flip-flops with 8 speeds, shifts its first
125 bits at 80 ns, the next 125 at 70 ns, ... and the last 125 at 10 ns:
45 µs instead of 80 µs, a 43.75 % saving. For uniformly random activity
α_in the expected saving is about (1 − α_in)/2 − 1/(2v); in the general case
with a captured response of activity α_out it is about
(α_out − α_in)/(2k) − 1/(2v), and zero when α_in ≥ α_out.

## The level counter (`updown_counter`, `frequency_control`)

The two blocks together hold one number, the *level*:

    level = freq_step * THRESHOLD + count,   0 <= count < THRESHOLD

with `THRESHOLD = ceil(k*N/v)` (`dsc_pkg::step_threshold`; k is given in
percent as `ALPHA_PEAK_PCT`). On every shift the counter adds the number of
entering non-transitions and subtracts the number of leaving ones (two
population counts, `parallel_counter`, so that several chains can be
monitored at once). Then:

| sum = count + up − down | frequency step | count becomes | request |
|---|---|---|---|
| 0 ≤ sum < THRESHOLD | unchanged | sum | none |
| sum ≥ THRESHOLD, not fastest | +1 | sum − THRESHOLD | `speed_up` |
| sum ≥ THRESHOLD, fastest | unchanged | THRESHOLD − 1 | none |
| sum < 0, not slowest | −1 | sum + THRESHOLD | `slow_down` |
| sum < 0, slowest | unchanged | 0 | none |

With one chain this is a modulo-THRESHOLD up-down counter whose carry raises
and whose borrow lowers the clock step; with one chain and no count-down it
is exactly the modulo-125 counter of the example above. Saturating at the
fastest step throws surplus away, which is safe: the clock can only slow down
sooner. Saturating at the slowest step throws a deficit away, which is only
harmless if the captured response really had activity ≤ k, the assumption
the whole scheme rests on. The counter requires `THRESHOLD >= NUM_CHAINS`, so
that one shift never crosses more than one step.

`frequency_control` keeps `freq_step` (0 = slowest, `NUM_FREQ−1` = fastest)
and outputs the division ratio `NUM_FREQ − freq_step`.

## Producing the scan clock

`frequency_divider` counts fast-clock cycles and raises `tick` in the last
cycle of each period of `ratio` cycles; it also produces the divided clock
`div_clk`, one rising edge per period. It cannot divide by 1, so at the
fastest step `clock_mux` passes the fast clock itself. `reset_generator`
detects the rising edge of `scan_enable` and, for that one fast cycle, clears
the counter, the frequency step and the divider, so that every scan-in starts
at the slowest speed.

The whole design runs on the fast tester clock `clk_fast`. The scan flip-flops
are not clocked by the divided clock; they shift in every fast cycle in which
`shift_en` is high, which is the multiplexer's enable output gated by
`scan_enable` and suppressed in the reset cycle. One `shift_en` pulse is one
edge of the dynamic scan clock, and the same clock, `dyn_clk`, is brought out
for observation. Timing, in fast cycles:

* The reset cycle is the first cycle with `scan_enable` high. No shift happens
  in it; the first shift comes `NUM_FREQ` cycles after it.
* Each shift is followed by the next one after `NUM_FREQ − freq_step` cycles,
  where `freq_step` is the value after the update made at that shift. A change
  of speed therefore applies from the next bit on.
* At the fastest step a shift happens in every cycle. When the clock slows
  down from there, the divider restarts with the shift, so the first slower
  period is a full one.
* `dyn_clk` has one rising edge per shift. The one exception: if the previous
  scan-in ended at the fastest step, `dyn_clk` still shows the fast edge of
  the reset cycle, on which nothing shifts. The multiplexer is not glitch-free;
  nothing inside the design is clocked by `dyn_clk`.

## The BIST around it (`dsc_bist_top`)

Every flip-flop of the circuit under test, including flip-flops added at its
primary inputs and outputs, is a mux-D scan flip-flop in one of `NUM_CHAINS`
chains of `CHAIN_LEN` bits. `cut_stim` is the content of all of them (bit i of
chain c at index `c*CHAIN_LEN + i`, bit 0 next to the scan input) and drives
the combinational logic; `cut_resp` is that logic's response, loaded into the
same flip-flops on capture.

`bist_controller` runs a session after a one-cycle `start`:

1. `SCAN`: `scan_enable` high for `CHAIN_LEN` shifts. The LFSR advances on
   every shift and feeds the scan inputs (chain j takes LFSR bit 22−j). The
   scan outputs go into the signature register, except during the first pass,
   which only unloads the reset contents.
2. `SETTLE`: `scan_enable` low for one cycle; `cut_resp` must be stable from
   here on.
3. `CAPTURE`: `capture_en` high for one cycle; the response is loaded.
4. Back to 1 for the next vector, `NUM_PATTERNS` times, then one more scan
   pass unloads the last response, and the controller stops in `DONE` with
   `done` high and `signature` holding the result.

The LFSR and the signature register are 23-bit registers with the feedback
polynomial x^23 + x^18 + 1; the LFSR starts from `LFSR_SEED`, the signature
register from 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_CHAINS` | 1 | number of scan chains |
| `CHAIN_LEN` | 76714 | flip-flops per chain |
| `NUM_FREQ` | 512 | number of scan clock speeds v; slowest period v fast cycles |
| `ALPHA_PEAK_PCT` | 65 | peak activity factor k of the vectors, in percent |
| `THRESHOLD` | 98 | non-transitions per speed step, default ceil(k·N/v) |
| `COUNT_DOWN_EN` | 1 | subtract leaving non-transitions (k < 1); 0 for k = 1 |
| `NUM_PATTERNS` | 4 | vectors per BIST session |
| `LFSR_WIDTH`, `LFSR_TAPS`, `LFSR_SEED` | 23, 23'h420000, 23'h5A5A5A | pattern generator and signature register |

The defaults describe the largest configuration the scheme was evaluated
for: a benchmark SoC with 76714 scan flip-flops, 512 clock speeds and a peak
activity factor of 0.65. The 1000-flip-flop, 8-speed, k = 1 configuration of
the worked example is `CHAIN_LEN=1000, NUM_FREQ=8, ALPHA_PEAK_PCT=100,
COUNT_DOWN_EN=0` (threshold 125).

## Files

| file | contents |
|---|---|
| `rtl/dsc_pkg.sv` | controller state type, default polynomial, `step_threshold()` |
| `rtl/dsc_bist_top.sv` | top: BIST with dynamic scan clock |
| `rtl/dynamic_clock_ctrl.sv` | scan chains plus the whole clock control |
| `rtl/scan_chain.sv` | scan flip-flops |
| `rtl/activity_monitor.sv` | XNORs at the first and last flip-flop of each chain |
| `rtl/parallel_counter.sv` | population count |
| `rtl/updown_counter.sv` | level counter |
| `rtl/frequency_control.sv` | clock step and division ratio |
| `rtl/frequency_divider.sv` | variable divider |
| `rtl/clock_mux.sv` | divider / fast clock selection |
| `rtl/reset_generator.sv` | start-of-scan-in reset |
| `rtl/lfsr.sv`, `rtl/sar.sv` | pattern generator, signature register |
| `rtl/bist_controller.sv` | test-per-scan sequencer |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/dsc_ref_pkg.sv` | reference model used by the end-to-end testbenches |
| `tb/tb_dsc_bist_full.sv` | end-to-end run with every parameter at its default |
| `tb/tb_scan_in_time_sweep.sv` | saving against number of speeds and input activity |
| `tb/tb_iscas_bist_sizes.sv` | BIST sessions at seven benchmark circuit sizes |
| `tb/tb_t512505_activity.sv` | default-size controller with k = 0.65 at several input and output activities |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed number of cycles if the design hangs.

* `tb_dynamic_clock_ctrl` runs the 1000-flip-flop example: 1000 ones after an
  alternating chain take exactly 4500 fast cycles with the period of every
  single shift checked (8, 7, ..., 1 cycles in blocks of 125), alternating
  input takes 8000. A second instance (two chains of 24, 4 speeds, count-down
  on) is run against a reference model with random contents and activity.
* `tb_dsc_bist_top` runs a whole BIST session (two chains of 32, 8 speeds,
  k = 0.5, 12 patterns) against the reference model in `dsc_ref_pkg`: period
  of every shift, chain contents before each capture, signature, and counts of
  speed-ups, slow-downs, saturation at both ends and shifts at the fast clock,
  each required to happen.
* `tb_dsc_bist_full` does the same with all defaults: 76714 flip-flops, 512
  speeds, 4 patterns, about 165 million fast cycles, about 2.5 minutes in
  Verilator. With the testbench's model of the logic under test (response
  activity about 0.75 against LFSR activity about 0.5) the session spends
  16.2 % fewer cycles shifting than at a fixed slowest clock.
* `tb_scan_in_time_sweep` reproduces the random-vector study (1000 flip-flops,
  k = 1): 8 speeds give 43.8, 39.0, 34.1, 28.8, 24.3, 18.9, 14.6, 9.0, 4.8, 0,
  0 % for α_in = 0, 0.1, ..., 1; at α_in = 0.5 the saving grows from 12.6 %
  (4 speeds) to 24.1 % (128 speeds), within 2.5 points of the closed form.
* `tb_iscas_bist_sizes` runs 16-pattern BIST sessions (k = 1) at the scan
  lengths and speed counts of seven ISCAS89 benchmark circuits (8 to 2083
  flip-flops, 2 to 8 speeds). Whole-session savings: 5.3, 13.8, 14.1, 12.9,
  18.9, 18.8 and 18.8 %, against 7.5, 15.3, 13.6, 14.0, 19.0, 18.7 and 18.9 %
  reported for the same sizes with the real benchmark logic.
* `tb_t512505_activity` scans one vector into the default-size controller
  (76714 flip-flops, 512 speeds, k = 0.65, count-down on) after capturing a
  vector of chosen activity α_out. Savings for (α_in, α_out) = (0, 0.65),
  (0, 0.3), (0.3, 0.65), (0.3, 0.3), (0.5, 0.2): 49.8, 23.1, 26.5, 0.2 and
  0 %, each within 0.3 points of (α_out − α_in)/(2k) − 1/(2v) clipped at 0.
  About 2 minutes in Verilator.
* The remaining testbenches check each block alone, most of them against a
  model, with exhaustive or random stimulus.

Build and run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/dsc_pkg.sv tb/dsc_ref_pkg.sv tb/tb_dsc_bist_top.sv \
        --top-module tb_dsc_bist_top
    ./obj_dir/Vtb_dsc_bist_top

(`tb/dsc_ref_pkg.sv` is only needed by `tb_dsc_bist_top` and
`tb_dsc_bist_full`; other modules are found through `-Irtl`.)

## Where this design makes its own choices

* **Clock enable instead of a generated clock.** The chains shift on the fast
  clock with an enable; a silicon implementation that really clocks the
  chains with `dyn_clk` needs a glitch-free clock switch and clock-tree work
  that are not modelled here.
* **Level arithmetic of the counter.** The scheme states that the counter is
  reset to 0 after a speed-up and to the threshold after a slow-down; the
  table above is the consistent reading used here (a borrow continues at
  THRESHOLD−1), and with several chains the excess over a step is kept.
* **Linear speed ladder.** Periods v·T down to T in steps of T, with a
  loadable divider. A divider restricted to powers of two would give a
  different ladder.
* **Threshold rounding.** ceil(k·N/v) so a fractional threshold never speeds
  up early.
* **Capture and settle.** The controller drops `scan_enable` for two fast
  cycles and captures in the second. Capture is therefore at the fast clock.
* **LFSR and signature polynomial, seed, multi-chain hookup, number of
  patterns per session**: not fixed by the scheme; chosen as listed above.
* **Not included:** the logic of the benchmark circuits (ISCAS89, ITC'02) and
  any choice of the speed-up thresholds by power simulation; the threshold
  comes only from k, N and v.
