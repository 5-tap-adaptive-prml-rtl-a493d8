# 5-tap adaptive PRML read channel for high-density optical discs

A Blu-ray-class disc above 30 GB packs bits so tightly that the read-back
signal of one bit spreads over about five neighbours. A classic three-tap
PR(a,b,a) target no longer describes that signal well. This design detects
the bits against a five-tap partial-response target, **PR(a,b,c,d,e)**.
It also keeps three things adapting while it reads:

* an **11-tap FIR equalizer**, trained by LMS, that shapes the sampled RF
  signal towards the target;
* a **ten-state Viterbi detector** that picks the most likely bit sequence,
  comparing each sample with **sixteen reference levels**;
* a **channel identifier** that moves those sixteen levels, one per sample,
  towards what the channel actually produces. The levels are therefore not
  fixed multiples of a, b, c, d and e.

The RTL is synthesizable SystemVerilog that runs at one RF sample and one
detected bit per clock, the recovered channel-bit clock.

```
               +-------------------------+  eq_out  +------------------+
 rf_in ---+--->|   adaptive_equalizer    |--------->| viterbi_detector |---+--> bit_out
  (ADC)   |    |  FIR + LED + LMS        |          | 16 BMC, 10 ACS,  |   |
          |    +-------------------------+          | path memory      |   |
          |         ^ 16 levels   ^ vd_bit          +------------------+   |
          |         |             |                     ^ 16 levels        |
          |    +----+-------------+---------------------+---+              |
          +--->|            channel_identifier              |<-------------+
               +--------------------------------------------+
```

The detected bit stream (`bit_out`) feeds back into two places: the
equalizer's level error detector and the channel identifier. Both also need
a delayed copy of their input signal, so that the signal and the decisions
describe the same instant. Most of the care in this design goes into those
delays (see *Timing*).

## The trellis and the sixteen levels

Write a bit as +1 or -1. A PR(a,b,c,d,e) sample is

    y(k) = a*x(k-4) + b*x(k-3) + c*x(k-2) + d*x(k-1) + e*x(k)

so it depends on five consecutive bits. The disc code has a **minimum run
length of 2T**: a bit never stands alone between two bits of the other sign.
Of the 32 five-bit windows, only 16 obey that rule. Each of them is one
reference level. In the RTL they are numbered 0..15 in this order, and in
the names below a "1" is +1 and the first bit is the oldest:

| # | name | bits  | ideal value   | # | name | bits  | ideal value    |
|---|------|-------|---------------|---|------|-------|----------------|
| 0 | PA8  | 11111 | a+b+c+d+e     | 8 | NA1  | 01111 | -a+b+c+d+e     |
| 1 | PA7  | 11110 | a+b+c+d-e     | 9 | NA2  | 01110 | -a+b+c+d-e     |
| 2 | PA6  | 11100 | a+b+c-d-e     |10 | NA3  | 01100 | -a+b+c-d-e     |
| 3 | PA5  | 11001 | a+b-c-d+e     |11 | NA4  | 00111 | -a-b+c+d+e     |
| 4 | PA4  | 11000 | a+b-c-d-e     |12 | NA5  | 00110 | -a-b+c+d-e     |
| 5 | PA3  | 10011 | a-b-c+d+e     |13 | NA6  | 00011 | -a-b-c+d+e     |
| 6 | PA2  | 10001 | a-b-c-d+e     |14 | NA7  | 00001 | -a-b-c-d+e     |
| 7 | PA1  | 10000 | a-b-c-d-e     |15 | NA8  | 00000 | -a-b-c-d-e     |

A **state** is the last four bits. Ten of the sixteen four-bit words are
legal: 1111, 1110, 1100, 1001, 1000, 0111, 0110, 0011, 0001, 0000. A branch
from state `q` to state `s` carries the window `{q[3], s}`, so every branch
has exactly one of the sixteen levels. Six states can be reached from two
predecessors and four from only one (1001, 1000, 0111 and 0110). This gives
6×2 + 4 = 16 branches. `prml_pkg` derives the whole structure from the state
list with constant functions (`pred_index`, `branch_level`,
`pat_to_level`), so the generate loops build the trellis with no
hand-written wiring table.

## Viterbi detector

* **Branch metrics** (`bmc`, 16 instances). Each one computes |EQ out − L_i|
  by forming both x−y and y−x and selecting the non-negative one. The
  detector uses absolute distance, not squared distance.
* **Add-compare-select** (`acs`, 10 instances). Sum 1 is the metric of the
  predecessor whose oldest bit is 1, plus its branch metric. Sum 0 is the
  same for the predecessor whose oldest bit is 0. The MSB of sum1 − sum0
  selects the smaller sum, and the same bit is `sel`, the survivor
  decision. For example, state 1111 compares SM_1111 + |y − PA8| with
  SM_0111 + |y − NA1|. For the four single-predecessor states `sel` is
  constant 1. Synthesis therefore reports four of the ten `sel` outputs as
  constant.
* **Metric normalization.** The metrics only grow. When every registered
  metric has its MSB set, the next update clears that MSB in all ten, which
  subtracts 2^(SM_W−1) from each, and `norm` pulses. The metrics differ by
  at most a few branch metrics, so with `SM_W = 14` and 9-bit branch
  metrics no sum can wrap. An assertion in `acs` checks this.
* **Path memory** (`path_memory`, register exchange). Each state holds an
  n-bit survivor. Every cycle, each state loads its chosen predecessor's
  survivor, shifted up by one, with the state's own newest bit entering at
  bit 0:

      Q_1111 <= sel_1111 ? {Q_1111[n-2:0], 1} : {Q_0111[n-2:0], 1}
      Q_0111 <= {Q_0011[n-2:0], 1}

  The bit pushed out of state 1111's survivor is registered and becomes
  `bit_out`. The output always comes from state 1111, not from the state
  with the best metric. With n = 32 the survivors have merged long before
  that point.

## Adaptive equalizer

`fir_filter` is a direct-form 11-tap filter. Its output is rounded to the
nearest integer and saturated to 8 bits. `level_error_detector` shifts the
detected bits into a 4-stage register (VD out[4:1], with VD out[0] the bit
arriving now). It uses those five bits to pick one of the sixteen levels
through a 16:1 multiplexer, and subtracts the equalizer output delayed to
the same sample:

    eps = L(VD out[4:0]) − EQ out(delayed)

If the five bits break the 2T rule (possible only just after reset), the
error is flagged invalid and no update happens. `lms_calculator` applies

    W(k+1) = W(k) + 2·mu·eps·X(k)

to all eleven weights every valid cycle. X(k) must be the tap vector that
produced the EQ sample eps belongs to. That sample is `VD_LAT + 1` cycles
old by the time eps exists, so `adaptive_equalizer` keeps a longer input
history and hands the LMS the slice `VD_LAT + 2` samples back. This makes
it a delayed LMS. With a small gain it converges like plain LMS.

## Channel identifier

`channel_identifier` uses the same five-bit window to select one level per
sample. It moves only that level:

    L(k+1) = L(k) + (x − L(k)) / c,   c = 2^ci_shift

The data `x` is the **sampled RF input**, not the equalizer output. It is
delayed so that its main response lines up with the decisions. The levels
therefore follow the raw channel, and the equalizer then shapes its output
towards those levels. Each level keeps 8 fraction bits, and the integer
part drives the detector and the level error detector. At reset the levels
hold the ideal values for PR(10,20,28,18,8), a placeholder target, set by
the parameters `PR_A..PR_E`.

## Timing

Everything runs at one sample per clock. Latencies, counted from the cycle
a value is on an input to the cycle the result is on an output:

| path | cycles |
|------|--------|
| `rf_in` → `eq_out`, tap 0 | 2 (tap register + output register) |
| `eq_in` → `bit_out` of the detector (`VD_LAT`) | `PM_LEN + 1` = 33 |
| EQ sample → its level error `err` | `VD_LAT + 1` = 34 |
| `rf_in` → channel identifier data (`RF_DLY`) | `VD_LAT + 2 + NUM_TAPS/2` = 40 |
| RF sample carrying a bit's main response → that bit on `bit_out` | `PM_LEN + 3 + NUM_TAPS/2` = 40 |

`prml_top` computes these delays from `PM_LEN`. If you change a latency
inside a unit, change the matching delay here too.

`bit_out` is the newest bit of the window the loop locks onto. A channel
whose peak sits on a different tap can make the loop lock one sample
earlier or later. The bit stream is then correct but shifted by one cycle
(the tilt sweep shows this), and a downstream demodulator absorbs the shift
through its sync patterns.

## Number formats and parameters

| item | format | where set |
|------|--------|-----------|
| RF sample, EQ out, levels | 8-bit signed, 1 LSB = 1 ADC step | `prml_pkg` |
| level error | 9-bit signed | `ERR_W` |
| tap weight | 16-bit signed, 10 fraction bits (1.0 = 1024), start 1.0 on tap 5 | `COEF_W`, `COEF_FRAC` |
| weight accumulator | 24 bits (8 extra fraction bits), saturating | `ACC_EXTRA` |
| LMS gain | 2·mu = 2^−(mu_shift + 18) per ADC-step², input `mu_shift` | run time |
| identification gain | c = 2^ci_shift, input `ci_shift` | run time |
| branch / state metric | 9 / 14 bits unsigned | `BM_W`, `SM_W_DEF` |
| path memory length n | 32 | `PM_LEN` |

Top-level ports: `rf_in`, `mu_shift`, `ci_shift`, `eq_adapt_en`,
`ci_adapt_en` in; `bit_out` (1 = +1), `eq_out`, `levels`, `coef`,
`lvl_err`/`lvl_err_valid`, `norm` and `sel` out. The outputs other than
`bit_out` are there for monitoring. Reset is asynchronous and active low.
At the default sizes the design synthesizes to roughly 1600 flip-flops and
500 word-level cells.

## What follows the source architecture, and what is chosen here

Taken from the architecture: the PR(a,b,c,d,e) target with a 2T minimum
run length; the 16 levels and their names and order; the 10-state trellis;
the BMC, ACS and register-exchange path-memory structures, including output
from state 1111; the level error detector (a 16:1 level multiplexer driven
by the last five bits, level minus delayed EQ out); the 11-tap FIR with
LMS; a channel identifier that updates one level per sample with
L + d/c, using the RF input and the detected bits.

Chosen here, because the architecture leaves it open:

* all word widths, the rounding and saturation, and the reset values;
* what counts as overflow (all ten metric MSBs set) and the normalized
  value (the metric minus 2^(SM_W−1));
* mu and c as powers of two set by input pins;
* the alignment delays and the delayed-LMS tap history;
* the start levels PR(10,20,28,18,8) and n = 32;
* in the branch metric, steering the multiplexer by the sign of x−y.

Two points where the architecture could be read more than one way:

* The conventional detector it starts from uses trace-back. The proposed
  one is built here with register exchange, following its path memory
  selector.
* The LMS update is drawn once without the error term. The update here
  includes it, as in W + 2·mu·eps·X.

The analog RF front end, the ADC, the clock-recovery PLL and the data
processor downstream (demodulator, ECC) are outside this RTL. `rf_in` and
`bit_out` are where they connect.

## Verification

Each unit has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_bmc` | exact \|x−y\| over corners and random pairs |
| `tb_acs` | minimum selection, tie rule, normalization, single-predecessor mode, register timing |
| `tb_path_memory` | cycle-exact match with an independent survivor model under random selects |
| `tb_viterbi_detector` | error-free detection of ideal levels, clean and with ±4 noise; latency exactly `PM_LEN+1`; normalization and both survivor choices occur |
| `tb_fir_filter` | exact convolution, rounding and saturation; 2-cycle latency |
| `tb_level_error_detector` | level selection from the 5-bit window, sign, delay, invalid-pattern flag |
| `tb_lms_calculator` | bit-exact weight update with gains, enables and saturation |
| `tb_adaptive_equalizer` | LMS convergence on an echo channel with genie decisions (mean \|eps\| falls from about 5 to about 1.2; under 1% of late samples more than 4 off their level) |
| `tb_channel_identifier` | only the selected level moves, by (x−L)/c; all 16 converge to within 1 of the channel's levels |
| `tb_prml_top` | full design at default parameters: adaptation off, then on, over a 7-tap channel unlike the start levels; no errors in 20000 measured bits at latency 39 (sampled one cycle after the edge); counts LMS and level updates, normalization, both survivor choices and an invalid pattern |
| `tb_prml_tilt_sweep` | BER of the full design over nine steps of a tilt-like lean plus neighbour-track crosstalk |

The tilt sweep uses its own channel model, which leans the response and
adds crosstalk. It is a stand-in for disc tilt, not measured disc data.
Result: no errors in 20000 bits for steps −3..+3, and one error (5·10⁻⁵)
at ±4. The curve is U-shaped and stays under a 2·10⁻⁴ BER target over the
inner range.

To run a testbench with Verilator 5:

```
verilator --binary --assert --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/prml_pkg.sv tb/tb_prml_top.sv --top-module tb_prml_top -o sim
./obj_dir/sim
```

`tb_prml_top` runs the default configuration end to end in well under a
second.
