# Analog-assisted neural branch predictor

A perceptron-style branch predictor normally needs a wide dot product for every
prediction: add or subtract more than a hundred small weights, each scaled by how
much it matters. Built from adders and multipliers, that is too slow and too
power-hungry for a fetch stage. The idea behind this design is to leave the weights in
ordinary digital SRAM and do only the dot product in the analog domain. Each weight
drives a small current-steering DAC. The DAC's output current goes onto one of two
shared wires, a positive line and a negative line, so Kirchhoff's current law does
the additions for free. A comparator then decides which line carries more current,
and that decision is the prediction. Each weight's coefficient is built into the
transistor widths of its DAC, so the scaling costs nothing at run time.

This repository is a synthesizable SystemVerilog model of the whole predictor. The
analog part (the DACs, the summing lines and the comparators) is modelled as exact
integer arithmetic in units of the DAC unit current. That is how the circuit behaves
when its transistors are ideal and linear. Table lookup, history handling, training
and threshold adaptation are ordinary digital logic. Scan access for testing the
analog unit is also included.

## How a prediction is formed

The predictor uses h = 128 correlating weights plus one bias weight (129 columns).

| Table | Weight columns | Rows | Bits per weight | Indexed by |
|---|---|---|---|---|
| bias | 0 | 2048 | 7 | pc mod 2048 |
| 0 | 1..8 | 512 | 7 | (hash(A[1..8]) xor pc) mod 512 |
| 1..6 | 9..56 | 256 | 7 | (hash(A[8t+1..8t+8]) xor pc) mod 256 |
| 7..15 | 57..128 | 256 | 6 | same |

The tables hold 239,616 bits (29,952 bytes), which is within a 32 KB budget.

- **Path and outcome history.** `H` holds the 40 most recent branch outcomes
  (`H[1]` is the newest; 1 = taken). `A` holds the two lowest address bits of each of
  the 128 most recent branches, aligned with `H`.
- **Indices** (`index_hash`). Each correlating table is indexed by a hash of the eight
  addresses in its block of `A`, XORed with the PC of the branch being predicted.
  Because the PC is part of every index, the weights are chosen for this branch in
  particular. The price is that the lookup cannot start early ("ahead pipelining").
  The hash only routes bits: index bit b is address bit b/8 of entry
  `A[8t+1 + b mod 8]`.
- **Redundant history** (`history_select`). The 128 weights need 128 history bits,
  but only 40 are stored. Block t (weights 8t+1..8t+8) uses `H[1..8]` when t is odd,
  and `H[1+2t..8+2t]` when t is even. Recent outcomes are therefore used many times,
  and the oldest outcome read is `H[36]`.
- **Dot product** (`cs_dac`, `dac_array`). Weights are sign-magnitude. Multiplying by
  a history bit of ±1 only changes the sign. Each DAC therefore switches its magnitude
  current onto the positive line when `sign XOR history` is 1, and onto the negative
  line otherwise. The bias DAC multiplies by +1.
- **Decision** (`pred_comparator`). The prediction is taken when the positive line is
  at least the negative line. A second comparison produces the training signal. It is
  high when |positive − negative| is no larger than the training threshold θ.

## The coefficient DACs

Weights for recent history correlate more strongly with the outcome than older ones.
Each column c therefore gets a coefficient f(c), which falls roughly as
1/(a + b·c). It is realised through transistor widths: bit b of the magnitude
switches a current of `width(c, b) · I_u`.

Published widths exist for seven columns only. All of them come out of one rule:

    width(c, b) = round( S(c) · 2^b / 32 )      (halves round up)

Here S(c) is the full-scale value of column c:

| c | 0 | 1 | 2 | 3 | 10 | 20 | 128 |
|---|---|---|---|---|---|---|---|
| S(c) | 32 | 30 | 26.25 | 21.25 | 13.75 | 9.25 | 8 |

For example, column 10 has widths 0, 1, 2, 3, 7, 14 for bits 0..5. A width of 0 means
the transistor is left out. For the other columns this design interpolates S linearly
between the anchors and rounds it to quarter units. The function `dac_width()` in
`anp_pkg` computes this while the design elaborates, so no table is stored.

This interpolation is this design's own choice, not a published curve. It shapes every
prediction, so change `dac_scale_q()` if you have real widths.

Weights in columns 57..128 have 6 bits: a sign and a 5-bit magnitude. They are fed to
their DAC as the upper five magnitude bits (DAC bits 1..5), with DAC bit 0 at zero.
This is also this design's choice. At these columns the bit-0 transistor rounds to
width 0 anyway.

The total line current is at most 2511 `I_u`, so the 14-bit line sums cannot
overflow.

## Training and the adaptive threshold

Each update carries the actual outcome, plus the prediction and training signal that
were returned for that branch. The weights are trained when the branch was
mispredicted or the training signal was set. Every weight that took part is
incremented when its history bit equals the outcome and decremented otherwise. The
bias weight moves toward the outcome. `weight_trainer` is a row of saturating
sign-magnitude up/down counters, clamped at ±63 for 7-bit weights and ±31 for 6-bit
weights. A negative zero is never written.

θ adapts in the O-GEHL style (`adaptive_threshold`):

- A 7-bit signed counter goes up on each misprediction.
- It goes down on each correct prediction whose output did not exceed θ.
- When the counter would overflow, θ rises by one; when it would underflow, θ falls by
  one. In both cases the counter restarts at 0.

The aim is to train about as often after correct predictions as after wrong ones. θ
starts at 70 current units. That starting value is this design's own choice.

Training does not store anything from prediction time. The update recomputes the
indices and history bits from the *committed* history. For any branch that was not
squashed, the committed history equals the speculative history that was used when
the branch was predicted. The rows are read on a second read port of each table and
written back one cycle later.

## Timing and interface (`anp_predictor`)

| Cycle | Prediction | Update |
|---|---|---|
| 0 | `pred_req && pred_ready`: indices from the speculative history; rows read | `upd_valid && upd_ready`: the committed history shifts in the outcome; θ adapts; a misprediction restores the speculative history; if training is due, rows are read |
| 1 | The DAC array settles; the comparators latch at the end of the cycle; the speculative history shifts in the predicted outcome | Trained rows are written; `upd_ready` is low |
| 2 | `pred_valid`, `pred_taken`, `pred_train` | |

Only one prediction can be in flight. `pred_ready` is low in any of these cases:

- a prediction is in cycle 1;
- trained rows are being written;
- `test_mode` is high;
- the reset sweep is running;
- a mispredicted update is accepted in the same cycle.

The reset sweep writes zero to every row and takes 2048 cycles; `init_done` goes high
when it ends. The circuit is meant to settle in about 200 ps, so a whole cycle for the
DAC array and comparator matches a 5 GHz clock.

Rules for the user:

- Updates must arrive in program order, each with its own `pred_taken` and
  `pred_train`.
- After a misprediction, discard any younger predictions and request them again. The
  speculative history has already been restored.
- A prediction and a correct update may fire in the same cycle. The prediction then
  sees the weights from before that update.

The pipeline, the handshakes, the reset sweep, the two-read-port tables and the
recomputation of indices at update time are all this design's own choices.

## Testing the analog unit (`dac_scan_test`)

With `test_mode` high, a 1032-bit scan vector drives the DAC array instead of the
tables and the history. The vector holds 129 × 7 weight bits, then 128 history bits,
then an expected prediction bit; it is shifted in bit 0 first while `scan_en` is high.

- A `scan_capture` cycle stores the comparator's decision. That decision is the first
  bit shifted out on `scan_out` during the next load.
- A capture that disagrees with the expected bit increments `scan_mismatches`. A part
  passes when this count stays acceptably low.

The chain order and the counter are this design's own choices.

## What is not modelled

- **The analog parts behave ideally.** The current-to-voltage resistors and the
  preamplifier are not modelled; they are monotonic, so the comparator compares the
  currents directly. Mismatch, noise and transistor non-linearity are not modelled
  either; on real silicon they make the comparison somewhat noisy. Ties predict taken.
- **The coefficient DAC widths of 122 columns are interpolated.** See the section on
  the coefficient DACs above.
- **The loop predictor is not included.** The full predictor adds a 256-entry loop
  predictor taken from another design, which is not specified well enough to build.
- **Flash weight storage is not included.** Storing weights in multi-level flash
  cells is only a future option.

## Files

| File | Content |
|---|---|
| `rtl/anp_pkg.sv` | geometry, weight type, table sizes, DAC width function |
| `rtl/anp_predictor.sv` | top level |
| `rtl/weight_table.sv` | SRAM, one per table (17 instances) |
| `rtl/index_hash.sv`, `rtl/history_select.sv` | index and history routing |
| `rtl/path_history.sv` | speculative and committed H and A |
| `rtl/cs_dac.sv`, `rtl/dac_array.sv` | DAC and summing-line model |
| `rtl/pred_comparator.sv` | prediction and training comparators |
| `rtl/weight_trainer.sv`, `rtl/adaptive_threshold.sv` | training |
| `rtl/dac_scan_test.sv` | scan access |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator
(5.x), from the repository root:

    verilator --binary --timing --assert -Irtl rtl/anp_pkg.sv rtl/*.sv \
        tb/anp_predictor_tb.sv --top-module anp_predictor_tb -o sim
    ./obj_dir/sim

`anp_predictor_tb` runs the top at its default sizes and checks every prediction, and
θ, against its own reference model. It runs 80,000 branches. The first 4,096 are a
warm-up of 256 always-taken branches on fresh table rows, which drives θ down. The rest
come from a synthetic 16-branch program made of loop-like, history-correlated, biased
and random branches; the random ones behave like loops in the first and last thirds
of the run. The
requests mix three orders: plain, a prediction issued before the previous branch is
updated, and an update issued together with the next prediction. At the end it scans
40 vectors through the test chain. The test also counts each mechanism and fails if
any of them never happened:

- stalls on either port;
- history restores and wrong-path squashes;
- both reasons for training;
- θ rising and falling;
- weight saturation;
- the reset sweep;
- scan mismatches.

It takes a few seconds. The unit testbenches check `cs_dac` against the published
widths and the other blocks against models written from the algorithm.

No real branch traces were run, so the prediction accuracy of this RTL has not been
measured.
