# Stochastic identification computer

This is synthesizable SystemVerilog for a process-identification computer built from
stochastic computing elements. It follows the design in the paper "Techniques of
Identification with the Stochastic Computer".

In a stochastic computer a number is not held in a register. It is the probability that a
logic line is ON at a clock edge. A multiplier is then a single gate, a weighted adder is a
random switch, and an integrator is an up/down counter. The price is precision: a value
known to one part in N needs about N² clocks of observation. What you get back is a machine
with very many small, independent, drift-free adjustable parameters working in parallel, and
that is what identification needs. On top of a set of such elements, the design builds four
identifiers:

* a **steepest-descent linear identifier**. It adjusts weights w_i so that Σ w_i X_i matches a
  process output Z, using dithered polarity-coincidence correlation;
* an **adaptive threshold logic element**. Its weights are small bounded integers, and it
  trains by random partial updates, which cannot lock into limit cycles;
* a **Bayes estimator and predictor**. It learns normalised likelihood ratios of binary
  events and multiplies them to predict another event;
* a **Markov model**. It learns the transition probabilities between state classes and then
  runs a random walk with them to answer "how likely is S_k within n steps" questions.

The top module `sc_identification_top` puts these side by side, together with a conversion
and arithmetic section (ramp converter → random line → multiplier/summers → ADDIE readout).
Every section has its own ports. The sections share only the clock and the reset.

## How numbers are carried

There are three codes, with V the full-scale value:

| code | lines | value |
|---|---|---|
| unipolar | 1 | p(ON) = E/V, 0 ≤ E ≤ V |
| ternary | UP, DOWN (`sc_pkg::tern_t`) | E/V = p(UP) − p(DOWN) |
| bipolar | 1 | p(ON) = E/2V + ½ |

The ternary code represents zero with no noise at all, because both lines stay OFF. That is
why it is preferred for small quantities such as an error signal. The bipolar code represents
zero as a fair coin, which is the noisiest case.

**Count to line.** Every stored count becomes a line in the same way: it is compared with a
uniformly distributed random number. `sc_d2s` is that comparator:

* **Unipolar/bipolar.** The line is ON when `rnd <= value`, with rnd uniform over
  1..2^W−1. A count k of an N+1 state store (N = 2^W−1) therefore gives exactly p = k/N: 0
  is never ON and N is always ON.
* **Ternary.** The sign bit of a two's-complement count picks UP or DOWN. The magnitude
  is compared with a (W−1)-bit random number. A negative count's magnitude is its ones'
  complement, so −1 and 0 both mean zero and the scale is symmetric.

**Noise source.** Each element that needs noise has its own `sc_lfsr`. This is a
maximal-length Galois shift register advanced a *whole word* (W shifts) per clock. This
matters more than it looks. A register advanced one shift per clock gives successive
numbers that are roughly halves of each other. Successive levels of every derived line are
then correlated, and the code assumes they are independent. In simulation, this correlation
visibly biased the Markov model's multi-step walks. Stepping a whole word per clock keeps
the full period 2^W−1 (the step count is chosen coprime to it) and removes that correlation.

## Elements

| module | what it does |
|---|---|
| `sc_inverter` | ×(−1): NOT of a bipolar line; exchange of UP/DOWN on a ternary pair |
| `sc_mult_and` | unipolar product (AND) |
| `sc_mult_xnor` | bipolar product (XNOR) |
| `sc_mult_ternary` | ternary product: UP = UU+DD, DOWN = UD+DU |
| `sc_summer` | λ·a + (1−λ)·b: a random flip-flop state is passed to a second flip-flop, which selects the input; λ = `lambda`/255 |
| `sc_summer_lv` | (a+b)/2 for bipolar lines with reduced variance: when the inputs disagree a toggle flip-flop alternates between them, so the disagreements are split exactly |
| `sc_integrator` | N+1 state counter with k inputs: up when all enabled inputs are ON, down when all are OFF; `hold` enables counting; stochastic output p = k/N, or with `SWITCH=1` a switching function (ON when the count ≥ mid-scale) |
| `sc_addie` | integrator with its inverted output fed back: the count settles at p(x)·N with a time constant of N clocks (measured 252–261 for N = 255). It is the estimator and the parallel ("outward") reading of any line. With independent random readout levels its variance would be p(1−p)/N. Here the noise source has period N and gives every level once per period, so the measured variance is about half of that |
| `sc_integrator_ternary` | signed counter stepping −2..+2 from two ternary inputs, with a ternary stochastic output |
| `sc_d2s` | count → line comparator (above) |
| `sc_ramp_adc` | digital half of a ramp converter: the ramp count goes to an external DAC, and the external comparator stops it. A conversion of level L takes L+1 clocks |
| `sc_sawtooth` | dither for the descent channels (below) |

All counters saturate at their end states. All registers use an active-low synchronous reset
(`rst_n`). Unipolar/bipolar integrators reset to mid-scale (p = ½), and ternary counters and
weights reset to zero. Outputs are combinational from registers, so every line changes only
at a clock edge.

## The steepest-descent identifier

`sc_descent_identifier` minimises the error E = Σ w_i X_i − Z. There is one
`sc_descent_channel` per weight. Each clock, a channel steps its weight counter (16 bits,
w = count/2^WF, WF = 10, so the range is ±32) by one of:

| `mode` | `amp` | rule | name |
|---|---|---|---|
| 0 | > 0 | −sgn(E+γ)·sgn(X+δ) | stochastic binary |
| 0 | 0 | −sgn(E)·sgn(X) | polarity coincidence |
| 1 | > 0 | −sgn(E)sgn(X)·[\|E\|>\|γ\|]·[\|X\|>\|δ\|] | stochastic ternary |

Mode 0 forms bipolar lines from E and X by comparing each with its dither. It multiplies them
with `sc_mult_xnor`, so every clock is a ±1 step. Mode 1 forms ternary lines and multiplies
them with `sc_mult_ternary`, so a step happens only when both magnitudes beat their dithers.
The minus sign is an `sc_inverter` in front of the `sc_integrator_ternary` that holds the
weight.

With dither uniform over the signal range, the expected step is proportional to E·X. This
linearises the sign-only correlator. In open-loop correlation, it removes the distortion
that sign-only correlation suffers with noisy or asymmetric signals. In the closed loop used
here, every method shares the same underestimate under noisy data (see below). The dither amplitude `amp`/16 blends continuously from
proportional behaviour to pure polarity coincidence at `amp = 0`.

**Independent dithers.** γ and δ must be independent of each other. Suppose δ came from
the same counter as the γ sawtooth, for example bit-reversed. Their joint pattern would
correlate the two comparator decisions and drive the weights to a wrong fixed point. So γ
is a sawtooth (a free-running 8-bit counter), and δ is the top byte of a 16-bit shift
register. Both are limited to the symmetric range ±127.

**Error summer.** The error is computed digitally and combinationally from the weights and
the current samples. The weight step therefore correlates E with the X that produced it;
registering E would pair it with the next sample and destroy the correlation. The original
design computes this sum with analog amplifiers whose gains the weight counts set. That
analog path is not part of this RTL.

**Measured convergence.** The test identifies Z = 1.5·X0 − 0.75·X1, with X uniform in
±40, starting from zero weights. The weights are averaged over the last 150 000 of 400 000
clocks:

| method | w0 | w1 | mean square error (LSB²) |
|---|---|---|---|
| stochastic ternary | 1.482 | −0.740 | 0.5 |
| stochastic binary | 1.43 | −0.73 | 3.3 |
| polarity coincidence | 1.491 | −0.741 | 0.5 |

At equal gain the stochastic binary method's weights wander most, because every clock is a
full step.

**Identifying a first-order process.** For the process 1/(a0 + a1·s), the identifier is
given these inputs:

* X0 = the process output y;
* X1 = its derivative dy/dt;
* Z = the process input u.

Since u = a0·y + a1·dy/dt, the weights converge to a0 and a1. `tb_workload_first_order`
simulates such a process with a0 = a1 = 1 and a time constant of 1000 clocks. It drives the
process with low-pass-filtered noise.

The gains of the three methods are matched roughly. For the stochastic methods, the knob is
the dither amplitude (`amp` = 4). A relay has no amplitude to adjust, so polarity
coincidence is slowed by enabling adaption on a random 4% of clocks. Each method then runs
three phases:

| phase | measured (over several random seeds) |
|---|---|
| noise-free convergence from zero | both weights within 0.001 of true (binary within 0.05) |
| step of a0 from 1 to 1.5 | 0.9 of the step covered in about 20 000 to 55 000 clocks; a1's estimate moves by at most 0.05 (binary 0.19, mostly its own wander) |
| uniform noise of 0.2 of each signal's peak added to Z, X0 and X1 | both weights underestimated, at 0.82 to 0.94 of true, for every method. The stochastic methods agree with a least-squares fit of the same noisy samples |

The stochastic binary method's final variance is 1.5 to 6 times that of stochastic
ternary. In this design, polarity coincidence with gated adaption is not the noisiest
method. Gating lowers its gain at all error sizes. A larger fixed step, needed to make a
relay method fast, would not lower it.

The noise bias is the same for all methods only when the signals are close to Gaussian.
Consider a process driven by piecewise-constant random levels. Its derivative is spiky and
far from Gaussian. With that input, polarity coincidence underestimates a1 noticeably more
than the stochastic methods do (about 0.55 of true against 0.72).

## Adaptive threshold logic

`sc_atl` outputs +1, 0 or −1 as S = Σ W_i X_i is ≥ θ, inside (−θ, θ), or ≤ −θ. Inputs are
ternary pairs (±1 or 0). The weights are integers limited to ±WMAX (default 2).

Training takes a target class and folds it in: V_i = target·X_i. When Σ W_i V_i ≤ 0, each
weight moves by V_i only if its own random bit φ_i is 1. A deterministic bounded-weight
rule can cycle forever on some pattern sequences. With the random subset there is always a
non-zero chance of moving closer to any solution, so convergence happens with probability
one.

In the test the target is sign(2x0 + x1 + x2 − x3). No weight vector limited to ±1 realises
it. From zero weights, the element reaches (2, 1, 1, −1) within a few passes over the 16
patterns.

**The limit cycle.** `tb_workload_atl_limit_cycle` shows why the random subset matters. The
four positive examples are:

* A = (1,1,1,−1);
* B = (1,−1,−1,1);
* C = (−1,1,−1,1);
* D = (−1,−1,1,1).

The weights (1,1,1,2) separate them, and those weights lie within ±2. A deterministic
bounded element, shown A B C D repeatedly from zero weights, adds every misclassified vector
whole. It passes through (1,1,1,−1), (2,0,0,0), (1,1,−1,1) and (0,0,0,2). It then cycles for
ever through (1,1,1,1), (2,0,0,2), (1,1,−1,2) and (0,0,0,2). The testbench runs that rule as a
reference and confirms that it never finds a solution. It then trains the stochastic element
in 40 trials from zero weights, each with a different random sequence. Every trial reaches
(1,1,1,2), after 12.8 passes of the cycle on average and 40 at worst.

## Bayes predictor: why the counters settle at likelihood ratios

An `sc_integrator` with several inputs counts up only when all of them are ON and down only
when all are OFF. It settles where the two probabilities are equal. Feeding back its own
inverted output, with output probability q, gives:

```
p(all other inputs ON)·(1−q)  =  p(all other inputs OFF)·q
⇒  q/(1−q) = p(others all ON) / p(others all OFF)
```

`sc_bayes_predictor` uses this three times:

* **L0 integrator** (an ADDIE on the event line e): q0 = p(E).
* **One integrator per event E_i.** Its inputs are e, NOT q0, and NOT its own output. It counts
  only while `est` is ON and E_i occurred. It settles at
  p_i/(1−p_i) = p(E|E_i)(1−p(E)) / (p(not E|E_i)·p(E)) = L_i, the normalised likelihood ratio.
* **Predictor.** Its inputs are q0, the p_i lines of the events that occurred (the others are
  masked out), and its own inverted output. It settles at r/(1−r) = L0·ΠL_i = L. This makes
  r the conditional probability of E under the assumption that the E_i are independent given E.
  With `ML_SWITCH=1` the feedback is left out and the output is a switching function. It is ON
  when L > 1, which is the maximum-likelihood prediction.

Measured behaviour, with p(E) = 0.3 and four events:

* each p_i comes within 0.03 of L_i/(1+L_i), its value from the true probabilities;
* prediction for two observed events gives 0.73 against 0.72 expected, and for one event
  0.34 against 0.30;
* the switching output is ON for every clock when L > 1 and never when L < 1.

## Markov model

`sc_markov_unit` holds NS counters for one state S_i. Their sum is always N = 255. One random
number r (1..N) is compared with the cumulative counts, so exactly one output line `tout[j]`
is ON, with probability c_ij/N. This is the one-of-NS form of the integrator: a transition
goes to one and only one next state.

Estimation applies the ADDIE rule with the feedback built in. The observed next state's
counter goes up if its line was OFF. The selected line's counter goes down if its input was
OFF. The sum is preserved exactly, so no saturation is needed, and c_ij/N tends to the
observed transition frequency.

`sc_markov_model` has one unit per state (S_0 stands for everything outside the modelled
set) and a one-hot register of state flip-flops:

* `est_valid` with `est_from`/`est_to` presents an observed transition;
* `load` puts the walk in `load_state`;
* while `run` is ON, each clock moves the walk to the state chosen by the current state's unit;
* per-state `visits` counters count the clocks a state flip-flop is ON;
* `reached` flags record the states seen since the last load.

Counting the runs whose `reached[k]` is set estimates the probability of reaching S_k from
S_i within the run length. In the test, 3000 three-step runs gave 0.494, against 0.500
computed from the learned counts. Counting the clocks of each run until `reached[k]` sets
gives the average path length. Over 1000 runs it measured 4.41 steps from S_1 to S_3,
against a mean first-passage time of 4.56 computed from the learned counts.

## Top level

`sc_identification_top` parameters (defaults):

* `W = 8`: integrator counts;
* `NCH = 2` descent weights, `EW = 8`-bit samples, `WW = 16`-bit weights, `WF = 10`,
  `AW = 4`;
* `NIN = 4` threshold-logic inputs;
* `NEV = 4` Bayes events;
* `NS = 4` Markov states.

Port groups by prefix: `adc_*`/`line_*`/`sel`/`addie_*`/`s_*` (conversion section), `id_*`,
`atl_*`, `by_*`, `mk_*`.

The analog parts stay outside:

* the DAC and comparator of the ramp converter. Their digital signals are ports: `adc_ramp`
  out and `adc_cmp` in.
* the narrow-strobe sampler of a high-bandwidth channel. It would sit in front of the
  comparator and has no digital signal of its own.
* the analog gains driven by the weight counts. The counts are outputs.

## Where this departs from the original

These points are not given by the original, so they are this design's choices:

* all widths and sizes (W, NEV, NS, the weight format);
* the noise-source polynomials and the whole-word stepping;
* the comparator convention and the ones'-complement ternary magnitude;
* saturation and reset values;
* the λ input of the summer and the gating of the low-variance summer;
* the digital dithers and their independence;
* the digital error summer;
* target folding and θ = 1 in the threshold element;
* the predictor's own feedback and its separate `predict` enable;
* the cumulative-compare Markov unit, its equal initial split, and the visit/reached
  instrumentation.

Only the three counter-based correlators of the original comparison are built. The other
three need analog multipliers: steepest descent, relay correlation and stochastic relay
correlation.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sc_pkg.sv \
    tb/tb_sc_identification_top.sv --top-module tb_sc_identification_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`tb_sc_identification_top` runs every section through a complete operation at the default
sizes in about a second:

* three conversions with ADDIE readings of the converted line, the product and both sums;
* threshold-logic training;
* Bayes estimation and prediction;
* Markov estimation and 500 runs;
* all three descent methods, each from reset.

It counts each mechanism and fails if one never happened. The statistical checks use
tolerances of a few standard deviations of the estimate.

Two further testbenches run the evaluations described above:

* `tb_workload_first_order` identifies the first-order process with all three methods, in
  about 2 s;
* `tb_workload_atl_limit_cycle` replays the threshold-logic limit cycle.

`sc_pkg.sv` holds the ternary type and the shift-register polynomial table. Compile it first.
