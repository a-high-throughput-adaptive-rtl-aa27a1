# Pipelined DLMS decision feedback equaliser with 2-SPT input data

A HIPERLAN receiver at up to 23.5 Mb/s sees severe intersymbol interference
indoors, so it needs an adaptive equaliser. A decision feedback equaliser (DFE)
trained with LMS is cheap enough, but at this rate its loops are the problem:

* **The weight-update loop.** Each weight update needs the error of the current
  output. That error needs the whole filter sum first.
* **The decision loop.** Each output needs the decision just made on the one
  before it.

This design removes both limits, using two ideas from the paper *A High
Throughput Adaptive DFE for HIPERLAN*:

1. **Delayed LMS (DLMS).** The weights are updated with the error from
   D = L samples ago. That delay lets the equaliser be cut into L identical
   processing modules (PMs) with registers between them. The clock period is
   then set by one PM, not by the whole filter.
2. **2-SPT input data.** Every received sample is coded once, at the input, as
   the sum of two signed powers of two. Every multiply by a data value then
   becomes two barrel shifters and an adder. Decisions and training symbols are
   ±1±j, so they need only one power-of-two term.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It takes one
complex sample and gives one equalised output per clock.

## The equation being computed

With x_f the received samples and d the decisions (or training symbols), the
equaliser computes for output index m:

    y(m) = sum_{k<L} x_f(m-k) conj(w_f[k])  +  sum_{k<L} d(m-1-k) conj(w_b[k])
    e(m) = d(m) - y(m)
    w_f[k] += beta * x_f(j-k)   * conj(e(j))
    w_b[k] += beta * d(j-1-k)   * conj(e(j))

The weights used for y(m) include the updates from every error e(j) with
j <= m-L-1. This is LMS with the update delayed by D = L samples.
`tb/dfe_tb_pkg.sv` (class `DfeRef`) is exactly this equation written directly.
The end-to-end testbenches compare the hardware against it bit for bit.

## How the pipeline is cut

The trick is to get these equations into a chain of identical modules. The
only global wires should be a few narrow ones.

```
 x_f(n) --> [2-SPT] --+--> PM0 --> PM1 --> ... --> PM(L-1) --> y(n-L) --+--> slicer --+
                      |    ^ ^      ^ ^              ^ ^                |             |
          L-stage     |    | |      | |              | |             error <-- d(n-L) <-+ (or training symbol)
          delay  ---->+ x_f(n-L)    | |              | |                |
                           e(n-L) <-------------------------------------+
          d(n-L) -------> every PM (feedback filter input)
          d(n-2L) ------> every PM (feedback weight update), L-stage delay of d(n-L)
```

Each signal has a fixed rate through the chain:

| signal | enters PM 0 as | delay per PM | role in PM i |
|---|---|---|---|
| feedforward data | x_f(n) | 2 cycles | x_f(n-2i), multiplied by w_f^i |
| update data | x_f(n-L) | 2 cycles | x_f(n-L-2i), for the w_f^i update |
| partial sum | 0 | 1 cycle | y_{i-1}(n-i) in, y_i out |
| error | e(n-L) | 1 cycle | e(n-L-i), for both updates |
| decision | d(n-L) | broadcast | multiplied by w_b^(L-1-i) |
| delayed decision | d(n-2L) | broadcast | for the w_b^(L-1-i) update |

The data moves two cycles per module and the partial sum one. So the partial
sum for output m meets x_f(m-i) and w_f^i in PM i (transposed form). All
feedforward weights are then used at the same effective time, as eq. (5) of
the paper requires.

The feedback weights are stored in **reverse** order: PM i holds
w_b^(L-1-i). The partial sum picks up the newest decision, d(n-L), in the last
PM, and older decisions in earlier PMs. Because of the reversal, the error a
PM needs for its feedback weight is the same one it already has for its
feedforward weight. The datum that multiplies it, d(n-2L), is the same for all
PMs. So the error travels down the chain beside the data, and only two
2-bit decisions are broadcast.

The decision loop still closes in one cycle. It runs from the last PM's
output register through the slicer (two sign bits) and a ±w_b selection into
the adder of the last PM. The slicer costs nothing, and the feedback multiply
is a sign flip.

## Inside one processing module (`dfe_pm`)

Each PM has six products (M1 to M6) and three adders (A1 to A3), all complex.

| unit | computes |
|---|---|
| M1 | x_f(n-L-2i) · conj(e) |
| M2 | beta as a right shift |
| A1 | accumulates w_f |
| M3 | x_f(n-2i) · conj(w_f) |
| M4 | d(n-L) · conj(w_b) |
| A2 | y_in + M3 + M4, registered as y_out |
| M6 | d(n-2L) · conj(e) |
| M5 | beta as a right shift |
| A3 | accumulates w_b |

Every product is a `spt_cmul_conj`: four `spt_shift_mul` barrel shifter
multipliers and two adders. The ±1±j decisions go through the same multiplier,
coded as a single power-of-two term with exponent FRAC_X (1.0 in the data
scale). So M4 and M6 are the same unit as M1 and M3 with one term instead of
two. The critical path of a PM is M6 → M5 → A3, or equally M1 → M2 → A1.

## 2-SPT coding of the input (`spt_quantiser`)

A sample x (8-bit two's complement) is replaced by s1·2^g1 + s2·2^g2, with
s ∈ {−1, 0, +1} and g ∈ 0..7. Each term is the nearest power of two to what
is left, with ties going to the larger power. The rule is the bit just below
the leading one: if it is set, round up. This greedy rule reaches the smallest
possible error of any 2-term code for every 8-bit input:

* 88 of the 256 values are exact.
* The worst error is 8, at x = ±88 and ±104.

The test checks this exhaustively against a brute-force search. A term is
coded as `pot_t {nz, neg, exp[2:0]}`.

## Number formats

| quantity | width | fraction bits | notes |
|---|---|---|---|
| input sample x | 8 (`IN_W`) | `FRAC_X` = 5 | 1.0 = 32, range ±4 |
| weights, error | `W` = 16 | `W_FRAC` = 13 | range ±4, saturating |
| output y | `W + 7 + 3 + clog2(2L)` (30 at L=8) | W_FRAC+FRAC_X | exact sums, no overflow |
| beta | — | — | 2^-`MU_SHIFT`, default 2^-4 |

The error is (d − y) shifted right by FRAC_X (truncating) and saturated to W
bits. The weight update is (x · conj(e)) >>> (FRAC_X + MU_SHIFT), truncating,
added with saturation. Weights reset to zero.

## Interface of the top (`dlms_dfe`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `x_re`, `x_im` | in | 8 | received sample x_f(n) |
| `mode` | in | `sym_mode_e` | SYM_IDLE / SYM_TRAIN / SYM_DATA for this sample's symbol |
| `train_sym` | in | `qpsk_t` | training symbol for this sample index (1 = −1 per component) |
| `y_re`, `y_im` | out | Y_W | equaliser output y(n−L) |
| `y_mode` | out | 2 | mode of that output |
| `dec` | out | `dec_t` | reference symbol used for it (decision or training symbol) |
| `e_re`, `e_im`, `e_sat` | out | W, 1 | error e(n−L), and a flag when it was clipped |
| `wf_re/wf_im` | out | L×W | w_f^i, index i = PM |
| `wb_re/wb_im` | out | L×W | w_b^(L−1−i), index i = PM (reversed) |

The three modes do the following:

* **SYM_TRAIN.** The training symbol is the reference d, for both the error
  and the decision feedback, and the weights adapt.
* **SYM_DATA.** The slicer decision is d and the weights are held. This is
  the "train on the header, then freeze for the data blocks" use.
* **SYM_IDLE.** No symbol is present: the decision feeds back as zero and
  nothing adapts. Use it to start, flush or pause the stream.

The mode and the training symbol travel with their sample through an L-stage
delay, and the error carries an update-enable bit down the chain. So a switch
between training and data takes effect exactly at the symbol it was given
with, even while updates from earlier symbols are still in flight.

The alignment of `train_sym` is the user's job. It is the symbol wanted for
output index n, usually the symbol sent a fixed number of samples earlier (the
decision delay). With the 3-tap test channel, a delay of 2 works for L = 3 and
3 for L = 8.

## Timing

* Output y(m) leaves the output register **L cycles** after x_f(m) went in.
* After reset, the first output whose feedforward window holds L real
  samples, y(L−1), appears **2L−1 cycles** after the first sample, which is
  the latency the paper gives.
* One sample per clock, with no stalls. The pipeline always runs; gaps are
  IDLE samples.

Both latencies are checked in the end-to-end tests.

## Step size and stability

With the default beta = 2^-4 the (3,3) equaliser converges well. On a channel
with eigenvalue spread 46.8 at Eb/N0 = 20 dB, it reaches a complex MSE of 0.067
after 500 training symbols (about −1.5 in log10 of the per-component MSE), and
makes no decision errors on the data that follows.

At the default L = 8 (8+8 taps), the same step size **diverges**. The
±1±j feedback taps alone give a beta·(tap power) of 8·2·2^-4 = 1, and the
8-sample update delay tightens the stability limit further. At L = 8 use
`MU_SHIFT = 5`: it converges to 0.056 with no data errors. Treat this as a
real design rule: when you raise L, lower beta.

## Verifying and simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog, and each is self-checking against independently computed values.

| testbench | what it checks |
|---|---|
| `tb_spt_quantiser` | all 256 inputs: optimal 2-SPT error, match with the reference rule |
| `tb_spt_shift_mul` | random and extreme operands, 1 and 2 terms |
| `tb_spt_cmul_conj` | random complex products x·conj(c) |
| `tb_dfe_decide` | decisions, zero ties, reference choice in all modes, error saturation |
| `tb_dfe_pm` | one PM cycle by cycle: pipeline delays, sum, both updates, hold, saturation |
| `tb_dlms_dfe` | (3,3) equaliser end to end against `DfeRef`: every output, weights, frozen weights in data mode, both mode switches, idle gaps, L and 2L−1 latency, convergence and data decisions |
| `tb_dfe_l8_mu5` | the same at L = 8, beta = 2^-5, including convergence |
| `tb_dlms_dfe_full` | the top at its default parameters: exact agreement, mechanisms and latencies (MSE printed only, see above) |

To run one with Verilator 5:

    verilator --binary --timing -y rtl -Irtl -Itb rtl/dfe_pkg.sv tb/dfe_tb_pkg.sv \
        tb/tb_dlms_dfe.sv --top-module tb_dlms_dfe -o sim
    ./obj_dir/sim

`-y rtl` lets Verilator find the modules by file name. For a unit testbench,
change the file and the top name; the two packages must come first. Each
testbench runs in a few seconds.

## Choices made here, not taken from the paper

The paper fixes the following:

* the DLMS structure, its delays and update equations;
* reverse-ordered feedback weights, with a broadcast decision in the update;
* 2-SPT input data and single power-of-two feedback data;
* a power-of-two step size;
* L = 8, 16-bit weights, 8-bit input, beta = 0.0625.

Everything else is this design's own:

* **Quantiser rule.** Greedy nearest power of two, ties up. The paper only
  cites a decomposition method.
* **Complex handling.** Real and imaginary parts are quantised separately,
  and each complex product is built from four real SPT products.
* **Number formats.** FRAC_X = 5 and W_FRAC = 13, with truncation and
  saturation of error and weights.
* **Retimed output registers.** The paper's figure places z^-1 elements after
  the summer and the slicer. Here both read the last PM's output register
  instead. The timing equations are unchanged.
* **Modes and alignment.** The IDLE/TRAIN/DATA modes and the update-enable bit
  are this design's own. So are the training symbol as the reference (and
  feedback) during training, and the in-design alignment of mode and training
  symbol.
* **Slicer ties.** A zero component is decided as +1.
* **Reset values.** Zero weights at reset, and no weight load port.

Not included: the conventional LMS DFE and the Baugh-Wooley two's complement
multiplier, which the paper uses only as a gate-count baseline. There is also
no gate-count figure to match: synthesis here gives word-level cells, not
gate equivalents.

## Files

`rtl/`: `dfe_pkg` (types), `spt_quantiser`, `spt_shift_mul`,
`spt_cmul_conj`, `dfe_decide`, `dfe_pm`, `dlms_dfe` (top).

`tb/`: `dfe_tb_pkg` (reference model and channel), plus the testbenches
above.
