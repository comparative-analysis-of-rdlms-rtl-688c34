# RDLMS: an 8-bit retimed delayed-LMS adaptive FIR filter

An LMS adaptive filter removes noise from a signal by learning, sample by
sample, a filter that predicts the noise. Each sample it computes an output
`y = w·x`, compares it with a desired signal `d`, and nudges every weight by
`2μ·e·x`, where `e = d − y`. In hardware this is awkward: the weights feed
the multipliers, whose products feed an adder tree, whose result feeds the
subtractor, whose error feeds another set of multipliers, whose products
update the weights — all in one clock cycle. That loop is the critical path,
and ordinary pipelining cannot shorten it, because a register added to a
feedback loop changes what the loop computes.

The **delayed LMS (DLMS)** algorithm accepts that change on purpose: it
updates the weights with the error of `m` samples ago,

    w_i(n+1) = w_i(n) + 2μ · e(n−m) · x(n−m−i)

which converges almost as well as LMS for small `m`. The `m` delays it
introduces are free registers inside the loop. **Retiming** then moves them
away from where the algorithm puts them (in one lump on the error) to
where they cut the loop into short pieces. In this design no
register-to-register path holds more than one multiplier. The longest
adder path is in the weight update: a rounding adder, the weight adder and
saturation.

This repository holds synthesizable SystemVerilog of such a retimed DLMS
filter: 8-bit data, weights, output and error, 4 taps, transposed-form
filter, two pipeline registers behind every multiplier.

## Structure

```
            x ──┬──────────────────────────────────────────────┐
                │                                              │
        ┌───────▼────────── rdlms_filter ──────────┐           │
        │ w0·x   w1·x   w2·x   w3·x   (2 regs each) │           │
        │  │      │      │      │                   │           │
        │ (+)◄─R─(+)◄─R─(+)◄─R─ R    transposed     │           │
        │  R                         adder chain    │           │
        │ round/sat ─► R ─► y                       │           │
        └──────────────────────┬───────────────────┘           │
                               │ y                             │
    d ─► D_DELAY regs ─►(−)◄───┘                                │
                         │ sat ─► R ─► e     rdlms_error        │
                         │                                     │
        ┌────────────────▼──── rdlms_wupdate ─────────────────▼──┐
        │ x delay line: x(n−E_LAT−i) for tap i                    │
        │ e · x(n−E_LAT−i)   (2 regs each)                        │
        │ ×2^-(7+MU_SHIFT), round, + w_i, sat ─► R = w_i ──► filter │
        └─────────────────────────────────────────────────────────┘
```

| Module | Role |
|---|---|
| `rdlms_top` | Wires the three blocks into the adaptive filter. |
| `rdlms_filter` | Filter block: transposed-form FIR with pipelined multipliers, full-precision adder chain, rounded and saturated 8-bit output register. |
| `rdlms_error` | Aligns `d` with the pipelined `y` and registers `e = sat(d − y)`. |
| `rdlms_wupdate` | Weight update block: input delay line, `e·x` multipliers, `2μ` scaling, saturating weight registers. |
| `rdlms_pipe_mult` | Signed multiplier followed by `STAGES` registers. |
| `rdlms_pkg` | Default sizes and the latency formulas shared by the modules. |

## Where the registers sit, and what that does to the timing

This is the part of the design most worth understanding before changing
it. Samples are counted in enabled clock edges. `M = MULT_STAGES`.

In the **filter block** every tap multiplies the *current* input by its
weight. The products enter a chain of adders with one register between
neighbours (the transposed FIR form). A partial sum that starts at tap `j`
therefore needs `j` more samples to reach the output. So tap `j`
contributes the weight it had `j` samples earlier:

    acc(k) = Σ_j w_j(k−j) · x(k−j)
    y(k)   = sat(round(acc(k) / 2^7))

With fixed weights this is the ordinary FIR `Σ w_j x(k−j)`. During
adaptation the different weight ages are a known property of
transposed-form LMS filters. The reference models in the testbenches use
this formula exactly.

Latencies that follow from the register placement:

| Quantity | Register stages on its path | With M = 2 |
|---|---|---|
| `acc(k)` after `x(k)` | `M` (product) + 1 (chain) | 3 |
| `y(k)` on the `y` port | `M + 2` | 4 |
| `e(k)` on the `e` port | `M + 3` (alignment delay on `d` is `M + 2`) | 5 |
| adaptation delay `m` | `M + 3` (error) + `M` (update product) | 7 |

The adaptation delay is `m = 2·M + 3`. The weight update block must pair
`e(n)` with `x(n−i)`. The error register holds `e(n)` `M + 3` samples
after `x(n)` arrived, so tap `i` reads the delay line at depth
`E_LAT + i` with `E_LAT = M + 3`. If `MULT_STAGES` is changed, `rdlms_top`
recomputes `E_LAT`, `D_DELAY` and therefore `m` by itself. `rdlms_pkg`
holds the two formulas (`y_latency`, `adapt_delay`).

Seen from its ports, the filter therefore computes exactly a
transposed-form DLMS with `m = 7`. The only extra is the `M + 2` sample
latency on `y` and the `M + 3` sample latency on `e`. That latency is
feed-forward pipelining of the outputs; retiming alone would not add it.

## Arithmetic

* `x`, `d`, `y`, `e` and the weights are 8-bit two's-complement fractions
  (Q1.7, range −1 … 127/128).
* Products are kept at full 16-bit precision (Q2.14). The adder chain is
  19 bits wide, so it cannot overflow.
* `y` is the chain's sum rounded to Q1.7 (half up) and saturated.
* `e = d − y` is saturated to 8 bits.
* Step size: `2μ = 2^-MU_SHIFT`, with a default of 1/8. The update is
  `round(e·x / 2^(7+MU_SHIFT))`, half up, in weight LSBs. The weight
  register saturates at −128 and +127.
* With 8-bit weights the smallest weight step is 1/128. The adaptation
  therefore ends in a small limit cycle around the optimum, not at it.
  This is inherent in an 8-bit weight word.

## Interface (`rdlms_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active-low reset; clears every register, weights start at 0 |
| `en` | in | 1 | sample enable: `x`, `d` are taken on a rising edge with `en = 1`; with `en = 0` every register holds |
| `x` | in | 8 | reference/input sample `x(k)` |
| `d` | in | 8 | desired sample `d(k)` |
| `y` | out | 8 | filter output `y(k)`, `M + 2` samples later |
| `e` | out | 8 | error `e(k) = d(k) − y(k)`, `M + 3` samples later; the cleaned signal in noise cancellation |
| `w` | out | 8 × `TAPS` | current weights |

Parameters: `W` (8), `TAPS` (4), `MULT_STAGES` (2), `MU_SHIFT` (3).
`MULT_STAGES = 0` removes the multiplier registers and leaves the plain,
non-retimed transposed DLMS structure with `m = 3`. `tb_rdlms_top_m0`
tests that setting end to end.

In noise cancellation, feed the noise reference to `x` and the noisy signal
to `d`. The filter learns the path from the reference to the noise in `d`,
so `e` carries the signal with the noise removed.

## How much of this is the original design

The published design gives the following:

* the algorithm: LMS, delayed LMS and the delayed update equation;
* the split into a filter block and a weight update block;
* the transposed filter form;
* a drawing of the retimed architecture;
* an 8-bit word length.

The published design does not give these, so they are choices made here:

* **The number of taps.** 4 is taken from the four weights drawn in the
  transposed-DLMS architecture. The retimed drawing does not show it
  legibly.
* **Registers behind each multiplier.** The retimed drawing marks "2D"
  behind its multipliers and single delays behind its adders. That is
  followed here. The exact positions of the other delays drawn (R1–R4)
  could not be placed on specific adders. The placement described above
  is this design's own.
* **Step size, adaptation delay and number format.** The step size and the
  adaptation delay `m` are named but not given a value. The Q1.7 format,
  rounding and saturation are not described.
* **Reset and the sample enable.** Neither is described.
* **Register count.** The published FPGA implementation reports 65 slice
  registers. This design uses about 480 flip-flop bits, mostly in the
  16-bit multiplier pipeline registers. The low published count cannot
  have come from the pipelined structure drawn, and was not matched.
* **Not built:** the FPGA test wrapper. Only its `clk` and `done` pins
  appear, so its behaviour is unknown. The MATLAB LMS and DLMS filters
  used for comparison are software, not hardware.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:

* runs with a random sample enable, so stalls are exercised;
* compares every cycle against a model written from the equations above,
  not from the RTL structure, which also checks every latency;
* fails if a mechanism it targets never occurred.

| Testbench | What it checks |
|---|---|
| `tb_rdlms_pipe_mult` | Products after exactly `STAGES` enabled edges, for 2 stages and for 0 stages. Includes the corner cases −128·−128 and 127·−128. |
| `tb_rdlms_filter` | `acc` and `y` against `Σ w_j(k−j) x(k−j)`, with weights that change every sample. Saturation in both directions must occur. |
| `tb_rdlms_error` | `e = sat(d(n−1−D) − y(n−1))`, with saturation in both directions. |
| `tb_rdlms_wupdate` | All weights against the delayed update recursion. Positive and negative updates, and saturation at both limits, must occur. |
| `tb_rdlms_top` | End to end at the default parameters. See below. |
| `tb_rdlms_top_m0` | The same end-to-end test with `MULT_STAGES = 0` (`m = 3`). |

`tb_rdlms_top` runs a noise-cancellation workload of 20 000 samples:

* The clean signal is tone bursts of varying pitch and loudness, with
  pauses between them.
* The noise is white noise through the 4-tap path (0.5, −0.3, 0.2, 0.1).
* Every cycle, `y`, `e` and all weights must match the DLMS model
  bit-exactly, with `m = 7`.
* The first weight change must come exactly `M + 1` samples after the
  first nonzero error appears on `e`.
* Over the last 5000 samples the residual noise in `e` must be at least
  10 dB below the noise in `d`, and 3 dB below its level over the first
  500 samples.

Measured: the residual noise falls by 18 dB over the last 5000 samples.
The final weights (65, −35, 26, 15) land within a few LSBs of the path
(64, −38, 26, 13).

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert --top-module tb_rdlms_top \
    -y rtl -y tb +libext+.sv rtl/rdlms_pkg.sv tb/tb_rdlms_top.sv
./obj_dir/Vtb_rdlms_top
```

Replace `tb_rdlms_top` with any other testbench name. Each testbench prints
one line, `TB_RESULT checks=N failures=F`.

## Limits

* The testbench signal is synthetic. No recorded speech was used.
* Audio with a wider dynamic range must be scaled into the 8-bit range
  before it enters the filter.
* Timing and area were not measured on an FPGA.
* The critical-path claim is structural: no register-to-register path
  holds more than one multiplier. The update path holds two adders and
  saturation. No timing run has confirmed either.
