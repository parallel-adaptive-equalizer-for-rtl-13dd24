# Parallel adaptive equalizer for Alamouti-coded signals

A coherent receiver for a passive optical network can be made cheap by
detecting only one polarization, with a single photodiode and a single ADC
after heterodyne mixing. The price is that the receiver becomes blind to
whatever the fibre does to the polarization. The transmitter fixes this with
Alamouti coding: symbols are grouped in pairs, and while the X polarization
sends `[s1 s2]` in two consecutive slots, the Y polarization sends
`[-s2* s1*]`. Whatever the polarization state at the receiver, the two
received slots

    r1 = a s1 - b s2*          r2 = a s2 + b s1*

still hold enough to recover both symbols, because `conj(r2)` is linear in
`s1` and `s2*`. The receiver equalizer therefore combines the even samples
with the *conjugated* odd samples through a 2x2 bank of FIR filters. Carrier
phase is tracked by a one-tap phase estimator `p` that multiplies the even
branch by `p` and the conjugated branch by `p*`. Filters and phase are both
adapted by LMS.

At 50 to 100 GBd this cannot run one sample per clock. The design here is the
**L-lane parallel (block) version**. Each clock-enabled step processes a block
of `L` symbol pairs. The four coefficient vectors are shared by all lanes and
updated once per block from the summed gradients of all lanes. Each lane keeps
its own phase estimator. The defaults are the demonstrated configuration:
**L = 32 lanes and N = 120 taps**. Twenty taps are reported to be enough with
a better receiver front end, and `N` is a parameter.

The transmit-side Alamouti encoder is also included, so that the digital ends
of the link can be simulated end to end.

## Signal flow

```
 x(n) ─► deinterleaver ─► x1(n) ─► input_buffer ─► X1[k] ─┐
         (1:2 S/P)       x2(n) ─► input_buffer ─► X2[k] ─┤   alamouti_eq_core
 d_train(n) travels with x(n) ─► 2 x input_buffer (N=1) ──┤   L x alamouti_lane
                                                          │   4 x coef_update
                                                          ▼
                     y1[k] ─► ps_converter (L:1 P/S) ─► y1(n) ─┐
                     y2[k] ─► ps_converter (L:1 P/S) ─► y2(n) ─┴► interleaver_ps ─► y(n)
                                                                  (2:1 P/S)
```

`alamouti_pon_dsp` (top) = `alamouti_encoder` (transmitter) next to
`alamouti_par_eq` (receiver). The two halves share only clock and reset. The
optical path between them (modulator, fibre, front end, ADC) is outside the
RTL.

## What one block step computes

`k` is the block index and `l = 0..L-1` the lane. Lane `l` of block `k` handles
pair index `n = kL + l`. The tributary windows give the tap rows
`x1(n-t)` and `x2(n-t)` for `t = 0..N-1`.

```
u11 = sum_t x1(n-t) w11(t)      u12 = sum_t conj(x2(n-t)) w12(t)
u21 = sum_t x1(n-t) w21(t)      u22 = sum_t conj(x2(n-t)) w22(t)
p   = 0.5 p1 + 0.5 conj(p2)                      (this lane's estimator)
y1  = u11 p + u12 p*            y2  = u21 p + u22 p*
d   = training symbol, or nearest constellation point of y
e1  = d1 - y1                   e2  = d2 - y2
psi = conj(p) / |p|
w11(t) += mu * sum_l conj(x1(n-t)) e1 psi        w12(t) += mu * sum_l x2(n-t) e1 psi*
w21(t) += mu * sum_l conj(x1(n-t)) e2 psi        w22(t) += mu * sum_l x2(n-t) e2 psi*
p1 += mu_p e1 conj(u11)         p2 += mu_p e1 conj(u12)
```

Points that are easy to get wrong:

* **The normalisation `psi`.** It is `abs(p) ./ p`, which equals
  `conj(p)/|p|`: a unit phasor that undoes the phase rotation inside the
  error before it is used to correct the taps. `unit_phasor` computes it with
  a square root (8 extra fractional bits, so that small estimators keep their
  precision) and two dividers. The `w12`/`w22` updates use its conjugate.
* **Both phase estimators learn from `e1` only.** `p1` models the rotation of
  the `x1` branch. `p2` models the rotation of the conjugated `x2` branch, so
  it converges towards `p*`, and `p` averages `p1` with `conj(p2)`.
* **`y2` is `s2*`, not `s2`.** The combination of `x1` and `conj(x2)` recovers
  the conjugate of the odd symbol. Training symbols for odd samples must
  therefore be `conj(s2)`, and the odd output samples carry `s2*`. A consumer
  conjugates them if it needs `s2`.
* **Why parallelism costs performance.** The taps see the gradient of all `L`
  lanes, but each lane's phase estimator is updated only once per block, that
  is once every `L` pairs. Its tracking bandwidth falls with `L`, and so does
  its tolerance to laser phase noise. This is the penalty the architecture
  trades for its clock rate, and it is modelled faithfully: there is no
  sharing of phase information between lanes.

## Timing

* Serial side: at most one input sample per clock (`in_valid`). With a
  continuous input there is one output sample per clock. Gaps are allowed.
* Block side: a block is `2L` input samples (`L` pairs). The core computes a
  whole block, including the tap and phase updates, in the single cycle in
  which `blk_valid` is high, so block `k+1` already uses `w[k+1]` and
  `p[k+1]`. In one clock domain this is a clock enable that fires once every
  `2L` samples. In a real-time implementation the lanes would run on their own
  clock at the serial rate divided by the parallelism.
* Latency: 4 clock edges from the edge that takes the last sample of a block
  to the edge at which its first output sample is valid. Add to this the
  equalizer's own delay of `2*CENTER` samples (the centre tap).
* `train_en`, `mod_fmt`, `mu_shift` and `mup_shift` are sampled at each block.

## Top-level ports (`alamouti_pon_dsp`, receiver half)

| port | width | meaning |
|---|---|---|
| `rx_in_valid`, `rx_x` | 1, 2x10 | input sample `x(n)`, after down-conversion and resampling |
| `rx_d_train` | 2x18 | symbol that output `y(n)` should equal: `s(n-2*CENTER)`, conjugated on odd `n` |
| `rx_train_en` | 1 | 1 = training symbols, 0 = decision-directed |
| `rx_mod_fmt` | 1 | `MOD_QPSK` or `MOD_16QAM` (slicer grid) |
| `rx_mu_shift`, `rx_mup_shift` | 5, 5 | step sizes `mu = 2^-mu_shift`, `mu_p = 2^-mup_shift` |
| `rx_out_valid`, `rx_y` | 1, 2x18 | equalized output `y(n)` |
| `rx_blk_done` | 1 | pulses once per processed block |

Transmitter half: `tx_in_valid`/`tx_s` take serial symbols. `tx_out_valid`
with `tx_x`/`tx_y` give the two polarization slots of each pair, one slot per
cycle.

Reset (asynchronous, active low) sets the centre tap (`CENTER = N/2`) of `w11`
and `w22` to 1, all other taps to 0, and `p1 = p2 = 1`. The equalizer then
starts as a pass-through.

### Choosing the step sizes

Tap updates sum `L` lane gradients over `2N` taps per output. `mu` must stay
well below `2 / (L * 2N * P)`, where `P` is the input power; otherwise the
taps diverge. With the decision grid used here (`P` about 0.5):

* `L=32`, `N=120`: use `mu_shift` = 11 or larger.
* `L=4`, `N=8`: `mu_shift` = 6 works.

`mup_shift` = 4 tracks a slow phase ramp well. The published design does not
give values for either step.

## Number formats (`alamouti_pkg`)

| type | bits | fractional | use |
|---|---|---|---|
| `sample_t` | 10 + 10 | 8 | input samples (10-bit ADC) |
| `coef_t` | 18 + 18 | 14 | taps, saturate at +-8 |
| `phase_t` | 16 + 16 | 14 | `p1`, `p2`, `p`, `psi` |
| `sym_t` | 18 + 18 | 12 | FIR outputs, `y`, `d`, `e`, training symbols |

Decision grid: 16-QAM levels +-0.25 and +-0.75; QPSK levels +-0.5. Products
are rounded to nearest and saturated into the destination type. Only the
10-bit input comes from the published design. The other widths, the grid
scale and the rounding are choices of this implementation. Sums of products
use a 48-bit accumulator type, `acc_t`.

## Files

| module | role |
|---|---|
| `alamouti_pkg` | types, widths, rounding and saturation helpers |
| `alamouti_pon_dsp` | top: encoder and equalizer side by side |
| `alamouti_encoder` | transmit Alamouti coding |
| `alamouti_par_eq` | receive equalizer, serial in / serial out |
| `deinterleaver` | 1:2 S/P into even/odd tributaries |
| `input_buffer` | S/P block buffer keeping the `N-1` older samples |
| `alamouti_eq_core` | lanes, shared taps, per-lane phase state |
| `alamouti_lane` | one parallel processor |
| `fir_dot` | one FIR row, optional input conjugation |
| `unit_phasor` | `conj(p)/|p|` |
| `qam_slicer` | QPSK / 16-QAM decision |
| `coef_update` | block-LMS tap update |
| `ps_converter` | L:1 P/S with valid/ready |
| `interleaver_ps` | 2:1 P/S |

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/alamouti_tb_pkg.sv` holds a
floating-point link model (polarization mixing `a`/`b`, an echo one pair
later, carrier phase with optional ramp) and helpers. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_alamouti_pon_dsp_small \
    rtl/alamouti_pkg.sv tb/alamouti_tb_pkg.sv tb/tb_alamouti_pon_dsp_small.sv rtl/*.sv
./obj_dir/Vtb_alamouti_pon_dsp_small
```

The arithmetic blocks (`fir_dot`, `unit_phasor`, `alamouti_lane`,
`coef_update`) are checked against floating-point models within a few LSBs.
`qam_slicer` is checked against an exhaustive nearest-point search. The
streaming blocks are checked word by word, under random gaps and stalls.

`tb_alamouti_eq_core` (4 lanes, 7 taps) first checks an exact pass-through.
It then trains on a QPSK link with polarization mixing, echo and phase
offset, and requires error-free decisions in decision-directed mode. It
requires the per-lane estimators to follow a 1.2 rad phase ramp, and repeats
the training with 16-QAM.

The end-to-end tests drive symbols through the encoder, the link model and
the equalizer in one run without reset, through five phases:

1. QPSK training.
2. Decision-directed mode.
3. A carrier phase ramp.
4. A switch to 16-QAM with retraining.
5. 16-QAM decision-directed operation with random input gaps.

They check:

* symbol errors and mean squared error in each phase;
* one output per input;
* the 4-cycle block latency;
* that each mechanism occurred at least once.

`tb_alamouti_pon_dsp_small` runs at 4 lanes and 8 taps in about a second.
`tb_alamouti_pon_dsp` runs the default 32-lane, 120-tap design over 640
blocks (40,960 samples). Verilator evaluates the full 32-lane datapath every
clock, so this run takes about five minutes. Its phase ramp is gentler: 0.3
rad over 100 blocks, against 1 rad over 300 blocks at 4 lanes. With 32 lanes
each phase estimator is updated only once per 32 pairs. A 1 rad ramp over 100
blocks left it lagging by about 0.3 rad. The QPSK decisions survived that lag,
but the following 16-QAM phase could not retrain in time. This is the
parallelism penalty described above.

## Departures from the published design and open points

* **Sampling.** The published receiver resamples to 2 samples per symbol
  before the equalizer. Its equations, however, use one common index for
  input, output and training data and describe no decimation. This RTL
  follows the equations: it is symbol-spaced, one output per input sample. A
  fractionally spaced version would feed two samples per tap position and
  decimate.
* **Clocking.** The published design sets the lane clock to the serial rate
  divided by the number of lanes. Here the lanes are a clock enable in one
  clock domain, and a block of `L` pairs (`2L` samples) is processed per
  enable.
* **No update pipeline.** The whole block recursion closes in one enabled
  cycle, as the equations are written. A fast ASIC would pipeline it, which
  adds update delay; the design does not describe that.
* **Step sizes** are powers of two, chosen at run time.
* **Not included:**
  * the transmitter pulse shaping (root-raised cosine, roll-off 0.01) and
    pre-emphasis, which are not specified in enough detail;
  * intermediate-frequency estimation, down-conversion and resampling, which
    are named but not described;
  * all optical and analog parts;
  * BER counting, which was an offline measurement.

## Evaluated configurations

The published design was demonstrated with 16-QAM at 50 GBd, 32 lanes and
120 taps (200 Gb/s), and simulated for bus widths from 1 to 64 (16-QAM) and
up to 128 (QPSK at 100 GBd). The defaults hold the 32-lane, 120-tap
configuration directly. Other widths are a change of the `L` parameter (and
`N` for the 20-tap variant); the testbenches use 4 lanes. At 100 GSa/s, the
default core consumes 64 samples per enable, that is 1.5625 G blocks/s.
