# Referenceless CDR with a stochastic frequency detector using autocovariance

A clock and data recovery (CDR) circuit normally needs a reference clock to
pull its oscillator close to the data rate before phase tracking can take
over. This design recovers clock and data from a serial NRZ stream with no
reference at all: the frequency error is estimated statistically from the
same data and edge samples that the phase detector already takes.

The idea is that the mix of 3-bit *data-edge-data* patterns seen by an
Alexander (bang-bang) phase detector shifts with the frequency error. Counting
those patterns per 32-bit word, and also forming the lag-1 **autocovariance**
of each count from one word to the next, gives a detector whose weighted sum
is positive when the oscillator is too slow and negative when it is too fast.
The autocovariance terms steepen the detector curve near zero frequency
error. A plain linear combination of pattern counts cannot be made both zero
at lock and single-crossing over the whole range.

The receiver is quarter-rate: an 8-phase ring DCO at one quarter of the bit
rate (8 GHz for 32 Gb/s) clocks four data and four edge samplers.

## Architecture: two loops, one oscillator

```
 rx_in ──► sampler_bank ──d_q[3:0], e_q[3:0]──┬──► bbpd ──up/dn[3:0]──────────────┐
 (equalized)   ▲ ph[7:0]                       │                                    ▼
               │                               ├──► deserializer (data) ─┐     dco (varactor term)
               │                               └──► deserializer (edge) ─┤          ▲ ▲
               │                                     32-bit words, clk_div          │ │
               │                                         ▼                          │ │
               │                 cdr_digital:  sfd_logic ─fd─► dlf ─fcw─► therm_decoder
               │                                                      (row/col thermometer)
               └──────────────────────────────── dco ◄──────────────────────────────┘
```

* **Phase loop (direct-proportional path, fast).** `bbpd` makes four
  early/late decisions per DCO period. They go straight to the DCO, where
  each up or dn shifts the frequency by `kp × step` for that period. This path
  alone does all the phase tracking. It can also pull in small frequency
  errors.
* **Frequency loop (integral path, slow).** The samples are deserialized 4:32
  and the digital block runs on the divided clock (1 GHz at 32 Gb/s). Its SFD
  output is integrated with gain `2^ki` into a 10-bit frequency control word
  (FCW). The FCW is decoded into a row/column thermometer code for the DCO's
  digitally controlled resistor (DCR). The digital loop has a latency of
  several word clocks, so its bandwidth is far below that of the phase loop.
  This keeps the two loops from fighting.

## The stochastic frequency detector (`sfd_logic`)

Bit 0 of a word is the earliest bit. Edge sample `e[k]` is taken between
data samples `d[k-1]` and `d[k]`. Each of the 32 triples `(d[k-1], e[k], d[k])`
of a word falls into one class:

| class | patterns | meaning |
|---|---|---|
| dn0 | 000, 111 | no transition |
| dn1 | 001, 110 | transition; edge sample still shows the old bit (clock early) |
| up2 | 010, 101 | edge sample differs from both neighbours |
| up3 | 011, 100 | transition; edge sample already shows the new bit (clock late) |

`d[-1]` is bit 31 of the previous word. In hardware this is the data word
shifted left by one, combined bitwise with the data and edge words.

Per word and class, the pipeline does the following:

1. **count** `c_p[n]`: the number of triples in class p (0..32);
2. **autocovariance** `a_p[n] = c_p[n]·c_p[n-1] − μ_p²`, where μ_p is the
   long-run mean count of the class, supplied as an input. This is the lag-1
   autocovariance E[XₜXₜ₊₁] − μ² of a stationary sequence. The expectation is
   left to the integrator that follows.
3. **weighted sum** `fd = Σ w_p·c_p + Σ wa_p·a_p`.

Default weights (inputs; the package holds the defaults):

| | dn0 | dn1 | up2 | up3 |
|---|---|---|---|---|
| count weight `w` | −1 | −4 | +1 | +7 |
| autocovariance weight `wa` | −5 | −1 | 0 | 0 |

**Fixed-point scaling.** With P = c/32 the probability of a class per bit,
the detector value is `Σ w·P + Σ wa·γ(P)`. `fd` carries exactly 2¹⁸ times
that value: counts are shifted left by 13, and the autocovariance is already
scaled by 2⁸ because μ is Q6.4 and μ² is Q12.8. Nothing is rounded before the
integrator. Weights are 5-bit signed, μ is unsigned Q6.4 (10 bits), `a` is 21
bits signed and `fd` is 28 bits signed.

**Pipeline timing.** The word that is present at clock edge t produces
registered counts after t, autocovariances after t+1 and `fd` after t+2.
Then `fcw` follows after t+3 and the thermometer code after t+4. After
reset, the autocovariance registers start from `0·0 − μ²`. One such sample,
`−Σ wa·μ²`, reaches the accumulator before the first real word. That is a
fraction of one FCW LSB with the defaults.

### The mean inputs are part of the tuning

The long-run means μ are configuration, like the weights. The statistics of
random data at lock are dn0 = 16, dn1 = 8, up2 = 0, up3 = 8 counts per word.
With exactly those values, the model locks correctly when it tracks up from
the bottom of the range. When it tracks down from the top, it sticks about
9 % above the data rate. Setting μ(dn0) = 15.0 removes that false lock at
14, 20, 28 and 32 Gb/s. So μ(dn0) = 15.0 is the setting used in the tests.
Values of 14.5 and 15.5 each fail at least one of the rates, so the margin is
narrow. Treat the means and weights as the first things to re-tune if the
channel, DCO gain or `kp` change.

## Loop filter and DCO control

* `dlf`: `acc += fd <<< ki`. The accumulator has 10 integer bits and 24
  fractional bits. It saturates at 0 and at 2³⁴−1 (flags `sat_lo`,
  `sat_hi`) and loads `init_fcw` during reset. `fcw = acc[33:24]`. The
  integral gain is set in powers of two. `ki = 4` is the nominal setting;
  larger values acquire faster but dither more. Each `ki` has its own best
  `kp`, and gains away from it can false-lock (see the gain sweep under
  verification).
* `therm_decoder`: the DCR is modelled as 32×32 unit cells. Cell (r,c) is on
  when `row_full[r] | (row_sel[r] & col[c])`, with `row_full[r] = r < fcw[9:5]`,
  `row_sel[r] = r <= fcw[9:5]` and `col[c] = c < fcw[4:0]`. Exactly `fcw` cells
  are on, and the next code turns on one more cell without turning any off,
  which is why the code is thermometer-decoded. `row_full[31]` and `col[31]`
  are always 0 and `row_sel[0]` is always 1; they exist for regularity.
* `dco` (behavioural model, not synthesizable): `f = 3.26 GHz + 7.22 GHz ×
  code/1023 + kp × 10 MHz × (#up − #dn)`. The end points are the measured
  tuning range of the original oscillator. The real curve is concave; this
  model uses a straight line between the end points. The 10 MHz proportional
  step is this model's choice. The eight outputs are 50 % clocks, ph[k] lagging
  ph[0] by k/8 period, and the frequency is updated every 1/8 period.

## Front end

* `sampler_bank`: eight samplers, each a flip-flop on its own phase. The
  original uses StrongArm latches. Edge samplers sit on the even phases and
  data samplers on the odd phases. All eight decisions of one period are
  retimed together at the next rising edge of ph[0].
* `bbpd`: for each triple, a transition with `e == d[k]` gives up, a
  transition with `e == d[k-1]` gives dn, and no transition gives neither.
  The original detector is an analog circuit. Here it is logic on the retimed
  samples, so it adds one quarter-rate cycle of delay to the proportional
  path.
* `deserializer` (two instances): this is a 4:32 shift register. The first
  nibble lands in bits 3:0. `clk_div` is ph[0]/8 and rises four ph[0] cycles
  after each word update.
* The continuous-time linear equalizer (Cherry-Hopper, 3-bit Rc and Cc
  settings) in front of the samplers is analog and not modelled. `rx_in` is
  its output.

## Ports of the top, `refless_cdr`

| port | dir | width | |
|---|---|---|---|
| rst_n | in | 1 | asynchronous reset, active low |
| dco_en | in | 1 | oscillator enable |
| rx_in | in | 1 | equalized serial data |
| kp | in | 3 | proportional gain (model step 10 MHz per unit per up/dn) |
| ki | in | 4 | integral gain exponent |
| init_fcw | in | 10 | DCO code loaded during reset |
| w_cnt, w_acov | in | 4×5 signed | detector weights |
| mean | in | 4×10 | mean counts, Q6.4 |
| clk_rec | out | 1 | recovered quarter-rate clock (ph[0]) |
| clk_div | out | 1 | word clock |
| data_word | out | 32 | recovered data, bit 0 first |
| fcw | out | 10 | frequency control word |
| pd_up, pd_dn | out | 4 each | phase-detector decisions |

Array ports use the types in `sfd_pkg` (`weight_t`, `mean_t`), indexed
dn0, dn1, up2, up3.

## How far it has been verified

Each block has a self-checking testbench in `tb/` that compares it with an
independent reference. The shared reference arithmetic is in
`tb/sfd_ref_pkg.sv`. Each of these testbenches was also shown to fail on a
deliberately broken copy of its block.

The end-to-end test `tb_refless_cdr` runs the top with all defaults. A PRBS7
source feeds it an ideal, jitter-free input, and each run starts from code 0
or from code 1023:

| data rate | start | lock (FCW within 1 %) | recovered clock | bit errors |
|---|---|---|---|---|
| 32 Gb/s | code 0 | 5.6 µs | 8.0000 GHz | 0 / 96 k |
| 32 Gb/s | code 1023 | 8.5 µs | 8.0000 GHz | 0 / 96 k |
| 28 Gb/s | code 0 | 5.5 µs | 7.0000 GHz | 0 / 84 k |
| 20 Gb/s | code 1023 | 7.8 µs | 5.0000 GHz | 0 / 60 k |
| 14 Gb/s | code 0 | 0.9 µs | 3.5000 GHz | 0 / 42 k |

The test fails if lock takes longer than 9 µs. The fabricated circuit was
reported to acquire in under 7 µs. This model is slower when tracking down
from the top code, which is plausible given the linear DCO and the arbitrary
proportional step, but it is a known difference. (The measurement
summary itself states both "locked before 8 µs" and "under 7 µs".)

`tb_fd_curve` reproduces the detector-curve measurement. It holds the DCO
code, which opens the integral loop, and keeps the proportional path active.
It then averages `fd` at 115 codes from 6.4 to 10.3 GHz with a 32 Gb/s
PRBS7 input carrying a few picoseconds of random jitter. With the frequency
difference defined as (f_data − f_DCO)/f_DCO, the detector (in units of P) is
about +0.25…+0.5 from +2 % to +24 % and −0.1…−0.8 from −2 % to −22 %. It
spikes to about −1 right at lock. Between −3 % and −7 %, however, the curve
is weak (≈ −0.02…−0.1), and 2 of the 115 single codes read slightly
positive. Averaged over five neighbouring codes, every point has the right
sign, which is what the test checks. This weak band is where the down-tracking
runs spend most of their time. It shows that, with the default weights and the
scaling chosen here, the single-zero-crossing property holds only on
average, not code by code.

`tb_cdr_impaired` repeats the 32 Gb/s runs from codes 0 and 1023 with a
jittered input that stands in for a lossy channel after the equalizer. Each
edge that ends a run of two or more equal bits arrives 1 ps late, and each
edge that ends a single bit arrives 1 ps early. Every edge also carries about
1 ps rms of random jitter. The FCW is within 1 % after 4.4–6.8 µs (13 seeds
tried), and there are no bit errors after 15 µs of settling. Acquisition is
faster than with ideal edges; the jitter appears to carry the loop through
the weak band. With twice the data-dependent jitter (±2 ps), the loop still
locks, but slips now and then: 0 to 272 errors per 96 k bits, depending on the
seed. The likely cause is the dither of the bang-bang phase path, which `kp` and
the one-cycle delay of the phase detector set.

`tb_gain_sweep` runs the same jittered 32 Gb/s input for every `ki` from 2
to 8 and `kp` from 1 to 4, from both ends of the code range, for 30 µs each. A
run counts as clean when it locks within 10 µs, dithers by at most 4 codes,
and has no bit errors:

| ki | clean with kp | FCW dither at kp = 1 (codes) | other kp |
|---|---|---|---|
| 2, 3 | none | (false lock) | false lock at every kp |
| 4 | 1 | 3 | false lock at kp = 2..4 (from at least one end) |
| 5 | 2 | 19 | kp = 3, 4 false-lock (from at least one end) |
| 6 | 4 | 35–40 | kp = 1..3 dither 24–40 codes |
| 7 | none | ≈ 70 | dither 43–70 codes |
| 8 | none | ≈ 130 | dither 83–135 codes |

Several things are reproduced: a best `kp` for each integral gain, dither that
grows with `ki`, and no usable lock from `ki` = 7 upward. Two things are not.
Low integral gains (`ki` = 2, 3) settle at wrong codes, for example code 294
(≈ 5.3 GHz) with `kp` = 1. So do proportional gains above the best one. A slow
integrator lingers near narrow zero-crossings of the detector long enough for
the phase path to hold the loop there; a fast one passes them. The test checks
the reproduced behaviour and only counts the false locks. Use `ki` = 4 with
`kp` = 1, as the defaults in the tests do.

`tb_sfd_vs_baseline` runs the same top with count-only weights (−1, −1, +3,
+3) and no autocovariance terms, next to the default weights, over `ki` = 3..6
and `kp` = 1..3. At the nominal `ki` = 4, `kp` = 1, the count-only detector
started from the top settles at codes 726–734 (≈ 8.4 GHz, 5 % above the
rate) on every seed tried. The autocovariance detector locks cleanly from both
ends. Over the grid the default weights give 6–7 clean runs out of 24,
against 4–5 for the count-only weights. The count-only detector does have its
own good gains (`ki` = 5, `kp` = 1 and `ki` = 6, `kp` = 2), so the advantage
in this model is clear at the nominal setting but modest overall.

Not verified: a real channel and equalizer, DCO phase noise, jitter
tolerance, and anything analog. The original chip also brings one 4 Gb/s lane of recovered data out to an error detector; here the
whole 32-bit word is a port instead.

## Departures and own choices

* All fixed-point widths, the pipeline depth, the saturation, the DCR
  row/column split, the sampler phase assignment and the retiming are choices
  of this implementation.
* The means μ are inputs with no given values. The tested setting is
  described above.
* The DCO tuning curve is linear between the measured end points. The
  proportional step is assumed.
* The phase detector is digital logic instead of an analog circuit.
* The mean μ² is subtracted from each autocovariance product inside
  `autocov`, before weighting. Subtracting it later, in the loop filter, gives
  the same sum because the weighting is linear.
* The top contains the behavioural DCO, so only the blocks below
  `cdr_digital`, plus `bbpd`, `deserializer` and `sampler_bank`, are
  synthesizable.

## Simulating

Every file uses `` `timescale 1ps / 1fs``. The package must come first:

```
verilator --binary --timing --assert rtl/sfd_pkg.sv rtl/*.sv tb/sfd_ref_pkg.sv \
          tb/tb_refless_cdr.sv --top-module tb_refless_cdr -Wno-fatal
./obj_dir/Vtb_refless_cdr
```

`-Wno-fatal` is needed only for two ZERODLY warnings. Verilator cannot prove
that the computed delays in the DCO model and in the test's data source are
non-zero, and they never are.

Swap in any `tb/tb_<block>.sv` to run the testbench of one block. Each prints
`TB_RESULT checks=N failures=M`. The end-to-end run covers 65 µs of circuit
time and takes a few seconds. `tb_cdr_impaired` takes about a second,
`tb_fd_curve` about 25 s, and `tb_gain_sweep` and `tb_sfd_vs_baseline` (about
2 ms of circuit time each) under a minute each.
