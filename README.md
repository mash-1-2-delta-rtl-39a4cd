# MASH 1-2 delta-sigma modulator for a fractional-N synthesizer

A fractional-N synthesizer gets output frequencies between the integer
multiples of its reference. It does this by switching the feedback divider
between neighbouring ratios so that the *average* ratio is N + K/MOD. Which
ratio is used in each reference period comes from a digital delta-sigma
modulator. The modulator keeps the average exact and pushes the error of the
switching to high offsets from the carrier, where the loop filter removes it.

This RTL holds the digital core of such a synthesizer, built around a
**MASH 1-2 modulator with a quantiser in its second stage**:

- A first-order stage (an accumulator with a carry) produces a 1-bit stream
  whose mean is K/MOD.
- Its quantisation error feeds a second-order loop made of two
  integrator/quantiser stages. The last stage's output is fed back through
  one delay to the third integrator and through two delays to the second.
- An error-cancellation network forms `dn = y1 + y3 - y3[n-1]`. The result
  takes only four values, -1, 0, +1 and +2, so the divider needs just four
  ratios: N-1 to N+2.

With a 20 MHz reference, N = 10 and MOD = 10, the synthesizer covers
200 MHz to 218 MHz in 2 MHz steps. N = 11 gives 220 MHz. The nominal channel is
210 MHz (N = 10, K = 5, a fraction of 0.5).

```
                 +-----------+  pd_xor            (analog, not in RTL)
 ref_clk ------->|  xor_pd   |---------> loop filter -> amplifier -> VCO --+
         |       +-----------+                                             |
         |       +-----------+  pfd_up/pfd_dn                              |
         +------>|    pfd    |---------> charge pump -> loop filter        |
                 +-----------+                                             |
                    ^  div_out                                             |
                    |                                                      |
                 +-------------+  <------------ vco_clk -------------------+
                 | mmd_divider |  divide by n_int + dn
                 +-------------+
                    |  div_pulse (once per divided period)   ^ dn (-1..+2)
                    v                                        |
                 +-------------+-----------------------------+
  frac_k ------->| mash12_dsm  |
                 +-------------+
```

## The modulator, stage by stage

All arithmetic is in integers in units of 1/MOD. The fractional word K runs
from 0 to MOD-1, and a quantiser output of 1 stands for MOD units.

**Stage 1 (`dsm_stage1`).** An integrator, a one-bit quantiser and a delay in
the feedback path:

    v1[n] = v1[n-1] + K - MOD*y1[n-1]
    y1[n] = (v1[n] >= MOD)
    e1[n] = v1[n] - MOD*y1[n]         (0 <= e1 < MOD)

This is the familiar modulo-MOD accumulator. y1 is its carry and e1 is what
remains in it. In z-terms Y1 = X - E1(1 - z^-1): the mean of y1 is exactly
K/MOD, and the first-order shaped error E1 is passed on.

**Stages 2 and 3 (`dsm_stage23`).** Two integrators, each followed by a
one-bit quantiser. The stage-3 output y3 is fed back twice. Delayed by one
sample it is subtracted at the third integrator. Delayed by two samples it is
subtracted at the second integrator.

    w2[n] = w2[n-1] + e1[n] - MOD*y3[n-2],     y2[n] = (w2[n] >= MOD)
    w3[n] = w3[n-1] + MOD*y2[n] - MOD*y3[n-1], y3[n] = (w3[n] >= MOD)

The quantiser after the second integrator is what sets this modulator apart
from the conventional MASH 1-2. So is the extra delay that turns the stage-2
feedback into a z^-2 path. With Q2 and Q3 the errors of the two quantisers:

    Y3 (1 - z^-1 + z^-2) = E1 + (1 - z^-1) Q2 + (1 - z^-1)^2 Q3

**Cancellation (`mash12_dsm`).** `dn = y1 + (1 - z^-1) y3`, which gives

    DN = X + [ z^-1 (1 - z^-1)^2 E1 + (1 - z^-1)^2 Q2 + (1 - z^-1)^3 Q3 ]
             / (1 - z^-1 + z^-2)

The signal passes with unit gain, so the mean of dn is exactly K/MOD. Every
noise term has at least a second-order zero at DC. The stage-1 error is not
cancelled exactly. It leaves a residue shaped by (1 - z^-1)^2 over a
denominator whose poles sit on the unit circle at +-60 degrees. The loops
are nonetheless bounded, because every fed-back quantity is a quantiser output.
Over all K and random inputs the simulated ranges are 0 <= v1 < 2 MOD,
-MOD <= w2 < 3 MOD and 0 <= w3 <= MOD. The register widths (log2 MOD + 1 bits
for stage 1, log2 MOD + 3 signed bits for w2 and w3) are sized from these
ranges. Assertions in the RTL check them.

dn is y1 (0 or 1) plus a first difference of y3 (-1, 0 or +1). That gives the
four levels -1 to +2, carried as the 3-bit signed type `mash_pkg::dn_t`.

### Quantiser threshold

All three quantisers switch at one full unit (value >= MOD), like an
accumulator carry. Stage 1 needs this. Its error must lie in [0, MOD) and
average to a value the second loop can follow. A mid-scale threshold (MOD/2)
in stage 1 makes the second integrator run away. A mid-scale threshold would
also work for stages 2 and 3, with slightly smaller ranges, but the carry
threshold is used everywhere for uniformity.

### Timing

The modulator takes one sample on every clock edge with `en` high. In the
synthesizer `en` is the divider's end-of-period strobe, so the modulator is
clocked once per divided period. The stage outputs of a sample are
combinational. `dn` is registered and changes on the edge where `en` is high.

## The divider (`mmd_divider`)

A counter runs from 0 to R-1, where R = n_int + dn is the current ratio.
`div_pulse` is high in the last VCO cycle of a period. On the edge that
follows, the counter restarts, the next ratio is loaded from n_int + dn, and
the modulator steps (it sees the same `div_pulse` as its enable). So the ratio
used in period p is the modulator output computed at the end of period p-1: a
fixed one-period latency that does not affect the average. `div_out` is
registered. It is high for the first floor(R/2) cycles of each period, so its
rising edge marks the start of a period and its duty cycle is close to 50 %.
R must stay at least 2; an assertion checks this. `NW` (default 5) is the
width of n_int and the counter.

## Phase detectors

Two detectors are provided. The analog side uses one of them.

- `xor_pd` is a single XOR gate. Its mean output is VDD * phi / pi for a phase
  difference phi between 0 and pi, a gain of VDD/pi per radian. The loop settles
  at 90 degrees. This is the detector of the loop's small-signal design (third-order
  loop with a second-order Butterworth filter, K_VCO = 10 MHz/V, A_v = 0.3).
- `pfd` is a phase-frequency detector for a charge pump (20 uA in the circuit
  model). A reference rising edge sets UP, a divider rising edge sets DN, and
  both clear together. Unlike the textbook edge-clocked detector with an
  asynchronous reset, this one is **sampled by the VCO clock**: the reference
  passes a two-flop synchroniser and edges are found against the previous
  sample. This keeps the whole design in one clock domain. In exchange the
  phase resolution is one VCO cycle (about 4.8 ns at 210 MHz). UP also lags the
  reference edge by two to three cycles, while DN lags the divider edge by one.
  A constant offset like this only shifts the locked phase.

## Top level (`fracn_digital_top`)

| port | dir | width | meaning |
|---|---|---|---|
| vco_clk | in | 1 | VCO output, the only clock |
| rst_n | in | 1 | synchronous active-low reset |
| ref_clk | in | 1 | 20 MHz reference, may be asynchronous |
| n_int | in | NW | integer ratio N |
| frac_k | in | log2 MOD | fractional word K |
| div_out | out | 1 | divided clock |
| div_pulse | out | 1 | end-of-period strobe |
| dn | out | 3 signed | modulus offset in use |
| pd_xor | out | 1 | XOR detector output, to the loop filter |
| pfd_up, pfd_dn | out | 1 each | PFD outputs, to the charge pump |

Output frequency = f_ref * (n_int + frac_k / MOD). n_int and frac_k are taken
at the end of each divided period, so a channel change takes effect within one
period and needs no reset.

Parameters: `MOD` (default 10) is the accumulator modulus. It sets the channel
step, f_ref / MOD = 2 MHz at 20 MHz. A power of two gives a finer step, and
every width follows from `MOD`. `NW` (default 5) is the divider width.

## Not in the RTL

The rest of the loop is analog and stays outside. The control loop's nominal
values are listed for whoever builds or models it:

- reference oscillator, 20 MHz;
- charge pump, 20 uA;
- loop filter, passive second order, R = 1 kOhm, C1 = 1 pF, C2 = 0.1 pF
  (the small-signal model uses a normalised Butterworth 1/(s^2 + sqrt2 s + 1));
- control-voltage amplifier, gain 0.3;
- VCO, 10 MHz/V, 200-220 MHz.

## Closing the loop in simulation

`tb/loop_filter_model.sv` and `tb/vco_model.sv` are behavioural models (real
numbers and delays, not synthesizable). With them, `tb_fracn_closed_loop` runs
the whole synthesizer with the XOR detector:

- The filter is the second-order Butterworth with corner W0 = 1.881e6 rad/s,
  integrated in 0.1 ns steps.
- The VCO is f = F0 + 10 MHz/V * 0.3 * vtune. Its coarse setting F0 is a
  model input, set for each channel to 1.65 MHz below the target.
- The detector swing is 1.1 V. This makes the loop gain
  (1.1/pi) * 0.3 * 2 pi * 10 MHz / 10 = 6.6e5 1/s. Together with W0 it
  reproduces the closed-loop response
  2.352e18 / (s^3 + 2.666e6 s^2 + 3.537e12 s + 2.352e18) that the loop was
  designed for.

The loop starts at 210 MHz with vtune = 0. It then moves to 200 MHz and to
220 MHz, each time with a new channel word and coarse setting. On every channel
the mean frequency over 2 us windows is the target within 0.01 %, and
reference and divided edges match one for one. The frequency stays within 0.1 %
after about 6.2 us on the first lock, close to the 5 us settling time of the
linear design. After the two channel changes, which need only phase
re-acquisition, it does so after about 2.5 us.

The XOR detector has no frequency detection. The fine-tuning range at the 1.1 V
swing is only 3.3 MHz, so the coarse setting must place each channel inside it.

The PFD and charge-pump path is verified open loop only. With its nominal
values (20 uA, R = 1 kOhm in series with C1 = 1 pF, C2 = 0.1 pF in shunt) and
10 MHz/V, the linear
loop crosses over near 0.66 MHz with a phase margin below 1 degree. The filter
zero, 1/(R C1) = 1e9 rad/s, lies far above crossover. A charge-pump loop built
around `pfd` needs a larger series capacitor or resistor than these values.

## How far to trust it, and where it departs

- The connection of every summer, integrator, quantiser and delay in the
  modulator follows the published block diagram and its stage equations. The
  closed-form transfer function above is derived from that structure. The
  source's own summary formula for the whole modulator,
  Y = X + 2Q (1 - z^-1)^3 / (1 - z^-1 + z^-2), shares the denominator but not
  the numerator. The structure was followed.
- Quantiser thresholds, integer scaling, register widths, reset and the
  registered output are choices of this design. The source describes the
  modulator only at block-diagram level, with two-level quantisers spanning 0
  to 1.
- MOD = 10 is inferred from the stated 2 MHz resolution at 20 MHz. It is not
  given as a word length.
- Elsewhere the source speaks of a divide-by-N/N+1 and of a 0/1 divider
  control. The four-level output of this modulator needs ratios N-1 to N+2, and
  that is what the divider does.
- Divider and PFD insides are this design's own. Only their function is given.
- The performance claims made for this modulator concern phase noise and
  spurs of the closed analog loop. None of them can be checked on this RTL.
  The behavioural closed loop shows lock and settling only. Its detector swing
  and VCO coarse setting are chosen here, not given.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| tb_dsm_stage1 | y1 and e1 every sample against the closed form from the running input sum S: e1 = S mod MOD, y1 = floor(S/MOD) - floor(S_prev/MOD); en low freezes the state |
| tb_dsm_stage23 | y2, y3 every sample against an integer model of the two loops; long-run DC gain of 1 |
| tb_mash12_dsm | all K = 0..9: every output against a model of all three stages; levels within -1..+2; running sum within 3 of n K/MOD; dn holds without en; all four levels occur |
| tb_mmd_divider | every period lasts n_int + dn cycles; div_pulse and div_out position; ratios 9..13 all used |
| tb_xor_pd | truth table; mean output at 0, 45, 90, 135, 180 degrees equals phi/180 |
| tb_pfd | leads of -6..+6 cycles give UP or DN pulses of the predicted width, never both |
| tb_fracn_closed_loop | closed loop with the behavioural filter and VCO at 210, 200 and 220 MHz: settling below 10 us (measured 6.2, 2.6, 2.5 us), 2 us window means within 0.1 %, reference and divided edge counts within 1 |
| tb_fracn_digital_top | default parameters, ideal VCO at 210 MHz with a reference of exactly 1/(N + K/10) of it: channels 200, 210, 220, 206, 218, 202 MHz switched without reset; every period length; mean ratio within 3/300; reference and divided edges agree within 2; XOR output; reference 5 % fast gives UP pulses, 5 % slow gives DN pulses; each offset level, channel switches and both PFD polarities must occur |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv \
  rtl/mash_pkg.sv tb/tb_fracn_digital_top.sv --top-module tb_fracn_digital_top
./obj_dir/Vtb_fracn_digital_top
```

The files carry no `timescale`; testbench delays are in ns, hence the
`--timescale` option. Every testbench finishes in well under a second. To try another modulus, change
`MOD` in the block testbenches. In `tb_fracn_digital_top` the channel
arithmetic assumes MOD = 10.

## Files

- `rtl/mash_pkg.sv`: modulus-offset type `dn_t` and the width helper `k_width`
- `rtl/dsm_stage1.sv`, `rtl/dsm_stage23.sv`, `rtl/mash12_dsm.sv`: the modulator
- `rtl/mmd_divider.sv`: multi-modulus divider
- `rtl/xor_pd.sv`, `rtl/pfd.sv`: phase detectors
- `rtl/fracn_digital_top.sv`: top level
- `tb/tb_*.sv`: one testbench per module, plus the closed-loop testbench
- `tb/loop_filter_model.sv`, `tb/vco_model.sv`: behavioural analog models
