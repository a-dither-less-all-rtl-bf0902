# Dither-less all-digital PLL for a GSM transmitter

This is a fractional-N all-digital PLL (ADPLL) with two-point modulation, written in
SystemVerilog. It synthesises a 7.2 GHz oscillator from a 26 MHz reference and hands out
1.8 GHz (÷4) and 900 MHz (÷8) carriers. Phase is measured by a 5 ps two-dimensional Vernier
time-to-digital converter (TDC). Frequency is set by a digitally controlled LC oscillator (DCO)
whose fine bank is fine enough (about 2 kHz per step) that the control word needs no
sigma-delta dithering. The divider is driven by a first-order sigma-delta modulator, and its
quantisation error is cancelled digitally in front of the loop filter. That cancellation works
only if the TDC gain is known exactly, so most of the design around the loop consists of
calibrations and a start-up sequence that brings a powered-down oscillator into lock in about
100 µs.

The synthesizable digital part is `adpll_core`. The DCO and the TDC are analog circuits and
appear here as behavioural models (`dco`, `tdc_vernier`) with real-valued timing. `adpll`
connects the three and is the top level.

## Signal flow

```
             ref_clk (26 MHz)
                  |
   div_clk  +-----v------+ therm[118:0] +-----------+ code +-------------+ code_corr
  --------->| tdc_vernier|------------->|tdc_decoder|----->|tdc_lin_corr |----------+
  |         +------------+              +-----------+      +-------------+          |
  |              ^ gx, gy                                                          v
  |              |                       residue (delayed)   +--------------------------+
  |      tdc_gain_cal / tdc_dll_cal <-------------------------|spur_cancel               |
  |                                                           | e = Gd(code - 90)        |
  |   +-----+  ratio  +-------------+  fcw + cal + mod        |     + K0 * residue       |
  +---| mmd |<--------|sd_modulator |<---------------------   +------------+-------------+
      +-----+         +-------------+                                      | e
         ^ lo2 (DCO/2)                                                     v
         |                                        +-----------+  word +-----------+
   +-----+------+ cells, dac +----------------+   |loop_filter|------>| + pd_ofs  |
   |    dco     |<-----------|dco_fine_encoder|<--+-----------+       +-----------+
   +-----+------+            +----------------+        (FLL word while acquiring)
         | car (DCO/4)  --> rf_counter --> afcal, fll_filter
```

The phase error `e` is 16 bits wide, in TDC LSBs (5 ps) with 4 fraction bits. The fine DCO word
is 12 bits. The frequency control word (FCW) is Q8.16, counted in DCO/2 periods per reference
period: the default 9074215 is 138.4615, i.e. 7.2 GHz / 2 / 26 MHz.

Clock domains:
- The divider (`mmd`) runs on DCO/2.
- The RF counter front end runs on the carrier.
- Everything else runs on the reference clock. This includes the sigma-delta modulator, which
  in the published diagram is clocked by the divider output. In lock the two edges are less
  than a DCO/2 period apart, and the divider takes the new ratio at mid-cycle, so the modulus
  sequence is the same.
- The DLL calibration of the TDC (`tdc_dll_cal`) acts on the falling reference edge, interleaved
  with the measurement on the rising edge.

## The Vernier TDC and its decoding

Two delay lines of 55 ps (line X, 19 stages, reference) and 50 ps (line Y, 11 stages, divided
clock) span a plane of comparators. The comparator at (x, y) fires when the signal edge lags the
reference by more than x·55 − y·50 ps. Because 10·55 = 11·50, the thresholds are 5·(11x − 10y) ps.
Picking one comparator per value gives 119 thresholds, 5 ps apart, from −45 ps to +545 ps: that is
590 ps of range, about two DCO/2 periods.

The comparator at (10, 11) sits at threshold 0. It compares 10 line-X stages with 11 line-Y stages
directly. `tdc_dll_cal` integrates its output to trim line Y until the two are equal. Line X is
the gain knob, trimmed by the gain calibration in 1.6 % steps.

- `tdc_decoder` counts ones, which tolerates bubbles. It flags code 0 (`sat_low`: the divided
  edge leads) and code 119 (`sat_high`: it lags).
- `tdc_lin_corr` adds a per-code correction of at most ±½ LSB from a small table, written
  through a port.
- `tdc_histogram` measures where the thresholds really are, by the code-density method. On
  request it counts the codes of the next 4096 reference cycles, then forms the running sum
  `cum[k]` (samples below code k). If the TDC input was spread evenly over a known span, the
  threshold below code k lies at `cum[k]/4096` of that span. In lock on a fractional channel
  the divided edge sweeps one DCO/2 period (278 ps, about 56 codes), which serves as that
  stimulus. Turning the histogram into line-delay trims and table entries (a least-squares fit)
  is not built; the counts are read out through `hist_rd_addr`.

Some sources of this architecture give the line lengths the other way round (11 stages for X,
19 for Y). Only the orientation used here gives both the 11/10 delay ratio and the −45…545 ps
range.

## Residue cancellation and TDC gain calibration (the core of the loop)

With a first-order sigma-delta on the divider, the divided edge wanders by up to one DCO/2
period in a sawtooth. The modulator's accumulator holds exactly that error. `spur_cancel` forms:

    e = Gd · (code_corr − 90·16)  +  K0 · residue(n − 4)

- **K0 = 55.56 LSB.** One DCO/2 period (277.8 ps) in 5 ps units, in Q8.8 as 14222.
- **Set point 90 LSB (450 ps).** The sawtooth and its margin then fit inside the TDC range.
- **Delay of 4 cycles.** The residue is delayed 4 cycles to line up with the sigma-delta →
  divider → TDC → decoder pipeline.

If the TDC gain is off by δ, a sawtooth of amplitude δ·K0 remains. This residual is a fractional
spur. Keeping the spur below −60 dBc needs the gain right to about 0.1 %.

`tdc_gain_cal` is a zero-forcing loop. It multiplies `e` by the centred residue and integrates
the product into the total gain Gc (Q2.14, integrator gain 2⁻¹⁸). The product averages to zero
only when the gain is right. Gc is then split into two parts:
- an analog part: the line-X word, in 1.6 % steps, which follows Gc with ¾-step hysteresis;
- a digital part: Gd = Gc − steps·1.6 %, applied in `spur_cancel`.

The correlation loop is unstable when the fractional spur falls inside the PLL bandwidth. On an
integer channel the residue is constant, so the correlator has nothing to work on and the gain
drifts. `adpll_core` therefore holds the calibration off whenever the FCW fraction lies within
`cfg.gcal_min_frac` of an integer. The spur sits at that distance times the reference
frequency, so 1024 LSBs means 406 kHz at 26 MHz. An integer channel is distance 0, so it is
always held off. `cfg.gcal_en` switches the calibration off altogether. It is also frozen while
the DCO calibration imposes its frequency shifts.

K0 is fixed for a 7.2 GHz DCO. At other DCO frequencies a DCO/2 period is a different number of
TDC LSBs. The gain calibration absorbs that ratio: it settles at about 1.07 at 7.8 GHz.

## DCO

`dco` models the capacitively degenerated LC oscillator:
- a 7-bit MSB bank (18 MHz steps);
- a 6-bit LSB bank (0.3 MHz steps) above 5.8 GHz, giving 5.8 to 8.1 GHz;
- a fine bank of 16×16 varactors. 255 of them are switched as a thermometer from the top 8 bits
  of the 12-bit word, and the last one is driven by a 4-bit DAC (`dco_fine_encoder`).

The fine range is 8.44 MHz (about 2 kHz per step) with a deliberately curved characteristic,
which is what the DCO calibration corrects. Bias current is a 5-bit input. `amp_ok` reports
whether the bias, scaled by frequency, is above an amplitude threshold. The bank step sizes,
the curvature and the amplitude law are modelling choices.

## Locking sequence (`lock_ctrl`)

| phase | what happens | block | time here |
|---|---|---|---|
| AFCAL | cold start of the bias, then alternating amplitude and frequency steps over the 13-bit MSB/LSB code | `afcal` | ≈ 50 µs |
| FLL | RF counter vs FCW, integrating filter on the fine word | `fll_filter` | ≈ 5 µs |
| Edge search | divider ratio ±1 per cycle until the TDC leaves saturation | `edge_search` | ≤ 138 cycles |
| PLL wide band | PI loop, gear 0 | `loop_filter` | until the word is steady |
| Gear shifts | gears 1, 2, 3 after programmed intervals | `loop_filter`, `lock_ctrl` | 3.5 µs in the tests |
| DCO calibration | −F, 0, +F shifts, coefficients a1, a2 | `dco_cal` | ≈ 36 µs |
| Operation | two-point modulation enabled | | |

**AFCAL.** This is a search with radix 1.6 rather than a bisection: each step is 5/8 of the last.
A wrong early decision can therefore still be corrected by the later steps. Each frequency
decision sums the RF counter over 64 reference cycles. The amplitude loop freezes once a step no
longer changes the swing (step < 64 codes). After that the bias may only go up, so the
oscillator ends above its amplitude threshold.

**Edge search.** A TDC that is saturated high (divided edge late) shortens the division by one
cycle, and saturated low lengthens it. When the first linear code appears, the 3 steps still in
the pipeline are undone. Some descriptions state the opposite polarity. The one used here is
the one that converges with this TDC's sign, and it matches the falling divider ratio seen in
measured lock transients.

**Gear shifting.** `cfg.gears[g]` holds the proportional and integral gains as signed power-of-two
shifts. The first shift happens when the DCO word has changed by less than `cfg.gs_thr` for
`cfg.gs_hold` cycles, and is not at a rail. The later shifts follow after `cfg.gs_int1` and
`cfg.gs_int2` cycles. At every shift the integrator absorbs the jump of the proportional term,
`I' = I + (Kp_old − Kp_new)·e`, so the output stays continuous.

## Two-point modulation and DCO predistortion

The modulation word `mod` (signed, in FCW LSBs) is added to the FCW of the sigma-delta (the
low-pass point). It also goes, through `lo_predistortion`, straight to the DCO word (the
high-pass point). Because the fine characteristic is curved, the direct path uses

    d = a1·m + a2·m²      (a1 in Q.16, a2 in Q.32, fine LSBs)

`dco_cal` measures a1 and a2 after lock, with the loop closed. It:
1. imposes FCW offsets of −512, 0 and +512 LSB through the sigma-delta;
2. waits 256 cycles after each;
3. averages the loop-filter word over 32 cycles;
4. computes `a1 = (S+ − S−)·2^16/(2F)` and `a2 = (S+ + S− − 2S0)·2^32/(2F²)`.

The published 17 µs cannot be matched with a 50 kHz final bandwidth. The loop needs about a
time constant to settle after each shift, so this calibration takes about 36 µs. With a
112-cycle settle (about 17 µs in total) the measured a1 came out about 20 % high and a2 was
far too small.

## Configuration (`adpll_cfg_t` in `adpll_pkg`)

| field | meaning |
|---|---|
| `fcw` | Q8.16 frequency control word |
| `gears[0..3]` | `{kp_sh, ki_sh}` signed shifts per gear (tests use (6,2) (5,0) (4,−2) (3,−4)) |
| `last_gear` | number of gear shifts, 0…3 |
| `gs_thr`, `gs_hold` | first-shift threshold (word LSBs) and hold time (cycles) |
| `gs_int1`, `gs_int2` | intervals of the time-triggered shifts |
| `gcal_en`, `dcocal_en`, `mod_en` | enables of TDC gain calibration, DCO calibration, modulation |
| `gcal_min_frac` | gain calibration runs only if the FCW fraction is at least this far from an integer |

Pulse `start` to run the sequence. `state`, `gear` and `locked` report progress.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. The end-to-end test runs the whole ADPLL at its defaults: a
26 MHz reference, a 7.2 GHz DCO and the 1.8 GHz output. It takes a few seconds:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/adpll_pkg.sv tb/tb_adpll.sv \
              --top-module tb_adpll -Mdir obj_adpll -o sim
    ./obj_adpll/sim

`-Wno-fatal` keeps the build going past warnings; they are still printed. The behavioural DCO
and TDC use computed delays, which Verilator reports as ZERODLY.

`tb_adpll` checks the following:
- every locking phase and all three gear shifts happen;
- lock is reached (about 2630 reference cycles, 101 µs);
- the carrier count over 1024 reference cycles is within ±3 of FCW/2 × 1024;
- the phase error stays below 8 LSB with no TDC saturation after lock;
- a1 and a2 come out with the expected size and sign;
- the TDC histogram taken in lock covers about 56 codes and its running sums are consistent;
- a modulation step moves the carrier to the new frequency while the TDC stays linear;
- after a reset, the loop locks on an integer channel with the gain calibration held off.

`tb_adpll_workloads` repeats the whole sequence on other operating points:
- a 27 MHz reference;
- 1.75 GHz and 1.95 GHz channels;
- a near-integer channel whose fractional spur (101 kHz) lies inside the loop bandwidth;
- an integer channel.

It counts both the ÷4 and ÷8 outputs. It also checks that the gain calibration runs on the first
three points and is held off on the last two. Lock takes 97 to 131 µs across these points.

The unit testbenches compare against independent models. Examples:
- the Vernier thresholds in 1 ps steps;
- the DCO frequency measured from its edges;
- closed-loop plants for the FLL, edge search, AFCAL, gain calibration and DCO calibration.

## Departures from the published design and limits

- The TDC and DCO are behavioural. There is no element mismatch in the delay lines, no phase
  noise and no supply effects. Spur levels in simulation reflect only the digital arithmetic
  and the models.
- Lock takes about 101 µs, against 79.6 µs published. AFCAL (≈ 50 µs) and DCO calibration
  (≈ 36 µs) are slower here. Both settle times are parameters.
- Number formats, filter gains, the cancellation set point and delay, and the calibration
  step sizes and averaging lengths are this design's own choices.
- The in-band test for the gain calibration compares the FCW fraction with a programmed limit.
  The limit must be set for the loop bandwidth in use. The test ignores the modulation word.

## Not built

- **The rest of the TDC linearity calibration.** The histogram is built. The least-squares fit
  of the X and Y line delays, the per-element delay trims and the iteration are not. The
  behavioural TDC has no per-element trims to act on.
- **Analog support.** The bias generators and regulator of the DCO, the crystal reference and
  the surrounding transmitter.
