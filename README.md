# All-digital signal component separator for LINC / outphasing transmitters

An OFDM signal has a strongly varying envelope, so a conventional transmitter
has to run a linear power amplifier far below saturation, where it is
inefficient. LINC (linear amplification with nonlinear components, also
called outphasing) avoids this. Any sample `S = A·e^{jθ}` with `A ≤ A_max` is
written as the sum of two vectors of constant length, rotated by `±φ` around
`θ`. Each vector then has a constant envelope and can drive an efficient
switching amplifier. A combiner after the amplifiers adds the two branches
back together. The block that splits the signal is the **signal component
separator (SCS)**.

This repository holds SystemVerilog for an SCS that works entirely in the
digital domain and follows a published 90 nm low-power chip:

* The outphasing angles are computed from the 8-bit baseband samples without
  any divider. Every quotient becomes a difference of table logarithms, and
  the angles come from exp-atan and exp-acos tables.
* There are no DACs and no quadrature modulators. Each phase is applied
  directly to a 100 MHz IF clock by a **digital-control phase shifter (DCPS)**:
  an open-loop delay line with a 9-bit coarse and a 5-bit fine code.
* The delay lines calibrate themselves after reset, using a phase detector
  between the two outputs.
* Mismatch between the two amplifier branches is compensated inside the SCS.
  A gain ratio `Gc` is folded into the angle calculation. A phase mismatch is
  cancelled by a fixed delay offset on one branch. The amplifiers themselves
  never need a gain adjustment.

```
            8      +-------------+ P1 8 +---------+ 14  +---+      +-------+
   Si ----/------->|   phase     |----->| mapper1 |---->|mux|----->| DCPS1 |---> s1_hat
   Sq ----/------->| calculator  |----->| mapper2 |---->|mux|--+   +-------+
                   +-------------+ P2 8 +---------+     +---+  +-->| DCPS2 |---> s2_hat
             A_max, Gc |        phi1c, phi2c |  C(M),F(M),beta ^    +-------+
   r_in  ---->+--------+--------+------------+   +---------+   |     |   |
   r_clk ---->|  register file  |                | PVT reg |---+---> test_o
              +-----------------+                +---------+   |     |   |
                     | div          calibration codes, select  |     v   v
   if_clk -->[clock manager]--> dsp_clk   +-----------+<--UP/DOWN--[ phase detector ]
                                         |  control  |
                                         +-----------+
```

## The separation, with gain compensation

Let the two amplifier branches have gains `G0` and `G0·Gc`. Branch 1 is sent
`V1·e^{j(θ+φ1)}` and branch 2 is sent `V2·e^{j(θ−φ2)}`, where `V1 = A_max` and
`V2 = A_max·Gc`. The weighted sum must equal `2S`. With `A = |S|` this gives

```
phi1 = acos((V1² + 4A² − V2²) / (4·A·V1))
phi2 = acos((V2² + 4A² − V1²) / (4·A·V2))
theta = atan2(Sq, Si)
```

For `Gc = 1` this reduces to the textbook `φ1 = φ2 = acos(A/A_max)`. Because
the branch gain is absorbed into the angles, no amplifier needs an adjustable
gain. Three edge cases are handled explicitly:

| case | condition | angles | result |
|---|---|---|---|
| too small | `2A < |V2 − V1|` | vectors opposite: `φ1 = π, φ2 = 0` if `V2 > V1`, else `φ1 = 0, φ2 = π` | smallest achievable error |
| too large (clipping) | `2A > V1 + V2` | acos argument > 1, angle 0 | vectors aligned, amplitude clipped |
| zero input, `V1 = V2` | `A = 0` | `φ1 = φ2 = π/2`, `θ = 0` | outputs exactly half a period apart |

`A_max` sets the trade-off between clipping and combiner efficiency: a large
`A_max` avoids clipping but makes small angles rarer. It is therefore a
register setting.

## Computing the angles without dividers (`scs_phase_calc`)

The DSP domain of the chip runs at 0.5 V and 50 MHz. At that voltage a
divider does not fit a 20 ns clock period, but a table lookup does. So every
quotient is formed in the log domain:

```
theta = atan( 2^( log2|Sq| − log2|Si| ) )                 first quadrant, then folded by signs
phi   = acos( 2^( log2|N| − log2(4·A·V) ) ),   N = V² + 4A² − V'²
log2(4·A·V) = 2 + log2(A²)/2 + log2(V)                    so A is never square-rooted
```

Number formats:

* **Logarithms (`scs_log2`).** A leading-one detector gives the integer part.
  The 8 bits below the leading one index a 256-entry table
  `round(256·log2(1 + m/256))`, which gives the fraction. Result: unsigned,
  8 fraction bits. Seven of these units run in parallel: `|Si|`, `|Sq|`, `A²`,
  `|N1|`, `|N2|`, `V1`, `V2`.
* **exp-atan table.** 256 entries:
  `round(atan(2^(i/32))·1024/2π)`. For negative exponents the code uses
  `atan(2^−e) = 90° − atan(2^e)`.
* **exp-acos table.** 2048 entries:
  `round(acos(2^(−i/256))·1024/2π)` for `i = 0..2047`, i.e. exponents from 0
  down to −8. A positive exponent means clipping (angle 0). A negative `N`
  gives `π − angle`.
* **Internal angles.** 1024 steps per turn, rounded to 8 bits at the output.
* **`Gc`.** Unsigned, 9 fraction bits: 512 = 1.0. One step is about 0.017 dB
  near unity; the range is 0 to 1.998 (up to +6 dB).
* **`V2 = A_max·Gc`.** Kept with 4 fraction bits. The numerators `N1`, `N2`
  are exact integers, scaled by 256.

The codeword of a phase is a **delay**, that is, a phase lag. So the block
outputs `p1 = −(θ+φ1)` and `p2 = −(θ−φ2)` modulo 256. The IF outputs then
carry `+(θ+φ1)` and `+(θ−φ2)`.

The block is a 4-stage pipeline with one sample per clock:

1. register the input;
2. form `|S|`, `A²`, `N1`, `N2` and the case flags;
3. take the logarithms and their differences;
4. look up the tables, fold the quadrants and round.

A sample present before rising edge *n* gives its codewords after edge *n+3*.

Accuracy: the testbench rebuilds `V1·e^{jψ1} + V2·e^{jψ2}` from the codewords
and compares it with the exact real-number separation. Over 4000 random
samples at five `A_max`/`Gc` settings, the RMS error is 0.6 % of `V1 + V2`
(about −44 dB). The worst single sample is 6 %. The worst samples sit just
below the clipping edge: there the acos is steep, and an 8-bit logarithm
cannot resolve an argument within 0.3 % of 1.

## From phase to delay

### DCPS (`scs_dcps`, behavioural model)

The DCPS delays the IF clock by `T0 + C·Tc + F·Tf`:

* Coarse code `C`: 9 bits. Bit *i* switches in a section of 2^i unit delays.
* Fine code `F`: 5 bits, made of digitally controlled varactor loads.
* Because both stages are power-of-two sections, no encoder is needed.

The model uses the typical-corner averages of the silicon:

| quantity | fast | typical (model) | slow |
|---|---|---|---|
| `T0` | 3.27 ns | 3.63 ns | 4.22 ns |
| `Tc` | 29.51 ps | 37.76 ps | 43.85 ps |
| `Tf` | 3.06 ps | 4.21 ps | 5.42 ps |

Every cell of a stage gets the stage's average step. The coarse range is then
19.3 ns, against 18.73 ns measured on the typical chip; either covers a 10 ns
period. The fine range (0.13 ns) covers a coarse step.

To keep simulation fast, delays are lumped 64 units at a time. Each lump must
stay shorter than half an IF period, or edges would be lost. The model has no
synthesizable content: synthesis tools that drop delays see its outputs as
undriven. As a result, a synthesis of `scs_top` keeps only the logic that does
not feed the DCPS. A real implementation puts a delay-line macro here.

### Mapper (`scs_mapper`)

Codeword `k` must give the delay `T0 + k·T/256`. The calibrated pair
`(C(M), F(M))` stands for `255/256·T`. Counting in fine steps, with
`β = Tc/Tf`:

```
D = round(k · (C(M)·β + F(M)) / 255) + offset
C = D div β,   F = D mod β          (C saturates at 511)
```

`offset` is the branch's phase-compensation value, in fine steps. 4.21 ps
is 0.15° at 100 MHz, so a 10° mismatch needs an offset of about 66. The
mapper has two pipeline stages.

### Self-calibration (`scs_control`, `scs_phase_detector`, `scs_pvt_reg`)

The cell delays vary with process, voltage and temperature, so `β`, `C(M)` and
`F(M)` are measured after every reset. The phase detector is one flip-flop: it
samples branch 1 on branch 2's rising edge, and `UP` means branch 1 leads.
The controller drives test codes through the multiplexers in front of the
DCPS:

1. **Coarse sweep.** DCPS2 is held at 0. DCPS1's coarse code steps up from 1.
   Branch 1 first lags, then leads once `c·Tc > T/2`, then lags again once
   `c·Tc ≥ T`. That value of `c` is `c_full`.
2. **Fine/coarse ratio.** DCPS1 is set to coarse 1. DCPS2's fine code steps up
   until branch 1 leads, that is, until `f·Tf > Tc`. That value of `f` is `β`.
3. **Fine sweep.** DCPS1 is set to `(c_full − 1, f)`. The fine code `f` steps
   up until the period is crossed. The period is then
   `N = (c_full − 1)·β + f` fine steps.
4. **Result.** `D_M = N − round(N/256)`. The controller stores
   `C(M) = D_M div β` and `F(M) = D_M mod β` in the PVT register, then
   switches the multiplexers over to the mappers (`cal_done`).

Each step waits `SETTLE` = 8 DSP clocks, and the detector output passes a
two-flip-flop synchroniser. At the typical corner the result is `C(M) = 263`,
`F(M) = 8`, `β = 9`, after about 2560 DSP clocks (51 µs). The PVT register
shows its 19 bits on `test_o`: MSB first, one bit per DSP clock, repeating,
starting at bit 18 right after reset.

## Clocks, configuration and latency

* **Clocks.** `if_clk` (100 MHz) drives the DCPS pair directly. The DSP logic
  runs on `dsp_clk = if_clk/(div+1)`, which is 50 MHz for the reset value
  `div = 1`. `dsp_clk` is an output so a sample source can align to it.
* **Register file.** A 42-bit shift register on `r_clk`, MSB first:
  `{div[3:0], A_max[7:0], Gc[9:0], phi1c[9:0], phi2c[9:0]}`. Reset values:
  `div = 1`, `A_max = 128`, `Gc = 512`, offsets 0. The values reach the DSP
  clock domain without synchronisation, so load them while the data path is
  idle. Shifting also passes through other `div` values, which changes the DSP
  clock for the duration of the load.
* **Latency.** A sample present before DSP edge *n* reaches the DCPS codes
  after edge *n+5*: four phase-calculator stages and two mapper stages. It
  reaches the outputs one delay-line delay later.
* **Reset.** `rst_n` is an asynchronous, active-low reset for every register.

## How far it is verified

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog. The end-to-end
testbench `tb_scs_top` runs the top with all parameters at their defaults:

* **Calibration.** It runs during a register load, and the result read from
  `test_o` matches the value worked out from the delays.
* **Zero input.** The outputs are 5.001 ns apart. The chip measured 5.003 ns.
* **Held samples.** Output edges are measured in time and the two vectors are
  recombined. Clipped and opposite-vector samples are included, and the error
  stays below 10 % of `V1 + V2`. A 100-step branch-1 offset delays that branch
  by 0.420 ns.
* **OFDM streaming.** 64-point QPSK and 64-QAM symbols (52 subcarriers,
  10× interpolated by a 640-point inverse DFT, 8-bit) are streamed at one
  sample per DSP clock, with a ±1 dB branch gain mismatch compensated through
  `Gc`. The EVM, taken from the DCPS codes against the 8-bit input, is
  −34 dB (QPSK) and −36 dB (64-QAM). The transmitter requirement is −25 dB.

`tb_scs_linearity` checks the phase-modulation path on its own. It takes a
mapper and a DCPS at each of three process corners: fast, typical and slow
unit delays. Every codeword `P = 0..255` is applied at a 100 MHz IF clock,
and the output edge is compared with `T0 + P·T/256`:

| corner | Tc / Tf (ps) | C(M), F(M), β | RMS error | largest error |
|---|---|---|---|---|
| fast | 29.51 / 3.06 | 337, 6, 10 | 1.65 ps | 3.80 ps |
| typical | 37.76 / 4.21 | 263, 8, 9 | 2.40 ps | 5.32 ps |
| slow | 43.85 / 5.42 | 227, 2, 9 | 4.18 ps | 9.17 ps |

The fabricated chip this design follows measured about 9.3 ps RMS (0.34°). The
model is better because its cells have no mismatch. What remains is
systematic: `β·Tf` is a little longer than `Tc`, so the error forms a
sawtooth over each coarse step. One step of the phase-compensation offset
moves the edge by `Tf`, which is 0.15° at 100 MHz in the typical corner.

What this does not cover:

* The chip's timing at 0.5 V and its two power domains.
* DCPS jitter, and nonlinearity beyond the systematic coarse/fine step
  mismatch.
* The analog front end, amplifiers and combiner.
* The measurement of `Gc` and the phase mismatch, which is done outside the
  chip. The values enter through the register file.

## Where this design makes its own choices

The block structure, bus widths, clock rates, the log-domain equations, the
two-stage power-of-two delay line and its measured delays follow the chip.
The following are this design's own, because the source leaves them open:

* The fixed-point formats, table sizes and pipeline depths.
* The sign convention of the codewords.
* The mapper formula.
* The whole calibration procedure, and the phase-detector circuit.
* The serial formats of the register file and of `test_o`.
* The meaning of `div`.
* Reset values.

The source states the opposite-vector rule for `A < |V2 − V1|`. Its own
equations can, however, be solved exactly down to `A = |V2 − V1|/2`. This
design follows the equations.

## Files and simulation

| file | contents |
|---|---|
| `rtl/scs_pkg.sv` | widths, `cfg_t`, `pvt_t`, `dcps_code_t`, reset values, table generators |
| `rtl/scs_top.sv` | the complete SCS |
| `rtl/scs_phase_calc.sv`, `rtl/scs_log2.sv` | angle computation; table logarithm |
| `rtl/scs_mapper.sv` | phase codeword to DCPS code |
| `rtl/scs_control.sv`, `rtl/scs_phase_detector.sv`, `rtl/scs_pvt_reg.sv` | self-calibration |
| `rtl/scs_regfile.sv`, `rtl/scs_clock_manager.sv` | configuration, DSP clock |
| `rtl/scs_dcps.sv` | delay-line phase shifter model (simulation only) |
| `tb/tb_*.sv` | one self-checking testbench per module |

All three tables are computed at elaboration by constant functions in
`scs_pkg` from the formulas above, so no data files are needed and synthesis
keeps them as logic. Run from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top tb_scs_top -y rtl rtl/scs_pkg.sv tb/tb_scs_top.sv
./obj_dir/Vtb_scs_top
```

Any other testbench works the same way: replace `tb_scs_top` with its name.
The end-to-end run takes under a second.
