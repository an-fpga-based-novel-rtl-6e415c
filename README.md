# DSTATCOM controller: ISCAP reference generation with phase-delay compensation

A DSTATCOM is a three-phase voltage-source converter (VSC) connected in
shunt at the point of common coupling (PCC) of a three-wire distribution
feeder. Its job is to make a distorting, reactive load look like a
resistor to the supply. The source should deliver only a sinusoidal current,
in phase with its voltage, that carries the load's average active power. The
converter then supplies everything else: harmonics, reactive current and unbalance.

This repository holds synthesizable SystemVerilog for the digital controller of
such a converter. The controller is an all-on-chip FPGA design that, every 20 µs (50 kHz), reads
two PCC line voltages, the dc-link voltage and the three source currents, and
drives the six IGBT gates directly. It follows the ISCAP (instantaneous
symmetrical component and active power) method with *phase-delay compensation*
(PDC) and a PI-estimated power `P_max`.

## The control idea

1. **How much current the source should carry.** The dc-link capacitor
   stores the converter's energy. If the source delivers less active power than the load
   consumes, the converter covers the difference and the dc-link voltage
   falls. A PI controller on `V_dcref − V_dc` therefore converges to the
   load's average active power per phase, `P_lav` (called `P_max`). Dividing it
   by the peak of the positive-sequence voltage gives the peak of the wanted
   source current:

   `I_sm = P_lav / V_m1+`

2. **What shape and phase it should have.** The PCC voltage is distorted, so
   it is first cleaned by LPF1, a 6th-order Butterworth low-pass filter at 100 Hz. A positive-sequence
   detector then extracts its magnitude `V_m1+` and angle `φ_ps`. LPF1 delays
   the 50 Hz fundamental by a fixed angle `φ_f` (114.52°), so the unit
   templates are advanced by exactly that angle:

   `U_a1 = sin(φ_ps + π/2 + φ_f)`, `U_b1 = sin(φ_ps − π/6 + φ_f)`, `U_c1 = sin(φ_ps + 7π/6 + φ_f)`

   and the reference source currents are `i*_k = I_sm · U_k1`.

3. **Forcing the source current onto the reference.** A hysteresis current
   controller (HCC) switches each converter leg. It compares the *source*
   current with its reference using a band of ±0.25 A.

The phase-delay compensation is what makes a heavy, slow filter usable. The
filter can be steep enough to remove almost all distortion, because its
large but constant lag at 50 Hz is removed afterwards by one fixed rotation.

## Signal chain and timing

One sample strobe starts the following chain. Each stage starts on the `done`
pulse of the one before. All stages are serial or short pipelines, and the
whole pass takes about 130 clocks. The assumed 100 MHz clock gives 2000 clocks
per sample.

| Stage | Module | What it computes | Clocks |
|---|---|---|---|
| sampling strobe | `sample_timer` | 50 kHz tick, also the ADC start | – |
| low-pass filter ×2 | `lpf1` (3 sections, one shared multiplier) | fundamental of `v_tab`, `v_tcb` | 10 |
| line→phase | `line_phase_conv` | `v_ta1, v_tb1, v_tc1` (monitor only) | 1 |
| positive sequence | `ps_detector` (`isqrt`, `cordic_vec`) | `V_m1+`, `φ_ps` | 35 |
| dc-link PI | `pi_controller` | `P_lav` (runs on the tick itself) | 1 |
| divider | `ism_divider` | `I_sm = P_lav / V_m1+` | 49 |
| unit vectors | `uvrc` (`cordic_rot`) | `U_k1`, `i*_k` | 32 |
| hysteresis | `hcc` | gates g1…g6 | 1 |

The HCC can change state once per sample, so each leg switches at 25 kHz at
most. That is half the sampling rate, and it matches the 25 kHz switching
frequency the design targets. The top level asserts that the chain always
finishes before the next tick.

## Number formats (`dstatcom_pkg`)

| Type | Bits | Fraction bits | Used for |
|---|---|---|---|
| `sample_t` | 32 signed | 16 | volts, amperes, watts (±32768) |
| `angle_t` | 32 signed | 28 | radians |
| `unit_t` | 32 signed | 30 | sin, cos, unit vectors |
| filter state | 64 signed | 40 | inside LPF1 |
| filter coefficients | 48 signed | 40 | `k`, `a1`, `a2` |

ADC values must arrive already scaled to volts and amperes in `sample_t`.
Scaling the converter codes is left to the ADC interface, which is outside this design.

## LPF1 and the compensation angle

LPF1 is three cascaded direct-form-II second-order sections. Each section is

`H(z) = k (1 + 2z⁻¹ + z⁻²) / (1 + a1 z⁻¹ + a2 z⁻²)`.

The coefficients are not a typed-in table. They are the bilinear-transform
Butterworth design, with the formula given in `dstatcom_pkg.sv`: fc = 100 Hz,
fs = 50 kHz, and analog pole pairs at 15°, 75° and 45°. The result reproduces
the published coefficients of the second and third sections to their six printed digits. Each section
has unity gain at dc. The gain `k` (about 3.9·10⁻⁵) is applied at the section
*input*, which keeps the state near signal size: the poles lie within about 0.013 of z = 1, so
a state taken before the gain would be about 6400 times the input. The 40
fractional bits of state keep the low-frequency rounding noise below one LSB
of the output.

The nine products of a sample (k·v, a1·w1 and a2·w2 for each section) go one
per clock through a single multiplier and accumulator. The numerator needs
only shifts and adds. One sample takes 10 clocks, and the filter needs one
multiplier instead of nine.

At 50 Hz the filter's gain is 0.99988 and its phase is −1.998821 rad. `uvrc`
adds this angle back through the constants `cos φ_f = −0.415074` and
`sin φ_f = 0.909788`. A differently designed filter requires new constants
(module parameters `COS_PHIF`, `SIN_PHIF`).

## Positive-sequence detector

From the two filtered line voltages:

`X = v_ab − v_cb/2`, `Y = −(√3/2) v_cb`, `V_m1+ = √(X² + Y²)/3`, `φ_ps = atan2(Y, X)`.

For a balanced set `v_a = V cos ωt`, these give `X = 1.5V cos ωt` and
`Y = 1.5V sin ωt`. The magnitude is therefore **V/2**, not V: the 50 V rms
source reads as 35.4 V. This factor cancels in `I_sm`, because the per-phase
power is `V·I/2`. So `P_lav / V_m1+` is directly the current peak. The phase
`φ_ps` is `ωt` of phase a, which is why `U_a1 = cos(φ_ps + φ_f)` lines up with `v_a`.

The magnitude path uses a bit-serial integer square root. The angle path uses a
28-step vectoring CORDIC that covers (−π, π]. The two run in parallel.

## PI controller

`u(n) = u(n−1) + K_P (e(n) − e(n−1)) + (T_s/2) K_I e(n)`, with `e = V_dcref − V_dc`,

using `K_P = 30`, `K_I = 100`, `T_s = 20 µs` and `V_dcref = 140 V`. All four are module
parameters. The integral step is only 0.001 W per volt per sample. In practice
the loop is nearly proportional, and it settles a few volts under the
reference (about 135 V at 215 W per phase in simulation) before the integral
slowly removes the rest. The output saturates only at the `sample_t` range,
because no limit is specified for it.

## Hysteresis controller and gates

Per leg, with `e = i_s − i*_s`: if `e ≥ +HB`, the upper switch is on. If `e ≤ −HB`,
the upper switch is off. Otherwise the leg keeps its state. The lower switch is the
complement. Gate numbering follows the usual bridge order:

| Leg | Upper | Lower |
|---|---|---|
| a | g1 = `g[0]` | g4 = `g[3]` |
| b | g3 = `g[2]` | g6 = `g[5]` |
| c | g5 = `g[4]` | g2 = `g[1]` |

After reset every upper switch is off. No dead time is inserted; the gate
driver must provide it.

## Top level: `dstatcom_ctrl`

| Port | Dir | Type | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (100 MHz assumed), synchronous active-low reset |
| `sample_tick` | out | 1 | 50 kHz strobe; ADC values must be valid while it is high |
| `vtab`, `vtcb` | in | `sample_t` | PCC line voltages a−b and c−b |
| `vdc` | in | `sample_t` | dc-link voltage |
| `is_meas[2:0]` | in | `sample_t` | source currents a, b, c |
| `g[5:0]` | out | 6 | gates g1…g6 |
| `mon` | out | `ctrl_mon_t` | `psmag`, `psph`, `p_lav`, `ism`, `iref[3]`, `vph[3]`, `div_zero` |

Parameters: `CLK_HZ` (100 000 000), `FS_HZ` (50 000), `VDC_REF` (140.0),
`KP` (30.0), `KI` (100.0) and `HB` (0.25).

After reset, the filters start from zero, so `V_m1+` is initially zero. The
divider then returns `I_sm = 0` and raises `div_zero`. The converter holds the
source current near zero until the filters have settled, which takes about
30 ms.

## Verification

Every module has a self-checking testbench in `tb/` that ends with
`TB_RESULT checks=N failures=M`. Each one compares the module against a model
that is computed independently:

- `tb_lpf1`: a double-precision model designs the same Butterworth filter
  and runs it alongside the hardware (maximum error 16 µV on a 70 V input). The testbench also checks the
  10-clock latency, 50 Hz gain, 5th-harmonic attenuation and dc gain.
- `tb_ps_detector`: balanced sets of known magnitude and angle, plus random
  unbalanced inputs against the formulas. Also checks the 35-clock latency.
- `tb_pi_controller`: floating-point model of the PI law, plus hold and saturation.
- `tb_ism_divider`: exact integer quotients, the zero-divisor guard, saturation
  and the 49-clock latency.
- `tb_uvrc`: derives `φ_f` from the filter's frequency response itself, then
  checks the unit vectors and currents and the 32-clock latency.
- `tb_hcc`, `tb_line_phase_conv`, `tb_sample_timer`: reference models of the
  rules.

Two closed-loop testbenches run the complete controller at its default
parameters. They use `tb/dstatcom_plant.sv`, a behavioural model of the power
circuit:

- The VSC uses `v_f = V_dc/3·[2 −1 −1; −1 2 −1; −1 −1 2]·g`, `L_f di_f/dt = −R_f i_f + v_s − v_f`
  and `C_dc dV_dc/dt = Σ g_k i_fk`, with L_f = 1.8 mH, R_f = 0.1 Ω and C_dc = 2100 µF.
- The source is 50 V rms with a 3 % 5th harmonic.
- The load is a diode bridge feeding 20 Ω / 10 mH.
- The model is integrated every 1 µs.

Results:

- `tb_dstatcom_ctrl` runs 0.24 s with a load step to 12 Ω between 0.08 s and
  0.14 s. Over the last 40 ms: load-current THD 23.9 %, source-current THD 7.7 %,
  power factor 0.997, reference current within 0.006 rad of the source
  voltage, and `V_dc` between 135.1 and 135.9 V. The testbench also confirms
  that each mechanism occurred: leg switching on and off, in-band hold, the
  divide-by-zero guard after reset, and `P_lav` rising and falling. It also
  checks that no leg switches twice within one 2000-clock sample, so the
  switching rate stays at or below 25 kHz. Run time is about 45 s.
- `tb_dstatcom_unbalanced` adds a floating-star load of 15/30/60 Ω. Source
  fundamentals stay balanced within 4 %, with power factor 0.998 in every phase.

The source THD is higher than the roughly 3 % reported for the original hardware.
The likely reasons are the 20 µs sampling of the hysteresis comparison, which
allows a ripple of about 1 A per sample with 1.8 mH, and the idealised
plant, which has no source impedance and a crude commutation model.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dstatcom_ctrl \
    -y rtl -y tb +libext+.sv rtl/dstatcom_pkg.sv tb/tb_dstatcom_ctrl.sv
./obj_dir/Vtb_dstatcom_ctrl
```

To run a different testbench, replace the testbench name in both places.

## Where this design departs from the reference controller

- **Filter coefficients** are all computed from the Butterworth formula.
  The listed first-section `a1` (−1.976854) would put a pole outside the unit
  circle, so the computed −1.975859 is used instead. The listed section gains,
  0.0000390, 0.0000341 and 0.99999999, are replaced by per-section gains of
  about 3.9·10⁻⁵ each, which give unity dc gain. The transfer function
  is written with a `1 + a1 z⁻¹ + a2 z⁻²` denominator, the sign convention
  under which the listed `a` values describe a low-pass filter.
- **PI gains**: the parameter table gives K_P = 30 and K_I = 100, and those are used.
  The controller's block diagram shows coefficients of ±10.
- **Arithmetic units**: the original used vendor CORDIC blocks (square root,
  arctangent, sin/cos, divider). Here they are replaced by a
  digit-by-digit square root, two iterative CORDICs and a restoring divider.
  Word widths are uniform (see above), not the per-wire formats of the original.
- **Detector scaling**: the block diagram shows a ×1 gain before the magnitude
  output. The 1/3 of the detector formula is used, because it gives the V/2 scaling
  that the divider relies on.
- **Not built**: the ADCs and signal conditioning, the gate driver and
  opto-isolators, the power stage, and a second filter (LPF2). LPF2 is listed
  with LPF1's parameters, but it is not used in this control structure.
- **Device fit**: the original fits a Spartan-3 XC3S5000 using 59 of its 104
  18×18 multipliers. Here each LPF1 runs its nine products per sample through
  one shared 64×48 multiplier and accumulator, taking 10 of the 2000 clocks.
  An open-source synthesis for the Spartan-3 family (yosys `synth_xilinx`)
  maps each filter to 12 MULT18X18. The whole controller uses about 90, so it
  fits within the 104. With three parallel products per section, the two
  filters alone would need 184.
- **Own choices**: the 100 MHz clock, the sequencing by start/done pulses,
  the zero-divisor rule, the reset states, the absence of dead time, and the gate
  numbering of legs b and c.

## Files

`rtl/`: `dstatcom_pkg` (types, constants, coefficient formula), `dstatcom_ctrl`
(top), `sample_timer`, `lpf1`, `line_phase_conv`,
`ps_detector`, `isqrt`, `cordic_vec`, `pi_controller`, `ism_divider`,
`uvrc`, `cordic_rot` and `hcc`.
`tb/`: one `tb_<module>` per block, `tb_dstatcom_unbalanced`, and the plant
model `dstatcom_plant`.
