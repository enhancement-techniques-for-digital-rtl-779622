# Delta-Sigma FDC fractional-N PLL digital core, with duty-cycle-immune reference doubling

This repository holds synthesizable SystemVerilog for the digital half of a
10 GHz (9–11 GHz) fractional-N PLL. The phase detector of this PLL is a
second-order delta-sigma frequency-to-digital converter (ΔΣ-FDC). A 76.8 MHz
crystal is frequency-doubled to a 153.6 MHz reference. A doubler normally
copies the crystal's duty-cycle error into the reference as an edge-time
error that alternates between ±ΔT. For a 5 % duty error, ΔT is about 325 ps,
or three DCO periods.

The design does not estimate and calibrate this error. Instead it puts a
digital resonator with infinite gain at f_ref/2 inside the FDC loop. Because
the loop is stable, nothing at f_ref/2 can reach the resonator's input. The
only way to satisfy that is for the divider's own edges to alternate by
exactly ±ΔT, so the error cancels at the phase detector. This happens on
every reference edge, with no convergence trade-off.

Separately, the repository contains the digital interface of an incremental
frequency control (IFC) scheme. It drives a 256-element fine capacitor bank
with only two Gray-coded control wires plus one fractional line.

The analog blocks are outside the RTL. Their signals are ports of the top
level, and the closed-loop testbench models them behaviourally:
- crystal and reference doubler;
- phase detector and charge pump;
- active integrator;
- 7-bit SAR ADC;
- LC DCO.

## Block map

```
             vrfd (153.6 MHz, alternating edge error ±ΔT)
               │
  ┌─ analog ───┼──────────────────────────────────────────────┐
  │  PD → CP → integrator → ADC ──adc_data 7(2,5)──┐           │
  │  DCO ◄── fine FCE controls ◄────────────┐      │           │
  └─────┬─────────────────────────────────────────────────────┘
        │ dco_clk                           │      │
   ┌────▼────┐ vdiv, vconv_mmd, vdiv_ext    │      │
   │  mmd    │──────────────► (PD, ADC, cnr)│      │
   │ 3/4 div │◄── num_div3, num_div4_m1 ────┼───┐  │
   └────┬────┘ clk_dig_fast = DCO/10        │   │  │
   ┌────▼────┐ clock.fdc_dlc, clock.dco,    │   │  │
   │  cnr    │ sma enables, resets          │   │  │
   └─────────┘                              │ ┌─┴──▼──────────┐
                                            │ │ fdc_digital   │ gain cal (LMS),
        ┌──────────────┐    fctrl 15(7,8)   │ │ R(z), F(z),   │ DSM2 (Q_C), fbdiv_ctrl
        │ dco_digital  │◄───────────────────┼─┤ perr 14(4,10) │
        │ seg + DSM2 + │              ┌─────┴─┴─┐             │
        │ DEM          │◄─────────────┤  dlc    │◄────────────┘
        └──────────────┘              └─────────┘
   ifc_dco_if (independent): isl → ifc_fsm → (c1,c2), ifc_requant → c_F
```

| File | Purpose |
|---|---|
| `rtl/pll_pkg.sv` | Widths, fixed-point formats and configuration-register structs |
| `rtl/pll_top.sv` | Top level: PLL digital plus the divider, and the IFC interface beside them |
| `rtl/mmd.sv` | Multi-modulus divider: 3/4 pre-scaler FSM, plus vdiv, vdiv_ext, vconv_mmd and DCO/10 |
| `rtl/cnr.sv` | Clock and reset block |
| `rtl/fdc_digital.sv` | FDC digital: gain normalisation, QNC (quantization-noise cancellation), R(z), F(z), phase accumulator, ΔΣ quantizer, modulus split |
| `rtl/fdc_gain_cal.sv` | Sign-LMS gain calibration |
| `rtl/dsm2_ef.sv` | Second-order error-feedback ΔΣ modulator, used twice |
| `rtl/fbdiv_ctrl.sv` | Modulus → number of count-to-3 and count-to-4 phases |
| `rtl/lfsr.sv` | 23-bit dither source |
| `rtl/dlc.sv` | Loop controller (PI + IIR) |
| `rtl/dco_digital.sv`, `bin2seg.sv`, `dem_encoder.sv` | DCO fine-bank control |
| `rtl/ifc_dco_if.sv`, `isl.sv`, `ifc_fsm.sv`, `ifc_requant.sv` | IFC interface |

Fixed-point formats are written N(u,w): N bits in total, u integer bits with
the sign included, and w fractional bits.

## The FDC loop: what happens in one reference period

This is the heart of the design and the least obvious part.

### Measuring the phase

The divider output vdiv rises at time τ_n. The reference rises at t_n.

The charge pump does two things:
- It injects a fixed offset charge of width T_OC on every divider edge.
- It removes charge for the time between the divider edge and the reference
  edge.

The integrator therefore moves by (τ_n − t_n + T_OC)/T_PLL. The ADC samples
this value inside the conversion window vconv_mmd, which is set in whole
pre-scaler counts after the divider edge. The ADC word is 7(2,5) and
positive when the divider lags. It is ready about 2 ns later.

### Processing one ADC word

On the next `clock.fdc_dlc` edge, the FDC digital captures the ADC word. It
then computes everything below in one combinational path:

```
b   = a · gc                          gain normalisation, gc is 13(1,12)
c   = clip(b + e_qc delayed)          QNC: add back the coarse quantizer's error
r   = c − 2·r[n−1] − r[n−2]           R(z) = 1/(1+z⁻¹)², the f_ref/2 resonator
r_F = 2·r − r[n−2]                    F(z) = 2 − z⁻²
div = DSM2(N + α − r_F)               second-order error-feedback quantizer
(num_div3, num_div4_m1) = split(div)  → divider
```

Two more quantities come out of the same step:
- perr = Σ(r[n] + r[n−1]). The 1+z⁻¹ factor notches out the f_ref/2
  component that carries the duty-cycle correction. The accumulation turns
  frequency error into phase error for the loop controller.
- Saturation limits apply: c is saturated to ±2, then clipped to
  ±2^(1−clip_sel). r is saturated to 18(5,13). The perr accumulator wraps.

The captured word belongs to the previous divider period. That supplies the
z⁻¹ of the loop filter z⁻¹(2 − z⁻²).

The QNC term is the modulator error e_qc delayed by two FDC clocks. The
reason is that a modulator error enters the divider one period later and
reaches the ADC one period after that.

### Timing inside one period (about 65 DCO cycles at 10 GHz)

The new phase counts must be ready before the divider samples them. The
divider samples after count-to-4 number `samp_ctrl_delay`: 9 for N ≤ 64 and
10 for N > 64. That is 36–40 DCO cycles into the period, or 3.6–4 ns.

The ADC word is captured on a clock that is itself retimed to DCO/10, after
vdiv_ext. The capture-to-divider path therefore has roughly 2 ns.
Here that capture edge is vdiv_ext retimed through a two-flop synchronizer
on DCO/10, so it lands 28..38 DCO cycles into the period. Use
`samp_ctrl_delay = 10` for every N with this clocking. At 9, the divider
sometimes samples stale counts, and the 9 GHz loop then fails to lock.
`fbdiv_ctrl` always leaves at least 10 counts of four per period (MIN_DIV4).
As a result, the count-to-4 that samples the counts is always within the
count-to-4 phase.

### Sign convention

The sign of r_F has to match the analog polarity. This RTL computes the
modulus as N − v with v = Q(r_F − α).

With the ADC polarity above, this sign makes the linearized FDC loop
deadbeat:

(1 − z⁻²)² + z⁻²(2 − z⁻²) = 1

The other sign diverges. If you change the ADC polarity, change the sign of
r_F in `dsm_in` (`rtl/fdc_digital.sv`) with it.

### Why the duty error cancels

The edge error ±ΔT alternates at f_ref/2. The resonator R(z) has poles at
z = −1. A steady alternating input would make r grow without bound, so in
steady state r_F settles with an alternating part. That part moves the
divider edges by exactly ±ΔT, so the PD output no longer alternates.

The notch in perr keeps this alternating correction out of the loop
controller. In the closed-loop test with a 5 % duty error, the alternating
part of (t − τ) at the PD falls from 325 ps to under 3 ps.

During the transient the modulus moves by up to ±2ΔT/T_PLL. That is ±7 at
5 % and ±13 at 10 %, well inside the 40..127 divider range.

## Gain calibration

The analog path has a gain error: charge-pump current, integrator capacitor
and ADC step. Because of it, the ADC word is A·(ideal) with A ≠ 1. The QNC
then leaves a residue of the coarse quantization error (A·gc − 1)·e_qc.

`fdc_gain_cal` correlates the QNC output c with the sign of the matching
e_qc. It accumulates c·2^(gain2x−11)·sgn(e_qc) in a 25-bit (1,24) register.
The top 13 bits form gc.

The update runs on a clock enable `sma_ce`, one every ds_rate+1 FDC clocks.
gc is reloaded on `sma_strobe_ce`, one every strobe_rate+1 updates. This
down-sampling saves power.

The accumulator starts at 1.0 and saturates to [0, 2). With a 10 % gain
error (A = 1.1), the closed-loop test settles at gc = 3709..3746. The ideal
is 4096/1.1 = 3724.

## The divider (mmd)

The divider is a 3/4 pre-scaler followed by an FSM, clocked directly by the
DCO. Each period runs in two phases:
1. num_div4 counts of four.
2. num_div3 counts of three.

The period is therefore 4·div4 + 3·div3 DCO cycles. `fbdiv_ctrl` chooses
the split so that most counts are counts of four, the slower and
lower-power mode. For div = 4q + r:

| r | counts of three | counts of four |
|---|---|---|
| 0 | 0 | q |
| 1..3 | 4 − r | q + r − 3 |

If fewer than MIN_DIV4 = 10 counts of four would result, the split is
clamped and `mmd_debug_flag` is set.

The FSM ends the count-to-4 phase when its index reaches num_div4_m1. The
new counts are sampled on the count-to-4 given by `samp_ctrl_delay`.

Two details are this design's own:
- **Same-edge use.** On the sampling edge, the incoming counts are already
  used for that edge's end-of-phase decision.
- **Reaching or passing.** The phase ends when the index reaches *or
  passes* the target.

Together these make small targets work: a target the counter has already
passed ends the phase immediately rather than overrunning.

Divider outputs:
- `vdiv` is high for `oc_width` DCO cycles. Its rising edge is the divider
  edge.
- `vdiv_ext` follows for `vdiv_ext_width` cycles.
- `vconv_mmd` spans pre-scaler counts adc_conv_del .. adc_conv_del +
  adc_conv_width.
- `clk_dig_fast` is DCO/10.

## Clocks and resets (cnr)

`clock.fdc_dlc.clk` is one pulse of `pulse_width` fast-clock cycles per
reference period. It comes from the chosen reference event, either vrfd or
vdiv_ext, through a two-flop synchronizer on the fast clock (DCO/10) and an
edge detector.

**Constraint:** with vdiv_ext as the event, `vdiv_ext_width` must be longer
than one fast-clock period. Use at least about 10 DCO cycles; the test uses
20. Otherwise FDC clocks are missed and the loop does not lock.

Other clock outputs:
- `clock.dco` is the fast clock, optionally halved.
- `clock.regs` is the reference gated by `regs_gate`.
- The gain-calibration clocks are provided as enables on `clock.fdc_dlc`
  rather than as separate divided clocks.

Resets:
- Each of the four block resets is asserted asynchronously.
- Each is released through a two-flop synchronizer in its own clock domain.
- Sources are rstb_pin, reset_all, reset_pll and the block's own bit.

## Loop controller (dlc)

L(z) = 0.125·km · 2^kp · ( 2^−ka / (1 − (1−2^−ka)z⁻¹) + 2^(ki_kp−15) · z⁻¹/(1−z⁻¹) ) · 2^−kr / (1 − (1−2^−kr)z⁻¹)

- It is computed in 64-bit fixed point with 28 fractional bits.
- The output is rounded to 15(7,8), offset to mid-scale 2^14 and saturated.
- The coefficients are run-time register fields.
- The evaluated setting is km=10, kp=3, ka=0, ki_kp=7, kr=2. The register
  reset values in the register table differ: km=7, kp=4, ka=1, ki_kp=7,
  kr=1.

## DCO digital

fctrl 15(7,8) is split into two parts:
- **Integer part (7 bits).** It drives the integer fine bank through
  `bin2seg`: 3 MSBs as 7 thermometer lines of weight 16, and 4 binary LSBs.
- **Fraction (8 bits).** It is re-quantized at the clock.dco rate by the
  same second-order modulator with LFSR dither. The output range is −1..2;
  adding one gives a code of 0..3. That code drives the four fractional
  elements through a DEM encoder:
  - the default is data-weighted rotation (first-order mismatch shaping);
  - `dis_shaping` gives a random start;
  - with `ena_dem = 0` it is plain thermometer.

The +1 offset is a constant one-element frequency shift that the loop
absorbs. All outputs are registered on clock.dco.

## IFC interface

The IFC interface turns a 16-bit word into controls for a bank of 256
latched unit elements. The bank is addressed only by the pair (c1, c2) and
their complements:
- **isl.** Moves a tracking register t toward d_I = d[15:8] by at most one
  step per fast cycle. Each step is a command m ∈ {−1, 0, +1}.
- **ifc_fsm.** Walks (c1, c2) through the Gray cycle 00 → 01 → 11 → 10 on
  up, and backwards on down. Each step toggles exactly one line, so exactly
  one element changes. An assertion checks this. The reset state is (0, 1).
- **ifc_requant.** Turns d_F = d[7:0] into a 1-bit stream c_F whose mean is
  d_F/256. It uses a first-order accumulator with the carry out as the
  output.

## Configuration

All register fields enter as packed structs from `pll_pkg`: `cnr_cfg_t`,
`fdc_cfg_t`, `dlc_cfg_t`, `dco_cfg_t` and `mmd_cfg_t`. The SPI and the
register file are not part of this RTL.

Settings used for a 10 GHz lock (N+α = 65.1):

| Block | Setting |
|---|---|
| cnr | `fast_src=1`, `ref_src=1` (vdiv_ext), `pulse_width=2` |
| mmd | `oc_width=8`, `ena_vdiv_ext=1`, `vdiv_ext_width=20`, `samp_ctrl_delay=10`, `adc_conv_del=6`, `adc_conv_width=6` (5 and 5 for N ≤ 64) |
| fdc | `gc_ena=1`, `gain2x=5` |
| dlc | see above |
| dco | `ena_dem=1` |

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_pll_top \
    rtl/pll_pkg.sv $(ls rtl/*.sv | grep -v pll_pkg) \
    tb/pll_closed_loop_env.sv tb/tb_pll_top.sv
./obj_dir/Vtb_pll_top
```

Notes on the command:
- The testbenches set their own time unit, so `--timescale` gives the RTL
  one too.
- `-Wno-fatal` is needed because the DCO and reference models wait for
  delays computed at run time, which Verilator reports as possible
  zero delays.

The closed-loop environment is `tb/pll_closed_loop_env.sv`. It is
parameterised by the duty cycle, N+α and the forward gain, and must be
compiled together with the testbench.

`tb_pll_top` runs the whole design at its default sizes for 48 µs of
simulated time, in under a second of wall time. The models in it:
- The reference doubler has a 5 % duty error.
- The phase detector, charge pump and integrator include a 10 % gain error
  and the offset current.
- The ADC rounds to 1/32 and saturates to [−2, 2).
- The DCO has 200 kHz per fine element and starts 1.5 MHz off target. Its
  edge times are computed exactly.

The test checks:
- lock to within 20 kHz;
- |perr| < 0.25 cycle;
- the gain coefficient;
- suppression of the alternating PD component;
- the mean PD offset;
- that every divider period matches the code that was sampled.

It also counts each mechanism and checks that each one occurred:
- count-to-3 and count-to-4-only periods;
- element rotation;
- code moves;
- gain-calibration strobes;
- snapshots;
- the divider range clamp;
- IFC up, down and fractional pulses.

Typical result: frequency error under 1 kHz, PD alternation under 3 ps
against 325 ps, and |perr| under 0.03 cycle.

`tb_pll_workloads` runs three closed loops side by side:

| Case | Frequency | Gain | Duty error | Result |
|---|---|---|---|---|
| 1 | 9.0 GHz | 0.8 | 5 % | gc ≈ 5158 against 5120 |
| 2 | 11.0 GHz | 1.2 | 5 % | gc ≈ 3428 against 3413 |
| 3 | 10 GHz | 1.0 | 10 % (ΔT = 651 ps) | PD alternation under 3 ps |

All three lock within 1 kHz.

The block testbenches compare against models written independently in the
testbench:
- a 64-bit integer model of the FDC chain;
- a real-valued model of L(z);
- exhaustive tables for `fbdiv_ctrl` and `bin2seg`;
- a history-based LFSR;
- period counting for the divider.

## Limits and departures

- **Integer-boundary avoider.** It sits in front of the DCO split and is not
  built; `dis_bound_avoid` has no effect. fctrl is split directly.
- **Fractional re-quantizer.** The IFC fractional re-quantizer is a
  first-order accumulator, not a multi-stage successive re-quantizer.
- **Gain-calibration clocks.** These are clock enables, not divided clocks.
  ds_rate and strobe_rate divide by value + 1.
- **Not defined here:** `spi_drvb` is accepted but drives nothing. `ref_src`
  = 2 behaves like 0.
- **Own choices.** The split of perr into 4 integer and
  10 fractional bits, saturation in R(z), the 28-bit fraction in the loop
  controller, the DEM algorithm, the LFSR polynomial (x²³+x¹⁸+1) and all
  reset values are this design's choices.
- **Sample point 9 is unsafe with this clocking.** `samp_ctrl_delay = 9`
  is the usual setting for N ≤ 64. With the vdiv_ext → DCO/10 retiming used
  here it is too early, so keep 10. A clock.fdc_dlc that reaches the FDC
  faster would allow 9.
- **Start-up in the closed-loop test.** The test starts phase-aligned:
  reference edges begin one T_OC after a divider edge. A cold acquisition
  from a random phase, which can saturate the ADC, is not exercised.
- **No SPI or register file.** There is no SPI and no register file, and no
  models of the coarse DCO bank or the output drivers.
