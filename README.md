# Full-bridge converter emulator for hardware-in-the-loop testing

This RTL stands in for a power stage. It is a full-bridge (H-bridge) converter
with an LC output filter and a resistive load, computed in real time, so that
a converter controller can be tested against it instead of against real
hardware. The controller's four gate signals go in. The emulator returns the
capacitor voltage, the inductor current and the output voltage, updated once
per clock cycle.

The emulator has two main ideas:

* **One clock cycle is one integration step.** The converter's differential
  equations are solved with explicit (forward) Euler. The whole step is one
  combinational path from the state registers back to them, with no pipeline
  registers. A pipeline register inside the loop would make the update use
  values from step k-2 instead of k-1. The shorter the clock period, the
  smaller the step and the more accurate the emulation. The intended
  real-time step is 16 ns (62.5 MHz).
* **Fixed point sized for FPGA DSP slices.** The two state variables are kept
  at 40 bits. Every signal that feeds a multiplier is cut to 18 bits on one
  side and 25 bits on the other. Each of the five products therefore fits
  one 18x25 embedded multiplier (the Xilinx 7-series DSP48E1 slice). This
  "optimized fixed-point" arrangement is what keeps the loop short enough for
  a 16 ns step.

The model includes conduction losses: MOSFET on-resistance, diode forward
voltage and resistance, inductor resistance and capacitor ESR. Leaving them
out changes the result a lot, especially during transients (see
*Verification*).

## The converter and its equations

```
        Q1 ─┬─ Q2            leg A = Q1 (high) / Q4 (low)
  Vin   A   │   B            leg B = Q2 (high) / Q3 (low)
        Q4 ─┴─ Q3            A ── L ──┬── v_O     C with ESR, load G_L = 1/R_O
                                      C   R_O
```

Q1+Q3 puts +V_in across A-B and Q2+Q4 puts −V_in. Every switch has an
anti-parallel diode. A MOSFET that is on conducts in both directions. A leg
with both switches off conducts through whichever of its diodes the
inductor-current direction selects. From these rules, each switch pattern
and each sign of i_L falls into one of three conduction situations:

| situation | conducting devices      | v_L-loss                                      |
|-----------|-------------------------|-----------------------------------------------|
| I         | two MOSFETs             | (2 R_dson + R_L) i_L                          |
| III       | one MOSFET, one diode   | V_D sign(i_L) + (R_dson + R_D + R_L) i_L      |
| II        | two diodes (all off)    | 2 V_D sign(i_L) + (2 R_D + R_L) i_L           |

Then, with s ∈ {−1, 0, +1} the source term the pattern selects:

```
v_L    = s·V_in − v_O − v_L-loss
i_C    = i_L − G_L·v_O
v_C(k) = v_C(k−1) + (dt/C)·i_C(k−1)
i_L(k) = i_L(k−1) + (dt/L)·v_L(k−1)
v_O(k) = v_C(k)   + R_ESR·i_C(k−1)
```

Some examples: all switches off with i_L > 0 gives s = −1, situation II.
Only Q1 on with i_L > 0 gives s = 0, situation III. Q1+Q2 (freewheeling
through both high sides) gives s = 0, situation I. For i_L = 0 the sign is
taken as positive. The model has no discontinuous-conduction mode: when the
current reaches zero with all switches off, it chatters around zero instead
of stopping.

The selection has five inputs: Q1..Q4 and the sign bit of i_L. The RTL does
not enumerate the cases. It works out, leg by leg, the leg's node voltage
source (V_in or 0) and whether the leg conducts through a MOSFET or a diode.
The testbenches check it against a case table written the other way round.

## Number formats

All signals are signed. QX.Y means X integer bits, Y fractional bits and a
sign bit, so the width is X+Y+1 bits. A negative X gives a small-valued
constant: Q−15.32 is 18 bits whose LSB is 2^−32.

| signal                  | format  | bits | role                                   |
|-------------------------|---------|------|----------------------------------------|
| V_in                    | Q8.2    | 11   | input dc voltage                       |
| v_C, v_O                | Q9.30   | 40   | state / output                         |
| i_L                     | Q6.33   | 40   | state                                  |
| i_L* (feedback of i_L)  | Q6.18   | 25   | multiplier operand                     |
| v_O* (feedback of v_O)  | Q9.15   | 25   | multiplier operand                     |
| v_L                     | Q9.15   | 25   | multiplier operand                     |
| i_C                     | Q6.18   | 25   | multiplier operand                     |
| i_R = G_L·v_O*          | Q6.23   | 30   | load current                           |
| dt/L                    | Q−15.32 | 18   | constant, max 3.05e−5 s/H              |
| dt/C                    | Q−12.29 | 18   | constant, max 2.44e−4 s/F              |
| G_L                     | Q0.17   | 18   | constant, up to 1 S (design choice)    |
| R_dson, R_D, R_L, R_ESR | Q4.13   | 18   | constant, up to 16 Ω (design choice)   |
| V_D                     | Q2.15   | 18   | constant, up to 4 V (design choice)    |

The formats of V_in, the states, the feedback signals, i_R, i_C, v_L, dt/L
and dt/C are those of the published optimized model. The formats of G_L,
the resistances and V_D are this design's choice. The only constraint on
them was that they be 18-bit multiplier constants.

The five products and how each is brought back onto its destination's grid
(arithmetic right shift, i.e. truncation towards −∞):

| product          | operands (18 × 25)   | shift | result           |
|------------------|----------------------|-------|------------------|
| G_L · v_O*       | Q0.17 × Q9.15        | 9     | i_R Q6.23, then 5 more to i_C's Q6.18 |
| R_path · i_L*    | Q4.13 × Q6.18        | 16    | Q9.15 (v_L grid) |
| dt/C · i_C       | Q−12.29 × Q6.18      | 17    | + v_C Q9.30      |
| dt/L · v_L       | Q−15.32 × Q9.15      | 14    | + i_L Q6.33      |
| R_ESR · i_C      | Q4.13 × Q6.18        | 1     | VRESR Q9.30      |

The states keep many more fractional bits than the feedback signals. At a
16 ns step the increments of v_C and i_L are in the µV and µA range. A
narrow state would lose them, but the next multiplication does not need that
resolution. Nothing saturates: sums and states wrap at their width, so the
operating point has to stay inside the ranges above.

Encoding the inputs, with dt the clock period when `en` is tied high:

```
vin  = round(V_in · 4)          dt_l = round(dt/L · 2^32)
gl   = round(G_L · 2^17)        dt_c = round(dt/C · 2^29)
r_x  = round(R_x · 2^13)        vd   = round(V_D · 2^15)
v_C = vc / 2^30,  v_O = vo / 2^30,  i_L = il / 2^33
```

For example, 200 V, 16 Ω, 1 mH and 100 µF at 16 ns encode as vin = 800,
gl = 8192, dt_l = 68719, dt_c = 85899. The parasitics used in the tests
(R_dson 0.1 Ω, R_L 5 mΩ, R_ESR 0.36 Ω, R_D 0.8 Ω, V_D 0.7 V) encode as
819, 41, 2949, 6554 and 22938. L and C only enter through dt/L and dt/C.
With an 18-bit dt/C, a 24 ns step needs C ≥ about 98 µF, and a 16 ns step
needs C ≥ about 66 µF. Scale the formats in `fb_pkg` for other ranges.

## One step through the hardware

```
 v_C reg ─┐                          ┌─> [Rsel × i_L*]─┐
 VRESR reg┴─(+)─ v_O ─>>15─ v_O* ─┬──┤                 ├─ v_L ─[dt/L ×]─(+)─> i_L reg
                                  │  └─ s·V_in, V_D ───┘
 i_L reg ─>>15─ i_L* ─────────────┼──(−)── i_C ─┬─[dt/C ×]─(+)─> v_C reg
                                  └─[G_L ×]─┘   └─[R_ESR ×]───> VRESR reg
```

The longest path goes from v_C through the v_O adder, the G_L multiplier and
the i_C subtractor, then through the dt/C multiplier to the v_C adder: two
multipliers and three adders in series. The v_L side is similar, with
R_path·i_L* computed in parallel with v_O.

## Modules

| file | what it is |
|------|-----------|
| `rtl/fb_pkg.sv` | formats, typedefs (`sw_t` switch bundle, `loss_t` parasitics, `situation_e`) |
| `rtl/fb_dsp_mul.sv` | signed 18×25 multiplier, the shape of one DSP slice |
| `rtl/fb_vl_calc.sv` | switch/sign decoding, situation, path resistance, v_L |
| `rtl/fb_ic_calc.sv` | i_R = G_L·v_O*, i_C = i_L* − i_R |
| `rtl/fb_integrator.sv` | Euler accumulator; used for v_C (block 1) and i_L (block 2) |
| `rtl/fb_vout.sv` | VRESR register and v_O = v_C + VRESR |
| `rtl/fb_model.sv` | the plant model: the four units above in one loop |
| `rtl/dpwm.sv` | counter-compare bipolar PWM for open-loop runs |
| `rtl/fb_hil_top.sv` | top: model, DPWM, and a switch-source select with a 2-flop synchronizer on the external input |

Parameters: `LOSSES` (default 1) on `fb_model`, `fb_vl_calc`, `fb_vout` and
the top. `LOSSES = 0` removes the loss hardware (two multipliers and the VRESR
register) and builds the ideal converter. `PWM_CNT_W` (16) sets the DPWM
counter width. Reset is synchronous and active high, and clears both states
and VRESR. `en` is a step enable. The states are registered outputs, and
`vo` is the sum of two registers.

Top ports: `vin, gl, dt_l, dt_c, loss` (converter), `sw_sel` (0 = DPWM,
1 = `sw_ext`), `sw_ext` (Q1..Q4 from the controller under test),
`pwm_period, pwm_duty_cmp` (DPWM, in cycles; the values are taken at each
period boundary). The outputs are `vc, il, vo`, the applied `sw`, `sit` and
`pwm_start`. An assertion in `fb_model` flags a leg with both switches on.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_fb_vl_calc`: every legal switch pattern with random operands and both
  current signs. It is checked bit-exactly against an independent case
  table, with and without losses.
* `tb_fb_ic_calc`, `tb_fb_integrator`, `tb_fb_vout`: random operands against
  real-arithmetic expectations of the truncated products. They also check
  the enable, the reset and the one-step delay of the ESR drop.
* `tb_fb_model`: 20 000 cycles of random switching and parameters, bit-exact
  against an integer model (`tb/tb_fb_ref_pkg.sv`). Then 2 ms of the 200 V /
  20 kHz / D = 0.75 case against a double-precision Euler model. The largest
  difference is 40 µV on v_C and 11 µA on i_L.
* `tb_dpwm`: period, on-time, pattern legality, update timing and hold.
* `tb_fb_hil_top` (default parameters): 30 ms of the open-loop case from
  rest, tracked every cycle by the double-precision model. The largest
  differences are below 1 mV on v_C and 7 mA on i_L. The steady-state mean
  output is 98.77 V, against 98.74 V from the closed form
  (2D−1)·V_in / (1 + (2R_dson + R_L)·G_L). Most of the difference comes from
  the compare value 2344/3125 (D = 0.75008). The test then hands the
  switches to the external input (latency 2 cycles) and drives all-off,
  single-switch and freewheeling patterns. This reaches all three situations
  and negative inductor current.
* `tb_fb_losses`: the lossy and the ideal build side by side for 30 ms. The
  ideal build settles at 100.02 V with 3.75 A of current ripple. Leaving out
  the losses costs about 9.4 % (transient) and 1.4 % (steady state) mean
  absolute error on v_C, and 45 % and 2.9 % on i_L, relative to the lossy
  final values.
* `tb_fb_step_sweep`: steps of 24, 20, 16 and 1 ns against a 1 ns
  double-precision model. Over the first 2 ms, the v_C error is 5.5e−3 %,
  4.5e−3 %, 3.5e−3 % and 3.1e−3 % respectively. The error falls with the
  step down to 16 ns. At 1 ns it stops improving, because dt/L and dt/C have
  too few significant bits at that step.

L = 1 mH and C = 100 µF in these tests are estimated values. They were
derived from the published current ripple (about 3.7 A at 200 V, 20 kHz,
D = 0.75). The published capacitor ripple suggests a C nearer 93 µF, so the
ripple amplitudes of these tests differ somewhat from published ones. The
mean values do not depend on L and C.

Run any testbench with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fb_hil_top \
    -y rtl -y tb +libext+.sv rtl/fb_pkg.sv tb/tb_fb_ref_pkg.sv tb/tb_fb_hil_top.sv
./obj_dir/Vtb_fb_hil_top            # +SIM_MS=5 shortens phase 1
```

Add `tb/tb_fb_ref_pkg.sv` for the testbenches that import it (`tb_fb_model`,
`tb_fb_hil_top`, `tb_fb_step_sweep`). Each top-level run takes a few seconds.

## Departures and limits

* Only the optimized fixed-point model is implemented. The same converter in
  single-precision floating point, or in a wide (40-bit) fixed-point format,
  would need different arithmetic units. Those variants are not provided.
* The published equation for v_L was re-derived from the leg rules above.
  Two of its printed current-sign conditions are inconsistent with them.
  The freewheeling patterns Q1+Q2 and Q3+Q4 are handled by the same rules.
* The 16 ns real-time step and the resource figures (five DSP slices) are
  properties of the intended FPGA implementation. The structure here has
  the five 18×25 products that target needs, but no timing closure has been
  done.
* Only the step enable, the DPWM counter scheme (bipolar, no dead time), the
  switch-source select and the input synchronizer were added by this design.
  The formats of G_L, V_D and the resistances are also this design's
  choice. No DAC or other output interface toward the controller is
  included. The states come out as raw fixed-point words.
* No saturation. An operating point outside the format ranges wraps. For
  example, i_L beyond ±64 A or a path resistance above 16 Ω does this.
* The state registers total 120 bits: v_C, i_L and VRESR at 40 bits each.
  The published implementation of this model reports fewer flip-flops
  (about 96), so some of its registers were probably narrower. The VRESR
  width in particular is not specified, and 40 bits is this design's
  choice.
