# Current-sensorless PFC controller with digital current rebuilding

A boost power-factor-correction (PFC) stage normally measures three things:
the rectified line voltage, the output voltage and the inductor current. The
current sensor is usually the most awkward and expensive of the three. This
controller does without it. The controller generates the switch drive itself,
so it knows at every clock whether the inductor sees `vin` (switch on) or
`vin - vo` (switch off). An accumulator that adds the right one of these each
clock is therefore a copy of the inductor current, up to a scale factor. A
one-cycle current loop shapes that *rebuilt* current, and an outer loop sets
the line power to hold the output voltage.

The two voltages are measured cheaply as well. Each converter keeps only a
comparator, one resistor and one capacitor off-chip; the rest is an up/down
counter and a first-order sigma-delta modulator. That works because both
voltages change slowly (50/60 Hz line, 100/120 Hz output ripple) compared
with a 100 MHz clock.

The RTL follows the controller of the publication *Current Sensorless Power
Factor Correction based on Digital Current Rebuilding*. It is
written independently of that work. Where the publication is silent, the
choices are this design's own; they are listed in
[Departures and own choices](#departures-and-own-choices).

## Signal flow

```
              +-------------------------------- pfc_controller ---------------------------------+
 vin_cmp ---->| sd_adc --vin_code--> linear_extrapolator --vin_pred--+                          |
 vin_bs  <----|   (13-bit counter,                                   |                          |
              |    8 bits used)                                      v                          |
 vo_cmp  ---->| sd_adc --vo_code---> linear_extrapolator --vo_pred--> current_rebuilder        |
 vo_bs   <----|        |                                              |  i_rebuilt ^ gate_ideal |
              |        +--> voltage_loop --Vm--> one_cycle_ctrl <-----+            |            |
              |             (vref,kp,ki)          (n_dlon_off,n_dloff_on) ----------+            |
 gate    <----|                                         | gate_drive (compensated)               |
              +-----------------------------------------+----------------------------------------+
```

Off-chip parts, which are not in the RTL: two comparators (the source used
LM393N) with RC filters on the bitstream outputs, the voltage dividers, an
opto-coupled gate driver (HCPL3120 in the source), and the boost power stage.

Everything runs from one clock. A switching period is `TS` = 1370 clocks
(100 MHz / 73 kHz). `period_start` marks clock 0 of each period. At that
clock, both voltage readings are sampled, the predictor steps, and the
voltage loop updates `Vm`.

## The sigma-delta converters (`sd_adc`, `sd_updown_counter`, `sd_modulator`)

The measured value *is* the counter. A first-order modulator turns the
counter's M-bit value into a bitstream whose density is `count / 2^M`:

```
sum = din + acc          (M+1 bits)
bitstream <= sum[M]      (carry, registered)
acc       <= sum[M-1:0]
```

The external RC low-pass turns the stream back into a voltage,
`VDD * count / 2^M`. The comparator compares it with the divided analog
input, and the counter counts up when the input is higher, down otherwise.
In steady state the counter's mean equals the input. The counter also
dithers by a few LSBs, because the RC filter cannot remove the modulator's
sub-harmonics, which reach down to `f_clk / 2^M`. For that reason M = 13
counter bits are kept but only N = 8 bits are used.

Details of this implementation:
- The comparator output is asynchronous. It passes two flip-flops before it
  steers the counter.
- The counter saturates at 0 and at full scale instead of wrapping.
- The 8-bit result is the 13-bit count **rounded**, not truncated. Truncation
  reads every voltage half an LSB (1.76 V at 450 V full scale) low. The
  rebuilder integrates such an offset, and in closed-loop simulation it moved
  the rebuilt current far from the real one.

Choosing the RC filter is a trade-off. A small RC constant leaves the
modulator's sub-harmonics in the filter voltage, so the counter settles off
its true value. A large one filters well, but its delay sits inside the
counter's feedback loop and the counter oscillates around the input. The
design uses 1 kΩ and 220 pF (τ = 220 ns) at M = 13. Each extra counter bit
halves the oscillation relative to full scale, so the 5 LSBs below the 8 used
bits absorb it.

`tb_sd_adc_rc_sweep` reproduces the trade-off with an 8-bit counter at
50 MHz (worst case over the input range, in % of full scale):

| filter | oscillation (p-p) | error of mean |
|---|---|---|
| 1 kΩ, 22 pF | 1.6 % | 13.6 % |
| 1 kΩ, 220 pF | 5.5 % | 0.76 % |
| 1 kΩ, 2.2 nF | 31.6 % | 0.26 % |

The publication measured 16/22/59 % oscillation and 7.4/1.5/1.1 % error for
the same three filters. The trends agree. The absolute values do not,
because the comparator model here has no noise, offset or delay.

## Current rebuilding (`current_rebuilder`)

```
acc <= max(0, acc + (sw ? vin : vin - vo) + (first clock after turn-off ? vs_comp : 0))
```

One accumulator unit is `V_LSB * T_clk / L` amperes. With 1.76 V/LSB, 10 ns
and 1 mH that is about 17.6 µA, so 1 A ≈ 56,900 units. The controller never
needs the real value of `L`: any scale error in the rebuilt current only
changes the `Vm` that the voltage loop settles at.

`sw` must be the switch state the power transistor actually has. That is the
**non-compensated** drive `gate_ideal`, not the pin `gate` (see the next
section).

A known, repeatable volt-seconds error can also be cancelled inside the
rebuilder. Examples are unequal driver delays that the drive leads do not
cover, or a known offset in a measured voltage. The signed input `vs_comp` is
added to the accumulator once per period, on the first clock after turn-off,
in accumulator units. A driver that stretches each on-time by `d` clocks
needs `d · vo_code`. Leave it at 0 when the drive leads are set.

**Errors add up.** This is the main property to understand about the method.
In continuous conduction the accumulator integrates every error in the
measured volt-seconds without limit. An offset of one LSB (1.76 V) gives an
error of about 16 mA in each 13.7 µs period. What keeps the estimate bounded
is the diode: the real current cannot go below zero, and neither can the
estimate. Near every line zero crossing the converter enters discontinuous
conduction (DCM), and the estimate returns to the true value of zero. So the
error is cleared every half line cycle (10 ms at 50 Hz). Within a half cycle
it still grows, and it shows up as a distorted current shape, which lowers the
power factor. A wrong mean value does not matter, because the voltage loop
corrects it. The closed-loop testbench measures this error (see below).

## One-cycle current loop with delay compensation (`one_cycle_ctrl`)

The carrier falls from `Vm` at the start of a period to 0 at its end. The
switch turns on when the period starts and turns off when the carrier meets
the rebuilt current:

```
Vm * (1 - t/Ts) = r_s * i_L        ->   Vm * (1 - d) = r_s * i_pk
```

In a boost stage `1 - d = vin / vo`, so `r_s * i_pk = Vm * vin / vo`. The peak
current therefore follows the input voltage in every switching period, and
`Vm` sets the line power (`P_in ≈ Vm * Vin_rms² / (r_s * Vo)`).

The whole comparison is done in integers. The carrier is multiplied by `TS`,
so no division is needed. A register `ramp` holds `Vm*(TS-t)`: it is loaded
with `Vm*TS` when the period starts and reduced by `Vm` every clock. The switch
turns off when `ramp <= (acc >> RS_SHIFT) * TS`. `Vm` is sampled once per
period.

**Driver delay compensation.** A real gate driver and MOSFET turn on and off
with different delays (920 ns and 620 ns were measured in the source's
prototype). Unequal delays change the effective duty cycle, and the rebuilder
then integrates the difference. The controller therefore produces two drives:

```
  clock in period:  0                 t_off-n_on_off   t_off           TS-n_off_on   TS
  gate_ideal        ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_________________________________|‾‾
  gate (to driver)  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|________________________________________|‾‾‾‾‾‾‾‾‾‾‾‾‾
```

- `gate` turns off `n_dlon_off` clocks before the turn-off condition is
  reached. To find that moment in advance, the condition is evaluated
  `n_dlon_off` clocks ahead: the carrier is then `ramp - n*Vm`, and the
  current, which rises by `vin` per clock while the switch is on, is
  `acc + n*vin`. If the prediction never fires, `gate` turns off together with
  `gate_ideal`.
- `gate` turns on `n_dloff_on` clocks before the period ends.
- Turn-off decisions are taken only before the early turn-on point. When
  `gate_ideal` stays on for the whole period (duty cycle 1, near the zero
  crossing), `gate` stays on as well.

After the driver delays, the real switch then follows `gate_ideal`. In the
closed-loop test it matches `gate_ideal` in 99.85 % of clocks; the remainder
is one clock at each edge. Set the two leads to the measured driver delays in
clocks (92 and 62 at 100 MHz for the source's prototype).

## Sample prediction (`linear_extrapolator`)

Sampling and registering make the readings lag the real voltage. The sign of
that error follows the slope of the voltage. Since the voltages are smooth, a
one-step linear prediction can cancel most of that error:
`x[n+1] = 2·x[n] − x[n−1]`, clamped to 0…255. Samples are taken once per
switching period. Both voltages are predicted before they reach the
rebuilder. `extrap_en = 0` passes the held sample through instead. In the
simulations below, the result is slightly better with the prediction turned off (see
[Verification](#verification)).

## Output-voltage loop (`voltage_loop`)

A clamped PI controller, updated once per switching period:

```
e      = vref - vo_code
integ  = clamp(integ + ki*e, 0, 65535 << 8)
Vm     = clamp((integ >> 8) + kp*e, 0, 65535)
```

The loop must stay well below 100 Hz, otherwise the output ripple modulates
`Vm` and distorts the line current. The gains are inputs because they depend
on the power stage. The closed-loop test uses `kp = 128`, `ki = 32` with
470 µF.

## Interface of `pfc_controller`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `vin_cmp`, `vo_cmp` | in | 1 | comparator outputs, 1 = voltage above filtered stream |
| `vin_bs`, `vo_bs` | out | 1 | bitstreams to the RC filters |
| `gate` | out | 1 | compensated drive to the gate driver |
| `run` | in | 1 | 0 keeps the switch off and clears the rebuilder and both loops |
| `vref` | in | 8 | output-voltage reference as an ADC code |
| `kp`, `ki` | in | 8 | voltage-loop gains |
| `n_dlon_off`, `n_dloff_on` | in | 8 | drive leads in clocks |
| `extrap_en` | in | 1 | enable sample prediction |
| `vs_comp` | in | 16, signed | volt-seconds correction added to the rebuilt current at each turn-off |
| `vin_code` … `pred_clamped` | out | — | internal signals for observation |

Parameters (defaults): `M`=13, `N`=8, `TS`=1370, `ACC_W`=24, `VM_W`=16,
`RS_SHIFT`=6, `DL_W`=8, `VS_W`=16, `G_W`=8, `I_SHIFT`=8. `M`, `N`, the 100 MHz clock and
the 73 kHz switching frequency are the source's values. The widths are this
design's own choice. Shared constants and the `sw_state_e` type are in
`rtl/pfc_pkg.sv`.

Scaling: both dividers must have the same ratio, because the rebuilder
subtracts the two codes directly. `RS_SHIFT` and `VM_W` set the range of
`Vm`. At 400 W from 220 Vrms, `Vm` settles near 7,500, and at 135 W from
75 Vrms near 23,000. Low line at full power needs the most `Vm`; check that it
stays below 65,535 for your stage, or lower `RS_SHIFT`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`.

| testbench | what it checks |
|---|---|
| `tb_sd_updown_counter` | random steps against a saturating reference count; both limits reached |
| `tb_sd_modulator` | exactly `din` ones in every 2^13 clocks; bit-exact against a carry model |
| `tb_sd_adc` | with a behavioural RC/comparator: 7 DC levels settle within ±2 LSB, mean within 0.5 % FS; a rectified sine 6× faster than 50 Hz tracked within ±3.5 LSB |
| `tb_sd_adc_rc_sweep` | three filters at M = 8, 50 MHz: oscillation grows and error falls with RC; 220 pF within 2 % error and 30 % oscillation |
| `tb_linear_extrapolator` | random ramps and jumps against `2x[n]-x[n-1]` (clamped) and against the plain sample when prediction is off |
| `tb_current_rebuilder` | random switching against an integer model that stops at zero and at full scale, with random `vs_comp` added at each turn-off; one boost period with a known peak, with and without a correction |
| `tb_one_cycle_ctrl` | clock-by-clock against a reference that evaluates `Vm(1-t/Ts) <= i` by direct multiplication, with random `Vm`, voltages and leads; drive leads checked on both edges |
| `tb_voltage_loop` | random errors and gains against an integer PI model, both clamps reached |
| `tb_pfc_controller` | closed loop at default parameters, two operating points, see below |
| `tb_pfc_delay_compensation` | closed loop with and without drive leads, prediction and rebuilder correction |
| `tb_pfc_rating` | closed loop at 500 W, 220 Vrms, 60 Hz |
| `tb_pfc_inductance` | closed loop with the inductor 20 % below the assumed value |

`tb_pfc_controller` closes the loop around behavioural models of the analog
parts, written in `real` arithmetic:
- `tb/adc_rc_comparator.sv`: RC filter with 1 kΩ and 220 pF, ideal comparator.
- `tb/boost_plant.sv`: 1 mH, 470 µF, ideal diode and switch, resistive load.
  The gate driver has a 620 ns turn-on and a 920 ns turn-off delay, and the
  controller's leads are set to match.

The test runs 220 Vrms/400 W and then 75 Vrms/135 W, with 400 V output in
both cases. That is 580 ms of simulated time and takes about 30 s. Results:

| point | Vo | power factor | rebuilt-current shape error | switch = ideal drive |
|---|---|---|---|---|
| 220 Vrms, 400 W | 400.7 V | 0.957 | 22 % | 99.85 % |
| 75 Vrms, 135 W | 405 V | 0.915 | 45 % | 99.85 % |

"Shape error" is the mean absolute difference between the period-averaged
rebuilt current and the real current. The rebuilt current is first scaled to
the real mean, and the difference is given relative to that mean. The test
requires Vo within 4 % of 400 V, PF ≥ 0.90, shape error ≤ 30 % / 50 %, and a
switch match ≥ 97 %. It also counts ADC up and down steps, predicted samples
that differ from the plain ones, DCM clocks, continuous-conduction periods,
early turn-ons and turn-offs, and the line change. It fails if any of these
never occurs.

The shape error comes from 8-bit quantisation of the two voltages, integrated
over each half line cycle as described above. It is largest at low line,
where the input codes are small. The publication reports measured power
factors of 0.98 at 75 Vrms and 0.96 at 220 Vrms on its prototype. These
simulations use an idealised plant and are not a reproduction of those
measurements.

`tb_pfc_delay_compensation` repeats the 220 Vrms / 400 W point four times
from the same start. Each run settles for 150 ms and is measured for 40 ms:

| run | PF | shape error | switch = ideal drive | Vm |
|---|---|---|---|---|
| A: leads 92/62, prediction on | 0.933 | 28 % | 99.85 % | 7386 |
| B: leads 0/0, prediction on | 0.584 | 106 % | 88.7 % | 1365 |
| C: leads 92/62, prediction off | 0.942 | 21 % | 99.85 % | 3492 |
| D: leads 0/0, `vs_comp` = 30 · 227 = 6810 | 0.887 | 48 % | 88.7 % | 10050 |

Without the leads, the 300 ns of extra on-time in each period is missing
from the rebuilt current. The error adds up between zero crossings, and the
current shape collapses. This is the main reason to set the leads to the
measured delays. Run D leaves the drive uncompensated but adds the missing
volt-seconds inside the rebuilder. This roughly halves B's error, but D stays
behind A: the rebuilt current's bookkeeping is corrected, but the switch
timing is not. In D, Vo was still at 380 V when the measurement started. The
test checks A, checks that B is clearly worse, and checks that D is clearly
better than B.

With the plant and converter models used here, the one-step prediction does
not help: run C is slightly better than run A. These models have almost no
acquisition delay: the only delay is the once-per-period sampling, at most 13.7 µs. The
prediction also raises the quantisation noise of the 8-bit samples. On
hardware with a real sample-and-hold delay the balance may differ, so the
prediction is kept, and `extrap_en` can turn it off.

`tb_pfc_rating` runs the prototype's rated point: 500 W from 220 Vrms at
60 Hz. It measures P = 520 W, Vo = 399.3 V, PF = 0.973, a 17 % shape error and
Vm = 7978, with no saturation.

`tb_pfc_inductance` fits a 0.8 mH inductor where the scale assumes 1 mH
(220 Vrms, 400 W). The result is close to the nominal run A: PF 0.926, a 30 %
shape error, and Vm = 6600 instead of 7386. The voltage loop absorbs the scale
error.

Running a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_pfc_controller rtl/pfc_pkg.sv tb/tb_pfc_controller.sv
./obj_dir/Vtb_pfc_controller
```

Replace the top module and file name for the other testbenches.

## Departures and own choices

Taken from the source: the converter structure (counter, first-order
modulator, RC filter, comparator), M = 13 with N = 8 bits used, the 100 MHz
clock, the 73 kHz switching frequency, the rebuilding accumulator, the
one-cycle law, the two drive leads, and the prediction formula.

This design's own choices:
- The ADC result is rounded instead of truncated. There is a two-flip-flop
  synchroniser, and the counter saturates.
- Prediction is applied once per switching period, to both voltages. The
  voltage loop uses the plain output reading.
- The rebuilder clamps at zero for DCM and at full scale. It is driven by the
  non-compensated drive.
- The look-ahead rule that places the early turn-off.
- `Vm` and `n_dlon_off` are sampled at the period start.
- No turn-on in a period where `Vm` is 0.
- There are no duty-cycle limits and no protection: no over-voltage,
  over-current or soft-start sequencing beyond `run`.
- The voltage loop is a clamped PI with run-time gains, updated once per
  period. The source says only that `Vm` comes from the outer voltage loop.
- The source's block diagram shows a multiplier forming a current reference
  from the voltage-loop output and the input voltage. With one-cycle control
  that reference is implicit (`Vm * vin / vo`), so no multiplier is built.
- The source says that known delay and offset errors can be corrected inside
  the rebuilding algorithm with a single variable, without saying how. Here
  that variable is `vs_comp`, added once per period at turn-off. Both this
  and the drive leads are built.
- All register widths, `RS_SHIFT`, reset values, and the output voltage and
  divider used in the tests.

Not covered: the analog parts, the gate driver and the power stage exist only
as simulation models. The controller has not been simulated with comparator
offsets or comparator delay. Low line (75 Vrms) was run only at 135 W.
