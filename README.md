# Saturated-PI phase-leg model for real-time converter simulation

A hardware-in-the-loop (HIL) simulator computes a power converter in real
time. It runs on an FPGA with a fixed time step of about 100 ns, and a real
controller card is wired to it. The usual phase-leg model is a switching
function: the leg voltage jumps to one rail or the other, chosen by the gate
signals or, with both gates off, by the sign of the current. That model fails
once the current reaches zero with both gates off, which is discontinuous
conduction, a disabled bridge, or dead time at light load. The sign of the
current then flips every few steps. The leg voltage becomes a false
rail-to-rail square wave, a small triangular current remains, and its
rectified part slowly charges the DC link. Dead-time compensators,
back-EMF measurement and over-voltage protection cannot be tested against
such a model.

This design replaces the switch with a **saturated PI controller**. The gate
signals and the device voltage drops give a high and a low limit for the
leg voltage. The controller, fed with the leg current, picks the leg voltage
between those limits:

* A gated switch or a conducting diode pins the output to a limit. The leg
  then acts exactly like the switching-function model, drops included.
* With both gates off and the current at zero, the output leaves the limits.
  The controller sets whatever voltage holds the current at zero. That voltage
  is the voltage of the load side (grid, back-EMF or output capacitor), which
  is what a real leg shows once its junction-capacitance ringing has died away.

The model still uses a forward-Euler step of 100 ns and is cheap: one
multiply-add for the proportional path, one for the integrator, and
comparators for the limits.

The RTL models a complete test circuit around three such legs. It is a
three-phase interleaved synchronous buck battery charger: a 600 V source, three
2.5 mH / 50 mOhm inductors, and a 1.1 mF output capacitor with a 4.7 kOhm
bleeder, charging a 450 V / 0.2 Ohm battery through a blocking diode.

## The leg model (`phase_leg`)

Leg voltages inside the leg model are measured from the DC-bus midpoint, so
the rails are at +U_DC/2 and -U_DC/2. The current `i_ac` is the current
flowing *into* the leg node from the AC side.

### Limits (`leg_limits`, `voltage_drops`)

| gates        | high limit (current flowing in)  | low limit (current flowing out)  |
|--------------|----------------------------------|----------------------------------|
| both off     | +U_DC/2 + upper diode drop       | -U_DC/2 - lower diode drop       |
| upper on     | +U_DC/2 + upper diode drop       | +U_DC/2 - upper switch drop      |
| lower on     | -U_DC/2 + lower switch drop      | -U_DC/2 - lower diode drop       |

The high limit is the voltage the leg would have if current flowed into the
node. The low limit is the voltage for current flowing out. With one gate on,
the window is only a few volts wide around that rail. With both gates off, it
spans the whole bus plus the diode drops. If both gates are on (shoot-through),
the limits cross and the high limit wins.

Each drop is `U0 + r*|i|`. The defaults are 1.0 V + 10 mOhm for the diodes and
1.0 V + 15 mOhm for the switches. These values are placeholders: change
`DIODE_*` and `SWITCH_*` for a real device. The drops are registered on the
step strobe, so they lag the current by one step.

### Controller (`sat_pi`)

```
i'    = clamp(i_ac, -Ilim, +Ilim)
u     = Ap * i' + s(n-1)
y     = clamp(u, lo_lim, hi_lim)          -- the leg voltage
s(n)  = s(n-1) + (Ts/Ti) * (y - s(n-1))
```

The integral action comes from positive feedback through a first-order
low-pass of the *saturated* output. This is the automatic-reset form of a PI
controller. Because the state follows `y` and never the unclamped `u`, it
cannot wind up while the leg is pinned to a rail. When the gates release, the
state is already at the rail voltage. A useful way to read it: the
controller acts as a series R-C hung on the leg node, with R = Ap and
R*C = Ti. The inductor current charges that small capacitor instead of
toggling the switch.

The input clamp `Ilim = U_DC / Ap` limits the proportional term to one bus
voltage. A larger current would only push the output further into
saturation, so clamping it changes nothing, and it keeps the multiplier
narrow. With the defaults, Ilim = 600 V / 17.5 kOhm = 34.3 mA, which is
70 current LSBs. In continuous conduction the leg current is far above this,
so the clamp is almost always active, and that is intended.

### Tuning

The gains come from a rough model of the load: the net inductance seen
during discontinuous conduction (L_disc), and the loop's response time
t_resp. t_resp is half a step (the integrator's average delay) plus any
other delay. For a phase margin phi_m:

```
phi0  = pi/2 - phi_m
wc    = (2/3) * phi0 / t_resp
Ti    = 1 / (wc * tan(phi0/3))
Ap    = wc * L_disc
Ilim  = U_DC / Ap
```

With L_disc = 2.5 mH, t_resp = 50 ns and phi_m = pi/3, this gives
wc = 6.98 Mrad/s, Ti = 812 ns and Ap = 17.5 kOhm. These are the defaults of
`DISC_TI` and `DISC_AP`. The values only need to be roughly right. If L_disc
is too large the loop diverges. If it is too small the loop oscillates.

### Rail current

`upper_path` is high while the upper switch is gated. With both gates off, it
is high while the output is clamped to the high limit, which means the upper
diode conducts. The top adds each phase current to the DC-link current `i_dc`
while that flag is set. In discontinuous conduction the leg is between its
limits and the current is zero, so nothing reaches the DC link. This removes
the false DC-link charging of the switching-function model.

## The charger circuit (`charger_hil_top`)

Each time step is 100 ns. The top generates the step as one clock in
`STEP_DIV` = 10, for a 100 MHz clock. On the step clock every state advances
together:

| block             | state        | update per step                                                   |
|-------------------|--------------|-------------------------------------------------------------------|
| `inductor_branch` | phase current i_k | i += Ts/L * (u_leg_k - u_out - R_s*i)                        |
| `output_node`     | u_out        | u_out += Ts/C * (sum i_k - u_out/R_C - i_batt)                  |
|                   |              | i_batt = max(0, (u_out - U_batt)/R_batt), an ideal diode       |
| `sat_pi` (x3)     | s            | as above                                                        |
| `voltage_drops` (x3) | drops     | from the current of this step                                   |

Within a step, the path from the registered phase currents through the three
PI controllers (multiply, add, clamp) to the next inductor currents is
combinational. The states change only on the step clock, so this path
really has `STEP_DIV` clocks to settle. A timing tool still treats it as a
single-cycle path unless it is given a multicycle constraint. The gate
inputs are sampled directly. They must be synchronous to `clk`: add
synchronisers if they come from off-chip.

Sign conventions at the top level: phase currents `i_ph` flow from the legs
towards the capacitor. Voltages are measured from the negative rail, 0 to
600 V. `i_dc` is positive out of the source's positive terminal. The top
negates each phase current before passing it to its leg model.

Reset puts the circuit at the charger's operating point: 450 V on the
capacitor, zero currents, and zero PI state. `u_dc` and `u_batt` are inputs,
so a test can change them at run time, for example to drive the bridge into
rectification (`u_out > u_dc`).

Analog outputs: seven first-order sigma-delta modulators (`sigma_delta_dac`)
turn signals into one-bit streams, one bit per clock:

* `dac_bits[0..2]`: `i_ph`, full scale +/-64 A.
* `dac_bits[3..5]`: `u_leg`, full scale +/-1024 V.
* `dac_bits[6]`: `u_out`, full scale +/-1024 V.

Each stream needs an RC filter outside the FPGA.

Status outputs: `dcm`, `sat_hi`, `sat_lo` and `i_limited` for each leg, and
`batt_diode_on`.

## Number formats

Format of each signal type (`hil_pkg`):

| quantity                | word | fraction | range / LSB              |
|-------------------------|------|----------|--------------------------|
| current (`amp_t`)       | 18   | 11       | +/-64 A, 0.49 mA         |
| voltage (`volt_t`)      | 32   | 21       | +/-1024 V, 0.48 uV       |
| PI state                | 44   | 33       |                          |
| inductor current state  | 38   | 31       | saturates at +/-64 A     |
| capacitor voltage state | 48   | 37       |                          |

The state registers carry extra fractional bits because the per-step
increments are tiny. One volt across 2.5 mH moves the current by 40 uA per
step, which is less than one current LSB. The coefficients are computed from
`real` parameters at elaboration. To change a component or a gain, override
the parameter. All arithmetic saturates instead of wrapping.

A current LSB times Ap is 8.5 V. So in discontinuous conduction the leg
voltage moves in steps of about 8.5 V around the load voltage, while the
current stays within one or two LSBs of zero. An analog output stage filters
this out.

## Own choices

These parts do not come from the published model:

* **Voltage word width.** The published model keeps 21 fractional bits for
  voltages and 18-bit signals. 600 V does not fit in 18 bits at that
  resolution, so voltages use 32-bit words. Currents use 18 bits with 11
  fractional bits, as published.
* **Input limit.** Ilim is computed as U_DC/Ap = 34.3 mA. A value of 0.23 A
  also appears for this case, but it is not consistent with the formula or
  with the reason for the clamp.
* **Device drops.** The drop characteristic (threshold plus slope) and its
  values are placeholders.
* **Circuit details.** The ideal battery diode, the 450 V reset point and the
  rule for the rail current are this design's.
* **Clock and DACs.** The 100 MHz clock, `STEP_DIV`, the choice and scaling of
  the DAC channels and the modulator structure are this design's.

Not modelled:

* The junction-capacitance ringing after switch-off. The PI model reproduces
  only the DC and low-frequency part of the leg voltage, by design.
* Multilevel legs. The same idea applies with limits chosen from more levels.
* Run-time gain changes. Gains are elaboration-time parameters.
* Communication and measurement interfaces other than the sigma-delta DACs.

## Verification

Every block in `rtl/` has a self-checking testbench in `tb/<module>_tb.sv`.
Each prints `TB_RESULT checks=N failures=M`.

* `charger_hil_top_tb` runs the whole charger at its default parameters. It
  applies 10 kHz three-phase interleaved PWM (duty 0.75, 2 us dead time) for
  two periods, disables all gates for 100 us, then lowers U_DC to 400 V so
  the disabled bridge rectifies. Every step it compares phase currents, leg
  voltages and `u_out` with a real-valued model of the same equations in the
  testbench. Maximum deviations seen: 0.5 mA, 8.5 V (one current LSB times
  Ap) and under 0.1 mV. After the disable, the currents must be zero, the leg
  voltages must equal `u_out` and `i_dc` must be zero. During rectification
  every leg must carry current on its upper diode and `i_dc` must be
  negative. The test also counts each mechanism: switch conduction,
  dead-time diode conduction, DCM, input clamp, battery diode on and off,
  and rectification. A mechanism that never occurs is a failure. It also
  checks the 10-clock step period.
* `disable_event_tb` switches all gates off during PWM operation at the
  default parameters. From the current at the disable and the inductor
  equation it predicts when each leg's current reaches zero. The DCM flag
  must rise within 5 % of that prediction. In practice it rises within one
  step: 97, 124 and 477 steps against predictions of 96.7, 123.5 and 476.8.
  The test also bounds the overshoot after the zero crossing to 60 mA. It
  requires the currents to settle below 2 mA, the leg voltages to settle on
  `u_out`, and the mean DC-link current to be zero.
* `light_load_dcm_tb` runs the charger at light load with the battery diode
  blocking, so each leg goes discontinuous every PWM period. In the first
  five periods only the upper switches are gated. For every pulse the test
  checks the peak current, the step at which DCM starts, and that late in
  the period the current is zero and the leg voltage equals `u_out`. In the
  last five periods the lower switch is also gated, after a 3 us dead time.
  The current then reaches zero inside the dead time, so the leg must enter
  DCM there. After the lower pulse the leg must enter DCM a second time, at
  the predicted step.
* `phase_leg_tb` closes the loop through a testbench inductor and compares
  each step with a real-valued leg model.
* `sat_pi_tb` checks the controller with random currents and limits,
  including narrow windows that keep it saturated. It also checks that the
  tuning equations give the default Ti and Ap.
* `leg_limits_tb`, `voltage_drops_tb`, `inductor_branch_tb`, `output_node_tb`
  and `sigma_delta_dac_tb` test each block against values computed
  independently of it.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/hil_pkg.sv rtl/*.sv \
          tb/charger_hil_top_tb.sv --top-module charger_hil_top_tb
./obj_dir/Vcharger_hil_top_tb
```

Replace the testbench name to run another test. The top-level run takes well
under a second.
