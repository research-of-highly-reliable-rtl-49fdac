# PMSM current-loop coprocessor for a Zynq-class SoC

This design moves the fast inner loop of a permanent-magnet synchronous motor (PMSM) servo
drive out of processor software and into programmable logic. The processor keeps the slow
loops. It runs position control with sensor voting and filtering, speed control and
feed-forward, and writes one number per control cycle: the q-axis current command. The
logic does everything that must happen inside one PWM period:

- sample the phase currents and the rotor angle;
- run field-oriented current control and space-vector modulation;
- drive six gate signals with dead time;
- shut the bridge off on overcurrent.

Doing this work in parallel hardware frees the processor and lets the switching frequency
rise. The reference drive runs at 15 kHz rather than 10 kHz, which lowers the phase-current
ripple peak at high motor speed.

The RTL is in `rtl/` (SystemVerilog 2017, synthesizable). Self-checking testbenches are in
`tb/`.

## One PWM period, end to end

```
            clk_100 (100 MHz)                         clk_50 (50 MHz)
 +---------+  o_intrrupt  ----------------------------> processor interrupt
 | pwm_gen |------------+--- pulse_sync --------------> adc_if (AD7606) --+
 +---------+            |                          \--> rdc_if (AD2S1210)-+
      ^ i_data_latch    |                                                 |
      |                 |  <------------- pulse_sync (done) x2 -----------+
      |          join: both samples of this period present
      |                 v
      |            zero_drift --> oc_protect --> fault: gates off
      |                 |
      +---- cur_closeloop (CORDIC sin/cos, Clarke, Park, PI d/q,
                           inverse Park, SVPWM) -> tu, tv, tw
```

1. **Period start.** The PWM counter reaches zero. `pwm_gen` pulses `o_intrrupt`. This pulse
   is the processor's control-cycle interrupt, and it also starts acquisition. At the same
   clock the timer loads the compare values from the previous step.
2. **Acquisition at 50 MHz.** The start pulse crosses to `clk_50`. `adc_if` pulses CONVST,
   waits for BUSY, then reads channels 1 and 2 with two RD strobes. `rdc_if` clocks a 16-bit
   angle out of the resolver converter. Each interface answers with a done pulse, and its
   result registers stay stable until the next request.
3. **Join.** Both done pulses cross back to `clk_100`. The results are captured. Once the
   current sample and the angle sample of this period are both present, one sample pulse
   goes out.
4. **Zero-drift correction** subtracts the calibrated sensor offsets. **Overcurrent
   protection** checks |iu|, |iv| and |iw| = |iu+iv| against a threshold. A trip latches,
   and one clock later all six gate outputs are off.
5. **Current loop.** This takes 22 clocks from start to done with the default 16 CORDIC
   iterations. The new tu/tv/tw go to the timer's shadow registers through `i_data_latch`.
6. They take effect at the **next** period start. So the loop has one PWM period of
   transport delay, the usual choice for regularly sampled drives.

With a 4 µs ADC conversion, new compare values are ready about 4.5 µs after the interrupt.
That is well inside the 66.7 µs period at 15 kHz, or 100 µs at 10 kHz.

## Current loop and modulation (`cur_closeloop`)

The loop is a short sequential datapath controlled by a six-state FSM:
IDLE → TRIG → PARK → PI → IPARK → SVM. Each transform is a combinational module, and the
FSM registers the results between steps. Each multiplier is used once per loop step, and a
step comes only once per PWM period, so sharing them would save area. That change only
touches the FSM.

| step | module | function |
|---|---|---|
| sin/cos | `sincos_cordic` | iterative CORDIC, 16 micro-rotations, folds the angle into ±90° first; Q2.14 outputs, error ≤ 3 LSB |
| Clarke | `clarke` | iα = iu, iβ = (iu + 2 iv)/√3 (two sensors, currents assumed to sum to zero) |
| Park | `park` | id = iα cosθ + iβ sinθ, iq = −iα sinθ + iβ cosθ |
| PI | `pi_ctrl` ×2 | d-axis reference fixed at 0; q-axis reference from the processor |
| inverse Park | `inv_park` | Uα = Ud cosθ − Uq sinθ, Uβ = Ud sinθ + Uq cosθ |
| SVPWM | `svpwm` | Uα, Uβ → three on-time counts and the sector number |

**Number formats.** These are this design's choices.

| quantity | format |
|---|---|
| currents | signed 16-bit ADC counts |
| voltages | signed 16-bit, where 32768 = DC-link voltage |
| angle | unsigned 16-bit, 65536 = one electrical turn |
| sin/cos | Q2.14 |
| PI gains | Kp Q8.8, Ki Q4.12 |

All products are kept at full width, rounded, then saturated to 16 bits.

**PI limiting and wind-up.** `pi_ctrl` clamps the integrator to the same ±limit as the
output. After saturation, the output leaves the limit on the first step where the error
changes sign. The default limit is 18918, which is Vdc/√3, the edge of the linear
modulation range. `o_pi_sat` reports that the limit was reached.

While the drive is disabled (`CTRL.run` = 0, or a fault), the integrators are held empty.
This prevents integral build-up before the power stage is energised.

**Why min-max injection gives SVPWM.** The textbook method finds the sector, computes dwell
times T1, T2 and T0, and assigns them through a sector table. `svpwm` instead rebuilds the
three phase references with the inverse Clarke transform and adds the common-mode term
−(max+min)/2 to all of them. It then sets on_x = H·(½ + v_x/Vdc). In the linear range this
gives exactly the symmetric SVPWM dwell times, with T0 split equally between 000 and 111,
using only comparisons.

The testbench checks this against an independent sector/T1/T2 reference. `o_sector` is
still computed the textbook way (N = A + 2B + 4C) as a status output. Beyond |U| = Vdc/√3
the counts saturate to 0 or H. This is plain clipping, with no special overmodulation
strategy.

## PWM timer (`pwm_gen`)

- The counter is centre-aligned: up 0…H−1, then down H…1. One period is 2H clocks, and H
  is taken from the `HALF` register at each period start. At 100 MHz, H = 3333 gives
  15 kHz, H = 4167 gives 12 kHz and H = 5000 gives 10 kHz.
- A phase reference is high for exactly 2·cmp clocks per period, centred on the period
  boundary.
- Every reference edge switches both transistors of the leg off for `DEAD` clocks
  (default 100 = 1 µs). So the high side conducts for 2·cmp − dead clocks and the low side
  for 2·(H − cmp) − dead.
- Compare values are double-buffered. A latch in mid-period never changes the running
  period.
- `i_en` gates all six outputs combinationally. The counter and the interrupt keep running
  while the drive is off, so calibration can sample.

## Converter interfaces

**`adc_if` (AD7606, parallel bus)**

- CONVST is held low for 2 clocks.
- The interface allows 3 clocks for BUSY to rise, then waits for BUSY low.
- It then reads two channels with CS low and RD strobes of 2 clocks low and 2 high. Data is
  sampled in the last low clock.
- If BUSY stays high for 500 clocks (10 µs), the acquisition ends with `o_err` set and the
  old samples are kept. The top level reports this in `STATUS.adc_err`.

**`rdc_if` (AD2S1210, serial)**

- CS and FSYNC are low for one 16-bit frame.
- SCLK idles high at clk/(2·SCLK_DIV) = 12.5 MHz.
- MOSI carries the command word `CMD` (default 0x8000), MSB first, and changes on falling
  SCLK.
- MISO is sampled on rising SCLK.
- A read takes 66 clocks (1.32 µs).

Both interfaces use timings chosen for the named converters. Check them against the actual
parts' data sheets before use. The parameters are there for that.

## Zero drift and protection

**`zero_drift`.** A 0→1 edge of `CTRL.cal` starts a calibration, to be issued with the
drive stopped. The next 64 sample pairs are averaged into the offsets, and then
`STATUS.cal_done` is set. Every later sample is corrected by subtraction, with saturation.

**`oc_protect`.** The fault latches in the clock after the offending sample and records
which phase(s) tripped. It clears only on a `CTRL.fault_clr` write while the present sample
is below the threshold. The threshold is in ADC counts. Its relation to amperes depends on
the current-sensor scaling.

## Register map (`axi_lite_regs`)

The bus is AXI4-Lite with 32-bit data and 8-bit addresses, on `clk_100`. Write address and
write data must be offered together. Responses are always OKAY.

| byte addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] run, [1] cal (0→1 starts a calibration), [2] fault_clr (self-clearing) |
| 0x04 | IQREF | q-axis current command (signed) |
| 0x08 / 0x0C | KPD / KID | d-axis gains, reset 256 (1.0) / 64 |
| 0x10 / 0x14 | KPQ / KIQ | q-axis gains, reset 256 / 64 |
| 0x18 | VLIM | PI limit, reset 18918 (Vdc/√3) |
| 0x1C | HALF | PWM half period, reset CLK_HZ/(2·PWM_FREQ_HZ) = 3333 |
| 0x20 | DEAD | dead time in clocks, reset 100 |
| 0x24 | OCLIM | overcurrent threshold, reset 30000 |
| 0x40 | STATUS | [0] fault, [3:1] trip U/V/W, [4] cal_done, [5] adc_err, [6] pi_sat, [10:8] sector |
| 0x44 | IUV | {iv, iu} after offset removal |
| 0x48 | THETA | last rotor angle |
| 0x4C | IDQ | {iq, id} |
| 0x50 / 0x54 | TUV / TW | {tv, tu} / tw compare counts |
| 0x58 | COUNT | completed loop steps |

The four IP cores of the original partitioning each had their own AXI slave port. Here one
slave serves them all, which removes the need for an AXI interconnect.

## Clocks and reset

The design has two clocks: `clk_100` (loop, PWM, protection, registers) and `clk_50`
(converter interfaces). They are treated as asynchronous.

- `pulse_sync` carries each start or done pulse with a toggle and a 2-flop synchroniser.
- The data that goes with a pulse is held stable by its sender until the next request, a
  whole PWM period later. It can therefore be sampled directly.
- `rst_n` is asynchronous and active low. `reset_sync` releases it synchronously in each
  domain.

Lint flags the reset synchronisers' flops as both asynchronous and synchronous (the
SYNCASYNCNET warning). That is intended. The AXI assertions add the same warning for
`rst_n` in `axi_lite_regs`.

## What is not in the RTL

These parts of the complete drive stay outside the RTL.

- **Processor software.** Position loop, LVDT voting and the first-order filter
  y(n) = a·x(n) + (1−a)·y(n−1), feed-forward, speed PI, and speed calculation from the
  angle with low-pass filtering.
- **Processor-side infrastructure.** Boot from QSPI flash, CAN and RS-422 links, parameter
  EEPROM, and the EMIO control signals.
- **Redundancy control.** A redundancy-control logic block is part of the original
  architecture, but its function is not specified, so it is not implemented.
- **The electrical side.** Gate drivers, IGBT module, converters, analog conditioning, the
  motor and the mechanism.

Other limits and departures:

- The angle from the resolver interface is used directly as the electrical angle. A motor
  with more pole pairs than the resolver needs a multiplication by the pole-pair ratio in
  front of `iv_theta`.
- All widths, formats, bus timings, the register map, the dead-time value, the 64-sample
  calibration and the CORDIC are this design's own choices. The architecture, the block
  partitioning, the clock allocation (100 MHz / 50 MHz), the converter pin sets and the
  switching frequencies are those of the reference drive.
- Timing closure at 100 MHz and resource use have not been checked. The combinational
  Park and SVPWM stages each hold several 16×16 multiplies in one clock.

## Verification

Each module has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and carries a watchdog. The testbenches compare against
floating-point references written independently of the RTL:

- CORDIC against `$sin`/`$cos`;
- transforms against real-number matrices;
- SVPWM against a sector-geometry dwell-time model (`tb/tb_ref_pkg.sv`);
- PI against a real-valued clamp model.

They also check the cycle counts: 17 clocks for the CORDIC, 22 for the loop, 66 for the
resolver read, and 2H for the PWM period with exact on-times.

The converters are behavioural models in `tb/ad7606_model.sv` and `tb/ad2s1210_model.sv`.

`tb/tb_apsoc_servo_top.sv` runs the whole design at its default parameters, with 15 kHz
PWM. It goes through:

1. calibration;
2. closed-loop steps checked against the model, including the measured gate on-time;
3. PI limiting;
4. an overcurrent trip and its clear;
5. switching to 10, 12 and 15 kHz.

It counts each mechanism and fails if one never occurs. It runs in a few seconds.

`tb/tb_servo_closed_loop.sv` closes the loop around a motor. The gate outputs drive a
behavioural PMSM (`tb/pmsm_model.sv`), and the model's currents (plus sensor offsets) and
rotor angle feed the converter models. The model includes:

- freewheeling-diode behaviour during dead time;
- a back-EMF proportional to speed;
- Euler integration of the stator equations, 16 steps per period.

After calibration the processor role sets Kp = 1.0 and Ki = 0.1 and commands iq. The test
passes if the model's own current, resolved at the model's own angle, settles within 4 % of
the command on the q axis with a small d component. It checks this for +2000, −1000 and
+3000 counts at two speeds.

The motor constants are illustrative: R = 0.05, L = 3·Ts, and back-EMF scaled to speed.
They are not those of a particular motor. With these constants the settled iq is within
about 1 % of the command and |id| is about 2 % of it. The run takes about 10 s.

Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/apsoc_pkg.sv tb/tb_ref_pkg.sv tb/tb_apsoc_servo_top.sv \
  --top-module tb_apsoc_servo_top -Mdir obj && obj/Vtb_apsoc_servo_top
```
