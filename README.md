# Minimum-loss field-oriented control of a PMSM, in fixed-point RTL

This is the digital controller of a permanent-magnet synchronous motor (PMSM)
drive. It runs field-oriented control (FOC) and also chooses the d-axis
current so that the machine's electrical losses are as low as possible. It
is written for the FPGA side of a hardware-in-the-loop (HIL) bench. There, the
inverter, the motor and the sensors are simulated elsewhere. The controller
receives sampled phase currents, rotor angle and speed. It returns the gate
commands of the inverter's three upper switches.

The central idea is simple. In a classical FOC drive the d-axis current is
held at zero and the q-axis current makes the torque. But a PMSM also loses
power in its iron, and that loss grows with the square of the flux and of the
speed. A negative d-axis current weakens the magnet flux. This lowers the
iron losses and costs some copper losses, so at each operating point there is
an optimal `i_d`. The controller contains two ways of finding it:

* **model-based**: a closed-form expression for the optimum, evaluated in
  64-bit Q32.32 arithmetic (`lma_model`);
* **bisection search**: a state machine that halves an interval of candidate
  currents. At each step it compares the losses on either side of the
  midpoint (`lma_binary`).

The policy is chosen at run time from classical FOC (`i_d* = 0`), model-based
or bisection.

## Signal flow

```
 w_ref, w ──► lma_unit ──► i_q* (speed PI)          i_d* (policy)
                              │                        │
 i_a, i_b ─► abc_to_dq ─► i_q ┤  i_d ──────────────────┤
               ▲           ┌──▼─────┐             ┌────▼───┐
   theta ─► sincos_cordic  │ pi_ctrl│ v_q*        │pi_ctrl │ v_d*
               │           └──┬─────┘             └────┬───┘
               │              └────────► decoupling ◄──┘   (+ w, i_d, i_q)
               │                            │ v_d, v_q
               └──────────────────────► dq_to_abc ─► v_a, v_b, v_c
                                            │
                                        svm_duty ─► T_ON,a/b/c
                                            │
                 clk_div ─ 1 MHz ─────► pwm_gen ─► S_A, S_B, S_C
```

`foc_lma_top` wires these blocks together. Every 10 µs (100 kHz) the inputs are
latched, and the chain below runs once:

| step | block | clocks |
|---|---|---|
| sin/cos of theta | `sincos_cordic`, 16-step CORDIC | 17 |
| Clarke + Park of the currents | `abc_to_dq` | 1 |
| d and q current PIs | `pi_ctrl` ×2 | 1 |
| cross-coupling compensation | `decoupling` | 1 |
| inverse Park + inverse Clarke | `dq_to_abc` | 1 |
| duty cycles and switching instants | `svm_duty` | 1 |

The new switching instants are ready 23 clocks after the sample. `pwm_gen`
applies them at the start of the next PWM period.

The speed PI and the loss-minimisation search run beside this chain, inside
`lma_unit`. They use the speed and `i_q` measured at the start of the sample.
The speed PI updates `i_q*` every sample. A new `i_d*` search starts every
sample and ends within about 120 clocks. The new `i_d*` is used from the next
sample on. At the 100 MHz system clock assumed here, a sample period is 1000
clocks, so the whole chain uses less than 15 % of it.

## Number format

Every signal is a signed 32-bit fixed-point number with 16 integer and 16
fractional bits (Q16.16). Its value is `raw / 65536`. This gives a range of
±32768 and a resolution of 15 µ. Units are amperes, volts, watts, radians
and electrical rad/s. The angle lies in [-π, π].

`hil_pkg` holds the types (`q16_t`, `q32_t`, `dq_t`, `abc_t`) and the
saturating helpers `q_mul`, `q_add`, `q_sub`. It also holds the example motor
constants.

Two blocks use more precision inside:

* `lma_model` works entirely in Q32.32. The closed form is a ratio of small
  differences of products, and Q16.16 loses it.
* `loss_eval` takes and returns Q16.16, but keeps 32 fractional bits
  internally. The bisection compares losses at currents only 2 mA apart. With
  16 fractional bits, the rounding of the flux `L_d·i_d`, multiplied by the
  speed, is larger than that difference near the optimum.

## The loss model

Both search methods minimise the total electrical loss of the machine model.
That model has a stator resistance `Rs` and an iron-loss resistance `Rc`
across the magnetising branch:

```
W(i_d, i_q, w) = 3/2 Rs [ (i_d - w Lq i_q / Rc)^2 + (i_q - w (λm + Ld i_d) / Rc)^2 ]
               + 3 w^2 / (2 Rc) [ (Lq i_q)^2 + (λm + Ld i_d)^2 ]
```

`loss_eval` computes W as a two-stage pipeline. It forms the back-EMF terms
`w·Lq·i_q` and `w·(λm + Ld·i_d)` first, so `w²` on its own is never needed.
Dividing by `Rc` is a multiplication by a constant reciprocal.

### Bisection search (`lma_binary`)

The search starts from the interval [-10 A, +10 A] with a step `d` of 1 mA
(66 LSB, 1.007 mA). Its state machine has four states:

* **Idle**: resets the interval. A `start` pulse latches `i_q` and `w` and
  moves to Status 1.
* **Status 1**: takes the midpoint `x`. It evaluates `W(x-d)`, `W(x+d)`,
  `W(i_dmin)` and `W(i_dmax)`, fed into one `loss_eval` on consecutive
  clocks.
* **Status 2**: if `W(i_dmin) = W(i_dmax)`, the optimum is at the midpoint.
  It outputs `x` and returns to Idle.
* **Status 3**: if `|i_dmax - i_dmin| < 2d`, it outputs `x` and returns to
  Idle. Otherwise, if `W(x-d) < W(x+d)` it sets `i_dmax = x`, else
  `i_dmin = x`, and goes back to Status 1.

A pass takes 8 clocks. Halving 20 A down to 2 mA takes 14 passes. W is a
convex quadratic in `i_d`, so the search cannot be trapped. Its accuracy is
limited by the Q16.16 resolution of W: near the optimum, the two losses 2 mA
apart differ by only a few LSB. The result lies within about 5 mA of the true
optimum. At zero speed W is symmetric in `i_d`, so the Status 2 exit ends the
search after one pass with `i_d* = 0`.

### Closed form (`lma_model`)

W is quadratic in `i_d`, so `dW/di_d = 0` can be solved once, off line.
With `k = w/Rc`:

```
i_d* = [ Rs k i_q (Ld + Lq) - Ld λm k (Rs k + w) ] / [ Rs + Ld^2 k (Rs k + w) ]
```

The block evaluates this in Q32.32 with parallel multipliers. It then runs one
96/64-bit restoring division (`div_seq`, one bit per clock). The result is
clamped to ±10 A and truncated to Q16.16. The latency is 99 clocks. It is
exact to about 1 mA, but only as good as the motor constants it is built with.
The bisection has the same dependence, because it minimises the same W.

## Space-vector modulation

`svm_duty` uses the duty-cycle form of space-vector modulation, which needs
no sector search and no trigonometry:

```
U*  = -(max(V_ra, V_rb, V_rc) + min(V_ra, V_rb, V_rc)) / 2
d_n = 1/2 + (V_rn + U*) / V_cc                    (clamped to [0, 1])
T_ON,n  = T_PWM/2 (1 - d_n)      T_OFF,n = T_PWM/2 (1 + d_n)
```

Adding the common-mode offset `U*` reproduces the centred switching pattern of
classical SVM:

* at the ends of the period all switches are off (null vector 000);
* in the middle all are on (111);
* the two active vectors of the sector lie in between, symmetrically.

Times are counted in 1 µs steps, with `T_PWM = 100 µs`, so `T_PWM/2 = 50`.

`pwm_gen` is the up/down counter that the instants are compared with. It
counts 0, 1, …, 50, 49, …, 1 at 1 MHz, which gives a 10 kHz triangle. A
switch turns on when the rising count reaches `T_ON` and off when the falling
count passes it again. The pulse therefore lasts exactly `2·(50 − T_ON) =
100·d` steps, centred in the period. New instants go into shadow registers
and take effect when the counter is at 0. The duty resolution is 1 %
(1 µs in 100 µs).

`clk_div` produces one-cycle enables from the system clock: `cnt_en` at
1 MHz and `sample_en` at 100 kHz. It does not generate derived clocks.

## Interfaces and timing of the top

`foc_lma_top` has the following ports. All scalar values are `q16_t` unless
stated.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | system clock (100 MHz assumed), synchronous active-high reset |
| `lma_mode[1:0]` | in | 0 classical FOC, 1 model-based, 2 bisection (3 behaves as 0) |
| `w_ref`, `w_meas` | in | speed reference and measured speed, electrical rad/s |
| `theta` | in | electrical rotor angle, rad, [-π, π] |
| `i_a`, `i_b` | in | phase currents; `i_c = -i_a - i_b` |
| `s_abc[2:0]` | out | upper switch commands, bit 0 = phase a |
| `sample_en`, `out_valid`, `period_start` | out | sample instant, new instants ready, PWM period start |
| `i_dq`, `id_ref`, `iq_ref`, `v_dq`, `v_abc`, `v_alpha`, `v_beta`, `duty[3]`, `lma_done` | out | internal quantities, brought out for observation |

The lower switches are the complements of `s_abc`. Dead time is not
generated.

## What follows the source design and what is this implementation's own

These points follow the source design:

* the block structure;
* the Q16.16 format, and Q32.32 for the model-based block;
* the 100 kHz sampling and the 10 kHz PWM from a 0–50 up/down counter at
  1 MHz;
* the SVM duty-cycle equations;
* the decoupling law;
* the loss expression;
* the bisection's interval, step, update rule and four states.

These are choices made here, because the source gives no values:

* **Motor and drive constants**: Rs = 1 Ω, Rc = 200 Ω, Ld = 5 mH,
  Lq = 7 mH, λm = 0.1 Wb, V_cc = 300 V. They are example values in
  `hil_pkg`; replace them for a real machine.
* **Clock**: 100 MHz system clock.
* **Gains and limits**:
  * current PI: Kp = 5 V/A, Ki = 1000 V/(A·s), limited to ±173 V;
  * speed PI: Kp = 0.05 A·s/rad, Ki = 20 A/rad, limited to ±10 A.
* **PI form**: the PI is the incremental form
  `y(k) = y(k-1) + Kp (e(k) - e(k-1)) + Ki Ts e(k)`. The one-line recursion
  it is based on, with a bare `Kp e(k)` term, would be a pure integrator.
* **Bisection stop test**: it uses the interval width `|i_dmax - i_dmin| < 2d`.
  **Ties**: when `W(x-d) = W(x+d)` the search moves `i_dmin`.
* **Model-based formula**: the closed form above is derived here from the
  loss expression. The source describes the model-based reference as worked
  out off-line. Here it is evaluated in hardware at each request, from the
  present speed and i_q*, so that no table is needed.
* **Sine and cosine**: they come from an iterative CORDIC.
* **Transform scaling**: both transforms use amplitude-invariant scaling.
* **Speed loop placement**: the speed PI sits inside the loss-minimisation
  block, because that block outputs both current references.
* **Policy selection**: the three policies are selected at run time rather
  than built as three separate designs.
* **Over-modulation**: duties are clamped to [0, 1].
* **PWM updates**: instants are double-buffered.
* **Reset**: all state is cleared by a synchronous reset.

## Verification

Every block has a self-checking testbench in `tb/`. The references are
computed independently in real arithmetic with `$sin`, `$cos` and `$sqrt`:

* `tb_sincos_cordic`: accuracy better than 3·10⁻⁴ over the full circle, and
  the 17-clock latency.
* `tb_abc_to_dq`, `tb_dq_to_abc`: balanced and random sets, to 2 mA and
  20 mV.
* `tb_pi_ctrl`: the incremental law, one-sample latency, hold between
  samples, and both output limits.
* `tb_decoupling`, `tb_loss_eval`: the equations, at random operating
  points.
* `tb_svm_duty`: duty and instants against the formulas, and
  `T_ON + T_OFF = T_PWM`.
* `tb_pwm_gen`: counter sequence, pulse position and width, step by step,
  and that new instants wait for the period start.
* `tb_clk_div`: the 100-clock and 1000-clock spacings.
* `tb_lma_model`: against the exact minimiser of W, to 1 mA, including
  clamping; latency 99 clocks.
* `tb_lma_binary`: against the exact minimiser of W, to 5 mA. It also
  checks the equal-ends exit at zero speed, the bound at −10 A, and that the
  result never has more loss than `i_d = 0`.
* `tb_lma_unit`: all three policies, the speed-PI step and its current
  limit.
* `tb_foc_lma_top`: a closed-loop run of the whole controller at its default
  parameters, about 60 ms of motor time.
* `tb_workloads`: the same closed loop over speed, load, detuned-model and
  sensor-resolution cases (below).

`tb_foc_lma_top` drives `pmsm_plant_model`. This is a behavioural model of an
ideal inverter and of the motor equations with iron losses, integrated every
0.5 µs; the load is 0.5 Nm. The run goes through three phases:

1. Classical FOC, `i_d* = 0`: the motor starts from rest and accelerates to
   1000 rad/s electrical, with `i_q*` at its 10 A limit on the way.
2. The bisection policy.
3. The model-based policy.

In phases 2 and 3, `i_d*` settles to the exact optimum of the present
operating point (about −2.15 A). The measured `i_d` follows it. The machine
losses drop from about 75 W to about 67 W, an improvement of about 11 %
(mostly iron loss at this speed). The testbench also checks that every PWM
period is 100 µs long and has switching on all three phases.

`tb_workloads` repeats this comparison over the operating range. It takes
about 90 s. Each point runs classical FOC, then bisection, then the
model-based policy, and measures over 2 ms.

* Efficiency is the power delivered to the load and to friction, divided by
  that power plus the electrical loss W.
* "Gain" is the efficiency change against classical FOC, in percentage
  points.
* The absolute numbers belong to the example motor, which has large iron
  losses (Rc = 200 Ω). They show the trend, not a product figure.

| operating point | classical: efficiency, loss | bisection: gain, loss | model-based: gain, loss |
|---|---|---|---|
| 500 rad/s, 0.5 Nm | 74.7 %, 21.4 W | +3.2, 17.9 W | +2.7, 19.1 W |
| 1000 rad/s, 0.5 Nm | 62.8 %, 77.5 W | +3.1, 69.1 W | +2.6, 69.5 W |
| 1500 rad/s, 0.5 Nm | 54.0 %, 167.4 W | +6.1, 134.4 W | +6.1, 136.0 W |
| 1000 rad/s, 0.4 Nm | 56.7 %, 82.7 W | +4.2, 67.0 W | +4.8, 66.0 W |
| 1000 rad/s, 1.0 Nm | 76.2 %, 80.5 W | +1.9, 71.7 W | +2.3, 70.3 W |
| 1000 rad/s, 2.0 Nm | 84.0 %, 97.0 W | +1.3, 87.1 W | +1.7, 84.5 W |
| motor constants 10 % above the controller's | 61.0 %, 84.3 W | +3.0, 73.3 W | +3.0, 74.0 W |
| angle and speed seen with 9-bit resolution | 63.6 %, 75.6 W | +2.2, 68.6 W | +2.4, 67.8 W |

The gain grows with speed, because the iron loss does. It shrinks with load,
because copper loss dominates at high current. Both policies minimise the same
loss model, so they reach almost the same point. In these runs the remaining
differences come from the speed loop still settling after each switch of
policy. With a mis-tuned model both still gain, but both aim at the optimum of
the wrong machine. Coarse 9-bit angle and speed samples are tolerated.

## Simulating

Simulate with Verilator 5. For the top:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/hil_pkg.sv tb/motor_ref_pkg.sv tb/pmsm_plant_model.sv \
    rtl/*.sv tb/tb_foc_lma_top.sv --top-module tb_foc_lma_top -Mdir obj_top
obj_top/Vtb_foc_lma_top
```

This takes about 15 s. For a single block, list the package, the block's
files and its testbench. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hil_pkg.sv tb/motor_ref_pkg.sv \
    rtl/loss_eval.sv rtl/lma_binary.sv tb/tb_lma_binary.sv --top-module tb_lma_binary
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

To change the motor, edit the `MOTOR_*` and `DC_LINK` constants in
`hil_pkg.sv`. The loss blocks and the decoupling also take them as
parameters. To change the PWM resolution or frequency, change `HALF`,
`CNT_HZ` and `SAMPLE_HZ` on the top.

## Limits

* The controller has no dead-time insertion, over-current protection or
  position-sensor interface. It takes digital samples in Q16.16. How they are
  produced (ADC, encoder or resolver) is outside this RTL.
* With the example constants, W saturates at 32767 W. It stays far below
  that up to several thousand rad/s. A machine with a much smaller `Rc`
  would need the constant reciprocal widened in `loss_eval`.
* Neither loss-minimisation method is more robust to parameter error than
  the other in this implementation. Both minimise the same model of W, built
  from the constants in `hil_pkg`.
