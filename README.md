# Look-up-table DPWM controller for a 1 MHz point-of-load buck converter

A digital PWM controller for a buck converter usually samples the output
with an A/D converter and then computes the PID law. Both steps take time,
and that delay sits inside the control loop. This controller avoids both.

- **Sensing by timing.** A DAC draws a falling ramp once per switching term.
  An analog comparator flags the moment the ramp crosses the output voltage
  E_o. The value of the term counter at that moment *is* the measurement.
- **PID by table look-up.** For every counter value that could be the
  measurement, the duty word that the PID law would give has been worked
  out in advance and stored in a table. The table is read on every clock,
  so when the comparator trips, the right duty word is already on the table
  output. A register only has to freeze it.

The new duty word is ready three clocks (6 ns at 500 MHz) after the
comparator edge. It sets the on-time of the **same** switching term in which
the voltage was sensed. The controller runs at a 500 MHz system clock with
9-bit resolution, so one switching term is 512 clocks (976.6 kHz). The
reference design regulates 1.5 V from 12 V at 0.3-0.9 A with a 3.3 uH / 10 uF
output filter.

## One switching term

Every block runs on the same clock, in parallel. For the term counter value
`y1 = 0 … 511`:

| count | what happens |
|---|---|
| 511 → 0 | The PR (preset) pulse loads the duty latch with 511. PWM' turns on because `y1 < u`. The ramp table returns full scale, so V_ref jumps to V_ref⁺ = 1.6 V. The protection flag Q is cleared. |
| 0 … 7 | Blanking: the comparator output still reflects the end of the previous ramp, so the latch ignores it. |
| 16 | The protection samples the synchronized comparator output. If it is high, E_o is above the top of the ramp and Q is set (see *Overvoltage protection*). |
| L − 2 | V_ref falls below E_o, so v_comp rises. |
| L | The rise has passed the 2-flop synchronizer and `latch` pulses. D-ff 4 takes `u(k) = memory2[address']`. D-ff 1 stores the new integral factor and D-ff 3 stores `y1`. |
| L + 1 | `u(k)` is valid. PWM' goes low at the first count where `y1 ≥ u(k)`, or at once if that count has already passed. |
| 511 | The PR pulse again. |

So the on-time of a term is `max(L+1, u(k))` clocks. The output is on from
the start of the term, and the sensing instant comes before the switch-off.
Only the first comparator rise in a term is used; comparator chatter after
it is ignored.

## The precomputed PID law

The textbook law, with the counter value at the crossing as the measurement,
is:

```
e(k)   = y1(k) - r                               (r: counter value of the target)
n_I(k) = n_I(k-1) + e(k)
u(k)   = u_ref + K_P e(k) + K_I n_I(k) + K_D (e(k) - e(k-1))
```

Substitute `n_I(k)`, write `y2(k-1) = y1(k-1)` for the previous term's
measurement, and collect terms. With `A = K_P + K_I + K_D`:

```
u(k) = u_ref - (K_P + K_I) r + A * ( y1(k) + a - b )
a    = (K_I / A) * n_I(k-1)
b    = (K_D / A) * y2(k-1)
```

Everything except `y1(k)` is known before term k begins. The hardware
splits the law like this:

| block | holds | content |
|---|---|---|
| `memory3` | a | `round(K_I/A * n_I(k-1))`, indexed by the signed 9-bit n_I(k-1) held in D-ff 1 |
| `memory4` | b | `round(K_D/A * y2(k-1))`, indexed by y2(k-1) held in D-ff 2 |
| `address_adder` | address' | `y1 + a - b`, limited to 0…511. It advances one step per clock, like a counter preloaded with a − b |
| `memory2` | u | `clamp(u_ref - (K_P+K_I) r + A*address', U_MIN, U_MAX)` |

The gains, `u_ref` and `r` are elaboration-time parameters, and all four
tables are computed from them when the design is elaborated. The defaults
are the published example: K_P = 5, K_I = K_D = 0, u_ref = 86, r = 40, and
duty words limited to 0…500. That gives `u = 5·address' − 114`:

| address' | 0…22 | 23 | 24 | 25 | 26 | … | 119 | 120 | 121 | 122 | 123…511 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| u | 0 | 1 | 6 | 11 | 16 | … | 481 | 486 | 491 | 496 | 500 |

The flat regions at both ends limit the duty to 0 … 500/512 (about 0.98).
A higher gain makes the linear region between them narrower.

Because `y1` at the crossing decreases as E_o rises (the ramp falls), a
positive error means the output is low. More duty is then the right answer,
so no sign inversion is needed.

### Which registers hold what

- **D-ff 1** (`ni_generator`) stores `n_I(k-1) + y1 - r` on the latch. The
  accumulation saturates in 9-bit two's complement.
- **D-ff 3** (`y2_register.y2`) stores `y1` on the latch.
- **D-ff 2** (`y2_register.y2_prev`) copies D-ff 3 one clock later.

During the next term, D-ff 2 therefore holds the previous measurement,
`y2(k-1)`, as the law requires. Clocking D-ff 2 on the same edge as D-ff 3
would make the derivative term one term older. On the latch clock itself,
D-ff 3 still holds the old value too, so the duty word would be the same
either way. D-ff 2 is what keeps `b` steady for the whole term.

## Sensing chain and timing

`memory1` holds the ramp: `code = 511 - y1`, read through a register. The
`WAVE` parameter can also select a rising sawtooth or a triangle, but the
controller uses the falling sawtooth. The DAC (model: one-clock input
latch) turns the code into `V_ref = 1.6 V · code / 511`. The comparator
(model: 2 clocks of delay) drives `v_comp = (E_o > V_ref)`.

Inside the controller, `v_comp` is treated as asynchronous. It passes two
flip-flops, then an edge detector (`latch_register`). That path costs three
clocks from a `v_comp` edge to a new `u(k)`: 6 ns against the 11 ns measured
on the original FPGA prototype.

The blanking window (`BLANK_CNT = 8`) exists because of the pipeline. At the
start of a term, the comparator still answers the DAC codes of the previous
term's ramp end. Without blanking, an output just above 0 V would trip each
new term immediately with a near-zero duty word. A genuine crossing during
the blanked counts means E_o is within 8 LSB (25 mV) of V_ref⁺. The
protection handles that case.

## Overvoltage protection

If E_o is above V_ref⁺, the ramp never crosses it and no latch occurs. The
duty word then keeps its preset of 511, and the converter would run at full
duty: a runaway. `ovp` catches this once per term:

- A reset pulse at count 511 clears the flag Q.
- A sample pulse at count 16 copies the synchronized comparator into Q.
- A selector passes PWM' when Q = 0 and ground when Q = 1.

A term that starts with E_o above the ramp is therefore cut after about
16 clocks (3 % duty). Normal operation resumes in the first term whose
sample sees the comparator low.

## Files

| module | role |
|---|---|
| `dpwm_pkg` | width `N_BITS = 9`, ramp-shape enum |
| `up_counter` | term counter y1 |
| `memory1` | ramp table → DAC code |
| `atc` | **behavioural model** of the DAC and analog comparator (for simulation only) |
| `ni_generator` | integral factor, D-ff 1 |
| `y2_register` | D-ff 3 / D-ff 2 |
| `memory3`, `memory4` | a and b tables |
| `address_adder` | address' = y1 + a − b |
| `memory2` | duty table |
| `pr_generator` | preset pulse on the last count |
| `latch_register` | synchronizer, trigger, D-ff 4 |
| `digital_comparator` | PWM' = (y1 < u(k)), registered |
| `ovp` | overvoltage protection |
| `digital_controller` | everything above except `atc`: the synthesizable controller |
| `dpwm_pol` | top: `digital_controller` + `atc` |

The top `dpwm_pol` is a simulation top because it contains the analog
model. To put the design in an FPGA, use `digital_controller`. Its ports
are `dac_code[8:0]` to a parallel DAC, `v_comp` from a comparator, and
`pwm` to the gate driver. `u_k`, `latch` and `ovp_q` are probe outputs.

Voltages in the model are unsigned 32-bit integers in microvolts
(`eo_uv`, `vref_uv`). This keeps every file in two-state integer logic.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 9 | resolution; one term = 2^N clocks |
| `KP`, `KI`, `KD` | 5, 0, 0 | PID gains (0 … any; A = KP+KI+KD) |
| `U_REF`, `R` | 86, 40 | duty word at zero error; counter value of the target voltage |
| `U_MIN`, `U_MAX` | 0, 500 | duty table limits |
| `SAMPLE_CNT` | 16 | protection sample count |
| `VREF_MAX_UV` | 1 600 000 | ramp top V_ref⁺ in µV (model only) |

`SYNC_STAGES` (2) and `BLANK_CNT` (8) are set inside `digital_controller`.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dpwm_pkg.sv tb/tb_dpwm_pol.sv --top-module tb_dpwm_pol -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_dpwm_pol` | End-to-end closed loop at the default parameters against a behavioural buck stage. Covers a cold start from 0 V, steady state at 0.3 A and 0.9 A within 1.5 V ± 3 %, recovery after 0.3 ↔ 0.9 A steps at 50 A/µs, a 512-clock term, the 6 ns comparator-to-duty delay, and overvoltage terms cut to ≤ 17 clocks. It requires every mechanism to occur: latch, duty limit, term without trip, protection. |
| `tb_pol_kp10` | The same loop at K_P = 10. Covers static regulation at 0.3/0.5/0.7/0.9 A and load steps both ways, which must settle within about 10 µs (11 terms). |
| `tb_digital_controller` | Two controllers, one at the defaults and one with K_P = 4, K_I = 2, K_D = 2, against a reference model of the PID recursion. Each term's on-time must equal `max(L+1, u)`. Also covers both table limits, terms without a trip, and the protection. |
| `tb_<block>` | One per module, each against values computed in the testbench. |

Typical closed-loop results with the model plant:

- **K_P = 5:** about 1.513 V, with 24 mV ripple.
- **K_P = 10:** about 1.505 V at every load.
- **Light-to-heavy step:** back within ±3 % after about 8 µs.
- **Heavy-to-light step:** back within ±3 % after 3-4 µs.

The reference design measured 10.4 µs and 3.2 µs on the board, and ±3 %
static regulation.

### The plant model (`tb/buck_model.sv`)

A forward-Euler model of an ideal synchronous buck, advanced once per clock.
It has 12 V in, L = 3.3 µH with 20 mΩ, C = 10 µF, and an electronic load
slewing at 50 A/µs. Two choices are not part of the reference conditions:

- **Capacitor ESR of 50 mΩ.** With a few mΩ, the proportional loop at these
  gains rings. The loop gain is large: one counter step is 3.1 mV, and it
  moves the duty by K_P/512.
- **Start-up.** The controller has no soft start. `tb_dpwm_pol` starts
  from 0 V: the duty table sits at its 500/512 limit until the ramp
  crossing enters the linear region. The resulting overshoot above 1.6 V
  is cut term by term by the protection (about 70 terms), and the output
  is inside ±3 % after about 98 µs. `tb_pol_kp10` starts at the 1.5 V /
  0.3 A operating point.

## Where this implementation makes its own choices

- **Synchronous trigger.** The original circuit clocks its latches directly
  from the comparator output. Here the comparator output is synchronized and
  edge-detected, which costs 3 clocks (6 ns).
- **Latch rules.** Only the first comparator rise in a term is used, and
  rises in the first 8 counts are blanked.
- **Preset value.** The preset "maximum" is 511, the all-ones word.
- **Protection timing.** The protection resets at count 511 and samples at
  count 16. The original gives the order of the pulses but not their counts.
- **Table arithmetic.** The address sum is limited to 0…511, n_I saturates,
  and a and b are rounded to nearest.
- **D-ff 2 timing.** D-ff 2 is clocked one cycle after the latch (see above).
- **ROM tables.** All tables are ROMs computed at elaboration, with no run-time
  write port. Changing a gain means re-elaborating.
- **Generic synthesis.** A generic synthesis keeps the four 512 × 9 tables
  as memories (18 432 bits). The original FPGA build reports 163 logic
  elements in total. With K_I = K_D = 0, two of the tables are constant zero
  and the other two are simple functions of their address, which an FPGA
  flow reduces to logic.
- **Bit widths.** The DAC path is 9 bits wide, like the rest of the
  controller.

## Not included

- **PLL.** The system clock generator is an FPGA vendor block. Drive `clk`
  at 500 MHz directly.
- **Power stage.** The gate driver, MOSFETs, inductor, capacitor and load
  exist only as the testbench model above.
- **Frequency-response checks.** The open-loop frequency-response
  measurements (phase and gain margin) are analog bench measurements and
  are not reproduced.
