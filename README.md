# PID-PWM voltage controller for a synchronous buck converter

This RTL closes the voltage loop of a battery-powered DC-DC buck converter.
Once per sample it takes the output-voltage error, applies a discrete PID law
and emits one period of a PWM gate signal for the converter's switches. The
three PID coefficients come from outside and may change every sample. In the
original system an on-line optimiser (a hybrid of the Bees algorithm and
particle swarm optimisation, running in software) retunes them.

The design is a 16-bit fixed-point datapath with no processor and no
microcode. A chain of one-clock strobes, generated by a one-hot shift
register, moves one word at a time through registers, adders and
multipliers. It is based on a published FPGA controller (Virtex-5, schematic
entry). The structure, word format, strobe names, sample length and PWM
resolution follow that design. Where the source leaves details open, the
choices made here are listed below under "Departures and open points".

```
 Error (sign-magnitude)                                         Pulses
   │                                                              ▲
   ▼                                                              │
 auto_2s_comp ──► digital_pid ──► auto_2s_comp ──► pwm ───────────┘
  (to two's       (P + I + D,      (back to         (8-bit counter,
   complement)     Q4.11)           sign-magnitude)   comparator)
   ▲   ▲             ▲  ▲              ▲   ▲            ▲
   └───┴─────────────┴──┴──────────────┴───┴────────────┘
                       digital_cont (16 strobes, then one PWM period)
```

## One sample, clock by clock

Everything is timed by `digital_cont`. It walks a single 1 through a 16-bit
shift register, and each bit is one strobe. After the last strobe it stops
and holds `CO_U` high while its own 8-bit counter runs one PWM period. Then
it starts again. A sample is therefore 16 + 256 = **272 clocks**. At the
14.5 ns clock of the original board that is 3.94 µs, just under the 4 µs
sampling period of the control law.

| clock   | strobe  | action |
|---------|---------|--------|
| 0       | Load_E  | input converter captures `Error` |
| 1       | CO_E    | input converter output register gets the two's complement error |
| 2       | Clear   | PID working registers cleared (the integrator and e(k−1) are kept) |
| 3       | CS1     | PID captures e(k) and the coefficients `Kp`, `Ki`, `Kd` |
| 4       | CS2     | P ← kp·e(k) |
| 5       | CS3     | S ← e(k)+e(k−1), Dif ← e(k)−e(k−1) |
| 6       | CS4     | D ← kd·Dif |
| 7       | CS5     | I ← ki·S |
| 8       | CS6     | F ← F + I (the integrator) |
| 9       | CS7     | P + F |
| 10      | CS8     | P + F + D |
| 11      | CS9     | e(k−1) ← e(k) |
| 12      | CS10    | u(k) output register loaded |
| 13      | XX      | spare step; PWM counter cleared |
| 14      | Load_U  | output converter captures u(k); PWM counter cleared |
| 15      | CO_U    | output converter output register gets sign-magnitude u(k) |
| 16…271  | CO_U (held) | PWM period: `Pulses` high for `duty` clocks, then low |

From error input to the start of the gate pulse takes 16 clocks: 2 in the
input converter, 11 in the PID (Clear and CS1–CS10), and 3 from XX to
`CO_U`. `Error` is sampled at clock 0 and the coefficients at clock 3, so
they must be stable then. The pulse a sample produces belongs to that same
sample's error. It always starts at clock 16 and is low during the 16 strobe
clocks, so the largest duty ratio is 255/272.

## Number format and the two converters

All data words are 16-bit fixed point, Q4.11: a sign bit, 4 integer bits
and 11 fraction bits. That covers ±16 V in steps of about 0.5 mV, enough for
three decimal places.

The error arrives in **sign-magnitude** form. The PID works in **two's
complement**. `auto_2s_comp` converts between them. When the sign bit is set
it inverts the 15 magnitude bits, keeps the sign and adds one, so
`1000000000001010` (−10) becomes `1111111111110110`. Positive words pass
unchanged. The mapping is its own inverse, so a second instance behind the
PID turns the control action back into sign-magnitude for the PWM stage.
Each converter has an input register (`load`) and an output register
(`co`), which gives two clocks of latency. The word 0x8000 ("−0") converts
to 0.

## The PID datapath

`digital_pid` evaluates

```
u(k) = kp·e(k) + F(k) + kd'·(e(k) − e(k−1))
F(k) = F(k−1) + ki'·(e(k) + e(k−1))
```

This is a trapezoidal integrator and a backward-difference derivative. The
`Ki` port carries ki' = ki·Ts/2 and the `Kd` port carries kd' = kd/Ts. The
outside source folds in the sampling period, so the datapath needs no
divider.

The hardware is three registered multipliers, four adders and one
subtractor, with a register after each operation. A multiplier forms the
full 32-bit product, shifts it right by 11 (the `FRAC` parameter) and keeps
16 bits. Adders wrap. Nothing saturates: with sensible coefficients the
control action stays within the 0…3.75 V supply range, far inside ±16.

**Where the integral coefficient goes.** The block diagrams of the original
design accumulate the raw sum e(k)+e(k−1) and multiply by ki' afterwards.
Its difference equation applies ki' before accumulating. Here the
coefficient is applied first, so F holds the integral term itself in
volts. The other order needs F to reach u/ki'. With the tuned ki' = 0.1 and
an action near 2.7 V that is about 27, beyond the ±16 range of the word. In
closed-loop simulation with that order the integrator wrapped and the loop
never settled. With a constant coefficient the two orders are equal in
exact arithmetic.

`Clear` clears the working registers in every sample. It does not clear the
integrator F, the delayed error e(k−1) or the output u. Clearing those each
sample would turn the controller into a plain proportional gain. `rst_n`
clears everything.

## PWM

`pwm` normalises the 16-bit sign-magnitude control action to 8 bits by
truncation. The duty value is bits 12..5, so 256 levels cover 0…3.98 V in
1/64 V steps, which spans the 3.75 V supply. A negative action gives zero
duty. During the PWM period an 8-bit counter runs 0…255, and the pulse is
high while the duty value exceeds the counter. The result is a single pulse
of `duty` clocks at the start of each period.

## Top level: `fpga_pid_pwm`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| CLK    | in  | 1  | clock (14.5 ns in the original build) |
| Reset  | in  | 1  | reset, **active low** |
| Error  | in  | 16 | Vref − Vout, sign-magnitude Q4.11 |
| Kp     | in  | 16 | kp, two's complement Q4.11 |
| Ki     | in  | 16 | ki·Ts/2, two's complement Q4.11 |
| Kd     | in  | 16 | kd/Ts, two's complement Q4.11 |
| Pulses | out | 1  | gate drive: high turns on the high-side switch |

The top has no parameters. The shared sizes live in `rtl/pid_pwm_pkg.sv`:
`WORD_W = 16`, `FRAC_W = 11`, `PWM_W = 8`, `SEQ_LEN = 16` and `N_CS = 10`.
`pid_pwm_pkg::ctrl_t` is the packed struct of the 16 strobes. Submodules
have their own parameters: `digital_pid` has `W` and `FRAC`, `pwm` has
`DUTY_LSB` (which 8 bits form the duty) and `CNT_W`, and `digital_cont` has
`CNT_W`. Changing `PWM_W` changes the sample length to 16 + 2^PWM_W clocks.

Synthesised (generic yosys cells), the top has 322 flip-flop bits: 224 in
the PID (fourteen 16-bit registers), 32 in each converter and 25 in the
sequencer. The original FPGA build reports 201 flip-flops. The difference
comes from registers kept here that the original likely shared or left out,
such as the coefficient input registers and one register per adder output.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_auto_2s_comp` | the three words of the original converter waveform; 700 random words against the integer value; output moves only on `co`; converting twice returns the word |
| `tb_digital_pid`  | with integer multipliers (`FRAC=0`), e=2, kp=3, ki'=2, kd'=2 gives u=14 as in the original waveform; u holds until CS10; 11 clocks per evaluation; 400 Q4.11 samples against a reference model, including wrap-around; `Clear` keeps the state |
| `tb_digital_cont` | strobe order and widths clock by clock over three samples; 272-clock period; restart after reset |
| `tb_pwm`          | high-clock count equals the duty for 45 words (including duty 20 from the original waveform, 0, 255 and negative); one contiguous run; low during the strobes |
| `tb_fpga_pid_pwm` | full design at its only size: 300 samples with new error and coefficients each sample, duty of every sample against a reference model, pulse starting at clock 16; counts negative errors, negative actions, positive and large duties and integrator carry-over, and fails if one never occurred |
| `tb_closed_loop`  | the controller regulating a behavioural buck model (`tb/buck_model.sv`) with kp=1, ki'=0.1, kd'=0.05: a 0→1.25 V step, a 10 % load-resistance drop at 0.225 ms and a step to 1.0 V; output within 30 mV of the reference before the second step and at the end |

The buck model integrates the inductor current and capacitor voltage with
forward Euler once per clock. It uses L = 33 µH, C = 47 µF, R = 2.345 Ω,
r_L = 66 mΩ, r_C = 70 mΩ, r_son = 2.1 Ω and Vs = 3.75 V. With that much
switch resistance the stage cannot exceed about 1.83 V at the maximum duty
of 255/272, so references above that are out of reach for any controller.
A 1.75 V reference is reachable in principle, but it needs a steady action
near 3.8 V. In simulation the integrator transient pushed the action past
3.98 V, and truncation to bits 12..5 wrapped the duty to a small value, so
the output collapsed. The PWM stage truncates as the original design
specifies and does not saturate. A clamp on the duty (all ones when any bit
above bit 12 is set) is the change to make if the loop must run near full
duty.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pid_pwm_pkg.sv tb/tb_fpga_pid_pwm.sv --top-module tb_fpga_pid_pwm -o sim
./obj_dir/sim
```

Replace the testbench name for the others. All of them finish in well under
a second.

## Departures and open points

- **Integrator order**: ki' is applied before the accumulator, not after it
  (see above).
- **Strobe assignment**: only Clear and CS10 have roles given by the
  original. Which stage each of CS1–CS9 loads is chosen here.
- **Clear** keeps F, e(k−1) and u. The original calls it "clear all
  registers" but fires it every sample.
- **Duty bits**: the original only says the 16-bit action is truncated to
  8 bits. An action of 4 V or more therefore wraps; there is no clamp.
  Bits 12..5, zero duty for negative actions and a low pulse during the
  strobe clocks are choices made here.
- **Sequencer restart**: the original restarts the sequence with a JK
  flip-flop and 8-input gates on the counter bits. Here a plain
  terminal-count restart gives the same 272-clock sample. The original
  quotes a 265 kHz maximum PWM frequency at 14.5 ns, which does not match
  272 clocks (254 kHz). The 272-clock figure is what this design follows.
- **Converters**: the original's gate-level netlist (inverter banks, a
  shift register and an adder) is replaced by an equivalent
  invert-and-increment.
- **Reset** is active low and asynchronous in every block. It also clears
  the PID state, for which the original shows no reset pin.
- **Not included**: the coefficient tuner (a software optimiser in the
  original, with no hardware description) and the analog power stage. The
  tuner's outputs are the `Kp`, `Ki` and `Kd` ports. The power stage exists
  only as the behavioural test model.
