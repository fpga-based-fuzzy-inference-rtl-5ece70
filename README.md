# Fuzzy-logic washing machine motor controller with a programmable fuzzy inference engine

This RTL puts a general-purpose fuzzy inference system (FIS) on an FPGA. It
uses the FIS to close the speed loop of a washing machine's permanent-magnet
drive motor. The FIS is a small programmable engine, not a fixed function:
membership functions, rules and output weights sit in writable tables. One
inference runs Mamdani min/max reasoning and centre-of-gravity
defuzzification on 8-bit data. Around it sit the drive blocks:

- a speed meter that times the 24 rotor-position pulses per revolution;
- a controller that turns the speed error into FIS inputs and the FIS output
  into an inverter voltage;
- a three-phase sinusoidal PWM generator;
- a sequencer that plays the wash and spin-dry speed profiles.

The architecture follows the paper *FPGA-Based Fuzzy Inference System for
Real-time Embedded Applications*. That paper gives the FIS module list, the
table formats, the rule-evaluation sequence and the centre-of-gravity
datapath. It gives the drive and the washer only as block diagrams and prose.
Where it gives no detail, the choices here are this design's own. Each one is
marked below and in the header comment of its file.

## Top-level structure

```
 user program ─► wash_sequencer ──speed_ref──► fuzzy_speed_ctrl ◄──speed, sample── speed_meter ◄── pos_pulse
                                                   │     ▲                                      (24 per rev)
                                   in0,in1 + start │     │ out0 (+done)
                                                   ▼     │
                     prog_* ─────────────────────► fis_top
                                                   
                          fuzzy_speed_ctrl ──volt_cmd, freq_dhz──► pwm3_modulator ──► pwm_h[2:0], pwm_l[2:0]
```

`washer_top` wires these together. The inverter power stage, the motor and
the rotor position sensor are off-chip. The gate signals leave as
`pwm_h`/`pwm_l` and the sensor pulses arrive on `pos_pulse`.

## The fuzzy inference system (`fis_top`)

### What it computes

It has up to 4 inputs and 4 outputs, all 8-bit. Each input can have up to 8
fuzzy sets, and there are up to 64 rules. Each rule has the form

```
IF in_a is set_x  (AND | OR)  in_b is set_y  THEN out_k is set_z
```

Rule *i* has strength `r_i = min(mu_a(x_a), mu_b(x_b))` for AND, or `max(...)`
for OR. Each output is

```
out_k = Σ r_i · w_i / Σ r_i        (over the rules whose THEN part names out_k)
```

Here `w_i` is the programmed weight (a crisp value) of the rule's output set.
If no rule of an output fires, the output is 0 and its `out_nofire` bit is
set.

### The datapath, and why it is sequential

There is one of each arithmetic unit, and a control FSM time-shares them. This
keeps a 64-rule, 4-output engine at a few hundred flip-flops.

| Module | Role |
|---|---|
| `fis_input_regs` | Holds the input set. `load` sets `ready`; the evaluator clears it when it accepts the set. |
| `fis_memory` | Three tables with synchronous reads (see encoding below), written through `prog_*`. |
| `fis_rule_evaluator` | The control FSM. |
| `fis_fire_strength` | Grade of one input in one membership function. Takes 1 or 18 cycles. |
| `fis_minmax` | Two-register stack: push, push, then MIN or MAX. |
| `fis_multiplier` | 8×8 → 16, one register stage: strength × weight. |
| `fis_summer` | 16-bit accumulator of strengths (the denominator). |
| `fis_double_summer` | 32-bit accumulator of products (the numerator). |
| `fis_divider` | Radix-2 restoring divider, 32/16 bits, 33 cycles. |

### Rule evaluation sequence

`start` can arrive before the inputs are loaded; the evaluator then waits. It
takes the input set, clears both accumulators and makes one pass over the rule
table per output (output 0 first). In each pass it reads the rules in address
order up to `rule_count`:

1. **FETCH / DECODE** (2 cycles). If the rule names a different output, it is
   skipped.
2. **First antecedent.** `{in1,set1}` addresses the membership table, and the
   input pointer `in1` selects the crisp value. The fire strength calculator
   grades it and the grade is pushed on the min/max stack.
3. **Second antecedent.** The same steps for `{in2,set2}`.
4. **OP.** MIN for AND, MAX for OR. The result is the rule strength.
5. **Accumulate.** The summer adds the strength. The multiplier forms
   strength × `weight[{out,oset}]`, and on the next cycle the double summer
   adds that product.

After the last rule the divider produces the output, the output register is
written and the accumulators are cleared. `done` pulses after output 3.

Cost: an executed rule takes at most 46 cycles, and a skipped rule takes 2.
Each output adds about 35 cycles of division. In the worst case (64 rules all
for one output) one inference takes about 3,500 cycles; `tb_fis_top` measures
3,468 cycles, which is 44 µs at 78 MHz. At 1500 rpm the sensor gives a speed
sample every 1.667 ms, so an inference easily fits between samples.

Using one pass per output is this design's choice. The paper describes a
single summer, double summer and divider, and works through a one-output
example.

### Table encodings

Field order follows the paper. Field widths follow from its 21-bit and 22-bit
word sizes.

```
membership record, 21 bits, address {input[1:0], set[2:0]}:
  [20:19] input#  [18:16] set#  [15:8] start  [7:0] end

rule record, 22 bits, address = rule number:
  [21:16] rule#  [15:14] in1  [13:11] set1  [10] op (0 AND, 1 OR)
  [9:8]   in2    [7:5]   set2 [4:3]  out    [2:0] out set

weight, 8 bits, address {output[1:0], set[2:0]}
```

Write a table by setting `prog_we` for one cycle with `prog_sel` (0
membership, 1 rule, 2 weight), `prog_addr` and `prog_data`.

A membership record gives only a start and an end point. Each function is
therefore a **triangle**: grade 0 at `start` and `end`, 255 at the midpoint,
linear in between. The grade on a flank is `255·Δ/half-width`, rounded down.
Two conventions give the shoulder shapes a controller needs:

- `start = 0` makes the whole left flank 255;
- `end = 255` makes the whole right flank 255.

A record whose stored `input#/set#` differs from its address, or whose
`start > end`, counts as empty (grade 0). The paper claims membership
functions of "all forms". A start/end pair cannot express that, so this is
the main place where this design narrows the paper.

The rule# field is stored but not used, because rules run in address order.
The weight table is this design's way of holding the per-rule output
coefficient that the paper fetches "from the EPROM".

## The drive and washer blocks

### `speed_meter`

A prescaler makes a 1 µs tick, and a 16-bit counter times the interval between
synchronised rising edges of `pos_pulse`. The sequential divider then gives
`rpm = 60·10⁶ / (24·period_µs)`. At 1500 rpm the period is 1667 ticks. Every
pulse produces a `sample` request, 36 clocks after the edge.

If no pulse arrives for 65.5 ms:

- the speed reads 0 and `stalled` is set;
- `sample` is still raised, so a stopped motor still gets control steps (this
  design's choice).

### `fuzzy_speed_ctrl`

This block is this design's own; the paper does not define the controller's
inputs and outputs. On each sample it computes:

- `e = |speed_ref| − speed`, which goes to FIS input 0 as `128 + e/4`,
  saturated;
- `de = e − e_previous`, which goes to FIS input 1 as `128 + de/2`, saturated.

It then starts an inference. FIS output 0 is a voltage *increment* centred on
128, which gives PI-like behaviour. `out0 − 128` is added to a 12-bit voltage
accumulator, and the accumulator's top 8 bits are the inverter amplitude.
When no rule fires the voltage is held.

The frequency command follows the speed reference:
`freq = speed_ref · pole_pairs / 60`, with 4 pole pairs for the 8-pole rotor,
in 0.1 Hz units. A sample that arrives while an inference is running is
dropped and reported on `ctrl_overrun`. With the motor disabled, the voltage
and the stored error are cleared.

### `pwm3_modulator`

Voltage and frequency are independent inputs, as in the paper's inverter. The
frequency drives a 32-bit phase accumulator, and a negative frequency reverses
the phase sequence. The sine table has 256 entries and is computed at
elaboration with Bhaskara's approximation `sin ≈ 4p/(20480−p)`, where
`p = t(128−t)` and `t` is the index within a half turn.

Phase B reads the table 1/3 of a turn behind phase A, and phase C 2/3 behind.
Each duty `128 + amplitude·sin/256` is sampled at the bottom of a symmetric
0..255..0 carrier. At 78 MHz with `CARRIER_DIV = 8` the carrier runs at about
19 kHz. The outputs are complementary high/low gates. There is no dead time,
so the power stage must add it.

### `wash_sequencer`

Before starting, the user sets wash and spin speeds, plateau times in 1 ms
ticks, and repeat counts. The sequencer then produces the signed speed
reference:

- **Wash.** Ramp to +wash speed, hold, ramp to 0. Then the same profile
  towards −wash speed. The half-cycles alternate `wash_cycles` times.
- **Spin-dry.** Ramp to the spin speed, hold, ramp down. Between repeats it
  comes down to the wash speed; after the last repeat it stops.

Ramps move 1 rpm per ms (`RAMP_STEP`). `stop` aborts at once. The paper's
state diagram is not reproduced here; the profile follows its prose. Valves,
pump, door lock and the rest of a real washer are not modelled.

## Parameters and clocking

The whole design is synchronous to one clock with an asynchronous active-low
reset. `CLK_HZ` defaults to 78 MHz, the maximum frequency reported for the
original Spartan-3 implementation. The table size limits come from the paper:
4 inputs, 4 outputs, 8 sets, 64 rules, 8 bits. So do the 24 pulses per
revolution and the 8-pole rotor.

The following are this design's own choices:

- the 1 µs speed tick;
- the 65.5 ms standstill timeout;
- the 16-bit summer and 32-bit double summer widths;
- the controller scalings (`E_SHIFT`, `DE_SHIFT`);
- the carrier divider;
- the ramp rate.

`fis_pkg.sv` holds the widths, record structs and command enums shared by
the FIS modules.

## Known departures from the paper

- Membership functions are triangles and shoulders only (see above). The paper
  says "all forms" and also describes a table lookup addressed by the input
  value.
- The paper's resource table lists a 32×8 multiplier and 16×4 ROMs. Here the
  multiplier is 8×8 and the tables are 32×21, 64×22 and 32×8, as described in
  the paper's text.
- The paper asks for the inverter frequency to be synchronised to the rotor
  position but gives no method. Here the frequency follows the speed
  reference, and the fuzzy loop corrects the voltage from the measured speed.
- The controller's FIS inputs and outputs, and everything about the washer
  beyond the speed profile, are this design's own.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fis_top \
          -y rtl -y tb +libext+.sv -Irtl rtl/fis_pkg.sv tb/tb_fis_top.sv
./obj_dir/Vtb_fis_top
```

Substitute any other testbench name.

| Testbench | What it shows |
|---|---|
| `tb_fis_top` | Full-size FIS against a reference min/max + centre-of-gravity model. Covers a 3×3 controller table and random 64-rule bases over 4 inputs and 4 outputs, plus the wait-for-inputs and no-fire cases. Also measures the worst-case inference time (64 rules for one output) and requires at most 3,600 cycles. |
| `tb_fis_rule_evaluator` | The control FSM alone, with random-latency responders. Checks the exact order of membership requests, AND/OR commands, weight addresses, output writes and clears. |
| `tb_fis_fire_strength`, `tb_fis_divider`, `tb_fis_minmax`, `tb_fis_memory`, `tb_fis_input_regs`, `tb_fis_multiplier`, `tb_fis_summer`, `tb_fis_double_summer` | Unit tests against independent models, including latencies. |
| `tb_speed_meter` | Period and rpm at 100, 1500 and 5000 rpm, one request per pulse, standstill timeout. |
| `tb_pwm3_modulator` | Per-phase duty against `$sin`, complementary gates, disable, phase advance in both directions. |
| `tb_wash_sequencer` | Tick-by-tick speed profile against an independent model, phase flags, `stop`. |
| `tb_fuzzy_speed_ctrl` | Input scaling, voltage integration and saturation, frequency command, overrun. |
| `tb_washer_top` | Closed loop with a behavioural motor (`tb/pm_motor_model.sv`) at a 1 MHz clock. A program with two wash reversals at 100 rpm and two spins to 1500 rpm runs, and the motor must settle within 10% on every plateau. Also counts inferences, pulse and timeout samples, reversal, PWM activity, program end and an injected overrun. |
| `tb_washer_step` | Step response in the same closed loop: a +1000 rpm step, a hold, then a reversing step to −1000 rpm. Checks rise time (90% within 800 ms), overshoot (at most 15%), speed at the end of each hold (within 10%) and deceleration to 100 rpm (within 800 ms). |
| `tb_washer_top_full` | The same closed loop with every parameter at its default (78 MHz). Runs a short program: two wash half-cycles and one spin. About 100 M cycles, a few minutes of simulation. |

The motor model is only a first-order speed lag towards `8 rpm × volt_cmd`,
with a pulse train integrated from the speed. It exercises the loop; it does
not validate control performance on a real machine. The rule base in the
top-level testbenches is an example that tracks that model. It is not a
tuned washer controller.
