# Space-vector PWM with capacitor and loss balancing for a three-level ANPC inverter

This is the FPGA half of a drive controller for a three-phase, three-level
active neutral-point-clamped (ANPC) inverter. A microcontroller runs the
drive control loop. Once per PWM period it hands the FPGA three things:

- a voltage reference vector (U_x, U_y) in the stationary alpha-beta frame;
- one bit saying whether the upper dc-link capacitor is above or below half
  the dc-link voltage;
- the direction of each of the three load currents.

The FPGA turns these into the 18 IGBT gate signals. It does three jobs at
once:

- **Voltage synthesis.** Over each period it applies the three nearest
  space vectors so that their time-weighted average equals the reference.
- **Dc-link balancing.** Most vectors can be produced by more than one
  switching combination. The combinations do not draw the same current from
  the capacitor mid-point. The modulator gives the combination that pulls
  the mid-point back towards balance twice as much time as the other one.
- **Loss balancing (active clamping).** An ANPC leg can reach its mid-point
  level through an upper or a lower clamping path. The modulator picks the
  path from the direction the leg came from, so both paths share the
  conduction.

## The power circuit it drives

Each leg has six switches:

- S1 to S4 in series between the dc-link rails P and N.
- S5 from the capacitor mid-point 0 to the S1/S2 node.
- S6 from the mid-point to the S3/S4 node.

A leg is only ever driven with two switches on, in one of four states:

| leg state | switches on | output connected to |
|-----------|-------------|---------------------|
| `PH_P`    | S1 S2       | P (level +1)        |
| `PH_OU`   | S2 S5       | 0 through the upper clamp |
| `PH_OL`   | S3 S6       | 0 through the lower clamp |
| `PH_N`    | S3 S4       | N (level -1)        |

`PWM_NPC[p][k]` drives switch S(k+1) of leg p (0 = U, 1 = V, 2 = W).

## Signal chain

```
bus --> mlc_bus_if --> en_reg_2 --> transform --> svm_alg --> svm_maping x3 --> time_table --> timings_anpc --> gate_ctrl --> PWM_NPC[3][6]
                         ^                                                                                         |
                         +------------------------- syn (period start) ------------------------------------------+--> syn_DSP
```

| module | does |
|--------|------|
| `mlc_bus_if` | Bus registers: U_x (address 0), U_y (1), status (2: bit 0 capacitor flag, bits 1-3 current directions of U, V, W). Reading address 3 gives the fault flag. |
| `en_reg_2` | Copies (U_x, U_y) on the period-start pulse, so both components come from the same write cycle. |
| `transform` | Converts alpha-beta to the three line-to-line signals V_ab, V_bc, V_ca. |
| `svm_alg` | Finds the triangle of the space-vector diagram that holds the reference, its three corner vectors and their duty cycles. |
| `svm_maping` | Looks up the switching index of one vector. |
| `time_table` | Builds the 14-interval switching sequence of one period. |
| `timings_anpc` | Period counter. Plays the sequence and chooses the clamping paths. |
| `gate_ctrl` | Maps leg states to gate signals. Shuts down on a fault. |
| `svm_pkg` | Shared types, number formats and the vector table. |
| `svpwm_anpc_top` | Wires the chain together. |

### Latency

The chain settles four clocks after the period-start pulse. `timings_anpc`
takes over the new table at the *next* period start. So a reference written
over the bus before sync pulse n is output during the period that begins
with pulse n+1. The capacitor flag and current directions also take effect
at a period start.

## Number formats

| quantity | format |
|----------|--------|
| U_x, U_y | signed 16 bit, 14 fraction bits; 1.0 = one level step, U_d/2 |
| V_ab, V_bc, V_ca | signed 18 bit, 14 fraction bits, same unit |
| duty cycle | unsigned 16 bit, 15 fraction bits; 1.0 = 32768 |
| interval time | clock cycles, `$clog2(PERIOD_CYC+1)` bits |

With this scaling, the switching combination (1,0,0) sits at U_x = 2/3. The
outer hexagon corner (1,-1,-1) sits at U_x = 4/3. The largest circle that
fits in the hexagon, the limit of linear modulation, has radius 2/sqrt(3).
References outside the outer hexagon (overmodulation) are not handled.

## Finding the nearest vectors

`transform` uses the amplitude-invariant Clarke transform, in level-step
units:

```
V_ab =  3/2 U_x - sqrt(3)/2 U_y
V_bc =  sqrt(3) U_y
V_ca = -(V_ab + V_bc)        (formed this way so the sum is exactly zero)
```

In these coordinates every vector that the inverter can produce is an
integer triple with zero sum. Examples are (1,0,-1) for the combination 100
and (2,0,-2) for 1-1-1. There are 19 such vectors: one zero vector, six
small, six medium and six large.

`svm_alg` takes f = floor and c = f + 1 of each coordinate. Because the
coordinates sum to zero, the floor sum is -1 or -2, and it decides which of
the two triangle shapes holds the reference:

| floor sum | V1 | V2 | V3 | d1 | d2 | d3 |
|-----------|----|----|----|----|----|----|
| -1 | (f_ab,f_bc,c_ca) | (c_ab,f_bc,f_ca) | (f_ab,c_bc,f_ca) | V_ca-f_ca | V_ab-f_ab | V_bc-f_bc |
| -2 | (f_ab,c_bc,c_ca) | (c_ab,c_bc,f_ca) | (c_ab,f_bc,c_ca) | c_ab-V_ab | c_ca-V_ca | c_bc-V_bc |

The duties always add to one. d1·V1 + d2·V2 + d3·V3 reproduces the
reference exactly in fixed point. If the reference lies exactly on a vector
(floor sum 0), that vector gets duty 1.

`svm_maping` turns each vector into its index in the vector table
(`svm_pkg::SVEC_ROW`): 0 is the zero vector, 1-6 the small vectors and 7-18
the outer ring. An index of 31 means the vector is outside the diagram.

## The switching sequence (`time_table`)

This is the core of the design and the part that needs the most care.

**Which combinations a vector has.** A vector (ab, bc, ca) can be produced
by every leg-level triple (u, v, w) with u-v = ab, v-w = bc and all levels
in {-1, 0, 1}:

- the zero vector by three combinations (-1-1-1, 000, 111);
- a small vector by two (for example 100 and 0-1-1);
- a medium or large vector by one.

**Ordering.** The sequence visits every combination of the three vectors,
sorted by the sum u+v+w of the leg levels: -3 up to +3 in the first half
period, then +3 down to -3 in the second, mirrored half. This gives 7 + 7 =
14 interval slots. The three vectors of a triangle always fall into
different classes of that sum modulo 3. Each sum value therefore belongs to
at most one combination, and neighbouring combinations differ by one level
in one leg. A slot whose sum no combination of the triangle has gets time
zero and is skipped.

For example, take the triangle 000 / 100 / 110 next to the zero vector.
Call the duties of these three vectors T0, Ts0 and Ts1. The sequence is:

```
-1-1-1  0-1-1  00-1  000  100  110  111 | 111  110  100  000  00-1  0-1-1  -1-1-1
 T0/6   Ts0/6  Ts1/3 T0/6 Ts0/3 Ts1/6 T0/6 | (mirror)
```

This example assumes that 100 and 00-1 are the balancing choices.

**Time shares.** Each vector's total time is d·T, spread over both halves:

- zero vector: each of its three combinations gets d·T/6 per half;
- small vector: the balancing combination gets d·T/3 per half (2/3 of the
  vector's time), the other one d·T/6 (1/3);
- medium or large vector: its single combination gets d·T/2 per half.

**Which small-vector combination balances.** Of a small vector's two
combinations, the upper one uses levels 0 and +1 and the lower one uses 0
and -1. Let i_0 be the current the inverter draws from the capacitor
mid-point.

- If the upper combination has a single leg x at +1, then i_0 = -i_x.
- If it has a single leg y at 0, then i_0 = i_y.
- The lower combination always draws the opposite current.

A positive i_0 charges C1 and discharges C2. So when the flag says U_C1 is
high, the combination with negative i_0 is the balancing one; otherwise it
is the one with positive i_0. Only the sign of one phase current is needed,
which is why the direction bits are enough.

**Rounding.** Times are rounded to the nearest clock, so the 14 times can
miss the period by a few clocks. `timings_anpc` handles the mismatch:

- if the times are short, it holds the last non-empty interval to the end
  of the period;
- if they are long, it cuts the sequence off at the end of the period.

## Active clamping (`timings_anpc`)

When a leg goes to level 0, the previous level picks the clamping path:

- coming from +1, the leg uses the upper path (S2, S5), so S2 stays on;
- coming from -1, it uses the lower path (S3, S6), so S3 stays on;
- a leg that stays at 0 keeps its path. After reset it starts on the lower
  path.

Each commutation therefore switches only one pair of devices. A sequence
that passes through the zero level from both sides uses both paths in one
period, which spreads the conduction losses over the clamping switches.

`timings_anpc` registers its leg-state outputs, one clock after the counter
crosses an interval boundary. `gate_ctrl` adds one more register stage.

## Faults and start-up

- All gates stay off until the first table has been taken over (`run`).
- A `fault` input turns all gates off. The fault stays latched until reset
  and can be read back at bus address 3.
- Two assertions guard the design: the line-to-line inputs of `svm_alg`
  must sum to zero, and every leg's gate pattern must be all-off or one of
  the four legal pairs.
- No dead time is inserted between complementary switches. If the gate
  drivers need it, add it at the `gate_ctrl` outputs.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `PERIOD_CYC` (top, `time_table`, `timings_anpc`) | 62500 | PWM period in clocks: an 800 Hz switching frequency at an assumed 50 MHz clock |

The interval-time width follows from `PERIOD_CYC`. Periods up to 65535
clocks fit the default 16-bit times, and larger values widen them
automatically.

## What follows the source design and what is this design's own

Taken from the source design:

- the seven-stage chain and its stage names;
- the 16-bit reference inputs;
- the floor/ceil triangle selection and its duty formulas;
- the 19-entry vector table;
- the 14-interval sequence and its time split for the zero-vector triangle;
- the 2/3 : 1/3 split between the balancing and non-balancing small-vector
  combinations;
- the two-switches-on leg states and the rule that the clamping path follows
  the side the current commutes from;
- the 800 Hz switching frequency.

This design's own choices:

- the number formats and the alpha-beta scaling;
- the generalisation of the sequence to every triangle (ordering by
  level sum);
- the mid-point current analysis that decides which combination balances;
- the bus register map;
- the double-buffered reference and the one-period latency;
- the 50 MHz clock;
- the fault latch;
- the handling of lattice-point references and rounding;
- gate outputs of six per leg (18 in total).

Not provided:

- the microcontroller and its control loop;
- dead time;
- overmodulation;
- a second modulator channel. The source controller can drive two
  converters; instantiate the top twice for that.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`
that prints `TB_RESULT checks=N failures=M`. The end-to-end tests share
`tb/anpc_e2e_checker.sv`, which writes references over the bus and decodes
one period of gate signals back into leg levels. It checks:

- that each leg has a legal switch pair;
- volt-second balance against the reference;
- the clamping rule;
- sync spacing;
- that the mid-point charge moves the right way with the capacitor flag;
- fault shut-down.

Two testbenches use this checker:

- `tb_svpwm_anpc_top` runs it at a 600-clock period;
- `tb_svpwm_anpc_top_full` runs it at the default 62500-clock period.

A third testbench, `tb_workload_rl_load`, closes the loop around the
modulator. It runs the design at its default parameters on a behavioural
model of the power stage and an RL load:

- V_dc = 700 V, R = 0.245 ohm, L = 1.1 mH;
- 800 Hz switching, modulation index 0.95;
- a 50 Hz output and 4.7 mF capacitors (assumed values);
- capacitors that start 40 V apart.

The testbench plays the microcontroller. At every sync pulse it writes the
next reference, the current directions and the capacitor flag. It checks
four things:

- the fundamental of each phase current against |U|/|Z|, within 8 %;
- that the mid-point error decays;
- that it does not decay when the flag given to the modulator is inverted;
- that the upper and the lower clamping paths carry comparable charge.

A typical run gives:

- phase-current fundamentals of 911 A against 906 A expected;
- a mid-point error falling from +25.6 V (mean over the first
  fundamental) to -0.7 V (over the third);
- with the inverted flag, an error rising to +92 V;
- 12.0 As of charge through the upper clamping paths and 18.4 As through
  the lower ones.

Example with Verilator 5 (the library paths find every module by file name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  --top-module tb_svpwm_anpc_top_full rtl/svm_pkg.sv tb/tb_svpwm_anpc_top_full.sv
./obj_dir/Vtb_svpwm_anpc_top_full
```

Swap the top module and testbench file for any other testbench. Each run
takes seconds.
