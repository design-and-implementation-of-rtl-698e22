# Real-time simulator for a dual three-phase induction motor drive

This RTL simulates a six-phase induction machine in real time, together with
the converter and modulator that feed it. The machine has two three-phase
windings shifted by 30 electrical degrees. A two-level, 12-pulse
voltage-source converter drives it from a 585 V dc link, under sine-triangle
PWM. The model advances by one step every 40.96 µs (24.4 kHz). For each step
it puts out the stator and rotor currents, the rotor speed, the
electromagnetic torque and the six phase voltages as a byte stream for a
Gigabit Ethernet MAC. It can also take six switching signals from pins, so
an external drive controller can be tested against it (hardware in the loop).

The architecture follows the simulator described in "Design and
Implementation of an FPGA-based Real-time Simulator for a Dual Three-Phase
Induction Motor Drive". The model is not hard-wired logic. It runs as a
program on a small Harvard processor with a single-precision floating-point
unit. The processor's sizes and clock rates follow that publication: a
512 × 36-bit program memory, a 512 × 32-bit data memory, a nine-bit program
counter, 50 MHz for the processor, 100 MHz for the PWM and 125 MHz for the
output. The instruction set, the program, the PWM scheme and all interfaces
are this design's own: the publication describes them only by what they do.

## Contents

- [Block structure](#block-structure)
- [Clocks and rates](#clocks-and-rates)
- [The processor](#the-processor)
- [The machine model and its program](#the-machine-model-and-its-program)
- [PWM generator and input module](#pwm-generator-and-input-module)
- [Output stream](#output-stream)
- [Verification](#verification)
- [Behaviour with the published machine data](#behaviour-with-the-published-machine-data)
- [Departures and what is not included](#departures-and-what-is-not-included)
- [Simulating and changing the design](#simulating-and-changing-the-design)

## Block structure

```
               clk_pwm 100 MHz        clk_sim 50 MHz                    clk_eth 125 MHz
              +---------------+      +-----------------------------------------------+
 freq_inc --->| pwm_generator |----->| input_module   duty a..f, T_L (float)         |
 mod_index -->| (CORDIC sine, | pwm  |      ^  |                                      |
              |  triangle)    | _out |      |  v                                      |
              +---------------+  or  | control_unit ----> output_module --(async FIFO)-+--> m_axis_* bytes
 pwm_ext_in ------------------------>|  |   ^    \                                     |
 (pwm_ext_sel)                       |  v   |     \--> processing_unit (fp add/sub/mul)|
 load_torque ----------------------->| program_counter -> program_memory               |
                                     |      data_memory (2 read ports, 1 write)        |
                                     +-----------------------------------------------+
```

| File | Role |
|---|---|
| `dtpim_simulator.sv` | Top level: wires the blocks together and synchronises the resets. |
| `control_unit.sv` | Multicycle fetch/decode/execute controller. It also holds the 40.96 µs sampling timer. |
| `program_counter.sv` | Nine-bit up-counter with a load input for jumps. |
| `program_memory.sv` | 512 × 36 read-only program store. Its image comes from `dtpim_program_pkg`. |
| `data_memory.sv` | 512 × 32 RAM with two synchronous read ports and one write port. It holds the constants, state and temporaries. |
| `processing_unit.sv` | Single-precision add, subtract and multiply, one cycle. Uses `fp_add.sv` and `fp_mul.sv`. |
| `input_module.sv` | Turns the six leg signals into duty cycles per step, as floats. It also holds the load torque. |
| `output_module.sv` | Clock-domain crossing (`async_fifo.sv`) and the byte stream to the MAC. |
| `pwm_generator.sv` | Sine-triangle modulator for the six legs. Uses `cordic_sin.sv`. |
| `reset_sync.sv` | Asynchronous assert, synchronous release, one per clock domain. |
| `dtpim_pkg.sv` | Word types, the instruction format and float conversion helpers. |
| `dtpim_program_pkg.sv` | Machine data, the data-memory map, the constant table and the program. |

## Clocks and rates

| Quantity | Value | Where it is set |
|---|---|---|
| Processor clock | 50 MHz (20 ns) | `clk_sim` |
| PWM generator clock | 100 MHz (10 ns) | `clk_pwm` |
| Output clock | 125 MHz (8 ns) | `clk_eth` |
| Simulation step | 2048 cycles = 40.96 µs (24.4 kHz) | `STEP_LOG2 = 11` |
| PWM carrier period | 9216 cycles = 92.16 µs (10.85 kHz) | `CARRIER_HALF = 4608` |
| 50 Hz fundamental | 217 carrier periods = 19.99 ms | `freq_inc = 19791209` |
| One program pass | 420 cycles = 8.4 µs | the program |

The clocks come in as ports; on a board they come from a PLL. The step is
not locked to the carrier. A step is 0.444 of a carrier period, so each
step's duty cycle samples a different slice of the carrier.

The program uses about 20 % of the step. The same loop could run at up to
about 119 kHz, above the 100 kHz the publication gives as the simulator's
limit. The step length is the top parameter `STEP_LOG2`. The model
constants in the data memory are computed for whatever step it sets. With
`STEP_LOG2 = 9` the step is 512 cycles (10.24 µs, 97.7 kHz) and still runs
in real time.

## The processor

### Instruction word

```
 35     31 30   27 26      18 17       9 8        0
+---------+-------+----------+----------+----------+
|  spare  |  op   |   dst    |  src_a   |  src_b   |
+---------+-------+----------+----------+----------+
```

| op | Mnemonic | Action | Cycles |
|---|---|---|---|
| 0 | NOP | – | 2 |
| 1 | ADD | D[dst] = D[src_a] + D[src_b] | 4 |
| 2 | SUB | D[dst] = D[src_a] − D[src_b] | 4 |
| 3 | MUL | D[dst] = D[src_a] × D[src_b] | 4 |
| 4 | MOV | D[dst] = D[src_a] | 3 |
| 5 | IN | D[dst] = input channel src_a (0..5 duty a..f, 6 load torque) | 3 |
| 6 | OUT | push D[src_a] to the output module | 3, or more while the buffer is full |
| 7 | OUTL | like OUT, and marks the last word of a record | as OUT |
| 8 | JMP | PC = dst | 2 |
| 9 | WAIT | stop until the next sampling instant | – |

### Instruction timing

Every instruction passes through FETCH and DECODE:

1. **FETCH:** the program memory reads at the PC.
2. **DECODE:** the word is valid, and both data-memory ports read `src_a` and `src_b`. NOP, JMP and WAIT end here.
3. **EXEC:** the operands are valid.
   - ADD, SUB and MUL start the processing unit.
   - MOV, IN and OUT finish.
4. **WB:** the arithmetic result is written to `dst`.

The two read ports let both operands arrive in one cycle. This is the
property the publication gives for its data memory.

### Sampling and overrun

The sampling timer is a free-running counter in the control unit. Its tick
does three things:

- it closes the input module's measurement window;
- it latches the load torque;
- it releases WAIT.

If the tick arrives while the program is not at WAIT, the sticky
`step_overrun` output is set. The pending tick then releases the next WAIT
at once, so the step is late but not lost.

OUT waits while the output buffer is full. If the Ethernet side stops
accepting data for long, that wait is what causes overruns.

### Floating point

The processing unit is IEEE-754 single precision:

- rounding is round-to-nearest-even;
- subnormal inputs and results are flushed to zero;
- NaN is not handled.

The publication uses a vendor floating-point core instead. These two
combinational units (`fp_add`, `fp_mul`) take its place, followed by one
result register.

## The machine model and its program

The state is x = [i_sα, i_sβ, i_rα, i_rβ], the stator and rotor currents in
stationary coordinates. The other variables:

- ω: electrical rotor speed.
- T_m: the 40.96 µs step.
- c1 = L_s·L_r − L_m²; c2 = L_r/c1, c3 = L_m/c1, c4 = L_s/c1.

The program integrates the model with forward Euler. The stator equations
are:

```
i_sα' = i_sα + Tm·[ −c2·Rs·i_sα + c3·Lm·ω·i_sβ + c3·Rr·i_rα + c3·Lr·ω·i_rβ + c2·u_α ]
i_sβ' = i_sβ + Tm·[ −c3·Lm·ω·i_sα − c2·Rs·i_sβ − c3·Lr·ω·i_rα + c3·Rr·i_rβ + c2·u_β ]
```

The rotor equations are:

```
i_rα' = i_rα + Tm·[  c3·Rs·i_sα − c4·Lm·ω·i_sβ − c4·Rr·i_rα − c4·Lr·ω·i_rβ − c3·u_α ]
i_rβ' = i_rβ + Tm·[  c4·Lm·ω·i_sα + c3·Rs·i_sβ + c4·Lr·ω·i_rα − c4·Rr·i_rβ − c3·u_β ]
```

Torque and speed follow from the present state:

```
Te  = (3P/2)·Lm·(i_sβ·i_rα − i_sα·i_rβ)
ω'  = (1 − Tm·Bi/Ji)·ω + Tm·P/(2·Ji)·(Te − TL)
```

### Machine data

| Quantity | Value |
|---|---|
| R_s | 0.62 Ω |
| R_r | 0.63 Ω |
| L_s | 0.2062 H |
| L_r | 0.2033 H |
| L_m | 0.0666 H |
| J_i | 0.27 kg·m² |
| B_i | 0.012 |
| P | 3 (the number of pole pairs) |
| V_dc | 585 V |

These are the published values for a 15 kW machine. They are `localparam
real`s at the top of `dtpim_program_pkg.sv`. The products the program needs,
such as Tm·c3·Rr or Tm·c3·Lm, are worked out at elaboration and become the
data memory's initial contents. The ω-dependent products
(Tm·c3·Lm·ω and similar) are formed by the program at each step.

### Voltages

Phase voltages come from the leg duty cycles d of each isolated-neutral
set:

```
v_a = Vdc/3·(2d_a − d_b − d_c)    (and the same for b, c and d, e, f)
```

The (α, β) components use the amplitude-invariant transform with the phase
axes a 0°, d 30°, b 120°, e 150°, c 240° and f 270°:

```
u_α = (v_a − ½(v_b + v_c) + (√3/2)(v_d − v_e)) / 3
u_β = ((√3/2)(v_b − v_c) + ½(v_d + v_e) − v_f) / 3
```

Only the α-β plane is modelled. The x-y components of the six-phase machine
produce no torque and are not simulated.

### One pass of the program

A pass is 112 instructions: 86 arithmetic, 7 IN, 12 OUT/OUTL, 5 MOV, 1 WAIT
and 1 JMP. The program's order:

1. WAIT.
2. IN the six duty cycles and T_L.
3. Six phase voltages, then u_α and u_β.
4. Te.
5. The four ω products.
6. The four state rows.
7. The new speed.
8. Send the record.
9. MOV the new state over the old one.
10. JMP back to 1.

Memory use is 112 of 512 program words and 70 of 512 data words.

The record sent in step k holds the state x(k) and Te(k), together with the
voltages measured during step k. Those voltages are the ones used to
compute x(k+1).

## PWM generator and input module

### PWM generator

The generator compares a symmetric triangle (0 → 4608 → 0, 92.16 µs) with
six references. A reference is

```
ref_x = 2304·(1 + m·sin(θ − γ_x))
```

The leg angles γ are a 0°, b 120°, c 240°, d 30°, e 150° and f 270°.

- θ is a 32-bit phase accumulator. It steps by `freq_inc` once per carrier
  period, so f = freq_inc / 2³² / 92.16 µs.
- The modulation index m is unsigned Q1.15. For example, 0.275 is 9011 and
  0.481 is 15761.
- A 16-iteration CORDIC computes the six sines one after another during
  each period. The new references take effect at the next period (regular
  sampling).
- A leg is high while the carrier is below its reference.

### Input module

The input module synchronises the six leg signals with two flip-flops. It
counts each signal's high cycles over the 2048-cycle step. At the tick it
stores the count as count/2048 in floating point, which is exact. The
program therefore sees each leg's average switching state over the step.
That average is what the averaged converter model needs.

### Switching source

`pwm_ext_sel` chooses where the leg signals come from:

- 0: the internal generator;
- 1: the external pins `pwm_ext_in`, to test a real controller.

## Output stream

Each step produces one record of twelve IEEE-754 words, 48 bytes:

```
i_sα, i_sβ, i_rα, i_rβ, ω, Te, v_a, v_b, v_c, v_d, v_e, v_f
```

Each word is sent most significant byte first. `m_axis_tlast` marks the
record's last byte.

A 16-word dual-clock FIFO carries the words from the 50 MHz domain to the
125 MHz domain. It uses Gray-coded pointers and two-flop synchronisers. On
the 125 MHz side, `m_axis_tdata/tvalid/tready/tlast` follow the usual
ready/valid rules.

The stream needs 9.4 Mbit/s. Framing (Ethernet, IP and UDP headers, FCS) is
left to the MAC and the logic around it.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_processing_unit` | Add, subtract, multiply and pass, bit-exact against round-to-nearest results worked out in double precision; the one-cycle latency. |
| `tb_data_memory` | The model constants at start-up, writes, and two independent reads in the same cycle. |
| `tb_program_counter` | Reset, counting, wrap at 512, loads, and load taking priority over increment, against a reference counter. |
| `tb_program_memory` | The synchronous read, and the shape of the loop: WAIT first, seven inputs read, a 12-word record closed by OUTL, and a final jump to 0. |
| `tb_control_unit` | A small program run with behavioural memories, processing unit and I/O written in the testbench, on a 64-cycle step. It checks ADD/SUB/MUL/MOV/IN results, the OUT/OUTL words, JMP, WAIT release exactly on the tick, the 4/3/2-cycle timing, the OUT stall and the overrun flag. |
| `tb_input_module` | Known high times over successive windows give exactly high_cycles/2048, with the synchroniser delay modelled. It also checks the load torque latched at the tick. |
| `tb_output_module` | Byte order, record framing and no loss, with 50/125 MHz clocks and a random `tready` that fills the FIFO. |
| `tb_pwm_generator` | The 9216-cycle carrier period. Each leg's high time per period is checked against the reference computed with `$sin`, at full index and at 0.275, to within 2 cycles. |
| `tb_dtpim_simulator` | The whole design at its default sizes, described below. |
| `tb_dtpim_workloads` | The published operating-point changes, described below. |
| `tb_dtpim_fast_step` | The whole design with `STEP_LOG2 = 9`, the 97.7 kHz step, for 4000 steps. It makes the same record, voltage and pacing checks as the full-size test, with Tm = 10.24 µs. It also checks that no step overruns and that the 420-cycle pass fits within 512 cycles. |

### `tb_dtpim_simulator`

This testbench runs the whole design at its default sizes.

**What it runs:**

- 4000 no-load steps at 50 Hz, m = 0.275;
- a load-torque step;
- a switch to the external pins with a fixed pattern;
- a receiver that stops for five steps.

**What it checks:**

- **Every record:** it recomputes the next state and speed from the
  previous record in double precision, to a relative tolerance of 10⁻⁵.
  It also checks the torque and that each set's voltages sum to zero.
- **Voltages:** each record's voltages are checked against duty cycles
  counted from the pins.
- **External pattern:** the pattern (leg a on, the rest off) must give
  exactly v_a = 390 V and v_b = v_c = −195 V.
- **Timing:** records must be 40.96 µs apart. A pass must take a fixed
  420 cycles.
- **Mechanisms:** buffer full, OUT stall, step overrun, external mode and
  load step must each have happened.

It takes about 40 s of simulation time.

### `tb_dtpim_workloads`

This testbench takes the design through the published test points,
shortened to 0.48 s of machine time (about 75 s of simulation):

1. 40 Hz at m = 0.275.
2. The modulation index stepped to 0.481.
3. The frequency stepped to 50 Hz.

Over 100 ms windows it takes the Fourier components of v_a and i_sα. The
results:

| Operating point | Current fundamental | v_a fundamental (expected m·Vdc/2) |
|---|---|---|
| 40 Hz, m = 0.275 | 1.75 A | 80.45 V (80.44 V) |
| 40 Hz, m = 0.481 | 3.04 A | 140.70 V (140.69 V) |
| 50 Hz, m = 0.481 | 2.43 A | within 0.02 V |

The current ratio after the index step is 1.741, against 0.481/0.275 =
1.749. The published currents for the two index values are about 2 A and
4 A.

## Behaviour with the published machine data

The hardware matches the double-precision model step for step. The machine
data itself, however, gives a much weaker machine than the published
results show.

L_m is only a third of L_s. The stator–rotor coupling is therefore weak, and
at standstill the torque at 50 Hz, m = 0.275 is only a few mN·m. Starting
from rest, the rotor reaches about 0.02 rad/s (electrical) in 2 s. The
published no-load start-up to 1000 rpm in about 1.15 s is not reproduced
with this parameter set.

The stator current magnitudes (1.4 to 3 A) are of the order of the
published 2 A and 4 A. If other machine data is to be used, only the
constants in `dtpim_program_pkg.sv` change.

## Departures and what is not included

### Torque formula

The publication gives the torque twice:

- as 3P/2 times the rotor-flux cross product;
- in a simplified form, 3P/4·(i_sβ·i_rα + i_sα·i_rβ), with no L_m and with a
  plus sign.

The second form does not describe a torque. This design uses the first form
with the fluxes expanded, (3P/2)·L_m·(i_sβ·i_rα − i_sα·i_rβ).

### Sign in the third state row

As printed, the ω·L_m term in the third row of the system matrix has the
same sign as in the fourth row. This design uses the opposite sign. With it
the matrix matches the induction machine equations and the row-1/row-2
pattern.

### Parts replaced or left out

- **Floating point:** own single-precision units replace the vendor core.
  Subnormals are flushed to zero.
- **Ethernet MAC and PLL:** both are vendor IP and are not included. The top
  takes the three clocks as inputs and presents the MAC's client-side byte
  stream.
- **Load torque:** T_L is an input port in IEEE-754 single format, read
  once per step.
- **Program loading:** the program is fixed at configuration from
  `dtpim_program_pkg`. No run-time way to load it is provided.

### Not modelled

The converter's dead time, device drops and the six-phase machine's x-y
currents are not modelled. The measurement system of the test bench
(current sensors, encoder) is not part of this RTL.

## Simulating and changing the design

### Running a testbench

Any testbench runs with plain Verilator 5. List the two packages first:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/dtpim_pkg.sv rtl/dtpim_program_pkg.sv tb/tb_dtpim_simulator.sv \
    --top-module tb_dtpim_simulator -o sim
./obj_dir/sim
```

Replace `tb_dtpim_simulator` with any other testbench name. Each one ends
with a `TB_RESULT` line.

### Changing the design

- **Program:** to change the model, edit `program_image()` and the memory
  map in `dtpim_program_pkg.sv`. The program memory and the testbenches
  follow automatically. `tb_dtpim_simulator` holds its own copy of the
  model equations as the reference, so update it too.
- **Step length:** `STEP_LOG2` sets the step as a power of two of 50 MHz
  cycles. The data memory's constants follow it through its `STEP_S`
  parameter. The program needs 420 cycles, so `STEP_LOG2` must be at
  least 9.
- **Carrier period:** `CARRIER_HALF` sets it in 10 ns units.
- **Frequency and modulation index:** these are run-time inputs
  (`pwm_freq_inc`, `pwm_mod_index`).
