# Hardware processes under RTOS control: an SPI-driven FPGA process and a satellite attitude loop

A small real-time operating system (MicroC/OS-II on an HCS12 microcontroller) can schedule
software tasks, but it has no notion of work done in an FPGA next to it. The approach here
is to treat FPGA logic as a *hardware process* that an RTOS task starts and an interrupt
finishes. A software task hands the process its data over SPI and picks the operation with
two port pins. The FPGA computes, raises the microcontroller's IRQ line and puts the result
on a parallel port, where the task that was waiting on the interrupt picks it up.

This repository holds synthesizable SystemVerilog for the FPGA side of two such designs.
They share only clock and reset, and `rtos_hw_top` instantiates them side by side:

1. **`spi_process`**: a minimal hardware process. It has an SPI slave, an adder and a
   subtractor selected through a 1-to-2 decoder, a 2-to-1 result mux, a send module (first
   the interrupt, then the parallel result) and a seven-segment display.
2. **`hil_system`**: a heavier example. It is a hardware-in-the-loop (HiL) emulator of a
   satellite's roll/yaw attitude dynamics, closed by a two-input sliding-mode (variable
   structure) controller. The controller exists in fixed point (Q9.9 by default) and in
   single-precision floating point, and an input selects which one closes the loop. A noise box on the measurement link emulates sensing error.
   Delay shift registers on the state link and on the control link emulate jitter in the
   exchange between emulator and controller.

The microcontroller, its SPI master peripheral and the RTOS software are not part of this
RTL. The testbenches use a behavioural SPI master (`tb/spi_master_model.sv`) in their place.

---

## 1. The satellite attitude loop (`hil_system`)

```
            +-------------+   X (Q8.24)   +--------+  X + noise  +-------+  +----------------+
 x_init --->| sat_model   |-------------->| noise  |------------>| state |->| vsc_controller |<-- ref
            | x(k+1) =    |               | box    |             | delay |  | (Q9.9 / fp32)  |
            | Ad x + Bd u |<--+           +--------+             +-------+  +----------------+
            +-------------+   |                                            | U (Qm.n)
                              |  U (Q8.24)   +--------------------+        |
                              +--------------| u_delay_line       |<-------+
                                             | 0..15 clocks, or   |
                                             | random             |
                                             +--------------------+
                control FSM: tick -> MODEL -> SENSE -> XWAIT -> CTRL -> PUSH -> IDLE
```

### 1.1 The plant emulator (`sat_model`)

The state is `X = [yaw angle, roll angle, yaw rate, roll rate]` and the input is
`U = [u1, u2]`. The emulator evaluates the linearised model discretised with a 1 ms step:

```
          | 1 0 0.001 0     |          | b1   0  |      b1 = -5e-7  (dt^2/2)
  Ad  =   | 0 1 0     0.001 |    Bd =  | 0    b1 |
          | 0 0 1     0     |          | b2   0  |      b2 = -1e-3  (dt)
          | 0 0 0     1     |          | 0    b2 |
```

All words are 32-bit Q8.24, which gives a range of ±128 and a resolution of 6e-8. The
coefficients are written as reals in `hil_pkg` and converted at elaboration time, so editing
a matrix in the package is enough. The emulator evaluates one row of `Ad·x + Bd·u` per
clock, using four multipliers for `Ad·x`, two for `Bd·u` and one adder tree. Each row is
rounded to nearest. All four rows are committed together, so every row reads the old state.
`done` pulses 5 clocks after `start`.

**Sign of Bd.** The discretised input matrix in the source is printed with positive entries.
The continuous input matrix it comes from has negative ones (`-1/I1`, `-1/I3`). The
controller's canonical transformation only turns the control law into a converging one
with the negative sign, so that sign is used here with the printed magnitudes. With the
positive sign the loop diverges. To change it, flip `BD_R` in `hil_pkg`.

### 1.2 The sliding-mode controller (`vsc_controller`)

This is the hardest block to follow. The controller works in the controllable canonical
coordinates `Z = T·e`, where `e = X − ref`:

```
      | -1980    0      0      0   |
  T = |    0   -407     0      0   |         z1 ~ yaw angle,  z3 ~ its derivative
      |    0   -8.4  -1989     0   |         z2 ~ roll angle, z4 ~ its derivative
      |   1.7    0      0    -407  |
```

In these coordinates `z1' = z3` and `z2' = z4`, and the control enters `z3'` and `z4'` with
unit gain. The two switching functions are

```
  s1 = z3 − λ1·z1        λ1 = −1
  s2 = z4 − λ2·z2        λ2 = −2
```

On the surface `s = 0` the angles decay as `z1' = λ1·z1` and `z2' = λ2·z2`. That means time
constants of 1 s for yaw and 0.5 s for roll. The source writes the surface as `λ·z1 + z3`.
With negative λ that is an unstable surface, so the RTL uses `z3 − λ·z1`.

The control law has two regions:

| region | law | name |
|---|---|---|
| `|s_i| > ε` | `u_i = −Ks · sign(s_i)` | reaching mode, `mode[i] = 1` |
| `|s_i| ≤ ε` | `u_i = −(Ks/ε) · s_i` | linear law in a boundary layer |

`Ks = 30`. The linear law is the `−Kn·Z` branch of the original law with `Kn = (Ks/ε)·C`,
chosen so that `u` is continuous at the edge of the layer. This removes the chattering of a
pure sign law. The layer width `ε = 2^EPS_SHIFT = 128` is this design's choice. With it the
per-step loop gain inside the layer is `1.989·30/128 ≈ 0.47` for yaw and `0.095` for roll:
stable, and without overshoot.

**Pipeline.** There are four registered steps, and `done` pulses 4 clocks after `start`:

1. Error `e = x − ref`, shifted from Q8.24 to Qm.n and saturated.
2. `Z = T·e`, with T held to N fraction bits.
3. `s1` and `s2`.
4. The control law, with the result saturated to Qm.n.

**Number format.** The input error and the output `U` are Qm.n words with `W = M+N` bits;
the default is Q9.9, 18 bits. Q8.8 and Q7.7 are parameter settings. Inside the block,
products and sums run at full width: `Z` reaches about 800 for a 0.4 rad error, which would
not fit a 9-bit integer part. The format therefore limits measurement and actuation
resolution, not the internal arithmetic. This is a reading of "the controller is
implemented in Q9.9". A design that also kept the intermediates in Q9.9 would saturate
`Z` for errors above about 0.13 rad.

**Floating-point version (`vsc_controller_fp`).** This block computes the same law in IEEE
single precision and has the same ports. The error `x − ref` is formed exactly in Q8.24 and
converted once. `Z = T·e` then takes one row per clock, using four multipliers and an adder
tree. The surfaces and the law follow, and `U` is rounded into the same Qm.n output word, so
the U link and the emulator do not change. `done` comes 7 clocks after `start`. The
arithmetic lives in `fp32_pkg`:
- multiply, add, fixed→float and float→fixed functions;
- results rounded to nearest even;
- subnormals flushed to zero and no NaN handling, since the loop's values never need them.

In `hil_system` both controllers are started on every step. `ctrl_float` picks whose `U`,
mode flags and `done` are used, and should change only while `run` is low.

### 1.3 Noise and jitter

**Noise (`noise_injector`).** While `noise_en` is high, each state word sent to the
controller gets uniform noise of `NOISE_BITS` = 16 LSBs of Q8.24, about ±0.002 rad. The
noise comes from its own 32-bit LFSR per word. The emulator's true state is unaffected and
is also brought out as `x_state`. `NOISE_BITS` sets the signal-to-noise ratio: each bit
less halves the noise amplitude, which raises the SNR by about 6 dB.

**Jitter (`u_delay_line`).** Two copies of the same delay line sit in the loop. One carries
the noisy state to the controller and is tapped after `x_delay_sel` clocks. The other
carries U back to the emulator and is tapped after `delay_sel` clocks. When `jitter_en` is
high, both take a random delay from their own LFSR instead (different seeds). Each line
holds one vector at a time and reports `busy` until it has delivered it. The sender waits
for `busy` to drop, so the delay works as a handshake. The controller starts when the state
leaves its line. The delayed U is written into the emulator's input register whenever it
arrives.

### 1.4 Timing of one step

A step timer ticks every `STEP_CYCLES` clocks. The default of 100 000 is 1 ms at 100 MHz.
On a tick the FSM runs:

| clock after tick | event |
|---|---|
| 1 | emulator starts, using the U it holds now |
| 6 | new state ready, noise box samples it |
| 7 | noisy state enters the state delay line |
| 8 + dx | state leaves the line, controller starts (dx = `x_delay_sel`, 0..15) |
| 12 + dx | U ready |
| 13 + dx | U enters the U delay line (waits if the line still holds the previous U) |
| 14 + dx + du | U written into the emulator (du = `delay_sel`, 0..15) |

With the floating-point controller, everything from "U ready" on comes 3 clocks later.

If the delayed U has not arrived by the next tick, that step runs with the previous U. At
the testbench step of 24 clocks this happens once dx + du reaches about 11. This is how a late
controller disturbs the loop, and each such step increments `stale_count`. A
tick that comes while a step is still running is merged into the pending one and counted in
`overrun_count`. With the 1 ms default neither can happen. Both appear with the short steps
the testbenches use (24 and 10 clocks).

### 1.5 What the loop does

From yaw 0.4 rad and roll 0.2 rad, the controller spends about 25 steps in reaching mode and
then stays in the boundary layer. Yaw is 0.15 rad after 1 s and 0.005 rad after 5 s. It
ends within one Q9.9 LSB (0.002 rad) of zero.

The word formats give these final angle errors:

| format | yaw after 30 s |
|---|---|
| Q9.9 | 0.0020 |
| Q8.8 | 0.0039 |
| Q7.7 | 0.0078 |
| single-precision float | 0.00003 |

For the fixed-point formats the limit is one LSB of the format, and the ordering matches
the source: Q9.9 best, Q7.7 coarsest. The float loop follows the Q9.9 loop closely during
the transient: yaw is 0.148 rad against 0.150 rad at 1 s. It then keeps decaying below the
Q9.9 LSB, because its error input is not quantised.

The original evaluation shows an oscillating response that settles in about 25 s. This controller's response is a monotonic decay instead, because of
the boundary-layer law and the surface sign above. Its plots are therefore not reproduced
point for point.

---

## 2. The SPI hardware process (`spi_process`)

```
 MOSI/SS_n/SCLK -> spi_slave -> operand A, B --+--> adder_unit ------+
                       ^                       +--> subtractor_unit -+-> mux_2to1 -+-> send_unit -> result[8:0], irq_n
                       |                 in, enable -> decoder_1to2   (sel = in)   +-> seven_seg -> an_n, seg_n
      MISO <---- last result (low byte)
```

**One transaction, as the microcontroller sees it:**

1. Set `in` (0 = add, 1 = subtract) and `enable`.
2. Pull SS_n low and send operand A, then operand B: one byte each, SPI mode 0 by default, MSB first.
3. Two clocks after B's last bit is synchronised, the enabled unit registers `A+B` or `A−B`.
   The result is 9 bits, and for subtraction bit 8 is the sign.
4. `send_unit` pulls `irq_n` low for 32 clocks. One clock later it drives `result` and
   pulses `result_strobe`. The result then stays on the port until the next one.
5. During every SPI word the slave returns the low byte of the last result on MISO. A task
   can therefore also read the result back over SPI.

With `enable` low, the operands are taken but nothing is computed and no interrupt is
raised.

**The SPI slave** oversamples SCLK, SS_n and MOSI through two-flip-flop synchronisers, so
the system clock must be several times faster than SCLK. SPI here runs at up to 4 MHz,
against a 100 MHz clock. The slave samples MOSI on the rising edge of SCLK and changes MISO
on the falling edge. Mode 0 is this design's choice, because the master sets the polarity
and phase.

**The display** multiplexes the result, zero-extended to 16 bits, as four hex digits on a
common-anode display. Anodes and segments are active low, and `seg_n = {g,f,e,d,c,b,a}`.

---

## 3. Where this RTL departs from, or adds to, the source design

Followed as described:

- Block structure and connections of both designs.
- The 1 ms discretised plant, T, λ1 = −1, λ2 = −2 and Ks = 30.
- A 32-bit emulator and a Q9.9 controller, with Q8.8 and Q7.7 available as parameters, and
  a floating-point controller beside it.
- Noise under a strobe, and delay by shift registers on the state and control links, fixed
  or random, passed on by handshaking.
- An FSM sequencing the loop.
- An 8-bit, MSB-first SPI with active-low select.
- The send module: interrupt first, then the result.

Decided here, because the source does not say:

- The Q8.24 split of the emulator word.
- The boundary layer ε = 128 and the linear law inside it.
- Single precision as the floating-point format, its rounding, and run-time selection
  between the two controllers.
- Full-width arithmetic inside the controller.
- The noise generator and its amplitude.
- The delay depth (16), the one-vector-in-flight valid/busy handshake, and the LFSR seeds.
- The FSM's states and the step timer.
- The 100 MHz clock.
- SPI mode 0 as the default (the slave's `CPOL`/`CPHA` parameters follow the master's
  setting), two operand bytes per frame, and read-back on MISO.
- Which value of `in` selects add.
- The 32-clock active-low interrupt pulse.
- Display coding and refresh rate (about 380 Hz per round).

Changed, because the printed values contradict each other:

- The sign of Bd (§1.1).
- The sign convention of the sliding surface (§1.2).
- `T(1,1)` is kept at −1980 as given, although the matching inertia is 1989.

Not included:

- The microcontroller and its software.
- The FPGA resource and power figures, which are not reproduced by design.

---

## 4. Files

| file | contents |
|---|---|
| `rtl/hil_pkg.sv` | Q8.24 type, plant and controller constants, conversion functions |
| `rtl/sat_model.sv` | plant emulator |
| `rtl/noise_injector.sv` | measurement noise |
| `rtl/u_delay_line.sv` | control-input delay |
| `rtl/vsc_controller.sv` | sliding-mode controller, Qm.n |
| `rtl/vsc_controller_fp.sv` | sliding-mode controller, single precision |
| `rtl/fp32_pkg.sv` | single-precision multiply, add and conversions |
| `rtl/hil_system.sv` | closed loop, FSM, step timer, counters |
| `rtl/spi_slave.sv`, `decoder_1to2.sv`, `adder_unit.sv`, `subtractor_unit.sv`, `mux_2to1.sv`, `send_unit.sv`, `seven_seg.sv` | hardware-process blocks |
| `rtl/spi_process.sv` | hardware process top |
| `rtl/rtos_hw_top.sv` | chip top |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_hil_qformats.sv` | Q9.9 / Q8.8 / Q7.7 / float loops over 30 s of model time |
| `tb/tb_rtos_hw_top_full.sv` | top at default parameters (1 ms step): one add, one subtract, 300 ms of the loop |
| `tb/spi_master_model.sv` | behavioural SPI master used by the testbenches |

Top-level parameters:

- `STEP_CYCLES`: clocks per 1 ms step.
- `CTRL_M`, `CTRL_N`: the controller's Qm.n format.

Each block's own parameters are described in the header comment of its file.

## 5. Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself, with a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hil_pkg.sv rtl/fp32_pkg.sv tb/tb_hil_system.sv --top-module tb_hil_system -o sim
./obj_dir/sim
```

Replace `tb_hil_system` with any testbench name. Passing the two packages first makes them
visible to every file.

What the testbenches check:

| testbench | what it shows |
|---|---|
| `tb_sat_model` | Each step matches `Ad·x + Bd·u` evaluated in double precision; 5-clock latency. |
| `tb_vsc_controller` | `u` matches the control law evaluated in double precision, including both modes and saturation; 4-clock latency. |
| `tb_vsc_controller_fp` | The float functions against double-precision results rounded to single; `u` against the law on the exact error, within one output LSB; both modes; 7-clock latency. |
| `tb_hil_qformats` | The Q9.9, Q8.8, Q7.7 and float loops each settle over 30 s; float stays within 0.01 rad of Q9.9 at 1 s and 5 s. |
| `tb_u_delay_line` | Exact `delay+1` latency for every delay; random delays are spread. |
| `tb_noise_injector` | The noise strobe works; the noise sequence is correct. |
| `tb_hil_system` | A state-link delay moves the end of the step by exactly that many clocks; convergence from (0.4, 0.2) rad in 10 s, clean and with noise and jitter; exact step spacing; stale steps and overruns occur when they should; reaching mode and boundary layer both occur. |
| `tb_spi_slave` | All four SPI modes at a 4 MHz SCLK: received bytes, bytes returned on MISO, frame pulses. |
| `tb_spi_process`, `tb_rtos_hw_top` | The whole microcontroller transaction against `a±b`; interrupts counted; disabled process stays silent; read-back over MISO; display digit. The top test also runs both designs at once and requires every mechanism to occur, including steps closed by the float controller. |
| `tb_rtos_hw_top_full` | Same at full size. One 1 ms step is 100 000 clocks, so 300 steps take about 15 s of simulation. |

All of these pass. For each block, a deliberately broken copy of the module (for example a
flipped law sign, a dropped carry or a swapped select) makes its testbench fail.
