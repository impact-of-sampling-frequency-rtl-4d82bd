# FS-MPC current controller for a three-phase four-leg inverter

A two-level four-leg inverter has four switch legs (u, v, w and the neutral leg x), so its power
stage can be in 2^4 = 16 switching states. A finite-set model predictive controller (FS-MPC)
does not use a modulator. In every sampling period it does four things:

1. It measures the load currents i_u, i_v and i_w.
2. For each of the 16 states, it predicts the currents at the next sample with a discrete model
   of the RL load.
3. It scores each prediction against the reference currents with a cost g.
4. It drives the gates with the state of lowest cost.

The time this search takes sets the highest usable sampling rate. This RTL makes that time
exact. The arithmetic runs on a small set of bit-serial functional units, following a fixed
schedule of N *states* (schedule steps). Every state lasts exactly WL clock cycles for a word
length of WL bits. One sampling period therefore needs

    CC = 2^n * N * WL = 16 * N * WL clock cycles.

Two datapaths are provided, and they trade area for speed:

| datapath | functional units | states N | CC at WL = 32 | max f_s at 100 MHz (WL = 8 / 16 / 24 / 32) |
|---|---|---|---|---|
| `cost_datapath_4fu` | 2 adders, 2 multipliers | 11 | 5632 | 70.97 / 35.50 / 23.67 / 17.75 kHz |
| `cost_datapath_6fu` | 3 adders, 3 multipliers | 8  | 4096 | 97.56 / 48.80 / 32.54 / 24.41 kHz |

The maximum sampling rates are f_clk / (CC + 1), because this implementation accepts a new
sample one cycle after a period ends. They match the rates published for the original design
(f_clk / CC) to within 0.1 %.

## Structure

```
fsmpc_top                    both architectures side by side (a4_* and a6_* ports)
 └─ fsmpc_controller         one controller; NUM_FU = 4 or 6 selects the datapath
     ├─ mpc_control_unit     sequencing: sample -> 16 candidates -> N states -> WL cycles
     ├─ cost_datapath_4fu    or cost_datapath_6fu: input latches, REG1..REG3, units, schedule
     │   ├─ serial_adder      x2 / x3
     │   └─ serial_multiplier x2 / x3
     └─ cost_minimizer       running minimum, gate register
fsmpc_pkg                    shared constants: switch bit order, schedule lengths, CC formula
```

The top has no logic of its own. Use `fsmpc_controller` directly if you want only one
architecture.

## What a candidate's cost is

All numbers are signed two's complement with WL bits, of which FRAC are fractional. The default
is FRAC = WL/2. A switch value S_m enters the datapath as 0 or 1.0. With equal filter inductances
on all legs, the prediction is the following, for m = u, v, w:

    i_m(k+1) = a * i_m(k) + b * S_m + c * (sum of the other three S)

The coefficients are static inputs. For sampling period Ts, DC link Vdc, filter Lf and Rf, and
load R:

    a = 1 - Ts (R + Rf) / Lf        b = 3/4 * Ts Vdc / Lf        c = -1/4 * Ts Vdc / Lf

These follow from the load equations when the resistive part of the neutral voltage is
neglected. The datapath has one `a` for all three phases. For unbalanced loads, use a nominal
R (the testbenches use 5 ohm).

The two architectures do not compute the same cost. Each one follows its own published
schedule:

* **4 units:** e_m = i*_m + d * i_m(k+1), with d = -1 supplied on `coef_d`. The cost is
  g = e_u^2 + e_v^2 + e_w^2 + (i_u + i_v + i_w)(k+1)^2. The last term is the square of the
  predicted neutral-leg current i_x = -(i_u + i_v + i_w), with a reference of zero.
* **6 units:** e_m = i*_m - i_m(k+1). The cost is g = e_u^2 + e_v^2 + e_w^2.

Both published schedules square the errors. The surrounding text, however, defines the cost as
the sum of |e_m|. The squares are used here because the schedules, and their state counts, need
them.

Multiplication truncates toward zero after the FRAC shift. Every adder and multiplier result
saturates. A saturated cost still compares correctly as "large", but ties are then likely. On a
tie, the lowest-numbered state wins.

## The schedules

This is the part to read before changing anything. Each row is one state of WL cycles:

* Units read their operands in the first cycle (`first`).
* They write their result at the clock edge that ends the state (`last`).
* A unit's result register keeps its value until that unit finishes another operation. A value
  can therefore be used in the next state, or later if the unit stays idle.
* Values needed further ahead are copied into REG1..REG3 at the end of a state.

The operations, their grouping into states and the use of REG1..REG3 follow the published
dataflow graphs. The assignment of operations to physical units is this design's own.

In the tables, `X.y` means the result register of unit X. `<-` means a register load at the
end of the state.

**`cost_datapath_4fu`** (ADD0, ADD1, MUL0, MUL1):

| state | ADD0 | ADD1 | MUL0 | MUL1 | registers |
|---|---|---|---|---|---|
| 0 | sx + su | sw + sx | iv * a | iu * a | |
| 1 | ADD0.y + sv (Σw) | ADD1.y + sv (Σu) | sv * b | su * b | REG3 <- sx+su, REG2 <- a·iv, REG1 <- a·iu |
| 2 | REG3 + sw (Σv) | REG1 + MUL1.y | ADD0.y * c | ADD1.y * c | REG1 <- b·sv |
| 3 | REG1 + REG2 | ADD1.y + MUL1.y = pred u | iw * a | ADD0.y * c | REG3 <- c·Σw |
| 4 | REG3 + MUL0.y | MUL1.y + ADD0.y = pred v | sw * b | ADD1.y * d | REG1 <- pred u |
| 5 | ADD0.y + MUL0.y = pred w | iur + MUL1.y = e_u | ADD1.y * d | – | REG2 <- pred v |
| 6 | ivr + MUL0.y = e_v | REG2 + REG1 | ADD0.y * d | e_u² | REG3 <- pred w |
| 7 | iwr + MUL0.y = e_w | REG3 + ADD1.y = Σpred | e_v² | – | REG1 <- e_u² |
| 8 | MUL0.y + REG1 | – | e_w² | Σpred² | |
| 9 | MUL0.y + ADD0.y | – | – | – | REG2 <- Σpred² |
| 10 | ADD0.y + REG2 = **g** | – | – | – | |

**`cost_datapath_6fu`**: unit k works on phase w, v, u for k = 0, 1, 2.

| state | adders | multipliers | registers |
|---|---|---|---|
| 0 | su+sv, su+sw, sw+sv | a·iw, a·iv, a·iu | |
| 1 | + sx | b·sw, b·sv, b·su | REG1..3 <- a·i |
| 2 | b·S + REGk | Σ · c | |
| 3 | + c-term = prediction | – | |
| 4 | i* - prediction = e | – | |
| 5 | – | e² | |
| 6 | e_v² + e_u² (ADD1) | – | |
| 7 | e_w² + ADD1.y = **g** (ADD0) | – | |

In both datapaths g is the result register of ADD0. It stays valid through state 0 of the next
candidate, which is when `cost_minimizer` reads it.

## Functional units

`serial_adder` handles one bit per cycle, least significant bit first. It has a carry flip-flop
and two operand shift registers. `sub` gives a - b (inverted b, carry-in 1). Overflow is
detected from the operand signs and saturates the result.

`serial_multiplier` is a radix-2 shift-add multiplier on operand magnitudes. It examines one bit
of |b| per cycle, builds a 2·WL-bit product, then shifts by FRAC, applies the sign and
saturates.

Both units take their operands only in the `first` cycle. This lets the datapath's operand
multiplexers change freely during the state. Both have an `en` input, so an idle unit keeps its
result.

## Control, handshake and timing

* **Starting a period.** Pulse `sample_start` while `busy` is low. In that cycle, `load` latches
  `i_meas` (i_u, i_v, i_w) and `i_ref` (the references for k+1). After that, the inputs may
  change.
* **The search.** `mpc_control_unit` runs candidates j = 0..15, with S(j) = j:
  bit 3 = Su, bit 2 = Sv, bit 1 = Sw, bit 0 = Sx. For each candidate it steps states 0..N-1,
  each WL cycles long. `busy` stays high for exactly CC cycles.
* **Cost reports.** One cycle after candidate j's last state, `cost_valid` pulses with
  `cost_idx = j` and the cost on `g`. `improved` is high when this cost becomes the new best.
* **The result.** After the 16th cost, `gate` takes the best state and `gate_n` its complement
  (for the lower switches; no dead time is inserted). `done` pulses
  CC + 2 cycles after the `sample_start` cycle. `j_op` shows the best candidate so far.
* **Throughput.** A new `sample_start` is accepted CC + 1 cycles after the previous one.
* **Overrun.** A `sample_start` that arrives while `busy` is high is ignored, and `overrun`
  pulses. This is the case where the sampling period is shorter than the computation. The
  reference on `i_ref` should be the one for the *next* sample, because the gates change
  roughly one period after the measurement.
* **Reset.** `rst_n` is asynchronous and active low. It clears every register. The gates reset
  to 0000 (all lower switches on).

## How far it can be trusted, and where it departs from the source

Verified:

* Every block has a self-checking testbench.
* The datapaths match an integer model of the cost, written from the equations rather than
  from the schedule, for all 16 candidates. This holds for realistic inputs and for random or
  saturating ones.
* The cycle counts match 16·N·WL exactly.
* In closed loop, with a behavioural model of the inverter (140 V, 6 mH, unbalanced loads of
  5 / 3.5 / 4 / 5 ohm) tracking 9 A at 50 Hz, the RMS tracking error was:

| WL | units | f_s (kHz) | RMS error (A) |
|---|---|---|---|
| 8  | 4 | 70.97 | 0.25 |
| 8  | 6 | 97.56 | 5.6 (does not track, see below) |
| 16 | 4 | 35.50 | 0.23 |
| 16 | 6 | 48.80 | 0.16 |
| 24 | 4 | 23.67 | 0.36 |
| 24 | 6 | 32.54 | 0.26 |
| 32 | 4 | 17.75 | 0.43 |
| 32 | 6 | 24.41 | 0.32 |

These sweep runs use FRAC = WL - 5 (a ±16 A range) and a reference that ramps up over 4 ms. At
WL = 8 this leaves 3 fractional bits. At 97.6 kHz the coupling coefficient c (about -0.06)
then rounds to zero, and the six-unit loop loses control. The source reports that 8-bit
operation works, but it does not state its number format, so this result says nothing about
the original design. At WL = 8, choose the current scaling with care.

Departures and own choices:

* **Cost function.** The costs are squared errors, as in the schedules, not the absolute errors
  given in the text. The 4-unit cost also carries the neutral-current term, because its
  schedule does.
* **Functional units.** The units are bit-serial so that a state takes exactly WL cycles. The
  source says only that a state takes "about" WL cycles. It gives no internal design for its
  adders and multipliers.
* **Number format.** The fixed-point format (FRAC), the truncation, the saturation and the
  subtraction in the 6-unit schedule are choices of this design.
* **Encoding and handshake.** The switch-state encoding, the tie rule, the reset state, the
  `sample_start`/`done`/`overrun` handshake and the two cycles of overhead per period are
  choices of this design.
* **STATE 0 of the 6-unit schedule.** The published graph labels its three adders incompletely.
  They are read here as the pairwise sums of the other legs of each phase.
* **Not built.** The inverter power stage, the current sensors and the A/D converters are not
  part of the RTL. The FPGA resource figures of the source (Cyclone IV slices) are not
  reproduced. Yosys coarse synthesis of `fsmpc_top` at WL = 32 gives about 2000 flip-flops for
  both controllers together.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_fsmpc_top -y rtl -y tb \
    rtl/fsmpc_pkg.sv tb/tb_fsmpc_ref_pkg.sv tb/tb_fsmpc_top.sv
obj_dir/Vtb_fsmpc_top
```

To run another test, replace `tb_fsmpc_top` with its name:

| testbench | what it runs | wall time |
|---|---|---|
| `tb_fsmpc_top` | both controllers at default parameters, one 20 ms mains period in closed loop, then a deliberate overrun. Checks every period's gates and latency, tracking error below 1 A, and that best-cost updates, gate changes and overruns all occur. | ~2 s |
| `tb_fsmpc_wordlength` | the WL = 8/16/24/32 sweep above, each case at its maximum sampling rate | ~6 s |
| `tb_fsmpc_controller` | random samples, every candidate cost and the latency, both architectures | <1 s |
| `tb_cost_datapath_4fu`, `tb_cost_datapath_6fu` | schedules against the cost model | <1 s |
| `tb_mpc_control_unit`, `tb_cost_minimizer`, `tb_serial_adder`, `tb_serial_multiplier` | unit tests | <1 s |

`tb/four_leg_inverter_model.sv` is the behavioural power stage. It integrates the leg currents
with forward Euler, from the leg voltages and the load-neutral voltage. `tb/tb_top_loop.sv` is
the closed-loop harness used by the sweep. `tb/tb_fsmpc_ref_pkg.sv` holds the integer reference
arithmetic.

## Changing it

* **Word length.** Set `WL` (and `FRAC`) on `fsmpc_top` or `fsmpc_controller`. All counters size
  themselves from WL.
* **Another schedule.** Write a datapath with the same ports. Add its state count to
  `fsmpc_pkg::states_for`, and select it in `fsmpc_controller`. The control unit works for up
  to 16 states.
* **Another cost.** Change the routing `case` of the datapath. Each row is one state, and the
  register loads sit in the same row.
