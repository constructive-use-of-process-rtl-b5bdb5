# Process-variation delay line: reconfigurable sub-picosecond delay generation

On silicon, no two nominally identical gates have the same delay. Most delay-line
designs fight that mismatch. This one uses it. Two chains of N 2:1 multiplexers,
a *top* and a *bottom* path, carry the same pulse. Each multiplexer has both data
inputs tied to the previous stage's output, so its select bit never changes the
logic value. It only changes which of the two physical channels the edge takes,
and the two channels differ slightly in delay because of process variation. With
2N select bits there are 2^(2N) ways to set the two paths. The difference between
the two path delays, `t_out`, lands on a fine, roughly Gaussian spread of values
around zero. Picking a select vector therefore picks a delay increment, with steps
far below one gate delay; the FPGA prototype reports about 0.1 ps.

This repository gives SystemVerilog for the delay line and for the measurement
structure built around it in the 16-stage FPGA prototype. That structure has two
feedback loops, two high-frequency counters, reset gates and the checking-bit
flip-flop. This code adds a controller and a host register file to run it.

## What is RTL and what is a model

The delay line exists for its *timing*, and RTL has no way to describe that. So
the design has two layers:

| layer | modules | nature |
|---|---|---|
| delay elements | `dl_stage`, `dl_path`, `delay_line_core` | behavioural models with `#` transport delays, 1 fs precision |
| LUT function of a stage | `lut6_mux` | synthesizable |
| checking-bit flip-flop | `arbiter_dff` | synthesizable |
| loop entry (mode MUX and reset gates) | `loop_input` | synthesizable |
| edge counter | `mp_counter` | synthesizable |
| sequencing | `meas_ctrl` | synthesizable |
| host registers | `host_regs` | synthesizable |
| top | `pv_delayline_top` | structural; simulate it with `--timing` |

On an FPGA each `dl_stage` is one LUT6 with its placement fixed by hand. Synthesis
would reduce the chain to a wire, so the delay modules are for simulation only.

### The process-variation stand-in

`dl_pkg::stage_delay_fs(seed, path, stage, sel, tune)` gives each stage of a
"fabricated" line fixed delays. A 32-bit hash of (seed, path, stage, channel)
draws each channel delay uniformly in 400 ps ± 15 ps. Each of the three tuning
bits adds 3 ps ± 1.5 ps, with a separate draw for each of its two values. All of
these numbers are assumptions of this model. With them, the 16-stage line spans
−115 ps to +129 ps over all 2^16 patterns, the same order as the prototype's
measured range (about ±210 ps). Changing `SEED`
gives a different chip.

## Choosing a delay: the additive model and the checking bit

A stage's delay is the delay of the selected channel plus that of its tuning path.
A path's delay is the sum over its stages:

    D_top = sum_i d_top,i(s_t[i], tune_t[i])      D_bot = sum_i d_bot,i(s_b[i], tune_b[i])

The models reproduce this sum exactly, to the femtosecond. This linearity is what
lets a linear classifier (an SVM, run on the host and not part of this RTL) learn,
from a few thousand (S, cb) pairs, which select vector gives which delay.

**The checking bit.** `out_t` drives the D input of `arbiter_dff` and `out_b` its
clock. When the bottom edge arrives, cb takes the level of the top output:

    cb = 1  when  t_out = arrival(out_b) - arrival(out_t) > 0   (top path faster)

Watch the sign. The additive formula and the counter formula below are written as
top minus bottom, the opposite sign. This code keeps the flip-flop wiring and the
definition above for cb, and uses top minus bottom wherever a count is involved.
An exact tie (both edges in the same femtosecond) leaves cb undefined. A real
flip-flop would go metastable, and the testbenches skip such ties.

## The fine-tuning bits

Each MUX is a LUT6 (`lut6_mux`), built as the LUT's binary mux tree. I0, I1 and I2
sit at the leaf levels and I5 selects at the output. The default truth table
(`dl_pkg::mux_lut_init`) is

    INIT[k] = k[2] ? k[1] : k[0]        for all 64 k

This makes I0 channel 0, I1 channel 1 and I2 the select, for every value of
I3..I5. The three upper inputs are the programmable "fine tuning" bits. They do
not change the function, but they steer the edge through a different branch of
the tree: the all-0 and all-1 settings use opposite halves of it. On silicon that
shifts the stage delay by a few picoseconds. The prototype uses these bits to
balance the line, so that cb is 1 for about half of all select vectors. The
assignment of I0..I2 and the bit order `tune[2:0] = {I5, I4, I3}` are choices made
here.

## Measuring t_out: loops and counters

A single t_out of a few picoseconds is too small to see directly. The measurement
structure (`pv_delayline_top`) turns each path into a ring oscillator and counts
how often the pulse goes round. Its parts:

- **`loop_input`**, one per path. A mode MUX picks either the launch pulse
  (`mux_sel = 1`) or the path's own output (`mux_sel = 0`). Reset gate 1 sits on
  the feedback wire and reset gate 2 after the MUX. Each forces its signal low
  while its reset is high.
- **`delay_line_core`**: the two paths and `arbiter_dff`.
- **`mp_counter`**, one per loop. It counts passes of the pulse (rising edges on
  `out_t` or `out_b`).
- **`meas_ctrl`**: sequences the operations described next.

**Checking-bit generation (mode 1).** The controller holds all resets high for
8 cycles and clears cb. It then opens the gates and drives a one-cycle (4 ns) pulse
through both paths, with the MUX on the pulse input. After waiting 8 cycles it
reports done. cb is then valid.

**Delay measuring (mode 0).** The launch works the same way. The clock edge that
ends the pulse also switches both MUXes to feedback, so the pulse, already inside
the path, keeps circulating. For this to work, one loop period must exceed the
pulse width: about 6.5 ns here against 4 ns. Both counters then run for
`WINDOW_CYCLES` = 2500 cycles, which is t_c = 10 µs at 250 MHz. After that the
reset gates kill the oscillation and the counts C1 (top) and C2 (bottom) are held.
The host then computes

    D_top - D_bot = t_c * (1/C1 - 1/C2)

Each count is exact to about one pass, so this estimate is good to roughly
`t_c/C1^2 + t_c/C2^2`. With this model (C ≈ 1530 in 10 µs) that is about 8.5 ps.
The testbenches check against that bound.

**The counter.** A 250 MHz clock cannot see edges 6 ns apart reliably, so
`mp_counter` samples the loop signal with four flip-flops, each clocked on both
edges of its own 250 MHz phase. With the phases 0.5 ns apart this gives eight
samples per 4 ns, an equivalent 2 GHz sampling clock. Each dual-edge flip-flop is
written as a rising-edge and a falling-edge register. At each rising edge of
`clk[0]`, the eight samples of the previous period are put in time order:
`clk[0..3]` rising, then `clk[0..3]` falling. The 0→1 steps between consecutive
samples are counted, including the step from the last sample of the period
before, and added to the count while `en` is high. The loop signal must stay high
and low for at least 0.5 ns each. How the samples become a count, and the 16-bit
width, are choices made here.

## Driving the top

Ports of `pv_delayline_top`:

- `clk[3:0]`: the four 250 MHz phases. `clk[k]` lags `clk[0]` by k × 0.5 ns, and
  `clk[0]` also clocks the control logic.
- `rst`: synchronous to `clk[0]`.
- A 32-bit host register port: `wr_en`, `wr_addr[7:0]` and `wdata` for writes,
  `rd_addr[7:0]` and `rdata` for combinational reads.
- `cb`, `done`, `out_t` and `out_b`, brought out for observation.

Register map (word addresses):

| address | register | content |
|---|---|---|
| 0x00 + k | S_t | top select bits [32k+31:32k] |
| 0x10 + k | S_b | bottom select bits |
| 0x20 + k | tune_t | stage i in bits [3i+2:3i]; bit 3i+j drives LUT input I(3+j) |
| 0x30 + k | tune_b | same for the bottom path |
| 0x40 | CTRL | bit 0 mode (1 checking bit, 0 measure); writing bit 1 = 1 starts an operation |
| 0x41 | STATUS | bit 0 busy, bit 1 done, bit 2 cb |
| 0x42 / 0x43 | C1 / C2 | loop counts |

A typical sequence: write S_t, S_b and the tuning words, write CTRL = 0x3 (or
0x2), poll STATUS until done = 1 and busy = 0, then read cb or C1 and C2. A
checking-bit operation takes 18 cycles from start to done. A measurement takes
2510 cycles.

Parameters: `N` = 16 stages, `SEED`, `CNT_W` = 16 and `WINDOW_CYCLES` = 2500 on
the top. `meas_ctrl` also has `RESET_CYCLES`, `PULSE_CYCLES` and `SETTLE_CYCLES`
(8, 1 and 8).

## Simulating

Every file uses `timeunit 1ns; timeprecision 1fs;`. Compile with the package first
and `--timing`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/dl_pkg.sv \
        tb/pv_delayline_top_tb.sv --top pv_delayline_top_tb
    ./obj_dir/Vpv_delayline_top_tb

Each testbench ends with `TB_RESULT checks=N failures=M`. Verilator warns that the
stage delay is not a static constant. It is computed per edge and is never zero.

| testbench | what it shows | run time |
|---|---|---|
| `lut6_mux_tb` | LUT is a 2:1 MUX for all I3..I5; tree order with a random table | < 1 s |
| `dl_stage_tb` | each stage delay equals channel plus tuning delay for all 16 settings | < 1 s |
| `dl_path_tb` | path delay equals the sum of stage delays | < 1 s |
| `arbiter_dff_tb` | cb for edge races down to 1 fs apart | < 1 s |
| `delay_line_core_tb` | cb and arrival times for 300 random settings | < 1 s |
| `loop_input_tb` | MUX and reset gates, exhaustive | < 1 s |
| `mp_counter_tb` | exact pass counts over random windows and random signals | < 1 s |
| `meas_ctrl_tb` | cycle-exact sequencing of both modes; start ignored while busy | < 1 s |
| `host_regs_tb` | register map, start pulse, status | < 1 s |
| `pv_delayline_top_tb` | end to end at default size: cb against the path delays; arrival times; C1 and C2 within one pass over the full 10 µs window; the t_c·(1/C1 − 1/C2) estimate; mode switches; loops silent after a measurement; tuning bits moving a path | about 1 s |
| `pv_sweep16_tb` | all 2^16 patterns (the same 16-bit S on both paths) in checking-bit mode, plus 8 full-window measurements | about 20 s |
| `pv_tune_tb` | host-side balancing with the tuning bits: a greedy search over the 96 bits on a 256-pattern training set, judged on 2048 other patterns | about 15 s |
| `pv_line64_tb` | 64-stage line, 50,000 random vectors | about 1 min |

Results with `SEED = 1` and no tuning: cb = 1 for 37,524 of the 65,536 patterns
(57%), with one exact tie. The smallest nonzero |t_out| is 0.003 ps. Measured
differences agree with the true path differences to within 3 ps. Tuning moves the
share of ones from 56.1% to 51.5% on the test set. At N = 64 (SEED = 5) the line
spans about −218 ps to +346 ps.

## Where this departs from the published design

- **Delays are modelled, not measured.** The absolute delays and their spread are
  assumptions. The numbers above say nothing about real silicon.
- **Balance.** The prototype tunes its line to 49.1% / 50.9% ones and zeros. This
  model chip gives 57% ones untuned. The balancing search is host software; it is
  shown only in a testbench (`pv_tune_tb`), which reaches 51.5%.
- **Select vector width.** Each path here has its own N select bits (2N in all).
  The prototype's "all 2^16 patterns" sweep is reproduced by putting the same
  16-bit vector on both paths.
- **Sign of t_out.** See the checking-bit section above.
- **Pulse source.** The controller generates the launch pulse. In the original,
  the pulse comes in from outside.
- **Loop injection.** The MUX is on the pulse input for the launch cycle and on
  feedback afterwards. The original does not spell out this step.
- **Counter.** How the samples are turned into a count, and the counter width,
  are choices made here. So are the controller, its timings and the host register
  map.
- **Size.** The prototype's auxiliary logic is very small: 27 LUTs and 15
  flip-flops for the loops, counters, reset gates and cb flip-flop. This version
  uses more, mainly for its binary count registers and the controller.
- **Not included.** The PCIe link and PC host, the FPGA clock manager that makes
  the four phases (the testbenches generate them), and the SVM model with its
  coefficient `coe` are outside this RTL.
- **Metastability.** A near-tie at `arbiter_dff` or at the counter's sampling
  flip-flops is not modelled; the simulation has two states only.
