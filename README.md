# TMC1004-style time memory: a 4-channel x 1024-cell, 1 ns/bit time-to-digital converter

This design records when an input rises, to the nanosecond, without a
gigahertz clock. It does not time events with a counter. It stores the
input itself in a memory that is written one cell per nanosecond. A row of
32 static memory cells has a write pulse rippling along it through 32
delay elements, so each cell latches the input about 1 ns after its
neighbour. One row therefore holds one 32 ns clock period of input history.
The next clock edge starts the next row. Four arrays of 32 rows hold
1.024 us per channel. After the fact, a hit's time is the row's start time
plus the index of the first cell that saw the input high.

Two problems make this work, and most of the design is about them:

* **Keeping 1 ns = 1 cell.** A CMOS gate's delay drifts by tens of percent
  with process, supply and temperature. Each array has a feedback loop
  that locks the delay of 32 elements to one period of the external
  31.25 MHz clock. The time scale is then set by the crystal, not by the
  silicon.
* **Reading while writing.** Two pointers walk the rows at the same rate,
  so the memory is a ring buffer. The Write Pointer picks the row being
  recorded. The Read Pointer trails it by the trigger latency and picks
  the row being read out. Every cell is dual-ported, so a trigger never
  stops recording and readout causes no dead time.

## How a hit becomes a number

Row `r` starts at a rising `clk` edge at time `T`. Cell `c` latches the input at
`T + (c + 1/2) * tap`, where `tap` is the locked element delay of 1 ns. The
half-element lead-in keeps every sampling point off the clock edge. When
the row is read, `tmc_encoder` compresses its 32 bits to 6:

```
code[5]   = cell 0 value
code[4:0] = index i of the cell where cell i-1 is 0 and cell i is 1 (0 if none)
```

Only one rising edge can fall inside a row, because inputs are at least 32 ns
apart and only rising edges matter. The detector is an AND gate per cell
boundary, and the position is formed as a wired-OR of the detector
outputs. Two rising edges in one row therefore give the OR of their positions.

To get the hit time from the DOUT stream:

* `code[4:0] != 0`: the hit is at `T + code[4:0]` ns. This is within ±0.5 ns
  plus the loop's residual error.
* `code[4:0] == 0`, `code[5] == 1`, and the previous row of the channel read
  as all-zero (`code == 0`): the rise happened at the row boundary, and the
  hit is at `T + 0`. This case is why cell 0's value is carried in the code.
* `code == 6'h20` after a row with a rise: the input is still high.

In the linearity test below, the recovered times follow the true delays
with a slope of 1.000 bit/ns. The RMS error is 0.29–0.34 ns and the
largest error is 0.81 ns.

## The delay-locking loop (`tmc_feedback`, `tmc_delay_line`)

Each array has one more row of delay elements, the reference row. It gets
the same control voltage `Vg` as the cells. Every clock period the loop
compares the time a pulse takes to cross the reference row with the clock
period:

* If the row is faster than the period by more than the comparator
  window of ±0.5 ns, `Vg` rises one 20 mV step. This slows every element
  by about 10 ps, and the row by 0.32 ns.
* If the row is slower by more than the window, `Vg` falls one step.
* Inside the window, `Vg` holds.

`Vg` is clamped to 1.2–2.3 V. After lock, 32 elements are within ±0.5 ns of the
period, so the element is within ±16 ps of period/32. The error grows along
a row and is largest at cell 31, at about 0.5 ns. The next row starts fresh
from a clock edge. From the 1.75 V start value, a 20 % process spread
locks in about 20 clocks.

The analog circuit is two ramp capacitors, a comparator and a hold
capacitor on `Vg`. Both modules are **behavioural models**, not logic: they use `#`
delays and a `real` `Vg`, and they are for simulation only. The delay law is an
assumption of this model:
`tap_ns = PVT + 0.5 ns/V * (Vg - 1.75 V)`, in `tmc_pkg::tap_delay_ns`. The
0.5 ns/V slope follows from "20 mV ≈ 10 ps per cell". `PVT` is the
uncontrolled delay factor; it is a parameter per array (`PVT0..PVT3` on the top).
The range 1.2–2.3 V covers ±27 % of spread. The model compares at the
rising clock edge, where the original circuit uses the falling edge.

## Ring buffer, pointers and channel modes (`tmc_pointer`)

Both pointers are 7-bit counters. They increment on every `clk` edge and can
be loaded through the CSRs. The low 5 bits drive a one-hot row decoder.
The upper bits choose the array when arrays are chained:

| mode (CSR#0[1:0]) | channels | arrays per channel | pointer bits used | depth |
|---|---|---|---|---|
| 0 `MODE_4CH`  | 4 | 1 (array a = channel a) | [4:0] | 32 rows = 1.024 us |
| 1 `MODE_2CH`  | 2 | arrays 0,1 → ch 0 (`tin[0]`), 2,3 → ch 1 (`tin[1]`); `ptr[5]` picks | [5:0] | 2.048 us |
| 2 `MODE_1CH`  | 1 | all four (`tin[0]`); `ptr[6:5]` picks | [6:0] | 4.096 us |
| 3 `MODE_HOLD` | – | pointers and recording stop (cell test) | – | – |

The trigger latency is `(WP - RP) mod depth` rows. A row started at edge `k` is
stored at edge `k+1`. The Read Pointer must therefore trail by at least 2 rows
to see the newest row; a distance of 1 reads the row from one full ring earlier.
The mode a row was started with also fixes that row's input routing, so a
mode change never splits a row between two channels.

## Readout pipeline (`tmc_readout`)

While `ds_n` (DS*) is low, each clock moves one row out, the same rate at
which rows are written:

1. At edge `m`, every array that feeds a channel latches the Read
   Pointer's row into its sense-amp register (`tmc_array` `rd_en`). The
   sense amps are enabled only then.
2. At edge `m+1`, each channel's row is selected by mode and `rp[6:5]`,
   encoded, and registered on `dout[c]`. `dvalid` rises with it.

DS* sampled low at edge `m` gives valid data after edge `m+2`. DOUT holds its value while
DS* is high. Channels unused in 2- and 1-channel mode read 0.

## Control registers and the serial port (`tmc_csr`)

| CSR | bits | meaning |
|---|---|---|
| 0 | [1:0] mode, [5:2] one cell of each array 0..3 | mode; serial cell access |
| 1 | [6:0] | Read Pointer (read / load) |
| 2 | [6:0] | Write Pointer (read / load) |

A frame is clocked by `clk`. It starts when CS* goes low. On successive rising edges the chip
takes, from CIO and least significant bit first: a read flag (1 = read), two address bits,
and seven data bits. A write takes effect at the edge that takes the last
bit. For a read, the register is copied at the edge that takes the second
address bit, and its bits are driven on CIO during the next seven clocks. The
pin is split into `cio_in`, `cio_out` and `cio_oe`. Raising CS* aborts a frame.

Serial cell access: CSR#0 bits [5:2] are the cells at row `RP[4:0]`, column
`col` of the four arrays. A CSR#0 write stores them, and a read returns them.
Every CSR#0 frame then advances `col`. To test the cells, enter `MODE_HOLD`,
load the Read Pointer with the row, and walk 32 frames. A CSR#0
write in a recording mode, such as a mode change, also writes those four
cells. This is harmless, because recording overwrites every row within one ring.
The mode field is loaded from `mode_pins` at reset.

## Files

| file | kind | what |
|---|---|---|
| `rtl/tmc_pkg.sv` | package | sizes, `mode_e`, CSR addresses, array/channel decode, delay law |
| `rtl/tmc1004.sv` | top | the chip: 4 × (delay line, feedback, array), 2 pointers, readout, CSR |
| `rtl/tmc_array.sv` | RTL | 32 × 32 dual-port cells: row write, registered row read, cell test port |
| `rtl/tmc_pointer.sv` | RTL | 7-bit counter, row and array decoders |
| `rtl/tmc_encoder.sv` | RTL | 32 → 6 bit row encoder |
| `rtl/tmc_readout.sv` | RTL | channel select, encoders, DOUT register |
| `rtl/tmc_csr.sv` | RTL | CSRs and the CS*/CIO port |
| `rtl/tmc_delay_line.sv` | model | a row's write line: samples `tin` every `tap` ns |
| `rtl/tmc_feedback.sv` | model | delay-locking loop producing `Vg` |

The synthesizable part is everything except the two models. In a real chip
the delay line and the loop are custom analog cells. In an FPGA or
standard-cell flow they would have to be replaced, for example by a
tapped delay line or a multiphase sampler, because RTL cannot express them.
For that reason the top module simulates but does not synthesize as it stands.

## Where this design departs from the source, or fills gaps

* The transistor-level cell, the sense amplifiers and the pads are not
  modelled as circuits. Their logic effect is the storage and ports of
  `tmc_array`. The input is single-ended; the cells' TIN/TIN* pair is one
  signal here.
* The following are this design's choices: the CSR frame format; the reading
  of "four bits provide serial access" as one bit per array with a column
  counter; the `MODE_HOLD` code; and loading the mode from pins at reset.
  The source says both that pins set the mode and that CSR#0 holds it.
* `dvalid`, the output channel numbering, and the input routing in 2- and
  1-channel modes are also choices.
* All logic uses the rising clock edge. The original feedback circuit
  starts on the falling edge.
* Power management, the power figures and radiation tolerance are out
  of scope.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_tmc_encoder`: all rise positions, fall-then-rise rows, wired-OR.
* `tb_tmc_pointer`: counting, loads, decoders in all modes.
* `tb_tmc_array`: row/cell writes and reads against a shadow copy.
* `tb_tmc_readout`: pipeline latency and channel mapping under random
  mode, pointer and DS*.
* `tb_tmc_csr`: host side of the serial port.
* `tb_tmc_delay_line`: latched words for several tap delays.
* `tb_tmc_feedback`: step size, lock from ±18 % corners, relock after a
  clock change, clamping.
* `tb_tmc1004`: end to end at the default size. It uses random pulse trains on four
  inputs and a model of pointers and rows, so every row read out is
  rebuilt from the input waveform and compared. It goes through 4/2/1-channel modes,
  HOLD with serial cell writes and reads, pointer loads and reads, and a
  30 ns → 32 ns clock change that makes the loops step both ways. It also
  counts each mechanism.
* `tb_tmc1004_linearity`: a sweep of 1672 hit delays in 0.61 ns steps over
  the full 1.024 us depth. The four arrays are set 18 % fast, typical,
  18 % slow and 10 % slow. It checks slope 1.000 ± 0.001 bit/ns, RMS error
  ≤ 0.52 ns, maximum error ≤ 1.5 ns and a row-to-row step < 0.5 ns per
  channel. Across channels, it checks that the same hit differs by ≤ 1 ns
  between arrays and that the slopes of the four corners agree within 0.1 %.
  Typical results: slopes within 2·10⁻⁵ of 1, RMS 0.29–0.34 ns, maximum
  0.81 ns, row-to-row step ±0.28 ns.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tmc_pkg.sv tb/tb_tmc1004.sv --top-module tb_tmc1004
./obj_dir/Vtb_tmc1004
```

`--timing` is needed for the behavioural models' delays. Every file uses
`timescale 1ns/1ps`. The sizes are parameters: `ROWS` and `COLS` on the top and the
arrays, and the constants in `tmc_pkg`. The channel-mode decode in
`tmc_pkg::array_select` assumes four arrays and a 7-bit pointer.
