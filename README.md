# Scanners for watching analog VLSI arrays

An analog chip with a large array of cells (a silicon retina, a cochlea
model) has many more interesting nodes than pins. A *scanner* multiplexes
the cells one at a time onto a single output line, so that a one-dimensional
array can be watched on an oscilloscope and a two-dimensional array on an
ordinary multiscanning computer monitor. This RTL describes such scanners:
the digital part (shift registers that walk a single selected bit across
the array and generate their own sync and blank signals) as synthesizable
SystemVerilog, and the analog parts (current switches, current-sense
amplifiers, video driver, row bias, crystal oscillator) as small behavioural
models with integer units, so the whole chain from pixel current to monitor
level can be simulated.

Two designs are included and stand side by side in `scanner_top`:

* `video_scanner`: a 2-D video scanner, by default for a 43-column,
  68-row array with every row repeated on six video lines (408 displayed
  lines), clocked at 1.8 MHz;
* `scope_scanner`: a 1-D scanner of 50 pixels for an oscilloscope.

## The selected bit

Every scanner is built around `scan_register`: a chain of `csrl_stage`
stages in which exactly one stage normally holds a *selected* bit. Each
clock the bit moves one stage on; the stage holding it connects its pixel
(or column, or row) to the output.

Nothing loads the bit from outside. A wired-NAND line (`wired_nand_line`)
spans all stages and is high whenever any stage holds the bit. While it is
high, empty bits are shifted in at the start. When the bit drops off the
end the line falls, and on the next clock a new bit enters stage 0. So:

* a scan of N stages takes **N+1 clocks**; in the extra clock no stage is
  selected;
* the line's low clock is a ready-made sync pulse (the oscilloscope trigger
  of `scope_scanner`);
* the register needs no reset: if several bits are present at power-up, no
  new bit is loaded until they have all left, and from then on it runs with
  one bit. A synchronous `rst` exists anyway and clears every stage.

Bits are stored active-high (1 = selected). In the transistor circuit the
selected bit is a low level and the stage outputs are complementary; only
the polarity differs.

### Two half-phases per stage

The original stage is a static single-phase shift-register cell made of two
cross-coupled inverter pairs: the first is loaded while the clock is high,
the second while it is low. `csrl_stage` keeps both halves visible:

| output      | flop edge | meaning                                  |
|-------------|-----------|------------------------------------------|
| `q_first`   | rising    | first half-phase: the bit arrives here first |
| `q`         | falling   | stage output, half a clock later         |

All selects, sync and blank signals are taken from the stage outputs and
therefore change just after the **falling** clock edge. Sample them at the
rising edge. `en` low stops the scan (the first half stops loading) to hold
one pixel on the output.

## Video timing from the shift registers

A monitor needs horizontal and vertical sync, and the video must be blanked
during retrace. `axis_scanner` extends the scan register past its display
stages by a blank section and reads it with three more wired-NAND lines:

* **display line** over the display stages; `blank` is its inverse, so
  blank covers the blank section and the empty clock;
* **sync line** over stages `SYNC_FIRST..SYNC_LAST` of the blank section
  (counted from 1), near the start of blank;
* **odd line** over display stages 1, 3, 5, … (used for hexagonal arrays).

`video_scanner` uses two of them:

```
crystal_oscillator ─clk─► horizontal axis_scanner (COLS + H_BLANK stages) ─► col_sel, hsync, hblank
                                     │ hsync (start of pulse)
                                     ▼
                          johnson_counter (JC_STAGES)   last stage rises every 2*JC_STAGES lines
                                     │
                                     ▼
                          vertical axis_scanner (ROWS + V_BLANK stages) ─► row_sel, vsync, vblank, odd_row
```

A small pixel array has far fewer rows than a monitor frame needs lines, so
each row is repeated. The Johnson counter advances once per horizontal sync
pulse. It walks 2N states (for N = 3: 000, 100, 110, 111, 011, 001), and
its last stage advances the vertical scanner once per 2N lines. In the
circuit, hsync clocks the counter and the counter's last stage clocks the
vertical register. Here everything runs on the one main clock: the counter
steps on the clock where hsync begins, and the vertical register is enabled
on the step where the counter's last stage rises. Rows therefore change at
the start of horizontal sync, inside horizontal blank.

Timing at the default parameters (1.8 MHz clock):

| quantity                 | value                               |
|--------------------------|-------------------------------------|
| clocks per line          | 43 + 11 + 1 = 55                    |
| hsync                    | 3 clocks, starting 1 clock into blank |
| hblank                   | 12 clocks = 27.9 % of display       |
| lines per row            | 2 × 3 = 6                           |
| lines per frame          | (68 + 10 + 1) × 6 = 474, 408 displayed |
| vsync / vblank           | 12 / 66 lines (vblank 16.2 % of display) |
| frame rate               | 1.8 MHz / 26070 clocks = 69.0 Hz    |

These figures satisfy the usual multiscan monitor window: 200–700 lines,
60 ± 15 Hz vertical, horizontal blank 33 ± 7 % and vertical blank
20 ± 10 % of the display time. The blank section sizes (11 horizontal
stages with sync on 2–4, 10 vertical stages with sync on 2–3) come from a
published 50 × 50 layout and are used here with the 43 × 68 array, whose own
blank sizes are not known. A chip with the same array is reported to run at
60 Hz at 1.8 MHz, so its blank sections must be longer than these. Frame
rate stays within 60 ± 15 Hz for clocks of 1.17–1.96 MHz. For other arrays,
change `COLS`, `ROWS`, `JC_STAGES`, `H_BLANK` and `V_BLANK` and
re-check the window: a 50 × 50 array with the same blank sections gives a
24 % horizontal blank, just under the lower limit.

## Hexagonal arrays

In a hexagonal layout every other row is offset by half a pixel. To put it
on screen correctly, those rows must be scanned half a clock earlier. With
`HEX_ARRAY = 1`, `hex_phase_select` drives the column switches from the
first half-phase of each horizontal stage while the vertical scanner's odd
line is high (rows 1, 3, 5, … counted from the top), and from the stage
outputs on even rows. The option is off by default.

## Analog parts as models

The analog blocks are behavioural. Each is kept to the transfer function
that matters for the picture and carries its quantities as signed 32-bit
integers: **currents in pA, voltages in µV** (`scanner_pkg`). This keeps
them readable by synthesis front ends that reject `real`. None of them
models settling, noise or charge injection.

| module              | models                                   | law |
|---------------------|-------------------------------------------|-----|
| `scan_switch_array` | complementary pass gates per pixel/column | selected currents → scan wire, the rest → reference wire |
| `current_sense_amp` | feedback amplifier holding the scan wire at Vref | `SENSE_LINEAR`: Vref + I·R; `SENSE_LOG` (below threshold): (Vref + UT·ln(I/I0))/κ; `SENSE_SQRT` (above threshold): (Vref + VT + √(I/I0′))/κ |
| `video_driver`      | follower, output transistor, off-chip amplifier, blanking FETs | blank → `V_BLANK_UV`; otherwise black + (±)gain·(Vsense − ref), clamped to 1 V |
| `row_bias_driver`   | row pass gates for transconductance-amplifier pixels | selected row gets Vb, others 0 V |
| `crystal_oscillator`| three-inverter crystal oscillator         | square wave of `PERIOD_PS`, not synthesizable |

The scope scanner uses the linear (off-chip opamp) sense amplifier; the
video scanner uses the logarithmic on-chip one. In log mode the logarithm is
a leading-one position plus linear interpolation (error under 0.09 in log2,
about 2 mV at the output), and currents at or below I0 read as ln = 0.
Gains, references and levels of the sense amplifier and video driver are
the model's defaults. On a real board, resistors and potentiometers set
them.

Leaving out the sense amplifier's dynamics is safe at the default clock.
The feedback speeds up the scan wire by κA, about 25 for an amplifier gain
of about 40. For a 1 pF line carrying tens of nA, the open-loop time
constant is below 1 µs, so the output settles with a time constant of about
40 ns. One pixel lasts 555 ns at 1.8 MHz. At very small pixel currents, or
with clocks approaching the video driver's bandwidth (several MHz), this no
longer holds, and the model will look better than silicon.

The pixel array is not part of the scanner. `video_scanner` expects the
array to answer the row select with the currents of the selected row on
`col_current_pa`. The select comes in both polarities: `row_sel` is high on
the selected row and `row_sel_n` is low on it. A pixel uses whichever its
select switch needs. The testbenches model it as a table.

## Modules

| module              | role |
|---------------------|------|
| `scanner_top`       | both scanners; oscillator clock brought out as `clk_out` |
| `video_scanner`     | 2-D scanner: axis scanners, Johnson counter, hex select, column switches, log sense amp, video driver, row bias |
| `scope_scanner`     | 1-D scanner: scan register, switches, linear sense amp, sync |
| `axis_scanner`      | scan register + display/blank, sync and odd lines |
| `scan_register`     | self-initializing single-bit shift register |
| `csrl_stage`        | one stage, two half-phases |
| `wired_nand_line`   | OR over a range (optionally strided) of stages |
| `johnson_counter`   | line counter, vertical-advance strobe |
| `hex_phase_select`  | half-phase choice per column |
| `scanner_pkg`       | units, sense-amplifier mode enum, constants |

Main parameters of `scanner_top`: `COLS` (43), `ROWS` (68), `JC_STAGES`
(3, i.e. 6 lines per row), `H_BLANK` (11), `V_BLANK` (10), `HEX_ARRAY` (0),
`CHANNELS` (1), `SCOPE_PIXELS` (50), `CLK_PERIOD_PS` (555556, 1.8 MHz).
Sync positions are parameters of `video_scanner`.

## Choices made in this RTL

Where the circuit gave no answer, or where a transistor-level trick does not
map directly onto RTL, this design chose as follows:

* The two inverter pairs of a stage are a rising-edge and a falling-edge
  flop. Clock stopping is an enable.
* The hsync-clocked counter and the counter-clocked vertical register are
  replaced by strobes in one clock domain. The vertical register advances on
  the rising edge of the counter's last stage.
* Synchronous resets were added. The scan registers do not need them. The
  Johnson counter does, because with three or more stages it has a parasitic
  loop it could otherwise power up in.
* Inside the scanners, sync and blank are active high, like the level of
  their wired-NAND lines. At the top, the sync pins `hsync_n` and `vsync_n`
  pass through output inverters and are active low, because monitors trigger
  on the falling sync edge. The blank signals stay active high, since they
  switch on the pull-down blanking transistors.
* `CHANNELS` (default 1) sets how many signals per pixel are scanned out.
  Each channel has its own column switches, sense amplifier and video driver
  and can drive one colour. All channels share the selects and the blank
  signals, and each driver blanks its own output. With one channel, the same
  video level goes to all three colour inputs for a white picture.
* Display stages come first in the shift direction, then the blank section.
  The empty clock counts as blank.
* The 1-D scanner size (50) is a default, not a published number.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv rtl/scanner_pkg.sv tb/tb_scanner_top.sv \
  --top-module tb_scanner_top -o sim
./obj_dir/sim
```

Replace `tb_scanner_top` with any other testbench. The main ones:

* `tb_scanner_top` runs both scanners at their default sizes. It covers two
  full video frames (checked column by column, row by row and against the
  monitor window), a scan stop, and 1-D scans with random clock stops.
  It prints the measured frame timing.
* `tb_video_scanner` uses a 5 × 4 array, with a hexagonal copy and a
  two-channel copy. Reference models of column, line and row position check
  every output on every clock.
* `tb_workload_50x50` sizes the video scanner for a 50 × 50 array and
  reports its timing.
* The remaining `tb_<module>` testbenches check one module each.

The register outputs change on the falling edge, so testbenches sample
after it (or at the next rising edge).
