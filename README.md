# Temporal pixel multiplexing (TPM) sensor control

A TPM image sensor films very fast events with a normal-speed analog readout. It gives
up spatial resolution to get the extra time resolution. The 1024 x 1024 pixel array is
tiled with a small grid, for example 4 x 4. Each position of the grid, called a pixel
group, is exposed in its own short time slot. Each pixel keeps its sample on an in-pixel
capacitor. When every group has been exposed, the full frame is read out once and then
split into `MASK_X * MASK_Y` lower-resolution sub-frames, one per time slot. A 4 x 4
grid therefore turns one 1024 x 1024 frame into a 16-frame movie of 256 x 256 pixels.
The grid size sets the trade-off, so the number of sub-frames can be configured.

This RTL is the digital part of such a sensor:

* the line registers that drive the pixel control lines (RST, WRITEY, WRITEX, BIASON);
* the row-select counter/decoder used for readout;
* a frame sequencer that makes the register waveforms;
* a behavioural (analog, non-synthesizable) model of the 8-transistor pixel.

The pixel array, column readout, output amplifiers, bias generator and level drivers are
analog and are not part of the RTL. The top level brings every row and column line out as
a port, ready for them.

## How crossing lines expose one pixel group at a time

Each pixel has two write switches in series, WRITEX (shared by its column) and WRITEY
(shared by its row). Each pixel also has a reset switch, RST, shared by its row. A pixel
integrates light while its row's RST is low. Its storage capacitor follows the photodiode
only while its column's WRITEX and BIASON are high and its row's WRITEY is high. When the
write path opens, the capacitor holds the last value. So a pixel samples its exposure
only where an active row crosses an active column.

Four line registers hold periodic patterns:

| register | lines   | pattern (period)            | steps                  |
|----------|---------|-----------------------------|------------------------|
| WRTY     | rows    | `1 0 .. 0` (MASK_Y)          | one row per phase      |
| RST      | rows    | `0 1 .. 1` (MASK_Y)          | one row per phase      |
| WRTX     | columns | `1 0 .. 0` (MASK_X)          | one column every MASK_Y phases |
| BIASON   | columns | same as WRTX                | same as WRTX           |

For the 4 x 4 grid the patterns are `1000` and `0111`, and the column registers step 4
times more slowly than the row registers. In phase `p`:

* the rows with `y mod MASK_Y == p mod MASK_Y` are out of reset and have WRITEY high;
* the columns with `x mod MASK_X == p div MASK_Y` have WRITEX and BIASON high.

Pixel `(x, y)` therefore belongs to group `g = MASK_Y*(x mod MASK_X) + (y mod MASK_Y)`,
and it is written only in phase `g`. For 4 x 4, group 0 is at `[0;0]`, group 1 at `[0;1]`
and group 4 at `[1;0]`. Phases 0..15 expose groups 0..15 in that order. A pixel's
photodiode leaves reset at the start of its phase, because its row was in reset in the
previous phase. Its stored value is the photodiode voltage at the end of the WRITEY pulse.
Every group therefore gets the same exposure, `wr_end` cycles.

Rows in the active row group but in inactive columns also integrate during the phase.
They are not written, and their rows are reset again at the next phase. BIASON powers
each pixel's first source follower only in the active columns.

The one-row-per-phase move is a plain shift: line `i` takes line `i-1`, and line 0 takes
the serial input. To make line `i` hold `(i mod M == 0)` after loading, the serial stream
carries bit `((LINES-1-t) mod M == 0)` at shift `t`. After loading, the same formula with
`t` counting on gives the bit that keeps the pattern periodic as it moves up. The
sequencer keeps this as a down-counter modulo M, one for rows and one for columns. So
masks that do not divide 1024, such as 3 x 5, also work.

## Line registers (`tpm_line_register`)

Each of the Reset, Write Y, Write X and Bias On blocks is a serial shift register followed
by a parallel latch and an output enable:

* `sr_clkin`: the register shifts on the falling edge, taking `sr_din` into line 0;
* `pl_clk`: the latch copies the whole register on the rising edge, so all 1024 lines
  change at once and shifting never disturbs the pixels;
* `enable` is ANDed into every line. The sequencer uses it to cut the short WRITEY
  pulse out of each phase;
* `sr_rst` and `pl_rst` are asynchronous, active-high clears.

These six signals travel together as `tpm_pkg::reg_ctrl_t`.

**Split drive.** A 1024-pixel line is long, so every control line is cut in the middle of
the array and driven from both ends. Each block has two full copies, left/right for row
lines and top/bottom for column lines, with identical control inputs. `tpm_sensor` holds
them:

* `rst_l`, `writey_l` and `select_l` drive columns 0..511 of a row;
* `rst_r`, `writey_r` and `select_r` drive columns 512..1023;
* `writex_b` and `biason_b` drive rows 0..511 of a column;
* `writex_t` and `biason_t` drive rows 512..1023.

The Bias On registers get the WRTX controls, because they carry the same pattern on the
same clock.

## Row readout (`tpm_read_block`)

A 10-bit counter and a one-of-1024 decoder drive the SELECT lines:

* `rd_rst` clears it to row 0;
* each rising `rd_clk` moves to the next row, wrapping after the last;
* while `rd_enable` is high, exactly one SELECT line is high.

It is placed on both sides, like the other row blocks.

## Frame sequencer (`tpm_sequencer`)

The sequencer is a state machine clocked by `clk`. Every control output comes from a
flop, so the register clocks it makes are free of glitches. The configuration is taken
on `start`:

| input               | meaning                                          | legal         |
|---------------------|--------------------------------------------------|---------------|
| `mask_x`, `mask_y`  | grid size                                        | 1..MAX_MASK (16); `mask_y = 1` only with `mask_x = 1` |
| `t_phase`           | cycles per exposure phase                        | >= 3          |
| `wr_start`, `wr_end`| WRITEY pulse, cycles `[wr_start, wr_end)` of a phase | `wr_start <= wr_end <= t_phase` |
| `t_row`             | cycles each row stays selected in readout        | >= 2          |
| `continuous`        | start the next frame straight after this one     |               |

An assertion checks these limits. A single row group (`mask_y = 1`) is refused when there
are several column groups: RST is the only reset, so those groups would share one
integration start.

A frame runs through these states:

1. **CLEAR** (1 cycle): clears all shift registers, latches and row counters.
2. **PRESET** (2*LINES cycles): shifts ones into RST. The ones are latched, with RST
   enabled, in the first LOAD cycle, so every photodiode stays in reset while the
   patterns load.
3. **LOAD** (2*LINES cycles): shifts the WRTY, RST and WRTX/BIASON patterns in.
4. **EXPOSE** (`MASK_X*MASK_Y*t_phase` cycles), phase by phase:
   * cycle 0: `pl_clk` latches the row patterns, and every MASK_Y phases the column
     patterns too;
   * cycles `[wr_start, wr_end)`: WRTY `enable` is high;
   * cycle `t_phase-2`: `sr_clkin` goes high; it falls going into `t_phase-1`,
     shifting in the next pattern bit.

   RST and WRTX stay enabled through the exposure. `subframe` tells which group is being
   exposed.
5. **RD_CLR** and **READ** (`1 + LINES*t_row` cycles): all line registers are disabled,
   so the storage nodes are isolated. Rows 0..1023 are then selected in order.
6. **DONE**: `frame_done` pulses, and the sequencer goes idle or restarts.

`frame_done` rises `3 + 4*LINES + MASK_X*MASK_Y*t_phase + LINES*t_row` clock cycles after
the edge that takes `start`.

Exposure speed: a phase is `t_phase` clock cycles. 100 ns phases (10 million sub-frames
per second) need a clock of at least 30 MHz with `t_phase = 3`. More cycles per phase give
finer control over where the WRITEY pulse sits.

## Pixel model (`tpm_pixel`)

A real-valued behavioural model of the 8T pixel, with these parts:

* a photodiode, reset to `VRESET` (2.0 V) by RST;
* integration at 17 uV per electron from `photo_rate` (electrons/ns), saturating at
  52.5 ke-;
* a storage node that follows the photodiode while BIASON, WRITEX and WRITEY are all
  high;
* a SELECT switch onto the column output.

The source followers are ideal unity buffers. Noise and leakage are not modelled. It is
not synthesizable, so the synthesizable top does not instantiate it. The end-to-end
testbench uses it to check the control timing against the analog behaviour.

## Where this design makes its own choices

These points are not fixed by the sensor description this RTL follows, and were chosen
here:

* the rising edge of `pl_clk` and of `rd_clk`; active-high asynchronous clears; enable
  implemented as an AND;
* which copy of a split line drives which half of the array;
* the whole sequencer: the cycle positions inside a phase, the load procedure, the RST
  preset, the readout timing and the enables during readout. Only the order of events
  (shift, then latch, with a write pulse inside each phase) and the patterns come from
  the sensor's timing description;
* the grid-size limit (16) and the generalisation from square masks to `MASK_X x MASK_Y`;
* the pixel's reset level and ideal source followers.

Not modelled: the analog level drivers (logically buffers), column readout and output
amplifiers, the number of analog outputs and column scanning, and the bias generator. So
the figures for readout speed (10 MS/s per output) and readout frame rate (300 frames per
second) are not reproduced.

## Files

| file | contents |
|------|----------|
| `rtl/tpm_pkg.sv` | `reg_ctrl_t`, `rd_ctrl_t`, array size, counter width |
| `rtl/tpm_line_register.sv` | shift register + latch + enable (one block copy) |
| `rtl/tpm_read_block.sv` | row counter + SELECT decoder |
| `rtl/tpm_sensor.sv` | all split-drive copies of the four line-register blocks and the read block |
| `rtl/tpm_sequencer.sv` | frame state machine |
| `rtl/tpm_system.sv` | top: sequencer + sensor periphery |
| `rtl/tpm_pixel.sv` | behavioural pixel model |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus the end-to-end test |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Every one has a
watchdog. With Verilator 5:

```sh
# end-to-end, full 1024 x 1024 size: 4x4, 2x2 and 3x5 (two back-to-back) frames
verilator --binary --timing --assert -Irtl rtl/tpm_pkg.sv rtl/tpm_line_register.sv \
  rtl/tpm_read_block.sv rtl/tpm_sequencer.sv rtl/tpm_sensor.sv rtl/tpm_system.sv \
  rtl/tpm_pixel.sv tb/tb_tpm_system.sv --top tb_tpm_system -o sim && ./obj_dir/sim

# single blocks
verilator --binary --timing --assert rtl/tpm_pkg.sv rtl/tpm_sequencer.sv tb/tb_tpm_sequencer.sv --top tb_tpm_sequencer
verilator --binary --timing --assert rtl/tpm_pkg.sv rtl/tpm_line_register.sv tb/tb_tpm_line_register.sv --top tb_tpm_line_register
verilator --binary --timing --assert rtl/tpm_pkg.sv rtl/tpm_read_block.sv tb/tb_tpm_read_block.sv --top tb_tpm_read_block
verilator --binary --timing --assert rtl/tpm_pixel.sv tb/tb_tpm_pixel.sv --top tb_tpm_pixel
```

`tb_tpm_system` places a behavioural model of the whole pixel array on the line ports.
For every pixel it records when the photodiode left reset and when the storage node was
written. The readout puts that timestamp where the stored voltage would be. The test
checks these points:

* every pixel is exposed in its own group's phase, for the same time;
* the read-out frame splits into exactly `MASK_X*MASK_Y` sub-frames of the right size;
* both copies of every split line agree;
* the frame takes the cycle count given above.

It also places a 12 x 12 window of `tpm_pixel` models on the lines, at the array corner
and across the middle split. The light brightens from phase to phase. Each window
pixel's read-out voltage must equal the charge it collected during its own group's
exposure, within one model time step.

It also counts each mechanism: load, row step, slower column step, pixel write, reset
release, row select, sub-frame rebuild, grid change, continuous restart and analog
reading. It fails if any of them never happened. At full size it takes about 15 s to
compile and 6 s to run.

## Changing it

* `LINES` (default 1024) sets the array size. The counter width in `tpm_pkg` must satisfy
  `2**ROW_CNT_W >= LINES`.
* `MAX_MASK` sets the largest grid; `TW` sets the width of the timing counters.
* To change the waveform shape, edit the `always_comb` block of `tpm_sequencer`, which
  maps state and cycle to the next control outputs.
