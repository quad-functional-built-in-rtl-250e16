# Quad-functional built-in test circuit for a DRAM-frame-memory LCD

A system-on-glass LCD with an on-glass DRAM frame memory is hard to test. The memory can
only be reached through the display path, and the display can only be fed through the
memory. Adding separate control and observation points for each part costs area on the
glass and adds parts that can fail themselves.

This design keeps one structure for everything. The *output register* sits between the DRAM
bitlines and the decoder, and it is built from scan-style **multiplexed-input flip-flops**.
Each cell can either latch its memory bitline (parallel) or take the output of its
neighbour (serial). Parallel or serial input, combined with parallel or serial output,
gives four operations from the same 640 cells:

| operation | input | output | controllable point | observed at |
|---|---|---|---|---|
| normal display / parallel transfer test | memory row, parallel | decoder, parallel | the cell latches | the display |
| memory test | memory row, parallel | serial pin | the cell latches | the serial output |
| display test | serial pin | decoder, parallel | the serial input | the display |
| serial transfer test (self test) | serial pin | serial pin | the serial input | the serial output |

This RTL holds the digital side of the panel: the pixel-bus frontend with its coder, the
frame memory, the test circuit, the controller that sequences it, and the decoder. The
analog horizontal driver (6-bit DACs), the vertical driver and the pixel array lie outside
it. The top level brings out what they would consume.

## Panel and memory geometry

| quantity | value | where it is set |
|---|---|---|
| pixels | 160 x 120, RGB | `PIXELS`, `PIX_ROWS` on `sog_lcd_top` |
| display lines | 360 = 120 pixel rows x 3 colours | derived |
| sub-pixels per line | 160, all of one colour | derived |
| coded sub-pixel | 4 bits (pixel 12 bits, r:g:b = 4:4:4) | fixed |
| panel level | 6 bits (pixel 18 bits, R:G:B = 6:6:6) | fixed |
| DRAM | 360 rows x 40 words x 16 bits = 230,400 bits | derived |
| test-circuit cells | 640 = one DRAM row = one display line | derived |

The colour stripes run horizontally, so every display line carries a single colour. One
display line is therefore 160 x 4 = 640 coded bits. That is exactly one DRAM row and exactly
the length of the test circuit, so a single row access fills the whole output register.

Addressing used throughout:

* Pixel row `y` owns DRAM rows `3y` (red), `3y+1` (green) and `3y+2` (blue). DRAM row `n` is
  display line `n`.
* Sub-pixel `x` of a line is at row bits `[4x+3:4x]`, in word `x/4`, nibble `x mod 4`.
* Test-circuit cell `i` holds row bit `i`. Cell 0 is fed by the serial input. Cell 639 is the
  serial output, so serial read-out starts with row bit 639 (the MSB of sub-pixel 159).
* At the decoder output, sub-pixel `x` is the 6-bit level in `line_levels[6x+5:6x]`.

## The multiplexed-input flip-flop and its two clocks

`mux_input_ff` is the only storage in the test circuit. It is a 2:1 data multiplexer
feeding a master latch and a slave latch:

* `ts = 0` selects `d1`, the previous cell's `q`. This is shifting.
* `ts = 1` selects `d2`, the memory bitline. This is parallel latching.
* The master latch is open while `ck1` is high. The slave latch is open while `ck2` is high.

`ck1` and `ck2` are non-overlapping phases. While `ck1` is high, every master samples its
input, and no `q` moves because every slave is closed. While `ck2` is high, every slave copies
its master, and the masters are closed. So one `ck1` pulse followed by one `ck2` pulse moves
the whole chain by exactly one position, or loads a whole row, with no race along the chain.
If the two phases overlapped, data would run through several cells in one step. The test
circuit asserts at every rising `ck1` that `ck2` is low, and the controller asserts that it
never drives both.

Setup and hold follow from the latches: `d1`, `d2` and `ts` must be stable for the whole
`ck1` high time, and `q` changes only during `ck2`. The cell has no reset. It holds what it
last captured.

### Where the phases come from

`builtin_test_circuit` has a clock multiplexer. With `sel_test = 0`, CK1, CK2, TS and the
serial input come from the controller. With `sel_test = 1`, they come from the pins `tck1`,
`tck2`, `tts` and `si`, so a tester can drive the chain directly, with no system clock
involved.

The controller makes its phases from the system clock. Each latch or shift step is four
clocks: CK1 high, both low, CK2 high, both low. CK1, CK2, TS and the serial bit are all
flip-flop outputs, so they do not glitch. TS and the serial bit change at the latest on the
clock edge on which CK1 rises, and never while CK1 is high or as it falls. The memory row
read is registered one clock earlier and holds until the next read.

## The controller's four operations

`test_controller` runs one operation per `start` pulse. `op` (type `sog_pkg::op_e`) picks
the operation. `busy` is high during it, and `done` pulses for one clock at the end.

* **Normal (`OP_NORMAL`).** This is one display frame. For each line 0..359, the controller
  reads the DRAM row, latches it with TS = 1, and pulses `line_load` with `line_addr` set to
  that line. The decoded line is on `line_levels` while `line_load` is high. Reading every row
  once per frame is also what keeps the dynamic cells refreshed, so there is no separate
  refresh logic. Cost: 7 clocks per line, 2521 clocks from `start` to `done`.
* **Memory test (`OP_MEMTEST`).** The controller reads row `test_row`, latches it in
  parallel, then shifts with TS = 0. Each of the 640 bits is presented on `so` with a
  one-clock `so_valid`, starting with bit 639. The receiver cannot stall this stream. Cost:
  5 x 640 + 3 = 3203 clocks per row.
* **Display test (`OP_DISPTEST`).** The controller takes 640 bits from `si`. A bit is accepted
  on a clock where `si_valid` and `si_ready` are both high, and each accepted bit is shifted
  in at cell 0. The first bit accepted ends up in cell 639. The controller then pulses
  `line_load` for all 360 lines, so the shifted-in coded line is written over the whole
  panel. The input is *coded* data, because the test circuit sits in front of the decoder.
  Cost, with `si_valid` held high: 5 x 640 + 360 + 1 = 3561 clocks.
* **Serial transfer test (`OP_SERTEST`).** For each of 640 steps, the bit at the serial output
  is presented with `so_valid` in the same clock in which the next input bit is accepted, and
  then the chain shifts. One run returns what the previous run shifted in. Cost, with
  `si_valid` held high: 5 x 640 + 1 clocks.

These costs are written at the top of `test_controller.sv`, and the testbenches check them.

## Frontend, coder and decoder

The CPU writes 18-bit pixels (`px_x`, `px_y`, `px_data`) with a valid/ready handshake. The
frame memory stores 16-bit words, and each word holds four sub-pixels of one colour.
`frontend` therefore collects a group of four pixels (x mod 4 = 0..3) in three word buffers,
one per colour. When the fourth pixel arrives, it writes the red, green and blue words to
rows 3y, 3y+1 and 3y+2 on the next three clocks, with `px_ready` low meanwhile. Pixels must be
written in whole groups of four.

The coder reduces each 6-bit colour to 4 bits by uniform quantisation with rounding:
`code = round(v * 15 / 63)`. The decoder restores the level as `level = round(code * 63 / 15)`,
so codes 0 and 15 give the full range 0 and 63, and a round trip is off by at most 2 levels.
This rule is this design's own choice. The original design cites a separate coding scheme
that is not reproduced here. To use a different scheme, replace `coder.sv` and `decoder.sv`,
which are purely combinational.

## Top-level interface (`sog_lcd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock; asynchronous reset, active low |
| `px_valid`, `px_ready` | in/out | 1 | pixel bus handshake |
| `px_x`, `px_y`, `px_data` | in | 8, 7, 18 | pixel column, row, R:G:B 6:6:6 |
| `start`, `op`, `test_row` | in | 1, 2, 9 | start an operation, which one, memory-test row |
| `busy`, `done` | out | 1 | operation running, finished |
| `si`, `si_valid`, `si_ready` | in/in/out | 1 | serial test input stream (also the test-mode serial input) |
| `so`, `so_valid` | out | 1 | serial output (cell 639), and its strobe during controller operations |
| `sel_test`, `tck1`, `tck2`, `tts` | in | 1 | select test-mode clocking, test CK1, CK2, TS |
| `line_load`, `line_addr` | out | 1, 9 | to the vertical driver: write line `line_addr` now |
| `line_levels` | out | 960 | to the horizontal driver: 160 levels of 6 bits |

The frontend writes and the controller's row reads use separate memory ports, so the CPU can
write during any operation. The `line_levels` output follows the test circuit at all times.
It is meaningful when `line_load` is high, or at any time after a display test or a
test-clock load.

## Where this RTL departs from the original circuit, or fills gaps

* The four operations, the cell (TS-selected D1/D2, two non-overlapping clocks, Q to the next
  cell and to the decoder, D2 from the memory), the choice between system and test clocks,
  the 640-cell length, the sizes of the memory and panel, and the position of the test
  circuit between memory and decoder all follow the original description.
* The cell's clocking is modelled as a master latch on CK1 and a slave latch on CK2. The
  original gives the cell's symbol and behaviour but not its transistor circuit.
* This design chose the following: the operation encoding, the controller's state sequence
  and clock costs, the handshakes, one memory-test row per start, the display test writing
  every line, muxing TS and the serial input together with the clocks, the colour order of
  the rows, the word packing, and the asynchronous reset.
* The coding rule (see above) is a stand-in for the original compression scheme.
* The frame memory is modelled as ideal storage with a one-clock row read. Cell retention,
  the maximum access frequency and the analog read path are not modelled. In the original,
  retention was measured fault-free up to 166 ms. A display running above 6 frames/s
  therefore refreshes the memory. Here a frame is 2521 clocks, about 2.5 ms at a 1 MHz clock.
* Refresh during long tests: only row reads refresh the memory, and a memory test reads one
  row per run, 3203 clocks each. Testing all 360 rows back to back takes about 1.15 s at
  1 MHz, well beyond 166 ms, so rows tested last could lose data before they are read. Insert
  a normal frame every few dozen rows. With one frame after every 40 rows, no row goes
  unread for more than 131 ms; `tb_refresh_workload` checks this.
* Display timing (line period, blanking) is not modelled. Lines are loaded back to back.
* The horizontal driver, the vertical driver and the pixel array are not included.

## Files

| file | content |
|---|---|
| `rtl/sog_pkg.sv` | geometry constants, `op_e`, pixel structs |
| `rtl/mux_input_ff.sv` | the multiplexed-input flip-flop |
| `rtl/builtin_test_circuit.sv` | 640-cell chain, clock/control multiplexer, overlap assertion |
| `rtl/test_controller.sv` | sequencing of the four operations |
| `rtl/frame_memory.sv` | 360 x 40 x 16 frame memory, word write, row read |
| `rtl/frontend.sv`, `rtl/coder.sv` | pixel bus, coding, word packing |
| `rtl/decoder.sv` | 4-bit to 6-bit expansion of a line |
| `rtl/sog_lcd_top.sv` | the whole digital path |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog ends a hung
run with a failure. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sog_pkg.sv tb/tb_sog_lcd_top.sv --top-module tb_sog_lcd_top
./obj_dir/Vtb_sog_lcd_top
```

Replace the testbench name to run another one. `tb_sog_lcd_top` runs the whole design at its
default size in about 15 s. It:

1. writes a random frame over the pixel bus, which exercises back-pressure;
2. runs a normal frame and checks all 360 decoded lines;
3. runs the memory test on every one of the 360 rows, compares the serial streams with the
   coded frame, and compares the decoded read-out with the 6-bit data written;
4. runs the display test with a stripe pattern and checks all 360 loaded lines;
5. runs the serial transfer test twice;
6. drives the chain from the test-clock pins;
7. runs a second frame, to show the tests left the memory intact.

It also counts each of these mechanisms and fails if one never happened.

`tb_refresh_workload` runs back-to-back frames, then a full memory test with frames inserted,
and measures the longest time any row goes unread. The module testbenches use the full sizes,
except `tb_test_controller`, which uses 8 lines and 16 cells to keep its traces short.

## Changing sizes

`PIXELS` (a multiple of 4) and `PIX_ROWS` on `sog_lcd_top` set everything else: the number of
lines, DRAM rows and words per row, and the number of test-circuit cells. The lower-level
modules take the derived values as parameters (`N_FF`, `N_LINES`, `ROWS`, `COLS`,
`WORD_BITS`). The testbenches are written for the default 160 x 120 panel.
