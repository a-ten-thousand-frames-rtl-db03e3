# MIMOSA26-style readout: rolling shutter with on-chip zero suppression

A monolithic pixel sensor for a beam telescope has 576 rows x 1152 columns
(about 663,000 binary pixels) and must deliver about ten thousand frames per
second. Sending every pixel would need some 6.6 Gbit/s; two 80 Mbit/s serial
lines are available. The chip therefore reads the array one row at a time
(rolling shutter), turns the analog column signals into hit bits with one
discriminator per column, and compresses each row on the fly: empty pixels are
skipped and every run of neighbouring hit pixels (a *string*) is stored as its
first column and its length. The compressed frame is collected in one of two
memories while the other one, holding the previous frame, is shifted out.

This repository holds SystemVerilog for the digital part of such a sensor,
modelled on the MIMOSA26 chip built for the EUDET telescope, with behavioural
stand-ins for the analog parts it needs in simulation. Its default parameters
are full size; the end-to-end testbench runs the complete chip at that size.

## Data path and timing

```
 pixel array (analog, outside)           rolling_shutter_ctrl
   row_addr/row_sel/clamp  <---------------  row counter, 16 clocks per row
   col_v[1152]  ------> discriminator_bank (model, 4 threshold groups)
                              | hit[1152]        (or JTAG PATTERN in test mode)
                              v
              18 x zs_bank_scanner   stage 1: strings per 64-column block
                              v
                       zs_row_mux    stage 2: row record, <= 9 strings
                              v
                    zs_mem_writer    stage 3: words into memory A or B
                      /          \
              sram_1r1w A      sram_1r1w B     (ping-pong, 570 x 32 bits)
                      \          /
                  frame_serializer  ---> sdata[1:0], mkd   (2 x 80 Mbit/s)
                              |
                         enc_8b10b  ---> enc_symbol        (optional link)
 jtag_ctrl: thresholds, biases, run, test modes, test pattern
```

All digital blocks run on one clock, nominally 80 MHz. One row takes
`ROW_CYCLES` = 16 clocks, so a frame of 576 rows takes 9216 clocks, 115.2 us
(8.7 kframes/s). Within a row period the sequencer issues, at fixed clocks:

| clock in row | event |
|---|---|
| 2  | discriminators sample the pixel output (signal) |
| 4-5 | in-pixel clamp of the selected row |
| 8  | discriminators sample the pixel output again (baseline) |
| 12 | each discriminator compares signal - baseline with its group threshold |
| 13 | `row_done`: the row's hit bits enter the zero suppression |

The two samples form the second double sampling: the difference removes the
offset of each pixel's output buffer, so a single threshold per group of 288
columns is enough. The three zero-suppression stages are registered: a row's
strings are in memory at most 15 clocks after `row_done`, before the next
row arrives, so the pipeline never stalls.

The frame that is filled during frame *n* is sent during frame *n+1*. The
writer hands the filled memory over a fixed 12 clocks after the last row of
the frame, so frames leave the chip at a constant period of exactly 9216
clocks.

## Zero suppression

This is the part with the most rules, all of them fixed in hardware:

* **Blocks.** The 1152 columns are split into 18 blocks of 64
  (`BANK_COLS`). Each block has its own scanner, which looks at its 64 hit
  bits in one clock.
* **Strings.** A scanner reports each string as `{first column, length-1}`.
  A string longer than 4 pixels is cut into pieces of 4 (a run of 9 hits
  becomes 4 + 4 + 1). A string that continues over a block edge is reported
  by both blocks, as two strings.
* **Block limit.** A block reports its first 6 strings (by column); further
  ones are dropped and the block's overflow flag is set.
* **Row limit.** The row packer keeps the first 9 strings of the row, in
  block order, with absolute column numbers; more strings, or any block
  overflow, set the row's overflow flag.
* **Empty rows** produce nothing. A row with strings or an overflow flag
  produces one row header followed by one word per string.
* **Memory limit.** A memory holds 570 words of 32 bits, i.e. 1140 16-bit
  words. A row that does not fit in what is left is dropped whole, and the
  frame's memory-overflow flag is set; later, smaller rows may still fit.
  In single-line mode the limit is 570 16-bit words.

Word formats (16 bits):

| word | bits |
|---|---|
| row header | `[15]` overflow, `[14:11]` number of strings, `[10]` 0, `[9:0]` row |
| string | `[15:13]` 0, `[12:2]` first column, `[1:0]` length - 1 |

The 16-bit words are stored two per memory word: words 0, 2, 4, ... in the
low half (line 0), words 1, 3, 5, ... in the high half (line 1). After an odd
number of words the last high half is zero.

## Output frame

The serializer sends 576 slots of 16 bits on each line, most significant bit
first, one bit per clock per line:

| slot | line 0 | line 1 |
|---|---|---|
| 0 | `5555` header | `5555` |
| 1 | frame number [15:0] | frame number [31:16] |
| 2 | `{mem_ovf, 00000, length}` | same |
| 3 .. 3+L-1 | memory word k [15:0] | memory word k [31:16] |
| 3+L | `AAAA` trailer | `AAAA` |
| rest | 0 | 0 |

`L` is the number of 32-bit memory words used (at most 570, so the trailer
always fits in the 576 slots). `mkd` is high during slot 0. Frame numbers
count from 0 after reset.

**Single-line output.** With CTRL bit 4 set, only line 0 carries data and
line 1 stays low. One line can send only 576 words per frame, so the writer
then fills at most 570 16-bit words of a memory (half of it), and the frame
on line 0 is: header, frame number [15:0], frame number [31:16],
`{mem_ovf, 00000, L}` with `L` now counting 16-bit words, the `L` words in
the order they were written, trailer, zeros. Change this bit only while the
readout is stopped: the writer and the serializer each take it at their own
frame boundary.

**8b/10b output.** When enabled, the words on the two lines are also sent,
one byte every 4 clocks (bytes 0..3 of `{line 1, line 0}`, low byte first),
through a standard 8b/10b encoder (Widmer-Franaszek tables, running
disparity, K28.5 comma while no frame is sent). `enc_symbol` is the 10-bit
symbol, `abcdei fghj` with `a` in bit 9; serialising it at 10 bits per 4
clocks needs a clock 2.5 times faster, which would come from an on-chip PLL
(not part of this RTL).

## Slow control and test modes (JTAG)

`jtag_ctrl` is an IEEE 1149.1 TAP with a 4-bit instruction register. Data
registers are shifted least significant bit first; Capture-DR loads the
current value, so every register can be read back.

| instruction | register | bits |
|---|---|---|
| `0001` (after reset) | IDCODE | 32, `0x02600001` |
| `0010` | DAC | 8 x 8: codes 0-3 thresholds of column groups 0-3, code 4 test voltage, 5-7 other biases |
| `0011` | CTRL | `[0]` run, `[1]` isolate discriminators, `[2]` zero suppression fed from PATTERN, `[3]` 8b/10b enable, `[4]` single-line output |
| `0100` | PATTERN | 1152, one row of hits |
| other | BYPASS | 1 |

The test modes let each stage be exercised alone: with *isolate* the
discriminators see the test voltage instead of the array (a threshold scan
gives their S-curves); with *pattern* every row given to the zero suppression
is the PATTERN register, so arbitrary hit patterns can be run through the
sparsification and the output chain. The JTAG registers are static settings:
they feed the readout clock domain without synchronisers and should be
written while `run` is low or the chip is in reset.

## Analog parts and the discriminator model

The pixel array, the bias DACs and references, the PLL and the LVDS drivers
are analog and are not in the RTL. Their signals are ports of `mimosa26`:
`row_addr`, `row_sel`, `clamp` go to the array, the array returns `col_v`
(one 8-bit value per column, in units of one threshold DAC step), `dac`
carries the DAC codes, and `sdata`, `mkd`, `enc_symbol` go to the output
drivers.

`discriminator_bank` is a behavioural model of the 1152 comparators, written
in synthesizable style so that the whole chain can be simulated and
elaborated: a column fires when (signal sample - baseline sample) is greater
than its group's threshold code. Noise, comparator offsets and threshold
dispersion are not modelled.

## How far this follows the original chip

Taken from the sensor's published description: the 576 x 1152 array, the
rolling shutter readout with in-pixel and in-discriminator double sampling,
four threshold groups of 288 columns with their own DACs, a pipelined zero
suppression that codes strings by start and length and stores them
successively in two alternating SRAMs, transmission of a frame during the
next one on two 80 Mbit/s lines, an 8b/10b encoder, JTAG for biases and test
modes, and the test configurations (isolated discriminators, zero suppression
alone, full chain).

Choices of this design, not given by that description: 16 clocks per row and
the phase positions; the 64-column blocks and the limits of 4 pixels per
string, 6 strings per block and 9 per row; the overflow rules; the word and
frame formats (two-line and single-line); the 570 x 32-bit memories; the JTAG
instruction codes and registers; the 8b/10b byte order and idle comma.

Known differences and omissions:

* The published frame time at 80 MHz is 112.5 us; that is not a whole number
  of clocks per row for 576 rows. This design uses 16 clocks per row, giving
  115.2 us.
* The chip can send its data on one line or two; the single-line format and
  its halved capacity are this design's own reading of that option.
* The PLL is not modelled; the 8b/10b symbols are given in parallel.
* Clock-domain crossing of the JTAG settings relies on the settings being
  static.

## Files

| file | content |
|---|---|
| `rtl/m26_pkg.sv` | shared sizes, the string type, word-format functions |
| `rtl/mimosa26.sv` | top level |
| `rtl/rolling_shutter_ctrl.sv` | row sequencer |
| `rtl/discriminator_bank.sv` | behavioural model of the column discriminators |
| `rtl/zs_bank_scanner.sv`, `rtl/zs_row_mux.sv`, `rtl/zs_mem_writer.sv` | zero-suppression stages |
| `rtl/sram_1r1w.sv` | frame memory |
| `rtl/frame_serializer.sv` | serial output, two-line or single-line |
| `rtl/enc_8b10b.sv` | 8b/10b encoder |
| `rtl/jtag_ctrl.sv` | JTAG TAP and configuration registers |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_m26_noise_occupancy.sv` | full-size run at measured noise hit rates |

Parameters (on `mimosa26`): `N_ROWS`, `N_COLS`, `N_GROUPS`, `BANK_COLS`,
`ROW_CYCLES`, `MEM_DEPTH`, `N_DAC`. The frame length in words follows from
`N_ROWS x ROW_CYCLES / 16` and must leave 4 words more than `MEM_DEPTH`;
`ROW_CYCLES` must be at least 13; elaboration-time assertions check these.
The string limits are constants in `m26_pkg`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/m26_pkg.sv \
    tb/tb_mimosa26.sv --top tb_mimosa26 -Mdir obj_top
obj_top/Vtb_mimosa26
```

Replace `mimosa26` by any block name for its unit test. The end-to-end test
`tb_mimosa26` runs the chip at full size for about 100,000 clocks (a few
seconds): a pixel model with per-column offsets and clamp behaviour drives the
columns, JTAG configures the chip, and four phases (normal readout with
8b/10b, pattern test mode, isolated discriminators, single-line output) are
run. Every frame
received on the serial lines is compared word by word with a reference
computed in the testbench from the hit pattern. The test also counts long
strings, strings over block edges, block, row and memory overflows, skipped
empty rows, memory swaps, the frame period, 8b/10b commas, headers and
disparity, and fails if any of them never happened.

`tb_m26_noise_occupancy` runs the full-size chip with random noise hits at
the fake-hit rates measured on the real sensor: about 6e-5 per pixel (40 hits
per frame, threshold at 6 times the noise) and 8e-4 (about 550 hits, the
bound quoted for 4 times the noise). Both are carried without loss; the
frames use 36-39 and about 458 of the 570 memory words, a compression of
roughly 550 and 45 against the raw 663,552-bit frame.

The unit tests compare each block with an independent model: the scanner
with a run-list-then-split reference over thousands of random rows; the row
packer, writer and serializer with reference packing; the memory with a model
array; the encoder with table values, all 256 bytes from both disparities and
stream properties (disparity, run length, no comma in data); the JTAG
controller by register write and read-back through the TAP, including
Pause-DR and BYPASS.
