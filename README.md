# ZUMA display hardware: sprites without a frame buffer

A ZUMA-style arcade game has a chain of coloured balls rolling along a
path, a shooter ball and a shooter stand, all drawn on a 640x480 VGA
monitor. The game logic runs as software on a small soft processor. This
RTL is the custom hardware the processor writes to:

* a **VGA controller** that draws up to 46 single-colour 32x32 objects
  over a fixed background. It has no frame buffer. The processor only writes
  one 32-bit word per object (centre x, centre y, colour, valid), and the
  controller works out every pixel on the fly while the beam scans;
* a **seven-segment controller** that shows the 4-digit score.

The main idea is that most objects never need to be drawn at the same
time. Pixels are made in blocks of 4. For each block, a content-addressable
store of object positions (the *CAM*) finds which objects touch the block.
The two balls and the stand it finds are then painted by just three
drawing engines. Without the CAM, every object needs its own drawing engine,
and that does not fit the FPGA. The rest of this file explains how the
pieces fit and, in most detail, how the timing works.

The RTL follows the original design's block structure, signal names and
numbers: 46 objects, 4-pixel blocks, a four-stage combiner tree, look-ahead
of two and three blocks, and the register formats. Where the original
description says nothing (raster porches, shape masks, colours, the
seven-segment refresh rate), the choices are listed in
[What is this design's own](#what-is-this-designs-own).

## System context

```
 processor ──(bus)──┬── zuma_vga  ── HSYNC, VSYNC, VGA[7:0] ──► monitor (8-bit colour)
                    └── seg7_ctrl ── SEG_n[7:0], AN_n[3:0]  ──► 4-digit display
```

The processor, its bus, the PS/2 keyboard interface, the timers, the UART
and the interrupt controller are vendor IP and are not part of this RTL.
`zuma_top` brings out two plain write ports in their place:

| port | width | meaning |
|---|---|---|
| `vga_wr_n` | 1 | write one object word this clock (active low) |
| `vga_addr` | 6 | object cell 0..45 (46..63 are accepted and ignored) |
| `vga_data` | 32 | object word, format below |
| `seg_wr_n` | 1 | write the score word (active low) |
| `seg_data` | 32 | one decimal digit per byte: bits 31:24 thousands ... 7:0 ones |

Clock: 50 MHz. Reset: `reset_n`, synchronous, active low. Both ports are
write-only: there is no read-back.

### Object word

| bits | 31 | 30:27 | 26:19 | 18:10 | 9:0 |
|---|---|---|---|---|---|
| field | valid | reserved | colour (8-bit) | centre y | centre x |

An object occupies the 32x32 square from (x-16, y-16) to (x+15, y+15).
Cell 10 (`STAND_CELL`) is the shooter stand and is drawn with the stand
shape. All other cells are balls, drawn as a disc of diameter 32. Writing a
word with valid = 0 removes the object. A new word takes part in drawing 2
clocks after the write and appears on screen from the next block that is
generated after that.

## The raster: two clocks per pixel, eight per block

`vga_count` runs a 1600 x 525 clock raster. The first 1280 clocks of each of
the first 480 lines are visible. One pixel lasts two clocks, so
**x = HCNT/2 and y = VCNT**. Four pixels make a **block** of 32 bits,
lasting 8 clocks. The leftmost pixel is in bits 31:24, and in pixmaps the
leftmost pixel is bit 3. Everything in the application part runs once per
block, on `blk_start` (HCNT[2:0] = 0).

HSYNC is low for 192 clocks after a 32-clock front porch. VSYNC is low for
lines 490-491. These are the usual 640x480@60 Hz numbers with the
horizontal ones doubled, which gives 31.25 kHz lines and a 59.5 Hz frame.

## The look-ahead pipeline

Three kinds of register stand between computing a block and showing it, so
every generator works on a block that is still in the future. For the
visible block *b*, with one 8-clock block period per row:

| during block | background `bkgnd_gen` | CAM search (`cam`) | `object_draw` | `overlay` output | `vga_output_if` shift register |
|---|---|---|---|---|---|
| b-3 | | **searches b** (xPos_Next, 3 ahead) | | | |
| b-2 | **computes b** (2 ahead) | answer for b held in the pipeline register | **paints b** (xPos, 2 ahead) | | |
| b-1 | | | | **holds b** | loads b in the last clock |
| b | | | | | **shifts b out, 2 clocks per pixel** |

In clock terms, with blocks starting at HCNT = 8k:

* At each `blk_start`, `reg_position` registers the pixel address of the
  block **two** ahead (for ObjectDraw) and **three** ahead (for the CAM).
  `bkgnd_gen` registers the background of the block two ahead.
* The CAM needs 5 clocks: a one-clock compare in every `pos_cell`, then 4
  combiner stages. At the next `blk_start` its answer moves into the
  pipeline register in `fgnd_gen`, just as `reg_position` moves that same
  block into xPos/yPos. So ObjectDraw always gets the CAM answer for the
  block it paints.
* `object_draw` needs 3 clocks: the mask row read, the pixel select, and the
  merge of the three engines.
* At the following `blk_start`, `overlay` registers the foreground over the
  background as `DISP_DATA`.
* `vga_output_if` loads `DISP_DATA` in the last clock of the block
  (HCNT[2:0] = 7) and shifts it out during the next block.
* `vgactrl` registers HSYNC, VSYNC and the pixel together. The pins
  therefore lag HCNT/VCNT by exactly one clock, and they stay aligned.

Look-ahead past the end of a line wraps to the start of the next line, and
after line 524 to line 0. The first blocks of each line are therefore ready
in time. Neither the CAM nor ObjectDraw fits in one 8-clock block together
with the other, which is why they work on different blocks.

## Finding the objects: the CAM

`cam` = `addr_decode` + 46 × `pos_cell` + `combiner`.

* **`addr_decode`** registers a write and pulls the strobe of exactly one
  cell low (an assertion checks that at most one is low).
* **`pos_cell`** holds one object word. Every clock it compares the
  searched block with its square. It reports `FOUND` when the word is valid,
  the block's row lies inside the square, and any of the block's 4 pixels
  does too:
  `y-16 ≤ yPos ≤ y+15` and `x-19 ≤ xPos ≤ x+15`. On a hit it outputs its
  word, otherwise 0.
* **`combiner`** reduces the 46 hits (padded to 64) to the **first two ball
  hits in cell order**. It is a tree of `combiner8` units with a register
  after each stage:

  ```
  stage 1: 8 units x 8 inputs  -> 16     (units for cells 48..63 fold away)
  stage 2: 4 units x 4 inputs  ->  8     (other 4 inputs tied to 0)
  stage 3: 2 units x 4 inputs  ->  4
  stage 4: 1 unit  x 4 inputs  ->  2  =  ball 1, ball 2
  ```

  Each `combiner8` keeps input order, so the tree as a whole returns the
  first two valid cells. The stand cell does not go through the tree. It
  passes through four matching registers to output 1, so the stand always
  reaches its own draw engine, however many balls are near it.

**Limit.** If three or more balls touch the same 4-pixel block, only the two
in the lowest-numbered cells are drawn in that block. Balls on the game
path are 32 pixels apart, so a block touches at most two of them. Balls
that overlap each other (for example the shooter ball in flight over the
chain) can lose a sliver.

## Painting: draw objects and masks

`object_draw` holds three `draw_object` engines: the stand (stand mask) and
two balls (disc mask). Two ball engines are needed because a block can
straddle the boundary between two neighbouring balls. Each engine works as
follows:

1. It forms the mask row `ypos - (yObj - 16)` and the column offset
   `xpos - (xObj - 16)`. The row reads a 32-word x 32-bit mask ROM, in
   which bit *c* of word *r* says whether column *c* of row *r* is painted.
2. For pixel *i* of the block, column `offset + i` is painted when it lies
   in 0..31 and its mask bit is 1. A painted pixel gets the object's colour
   and pixmap bit 1. Any other pixel gets 0x00 and pixmap bit 0.

The masks are computed by `zuma_pkg::mask_row`, not stored in a file:

* ball: `(2c-31)² + (2r-31)² ≤ 32²`;
* stand: a T, with rows 0-7 covering columns 6-25 and rows 8-31 covering
  columns 11-20.

The three results are merged pixel by pixel. The pixmap is the OR of the
three. The colour comes from the stand if it paints that pixel, else from
ball 1, else from ball 2. `overlay` then replaces a background pixel
wherever the merged pixmap bit is 1.

## Background

`bkgnd_gen` draws the following from x and y alone:

* a dark blue field with a grid line every 16 pixels;
* a green entrance box at x 0-95, y 32-63, left of the first path
  position (112, 48);
* a blue exit box at x 576-639, y 160-191, right of the last path position
  (560, 176).

Its `bg_sel` input turns the grid off. `zuma_app` ties it to 0. The colours
and geometry are in `zuma_pkg`.

## Score display

`seg7_ctrl` holds the last word written. The four digits share their
segment lines, so it lights one digit at a time. It moves on every
`REFRESH_CYCLES` clocks (default 65536, about 1.3 ms at 50 MHz) in the order
ones, tens, hundreds, thousands.

* `AN_n[k]` (active low) enables digit k.
* `SEG_n` = {dp, g, f, e, d, c, b, a}, active low, with the decimal point
  always off.
* A byte above 9 leaves its digit dark. The software converts the score to
  decimal digits before writing.

## Files

| file | block |
|---|---|
| `rtl/zuma_pkg.sv` | shared types, raster constants, object word struct, look-ahead, background and mask functions |
| `rtl/zuma_top.sv` | system top: `zuma_vga` and `seg7_ctrl` side by side |
| `rtl/zuma_vga.sv` | VGA controller: `vgactrl` + `zuma_app` |
| `rtl/vgactrl.sv`, `vga_count.sv`, `vga_output_if.sv` | generic 640x480 raster and block serialiser |
| `rtl/zuma_app.sv` | `bkgnd_gen` + `fgnd_gen` + `overlay` |
| `rtl/bkgnd_gen.sv`, `overlay.sv` | background, merge |
| `rtl/fgnd_gen.sv`, `reg_position.sv` | foreground pipeline and its addresses |
| `rtl/cam.sv`, `addr_decode.sv`, `pos_cell.sv`, `combiner.sv`, `combiner8.sv` | object store and search |
| `rtl/object_draw.sv`, `draw_object.sv` | draw engines |
| `rtl/seg7_ctrl.sv` | score display |
| `tb/zuma_tb_pkg.sv` | reference models shared by the testbenches, written independently of the RTL |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_ball_motion.sv` | the game's ball-motion example on the full VGA controller |

Parameters: `N_CELLS` (46) and `STAND_CELL` (10) on `zuma_vga`, `zuma_app`,
`fgnd_gen` and `cam`. `N_CELLS` may be at most 64, because the combiner has
64 inputs. `REFRESH_CYCLES` is on `seg7_ctrl`. The raster numbers are
parameters of `vga_count`, but the rest of the pipeline uses the package
constants, so change them in `zuma_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`, and each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/zuma_pkg.sv tb/tb_zuma_top.sv --top-module tb_zuma_top
./obj_dir/Vtb_zuma_top
```

Replace `tb_zuma_top` with any other `tb_<block>` to test that block.

* **`tb_zuma_top`** runs the whole design at its default parameters. It
  writes a game scene with 44 path balls (one row offset by 2 pixels, so
  that blocks straddle two balls), a shooter ball, the stand and a score.
  It then follows two full frames at the pins, about 1.7 million clocks,
  which take a few seconds. It keeps its own raster position, locked to the
  first VSYNC, and compares every visible pixel with a reference picture
  computed from the object list. It also checks line length, sync widths,
  black blanking and the segment pattern of every digit as it is scanned.
  Between the two frames it moves the shooter ball down onto the stand,
  where the stand must win every shared pixel. It also removes a ball and
  writes an address that has no cell. It counts each mechanism it exercises
  (two-ball blocks, stand, stand over a ball, ball over background, grid, boxes, blanking,
  object update and removal, ignored address, each digit) and fails if any
  never occurs. `tb_zuma_vga` is the same test without the score display.
* **`tb_ball_motion`** runs the game's ball motion on `zuma_vga` at full
  size. Four balls start on path positions 14-17 at (112,176), (80,144),
  (112,112) and (144,112). They move along the path, diagonally at the
  corners, and are shown after 0, 2, 20 and 32 pixels of travel, one state
  per frame. The 2-pixel state puts two balls into the same blocks. Every
  pixel of the four frames is checked.
* The block testbenches drive random or raster stimulus and check exact
  latencies: 1 clock for `pos_cell` and `addr_decode`, 4 for `combiner`,
  5 for `cam`, 2 for `draw_object` and 3 for `object_draw`. They also check
  the one-block delays of `overlay` and `vga_output_if`.
  `tb_seg7_ctrl` shortens the refresh period to 8 clocks.

## What is this design's own

The structure, the names, the 46 objects, the 4-pixel blocks, the
look-ahead of 2 and 3 blocks, the four-stage combiner, the three draw
engines, the object word and the score word all follow the original
design. The following are choices made here, where the original leaves the
point open or is inconsistent:

* **Raster timing.** Porches, sync widths and negative sync polarity are
  the common 640x480@60 Hz values. Only the 1280 visible clocks per line
  are given.
* **Load and shift phases** of the output shift register, and the
  single output register in `vgactrl`.
* **Shapes and colours.** The disc and T masks, the grid pitch, and the
  box positions and colours. The original says only that a mask ROM exists
  and that the background has a grid, an entrance and an exit.
* **Mask ROM size.** It is read as 32 words of 32 bits (5 address bits).
  The original gives its size as "32 x 5".
* **Pixmap polarity.** 1 means "foreground here". One of the original
  drawings inverts this.
* **Stand cell number.** The stand is cell 10, as the original text names
  it. Its block diagram does not mark the cell. `STAND_CELL` makes the
  number easy to change.
* **Ball output names.** The balls come out on the CAM's outputs 2 and 3,
  as drawn. The text names them 1 and 2.
* **Register count.** The processor side is described as 50 registers but
  the CAM as 46 cells. Addresses 46-63 are ignored here.
* **Combiner stages 2-4.** Their units use 4 of their 8 inputs. The unused
  inputs are drawn tied off only for the last stage, but the unit counts
  allow no other arrangement.
* **Merge priority** when two engines paint the same pixel (stand, then
  ball 1, then ball 2). The exact `pos_cell` overlap rule.
* **Unused inputs.** `BG_SEL` is kept and tied to 0. The BLANK inputs
  drawn on the generators are omitted, because blanking is applied once, at
  the output.
* **Seven-segment controller.** Only its function and register format are
  known. The refresh period, scan order and active-low drive are choices
  made here.
* **Colour bits.** The 8-bit colour goes to `VGA[7:0]` unchanged. Which
  bits drive red, green and blue is set by the board's resistor network.
  The background colours here are written as 3-3-2 groups.
* **Digit names.** The thousands digit is D3 (bits 31:24) and the ones digit
  is D0 (bits 7:0), as in the original register table. One sentence of the
  original numbers them the other way round.
* **Reset.** Synchronous and active low on every register.

Not covered: the processor, the bus, the keyboard, timer, UART and
interrupt cores, the block RAM holding the software, and the resistor DAC
that turns the 8 colour pins into analog levels. The game itself (ball
motion, collision detection, chain explosions, the pseudorandom colour
generator) is software and is also not covered.
