# Space Invaders on a VGA screen, in SystemVerilog

A small shooting game that runs entirely in logic, with no processor and no
software. A ship at the bottom of a 640 x 480 VGA picture moves left and
right on two push buttons and fires upwards on a third. Three rows of eight
stars march back and forth across the top of the screen. Each star shot is
worth 2 points. When all 24 stars are gone, the rows come back and the level
goes up by one. The player cannot lose; the game goes on as long as stars
keep coming back.

The design is a reconstruction of a classic FPGA teaching project: a 50 MHz
Spartan-6-class board with a 3-bit VGA output and push buttons. Where the
original description gives the behaviour (the movement divider, the scoring
rule, the port names), this RTL follows it exactly. Everything it leaves
open (sizes, speeds, bitmaps, colours, collision rules) is filled in here
with simple choices. Each such choice is listed under
[Choices made in this design](#choices-made-in-this-design).

## The main idea: racing the beam

The default picture path has **no frame memory**. A VGA monitor stores
nothing, so every pixel has to be sent again on every frame, 60 times a
second. The design computes each pixel's colour at the moment the beam
reaches it:

```
          +----------+  pixel_x, pixel_y, video_on   +-----------+   3   +------+
 clk ---->| vga_sync |------------------------------>| graphics  |------>| fd_1 |--> rgb
          |          |--> hsync, vsync               | (game +   |       | reg  |
          +----------+                               |  pixels)  |       +------+
                                                     +-----------+
 left, right, shoot ---------------------------------^
```

* `vga_sync` counts pixel periods (800 per line) and lines (525 per frame)
  at a 25 MHz pixel rate: a pixel tick every second cycle of the 50 MHz
  clock. It also decodes the sync pulses.
* `graphics` is given the position of the pixel being scanned. From the
  game state it works out, with combinational logic only, what is at that
  spot: a digit of the score board, the missile, the ship, a live star, or
  background.
* `fd_1` registers the colour once. `vsync` and `hsync` are also registered
  inside `vga_sync`, so colour and sync leave the chip on the same clock
  edge. The colour of pixel *p* appears one cycle after the counters point
  at *p*.

Nothing visible may change while the picture is being drawn. So all game
state (stars, missile, collisions) moves once per frame. This happens on a
one-cycle **frame tick**, raised when the scan reaches (0, 480), the first
line below the picture. Within one frame the game state is constant, and the
picture is an exact function of it. The testbenches rely on this: they
predict the number of pixels of each colour in a frame.

The ship is the one exception. It moves on its own slow tick (see below), so
a ship step can land in the middle of a frame.

## Game mechanics

### Movement tick: counter clock division

`move_divider` slows the 50 MHz clock down for the ship. A 26-bit
accumulator `divide` adds 2 every cycle. When it reaches 50,000,000,
`compare` is high for one cycle and the accumulator restarts from 0. So
`compare` fires once every 25,000,001 cycles, about every 0.5 s. A 25-bit
`counter` adds 2 on each `compare`.

`counter` only ever holds even values. The level rule below tests
`counter[0] == 0`, so that test is always true in practice. It is kept
because the scoring rule is written that way.

### Ship

On each `compare` the ship moves 5 pixels right while `right` is held, or 5
pixels left while `left` is held. If both are held, right wins. The ship is
clamped to x = 0 … 624, so its 16 pixels never leave the screen. It starts
at x = 312 (the centre) and sits on rows 440–455.

### Missile

Firing needs `nes_a` AND `nes_b`. At the top level both are wired to the
`shoot` button. Only one missile can be in flight at a time. It starts
2 x 8 pixels above the middle of the ship and climbs 4 pixels per frame. It
disappears when it would go above row 0, or in the frame where it hits a
star.

### Star rows

Each of the three `alien_group` instances is one row of 8 stars. The stars
are 16 x 16 and 24 pixels apart, so a row is 184 pixels wide. The rows start
at x = 100 and y = 40, 64 and 88. Each row has a master coordinate, a
horizontal direction (`state`: right/left) and a vertical direction
(`state_v`: up/down). On every frame tick the row first checks for a hit,
then moves:

* **hit test**: the missile's box is compared with the 16 x 16 box of every
  live star. If one overlaps, that star is cleared from the `alive` mask and
  `hit` is high in that cycle. At most one star goes per shot.
* **march**: the row moves 1 pixel in its horizontal direction. When the
  next step would cross x = 8 or x = 632, the row reverses instead. At that
  bounce it also moves 8 pixels down or up, and flips its vertical
  direction. So each row swings between two heights and never drifts down
  the screen.

`defeated` means no star of the row is left.

### Score, level, restart

`score_level` implements the scoring rule:

* `score += 2` in every cycle where `destruction` (the OR of the three
  rows' `hit`) is high;
* `restart` is high while all three rows are defeated;
* `level += 1` when all three are defeated and `counter[0] == 0`.

`restart` is combinational, so the rows refill on the same clock edge where
the level goes up. Clearing the screen therefore raises the level exactly
once. With a registered restart, the rows would still look defeated for one
more cycle and the level would go up twice. After reset the score is 0 and
the level is 1.

### Screen

| object      | colour `rgb` (R,G,B) | where |
|-------------|----------------------|-------|
| background  | `001` blue           | everywhere else in the visible area |
| stars, ship | `011` cyan           | 16 x 16 bitmaps in `sprite_rom` |
| missile     | `110` yellow         | 2 x 8 box |
| score board | `111` white          | level (3 digits) at (16, 8), score (5 digits) at (16, 22) |
| blanking    | `000`                | outside 640 x 480 |

Where objects overlap, the score board wins, then the missile, then the
ship, then the stars. The score board
turns the binary score and level into decimal digits with the
shift-and-add-3 method, in combinational logic. It draws them with a 3 x 5
font, each font pixel 2 x 2 screen pixels, on an 8-pixel pitch. Only the
numbers are drawn, no labels.

## Optional frame-buffer path

Set `main`'s parameter `USE_FRAME_BUFFER = 1` to send the picture through
`frame_buffer`. This is a 320 x 240 x 3-bit block-RAM image (28,800 bytes)
with one write port and two synchronous read ports.

* **Write**: the pixel generator's colour for every even pixel of every even
  line goes to address `(y/2)*320 + x/2`.
* **Read port A**: this port feeds the display, so each stored pixel fills a
  2 x 2 block of the screen. Reads return the old word when a port reads the
  address being written. Because of this, the top-left pixel of each block
  shows the previous frame; the other three show the current one.
  `hsync`/`vsync` get one extra register to match the RAM's read latency.
* **Read port B**: this port is brought out as `fb_raddr` / `fb_rdata` for
  any other reader of the picture.

With the default (`0`), the frame buffer is not built, `fb_raddr` is
ignored, and `fb_rdata` is 0. The default follows the direct data path
(graphics → register → pins). The frame buffer is described for this game,
but nothing says how it is written or who uses its second read port. The
connection above is this design's own.

## Files

| file | module | role |
|------|--------|------|
| `rtl/si_pkg.sv` | package | VGA timing, colours, sprite sizes, direction enums |
| `rtl/main.sv` | `main` | top: VGA + graphics + output register (+ frame buffer) |
| `rtl/vga_sync.sv` | `vga_sync` | 640 x 480 raster counters, sync, `video_on`, pixel tick |
| `rtl/graphics.sv` | `graphics` | game state and pixel colour |
| `rtl/move_divider.sv` | `move_divider` | movement tick (counter clock division) |
| `rtl/ship_control.sv` | `ship_control` | ship position |
| `rtl/missile.sv` | `missile` | the shot |
| `rtl/alien_group.sv` | `alien_group` | one row of stars: march, hit test, drawing |
| `rtl/sprite_rom.sv` | `sprite_rom` | star and ship bitmaps |
| `rtl/score_level.sv` | `score_level` | score, level, restart |
| `rtl/hud_text.sv` | `hud_text` | decimal score board |
| `rtl/frame_buffer.sv` | `frame_buffer` | 320 x 240 x 3 RAM, 1 write + 2 read ports |

Hierarchy: `main` → `vga_sync`, `graphics` (→ `move_divider`,
`ship_control`, `missile`, 3 × `alien_group` (→ `sprite_rom`),
`score_level`, `hud_text`, `sprite_rom`), and optionally `frame_buffer`.

## Top-level interface (`main`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 50 MHz clock |
| `not_reset` | in | 1 | active-low reset, synchronous |
| `left`, `right`, `shoot` | in | 1 each | push buttons, active high, assumed debounced and synchronous |
| `rgb` | out | 3 | colour, bit 2 red, bit 1 green, bit 0 blue; one bit per VGA colour line (feed a DAC or resistor network) |
| `hsync`, `vsync` | out | 1 each | active-low sync, 640 x 480 at about 59.5 Hz |
| `fb_raddr` | in | 17 | frame buffer read port B address (only used with `USE_FRAME_BUFFER`) |
| `fb_rdata` | out | 3 | frame buffer read port B data, one cycle after the address |

The first ten pins are the whole game. The two `fb_` ports exist only for
the optional path. On the original board the buttons were left = P4,
right = F6 and shoot = N4; these belong in the pin constraints of your board.

The game has no lives and no game-over state.

Synthesis (yosys, generic cells, default parameters) gives 223 flip-flop bits
for the whole design. The sprite bitmaps and the font are 1408 bits of
constant ROM. Enabling the frame buffer adds 230,400 RAM bits.

Parameters of `main`:

* `DIVIDE_LIMIT` (default 50,000,000): the movement tick period, in steps of
  2 cycles. Lower it in simulation to move the ship faster.
* `USE_FRAME_BUFFER` (default 0): selects the frame-buffer path described
  above.

The VGA timing and the game geometry are package constants in `si_pkg`.

## Choices made in this design

The original description gives the structure, the port names, the divider,
the 5-pixel ship step, the fire condition and the scoring rule. The rest is
this design's own:

* **Clock and timing.** The clock is 50 MHz with a 25 MHz pixel tick, not
  the 25.175 MHz from 100 MHz that the text also mentions. The porches and
  sync polarity are the standard 640 x 480 @ 60 Hz ones.
* **Output register.** The register `fd_1` is an edge-triggered flip-flop.
  The text calls it a D-latch, but the block drawing shows a clocked
  element.
* **Reset.** `counter` in the divider is reset along with `divide`, so its
  bit 0 starts at a known value.
* **Shapes and sizes.** The star count (8 per row), spacing, start positions,
  speeds (1 px/frame for stars, 4 px/frame for the missile), the swing
  height and the screen bounds were chosen to match the look of the game
  screen. The 16 x 16 bitmaps are this design's own drawing.
* **Collisions.** The hit test compares bounding boxes once per frame, not
  pixels.
* **Refill.** `restart` is combinational. A cleared screen refills at the
  start positions.
* **Colours and priority.** Only blue background and cyan stars are fixed by
  the original. Yellow for the missile, white for the score board, and the
  priority order are this design's.
* **Widths.** The score is 16 bits and the level 8 bits; both wrap.
* **Sprites.** The sprites are a combinational ROM (logic) rather than a
  clocked block RAM, so the pixel path has no extra latency.
* **Sound pulses.** `graphics` also outputs `shooting_sound` and
  `destruction_sound`, one-cycle pulses for an external sound unit. The top
  leaves them unconnected.

Not built: button debouncing, and any sound, analog or board parts (VGA DAC,
cable, monitor, FPGA board).

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
          rtl/si_pkg.sv tb/tb_graphics.sv --top-module tb_graphics
./obj_dir/Vtb_graphics
```

| testbench | what it shows | run time |
|-----------|---------------|----------|
| `tb_vga_sync` | two full frames: line 1600 cycles, frame 840,000 cycles, sync widths and positions, visible-area size | seconds |
| `tb_move_divider` | `compare` period and `counter` steps against a model (limit 20) | < 1 s |
| `tb_ship_control` | random buttons and ticks against a model, both walls reached | < 1 s |
| `tb_missile` | AND fire rule, launch point, 4 px/frame, exit at top, stop on hit | < 1 s |
| `tb_sprite_rom` | lit pixels per row, symmetry, spot pixels | < 1 s |
| `tb_alien_group` | 1400 frames of march against a model, every star shot, misses, restart, drawing | < 1 s |
| `tb_score_level` | random inputs against the scoring rule | < 1 s |
| `tb_hud_text` | every pixel of the score board for several values, against a string font | < 1 s |
| `tb_frame_buffer` | fill and read back on both ports, latency, read-before-write | seconds |
| `tb_graphics` | pixel colours, ship moves, then fires from the centre until all 24 stars are gone (about 9000 short frames); score, level, refill | seconds |
| `tb_test_cases` | the five simulation test cases of the original description (drawing and ship movement, shot on A and B, destruction, +2 score, level step with refill), on the graphics unit | seconds |
| `tb_main` | end to end on the pins, both picture paths, with `DIVIDE_LIMIT = 2000` | about 2 min |
| `tb_main_full` | end to end with every parameter at its default | about 1.5 min |

`tb_main` runs a direct-path and a frame-buffer copy of the game side by
side.

* It tracks the raster from the reset edge. On every cycle it checks
  `hsync`/`vsync` against the pixel position, and checks that `rgb` is black
  in blanking.
* It counts the pixels of each colour in the first frame: 24 stars × 144 +
  126 ship pixels of cyan, 368 white score-board pixels, the rest blue. It
  compares the frame-buffer copy's odd lines with the direct copy's picture.
* A scripted player then moves the ship, pins it against the wall, and aims
  and fires. To reach a level step without shooting 24 stars at full frame
  size, which would take thousands of frames, it removes all stars but one
  with `force`/`release` and shoots the last one. It then checks the score,
  the level, the refilled rows and the new score-board digits.
* It counts every mechanism (ship step, wall clamp, shot, destruction, level
  step, frame-buffer writes and port-B reads) and fails if any never happens.

`tb_main_full` runs at full size. It checks that the first ship step comes
exactly 25,000,000 clock edges after reset. It then fires when its model of
the star row says the missile will hit, and checks that the score reads
00002 on screen.

A full-size simulation runs at roughly two frames per second.
