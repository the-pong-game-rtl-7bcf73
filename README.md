# Pong on an FPGA with a PS/2 keyboard and a VGA monitor

Two players share one PS/2 keyboard: W and S move the left paddle, the up and
down arrows the right one, and the space bar serves. The game draws walls,
paddles, a ball and two score digits on a VGA monitor at 640 x 480. A
seven-segment display shows the title, and eight LEDs show the last scan code.

The design is built around one idea. The screen is an 80 x 60 grid of 8 x 8-pixel
cells. The timing core tells the rest of the design which cell the beam is in.
The game decides that cell's colour with nothing more than comparisons against
a few small registers: paddle tops, ball position and scores. So there is no
frame buffer. The game state changes once per frame, during vertical sync, and
everything runs from one 25 MHz clock.

```
 PS/2 keyboard ──► read_ps2 ──────────────► cntrl ─────────────────────► vga_int ──► VGA pins
                   ├ ps2_ctrl (receiver)    ├ vga_core (timing, cell x/y)    (colour code
                   └ key decoder            ├ pong_display + digit_rom        → R, G, B)
                     ld[7:0] ◄─ last code   ├ pong_paddles (per frame)
                                            └ pong_ball    (per frame)
 game_title ──► four-digit seven-segment display ("PonG")
```

## Files

| file | content |
|---|---|
| `rtl/pong_pkg.sv` | colour and direction enums, scan codes, playfield geometry |
| `rtl/ps2_ctrl.sv` | PS/2 frame receiver with its hand-over handshake |
| `rtl/read_ps2.sv` | key decoder: make/break codes → paddle directions, serve |
| `rtl/vga_core.sv` | horizontal/vertical timing state machines, cell coordinates |
| `rtl/digit_rom.sv` | 80 x 4-bit glyph ROM for the digits 0–9 |
| `rtl/pong_display.sv` | paints one cell from the game state |
| `rtl/pong_paddles.sv` | paddle movement and clamping |
| `rtl/pong_ball.sv` | ball movement, bounces, scoring, serving |
| `rtl/cntrl.sv` | game controller: ties timing, painting and game state together |
| `rtl/vga_int.sv` | colour code → RGB, output registers |
| `rtl/game_title.sv` | multiplexed seven-segment title display |
| `rtl/pong_top.sv` | board top level |
| `tb/*.sv` | one self-checking testbench per module, plus a PS/2 keyboard model |

## Keyboard path: a receiver and a decoder with a handshake

PS/2 is the hardest part to follow. The keyboard drives both the clock and
the data line. It sends 11-bit frames at 10–30 kHz: a 0 start bit, eight data
bits LSB first, odd parity, and a 1 stop bit. Each bit is valid at the falling
clock edge.

**`ps2_ctrl`** samples both lines through two flip-flops and finds the
falling clock edges. On each falling edge it steps a four-state machine:
START, DATA, PARITY, STOP. There is no bit counter. The shift register is
loaded with `1000_0000` at the start bit, and the data bits enter at the top.
When that marker 1 reaches bit 0, the next bit is the last data bit. Parity and
stop are received but not checked.

The receiver then hands the byte over with two signals:

* `trigger` rises three clocks after the stop bit's falling edge. It stays
  high until the next frame's start bit, and while it is high the shift
  register holds the finished byte.
* While `trigger` and `do_read` are both high, the byte is copied to
  `scan_code` and `scan_ready` is set. Once either drops, `scan_ready` falls
  two clocks later.

**`read_ps2`** is the consumer. It keeps `do_read` high while idle. When
`scan_ready` arrives it decodes `scan_code` and drops `do_read`. It raises
`do_read` again only after `trigger` has fallen, which means the next frame has
begun. So each frame is decoded exactly once, even though `scan_ready` lasts
several clocks. The decoded outputs change one clock after `scan_ready` rises.

The decoder handles key releases as follows:

* A make code sets a direction: W or up arrow → `01` (up), S or down arrow →
  `10` (down). Space sets `serve`.
* A break is `F0` followed by the key's code. It clears a direction only if
  that same key had set it. So if a player presses S while still holding W,
  releasing W does not stop the paddle.
* Any `F0` clears `serve`. Releasing space clears it too.
* The arrow keys' `E0` prefix is ignored on a press. Inside a break sequence
  it keeps the decoder waiting for the key code.
* After reset `serve` is high, so the first ball is in play at once.

## VGA timing and the cell grid

`vga_core` has two identical segment machines. Each has a state and a counter
that restarts at every segment boundary.

| horizontal (clocks) | left border | active | right border | front porch | sync | back porch | total |
|---|---|---|---|---|---|---|---|
| | 5 | 640 | 7 | 9 | 96 | 48 | 805 |

| vertical (lines) | top border | active | bottom border | front porch | sync | back porch | total |
|---|---|---|---|---|---|---|---|
| | 5 | 480 | 6 | 2 | 2 | 24 | 519 |

At 25 MHz that gives a 31.1 kHz line rate and a 59.8 Hz frame rate. The syncs
are active low. The usual 640 x 480 table uses 800 x 521, with porches of
16/48 pixels and 10/29 lines. This design spreads those porches over borders
instead: 5 + 48 = 53 clocks before the active area against the table's 48,
and 24 + 5 = 29 lines, the same as the table. Monitors lock to both. Every
length is a parameter of `vga_core` and of `cntrl`.

The vertical machine advances on the last clock of the horizontal front porch
(`line_tick`), so each line begins as hsync falls. `pixel` is the active pixel
number divided by 8 (0–79). `line` is the active line number divided by 8
(0–59). `hblank` and `vblank` mark what lies outside the active area. All of
these are decoded from the same state registers, so they agree in every cycle.

## The playfield

`pong_display` is purely combinational. It returns the colour of the current
cell, and where objects overlap, the one later in this list wins:

| object | where (cells) | colour code |
|---|---|---|
| background | everywhere | 00 black |
| walls | lines 9 and 58, full width | 11 cyan |
| left paddle | column 7, lines `left_y` .. `left_y`+8 | 11 cyan |
| right paddle | column 73, lines `right_y` .. `right_y`+8 | 11 cyan |
| ball | (`ball_x`, `ball_y`) | 01 red |
| scores | columns 8–11 (left), 64–67 (right), lines 0–15 | 10 magenta |

Each score digit is a 4 x 8 glyph from `digit_rom`, at address
`{digit, line[2:0]}`. Bit 3 of a row is the leftmost cell. Row 0 of every glyph
is blank. Because the row index is `line[2:0]`, the digit appears twice, on
lines 0–7 and again on 8–15, where it overlaps the top wall.

`vga_int` maps the codes to one bit each of R, G and B: black 000, red 100,
magenta 101, cyan 011. On the board the three red pins, three green pins and
two blue pins of the resistor DAC are each driven by their colour's single
bit, so every colour is at full intensity.

## Game rules (`pong_paddles`, `pong_ball`)

The game state steps at the rising edge of vertical sync, which is invisible
time. A whole frame is always drawn from one consistent state.

* **Paddles**: one cell per frame in the requested direction. The top is
  clamped to lines 9–50, so a paddle never passes a wall. Both paddles start
  at line 9.
* **Speed**: the ball moves on one frame in `BALL_DELAY`+1. With the default of
  4 that is every fifth frame, about 12 cells per second.
* **Vertical**: on each move the ball goes `ball_yrate` lines (0 or 1) up or
  down. It reverses when it is at or past line 9 or line 58.
* **Paddle hit**: a ball at column 8 moving left, or column 72 moving right,
  bounces if its line lies within the paddle. Where it hits sets the new
  vertical motion:

  | offset below the paddle top | new vertical motion |
  |---|---|
  | 0–3 | upwards, one line per move |
  | 4–5 | flat |
  | 6–8 | downwards, one line per move |

* **Walls and scores**: a ball that reaches column 2 or column 77 bounces. If
  it was in play (`in_play`), the opposite player scores. Scores count 0–9 and
  then wrap to 0. A score takes the ball out of play. It keeps bouncing, and
  no score counts, until `serve` puts it back in play on a later move.
* **Reset**: the ball starts at column 2, line 32, heading right and down, out
  of play. Both scores are 0.

## How far the RTL follows its source, and where it departs

These parts follow the original game design: the receiver state machine and
handshake, the key map and release logic, the timing segment lengths, the
glyphs, the colour map, the screen geometry, the paddle rules, the speed
divider, the vertical bounce, and the wall scoring gated by `enable`.

This implementation made the following choices:

* **Ball at the paddles, and serving.** The paddle-hit test, the zone rule
  above (built on the original zone bounds 4/6/8), "serve puts the ball in
  play" and the reset directions are this design's own rules. They are the
  most likely place for behaviour that differs from the original game.
* **One clock domain.** The original clocks the PS/2 receiver on the keyboard
  clock, the vertical counter on a derived line clock, and the game logic on
  the registered vsync. Here everything runs on the 25 MHz clock, with
  enables for those events.
* **Synchronous, active-high reset** (`btn3`) everywhere. The title display
  has no reset and uses a power-up value instead.
* **Vertical blanking.** The colour is also forced to black outside the 480
  active lines (`vblank`). The original blanks only horizontally.
* **No extra latencies.** The ROM digit select is combinational, and each
  paddle uses one position register. The original's one-clock and one-frame
  delays are gone.
* **Timing segments.** Each timing segment is exactly its parameter long. The
  original's registered counter reset would add one clock or one line per
  segment.
* **Title display.** `game_title` shows "PonG". Only its name and its ports
  come from the original board design. The text, the segment order
  `{a,b,c,d,e,f,g,dp}`, active-low drive and a 2^15-clock digit time are
  assumptions.

Not part of the RTL: the VGA resistor DAC and connector, the PS/2 connector,
the displays, the clock oscillator and pin constraints. The top brings out
every signal they connect to.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. Build one with Verilator 5, for example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    -y rtl -y tb +libext+.sv rtl/pong_pkg.sv tb/tb_pong_top_full.sv \
    --top-module tb_pong_top_full
./obj_dir/Vtb_pong_top_full
```

The RTL has no timescale of its own, hence `--timescale`. Some testbenches
mix integer and narrow signal widths on purpose, and Verilator reports these as
warnings, hence `-Wno-fatal`. The RTL itself builds without warnings at
Verilator's default settings.

| testbench | what it establishes |
|---|---|
| `tb_ps2_ctrl` | 20 frames arrive intact and once each; trigger latency 3 clocks; scan_ready length; a frame is held while do_read is low |
| `tb_read_ps2` | press/release sequences, including overlapping keys and E0/F0, against a reference model; update one clock after scan_ready |
| `tb_vga_core` | line 805 / hsync 96 / active 640 clocks; frame 519 / vsync 2 / active 480 lines; porch placement; cell coordinates |
| `tb_digit_rom` | all 128 addresses against glyphs drawn as text |
| `tb_vga_int` | colour map and one-clock latency |
| `tb_pong_paddles` | random requests against a clamped counter; both clamps reached |
| `tb_pong_ball` | 60,000 frame ticks against a reference model; every hit zone, both scores, the 9→0 wrap, serve, and bounces with the ball out of play all occur |
| `tb_pong_display` | every cell of 40 random states against a picture model |
| `tb_cntrl` | frames captured from the sync and colour outputs, compared with a picture model; paddle and ball step rates; blanking |
| `tb_game_title` | digit scan order, lit time and letters |
| `tb_pong_top` | scripted players on a PS/2 model rally until every mechanism has happened (~420 frames, ball at one cell per frame); about 2 minutes |
| `tb_pong_top_full` | the top at its default parameters: key press/release moves and stops a paddle, ball speed divider, pictures and sync at the pins, LEDs, title |

The testbenches that read the picture back sample the colour pins in the
middle of every 8 x 8 cell. They locate the active area from the sync pins
alone: it starts 149 clocks after hsync falls and 29 lines after vsync rises.

## Changing it

* Ball speed: `BALL_DELAY` on `pong_top`, `cntrl` or `pong_ball`.
* Display timing: the `H_*` and `V_*` parameters of `cntrl` and `vga_core`.
  The grid needs `H_ACTIVE` = 640 and `V_ACTIVE` = 480 to span 80 x 60 cells.
* Geometry, keys and colours: `pong_pkg`.
* A different pixel clock needs different timing parameters. The receiver
  and the title display work at any clock well above 100 kHz, but the title
  display's `SCAN_BITS` should be adjusted.
