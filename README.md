# Pong on a VGA monitor: the FPGA display engine

Two players turn knobs and a ball bounces between two paddles on a 640x480
VGA monitor. The work is split between two chips. A microcontroller runs the
game: it reads the knobs, moves the ball, detects collisions and keeps score.
An FPGA only draws the picture. The two are joined by a 16-bit parallel bus.
On that bus the microcontroller writes numbers such as "ball x = 312" or
"paddle 2 y = 150".

This repository holds the FPGA side as synthesizable SystemVerilog. The FPGA
has no frame buffer. For each pixel, while the beam is drawing it, the logic
decides whether the pixel lies inside any shape. Every shape test is a small
piece of combinational logic on the current (column, row).

```
 40 MHz ──► vga_dcm ──25 MHz──┬──► vga_sync_gen ──► hsync_n, vsync_n
            (x5/8)            │          │ data_valid, vsync_n
                              ▼          ▼
 data[15:0] ────────────► vga_signal_gen ──► rgb[2:0]
                           ├ data_read        shape registers from the bus
                           ├ row_col_counter  (col,row) of the current pixel
                           ├ in_circle        round ball
                           └ in_box x 7       paddles, lines, score bars
```

## The bus from the game controller

Each bus word is `{code[5:0], value[9:0]}`. Bit 15 is set in every meaningful
code. The all-zero code `NONE` means "nothing".

| code (bits 15:10) | register      | code     | register       |
|-------------------|---------------|----------|----------------|
| `111000`          | paddle 1 x    | `110010` | paddle width   |
| `111001`          | paddle 2 x    | `110011` | paddle height  |
| `110000`          | paddle 1 y    | `101010` | ball width     |
| `110001`          | paddle 2 y    | `101011` | ball height    |
| `101000`          | ball x        | `100100` | score          |
| `101001`          | ball y        | `000000` | none           |

The score register holds player 1 in bits [2:0] and player 2 in bits [5:3].
The controller's firmware sends the codes as bytes on its upper port (0xE0,
0xC0, ...). Data bits [9:8] share that port, which is why each code appears
shifted by two.

The bus has no clock and no strobe. The receiver (`data_read`) samples the bus
on every pixel clock. Whenever the sampled code names a register, it writes
the value into that register. A word stays on the bus for many pixel clocks,
so the register is simply rewritten with the same value again and again.
Words are kept from tearing by the sender's write order:

1. put `NONE` on the upper byte;
2. write the low data byte;
3. write the code and data bits [9:8] together.

The low byte therefore never lands under an old code. One risk remains: the
receiver could sample in the middle of step 3, when the code and the upper
data bits have not both changed yet. The RTL adds a 2-flop synchroniser on
the bus (`SYNC_STAGES`, default 2) against metastability. It does not guard
against that mid-write sample, and neither does the original design.

After reset the registers hold a small ball at (320,240), paddles at x = 0
and x = 635, and a zero score. They keep those values until the controller
sends something.

## Timing: the 640x480 mode from a 40 MHz board clock

The VGA mode wants a 25.175 MHz pixel clock. The board has 40 MHz. The FPGA's
clock manager multiplies by 5/8 to get 25 MHz, which monitors accept. The
sync generator counts 800 clocks per line and 525 lines per frame. Both sync
pulses are active low:

| horizontal (pixel clocks) | count range | vertical (lines) | line range |
|---------------------------|-------------|------------------|------------|
| front porch 8             | 0–7         | front porch 2    | 0–1        |
| HSync pulse 96            | 8–103       | VSync pulse 2    | 2–3        |
| back porch 40             | 104–143     | back porch 25    | 4–28       |
| border 8                  | 144–151     | border 8         | 29–36      |
| active 640                | 152–791     | active 480       | 37–516     |
| border 8                  | 792–799     | border 8         | 517–524    |

At 25 MHz this gives 31.25 kHz and 59.52 Hz, against the 31.47 kHz and
59.94 Hz of the standard. The vertical counter steps on the clock edge that
starts each HSync pulse, so the VSync edges line up with HSync falling edges.
The original design got this by clocking the line counter from HSync. Here it
is a clock enable in the single pixel-clock domain.

`row_col_counter` turns the active-video flag into a position:

- `col` is 0 on the first active pixel of a line and is held at 0 outside
  active video.
- `row` steps after the 640th active pixel of a line and is cleared during
  VSync.

Both are registers, aligned with the `data_valid` of the same cycle. The
colour output is combinational from them. So the RGB for a pixel leaves in
the same clock as the sync generator marks that pixel active, and no pipeline
compensation is needed.

## What is drawn

| shape          | test        | where                                              | colour |
|----------------|-------------|----------------------------------------------------|--------|
| ball           | `in_circle` | bounding square at (ball x, ball y), diameter = ball width | green |
| paddles 1, 2   | `in_box`    | (paddle x, paddle y), width x height               | white  |
| top line       | `in_box`    | rows 76–77, full width                             | white  |
| bottom line    | `in_box`    | rows 478–479, full width                           | white  |
| centre mark    | `in_box`    | columns 320–321, rows 0–75 (above the play area)   | white  |
| score bars     | `in_box`    | rows 20–59, 64 px per point; player 1 from the left edge, player 2 from the right | blue |

The colour bits are ORs of the tests, gated by `data_valid`:

- red = paddles | lines
- green = ball | paddles | lines
- blue = paddles | lines | bars

`rgb` is `{blue, green, red}`. The three bits drive the monitor's analog
colour pins directly, so each colour is fully on or off.

### The round ball

The ball is the only non-rectangular shape. `in_circle` takes the ball's
corner (x1, y1) and diameter d. It sets r = d/2 and places the centre at
(x1+r, y1+r). A pixel is in the ball when (x−xc)² + (y−yc)² ≤ r², and also
lies in the square of side d+1 from the corner.

The original design computed the squares in 18-bit unsigned arithmetic.
Differences that went negative wrapped around, and the wrapped values drew
stray shapes all over the screen. The square guard was added to remove them.
In this RTL the differences are signed and the products exact (24 bits), so
the guard no longer changes the result. It is kept to match the original
structure and costs one `in_box`.

A 16-pixel ball covers 197 pixels. The corners of its bounding square are
dark.

### Box edges

`in_box` tests x1 ≤ x < x1+width and y1 ≤ y < y1+height. The sums are one bit
wider than the coordinates. A box that reaches past 1023 therefore does not
wrap back to column 0. The original kept 10-bit sums and reported faint
"ghost" lines to the right of boxes that it could not explain. This design
does not reproduce that behaviour.

## Clock manager and reset

`vga_dcm` is a **behavioural model** of the FPGA's Digital Clock Manager, a
vendor primitive. It cannot be synthesized. Its ports and settings match the
vendor wizard's wrapper:

| output       | clock                              |
|--------------|------------------------------------|
| `CLK0_OUT`   | the input (40 MHz)                 |
| `CLKDV_OUT`  | input / 2                          |
| `CLKFX_OUT`  | input x 5/8 = 25 MHz               |
| `LOCKED_OUT` | rises after 16 input cycles (a model choice) |

For an FPGA build, replace it with the vendor primitive configured the same
way: CLKFX multiply 5, divide 8, 1X feedback, and a 25 ns input period.

The pixel logic runs from `CLKFX_OUT`. The original top level wired the
*CLK0* output into the pixel logic, and its text also says the 25 MHz clock
comes out on CLK0. For a real DCM with 1X feedback that output is 40 MHz. The
5/8 clock is CLKFX, and this RTL uses it.

The pixel-clock domain is reset while `reset` is high or the clock manager is
not locked. That reset is asserted at once and released through two
flip-flops (a design choice). Reset types per block:

- `vga_sync_gen` has a synchronous reset.
- The shape registers in `data_read` have an asynchronous reset.
- `row_col_counter` has no reset; it is set by the first blanking interval
  and the first VSync pulse.

## Top-level pins

| port        | dir | meaning                                                      |
|-------------|-----|--------------------------------------------------------------|
| `clk`       | in  | 40 MHz                                                       |
| `reset`     | in  | active high                                                  |
| `data[15:0]`| in  | bus from the game controller                                 |
| `hsync_n`   | out | VGA connector pin 13                                         |
| `vsync_n`   | out | VGA connector pin 14                                         |
| `rgb[2:0]`  | out | `rgb[0]` red → pin 1, `rgb[1]` green → pin 2, `rgb[2]` blue → pin 3 |

On the connector, pins 6, 7, 8 and 10 go to ground.

## What is not here

- **The game controller** is a PIC18-class microcontroller running a C
  program. It is not hardware designed here. `tb/pic_model.sv` models what it
  puts on the bus, following its game rules:
  - fixed-point ball with 4 fractional bits;
  - a 640x400 table starting at row 78;
  - paddles 5x100 and a 16x16 ball;
  - each paddle hit speeds the ball up by 4/16 px per step and adds the
    paddle's motion to the ball's vertical speed;
  - play restarts after 5 points.

  In the model the paddles follow a script instead of the knobs.
- **The knobs** are analog potentiometers wired to the microcontroller's A/D
  inputs.
- **The monitor cable** is passive wiring.

## Files

`rtl/`:

| file                  | contents                                              |
|-----------------------|-------------------------------------------------------|
| `pong_pkg.sv`         | bus codes (enum), bus word and shape-register structs, reset values, VGA timing and screen-layout constants |
| `pong_vga_top.sv`     | the top                                               |
| `vga_dcm.sv`          | clock manager model                                   |
| `vga_sync_gen.sv`     | counters and sync decode; assertion that active video never overlaps a sync pulse |
| `row_col_counter.sv`  | pixel position                                        |
| `data_read.sv`        | bus synchroniser and shape registers                  |
| `vga_signal_gen.sv`   | shape tests and colour mixing                         |
| `in_box.sv`, `in_circle.sv` | shape tests                                     |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

- `pong_ref_pkg.sv`: an independent reference model of the picture;
- `pic_model.sv`: the game-controller model.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

The clock model uses timing controls, so use Verilator's `--timing`. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/pong_pkg.sv tb/pong_ref_pkg.sv rtl/*.sv tb/pic_model.sv \
  tb/tb_pong_vga_top.sv --top-module tb_pong_vga_top
./obj_dir/Vtb_pong_vga_top
```

`tb_pong_vga_top` runs the design at its default parameters.

- **Stimulus.** The game model plays one full game, about 90 frames.
- **Checking.** The testbench watches only the sync and colour outputs,
  rebuilds the beam position from the sync edges, and compares all 420,000
  clock positions of every frame with the reference picture.
- **Coverage.** It counts and requires each of these at least once:
  - clock-manager lock;
  - every bus code and `NONE` words;
  - paddle hits on both sides and wall bounces;
  - points for both players and a won game with the score restart;
  - ball pixels and dark ball corners;
  - score bars at 1–4 points.
- **Run time.** About 80 s.

The block testbenches take a second or less each.

Other block-level checks:

- Sync generator: periods and pulse widths (800/96 clocks, 525/2 lines), the
  position of active video relative to the sync edges, and 640x480 active
  pixels.
- Circle test: every pixel around balls of many sizes, and the 197-pixel
  count for d = 16.
- Bus decoder: its latency of 3 clocks, and that `NONE` and unmapped codes
  change nothing.

## Changing it

- **Timing.** The numbers in `pong_pkg` are also the default parameters of
  `vga_sync_gen`. Another mode needs new counter values and a matching
  clock-manager ratio. `row_col_counter`'s `ACTIVE_COLS` must follow the
  active width.
- **Screen layout.** Line positions, score-bar size and the 64-pixel step
  are package constants.
- **New shapes.** Add a code to `code_e` and a field to `shapes_t`, decode
  it in `data_read`, then add a test and OR it into the colours in
  `vga_signal_gen`. The testbench reference `pong_ref_pkg` has to be updated
  by hand.
- **Synchroniser.** `SYNC_STAGES = 0` on `data_read`/`vga_signal_gen` drops
  the synchroniser and samples the bus directly, as the original did.
