# SmartKit: a hardware near-miss learner for sketched shapes

A user draws a shape in the air with a red laser pointer, one straight stroke
at a time, in front of a camera pointed at a dark background. The chip learns
what a shape is from four example drawings. Later it recognises new drawings
of that shape, even when they are bigger, smaller, moved or slightly
distorted. Recognition works on the *relative* geometry of the strokes, not
on the pixels. For every pair of strokes it keeps four numbers: how long and
in which direction the second stroke is compared with the first, and the same
for an imaginary line from the start of the first stroke to the start of the
second. Learning stores, for each of those numbers, its mean and its spread
over the examples. Recognition adds up how far a new drawing falls outside
that spread, and the definition with the smallest error wins.

Everything is in synthesizable SystemVerilog. This includes the arithmetic,
which uses a small IEEE single-precision floating point unit built from
multi-cycle state machines.

```
 camera ─► video decoder chip ─► video_decoder ─┬─► decoder_write_to_ram ─► user_image_ram ─┐
 (BT.656 bytes, 27 MHz)                         └─► extract_coordinates                     │
                                                        │ stroke end points                 │
                               train / recognize ─► ai_module ── selector, enable ─► display ◄┘
                                                                                 │ 25 MHz
                                                                        VGA DAC + monitor
```

## Top level (`smartkit_top`)

| port | meaning |
|---|---|
| `clk` | 27 MHz video byte clock. The input stage and the AI module run on it. |
| `pixel_clock`, `locked` | 25 MHz pixel clock from an external clock manager, and its lock flag |
| `reset` | synchronous, active high, used in both clock domains |
| `video_data[7:0]`, `decode_en` | BT.656 byte stream from the video decoder chip |
| `coord_button` | press at the start and at the end of each stroke |
| `train`, `recognize` | switches. A rising edge adds the current drawing as a training example, or recognises it. |
| `image_clear` | wipes the stored drawing (takes 2^18 clocks, `image_clearing` is high meanwhile) |
| `vga_out_*` | RGB, composite blank and sync, and pixel clock for the DAC; hsync and vsync for the monitor |
| status | `coord_valid`/`coord`, `selector`, `shape_valid`, `best_score`, `ai_phase`, `def_valid`, `examples_held` |

The camera, the video decoder chip, the clock manager, the DAC and the monitor
are not part of the RTL. The testbenches model the camera and decoder
together as a byte-stream source (`tb/tb_video_src.sv`).

Capacity, all set in `rtl/smartkit_pkg.sv`: up to 8 strokes per drawing (16
end points, 28 stroke pairs), 4 examples per training set, and 4 definitions.
These are the original design's numbers.

## Input stage

**video_decoder** follows the byte stream. Each line starts and ends with a
timing reference `FF 00 00 XY`, where `XY = {1, F, V, H, P3..P0}` and the
protection bits are checked. From these codes it produces one-clock pulses:
`eav` and `sav` (end and start of active video), and `sof` and `sef` (the SAV
of the first active line of the odd and of the even field). `vbi` follows the
V bit. A 2-bit byte counter, restarted at every SAV, marks the luminance bytes
(`y_valid`). `pix` is 1 when the luminance is above 80 (`THRESH = 8'h50`).

**decoder_write_to_ram** is a state machine. It waits for the odd field,
counts luminance samples (x, 0..639) and lines (y, 0..239), and writes a 1 at
address `{y[7:0], x[9:0]}` for every white pixel. The even field is followed
but not stored, so one field is the stored image. Only white pixels are
written. The drawing therefore builds up as the spot moves, until
`image_clear` wipes it.

**extract_coordinates** runs when `coord_button` rises. It takes the next
complete odd field as a snapshot and keeps the position of its brightest pixel
(the laser spot), counting x and y exactly as the RAM writer does. At the
start of the following even field it reports that position with one
`coord_valid` pulse. Two presses per stroke give its start and end points.

## The learning algorithm

The drawing arrives as points p0, p1 (stroke 0), p2, p3 (stroke 1), and so on.
Strokes must be drawn in the same order and direction every time.

1. **Line**: for stroke k, `len = sqrt(dx² + dy²)`, and `ang` is its direction
   in degrees, in [0, 360). Screen y grows downwards.
2. **Line pair**: for strokes i < j, with k the imaginary line from the start
   of i to the start of j:

   | value | definition |
   |---|---|
   | 0 | `len_j / len_i` |
   | 1 | `ang_j − ang_i`, wrapped into (−150, 210] |
   | 2 | `len_k / len_i` |
   | 3 | `ang_k − ang_i`, wrapped into (−150, 210] |

   Ratios and differences do not change when the drawing is scaled or moved.
3. **Definition** (after 4 training examples): for each pair and each value,
   `mean` and the population standard deviation `std = sqrt(Σ(v − mean)² / 4)`.
4. **Score** (recognition): `error = Σ (v − mean)²` over all values with
   `|v − mean| > std`. Values inside one standard deviation cost nothing. The
   definition with the lowest error is selected.

The wrap range of the angle differences needs a word. A range centred on 0
would put its edge at ±180°. Antiparallel strokes (opposite sides of a
square) sit exactly there, so jittered drawings of the same square give
+179.6 in one example and −179.8 in the next. The mean and spread of such a
set are meaningless, and recognition of squares fails. Moving the edge to
−150 / 210 keeps it away from the differences that triangles, squares and
rectangles produce (0, ±45, ±60, ±90, ±120, ±135, 180). The original
description does not say how angles are compared. Any fixed edge still hurts
shapes whose strokes turn by about 150°, and this is a known limit of this
design.

## AI module (`ai_module`)

Five state machines, four kinds of memory, one ROM and one shared floating
point ALU, connected like a production line:

| memory | content | written by | read by |
|---|---|---|---|
| `coord_mem` (SRAM 1) | stroke end points, in arrival order | input stage | Line |
| `lines_mem` (SRAM 2) | `{len, ang}` per stroke | Line | Line Pair |
| `linepairs_mem` (SRAM 3) | 4 values × 28 pairs × 4 example slots | Line Pair | Definition, Score |
| `definitions_mem` (SRAM 4, ×4) | `{mean, std}` per value and pair, plus a valid flag | Definition | Score |
| `atan_rom` | atan(i/256) in degrees, i = 0..256 | — | Line |

- **major_fsm** sequences the work. On a train edge it runs Line and then Line
  Pair into example slot n. After the fourth example it runs Definition into
  the next definition copy (round robin) and starts a new set. On a recognize
  edge it runs Line and Line Pair into the next free slot, so a half-finished
  training set is kept. Then it runs the Score Calculator once per valid
  definition and keeps the lowest score, which gives `selector` and `enable`.
  After every drawing it clears `coord_mem`. The `phase` output shows which
  worker is busy.
- **line_fsm** computes the lengths and angles. The angle comes from the ROM:
  `r = min(|dx|,|dy|) / max(|dx|,|dy|)` gives `a = atan(r)`, which becomes
  `90 − a` for steep strokes and is then folded into the right quadrant
  (`180 − a`, `180 + a`, `360 − a`). The table step of 1/256 in r gives angles
  within about 0.11°. The same unit computes the imaginary line when Line Pair
  asks for it (`seg_req`).
- **linepair_fsm**, **definition_fsm** and **score_calculator** implement
  steps 2 to 4 above.
- All arithmetic goes through **float_alu**. Only one worker is active at a
  time. Their requests are OR-merged (an assertion checks that at most one
  `go` is high) and the answer is broadcast.

Timing at 27 MHz: one stroke takes about 1.4k cycles, mostly the square root.
A 4-stroke drawing takes about 15k cycles, a definition about 1.5k cycles per
value, and a recognition a few thousand cycles per definition. All of this is
well under a video frame.

## Floating point unit

IEEE single precision. Denormals are treated as zero, results are truncated,
and every unit has a `go`/`done` handshake.

| unit | method | cycles from `go` to `done` |
|---|---|---|
| `float_add` / `float_sub` | align the smaller operand, add or subtract, normalise (3 guard bits) | 4 |
| `float_mul` | 24×24 product, exponent sum | 3 |
| `float_div` | restoring long division, one quotient bit per clock, `QBITS = 23` bits | 26 |
| `float_sqrt` | Newton: x₁ = (x₀² + A) / (2x₀), x₀ = A, `ITERS = 32`, using the shared mul/add/div | ~1.3k |
| `float_alu` | starts the unit chosen by `alufn`, registers the result | +1 |

Special cases: division by zero gives +∞, the square root of a negative number
gives NaN, and overflow gives ±∞.

## Display stage (`display`)

- **sync_gen** produces 640×480 timing at 25 MHz. A line is 640 + 16 + 96 + 48
  = 800 pixels. A frame is 480 + 11 + 2 + 31 = 524 lines, the count of the
  original design (standard VGA uses 525).
- **disp_vga** computes one address for every pixel. In the upper-left 128×128
  corner it is `line*128 + pixel`, going to the four shape ROMs. Elsewhere it
  is `{line/2, pixel}` into the image RAM, so each stored line is shown twice.
- **shape_disp** is a state machine: INIT waits for `locked`, IDLE waits for
  `enable`, ENABLE dispatches on `def_sel` to DISP_TRI (0), DISP_SQUARE (1),
  DISP_EQ_TRI (2) or DISP_RECT (3), and DISP_* returns to IDLE when `enable`
  falls. The user's drawing is always shown, white on black. The corner shows
  the selected shape's ROM only in a DISP state.
- **shape_rom** holds the images: outlines drawn at elaboration (red right
  isosceles triangle, green square, blue equilateral triangle, yellow
  rectangle). These drawings are placeholders for real artwork.
- `enable` crosses from the 27 MHz domain through two flip-flops. `selector`
  is stable while `enable` is high.

Pipeline: RGB, blank and composite sync leave together, 3 pixel clocks after
the counters. hsync and vsync leave 2 clocks later, matching the DAC's
two-cycle pipeline. All control outputs are active low.

## What follows the original design and what does not

Taken from the original design:
- the stage structure and the block names;
- the TRS decoding and the luminance threshold of 80;
- the 18-bit `{y, x}` image address;
- the state names of the RAM writer and of the shape display;
- the four values, mean/standard deviation learning and the score rule;
- the FSM/SRAM/ROM/ALU organisation of the AI module;
- the ALU's operations, its 23-step division and its Newton square root;
- the VGA timing numbers and the 128×128 definition corner;
- the capacity limits (8 strokes, 4 examples, 4 definitions).

Choices made here, where the original is silent or inconsistent:
- the contents of the arctangent ROM and the way angles are derived;
- the angle wrap range;
- the population standard deviation;
- the squared excess as the score increment;
- the switch-edge handshakes, the example-slot and definition-copy
  bookkeeping, and the clearing of stored points;
- the odd-field snapshot used to find the laser spot;
- rounding by truncation;
- the shape images.

Where the original is inconsistent:
- It calls the stored image 320×240, but its address has a 10-bit x. This
  design stores 640×240.
- It says hsync/vsync are both "delayed" and "asserted earlier" by two cycles.
  They are delayed here, to match the DAC.
- Shape 3 is a square in the prose and a rectangle in the state diagram. It is
  a rectangle here.

The original reports that its coordinate counters were unreliable. The
counters here are tested against a stream model.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values are computed independently
in the testbench (double-precision reals, `tb/tb_fp_pkg.sv`,
`tb/tb_ai_model_pkg.sv`). The main ones:
- The floating point units are checked against real arithmetic, including
  their cycle counts.
- The Line, Line Pair, Definition and Score machines are checked against
  double-precision references, using the real ALU.
- `tb_ai_module` trains four shapes from jittered, scaled and shifted
  drawings, then recognises fresh drawings of each.
- `tb_ai_workload` runs the original design's own test: a set of right-angled
  isosceles triangles, then recognition of a triangle that is not
  right-angled. It checks the error value against the reference.
- `tb_sync_gen`, `tb_disp_vga` and `tb_display` follow every pixel of a frame.
- `tb_smartkit_top` is the end-to-end test at full size with default
  parameters. A camera model moves the laser spot, the test presses the
  button for each end point, trains two definitions (triangles, squares) and
  recognises one of each. It checks every captured coordinate and every white
  pixel on the VGA output, the shape colour in the corner, and the image wipe.
  It simulates about 2 s of real time, roughly 75 s of wall time.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/` (the ROM file is read as `rtl/atan_rom.hex`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/smartkit_pkg.sv tb/tb_fp_pkg.sv tb/tb_ai_model_pkg.sv \
    rtl/*.sv tb/tb_video_src.sv tb/tb_smartkit_top.sv --top-module tb_smartkit_top
./obj_dir/Vtb_smartkit_top
```

For a single block, list the package files, the block's files and its
testbench. Testbenches of the arithmetic blocks also need `tb/tb_fp_pkg.sv`.

## Known limits

- Strokes must be drawn in the same order and direction as in training. There
  is no stroke matching.
- The angle wrap edge (−150°/210°) is a fixed choice. Shapes whose strokes
  turn by about 150° will recognise poorly.
- The square-root latency (~1.3k cycles) dominates the AI timing. Fewer
  Newton iterations (`SQRT_ITERS`) would do for the small values that occur.
- The 8-bit y coordinate holds one 240-line field. Interlaced full-frame
  resolution is not used.
