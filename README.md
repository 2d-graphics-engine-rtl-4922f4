# gfx2d — a small 2D drawing engine for a bus-attached frame buffer

A processor should not spend its time computing which pixels a line covers or
looping over a rectangle. This engine takes drawing commands as register writes
on an OPB bus (the on-chip peripheral bus of MicroBlaze-era Xilinx systems) and
turns them into a stream of frame-buffer writes. It has four drawing operations:

| op code | operation  | operands (data words 1..5)         |
|---------|------------|------------------------------------|
| `000`   | line       | x0, y0, x1, y1, RGB                |
| `001`   | blit (filled rectangle) | x0, y0, x1, y1, RGB   |
| `010`   | character  | x0, y0, ASCII code, –, RGB         |
| `011`   | set pixel  | x, y, –, –, RGB                    |
| `100`   | debug      | word 1 is pushed into a debug FIFO |

The screen is 640x480 with 24-bit colour. Coordinates are 10 bits. A pixel is
44 bits, packed as `{x[9:0], y[9:0], rgb[23:0]}`. The frame buffer is addressed
row by row: word address `y*640 + x`.

## Data flow

```
 OPB ──► opb_interface ──req/op/data──► decoder ──valid + 160-bit data──► pixel_op ─┐
            ▲  (registers)              (16 x 163 command FIFO)           blit     ─┤ enq/pixel
            │                              ▲ RTR from every unit          line_draw ─┤ ◄─ full
            └──── status bits ─────────────┘                               char_draw ─┘
                                                                             │
                         arbiter: 4 x (16 x 44) pixel FIFOs, round robin ◄───┘
                                    │
                                    ▼  fb_we / fb_addr / fb_rgb  (while fb_user_ok)
                           display controller's frame-buffer user port
```

1. **Posting a command.** Software writes the five data words, then writes the
   op code to the status register with bit 3 (request) set. The request is a
   one-cycle pulse that pushes `{op, data}` (163 bits) into the command FIFO.
   Status bit 7 says the command FIFO has room. A driver polls that bit before
   each post.
2. **Dispatch.** The decoder dequeues the head command only when *every*
   drawing unit reports ready-to-receive (RTR). In the same cycle it drives the
   160 data bits to all units and raises the one valid line that matches the op
   code. So only one unit is generating pixels at a time. Their output FIFOs can
   still be draining together, because a unit becomes ready as soon as it has
   enqueued its last pixel.
3. **Pixel generation.** Each unit writes at most one pixel per clock into its
   own 16-deep FIFO. When the FIFO is full, the unit freezes for that cycle
   (a stall) and loses nothing.
4. **Write-back.** The arbiter writes one pixel per clock to the frame buffer
   whenever the display controller grants user access (`fb_user_ok`). It serves
   the FIFOs round-robin and skips empty ones.

Ordering caveat: pixels from two different operations can reach the frame
buffer interleaved. A command can start while the previous one's FIFO still
holds pixels. Where two operations overlap, the final colour of a shared pixel
is not guaranteed to be the later one's.

## The drawing units

All four share one interface: `i_valid`/`i_data` in, `o_rtr` out,
`o_enq`/`o_pix` out, `i_full` in.

**pixel_op** captures x, y and colour into a one-entry holding register. It
enqueues the pixel as soon as the FIFO has room, and is not ready while it holds
one.

**blit** loads an x counter with x0 and a y counter with y0. Every unstalled
cycle it emits (x, y) and advances x. After x1 it returns x to x0 and advances
y. It stops after (x1, y1). A WxH rectangle costs W·H cycles plus stalls. The
corners must be given in order (x0 ≤ x1, y0 ≤ y1).

**line_draw** is integer Bresenham. The set-up takes four cycles, one per stage:
(1) |dx|, |dy|; (2) if |dy| > |dx| the line is *steep*, and x and y of both ends
are swapped; (3) the ends are swapped if x0 > x1; (4) deltax, deltay, the y step
(±1) and error = 0 are computed. The loop then walks x from x0 to x1, one pixel
per cycle. It plots (y,x) for steep lines and (x,y) otherwise. It adds deltay
to the error, and when 2·error ≥ deltax it steps y and subtracts deltax. The
first pixel leaves five cycles after `i_valid`. A line has max(|dx|,|dy|)+1
pixels.

**char_draw** reads a 64-bit glyph from `char_rom` (one cycle) and loads it into
a left-shift register. Then it looks at one bit per cycle. If the MSB is set it
writes the pixel (x0+countx, y0+county), then it shifts and advances the 3-bit
column counter, which carries into the 3-bit row counter. It finishes as soon as
the bits left in the register are all zero, so blank trailing rows cost nothing.
Only a set bit can be stalled by a full FIFO.

**char_rom** has 128 words, indexed by 7-bit ASCII. Row 0 is in bits 63:56, and
the leftmost pixel of a row is its MSB. Only A–Z and a–z have glyphs; every
other code draws nothing. The glyph of `A` is

```
..###...   38
.#...#..   44
.#...#..   44
.#...#..   44
.#####..   7C
.#...#..   44
.#...#..   44
........   00
```

The other 51 letters are 5x7 shapes in the same columns, designed for this
RTL. The contents are in `rtl/char_font.hex`, one 16-digit hex word per ASCII
code. To change the font, edit that file: word n is the glyph of code n, laid
out as above.

## Registers (256-byte OPB window, default base `0xFFFF_FF00`)

| offset | name | contents |
|--------|------|----------|
| 0x00 | status | [2:0] op (r/w), [3] request (write 1 to post; reads the pulse), [4] blit ready, [5] line ready, [6] char ready, [7] engine ready = command FIFO not full, [8] frame buffer user access OK (live input), [9]–[12] blit/line/char/pixel output FIFO full, [31:13] 0 |
| 0x04–0x14 | data 1–5 | command operands (r/w, reset 0) |
| 0x18 | debug | read: head of debug FIFO, which it also removes; `0xDEADBEEF` when empty |

After reset the status register reads `0x1F0` with the frame buffer granting
access, or `0x0F0` without. Bus bits are plain `[31:0]` vectors with bit 0
least significant. The OPB's own big-endian bit numbering is left to the
wrapper that connects the engine to a real bus.

**OPB timing.** The slave FSM goes IDLE → READ or WRITE → DONE → IDLE.
`Sl_xferAck` is high in the second cycle of `OPB_select`. Read data is valid in
that cycle, and `Sl_DBus` is zero in every other cycle. A write takes effect at
the end of the acknowledge cycle. The DONE cycle is ignored, so back-to-back
accesses take three cycles each. The slave never asserts error, retry or
timeout suppression, so those OPB signals are not ports.

## Arbiter

The arbiter has four states, one per FIFO, in the order 1 pixel, 2 blit,
3 line, 4 char. Each cycle it picks the first non-empty FIFO at or after the
current state and drives its head pixel to the write port. The port's outputs
are combinational (a Mealy machine). If `fb_user_ok` is high, the pixel is
written and dequeued, and the state moves to the FIFO after the one served,
which gives that FIFO the highest priority next. If `fb_user_ok` is low, the
state parks on the chosen FIFO. Any run of empty FIFOs is skipped within one
cycle.

## FIFOs

`sync_fifo` is a single-clock FIFO with a separate read and write pointer,
each one bit wider than the address. It is first-word fall-through: `o_data`
always shows the head. An enqueue while full and a dequeue while empty are
ignored. One enqueue and one dequeue can happen in the same cycle. The engine
uses six of them:

| FIFO | width | depth |
|------|-------|-------|
| command | 163 | 16 |
| pixel, blit, line, char output | 44 | 16 each |
| debug | 32 | 16 |

## Clocking, reset, ports

The engine has one clock domain; the original system ran it at 27 MHz. It uses
one synchronous, active-high reset, which empties every FIFO and clears all
registers. Memory arrays are not cleared.

Top-level ports of `gfx2d`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock, reset |
| `OPB_ABus`, `OPB_DBus`, `OPB_RNW`, `OPB_select` | in | 32/32/1/1 | OPB slave inputs |
| `Sl_DBus`, `Sl_xferAck` | out | 32/1 | OPB slave outputs |
| `fb_user_ok` | in | 1 | display controller grants frame-buffer access |
| `fb_we`, `fb_addr`, `fb_rgb` | out | 1/19/24 | one pixel write per clock edge with `fb_we` high |

Parameters of `gfx2d`: `C_BASEADDR`, `C_HIGHADDR`, `C_OPB_AWIDTH`,
`C_OPB_DWIDTH`, `RESOLUTION_H` (640), `FIFO_DEPTH` (16). There is no vertical
resolution parameter because no part of the engine uses the screen height. Shared types and op
codes are in `gfx2d_pkg`.

The display controller is not part of this RTL. It is the block that scans the
frame buffer out to the VGA DAC and grants user access between reads. So are
the processor, the bus, the clock managers and the SRAMs. The engine expects a
frame-buffer write port that accepts one word per clock while `fb_user_ok` is
high.

## Where this design makes its own choices

The structure follows the original engine. That covers the register map, the
op codes, the command FIFO with dispatch when every unit is ready, per-unit
16-deep output FIFOs, the round-robin arbiter, the counter-based blit,
Bresenham with four set-up stages, and the shift-register character unit. The
following details are choices made for this RTL:

- Argument placement in the data words: word 3 carries the ASCII code, and the
  colour is always word 5.
- The debug op pushes data word 1 into a 32-bit, 16-deep debug FIFO in the top.
- The y step in Bresenham is taken when 2·error ≥ deltax, the standard form of
  the algorithm.
- In the character unit, every glyph bit, lit or not, shifts the register and
  advances the counters. Pixel coordinates are added combinationally.
- A valid line is raised only in the cycle the command is dequeued, so a
  command runs exactly once.
- The FIFO uses separate read and write addresses and fall-through read.
- The frame buffer is addressed row by row (`y*640+x`, 19-bit word address),
  and colours pass through unchanged.
- The pixel unit has a one-entry holding register.
- 51 of the 52 letter glyphs are this design's own.
- There is no clipping. A coordinate outside 640x480 aliases to another
  address, so callers must stay on screen.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Run them from the repository root; the glyph
file is read as `rtl/char_font.hex`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/gfx2d_pkg.sv tb/tb_gfx2d.sv \
          --top-module tb_gfx2d -o sim && obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_sync_fifo` | random traffic against a queue model; full/empty; overflow and underflow ignored |
| `tb_decoder` | order, valid line per op code, data bus, dispatch only when all units are ready, unused codes dropped, full after 16 |
| `tb_pixel_op`, `tb_blit`, `tb_line_draw`, `tb_char_draw` | pixel sequences against reference models under random FIFO-full stalls, with exact cycle counts |
| `tb_char_rom` | glyph of `A`, every letter present, all other codes blank, registered read |
| `tb_arbiter` | round-robin order, addresses and colours against a model, one write per cycle when possible |
| `tb_opb_interface` | reset values, register read-back, request pulse, status bits, debug register, address decode, acknowledge timing |
| `tb_gfx2d` | the whole engine at default size (see below) |
| `tb_demo` | the driver's high-level drawing functions, each built from engine commands and checked against a reference image |

`tb_gfx2d` plays both the processor and the frame buffer. It first clears the
full 640x480 screen with one blit (307,200 pixels at one per clock). It then
sends 40 mixed commands while the frame buffer grants access only 100 cycles in
400. Finally it fills each unit's FIFO while the frame buffer is held busy. It
compares the whole frame buffer with a reference image, checks the total number
of writes, reads the debug words back, and fails if any of these never
happened: command FIFO full, decoder wait, arbiter skip, arbiter wait, a full
FIFO stall in each of the four units, each op code dispatched, and both kinds
of debug read. It runs in a few seconds with Verilator.

`tb_demo` runs clearScreen, fillRect, drawRect, fillSquare, drawSquare,
drawTriangle, drawStar, rotateSquare90, rotateStar90, drawString and a
pixel-by-pixel picture (ppmOp). The two rotate functions turn the shape from 0
to 90 degrees in 15-degree steps. Before each new frame they erase the
previous one by redrawing it in the background colour. The frame buffer behind the
engine grants access only outside the visible part of a 640x480 raster (800x525
clocks per frame), the way a display controller that scans the frame buffer
would. Measured cycle counts, from the first register access to idle:

| function | commands | cycles |
|----------|----------|--------|
| clearScreen (640x480 blit) | 1 blit | 1,228,847 (about 45 ms at 27 MHz) |
| fillRect 100x60 | 1 blit | 6,073 |
| drawRect 100x60 | 4 lines | 412 |
| drawTriangle | 3 lines | 360 |
| drawStar (radii 20/50) | 8 lines | 408 |
| drawSquare 50x50 | 4 lines | 292 |
| fillSquare 50x50 | 1 blit | 2,573 |
| rotateSquare90, side 60, 7 frames | 52 lines | 3,200 |
| rotateStar90 (radii 20/50), 7 frames | 104 lines | 4,312 |
| drawString, 15 characters | 15 chars | 803 |
| ppmOp 16x12 | 192 pixels | 4,085 |

Large fills are limited by frame-buffer access: only about 27% of clocks fall
outside the visible raster. Small shapes are limited by the processor's
register writes: each command needs seven OPB accesses of three cycles each.
