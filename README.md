# Procedural solid texture mapping in hardware

A solid (3-D) texture of 512 x 512 x 512 texels at 8 bits per color would
need a gigabit of texture memory. This design stores no texture at all: it
computes the color of every pixel on the fly from the pixel's texture
coordinates (u, v, w), with Perlin noise summed over several octaves and a
small per-texture coloring rule. Six textures are provided: marble, wood,
brick, fog, cloud and fire.

The hardware is the back end of a rendering pipeline. A host program does
the world-to-screen transformation, clips and projects triangles, cuts them
into screen-space quads (trapezoids with horizontal top and bottom edges)
and sends each quad as a short list of 32-bit instructions. The hardware
then

1. rasterises each quad into pixels and computes perspective-correct
   texture coordinates for each pixel (the *screen to texture space*, or
   STST, unit),
2. computes the color at those coordinates (the *procedural texture
   generator*), and
3. writes the pixel into the back half of a double-buffered 512 x 512 frame
   buffer, whose front half is shown on a 640 x 480 VGA raster.

Everything runs from one clock. The texture generator accepts one pixel
every four cycles, and that sets the pixel rate of the whole system.

```
 host ──req/instr/ack──► ptm_stst ──pixel (x,y,u,v,w)──► ptm_texgen ──color,(x,y)──► ptm_frame_buffer ──► rgb, hsync, vsync
                         ├ ptm_ifd   instruction fetch/decode       ├ ptm_fractal ─ ptm_perlin          ├ ptm_fb_ctrl
                         ├ ptm_q2s   quad → scan lines              │    ├ ptm_rng ─ ptm_xor_table      ├ ptm_fb_mem
                         └ ptm_s2p   scan line → pixels             │    ├ ptm_smooth                   └ ptm_vga
                              └ ptm_div (shared divider)            │    └ ptm_lerp
                                                                    ├ ptm_exp_table (fire)
                                                                    └ ptm_tex_{marble,wood,brick,fog,cloud,fire}
                                                                          └ ptm_color_table
```

## Instruction channel

The host talks to `ptm_top` through `req`, `instr[31:0]` and `ack`, a
two-phase handshake. The host places an instruction on `instr` and toggles
`req`. The hardware synchronises `req` through two flip-flops, executes the
instruction and toggles `ack`. The host may change `instr` again once `ack`
equals `req`. Because both sides only wait for edges, neither needs to know
the other's speed.

An instruction is `{op[1:0], pcode[4:0], value[24:0]}`:

| op | meaning |
|----|---------|
| 0 | write `value` into quad parameter `pcode` (0..20) |
| 1 | start rasterising the quad held in the parameter registers |
| 2 | switch frame buffers (back becomes front) |
| 3 | clear the back buffer to the background color |

The 21 quad parameters, in `pcode` order:

| pcode | parameter | format |
|-------|-----------|--------|
| 0, 1 | `yinit`, `yfinal`: first and last scan line | integer |
| 2, 3 | `xleftinit`, `xleftinc`: left edge at `yinit`, change per line | signed, 12 fraction bits |
| 4, 5 | `xrightinit`, `xrightinc`: the same for the right edge | signed, 12 fraction bits |
| 6..9 | `Y0s..Y3s`: the four projective sums at the quad's top-left pixel | signed integer |
| 10..17 | `a00, a01, a10, a11, a20, a21, a30, a31`: their x and y slopes | signed integer |
| 18..20 | `Uinit, Vinit, Winit`: offsets added to the texture coordinates | 16-bit texture format |

The unit holds an instruction back until it can run. In particular:

- A start waits until the previous quad has left the quad unit, and until
  any running clear has finished.
- A clear or switch waits until every pixel sent before it has been written
  to the frame buffer.

So the host never has to poll. It can write the next quad's parameters
while the previous quad is still being drawn, because the quad unit copies
all 21 parameters when it starts.

## From a quad to textured pixels

This is the part of the design that takes the most explaining.

### The mapping

For each triangle, the host finds an affine map between world space and
texture space. After perspective projection, a texture coordinate is a ratio
of two functions that are linear in the screen position (x, y):

```
u = Uinit + Y0 / Y3        Yk(x, y) = Yk(x0, y0) + ak0·(x − x0) + ak1·(y − y0)
v = Vinit + Y1 / Y3
w = Winit + Y2 / Y3
```

The host sends `Yk` at the quad's first pixel and the slopes `ak0` (per
pixel in x) and `ak1` (per line in y). The hardware never multiplies by x
or y. It only adds slopes as it walks the quad.

### Quad to scan lines (`ptm_q2s`)

On `start`, the unit copies the parameters and produces one scan-line
description per screen row, from `yinit` to `yfinal` inclusive. A
description holds:

- `y`
- the first and last pixel, `floor(xsleft)` and `floor(xsright)`
- the four sums `Y0s..Y3s` at the first pixel
- the per-pixel increments
- the three texture offsets

From one row to the next, `xsleft` and `xsright` move by their increments.
The left edge's first pixel moves by `xsdiff = floor(new xsleft) −
floor(old xsleft)` columns. So each sum becomes `Yks += ak0·xsdiff + ak1`.

Three adders do all of this, and the multiplications by `xsdiff` are done
by shift-and-add over 10 cycles:

| cycle | adder 1 | adder 2 | adder 3 |
|-------|---------|---------|---------|
| 0 | ys += 1 | Y0 += a01 | Y2 += a21 |
| 1 | xsleft += xleftinc | Y1 += a11 | Y3 += a31 |
| 2 | xsdiff (loads the multiplier shift registers) | – | – |
| 3–12 | xsright += xrightinc (cycle 3) | Y0 ± a00·2^k | Y2 ± a20·2^k |
| 13–22 | – | Y1 ± a10·2^k | Y3 ± a30·2^k |

Step k adds or subtracts `ak0 << k` when bit k of `|xsdiff|` is set; the
sign of `xsdiff` chooses between adding and subtracting. A line therefore
takes 23 cycles to compute. It is then handed to the output register, so
lines leave every 24 cycles. The next line is computed while the pixel unit
works on the current one. `|xsdiff|` must be below 1024 columns per line.

### Scan line to pixels (`ptm_s2p`, `ptm_div`)

For x = `floor(xsleft)` to `floor(xsright)`, the unit emits one pixel per
column, and always at least one. After each pixel it adds `a00, a10, a20,
a30` to the four sums. Each pixel needs three divisions, `Y0/Y3`, `Y1/Y3`
and `Y2/Y3`. All three share one pipelined divider (`ptm_div`), which
accepts one division per cycle.

So a pixel takes three issue cycles, and the pixel unit's peak rate is one
pixel per three cycles. That is faster than the texture generator's four.

Each division carries a tag: which quotient it is (u, v or w), x, y and the
offset to add. The tag stands in for the delay registers that a datapath
would otherwise need.

The divider works as follows:

- It does restoring long division on the magnitudes: 40-bit sums, 20-bit
  quotient with 6 fraction bits, 5 quotient bits per stage over 4 stages.
- The sign is applied at the end.
- The quotient truncates toward zero.
- It saturates when the quotient does not fit or when `Y3` is 0.
- Its latency is 5 cycles.

Finished pixels go into a 4-entry FIFO with a valid/ready output. A new
pixel is only issued when the FIFO has room for it and for every pixel still
inside the divider. So back-pressure from the texture generator never has
to stop the divider.

### Number formats

| quantity | format |
|----------|--------|
| x edge positions | 25-bit signed parameter, 12 fraction bits (27 bits inside the quad unit) |
| Yk sums | 40-bit signed, from 25-bit signed parameters |
| u, v, w | 16-bit unsigned, 6 fraction bits: 1024 texels per axis, 512 used, wraps |
| Perlin noise | 8-bit signed |
| fractal sum | 12-bit signed, 8·Σ 2^-i·P_i |
| color | 24 bits, 8 per component |

## Noise

### Random lattice values (`ptm_rng`, `ptm_xor_table`)

Each integer lattice point (a, b, c) gets a pseudo-random 8-bit value:

```
R(a, b, c) = T3( T2( T1(a) + b ) + c )
```

Here `T1..T3` are XOR tables: each is a product, over GF(2), of the 8-bit
input with a constant 8 x 8 bit matrix, `y_i = XOR_j (x_j AND r_ij)`. This
costs a few XOR gates instead of a 256-entry RAM. Each matrix is
invertible, so each table is a permutation of 0..255.

### Perlin noise (`ptm_perlin`)

The noise unit works in these steps:

1. Split each coordinate into a lattice cell (integer part, taken modulo
   256) and a 6-bit fraction.
2. Eight random units give the values at the cell's corners.
3. Three ROMs, one per axis, apply `sm(f) = 3f² − 2f³` to the fractions
   (`ptm_smooth`, 64 x 6 bits).
4. Seven interpolators (`ptm_lerp`, `a + ⌊c·(b − a)/64⌋`) blend the
   corners: four along w, then two along v, then one along u.

The pipeline accepts a new input every cycle and has a latency of 4 cycles.

### Fractal sum (`ptm_fractal`)

One noise unit is reused for four octaves. Registers u, v and w are loaded
from the input and doubled each cycle. Each octave's noise value P is added
as `fractal = 2·fractal + P`, or `2·fractal + |P|` for turbulence. After
four octaves:

```
fractal = 8·P(u) + 4·P(2u) + 2·P(4u) + P(8u)
```

That is 8 times the usual sum with halving weights, with no multiplier
needed. The unit accepts one input every four cycles. Its result appears 9
cycles after acceptance.

## The six textures

All six share the fractal unit. Below, `F` is the fractal value and `ui`,
`vi` and `wi` are the integer texel coordinates.

| texture | noise | color rule |
|---------|-------|------------|
| marble | turbulence | `table[(vi + F/16) mod 128]`: stripes along v, bent by turbulence |
| wood | turbulence | `table[(ui² + vi² + wi + F/16) mod 128]`: rings around the w axis |
| brick | turbulence | brick or mortar by position; `table[{in_brick, F/16 mod 128}]` (256 entries) |
| fog | fractalsum | gray level `min(|F|/8, 255)` |
| cloud | fractalsum of (2u, v, w) | `c = ⌊√(32·max(F,0))⌋`; r = g = c if c > 64 else 0; b = 255 |
| fire | fractalsum of (u, e^-v, w) | `table[(F/16) mod 128]` |

More detail on three of the rules:

- **Brick.** Bricks are 12 x 5 texels with 1-texel mortar, so the pattern
  repeats every 14 x 7 texels. Every other row is shifted by half a period.
  A texel is brick when the remainder of v lies strictly between 1 and 6,
  and the remainder of u strictly between 1 and 13.
- **Fire.** `e^-v` comes from a 512 x 9-bit ROM (`ptm_exp_table`) holding
  `round(511·e^(−k/64))`. It is used as the shaped v, in eighths of a texel.
- **Color tables.** Each table (`ptm_color_table`) is a synchronous RAM
  with a load port, brought out as `tbl_we/tbl_sel/tbl_addr/tbl_data`. It
  powers up with a built-in palette.

### Texture generator (`ptm_texgen`)

The generator behaves like a texture memory: u, v and w go in, and a color
comes out.

- **Texture choice.** All six color rules are present. The static input
  `tex_sel` picks one; change it only while no pixel is in flight.
- **Input and rate.** The input has valid/ready and takes one pixel per
  four cycles.
- **Latency.** `out_valid` pulses with the color and the pixel's (x, y) tag
  11 cycles after acceptance. A pixel that had to wait in the input
  register comes out up to 3 cycles later.
- **Output.** The output cannot be stalled. The frame buffer always takes
  it.

## Frame buffer and display

- **`ptm_fb_ctrl`** writes each incoming pixel to the back buffer at
  `{back, y, x}`, one cycle after it arrives. A clear writes the background
  color to all 512 x 512 back-buffer words, one per cycle, with `busy` high
  for those 262,144 cycles. A switch swaps front and back. Clear and switch
  take precedence over pixels, and the instruction unit makes sure no pixel
  is in flight when either happens.
- **`ptm_fb_mem`** holds both buffers in one array of 2 x 512 x 512 words of
  24 bits. It has one write port and one synchronous read port, and a read
  of a word being written returns the old contents.
- **`ptm_vga`** generates 640 x 480 timing: 800 x 525 clocks per frame,
  negative sync pulses of 96 clocks and 2 lines. It reads the front buffer
  one clock ahead and outputs it registered. Columns 512..639 are black. Of
  the 512 rows, the first 480 are shown.

`frame_start` pulses at the first pixel of every frame.

## Where this design departs from the source design

- **One clock.** The original system ran the frame buffer at 25 MHz, as
  the monitor requires, and the rest at 12.5 MHz. Here everything shares
  one clock: at 25 MHz the VGA timing is standard and the pixel rate is
  6.25 M pixels/s.
- **Textures are selected, not loaded.** The original reconfigured an FPGA
  for each texture. Here all six coloring rules sit behind one shared
  fractal unit, selected by `tex_sel`.
- **Pixel step.** The scan-line-to-pixel algorithm as originally written
  adds the y slopes `ak1` per pixel. This contradicts the mapping it is
  derived from, in which a step in x adds the x slopes `ak0`, and the
  quad-to-line step, which already adds `ak1` per line. This design adds
  `ak0` per pixel.
- **Brick test.** The brick/mortar test uses the v remainder against the
  brick height and the u remainder against the width, as the datapath
  drawing has it (the prose swaps them).
- **Turbulence versus fractalsum.** Marble, wood and brick use turbulence
  (sum of |P|); fog, cloud and fire use the plain sum. The source's two
  formulas attach the absolute value to the other name; its prose, and the
  way each texture is described, use it as here.
- **Cloud square root.** The cloud texture takes a square root of the
  fractal sum before the cut-off, as its datapath drawing shows.
- **This design's own choices.** The source leaves these open:
  - all fixed-point formats and scale factors (the table above)
  - the XOR-table matrices
  - the palettes
  - brick dimensions, cloud cut-off and the exp-table scale
  - the divider's internals
  - the q2s cycle-by-cycle schedule
  - the command ordering rules
  - background color black

## Simulating

All files are SystemVerilog 2017 and need no vendor libraries. `ptm_pkg`
must come first. The testbenches also use the reference models in
`tb/ptm_ref_pkg.sv`. For example:

```
verilator --binary --timing --assert --top-module tb_ptm_top \
    rtl/ptm_pkg.sv tb/ptm_ref_pkg.sv $(ls rtl/*.sv | grep -v ptm_pkg) tb/tb_ptm_top.sv
./obj_dir/Vtb_ptm_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each has a watchdog.

The reference models in `ptm_ref_pkg` are written from the algorithms, not
from the RTL. They cover:

- the XOR tables and the lattice random values
- `sm` computed in floating point
- interpolation and Perlin noise
- the fractal sum
- every texture rule
- the whole quad rasterisation, in 64-bit integers

| testbench | what it checks |
|-----------|----------------|
| `tb_ptm_top` | Whole system, full size. See below. |
| `tb_ptm_stst` | Host-driven quads through fetch/decode, quad and pixel units; command ordering; back-pressure. |
| `tb_ptm_q2s` | Every scan-line description against the incremental walk; 24-cycle line spacing; back-pressure. |
| `tb_ptm_s2p` | Every pixel against the exact division; 3-cycle pixel rate; back-pressure. |
| `tb_ptm_div` | Random and edge-case divisions, saturation, 5-cycle latency. |
| `tb_ptm_texgen` | All six textures against the reference, 4-cycle rate, latency, table reload. |
| `tb_ptm_fractal`, `tb_ptm_perlin`, `tb_ptm_rng`, `tb_ptm_xor_table`, `tb_ptm_smooth`, `tb_ptm_lerp`, `tb_ptm_exp_table` | Noise datapath pieces against the models; the XOR tables checked to be bijections. |
| `tb_ptm_tex_*`, `tb_ptm_color_table` | Each coloring rule and the table RAM. |
| `tb_ptm_fb_ctrl`, `tb_ptm_fb_mem`, `tb_ptm_vga`, `tb_ptm_frame_buffer` | Writes, clears and switches; read-during-write; every clock of the 800 x 525 raster; displayed frames against a model. |

`tb_ptm_top` runs the whole system at full size (512 x 512 screen, 640 x
480 raster, no parameter overrides), about 1.7 million clocks:

- It clears both buffers, draws one random quad in each of the six
  textures, and switches buffers.
- It compares all 2 x 262,144 frame-buffer words with the model, and one
  whole VGA frame with the model.
- It reloads the marble color table, clears, starts a quad at once (so the
  start must wait for the clear), and draws and checks again.
- It draws a quad of four 201-pixel lines and checks that pixels come out
  at one per four clocks. The measured rate is 4.000 clocks per pixel:
  line changes are hidden completely.
- It counts the following and fails if any never happens:
  - back-pressure from the texture generator
  - a start held back by a clear
  - clears and switches
  - each texture
  - the table reload

## Limits

- The design has been simulated and synthesised generically. It has not
  been placed or timed on any device, so its clock rate is unknown.
- The test quads are random but well-formed: `Y3` stays positive and
  quotients stay in range. The host is expected to send such quads.
  Overflow only saturates.
- The noise lattice repeats every 256 texels along each axis.
- `xsdiff` must stay below 1024 columns per line.
- The palettes are plausible defaults. Load your own through the table
  port.
