# A low-power 3-D graphics chip for handheld devices, in SystemVerilog

This is register-transfer logic for a complete mobile 3-D graphics pipeline:
a geometry processor feeds triangles to a hard-wired rendering engine that
sets them up, rasterises them two pixels per clock, depth-tests them,
textures them with perspective-correct bilinear MIPMAP filtering and blends
them into frame and depth buffers held in on-chip DRAM, while a separate
post-processor sends the previous frame to the display through an
anti-aliasing or fog filter. The design is built around a handful of ideas
for saving power without losing throughput:

* **Work rate matching.** The processor runs four times faster than the
  renderer and talks to it through a small queue, the *bandwidth equalizer*,
  that only powers the SRAM banks it is using.
* **Depth first.** The depth test sits before texturing; a pixel pair that is
  hidden never reaches the texture stage, so nothing downstream toggles.
* **Fewer texture reads.** Two pixels need eight texels per clock. An
  *address alignment* stage removes requests that the two pixels share and
  requests already fetched for the previous pair, so usually only two or
  three of the four texture memories are touched.
* **Single-cycle read-modify-write memories.** Frame and depth DRAM return
  and accept a word in the same clock, so the pipeline needs no caches.
* **Software clock control.** Three speed modes and per-domain clock gating
  can be switched at any time without glitches.

The chip this follows renders a 256 x 256 screen with 24-bit colour and
16-bit depth at 66 Mpixels/s and 264 Mtexels/s with a 33-MHz rendering
clock. All sizes here are the chip's: the top level simulates at full size.

## Block map

```
                 vco_clk
                    |
             +-------------+   risc_clk, beq_clk (full rate)
             |   ppo_ccu   |   re_clk, mem_clk   (quarter rate)
             +-------------+
 processor       |      |
 ports   ---> mac32     |
 ---------> beq (1 kB, 4 banks) --128-bit commands--> re3d
                                                      |
   re3d:  command decoder -> tse -> span_gen -> span_intpl -> slimshader
          slimshader: depth test -> tex_addr x2 -> aal -> tex_filter x2 -> pix_blend x2
          mem_prog: crossbars + post-filter -> display
          4 x fb_macro, 4 x db_macro, 4 x tm_macro
```

| File | Role |
|---|---|
| `g3d_lsi` | top level: clocks, MAC, equalizer, rendering engine |
| `g3d_pkg` | shared types (vertex, setup, span, pixel pair, render state), command opcodes, table formulas |
| `ppo_ccu`, `clk_div`, `gdff` | clock dividers, mode selection, clock gating |
| `mac32` | 32 x 32 multiply-accumulate unit of the processor |
| `beq`, `beq_bank` | dual-clock command queue / scratch-pad RAM |
| `re3d` | rendering engine and its twelve DRAM macros |
| `tse`, `tse_sort_t2b`, `tse_mid_intpl`, `simd_div` | triangle setup |
| `span_gen`, `span_intpl` | edge walking and per-pixel interpolation |
| `slimshader` | the two-pixel pipeline |
| `tex_addr`, `aal`, `tex_filter`, `pix_blend` | texturing and blending |
| `mem_prog`, `mem_xbar` | front/back buffer switching, post-filter, display scan |
| `fb_macro`, `db_macro`, `tm_macro` | behaviour of the frame, depth and texture DRAM macros |

The processor core itself and the PLL are not part of this RTL. The
processor's interface (the MAC operands, the equalizer write and
scratch-pad ports, the speed-mode and gating controls) and the PLL's clock
and feedback clock are ports of `g3d_lsi`.

## Clocks and the power optimizer (`ppo_ccu`)

The VCO clock is divided by M into the FAST tap, then by 2 (NORMAL) and by 2
again (SLOW); a final divide by N returns to the PLL's phase detector. One
of the three taps is chosen by one-hot `mode_fast/normal/slow` inputs. Each
tap passes through a *gated D flip-flop*: a flop that samples its enable on
the falling edge of its clock and ANDs it with the clock. Because the enable
can only change while the clock is low, a mode switch never produces a
shortened pulse, and it takes effect within one cycle. The selected clock
drives the processor and the write side of the equalizer; the same clock
divided by 4 drives the rendering engine and the DRAM macros, so the two
rendering clocks have identical edges. Each of the four clocks has its own
gating flop controlled by `clk_gate`.

M = `log2m_ctrl` + 1 and N = `log2n_ctrl` + 1. The chip names these controls
but not their encoding; its undivided path is taken as divide-by-1.

One asynchronous reset clears the dividers, the gating flops and the logic of
all four domains.

## Command queue (`beq`)

The processor writes 32-bit words; four words (bits [31:0] first) make one
128-bit command. The queue holds 64 commands in four 256-byte banks of 16
entries. The write and read pointers cross between the fast and slow clocks
as Gray codes through two-flop synchronisers. A bank is enabled only when it
holds queued entries or the write pointer is in it, so with a short queue
three of the four banks stay idle. `wr_ready` drops when all 64 entries are
full, which stalls the processor.

With `spad` high the same SRAM is a 256 x 32-bit scratch pad for the
processor (reads return one clock later). Change `spad` only while the
queue is empty.

## Command set (`re3d`)

Opcode in bits [127:124]:

| Op | Name | Fields |
|---|---|---|
| 1 | VTX | [123:122] slot, [121:114] x, [113:106] y, [105:90] z, [89:66] rgb, [65:50] u, [49:34] v, [33:18] w |
| 2 | TRI | draw the triangle in the three vertex slots |
| 3 | RECT | [121:114] x0, [113:106] y0, [105:98] x1, [97:90] y1 (inclusive), [89:66] rgb, [65:50] z; 2-D fill |
| 4 | STATE | [123] depth test, [122] texture, [121] point sampling, [120:119] texture mode, [118] alpha blend, [117:110] alpha, [109:106] log2 texture size, [105:88] texture base |
| 5 | TEXW | [123:122] texture macro, [121:104] word, [103:80] texel |
| 6 | SWAP | exchange front and back buffers |
| 7 | MPCMD | [123:108] post-filter command, [107:84] fog colour, [83:68] fog bias |

TRI and RECT queue behind drawing in progress. STATE, TEXW, SWAP and MPCMD
wait until the pipeline is empty, so the render state never changes under a
primitive. Texture coordinates are homogeneous: u/w and v/w must lie in
[0, 1], so w >= u, v. Larger depth means nearer: a pixel is kept when its
new Z is greater than the stored one. The opcode numbers and field layout
are this design's own; the chip only says that it uses 128-bit commands
carrying coordinates, texture coordinates and colours.

## Triangle setup (`tse`, `simd_div`)

Setup takes four clocks after a triangle is accepted:

1. **Sort.** The three vertices are sorted top to bottom by the signs of
   their y differences, and all edge differences are formed in eight lanes
   (X, Z, R, G, B, U, V, W).
2. **Divide.** Three 8-lane dividers compute dA/dy for the long edge and
   the two short edges.
3. **Middle point.** The long edge is evaluated at the middle vertex's row.
   The side of the middle vertex gives the triangle's orientation, and the
   difference in each lane is divided by the x distance (4th clock, reusing
   one divider) to give the per-pixel gradient dA/dx.

The divider does not divide. An 8-bit divisor addresses a 256-entry table
holding an 8-bit mantissa and a 3-bit exponent of its reciprocal. The eight
lanes multiply their dividends by the mantissa and shift by the exponent.
The table entries are computed in SystemVerilog from
`mantissa = round(2^(8+e) / dy)` with `e = ceil(log2 dy) - 1`. Quotients
carry 8 fraction bits. Colour and x results are 17 bits wide; depth and
texture results are 25 bits.

*Precision limit.* The x distance used for dA/dx is a whole number of
pixels. A skinny triangle, whose middle vertex lies a few pixels from the
long edge, gets a coarse gradient. Depth and colour stay exact at the
vertices' rows but can drift by several percent across such a triangle.

## Rasterising (`span_gen`, `span_intpl`)

`span_gen` visits rows y0 to y2 - 1, one per clock. On each row it
evaluates the long edge and the active short edge. It covers the pixels
with ceil(left) <= x < ceil(right) and starts every attribute at the first
covered pixel. Empty rows produce no span. Rectangles come through the same
path as constant-colour spans marked 2-D.

`span_intpl` cuts each span into pixel pairs. PP0 takes the even x and PP1
the odd x, and each pixel has a mask bit. One pair leaves per clock.

## The pixel pipeline (`slimshader`)

Three stages, two pixels per stage:

1. **Depth.** Both pixels read their stored depth from the back depth
   macros (macro 0 for even x, macro 1 for odd x; word address
   `{y, x[7:1]}`), compare, and write the new depth in the same clock. The
   write mask is "new Z > old Z", or always when the depth test is off or
   the pair is a 2-D fill. **Depth-first clock gating:** only a pair with at
   least one surviving pixel is loaded into the texture-stage latch. A
   hidden pair is dropped here and is counted on `ev_dfcg`.
2. **Texture.** Two `tex_addr` units compute U = u/w and V = v/w. The
   leading zeros of w are removed, its next 8 bits (rounded) index a
   reciprocal table, and u and v are shifted by the same amount. The pair's
   MIPMAP level comes from the U/V step between its two pixels. Bilinear
   mode asks for the four texels around each sample (point mode asks for
   one). The eight requests go to `aal`.
3. **Blend.** When the texels arrive, each pixel filters its four texels,
   combines the result with its colour, optionally alpha-blends with the
   frame-buffer colour, and writes the back frame macro in the same clock.
   The texture modes are: colour only; replace; modulate, `c*(t+1)/256`;
   saturating add. Alpha is one value per primitive. The blend weight is
   alpha + 1 for alpha >= 128, so that 255 means opaque.

`in_ready` falls only while the texture stage waits for a second texture
access (a macro conflict, below).

## Texture address alignment (`aal`)

Textures are spread over the four texture macros by the parity of the texel
coordinates: macro = `{t[0], s[0]}`, so the four texels of any bilinear
footprint are in four different macros. The word within a macro is
`tex_base + level_offset + (t/2) * (width/2) + s/2`. Level 0 is stored
first, then each smaller level.

For each pixel pair:

* The **spatial aligner** (16 comparators) marks each PP1 request that
  equals a PP0 request. With a texel step near one pixel, PP1's footprint
  overlaps PP0's by half or more.
* The **temporal aligner** marks each request equal to one of the eight
  texels of the previous pair at the same level. Those texels are still in
  the output latch, so they are reused instead of re-read. `flush`
  (pulsed by every STATE command) empties this store.
* The remaining requests go to the macros, one word per macro per clock. If
  two different words are wanted from one macro, a second access cycle
  follows and the pair takes two clocks.

The macros answer one clock after the request. The gathered texels are in
the output latch one clock later, or two with a conflict. The testbenches
report the averages. In the aligner test, random overlapping pairs needed
about 2.4 macro accesses and 1.2 clocks per pair.

## Memories (`fb_macro`, `db_macro`, `tm_macro`)

These model the behaviour of the on-chip DRAM macros as memory arrays:

| Macro | Count | Words x bits | Read latency | Write |
|---|---|---|---|---|
| frame | 4 | 32768 x 24 (768 kb) | 0 (same cycle) | in the same cycle under a write mask |
| depth | 4 | 32768 x 16 (512 kb) | 0 | same |
| texture | 4 | 262144 x 24 (6 Mb) | 1 | shared port |

Two frame macros and two depth macros make one buffer. Neither refresh nor
the DRAM row cycle time is modelled. A real chip would replace these files
with its macro wrappers.

## Front buffer, post-filter and display (`mem_prog`)

Two crossbars give macros 0 and 1 to the rendering pipeline and macros 2
and 3 to the display path, and swap the two pairs on SWAP. Each `lcd_tick`
displays one front-buffer pixel in raster order, with the result on
`lcd_rgb` one clock later and `lcd_frame_start` on pixel (0,0). For pixel x
the filter reads P = FB[x], Q = FB[x+1] (Q = P at the right edge) and the
front depth Z in the same tick.

The 16-bit filter command is [15:13] op, [12:10] a, [9:7] b, [6:4] c,
[3] write-back, [2:0] k. Per 8-bit channel:

* PASS: `OUT = P`
* FSAA (2 x 1 anti-aliasing): `OUT = min(255, (a*P + b*Q) >> c)`
* FOG: `OUT = fog + ((P - fog) * f) / 256`, with
  `f = min(255, (Z + bias) >> (k + 1))`

With write-back, the result also replaces the front-buffer pixel. This makes
a filter persistent; for example, the next frame shows the anti-aliased
image.

## Where this design departs from the chip it follows

* **Not built.**
  * The processor core and the PLL.
  * Motion blur in the post-filter, for which no formula is given.
  * Point and line drawing. Only triangles and filled rectangles are drawn.
  * DRAM refresh and timing.
* **Simplified.**
  * The post-filter runs on ticks of the rendering clock instead of its own
    display clock.
  * The crossbar passes 2 x (24 + 16) bits per client and direction, not a
    160-bit bus bit for bit.
  * FSAA's divisor c is a shift count, so c = 2 divides by 4.
  * The fog factor uses a shift in place of a division by the screen depth.
* **This design's own choices.** None of these are specified by the chip:
  * the command encoding and the render-state layout;
  * the reciprocal table formulas and all fixed-point widths inside setup
    and interpolation;
  * the level-of-detail rule, texture wrap and the texture memory layout;
  * the bilinear weight width (4 bits);
  * the blend formulas;
  * the pixel sampling rule;
  * the handshakes between stages;
  * the way textures are loaded (the TEXW command).
* **Known limit.** Gradients of skinny triangles are coarse (see Triangle
  setup).

## Testbenches

Every block has a self-checking testbench in `tb/<block>_tb.sv`. Each
compares against an independent model and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| Testbench | What it checks |
|---|---|
| `g3d_lsi_tb` | The whole chip at full size from the VCO clock. Exercises the MAC and the scratch pad, fills the queue to 64 entries while the rendering clocks are gated, then draws a scene: fills, occluding triangles, alpha blending, a texture upload, bilinear and point-sampled texturing, and speed-mode switches while drawing. Checks every pixel of the back buffer, then swaps and checks three displayed frames (pass, FSAA, fog) pixel by pixel. It counts each mechanism (stalls, bank use, mode switches, gating, depth failures, gated pairs, conflicts, spatial and temporal merges, point sampling, alpha, fills, swap, FSAA, fog) and fails if any never occurs. About 15 s. |
| `re3d_tb` | The engine from 128-bit commands: exact rectangles, occluding triangles, texturing, swap and display. |
| `slimshader_tb` | The pixel pipeline with real macros over a small window, against a depth/colour model in every render mode. |
| `aal_tb` | Texel delivery, merging and conflicts against a texture-memory model, including the one-extra-clock-per-conflict rate. |
| `mem_prog_tb` | Whole frames of every post-filter, write-back, and buffer swapping. |
| others | Unit tests of the divider, setup (against real-valued plane equations), edge walker, interpolator, texture address unit, filter, blender, MAC, queue, clock unit and memories. |

To run one with Verilator 5:

```
verilator --binary --timing rtl/g3d_pkg.sv -y rtl -y tb tb/g3d_lsi_tb.sv --top-module g3d_lsi_tb
./obj_dir/Vg3d_lsi_tb
```
