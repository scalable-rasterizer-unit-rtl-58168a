# Segmented deferred rasterizer: bounding box segmenting and hidden surface removal

A deferred renderer does not shade triangles as they arrive. It first collects the whole frame,
then works through the screen one small rectangle (a *segment*) at a time. For each segment it
decides which triangle is visible at every sample, and only then shades. This has two payoffs:

* each visible sample is shaded once, and hidden ones not at all;
* the depth, stencil and visibility buffers only need to be as large as one segment, so they fit
  on chip.

This RTL implements the two front-end units of such a renderer:

1. **Segmenting unit (`bbsu`)**. While the frame is collected, it takes screen-space vertices and
   builds triangles from them. It finds the segments each triangle's bounding box touches, and
   appends the triangle's pointer to a linked list kept per segment in external memory.
2. **Hidden surface removal unit (`hsr_unit`)**. Afterwards, it takes the triangles of one segment
   and finds, for every sample of the segment, whether the sample is covered, whether it passes
   the depth and stencil tests, and which triangle it belongs to. Everything stays in on-chip
   buffers, which the shading stage reads out.

`rasterizer_top` puts the two units side by side on one clock. Three things between the two
phases are not part of this RTL: the external memory, the logic that walks a segment's list, and
the triangle fetch. Their signals are ports of the top.

## Number formats

| quantity | format |
|---|---|
| x, y screen coordinates | 16-bit signed fixed point, 4 fraction bits (`PIX` = 16 units per pixel) |
| depth z | 24-bit unsigned fraction in [0, 1); increments are 24-bit two's complement, arithmetic wraps mod 2^24 |
| edge variables S0..S2 | 32-bit two's complement |
| stencil | 8 bits |
| triangle pointer | 20 bits: the triangle's index in the frame |

All of these are in `rtl/raster_pkg.sv`, along with the shared structs (`vertex_t`, `triangle_t`,
`start_t`, `delta_t`, `buf_entry_t`, the two configuration structs) and the comparison and stencil
operation encodings.

## Segmenting unit

```
vertices -> vertex_fifo (64) -> two minmax3 sorters -> 2 multipliers -> segment_generator -> address_generator -> memory writes
             \________________ bbsu_input_pipeline ________________/
```

**Primitive assembly.** Vertices are popped from the 64-word FIFO one per clock into two 3-tap
sorters, one for x and one for y, which hold the last three vertices.
* In list mode, every third vertex completes a triangle.
* In strip mode, every vertex after the first two completes one.
* The `restart` bit of a vertex starts a new list or strip.
* A fan must be sent as a strip, with its shared vertex repeated.

**Bounding box to segments.** The sorter outputs (xmin, xmax, ymin, ymax) are multiplied by the
reciprocal of the segment width and height: `segment = (coord * recip) >> 16`. Two multipliers
are shared over two clocks, mins first, then maxes. So the pipeline produces at most one triangle
every two clocks.
* For a segment W pixels wide, `recip_w = 65536 / (W * 16)`. For example, 32-pixel segments give
  128 and 16-pixel segments give 256.
* Power-of-two sizes are exact. Other sizes can be off by one segment at a boundary.
* Results clamp to `seg_nx`/`seg_ny`, and negative coordinates clamp to 0.

Because the segment size comes only from these run-time inputs, it can change from frame to frame.

**Segment generator.** It walks the box row by row (x fastest), one segment per clock, with one
adder for x and one for y.

**Segment lists.** Each segment's list lives in external memory as a chain of 32-word blocks:

```
block word 0..30 : triangle pointers, in arrival order
block word 31    : word address of the next block
```

The address generator keeps a small on-chip table for each of up to 32 x 64 segments: valid, head
block, tail block, fill index and count. New blocks come from a bump allocator that restarts at
address 0 on `frame_start`.
* An append normally costs one memory write.
* When the tail block is full, the append costs two: the link word first, then the pointer into
  the new block.
* The memory port is valid/ready, so memory back-pressure stalls the whole chain.
* `q_seg_x/q_seg_y` return a segment's head address and entry count. The list reader needs the
  count, because no terminator is written.
* If memory runs out, `overflow` is set until the next `frame_start`, and pairs are dropped.

## Hidden surface removal unit

### What the VPU computes

For a triangle (x0,y0,z0), (x1,y1,z1), (x2,y2,z2) and a start sample (xs, ys), `vpu` produces:

```
S0 = (xs-x0)(y0-y1) - (ys-y0)(x0-x1)      dS0/dx = PIX(y0-y1)   dS0/dy = -PIX(x0-x1)
S1 = (xs-x0)(y0-y2) - (ys-y0)(x0-x2)      dS1/dx = PIX(y0-y2)   dS1/dy = -PIX(x0-x2)
S2 = (xs-x1)(y1-y2) - (ys-y1)(x1-x2)      dS2/dx = PIX(y1-y2)   dS2/dy = -PIX(x1-x2)

Az = (z1-z2)(y1-y0) - (y1-y2)(z1-z0)
Bz = (x1-x2)(z1-z0) - (z1-z2)(x1-x0)
Cz = (x1-x2)(y1-y0) - (y1-y2)(x1-x0)
z(xs,ys) = z1 + (Az(xs-x1) + Bz(ys-y1)) / Cz     dz/dx = PIX*Az/Cz    dz/dy = PIX*Bz/Cz
```

A sample is covered when `(sign S0 xor sign S1) and (sign S1 xor sign S2)`. This holds for both
windings, because edge 1 runs v0→v2, against the other two edges. With these definitions of Az,
Bz and Cz, the depth plane has slope **+**Az/Cz in x and +Bz/Cz in y. That sign reproduces the
three vertex depths, and it is what the RTL uses.
* Divisions round toward zero.
* A degenerate triangle (Cz = 0) gets z1 and zero slopes, and covers nothing.
* The start sample is the centre of the segment's first sample.
* PIX here is the sample pitch: one pixel (16 coordinate units) normally, smaller with the
  ordered-grid anti-aliasing described below.

### Cells and their schedule

This is the least obvious part of the design. The segment is SEG_W x SEG_H samples (32 x 16)
shared among N_CELLS cells (8):
* buffer line r belongs to cell `r % 8`, in slot `r / 8`;
* each cell owns two lines and keeps them in its own buffer.

A cell cannot step in y. It only walks one line, so every line needs fresh start values. These are
produced like this:

```
          one VPU job per slot (every line time)
tri_in -> vpu --(3 clk)--> start register --+--> cell 0 loads at t+1
                              ^   |         +--> cell 1 loads at t+2      (value stepped one line)
                              |   v         ...
                          + dS/dy, dz/dy    +--> cell 7 loads at t+8
```

The VPU result goes into one register. In each of the next 8 clocks, one more cell loads the
register while a single adder per value steps it down one line. So there is one register and one
adder per value, not one per cell.
* In opaque mode, each cell then walks its line at two samples per clock: 16 clocks per line.
* The next VPU job for the same triangle (slot 1, lines 8..15) is issued 16 clocks after the
  first. Its loads land on the last step of each cell's previous line, so the cells never idle
  between lines.
* A triangle therefore costs 32 clocks per segment whatever its size. That is 512 samples in
  32 clocks, or 16 samples per clock: 1.6 Gsamples/s at 100 MHz.
* The schedule is fixed and does not depend on coverage.
* The height in use is set at run time by `seg_slots` (1 or 2 slots of 8 lines). With one slot,
  the segment is 32 x 8 and a triangle costs 16 clocks. Lines outside the height in use are left
  untouched.

Inside a cell (`hsr_cell`) the pipeline has two stages:

* **Stage 0.** `covering_unit` holds S0..S2 and gives the coverage of the current sample and the
  next one (S + dS/dx). `depth_unit` does the same for z. The cell reads both buffer memories
  (even-x and odd-x samples), so two lanes run every clock.
* **Stage 1.** The depth test (`depth_unit`) and the stencil test (`stencil_unit`, one per lane)
  run on the data read back, and the updated sample is written back. For covered samples only:
  * the stencil value is always written, under the write mask;
  * depth and triangle pointer are written when both tests pass (depth only if `zwrite` in
    opaque mode).

Lines of one slot are at least a line time apart, so no forwarding is needed. Each buffer sample
is `{z0, z1, stencil, triangle pointer}`, 76 bits. `clr_start` initialises the fields selected by
`clr_mask` in all cells (32 clocks). `rd_x/rd_y` read one sample back one clock later.

### Depth modes

* **Opaque** (`dcfg.transparent = 0`). Two samples per clock. The incoming depth is compared with
  location z0 using `dcfg.zfunc`: never, less, equal, less-or-equal, greater, greater-or-equal or
  always.
* **Transparent** (`dcfg.transparent = 1`). One sample per clock, so 32 clocks per line. It is a
  multi-pass scheme for sorting transparent surfaces back to front. Each pixel keeps two depths:
  * *processed*, location `dcfg.parity`: the surface shaded in the previous pass;
  * *working*, the other location.

  A sample passes if it is nearer than *processed* and farther than *working*. So one pass finds,
  per pixel, the farthest transparent surface still in front of what has been shaded; its
  triangle pointer is left in the buffer for shading. The procedure:
  1. Render the opaque triangles. z0 now holds the opaque depth.
  2. For each pass, clear the working location to 0 and send the transparent triangles.
  3. Read out, then flip `parity` for the next pass.

### Stencil

The test is `(ref & rmask) FUNC (stored & rmask)`, with the same seven functions as the depth
test. Three operations are configured: for a stencil fail, for a stencil pass with a depth fail,
and for both passing. The operations are keep, zero, replace with ref, increment or decrement
(each with saturation or with wrap), and invert. The new value is
`(stored & ~wmask) | (result & wmask)`.

### Anti-aliasing

The cells never know about anti-aliasing. Only the start points the controller hands to the VPU
change, and the sample pitch the VPU scales its increments by. There are two controls, and they
can be combined.

**Sample table** (`aa_log2`, `aa_dx`, `aa_dy`). There are 2^`aa_log2` samples per pixel, up to
the number of slots (2 at the default size). Sample s sits at the pixel centre plus
(`aa_dx[s]`, `aa_dy[s]`) in coordinate units, so its position is free. The buffer is split into
equal bands of lines, and band s holds sample s. With two samples:
* lines 0..7 hold sample 0 of pixel rows 0..7;
* lines 8..15 hold sample 1 of the same rows;
* the segment covers 32 x 8 pixels.

The usual rotated pair (+¼, −¼), (−¼, +¼) pixel is `aa_dx = {+4, -4}`, `aa_dy = {-4, +4}`. A band
must be a whole cell load (8 lines), because one VPU job covers 8 consecutive lines of one
sample. That is why this method stops at 2 samples with 16 lines.

**Ordered grid** (`grid_log2` = g). The sample pitch becomes PIX >> g, i.e. 1/2, 1/4 or 1/8
pixel. Each buffer sample is then a sub-pixel sample. A segment holds (32 >> g) x (16 >> g)
pixels with 4^g samples each. g = 3 gives 64 samples per pixel on 4 x 2 pixels, the largest
amount a 512-sample buffer allows. g stops at 3 because coordinates have 4 fraction bits.

In every mode the fill rate per buffer sample is unchanged. The fill rate per pixel falls with
the sample count.

## Where this RTL departs from the source design

* **VPU.** The original is a small programmable datapath: dual-port operand memories, one
  fixed-point adder, one multiplier, a 24-bit floating-point adder, multiplier and reciprocal
  unit, and a three-input adder, sequenced by a program. It has about 48 clocks of latency and
  takes one triangle per 16 clocks. Neither its float format nor its program is available. Here
  the same equations are a fixed three-stage fixed-point pipeline with exact integer division: it
  takes one job per clock with 3 clocks of latency. Vertex depths enter as 24-bit fractions, not
  floats.
* **Two samples per clock** are computed by two lanes at the system clock, with split even/odd
  memories, instead of by logic running at twice the clock.
* **Anti-aliasing.** The original reaches any sample count by reprogramming the VPU and the
  segment height. Here the positions come from a table, limited to as many samples as slots. Higher
  counts use an ordered grid with a programmable pitch, which is this design's own method. It can
  reach 64 samples per pixel, but only on grid positions.
* **The HSR segment size** can change at run time only in height, in whole groups of 8 lines
  (`seg_slots`). The width and the maximum height are fixed by parameters (32 x 16).
* **The address generator's insides** are this design's own. The original describes only the list
  format.
* **Choices of this design**, where the source gives no detail:
  * the coordinate fraction width;
  * the reciprocal format;
  * valid/ready handshakes everywhere;
  * the triangle pointer being a frame-local index;
  * the list table size (32 x 64 segments, 2^20 memory words);
  * the buffer layout, the clear and readout ports, and the overflow behaviour;
  * the encodings of functions and operations.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. The models in the testbenches evaluate the
edge equations exactly at every sample position. They take depth through the plane with the same
rounding rule as the RTL. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rasterizer_top rtl/raster_pkg.sv tb/tb_rasterizer_top.sv
./obj_dir/Vtb_rasterizer_top
```

`tb_rasterizer_top` runs one frame through the whole design at its default parameters:
1. triangle lists and a strip go through the segmenting unit, with random memory stalls and a
   list long enough to need a second block;
2. the lists are walked back from the memory model;
3. the segments are rendered in opaque mode, in two transparent passes, with two-sample
   anti-aliasing and with 64 samples per pixel.

It checks the lists and every buffer sample against the model, and counts that each of these
mechanisms actually happened. The HSR-level testbenches also check the cycle counts:
* 16 clocks per line opaque and 32 transparent;
* 32 clocks per triangle per segment;
* one segment per clock in the segment generator;
* one triangle per two clocks for a strip;
* 3 clocks of VPU latency.

The testbenches need the package read first (`rtl/raster_pkg.sv`) and find the other modules
through `-y rtl`.
