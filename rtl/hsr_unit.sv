// hsr_unit: hidden surface removal unit for one segment of SEG_W x SEG_H
// samples. It is built from the VPU, one adder per start value for stepping
// in y, and N_CELLS HSR cells; buffer line r belongs to cell r % N_CELLS,
// slot r / N_CELLS.
//
// Per triangle the controller issues one VPU job per slot, one every line
// time (SEG_W/2 cycles opaque, SEG_W transparent). A job's start point is
// the centre of the first sample of the slot's first line. When the VPU
// result arrives it is loaded into a start register; over the next N_CELLS
// cycles cell k loads the register in cycle k while the y adders step it one
// line down (S += dSy, z += dzy), so one register and one adder per value
// feed all cells. Every cell then walks its line in parallel: 2*N_CELLS
// samples per clock in opaque mode.
//
// Segment height: only the first seg_slots * N_CELLS lines are used (1 to
// SLOTS slots, set at run time); a triangle then costs seg_slots line
// times. Each cell working on one or more lines depending on the segment
// size follows the source design; sizing by whole slots is this design's.
//
// Anti-aliasing: 2^aa_log2 samples per pixel (up to seg_slots), at positions
// given by the table aa_dx/aa_dy (offsets from the pixel centre in
// coordinate units, entry s for sample s). The buffer is split into
// 2^aa_log2 equal bands of lines; band s holds sample s of pixel rows
// 0..SEG_H/2^aa_log2-1. Only the start points of the VPU jobs change; the
// VPU increments and the cells run as without anti-aliasing. With aa_log2 = 0
// the single sample sits at the pixel centre plus entry 0 of the table
// (normally zero). The two-sample pattern (+1/4,-1/4), (-1/4,+1/4) pixel is
// aa_dx = {+PIX/4, -PIX/4}, aa_dy = {-PIX/4, +PIX/4}. Moving only the start
// points follows the source design; the table is this design's own way of
// programming them.
// Ordered-grid oversampling (this design's own method, to reach high sample
// counts in a small buffer): grid_log2 = g sets the sample pitch to
// PIX >> g, so every buffer sample is a sub-pixel sample and a segment
// holds (SEG_W >> g) x (SEG_H >> g) pixels with 4^g samples each (g = 3
// gives 64 samples per pixel, 4x2 pixels of a 32x16 buffer). The VPU scales
// its increments by the pitch; the cells are unchanged. grid_log2 and
// aa_log2 can be combined. g = 3 is the limit for 4 fraction bits (pitch 2,
// start at half a pitch).
//
// Interface: triangles on tri_valid/tri_ready (ready when the previous
// triangle's jobs have all been issued); seg_ox/seg_oy is the top-left
// corner of the segment in coordinate units; configuration must stay
// constant while busy. clr_start (only while idle) clears the buffers as in
// hsr_cell. rd_x/rd_y read one sample, one cycle later on rd_data.
module hsr_unit
  import raster_pkg::*;
#(
  parameter int unsigned N_CELLS = 8,
  parameter int unsigned SEG_W   = 32,
  parameter int unsigned SEG_H   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  depth_cfg_t  dcfg,
  input  sten_cfg_t   scfg,
  input  logic [$clog2(SEG_H/N_CELLS+1)-1:0] aa_log2,
  input  coord_t      aa_dx [SEG_H/N_CELLS],
  input  coord_t      aa_dy [SEG_H/N_CELLS],
  input  logic [1:0]  grid_log2,
  input  logic [$clog2(SEG_H/N_CELLS+1)-1:0] seg_slots,  // lines in use / N_CELLS
  input  coord_t      seg_ox,
  input  coord_t      seg_oy,
  input  logic        tri_valid,
  output logic        tri_ready,
  input  triangle_t   tri_in,
  input  logic        clr_start,
  input  logic [3:0]  clr_mask,
  input  depth_t      clr_z,
  input  sten_t       clr_sten,
  input  logic [$clog2(SEG_W)-1:0] rd_x,
  input  logic [$clog2(SEG_H)-1:0] rd_y,
  output buf_entry_t  rd_data,
  output logic        busy,
  output logic [$clog2(2*N_CELLS+1)-1:0] pix_count   // depth writes this cycle
);
  localparam int unsigned SLOTS = SEG_H / N_CELLS;
  localparam int unsigned SLW   = $clog2(SLOTS+1);
  localparam int unsigned SIW   = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  localparam int unsigned CW    = $clog2(N_CELLS);
  localparam int unsigned TW    = $clog2(SEG_W+1);

  // ---------------- job issue ----------------
  logic          have_tri;
  triangle_t     tri_r;
  logic [SLW-1:0] job;
  logic [TW-1:0] timer;
  logic          issue;
  coord_t        xs, ys;
  logic [7:0]    pend;

  wire [TW-1:0] line_time = dcfg.transparent ? TW'(SEG_W) : TW'(SEG_W/2);

  assign tri_ready = !have_tri;
  assign issue     = have_tri && timer == '0;

  // Job -> (sample, first pixel row): a band is seg_slots >> aa_log2 slots.
  logic [SLW-1:0] band_slots, samp, jrow;
  always_comb begin
    band_slots = seg_slots >> aa_log2;
    samp = '0;
    jrow = job;
    for (int b = 1; b < SLOTS; b++)
      if (job >= SLW'(b) * band_slots) begin
        samp = SLW'(b);
        jrow = job - SLW'(b) * band_slots;
      end
    xs = seg_ox + coord_t'((PIX >> grid_log2) / 2) + aa_dx[SIW'(samp)];
    ys = seg_oy + coord_t'((PIX >> grid_log2) / 2)
       + coord_t'(int'(jrow) * N_CELLS * (PIX >> grid_log2)) + aa_dy[SIW'(samp)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_tri <= 1'b0; job <= '0; timer <= '0; tri_r <= '0;
    end else begin
      if (timer != '0) timer <= timer - 1'b1;
      if (tri_valid && tri_ready) begin
        have_tri <= 1'b1; tri_r <= tri_in; job <= '0;
      end else if (issue) begin
        timer <= line_time - 1'b1;
        if (job == seg_slots - 1'b1) have_tri <= 1'b0;
        job <= job + 1'b1;
      end
    end
  end

  // ---------------- VPU ----------------
  logic     v_valid;
  start_t   v_start;
  delta_t   v_delta;
  tri_ptr_t v_tri;
  logic [7:0] v_tag;

  vpu u_vpu (
    .clk, .rst_n, .in_valid(issue), .in_tri(tri_r), .in_xs(xs), .in_ys(ys),
    .in_grid(grid_log2), .in_tag(8'(job)),
    .out_valid(v_valid), .out_start(v_start), .out_delta(v_delta),
    .out_tri(v_tri), .out_tag(v_tag)
  );

  // ---------------- y stepping and cell loading ----------------
  start_t        ycur;
  delta_t        dl;
  tri_ptr_t      ytri;
  logic [SLW-1:0] yslot;
  logic [N_CELLS-1:0] tok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok <= '0; pend <= '0;
    end else begin
      tok <= {tok[N_CELLS-2:0], v_valid};
      pend <= pend + 8'(issue) - 8'(tok[N_CELLS-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (v_valid) begin
      ycur <= v_start; dl <= v_delta; ytri <= v_tri; yslot <= SLW'(v_tag);
    end else begin
      ycur.s0 <= ycur.s0 + dl.ds0y;
      ycur.s1 <= ycur.s1 + dl.ds1y;
      ycur.s2 <= ycur.s2 + dl.ds2y;
      ycur.z  <= ycur.z  + dl.dzy;
    end
  end

  // ---------------- cells ----------------
  buf_entry_t rd_c [N_CELLS];
  logic [N_CELLS-1:0] cbusy;
  logic [1:0] pw [N_CELLS];
  logic [CW-1:0] rcell;

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    hsr_cell #(.SEG_W(SEG_W), .SLOTS(SLOTS)) u_cell (
      .clk, .rst_n, .dcfg, .scfg,
      .load(tok[k]), .load_slot(yslot), .st(ycur),
      .ds0x(dl.ds0x), .ds1x(dl.ds1x), .ds2x(dl.ds2x), .dzx(dl.dzx), .tri_in(ytri),
      .clr_start, .clr_mask, .clr_z, .clr_sten,
      .rd_x, .rd_slot(SLW'(rd_y / N_CELLS)), .rd_data(rd_c[k]),
      .busy(cbusy[k]), .pix_written(pw[k])
    );
  end

  always_ff @(posedge clk) rcell <= CW'(rd_y % N_CELLS);
  assign rd_data = rd_c[rcell];

  always_comb begin
    pix_count = '0;
    for (int k = 0; k < N_CELLS; k++)
      pix_count = pix_count + $bits(pix_count)'(pw[k][0]) + $bits(pix_count)'(pw[k][1]);
  end

  assign busy = have_tri || (pend != '0) || (|cbusy);

  initial assert (SEG_W / 2 >= N_CELLS && SEG_H % N_CELLS == 0);
  // The sample count may not exceed the number of slots.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> seg_slots >= 1 && seg_slots <= SLW'(SLOTS) && (seg_slots >> aa_log2) >= 1);
endmodule
