// bbsu_input_pipeline: front end of the bounding box segmenting unit.
//
// Screen-space vertices are written into a 64-word FIFO. Vertices are read
// from it one per clock into two 3-tap sorters (one for x, one for y); the
// vertex that completes a triangle (third vertex of a list triangle, or any
// vertex after the first two of a strip) starts the bounding box
// computation. The sorter outputs (xmin, xmax, ymin, ymax) are multiplied by
// the programmable reciprocal of the segment width and height; two
// multipliers are shared over two cycles: mins in the first, maxes in the
// second. The result is the inclusive range of segments the bounding box
// touches, clamped to the screen's segment count, plus a triangle pointer
// that counts triangles from 0 after frame_start.
//
// Reciprocal format: unsigned 0.RECIP_FRAC, segment = (coord * recip) >>
// RECIP_FRAC with coord in 1/PIX pixel units. For a segment W pixels wide,
// recip = 2^RECIP_FRAC / (W*PIX); power-of-two sizes are exact. Negative
// coordinates clamp to segment 0. A triangle fan must be sent as a strip by
// the transform stage. Timing: first triangle output 3 cycles after its last
// vertex leaves the FIFO; at most one triangle every two cycles. The whole
// pipeline holds while the output is valid and not accepted.
module bbsu_input_pipeline
  import raster_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned SEGC_W     = 8,   // segment coordinate width
  parameter int unsigned RECIP_W    = 16,
  parameter int unsigned RECIP_FRAC = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,   // resets the triangle counter
  input  prim_mode_e         prim_mode,
  input  logic [RECIP_W-1:0] recip_w,
  input  logic [RECIP_W-1:0] recip_h,
  input  logic [SEGC_W-1:0]  seg_nx,        // segments per row
  input  logic [SEGC_W-1:0]  seg_ny,        // segments per column
  // vertex input
  input  logic               vin_valid,
  output logic               vin_ready,
  input  vertex_t            vin,
  // bounding box in segments
  output logic               bb_valid,
  input  logic               bb_ready,
  output logic [SEGC_W-1:0]  bb_sx0, bb_sy0, bb_sx1, bb_sy1,
  output tri_ptr_t           bb_tri,
  output logic               busy          // FIFO or pipeline holds work
);
  localparam int unsigned VW = $bits(vertex_t);

  logic    fifo_valid, fifo_pop;
  vertex_t fifo_out;
  logic [VW-1:0] fifo_raw;
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  vertex_fifo #(.WIDTH(VW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(vin_valid), .in_ready(vin_ready), .in_data(vin),
    .out_valid(fifo_valid), .out_ready(fifo_pop), .out_data(fifo_raw),
    .level(fifo_level)
  );
  assign fifo_out = vertex_t'(fifo_raw);

  // Global hold while the output register is full and not taken.
  wire en = !(bb_valid && !bb_ready);

  logic       v1, v2;            // sorter result valid / maxes pending
  logic [1:0] vcnt;              // vertices seen in the current primitive (saturating at 3)
  logic       completes;
  tri_ptr_t   tri_cnt;

  always_comb begin
    logic [1:0] c;
    c = fifo_out.restart ? 2'd0 : vcnt;
    if (prim_mode == PRIM_LIST && c == 2'd3) c = 2'd0;
    completes = (c == 2'd2) || (prim_mode == PRIM_STRIP && c == 2'd3);
  end

  assign fifo_pop = en && fifo_valid && !v1;
  assign busy     = fifo_valid || v1 || v2 || bb_valid;

  coord_t xmin, xmax, ymin, ymax, xmax_h, ymax_h;

  minmax3 #(.W(XY_W)) u_sort_x (.clk, .rst_n, .shift(fifo_pop), .din(fifo_out.x),
                                .vmin(xmin), .vmax(xmax));
  minmax3 #(.W(XY_W)) u_sort_y (.clk, .rst_n, .shift(fifo_pop), .din(fifo_out.y),
                                .vmin(ymin), .vmax(ymax));

  // The two shared multipliers.
  coord_t mx, my;
  logic [XY_W+RECIP_W-1:0] px, py;
  logic [SEGC_W-1:0] sx, sy;

  function automatic logic [SEGC_W-1:0] to_seg(logic [XY_W+RECIP_W-1:0] p,
                                               logic [SEGC_W-1:0] n);
    logic [XY_W+RECIP_W-1:0] s;
    s = p >> RECIP_FRAC;
    if (n == '0) return '0;
    return (s >= (XY_W+RECIP_W)'(n)) ? n - 1'b1 : s[SEGC_W-1:0];
  endfunction

  always_comb begin
    mx = v2 ? xmax_h : xmin;
    my = v2 ? ymax_h : ymin;
    px = (mx[XY_W-1] ? '0 : (XY_W+RECIP_W)'(unsigned'(mx))) * (XY_W+RECIP_W)'(recip_w);
    py = (my[XY_W-1] ? '0 : (XY_W+RECIP_W)'(unsigned'(my))) * (XY_W+RECIP_W)'(recip_h);
    sx = to_seg(px, seg_nx);
    sy = to_seg(py, seg_ny);
  end

  logic [SEGC_W-1:0] sx0_h, sy0_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vcnt <= '0; v1 <= 1'b0; v2 <= 1'b0; tri_cnt <= '0; bb_valid <= 1'b0;
      xmax_h <= '0; ymax_h <= '0; sx0_h <= '0; sy0_h <= '0;
      bb_sx0 <= '0; bb_sy0 <= '0; bb_sx1 <= '0; bb_sy1 <= '0; bb_tri <= '0;
    end else begin
      if (bb_valid && bb_ready) bb_valid <= 1'b0;
      if (frame_start) tri_cnt <= '0;
      if (en) begin
        if (fifo_pop) begin
          logic [1:0] c;
          c = fifo_out.restart ? 2'd0 : vcnt;
          if (prim_mode == PRIM_LIST && c == 2'd3) c = 2'd0;
          vcnt <= (c == 2'd3) ? 2'd3 : c + 2'd1;
        end
        v1 <= fifo_pop && completes;
        v2 <= v1;
        if (v1) begin
          xmax_h <= xmax; ymax_h <= ymax;
          sx0_h  <= sx;   sy0_h  <= sy;
        end
        if (v2) begin
          bb_valid <= 1'b1;
          bb_sx0 <= sx0_h; bb_sy0 <= sy0_h;
          bb_sx1 <= sx;    bb_sy1 <= sy;
          bb_tri <= tri_cnt;
          if (!frame_start) tri_cnt <= tri_cnt + 1'b1;
        end
      end
    end
  end
endmodule
