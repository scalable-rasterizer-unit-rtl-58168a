// vpu: vertex processing unit. For one triangle and one start point
// (xs, ys) it produces everything the HSR cells need:
//   * the three edge variables at the start point (edge 0: v0-v1,
//     edge 1: v0-v2, edge 2: v1-v2)
//       S0 = (xs-x0)*(y0-y1) - (ys-y0)*(x0-x1)
//       S1 = (xs-x0)*(y0-y2) - (ys-y0)*(x0-x2)
//       S2 = (xs-x1)*(y1-y2) - (ys-y1)*(x1-x2)
//     and their per-sample (x) and per-line (y) increments, P*(yi-yj)
//     and -P*(xi-xj), where the sample pitch P = PIX >> in_grid (one pixel,
//     or 1/2, 1/4, 1/8 pixel for ordered-grid oversampling);
//   * the depth plane coefficients
//       Az = (z1-z2)*(y1-y0) - (y1-y2)*(z1-z0)
//       Bz = (x1-x2)*(z1-z0) - (z1-z2)*(x1-x0)
//       Cz = (x1-x2)*(y1-y0) - (y1-y2)*(x1-x0)
//     from which z(xs,ys) = z1 + (Az*(xs-x1) + Bz*(ys-y1))/Cz and the
//     per-sample increments P*Az/Cz (x) and P*Bz/Cz (y).
// With these coefficients the plane through the three vertices has slope
// +Az/Cz in x and +Bz/Cz in y. Depth results are truncated to 24-bit
// fractions (two's complement for increments), divisions round toward zero,
// and a degenerate triangle (Cz = 0) gets zero increments and z1.
//
// This implementation is a three-stage pipeline (differences, products,
// divisions) in fixed point that accepts one job per cycle with a latency
// of three cycles; the depth path uses fixed point rather than a
// floating-point datapath. Edge variables keep 32 bits, which holds for
// triangles whose coordinate differences stay below 2048 pixels.
module vpu
  import raster_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  triangle_t in_tri,
  input  coord_t    in_xs,
  input  coord_t    in_ys,
  input  logic [1:0] in_grid,    // sample pitch PIX >> in_grid
  input  logic [7:0] in_tag,     // carried through (job slot)
  output logic      out_valid,
  output start_t    out_start,
  output delta_t    out_delta,
  output tri_ptr_t  out_tri,
  output logic [7:0] out_tag
);
  typedef logic signed [XY_W:0]  dxy_t;   // coordinate difference
  typedef logic signed [Z_W:0]   dz_t;    // depth difference
  typedef logic signed [63:0]    wide_t;

  // Stage 1: differences.
  logic        v1;
  dxy_t        dx01, dy01, dx02, dy02, dx12, dy12, dx10, dy10;
  dxy_t        ex0, ey0, ex1, ey1;
  dz_t         dz12, dz10;
  depth_t      z1_1;
  tri_ptr_t    tri_1;
  logic [7:0]  tag_1;
  wide_t       pit_1;

  // Stage 2: products.
  logic        v2;
  wide_t       s0_2, s1_2, s2_2, az_2, bz_2, cz_2;
  dxy_t        ex1_2, ey1_2;
  delta_t      d_2;
  depth_t      z1_2;
  tri_ptr_t    tri_2;
  logic [7:0]  tag_2;
  wide_t       pit_2;

  function automatic dxy_t sub(coord_t a, coord_t b);
    return dxy_t'(a) - dxy_t'(b);
  endfunction

  function automatic edge_t px_mul(dxy_t d, wide_t pitch);
    return edge_t'(wide_t'(d) * pitch);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    // stage 1
    dx01 <= sub(in_tri.x0, in_tri.x1);  dy01 <= sub(in_tri.y0, in_tri.y1);
    dx02 <= sub(in_tri.x0, in_tri.x2);  dy02 <= sub(in_tri.y0, in_tri.y2);
    dx12 <= sub(in_tri.x1, in_tri.x2);  dy12 <= sub(in_tri.y1, in_tri.y2);
    dx10 <= sub(in_tri.x1, in_tri.x0);  dy10 <= sub(in_tri.y1, in_tri.y0);
    ex0  <= sub(in_xs, in_tri.x0);      ey0  <= sub(in_ys, in_tri.y0);
    ex1  <= sub(in_xs, in_tri.x1);      ey1  <= sub(in_ys, in_tri.y1);
    dz12 <= dz_t'({1'b0, in_tri.z1}) - dz_t'({1'b0, in_tri.z2});
    dz10 <= dz_t'({1'b0, in_tri.z1}) - dz_t'({1'b0, in_tri.z0});
    z1_1 <= in_tri.z1; tri_1 <= in_tri.tri_id; tag_1 <= in_tag;
    pit_1 <= wide_t'(PIX) >> in_grid;

    // stage 2
    s0_2 <= wide_t'(ex0) * wide_t'(dy01) - wide_t'(ey0) * wide_t'(dx01);
    s1_2 <= wide_t'(ex0) * wide_t'(dy02) - wide_t'(ey0) * wide_t'(dx02);
    s2_2 <= wide_t'(ex1) * wide_t'(dy12) - wide_t'(ey1) * wide_t'(dx12);
    az_2 <= wide_t'(dz12) * wide_t'(dy10) - wide_t'(dy12) * wide_t'(dz10);
    bz_2 <= wide_t'(dx12) * wide_t'(dz10) - wide_t'(dz12) * wide_t'(dx10);
    cz_2 <= wide_t'(dx12) * wide_t'(dy10) - wide_t'(dy12) * wide_t'(dx10);
    d_2.ds0x <= px_mul(dy01, pit_1);  d_2.ds0y <= -px_mul(dx01, pit_1);
    d_2.ds1x <= px_mul(dy02, pit_1);  d_2.ds1y <= -px_mul(dx02, pit_1);
    d_2.ds2x <= px_mul(dy12, pit_1);  d_2.ds2y <= -px_mul(dx12, pit_1);
    d_2.dzx  <= '0;            d_2.dzy  <= '0;
    ex1_2 <= ex1; ey1_2 <= ey1;
    z1_2 <= z1_1; tri_2 <= tri_1; tag_2 <= tag_1; pit_2 <= pit_1;

    // stage 3: divisions by Cz
    out_delta <= d_2;
    out_start.s0 <= edge_t'(s0_2);
    out_start.s1 <= edge_t'(s1_2);
    out_start.s2 <= edge_t'(s2_2);
    if (cz_2 == '0) begin
      out_delta.dzx <= '0;
      out_delta.dzy <= '0;
      out_start.z   <= z1_2;
    end else begin
      out_delta.dzx <= depth_t'((az_2 * pit_2) / cz_2);
      out_delta.dzy <= depth_t'((bz_2 * pit_2) / cz_2);
      out_start.z   <= z1_2 + depth_t'((az_2 * wide_t'(ex1_2) + bz_2 * wide_t'(ey1_2)) / cz_2);
    end
    out_tri <= tri_2; out_tag <= tag_2;
  end
endmodule
