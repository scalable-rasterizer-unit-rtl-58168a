// covering_unit: inside test of an HSR cell. load captures the three edge
// variables at the first pixel of the line and their per-pixel increments;
// each step moves along the line, by two pixels in two-lane (opaque) mode or
// one pixel otherwise. Outputs are combinational from the registers: lane 0
// is the current pixel, lane 1 the next one (S + dS). A pixel is covered when
//   (sign S0 XOR sign S1) AND (sign S1 XOR sign S2),
// which accepts either winding (edge 1 runs v0->v2, against the other two).
module covering_unit
  import raster_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        step,
  input  logic        two_lane,
  input  edge_t       s0_in, s1_in, s2_in,
  input  edge_t       ds0_in, ds1_in, ds2_in,
  output logic [1:0]  covered
);
  edge_t s0, s1, s2, ds0, ds1, ds2;
  edge_t t0, t1, t2;

  function automatic logic is_inside(edge_t a, edge_t b, edge_t c);
    return (a[S_W-1] ^ b[S_W-1]) & (b[S_W-1] ^ c[S_W-1]);
  endfunction

  always_comb begin
    t0 = s0 + ds0;
    t1 = s1 + ds1;
    t2 = s2 + ds2;
    covered[0] = is_inside(s0, s1, s2);
    covered[1] = is_inside(t0, t1, t2);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      s0 <= s0_in; s1 <= s1_in; s2 <= s2_in;
      ds0 <= ds0_in; ds1 <= ds1_in; ds2 <= ds2_in;
    end else if (step) begin
      s0 <= two_lane ? t0 + ds0 : t0;
      s1 <= two_lane ? t1 + ds1 : t1;
      s2 <= two_lane ? t2 + ds2 : t2;
    end
  end
endmodule
