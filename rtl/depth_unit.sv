// depth_unit: depth interpolation and depth test of an HSR cell, two lanes.
// Interpolation: load captures the line's start depth and the per-pixel
// increment (the "Z Inc" registers); z_lane[0] is the current pixel and
// z_lane[1] = z + dz; step advances by 2*dz (two-lane) or dz. Depth values
// wrap modulo 2^24.
// Test (combinational, used one pipeline stage later with the buffer's read
// data): in opaque mode a lane passes when cmp_z FUNC stored0 holds. In
// transparent mode each pixel keeps two depth locations, "processed" and
// "working", chosen by cfg.parity (processed = location parity); a lane
// passes when cmp_z is less than processed and greater than working, so a
// pass finds, per pixel, the farthest transparent surface nearer than the
// one shaded in the pass before. The passing value is written to location
// wr_loc: 0 in opaque mode, the working location in transparent mode.
module depth_unit
  import raster_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic        step,
  input  logic        two_lane,
  input  depth_t      z_in,
  input  depth_t      dz_in,
  output depth_t      z_lane [2],
  input  depth_cfg_t  cfg,
  input  depth_t      cmp_z   [2],
  input  depth_t      stored0 [2],
  input  depth_t      stored1 [2],
  output logic [1:0]  pass,
  output logic        wr_loc
);
  depth_t z, dz;

  assign z_lane[0] = z;
  assign z_lane[1] = z + dz;

  always_ff @(posedge clk) begin
    if (load) begin
      z  <= z_in;
      dz <= dz_in;
    end else if (step) begin
      z <= two_lane ? z + (dz << 1) : z + dz;
    end
  end

  depth_t processed [2];
  depth_t working   [2];

  always_comb begin
    wr_loc = cfg.transparent ? ~cfg.parity : 1'b0;
    pass   = '0;
    for (int l = 0; l < 2; l++) begin
      processed[l] = cfg.parity ? stored1[l] : stored0[l];
      working[l]   = cfg.parity ? stored0[l] : stored1[l];
      if (cfg.transparent)
        pass[l] = (cmp_z[l] < processed[l]) && (cmp_z[l] > working[l]);
      else
        pass[l] = cmp_pass(cfg.zfunc, cmp_z[l], stored0[l]);
    end
  end
endmodule
