// tb_vpu: random triangles and start points, one job per cycle. Edge
// variables and increments are checked against the edge equations; the depth
// start value and increments against the plane through the three vertices
// (integer arithmetic, truncating division). A second check starts a job on
// vertex 0 and requires the plane to return z0 within one LSB. Latency is
// three cycles.
module tb_vpu;
  import raster_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  triangle_t in_tri;
  coord_t in_xs, in_ys;
  logic [7:0] in_tag, out_tag;
  logic [1:0] in_grid;
  start_t out_start;
  delta_t out_delta;
  tri_ptr_t out_tri;

  typedef struct { start_t s; delta_t d; int tag; longint z0; bit at_v0; } exp_t;
  exp_t q[$];

  vpu dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint ef(longint xa, longint ya, longint xb, longint yb, longint x, longint y);
    return (x - xa) * (ya - yb) - (y - ya) * (xa - xb);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // checker: expected result 3 cycles after the job
  int cyc = 0;
  int issue_cyc[$];
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    chk(cyc - issue_cyc.pop_front() == 3, "latency 3");
    chk(out_start.s0 == e.s.s0 && out_start.s1 == e.s.s1 && out_start.s2 == e.s.s2, "edge start values");
    chk(out_delta.ds0x == e.d.ds0x && out_delta.ds1x == e.d.ds1x && out_delta.ds2x == e.d.ds2x &&
        out_delta.ds0y == e.d.ds0y && out_delta.ds1y == e.d.ds1y && out_delta.ds2y == e.d.ds2y, "edge increments");
    chk(out_delta.dzx == e.d.dzx && out_delta.dzy == e.d.dzy, "depth increments");
    chk(out_start.z == e.s.z, $sformatf("start depth %0h want %0h", out_start.z, e.s.z));
    chk(int'(out_tag) == e.tag, "tag");
    if (e.at_v0) begin
      longint d;
      d = longint'(out_start.z) - e.z0;
      chk(d >= -1 && d <= 1, $sformatf("plane returns z0 at v0 (%0d)", d));
    end
  end

  initial begin
    in_valid = 0; in_tri = '0; in_xs = 0; in_ys = 0; in_tag = 0; in_grid = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint x[3], y[3], z[3], xs, ys, az, bz, cz, P;
      exp_t e;
      for (int k = 0; k < 3; k++) begin
        x[k] = $urandom_range(0, 16 * 1000); y[k] = $urandom_range(0, 16 * 1000);
        z[k] = $urandom_range(0, 24'hFFFFFF);
      end
      if (t % 50 == 7) begin x[2] = x[0]; y[2] = y[0]; end   // degenerate
      e.at_v0 = (t % 3 == 0);
      xs = e.at_v0 ? x[0] : longint'($urandom_range(0, 16 * 1000));
      ys = e.at_v0 ? y[0] : longint'($urandom_range(0, 16 * 1000));
      in_tri.x0 = coord_t'(x[0]); in_tri.y0 = coord_t'(y[0]); in_tri.z0 = depth_t'(z[0]);
      in_tri.x1 = coord_t'(x[1]); in_tri.y1 = coord_t'(y[1]); in_tri.z1 = depth_t'(z[1]);
      in_tri.x2 = coord_t'(x[2]); in_tri.y2 = coord_t'(y[2]); in_tri.z2 = depth_t'(z[2]);
      in_tri.tri_id = tri_ptr_t'(t);
      in_xs = coord_t'(xs); in_ys = coord_t'(ys); in_tag = 8'(t);
      in_grid = 2'($urandom_range(0, 3)); P = PIX >> in_grid;
      e.s.s0 = edge_t'(ef(x[0], y[0], x[1], y[1], xs, ys));
      e.s.s1 = edge_t'(ef(x[0], y[0], x[2], y[2], xs, ys));
      e.s.s2 = edge_t'(ef(x[1], y[1], x[2], y[2], xs, ys));
      e.d.ds0x = edge_t'(P * (y[0] - y[1])); e.d.ds0y = edge_t'(-P * (x[0] - x[1]));
      e.d.ds1x = edge_t'(P * (y[0] - y[2])); e.d.ds1y = edge_t'(-P * (x[0] - x[2]));
      e.d.ds2x = edge_t'(P * (y[1] - y[2])); e.d.ds2y = edge_t'(-P * (x[1] - x[2]));
      // plane normal from the two edge vectors v1-v2 and v1-v0
      az = (z[1] - z[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (z[1] - z[0]);
      bz = (x[1] - x[2]) * (z[1] - z[0]) - (z[1] - z[2]) * (x[1] - x[0]);
      cz = (x[1] - x[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (x[1] - x[0]);
      if (cz == 0) begin
        e.d.dzx = 0; e.d.dzy = 0; e.s.z = depth_t'(z[1]); e.at_v0 = 0;
      end else begin
        e.d.dzx = depth_t'((az * P) / cz);
        e.d.dzy = depth_t'((bz * P) / cz);
        e.s.z   = depth_t'(z[1] + (az * (xs - x[1]) + bz * (ys - y[1])) / cz);
      end
      e.tag = t % 256; e.z0 = z[0];
      q.push_back(e);
      in_valid = ($urandom_range(0, 3) != 0) ? 1'b1 : 1'b0;
      if (!in_valid) void'(q.pop_back()); else issue_cyc.push_back(cyc);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    chk(q.size() == 0, "all jobs returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
