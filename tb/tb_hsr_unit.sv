// tb_hsr_unit: the HSR unit on one 32x16 segment. Random triangles are
// rendered in opaque mode (depth LESS, stencil counting covered passes),
// then with anti-aliasing (two samples on the rotated grid, two samples at
// random positions, one off-centre sample, the 8x8 ordered grid and a 2x2
// grid with two positions), then in two transparent passes; after
// each phase the whole buffer is read back and compared with a model that
// evaluates the edge equations exactly at every sample position and the
// depth plane with the unit's fixed-point rounding. Also checks the fill
// rate: one triangle per two line times (32 cycles) in opaque mode, one
// line time when only half the segment height is in use.
module tb_hsr_unit;
  import raster_pkg::*;
  localparam int N = 8, W = 32, H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  depth_cfg_t dcfg;
  sten_cfg_t scfg;
  logic [1:0] aa_log2, grid_log2, seg_slots;
  coord_t aa_dx [2], aa_dy [2];
  logic tri_valid, tri_ready, clr_start, busy;
  coord_t seg_ox, seg_oy;
  triangle_t tri_in;
  logic [3:0] clr_mask;
  depth_t clr_z;
  sten_t clr_sten;
  logic [4:0] rd_x;
  logic [3:0] rd_y;
  buf_entry_t rd_data;
  logic [4:0] pix_count;
  buf_entry_t model [H][W];
  longint hw_pix = 0, model_pix = 0;

  hsr_unit #(.N_CELLS(N), .SEG_W(W), .SEG_H(H)) dut (.*);

  always @(posedge clk) hw_pix += pix_count;

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint ef(longint xa, longint ya, longint xb, longint yb, longint x, longint y);
    return (x - xa) * (ya - yb) - (y - ya) * (xa - xb);
  endfunction

  task automatic compare_all(input string tag);
    int bad;
    bad = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); rd_x = 5'(x); rd_y = 4'(y);
      @(negedge clk);
      checks++;
      if (rd_data != model[y][x]) begin
        failures++; bad++;
        if (bad < 6) $display("FAIL %s (%0d,%0d): %h want %h", tag, x, y, rd_data, model[y][x]);
      end
    end
  endtask

  task automatic do_clear(input logic [3:0] m, input depth_t z);
    @(negedge clk); clr_start = 1; clr_mask = m; clr_z = z; clr_sten = 0;
    @(negedge clk); clr_start = 0;
    while (busy) @(negedge clk);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      if (m[CLR_Z0]) model[y][x].z0 = z;
      if (m[CLR_Z1]) model[y][x].z1 = z;
      if (m[CLR_STEN]) model[y][x].sten = 0;
      if (m[CLR_TRI]) model[y][x].tri_id = 0;
    end
  endtask

  // model of one triangle over the segment
  task automatic model_tri(input triangle_t t);
    longint x[3], y[3], z[3], az, bz, cz;
    longint P;
    x = '{t.x0, t.x1, t.x2}; y = '{t.y0, t.y1, t.y2}; z = '{t.z0, t.z1, t.z2};
    P = PIX >> grid_log2;
    az = (z[1] - z[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (z[1] - z[0]);
    bz = (x[1] - x[2]) * (z[1] - z[0]) - (z[1] - z[2]) * (x[1] - x[0]);
    cz = (x[1] - x[2]) * (y[1] - y[0]) - (y[1] - y[2]) * (x[1] - x[0]);
    for (int r = 0; r < int'(seg_slots) * N; r++) begin
      int k, g;
      longint xs, ys, zs, dzx, dzy;
      k = r % N; g = r / N;
      xs = longint'(seg_ox) + P / 2; ys = longint'(seg_oy) + P / 2;
      begin
        int nb, smp;
        nb = int'(seg_slots) >> aa_log2; smp = g / nb;
        xs += aa_dx[smp];
        ys += aa_dy[smp] + (g % nb) * N * P;
      end
      if (cz == 0) begin zs = z[1]; dzx = 0; dzy = 0; end
      else begin
        zs = z[1] + (az * (xs - x[1]) + bz * (ys - y[1])) / cz;
        dzx = (az * P) / cz; dzy = (bz * P) / cz;
      end
      for (int i = 0; i < W; i++) begin
        longint px, py, zi;
        bit cov, zp;
        buf_entry_t o;
        px = xs + i * P; py = ys + k * P;
        cov = ((ef(x[0], y[0], x[1], y[1], px, py) < 0) != (ef(x[0], y[0], x[2], y[2], px, py) < 0)) &&
              ((ef(x[0], y[0], x[2], y[2], px, py) < 0) != (ef(x[1], y[1], x[2], y[2], px, py) < 0));
        zi = (zs + k * dzy + i * dzx) & 24'hFFFFFF;
        o = model[r][i];
        if (!cov) continue;
        if (dcfg.transparent) begin
          longint pr, wk;
          pr = dcfg.parity ? o.z1 : o.z0; wk = dcfg.parity ? o.z0 : o.z1;
          zp = zi < pr && zi > wk;
        end else zp = zi < o.z0;
        o.sten = o.sten + 1'b1;                   // stencil: ALWAYS, INCR_WRAP on z pass
        if (!zp) o.sten = o.sten - 1'b1;          // KEEP on z fail
        if (zp) begin
          model_pix++;
          o.tri_id = t.tri_id;
          if (dcfg.transparent && !dcfg.parity) o.z1 = depth_t'(zi);
          else o.z0 = depth_t'(zi);
        end
        model[r][i] = o;
      end
    end
  endtask

  function automatic triangle_t rand_tri(input int id, input int spread);
    triangle_t t;
    int cx, cy;
    cx = int'(seg_ox) + $urandom_range(0, 16 * 32); cy = int'(seg_oy) + $urandom_range(0, 16 * 16);
    t.x0 = coord_t'(cx + $urandom_range(0, spread) - spread / 2);
    t.y0 = coord_t'(cy + $urandom_range(0, spread) - spread / 2);
    t.x1 = coord_t'(cx + $urandom_range(0, spread) - spread / 2);
    t.y1 = coord_t'(cy + $urandom_range(0, spread) - spread / 2);
    t.x2 = coord_t'(cx + $urandom_range(0, spread) - spread / 2);
    t.y2 = coord_t'(cy + $urandom_range(0, spread) - spread / 2);
    t.z0 = depth_t'($urandom_range(24'h100000, 24'hEFFFFF));
    t.z1 = depth_t'($urandom_range(24'h100000, 24'hEFFFFF));
    t.z2 = depth_t'($urandom_range(24'h100000, 24'hEFFFFF));
    t.tri_id = tri_ptr_t'(id);
    return t;
  endfunction

  task automatic send(input triangle_t t);
    tri_valid = 1; tri_in = t;
    @(posedge clk);
    while (!tri_ready) @(posedge clk);
    #1 tri_valid = 0;
    model_tri(t);
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0, t1;
    tri_valid = 0; clr_start = 0; tri_in = '0; rd_x = 0; rd_y = 0; aa_log2 = 0; aa_dx = '{0, 0}; aa_dy = '{0, 0}; grid_log2 = 0; seg_slots = 2;
    seg_ox = coord_t'(16 * 64); seg_oy = coord_t'(16 * 32);
    dcfg = '0; dcfg.zfunc = CMP_LESS; dcfg.zwrite = 1;
    scfg = '0; scfg.func = CMP_ALWAYS; scfg.rmask = 8'hFF; scfg.wmask = 8'hFF;
    scfg.op_sfail = SOP_KEEP; scfg.op_zfail = SOP_KEEP; scfg.op_zpass = SOP_INCR_WRAP;
    repeat (3) @(negedge clk); rst_n = 1;
    do_clear(4'b1111, 24'hFFFFFF);
    // opaque, back to back: rate check
    @(negedge clk); t0 = $time / 10;
    for (int i = 1; i <= 30; i++) send(rand_tri(i, 16 * 40));
    while (busy) @(negedge clk);
    t1 = $time / 10;
    chk(t1 - t0 <= 30 * 32 + 20, $sformatf("30 triangles took %0d cycles (limit %0d)", t1 - t0, 30 * 32 + 20));
    compare_all("opaque");
    // half-height segment: one slot, 16 cycles per triangle, lines 8-15 untouched
    seg_slots = 1;
    do_clear(4'b1111, 24'hFFFFFF);
    @(negedge clk); t0 = $time / 10;
    for (int i = 1; i <= 30; i++) send(rand_tri(i, 16 * 40));
    while (busy) @(negedge clk);
    t1 = $time / 10;
    chk(t1 - t0 <= 30 * 16 + 20, $sformatf("30 triangles, 1 slot, took %0d cycles (limit %0d)", t1 - t0, 30 * 16 + 20));
    compare_all("32x8 segment");
    seg_slots = 2;
    // two-sample anti-aliasing
    aa_log2 = 1; aa_dx = '{PIX / 4, -PIX / 4}; aa_dy = '{-PIX / 4, PIX / 4};
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 31; i <= 50; i++) send(rand_tri(i, 16 * 30));
    while (busy) @(negedge clk);
    compare_all("aa 2 samples, rotated grid");
    // two samples at arbitrary positions inside the pixel
    for (int s = 0; s < 2; s++) begin
      aa_dx[s] = coord_t'(int'($urandom_range(PIX - 2)) - (PIX / 2 - 1));
      aa_dy[s] = coord_t'(int'($urandom_range(PIX - 2)) - (PIX / 2 - 1));
    end
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 31; i <= 45; i++) send(rand_tri(i, 16 * 30));
    while (busy) @(negedge clk);
    compare_all($sformatf("aa 2 samples at (%0d,%0d) (%0d,%0d)", aa_dx[0], aa_dy[0], aa_dx[1], aa_dy[1]));
    // one sample moved off the pixel centre
    aa_log2 = 0; aa_dx = '{-PIX / 8, 0}; aa_dy = '{PIX / 8 + 1, 0};
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 46; i <= 50; i++) send(rand_tri(i, 16 * 40));
    while (busy) @(negedge clk);
    compare_all("1 sample, offset");
    // 64 samples per pixel on an 8x8 ordered grid, then 2 x 4 samples
    aa_dx = '{0, 0}; aa_dy = '{0, 0}; grid_log2 = 3;
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 46; i <= 55; i++) send(rand_tri(i, 16 * 4));
    while (busy) @(negedge clk);
    compare_all("8x8 grid");
    grid_log2 = 1; aa_log2 = 1; aa_dx = '{2, -2}; aa_dy = '{-2, 2};
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 46; i <= 55; i++) send(rand_tri(i, 16 * 16));
    while (busy) @(negedge clk);
    compare_all("2x2 grid x 2");
    grid_log2 = 0; seg_slots = 2;
    // transparent passes after an opaque pass
    aa_log2 = 0; aa_dx = '{0, 0}; aa_dy = '{0, 0};
    do_clear(4'b1111, 24'hFFFFFF);
    for (int i = 51; i <= 60; i++) send(rand_tri(i, 16 * 40));
    while (busy) @(negedge clk);
    dcfg.transparent = 1;
    for (int p = 0; p < 2; p++) begin
      dcfg.parity = 1'(p);
      do_clear(p ? 4'b0001 : 4'b0010, 24'h000000);
      for (int i = 61 + p * 10; i <= 70 + p * 10; i++) send(rand_tri(i, 16 * 40));
      while (busy) @(negedge clk);
      compare_all($sformatf("transparent %0d", p));
    end
    chk(model_pix > 0 && hw_pix == model_pix, $sformatf("depth writes %0d want %0d", hw_pix, model_pix));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
