// tb_rasterizer_top: one frame through the whole design at its default
// parameters. Phase 1: triangles (a list, then a strip) go into the
// segmenting unit; the per-segment lists land in a sparse memory model with
// random write stalls. Phase 2: for a few segments the list is walked from
// memory, exactly as a list walker would, and its triangles are fed to the
// HSR unit: an opaque pass, two transparent passes, a two-sample
// anti-aliased pass, a 64-sample (8x8 ordered grid) pass and a pass on a
// half-height segment. The lists are checked against the bounding boxes and
// every HSR buffer against a sample-exact model. Each mechanism (write
// stall, block chaining, list and strip assembly, opaque, transparent, AA, 64x
// grid, half height, stencil update, triangles listed for a segment they do not cover) is
// counted and must have happened.
module tb_rasterizer_top;
  import raster_pkg::*;
  localparam int N = 8, W = 32, H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic frame_start, vin_valid, vin_ready, mem_wr_valid, mem_wr_ready, seg_q_valid, list_overflow;
  logic seg_strobe, seg_busy, tri_valid, tri_ready, clr_start, hsr_busy;
  logic [1:0] aa_log2, grid_log2, seg_slots;
  coord_t aa_dx [2], aa_dy [2];
  prim_mode_e prim_mode;
  logic [15:0] recip_w, recip_h;
  logic [7:0] seg_nx, seg_ny, seg_q_x, seg_q_y;
  vertex_t vin;
  logic [19:0] mem_wr_addr, seg_q_head;
  logic [31:0] mem_wr_data;
  logic [TRI_W-1:0] seg_q_count;
  depth_cfg_t dcfg;
  sten_cfg_t scfg;
  coord_t seg_ox, seg_oy;
  triangle_t tri_in;
  logic [3:0] clr_mask;
  depth_t clr_z;
  sten_t clr_sten;
  logic [4:0] rd_x;
  logic [3:0] rd_y;
  buf_entry_t rd_data;
  logic [4:0] pix_count;

  rasterizer_top dut (.*);

  // mechanism counters
  int n_stall = 0, n_link = 0, n_list = 0, n_strip = 0, n_opaque = 0, n_transp = 0, n_aa = 0, n_grid = 0, n_half = 0;
  int n_sten = 0, n_nocover = 0;

  logic [31:0] mem [int];
  triangle_t tris [$];
  int exp_list [int][$];
  buf_entry_t model [H][W];
  int wx[3], wy[3], wz[3];
  longint hw_pix = 0;

  always @(negedge clk) mem_wr_ready = ($urandom_range(0, 5) != 0);
  always @(posedge clk) if (rst_n) begin
    if (mem_wr_valid && mem_wr_ready) begin
      mem[int'(mem_wr_addr)] = mem_wr_data;
      if (mem_wr_addr[4:0] == 5'd31) n_link++;
    end
    if (mem_wr_valid && !mem_wr_ready) n_stall++;
    hw_pix += pix_count;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic longint ef(longint xa, longint ya, longint xb, longint yb, longint x, longint y);
    return (x - xa) * (ya - yb) - (y - ya) * (xa - xb);
  endfunction

  function automatic int seg_of(int c, int recip, int n);
    longint s;
    if (c < 0) return 0;
    s = (longint'(c) * recip) >>> 16;
    return (s >= n) ? n - 1 : int'(s);
  endfunction

  // Phase 1 helpers -----------------------------------------------------
  function automatic void add_tri();
    int mnx, mxx, mny, mxy;
    triangle_t t;
    mnx = wx[0]; mxx = wx[0]; mny = wy[0]; mxy = wy[0];
    for (int k = 1; k < 3; k++) begin
      if (wx[k] < mnx) mnx = wx[k];
      if (wx[k] > mxx) mxx = wx[k];
      if (wy[k] < mny) mny = wy[k];
      if (wy[k] > mxy) mxy = wy[k];
    end
    for (int sy = seg_of(mny, recip_h, seg_ny); sy <= seg_of(mxy, recip_h, seg_ny); sy++)
      for (int sx = seg_of(mnx, recip_w, seg_nx); sx <= seg_of(mxx, recip_w, seg_nx); sx++)
        exp_list[sy * 32 + sx].push_back(tris.size());
    // the transform stage stores the triangle; oldest vertex first
    t.x0 = coord_t'(wx[2]); t.y0 = coord_t'(wy[2]); t.z0 = depth_t'(wz[2]);
    t.x1 = coord_t'(wx[1]); t.y1 = coord_t'(wy[1]); t.z1 = depth_t'(wz[1]);
    t.x2 = coord_t'(wx[0]); t.y2 = coord_t'(wy[0]); t.z2 = depth_t'(wz[0]);
    t.tri_id = tri_ptr_t'(tris.size());
    tris.push_back(t);
  endfunction

  task automatic send(input int x, input int y, input bit restart);
    vin_valid = 1; vin.x = coord_t'(x); vin.y = coord_t'(y); vin.restart = restart;
    @(posedge clk);
    while (!vin_ready) @(posedge clk);
    #1 vin_valid = 0;
    wx[2] = wx[1]; wx[1] = wx[0]; wx[0] = x;
    wy[2] = wy[1]; wy[1] = wy[0]; wy[0] = y;
    wz[2] = wz[1]; wz[1] = wz[0]; wz[0] = $urandom_range(24'h100000, 24'hEFFFFF);
  endtask

  // Phase 2 helpers -----------------------------------------------------
  task automatic model_tri(input triangle_t t, output int written);
    longint x[3], y[3], z[3], az, bz, cz;
    longint P;
    written = 0;
    P = PIX >> grid_log2;
    x = '{t.x0, t.x1, t.x2}; y = '{t.y0, t.y1, t.y2}; z = '{t.z0, t.z1, t.z2};
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
        if (zp) begin
          written++;
          o.sten = o.sten + 1'b1;
          o.tri_id = t.tri_id;
          if (dcfg.transparent && !dcfg.parity) o.z1 = depth_t'(zi);
          else o.z0 = depth_t'(zi);
        end
        model[r][i] = o;
      end
    end
  endtask

  task automatic do_clear(input logic [3:0] m, input depth_t z);
    @(negedge clk); clr_start = 1; clr_mask = m; clr_z = z; clr_sten = 0;
    @(negedge clk); clr_start = 0;
    while (hsr_busy) @(negedge clk);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      if (m[CLR_Z0]) model[y][x].z0 = z;
      if (m[CLR_Z1]) model[y][x].z1 = z;
      if (m[CLR_STEN]) model[y][x].sten = 0;
      if (m[CLR_TRI]) model[y][x].tri_id = 0;
    end
  endtask

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
      if (model[y][x].sten != 0) n_sten++;
    end
  endtask

  // Walk a segment's list in memory and render its triangles.
  task automatic render_segment(input int sx, input int sy);
    int a, n, w;
    seg_q_x = 8'(sx); seg_q_y = 8'(sy); #1;
    n = int'(seg_q_count);
    chk(n == (exp_list.exists(sy * 32 + sx) ? exp_list[sy * 32 + sx].size() : 0),
        $sformatf("list length of segment %0d,%0d", sx, sy));
    seg_ox = coord_t'(sx * W * PIX); seg_oy = coord_t'(sy * H * PIX);
    a = int'(seg_q_head); w = 0;
    for (int k = 0; k < n; k++) begin
      int id, wr;
      if (w == 31) begin a = int'(mem[a + 31]); w = 0; end
      id = int'(mem[a + w]); w++;
      chk(id == exp_list[sy * 32 + sx][k], "list entry");
      tri_valid = 1; tri_in = tris[id];
      @(posedge clk);
      while (!tri_ready) @(posedge clk);
      #1 tri_valid = 0;
      model_tri(tris[id], wr);
      if (!dcfg.transparent && aa_log2 == 0 && wr == 0) n_nocover++;
    end
    while (hsr_busy) @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint model_pix;
    frame_start = 0; vin_valid = 0; vin = '0; prim_mode = PRIM_LIST;
    recip_w = 16'd128; recip_h = 16'd256; seg_nx = 8'd32; seg_ny = 8'd48;   // 1024x768, 32x16 segments
    seg_q_x = 0; seg_q_y = 0; aa_log2 = 0; aa_dx = '{0, 0}; aa_dy = '{0, 0}; grid_log2 = 0; seg_slots = 2; tri_valid = 0; tri_in = '0; clr_start = 0;
    clr_mask = 0; clr_z = 0; clr_sten = 0; rd_x = 0; rd_y = 0; seg_ox = 0; seg_oy = 0;
    dcfg = '0; dcfg.zfunc = CMP_LESS; dcfg.zwrite = 1;
    scfg = '0; scfg.func = CMP_ALWAYS; scfg.rmask = 8'hFF; scfg.wmask = 8'hFF;
    scfg.op_sfail = SOP_KEEP; scfg.op_zfail = SOP_KEEP; scfg.op_zpass = SOP_INCR_WRAP;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- phase 1: segmenting ----
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    prim_mode = PRIM_LIST;
    for (int i = 0; i < 45; i++) begin          // clustered around segment (5,10)
      for (int v = 0; v < 3; v++)
        send(16 * (160 + $urandom_range(0, 40) - 10), 16 * (160 + $urandom_range(0, 18) - 2), v == 0);
      add_tri(); n_list++;
    end
    while (seg_busy) @(negedge clk);
    prim_mode = PRIM_STRIP;
    for (int v = 0; v < 14; v++) begin           // a strip across segments (12..16, 20)
      send(16 * (384 + v * 10), 16 * (320 + (v % 2) * 15), v == 0);
      if (v >= 2) begin add_tri(); n_strip++; end
    end
    while (seg_busy) @(negedge clk);
    chk(!list_overflow, "no list overflow");

    // ---- phase 2: hidden surface removal ----
    // opaque, segment (5,10)
    do_clear(4'b1111, 24'hFFFFFF);
    render_segment(5, 10); n_opaque++;
    compare_all("opaque 5,10");
    // transparent passes on the same segment
    dcfg.transparent = 1;
    for (int p = 0; p < 2; p++) begin
      dcfg.parity = 1'(p);
      do_clear(p ? 4'b0001 : 4'b0010, 24'h000000);
      render_segment(5, 10); n_transp++;
      compare_all($sformatf("transparent pass %0d", p));
    end
    dcfg.transparent = 0; dcfg.parity = 0;
    // opaque strip segment, then the same with two-sample anti-aliasing
    do_clear(4'b1111, 24'hFFFFFF);
    render_segment(13, 20); n_opaque++;
    compare_all("opaque 13,20");
    aa_log2 = 1; aa_dx = '{PIX / 4, -PIX / 4}; aa_dy = '{-PIX / 4, PIX / 4};
    do_clear(4'b1111, 24'hFFFFFF);
    render_segment(13, 20); n_aa++;
    compare_all("aa 13,20");
    // 64 samples per pixel (8x8 ordered grid): the buffer holds 4x2 pixels
    aa_log2 = 0; aa_dx = '{0, 0}; aa_dy = '{0, 0}; grid_log2 = 3;
    do_clear(4'b1111, 24'hFFFFFF);
    render_segment(13, 20); n_grid++;
    compare_all("64x 13,20");
    grid_log2 = 0;
    // half-height segment (one slot of lines)
    seg_slots = 1;
    do_clear(4'b1111, 24'hFFFFFF);
    render_segment(13, 20); n_half++;
    compare_all("32x8 13,20");
    seg_slots = 2;
    aa_log2 = 0; aa_dx = '{0, 0}; aa_dy = '{0, 0};

    $display("mechanisms: stall=%0d link=%0d list=%0d strip=%0d opaque=%0d transparent=%0d aa=%0d grid64=%0d half=%0d stencil=%0d nocover=%0d",
             n_stall, n_link, n_list, n_strip, n_opaque, n_transp, n_aa, n_grid, n_half, n_sten, n_nocover);
    chk(n_stall > 0, "memory write stall");
    chk(n_link > 0, "list block chaining");
    chk(n_list > 0 && n_strip > 0, "list and strip assembly");
    chk(n_opaque > 0 && n_transp > 0 && n_aa > 0 && n_grid > 0 && n_half > 0, "opaque, transparent, both AA modes and half height");
    chk(n_sten > 0, "stencil updates");
    chk(n_nocover > 0, "bounding box listed a triangle that covers no sample");
    chk(hw_pix > 0, "depth writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
