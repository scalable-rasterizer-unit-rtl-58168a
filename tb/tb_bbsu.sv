// tb_bbsu: the segmenting unit end to end. Random triangles (lists and
// strips) go in; list writes go to a sparse memory with random stalls.
// Afterwards every segment's chained list is walked and must hold exactly
// the triangles whose bounding box (scaled by the segment size) covers that
// segment, in order. Also checks one segment per clock for a large triangle.
module tb_bbsu;
  import raster_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic frame_start, vin_valid, vin_ready, mem_wr_valid, mem_wr_ready, q_valid, overflow, seg_strobe, busy;
  prim_mode_e prim_mode;
  logic [15:0] recip_w, recip_h;
  logic [7:0] seg_nx, seg_ny, q_seg_x, q_seg_y;
  vertex_t vin;
  logic [19:0] mem_wr_addr, q_head;
  logic [31:0] mem_wr_data;
  logic [TRI_W-1:0] q_count;
  logic [31:0] mem [int];
  int exp_list [int][$];
  int tri_n = 0, wx[3], wy[3], strobes = 0, stall_cycles = 0;
  bit stall_on = 1;

  bbsu dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int seg_of(int c, int recip, int n);
    longint s;
    if (c < 0) return 0;
    s = (longint'(c) * recip) >>> 16;
    return (s >= n) ? n - 1 : int'(s);
  endfunction

  function automatic void add_tri();
    int mnx, mxx, mny, mxy;
    mnx = wx[0]; mxx = wx[0]; mny = wy[0]; mxy = wy[0];
    for (int k = 1; k < 3; k++) begin
      if (wx[k] < mnx) mnx = wx[k];
      if (wx[k] > mxx) mxx = wx[k];
      if (wy[k] < mny) mny = wy[k];
      if (wy[k] > mxy) mxy = wy[k];
    end
    for (int sy = seg_of(mny, recip_h, seg_ny); sy <= seg_of(mxy, recip_h, seg_ny); sy++)
      for (int sx = seg_of(mnx, recip_w, seg_nx); sx <= seg_of(mxx, recip_w, seg_nx); sx++)
        exp_list[sy * 32 + sx].push_back(tri_n);
    tri_n++;
  endfunction

  task automatic send(input int x, input int y, input bit restart);
    vin_valid = 1; vin.x = coord_t'(x); vin.y = coord_t'(y); vin.restart = restart;
    @(posedge clk);
    while (!vin_ready) @(posedge clk);
    #1 vin_valid = 0;
    wx[2] = wx[1]; wx[1] = wx[0]; wx[0] = x;
    wy[2] = wy[1]; wy[1] = wy[0]; wy[0] = y;
  endtask

  always @(negedge clk) mem_wr_ready = stall_on ? ($urandom_range(0, 4) != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (mem_wr_valid && mem_wr_ready) mem[int'(mem_wr_addr)] = mem_wr_data;
    if (mem_wr_valid && !mem_wr_ready) stall_cycles++;
    if (seg_strobe) strobes++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    frame_start = 0; vin_valid = 0; vin = '0; prim_mode = PRIM_LIST; q_seg_x = 0; q_seg_y = 0;
    recip_w = 16'd128; recip_h = 16'd256; seg_nx = 8'd32; seg_ny = 8'd48;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    for (int r = 0; r < 80; r++) begin
      int nv, cx, cy, sz;
      prim_mode = (r % 2) ? PRIM_STRIP : PRIM_LIST;
      nv = (prim_mode == PRIM_LIST) ? 3 * $urandom_range(1, 3) : $urandom_range(3, 7);
      cx = $urandom_range(0, 16 * 1024); cy = $urandom_range(0, 16 * 768);
      sz = (r % 10 == 0) ? 16 * 300 : 16 * 60;
      for (int v = 0; v < nv; v++) begin
        send(cx + $urandom_range(0, sz) - sz / 2, cy + $urandom_range(0, sz) - sz / 2, v == 0);
        if (prim_mode == PRIM_LIST ? (v % 3 == 2) : (v >= 2)) add_tri();
      end
      while (busy) @(negedge clk);
    end
    // a small area hit many times: forces lists longer than one block
    prim_mode = PRIM_LIST;
    for (int k = 0; k < 40; k++) begin
      send(16 * 100, 16 * 100, 1);
      send(16 * 110, 16 * 104, 0); send(16 * 104, 16 * 110, 0); add_tri();
    end
    while (busy) @(negedge clk);
    chk(!overflow, "no overflow");
    chk(stall_cycles > 0, "memory stalls happened");
    for (int sy = 0; sy < 48; sy++) for (int sx = 0; sx < 32; sx++) begin
      int a, n;
      q_seg_x = 8'(sx); q_seg_y = 8'(sy); #1;
      n = exp_list.exists(sy * 32 + sx) ? exp_list[sy * 32 + sx].size() : 0;
      chk(int'(q_count) == n, $sformatf("count seg %0d,%0d: %0d want %0d", sx, sy, q_count, n));
      a = int'(q_head);
      for (int k = 0, w = 0; k < n && k < int'(q_count); k++, w++) begin
        if (w == 31) begin a = int'(mem[a + 31]); w = 0; end
        chk(mem.exists(a + w) && int'(mem[a + w]) == exp_list[sy * 32 + sx][k], "list entry");
      end
    end
    // rate: a triangle covering 8x4 segments, memory always ready
    stall_on = 0;
    @(negedge clk); strobes = 0;
    send(16 * 10, 16 * 10, 1); send(16 * 250, 16 * 10, 0); send(16 * 10, 16 * 60, 0);
    begin
      int c;
      c = 0;
      while (strobes == 0) @(negedge clk);
      while (strobes < 32) begin @(negedge clk); c++; end
      chk(c == 31, $sformatf("32 segments in %0d cycles", c + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

endmodule
