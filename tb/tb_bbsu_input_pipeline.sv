// tb_bbsu_input_pipeline: a stream of triangle lists and strips (with
// restarts) goes through the FIFO with random output back-pressure; every
// bounding box must match the box of the assembled triangle scaled by the
// segment reciprocals and clamped to the screen. Also checks the triangle
// counter, the frame-start reset and that a strip yields one triangle every
// two clocks when the output is always ready.
module tb_bbsu_input_pipeline;
  import raster_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic frame_start, vin_valid, vin_ready, bb_valid, bb_ready, busy;
  prim_mode_e prim_mode;
  logic [15:0] recip_w, recip_h;
  logic [7:0] seg_nx, seg_ny, bb_sx0, bb_sy0, bb_sx1, bb_sy1;
  vertex_t vin;
  tri_ptr_t bb_tri;
  typedef struct { int sx0, sy0, sx1, sy1, t; } box_t;
  box_t q[$];
  int tri_n = 0, got = 0;
  bit always_ready = 0;

  bbsu_input_pipeline dut (.*);

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

  int wx[3], wy[3];
  function automatic void add_tri();
    box_t b;
    int mnx, mxx, mny, mxy;
    mnx = wx[0]; mxx = wx[0]; mny = wy[0]; mxy = wy[0];
    for (int k = 1; k < 3; k++) begin
      if (wx[k] < mnx) mnx = wx[k];
      if (wx[k] > mxx) mxx = wx[k];
      if (wy[k] < mny) mny = wy[k];
      if (wy[k] > mxy) mxy = wy[k];
    end
    b.sx0 = seg_of(mnx, recip_w, seg_nx); b.sx1 = seg_of(mxx, recip_w, seg_nx);
    b.sy0 = seg_of(mny, recip_h, seg_ny); b.sy1 = seg_of(mxy, recip_h, seg_ny);
    b.t = tri_n++;
    q.push_back(b);
  endfunction

  task automatic send(input int x, input int y, input bit restart);
    vin_valid = 1; vin.x = coord_t'(x); vin.y = coord_t'(y); vin.restart = restart;
    @(posedge clk);
    while (!vin_ready) @(posedge clk);
    #1 vin_valid = 0;
    wx[2] = wx[1]; wx[1] = wx[0]; wx[0] = x;
    wy[2] = wy[1]; wy[1] = wy[0]; wy[0] = y;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) bb_ready = always_ready ? 1'b1 : ($urandom_range(0, 2) != 0);
  always @(posedge clk) if (rst_n && bb_valid && bb_ready) begin
    box_t b;
    b = q.pop_front(); got++;
    chk(int'(bb_sx0) == b.sx0 && int'(bb_sy0) == b.sy0 && int'(bb_sx1) == b.sx1 &&
        int'(bb_sy1) == b.sy1 && int'(bb_tri) == b.t,
        $sformatf("box %0d: (%0d,%0d)-(%0d,%0d) want (%0d,%0d)-(%0d,%0d) t%0d", bb_tri, bb_sx0, bb_sy0,
                  bb_sx1, bb_sy1, b.sx0, b.sy0, b.sx1, b.sy1, b.t));
  end

  initial begin
    frame_start = 0; vin_valid = 0; vin = '0; prim_mode = PRIM_LIST;
    recip_w = 16'd128; recip_h = 16'd256; seg_nx = 8'd32; seg_ny = 8'd48;   // 32x16 segments, 1024x768
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int nv;
      prim_mode = (r % 2) ? PRIM_STRIP : PRIM_LIST;
      if (r == 30) begin recip_w = 16'd171; recip_h = 16'd171; end    // 24x24 segments
      nv = (prim_mode == PRIM_LIST) ? 3 * $urandom_range(1, 4) : $urandom_range(3, 9);
      for (int v = 0; v < nv; v++) begin
        int x, y;
        x = $urandom_range(0, 16 * 1100) - 16 * 20; y = $urandom_range(0, 16 * 800) - 16 * 10;
        send(x, y, v == 0);
        if (prim_mode == PRIM_LIST ? (v % 3 == 2) : (v >= 2)) add_tri();
      end
      // wait for the pipeline to drain before a possible mode change
      while (busy) @(negedge clk);
    end
    chk(q.size() == 0 && got == tri_n, "all triangles out");
    // frame start resets the counter
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0; tri_n = 0;
    // rate: a 12-vertex strip with the output always ready
    always_ready = 1; prim_mode = PRIM_STRIP;
    begin
      int c0, c1;
      c0 = got;
      fork begin
        wait (got == c0 + 1); @(negedge clk);
        c1 = 0;
        while (got < c0 + 10) begin @(negedge clk); c1++; end
      end join_none
      for (int v = 0; v < 12; v++) begin
        vin_valid = 1; vin.x = coord_t'(v * 160); vin.y = coord_t'((v % 2) * 300); vin.restart = (v == 0);
        @(posedge clk); #1;
        wx[2] = wx[1]; wx[1] = wx[0]; wx[0] = v * 160;
        wy[2] = wy[1]; wy[1] = wy[0]; wy[0] = (v % 2) * 300;
        if (v >= 2) add_tri();
      end
      vin_valid = 0;
      wait (got >= c0 + 10); @(negedge clk);
      chk(c1 == 18, $sformatf("9 further strip triangles in %0d cycles (want 18)", c1));
      while (busy) @(negedge clk);
    end
    chk(q.size() == 0, "strip triangles out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
