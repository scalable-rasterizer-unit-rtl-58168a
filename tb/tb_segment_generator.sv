// tb_segment_generator: random boxes with random output back-pressure; checks
// the row-major segment order, the last flag, the triangle pointer and the
// rate of one segment per clock when not held.
module tb_segment_generator;
  import raster_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic bb_valid, bb_ready, seg_valid, seg_ready, seg_last;
  logic [7:0] bb_sx0, bb_sy0, bb_sx1, bb_sy1, seg_x, seg_y;
  tri_ptr_t bb_tri, seg_tri;
  typedef struct { int x, y, t; bit last; } exp_t;
  exp_t q[$];
  int boxes_in = 0, segs_out = 0, cycles = 0;
  bit hold_ready = 0;

  segment_generator #(.SEGC_W(8)) dut (.*);

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // producer
  initial begin
    bb_valid = 0; {bb_sx0, bb_sy0, bb_sx1, bb_sy1} = '0; bb_tri = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      int x0, y0, w, h;
      x0 = $urandom_range(0, 20); y0 = $urandom_range(0, 20);
      w = $urandom_range(0, 4); h = $urandom_range(0, 3);
      bb_valid = 1; bb_sx0 = 8'(x0); bb_sy0 = 8'(y0); bb_sx1 = 8'(x0 + w); bb_sy1 = 8'(y0 + h);
      bb_tri = tri_ptr_t'(b);
      for (int y = y0; y <= y0 + h; y++)
        for (int x = x0; x <= x0 + w; x++)
          q.push_back('{x, y, b, (x == x0 + w && y == y0 + h)});
      do @(posedge clk); while (!bb_ready);
      #1 bb_valid = 0;
      @(negedge clk);
    end
  end

  // consumer
  initial begin
    seg_ready = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      seg_ready = hold_ready ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      if (seg_valid && seg_ready) begin
        exp_t e;
        e = q.pop_front();
        chk(int'(seg_x) == e.x && int'(seg_y) == e.y && int'(seg_tri) == e.t && seg_last == e.last,
            $sformatf("seg (%0d,%0d,%0d) want (%0d,%0d,%0d)", seg_x, seg_y, seg_tri, e.x, e.y, e.t));
        segs_out++;
      end
    end
  end

  initial begin
    wait (rst_n);
    wait (q.size() > 0);
    while (q.size() > 0 || bb_valid) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(!seg_valid, "idle at end");
    // rate: a 8x4 box with ready held high takes 32 cycles
    hold_ready = 1;
    @(negedge clk);
    bb_valid = 1; bb_sx0 = 0; bb_sy0 = 0; bb_sx1 = 7; bb_sy1 = 3; bb_tri = 5;
    for (int y = 0; y <= 3; y++) for (int x = 0; x <= 7; x++) q.push_back('{x, y, 5, (x == 7 && y == 3)});
    @(negedge clk); bb_valid = 0;
    cycles = 0;
    while (seg_valid) begin @(negedge clk); cycles++; end
    chk(cycles == 32, $sformatf("32 segments took %0d cycles", cycles));
    chk(q.size() == 0, "all segments seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
