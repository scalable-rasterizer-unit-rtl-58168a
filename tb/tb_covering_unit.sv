// tb_covering_unit: loads edge variables of random triangles at a line start
// and checks the two lanes against the inside test evaluated directly from
// the edge equations at every sample, in two-lane and one-lane stepping.
module tb_covering_unit;
  import raster_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, inside_cnt = 0;
  logic load, step, two_lane;
  edge_t s0_in, s1_in, s2_in, ds0_in, ds1_in, ds2_in;
  logic [1:0] covered;

  covering_unit dut (.*);

  function automatic longint ef(longint xa, longint ya, longint xb, longint yb, longint x, longint y);
    return (x - xa) * (ya - yb) - (y - ya) * (xa - xb);
  endfunction

  function automatic bit ins(longint a, longint b, longint c);
    return ((a < 0) != (b < 0)) && ((b < 0) != (c < 0));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; step = 0; two_lane = 1;
    for (int t = 0; t < 200; t++) begin
      longint x0, y0, x1, y1, x2, y2, xs, ys;
      x0 = $urandom_range(0, 1023); y0 = $urandom_range(0, 1023);
      x1 = $urandom_range(0, 1023); y1 = $urandom_range(0, 1023);
      x2 = $urandom_range(0, 1023); y2 = $urandom_range(0, 1023);
      xs = $urandom_range(0, 511) + 8; ys = $urandom_range(0, 1023) + 8;
      two_lane = t[0];
      @(negedge clk);
      load = 1;
      s0_in = edge_t'(ef(x0, y0, x1, y1, xs, ys));
      s1_in = edge_t'(ef(x0, y0, x2, y2, xs, ys));
      s2_in = edge_t'(ef(x1, y1, x2, y2, xs, ys));
      ds0_in = edge_t'(PIX * (y0 - y1)); ds1_in = edge_t'(PIX * (y0 - y2)); ds2_in = edge_t'(PIX * (y1 - y2));
      @(negedge clk); load = 0; step = 1;
      for (int i = 0; i < 32; i += (two_lane ? 2 : 1)) begin
        for (int l = 0; l < (two_lane ? 2 : 1); l++) begin
          longint x;
          bit e;
          x = xs + (i + l) * PIX;
          e = ins(ef(x0, y0, x1, y1, x, ys), ef(x0, y0, x2, y2, x, ys), ef(x1, y1, x2, y2, x, ys));
          inside_cnt += int'(e);
          checks++;
          if (covered[l] != e) begin failures++; $display("FAIL t=%0d x=%0d lane %0d", t, i, l); end
        end
        @(negedge clk);
      end
      step = 0;
    end
    checks++; if (inside_cnt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
