// segment_generator: walks the segments of a bounding box, row by row, one
// (SX, SY) pair per clock. It is two adders: one increments SX, one SY.
// A box is accepted on bb_valid && bb_ready (ready only when idle or on the
// last segment of the previous box, so boxes follow back to back). Each
// output carries the triangle pointer; seg_last marks the last segment of a
// box. The walk holds while seg_valid && !seg_ready.
module segment_generator
  import raster_pkg::*;
#(
  parameter int unsigned SEGC_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bb_valid,
  output logic              bb_ready,
  input  logic [SEGC_W-1:0] bb_sx0, bb_sy0, bb_sx1, bb_sy1,
  input  tri_ptr_t          bb_tri,
  output logic              seg_valid,
  input  logic              seg_ready,
  output logic [SEGC_W-1:0] seg_x, seg_y,
  output tri_ptr_t          seg_tri,
  output logic              seg_last
);
  logic [SEGC_W-1:0] x0, x1, y1;

  assign seg_last = (seg_x == x1) && (seg_y == y1);
  assign bb_ready = !seg_valid || (seg_ready && seg_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_valid <= 1'b0;
      seg_x <= '0; seg_y <= '0; x0 <= '0; x1 <= '0; y1 <= '0; seg_tri <= '0;
    end else if (bb_valid && bb_ready) begin
      seg_valid <= 1'b1;
      seg_x <= bb_sx0; seg_y <= bb_sy0;
      x0 <= bb_sx0; x1 <= bb_sx1; y1 <= bb_sy1;
      seg_tri <= bb_tri;
    end else if (seg_valid && seg_ready) begin
      if (seg_last) begin
        seg_valid <= 1'b0;
      end else if (seg_x == x1) begin
        seg_x <= x0;
        seg_y <= seg_y + 1'b1;
      end else begin
        seg_x <= seg_x + 1'b1;
      end
    end
  end
endmodule
