// bbsu: bounding box segmenting unit. Vertices in, per-segment triangle lists
// out to external memory. Three parts in a chain, each with valid/ready:
// the input pipeline (vertex FIFO, primitive assembly, 3-tap sorters, two
// reciprocal multipliers) finds the range of segments a triangle's bounding
// box covers; the segment generator emits those segments one per clock; the
// address generator appends the triangle pointer to each segment's chained
// list. The segment size is programmable through recip_w/recip_h (see
// bbsu_input_pipeline). busy is high while any stage holds work.
module bbsu
  import raster_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned SEGC_W     = 8,
  parameter int unsigned SXB        = 5,
  parameter int unsigned SYB        = 6,
  parameter int unsigned RECIP_W    = 16,
  parameter int unsigned RECIP_FRAC = 16,
  parameter int unsigned MEM_AW     = 20,
  parameter int unsigned MEM_DW     = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  prim_mode_e         prim_mode,
  input  logic [RECIP_W-1:0] recip_w,
  input  logic [RECIP_W-1:0] recip_h,
  input  logic [SEGC_W-1:0]  seg_nx,
  input  logic [SEGC_W-1:0]  seg_ny,
  input  logic               vin_valid,
  output logic               vin_ready,
  input  vertex_t            vin,
  output logic               mem_wr_valid,
  input  logic               mem_wr_ready,
  output logic [MEM_AW-1:0]  mem_wr_addr,
  output logic [MEM_DW-1:0]  mem_wr_data,
  input  logic [SEGC_W-1:0]  q_seg_x, q_seg_y,
  output logic               q_valid,
  output logic [MEM_AW-1:0]  q_head,
  output logic [TRI_W-1:0]   q_count,
  output logic               overflow,
  output logic               seg_strobe,   // one segment/triangle pair accepted
  output logic               busy
);
  logic              bb_valid, bb_ready;
  logic [SEGC_W-1:0] bb_sx0, bb_sy0, bb_sx1, bb_sy1;
  tri_ptr_t          bb_tri;
  logic              seg_valid, seg_ready, seg_last;
  logic [SEGC_W-1:0] seg_x, seg_y;
  tri_ptr_t          seg_tri;
  logic              in_busy;

  bbsu_input_pipeline #(
    .FIFO_DEPTH(FIFO_DEPTH), .SEGC_W(SEGC_W), .RECIP_W(RECIP_W), .RECIP_FRAC(RECIP_FRAC)
  ) u_in (
    .clk, .rst_n, .frame_start, .prim_mode, .recip_w, .recip_h, .seg_nx, .seg_ny,
    .vin_valid, .vin_ready, .vin,
    .bb_valid, .bb_ready, .bb_sx0, .bb_sy0, .bb_sx1, .bb_sy1, .bb_tri, .busy(in_busy)
  );

  segment_generator #(.SEGC_W(SEGC_W)) u_gen (
    .clk, .rst_n,
    .bb_valid, .bb_ready, .bb_sx0, .bb_sy0, .bb_sx1, .bb_sy1, .bb_tri,
    .seg_valid, .seg_ready, .seg_x, .seg_y, .seg_tri, .seg_last
  );

  address_generator #(
    .SEGC_W(SEGC_W), .SXB(SXB), .SYB(SYB), .MEM_AW(MEM_AW), .MEM_DW(MEM_DW)
  ) u_addr (
    .clk, .rst_n, .frame_start,
    .seg_valid, .seg_ready, .seg_x, .seg_y, .seg_tri,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .q_seg_x, .q_seg_y, .q_valid, .q_head, .q_count, .overflow
  );

  assign seg_strobe = seg_valid && seg_ready;
  assign busy = in_busy || seg_valid;
endmodule
