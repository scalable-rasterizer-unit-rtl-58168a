// rasterizer_top: the deferred-rendering rasterizer front end.
//
// Two units share the clock and reset:
//   * bbsu      the bounding box segmenting unit. During the first phase of a
//               frame it takes screen-space vertices and appends every
//               triangle's pointer to the chained list of each segment its
//               bounding box touches; the lists are written to external
//               memory through the mem_wr_* port, and the seg_q_* port
//               returns a segment's list head and length.
//   * hsr_unit  the hidden surface removal unit. In the second phase,
//               segment by segment, the triangles of the segment's list are
//               fetched from external memory (outside this design) and fed
//               to tri_*; the unit determines coverage, depth and stencil for
//               every sample of the segment in its on-chip buffers, read out
//               on rd_* for the shading stage.
// The external memory, the list walker and triangle fetch between the two
// phases are not part of this design; their signals are the top's ports.
module rasterizer_top
  import raster_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned SEGC_W     = 8,
  parameter int unsigned SXB        = 5,
  parameter int unsigned SYB        = 6,
  parameter int unsigned MEM_AW     = 20,
  parameter int unsigned MEM_DW     = 32,
  parameter int unsigned N_CELLS    = 8,
  parameter int unsigned SEG_W      = 32,
  parameter int unsigned SEG_H      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // segmenting unit
  input  logic               frame_start,
  input  prim_mode_e         prim_mode,
  input  logic [15:0]        recip_w,
  input  logic [15:0]        recip_h,
  input  logic [SEGC_W-1:0]  seg_nx,
  input  logic [SEGC_W-1:0]  seg_ny,
  input  logic               vin_valid,
  output logic               vin_ready,
  input  vertex_t            vin,
  output logic               mem_wr_valid,
  input  logic               mem_wr_ready,
  output logic [MEM_AW-1:0]  mem_wr_addr,
  output logic [MEM_DW-1:0]  mem_wr_data,
  input  logic [SEGC_W-1:0]  seg_q_x, seg_q_y,
  output logic               seg_q_valid,
  output logic [MEM_AW-1:0]  seg_q_head,
  output logic [TRI_W-1:0]   seg_q_count,
  output logic               list_overflow,
  output logic               seg_strobe,
  output logic               seg_busy,
  // hidden surface removal unit
  input  depth_cfg_t         dcfg,
  input  sten_cfg_t          scfg,
  input  logic [$clog2(SEG_H/N_CELLS+1)-1:0] aa_log2,
  input  coord_t             aa_dx [SEG_H/N_CELLS],
  input  coord_t             aa_dy [SEG_H/N_CELLS],
  input  logic [1:0]         grid_log2,
  input  logic [$clog2(SEG_H/N_CELLS+1)-1:0] seg_slots,
  input  coord_t             seg_ox,
  input  coord_t             seg_oy,
  input  logic               tri_valid,
  output logic               tri_ready,
  input  triangle_t          tri_in,
  input  logic               clr_start,
  input  logic [3:0]         clr_mask,
  input  depth_t             clr_z,
  input  sten_t              clr_sten,
  input  logic [$clog2(SEG_W)-1:0] rd_x,
  input  logic [$clog2(SEG_H)-1:0] rd_y,
  output buf_entry_t         rd_data,
  output logic               hsr_busy,
  output logic [$clog2(2*N_CELLS+1)-1:0] pix_count
);
  bbsu #(
    .FIFO_DEPTH(FIFO_DEPTH), .SEGC_W(SEGC_W), .SXB(SXB), .SYB(SYB),
    .MEM_AW(MEM_AW), .MEM_DW(MEM_DW)
  ) u_bbsu (
    .clk, .rst_n, .frame_start, .prim_mode, .recip_w, .recip_h, .seg_nx, .seg_ny,
    .vin_valid, .vin_ready, .vin,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .q_seg_x(seg_q_x), .q_seg_y(seg_q_y), .q_valid(seg_q_valid), .q_head(seg_q_head),
    .q_count(seg_q_count), .overflow(list_overflow), .seg_strobe, .busy(seg_busy)
  );

  hsr_unit #(.N_CELLS(N_CELLS), .SEG_W(SEG_W), .SEG_H(SEG_H)) u_hsr (
    .clk, .rst_n, .dcfg, .scfg, .aa_log2, .aa_dx, .aa_dy, .grid_log2, .seg_slots, .seg_ox, .seg_oy,
    .tri_valid, .tri_ready, .tri_in,
    .clr_start, .clr_mask, .clr_z, .clr_sten,
    .rd_x, .rd_y, .rd_data, .busy(hsr_busy), .pix_count
  );
endmodule
