// address_generator: builds one chained list per screen segment in external
// memory. A list is made of 32-word blocks: words 0..30 hold triangle
// pointers, word 31 holds the word address of the next block. Blocks are
// taken from a bump allocator that restarts at word 0 on frame_start.
//
// A per-segment table (valid, head block, tail block, fill index, triangle
// count) is kept on chip. Each accepted (segment, triangle) pair costs one
// memory write, or two when the tail block is full: first the link word,
// then the triangle pointer into the new block, with seg_ready low for the
// first of the two cycles. Writes go out on a valid/ready port; the unit
// holds while the memory is not ready. overflow rises when the allocator runs
// past MEM_AW and stays set until frame_start; pairs are dropped from then on.
// The query port reads a segment's head word address and triangle count
// combinationally, for the unit that walks the lists later. Head addresses
// are block aligned, so their low five bits are always zero, and triangle
// pointers fill only the low TRI_W bits of a memory word.
module address_generator
  import raster_pkg::*;
#(
  parameter int unsigned SEGC_W = 8,
  parameter int unsigned SXB    = 5,    // log2 of segments per row held
  parameter int unsigned SYB    = 6,    // log2 of segment rows held
  parameter int unsigned MEM_AW = 20,   // external memory word address width
  parameter int unsigned MEM_DW = 32,
  parameter int unsigned BLK_WORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              seg_valid,
  output logic              seg_ready,
  input  logic [SEGC_W-1:0] seg_x, seg_y,
  input  tri_ptr_t          seg_tri,
  output logic              mem_wr_valid,
  input  logic              mem_wr_ready,
  output logic [MEM_AW-1:0] mem_wr_addr,
  output logic [MEM_DW-1:0] mem_wr_data,
  input  logic [SEGC_W-1:0] q_seg_x, q_seg_y,
  output logic              q_valid,
  output logic [MEM_AW-1:0] q_head,
  output logic [TRI_W-1:0]  q_count,
  output logic              overflow
);
  localparam int unsigned NSEG = 1 << (SXB + SYB);
  localparam int unsigned OW   = $clog2(BLK_WORDS);
  localparam int unsigned BW   = MEM_AW - OW;   // block number width
  localparam logic [OW-1:0] LINK = OW'(BLK_WORDS - 1);

  logic [NSEG-1:0] vld;
  logic [BW-1:0]   head [NSEG];
  logic [BW-1:0]   tail [NSEG];
  logic [OW-1:0]   fill [NSEG];
  logic [TRI_W-1:0] cnt [NSEG];

  logic [BW:0]     next_free;
  logic            linked;      // link word written, triangle write pending
  logic [SXB+SYB-1:0] si, qi;

  assign si = {seg_y[SYB-1:0], seg_x[SXB-1:0]};
  assign qi = {q_seg_y[SYB-1:0], q_seg_x[SXB-1:0]};

  assign q_valid = vld[qi];
  assign q_head  = {head[qi], OW'(0)};
  assign q_count = vld[qi] ? cnt[qi] : '0;

  logic need_block, need_link, out_of_mem;
  always_comb begin
    need_block  = !vld[si] || (fill[si] == LINK && !linked);
    need_link   =  vld[si] &&  fill[si] == LINK && !linked;
    out_of_mem  = need_block && next_free[BW];
    mem_wr_valid = seg_valid && !overflow && !frame_start && !out_of_mem;
    if (!vld[si]) begin
      mem_wr_addr = {next_free[BW-1:0], OW'(0)};
      mem_wr_data = MEM_DW'(seg_tri);
    end else if (need_link) begin
      mem_wr_addr = {tail[si], LINK};
      mem_wr_data = MEM_DW'({next_free[BW-1:0], OW'(0)});
    end else begin
      mem_wr_addr = {tail[si], fill[si]};
      mem_wr_data = MEM_DW'(seg_tri);
    end
    seg_ready = frame_start ? 1'b0 :
                (overflow || out_of_mem) ? 1'b1 :
                (mem_wr_ready && !need_link);
  end

  wire fire = mem_wr_valid && mem_wr_ready;

  always_ff @(posedge clk) begin
    if (fire) begin
      if (!vld[si]) begin
        head[si] <= next_free[BW-1:0];
        tail[si] <= next_free[BW-1:0];
        fill[si] <= OW'(1);
        cnt[si]  <= TRI_W'(1);
      end else if (need_link) begin
        tail[si] <= next_free[BW-1:0];
        fill[si] <= '0;
      end else begin
        fill[si] <= fill[si] + 1'b1;
        cnt[si]  <= cnt[si] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; next_free <= '0; linked <= 1'b0; overflow <= 1'b0;
    end else if (frame_start) begin
      vld <= '0; next_free <= '0; linked <= 1'b0; overflow <= 1'b0;
    end else begin
      if (seg_valid && out_of_mem) overflow <= 1'b1;
      if (fire) begin
        if (!vld[si]) begin
          vld[si]   <= 1'b1;
          next_free <= next_free + 1'b1;
        end else if (need_link) begin
          next_free <= next_free + 1'b1;
          linked    <= 1'b1;
        end else begin
          linked    <= 1'b0;
        end
      end
    end
  end
endmodule
