// hsr_cell: one hidden surface removal cell with its own sample buffer.
//
// The cell owns SLOTS lines of a segment (with N cells, cell n holds lines
// n, n+N, ...). A load delivers the edge variables and depth of the line's
// first sample, the per-sample x increments, the triangle pointer and the
// line slot; the cell then walks the line without further input:
//   opaque mode       two samples per clock, SEG_W/2 cycles per line;
//   transparent mode  one sample per clock, SEG_W cycles per line.
// The buffer is split into an even-x and an odd-x memory so that both lanes
// read and write every clock. Pipeline: stage 0 computes coverage and depth
// (covering_unit, depth_unit) and reads the buffer; stage 1 runs the depth
// and stencil tests (depth_unit, two stencil_units) on the read data and
// writes back: depth (if the depth test and stencil test pass and, in opaque
// mode, zwrite is set), triangle pointer (same condition) and stencil
// (always, under the write mask), all only for covered samples. A line
// therefore finishes two cycles after its last step. Successive lines of the
// same slot are at least one line time apart, so no read-after-write
// forwarding is needed. A load may coincide with the last step of the
// previous line, so lines follow each other without a gap.
//
// Clear: clr_start walks all buffer words (SLOTS*SEG_W/2 cycles), setting
// the fields selected by clr_mask (CLR_* bits) to clr_z / clr_sten / 0.
// Readout: rd_x/rd_slot select a sample; rd_data follows one cycle later.
// busy is high from a load or clear until its last write.
module hsr_cell
  import raster_pkg::*;
#(
  parameter int unsigned SEG_W = 32,
  parameter int unsigned SLOTS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  depth_cfg_t  dcfg,
  input  sten_cfg_t   scfg,
  input  logic        load,
  input  logic [$clog2(SLOTS+1)-1:0] load_slot,
  input  start_t      st,
  input  edge_t       ds0x, ds1x, ds2x,
  input  depth_t      dzx,
  input  tri_ptr_t    tri_in,
  input  logic        clr_start,
  input  logic [3:0]  clr_mask,
  input  depth_t      clr_z,
  input  sten_t       clr_sten,
  input  logic [$clog2(SEG_W)-1:0]   rd_x,
  input  logic [$clog2(SLOTS+1)-1:0] rd_slot,
  output buf_entry_t  rd_data,
  output logic        busy,
  output logic [1:0]  pix_written    // samples whose depth was written this cycle
);
  localparam int unsigned HALF  = SEG_W / 2;
  localparam int unsigned WORDS = SLOTS * HALF;
  localparam int unsigned AW    = $clog2(WORDS);
  localparam int unsigned XW    = $clog2(SEG_W);
  localparam int unsigned SLW   = $clog2(SLOTS+1);

  buf_entry_t mem_e [WORDS];
  buf_entry_t mem_o [WORDS];

  // ---------------- stage 0 ----------------
  logic          run, clr;
  logic [XW-1:0] x;              // sample x (opaque: even sample of the pair)
  logic [AW-1:0] cbase;          // clear word counter
  logic [SLW-1:0] slot;
  tri_ptr_t      tri_r;
  logic          two_lane;
  logic [1:0]    cov;
  depth_t        zl [2];

  assign two_lane = !dcfg.transparent;

  wire last_step = two_lane ? (x == XW'(SEG_W-2)) : (x == XW'(SEG_W-1));

  covering_unit u_cov (
    .clk, .load, .step(run), .two_lane,
    .s0_in(st.s0), .s1_in(st.s1), .s2_in(st.s2),
    .ds0_in(ds0x), .ds1_in(ds1x), .ds2_in(ds2x),
    .covered(cov)
  );

  // stage-1 registers
  logic          v_e, v_o, c_e, c_o, clr1;
  logic [AW-1:0] a_e, a_o;
  depth_t        z_e, z_o;
  tri_ptr_t      tri_s1;
  buf_entry_t    rd_e, rd_o;
  depth_t        cmp_z [2];
  depth_t        st0 [2];
  depth_t        st1 [2];
  logic [1:0]    zpass;
  logic          wr_loc;

  depth_unit u_depth (
    .clk, .load, .step(run), .two_lane,
    .z_in(st.z), .dz_in(dzx), .z_lane(zl),
    .cfg(dcfg), .cmp_z, .stored0(st0), .stored1(st1), .pass(zpass), .wr_loc
  );

  logic [AW-1:0] addr0;
  assign addr0 = clr ? cbase : AW'(slot) * AW'(HALF) + AW'(x >> 1);

  // lane -> memory steering for stage 0
  logic          re_e, re_o, cv_e, cv_o;
  depth_t        zs_e, zs_o;
  always_comb begin
    if (two_lane) begin
      re_e = run; re_o = run;
      cv_e = cov[0]; cv_o = cov[1];
      zs_e = zl[0];  zs_o = zl[1];
    end else begin
      re_e = run && !x[0]; re_o = run && x[0];
      cv_e = cov[0]; cv_o = cov[0];
      zs_e = zl[0];  zs_o = zl[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; clr <= 1'b0; x <= '0; cbase <= '0; slot <= '0; tri_r <= '0;
      v_e <= 1'b0; v_o <= 1'b0; clr1 <= 1'b0;
    end else begin
      if (load) begin
        run <= 1'b1; x <= '0; slot <= load_slot; tri_r <= tri_in;
      end else if (run) begin
        if (last_step) run <= 1'b0;
        x <= two_lane ? x + XW'(2) : x + XW'(1);
      end
      if (clr_start) begin
        clr <= 1'b1; cbase <= '0;
      end else if (clr) begin
        if (cbase == AW'(WORDS-1)) clr <= 1'b0;
        cbase <= cbase + 1'b1;
      end
      v_e  <= re_e || clr;
      v_o  <= re_o || clr;
      clr1 <= clr;
    end
  end

  always_ff @(posedge clk) begin
    rd_e <= mem_e[addr0];
    rd_o <= mem_o[addr0];
    a_e <= addr0; a_o <= addr0;
    c_e <= cv_e;  c_o <= cv_o;
    z_e <= zs_e;  z_o <= zs_o;
    tri_s1 <= tri_r;
  end

  // ---------------- stage 1 ----------------
  logic [1:0] spass;
  sten_t      snew [2];

  assign cmp_z[0] = z_e;  assign cmp_z[1] = z_o;
  assign st0[0] = rd_e.z0; assign st0[1] = rd_o.z0;
  assign st1[0] = rd_e.z1; assign st1[1] = rd_o.z1;

  stencil_unit u_sten_e (.cfg(scfg), .stored(rd_e.sten), .depth_pass(zpass[0]),
                         .sten_pass(spass[0]), .sten_new(snew[0]));
  stencil_unit u_sten_o (.cfg(scfg), .stored(rd_o.sten), .depth_pass(zpass[1]),
                         .sten_pass(spass[1]), .sten_new(snew[1]));

  function automatic buf_entry_t update(buf_entry_t old, depth_t z, logic zp, logic sp,
                                        sten_t sn, logic loc, logic zwr, tri_ptr_t t);
    buf_entry_t n;
    n = old;
    n.sten = sn;
    if (zp && sp) begin
      n.tri_id = t;
      if (zwr) begin
        if (loc) n.z1 = z;
        else     n.z0 = z;
      end
    end
    return n;
  endfunction

  function automatic buf_entry_t clear(buf_entry_t old, logic [3:0] m, depth_t z, sten_t s);
    buf_entry_t n;
    n = old;
    if (m[CLR_Z0])   n.z0 = z;
    if (m[CLR_Z1])   n.z1 = z;
    if (m[CLR_STEN]) n.sten = s;
    if (m[CLR_TRI])  n.tri_id = '0;
    return n;
  endfunction

  logic zwr;
  assign zwr = dcfg.transparent || dcfg.zwrite;

  always_ff @(posedge clk) begin
    if (v_e && (clr1 || c_e))
      mem_e[a_e] <= clr1 ? clear(rd_e, clr_mask, clr_z, clr_sten)
                         : update(rd_e, z_e, zpass[0], spass[0], snew[0], wr_loc, zwr, tri_s1);
    if (v_o && (clr1 || c_o))
      mem_o[a_o] <= clr1 ? clear(rd_o, clr_mask, clr_z, clr_sten)
                         : update(rd_o, z_o, zpass[1], spass[1], snew[1], wr_loc, zwr, tri_s1);
  end

  assign pix_written[0] = v_e && !clr1 && c_e && zpass[0] && spass[0];
  assign pix_written[1] = v_o && !clr1 && c_o && zpass[1] && spass[1];

  // Readout port.
  logic [AW-1:0] ra;
  assign ra = AW'(rd_slot) * AW'(HALF) + AW'(rd_x >> 1);
  always_ff @(posedge clk) begin
    rd_data <= rd_x[0] ? mem_o[ra] : mem_e[ra];
  end

  assign busy = run || clr || v_e || v_o;

  // A load may arrive while idle or in the last step of the previous line
  // (lines back to back); a clear only while idle.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> (!run || last_step) && !clr);
  assert property (@(posedge clk) disable iff (!rst_n) clr_start |-> !(run || clr));
endmodule
