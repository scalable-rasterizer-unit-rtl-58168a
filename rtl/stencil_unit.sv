// stencil_unit: stencil test and update for one pixel, combinational.
// Test: (ref & read_mask) FUNC (stored & read_mask). The operation applied
// is op_sfail when the stencil test fails, op_zfail when it passes and the
// depth test fails, op_zpass when both pass. The new value is merged under
// the write mask: new = (stored & ~wmask) | (op_result & wmask). An HSR cell
// holds two of these, one per lane, in the same pipeline stage as the depth
// test.
module stencil_unit
  import raster_pkg::*;
(
  input  sten_cfg_t cfg,
  input  sten_t     stored,
  input  logic      depth_pass,
  output logic      sten_pass,
  output sten_t     sten_new
);
  sten_op_e op;
  sten_t    res;

  always_comb begin
    sten_pass = cmp_pass(cfg.func, Z_W'(cfg.ref_val & cfg.rmask), Z_W'(stored & cfg.rmask));
    op  = !sten_pass ? cfg.op_sfail : (!depth_pass ? cfg.op_zfail : cfg.op_zpass);
    res = sten_apply(op, stored, cfg.ref_val);
    sten_new = (stored & ~cfg.wmask) | (res & cfg.wmask);
  end
endmodule
