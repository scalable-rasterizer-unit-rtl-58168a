// raster_pkg: types, constants and helper functions shared by the segmenting
// unit and the hidden surface removal (HSR) unit.
//
// Number formats: screen-space x/y coordinates are 16-bit signed fixed point
// with COORD_FRAC fractional bits (the 16-bit width is the source design's,
// the 12.4 split is this design's choice). Depth values are 24-bit unsigned
// fixed point fractions in [0,1). Edge variables are 32-bit two's complement.
// Stencil values are 8 bits. Triangle pointers are TRI_W bits.
package raster_pkg;

  localparam int XY_W       = 16;               // screen coordinate width
  localparam int COORD_FRAC = 4;                // fractional bits of x/y
  localparam int PIX        = 1 << COORD_FRAC;  // one pixel in coordinate units
  localparam int Z_W        = 24;               // depth width
  localparam int S_W        = 32;               // edge variable width
  localparam int STEN_W     = 8;                // stencil width
  localparam int TRI_W      = 20;               // triangle pointer width

  typedef logic signed [XY_W-1:0] coord_t;
  typedef logic        [Z_W-1:0]  depth_t;
  typedef logic signed [S_W-1:0]  edge_t;
  typedef logic        [STEN_W-1:0] sten_t;
  typedef logic        [TRI_W-1:0]  tri_ptr_t;

  // Comparison functions of the depth and stencil tests. Code 5 is unused and
  // behaves as NEVER.
  typedef enum logic [2:0] {
    CMP_NEVER   = 3'd0,
    CMP_LESS    = 3'd1,
    CMP_EQUAL   = 3'd2,
    CMP_LEQUAL  = 3'd3,
    CMP_GREATER = 3'd4,
    CMP_GEQUAL  = 3'd6,
    CMP_ALWAYS  = 3'd7
  } cmp_func_e;

  // Stencil operations.
  typedef enum logic [2:0] {
    SOP_KEEP      = 3'd0,
    SOP_ZERO      = 3'd1,
    SOP_REPLACE   = 3'd2,
    SOP_INCR_SAT  = 3'd3,
    SOP_DECR_SAT  = 3'd4,
    SOP_INVERT    = 3'd5,
    SOP_INCR_WRAP = 3'd6,
    SOP_DECR_WRAP = 3'd7
  } sten_op_e;

  typedef enum logic [1:0] {
    PRIM_LIST  = 2'd0,   // three new vertices per triangle
    PRIM_STRIP = 2'd1    // one new vertex per triangle after the first two
  } prim_mode_e;

  typedef struct packed {
    coord_t x;
    coord_t y;
    logic   restart;     // first vertex of a new strip or list
  } vertex_t;

  typedef struct packed {
    cmp_func_e func;
    sten_t     ref_val;
    sten_t     rmask;
    sten_t     wmask;
    sten_op_e  op_sfail;  // stencil test fails
    sten_op_e  op_zfail;  // stencil passes, depth fails
    sten_op_e  op_zpass;  // both pass
  } sten_cfg_t;

  typedef struct packed {
    cmp_func_e zfunc;       // opaque-mode depth function
    logic      zwrite;      // depth write enable (opaque mode)
    logic      transparent; // 1: transparent multi-pass mode, 1 pixel/clk
    logic      parity;      // transparent: which depth location is "processed"
  } depth_cfg_t;

  // Per-line start values produced by the VPU and stepped in y.
  typedef struct packed {
    edge_t  s0, s1, s2;
    depth_t z;
  } start_t;

  // Per-pixel increments in x and per-line increments in y.
  typedef struct packed {
    edge_t  ds0x, ds1x, ds2x;
    depth_t dzx;
    edge_t  ds0y, ds1y, ds2y;
    depth_t dzy;
  } delta_t;

  typedef struct packed {
    coord_t   x0, y0, x1, y1, x2, y2;
    depth_t   z0, z1, z2;
    tri_ptr_t tri_id;
  } triangle_t;

  // One sample of an HSR cell's buffer.
  typedef struct packed {
    depth_t   z0;    // depth location 0 (the depth buffer in opaque mode)
    depth_t   z1;    // depth location 1 (used by the transparent passes)
    sten_t    sten;
    tri_ptr_t tri_id;
  } buf_entry_t;

  // Clear field mask bits.
  localparam int CLR_Z0 = 0, CLR_Z1 = 1, CLR_STEN = 2, CLR_TRI = 3;

  // a FUNC b, with a the incoming (interpolated or reference) value and b the
  // stored one.
  function automatic logic cmp_pass(cmp_func_e f, logic [Z_W-1:0] a, logic [Z_W-1:0] b);
    unique case (f)
      CMP_LESS:    return a <  b;
      CMP_EQUAL:   return a == b;
      CMP_LEQUAL:  return a <= b;
      CMP_GREATER: return a >  b;
      CMP_GEQUAL:  return a >= b;
      CMP_ALWAYS:  return 1'b1;
      default:     return 1'b0;
    endcase
  endfunction

  function automatic sten_t sten_apply(sten_op_e op, sten_t cur, sten_t ref_val);
    unique case (op)
      SOP_KEEP:      return cur;
      SOP_ZERO:      return '0;
      SOP_REPLACE:   return ref_val;
      SOP_INCR_SAT:  return (cur == '1) ? cur : cur + 1'b1;
      SOP_DECR_SAT:  return (cur == '0) ? cur : cur - 1'b1;
      SOP_INVERT:    return ~cur;
      SOP_INCR_WRAP: return cur + 1'b1;
      default:       return cur - 1'b1;
    endcase
  endfunction

endpackage
