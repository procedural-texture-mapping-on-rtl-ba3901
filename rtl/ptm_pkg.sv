// ptm_pkg: types and constants shared by the procedural texture mapping
// pipeline.
//
// The instruction word (32 bits: 2-bit opcode, 5-bit parameter code, 25-bit
// value), the 21 quad parameters and the 512 x 512 screen follow the
// document. The fixed-point formats are this design's own choices:
//   * quad x parameters (xleftinit, xleftinc, xrightinit, xrightinc) are
//     signed with X_FRAC = 12 fraction bits; y parameters are integers;
//   * Y accumulators of the incremental algorithms are ACC_W = 40 bits;
//   * texture coordinates u, v, w are unsigned TEX_W = 16 bits with
//     TEX_FRAC = 6 fraction bits (10 integer bits, texture space 512 fits);
//   * a color is 8 bits per r, g, b component.
package ptm_pkg;

  localparam int INSTR_W    = 32;
  localparam int OP_W       = 2;
  localparam int PCODE_W    = 5;
  localparam int VAL_W      = 25;
  localparam int NUM_QPARAM = 21;

  localparam int SCR_W  = 512;
  localparam int SCR_H  = 512;
  localparam int XY_W   = 9;

  localparam int X_FRAC   = 12;
  localparam int ACC_W    = 40;
  localparam int TEX_W    = 16;
  localparam int TEX_FRAC = 6;
  localparam int NOISE_W  = 8;
  localparam int FRAC_W   = 12;   // fractal value, signed

  typedef enum logic [OP_W-1:0] {
    OP_PARAM = 2'd0,
    OP_START = 2'd1,
    OP_SFB   = 2'd2,
    OP_CLS   = 2'd3
  } opcode_e;

  typedef struct packed {
    opcode_e             op;
    logic [PCODE_W-1:0]  pcode;
    logic [VAL_W-1:0]    value;
  } instr_t;

  // Quad parameter codes of Table 3.1.
  typedef enum int {
    QP_YINIT = 0, QP_YFINAL = 1, QP_XLINIT = 2, QP_XLINC = 3, QP_XRINIT = 4,
    QP_XRINC = 5, QP_Y0S = 6, QP_Y1S = 7, QP_Y2S = 8, QP_Y3S = 9,
    QP_A00 = 10, QP_A01 = 11, QP_A10 = 12, QP_A11 = 13, QP_A20 = 14,
    QP_A21 = 15, QP_A30 = 16, QP_A31 = 17, QP_UINIT = 18, QP_VINIT = 19,
    QP_WINIT = 20
  } qparam_e;

  typedef logic [NUM_QPARAM-1:0][VAL_W-1:0] qparams_t;

  typedef logic signed [ACC_W-1:0] acc_t;

  // One scan-line as handed from the quad unit to the pixel unit.
  typedef struct packed {
    logic [XY_W-1:0]   y;
    logic [13:0]       xl;      // floor(xsleft), two's complement
    logic [13:0]       xr;      // floor(xsright), two's complement
    logic [ACC_W-1:0]  y0, y1, y2, y3;      // Y0s..Y3s, two's complement
    logic [ACC_W-1:0]  d0, d1, d2, d3;      // per-pixel increments
    logic [VAL_W-1:0]  uinit, vinit, winit;
  } line_t;

  typedef struct packed {
    logic [XY_W-1:0]  x;
    logic [XY_W-1:0]  y;
    logic [TEX_W-1:0] u, v, w;
  } pixel_t;

  typedef struct packed {
    logic [7:0] r, g, b;
  } color_t;

  typedef enum logic [2:0] {
    TEX_MARBLE = 3'd0,
    TEX_WOOD   = 3'd1,
    TEX_BRICK  = 3'd2,
    TEX_FOG    = 3'd3,
    TEX_CLOUD  = 3'd4,
    TEX_FIRE   = 3'd5
  } texture_e;

  function automatic acc_t sext_val(logic [VAL_W-1:0] v);
    return acc_t'(signed'(v));
  endfunction

endpackage
