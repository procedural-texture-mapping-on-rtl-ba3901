// ptm_texgen: procedural texture generator.
//
// Seen from outside it behaves like a texture memory: texture coordinates
// u, v, w go in, a color comes out. Inside, the coordinates are shaped
// (cloud: u doubled; fire: v replaced by e^-v from ptm_exp_table, read as
// eighths of a texel; the others unchanged), passed through the fractal
// unit (turbulence for marble, wood and brick, fractalsum for fog, cloud and
// fire) and colored by the selected texture's color stage.
//
// The document loads one texture's circuit into the FPGA at a time. This
// design keeps all six color stages and one shared fractal unit, and the
// static input `tex_sel` selects the texture in place of reconfiguration;
// it must not change while pixels are in flight. The color tables are
// loaded through tbl_we/tbl_sel/tbl_addr/tbl_data (brick uses 8 address
// bits, the others 7).
//
// Timing: valid/ready on the input, one pixel accepted per four cycles at
// most (the fractal unit's rate, as in the document). An accepted pixel
// waits in the input register s0 until the fractal unit takes it; out_valid
// pulses with color and the input's tag 11 cycles after acceptance when the
// fractal unit is free, and up to 3 cycles later when the pixel had to wait
// in s0. The output cannot be stalled.
module ptm_texgen
  import ptm_pkg::*;
#(
  parameter int TAG_W = 2 * XY_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  texture_e         tex_sel,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [TEX_W-1:0] u,
  input  logic [TEX_W-1:0] v,
  input  logic [TEX_W-1:0] w,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output color_t           color,
  output logic [TAG_W-1:0] out_tag,
  input  logic             tbl_we,
  input  texture_e         tbl_sel,
  input  logic [7:0]       tbl_addr,
  input  color_t           tbl_data
);

  typedef struct packed {
    logic [TEX_W-1:0] u, v, w;
    logic [TAG_W-1:0] tag;
  } ftag_t;

  // shaping stage
  logic             s0_valid, f_ready, take;
  ftag_t            s0;
  logic [8:0]       vexp;
  logic [TEX_W-1:0] ug, vg;

  assign in_ready = !s0_valid || f_ready;
  assign take     = in_valid && in_ready;

  ptm_exp_table #(.DEPTH(512), .OUT_W(9)) u_exp (
    .clk, .en(take), .v(v[TEX_FRAC +: 9]), .vg(vexp)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) s0_valid <= 1'b0;
    else if (in_ready) s0_valid <= in_valid;
    if (take) s0 <= '{u: u, v: v, w: w, tag: in_tag};
  end

  assign ug = (tex_sel == TEX_CLOUD) ? s0.u << 1 : s0.u;
  assign vg = (tex_sel == TEX_FIRE) ? TEX_W'({vexp, 3'b000}) : s0.v;

  // fractal unit
  logic                     f_valid, use_abs;
  logic signed [FRAC_W-1:0] fr;
  ftag_t                    ft;

  assign use_abs = (tex_sel == TEX_MARBLE) || (tex_sel == TEX_WOOD) || (tex_sel == TEX_BRICK);

  ptm_fractal #(.TAG_W($bits(ftag_t))) u_fractal (
    .clk, .rst_n,
    .in_valid (s0_valid),
    .in_ready (f_ready),
    .u(ug), .v(vg), .w(s0.w),
    .use_abs,
    .in_tag   (s0),
    .out_valid(f_valid),
    .fractal  (fr),
    .out_tag  (ft)
  );

  // color stages
  color_t c_marble, c_wood, c_brick, c_fog, c_cloud, c_fire;

  ptm_tex_marble u_marble (.clk, .fractal(fr), .v(ft.v), .color(c_marble),
    .we(tbl_we && tbl_sel == TEX_MARBLE), .waddr(tbl_addr[6:0]), .wdata(tbl_data));
  ptm_tex_wood u_wood (.clk, .fractal(fr), .u(ft.u), .v(ft.v), .w(ft.w), .color(c_wood),
    .we(tbl_we && tbl_sel == TEX_WOOD), .waddr(tbl_addr[6:0]), .wdata(tbl_data));
  ptm_tex_brick u_brick (.clk, .fractal(fr), .u(ft.u), .v(ft.v), .color(c_brick),
    .we(tbl_we && tbl_sel == TEX_BRICK), .waddr(tbl_addr), .wdata(tbl_data));
  ptm_tex_fog u_fog (.clk, .fractal(fr), .color(c_fog));
  ptm_tex_cloud u_cloud (.clk, .fractal(fr), .color(c_cloud));
  ptm_tex_fire u_fire (.clk, .fractal(fr), .color(c_fire),
    .we(tbl_we && tbl_sel == TEX_FIRE), .waddr(tbl_addr[6:0]), .wdata(tbl_data));

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= f_valid;
    out_tag <= ft.tag;
  end

  always_comb begin
    unique case (tex_sel)
      TEX_MARBLE: color = c_marble;
      TEX_WOOD:   color = c_wood;
      TEX_BRICK:  color = c_brick;
      TEX_FOG:    color = c_fog;
      TEX_CLOUD:  color = c_cloud;
      default:    color = c_fire;
    endcase
  end

endmodule
