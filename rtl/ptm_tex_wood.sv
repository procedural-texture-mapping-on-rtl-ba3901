// ptm_tex_wood: color stage of the wood texture.
//
// Wood: concentric growth layers, index (u^2 + v^2 + alpha*w +
// turbulence) mod 128 into a 128-entry grain table, following the document,
// with alpha = 1 (no multiplier in the document's datapath figure). Integer
// texel parts of u, v, w are used and turbulence enters as fractal >> 4
// (this design's scaling).
//
// Inputs are the fractal value (signed, 8 x the octave sum) and the
// texture coordinates u, v, w (unsigned, TEX_FRAC fraction bits) of the
// same pixel. The color appears one cycle later (synchronous table read).
// The table can be reloaded through the we/waddr/wdata port.
module ptm_tex_wood
  import ptm_pkg::*;
(
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  input  logic [TEX_W-1:0]         u,
  input  logic [TEX_W-1:0]         v,
  input  logic [TEX_W-1:0]         w,
  output color_t                   color,
  input  logic                     we,
  input  logic [6:0]               waddr,
  input  color_t                   wdata
);

  logic [19:0] ui, vi;
  logic [6:0]  idx;
  assign ui  = 20'(u[TEX_W-1:TEX_FRAC]);
  assign vi  = 20'(v[TEX_W-1:TEX_FRAC]);
  assign idx = 7'(ui * ui + vi * vi + 20'(w[TEX_W-1:TEX_FRAC]) + 20'(signed'(fractal >>> 4)));

  ptm_color_table #(.DEPTH(128), .PALETTE(1)) u_table (
    .clk, .raddr(idx), .rdata(color), .we, .waddr, .wdata
  );

endmodule
