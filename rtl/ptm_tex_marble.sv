// ptm_tex_marble: color stage of the marble texture.
//
// Marble: the vein pattern indexes a 128-entry table with
// (turbulence + v) mod 128, following the document. Turbulence enters as
// fractal >> 4 and v as its integer texel part (this design's scaling).
//
// Inputs are the fractal value (signed, 8 x the octave sum) and the
// texture coordinate v (unsigned, TEX_FRAC fraction bits) of the same pixel. The color appears one cycle later (synchronous table read).
// The table can be reloaded through the we/waddr/wdata port.
module ptm_tex_marble
  import ptm_pkg::*;
(
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  input  logic [TEX_W-1:0]         v,
  output color_t                   color,
  input  logic                     we,
  input  logic [6:0]               waddr,
  input  color_t                   wdata
);

  logic [6:0]  idx;
  assign idx = 7'(v[TEX_W-1:TEX_FRAC] + 10'(fractal >>> 4));

  ptm_color_table #(.DEPTH(128), .PALETTE(0)) u_table (
    .clk, .raddr(idx), .rdata(color), .we, .waddr, .wdata
  );

endmodule
