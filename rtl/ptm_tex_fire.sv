// ptm_tex_fire: color stage of the fire texture.
//
// Fire: the fractalsum of the shaped coordinates (u, e^-v, w; the
// shaping is done before the fractal unit) indexes a 128-entry flame table.
// The index is (fractal >> 4) mod 128 in two's complement (this design's
// scaling).
//
// The input is the fractal value (signed, 8 x the octave sum). The color
// appears one cycle later (synchronous table read).
// The table can be reloaded through the we/waddr/wdata port.
module ptm_tex_fire
  import ptm_pkg::*;
(
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  output color_t                   color,
  input  logic                     we,
  input  logic [6:0]               waddr,
  input  color_t                   wdata
);

  logic [6:0]  idx;
  assign idx = 7'(fractal >>> 4);

  ptm_color_table #(.DEPTH(128), .PALETTE(3)) u_table (
    .clk, .raddr(idx), .rdata(color), .we, .waddr, .wdata
  );

endmodule
