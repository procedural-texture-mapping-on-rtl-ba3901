// ptm_tex_fog: color stage of the fog texture.
//
// The document's fog is the simplest gas: no shaping, and r = g = b =
// |fractalsum|. The fractal value is 8 x the octave sum, so |fractal| >> 3
// is used as the grey level, saturated at 255 (this design's scaling).
// Registered: the color appears one cycle after the input.
module ptm_tex_fog
  import ptm_pkg::*;
(
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  output color_t                   color
);

  logic [FRAC_W-1:0] mag;
  logic [FRAC_W-4:0] lvl;
  logic [7:0]        g;
  assign mag = fractal < 0 ? FRAC_W'(-fractal) : FRAC_W'(fractal);
  assign lvl = mag[FRAC_W-1:3];
  assign g   = (lvl > 255) ? 8'd255 : 8'(lvl);

  always_ff @(posedge clk) color <= '{r: g, g: g, b: g};

endmodule
