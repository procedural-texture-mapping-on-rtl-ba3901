// ptm_tex_brick: color stage of the brick texture.
//
// A two-dimensional pattern on the integer texel parts of u and v, as in
// the document: the row number is v / (H + 2*MH); rows with an even number
// are shifted by (W + 2*MW) / 2. With u_r = u_new mod (W + 2*MW) and
// v_r = v mod (H + 2*MH), the point is brick when MH < v_r < H + MH and
// MW < u_r < W + MW (the test as the document's datapath figure draws it),
// otherwise mortar. The turbulence (fractal >> 4, mod 128) then picks one
// of 128 mortar colors (table entries 0..127) or 128 brick colors
// (128..255). Brick and mortar sizes are this design's choice. The color
// appears one cycle after the inputs.
module ptm_tex_brick
  import ptm_pkg::*;
#(
  parameter int BW  = 12,   // brick width W, texels
  parameter int BH  = 5,    // brick height H
  parameter int MW  = 1,    // mortar width
  parameter int MH  = 1     // mortar height
) (
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  input  logic [TEX_W-1:0]         u,
  input  logic [TEX_W-1:0]         v,
  output color_t                   color,
  input  logic                     we,
  input  logic [7:0]               waddr,
  input  color_t                   wdata
);

  localparam int PU = BW + 2*MW;
  localparam int PV = BH + 2*MH;

  logic [9:0] ui, vi, row, unew, ur, vr;
  logic       in_brick;
  logic [7:0] idx;

  always_comb begin
    ui   = u[TEX_W-1:TEX_FRAC];
    vi   = v[TEX_W-1:TEX_FRAC];
    row  = vi / 10'(PV);
    unew = row[0] ? ui : ui + 10'(PU / 2);
    ur   = unew % 10'(PU);
    vr   = vi % 10'(PV);
    in_brick = (vr > 10'(MH)) && (vr < 10'(BH + MH)) &&
               (ur > 10'(MW)) && (ur < 10'(BW + MW));
    idx  = {in_brick, 7'(fractal >>> 4)};
  end

  ptm_color_table #(.DEPTH(256), .PALETTE(2)) u_table (
    .clk, .raddr(idx), .rdata(color), .we, .waddr, .wdata
  );

endmodule
