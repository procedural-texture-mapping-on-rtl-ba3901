// ptm_color_table: color look-up table of a procedural texture.
//
// DEPTH entries of 24-bit color (8 bits per r, g, b) with a write port for
// loading a palette at run time and a synchronous read port (rdata is valid
// one cycle after raddr). The document fills its tables with layer, grain,
// brick/mortar or flame colors but does not list them; this design starts
// each table with a default palette computed at initialisation, chosen by
// PALETTE: 0 marble (white-grey bands), 1 wood (brown grain), 2 brick
// (grey mortar in 0..127, red brick in 128..255), 3 fire (black-red-yellow).
module ptm_color_table
  import ptm_pkg::*;
#(
  parameter int DEPTH   = 128,
  parameter int PALETTE = 0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output color_t                   rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  color_t                   wdata
);

  color_t mem [DEPTH];

  function automatic color_t default_color(int i);
    int t;
    color_t c;
    t = (i % 128) < 64 ? (i % 128) : 127 - (i % 128);     // 0..63..0
    unique case (PALETTE)
      0: c = '{r: 8'(255 - 2*t), g: 8'(255 - 2*t), b: 8'(255 - t)};
      1: c = '{r: 8'(150 + t), g: 8'(90 + t/2), b: 8'(40)};
      2: c = (i < 128) ? '{r: 8'(150 + i/4), g: 8'(150 + i/4), b: 8'(150 + i/4)}
                       : '{r: 8'(130 + (i-128)/2), g: 8'(40 + (i-128)/4), b: 8'(30)};
      default: c = '{r: 8'(i < 64 ? 4*i : 255), g: 8'(i < 64 ? 0 : 4*(i-64)), b: 8'(0)};
    endcase
    return c;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = default_color(i);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
