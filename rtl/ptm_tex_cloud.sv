// ptm_tex_cloud: color stage of the cloud texture.
//
// The document's cloud doubles u before the fractalsum (done ahead of the
// fractal unit), takes c from the fractalsum through a square root (the
// sqrt block of its datapath figure), and sets r = g = c when c exceeds a
// fixed cutoff, else 0; b is 255 for the sky. Here c = isqrt(max(fractal,
// 0) * 32), which maps the largest fractal value, 1920, to 247; the factor
// and CUTOFF are this design's choice. The square root is a combinational
// digit-by-digit integer root. Registered: one cycle of latency.
// The blue output bits are constant (255) by the texture's definition;
// synthesis reports them as constant outputs, which is intended.
module ptm_tex_cloud
  import ptm_pkg::*;
#(
  parameter int CUTOFF = 64
) (
  input  logic                     clk,
  input  logic signed [FRAC_W-1:0] fractal,
  output color_t                   color
);

  function automatic logic [7:0] isqrt16(logic [15:0] x);
    logic [15:0] rem;
    logic [7:0]  root;
    logic [9:0]  trial;
    rem  = '0;
    root = '0;
    for (int i = 7; i >= 0; i--) begin
      rem   = {rem[13:0], x[2*i+1 -: 2]};
      trial = {root, 2'b01};
      if (rem >= 16'(trial)) begin
        rem  = rem - 16'(trial);
        root = {root[6:0], 1'b1};
      end else begin
        root = {root[6:0], 1'b0};
      end
    end
    return root;
  endfunction

  logic [15:0] x;
  logic [7:0]  c, rg;
  assign x  = fractal < 0 ? 16'd0 : 16'(fractal) << 5;
  assign c  = isqrt16(x);
  assign rg = (c > 8'(CUTOFF)) ? c : 8'd0;

  always_ff @(posedge clk) color <= '{r: rg, g: rg, b: 8'd255};

endmodule
