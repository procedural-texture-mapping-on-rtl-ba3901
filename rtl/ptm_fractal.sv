// ptm_fractal: fractal function unit (turbulence / fractalsum).
//
// Sums four octaves of Perlin noise, each at twice the frequency and half
// the weight of the one before. As in the document's datapath, registers u,
// v, w are loaded from the input and then doubled each cycle, feeding one
// Perlin noise unit; the noise value, or its absolute value when `use_abs`
// is set, is accumulated as fractal = 2 * fractal + P. After the four
// octaves P0..P3 the register holds 8*P0 + 4*P1 + 2*P2 + P3, that is
// 8 * sum(2^-i * P(2^i u, 2^i v, 2^i w)), a signed FRAC_W-bit value.
//
// Timing: one input is accepted every four cycles (in_ready); the result
// is presented with out_valid for one cycle, 4 + LATENCY(noise) + 1 = 9
// cycles after the input was accepted, together with the input's sideband
// tag. There is no output stall: the consumer must take every result.
// Doubling wraps modulo 2^TEX_W; the noise lattice repeats every 256 cells
// anyway. use_abs = 1 gives turbulence, 0 the fractalsum.
module ptm_fractal
  import ptm_pkg::*;
#(
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [TEX_W-1:0] u,
  input  logic [TEX_W-1:0] v,
  input  logic [TEX_W-1:0] w,
  input  logic             use_abs,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic signed [FRAC_W-1:0] fractal,
  output logic [TAG_W-1:0] out_tag
);

  localparam int OCTAVES = 4;
  localparam int NLAT    = 4;     // ptm_perlin latency

  typedef struct packed {
    logic             valid;
    logic [1:0]       oct;
    logic             use_abs;
    logic [TAG_W-1:0] tag;
  } ctl_t;

  logic [TEX_W-1:0] ru, rv, rw;
  ctl_t             issue;
  ctl_t             dly [NLAT];
  logic [1:0]       left;          // octaves still to issue after this one
  logic             active;
  logic             take;

  assign in_ready = !active || (left == 2'd0);
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      left   <= '0;
      issue  <= '0;
    end else begin
      if (take) begin
        ru <= u;
        rv <= v;
        rw <= w;
        active        <= 1'b1;
        left          <= 2'(OCTAVES - 1);
        issue.valid   <= 1'b1;
        issue.oct     <= '0;
        issue.use_abs <= use_abs;
        issue.tag     <= in_tag;
      end else if (active && left != 2'd0) begin
        ru <= ru << 1;
        rv <= rv << 1;
        rw <= rw << 1;
        left      <= left - 1'b1;
        issue.oct <= issue.oct + 1'b1;
      end else begin
        active      <= 1'b0;
        issue.valid <= 1'b0;
      end
    end
  end

  logic signed [NOISE_W-1:0] pn;
  logic                      pn_valid;

  ptm_perlin u_noise (
    .clk, .rst_n,
    .in_valid (issue.valid),
    .u(ru), .v(rv), .w(rw),
    .out_valid(pn_valid),
    .noise    (pn)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NLAT; i++) dly[i] <= '0;
    end else begin
      dly[0] <= issue;
      for (int i = 1; i < NLAT; i++) dly[i] <= dly[i-1];
    end
  end

  ctl_t c;
  logic signed [NOISE_W:0] term;
  assign c    = dly[NLAT-1];
  assign term = (c.use_abs && pn < 0) ? -(NOISE_W+1)'(pn) : (NOISE_W+1)'(pn);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      fractal   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (c.valid) begin
        if (c.oct == 2'd0) fractal <= FRAC_W'(term);
        else               fractal <= (fractal <<< 1) + FRAC_W'(term);
        if (c.oct == 2'(OCTAVES - 1)) begin
          out_valid <= 1'b1;
          out_tag   <= c.tag;
        end
      end
    end
  end

  // the noise pipeline and the control delay line must stay aligned
  assert property (@(posedge clk) disable iff (!rst_n) pn_valid == c.valid);

endmodule
