// ptm_perlin: pipelined 3-D Perlin noise P(u, v, w).
//
// Each coordinate is split into its integer part (lattice cell, taken
// modulo 256) and its fraction (TEX_FRAC bits). Eight random number units
// (ptm_rng) give the values at the cell's corners (int and int + 1 in each
// coordinate), three ROMs (ptm_smooth) apply sm(f) = 3f^2 - 2f^3 to the
// fractions, and seven interpolation units (ptm_lerp) blend the corners:
// four along w, two along v, one along u. This is the document's structure;
// the widths and the pipeline cut are this design's.
//
// Pipeline: cycle 1 registers the corner values alongside the smoothed
// fractions (synchronous ROM read), cycles 2..4 register each interpolation
// level. A new input is accepted every cycle; out_valid/noise follow
// in_valid by LATENCY = 4 cycles. noise is signed, in [-128, 127].
module ptm_perlin
  import ptm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TEX_W-1:0] u,
  input  logic [TEX_W-1:0] v,
  input  logic [TEX_W-1:0] w,
  output logic             out_valid,
  output logic signed [NOISE_W-1:0] noise
);

  localparam int LATENCY = 4;

  logic [7:0] ui0, vi0, wi0, ui1, vi1, wi1;
  assign ui0 = u[TEX_FRAC +: 8];
  assign vi0 = v[TEX_FRAC +: 8];
  assign wi0 = w[TEX_FRAC +: 8];
  assign ui1 = ui0 + 8'd1;
  assign vi1 = vi0 + 8'd1;
  assign wi1 = wi0 + 8'd1;

  // corner index k = {iu, iv, iw}, as x000 .. x111 of the document
  logic [7:0] rnd [8];
  for (genvar k = 0; k < 8; k++) begin : g_corner
    ptm_rng u_rng (
      .a(k[2] ? ui1 : ui0),
      .b(k[1] ? vi1 : vi0),
      .c(k[0] ? wi1 : wi0),
      .r(rnd[k])
    );
  end

  logic [TEX_FRAC-1:0] su, sv, sw;
  ptm_smooth #(.IN_W(TEX_FRAC), .OUT_W(TEX_FRAC)) u_smu (.clk, .x(u[TEX_FRAC-1:0]), .y(su));
  ptm_smooth #(.IN_W(TEX_FRAC), .OUT_W(TEX_FRAC)) u_smv (.clk, .x(v[TEX_FRAC-1:0]), .y(sv));
  ptm_smooth #(.IN_W(TEX_FRAC), .OUT_W(TEX_FRAC)) u_smw (.clk, .x(w[TEX_FRAC-1:0]), .y(sw));

  logic signed [NOISE_W-1:0] c1 [8];
  logic [TEX_FRAC-1:0] su2, sv2, su3;
  logic signed [NOISE_W-1:0] lw [4], c2 [4], lv [2], c3 [2], lu;
  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    for (int k = 0; k < 8; k++) c1[k] <= signed'(rnd[k]);
  end

  for (genvar k = 0; k < 4; k++) begin : g_lw
    ptm_lerp #(.W(NOISE_W), .CW(TEX_FRAC)) u_l (.a(c1[2*k]), .b(c1[2*k+1]), .c(sw), .y(lw[k]));
  end
  always_ff @(posedge clk) begin
    c2  <= lw;
    su2 <= su;
    sv2 <= sv;
  end

  for (genvar k = 0; k < 2; k++) begin : g_lv
    ptm_lerp #(.W(NOISE_W), .CW(TEX_FRAC)) u_l (.a(c2[2*k]), .b(c2[2*k+1]), .c(sv2), .y(lv[k]));
  end
  always_ff @(posedge clk) begin
    c3  <= lv;
    su3 <= su2;
  end

  ptm_lerp #(.W(NOISE_W), .CW(TEX_FRAC)) u_lu (.a(c3[0]), .b(c3[1]), .c(su3), .y(lu));
  always_ff @(posedge clk) noise <= lu;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
