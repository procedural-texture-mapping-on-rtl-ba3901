// ptm_exp_table: shaping table of the fire texture, vg = e^-v.
//
// The document's fire datapath computes exp(v) and then 1/x; here both are
// one ROM of DEPTH x OUT_W bits (512 x 9 by default, this design's choice).
// Entry k holds round(511 * exp(-k / 64)) and is computed at initialisation
// by repeated fixed-point multiplication with exp(-1/64) (Q24 constant
// 16517109). The address is the integer texel part of v; the caller reads
// the entry as a coordinate in eighths of a texel. Synchronous read with
// enable: vg changes one cycle after a cycle with en = 1.
module ptm_exp_table #(
  parameter int DEPTH = 512,
  parameter int OUT_W = 9
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] v,
  output logic [OUT_W-1:0]         vg
);

  localparam longint STEP = 64'd16517109;   // exp(-1/64) * 2^24

  logic [OUT_W-1:0] rom [DEPTH];

  initial begin
    longint e;
    e = longint'((1 << OUT_W) - 1) << 24;
    for (int k = 0; k < DEPTH; k++) begin
      rom[k] = OUT_W'((e + (64'd1 << 23)) >> 24);
      e = (e * STEP) >> 24;
    end
  end

  always_ff @(posedge clk) if (en) vg <= rom[v];

endmodule
