// ptm_smooth: smoothing function sm(x) = 3x^2 - 2x^3 held in a ROM.
//
// The document stores sm in embedded RAM blocks. Here the ROM has
// 2^IN_W entries of OUT_W bits; entry i holds round(2^OUT_W * sm(i / 2^IN_W)),
// capped at 2^OUT_W - 1, computed in integer arithmetic at initialisation.
// The default 64 x 6 bits is this design's choice (three such tables, one per
// coordinate, come to 1152 bits). Synchronous read: y is valid one cycle
// after x.
module ptm_smooth #(
  parameter int IN_W  = 6,
  parameter int OUT_W = 6
) (
  input  logic             clk,
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] y
);

  localparam int N = 1 << IN_W;
  logic [OUT_W-1:0] rom [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      // sm(i/N) * 2^OUT_W = (3 i^2 N - 2 i^3) * 2^OUT_W / N^3
      longint num, val;
      num = (3 * longint'(i) * i * N - 2 * longint'(i) * i * i) << OUT_W;
      val = (num + (longint'(N) * N * N) / 2) / (longint'(N) * N * N);
      if (val > (1 << OUT_W) - 1) val = (1 << OUT_W) - 1;
      rom[i] = OUT_W'(val);
    end
  end

  always_ff @(posedge clk) y <= rom[x];

endmodule
