// ptm_lerp: linear interpolation unit, f(a, b, c) = a + c * (b - a).
//
// As in the document: one subtractor, one multiplier, one adder. a and b are
// signed W-bit values, c an unsigned fraction with CW bits (0 <= c < 1).
// The product is truncated toward minus infinity. The result stays between
// a and b, so it fits in W bits. Combinational.
module ptm_lerp #(
  parameter int W  = 8,
  parameter int CW = 6
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic [CW-1:0]       c,
  output logic signed [W-1:0] y
);

  logic signed [W:0]      diff;
  logic signed [W+CW+1:0] prod;

  assign diff = (W+1)'(b) - (W+1)'(a);
  assign prod = diff * signed'({1'b0, c});
  assign y    = W'((W+CW+2)'(a) + (prod >>> CW));

endmodule
