// ptm_rng: random number unit R(a, b, c) of the Perlin noise function.
//
// Following the document's structure, the lattice coordinates are folded in
// one at a time: r = T3(T2(T1(a) + b) + c), where T1..T3 are constant XOR
// tables (ptm_xor_table) and the additions are modulo 256. The three
// table constants are this design's choice: invertible 8 x 8 bit matrices,
// so that R is a bijection in each coordinate. Combinational; the 8-bit result
// is read as a signed value in [-128, 127].
module ptm_rng (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  output logic [7:0] r
);

  logic [7:0] t1, t2, t3;

  ptm_xor_table #(.W(8), .R(64'h8F_C7_E3_F1_F8_7C_3E_1F)) u_t1 (.x(a),      .y(t1));
  ptm_xor_table #(.W(8), .R(64'h1D_BB_30_25_18_CA_4D_A5)) u_t2 (.x(t1 + b), .y(t2));
  ptm_xor_table #(.W(8), .R(64'h71_19_CB_1F_72_3F_1E_D9)) u_t3 (.x(t2 + c), .y(t3));

  assign r = t3;

endmodule
