// ptm_xor_table: constant XOR table (bit-matrix product over GF(2)).
//
// y[i] = XOR over j of (x[j] AND R[i][j]): each output bit is the parity of
// the input bits selected by a constant row vector. As the document notes,
// with constant rows this costs a handful of LUTs instead of a 256 x 8 RAM.
// The row constants are not given by the document; each instance receives
// its own matrix through the parameter R (row i in bits [8i+7:8i]). The
// default is an invertible matrix chosen for this design. Combinational.
module ptm_xor_table #(
  parameter int               W = 8,
  parameter logic [W*W-1:0]   R = 64'h8F_C7_E3_F1_F8_7C_3E_1F
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  always_comb begin
    for (int i = 0; i < W; i++) y[i] = ^(x & R[i*W +: W]);
  end

endmodule
