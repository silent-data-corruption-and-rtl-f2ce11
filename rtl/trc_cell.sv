// trc_cell: basic two-rail code checker cell with two input pairs.
//
// Inputs a = (a1, a2) and b = (b1, b2) are two-rail pairs, valid when the two
// rails differ. The output pair is z1 = a1 b1 + a2 b2, z2 = a1 b2 + a2 b1: it
// is a valid (complementary) pair exactly when both inputs are valid, and
// 00 or 11 otherwise. This is the classic self-checking cell; its gates are
// this design's choice since the published scheme only names a two-rail
// checker. Combinational.
module trc_cell (
  input  logic [1:0] a,  // {a1, a2}
  input  logic [1:0] b,  // {b1, b2}
  output logic [1:0] z   // {z1, z2}
);

  assign z[1] = (a[1] & b[1]) | (a[0] & b[0]);
  assign z[0] = (a[1] & b[0]) | (a[0] & b[1]);

endmodule
