// ols_enc: encoder (Enc) of the DEC Orthogonal Latin Square cache checker.
//
// Takes the 16 information bits d0..d15 and produces the 16 check bits
// c0..c15. Check bit j is the XOR of the 4 data bits of row j of the OLS
// parity-check matrix (ecc_pkg::OLS_ROW): four row parities, four column
// parities and two Latin-square groups of four on the 4x4 data grid.
// Combinational. The widths follow the published checker; the Latin squares
// are this design's choice (see ecc_pkg).
module ols_enc
  import ecc_pkg::*;
(
  input  data_t    d,  // information bits d0..d15
  output ols_chk_t c   // check bits c0..c15
);

  always_comb begin
    for (int unsigned j = 0; j < OLS_CHK_W; j++)
      c[j] = ^(d & OLS_ROW[j]);
  end

endmodule
