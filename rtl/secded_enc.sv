// secded_enc: encoder (Enc) of the SEC-DED Hsiao cache checker.
//
// Takes the 16 information bits d0..d15 written to the cache and produces the
// 6 check bits c0..c5 stored beside them. Check bit j is the XOR of the data
// bits selected by row j of the Hsiao parity-check matrix (ecc_pkg::HSIAO_ROW);
// every row covers 8 data bits, so each check bit is an 8-input XOR tree.
// The block is purely combinational. The function and widths follow the
// published checker; the particular H matrix is this design's choice.
module secded_enc
  import ecc_pkg::*;
(
  input  data_t      d,  // information bits d0..d15
  output hsiao_chk_t c   // check bits c0..c5
);

  always_comb begin
    for (int unsigned j = 0; j < HSIAO_CHK_W; j++)
      c[j] = ^(d & HSIAO_ROW[j]);
  end

endmodule
