// secded_sg: syndrome generator (SG) of the SEC-DED Hsiao decoder.
//
// Recomputes the 6 check bits from the information bits read from the cache
// (d') with the encoder's XOR trees and XORs each with the check bit read
// (c'), giving the syndrome s0..s5. A word read without error gives s = 0;
// a single or double error gives s != 0. Purely combinational.
// The regenerate-and-compare structure is this design's reading of the
// published block diagram; the H matrix comes from ecc_pkg.
module secded_sg
  import ecc_pkg::*;
(
  input  data_t      dr,  // d'0..d'15, information bits read from the cache
  input  hsiao_chk_t cr,  // c'0..c'5, check bits read from the cache
  output hsiao_chk_t s    // syndrome s0..s5
);

  hsiao_chk_t regen;

  secded_enc u_regen (.d(dr), .c(regen));

  assign s = regen ^ cr;

endmodule
