// ols_sg: syndrome generator (SG) of the DEC OLS decoder.
//
// EXOR trees regenerate the check bits rc'0..rc'15 from the information bits
// read from the cache (d'), and a 2-input EXOR compares each with the check bit
// read (c'), giving the syndrome s0..s15; this is the published structure.
// A word read without error gives s = 0. Combinational.
module ols_sg
  import ecc_pkg::*;
(
  input  data_t    dr,  // d'0..d'15
  input  ols_chk_t cr,  // c'0..c'15
  output ols_chk_t s    // syndrome s0..s15
);

  ols_chk_t rc;  // regenerated check bits rc'0..rc'15

  ols_enc u_regen (.d(dr), .c(rc));

  assign s = rc ^ cr;

endmodule
