// ols_checker: the DEC Orthogonal Latin Square checker of a cache.
//
// Write side: the encoder adds 16 check bits wc to the 16 information bits wd.
// Read side: the decoder corrects up to two errors in the 32-bit word read
// back (rd = d', rc = c') and raises err (E) for any detected error. The two
// sides are independent combinational paths; the cache array is outside.
module ols_checker
  import ecc_pkg::*;
(
  input  data_t    wd,   // d0..d15 to be written
  output ols_chk_t wc,   // c0..c15 written with them
  input  data_t    rd,   // d'0..d'15 read
  input  ols_chk_t rc,   // c'0..c'15 read
  output data_t    dc,   // dc0..dc15 to the cache output
  output logic     err   // E
);

  ols_chk_t s_unused;
  data_t    e_unused;

  ols_enc     u_enc (.d(wd), .c(wc));
  ols_decoder u_dec (.dr(rd), .cr(rc), .dc(dc), .err(err), .s(s_unused), .e(e_unused));

endmodule
