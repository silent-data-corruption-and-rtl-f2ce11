// ols_decoder: DECODER of the DEC OLS cache checker.
//
// The syndrome generator (SG) forms s0..s15 from the word read from the cache
// (d', c'); the majority voter (MV) marks the erroneous information bits in
// e0..e15; the corrector (C), the same EXOR corrector as in the SEC-DED
// checker, gives dc0..dc15; Error Det raises E for any non-zero syndrome.
// Up to two errors in the 32-bit word are corrected. Combinational. The
// syndrome and error bits are brought out for observation only.
module ols_decoder
  import ecc_pkg::*;
(
  input  data_t    dr,   // d'0..d'15
  input  ols_chk_t cr,   // c'0..c'15
  output data_t    dc,   // dc0..dc15
  output logic     err,  // E
  output ols_chk_t s,    // syndrome (observation)
  output data_t    e     // error bits (observation)
);

  ols_sg        u_sg (.dr(dr), .cr(cr), .s(s));
  ols_mv        u_mv (.s(s), .e(e));
  ecc_corrector #(.W(DATA_W)) u_c (.dr(dr), .e(e), .dc(dc));
  ols_errdet    u_ed (.s(s), .err(err));

endmodule
