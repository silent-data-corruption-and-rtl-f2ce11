// ols_detector: on-line detector of critical faults in the DEC OLS checker.
//
// The same scheme as secded_detector applied to the OLS checker: an OLS
// encoder regenerates c0R..c15R from d' in parallel with the decoder, and a
// 32-pair two-rail checker compares ~d' with dc and ~c' with cR. (EC1, EC2) is
// a code word (01/10) exactly when dc = d' and c' = cR. Combinational.
module ols_detector
  import ecc_pkg::*;
(
  input  data_t      dr,  // d'0..d'15
  input  ols_chk_t   cr,  // c'0..c'15
  input  data_t      dc,  // dc0..dc15 from the checker
  output rail_pair_t ec   // {EC1, EC2}
);

  ols_chk_t cre;  // c0R..c15R

  ols_enc u_enc (.d(dr), .c(cre));

  trc #(.N(DATA_W + OLS_CHK_W)) u_trc (
    .x({~cr, ~dr}),
    .y({cre, dc}),
    .z(ec)
  );

endmodule
