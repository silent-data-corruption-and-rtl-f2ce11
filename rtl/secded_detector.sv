// secded_detector: on-line detector of critical faults in the SEC-DED checker.
//
// It watches the checker from outside. An encoder, working in parallel with
// the checker's decoder, regenerates the check bits c0R..c5R from the
// information bits read from the cache (d'). A two-rail checker then compares
// the complement of d' with the checker's output dc, and the complement of the
// check bits read (c') with c0R..c5R. (EC1, EC2) is a code word (01/10) when
// dc = d' and c' = cR, i.e. when the checker passed the word unchanged and the
// word carried no error, and a non-code word (00/11) otherwise. A fault-free
// checker gives a code word with E = 0 and a non-code word with E = 1; any other
// combination reveals a critical checker fault (see crit_flag).
// Structure (Enc, NOTs, TRC) as published; the TRC pair order (16 data pairs,
// then 6 check pairs) is this design's choice. Combinational.
module secded_detector
  import ecc_pkg::*;
(
  input  data_t      dr,  // d'0..d'15 read from the cache
  input  hsiao_chk_t cr,  // c'0..c'5 read from the cache
  input  data_t      dc,  // dc0..dc15 given to the cache output by the checker
  output rail_pair_t ec   // {EC1, EC2}
);

  hsiao_chk_t cre;  // c0R..c5R

  secded_enc u_enc (.d(dr), .c(cre));

  trc #(.N(DATA_W + HSIAO_CHK_W)) u_trc (
    .x({~cr, ~dr}),
    .y({cre, dc}),
    .z(ec)
  );

endmodule
