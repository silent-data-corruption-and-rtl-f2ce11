// ecc_checkers_top: the two cache ECC checkers, each with its on-line detector
// of critical checker faults, side by side.
//
// SEC-DED side (hs_*): a Hsiao (22,16) checker. hs_wd is encoded to the check
// bits hs_wc that go to the cache with it; the word read back (hs_rd, hs_rc) is
// corrected to hs_dc with error flags (E, DE) = (hs_err, hs_derr). A detector
// watches the same read word and hs_dc and gives (EC1, EC2) = hs_ec; hs_fault
// combines it with E and is 1 when the checker itself has a critical fault.
// DEC side (ols_*): the same arrangement with an Orthogonal Latin Square
// (32,16) checker that corrects up to two errors and has no DE output.
// The cache array that lies between each write word and read word is not part
// of this design. Everything is combinational: results are valid one
// propagation delay after the inputs settle.
module ecc_checkers_top
  import ecc_pkg::*;
(
  // SEC-DED Hsiao checker
  input  data_t      hs_wd,
  output hsiao_chk_t hs_wc,
  input  data_t      hs_rd,
  input  hsiao_chk_t hs_rc,
  output data_t      hs_dc,
  output logic       hs_err,
  output logic       hs_derr,
  output rail_pair_t hs_ec,
  output logic       hs_fault,
  // DEC OLS checker
  input  data_t      ols_wd,
  output ols_chk_t   ols_wc,
  input  data_t      ols_rd,
  input  ols_chk_t   ols_rc,
  output data_t      ols_dc,
  output logic       ols_err,
  output rail_pair_t ols_ec,
  output logic       ols_fault
);

  secded_checker  u_hs_chk (.wd(hs_wd), .wc(hs_wc), .rd(hs_rd), .rc(hs_rc),
                            .dc(hs_dc), .err(hs_err), .derr(hs_derr));
  secded_detector u_hs_det (.dr(hs_rd), .cr(hs_rc), .dc(hs_dc), .ec(hs_ec));
  crit_flag       u_hs_cf  (.ec(hs_ec), .err(hs_err), .fault(hs_fault));

  ols_checker     u_ols_chk (.wd(ols_wd), .wc(ols_wc), .rd(ols_rd), .rc(ols_rc),
                             .dc(ols_dc), .err(ols_err));
  ols_detector    u_ols_det (.dr(ols_rd), .cr(ols_rc), .dc(ols_dc), .ec(ols_ec));
  crit_flag       u_ols_cf  (.ec(ols_ec), .err(ols_err), .fault(ols_fault));

endmodule
