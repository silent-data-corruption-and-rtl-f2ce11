// secded_decoder: DECODER of the SEC-DED Hsiao cache checker.
//
// Wires the four published blocks: the syndrome generator (SG) forms s0..s5
// from the word read from the cache (d', c'); the syndrome decoder (SD) turns
// s into error bits e0..e15; the corrector (C) XORs them into d' to give the
// corrected information bits dc0..dc15; the E/DE block flags single and double
// errors. A single error anywhere in the 22-bit word is corrected (an error in
// a check bit needs no data correction); a double error is flagged with
// (E, DE) = (1,1) and the data are passed uncorrected. Combinational.
// The syndrome and error bits are brought out for observation only.
module secded_decoder
  import ecc_pkg::*;
(
  input  data_t      dr,    // d'0..d'15
  input  hsiao_chk_t cr,    // c'0..c'5
  output data_t      dc,    // dc0..dc15
  output logic       err,   // E
  output logic       derr,  // DE
  output hsiao_chk_t s,     // syndrome (observation)
  output data_t      e      // error bits (observation)
);

  secded_sg     u_sg  (.dr(dr), .cr(cr), .s(s));
  secded_sd     u_sd  (.s(s), .e(e));
  ecc_corrector #(.W(DATA_W)) u_c (.dr(dr), .e(e), .dc(dc));
  secded_ede    u_ede (.s(s), .err(err), .derr(derr));

endmodule
