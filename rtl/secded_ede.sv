// secded_ede: Error/Double Error block (E/DE) of the SEC-DED Hsiao decoder.
//
// From the syndrome it raises (E, DE) = (0,0) for no error, (1,0) for a single
// error and (1,1) for a double error, the published encoding. The logic is the
// usual Hsiao rule chosen here: E is the OR of the syndrome bits; because every
// H column has odd weight, a single error gives an odd-weight syndrome and a
// double error a non-zero even-weight one, so DE = E & ~(XOR of syndrome).
// Combinational.
module secded_ede
  import ecc_pkg::*;
(
  input  hsiao_chk_t s,     // syndrome s0..s5
  output logic       err,   // E
  output logic       derr   // DE
);

  assign err  = |s;
  assign derr = err & ~(^s);

endmodule
