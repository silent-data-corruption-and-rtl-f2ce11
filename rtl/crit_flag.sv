// crit_flag: reads the detector outputs together with the checker's E signal.
//
// A fault-free checker gives (EC1, EC2, E) = (0,0,1), (1,1,1), (0,1,0) or
// (1,0,0): a non-code detector word with E = 1, a code word with E = 0. The
// other four combinations mean a critical checker fault: an error flagged but
// not corrected (code word with E = 1), or a correct word altered (non-code
// word with E = 0). Hence fault = ~(EC1 ^ EC2 ^ E). The combinations are the
// published ones; the single XNOR that evaluates them is this design's.
// Combinational.
module crit_flag
  import ecc_pkg::*;
(
  input  rail_pair_t ec,    // {EC1, EC2} from the detector
  input  logic       err,   // E from the checker's decoder
  output logic       fault  // 1: critical fault in the checker
);

  assign fault = ~(ec[1] ^ ec[0] ^ err);

endmodule
