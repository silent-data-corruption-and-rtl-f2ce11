// ecc_corrector: corrector (C) shared by the SEC-DED and DEC checkers.
//
// One 2-input EXOR per information bit: dc_k = d'_k ^ e_k, so every bit the
// syndrome decoder or majority voter marks as erroneous is flipped back.
// Both checkers use the same EXOR corrector, as published. Combinational.
module ecc_corrector #(
  parameter int unsigned W = 16  // information bits
) (
  input  logic [W-1:0] dr,  // d', information bits read from the cache
  input  logic [W-1:0] e,   // error bits
  output logic [W-1:0] dc   // corrected information bits
);

  assign dc = dr ^ e;

endmodule
