// ols_errdet: Error Det block of the DEC OLS decoder.
//
// E = 1 when any syndrome bit is 1 (one or two errors in the word read),
// built, as published, as a balanced tree of 2-input ORs over the 16 syndrome
// bits: four levels of 8, 4, 2 and 1 gates. Combinational.
module ols_errdet
  import ecc_pkg::*;
(
  input  ols_chk_t s,    // syndrome s0..s15
  output logic     err   // E
);

  logic [7:0] l1;
  logic [3:0] l2;
  logic [1:0] l3;

  always_comb begin
    for (int i = 0; i < 8; i++) l1[i] = s[2*i] | s[2*i+1];
    for (int i = 0; i < 4; i++) l2[i] = l1[2*i] | l1[2*i+1];
    for (int i = 0; i < 2; i++) l3[i] = l2[2*i] | l2[2*i+1];
    err = l3[0] | l3[1];
  end

endmodule
