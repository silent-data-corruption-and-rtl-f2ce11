// secded_sd: syndrome decoder (SD) of the SEC-DED Hsiao decoder.
//
// Turns the 6-bit syndrome into 16 error bits e0..e15: e_k = 1 exactly when
// the syndrome equals column k of the data part of the H matrix, i.e. when
// information bit d'_k is the single erroneous bit. Each e_k is one 6-input
// AND of true or complemented syndrome bits. A zero syndrome, an error in a
// check bit (unit column) or a double error (even-weight syndrome) matches no
// data column and leaves all e_k = 0. Purely combinational.
module secded_sd
  import ecc_pkg::*;
(
  input  hsiao_chk_t s,  // syndrome s0..s5
  output data_t      e   // error bits e0..e15
);

  always_comb begin
    for (int unsigned k = 0; k < DATA_W; k++)
      e[k] = (s == HSIAO_COL[k]);
  end

endmodule
