// ols_mv: majority voter (MV) of the DEC OLS decoder.
//
// Each information bit d'_i is covered by 2t = 4 check bits, one per group
// (ecc_pkg::ols_check_of). The voter sets e_i = 1 when at least 3 of those 4
// syndrome bits are 1 (a strict majority). Because two data bits share at most
// one check, an erroneous bit always collects at least 3 votes and a correct
// bit at most 2 when the word holds one or two errors, so up to two errors
// anywhere in the 32-bit word are located. Each e_i is a 4-input
// at-least-3-of-4 gate whose inputs are fixed at elaboration. Combinational.
// The voting threshold is this design's reading of the standard OLS decoder.
module ols_mv
  import ecc_pkg::*;
(
  input  ols_chk_t s,  // syndrome s0..s15
  output data_t    e   // error bits e0..e15
);

  for (genvar i = 0; i < DATA_W; i++) begin : g_bit
    localparam int unsigned Q0 = ols_check_of(i, 0);
    localparam int unsigned Q1 = ols_check_of(i, 1);
    localparam int unsigned Q2 = ols_check_of(i, 2);
    localparam int unsigned Q3 = ols_check_of(i, 3);
    assign e[i] = (s[Q0] & s[Q1] & (s[Q2] | s[Q3])) | (s[Q2] & s[Q3] & (s[Q0] | s[Q1]));
  end

endmodule
