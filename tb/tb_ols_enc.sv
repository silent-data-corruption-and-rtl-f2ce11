// tb_ols_enc: checks the OLS encoder against the literal Latin-square tables for all 65536 data words.
`include "tb/tb_check.svh"
module tb_ols_enc;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t d; ols_chk_t c;
  ols_enc dut (.d(d), .c(c));
  `TB_WATCHDOG(70000)
  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk); d = data_t'(v); #1;
      `CHECK(c == ols_enc(d), $sformatf("enc d=%h c=%h exp=%h", d, c, ols_enc(d)))
    end
    `TB_DONE
  end
endmodule
