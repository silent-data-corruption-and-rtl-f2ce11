// tb_secded_sd: checks the Hsiao syndrome decoder for all 64 syndromes.
`include "tb/tb_check.svh"
module tb_secded_sd;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  hsiao_chk_t s; data_t e, exp_e;
  secded_sd dut (.s(s), .e(e));
  `TB_WATCHDOG(200)
  initial begin
    for (int v = 0; v < 64; v++) begin
      @(negedge clk); s = hsiao_chk_t'(v); #1;
      exp_e = '0;
      for (int k = 0; k < 16; k++) if (HS_COL[k] == s) exp_e[k] = 1'b1;
      `CHECK(e == exp_e, $sformatf("sd s=%h e=%h exp=%h", s, e, exp_e))
    end
    `TB_DONE
  end
endmodule
