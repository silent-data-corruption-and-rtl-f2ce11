// tb_ols_errdet: checks Error Det for all 65536 syndromes.
`include "tb/tb_check.svh"
module tb_ols_errdet;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  ols_chk_t s; logic err;
  ols_errdet dut (.s(s), .err(err));
  `TB_WATCHDOG(70000)
  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk); s = ols_chk_t'(v); #1;
      `CHECK(err == (v != 0), $sformatf("E s=%h", s))
    end
    `TB_DONE
  end
endmodule
