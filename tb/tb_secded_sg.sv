// tb_secded_sg: checks the Hsiao syndrome generator on random and error-free read words.
`include "tb/tb_check.svh"
module tb_secded_sg;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t dr; hsiao_chk_t cr, s;
  secded_sg dut (.dr(dr), .cr(cr), .s(s));
  `TB_WATCHDOG(5000)
  initial begin
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      dr = data_t'($urandom);
      cr = (n % 2 == 0) ? hs_enc(dr) : hsiao_chk_t'($urandom);
      #1;
      `CHECK(s == (hs_enc(dr) ^ cr), $sformatf("sg dr=%h cr=%h s=%h", dr, cr, s))
      if (n % 2 == 0) `CHECK(s == '0, "error-free word must give a zero syndrome")
    end
    `TB_DONE
  end
endmodule
