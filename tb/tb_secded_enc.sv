// tb_secded_enc: checks the Hsiao encoder against the literal H table for all 65536 data words.
`include "tb/tb_check.svh"
module tb_secded_enc;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t d; hsiao_chk_t c;
  secded_enc dut (.d(d), .c(c));
  `TB_WATCHDOG(70000)
  initial begin
    for (int v = 0; v < 65536; v++) begin
      @(negedge clk); d = data_t'(v); #1;
      `CHECK(c == hs_enc(d), $sformatf("enc d=%h c=%h exp=%h", d, c, hs_enc(d)))
    end
    `TB_DONE
  end
endmodule
