// tb_ols_mv: checks the majority voter on the syndromes of every 0/1/2-bit error pattern of the 32-bit word and on random syndromes.
`include "tb/tb_check.svh"
module tb_ols_mv;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  ols_chk_t s; data_t e, exp_e;
  logic [31:0] ew;
  int q[4];
  ols_mv dut (.s(s), .e(e));
  `TB_WATCHDOG(6000)
  task automatic apply(logic [31:0] pat);
    @(negedge clk);
    s = ols_enc(pat[15:0]) ^ pat[31:16];
    #1;
    `CHECK(e == pat[15:0], $sformatf("mv errors=%h s=%h e=%h", pat, s, e))
  endtask
  initial begin
    apply('0);
    for (int a = 0; a < 32; a++) begin
      ew = '0; ew[a] = 1'b1; apply(ew);
      for (int b = a + 1; b < 32; b++) begin
        ew = '0; ew[a] = 1'b1; ew[b] = 1'b1; apply(ew);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk); s = ols_chk_t'($urandom); #1;
      for (int i = 0; i < 16; i++) begin
        int votes; votes = 0;
        ols_checks(i, q);
        for (int g = 0; g < 4; g++) votes += int'(s[q[g]]);
        exp_e[i] = (votes >= 3);
      end
      `CHECK(e == exp_e, $sformatf("mv random s=%h e=%h exp=%h", s, e, exp_e))
    end
    `TB_DONE
  end
endmodule
