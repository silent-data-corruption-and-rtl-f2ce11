// tb_ols_checker: writes random data through the OLS encoder, corrupts the stored word with 0-2 errors and checks the decoder output.
`include "tb/tb_check.svh"
module tb_ols_checker;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t wd, rd, dc; ols_chk_t wc, rc; logic err;
  logic [31:0] ew;
  ols_checker dut (.wd(wd), .wc(wc), .rd(rd), .rc(rc), .dc(dc), .err(err));
  `TB_WATCHDOG(5000)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int k; k = n % 3;
      @(negedge clk); wd = data_t'($urandom); #1;
      `CHECK(wc == ols_enc(wd), "write-side check bits")
      ew = rand_err(k, 32);
      rd = wd ^ ew[15:0]; rc = wc ^ ew[31:16];
      #1;
      `CHECK(err == (k != 0), "read-side E")
      `CHECK(dc == wd, "read-side correction")
    end
    `TB_DONE
  end
endmodule
