// tb_secded_checker: writes random data through the encoder, corrupts the stored word with 0-2 errors and checks the decoder output.
`include "tb/tb_check.svh"
module tb_secded_checker;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t wd, rd, dc; hsiao_chk_t wc, rc; logic err, derr;
  logic [21:0] ew;
  secded_checker dut (.wd(wd), .wc(wc), .rd(rd), .rc(rc), .dc(dc), .err(err), .derr(derr));
  `TB_WATCHDOG(5000)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int k; k = n % 3;
      @(negedge clk); wd = data_t'($urandom); #1;
      `CHECK(wc == hs_enc(wd), "write-side check bits")
      ew = 22'(rand_err(k, 22));
      rd = wd ^ ew[15:0]; rc = wc ^ ew[21:16];
      #1;
      `CHECK({err, derr} == ((k == 0) ? 2'b00 : (k == 1) ? 2'b10 : 2'b11), "read-side flags")
      if (k < 2) `CHECK(dc == wd, "read-side correction")
    end
    `TB_DONE
  end
endmodule
