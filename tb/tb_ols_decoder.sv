// tb_ols_decoder: checks the DEC OLS decoder on random words with 0, 1 and 2 injected errors against a brute-force decoder.
`include "tb/tb_check.svh"
module tb_ols_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t dr, dc, e, d0, rdc; ols_chk_t cr, s; logic err; int nerr; bit ok;
  logic [31:0] ew;
  ols_decoder dut (.dr(dr), .cr(cr), .dc(dc), .err(err), .s(s), .e(e));
  `TB_WATCHDOG(4000)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int k; k = n % 3;
      @(negedge clk);
      d0 = data_t'($urandom);
      ew = rand_err(k, 32);
      dr = d0 ^ ew[15:0]; cr = ols_enc(d0) ^ ew[31:16];
      #1;
      if (n < 600) begin
        ols_decode(dr, cr, rdc, nerr, ok);
        `CHECK(ok && nerr == k && rdc == d0, "reference decoder")
      end
      `CHECK(err == (k != 0), $sformatf("E k=%0d", k))
      `CHECK(dc == d0, $sformatf("data not corrected k=%0d errors=%h dc=%h d=%h", k, ew, dc, d0))
    end
    `TB_DONE
  end
endmodule
