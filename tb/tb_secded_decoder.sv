// tb_secded_decoder: checks the SEC-DED decoder on random words with 0, 1 and 2 injected errors against a brute-force decoder.
`include "tb/tb_check.svh"
module tb_secded_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t dr, dc, e, d0, rdc; hsiao_chk_t cr, s; logic err, derr; int nerr;
  logic [21:0] ew;
  secded_decoder dut (.dr(dr), .cr(cr), .dc(dc), .err(err), .derr(derr), .s(s), .e(e));
  `TB_WATCHDOG(8000)
  initial begin
    for (int n = 0; n < 6000; n++) begin
      int k; k = n % 3;
      @(negedge clk);
      d0 = data_t'($urandom);
      ew = 22'(rand_err(k, 22));
      dr = d0 ^ ew[15:0]; cr = hs_enc(d0) ^ ew[21:16];
      #1;
      hs_decode(dr, cr, rdc, nerr);
      `CHECK(nerr == k, "reference decoder classification")
      `CHECK({err, derr} == ((k == 0) ? 2'b00 : (k == 1) ? 2'b10 : 2'b11), $sformatf("flags k=%0d", k))
      if (k < 2) `CHECK(dc == d0, $sformatf("data not corrected k=%0d dc=%h d=%h", k, dc, d0))
      else       `CHECK(dc == dr, "double error must leave the data unchanged")
    end
    `TB_DONE
  end
endmodule
