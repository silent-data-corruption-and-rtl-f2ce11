// tb_ecc_corrector: checks the EXOR corrector on random words and error bits.
`include "tb/tb_check.svh"
module tb_ecc_corrector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t dr, e, dc;
  ecc_corrector #(.W(DATA_W)) dut (.dr(dr), .e(e), .dc(dc));
  `TB_WATCHDOG(3000)
  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      dr = data_t'($urandom);
      e  = (n % 3 == 0) ? '0 : data_t'(rand_err(n % 3, 16));
      #1;
      for (int k = 0; k < 16; k++)
        `CHECK(dc[k] == (e[k] ? !dr[k] : dr[k]), $sformatf("bit %0d dr=%h e=%h dc=%h", k, dr, e, dc))
    end
    `TB_DONE
  end
endmodule
