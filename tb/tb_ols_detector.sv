// tb_ols_detector: drives the ols detector with read words holding 0-2 errors and with checker outputs that are correct or deliberately wrong; the output must be a code word exactly when dc equals d' and the regenerated check bits equal c'.
`include "tb/tb_check.svh"
module tb_ols_detector;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  data_t dr, dc, d0, rdc; ols_chk_t cr; rail_pair_t ec; int nerr; bit ok;
  logic [31:0] ew;
  ols_detector dut (.dr(dr), .cr(cr), .dc(dc), .ec(ec));
  `TB_WATCHDOG(5000)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int k, mode; bit exp_code;
      k = n % 3; mode = (n / 3) % 4;
      @(negedge clk);
      d0 = data_t'($urandom);
      ew = rand_err(k, 32);
      dr = d0 ^ ew[15:0]; cr = ols_enc(d0) ^ 16'(ew[32-1:16]);
      case (mode)
        0: dc = d0;                                      // fault-free correction
        1: dc = dr;                                      // correction inhibited
        2: dc = dr ^ data_t'(rand_err(1, 16));           // a correct bit altered
        default: dc = data_t'($urandom);                // arbitrary output
      endcase
      #1;
      exp_code = (dc == dr) && (ols_enc(dr) == cr);
      `CHECK((ec[1] ^ ec[0]) == exp_code, $sformatf("k=%0d mode=%0d dr=%h cr=%h dc=%h ec=%b", k, mode, dr, cr, dc, ec))
      // fault-free checker: code word exactly when the read word is error free
      if (mode == 0) `CHECK((ec[1] ^ ec[0]) == (k == 0), "fault-free consistency with E")
    end
    `TB_DONE
  end
endmodule
