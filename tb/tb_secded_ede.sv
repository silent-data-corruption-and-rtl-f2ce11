// tb_secded_ede: checks the E/DE flags for all 64 syndromes and for syndromes of real single and double errors.
`include "tb/tb_check.svh"
module tb_secded_ede;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  hsiao_chk_t s; logic err, derr;
  secded_ede dut (.s(s), .err(err), .derr(derr));
  `TB_WATCHDOG(2000)
  initial begin
    for (int v = 0; v < 64; v++) begin
      @(negedge clk); s = hsiao_chk_t'(v); #1;
      `CHECK(err == (v != 0), $sformatf("E s=%h", s))
      `CHECK(derr == (v != 0 && ($countones(v) % 2 == 0)), $sformatf("DE s=%h", s))
    end
    // syndromes produced by every single and double error of the 22-bit word
    for (int a = 0; a < 22; a++)
      for (int b = a; b < 22; b++) begin
        logic [21:0] ew; ew = '0;
        ew[a] = 1'b1; if (b != a) ew[b] = 1'b1;
        @(negedge clk); s = hs_enc(ew[15:0]) ^ ew[21:16]; #1;
        `CHECK({err, derr} == ((a == b) ? 2'b10 : 2'b11), $sformatf("flags for errors at %0d,%0d", a, b))
      end
    `TB_DONE
  end
endmodule
