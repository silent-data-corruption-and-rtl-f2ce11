// tb_trc: checks two-rail checkers of 22, 32 and 5 pairs: code output iff every pair is complementary.
`include "tb/tb_check.svh"
module tb_trc;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [21:0] x22, y22; logic [31:0] x32, y32; logic [4:0] x5, y5;
  logic [1:0] z22, z32, z5;
  trc              dut22 (.x(x22), .y(y22), .z(z22));
  trc #(.N(32))    dut32 (.x(x32), .y(y32), .z(z32));
  trc #(.N(5))     dut5  (.x(x5),  .y(y5),  .z(z5));
  int nbad;
  `TB_WATCHDOG(5000)
  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x22 = 22'($urandom); x32 = $urandom; x5 = 5'($urandom);
      nbad = n % 3;  // 0, 1 or 2 non-complementary pairs
      y22 = ~x22 ^ 22'(rand_err(nbad, 22));
      y32 = ~x32 ^ rand_err(nbad, 32);
      y5  = ~x5  ^ 5'(rand_err(nbad, 5));
      // a broken pair has y = x, so it reads 00 or 11 depending on x
      #1;
      `CHECK((z22[1] ^ z22[0]) == (nbad == 0), $sformatf("N=22 nbad=%0d z=%b", nbad, z22))
      `CHECK((z32[1] ^ z32[0]) == (nbad == 0), $sformatf("N=32 nbad=%0d z=%b", nbad, z32))
      `CHECK((z5[1]  ^ z5[0])  == (nbad == 0), $sformatf("N=5 nbad=%0d z=%b", nbad, z5))
    end
    `TB_DONE
  end
endmodule
