// tb_crit_flag: checks the critical-fault flag for all 8 (EC1, EC2, E) combinations.
`include "tb/tb_check.svh"
module tb_crit_flag;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  rail_pair_t ec; logic err, fault;
  crit_flag dut (.ec(ec), .err(err), .fault(fault));
  `TB_WATCHDOG(100)
  initial begin
    for (int v = 0; v < 8; v++) begin
      bit exp;
      @(negedge clk); {ec, err} = 3'(v); #1;
      // fault-free combinations listed for the scheme: 001, 111, 010, 100
      exp = !(v == 3'b001 || v == 3'b111 || v == 3'b010 || v == 3'b100);
      `CHECK(fault == exp, $sformatf("EC1 EC2 E=%03b fault=%b", v, fault))
    end
    `TB_DONE
  end
endmodule
