// tb_trc_cell: checks the two-rail cell for all 16 input combinations.
`include "tb/tb_check.svh"
module tb_trc_cell;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] a, b, z;
  trc_cell dut (.a(a), .b(b), .z(z));
  `TB_WATCHDOG(100)
  initial begin
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); {a, b} = 4'(v); #1;
      `CHECK((z[1] != z[0]) == ((a[1] != a[0]) && (b[1] != b[0])), $sformatf("code a=%b b=%b z=%b", a, b, z))
      `CHECK(z[1] == ((a[1] & b[1]) | (a[0] & b[0])), "z1")
      `CHECK(z[0] == ((a[1] & b[0]) | (a[0] & b[1])), "z2")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
