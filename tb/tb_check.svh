// tb_check.svh: check counting and the watchdog shared by the testbenches.
// Each testbench declares `int checks, failures;`, a clock `clk` and
// calls `TB_WATCHDOG(cycles) once.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH

`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end

`define TB_WATCHDOG(cycles) \
  initial begin \
    repeat (cycles) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog expired after %0d cycles", cycles); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`endif
