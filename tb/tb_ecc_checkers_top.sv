// tb_ecc_checkers_top: end-to-end test of both checkers with their detectors,
// at the design's only (default) size.
//
// A small cache model of 8 words per checker sits between the write side and
// the read side. Words are written through the encoders, corrupted with 0, 1
// or 2 bit errors while stored and read back through the decoders. Then
// checker faults are emulated by forcing internal nets (see fault_e below):
// faults that corrupt the output word or the E flag must raise the
// critical-fault flag; an encoder fault must stay latent (corrected on the
// read, no flag). Every fault-free read is checked against the data written
// and the E/DE flags against the injected errors; every read checks the
// detector's rule (code word exactly when dc = d' and Enc(d') = c') and the
// critical-fault flag. Each mechanism is counted; one that never happens is a
// failure.
`include "tb/tb_check.svh"
module tb_ecc_checkers_top;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  data_t hs_wd, hs_rd, hs_dc, ols_wd, ols_rd, ols_dc;
  hsiao_chk_t hs_wc, hs_rc;
  ols_chk_t ols_wc, ols_rc;
  logic hs_err, hs_derr, hs_fault, ols_err, ols_fault;
  rail_pair_t hs_ec, ols_ec;

  ecc_checkers_top dut (.*);

  // cache models: {check, data}
  logic [21:0] hs_mem  [8];
  logic [31:0] ols_mem [8];

  typedef enum int {
    M_HS_CLEAN, M_HS_SINGLE_DATA, M_HS_SINGLE_CHECK, M_HS_DOUBLE,
    M_HS_SYN_STUCK, M_HS_INTRODUCE, M_HS_FALSE_E, M_HS_INHIBIT_E1, M_HS_ENC_LATENT,
    M_OLS_CLEAN, M_OLS_SINGLE, M_OLS_DOUBLE, M_OLS_CHECK_ONLY,
    M_OLS_SYN_STUCK, M_OLS_INTRODUCE, M_OLS_FALSE_E, M_OLS_INHIBIT_E1, M_OLS_ENC_LATENT,
    M_COUNT
  } mech_e;
  int seen [M_COUNT];

  // Checker fault emulated on one operation:
  //   F_SYN_STUCK  syndrome held at zero: E = 0 and no correction (flagged)
  //   F_INTRODUCE  one error bit raised on a clean read (flagged)
  //   F_FALSE_E    E held at 1 on a clean read (flagged)
  //   F_INHIBIT_E1 error bits held at zero with E still 1 (not flagged: the
  //                word read already carries a non-zero syndrome, so the
  //                detector gives a non-code word, consistent with E = 1)
  //   F_ENC        one wrong check bit written by the encoder (latent)
  typedef enum int {F_NONE, F_SYN_STUCK, F_INTRODUCE, F_FALSE_E, F_INHIBIT_E1, F_ENC} fault_e;

  task automatic hs_op(int addr, int nerr, fault_e f, bit data_only);
    logic [21:0] ew;
    data_t d;
    bit crit;
    d = data_t'($urandom);
    @(negedge clk);
    hs_wd = d;
    if (f == F_ENC) force dut.u_hs_chk.wc = hs_enc(d) ^ hsiao_chk_t'(1 << $urandom_range(5));
    #1;
    hs_mem[addr] = {hs_wc, hs_wd};
    if (f == F_ENC) release dut.u_hs_chk.wc;
    ew = data_only ? 22'(rand_err(nerr, 16)) : 22'(rand_err(nerr, 22));
    hs_mem[addr] ^= ew;
    if (f == F_ENC) nerr = 1;  // the wrong check bit is one error on the read
    @(negedge clk);
    {hs_rc, hs_rd} = hs_mem[addr];
    case (f)
      F_SYN_STUCK:  force dut.u_hs_chk.u_dec.s = '0;
      F_INTRODUCE:  force dut.u_hs_chk.u_dec.e = data_t'(1 << $urandom_range(15));
      F_FALSE_E:    force dut.hs_err = 1'b1;
      F_INHIBIT_E1: force dut.u_hs_chk.u_dec.e = '0;
      default: ;
    endcase
    #1;
    crit = (f == F_SYN_STUCK) || (f == F_INTRODUCE) || (f == F_FALSE_E);
    if (f == F_NONE || f == F_ENC) begin
      `CHECK({hs_err, hs_derr} == ((nerr == 0) ? 2'b00 : (nerr == 1) ? 2'b10 : 2'b11),
             $sformatf("hs flags nerr=%0d f=%0d", nerr, f))
      if (nerr < 2) `CHECK(hs_dc == d, $sformatf("hs data nerr=%0d f=%0d", nerr, f))
    end
    // detector: code word exactly when dc = d' and Enc(d') = c'
    `CHECK((hs_ec[1] ^ hs_ec[0]) == ((hs_dc == hs_rd) && (hs_enc(hs_rd) == hs_rc)), "hs detector rule")
    `CHECK(hs_fault == crit, $sformatf("hs critical-fault flag f=%0d nerr=%0d ec=%b E=%b", f, nerr, hs_ec, hs_err))
    release dut.u_hs_chk.u_dec.s;
    release dut.u_hs_chk.u_dec.e;
    release dut.hs_err;
    case (f)
      F_SYN_STUCK:  if (hs_fault && hs_dc != d) seen[M_HS_SYN_STUCK]++;
      F_INTRODUCE:  if (hs_fault && hs_dc != d) seen[M_HS_INTRODUCE]++;
      F_FALSE_E:    if (hs_fault) seen[M_HS_FALSE_E]++;
      F_INHIBIT_E1: if (!hs_fault && hs_err && hs_dc != d) seen[M_HS_INHIBIT_E1]++;
      F_ENC:        if (!hs_fault && hs_dc == d && hs_err) seen[M_HS_ENC_LATENT]++;
      default:
        if (nerr == 0) seen[M_HS_CLEAN]++;
        else if (nerr == 2) begin if (hs_derr) seen[M_HS_DOUBLE]++; end
        else if (ew[15:0] != '0) begin if (hs_dc == d) seen[M_HS_SINGLE_DATA]++; end
        else seen[M_HS_SINGLE_CHECK]++;
    endcase
  endtask

  task automatic ols_op(int addr, int nerr, fault_e f, bit check_only);
    logic [31:0] ew;
    data_t d;
    bit crit;
    d = data_t'($urandom);
    @(negedge clk);
    ols_wd = d;
    if (f == F_ENC) force dut.u_ols_chk.wc = ols_enc(d) ^ ols_chk_t'(1 << $urandom_range(15));
    #1;
    ols_mem[addr] = {ols_wc, ols_wd};
    if (f == F_ENC) release dut.u_ols_chk.wc;
    if (f == F_INHIBIT_E1) ew = rand_err(nerr, 16);  // data bits only
    else ew = check_only ? (rand_err(nerr, 16) << 16) : rand_err(nerr, 32);
    ols_mem[addr] ^= ew;
    if (f == F_ENC) nerr = nerr + 1;
    @(negedge clk);
    {ols_rc, ols_rd} = ols_mem[addr];
    case (f)
      F_SYN_STUCK:  force dut.u_ols_chk.u_dec.s = '0;
      F_INTRODUCE:  force dut.u_ols_chk.u_dec.e = data_t'(1 << $urandom_range(15));
      F_FALSE_E:    force dut.ols_err = 1'b1;
      F_INHIBIT_E1: force dut.u_ols_chk.u_dec.e = '0;
      default: ;
    endcase
    #1;
    crit = (f == F_SYN_STUCK) || (f == F_INTRODUCE) || (f == F_FALSE_E);
    if (f == F_NONE || f == F_ENC) begin
      `CHECK(ols_err == (nerr != 0), $sformatf("ols E nerr=%0d f=%0d", nerr, f))
      `CHECK(ols_dc == d, $sformatf("ols data nerr=%0d f=%0d", nerr, f))
    end
    `CHECK((ols_ec[1] ^ ols_ec[0]) == ((ols_dc == ols_rd) && (ols_enc(ols_rd) == ols_rc)), "ols detector rule")
    `CHECK(ols_fault == crit, $sformatf("ols critical-fault flag f=%0d nerr=%0d ec=%b E=%b", f, nerr, ols_ec, ols_err))
    release dut.u_ols_chk.u_dec.s;
    release dut.u_ols_chk.u_dec.e;
    release dut.ols_err;
    case (f)
      F_SYN_STUCK:  if (ols_fault && ols_dc != d) seen[M_OLS_SYN_STUCK]++;
      F_INTRODUCE:  if (ols_fault && ols_dc != d) seen[M_OLS_INTRODUCE]++;
      F_FALSE_E:    if (ols_fault) seen[M_OLS_FALSE_E]++;
      F_INHIBIT_E1: if (!ols_fault && ols_err && ols_dc != d) seen[M_OLS_INHIBIT_E1]++;
      F_ENC:        if (!ols_fault && ols_dc == d && ols_err) seen[M_OLS_ENC_LATENT]++;
      default:
        if (nerr == 0) seen[M_OLS_CLEAN]++;
        else if (check_only) begin if (ols_dc == d) seen[M_OLS_CHECK_ONLY]++; end
        else if (nerr == 1) begin if (ols_dc == d) seen[M_OLS_SINGLE]++; end
        else if (ols_dc == d) seen[M_OLS_DOUBLE]++;
    endcase
  endtask

  `TB_WATCHDOG(20000)

  initial begin
    hs_wd = '0; hs_rd = '0; hs_rc = '0; ols_wd = '0; ols_rd = '0; ols_rc = '0;
    foreach (seen[i]) seen[i] = 0;
    for (int n = 0; n < 1200; n++) begin
      int a; a = n % 8;
      hs_op(a, 0, F_NONE, 0);
      hs_op(a, 1, F_NONE, n % 2 == 0);
      hs_op(a, 2, F_NONE, 0);
      ols_op(a, 0, F_NONE, 0);
      ols_op(a, 1, F_NONE, 0);
      ols_op(a, 2, F_NONE, n % 4 == 0);
      if (n % 10 == 0) begin
        hs_op(a, 1, F_SYN_STUCK, 1);
        hs_op(a, 0, F_INTRODUCE, 0);
        hs_op(a, 0, F_FALSE_E, 0);
        hs_op(a, 1, F_INHIBIT_E1, 1);
        hs_op(a, 0, F_ENC, 0);
        ols_op(a, 1 + n % 2, F_SYN_STUCK, 0);
        ols_op(a, 0, F_INTRODUCE, 0);
        ols_op(a, 0, F_FALSE_E, 0);
        ols_op(a, 1, F_INHIBIT_E1, 0);
        ols_op(a, 0, F_ENC, 0);
      end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me; me = mech_e'(m);
      $display("mechanism %-18s seen %0d times", me.name(), seen[m]);
      `CHECK(seen[m] > 0, $sformatf("mechanism %s never happened", me.name()))
    end
    `TB_DONE
  end
endmodule
