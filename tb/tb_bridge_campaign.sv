// tb_bridge_campaign: logic-level bridging-fault campaign on both checkers.
//
// A bridge shorts two nets of the same bus inside a checker and is modelled as
// a wired-AND or a wired-OR: both nets take the AND (or OR) of their
// fault-free values. Buses bridged: the encoder output (check bits written),
// the syndrome, the error bits, the corrected data and, for SEC-DED, the
// E/DE pair. Every bridge is applied on its own to NV read/write operations
// whose stored word carries 0, 1 or 2 bit errors. A bridge is
//   critical  when some read gives a data word different from the fault-free
//             checker's,
//   latent    otherwise (no effect, or a wrong word written that the decoder
//             corrects on the read).
// For every critical bridge the test records whether the critical-fault flag
// rose on a read where the word was wrong. Checked along the way: the detector
// follows its rule on every read (code word exactly when dc = d' and
// Enc(d') = c', flag exactly when that disagrees with E); a wrong word
// delivered with E = 0 is always flagged; every encoder bridge is latent.
// The counts are printed per checker and per bus. They describe this logic
// model, not transistor-level resistive bridges.
`include "tb/tb_check.svh"
module tb_bridge_campaign;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NV = 96;  // operations per bridge

  data_t hs_wd, hs_rd, hs_dc, ols_wd, ols_rd, ols_dc;
  hsiao_chk_t hs_wc, hs_rc;
  ols_chk_t ols_wc, ols_rc;
  logic hs_err, hs_derr, hs_fault, ols_err, ols_fault;
  rail_pair_t hs_ec, ols_ec;

  ecc_checkers_top dut (.*);

  // buses: 0 encoder output, 1 syndrome, 2 error bits, 3 corrected data, 4 E/DE
  localparam int NBUS = 5;
  string bus_name [NBUS] = '{"Enc output", "syndrome", "error bits", "corrected data", "E/DE"};
  int total [2][NBUS], crit [2][NBUS], detected [2][NBUS], latent [2][NBUS];

  function automatic logic [15:0] bridge(logic [15:0] v, int a, int b, bit wired_or);
    logic x;
    x = wired_or ? (v[a] | v[b]) : (v[a] & v[b]);
    v[a] = x; v[b] = x;
    return v;
  endfunction

  // One bridge on the SEC-DED checker. Returns via counters.
  task automatic hs_fault_run(int bus, int a, int b, bit wired_or);
    bit is_crit = 0, is_det = 0;
    for (int v = 0; v < NV; v++) begin
      data_t d, gold_dc;
      hsiao_chk_t wc_ok;
      logic [21:0] word, ew;
      logic [15:0] val;
      int k;
      bit code, wrong;
      k = v % 3;
      d = data_t'($urandom);
      // write
      @(negedge clk);
      hs_wd = d; #1;
      wc_ok = hs_wc;
      if (bus == 0) begin
        val = bridge(16'(wc_ok), a, b, wired_or);
        force dut.hs_wc = hsiao_chk_t'(val);
        #1;
      end
      word = {hs_wc, hs_wd};
      release dut.hs_wc;
      // the encoder bridge adds at most one error: keep the word correctable
      ew = 22'(rand_err((bus == 0) ? 0 : k, 22));
      word ^= ew;
      // read, fault-free first
      @(negedge clk);
      {hs_rc, hs_rd} = word; #1;
      gold_dc = hs_dc;
      case (bus)
        1: begin val = bridge(16'(dut.u_hs_chk.u_dec.s), a, b, wired_or);
                 force dut.u_hs_chk.u_dec.s = hsiao_chk_t'(val); end
        2: begin val = bridge(dut.u_hs_chk.u_dec.e, a, b, wired_or);
                 force dut.u_hs_chk.u_dec.e = val; end
        3: begin val = bridge(hs_dc, a, b, wired_or);
                 force dut.hs_dc = val; end
        4: begin val = bridge({14'b0, hs_err, hs_derr}, 1, 0, wired_or);
                 force dut.hs_err = val[1]; force dut.hs_derr = val[0]; end
        default: ;
      endcase
      #1;
      code  = (hs_dc == hs_rd) && (hs_enc(hs_rd) == hs_rc);
      wrong = (bus == 0) ? (hs_dc != d) : (hs_dc != gold_dc);
      `CHECK((hs_ec[1] ^ hs_ec[0]) == code, "hs detector rule")
      `CHECK(hs_fault == (code == hs_err), "hs flag rule")
      if (wrong && !hs_err) `CHECK(hs_fault, "hs wrong word with E = 0 not flagged")
      if (wrong) is_crit = 1;
      if (wrong && hs_fault) is_det = 1;
      release dut.u_hs_chk.u_dec.s; release dut.u_hs_chk.u_dec.e;
      release dut.hs_dc; release dut.hs_err; release dut.hs_derr;
    end
    total[0][bus]++;
    if (is_crit) crit[0][bus]++; else latent[0][bus]++;
    if (is_det) detected[0][bus]++;
    if (bus == 0) `CHECK(!is_crit, $sformatf("hs encoder bridge %0d-%0d critical", a, b))
  endtask

  task automatic ols_fault_run(int bus, int a, int b, bit wired_or);
    bit is_crit = 0, is_det = 0;
    for (int v = 0; v < NV; v++) begin
      data_t d, gold_dc;
      logic [31:0] word, ew;
      logic [15:0] val;
      int k;
      bit code, wrong;
      k = v % 3;
      d = data_t'($urandom);
      @(negedge clk);
      ols_wd = d; #1;
      if (bus == 0) begin
        val = bridge(ols_wc, a, b, wired_or);
        force dut.ols_wc = val;
        #1;
      end
      word = {ols_wc, ols_wd};
      release dut.ols_wc;
      // the encoder bridge adds at most one error: keep the word correctable
      ew = rand_err((bus == 0 && k == 2) ? 1 : k, 32);
      word ^= ew;
      @(negedge clk);
      {ols_rc, ols_rd} = word; #1;
      gold_dc = ols_dc;
      case (bus)
        1: begin val = bridge(dut.u_ols_chk.u_dec.s, a, b, wired_or);
                 force dut.u_ols_chk.u_dec.s = val; end
        2: begin val = bridge(dut.u_ols_chk.u_dec.e, a, b, wired_or);
                 force dut.u_ols_chk.u_dec.e = val; end
        3: begin val = bridge(ols_dc, a, b, wired_or);
                 force dut.ols_dc = val; end
        default: ;
      endcase
      #1;
      code  = (ols_dc == ols_rd) && (ols_enc(ols_rd) == ols_rc);
      wrong = (bus == 0) ? (ols_dc != d) : (ols_dc != gold_dc);
      `CHECK((ols_ec[1] ^ ols_ec[0]) == code, "ols detector rule")
      `CHECK(ols_fault == (code == ols_err), "ols flag rule")
      if (wrong && !ols_err) `CHECK(ols_fault, "ols wrong word with E = 0 not flagged")
      if (wrong) is_crit = 1;
      if (wrong && ols_fault) is_det = 1;
      release dut.u_ols_chk.u_dec.s; release dut.u_ols_chk.u_dec.e; release dut.ols_dc;
    end
    total[1][bus]++;
    if (is_crit) crit[1][bus]++; else latent[1][bus]++;
    if (is_det) detected[1][bus]++;
    if (bus == 0) `CHECK(!is_crit, $sformatf("ols encoder bridge %0d-%0d critical", a, b))
  endtask

  `TB_WATCHDOG(400000)

  initial begin
    int hs_w [NBUS];
    hs_w = '{6, 6, 16, 16, 2};
    hs_wd = '0; hs_rd = '0; hs_rc = '0; ols_wd = '0; ols_rd = '0; ols_rc = '0;
    for (int bus = 0; bus < NBUS; bus++)
      for (int a = 0; a < hs_w[bus]; a++)
        for (int b = a + 1; b < hs_w[bus]; b++)
          for (int t = 0; t < 2; t++) hs_fault_run(bus, a, b, t[0]);
    for (int bus = 0; bus < 4; bus++)
      for (int a = 0; a < 16; a++)
        for (int b = a + 1; b < 16; b++)
          for (int t = 0; t < 2; t++) ols_fault_run(bus, a, b, t[0]);
    for (int c = 0; c < 2; c++) begin
      int tt, tc, td, tl;
      tt = 0; tc = 0; td = 0; tl = 0;
      $display("%s checker bridges (wired-AND and wired-OR):", c == 0 ? "SEC-DED" : "DEC OLS");
      for (int bus = 0; bus < NBUS; bus++) begin
        if (total[c][bus] == 0) continue;
        $display("  %-15s total %4d  critical %4d  flagged %4d  latent %4d",
                 bus_name[bus], total[c][bus], crit[c][bus], detected[c][bus], latent[c][bus]);
        tt += total[c][bus]; tc += crit[c][bus]; td += detected[c][bus]; tl += latent[c][bus];
      end
      $display("  %-15s total %4d  critical %4d  flagged %4d  latent %4d", "all", tt, tc, td, tl);
      `CHECK(tc > 0 && td > 0, "campaign found and flagged critical bridges")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
