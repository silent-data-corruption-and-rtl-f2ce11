# Cache ECC checkers with on-line detection of checker faults

Caches in high-performance processors are protected by error-correcting codes.
The encoder and decoder wrapped around the cache array (together, the
*checker*) are usually assumed fault-free, because they are small next to the
array. A fault inside the checker, however, turns it into a source of silent
data corruption. It can fail to correct a word that it reports as erroneous, or
it can alter a word that was read correctly while reporting no error.

This RTL implements two combinational checkers for 16-bit cache words, plus a
small *detector* that watches each checker from outside and raises a flag when
the checker's output disagrees with its own error signal:

* a **SEC-DED Hsiao** checker with 6 check bits, which corrects any single error
  and detects any double error in the 22-bit stored word;
* a **DEC Orthogonal Latin Square (OLS)** checker with 16 check bits, which
  corrects any one or two errors in the 32-bit stored word.

The detector sits beside the decoder. Its encoder and inverters work in parallel
with the decoder, so the delay it adds to the read path is only that of a
two-rail checker tree.

## The checkers

Each checker has a write side and a read side. The cache array between them is
not part of this design: the top module brings out the word to be stored and
takes the word read back.

```
 write:  d[15:0] ──────────────────────────────► to cache (data)
              └──► Enc ──► c ──────────────────► to cache (check bits)

 read:   d'[15:0], c' ──► SG ──► s ──► SD / MV ──► e ──► C (d' ^ e) ──► dc[15:0]
                                  └──► E/DE or Error Det ──────────────► E (, DE)
```

| block | SEC-DED Hsiao | DEC OLS |
|---|---|---|
| Enc | `secded_enc`: 6 XOR trees, 8 data bits each | `ols_enc`: 16 XOR trees, 4 data bits each |
| SG, syndrome generator | `secded_sg`: re-encode d', XOR with c' | `ols_sg`: re-encode d', 2-input XOR with c' |
| error locator | `secded_sd`: e_k = (s == column k) | `ols_mv`: e_i = at least 3 of the 4 syndrome bits covering d_i |
| C, corrector | `ecc_corrector`: dc = d' ^ e | the same module |
| flags | `secded_ede`: E = OR(s), DE = E & even parity(s) | `ols_errdet`: E = OR tree of s |
| decoder / checker | `secded_decoder`, `secded_checker` | `ols_decoder`, `ols_checker` |

**Hsiao matrix (this design's choice).** The 16 data columns are the 6-bit
values of weight 3, in increasing order, after dropping 0x07, 0x19, 0x2A and
0x34. The result is 0x0B, 0x0D, 0x0E, 0x13, 0x15, 0x16, 0x1A, 0x1C, 0x23, 0x25,
0x26, 0x29, 0x2C, 0x31, 0x32 and 0x38 for d0 to d15. Check bit c_j has the unit
column j. Every column has odd weight and every row of the data part has weight
8, as Hsiao's construction requires. A single error therefore gives an
odd-weight syndrome, and a double error gives a non-zero even-weight one. That
parity is how `secded_ede` tells them apart: (E, DE) = (0,0) for no error,
(1,0) for a single error and (1,1) for a double error. A double error is left
uncorrected.

**OLS code (this design's choice of squares).** The data bits form a 4x4 grid,
with d_i at row r = i/4 and column c = i%4. The 16 check bits come in four
groups of four:

* c0–c3: row parities (r);
* c4–c7: column parities (c);
* c8–c11: the Latin square L1 = r xor c;
* c12–c15: the Latin square L2 = r xor (alpha·c) over GF(4), where alpha·{0,1,2,3} = {0,2,3,1}.

Each data bit lies in exactly four checks, and two data bits share at most one.
With one or two errors, an erroneous data bit therefore sees at least 3 of its
4 syndrome bits set, and a correct one at most 2. The majority voter uses that
threshold. Both tables are computed by constant functions in `ecc_pkg` at
elaboration, so they fold into fixed XOR/AND networks.

## The critical-fault detector

`secded_detector` and `ols_detector` share one structure:

* An encoder recomputes the check bits c_R = Enc(d') from the data bits read.
* Inverters form ~d' and ~c'.
* A two-rail checker (`trc`) takes the pairs (~d'_k, dc_k) and (~c'_j, c_R,j).
  It is a balanced tree of `trc_cell`, the classic cell
  z1 = a1·b1 + a2·b2, z2 = a1·b2 + a2·b1.
  If the number of pairs is not a power of two, the spare leaves are tied to
  the code word (0,1).

The output (EC1, EC2) is a code word (01 or 10) exactly when every pair is
complementary. That happens when dc = d' and c' = Enc(d'): the checker passed
the word through unchanged, and the word carried no error. Otherwise the output
is 00 or 11.

`crit_flag` reads (EC1, EC2) together with the decoder's E:

| EC1 EC2 | E | meaning |
|---|---|---|
| 01 / 10 | 0 | word clean and passed unchanged: fault-free |
| 00 / 11 | 1 | word had an error, checker reported it: fault-free |
| 00 / 11 | 0 | **critical**: the output differs from the word read, or an error went unreported |
| 01 / 10 | 1 | **critical**: an error reported on a clean word that was passed unchanged |

So `fault = ~(EC1 ^ EC2 ^ E)`.

### What the detector catches, and what it does not

The detector compares c' with Enc(d'), the same comparison the syndrome
generator makes. Whenever the word read really carries an error, the detector's
output is therefore a non-code word, whatever the decoder did with the data. It
follows that:

* **Flagged:** a correct word altered (E = 0, dc ≠ d'); a real error that the
  decoder does not report (E = 0, for example a syndrome stuck at zero); and a
  false error report on a clean word.
* **Not flagged:** a word with a real error that the decoder reports (E = 1) but
  then fails to correct, or corrects in the wrong bit. The inhibited-correction
  case is one of these.

The published description of the scheme says the inhibited-correction case
yields a code word and is therefore flagged. With the detector built as
described (c' compared with Enc(d')), that does not happen. This RTL follows the
described structure, and its testbenches check the behaviour stated above.

A logic-level bridging-fault campaign (`tb_bridge_campaign`, below) shows the
consequence. Bridges on the corrected-data bus are all flagged. Bridges on the
syndrome or error-bit buses corrupt the output only while the word holds an
error and E = 1, so they go unflagged.

## Top level: `ecc_checkers_top`

Both checkers, each with its detector and flag, side by side. There are no
parameters, and every port is a plain vector. The types come from `ecc_pkg`.

| port | dir | width | meaning |
|---|---|---|---|
| `hs_wd` | in | 16 | data to write (SEC-DED) |
| `hs_wc` | out | 6 | check bits to store with it |
| `hs_rd`, `hs_rc` | in | 16, 6 | data and check bits read back (d', c') |
| `hs_dc` | out | 16 | corrected data |
| `hs_err`, `hs_derr` | out | 1, 1 | E, DE |
| `hs_ec` | out | 2 | {EC1, EC2} from the detector |
| `hs_fault` | out | 1 | critical checker fault |
| `ols_wd` / `ols_wc` | in / out | 16 / 16 | write side (DEC OLS) |
| `ols_rd`, `ols_rc` | in | 16, 16 | word read back |
| `ols_dc`, `ols_err`, `ols_ec`, `ols_fault` | out | 16, 1, 2, 1 | as above (no DE) |

**Timing.** Everything is combinational: no clock, no reset and no state. Outputs
are valid one propagation delay after the inputs settle. In a processor, the
outputs would be sampled by the cache read pipeline's registers, which are
outside this design.

**Size.** Generic coarse synthesis of the top gives roughly 520 word-level
cells and no flip-flops.

## Files

* `rtl/ecc_pkg.sv`: widths (`DATA_W` = 16, `HSIAO_CHK_W` = 6, `OLS_CHK_W` = 16),
  word types, and the constant H-matrix tables.
* `rtl/*.sv`: one module per file, as listed in the tables above, plus
  `trc_cell`, `trc`, `crit_flag` and `ecc_checkers_top`.
* `tb/ecc_ref_pkg.sv`: reference models. It holds the H matrices as literal
  tables and brute-force decoders, which search for the lowest-weight error
  pattern that zeroes the syndrome.
* `tb/tb_check.svh`: check counting and a watchdog.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_ecc_checkers_top.sv`: the end-to-end test (described below).
* `tb/tb_bridge_campaign.sv`: the bridging-fault campaign (described below).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. It also has
a watchdog that counts a failure if the run hangs. For example:

```
verilator --binary --timing --assert --top-module tb_ecc_checkers_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_checkers_top.sv
./obj_dir/Vtb_ecc_checkers_top
```

Run it from the directory that holds `rtl/` and `tb/`. The testbenches include
`tb/tb_check.svh` by that relative path. Each testbench runs in under a second.

* The **block testbenches** test the small blocks exhaustively: all 65,536 data
  words for both encoders, all syndromes for the SD, E/DE and Error Det blocks,
  and every 0-, 1- and 2-bit error pattern for the OLS voter. The decoders and
  checkers are tested with random words carrying 0, 1 or 2 injected errors,
  against the brute-force reference.
* **`tb_ecc_checkers_top`** is the end-to-end test. It stores words in a small
  cache model, injects 0, 1 or 2 errors, and reads them back. It also emulates
  checker faults by forcing internal nets: a syndrome stuck at zero, a raised
  error bit, a false E, error bits held at zero with E = 1, and a wrong encoder
  check bit. It counts how often each mechanism occurred, and fails if one never
  did. Any of these faults that corrupts the output or E must raise the flag,
  except the E = 1 case described above. An encoder fault must stay latent: the
  wrong word written is corrected on the read, and no flag is raised.
* **`tb_bridge_campaign`** shorts every pair of nets within each bus, one bridge
  at a time, as a wired-AND and as a wired-OR. The buses are the encoder output,
  the syndrome, the error bits, the corrected data and (SEC-DED only) E/DE. Each
  bridge is applied over 96 operations with 0, 1 or 2 stored errors. The test
  checks that every encoder bridge is latent, that a wrong word delivered with
  E = 0 is always flagged, and that the detector follows its rule on every read.
  It then prints a table of bridges per checker: total, critical, flagged and
  latent. With the simulator's default random seed it finds:

  | checker | bridges | critical | flagged | latent |
  |---|---|---|---|---|
  | SEC-DED | 542 | 499 | 240 | 43 |
  | DEC OLS | 960 | 719 | 240 | 241 |

  Every flagged bridge is on the corrected-data bus, and every encoder bridge is
  latent. These counts describe this logic-level model only. They are not
  transistor-level resistive bridges, and they are not comparable with
  fault-simulation figures taken at the electrical level.

## Where this design makes its own choices

* The exact Hsiao matrix and the OLS Latin squares (above). Any valid Hsiao
  matrix or pair of orthogonal squares gives the same correction properties, but
  a different gate netlist.
* Implementation details of the blocks that are only named or specified by
  function:
  * the SD as one AND of matching syndrome bits per data bit;
  * the E/DE parity rule;
  * the majority voter's at-least-3-of-4 threshold;
  * the two-rail cell and the padding of the TRC tree;
  * the order of pairs into the TRC (16 data pairs, then the check pairs).
* `crit_flag`, a single XNOR that evaluates the (EC1, EC2, E) combinations of
  the scheme.
* The detector for the OLS checker is built by analogy with the SEC-DED one:
  an OLS encoder and a 32-pair TRC.
* No output registers and no clock. The checkers are treated as the
  combinational blocks they are.
* The detector's blind spot for errors that are reported but left uncorrected
  is a property of the described structure, documented above. It is not a
  modelling shortcut.

## Changing it

* The widths live in `ecc_pkg`. The Hsiao column generator and the OLS
  construction are written for 16 data bits, the size this design is built for.
  Another size needs a new column list (odd-weight columns, balanced rows) or a
  new pair of m×m orthogonal Latin squares (DATA_W = m², 2·t·m check bits).
  `trc` takes any number of pairs through its `N` parameter.
* To add a pipeline register, register `dc`, `E` and `(EC1, EC2)` together, so
  that `crit_flag` still compares values from the same read.
