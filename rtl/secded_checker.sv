// secded_checker: the SEC-DED Hsiao checker of a cache, ENCODER plus DECODER.
//
// Write side: the information bits wd pass straight to the cache and the
// encoder adds the 6 check bits wc. Read side: the decoder takes the 22-bit
// word read back (rd = d', rc = c'), corrects a single error and flags single
// and double errors on (err, derr) = (E, DE). The two sides are independent
// combinational paths; the cache array between them is outside this module.
// Structure as published; widths 16 + 6.
module secded_checker
  import ecc_pkg::*;
(
  input  data_t      wd,    // d0..d15 to be written
  output hsiao_chk_t wc,    // c0..c5 written with them
  input  data_t      rd,    // d'0..d'15 read
  input  hsiao_chk_t rc,    // c'0..c'5 read
  output data_t      dc,    // dc0..dc15 to the cache output
  output logic       err,   // E
  output logic       derr   // DE
);

  hsiao_chk_t s_unused;
  data_t      e_unused;

  secded_enc     u_enc (.d(wd), .c(wc));
  secded_decoder u_dec (.dr(rd), .cr(rc), .dc(dc), .err(err), .derr(derr),
                        .s(s_unused), .e(e_unused));

endmodule
