// ecc_ref_pkg: reference models for the checker testbenches.
//
// The parity-check matrices are written out here as literal tables (not
// computed the way the RTL computes them), and decoding is done by brute
// force: the reference looks for the lowest-weight error pattern that gives a
// zero syndrome. The testbenches compare the RTL with these models.
package ecc_ref_pkg;

  // Hsiao (22,16): data columns, check bit j = bit j of the column.
  localparam logic [5:0] HS_COL [16] = '{
    6'h0B, 6'h0D, 6'h0E, 6'h13, 6'h15, 6'h16, 6'h1A, 6'h1C,
    6'h23, 6'h25, 6'h26, 6'h29, 6'h2C, 6'h31, 6'h32, 6'h38};

  // OLS (32,16) Latin squares on the 4x4 grid, indexed [row][col].
  localparam int L1 [4][4] = '{'{0,1,2,3}, '{1,0,3,2}, '{2,3,0,1}, '{3,2,1,0}};
  localparam int L2 [4][4] = '{'{0,2,3,1}, '{1,3,2,0}, '{2,0,1,3}, '{3,1,0,2}};

  function automatic logic [5:0] hs_enc(logic [15:0] d);
    logic [5:0] c = '0;
    for (int k = 0; k < 16; k++) if (d[k]) c ^= HS_COL[k];
    return c;
  endfunction

  // The four check bits (0..15) that cover data bit i.
  function automatic void ols_checks(int i, output int q[4]);
    int r = i / 4, c = i % 4;
    q[0] = r; q[1] = 4 + c; q[2] = 8 + L1[r][c]; q[3] = 12 + L2[r][c];
  endfunction

  function automatic logic [15:0] ols_enc(logic [15:0] d);
    logic [15:0] c = '0;
    int q[4];
    for (int i = 0; i < 16; i++) begin
      ols_checks(i, q);
      if (d[i]) for (int g = 0; g < 4; g++) c[q[g]] ^= 1'b1;
    end
    return c;
  endfunction

  // Brute-force SEC-DED decode. nerr: 0 none, 1 single (corrected), 2 more.
  function automatic void hs_decode(logic [15:0] dr, logic [5:0] cr,
                                    output logic [15:0] dc, output int nerr);
    dc = dr;
    nerr = 2;
    if (hs_enc(dr) == cr) begin nerr = 0; return; end
    for (int b = 0; b < 22; b++) begin
      logic [21:0] w = {cr, dr};
      w[b] = ~w[b];
      if (hs_enc(w[15:0]) == w[21:16]) begin dc = w[15:0]; nerr = 1; return; end
    end
  endfunction

  // Brute-force OLS decode of up to two errors. ok = 0 if none found.
  function automatic void ols_decode(logic [15:0] dr, logic [15:0] cr,
                                     output logic [15:0] dc, output int nerr, output bit ok);
    logic [31:0] w;
    dc = dr; ok = 1;
    if (ols_enc(dr) == cr) begin nerr = 0; return; end
    for (int a = 0; a < 32; a++) begin
      w = {cr, dr}; w[a] = ~w[a];
      if (ols_enc(w[15:0]) == w[31:16]) begin dc = w[15:0]; nerr = 1; return; end
    end
    for (int a = 0; a < 32; a++)
      for (int b = a + 1; b < 32; b++) begin
        w = {cr, dr}; w[a] = ~w[a]; w[b] = ~w[b];
        if (ols_enc(w[15:0]) == w[31:16]) begin dc = w[15:0]; nerr = 2; return; end
      end
    nerr = 3; ok = 0;
  endfunction

  // A random error pattern of exactly n bits over a w-bit word (n <= 2).
  function automatic logic [31:0] rand_err(int n, int w);
    logic [31:0] e = '0;
    int a, b;
    if (n >= 1) begin a = $urandom_range(w - 1); e[a] = 1'b1; end
    if (n >= 2) begin
      do b = $urandom_range(w - 1); while (b == a);
      e[b] = 1'b1;
    end
    return e;
  endfunction

endpackage
