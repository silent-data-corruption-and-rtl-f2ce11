// ecc_pkg: widths, word types and parity-check tables shared by the two
// cache ECC checkers (SEC-DED Hsiao and DEC Orthogonal Latin Square).
//
// Both checkers protect 16 information bits. The Hsiao code adds 6 check bits
// and the OLS code 16 check bits; those three numbers are the published
// configuration. The exact parity-check matrices are this design's choice:
//
//  * Hsiao (22,16): data column k is the k-th 6-bit value of weight 3, in
//    increasing numeric order, after dropping 0x07, 0x19, 0x2A and 0x34. Those
//    four cover every row exactly twice, so every row of the data part has
//    weight 8 (odd-weight columns, balanced rows). Check bit i has the unit
//    column i.
//  * OLS (32,16), m = 4, t = 2: data bit i sits at row r = i/4, column
//    c = i%4 of a 4x4 grid. Check group 0 (c0..c3) is the row parity, group 1
//    (c4..c7) the column parity, group 2 (c8..c11) the Latin square
//    L1 = r ^ c and group 3 (c12..c15) the Latin square L2 = r ^ alpha*c over
//    GF(4). Every data bit is in four checks; two data bits share at most one.
//
// The tables are constants computed by functions at elaboration, so every
// module that uses them reduces to plain XOR/AND networks.
package ecc_pkg;

  localparam int unsigned DATA_W      = 16;  // information bits d0..d15
  localparam int unsigned HSIAO_CHK_W = 6;   // SEC-DED check bits c0..c5
  localparam int unsigned OLS_M       = 4;   // OLS grid side, DATA_W = OLS_M**2
  localparam int unsigned OLS_T       = 2;   // errors corrected by the OLS code
  localparam int unsigned OLS_CHK_W   = 2 * OLS_T * OLS_M;  // 16 check bits

  typedef logic [DATA_W-1:0]      data_t;
  typedef logic [HSIAO_CHK_W-1:0] hsiao_chk_t;
  typedef logic [OLS_CHK_W-1:0]   ols_chk_t;

  // Outputs of the detector's two-rail checker, (EC1, EC2) = ec[1:0].
  // A code word is 01 or 10; 00 or 11 is a non-code word.
  typedef logic [1:0] rail_pair_t;

  typedef hsiao_chk_t hsiao_cols_t [DATA_W];
  typedef data_t      hsiao_rows_t [HSIAO_CHK_W];
  typedef data_t      ols_rows_t   [OLS_CHK_W];

  // Columns of the data part of the Hsiao H matrix, data bit k -> column k.
  function automatic hsiao_cols_t hsiao_cols_f();
    hsiao_cols_t t;
    int unsigned n;
    n = 0;
    for (int unsigned v = 0; v < 64; v++) begin
      if ($countones(v[5:0]) == 3 && v != 'h07 && v != 'h19 && v != 'h2A && v != 'h34) begin
        if (n < DATA_W) t[n] = hsiao_chk_t'(v);
        n++;
      end
    end
    return t;
  endfunction

  localparam hsiao_cols_t HSIAO_COL = hsiao_cols_f();

  // Rows of the data part of the Hsiao H matrix: the data bits check bit j covers.
  function automatic hsiao_rows_t hsiao_rows_f();
    hsiao_rows_t t;
    for (int unsigned j = 0; j < HSIAO_CHK_W; j++) begin
      data_t row;
      for (int unsigned k = 0; k < DATA_W; k++)
        row[k] = |(HSIAO_COL[k] & hsiao_chk_t'(1 << j));
      t[j] = row;
    end
    return t;
  endfunction

  localparam hsiao_rows_t HSIAO_ROW = hsiao_rows_f();

  // Multiplication by alpha in GF(4) = {0, 1, alpha, alpha+1}, alpha^2 = alpha + 1.
  function automatic int unsigned gf4_mul_alpha(int unsigned x);
    return (x == 0) ? 0 : (x == 1) ? 2 : (x == 2) ? 3 : 1;
  endfunction

  // Index (0..15) of the check bit of group g (0..3) that covers data bit i.
  function automatic int unsigned ols_check_of(int unsigned i, int unsigned g);
    int unsigned r, c;
    r = i / OLS_M;
    c = i % OLS_M;
    case (g)
      0:       return r;
      1:       return OLS_M + c;
      2:       return 2 * OLS_M + (r ^ c);
      default: return 3 * OLS_M + (r ^ gf4_mul_alpha(c));
    endcase
  endfunction

  // Rows of the data part of the OLS H matrix: the data bits check bit j covers.
  function automatic ols_rows_t ols_rows_f();
    ols_rows_t t;
    for (int unsigned j = 0; j < OLS_CHK_W; j++) begin
      data_t row;
      row = '0;
      for (int unsigned i = 0; i < DATA_W; i++)
        for (int unsigned g = 0; g < 2 * OLS_T; g++)
          if (ols_check_of(i, g) == j) row[i] = 1'b1;
      t[j] = row;
    end
    return t;
  endfunction

  localparam ols_rows_t OLS_ROW = ols_rows_f();

endpackage
