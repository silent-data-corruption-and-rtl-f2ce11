// trc: two-rail code checker (TRC) of the critical-fault detector.
//
// Checks N two-rail pairs (x[i], y[i]) at once. Its output z = (EC1, EC2) is a
// code word, 01 or 10, when every pair is complementary (x[i] != y[i]), and a
// non-code word, 00 or 11, as soon as one pair is not. It is a balanced tree
// of trc_cell blocks with ceil(log2 N) levels; when N is not a power of two
// the missing leaves are tied to the code word (0, 1), which leaves the
// outcome unchanged. Which code word appears depends on the input values.
// Combinational; its delay is the only delay the detector adds to a checker.
module trc #(
  parameter int unsigned N = 22  // pairs: 16 data + 6 check bits for the SEC-DED checker
) (
  input  logic [N-1:0] x,  // first rail of each pair
  input  logic [N-1:0] y,  // second rail of each pair
  output logic [1:0]   z   // {EC1, EC2}
);

  localparam int unsigned L  = (N <= 1) ? 1 : $clog2(N);  // tree levels
  localparam int unsigned NP = 1 << L;                    // padded leaf count

  logic [1:0] leaf [NP];

  for (genvar i = 0; i < NP; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign leaf[i] = {x[i], y[i]};
    end else begin : g_pad
      assign leaf[i] = 2'b01;
    end
  end

  // Level l holds NP >> l pairs; level 0 is the leaves, level L the root.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [1:0] p [NP >> l];
    if (l == 0) begin : g_copy
      for (genvar i = 0; i < NP; i++) begin : g_i
        assign p[i] = leaf[i];
      end
    end else begin : g_cells
      for (genvar i = 0; i < (NP >> l); i++) begin : g_i
        trc_cell u_cell (.a(g_lvl[l-1].p[2*i]), .b(g_lvl[l-1].p[2*i+1]), .z(p[i]));
      end
    end
  end

  assign z = g_lvl[L].p[0];

endmodule
