// inner_product_cell - L-point inner-product cell (IPC).
//
// Computes r = sum_i row[i] * c[i] for one row of the input matrix S_k^0 and one
// short weight vector c_m. The L products are formed by L signed multipliers and
// then summed by a pairwise adder tree of ceil(log2 L) levels, matching the
// multiplier-plus-adder-tree critical path the source design gives for the cycle.
// Purely combinational. Products and sums are Y_W bits wide and wrap modulo
// 2^Y_W, which is exact while the result fits in Y_W bits.
//
// The pairwise tree and the result width are this design's choices.
module inner_product_cell #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW
) (
  input  logic signed [X_W-1:0] row [L],
  input  logic signed [C_W-1:0] c   [L],
  output logic signed [Y_W-1:0] r
);

  localparam int LEVELS = (L > 1) ? $clog2(L) : 1;
  localparam int W      = 1 << LEVELS;   // leaves, padded to a power of two

  logic signed [Y_W-1:0] node [LEVELS+1][W];

  always_comb begin
    node = '{default: '0};
    for (int i = 0; i < L; i++)
      node[0][i] = Y_W'(row[i]) * Y_W'(c[i]);
    for (int lv = 0; lv < LEVELS; lv++)
      for (int i = 0; i < (W >> (lv+1)); i++)
        node[lv+1][i] = node[lv][2*i] + node[lv][2*i+1];
    r = node[LEVELS][0];
  end

endmodule
