// inner_product_unit - inner-product unit (IPU) for one short weight vector.
//
// Forms the L x L input matrix S_k^0 from the register unit's window and
// multiplies it by one weight vector c_m, giving the block of L partial outputs
//   r[l] = sum_{i=0}^{L-1} c_m[i] * x(kL+l-i),   0 <= l < L.
// It holds L inner-product cells working in parallel; cell l takes row l of
// S_k^0, which is win[L-1-l .. 2L-2-l] (win[j] = x(kL+L-1-j), newest first).
// Purely combinational; Y_W-bit results as in inner_product_cell.
//
// The structure (L cells sharing one weight vector) follows the source design.
module inner_product_unit #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW
) (
  input  logic signed [X_W-1:0] win [2*L-1],
  input  logic signed [C_W-1:0] c   [L],
  output logic signed [Y_W-1:0] r   [L]
);

  for (genvar l = 0; l < L; l++) begin : g_ipc
    logic signed [X_W-1:0] row [L];

    always_comb
      for (int i = 0; i < L; i++) row[i] = win[L-1-l+i];

    inner_product_cell #(.L(L), .X_W(X_W), .C_W(C_W), .Y_W(Y_W)) u_ipc (
      .row (row),
      .c   (c),
      .r   (r[l])
    );
  end

endmodule
