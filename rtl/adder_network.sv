// adder_network - adder network of the MCM-based block FIR filter.
//
// The 2L-1 MCM blocks deliver, for each window sample win[j] = x(kL+L-1-j), the
// products p[j][m][i] = h(mL+i) * win[j] for every pair (m, i) in which that
// sample meets coefficient h(mL+i) inside the matrix product S_k^0 c_m. This
// network adds them into the inner products
//   r[m][l] = sum_{i=0}^{L-1} p[L-1-l+i][m][i] = sum_i h(mL+i) x(kL+l-i),
// i.e. the same values the inner-product units of the reconfigurable filter
// produce, here for all M weight vectors at once. Entries p[j][m][i] with no
// matrix position (|L-1-j-i| outside the matrix) are not read.
// Purely combinational; Y_W-bit sums wrapping modulo 2^Y_W.
//
// The source design names the network and its result; the plain L-term sums are
// this design's choice.
module adder_network #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int M   = fir_pkg::DEF_N / fir_pkg::DEF_L,
  parameter int Y_W = fir_pkg::DEF_YW
) (
  input  logic signed [Y_W-1:0] p [2*L-1][M][L],
  output logic signed [Y_W-1:0] r [M][L]
);

  always_comb begin
    for (int m = 0; m < M; m++)
      for (int l = 0; l < L; l++) begin
        r[m][l] = '0;
        for (int i = 0; i < L; i++)
          r[m][l] = r[m][l] + p[L-1-l+i][m][i];
      end
  end

endmodule
