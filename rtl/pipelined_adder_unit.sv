// pipelined_adder_unit - pipelined adder unit (PAU) of the transpose-form block
// FIR filter.
//
// The IPUs deliver in every block cycle k the M partial output blocks r_k^m,
// m = 0..M-1. The filter output is y_k = sum_m r_{k-m}^m: the contribution of
// weight vector c_m must be delayed by m blocks. As in a transpose-form filter,
// this is done with a chain of block registers and adders, one stage per m:
//   t[M-1] = r^{M-1},  t[m] = r^m + q[m],  q[m] <= t[m+1],  y <= t[0].
// Every stage holds one adder level, so the chain is pipelined by construction.
//
// Timing: when en is high in cycle k (a valid block is in the IPUs) all
// registers advance and y_k appears in cycle k+1 with out_valid high for one
// cycle; with en low everything holds. Reset (synchronous, active high) clears
// the partial sums. Sums are Y_W bits and wrap modulo 2^Y_W.
//
// The source design names the unit and its job; the register chain is the standard
// transpose-form arrangement and the enable and reset are this design's own.
module pipelined_adder_unit #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int M   = fir_pkg::DEF_N / fir_pkg::DEF_L,
  parameter int Y_W = fir_pkg::DEF_YW
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic signed [Y_W-1:0] r   [M][L],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y   [L]
);

  // t[m] = r_k^m + q[m] is the sum of stages m..M-1 for the current block;
  // q[m] holds t[m+1] of the previous block (stage M-1 has nothing to add).
  logic signed [Y_W-1:0] t [M][L];

  for (genvar m = 0; m < M; m++) begin : g_stage
    if (m == M-1) begin : g_last
      always_comb t[m] = r[m];
    end else begin : g_mid
      logic signed [Y_W-1:0] q [L];

      always_ff @(posedge clk) begin
        if (rst)     q <= '{default: '0};
        else if (en) q <= t[m+1];
      end

      always_comb
        for (int l = 0; l < L; l++) t[m][l] = r[m][l] + q[l];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '{default: '0};
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) y <= t[0];
    end
  end

endmodule
