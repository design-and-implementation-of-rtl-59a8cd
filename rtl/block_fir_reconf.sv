// block_fir_reconf - transpose-form block FIR filter for reconfigurable
// (multi-channel) use.
//
// The filter takes a block of L input samples per clock and returns a block of
// L outputs per clock, y(n) = sum_{t=0}^{N-1} h(t) x(n-t). The N taps are split
// into M = N/L short weight vectors c_m = h(mL .. mL+L-1), so that
//   y_k = sum_{m=0}^{M-1} S_{k-m}^0 c_m,
// where S_k^0 is the L x L matrix of current input samples. In transpose form
// every weight vector is applied to the current matrix only, r_k^m = S_k^0 c_m,
// and the delays are moved to the output side, where the pipelined adder unit
// sums r_{k-m}^m. The blocks are:
//   register_unit        RU, builds the 2L-1 sample window of S_k^0
//   coef_storage_unit    CSU, N ROM LUTs; sel picks the channel's coefficients
//   inner_product_unit   M IPUs, one per weight vector, working in parallel
//   pipelined_adder_unit PAU, transpose-form delay-add chain
//
// Interface: x_blk[i] = x(kL+i), y_blk[l] = y(kL+l); in_valid marks a block and
// all state advances only on valid blocks. Timing: the block accepted in cycle
// k leaves in cycle k+2 with out_valid. The coefficient set follows sel one
// cycle later; after a channel change the next M-1 output blocks still contain
// partial sums made with the previous set. Samples and coefficients are signed;
// results are Y_W bits and wrap modulo 2^Y_W.
//
// The block structure follows the source design. Widths come from its reference
// simulation (8-bit data and coefficients, 16-bit results); the valid
// handshake, the reset and the register placement are this design's choices.
module block_fir_reconf #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW,
  parameter int NCH = fir_pkg::DEF_NCH,
  parameter int S_W = (NCH > 1) ? $clog2(NCH) : 1,
  parameter logic signed [C_W-1:0] TABLE [NCH][N] = fir_pkg::COEF_TABLE
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  input  logic [S_W-1:0]        sel,
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_blk [L]
);

  localparam int M = N / L;

  initial assert (N % L == 0) else $error("N must be a multiple of L");

  logic                  win_valid;
  logic signed [X_W-1:0] win  [2*L-1];
  logic signed [C_W-1:0] coef [N];
  logic signed [C_W-1:0] cm   [M][L];
  logic signed [Y_W-1:0] r    [M][L];

  register_unit #(.L(L), .X_W(X_W)) u_ru (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .win_valid (win_valid),
    .win       (win)
  );

  coef_storage_unit #(.N(N), .C_W(C_W), .NCH(NCH), .S_W(S_W), .TABLE(TABLE)) u_csu (
    .clk  (clk),
    .rst  (rst),
    .sel  (sel),
    .coef (coef)
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    always_comb
      for (int i = 0; i < L; i++) cm[m][i] = coef[m*L+i];

    inner_product_unit #(.L(L), .X_W(X_W), .C_W(C_W), .Y_W(Y_W)) u_ipu (
      .win (win),
      .c   (cm[m]),
      .r   (r[m])
    );
  end

  pipelined_adder_unit #(.L(L), .M(M), .Y_W(Y_W)) u_pau (
    .clk       (clk),
    .rst       (rst),
    .en        (win_valid),
    .r         (r),
    .out_valid (out_valid),
    .y         (y_blk)
  );

endmodule
