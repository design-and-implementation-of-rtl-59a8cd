// block_fir_mcm - MCM-based transpose-form block FIR filter with fixed
// coefficients.
//
// Same block formulation as block_fir_reconf, y_k = sum_m S_{k-m}^0 c_m with
// M = N/L weight vectors c_m = h(mL .. mL+L-1), but the coefficients are
// constants, so the multipliers are replaced by multiple constant multiplication.
// In S_k^0 the 2L-1 window samples win[j] = x(kL+L-1-j) each meet a fixed set of
// coefficients: sample j sits on the diagonal l - i = L-1-j, which has L-|L-1-j|
// positions, and meets h(mL+i) there for all M vectors. Sample j therefore feeds
// one MCM block of M*(L-|L-1-j|) constants; for L = 4, N = 16 these are blocks
// of 4, 8, 12, 16, 12, 8 and 4 products. The adder network adds the products
// into the inner products r_k^m, and the pipelined adder unit sums r_{k-m}^m.
//   register_unit -> 2L-1 x mcm_block -> adder_network -> pipelined_adder_unit
//
// Interface and timing are those of block_fir_reconf without sel: a block
// accepted with in_valid in cycle k leaves in cycle k+2 with out_valid.
// Results are Y_W bits and wrap modulo 2^Y_W.
//
// The structure follows the source design. Its coefficient values are not published;
// the default COEF is this design's 16-tap ECG low-pass (see fir_pkg).
module block_fir_mcm #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW,
  parameter logic signed [C_W-1:0] COEF [N] = fir_pkg::COEF_LP
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_blk [L]
);

  localparam int M = N / L;

  initial assert (N % L == 0) else $error("N must be a multiple of L");

  // Diagonal of window sample j: l - i = L-1-j; valid columns i in [ILO, IHI].
  function automatic int i_lo(int j);
    return (j - (L-1) > 0) ? j - (L-1) : 0;
  endfunction
  function automatic int i_hi(int j);
    return (j < L-1) ? j : L-1;
  endfunction

  // Constants of the MCM block of sample j, ordered m-major, then i.
  function automatic logic [M*L*C_W-1:0] consts_of(int j);
    logic [M*L*C_W-1:0] v;
    int n;
    v = '0;
    n = 0;
    for (int m = 0; m < M; m++)
      for (int i = i_lo(j); i <= i_hi(j); i++) begin
        v[n*C_W +: C_W] = COEF[m*L+i];
        n++;
      end
    return v;
  endfunction

  logic                  win_valid;
  logic signed [X_W-1:0] win [2*L-1];
  logic signed [Y_W-1:0] p   [2*L-1][M][L];
  logic signed [Y_W-1:0] r   [M][L];

  register_unit #(.L(L), .X_W(X_W)) u_ru (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .win_valid (win_valid),
    .win       (win)
  );

  for (genvar j = 0; j < 2*L-1; j++) begin : g_mcm
    localparam int ILO = i_lo(j);
    localparam int NI  = i_hi(j) - ILO + 1;
    localparam int NC  = M * NI;
    localparam logic [M*L*C_W-1:0] KALL = consts_of(j);

    logic signed [Y_W-1:0] prod [NC];

    mcm_block #(.NC(NC), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .K(KALL[NC*C_W-1:0])) u_mcm (
      .x (win[j]),
      .p (prod)
    );

    always_comb begin
      for (int m = 0; m < M; m++)
        for (int i = 0; i < L; i++) begin
          if (i >= ILO && i < ILO + NI) p[j][m][i] = prod[m*NI + ((i >= ILO) ? i - ILO : 0)];
          else                          p[j][m][i] = '0;
        end
    end
  end

  adder_network #(.L(L), .M(M), .Y_W(Y_W)) u_an (
    .p (p),
    .r (r)
  );

  pipelined_adder_unit #(.L(L), .M(M), .Y_W(Y_W)) u_pau (
    .clk       (clk),
    .rst       (rst),
    .en        (win_valid),
    .r         (r),
    .out_valid (out_valid),
    .y         (y_blk)
  );

endmodule
