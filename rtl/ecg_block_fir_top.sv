// ecg_block_fir_top - block FIR filtering of ECG samples, reconfigurable and
// fixed-coefficient structures side by side.
//
// Both filters are transpose-form block FIR filters of length N that take a
// block of L samples per clock and return L filtered samples per clock:
//   block_fir_reconf  general multipliers; coefficients come from a small
//                     coefficient store and the channel input sel picks the set
//                     (sel = 1: 16-tap moving sum, sel = 0: 16-tap low-pass)
//   block_fir_mcm     multiplierless; constant coefficients (the low-pass) are
//                     applied with shift-add MCM blocks
// They receive the same input blocks and run independently.
//
// Interface: x_blk[i] = x(kL+i) with in_valid; rec_y / mcm_y carry
// y(kL+l) in element l with rec_valid / mcm_valid, two cycles after the block
// was accepted. Synchronous active-high reset. 8-bit signed samples and
// coefficients, 16-bit signed results.
//
// Placing the two structures side by side in one top is this design's choice;
// each is one of the source design's two proposed filter structures.
module ecg_block_fir_top #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int N   = fir_pkg::DEF_N,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW,
  parameter int NCH = fir_pkg::DEF_NCH,
  parameter int S_W = (NCH > 1) ? $clog2(NCH) : 1,
  parameter logic signed [C_W-1:0] TABLE [NCH][N] = fir_pkg::COEF_TABLE,
  parameter logic signed [C_W-1:0] COEF  [N]      = fir_pkg::COEF_LP
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  input  logic [S_W-1:0]        sel,
  output logic                  rec_valid,
  output logic signed [Y_W-1:0] rec_y [L],
  output logic                  mcm_valid,
  output logic signed [Y_W-1:0] mcm_y [L]
);

  block_fir_reconf #(
    .L(L), .N(N), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .NCH(NCH), .S_W(S_W), .TABLE(TABLE)
  ) u_reconf (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .sel       (sel),
    .out_valid (rec_valid),
    .y_blk     (rec_y)
  );

  block_fir_mcm #(
    .L(L), .N(N), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .COEF(COEF)
  ) u_mcm (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .x_blk     (x_blk),
    .out_valid (mcm_valid),
    .y_blk     (mcm_y)
  );

endmodule
