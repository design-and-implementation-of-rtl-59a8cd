// register_unit - register unit (RU) of the transpose-form block FIR filter.
//
// Each accepted cycle brings a block x_k of L samples, x_blk[i] = x(kL+i). The
// unit registers the block and, alongside it, the newest L-1 samples of the
// previous block. Together they are the 2L-1 samples that make up the L x L
// input matrix S_k^0, whose row l is x(kL+l), x(kL+l-1), ..., x(kL+l-L+1).
// They are presented newest first: win[j] = x(kL+L-1-j), so row l, column i of
// S_k^0 is win[L-1-l+i].
//
// Timing: a block accepted with in_valid in cycle k appears on win from cycle
// k+1, with win_valid high for that one cycle; without in_valid the registers
// hold. Reset (synchronous, active high) clears the sample history to zero, so
// the filter starts from a zero past.
//
// The source design states only what the unit delivers; the register arrangement,
// the valid flag and the reset are this design's choices.
module register_unit #(
  parameter int L   = fir_pkg::DEF_L,
  parameter int X_W = fir_pkg::DEF_XW
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  output logic                  win_valid,
  output logic signed [X_W-1:0] win [2*L-1]
);

  logic signed [X_W-1:0] cur  [L];     // x(kL) .. x(kL+L-1)
  logic signed [X_W-1:0] prev [L-1];   // x(kL-L+1) .. x(kL-1)

  always_ff @(posedge clk) begin
    if (rst) begin
      cur       <= '{default: '0};
      prev      <= '{default: '0};
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        cur <= x_blk;
        for (int i = 0; i < L-1; i++) prev[i] <= cur[i+1];
      end
    end
  end

  // Newest first: win[j] = x(kL+L-1-j).
  always_comb begin
    for (int j = 0; j < L; j++)   win[j]   = cur[L-1-j];
    for (int j = 0; j < L-1; j++) win[L+j] = prev[L-2-j];
  end

endmodule
