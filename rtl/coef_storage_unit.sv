// coef_storage_unit - coefficient storage unit (CSU) of the reconfigurable
// transpose-form block FIR filter.
//
// The unit holds the coefficients of every channel filter. As the source design
// describes, it is organised as N small ROM look-up tables, one per tap, each
// holding that tap's value for all NCH channels; the channel number sel
// addresses all N tables at once, so a complete coefficient set is available
// after one clock cycle. The output register coef[n] = h_sel(n) is split by the
// filter into the M = N/L short weight vectors c_m[i] = coef[mL+i].
//
// Timing: coef shows the set of the sel value sampled at the previous clock
// edge. Reset (synchronous, active high) loads channel 0.
//
// The table contents are a parameter. The default channel 1 is the all-ones
// 16-tap set used in the reference simulation; channel 0, the register on the
// output and the reset value are this design's choices.
module coef_storage_unit #(
  parameter int N   = fir_pkg::DEF_N,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int NCH = fir_pkg::DEF_NCH,
  parameter int S_W = (NCH > 1) ? $clog2(NCH) : 1,
  parameter logic signed [C_W-1:0] TABLE [NCH][N] = fir_pkg::COEF_TABLE
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [S_W-1:0]        sel,
  output logic signed [C_W-1:0] coef [N]
);

  for (genvar n = 0; n < N; n++) begin : g_lut
    // ROM LUT of tap n: one entry per channel.
    logic signed [C_W-1:0] rom [NCH];
    logic signed [C_W-1:0] rd;

    always_comb begin
      for (int ch = 0; ch < NCH; ch++) rom[ch] = TABLE[ch][n];
      rd = (int'(sel) < NCH) ? rom[sel] : rom[0];
    end

    always_ff @(posedge clk) begin
      if (rst) coef[n] <= TABLE[0][n];
      else     coef[n] <= rd;
    end
  end

endmodule
