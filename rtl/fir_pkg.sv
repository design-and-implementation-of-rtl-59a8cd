// fir_pkg - constants, default coefficient sets and elaboration-time helpers
// shared by the transpose-form block FIR filters.
//
// The default sizes are block size L = 4, filter length N = 16, 8-bit signed
// samples and coefficients, and 16-bit results. Sums are carried at the output
// width and wrap modulo 2^16, which is exact whenever the true result fits.
//
// Two coefficient sets are provided. COEF_AVG (all taps 1, a 16-sample moving
// sum) is the channel the reference simulation selects with sel = 1. COEF_LP is
// this design's own choice for the second channel and for the fixed filter: a
// 16-tap Hamming-window low-pass for 360 Hz ECG data with a 40 Hz cut-off,
// scaled so its taps sum to 128 (unity gain in Q7).
//
// csd_digit() returns one digit (-1, 0 or +1) of the canonical signed digit form
// of a constant; it is used at elaboration time to build shift-add multipliers.
package fir_pkg;

  localparam int DEF_L   = 4;
  localparam int DEF_N   = 16;
  localparam int DEF_XW  = 8;
  localparam int DEF_CW  = 8;
  localparam int DEF_YW  = 16;
  localparam int DEF_NCH = 2;

  localparam logic signed [DEF_CW-1:0] COEF_LP [DEF_N] = '{
    8'sd0, -8'sd1, -8'sd1, 8'sd0, 8'sd4, 8'sd12, 8'sd22, 8'sd28,
    8'sd28, 8'sd22, 8'sd12, 8'sd4, 8'sd0, -8'sd1, -8'sd1, 8'sd0
  };

  localparam logic signed [DEF_CW-1:0] COEF_AVG [DEF_N] = '{default: 8'sd1};

  // Default coefficient table of the reconfigurable filter, indexed [sel][tap].
  localparam logic signed [DEF_CW-1:0] COEF_TABLE [DEF_NCH][DEF_N] = '{
    '{8'sd0, -8'sd1, -8'sd1, 8'sd0, 8'sd4, 8'sd12, 8'sd22, 8'sd28,
      8'sd28, 8'sd22, 8'sd12, 8'sd4, 8'sd0, -8'sd1, -8'sd1, 8'sd0},
    '{default: 8'sd1}
  };

  // Digit b of the canonical signed digit (non-adjacent) form of v.
  function automatic int csd_digit(int v, int b);
    int r;
    int     d;
    r = v;
    d = 0;
    for (int i = 0; i <= b; i++) begin
      if (r % 2 != 0) begin
        d = (((r % 4) + 4) % 4 == 1) ? 1 : -1;
        r = r - d;
      end else begin
        d = 0;
      end
      r = r / 2;
    end
    return d;
  endfunction

  // Number of trailing zero bits of a non-zero value.
  function automatic int tz_count(int v);
    int n;
    n = 0;
    while (v != 0 && v % 2 == 0) begin
      v = v / 2;
      n++;
    end
    return n;
  endfunction

endpackage
