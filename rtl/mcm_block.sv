// mcm_block - multiple constant multiplication (MCM) block.
//
// Multiplies one input sample x by NC fixed constants K[0..NC-1] without
// multipliers. Each constant is written as sign * odd * 2^s. For every distinct
// odd part the product odd * x (a "fundamental") is built once from the
// canonical signed digit (CSD) form of the odd part: one shifted copy of x,
// added or subtracted, per non-zero digit. Every constant then takes its
// fundamental, shifted by s and negated if needed, so constants that differ only
// by a power of two or a sign share all their adders.
//
// Interface: K is packed, constant i in K[i*C_W +: C_W] (signed); p[i] = K[i]*x
// as a Y_W-bit value (wraps modulo 2^Y_W). Purely combinational; all digit
// patterns are worked out at elaboration.
//
// The source design uses MCM blocks built on CSD-coded coefficients with shared
// subexpressions, but does not describe its subexpression search. Sharing here
// stops at equal odd parts; any further sharing is left to synthesis.
// Products of zero constants, and the low s bits of a constant with s trailing
// zero bits, are constant zero by construction.
module mcm_block #(
  parameter int NC  = 8,
  parameter int X_W = fir_pkg::DEF_XW,
  parameter int C_W = fir_pkg::DEF_CW,
  parameter int Y_W = fir_pkg::DEF_YW,
  // Default: the 8 constants of the low-pass filter's second-newest sample,
  // h(0), h(1), h(4), h(5), h(8), h(9), h(12), h(13) = 0, -1, 4, 12, 28, 22, 0, -1.
  parameter logic [NC*C_W-1:0] K = {-8'sd1, 8'sd0, 8'sd22, 8'sd28, 8'sd12, 8'sd4, -8'sd1, 8'sd0}
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [Y_W-1:0] p [NC]
);

  localparam int ND = C_W + 1;   // CSD digits needed for a C_W-bit constant

  function automatic int kval(int i);
    logic signed [C_W-1:0] k;
    k = K[i*C_W +: C_W];
    return int'(k);
  endfunction

  function automatic int odd_part(int i);
    int a;
    a = kval(i);
    if (a < 0) a = -a;
    return (a == 0) ? 0 : (a >> fir_pkg::tz_count(a));
  endfunction

  // Lowest index whose constant has the same odd part as constant i.
  function automatic int source_of(int i);
    for (int j = 0; j < i; j++)
      if (odd_part(j) == odd_part(i)) return j;
    return i;
  endfunction

  logic signed [Y_W-1:0] xe;
  logic signed [Y_W-1:0] f [NC];   // fundamentals, valid where source_of(i) == i

  assign xe = Y_W'(x);

  for (genvar i = 0; i < NC; i++) begin : g_const
    localparam int KV  = kval(i);
    localparam int ODD = odd_part(i);
    localparam int SRC = source_of(i);
    localparam int SH  = (KV == 0) ? 0 : fir_pkg::tz_count((KV < 0) ? -KV : KV);

    if (SRC == i && ODD != 0) begin : g_fund
      logic signed [Y_W-1:0] term [ND];
      for (genvar b = 0; b < ND; b++) begin : g_digit
        localparam int D = fir_pkg::csd_digit(ODD, b);
        if (D == 1) begin : g_add
          assign term[b] = xe <<< b;
        end else if (D == -1) begin : g_sub
          assign term[b] = -(xe <<< b);
        end else begin : g_none
          assign term[b] = '0;
        end
      end
      always_comb begin
        f[i] = '0;
        for (int b = 0; b < ND; b++) f[i] = f[i] + term[b];
      end
    end else begin : g_shared
      assign f[i] = '0;
    end

    if (KV == 0) begin : g_zero
      assign p[i] = '0;
    end else if (KV < 0) begin : g_neg
      assign p[i] = -(f[SRC] <<< SH);
    end else begin : g_pos
      assign p[i] = f[SRC] <<< SH;
    end
  end

endmodule
