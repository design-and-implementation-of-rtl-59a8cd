// inner_product_unit_tb - self-checking test of inner_product_unit.
//
// Builds a random 2L-1 sample window (win[j] = x(kL+L-1-j)) and weight vector,
// and checks every output r[l] against sum_i c[i] * x(kL+l-i) computed here
// from the sample sequence itself, modulo 2^16.
module inner_product_unit_tb;
  localparam int L = 4, X_W = 8, C_W = 8, Y_W = 16;

  logic signed [X_W-1:0] win [2*L-1];
  logic signed [C_W-1:0] c   [L];
  logic signed [Y_W-1:0] r   [L];

  int checks = 0, failures = 0;
  int xs [2*L-1];   // xs[n] = x(kL - (L-1) + n), n = 0 .. 2L-2

  inner_product_unit #(.L(L), .X_W(X_W), .C_W(C_W), .Y_W(Y_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int n = 0; n < 2*L-1; n++) xs[n] = int'($signed(X_W'($urandom)));
      for (int i = 0; i < L; i++) c[i] = C_W'($urandom);
      for (int j = 0; j < 2*L-1; j++) win[j] = X_W'(xs[2*L-2-j]);
      #1;
      for (int l = 0; l < L; l++) begin
        int acc;
        acc = 0;
        for (int i = 0; i < L; i++) acc += int'(c[i]) * xs[(L-1) + l - i];
        checks++;
        if (r[l] != Y_W'(acc)) begin
          failures++;
          $display("t=%0d r[%0d]=%0d expected %0d", t, l, r[l], $signed(Y_W'(acc)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
