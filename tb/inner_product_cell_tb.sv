// inner_product_cell_tb - self-checking test of inner_product_cell.
//
// Applies random and extreme 8-bit signed rows and weight vectors (L = 4) and
// compares r with the inner product computed here in 32-bit integers and reduced
// modulo 2^16.
module inner_product_cell_tb;
  localparam int L = 4, X_W = 8, C_W = 8, Y_W = 16;

  logic signed [X_W-1:0] row [L];
  logic signed [C_W-1:0] c   [L];
  logic signed [Y_W-1:0] r;

  int checks = 0, failures = 0;

  inner_product_cell #(.L(L), .X_W(X_W), .C_W(C_W), .Y_W(Y_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int acc;
      for (int i = 0; i < L; i++) begin
        case (t)
          0: begin row[i] = -128; c[i] = -128; end
          1: begin row[i] = 127;  c[i] = -128; end
          default: begin row[i] = X_W'($urandom); c[i] = C_W'($urandom); end
        endcase
      end
      #1;
      acc = 0;
      for (int i = 0; i < L; i++) acc += int'(row[i]) * int'(c[i]);
      checks++;
      if (r != Y_W'(acc)) begin
        failures++;
        $display("t=%0d r=%0d expected %0d", t, r, $signed(Y_W'(acc)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
