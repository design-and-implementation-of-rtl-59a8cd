// adder_network_tb - self-checking test of adder_network.
//
// Drives random product arrays p[j][m][i] and checks every r[m][l] against
// the sum over i of p[L-1-l+i][m][i] (the diagonal of S_k^0 on which sample j
// meets coefficient i), modulo 2^16. Unused entries carry random data too, so
// a network that reads a wrong entry fails.
module adder_network_tb;
  localparam int L = 4, M = 4, Y_W = 16;

  logic signed [Y_W-1:0] p [2*L-1][M][L];
  logic signed [Y_W-1:0] r [M][L];

  int checks = 0, failures = 0;

  adder_network #(.L(L), .M(M), .Y_W(Y_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < 2*L-1; j++)
        for (int m = 0; m < M; m++)
          for (int i = 0; i < L; i++) p[j][m][i] = Y_W'($urandom);
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          logic [Y_W-1:0] acc;
          acc = '0;
          for (int i = 0; i < L; i++) acc += p[L-1-l+i][m][i];
          checks++;
          if (r[m][l] != acc) begin
            failures++;
            $display("t=%0d r[%0d][%0d]=%0d expected %0d", t, m, l, r[m][l], $signed(acc));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
