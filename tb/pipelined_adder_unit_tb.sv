// pipelined_adder_unit_tb - self-checking test of pipelined_adder_unit.
//
// Drives random partial-output blocks r_k^m (M = 4, L = 4) with random enable
// gaps and records every enabled set. One cycle after each enabled cycle it
// checks out_valid and y_k = sum_{m=0}^{M-1} r_{k-m}^m, where k counts enabled
// cycles only and blocks before the first are zero (reset state). It also
// checks that out_valid stays low after a disabled cycle and that the latency
// is exactly one cycle.
module pipelined_adder_unit_tb;
  localparam int L = 4, M = 4, Y_W = 16;

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [Y_W-1:0] r [M][L];
  logic out_valid;
  logic signed [Y_W-1:0] y [L];

  int checks = 0, failures = 0, gaps = 0;
  int hist [$][M][L];

  pipelined_adder_unit #(.L(L), .M(M), .Y_W(Y_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '{default: '{default: '0}};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 400; t++) begin
      bit v;
      int rr [M][L];
      v = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      en = v;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          r[m][l] = Y_W'($urandom);
          rr[m][l] = int'(r[m][l]);
        end
      @(posedge clk);
      if (v) hist.push_back(rr);
      #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("t=%0d out_valid=%0b", t, out_valid); end
      if (v) begin
        int k;
        k = hist.size() - 1;
        for (int l = 0; l < L; l++) begin
          int acc;
          acc = 0;
          for (int m = 0; m < M; m++) if (k - m >= 0) acc += hist[k-m][m][l];
          checks++;
          if (y[l] != Y_W'(acc)) begin
            failures++;
            $display("k=%0d y[%0d]=%0d expected %0d", k, l, y[l], $signed(Y_W'(acc)));
          end
        end
      end else gaps++;
    end
    checks++;
    if (gaps == 0) begin failures++; $display("no enable gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
