// block_fir_mcm_tb - self-checking test of block_fir_mcm (L = 4, N = 16).
//
// Two instances share the input stream: one with the default low-pass
// coefficients and one with an arbitrary set that includes the extreme values
// -128 and 127, zero, and negative and odd constants. A scoreboard records every
// accepted block and computes each instance's expected output by direct
// convolution, y(n) = sum_t h(t) x(n-t) modulo 2^16, which must appear exactly
// two cycles after the input block. Phases: an impulse (the outputs must
// reproduce the taps), a constant full-scale input, then random samples with
// random gaps. Gaps (stalls) must have occurred.
module block_fir_mcm_tb;
  localparam int L = 4, N = 16, X_W = 8, C_W = 8, Y_W = 16;

  localparam logic signed [C_W-1:0] KB [N] = '{
    -8'sd128, 8'sd127, 8'sd1, -8'sd1, 8'sd0, 8'sd64, -8'sd96, 8'sd85,
    8'sd3, -8'sd5, 8'sd7, 8'sd9, -8'sd11, 8'sd45, -8'sd77, 8'sd100
  };

  int h [2][N] = '{
    '{0, -1, -1, 0, 4, 12, 22, 28, 28, 22, 12, 4, 0, -1, -1, 0},
    '{-128, 127, 1, -1, 0, 64, -96, 85, 3, -5, 7, 9, -11, 45, -77, 100}
  };

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [X_W-1:0] x_blk [L];
  logic out_valid, out_valid_b;
  logic signed [Y_W-1:0] y_blk [L];
  logic signed [Y_W-1:0] y_blk_b [L];

  block_fir_mcm #(.L(L), .N(N), .X_W(X_W), .C_W(C_W), .Y_W(Y_W)) dut (.*);

  block_fir_mcm #(.L(L), .N(N), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .COEF(KB)) dut_b (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x_blk(x_blk),
    .out_valid(out_valid_b), .y_blk(y_blk_b)
  );

  typedef int blk_t [2][L];

  int checks = 0, failures = 0, n_gap = 0, cyc = 0;
  int xs [$];
  blk_t exp_q [$];
  int due_q [$];

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xat(int n);
    return (n < 0) ? 0 : xs[n];
  endfunction

  function automatic blk_t expect_blk(int k);
    blk_t e;
    for (int d = 0; d < 2; d++)
      for (int l = 0; l < L; l++) begin
        e[d][l] = 0;
        for (int t = 0; t < N; t++) e[d][l] = e[d][l] + h[d][t] * xat(k*L + l - t);
      end
    return e;
  endfunction

  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst) begin
      xs.delete(); exp_q.delete(); due_q.delete();
    end else begin
      if (in_valid) begin
        for (int i = 0; i < L; i++) xs.push_back(int'(x_blk[i]));
        exp_q.push_back(expect_blk(xs.size() / L - 1));
        due_q.push_back(cyc + 1);
      end
      #1;
      checks++;
      if (out_valid !== out_valid_b) begin failures++; $display("instances disagree on out_valid"); end
      if (out_valid) begin
        if (exp_q.size() == 0) begin
          failures++; $display("cycle %0d: unexpected output block", cyc);
        end else begin
          blk_t e;
          e = exp_q[0];
          exp_q.delete(0);
          checks++;
          if (due_q[0] != cyc) begin failures++; $display("output in cycle %0d, due %0d", cyc, due_q[0]); end
          due_q.delete(0);
          for (int l = 0; l < L; l++) begin
            checks += 2;
            if (y_blk[l] != Y_W'(e[0][l])) begin
              failures++;
              $display("cycle %0d lowpass y[%0d]=%0d expected %0d", cyc, l, y_blk[l], $signed(Y_W'(e[0][l])));
            end
            if (y_blk_b[l] != Y_W'(e[1][l])) begin
              failures++;
              $display("cycle %0d set-B y[%0d]=%0d expected %0d", cyc, l, y_blk_b[l], $signed(Y_W'(e[1][l])));
            end
          end
        end
      end else if (due_q.size() != 0 && due_q[0] <= cyc) begin
        failures++;
        $display("cycle %0d: output block due in cycle %0d missing", cyc, due_q[0]);
        exp_q.delete(0); due_q.delete(0);
      end
    end
  end

  task automatic send(bit v, int s0, int s1, int s2, int s3);
    @(negedge clk);
    in_valid = v;
    x_blk[0] = X_W'(s0); x_blk[1] = X_W'(s1); x_blk[2] = X_W'(s2); x_blk[3] = X_W'(s3);
    if (!v) n_gap++;
  endtask

  initial begin
    x_blk = '{default: '0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    send(1'b1, 1, 0, 0, 0);
    for (int k = 0; k < 5; k++) send(1'b1, 0, 0, 0, 0);
    for (int k = 0; k < 6; k++) send(1'b1, -128, -128, -128, -128);
    for (int t = 0; t < 2000; t++) begin
      if ($urandom_range(0, 4) == 0) send(1'b0, 0, 0, 0, 0);
      else send(1'b1, $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128,
                      $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    end
    send(1'b0, 0, 0, 0, 0);
    repeat (4) @(posedge clk);
    #2;
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d output blocks never appeared", exp_q.size()); end
    if (n_gap == 0) begin failures++; $display("no gap exercised"); end
    $display("gaps=%0d", n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
