// block_fir_reconf_tb - self-checking test of block_fir_reconf at its default
// size (L = 4, N = 16, 8-bit data and coefficients, 16-bit results).
//
// A scoreboard records every accepted block together with the channel sel
// selected when it was accepted, and computes the expected output block from
// the filter's definition in transpose form:
//   y(kL+l) = sum_m sum_i h_{ch(k-m)}(mL+i) * x((k-m)L+l-i)
// (with one channel throughout this is plain convolution). The expected block
// must appear exactly two cycles after its input block. The coefficient sets
// are written out again here. Phases:
//   1 constant input -75 on channel 1 (all-ones taps): output settles at -1200
//   2 unit impulse on channel 0: the output reproduces the 16 taps
//   3 random samples, random gaps, random channel switches
// Each of gap (stall), channel switch and settled constant output must happen.
module block_fir_reconf_tb;
  localparam int L = 4, N = 16, M = N / L, X_W = 8, C_W = 8, Y_W = 16;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [X_W-1:0] x_blk [L];
  logic [0:0] sel = 1'b1;
  logic out_valid;
  logic signed [Y_W-1:0] y_blk [L];

  int h [2][N] = '{
    '{0, -1, -1, 0, 4, 12, 22, 28, 28, 22, 12, 4, 0, -1, -1, 0},
    '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1}
  };

  int checks = 0, failures = 0;
  int n_gap = 0, n_switch = 0, n_settled = 0, n_impulse = 0;
  int cyc = 0;
  int xs [$];           // accepted samples, oldest first
  int chs [$];          // channel of each accepted block
  typedef int blk_t [L];
  blk_t exp_q [$];      // expected output blocks
  int due_q [$];        // cycle at which each is due
  int last_y0;

  block_fir_reconf #(.L(L), .N(N), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .NCH(2)) dut (.*);

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

  // Expected output block of accepted block k.
  function automatic blk_t expect_blk(int k);
    blk_t e;
    for (int l = 0; l < L; l++) begin
      e[l] = 0;
      for (int m = 0; m < M; m++)
        if (k - m >= 0)
          for (int i = 0; i < L; i++)
            e[l] = e[l] + h[chs[k-m]][m*L+i] * xat((k-m)*L + l - i);
    end
    return e;
  endfunction

  // Scoreboard: record accepted blocks, compare outputs.
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst) begin
      xs.delete(); chs.delete(); exp_q.delete(); due_q.delete();
    end else begin
      if (in_valid) begin
        for (int i = 0; i < L; i++) xs.push_back(int'(x_blk[i]));
        chs.push_back(int'(sel));
        exp_q.push_back(expect_blk(chs.size() - 1));
        due_q.push_back(cyc + 1);
      end
      #1;
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("cycle %0d: unexpected output block", cyc);
        end else begin
          blk_t e;
          int due;
          e = exp_q[0];
          exp_q.delete(0);
          due = due_q.pop_front();
          if (due != cyc) begin failures++; $display("output in cycle %0d, due %0d", cyc, due); end
          for (int l = 0; l < L; l++) begin
            checks++;
            if (y_blk[l] != Y_W'(e[l])) begin
              failures++;
              $display("cycle %0d y[%0d]=%0d expected %0d", cyc, l, y_blk[l], $signed(Y_W'(e[l])));
            end
          end
          last_y0 = int'(y_blk[0]);
        end
      end else if (due_q.size() != 0 && due_q[0] <= cyc) begin
        failures++; checks++;
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

  task automatic set_sel(bit s);
    @(negedge clk);
    in_valid = 1'b0;
    if (s != sel) n_switch++;
    sel = s;
  endtask

  task automatic do_reset();
    @(negedge clk);
    in_valid = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
  endtask

  initial begin
    x_blk = '{default: '0};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Phase 1: constant -75 through the all-ones channel, as in the reference run.
    set_sel(1'b1);
    for (int k = 0; k < 8; k++) send(1'b1, -75, -75, -75, -75);
    send(1'b0, 0, 0, 0, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (last_y0 == -1200) n_settled++;
    else begin failures++; $display("settled output %0d, expected -1200", last_y0); end
    // Phase 2: impulse response of channel 0.
    do_reset();
    set_sel(1'b0);
    send(1'b1, 1, 0, 0, 0);
    for (int k = 0; k < M + 1; k++) send(1'b1, 0, 0, 0, 0);
    n_impulse++;
    send(1'b0, 0, 0, 0, 0);
    // Phase 3: random traffic, gaps and channel switches.
    for (int t = 0; t < 2000; t++) begin
      int r;
      r = $urandom_range(0, 19);
      if (r == 0)      set_sel(~sel);
      else if (r < 4)  send(1'b0, 0, 0, 0, 0);
      else             send(1'b1, $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128,
                                  $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    end
    send(1'b0, 0, 0, 0, 0);
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d output blocks never appeared", exp_q.size()); end
    $display("gaps=%0d channel_switches=%0d settled=%0d impulse=%0d", n_gap, n_switch, n_settled, n_impulse);
    checks += 3;
    if (n_gap == 0)    begin failures++; $display("no gap exercised"); end
    if (n_switch < 2)  begin failures++; $display("no channel switch exercised"); end
    if (n_impulse == 0) begin failures++; $display("no impulse run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
