// ecg_block_fir_top_tb - end-to-end test of ecg_block_fir_top at its default
// parameters (block size 4, 16 taps, 8-bit samples, 16-bit results).
//
// Workload: a synthetic ECG sampled at 360 Hz, 75 beats per minute, made of
// Gaussian P, Q, R, S and T waves, to which 50 Hz mains interference and
// pseudo-random wide-band noise are added; the sum is rounded to 8-bit signed
// samples and sent as blocks of four. Both filters are checked sample by sample
// against a convolution model (the reconfigurable one with the channel in force
// for each block, so blocks right after a channel switch mix the two sets as the
// transpose form does). Afterwards the low-pass output, divided by its gain of
// 128, must lie closer to the clean ECG than the noisy input does.
//
// Mechanisms that must each happen at least once: input gaps (stall), channel
// switches, a reset in the middle of the stream, the constant-input run of the
// reference simulation (input -75 on the all-ones channel settles at -1200) and
// an impulse on the low-pass channel. Output blocks must appear exactly two
// cycles after their input blocks.
module ecg_block_fir_top_tb;
  localparam int L = 4, N = 16, M = N / L, X_W = 8, Y_W = 16;
  localparam int NS = 2880;   // ECG samples: 8 s at 360 Hz, 10 beats

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [X_W-1:0] x_blk [L];
  logic [0:0] sel = 1'b0;
  logic rec_valid, mcm_valid;
  logic signed [Y_W-1:0] rec_y [L];
  logic signed [Y_W-1:0] mcm_y [L];

  ecg_block_fir_top dut (.*);

  int h [2][N] = '{
    '{0, -1, -1, 0, 4, 12, 22, 28, 28, 22, 12, 4, 0, -1, -1, 0},
    '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1}
  };

  typedef int blk_t [2][L];   // [0] reconfigurable, [1] MCM

  int checks = 0, failures = 0, cyc = 0;
  int n_gap = 0, n_switch = 0, n_reset = 0, n_settled = 0, n_impulse = 0;
  int xs [$];
  int chs [$];
  blk_t exp_q [$];
  int due_q [$];
  int last_rec0;

  // ECG run bookkeeping
  bit     ecg_on = 1'b0;
  int     ecg_base;            // index in xs of the first ECG sample
  real    clean [NS];
  int     noisy [NS];
  int     lp_out [$];          // MCM (low-pass) output samples during the ECG run

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    for (int l = 0; l < L; l++) begin
      e[0][l] = 0;
      e[1][l] = 0;
      for (int m = 0; m < M; m++)
        if (k - m >= 0)
          for (int i = 0; i < L; i++)
            e[0][l] = e[0][l] + h[chs[k-m]][m*L+i] * xat((k-m)*L + l - i);
      for (int t = 0; t < N; t++) e[1][l] = e[1][l] + h[0][t] * xat(k*L + l - t);
    end
    return e;
  endfunction

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
      checks++;
      if (rec_valid !== mcm_valid) begin failures++; $display("cycle %0d: valid flags differ", cyc); end
      if (rec_valid) begin
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
            if (rec_y[l] != Y_W'(e[0][l])) begin
              failures++;
              $display("cycle %0d rec_y[%0d]=%0d expected %0d", cyc, l, rec_y[l], $signed(Y_W'(e[0][l])));
            end
            if (mcm_y[l] != Y_W'(e[1][l])) begin
              failures++;
              $display("cycle %0d mcm_y[%0d]=%0d expected %0d", cyc, l, mcm_y[l], $signed(Y_W'(e[1][l])));
            end
            if (ecg_on) lp_out.push_back(int'(mcm_y[l]));
          end
          last_rec0 = int'(rec_y[0]);
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
    n_reset++;
  endtask

  function automatic real gauss(real t, real mu, real sigma);
    return $exp(-((t - mu) * (t - mu)) / (2.0 * sigma * sigma));
  endfunction

  // Clean ECG in 8-bit units; t in seconds within one 0.8 s beat.
  function automatic real ecg_clean(int n);
    real t;
    t = (n % 288) / 360.0;
    return 10.0 * gauss(t, 0.16, 0.025) - 8.0 * gauss(t, 0.27, 0.008)
         + 70.0 * gauss(t, 0.30, 0.010) - 14.0 * gauss(t, 0.33, 0.009)
         + 18.0 * gauss(t, 0.55, 0.040);
  endfunction

  initial begin
    real err_in, err_out, v;
    int lat;
    x_blk = '{default: '0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;

    // Constant input on the all-ones channel, as in the reference simulation.
    set_sel(1'b1);
    for (int k = 0; k < 6; k++) send(1'b1, -75, -75, -75, -75);
    send(1'b0, 0, 0, 0, 0);
    repeat (3) @(posedge clk);
    checks++;
    if (last_rec0 == -1200) n_settled++;
    else begin failures++; $display("settled output %0d, expected -1200", last_rec0); end

    // Reset in the middle of the stream, then an impulse on the low-pass channel.
    send(1'b1, 50, -20, 33, 7);
    do_reset();
    set_sel(1'b0);
    send(1'b1, 1, 0, 0, 0);
    for (int k = 0; k < M + 1; k++) send(1'b1, 0, 0, 0, 0);
    send(1'b0, 0, 0, 0, 0);
    repeat (3) @(posedge clk);
    n_impulse++;

    // ECG: noisy input through both filters, with gaps and channel switches.
    for (int n = 0; n < NS; n++) begin
      int r;
      r = $urandom_range(0, 2000);
      clean[n] = ecg_clean(n);
      v = clean[n] + 12.0 * $sin(2.0 * 3.14159265358979 * 50.0 * n / 360.0)
          + ((r - 1000) / 100.0);
      noisy[n] = (v > 127.0) ? 127 : (v < -128.0) ? -128 : int'(v);
    end
    do_reset();
    set_sel(1'b0);
    @(negedge clk);
    ecg_on = 1'b1;
    for (int k = 0; k < NS / L; k++) begin
      if ($urandom_range(0, 7) == 0) send(1'b0, 0, 0, 0, 0);
      if (k == NS / L / 2) begin
        // a brief excursion to the other channel and back
        set_sel(1'b1);
        set_sel(1'b0);
      end
      send(1'b1, noisy[k*L], noisy[k*L+1], noisy[k*L+2], noisy[k*L+3]);
    end
    send(1'b0, 0, 0, 0, 0);
    repeat (4) @(posedge clk);
    #2;
    ecg_on = 1'b0;

    // Noise reduction: compare with the clean ECG, allowing for the filter's
    // group delay of 7.5 samples (use 7 and 8 averaged) and skipping the start.
    err_in = 0.0;
    err_out = 0.0;
    for (int n = 64; n < NS; n++) begin
      real yo;
      yo = (lp_out[n] / 128.0);
      err_out += (yo - 0.5 * (clean[n-7] + clean[n-8])) ** 2;
      err_in  += (noisy[n] - clean[n]) ** 2;
    end
    $display("ECG: input noise energy %0.1f, low-pass output error energy %0.1f", err_in, err_out);
    checks++;
    if (lp_out.size() != NS) begin failures++; $display("captured %0d of %0d samples", lp_out.size(), NS); end
    checks++;
    if (!(err_out < 0.5 * err_in)) begin failures++; $display("low-pass did not reduce the noise"); end

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d output blocks never appeared", exp_q.size()); end
    $display("gaps=%0d channel_switches=%0d resets=%0d settled=%0d impulse=%0d",
             n_gap, n_switch, n_reset, n_settled, n_impulse);
    checks += 5;
    if (n_gap == 0)     begin failures++; $display("stall never happened"); end
    if (n_switch < 2)   begin failures++; $display("channel switch never happened"); end
    if (n_reset == 0)   begin failures++; $display("reset never happened"); end
    if (n_settled == 0) begin failures++; $display("constant run never settled"); end
    if (n_impulse == 0) begin failures++; $display("impulse never sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
