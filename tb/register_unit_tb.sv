// register_unit_tb - self-checking test of register_unit.
//
// Feeds random blocks of L = 4 samples with random gaps (in_valid low) and keeps
// its own record of every accepted sample. One cycle after each accepted block
// it checks win_valid and all 2L-1 window samples against x(kL+L-1-j) taken
// from that record (samples before the first block are zero), and checks that
// win_valid stays low after a gap. A watchdog ends the run if it hangs.
module register_unit_tb;
  localparam int L = 4, X_W = 8;
  localparam int NBLK = 200;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [X_W-1:0] x_blk [L];
  logic win_valid;
  logic signed [X_W-1:0] win [2*L-1];

  int checks = 0, failures = 0;
  int hist [$];   // every accepted sample, oldest first

  register_unit #(.L(L), .X_W(X_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int n);
    return (n < 0) ? 0 : hist[n];
  endfunction

  initial begin
    int blk, gaps;
    blk = 0; gaps = 0;
    x_blk = '{default: '0};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int k = 0; k < NBLK; k++) begin
      bit v;
      v = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      in_valid = v;
      for (int i = 0; i < L; i++) x_blk[i] = X_W'($urandom);
      @(posedge clk);
      if (v) for (int i = 0; i < L; i++) hist.push_back(int'(x_blk[i]));
      #1;
      checks++;
      if (win_valid !== v) begin
        failures++;
        $display("k=%0d win_valid=%0b expected %0b", k, win_valid, v);
      end
      if (v) begin
        for (int j = 0; j < 2*L-1; j++) begin
          checks++;
          if (int'(win[j]) != sample(blk*L + L-1-j)) begin
            failures++;
            $display("blk=%0d win[%0d]=%0d expected %0d", blk, j, win[j], sample(blk*L+L-1-j));
          end
        end
        blk++;
      end else gaps++;
    end
    checks++;
    if (gaps == 0) begin failures++; $display("no gap was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
