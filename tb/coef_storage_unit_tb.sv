// coef_storage_unit_tb - self-checking test of coef_storage_unit.
//
// Uses the default two-channel table: channel 1 is sixteen taps of 1, channel 0
// the 16-tap low-pass written out again here. sel is driven at random; one
// clock after each value the whole coefficient output must equal that channel's
// set (one-cycle read as the filter expects). It also checks the value loaded by
// reset and counts both channel switch directions.
module coef_storage_unit_tb;
  localparam int N = 16, C_W = 8, NCH = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic [0:0] sel = 1'b1;
  logic signed [C_W-1:0] coef [N];

  int checks = 0, failures = 0, switches = 0;
  int exp_tab [NCH][N] = '{
    '{0, -1, -1, 0, 4, 12, 22, 28, 28, 22, 12, 4, 0, -1, -1, 0},
    '{1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1}
  };

  coef_storage_unit #(.N(N), .C_W(C_W), .NCH(NCH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_set(int ch);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (int'(coef[n]) != exp_tab[ch][n]) begin
        failures++;
        $display("ch=%0d coef[%0d]=%0d expected %0d", ch, n, coef[n], exp_tab[ch][n]);
      end
    end
  endtask

  initial begin
    logic [0:0] prev;
    @(posedge clk); #1;
    check_set(0);             // reset loads channel 0
    rst = 1'b0;
    prev = sel;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      sel = 1'($urandom);
      if (sel != prev) switches++;
      prev = sel;
      @(posedge clk); #1;
      check_set(int'(sel));
    end
    checks++;
    if (switches == 0) begin failures++; $display("no channel switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
