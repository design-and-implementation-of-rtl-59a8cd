// mcm_block_tb - self-checking test of mcm_block.
//
// Three instances with different constant sets: the 16 products of the
// low-pass filter's centre sample (with repeated, shared odd parts), a set of
// edge cases (0, 1, -1, 127, -128, 64, -96, 85) and twelve arbitrary values.
// Every 8-bit input value is applied and each product is compared with x * K
// computed here, modulo 2^16.
module mcm_block_tb;
  localparam int X_W = 8, C_W = 8, Y_W = 16;
  localparam int NA = 16, NB = 8, NC3 = 12;

  localparam int KA [NA] = '{0, -1, -1, 0, 4, 12, 22, 28, 28, 22, 12, 4, 0, -1, -1, 0};
  localparam int KB [NB] = '{0, 1, -1, 127, -128, 64, -96, 85};
  localparam int KC [NC3] = '{3, -5, 7, 9, -11, 45, -77, 100, 113, -3, 6, 24};

  function automatic logic [NA*C_W-1:0] pack_a();
    for (int i = 0; i < NA; i++) pack_a[i*C_W +: C_W] = C_W'(KA[i]);
  endfunction
  function automatic logic [NB*C_W-1:0] pack_b();
    for (int i = 0; i < NB; i++) pack_b[i*C_W +: C_W] = C_W'(KB[i]);
  endfunction
  function automatic logic [NC3*C_W-1:0] pack_c();
    for (int i = 0; i < NC3; i++) pack_c[i*C_W +: C_W] = C_W'(KC[i]);
  endfunction

  logic signed [X_W-1:0] x;
  logic signed [Y_W-1:0] pa [NA];
  logic signed [Y_W-1:0] pb [NB];
  logic signed [Y_W-1:0] pc [NC3];

  int checks = 0, failures = 0;

  mcm_block #(.NC(NA),  .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .K(pack_a())) u_a (.x(x), .p(pa));
  mcm_block #(.NC(NB),  .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .K(pack_b())) u_b (.x(x), .p(pb));
  mcm_block #(.NC(NC3), .X_W(X_W), .C_W(C_W), .Y_W(Y_W), .K(pack_c())) u_c (.x(x), .p(pc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = X_W'(v);
      #1;
      for (int i = 0; i < NA; i++) begin
        checks++;
        if (pa[i] != Y_W'(v * KA[i])) begin failures++; $display("A x=%0d K=%0d p=%0d", v, KA[i], pa[i]); end
      end
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (pb[i] != Y_W'(v * KB[i])) begin failures++; $display("B x=%0d K=%0d p=%0d", v, KB[i], pb[i]); end
      end
      for (int i = 0; i < NC3; i++) begin
        checks++;
        if (pc[i] != Y_W'(v * KC[i])) begin failures++; $display("C x=%0d K=%0d p=%0d", v, KC[i], pc[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
