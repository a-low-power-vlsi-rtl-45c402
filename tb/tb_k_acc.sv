// tb_k_acc: self-checking test of the coarse division and coefficient
// accumulation. Random cross terms, shift counts and old coefficients,
// including values that drive the coefficient into saturation, are checked
// against k + trunc(c / 2^max(0, s + MU_LOG2 - 15)) computed with integer
// division and clamped to +/-32767.
module tb_k_acc;
  localparam int WK = 16, WC_IN = 36, WS = 5, MU = 5;

  logic signed [WK-1:0]    k_old, k_new;
  logic signed [WC_IN-1:0] c_in;
  logic        [WS-1:0]    s;
  int checks = 0, failures = 0, n_sat = 0;

  k_acc #(.WK(WK), .WC_IN(WC_IN), .WS(WS), .MU_LOG2(MU)) dut (.k_old, .c_in, .s, .k_new);

  initial begin
    longint c, k, dk, e;
    int sh;
    for (int t = 0; t < 20000; t++) begin
      k  = longint'($signed(16'($urandom()))); if (k == -32768) k = -32767;
      c  = (longint'($signed($urandom())) <<< 2) + longint'($urandom_range(0, 3));
      if (t % 3 == 0) c = c >>> $urandom_range(0, 30);
      s  = WS'($urandom_range(0, 31));
      k_old = WK'(k); c_in = WC_IN'(c);
      #1;
      sh = int'(s) + MU - 15; if (sh < 0) sh = 0;
      dk = c / (longint'(1) << sh);
      if (dk > 65535) dk = 65535;
      if (dk < -65535) dk = -65535;
      e = k + dk;
      if (e > 32767) begin e = 32767; n_sat++; end
      if (e < -32767) begin e = -32767; n_sat++; end
      checks++;
      if (longint'(k_new) != e) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d c=%0d s=%0d got %0d exp %0d", k, c, s, k_new, e);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
