// tb_norm: self-checking test of the power-of-two approximation: for random
// and single-bit powers, 2^s <= P < 2^(s+1); for P = 0, zero is set.
module tb_norm;
  logic [31:0] p;
  logic [4:0]  s;
  logic        zero;
  int checks = 0, failures = 0;

  norm #(.WP(32)) dut (.p, .s, .zero);

  initial begin
    longint v;
    for (int t = 0; t < 5000; t++) begin
      v = (t < 32) ? (longint'(1) << t) : longint'($urandom() >> $urandom_range(0, 31));
      if (v == 0) v = 1;
      p = 32'(v);
      #1;
      checks++;
      if (zero || !((longint'(1) << s) <= v && v < (longint'(1) << (s + 1)))) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d s=%0d", v, s);
      end
    end
    p = '0;
    #1;
    checks++;
    if (!zero || s != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
