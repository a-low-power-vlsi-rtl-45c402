// tb_eta_acc: self-checking test of the power estimator. Random powers and
// energies are checked against P - floor(P/64) - floor(P/256) + floor(e/64)
// (negative energies count as zero), saturated at 2^32 - 1. A constant
// energy must drive the estimate to its fixed point near 0.8 e.
module tb_eta_acc;
  logic [31:0] p_old, p_new;
  logic signed [35:0] e_in;
  int checks = 0, failures = 0;

  eta_acc #(.WP(32), .WE(36), .ESHIFT(6)) dut (.p_old, .e_in, .p_new);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint p, e, r;
    for (int t = 0; t < 20000; t++) begin
      p = longint'($urandom());
      e = (longint'($signed($urandom())) <<< 3);
      if (t % 4 == 0) e = e >>> $urandom_range(0, 30);
      p_old = 32'(p); e_in = 36'(e);
      #1;
      r = p - p / 64 - p / 256 + ((e < 0) ? 0 : e / 64);
      if (r > 64'hFFFF_FFFF) r = 64'hFFFF_FFFF;
      check("p_new", p_new, r);
    end
    // Convergence for a constant energy of 2^28.
    p = 0;
    for (int t = 0; t < 2000; t++) begin
      p_old = 32'(p); e_in = 36'(longint'(1) << 28);
      #1;
      p = p_new;
    end
    checks++;
    if (!(p > 0.78 * 2.0**28 && p < 0.82 * 2.0**28)) begin
      failures++;
      $display("FAIL fixed point %0d", p);
    end
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
