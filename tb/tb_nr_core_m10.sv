// tb_nr_core_m10: end-to-end test of the noise-reduction core at filter
// order M = 10, the upper end of the orders used for 8 kHz speech, i.e. 60
// macro-cycles per sample (unit 2: 56 operations, 4 idle). The input and the
// checks are those of the default-size test: after every sample y and all
// ten Parcor coefficients are compared with the bit-exact reference model,
// the interval must take 1 + 60*10 clocks, and the coverage counters must
// show coefficient saturation, quantiser saturation, sign-magnitude
// truncation of negative values, the idle macro-cycles of the filter unit
// and the coefficient transfer to the filters.
module tb_nr_core_m10;
  import nr_pkg::*;
  import nr_ref_pkg::*;

  localparam int M = 10, W = 16, NSAMP = 400;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x_in = '0, y_out, err_out;
  logic signed [W-1:0] k_out [M];
  logic x_valid = 0, ready, y_valid;
  logic signed [W-1:0] beta  = 16'sd22938;   // 0.70
  logic signed [W-1:0] gamma = 16'sd29491;   // 0.90

  int checks = 0, failures = 0;
  int n_idle2 = 0, n_xfer = 0;

  always #5 clk = ~clk;

  nr_core #(.M(M)) dut (.clk, .rst_n, .x_in, .x_valid, .ready, .beta, .gamma, .y_out,
               .y_valid, .k_out, .err_out);

  // Idle macro-cycles of the filter unit (stand-by).
  always @(posedge clk)
    if (dut.issue && !dut.uop2.valid) n_idle2++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    nr_model ref_m;
    longint  y_exp, xs;
    real     r1a, r1b, s1, s2, s3, nz;
    int      t0, cyc;
    ref_m = new(M, 5, beta, gamma);
    s1 = 0; s2 = 0; s3 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      // Input: resonant noise, then tones at full scale, then silence.
      nz = (real'($urandom_range(0, 2000)) - 1000.0) * 4.0;
      s3 = nz + 1.6 * s1 - 0.9 * s2;
      s2 = s1; s1 = s3;
      if (n >= 250 && n < 330)      xs = (n % 4 < 2) ? 32767 : -32767;
      else if (n >= 330 && n < 360) xs = 0;
      else begin
        xs = longint'(s3);
        if (xs > 32767) xs = 32767;
        if (xs < -32767) xs = -32767;
      end
      while (!ready) @(posedge clk);
      x_in <= W'(xs); x_valid <= 1;
      @(posedge clk);
      x_valid <= 0;
      t0 = $time / 10;
      @(posedge clk iff y_valid);
      cyc = $time / 10 - t0;
      y_exp = ref_m.step(xs);
      check("y", y_out, y_exp);
      check("cycles", cyc, 1 + 6 * M * 10 + 1);   // y_valid is seen one edge after it rises
      for (int i = 0; i < M; i++) check($sformatf("k%0d", i + 1), k_out[i], ref_m.k[i]);
      // The filters used the coefficients of the previous interval.
      for (int i = 0; i < M; i++) if (dut.u_filt.kf[i] == ref_m.kf[i]) n_xfer++;
    end
    $display("coverage: k_sat=%0d q_sat=%0d neg_trunc=%0d au2_idle=%0d k_xfer=%0d",
             n_k_sat, n_q_sat, n_q_negtr, n_idle2, n_xfer);
    check("k saturation seen", n_k_sat > 0, 1);
    check("quantiser saturation seen", n_q_sat > 0, 1);
    check("negative truncation seen", n_q_negtr > 0, 1);
    check("filter unit idle 4 of 60", n_idle2, 4 * NSAMP);
    check("coefficients transferred", n_xfer, M * NSAMP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * (60 * M + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
