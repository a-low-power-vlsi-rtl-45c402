// tb_decorrelator: self-checking test of the adaptive lattice decorrelator,
// driven by the sequencer (unit-1 operations). A second-order resonant
// noise input is fed for 300 samples; after each sample all eight Parcor
// coefficients and the last forward error are compared with the bit-exact
// reference model. At the end the first coefficient must have adapted to a
// clearly positive value (the input is strongly correlated at lag 1) and
// the forward error must carry less power than the input.
module tb_decorrelator;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int M = 8, W = 16;

  logic clk = 0, rst_n = 0, go = 0;
  logic busy, iter_start, iter_done, issue, au_busy;
  logic [5:0] mc;
  uop_t uop1, uop2;
  logic signed [W-1:0] x_in = '0, err_out;
  logic signed [W-1:0] k_out [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sequencer #(.M(M), .MC_LEN(10)) u_seq (.clk, .rst_n, .go, .busy, .iter_start,
    .iter_done, .issue, .mc, .uop1, .uop2);
  decorrelator #(.M(M), .W(W)) dut (.clk, .rst_n, .iter_start, .x_in, .uop(uop1),
    .k_out, .err_out, .au_busy);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    nr_model rm;
    real s1, s2, s3, px, pe;
    longint xs, e;
    rm = new(M, 5, 0, 0);
    s1 = 0; s2 = 0; px = 0; pe = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      s3 = (real'($urandom_range(0, 2000)) - 1000.0) * 3.0 + 1.5 * s1 - 0.8 * s2;
      s2 = s1; s1 = s3;
      xs = longint'(s3);
      if (xs > 32767) xs = 32767;
      if (xs < -32767) xs = -32767;
      x_in = W'(xs); go = 1;
      @(negedge clk);
      go = 0;
      while (!iter_done) @(negedge clk);
      e = rm.decor(xs);
      for (int i = 0; i < M; i++) check($sformatf("k%0d", i + 1), k_out[i], rm.k[i]);
      check("err", err_out, e);
      if (n >= 200) begin px += real'(xs) ** 2; pe += real'(e) ** 2; end
    end
    checks++;
    if (k_out[0] < 16'sd8192) begin failures++; $display("FAIL k1 did not adapt: %0d", k_out[0]); end
    checks++;
    if (!(pe < 0.5 * px)) begin failures++; $display("FAIL no decorrelation gain"); end
    $display("k1..k2 = %0d %0d, error/input power = %f", k_out[0], k_out[1], pe / px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
