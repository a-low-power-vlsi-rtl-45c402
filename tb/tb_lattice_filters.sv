// tb_lattice_filters: self-checking test of the analysis and synthesis
// lattice filters, driven by the sequencer (unit-2 operations) with fixed
// random coefficients (|k| < 0.6). Every output sample is compared with the
// bit-exact reference model, first with beta = 0.7, gamma = 0.9, then with
// beta = gamma = 0.8, where the synthesis filter inverts the analysis filter
// and the output must stay within a few quantisation steps of the input.
module tb_lattice_filters;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int M = 8, W = 16;

  logic clk = 0, rst_n = 0, go = 0;
  logic busy, iter_start, iter_done, issue, au_busy;
  logic [5:0] mc;
  uop_t uop1, uop2;
  logic signed [W-1:0] x_in = '0, y_out, beta, gamma;
  logic signed [W-1:0] k_in [M];
  int checks = 0, failures = 0, maxdev = 0;

  always #5 clk = ~clk;

  sequencer #(.M(M), .MC_LEN(10)) u_seq (.clk, .rst_n, .go, .busy, .iter_start,
    .iter_done, .issue, .mc, .uop1, .uop2);
  lattice_filters #(.M(M), .W(W)) dut (.clk, .rst_n, .iter_start, .x_in, .k_in,
    .beta, .gamma, .uop(uop2), .y_out, .au_busy);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    nr_model rm;
    longint xs, y;
    longint kc[];
    beta = 16'sd22938; gamma = 16'sd29491;
    rm = new(M, 5, beta, gamma);
    kc = new[M];
    for (int i = 0; i < M; i++) begin
      kc[i] = longint'($urandom_range(0, 39320)) - 19660;
      k_in[i] = W'(kc[i]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      if (n == 150) begin
        beta = 16'sd26214; gamma = 16'sd26214;
        rm.beta = beta; rm.gamma = gamma;
      end
      xs = longint'($urandom_range(0, 16000)) - 8000;
      x_in = W'(xs); go = 1;
      @(negedge clk);
      go = 0;
      while (!iter_done) @(negedge clk);
      y = rm.filt(xs, kc);
      check("y", y_out, y);
      if (n >= 170) begin
        int dev;
        dev = int'(y_out) - int'(xs);
        if (dev < 0) dev = -dev;
        if (dev > maxdev) maxdev = dev;
      end
    end
    checks++;
    if (maxdev > 64) begin failures++; $display("FAIL inverse deviates by %0d", maxdev); end
    $display("largest |y - x| with beta = gamma: %0d", maxdev);
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
