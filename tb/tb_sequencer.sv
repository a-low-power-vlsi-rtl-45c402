// tb_sequencer: self-checking test of the ROM-based sequencer at M = 8,
// MC_LEN = 10. For two sampling intervals it checks: 48 issue clocks, one
// every 10 clocks; unit 1 gets stage s, op o in macro-cycle 6s + o; unit 2
// gets the analysis sequence (stages 1..8: forward, backward, beta; stage 8
// forward only), then the synthesis sequence (stages 8..1: forward, backward,
// gamma; stage 8 forward only), then four idle macro-cycles (92 % load); and
// iter_done comes 1 + 480 clocks after the accepting clock.
module tb_sequencer;
  import nr_pkg::*;
  localparam int M = 8, MC = 10;

  logic clk = 0, rst_n = 0, go = 0;
  logic busy, iter_start, iter_done, issue;
  logic [5:0] mc;
  uop_t uop1, uop2;
  int checks = 0, failures = 0;
  uop_t exp2 [$];

  always #5 clk = ~clk;

  sequencer #(.M(M), .MC_LEN(MC)) dut (.clk, .rst_n, .go, .busy, .iter_start,
    .iter_done, .issue, .mc, .uop1, .uop2);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int n_issue, n_valid2, t_acc, last_issue;
    for (int s = 0; s < M; s++) begin
      exp2.push_back('{1'b1, 4'(s), A_FWD});
      if (s < M - 1) begin
        exp2.push_back('{1'b1, 4'(s), A_BWD});
        exp2.push_back('{1'b1, 4'(s), A_BETA});
      end
    end
    for (int s = M - 1; s >= 0; s--) begin
      exp2.push_back('{1'b1, 4'(s), S_FWD});
      if (s < M - 1) begin
        exp2.push_back('{1'b1, 4'(s), S_BWD});
        exp2.push_back('{1'b1, 4'(s), S_GAMMA});
      end
    end
    repeat (4) exp2.push_back('0);
    check("unit-2 schedule length", exp2.size(), 48);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2; it++) begin
      go = 1;
      @(negedge clk);
      go = 0;
      check("iter_start", iter_start, 1);
      t_acc = 0; n_issue = 0; n_valid2 = 0; last_issue = 1 - MC;   // the first issue is one clock after acceptance
      while (!iter_done) begin
        @(negedge clk);
        t_acc++;
        if (issue) begin
          check("issue spacing", t_acc - last_issue, MC);
          last_issue = t_acc;
          check("u1 valid", uop1.valid, 1);
          check("u1 stage", uop1.stage, n_issue / 6);
          check("u1 op", uop1.op, n_issue % 6);
          check("u2", uop2, exp2[n_issue]);
          if (uop2.valid) n_valid2++;
          n_issue++;
        end else begin
          check("no op outside issue", uop1.valid | uop2.valid, 0);
        end
      end
      check("issues", n_issue, 48);
      check("unit-2 ops", n_valid2, 44);
      check("interval length", t_acc, 1 + 48 * MC);
      check("idle after", busy, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
