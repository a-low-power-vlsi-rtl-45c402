// tb_seq_addr: self-checking test of the shift-register row selector.
// After reset the first row is selected; each advance selects the next row,
// exactly one row at a time; after the last row (the state 0..01 of the
// chain) the set line returns to row 0. The internal chain is compared with
// the thermometer states 1..1, 0001..1 (after 3 advances), 00001..1 (after
// 4) and 0..01 (last). restart returns to row 0 from anywhere.
module tb_seq_addr;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, restart = 0, adv = 0, last;
  logic [N-1:0] sel;
  int checks = 0, failures = 0, exp_row = 0;

  always #5 clk = ~clk;

  seq_addr #(.NWORDS(N)) dut (.clk, .rst_n, .restart, .adv, .sel, .last);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      check("sel", sel, 1 << exp_row);
      check("last", last, exp_row == N - 1);
      // chain state: stages 0..row-1 are 0, the rest 1
      check("chain", dut.q, ({N{1'b1}} << exp_row) & {N{1'b1}});
      if (t == 150) begin
        restart = 1; @(negedge clk); restart = 0; exp_row = 0;
      end else begin
        adv = 1'($urandom());
        @(negedge clk) ;
        if (adv) exp_row = (exp_row + 1) % N;
        adv = 0;
      end
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
