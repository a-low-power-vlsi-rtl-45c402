// tb_seq_mem: self-checking test of the sequentially accessed memory.
// Used as a delay line (read the row, write the new word in its place, move
// on) it must return every word exactly NWORDS accesses after it was
// written. A second phase moves the read and write chains independently
// (writes lagging reads by one row) and compares with a model array.
module tb_seq_mem;
  localparam int N = 8, W = 16;
  logic clk = 0, rst_n = 0, restart = 0, rd_adv = 0, wr_en = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [N];
  int rp = 0, wp = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_mem #(.NWORDS(N), .W(W)) dut (.clk, .rst_n, .restart, .rd_adv, .wr_en, .wdata, .rdata);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Delay line.
    for (int t = 0; t < 100; t++) begin
      check("delay line", rdata, (t < N) ? 0 : (t - N) * 7 + 1);
      wdata = W'(t * 7 + 1); rd_adv = 1; wr_en = 1;
      @(negedge clk);
      rd_adv = 0; wr_en = 0;
      model[wp] = W'(t * 7 + 1); wp = (wp + 1) % N; rp = (rp + 1) % N;
    end
    // Independent chains.
    for (int t = 0; t < 500; t++) begin
      check("read", rdata, model[rp]);
      rd_adv = 1'($urandom()); wr_en = 1'($urandom()); wdata = W'($urandom());
      @(negedge clk);
      if (wr_en) begin model[wp] = wdata; wp = (wp + 1) % N; end
      if (rd_adv) rp = (rp + 1) % N;
      rd_adv = 0; wr_en = 0;
    end
    restart = 1; @(negedge clk); restart = 0;
    check("restart", rdata, model[0]);
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
