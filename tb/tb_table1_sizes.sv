// tb_table1_sizes: the module sizes at which the building blocks were
// characterised: a 32-word x 64-bit sequential memory and a 32 x 32-bit
// arithmetic unit, plus the 20 x 20-bit product used as a latency example.
// The memory is run as a delay line and must return each word 32 accesses
// later. Each arithmetic unit multiplies random operands (and short
// accumulation chains), compared with 64-bit integer arithmetic, and its
// latency is checked to be WC/2 + 1 clocks (17 for 32 bits, 11 for 20).
module tb_table1_sizes;
  import nr_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // 32 x 64 sequential memory.
  logic        m_adv = 0;
  logic [63:0] m_wdata = '0, m_rdata;
  seq_mem #(.NWORDS(32), .W(64)) u_mem (.clk, .rst_n, .restart(1'b0), .rd_adv(m_adv),
    .wr_en(m_adv), .wdata(m_wdata), .rdata(m_rdata));

  // 32 x 32 and 20 x 20 arithmetic units.
  logic s32 = 0, s20 = 0, b32, b20, d32, d20;
  au_mode_e md = AU_CLR;
  logic [31:0] c32 = '0, x32 = '0;
  logic [19:0] c20 = '0, x20 = '0;
  logic signed [67:0] a32;
  logic signed [43:0] a20;
  logic signed [31:0] q32;
  logic signed [19:0] q20;
  arith_unit #(.WC(32), .WD(32)) u_au32 (.clk, .rst_n, .start(s32), .mode(md), .sub(1'b0),
    .coef(c32), .xin(x32), .addend('0), .busy(b32), .done(d32), .acc(a32), .q(q32));
  arith_unit #(.WC(20), .WD(20)) u_au20 (.clk, .rst_n, .start(s20), .mode(md), .sub(1'b0),
    .coef(c20), .xin(x20), .addend('0), .busy(b20), .done(d20), .acc(a20), .q(q20));

  initial begin
    longint c, x, model32, model20;
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      check("mem", longint'(m_rdata), (t < 32) ? 0 : longint'(t - 32) * 64'h1_0000_0001);
      m_wdata = 64'(longint'(t) * 64'h1_0000_0001); m_adv = 1;
      @(negedge clk);
      m_adv = 0;
    end
    model32 = 0; model20 = 0;
    for (int t = 0; t < 200; t++) begin
      md = (t % 4 == 0) ? AU_CLR : AU_ACC;
      if (md == AU_CLR) begin model32 = 0; model20 = 0; end
      c = longint'($signed($urandom())) >>> 2; x = longint'($signed($urandom())) >>> 2;
      c32 = 32'(c); x32 = 32'(x);
      c20 = 20'(c >>> 12); x20 = 20'(x >>> 12);
      model32 += c * x;
      model20 += (c >>> 12) * (x >>> 12);
      s32 = 1; s20 = 1;
      @(negedge clk);
      s32 = 0; s20 = 0; lat = 1;
      while (!d32) begin
        @(negedge clk); lat++;
        if (d20) check("latency 20x20", lat, 11);
      end
      check("latency 32x32", lat, 17);
      check("acc 32x32", longint'(a32), model32);
      check("acc 20x20", longint'(a20), model20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
