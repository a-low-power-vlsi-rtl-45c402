// tb_arith_unit: self-checking test of the serial-parallel Booth
// multiply-accumulate unit at 16 x 16 bits.
//
// Random and corner-case coefficients and data are multiplied in the three
// modes (clear, accumulate, add a pre-loaded addend), with and without
// negation; chains of up to eight accumulated products check full-precision
// scalar products. The full-precision result is compared with 64-bit
// integer arithmetic, the quantised output with a truncation toward zero
// computed by integer division, and the latency from start to done is
// checked to be WC/2 + 1 = 9 clocks. The command inputs are scrambled while
// the unit works, since it must capture them with start.
module tb_arith_unit;
  import nr_pkg::*;

  localparam int WC = 16, WD = 16, WACC = WC + WD + 4;

  logic clk = 0, rst_n = 0, start = 0, sub = 0, busy, done;
  au_mode_e mode = AU_CLR;
  logic [WC-1:0] coef = '0;
  logic [WD-1:0] xin = '0, addend = '0;
  logic signed [WACC-1:0] acc;
  logic signed [WD-1:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arith_unit #(.WC(WC), .WD(WD)) dut (.clk, .rst_n, .start, .mode, .sub, .coef,
                                      .xin, .addend, .busy, .done, .acc, .q);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint qref(longint v);
    longint d;
    d = v / 32768;
    if (d > 32767) d = 32767;
    if (d < -32767) d = -32767;
    return d;
  endfunction

  task automatic run(au_mode_e md, logic sb, longint c, longint x, longint ad, ref longint model);
    int lat;
    @(negedge clk);
    mode = md; sub = sb; coef = WC'(c); xin = WD'(x); addend = WD'(ad); start = 1;
    @(negedge clk);
    start = 0;
    // The unit must hold its command: scramble the inputs while it works.
    mode = au_mode_e'($urandom_range(0, 2)); sub = 1'($urandom());
    coef = WC'($urandom()); xin = WD'($urandom()); addend = WD'($urandom());
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    case (md)
      AU_CLR: model = 0;
      AU_ADD: model = ad * 32768;
      default: ;
    endcase
    model = sb ? model - c * x : model + c * x;
    check("acc", acc, model);
    check("q", q, qref(model));
    check("latency", lat, WC / 2 + 1);
  endtask

  function automatic longint rnd16();
    case ($urandom_range(0, 5))
      0: return -32768;
      1: return 32767;
      2: return 0;
      default: return longint'($signed(16'($urandom())));
    endcase
  endfunction

  initial begin
    longint model;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      run(AU_CLR, 1'($urandom()), rnd16(), rnd16(), 0, model);
      run(AU_ADD, 1'($urandom()), rnd16(), rnd16(), rnd16(), model);
      for (int j = 0; j < 7; j++)
        run(AU_ACC, 1'($urandom()), rnd16(), rnd16(), 0, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
