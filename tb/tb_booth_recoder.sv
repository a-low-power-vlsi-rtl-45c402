// tb_booth_recoder: exhaustive check of the radix-4 Booth digit for all
// eight three-bit windows against d = -2*b2 + b1 + b0.
module tb_booth_recoder;
  logic [2:0] win;
  logic zero, two, neg;
  int checks = 0, failures = 0;

  booth_recoder dut (.win, .zero, .two, .neg);

  initial begin
    int d, got;
    for (int w = 0; w < 8; w++) begin
      win = 3'(w);
      #1;
      d = -2 * ((w >> 2) & 1) + ((w >> 1) & 1) + (w & 1);
      got = zero ? 0 : (two ? 2 : 1);
      if (neg) got = -got;
      checks++;
      if (got != d) begin
        failures++;
        $display("FAIL window %b: got %0d expected %0d", win, got, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
