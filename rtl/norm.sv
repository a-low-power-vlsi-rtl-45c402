// norm: power-of-two approximation of the power estimate for the coarse
// division.
//
// The divisor of the Parcor update, the power estimate P, is replaced by the
// power of two 2^s with s = floor(log2 P), the position of its leading one,
// so that the division becomes a shift (the coarse division of the design).
// A leading-one detector is this design's choice for finding s. For P = 0
// the output is s = 0 with zero = 1. Purely combinational.
module norm #(
  parameter int unsigned WP = 32,
  localparam int unsigned WS = $clog2(WP)
) (
  input  logic [WP-1:0] p,
  output logic [WS-1:0] s,
  output logic          zero
);

  always_comb begin
    s    = '0;
    zero = (p == '0);
    for (int i = 0; i < WP; i++)
      if (p[i]) s = WS'(i);
  end

endmodule
