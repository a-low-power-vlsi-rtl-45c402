// k_acc: coarse division and accumulation of one Parcor coefficient.
//
// k[n+1] = k[n] + mu * c / P, with the division by the power estimate P
// replaced by a right shift of the cross term c by s = floor(log2 P) (from
// norm), as the design specifies. With c carrying 30 fraction bits and k 15,
// the shift is s + MU_LOG2 - 15, where mu = 2^-MU_LOG2; the value of mu and
// the clamping of the shift at zero for very small powers (which bounds the
// step) are this design's own choices. The shifted term is truncated toward
// zero (sign-magnitude truncation) and the new k is saturated to the
// symmetric 16-bit range, which keeps |k| < 1. Purely combinational.
module k_acc
  import nr_pkg::*;
#(
  parameter int unsigned WK      = 16,  // coefficient accumulator width
  parameter int unsigned WC_IN   = 36,  // width of the cross term
  parameter int unsigned WS      = 5,   // width of the shift count
  parameter int unsigned MU_LOG2 = 5    // step size mu = 2^-MU_LOG2
) (
  input  logic signed [WK-1:0]    k_old,
  input  logic signed [WC_IN-1:0] c_in,
  input  logic        [WS-1:0]    s,
  output logic signed [WK-1:0]    k_new
);

  int                 sh;
  logic signed [31:0] dk;
  logic signed [33:0] sum;
  logic signed [33:0] lim;

  always_comb begin
    sh  = int'(s) + int'(MU_LOG2) - (int'(WK) - 1);
    if (sh < 0) sh = 0;
    dk  = sm_trunc(64'(c_in), sh, WK + 1);
    sum = 34'(k_old) + 34'(dk);
    lim = (34'sd1 <<< (WK - 1)) - 34'sd1;
    if (sum > lim)       k_new = WK'(lim);
    else if (sum < -lim) k_new = WK'(-lim);
    else                 k_new = WK'(sum);
  end

endmodule
