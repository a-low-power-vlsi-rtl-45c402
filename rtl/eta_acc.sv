// eta_acc: recursive power estimation of one decorrelator stage.
//
// P[n] = eta*P[n-1] + e[n] >> ESHIFT, with the forgetting factor eta close
// to 0.98 approximated as 1 - 2^-6 - 2^-8, so that the product by eta needs
// only two additions (subtractions of shifted copies) and no multiplier;
// that approximation follows the design. e is the stage's input energy
// f_{i-1}^2 + b_{i-1}^2 as produced by the arithmetic unit (30 fraction
// bits). It is scaled by 2^-ESHIFT = 1/64 in place of the factor (1-eta),
// which keeps the 32-bit estimate within range; this design reads the
// normalisation by 64 noted next to the 32-bit width this way. Saturation at
// the largest unsigned value is this design's own choice. The estimate is non-negative and
// WP = 32 bits wide. Purely combinational: the result is written back to the
// power-estimate memory by the caller.
module eta_acc #(
  parameter int unsigned WP     = 32,  // power estimate width
  parameter int unsigned WE     = 36,  // width of the energy input
  parameter int unsigned ESHIFT = 6    // energy pre-scaling, 2^-ESHIFT
) (
  input  logic        [WP-1:0] p_old,
  input  logic signed [WE-1:0] e_in,   // non-negative sum of squares
  output logic        [WP-1:0] p_new
);

  logic [WP+1:0] s;
  logic [WE-1:0] e_pos;

  always_comb begin
    e_pos = e_in[WE-1] ? '0 : WE'(e_in);
    s = (WP+2)'(p_old) - (WP+2)'(p_old >> 6) - (WP+2)'(p_old >> 8)
      + (WP+2)'(e_pos >> ESHIFT);
    p_new = (s > (WP+2)'({WP{1'b1}})) ? {WP{1'b1}} : WP'(s);
  end

endmodule
