// booth_recoder: radix-4 Booth recoding of a coefficient, two bits at a time
// with a one-bit overlap.
//
// A window of three coefficient bits (b[2j+1], b[2j], b[2j-1]) gives one
// digit d = -2*b[2j+1] + b[2j] + b[2j-1] in {-2,-1,0,1,2}, so a W-bit
// two's complement coefficient needs W/2 digits instead of W partial
// products. The digit is given as three control lines for the selection
// stage: zero, two (|d| = 2) and neg (d < 0). The recoding rule is the
// standard one the design names; the encoding of the control lines is this
// design's own. Purely combinational.
module booth_recoder (
  input  logic [2:0] win,    // {b[2j+1], b[2j], b[2j-1]}
  output logic       zero,
  output logic       two,
  output logic       neg
);

  always_comb begin
    zero = (win == 3'b000) || (win == 3'b111);
    two  = (win == 3'b011) || (win == 3'b100);
    neg  = win[2] && !zero;
  end

endmodule
