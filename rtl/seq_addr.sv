// seq_addr: sequential row addressing for a sequentially accessed memory.
//
// Instead of a binary counter and an address decoder, a chain of NWORDS
// flip-flops with a set input is embedded along the memory rows. Every
// flip-flop is set to 1 (the initial state); each advance shifts a 0 in at
// the first stage, so the chain holds a thermometer code 0..01..1. The last
// stage's output, inverted, is the /Ready signal: once it is 0 the chain is
// in its last state and the next advance sets every stage back to 1 instead
// of shifting (the set line S). The chain, the constant 0 at the first D
// input, the set line and the sequence of states follow the addressing
// principle of the original design.
//
// Exactly one row is selected at a time: row i is the boundary of the
// thermometer code, sel[i] = q[i] & ~q[i-1] (with q[-1] taken as 0), so the
// first row is selected in the initial all-ones state and the last row in
// the state 0..01. Decoding the boundary this way is this design's own
// reading of the conflict-free refinement, whose gates are not given.
//
// Interface: adv advances to the next row at the rising clock edge; rst_n
// (asynchronous, active low) and restart (synchronous) return to row 0.
// sel is the one-hot row select, last is high while the last row is
// selected (it is /Ready inverted). Timing: sel changes one cycle after adv.
module seq_addr #(
  parameter int unsigned NWORDS = 8     // rows; at least 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              adv,
  output logic [NWORDS-1:0] sel,
  output logic              last
);

  logic [NWORDS-1:0] q;     // latch outputs, q[0] is the first stage

  // The set line fires when the shift would leave the chain all zero.
  assign last = sel[NWORDS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     q <= '1;
    else if (restart)               q <= '1;
    else if (adv) begin
      if (last)                     q <= '1;                 // set line S
      else                          q <= {q[NWORDS-2:0], 1'b0};   // a 0 enters at stage 0
    end
  end

  always_comb begin
    for (int i = 0; i < NWORDS; i++)
      sel[i] = q[i] & ((i == 0) ? 1'b1 : ~q[i-1]);
  end

endmodule
