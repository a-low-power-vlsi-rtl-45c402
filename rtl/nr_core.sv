// nr_core: core of a spectral-sharpening noise-reduction processor for
// digital hearing aids.
//
// An adaptive lattice decorrelator estimates, sample by sample, the M
// partial-correlation (Parcor) coefficients k_1..k_M of the input speech.
// With them an analysis filter 1 - A(z/beta) and a synthesis filter
// 1 / [1 - A(z/gamma)] (0 < beta < gamma < 1) are applied to the input, which
// sharpens the spectral peaks (formants) relative to the valleys where the
// noise lies. The first-order highpass that would precede the analysis
// filter is not part of this core: x_in is expected to be already filtered.
//
// Architecture: all multiply-accumulates and quantisations run on two
// identical serial-parallel arithmetic units, one bound to the decorrelator
// (48 operations per sample) and one to the analysis and synthesis filters
// (44 per sample). The power estimation (eta_acc), the power-of-two
// normalisation (norm) and the coarse division with coefficient
// accumulation (k_acc) are separate small operators. State is kept in
// sequentially accessed memories. A ROM-based sequencer runs one sampling
// interval as 48 macro-cycles of MC_LEN clocks each.
//
// Interface: present a sample on x_in with x_valid high for one clock while
// ready is high; the core then works for 1 + 48*MC_LEN clocks (481 at the
// defaults: 3.85 MHz for 8 kHz sampling) and pulses y_valid with y_out, the
// output for that sample. The analysis and synthesis filters of a sample
// use the coefficients reached after the previous sample. beta and gamma
// are 16-bit fractions (15 fraction bits) and must be held steady. k_out
// and err_out expose the coefficients and the decorrelator's last forward
// error for observation.
module nr_core
  import nr_pkg::*;
#(
  parameter int unsigned M       = 8,    // filter order
  parameter int unsigned W       = 16,   // data and coefficient width
  parameter int unsigned WP      = 32,   // power estimate width
  parameter int unsigned MC_LEN  = W / 2 + 2,
  parameter int unsigned MU_LOG2 = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic                x_valid,
  output logic                ready,
  input  logic signed [W-1:0] beta,
  input  logic signed [W-1:0] gamma,
  output logic signed [W-1:0] y_out,
  output logic                y_valid,
  output logic signed [W-1:0] k_out [M],
  output logic signed [W-1:0] err_out
);

  logic              busy, iter_start, iter_done, issue;
  logic [$clog2(6*M)-1:0] mc;
  uop_t              uop1, uop2;
  logic signed [W-1:0] x_hold;
  logic              au1_busy, au2_busy;

  sequencer #(.M(M), .MC_LEN(MC_LEN)) u_seq (
    .clk, .rst_n, .go(x_valid), .busy, .iter_start, .iter_done, .issue, .mc,
    .uop1, .uop2);

  // The sample is captured when the sequencer accepts it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                x_hold <= '0;
    else if (x_valid && ready) x_hold <= x_in;
  end

  assign ready   = !busy && !iter_start;
  assign y_valid = iter_done;

  decorrelator #(.M(M), .W(W), .WP(WP), .MU_LOG2(MU_LOG2)) u_decor (
    .clk, .rst_n, .iter_start, .x_in(x_hold), .uop(uop1), .k_out, .err_out,
    .au_busy(au1_busy));

  lattice_filters #(.M(M), .W(W)) u_filt (
    .clk, .rst_n, .iter_start, .x_in(x_hold), .k_in(k_out), .beta, .gamma,
    .uop(uop2), .y_out, .au_busy(au2_busy));

  // A new operation is only issued to an idle arithmetic unit.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> !au1_busy && !au2_busy);

endmodule
