// sequencer: ROM-based finite state machine that schedules one sampling
// interval of the noise-reduction core on its two arithmetic units.
//
// Scheduling is hierarchical. The outer level is the macro-cycle, the time
// of one multiply-accumulate (MC_LEN clocks); a sampling interval is NMC = 48
// macro-cycles. A micro-program ROM holds one word per macro-cycle with the
// operation of each arithmetic unit (valid, stage, op) and a bit marking the
// last word. Unit 1 is bound to the decorrelator and busy in every
// macro-cycle (6 operations per stage, 8 stages: 48); unit 2 is bound to the
// analysis and synthesis filters (22 + 22 operations) and idle in the last
// 4 macro-cycles, a load of 44/48, about 92 %. The iteration period, the
// operation counts and the binding follow the design; the order of the
// operations is this design's own hand schedule, since the scheduled
// listing is not given. The ROM contents are computed at elaboration by
// rom_word() from that schedule.
//
// Interface: go (sampled while idle) starts an interval; iter_start pulses
// in the clock that accepts it. In the first clock of every macro-cycle
// issue is high and uop1/uop2 give the operations; the arithmetic units
// deliver their results in the last clock (phase MC_LEN-1). iter_done pulses
// in the clock after the last macro-cycle. Total: 1 + NMC*MC_LEN clocks.
module sequencer
  import nr_pkg::*;
#(
  parameter int unsigned M      = 8,   // filter order, 2..16
  parameter int unsigned MC_LEN = 10,  // clocks per macro-cycle
  localparam int unsigned NMC   = 6 * M
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic busy,
  output logic iter_start,
  output logic iter_done,
  output logic issue,
  output logic [$clog2(NMC)-1:0] mc,
  output uop_t uop1,
  output uop_t uop2
);

  typedef struct packed {
    logic last;
    uop_t u1;
    uop_t u2;
  } rom_word_t;

  // Unit-2 schedule: analysis stages 1..M (forward, then backward and beta
  // scaling for all but the last), synthesis stages M..1 (forward, then
  // backward and gamma scaling for all but stage M).
  function automatic uop_t au2_op(int unsigned idx);
    int unsigned n;
    n = 0;
    for (int unsigned s = 0; s < M; s++) begin
      if (idx == n) return '{1'b1, 4'(s), A_FWD};
      n++;
      if (s != M - 1) begin
        if (idx == n) return '{1'b1, 4'(s), A_BWD};
        n++;
        if (idx == n) return '{1'b1, 4'(s), A_BETA};
        n++;
      end
    end
    for (int s = int'(M) - 1; s >= 0; s--) begin
      if (idx == n) return '{1'b1, 4'(s), S_FWD};
      n++;
      if (s != int'(M) - 1) begin
        if (idx == n) return '{1'b1, 4'(s), S_BWD};
        n++;
        if (idx == n) return '{1'b1, 4'(s), S_GAMMA};
        n++;
      end
    end
    return '0;
  endfunction

  function automatic rom_word_t rom_word(int unsigned a);
    rom_word_t w;
    w.last = (a == NMC - 1);
    w.u1   = '{1'b1, 4'(a / 6), 3'(a % 6)};
    w.u2   = au2_op(a);
    return w;
  endfunction

  localparam int unsigned WPH = $clog2(MC_LEN);

  rom_word_t        rom [NMC];
  rom_word_t        word;
  logic [WPH-1:0]   ph;

  always_comb begin
    for (int unsigned a = 0; a < NMC; a++) rom[a] = rom_word(a);
  end

  assign word  = rom[mc];
  assign issue = busy && (ph == '0);
  assign uop1  = issue ? word.u1 : '0;
  assign uop2  = issue ? word.u2 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; ph <= '0; mc <= '0; iter_start <= 1'b0; iter_done <= 1'b0;
    end else begin
      iter_start <= 1'b0;
      iter_done  <= 1'b0;
      if (!busy) begin
        if (go && !iter_start) begin
          iter_start <= 1'b1;
        end else if (iter_start) begin
          busy <= 1'b1; ph <= '0; mc <= '0;
        end
      end else if (ph == WPH'(MC_LEN - 1)) begin
        ph <= '0;
        if (word.last) begin
          busy      <= 1'b0;
          iter_done <= 1'b1;
        end else begin
          mc <= mc + 1'b1;
        end
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end

endmodule
