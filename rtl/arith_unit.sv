// arith_unit: serial-parallel multiply-accumulate unit with radix-4 Booth
// recoding, computing c*x (and sums of such products) in full precision.
//
// Structure (that of the original serial-parallel arithmetic unit): the
// coefficient c (WC bits) is loaded into a parallel-in serial-out register
// (PISO) that presents two new bits per clock, plus the last bit of the
// previous pair, to the Booth recoder. The selection stage turns the data
// word x (WD bits, held for the whole product) into 0, +/-x or +/-2x, and the
// adder adds it to the accumulator's high register. Both accumulator
// registers are divided by four every clock ("/4"): the two bits shifted out
// of the high register enter the top of the low register (WC bits), so after
// WC/2 clocks the high and low registers hold the full-precision result.
//
// Full-precision accumulation: before a product the accumulated value A is
// split into its high part, placed back at full weight in the high register,
// and its low WC bits, left in the low register. Each clock the two bits
// leaving the bottom of the low register are added into the adder together
// with the selected multiple, and the new result bits replace them at the
// top. After WC/2 clocks {high, low} = A + c*x exactly. This re-alignment of
// the high part is this design's reading of the exchange multiplexers of the
// original block diagram, whose control is not specified.
//
// Commands (mode, sampled with start): AU_CLR gives acc = +/-c*x, AU_ACC gives
// acc = acc +/- c*x, AU_ADD gives acc = addend*2^FRAC +/- c*x (sub selects the
// minus sign, by negating the Booth digits). q is acc quantised to WD bits
// by sign-magnitude truncation of FRAC bits (the quantisation operation the
// design assigns to the arithmetic units).
//
// Timing: start is accepted when busy is low; all command inputs are
// captured with it and may change during the product. The product takes WC/2 clocks
// after the start clock; done pulses in the clock after the last step, when
// acc and q are valid. A WC = 16 product thus takes 9 clocks from start to
// done. The design quotes 6 clock cycles for a 20-bit product; this one-digit
// per clock unit needs 11, which is recorded as a departure.
module arith_unit
  import nr_pkg::*;
#(
  parameter int unsigned WC    = 16,   // coefficient width, even
  parameter int unsigned WD    = 16,   // data width
  parameter int unsigned GUARD = 4,    // guard bits for sums of products
  parameter int unsigned FRAC  = 15,   // bits dropped by the quantiser
  localparam int unsigned WACC = WD + WC + GUARD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  au_mode_e               mode,
  input  logic                   sub,
  input  logic [WC-1:0]          coef,
  input  logic [WD-1:0]          xin,
  input  logic [WD-1:0]          addend,
  output logic                   busy,
  output logic                   done,
  output logic signed [WACC-1:0] acc,
  output logic signed [WD-1:0]   q
);

  localparam int unsigned NSTEP = WC / 2;

  logic        [WC-1:0]   piso;       // coefficient shift register
  logic                   prev;       // overlap bit of the Booth window
  logic signed [WD-1:0]   xr;         // data word held for the product
  logic                   subr;       // negation, held for the product
  logic signed [WACC-1:0] hi;         // high register (adder feedback)
  logic        [WC-1:0]   lo;         // low register (collects LSBs)
  logic        [$clog2(NSTEP+1)-1:0] cnt;

  logic                   b_zero, b_two, b_neg;
  logic signed [WD+1:0]   sel;
  logic signed [WACC+1:0] sum;
  logic signed [WACC-1:0] a_val;

  booth_recoder u_booth (.win({piso[1:0], prev}), .zero(b_zero), .two(b_two), .neg(b_neg));

  // Selection: 0, x or 2x, negated when the digit and the command disagree.
  always_comb begin
    logic signed [WD+1:0] m;
    m   = b_zero ? '0 : (b_two ? (WD+2)'(xr) <<< 1 : (WD+2)'(xr));
    sel = (b_neg ^ subr) ? -m : m;
    sum = (WACC+2)'(hi) + (WACC+2)'(sel) + (WACC+2)'({1'b0, lo[1:0]});
  end

  // Value to start from.
  always_comb begin
    unique case (mode)
      AU_ACC:  a_val = acc;
      AU_ADD:  a_val = WACC'($signed(addend)) <<< FRAC;
      default: a_val = '0;
    endcase
  end

  assign acc = {hi[WACC-WC-1:0], lo};
  assign q   = WD'(sm_trunc(64'(acc), FRAC, WD));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      piso <= '0; prev <= 1'b0; xr <= '0; subr <= 1'b0; hi <= '0; lo <= '0;
      cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        piso <= coef;
        prev <= 1'b0;
        xr   <= xin;
        subr <= sub;
        hi   <= {a_val[WACC-1:WC], {WC{1'b0}}};
        lo   <= a_val[WC-1:0];
        cnt  <= ($clog2(NSTEP+1))'(NSTEP);
        busy <= 1'b1;
      end else if (busy) begin
        hi   <= WACC'(sum >>> 2);
        lo   <= {sum[1:0], lo[WC-1:2]};
        prev <= piso[1];
        piso <= {2'b00, piso[WC-1:2]};
        cnt  <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy));

endmodule
