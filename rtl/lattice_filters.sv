// lattice_filters: analysis filter 1 - A(z/beta) and synthesis filter
// 1 / [1 - A(z/gamma)] of order M, both in lattice form and both run on one
// time-multiplexed arithmetic unit, with the Parcor coefficients of the
// decorrelator.
//
// Analysis, stage i = 1..M (f_0 = x[n], the first delay holds x):
//   f_i  = f_{i-1} - k_i * b'_{i-1}          b'_{i-1}: output of delay i
//   b_i  = b'_{i-1} - k_i * f_{i-1}          (i < M)
//   input of delay i+1 = Q(beta * Q(b_i))    (i < M)
// Synthesis, stage i = M..1 (f_M = analysis output, y = f_0):
//   f_{i-1} = f_i + k_i * b'_{i-1}
//   b_i     = b'_{i-1} - k_i * f_{i-1}       (i < M)
//   input of delay i+1 = Q(gamma * Q(b_i))   (i < M); delay 1 takes y
// This is 22 multiply-accumulates per filter for M = 8 (8 forward, 7
// backward, 7 scalings), the count the design gives, and follows its signal
// flow graph, in which the beta (gamma) scaling sits between a stage's
// backward output and the next delay, so the first delay is not scaled.
// With beta = gamma the synthesis filter is the exact inverse of the
// analysis filter apart from quantisation. Q is sign-magnitude truncation
// to 16 bits after every operation.
//
// Coefficients: at iter_start the unit copies the decorrelator's M
// coefficients into a local register array and uses that copy for the whole
// sampling interval, i.e. the coefficients of the previous interval; when
// the copy is made is this design's own choice. The analysis and synthesis
// delays are two sequential memories of M x 16 bits. The analysis memory is
// read and rewritten stage by stage; the synthesis memory is walked from
// stage M down to 1 and written one row behind the read (the new input of
// delay i+1 is known only at stage i), with y written last.
//
// Interface: iter_start loads x_in and the coefficients; uop is the
// sequencer's operation for this unit in the issue clock of a macro-cycle.
// y_out holds the output sample of the last completed synthesis pass.
module lattice_filters
  import nr_pkg::*;
#(
  parameter int unsigned M = 8,
  parameter int unsigned W = 16    // W_ana = W_syn
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                iter_start,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] k_in [M],
  input  logic signed [W-1:0] beta,
  input  logic signed [W-1:0] gamma,
  input  uop_t                uop,
  output logic signed [W-1:0] y_out,
  output logic                au_busy
);

  localparam int unsigned WACC = 2 * W + 4;
  localparam int unsigned WI   = $clog2(M);

  logic signed [W-1:0] kf [M];
  logic signed [W-1:0] fa, fs, fold, bq, apend, bdel, sdel, ypend;
  logic                ywr;
  uop_t                cur;

  au_mode_e               mode;
  logic                   sub, done;
  logic [W-1:0]           coef, xin, addend;
  logic signed [WACC-1:0] acc;
  logic signed [W-1:0]    q;

  logic [W-1:0] a_rd, s_rd, s_wdata;
  logic         a_adv, s_radv, s_wen;

  // Operand selection. A forward operation takes its delay output straight
  // from the memory; the later operations of the stage use the copy made
  // when the forward operation was issued.
  always_comb begin
    mode = AU_ADD; sub = 1'b0; coef = '0; xin = '0; addend = '0;
    unique case (uop.op)
      A_FWD:   begin sub = 1'b1; coef = kf[uop.stage[WI-1:0]]; xin = a_rd; addend = fa; end
      A_BWD:   begin sub = 1'b1; coef = kf[uop.stage[WI-1:0]]; xin = fold; addend = bdel; end
      A_BETA:  begin mode = AU_CLR; coef = beta; xin = bq; end
      S_FWD:   begin sub = 1'b0; coef = kf[uop.stage[WI-1:0]]; xin = s_rd; addend = fs; end
      S_BWD:   begin sub = 1'b1; coef = kf[uop.stage[WI-1:0]]; xin = fs; addend = sdel; end
      S_GAMMA: begin mode = AU_CLR; coef = gamma; xin = bq; end
      default: ;
    endcase
  end

  arith_unit #(.WC(W), .WD(W), .GUARD(4), .FRAC(W - 1)) u_au (
    .clk, .rst_n, .start(uop.valid), .mode, .sub, .coef, .xin, .addend,
    .busy(au_busy), .done, .acc, .q);

  seq_mem #(.NWORDS(M), .W(W)) u_amem (
    .clk, .rst_n, .restart(iter_start), .rd_adv(a_adv), .wr_en(a_adv),
    .wdata(apend), .rdata(a_rd));

  seq_mem #(.NWORDS(M), .W(W)) u_smem (
    .clk, .rst_n, .restart(iter_start), .rd_adv(s_radv), .wr_en(s_wen),
    .wdata(s_wdata), .rdata(s_rd));

  assign a_adv   = done && (cur.op == A_FWD);
  assign s_radv  = done && (cur.op == S_FWD);
  assign s_wen   = (done && (cur.op == S_GAMMA)) || ywr;
  assign s_wdata = ywr ? ypend : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa <= '0; fs <= '0; fold <= '0; bq <= '0; apend <= '0; bdel <= '0; sdel <= '0;
      ypend <= '0; ywr <= 1'b0; y_out <= '0; cur <= '0;
      for (int i = 0; i < M; i++) kf[i] <= '0;
    end else begin
      ywr <= 1'b0;
      if (iter_start) begin
        fa    <= x_in;
        apend <= x_in;
        for (int i = 0; i < M; i++) kf[i] <= k_in[i];
      end
      if (uop.valid) begin
        cur <= uop;
        if (uop.op == A_FWD) bdel <= $signed(a_rd);
        if (uop.op == S_FWD) sdel <= $signed(s_rd);
      end
      if (done) begin
        unique case (cur.op)
          A_FWD: begin
            fold <= fa;
            fa   <= q;
            if (cur.stage[WI-1:0] == WI'(M - 1)) fs <= q;   // into the synthesis filter
          end
          A_BWD:  bq <= q;
          A_BETA: apend <= q;
          S_FWD: begin
            fs <= q;
            if (cur.stage[WI-1:0] == '0) begin
              y_out <= q;
              ypend <= q;
            end
          end
          S_BWD:  bq <= q;
          S_GAMMA: if (cur.stage[WI-1:0] == '0) ywr <= 1'b1;  // then y enters delay 1
          default: ;
        endcase
      end
    end
  end

endmodule
