// decorrelator: adaptive gradient lattice decorrelator of order M, run on
// one time-multiplexed arithmetic unit.
//
// Per sample x[n] and stage i = 1..M (f_0 = b_0 = x[n]):
//   f_i   = f_{i-1} - k_i * b_{i-1}[n-1]
//   b_i   = b_{i-1}[n-1] - k_i * f_{i-1}
//   P_i   = eta*P_i + (f_{i-1}^2 + b_{i-1}[n-1]^2) >> 6     (eta_acc)
//   k_i  += mu * (f_i*b_{i-1}[n-1] + b_i*f_{i-1}) / 2^floor(log2 P_i)
//                                                          (norm, k_acc)
// Each stage takes six multiply-accumulates on the arithmetic unit (two
// lattice products, two for the input energy, two for the cross term), 48
// for M = 8, as the design counts them; every lattice result is quantised
// to 16 bits by sign-magnitude truncation. The lattice structure, the local
// power normalisation, the eta approximation and the coarse division follow
// the design; the exact signs, the step size and the scaling of the two
// accumulators are this design's own, in the usual gradient adaptive
// lattice form.
//
// Storage: the delayed backward signals b_{i-1}[n-1] are kept in a
// sequential memory of M x 16 bits (read and rewritten stage by stage: a
// virtual shift), the power estimates in a sequential memory of M x 32 bits,
// and the Parcor coefficients in an M x 16 register array that the filters
// can copy in one clock (k_out).
//
// Interface: iter_start loads x_in. uop is the sequencer's operation for
// this unit in the issue clock of a macro-cycle; the result is written back
// when the unit signals done. err_out is the last forward error f_M of the
// last completed sample. Coefficients are reset to zero, powers to zero.
module decorrelator
  import nr_pkg::*;
#(
  parameter int unsigned M       = 8,
  parameter int unsigned W       = 16,  // W_decor
  parameter int unsigned WP      = 32,  // power estimate width
  parameter int unsigned MU_LOG2 = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                iter_start,
  input  logic signed [W-1:0] x_in,
  input  uop_t                uop,
  output logic signed [W-1:0] k_out [M],
  output logic signed [W-1:0] err_out,
  output logic                au_busy
);

  localparam int unsigned WACC = 2 * W + 4;
  localparam int unsigned WS   = $clog2(WP);

  logic signed [W-1:0]    f, bcur, fi, bi;
  logic signed [W-1:0]    kmem [M];
  uop_t                   cur;
  logic [$clog2(M)-1:0]   cur_stage;

  // Arithmetic unit.
  au_mode_e               mode;
  logic                   sub, done;
  logic [W-1:0]           coef, xin, addend;
  logic signed [WACC-1:0] acc;
  logic signed [W-1:0]    q;

  // Memories.
  logic [W-1:0]  bd_raw;
  logic [WP-1:0] p_rd, p_wr;
  logic          d_wr, p_wr_en;
  logic signed [W-1:0] bd;

  logic [WS-1:0]       s;
  logic [WS-1:0]       s_hold;   // shift count of the current stage
  logic                pzero;
  logic signed [W-1:0] k_new;

  assign bd        = $signed(bd_raw);
  assign cur_stage = cur.stage[$clog2(M)-1:0];

  // Operand selection per operation.
  always_comb begin
    mode = AU_CLR; sub = 1'b0; coef = '0; xin = '0; addend = '0;
    unique case (uop.op)
      D_FWD:   begin mode = AU_ADD; sub = 1'b1; coef = kmem[uop.stage[$clog2(M)-1:0]]; xin = bd; addend = f; end
      D_BWD:   begin mode = AU_ADD; sub = 1'b1; coef = kmem[uop.stage[$clog2(M)-1:0]]; xin = f;  addend = bd; end
      D_POW0:  begin mode = AU_CLR; coef = f;  xin = f;  end
      D_POW1:  begin mode = AU_ACC; coef = bd; xin = bd; end
      D_CRS0:  begin mode = AU_CLR; coef = fi; xin = bd; end
      D_CRS1:  begin mode = AU_ACC; coef = bi; xin = f;  end
      default: ;
    endcase
  end

  arith_unit #(.WC(W), .WD(W), .GUARD(4), .FRAC(W - 1)) u_au (
    .clk, .rst_n, .start(uop.valid), .mode, .sub, .coef, .xin, .addend,
    .busy(au_busy), .done, .acc, .q);

  seq_mem #(.NWORDS(M), .W(W)) u_bmem (
    .clk, .rst_n, .restart(iter_start), .rd_adv(d_wr), .wr_en(d_wr),
    .wdata(bcur), .rdata(bd_raw));

  seq_mem #(.NWORDS(M), .W(WP)) u_pmem (
    .clk, .rst_n, .restart(iter_start), .rd_adv(p_wr_en), .wr_en(p_wr_en),
    .wdata(p_wr), .rdata(p_rd));

  eta_acc #(.WP(WP), .WE(WACC), .ESHIFT(6)) u_eta (.p_old(p_rd), .e_in(acc), .p_new(p_wr));
  norm    #(.WP(WP)) u_norm (.p(p_wr), .s(s), .zero(pzero));
  k_acc   #(.WK(W), .WC_IN(WACC), .WS(WS), .MU_LOG2(MU_LOG2)) u_kacc (
    .k_old(kmem[cur_stage]), .c_in(acc), .s(s_hold), .k_new(k_new));

  assign p_wr_en = done && (cur.op == D_POW1);
  assign d_wr    = done && (cur.op == D_CRS1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f <= '0; bcur <= '0; fi <= '0; bi <= '0; cur <= '0; s_hold <= '0; err_out <= '0;
      for (int i = 0; i < M; i++) kmem[i] <= '0;
    end else begin
      if (iter_start) begin
        f    <= x_in;
        bcur <= x_in;
      end
      if (uop.valid) cur <= uop;
      if (done) begin
        unique case (cur.op)
          D_FWD:  fi <= q;
          D_BWD:  bi <= q;
          D_POW1: s_hold <= pzero ? '0 : s;
          D_CRS1: begin
            kmem[cur_stage] <= k_new;
            f    <= fi;          // next stage's inputs
            bcur <= bi;
            if (cur_stage == $clog2(M)'(M - 1)) err_out <= fi;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb
    for (int i = 0; i < M; i++) k_out[i] = kmem[i];

endmodule
