// alamouti_eq_core: the parallel Alamouti equalizer with integrated carrier
// phase recovery, L parallel processors (lanes) wide, N taps per FIR branch.
//
// State: the four coefficient vectors w11, w12, w21, w22 (N taps each, shared
// by all lanes, as in the block formulation) and one pair of single-tap phase
// estimators p1, p2 per lane (so each lane runs its own CPR, p = 0.5 p1 +
// 0.5 p2*). On every blk_valid the core takes one block k: the two buffer
// windows holding X_1[k] and X_2[k], and the training blocks d_1[k], d_2[k]
// (lane order, d[l] = d(kL+l)). In that same cycle the lanes compute y, e and
// the phase steps, the four update units compute w[k+1] from the block's
// errors, and all state is registered, so block k+1 already uses the new
// values. y1_blk/y2_blk (and the error blocks e1_blk/e2_blk, for monitoring
// convergence) are registered and out_valid pulses one cycle after
// blk_valid (latency 1 block-cycle, throughput one block per cycle).
// train_en selects training symbols, otherwise slicer decisions
// (decision-directed mode). mu = 2^-mu_shift, mu_p = 2^-mup_shift.
// Reset values (centre tap CENTER of w11 and w22 at 1, others 0, p1 = p2 = 1)
// are this design's choice.
module alamouti_eq_core
  import alamouti_pkg::*;
#(
  parameter int L      = 32,
  parameter int N      = 120,
  parameter int CENTER = N / 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid,
  input  sample_t    win1 [L+N-1],
  input  sample_t    win2 [L+N-1],
  input  sym_t       d1_train [L],
  input  sym_t       d2_train [L],
  input  logic       train_en,
  input  mod_e       mod_fmt,
  input  logic [4:0] mu_shift,
  input  logic [4:0] mup_shift,
  output logic       out_valid,
  output sym_t       y1_blk [L],
  output sym_t       y2_blk [L],
  output sym_t       e1_blk [L],
  output sym_t       e2_blk [L]
);

  coef_t  w11 [N], w12 [N], w21 [N], w22 [N];
  coef_t  w11_n [N], w12_n [N], w21_n [N], w22_n [N];
  phase_t p1 [L], p2 [L], p1_n [L], p2_n [L];
  sym_t   y1 [L], y2 [L], e1 [L], e2 [L];
  sym_t   g1 [L], g1c [L], g2 [L], g2c [L];

  for (genvar l = 0; l < L; l++) begin : g_lane
    alamouti_lane #(.L(L), .N(N), .LANE(l)) u_lane (
      .win1(win1), .win2(win2),
      .w11(w11), .w12(w12), .w21(w21), .w22(w22),
      .p1(p1[l]), .p2(p2[l]),
      .train_en(train_en), .d1_train(d1_train[l]), .d2_train(d2_train[l]),
      .mod_fmt(mod_fmt), .mup_shift(mup_shift),
      .y1(y1[l]), .y2(y2[l]), .e1(e1[l]), .e2(e2[l]),
      .g1(g1[l]), .g1c(g1c[l]), .g2(g2[l]), .g2c(g2c[l]),
      .p1_next(p1_n[l]), .p2_next(p2_n[l])
    );
  end

  // (8a) w11 with X1^H and e1.Psi(p); (8b) w12 with X2^T and e1.Psi(p*);
  // (8c) w21 with X1^H and e2.Psi(p); (8d) w22 with X2^T and e2.Psi(p*).
  coef_update #(.L(L), .N(N), .CONJ_X(1'b1)) u_up11 (.win(win1), .g(g1),  .w(w11), .mu_shift(mu_shift), .w_next(w11_n));
  coef_update #(.L(L), .N(N), .CONJ_X(1'b0)) u_up12 (.win(win2), .g(g1c), .w(w12), .mu_shift(mu_shift), .w_next(w12_n));
  coef_update #(.L(L), .N(N), .CONJ_X(1'b1)) u_up21 (.win(win1), .g(g2),  .w(w21), .mu_shift(mu_shift), .w_next(w21_n));
  coef_update #(.L(L), .N(N), .CONJ_X(1'b0)) u_up22 (.win(win2), .g(g2c), .w(w22), .mu_shift(mu_shift), .w_next(w22_n));

  localparam coef_t  W_ONE = '{re: WW'(1 << WF), im: '0};
  localparam phase_t P_ONE = '{re: PW'(1 << PF), im: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < N; t++) begin
        w11[t] <= (t == CENTER) ? W_ONE : '0;
        w12[t] <= '0;
        w21[t] <= '0;
        w22[t] <= (t == CENTER) ? W_ONE : '0;
      end
      for (int l = 0; l < L; l++) begin
        p1[l]     <= P_ONE;
        p2[l]     <= P_ONE;
        y1_blk[l] <= '0;
        y2_blk[l] <= '0;
        e1_blk[l] <= '0;
        e2_blk[l] <= '0;
      end
      out_valid <= 1'b0;
    end else begin
      out_valid <= blk_valid;
      if (blk_valid) begin
        w11    <= w11_n;
        w12    <= w12_n;
        w21    <= w21_n;
        w22    <= w22_n;
        p1     <= p1_n;
        p2     <= p2_n;
        y1_blk <= y1;
        y2_blk <= y2;
        e1_blk <= e1;
        e2_blk <= e2;
      end
    end
  end

endmodule
