// alamouti_par_eq: parallel adaptive equalizer for Alamouti-coded signals at a
// single-polarization (heterodyne, digitally down-converted) coherent receiver.
//
// Datapath, input to output:
//   x(n) --deinterleaver (1:2 S/P)--> x1(n) even, x2(n) odd
//        --input_buffer x2 (S/P, keeps N-1 older samples)--> X_1[k], X_2[k]
//        --alamouti_eq_core (L lanes: 2x2 FIR, per-lane CPR, block LMS)
//        --> y_1[k], y_2[k] --ps_converter x2 (L:1 P/S)--> y1(n), y2(n)
//        --interleaver_ps (2:1 P/S)--> y(n)
// A training symbol d_train travels with each input sample through its own
// deinterleaver slot and an L-wide buffer, so the core receives d_1[k], d_2[k]
// aligned with X_1[k], X_2[k]. d_train must hold the symbol the output
// sample of the same index n should equal (for the odd tributary that is the
// conjugate of the transmitted s2, as the Alamouti combination yields s2*);
// the caller accounts for the CENTER-tap delay of the equalizer.
//
// Interface: one input sample per clock at most (in_valid); one output sample
// per clock when the input is continuous. One block of 2L input samples is
// processed per block-cycle; in hardware terms the L-lane core runs at 1/(2L)
// of the serial sample rate, here modelled as a clock enable in one clock
// domain (this design's choice). train_en, mod_fmt, mu_shift and mup_shift are
// sampled at each block. Latency from the last sample of a block to its first
// output sample: 4 cycles. Widths and formats are in alamouti_pkg.
module alamouti_par_eq
  import alamouti_pkg::*;
#(
  parameter int L      = 32,
  parameter int N      = 120,
  parameter int CENTER = N / 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    x,
  input  sym_t       d_train,
  input  logic       train_en,
  input  mod_e       mod_fmt,
  input  logic [4:0] mu_shift,
  input  logic [4:0] mup_shift,
  output logic       out_valid,
  output sym_t       y,
  output logic       blk_done
);

  localparam int SW = $bits(sample_t);
  localparam int DW = $bits(sym_t);
  localparam int PAIRW = SW + DW;

  logic             pair_valid;
  logic [PAIRW-1:0] pair1, pair2;

  deinterleaver #(.DW(PAIRW)) u_deint (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x({d_train, x}),
    .out_valid(pair_valid), .x1(pair1), .x2(pair2)
  );

  logic          bv_x1, bv_x2, bv_d1, bv_d2;
  logic [SW-1:0] wx1 [L+N-1];
  logic [SW-1:0] wx2 [L+N-1];
  logic [DW-1:0] wd1 [L];
  logic [DW-1:0] wd2 [L];

  input_buffer #(.L(L), .N(N), .DW(SW)) u_buf_x1 (
    .clk(clk), .rst_n(rst_n), .in_valid(pair_valid), .din(pair1[SW-1:0]),
    .blk_valid(bv_x1), .win(wx1));
  input_buffer #(.L(L), .N(N), .DW(SW)) u_buf_x2 (
    .clk(clk), .rst_n(rst_n), .in_valid(pair_valid), .din(pair2[SW-1:0]),
    .blk_valid(bv_x2), .win(wx2));
  input_buffer #(.L(L), .N(1), .DW(DW)) u_buf_d1 (
    .clk(clk), .rst_n(rst_n), .in_valid(pair_valid), .din(pair1[PAIRW-1:SW]),
    .blk_valid(bv_d1), .win(wd1));
  input_buffer #(.L(L), .N(1), .DW(DW)) u_buf_d2 (
    .clk(clk), .rst_n(rst_n), .in_valid(pair_valid), .din(pair2[PAIRW-1:SW]),
    .blk_valid(bv_d2), .win(wd2));

  sample_t win1 [L+N-1];
  sample_t win2 [L+N-1];
  sym_t    d1 [L];
  sym_t    d2 [L];

  always_comb begin
    for (int i = 0; i < L + N - 1; i++) begin
      win1[i] = sample_t'(wx1[i]);
      win2[i] = sample_t'(wx2[i]);
    end
    // Buffer word 0 is the newest sample; lane l holds index kL+l.
    for (int l = 0; l < L; l++) begin
      d1[l] = sym_t'(wd1[L-1-l]);
      d2[l] = sym_t'(wd2[L-1-l]);
    end
  end

  logic core_valid;
  sym_t y1_blk [L], y2_blk [L];

  alamouti_eq_core #(.L(L), .N(N), .CENTER(CENTER)) u_core (
    .clk(clk), .rst_n(rst_n), .blk_valid(bv_x1),
    .win1(win1), .win2(win2), .d1_train(d1), .d2_train(d2),
    .train_en(train_en), .mod_fmt(mod_fmt),
    .mu_shift(mu_shift), .mup_shift(mup_shift),
    .out_valid(core_valid), .y1_blk(y1_blk), .y2_blk(y2_blk),
    .e1_blk(), .e2_blk()
  );

  assign blk_done = core_valid;

  logic [DW-1:0] yb1 [L];
  logic [DW-1:0] yb2 [L];
  always_comb begin
    for (int l = 0; l < L; l++) begin
      yb1[l] = y1_blk[l];
      yb2[l] = y2_blk[l];
    end
  end

  logic          s1_valid, s2_valid, il_ready;
  logic [DW-1:0] s1, s2, yo;

  ps_converter #(.L(L), .DW(DW)) u_ps1 (
    .clk(clk), .rst_n(rst_n), .in_valid(core_valid), .blk(yb1),
    .out_valid(s1_valid), .out_ready(il_ready), .dout(s1));
  ps_converter #(.L(L), .DW(DW)) u_ps2 (
    .clk(clk), .rst_n(rst_n), .in_valid(core_valid), .blk(yb2),
    .out_valid(s2_valid), .out_ready(il_ready), .dout(s2));

  interleaver_ps #(.DW(DW)) u_il (
    .clk(clk), .rst_n(rst_n), .in_valid(s1_valid), .in_ready(il_ready),
    .y1(s1), .y2(s2), .out_valid(out_valid), .y(yo));

  assign y = sym_t'(yo);

  // The four buffers see the same valid stream and must stay in step.
  a_buffers_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                      (bv_x1 == bv_x2) && (bv_x1 == bv_d1) && (bv_x1 == bv_d2));
  a_tributaries_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                          s1_valid == s2_valid);

endmodule
