// tb_alamouti_pon_dsp: end-to-end test of the Alamouti PON DSP with all parameters at their defaults (32 lanes, 120 taps).
//
// Symbols go through the transmit-side Alamouti encoder; a link model
// combines the two polarizations as a single-polarization receiver sees them
// (mixing a, b, an echo one pair later, carrier phase) and the quantized
// samples feed the parallel equalizer. The expected output is the
// transmitted symbol stream delayed by the equalizer's centre tap (2*CENTER
// samples), conjugated on odd samples. Phases, in one run without reset:
//   1 QPSK training (first blocks also check the encoder slot by slot)
//   2 switch to decision-directed mode, error-free decisions required
//   3 carrier phase ramp of 0.3 rad in decision-directed mode, tracked by
//     the per-lane phase estimators (their lag grows with the lane count)
//   4 switch to 16-QAM and retrain on the same link
//   5 16-QAM decision-directed with random input gaps (in_valid low)
// Also checked: one output per input sample, a constant latency from the last
// sample of a block to its first output, and that every mechanism occurred.
module tb_alamouti_pon_dsp;
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;

  localparam int L = 32, N = 120, CENTER = N / 2;
  localparam int LAT = 4;            // cycles, last block sample -> first output

  logic       clk = 0, rst_n = 0;
  logic       tx_in_valid = 0, tx_out_valid;
  sym_t       tx_s = '0, tx_x, tx_y;
  logic       rx_in_valid = 0, rx_train_en = 1, rx_out_valid, rx_blk_done;
  sample_t    rx_x = '0;
  sym_t       rx_d_train = '0, rx_y;
  mod_e       rx_mod_fmt = MOD_QPSK;
  logic [4:0] rx_mu_shift = 5'd11, rx_mup_shift = 5'd4;

  alamouti_pon_dsp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_gap = 0, n_enc = 0;
  int n_train = 0, n_dd = 0, n_ramp = 0, n_qam = 0, n_qpsk = 0, n_blocks = 0;
  longint cyc = 0;
  longint last_blk_in [$];

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- transmit side: encoder, checked against the rule -----
  cr_t  sent [$];                    // serial symbols
  cr_t  slot_x [$], slot_y [$];      // encoder output slots
  sym_t exp_x [$], exp_y [$];

  always @(posedge clk) if (rst_n && tx_out_valid) begin
    sym_t ex, ey;
    ex = exp_x.pop_front();
    ey = exp_y.pop_front();
    if (n_enc < 2000) begin
      checks++;
      if (tx_x !== ex || tx_y !== ey) begin
        failures++;
        $display("encoder slot %0d wrong", n_enc);
      end
    end
    n_enc++;
    slot_x.push_back(from_symw(tx_x));
    slot_y.push_back(from_symw(tx_y));
  end

  // ---------------- output side -----------------------------------------
  mod_e  out_mod [$];
  bit    out_score [$];
  int    phase_err [6];
  real   phase_mse [6];
  int    phase_cnt [6];
  int    out_phase [$];
  bit    first_of_blk [$];

  always @(posedge clk) if (rst_n && rx_out_valid) begin
    cr_t y, e;
    int  n, ph;
    bit  score, bad;
    mod_e m;
    real q;
    n = n_out;
    n_out++;
    score = out_score.pop_front();
    m = out_mod.pop_front();
    ph = out_phase.pop_front();
    if (first_of_blk.pop_front()) begin
      longint t0;
      t0 = last_blk_in.pop_front();
      checks++;
      if (cyc - t0 != LAT) begin
        failures++;
        $display("block latency %0d cycles, expected %0d", cyc - t0, LAT);
      end
    end
    if (n >= 2 * CENTER && score) begin
      e = sent[n - 2 * CENTER];
      if (n % 2) e = cj(e);
      y = from_symw(rx_y);
      q = (m == MOD_QPSK) ? real'(QPSK_LVL) / (2.0 ** YF) : real'(QAM_UNIT) / (2.0 ** YF);
      if (m == MOD_QPSK)
        bad = ((y.re > 0) != (e.re > 0)) || ((y.im > 0) != (e.im > 0));
      else
        bad = (y.re - e.re > q) || (e.re - y.re > q) || (y.im - e.im > q) || (e.im - y.im > q);
      phase_err[ph] += int'(bad);
      phase_mse[ph] += cabs2(cs(y, e));
      phase_cnt[ph]++;
    end
  end

  // ---------------- drive -------------------------------------------------
  alamouti_link lk;
  int fed = 0;
  mod_e cur_mod = MOD_QPSK;
  int   cur_phase = 1;
  bit   cur_score = 0;

  sample_t rx_samples [$];

  // Feed one received sample (slot index fed) into the equalizer.
  task automatic feed_one(input bit allow_gap);
    cr_t d;
    while (rx_samples.size() <= fed) @(posedge clk);
    while (allow_gap && $urandom_range(0, 3) == 0) begin
      @(negedge clk);
      rx_in_valid = 0;
      n_gap++;
      @(posedge clk);
    end
    @(negedge clk);
    rx_in_valid = 1;
    rx_x = rx_samples[fed];
    if (fed >= 2 * CENTER) begin
      d = sent[fed - 2 * CENTER];
      if (fed % 2) d = cj(d);
      rx_d_train = to_symw(d);
    end else begin
      rx_d_train = '0;
    end
    rx_mod_fmt = cur_mod;
    out_score.push_back(cur_score);
    out_mod.push_back(cur_mod);
    out_phase.push_back(cur_phase);
    first_of_blk.push_back(fed % (2 * L) == 0);
    if (fed % (2 * L) == 2 * L - 1) last_blk_in.push_back(cyc + 1);
    fed++;
    n_in++;
    if (rx_train_en) n_train++; else n_dd++;
    if (lk.dth != 0.0) n_ramp++;
    if (cur_mod == MOD_QPSK) n_qpsk++; else n_qam++;
    @(posedge clk);
    #1 rx_in_valid = 0;
  endtask

  // Build received samples from encoder slots (pair-wise link model).
  task automatic make_rx(input int npairs);
    for (int p = 0; p < npairs; p++) begin
      int i;
      cr_t r1, r2, x1, y1, x2, y2;
      while (slot_x.size() < 2 * (rx_samples.size() / 2) + 2) @(posedge clk);
      i  = rx_samples.size();
      x1 = slot_x[i]; y1 = slot_y[i];
      x2 = slot_x[i + 1]; y2 = slot_y[i + 1];
      // the encoder already produced [s1 s2] / [-s2* s1*]; link mixing:
      lk.s1_hist[1] = lk.s1_hist[0];
      lk.s2_hist[1] = lk.s2_hist[0];
      lk.s1_hist[0] = ca(cm(lk.a, x1), cm(lk.b, y1));
      lk.s2_hist[0] = ca(cm(lk.a, x2), cm(lk.b, y2));
      r1 = ca(lk.s1_hist[0], cm(lk.h[1], lk.s1_hist[1]));
      r2 = ca(lk.s2_hist[0], cm(lk.h[1], lk.s2_hist[1]));
      r1 = cm(r1, cexp(lk.th));
      r2 = cm(r2, cexp(lk.th));
      lk.th += lk.dth;
      rx_samples.push_back(to_sample(r1));
      rx_samples.push_back(to_sample(r2));
    end
  endtask

  // Transmit nsym symbols of format m through the encoder, one per cycle.
  task automatic transmit(input int nsym, input mod_e m);
    for (int i = 0; i < nsym; i++) begin
      cr_t s;
      s = rand_sym(m);
      @(negedge clk);
      tx_in_valid = 1;
      tx_s = to_symw(s);
      sent.push_back(from_symw(tx_s));
      if (sent.size() % 2 == 0) begin
        cr_t s1, s2;
        s1 = sent[sent.size() - 2];
        s2 = sent[sent.size() - 1];
        exp_x.push_back(to_symw(s1));
        exp_y.push_back(to_symw(c(-s2.re, s2.im)));
        exp_x.push_back(to_symw(s2));
        exp_y.push_back(to_symw(cj(s1)));
      end
    end
    @(negedge clk);
    tx_in_valid = 0;
  endtask

  // One phase: nblk blocks of 2L samples; score the last `tail` blocks.
  task automatic run_phase(input int ph, input mod_e m, input bit train, input int nblk,
                           input int tail, input real dth, input bit gaps);
    $display("phase %0d starts at cycle %0d", ph, cyc);
    cur_phase = ph;
    cur_mod = m;
    rx_train_en = train;
    lk.dth = dth;
    // encoder, link model and equalizer input run concurrently
    fork
      transmit(2 * L * nblk, m);
      make_rx(L * nblk);
      for (int b = 0; b < nblk; b++) begin
        cur_score = (b >= nblk - tail);
        for (int i = 0; i < 2 * L; i++) feed_one(gaps);
        n_blocks++;
        if (n_blocks % 100 == 0) $display("  %0d blocks done at cycle %0d", n_blocks, cyc);
      end
    join
  endtask

  task automatic judge(input int ph, input string tag, input real mse_max);
    real mse;
    mse = phase_mse[ph] / ((phase_cnt[ph] > 0) ? phase_cnt[ph] : 1);
    $display("phase %0d %s: %0d scored, %0d symbol errors, mse %f", ph, tag, phase_cnt[ph],
             phase_err[ph], mse);
    checks++;
    if (phase_cnt[ph] == 0 || phase_err[ph] != 0 || mse > mse_max) failures++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    lk = new(c(0.75, 0.2), c(0.5, -0.35), c(0.15, -0.1), 0.5, 0.0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_phase(1, MOD_QPSK, 1'b1, 400, 20, 0.0, 1'b0);
    run_phase(2, MOD_QPSK, 1'b0, 40, 40 - 2, 0.0, 1'b0);
    run_phase(3, MOD_QPSK, 1'b0, 100, 100 - 2, 0.3 / (100 * L), 1'b0);
    run_phase(4, MOD_16QAM, 1'b1, 80, 20, 0.0, 1'b0);
    run_phase(5, MOD_16QAM, 1'b0, 20, 20 - 2, 0.0, 1'b1);
    repeat (4 * L + 20) @(posedge clk);
    judge(1, "QPSK training", 0.01);
    judge(2, "QPSK decision-directed", 0.01);
    judge(3, "QPSK phase ramp", 0.05);
    judge(4, "16-QAM training", 0.005);
    judge(5, "16-QAM decision-directed, gapped input", 0.005);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("%0d outputs for %0d inputs", n_out, n_in);
    end
    need("training mode", n_train);
    need("decision-directed mode", n_dd);
    need("carrier phase ramp", n_ramp);
    need("QPSK format", n_qpsk);
    need("16-QAM format", n_qam);
    need("input gaps", n_gap);
    need("encoder slots", n_enc);
    $display("samples %0d, blocks %0d, training %0d, decision-directed %0d, ramp %0d, gaps %0d",
             n_in, n_blocks, n_train, n_dd, n_ramp, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
