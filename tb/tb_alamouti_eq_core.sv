// tb_alamouti_eq_core: the L-lane equalizer core driven block by block.
//  A  reset state and zero-error training: y must equal the centre-tap
//     delayed input exactly (y1 = x1, y2 = x2*), out_valid one cycle after
//     blk_valid, and with e = 0 nothing may adapt.
//  B  QPSK over a link with polarization mixing, an echo and a carrier phase:
//     training must bring the mean squared error below 0.01, then
//     decision-directed mode must keep the symbol decisions error free.
//  C  decision-directed with a carrier phase ramp of 1.2 rad over the run:
//     the per-lane phase estimators must track it without symbol errors.
//  D  as B with 16-QAM.
module tb_alamouti_eq_core;
  import alamouti_pkg::*;
  import alamouti_tb_pkg::*;
  localparam int L = 4, N = 7, CENTER = 3;
  localparam int NBLK = 1200;

  logic       clk = 0, rst_n = 0, blk_valid = 0, train_en = 0, out_valid;
  sample_t    win1 [L+N-1], win2 [L+N-1];
  sym_t       d1_train [L], d2_train [L];
  mod_e       mod_fmt = MOD_QPSK;
  logic [4:0] mu_shift = 5'd6, mup_shift = 5'd4;
  sym_t       y1_blk [L], y2_blk [L], e1_blk [L], e2_blk [L];
  int checks = 0, failures = 0;
  int n_train_blk = 0, n_dd_blk = 0, n_rot_blk = 0;

  alamouti_eq_core #(.L(L), .N(N), .CENTER(CENTER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t h1 [$], h2 [$];           // received tributaries, index = pair
  cr_t     s1h [$], s2h [$];         // transmitted symbols, index = pair
  int      kblk;

  task automatic clear_hist();
    h1.delete(); h2.delete(); s1h.delete(); s2h.delete();
    kblk = 0;
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clear_hist();
  endtask

  // Present block kblk (windows from history) and pulse blk_valid.
  task automatic present_block(input bit train);
    for (int i = 0; i < L + N - 1; i++) begin
      int idx;
      idx = kblk * L + L - 1 - i;
      win1[i] = (idx < 0) ? '0 : h1[idx];
      win2[i] = (idx < 0) ? '0 : h2[idx];
    end
    for (int l = 0; l < L; l++) begin
      int idx;
      idx = kblk * L + l - CENTER;
      d1_train[l] = (idx < 0) ? '0 : to_symw(s1h[idx]);
      d2_train[l] = (idx < 0) ? '0 : to_symw(cj(s2h[idx]));
    end
    train_en = train;
    @(negedge clk);
    blk_valid = 1;
    @(negedge clk);
    blk_valid = 0;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("out_valid not one cycle after blk_valid");
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid longer than one cycle");
    end
    kblk++;
  endtask

  function automatic real slice_err(input cr_t y, input cr_t s, input mod_e m);
    // 1.0 if the nearest grid point of y is not s
    real q, dr, di;
    q  = (m == MOD_QPSK) ? real'(QPSK_LVL) / (2.0 ** YF) : real'(QAM_UNIT) / (2.0 ** YF);
    dr = y.re - s.re;
    di = y.im - s.im;
    if (m == MOD_QPSK) return ((y.re > 0) != (s.re > 0) || (y.im > 0) != (s.im > 0)) ? 1.0 : 0.0;
    return (dr > q || dr < -q || di > q || di < -q) ? 1.0 : 0.0;
  endfunction

  // Run nblk blocks over link lk; returns mse and symbol errors of the last
  // `tail` blocks (against the transmitted symbols).
  task automatic run(alamouti_link lk, input mod_e m, input bit train, input int nblk, input int tail,
                     output real mse, output int serr);
    int cnt;
    mse = 0;
    serr = 0;
    cnt = 0;
    mod_fmt = m;
    for (int b = 0; b < nblk; b++) begin
      for (int l = 0; l < L; l++) begin
        cr_t s1, s2, r1, r2;
        s1 = rand_sym(m);
        s2 = rand_sym(m);
        lk.step(s1, s2, r1, r2);
        s1h.push_back(s1);
        s2h.push_back(s2);
        h1.push_back(to_sample(r1));
        h2.push_back(to_sample(r2));
      end
      present_block(train);
      if (train) n_train_blk++; else n_dd_blk++;
      if (lk.dth != 0.0) n_rot_blk++;
      if (b >= nblk - tail) begin
        for (int l = 0; l < L; l++) begin
          int idx;
          cr_t y1, y2, t1, t2;
          idx = (kblk - 1) * L + l - CENTER;
          y1 = from_symw(y1_blk[l]);
          y2 = from_symw(y2_blk[l]);
          t1 = s1h[idx];
          t2 = cj(s2h[idx]);
          mse += cabs2(cs(y1, t1)) + cabs2(cs(y2, t2));
          serr += int'(slice_err(y1, t1, m) + slice_err(y2, t2, m));
          cnt += 2;
        end
      end
    end
    mse = mse / cnt;
  endtask

  initial begin
    real mse;
    int serr;
    alamouti_link lk;

    // ---- A: exact pass-through with zero error -------------------------
    do_reset();
    for (int b = 0; b < 20; b++) begin
      for (int l = 0; l < L; l++) begin
        cr_t s1, s2;
        s1 = rand_sym(MOD_QPSK);
        s2 = rand_sym(MOD_QPSK);
        s1h.push_back(s1);
        s2h.push_back(s2);
        h1.push_back(to_sample(s1));
        h2.push_back(to_sample(s2));
      end
      present_block(1'b1);
      for (int l = 0; l < L; l++) begin
        int idx;
        sym_t ey1, ey2;
        idx = (kblk - 1) * L + l - CENTER;
        ey1 = (idx < 0) ? '0 : to_symw(s1h[idx]);
        ey2 = (idx < 0) ? '0 : to_symw(cj(s2h[idx]));
        checks++;
        if (y1_blk[l] !== ey1 || y2_blk[l] !== ey2 || e1_blk[l] !== '0 || e2_blk[l] !== '0) begin
          failures++;
          $display("A blk %0d lane %0d: y1 %h y2 %h want %h %h", kblk - 1, l, y1_blk[l], y2_blk[l], ey1, ey2);
        end
      end
    end

    // ---- B: QPSK training then decision-directed -----------------------
    do_reset();
    lk = new(c(0.8, 0.1), c(0.45, -0.38), c(0.2, 0.1), 0.7, 0.0);
    run(lk, MOD_QPSK, 1'b1, 300, 50, mse, serr);
    $display("B train: mse %f", mse);
    checks++;
    if (mse > 0.01) begin failures++; $display("B: training did not converge"); end
    run(lk, MOD_QPSK, 1'b0, 150, 100, mse, serr);
    $display("B dd: mse %f symbol errors %0d", mse, serr);
    checks++;
    if (mse > 0.01 || serr != 0) begin failures++; $display("B: decision-directed mode failed"); end

    // ---- C: carrier phase ramp in decision-directed mode ---------------
    lk.dth = 1.2 / (300.0 * L);
    run(lk, MOD_QPSK, 1'b0, 300, 300, mse, serr);
    $display("C ramp: mse %f symbol errors %0d", mse, serr);
    checks++;
    if (serr != 0) begin failures++; $display("C: phase ramp not tracked"); end

    // ---- D: 16-QAM ------------------------------------------------------
    do_reset();
    lk = new(c(0.6, -0.3), c(0.5, 0.55), c(-0.15, 0.2), -1.1, 0.0);
    run(lk, MOD_16QAM, 1'b1, 400, 50, mse, serr);
    $display("D train: mse %f", mse);
    checks++;
    if (mse > 0.005) begin failures++; $display("D: training did not converge"); end
    run(lk, MOD_16QAM, 1'b0, 150, 100, mse, serr);
    $display("D dd: mse %f symbol errors %0d", mse, serr);
    checks++;
    if (serr != 0) begin failures++; $display("D: decision-directed mode failed"); end

    $display("blocks: training %0d, decision-directed %0d, with phase ramp %0d",
             n_train_blk, n_dd_blk, n_rot_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
