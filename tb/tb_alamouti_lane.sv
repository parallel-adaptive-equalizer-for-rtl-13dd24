// tb_alamouti_lane: one lane against a floating-point model of the block
// equations: FIR rows from the window (row l, tap t = win[L-1-l+t]),
// p = 0.5 p1 + 0.5 p2*, y1 = u11 p + u12 p*, y2 = u21 p + u22 p*, e = d - y,
// psi = conj(p)/|p|, g = e psi (and e psi*), p1' = p1 + mu_p e1 u11*,
// p2' = p2 + mu_p e1 u12*. Training and decision-directed cases are mixed;
// decision cases whose reference output sits within 8 LSB of a slicer
// threshold are not scored.
module tb_alamouti_lane;
  import alamouti_pkg::*;
  localparam int L = 4, N = 3, LANE = 2;
  typedef struct { real re; real im; } cr_t;

  sample_t    win1 [L+N-1], win2 [L+N-1];
  coef_t      w11 [N], w12 [N], w21 [N], w22 [N];
  phase_t     p1, p2, p1_next, p2_next;
  logic       train_en;
  sym_t       d1_train, d2_train;
  mod_e       mod_fmt;
  logic [4:0] mup_shift;
  sym_t       y1, y2, e1, e2, g1, g1c, g2, g2c;
  int checks = 0, failures = 0, scored_dd = 0, scored_tr = 0;

  alamouti_lane #(.L(L), .N(N), .LANE(LANE)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cr_t c(input real r, input real i);
    cr_t z;
    z.re = r;
    z.im = i;
    return z;
  endfunction
  function automatic cr_t cm(input cr_t a, input cr_t b);
    return c(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction
  function automatic cr_t ca(input cr_t a, input cr_t b);
    return c(a.re + b.re, a.im + b.im);
  endfunction
  function automatic cr_t cs(input cr_t a, input cr_t b);
    return c(a.re - b.re, a.im - b.im);
  endfunction
  function automatic cr_t cj(input cr_t a);
    return c(a.re, -a.im);
  endfunction
  function automatic cr_t sc(input cr_t a, input real k);
    return c(a.re * k, a.im * k);
  endfunction
  function automatic real slice1(input real v, input mod_e m, output bit near);
    real q;
    q = real'(QAM_UNIT) / (2.0 ** YF);
    near = 0;
    if (m == MOD_QPSK) begin
      near = (v < 8.0 / 2.0 ** YF && v > -8.0 / 2.0 ** YF);
      return (v < 0) ? -real'(QPSK_LVL) / (2.0 ** YF) : real'(QPSK_LVL) / (2.0 ** YF);
    end
    for (int k = -1; k <= 1; k++)
      if (v - 2.0 * q * k < 8.0 / 2.0 ** YF && v - 2.0 * q * k > -8.0 / 2.0 ** YF) near = 1;
    if (v < -2.0 * q) return -3.0 * q;
    if (v < 0) return -q;
    if (v < 2.0 * q) return q;
    return 3.0 * q;
  endfunction

  function automatic cr_t fx(input logic signed [AW-1:0] r, input logic signed [AW-1:0] i, input int f);
    return c(real'(r) / (2.0 ** f), real'(i) / (2.0 ** f));
  endfunction

  task automatic cmp(input string tag, input cr_t got, input cr_t exp_v, input real tol);
    checks++;
    if (got.re - exp_v.re > tol || exp_v.re - got.re > tol ||
        got.im - exp_v.im > tol || exp_v.im - got.im > tol) begin
      failures++;
      $display("%s: got %f,%f want %f,%f", tag, got.re, got.im, exp_v.re, exp_v.im);
    end
  endtask

  function automatic int rs(input int range);
    return $signed($urandom_range(0, 2 * range)) - range;
  endfunction

  initial begin
    for (int it = 0; it < 1500; it++) begin
      cr_t u11, u12, u21, u22, p, pc, psi, ry1, ry2, rd1, rd2, re1, re2, rp1, rp2;
      real mag, mup;
      bit n1, n2, n3, n4;
      for (int i = 0; i < L + N - 1; i++) begin
        win1[i] = '{re: XW'(rs(300)), im: XW'(rs(300))};
        win2[i] = '{re: XW'(rs(300)), im: XW'(rs(300))};
      end
      for (int t = 0; t < N; t++) begin
        w11[t] = '{re: WW'(rs(6000)), im: WW'(rs(6000))};
        w12[t] = '{re: WW'(rs(6000)), im: WW'(rs(6000))};
        w21[t] = '{re: WW'(rs(6000)), im: WW'(rs(6000))};
        w22[t] = '{re: WW'(rs(6000)), im: WW'(rs(6000))};
      end
      p1 = '{re: PW'(rs(16000)), im: PW'(rs(16000))};
      p2 = '{re: PW'(rs(16000)), im: PW'(rs(16000))};
      train_en  = it[0];
      mod_fmt   = it[1] ? MOD_16QAM : MOD_QPSK;
      mup_shift = 5'($urandom_range(0, 8));
      d1_train  = '{re: YW'(rs(4000)), im: YW'(rs(4000))};
      d2_train  = '{re: YW'(rs(4000)), im: YW'(rs(4000))};
      #1;
      u11 = c(0, 0); u12 = c(0, 0); u21 = c(0, 0); u22 = c(0, 0);
      for (int t = 0; t < N; t++) begin
        cr_t a, b;
        a = fx(AW'(win1[L-1-LANE+t].re), AW'(win1[L-1-LANE+t].im), XF);
        b = cj(fx(AW'(win2[L-1-LANE+t].re), AW'(win2[L-1-LANE+t].im), XF));
        u11 = ca(u11, cm(a, fx(AW'(w11[t].re), AW'(w11[t].im), WF)));
        u12 = ca(u12, cm(b, fx(AW'(w12[t].re), AW'(w12[t].im), WF)));
        u21 = ca(u21, cm(a, fx(AW'(w21[t].re), AW'(w21[t].im), WF)));
        u22 = ca(u22, cm(b, fx(AW'(w22[t].re), AW'(w22[t].im), WF)));
      end
      p   = sc(ca(fx(AW'(p1.re), AW'(p1.im), PF), cj(fx(AW'(p2.re), AW'(p2.im), PF))), 0.5);
      pc  = cj(p);
      mag = $sqrt(p.re * p.re + p.im * p.im);
      psi = (mag == 0.0) ? c(1, 0) : sc(pc, 1.0 / mag);
      ry1 = ca(cm(u11, p), cm(u12, pc));
      ry2 = ca(cm(u21, p), cm(u22, pc));
      if (train_en) begin
        rd1 = fx(AW'(d1_train.re), AW'(d1_train.im), YF);
        rd2 = fx(AW'(d2_train.re), AW'(d2_train.im), YF);
        n1 = 0; n2 = 0; n3 = 0; n4 = 0;
      end else begin
        rd1 = c(slice1(ry1.re, mod_fmt, n1), slice1(ry1.im, mod_fmt, n2));
        rd2 = c(slice1(ry2.re, mod_fmt, n3), slice1(ry2.im, mod_fmt, n4));
      end
      cmp("y1", fx(AW'(y1.re), AW'(y1.im), YF), ry1, 1e-3);
      cmp("y2", fx(AW'(y2.re), AW'(y2.im), YF), ry2, 1e-3);
      if (n1 || n2 || n3 || n4) continue;
      if (train_en) scored_tr++; else scored_dd++;
      re1 = cs(rd1, ry1);
      re2 = cs(rd2, ry2);
      mup = 2.0 ** (-real'(mup_shift));
      rp1 = ca(fx(AW'(p1.re), AW'(p1.im), PF), sc(cm(re1, cj(u11)), mup));
      rp2 = ca(fx(AW'(p2.re), AW'(p2.im), PF), sc(cm(re1, cj(u12)), mup));
      cmp("e1", fx(AW'(e1.re), AW'(e1.im), YF), re1, 1e-3);
      cmp("e2", fx(AW'(e2.re), AW'(e2.im), YF), re2, 1e-3);
      cmp("g1", fx(AW'(g1.re), AW'(g1.im), YF), cm(re1, psi), 2e-3);
      cmp("g1c", fx(AW'(g1c.re), AW'(g1c.im), YF), cm(re1, cj(psi)), 2e-3);
      cmp("g2", fx(AW'(g2.re), AW'(g2.im), YF), cm(re2, psi), 2e-3);
      cmp("g2c", fx(AW'(g2c.re), AW'(g2c.im), YF), cm(re2, cj(psi)), 2e-3);
      cmp("p1n", fx(AW'(p1_next.re), AW'(p1_next.im), PF), rp1, 2e-3);
      cmp("p2n", fx(AW'(p2_next.re), AW'(p2_next.im), PF), rp2, 2e-3);
    end
    checks++;
    if (scored_dd < 100 || scored_tr < 100) begin
      failures++;
      $display("too few scored cases: dd %0d train %0d", scored_dd, scored_tr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
