// tb_coef_update: both update forms against a floating-point model:
// w'(t) = w(t) + 2^-mu_shift * sum_l conj(x(kL+l-t)) g_l   (X^H form)
// w'(t) = w(t) + 2^-mu_shift * sum_l      x(kL+l-t)  g_l   (X^T form)
// with x(kL+l-t) = win[L-1-l+t]; results within 2 coefficient LSBs, and
// saturated at the coefficient range.
module tb_coef_update;
  import alamouti_pkg::*;
  localparam int L = 4, N = 5;

  sample_t    win [L+N-1];
  sym_t       g [L];
  coef_t      w [N], wh [N], wt [N];
  logic [4:0] mu_shift;
  int checks = 0, failures = 0;

  coef_update #(.L(L), .N(N), .CONJ_X(1'b1)) dut_h (.win(win), .g(g), .w(w), .mu_shift(mu_shift), .w_next(wh));
  coef_update #(.L(L), .N(N), .CONJ_X(1'b0)) dut_t (.win(win), .g(g), .w(w), .mu_shift(mu_shift), .w_next(wt));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rs(input int range);
    return $signed($urandom_range(0, 2 * range)) - range;
  endfunction

  task automatic cmp(input string tag, input int t, input coef_t got, input real er, input real ei);
    real gr, gi, tol;
    tol = 2.01 / (2.0 ** WF);
    // the coefficient register saturates at its range [-8, 8)
    if (er > 8.0) er = 8.0;
    if (er < -8.0) er = -8.0;
    if (ei > 8.0) ei = 8.0;
    if (ei < -8.0) ei = -8.0;
    gr = real'(got.re) / (2.0 ** WF);
    gi = real'(got.im) / (2.0 ** WF);
    checks++;
    if (gr - er > tol || er - gr > tol || gi - ei > tol || ei - gi > tol) begin
      failures++;
      $display("%s tap %0d: got %f,%f want %f,%f", tag, t, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int it = 0; it < 500; it++) begin
      mu_shift = 5'($urandom_range(0, 10));
      for (int i = 0; i < L + N - 1; i++) win[i] = '{re: XW'(rs(500)), im: XW'(rs(500))};
      for (int l = 0; l < L; l++) g[l] = '{re: YW'(rs(3000)), im: YW'(rs(3000))};
      for (int t = 0; t < N; t++) w[t] = '{re: WW'(rs(60000)), im: WW'(rs(60000))};
      #1;
      for (int t = 0; t < N; t++) begin
        real hr, hi, tr, ti, mu;
        hr = 0; hi = 0; tr = 0; ti = 0;
        mu = 2.0 ** (-real'(mu_shift));
        for (int l = 0; l < L; l++) begin
          real xr, xi, gr, gi;
          xr = real'(win[L-1-l+t].re) / (2.0 ** XF);
          xi = real'(win[L-1-l+t].im) / (2.0 ** XF);
          gr = real'(g[l].re) / (2.0 ** YF);
          gi = real'(g[l].im) / (2.0 ** YF);
          hr += xr * gr + xi * gi;
          hi += xr * gi - xi * gr;
          tr += xr * gr - xi * gi;
          ti += xr * gi + xi * gr;
        end
        cmp("XH", t, wh[t], real'(w[t].re) / (2.0 ** WF) + mu * hr, real'(w[t].im) / (2.0 ** WF) + mu * hi);
        cmp("XT", t, wt[t], real'(w[t].re) / (2.0 ** WF) + mu * tr, real'(w[t].im) / (2.0 ** WF) + mu * ti);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
