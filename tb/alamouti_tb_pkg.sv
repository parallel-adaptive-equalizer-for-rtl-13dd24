// alamouti_tb_pkg: floating-point helpers shared by the equalizer testbenches:
// complex arithmetic, random QPSK/16-QAM symbols on the equalizer's decision
// grid, and a link model for Alamouti-coded symbol pairs seen by a
// single-polarization receiver:
//   X pol carries s1, s2; Y pol carries -s2*, s1*
//   r1(m) = e^{j th} sum_k h_k (a s1(m-k) - b s2*(m-k))
//   r2(m) = e^{j th} sum_k h_k (a s2(m-k) + b s1*(m-k))
// a, b: polarization mixing (|a|^2+|b|^2 = 1), h: echo taps in pair units,
// th: carrier phase. Received samples are quantized to the input format.
package alamouti_tb_pkg;
  import alamouti_pkg::*;

  typedef struct { real re; real im; } cr_t;

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
  function automatic cr_t cexp(input real th);
    return c($cos(th), $sin(th));
  endfunction
  function automatic real cabs2(input cr_t a);
    return a.re * a.re + a.im * a.im;
  endfunction

  // Random symbol on the decision grid (QPSK +-0.5, 16-QAM {+-1,+-3}/4).
  function automatic cr_t rand_sym(input mod_e m);
    real q;
    if (m == MOD_QPSK) begin
      q = real'(QPSK_LVL) / (2.0 ** YF);
      return c($urandom_range(0, 1) != 0 ? q : -q, $urandom_range(0, 1) != 0 ? q : -q);
    end
    q = real'(QAM_UNIT) / (2.0 ** YF);
    return c(q * (2.0 * $urandom_range(0, 3) - 3.0), q * (2.0 * $urandom_range(0, 3) - 3.0));
  endfunction

  function automatic sample_t to_sample(input cr_t z);
    sample_t s;
    real r, i, lim;
    lim = 2.0 ** (XW - 1) - 1.0;
    r = z.re * (2.0 ** XF);
    i = z.im * (2.0 ** XF);
    if (r > lim) r = lim;
    if (r < -lim) r = -lim;
    if (i > lim) i = lim;
    if (i < -lim) i = -lim;
    s.re = XW'($rtoi(r + ((r >= 0) ? 0.5 : -0.5)));
    s.im = XW'($rtoi(i + ((i >= 0) ? 0.5 : -0.5)));
    return s;
  endfunction

  function automatic sym_t to_symw(input cr_t z);
    sym_t s;
    s.re = YW'($rtoi(z.re * (2.0 ** YF) + ((z.re >= 0) ? 0.5 : -0.5)));
    s.im = YW'($rtoi(z.im * (2.0 ** YF) + ((z.im >= 0) ? 0.5 : -0.5)));
    return s;
  endfunction

  function automatic cr_t from_symw(input sym_t s);
    return c(real'(s.re) / (2.0 ** YF), real'(s.im) / (2.0 ** YF));
  endfunction

  // Link model state: the last few transmitted pairs for the echo.
  class alamouti_link;
    cr_t a, b, h[2];
    real th, dth;
    cr_t s1_hist[2], s2_hist[2];

    function new(input cr_t a_i, input cr_t b_i, input cr_t h1, input real th0, input real dth_i);
      a = a_i;
      b = b_i;
      h[0] = c(1.0, 0.0);
      h[1] = h1;
      th = th0;
      dth = dth_i;
      s1_hist[0] = c(0, 0); s1_hist[1] = c(0, 0);
      s2_hist[0] = c(0, 0); s2_hist[1] = c(0, 0);
    endfunction

    // Push one transmitted pair, return the two received slots.
    function void step(input cr_t s1, input cr_t s2, output cr_t r1, output cr_t r2);
      cr_t rot;
      s1_hist[1] = s1_hist[0];
      s2_hist[1] = s2_hist[0];
      s1_hist[0] = s1;
      s2_hist[0] = s2;
      r1 = c(0, 0);
      r2 = c(0, 0);
      for (int k = 0; k < 2; k++) begin
        r1 = ca(r1, cm(h[k], cs(cm(a, s1_hist[k]), cm(b, cj(s2_hist[k])))));
        r2 = ca(r2, cm(h[k], ca(cm(a, s2_hist[k]), cm(b, cj(s1_hist[k])))));
      end
      rot = cexp(th);
      r1 = cm(r1, rot);
      r2 = cm(r2, rot);
      th += dth;
    endfunction
  endclass

endpackage
