// alamouti_lane: one parallel processor of the equalizer (lane LANE of L).
//
// For lane l of block k it evaluates, combinationally:
//   u11 = x1 . w11, u12 = x2* . w12, u21 = x1 . w21, u22 = x2* . w22
//   p   = 0.5 p1 + 0.5 p2*                                 (8g, previous block)
//   y1  = u11 p + u12 p*,  y2 = u21 p + u22 p*             (3a), (3b)
//   d_j = training symbol or slicer decision,  e_j = d_j - y_j   (6)
//   psi = Psi(p) = conj(p)/|p|
//   g1  = e1 psi, g1c = e1 psi*, g2 = e2 psi, g2c = e2 psi*  (terms of 8a-8d)
//   p1' = p1 + mu_p e1 u11*,  p2' = p2 + mu_p e1 u12*      (8e), (8f)
// The four FIR rows are fir_dot instances; row l, tap t of X_j is taken from
// the input buffer window as win_j[L-1-l+t]. The step mu_p is 2^-mup_shift
// (a power of two is this design's choice). Products are rounded to the
// format of their destination and p1, p2 saturate at the phase_t range.
module alamouti_lane
  import alamouti_pkg::*;
#(
  parameter int L    = 32,
  parameter int N    = 120,
  parameter int LANE = 0
) (
  input  sample_t    win1 [L+N-1],
  input  sample_t    win2 [L+N-1],
  input  coef_t      w11 [N],
  input  coef_t      w12 [N],
  input  coef_t      w21 [N],
  input  coef_t      w22 [N],
  input  phase_t     p1,
  input  phase_t     p2,
  input  logic       train_en,
  input  sym_t       d1_train,
  input  sym_t       d2_train,
  input  mod_e       mod_fmt,
  input  logic [4:0] mup_shift,
  output sym_t       y1,
  output sym_t       y2,
  output sym_t       e1,
  output sym_t       e2,
  output sym_t       g1,
  output sym_t       g1c,
  output sym_t       g2,
  output sym_t       g2c,
  output phase_t     p1_next,
  output phase_t     p2_next
);

  sample_t row1 [N];
  sample_t row2 [N];
  sym_t    u11, u12, u21, u22;
  phase_t  p, psi;
  sym_t    dec1, dec2;

  always_comb begin
    for (int t = 0; t < N; t++) begin
      row1[t] = win1[L-1-LANE+t];
      row2[t] = win2[L-1-LANE+t];
    end
  end

  fir_dot #(.N(N), .CONJ_IN(1'b0)) u_f11 (.x(row1), .w(w11), .u(u11));
  fir_dot #(.N(N), .CONJ_IN(1'b1)) u_f12 (.x(row2), .w(w12), .u(u12));
  fir_dot #(.N(N), .CONJ_IN(1'b0)) u_f21 (.x(row1), .w(w21), .u(u21));
  fir_dot #(.N(N), .CONJ_IN(1'b1)) u_f22 (.x(row2), .w(w22), .u(u22));

  // (8g): average of the two estimators, the second one conjugated.
  always_comb begin
    acc_t s;
    s    = acc_rshift(acc_add(from_phase(p1), conj(from_phase(p2))), 1);
    p.re = PW'(sat(s.re, PW));
    p.im = PW'(sat(s.im, PW));
  end

  unit_phasor u_psi (.p(p), .psi(psi));

  qam_slicer u_slc1 (.mod_fmt(mod_fmt), .y(y1), .d(dec1));
  qam_slicer u_slc2 (.mod_fmt(mod_fmt), .y(y2), .d(dec2));

  // Product of a sym_t and a phase_t value, rounded back to sym_t.
  function automatic sym_t mul_sp(input acc_t a, input acc_t b);
    return to_sym(acc_rshift(cmul(a.re, a.im, b.re, b.im), PF));
  endfunction

  // Phase estimator step: p + (e * conj(u)) * 2^-shift, in phase_t.
  function automatic phase_t p_step(input phase_t pv, input sym_t e, input sym_t u,
                                    input logic [4:0] shift);
    acc_t   g, n;
    phase_t r;
    g = acc_rshift(cmul(AW'(e.re), AW'(e.im), AW'(u.re), -AW'(u.im)),
                   2 * YF - PF + int'(shift));
    n = acc_add(from_phase(pv), g);
    r.re = PW'(sat(n.re, PW));
    r.im = PW'(sat(n.im, PW));
    return r;
  endfunction

  always_comb begin
    acc_t pa, pc;
    pa = from_phase(p);
    pc = conj(pa);
    y1 = to_sym(acc_add(from_sym(mul_sp(from_sym(u11), pa)), from_sym(mul_sp(from_sym(u12), pc))));
    y2 = to_sym(acc_add(from_sym(mul_sp(from_sym(u21), pa)), from_sym(mul_sp(from_sym(u22), pc))));
  end

  always_comb begin
    sym_t d1, d2;
    d1 = train_en ? d1_train : dec1;
    d2 = train_en ? d2_train : dec2;
    e1.re = YW'(sat(AW'(d1.re) - AW'(y1.re), YW));
    e1.im = YW'(sat(AW'(d1.im) - AW'(y1.im), YW));
    e2.re = YW'(sat(AW'(d2.re) - AW'(y2.re), YW));
    e2.im = YW'(sat(AW'(d2.im) - AW'(y2.im), YW));
    g1  = mul_sp(from_sym(e1), from_phase(psi));
    g1c = mul_sp(from_sym(e1), conj(from_phase(psi)));
    g2  = mul_sp(from_sym(e2), from_phase(psi));
    g2c = mul_sp(from_sym(e2), conj(from_phase(psi)));
    p1_next = p_step(p1, e1, u11, mup_shift);
    p2_next = p_step(p2, e1, u12, mup_shift);
  end

endmodule
