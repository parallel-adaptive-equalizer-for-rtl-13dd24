// coef_update: block-LMS update of one coefficient vector w_ij, the "Update"
// blocks of the parallel equalizer.
//
//   w[k+1] = w[k] + mu * X^H[k] g      (CONJ_X = 1, recursions 8a and 8c)
//   w[k+1] = w[k] + mu * X^T[k] g      (CONJ_X = 0, recursions 8b and 8d)
// where g is the lane vector e_i o Psi(p) (or e_i o Psi(p*)) from the lanes.
// Tap t collects sum_l x(kL+l-t) g_l over the L lanes of the block, so the
// single coefficient set shared by all lanes moves once per block.
// The step mu is 2^-mu_shift (power-of-two step is this design's choice);
// the gradient is rounded to the coefficient format and the result saturates.
// Purely combinational; win is the input buffer window (win[0] newest).
module coef_update
  import alamouti_pkg::*;
#(
  parameter int L      = 32,
  parameter int N      = 120,
  parameter bit CONJ_X = 1'b1
) (
  input  sample_t    win [L+N-1],
  input  sym_t       g [L],
  input  coef_t      w [N],
  input  logic [4:0] mu_shift,
  output coef_t      w_next [N]
);

  always_comb begin
    acc_t grad, xa, nw;
    for (int t = 0; t < N; t++) begin
      grad = '0;
      for (int l = 0; l < L; l++) begin
        xa = from_sample(win[L-1-l+t]);
        if (CONJ_X) xa = conj(xa);
        grad = acc_add(grad, cmul(xa.re, xa.im, AW'(g[l].re), AW'(g[l].im)));
      end
      nw = acc_add(from_coef(w[t]), acc_rshift(grad, XF + YF - WF + int'(mu_shift)));
      w_next[t].re = WW'(sat(nw.re, WW));
      w_next[t].im = WW'(sat(nw.im, WW));
    end
  end

endmodule
