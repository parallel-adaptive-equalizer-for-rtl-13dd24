// fir_dot: one row of a 2x2 FIR filter branch, x_j[n]^T w_ij (or x_j^H w_ij).
//
// Computes u = sum_{t=0}^{N-1} x(t) * w(t) for one lane, where x(t) is the
// lane's tap-delayed input (x(0) newest) and w(t) the shared coefficient
// vector. With CONJ_IN = 1 the input is conjugated first, which is the
// "conj." block that feeds the w12 and w22 branches from the odd tributary.
// Purely combinational. The full-precision sum (XF+WF fractional bits) is
// rounded to the sym_t format and saturated; the output word width and the
// rounding are this design's choice.
module fir_dot
  import alamouti_pkg::*;
#(
  parameter int N       = 120,
  parameter bit CONJ_IN = 1'b0
) (
  input  sample_t x [N],
  input  coef_t   w [N],
  output sym_t    u
);

  acc_t sum;

  always_comb begin
    acc_t xa;
    sum = '0;
    for (int t = 0; t < N; t++) begin
      xa  = from_sample(x[t]);
      if (CONJ_IN) xa = conj(xa);
      sum = acc_add(sum, cmul(xa.re, xa.im, AW'(w[t].re), AW'(w[t].im)));
    end
    u = to_sym(acc_rshift(sum, XF + WF - YF));
  end

endmodule
