// tb_fir_dot: random inputs and coefficients against a floating-point
// reference of sum x(t) w(t) (and sum x*(t) w(t) for the conjugating
// variant); the fixed-point result must be within one output LSB.
module tb_fir_dot;
  import alamouti_pkg::*;
  localparam int N = 7;
  sample_t x [N];
  coef_t   w [N];
  sym_t    u0, u1;
  int checks = 0, failures = 0;

  fir_dot #(.N(N), .CONJ_IN(1'b0)) dut0 (.x(x), .w(w), .u(u0));
  fir_dot #(.N(N), .CONJ_IN(1'b1)) dut1 (.x(x), .w(w), .u(u1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input sym_t got, input real er, input real ei);
    real gr, gi;
    gr = real'(got.re) / (2.0 ** YF);
    gi = real'(got.im) / (2.0 ** YF);
    checks++;
    if ((gr - er) > 1.01 / (2.0 ** YF) || (er - gr) > 1.01 / (2.0 ** YF) ||
        (gi - ei) > 1.01 / (2.0 ** YF) || (ei - gi) > 1.01 / (2.0 ** YF)) begin
      failures++;
      $display("%s: got %f,%fj want %f,%fj", tag, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      real sr0, si0, sr1, si1;
      sr0 = 0; si0 = 0; sr1 = 0; si1 = 0;
      for (int t = 0; t < N; t++) begin
        real xr, xi, wr, wi;
        x[t].re = XW'($signed($urandom_range(0, 1023)) - 512);
        x[t].im = XW'($signed($urandom_range(0, 1023)) - 512);
        w[t].re = WW'($signed($urandom_range(0, 16383)) - 8192);
        w[t].im = WW'($signed($urandom_range(0, 16383)) - 8192);
        xr = real'(x[t].re) / (2.0 ** XF);
        xi = real'(x[t].im) / (2.0 ** XF);
        wr = real'(w[t].re) / (2.0 ** WF);
        wi = real'(w[t].im) / (2.0 ** WF);
        sr0 += xr * wr - xi * wi;
        si0 += xr * wi + xi * wr;
        sr1 += xr * wr + xi * wi;
        si1 += xr * wi - xi * wr;
      end
      #1;
      check("plain", u0, sr0, si0);
      check("conj", u1, sr1, si1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
