// tb_unit_phasor: random phase estimators of various magnitudes; psi must
// equal conj(p)/|p| from a floating-point reference to within 4e-4, and the
// zero estimator must give psi = 1.
module tb_unit_phasor;
  import alamouti_pkg::*;
  phase_t p, psi;
  int checks = 0, failures = 0;

  unit_phasor dut (.p(p), .psi(psi));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      real pr, pi, m, er, ei, gr, gi;
      int range;
      range = (it % 4 == 0) ? 2000 : 30000;
      p.re = PW'($signed($urandom_range(0, 2 * range)) - range);
      p.im = PW'($signed($urandom_range(0, 2 * range)) - range);
      if (it == 0) p = '0;
      #1;
      pr = real'(p.re);
      pi = real'(p.im);
      m  = $sqrt(pr * pr + pi * pi);
      if (m == 0.0) begin
        er = 1.0;
        ei = 0.0;
      end else begin
        er = pr / m;
        ei = -pi / m;
      end
      gr = real'(psi.re) / (2.0 ** PF);
      gi = real'(psi.im) / (2.0 ** PF);
      checks++;
      if ((gr - er) > 4e-4 || (er - gr) > 4e-4 || (gi - ei) > 4e-4 || (ei - gi) > 4e-4) begin
        failures++;
        $display("p=%0d,%0dj: got %f,%fj want %f,%fj", p.re, p.im, gr, gi, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
