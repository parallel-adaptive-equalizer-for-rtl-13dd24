// tb_qam_slicer: for random inputs the decision must be the constellation
// point at minimum Euclidean distance, found by exhaustive search over the
// 16-QAM and QPSK point sets.
module tb_qam_slicer;
  import alamouti_pkg::*;
  mod_e mod_fmt;
  sym_t y, d;
  int checks = 0, failures = 0;

  qam_slicer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv16 [4] = '{-3 * QAM_UNIT, -QAM_UNIT, QAM_UNIT, 3 * QAM_UNIT};
    int lv4  [2] = '{-QPSK_LVL, QPSK_LVL};
    for (int it = 0; it < 4000; it++) begin
      longint best;
      int br, bi;
      mod_fmt = (it % 2) ? MOD_16QAM : MOD_QPSK;
      y.re = YW'($signed($urandom_range(0, 8 * QAM_UNIT)) - 4 * QAM_UNIT);
      y.im = YW'($signed($urandom_range(0, 8 * QAM_UNIT)) - 4 * QAM_UNIT);
      #1;
      best = -1;
      br = 0;
      bi = 0;
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          int cr, ci;
          longint dd;
          if (mod_fmt == MOD_QPSK && (a > 1 || b > 1)) continue;
          cr = (mod_fmt == MOD_QPSK) ? lv4[a] : lv16[a];
          ci = (mod_fmt == MOD_QPSK) ? lv4[b] : lv16[b];
          dd = longint'(y.re - cr) * longint'(y.re - cr) + longint'(y.im - ci) * longint'(y.im - ci);
          // ties (exactly on a threshold) accept either neighbour
          if (best < 0 || dd < best) begin
            best = dd;
            br = cr;
            bi = ci;
          end
        end
      checks++;
      if (longint'(d.re - y.re) * longint'(d.re - y.re) + longint'(d.im - y.im) * longint'(d.im - y.im) != best) begin
        failures++;
        $display("y=%0d,%0dj fmt %0d: got %0d,%0dj want %0d,%0dj", y.re, y.im, mod_fmt, d.re, d.im, br, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
