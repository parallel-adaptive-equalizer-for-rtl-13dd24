// qam_slicer: symbol decision for decision-directed adaptation.
//
// Maps an equalized sample to the nearest constellation point, per axis:
// 16-QAM levels {-3,-1,+1,+3}*QAM_UNIT with thresholds 0 and +-2*QAM_UNIT,
// QPSK levels +-QPSK_LVL with threshold 0. Both formats are the ones the
// equalizer is evaluated with; the constellation scale is this design's
// choice (see alamouti_pkg). Purely combinational.
module qam_slicer
  import alamouti_pkg::*;
(
  input  mod_e mod_fmt,
  input  sym_t y,
  output sym_t d
);

  function automatic logic signed [YW-1:0] slice_axis(input logic signed [YW-1:0] v, input mod_e m);
    if (m == MOD_QPSK) return (v < 0) ? YW'(-QPSK_LVL) : YW'(QPSK_LVL);
    if (v < -YW'(2 * QAM_UNIT)) return YW'(-3 * QAM_UNIT);
    if (v < 0)                  return YW'(-QAM_UNIT);
    if (v < YW'(2 * QAM_UNIT))  return YW'(QAM_UNIT);
    return YW'(3 * QAM_UNIT);
  endfunction

  always_comb begin
    d.re = slice_axis(y.re, mod_fmt);
    d.im = slice_axis(y.im, mod_fmt);
  end

endmodule
