// alamouti_pkg: number formats, types and arithmetic helpers shared by the
// parallel Alamouti equalizer.
//
// All signals are complex fixed-point values carried as a packed struct of a
// signed real and imaginary part. The word widths and fractional bits below are
// choices of this design (the equalizer's reference description gives the
// algorithm in floating point and names only the converter resolution: a
// 10-bit ADC in the experiment, 6 bits in simulation). The formats are:
//   sample_t  input samples x(n)                 XW bits, XF fractional
//   coef_t    FIR coefficients w_ij              WW bits, WF fractional
//   phase_t   phase estimators p, p1, p2, Psi(p) PW bits, PF fractional
//   sym_t     filter outputs, y, d, e            YW bits, YF fractional
// Helpers round to nearest (half away from zero is not needed: +0.5 then floor)
// and saturate on narrowing.
package alamouti_pkg;

  localparam int XW = 10;  // ADC resolution of the experimental receiver
  localparam int XF = 8;
  localparam int WW = 18;
  localparam int WF = 14;
  localparam int PW = 16;
  localparam int PF = 14;
  localparam int YW = 18;
  localparam int YF = 12;
  localparam int AW = 48;  // wide accumulator for sums of products

  typedef struct packed {
    logic signed [XW-1:0] re;
    logic signed [XW-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [WW-1:0] re;
    logic signed [WW-1:0] im;
  } coef_t;

  typedef struct packed {
    logic signed [PW-1:0] re;
    logic signed [PW-1:0] im;
  } phase_t;

  typedef struct packed {
    logic signed [YW-1:0] re;
    logic signed [YW-1:0] im;
  } sym_t;

  // Wide complex value used inside sums of products.
  typedef struct packed {
    logic signed [AW-1:0] re;
    logic signed [AW-1:0] im;
  } acc_t;

  typedef enum logic {MOD_QPSK = 1'b0, MOD_16QAM = 1'b1} mod_e;

  // Decision levels in sym_t units: 16-QAM uses {+-1,+-3}*QAM_UNIT,
  // QPSK uses +-QPSK_LVL on each axis.
  localparam int QAM_UNIT = 1 << (YF - 2);   // 0.25
  localparam int QPSK_LVL = 1 << (YF - 1);   // 0.5

  // Arithmetic right shift with round to nearest.
  function automatic logic signed [AW-1:0] rshift_rnd(input logic signed [AW-1:0] v,
                                                      input int unsigned sh);
    logic signed [AW-1:0] r;
    if (sh == 0) return v;
    r = v + (AW'(1) <<< (sh - 1));
    return r >>> sh;
  endfunction

  // Saturate a wide value to a signed field of w bits.
  function automatic logic signed [AW-1:0] sat(input logic signed [AW-1:0] v, input int unsigned w);
    logic signed [AW-1:0] hi, lo;
    hi = (AW'(1) <<< (w - 1)) - 1;
    lo = -(AW'(1) <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic acc_t acc_add(input acc_t a, input acc_t b);
    acc_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  // Complex product of two wide values (operands must fit in AW/2 bits).
  function automatic acc_t cmul(input logic signed [AW-1:0] ar, input logic signed [AW-1:0] ai,
                                input logic signed [AW-1:0] br, input logic signed [AW-1:0] bi);
    acc_t r;
    r.re = ar * br - ai * bi;
    r.im = ar * bi + ai * br;
    return r;
  endfunction

  function automatic acc_t acc_rshift(input acc_t a, input int unsigned sh);
    acc_t r;
    r.re = rshift_rnd(a.re, sh);
    r.im = rshift_rnd(a.im, sh);
    return r;
  endfunction

  function automatic sym_t to_sym(input acc_t a);
    sym_t r;
    r.re = YW'(sat(a.re, YW));
    r.im = YW'(sat(a.im, YW));
    return r;
  endfunction

  function automatic acc_t from_sample(input sample_t s);
    acc_t r;
    r.re = AW'(s.re);
    r.im = AW'(s.im);
    return r;
  endfunction

  function automatic acc_t from_coef(input coef_t s);
    acc_t r;
    r.re = AW'(s.re);
    r.im = AW'(s.im);
    return r;
  endfunction

  function automatic acc_t from_phase(input phase_t s);
    acc_t r;
    r.re = AW'(s.re);
    r.im = AW'(s.im);
    return r;
  endfunction

  function automatic acc_t from_sym(input sym_t s);
    acc_t r;
    r.re = AW'(s.re);
    r.im = AW'(s.im);
    return r;
  endfunction

  function automatic acc_t conj(input acc_t a);
    acc_t r;
    r.re = a.re;
    r.im = -a.im;
    return r;
  endfunction

endpackage
