// unit_phasor: the normalisation Psi(p) = abs(p) ./ p = conj(p) / |p| used in
// the coefficient recursions, evaluated for one lane's phase estimator.
//
// It returns psi = conj(p)/|p| and, since Psi(p*) = conj(Psi(p)), the caller
// obtains the second form by conjugating. |p| is an integer square root of
// re^2 + im^2 (bit-serial restoring algorithm unrolled)
// computed with G extra fractional bits so that small estimators keep their
// precision, followed by two divisions; both are this design's choice, the algorithm
// only defines the function. A zero estimator returns psi = 1.
// Purely combinational; input and output are phase_t (PF fractional bits).
module unit_phasor
  import alamouti_pkg::*;
(
  input  phase_t p,
  output phase_t psi
);

  localparam int G   = 8;                // extra fractional bits of |p|
  localparam int SQW = 2 * PW + 2 * G;   // width of (re^2 + im^2) << 2G
  localparam int MW  = SQW / 2;

  logic [SQW-1:0]  mag2;
  logic [MW-1:0]   mag;               // |p| with PF+G fractional bits

  // Integer square root, floor(sqrt(v)), restoring method.
  function automatic logic [MW-1:0] isqrt(input logic [SQW-1:0] v);
    logic [SQW-1:0] rem, root, bit_;
    rem  = v;
    root = '0;
    bit_ = SQW'(1) << (SQW - 2);
    for (int i = 0; i < SQW / 2; i++) begin
      if (rem >= root + bit_) begin
        rem  = rem - (root + bit_);
        root = (root >> 1) + bit_;
      end else begin
        root = root >> 1;
      end
      bit_ = bit_ >> 2;
    end
    return root[MW-1:0];
  endfunction

  always_comb begin
    logic signed [AW-1:0] pr, pi, num_re, num_im, q_re, q_im, den;
    pr     = AW'(p.re);
    pi     = AW'(p.im);
    mag2   = SQW'(pr * pr + pi * pi) << (2 * G);
    mag    = isqrt(mag2);
    den    = AW'(mag);
    num_re = pr <<< (PF + G);
    num_im = -(pi <<< (PF + G));
    if (mag == '0) begin
      q_re = AW'(1) <<< PF;
      q_im = '0;
    end else begin
      q_re = num_re / den;
      q_im = num_im / den;
    end
    psi.re = PW'(sat(q_re, PW));
    psi.im = PW'(sat(q_im, PW));
  end

endmodule
