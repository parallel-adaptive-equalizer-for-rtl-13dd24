// alamouti_encoder: transmitter-side Alamouti coding over two polarizations.
//
// Consecutive symbols are grouped into pairs [s1 s2]. In the two time slots of
// a pair the X polarization carries s1 then s2 and the Y polarization carries
// -s2* then s1*, which gives the polarization diversity that the
// single-polarization receiver's equalizer undoes.
// Interface: serial symbols s with in_valid (first symbol after reset is s1).
// When s2 arrives, slot 1 (x = s1, y = -s2*) is output on the next cycle and
// slot 2 (x = s2, y = s1*) on the cycle after, each with out_valid. Pairs
// must be at least two cycles apart, which a continuous symbol stream is.
// The surrounding transmitter DSP (pulse shaping, pre-emphasis) is not part
// of this block.
module alamouti_encoder
  import alamouti_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sym_t s,
  output logic out_valid,
  output sym_t tx_x,
  output sym_t tx_y
);

  logic second_sym;   // next symbol accepted is s2
  logic slot2_due;    // slot 2 of the current pair is output next cycle
  sym_t s1_q, s2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second_sym <= 1'b0;
      slot2_due  <= 1'b0;
      s1_q       <= '0;
      s2_q       <= '0;
      out_valid  <= 1'b0;
      tx_x       <= '0;
      tx_y       <= '0;
    end else begin
      out_valid <= 1'b0;
      slot2_due <= 1'b0;
      if (slot2_due) begin
        tx_x      <= s2_q;
        tx_y      <= '{re: s1_q.re, im: -s1_q.im};
        out_valid <= 1'b1;
      end
      if (in_valid) begin
        second_sym <= ~second_sym;
        if (!second_sym) begin
          s1_q <= s;
        end else begin
          s2_q      <= s;
          tx_x      <= s1_q;
          tx_y      <= '{re: -s.re, im: s.im};
          out_valid <= 1'b1;
          slot2_due <= 1'b1;
        end
      end
    end
  end

  a_pair_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(slot2_due && in_valid && second_sym));

endmodule
