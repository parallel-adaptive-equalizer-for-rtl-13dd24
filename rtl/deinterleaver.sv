// deinterleaver: the "Interleaver 1:2 S/P" at the equalizer input.
//
// Splits the serial equalizer input x(n) into the even tributary x1 and the
// odd tributary x2, so that each Alamouti symbol pair (even slot, odd slot)
// leaves as one aligned pair. The first sample accepted after reset is even.
//
// Interface: one sample per cycle at most, qualified by in_valid. The even
// sample is held; when the odd sample arrives the pair is registered and
// out_valid pulses for one cycle on the next clock (latency 1 cycle after the
// odd sample). Emitting the two tributaries as one aligned pair, rather than
// as two independent serial streams, is this design's choice. The word is a
// plain DW-bit vector so that a sample and its training symbol can travel
// together (DW = 20 is one complex 10-bit sample).
module deinterleaver #(
  parameter int DW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] x,
  output logic          out_valid,
  output logic [DW-1:0] x1,
  output logic [DW-1:0] x2
);

  logic          odd_phase;
  logic [DW-1:0] even_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_phase <= 1'b0;
      even_hold <= '0;
      out_valid <= 1'b0;
      x1        <= '0;
      x2        <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        odd_phase <= ~odd_phase;
        if (!odd_phase) begin
          even_hold <= x;
        end else begin
          x1        <= even_hold;
          x2        <= x;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
