// interleaver_ps: the "2:1 P/S" stage that symbol-interleaves the even and
// odd output tributaries y1(n), y2(n) into the equalizer output y(n).
//
// A pair (y1, y2) is accepted when in_valid and in_ready are both high; y1 is
// output on the next cycle and y2 on the cycle after, each with out_valid.
// in_ready is low while y2 is waiting, so a continuous pair stream gives one
// output word per cycle. Latency: 1 cycle from acceptance to y1.
module interleaver_ps #(
  parameter int DW = 36
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] y1,
  input  logic [DW-1:0] y2,
  output logic          out_valid,
  output logic [DW-1:0] y
);

  logic          second;
  logic [DW-1:0] hold;

  assign in_ready = !second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second    <= 1'b0;
      hold      <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else if (second) begin
      y         <= hold;
      out_valid <= 1'b1;
      second    <= 1'b0;
    end else if (in_valid) begin
      y         <= y1;
      hold      <= y2;
      out_valid <= 1'b1;
      second    <= 1'b1;
    end else begin
      out_valid <= 1'b0;
    end
  end

endmodule
