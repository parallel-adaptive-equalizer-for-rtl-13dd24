// input_buffer: the "Input buffer S/P" that prepares the parallel lanes.
//
// Collects the serial tributary x_j(n) into blocks of L samples and keeps the
// N-1 samples before each block, so that the block matrix X_j[k] of the
// vector formulation can be read out of one window: row l, tap t of X_j[k]
// is x_j(kL+l-t) = win[L-1-l+t]. win[0] is the newest sample x_j(kL+L-1) and
// win[L+N-2] the oldest, x_j(kL-N+1).
//
// Timing: each in_valid shifts one sample into a delay line. When the L-th
// sample of a block is taken, the whole line (including that sample) is copied
// to win and blk_valid pulses on the next cycle; win then stays stable until
// the next block. Samples before the first input are zero after reset.
// N = 1 turns the buffer into a plain L-wide serial-to-parallel converter.
module input_buffer
  import alamouti_pkg::*;
#(
  parameter int L  = 32,
  parameter int N  = 120,
  parameter int DW = 2 * XW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] din,
  output logic          blk_valid,
  output logic [DW-1:0] win [L+N-1]
);

  localparam int D = L + N - 1;

  logic [DW-1:0]          line [D];
  logic [$clog2(L+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) begin
        line[i] <= '0;
        win[i]  <= '0;
      end
      cnt       <= '0;
      blk_valid <= 1'b0;
    end else begin
      blk_valid <= 1'b0;
      if (in_valid) begin
        line[0] <= din;
        for (int i = 1; i < D; i++) line[i] <= line[i-1];
        if (cnt == ($clog2(L+1))'(L - 1)) begin
          cnt       <= '0;
          blk_valid <= 1'b1;
          win[0]    <= din;
          for (int i = 1; i < D; i++) win[i] <= line[i-1];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
