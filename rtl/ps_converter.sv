// ps_converter: the "L:1 P/S" converter that turns an equalizer output block
// y_j[k] into the serial signal y_j(n).
//
// A block of L words is loaded when in_valid is high and then offered one
// word at a time, lane 0 first, with a valid/ready handshake on the serial
// side. A new block may be loaded while idle or in the same cycle as the last
// word is taken; the equalizer delivers blocks no faster than that, which an
// assertion checks. The handshake is this design's choice.
module ps_converter #(
  parameter int L  = 32,
  parameter int DW = 36
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] blk [L],
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] dout
);

  logic [DW-1:0]          buf_q [L];
  logic [$clog2(L+1)-1:0] idx;
  logic                   last_taken;

  assign out_valid  = (idx != '0);
  assign dout       = buf_q[($clog2(L+1))'(L) - idx];
  assign last_taken = out_valid && out_ready && (idx == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      for (int i = 0; i < L; i++) buf_q[i] <= '0;
    end else if (in_valid) begin
      buf_q <= blk;
      idx   <= ($clog2(L+1))'(L);
    end else if (out_valid && out_ready) begin
      idx <= idx - 1'b1;
    end
  end

  // A block must not arrive while the previous one is still being sent.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> (!out_valid || last_taken));

endmodule
