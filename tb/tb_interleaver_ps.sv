// tb_interleaver_ps: offers (y1, y2) pairs with random gaps and checks the
// output order y1, y2, y1, y2, ..., one word per cycle for back-to-back pairs.
module tb_interleaver_ps;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic [DW-1:0] y1 = '0, y2 = '0, y;
  int checks = 0, failures = 0, got = 0, sent = 0, burst_cycles = 0;
  logic [DW-1:0] q [$];

  interleaver_ps #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [DW-1:0] e;
    e = q.pop_front();
    checks++;
    got++;
    if (y !== e) begin
      failures++;
      $display("word %0d: got %h want %h", got, y, e);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random gaps; phase 2: continuous pairs, output every cycle
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = (i >= 300) || ($urandom_range(0, 2) == 0);
      y1 = DW'($urandom);
      y2 = DW'($urandom);
      if (in_valid && in_ready) begin
        q.push_back(y1);
        q.push_back(y2);
        sent++;
      end
      if (i >= 310 && out_valid) burst_cycles++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (got != 2 * sent || burst_cycles != 290) begin
      failures++;
      $display("words %0d of %0d, busy cycles in burst %0d of 290", got, 2 * sent, burst_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
