// tb_deinterleaver: checks that the 1:2 S/P splits a gapped serial stream into
// aligned (even, odd) pairs in order, with one pair per two accepted samples.
module tb_deinterleaver;
  localparam int DW = 20;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [DW-1:0] x = '0, x1, x2;
  int checks = 0, failures = 0, sent = 0, pairs = 0;
  logic [DW-1:0] q [$];

  deinterleaver #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [DW-1:0] a, b;
    a = q.pop_front();
    b = q.pop_front();
    checks++;
    pairs++;
    if (x1 !== a || x2 !== b) begin
      failures++;
      $display("pair %0d: got %h/%h want %h/%h", pairs, x1, x2, a, b);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      x = DW'($urandom);
      if (in_valid) begin
        q.push_back(x);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (pairs != sent / 2) begin
      failures++;
      $display("pair count %0d, expected %0d", pairs, sent / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
