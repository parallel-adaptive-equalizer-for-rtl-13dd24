// tb_input_buffer: feeds a numbered sample stream with random gaps and checks
// that each block window holds the last L+N-1 samples, newest first, with
// zeros before the first sample, and that one block is flagged per L samples.
module tb_input_buffer;
  localparam int L = 4, N = 3, DW = 12;
  logic clk = 0, rst_n = 0, in_valid = 0, blk_valid;
  logic [DW-1:0] din = '0;
  logic [DW-1:0] win [L+N-1];
  int checks = 0, failures = 0, total = 0, blocks = 0;
  logic [DW-1:0] hist [$];

  input_buffer #(.L(L), .N(N), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && blk_valid) begin
    blocks++;
    for (int i = 0; i < L + N - 1; i++) begin
      int idx;
      logic [DW-1:0] exp_v;
      idx   = blocks * L - 1 - i;
      exp_v = (idx < 0) ? '0 : hist[idx];
      checks++;
      if (win[i] !== exp_v) begin
        failures++;
        $display("block %0d word %0d: got %h want %h", blocks, i, win[i], exp_v);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      din = DW'($urandom);
      if (in_valid) begin
        hist.push_back(din);
        total++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (blocks != total / L) begin
      failures++;
      $display("blocks %0d, expected %0d", blocks, total / L);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
