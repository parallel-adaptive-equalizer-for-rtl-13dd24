// tb_ps_converter: loads blocks and drains them through a randomly stalling
// ready; checks word order (lane 0 first), that every word comes out once,
// and that a block loaded on the last word's cycle follows without a gap.
module tb_ps_converter;
  localparam int L = 5, DW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_ready = 0;
  logic [DW-1:0] blk [L];
  logic [DW-1:0] dout;
  int checks = 0, failures = 0, got = 0, loaded = 0, back_to_back = 0;
  logic [DW-1:0] q [$];

  ps_converter #(.L(L), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [DW-1:0] e;
    e = q.pop_front();
    checks++;
    got++;
    if (dout !== e) begin
      failures++;
      $display("word %0d: got %h want %h", got, dout, e);
    end
  end

  task automatic load_block();
    for (int i = 0; i < L; i++) begin
      blk[i] = DW'($urandom);
      q.push_back(blk[i]);
    end
    in_valid = 1;
    loaded++;
  endtask

  initial begin
    for (int i = 0; i < L; i++) blk[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      in_valid  = 0;
      out_ready = ($urandom_range(0, 3) != 0);
      // load when idle, or on the cycle the last word is taken
      if (!out_valid || (out_ready && dut.idx == 1)) begin
        if ($urandom_range(0, 1) == 1) begin
          if (out_valid) back_to_back++;
          load_block();
        end
      end
    end
    @(negedge clk);
    in_valid  = 0;
    out_ready = 1;
    repeat (2 * L) @(posedge clk);
    checks++;
    if (got != loaded * L || back_to_back == 0) begin
      failures++;
      $display("words %0d of %0d, back-to-back loads %0d", got, loaded * L, back_to_back);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
