// tb_alamouti_encoder: sends random symbols, continuous and with gaps, and
// checks both polarization outputs slot by slot: X = s1, s2; Y = -s2*, s1*.
module tb_alamouti_encoder;
  import alamouti_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sym_t s = '0, tx_x, tx_y;
  int checks = 0, failures = 0, slots = 0, sent = 0;
  sym_t qx [$], qy [$], pend;
  logic have = 0;

  alamouti_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sym_t rnd_sym();
    sym_t r;
    r.re = YW'($signed($urandom_range(0, 8191)) - 4096);
    r.im = YW'($signed($urandom_range(0, 8191)) - 4096);
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    sym_t ex, ey;
    ex = qx.pop_front();
    ey = qy.pop_front();
    checks++;
    slots++;
    if (tx_x !== ex || tx_y !== ey) begin
      failures++;
      $display("slot %0d: got %h/%h want %h/%h", slots, tx_x, tx_y, ex, ey);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      in_valid = (i < 300) || ($urandom_range(0, 2) == 0);
      s = rnd_sym();
      if (in_valid) begin
        sent++;
        if (!have) begin
          pend = s;
          have = 1;
        end else begin
          qx.push_back(pend);
          qy.push_back('{re: -s.re, im: s.im});
          qx.push_back(s);
          qy.push_back('{re: pend.re, im: -pend.im});
          have = 0;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (slots != 2 * (sent / 2)) begin
      failures++;
      $display("slots %0d, expected %0d", slots, 2 * (sent / 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
