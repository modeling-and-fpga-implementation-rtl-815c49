// tb_ip_vsum -- vertical-sum core: accumulates a column of random values by
// feeding its own result back, as the VSUM node does through its loop
// channel, and compares with the sum computed here.
module tb_ip_vsum;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en = 0, rdy;
  token_t a [2] = '{default: '0};
  token_t q;
  int checks = 0, failures = 0;

  ip_vsum dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int col = 0; col < 20; col++) begin
      int unsigned s;
      token_t part;
      s = 0;
      part = '0;
      for (int r = 0; r < 30; r++) begin
        int unsigned v;
        v = $urandom_range(0, 1020);
        s += v;
        a = '{part, token_t'(v)};
        en = 1'b1;
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (!rdy || q != token_t'(s)) begin
          failures++;
          $display("FAIL: sum %0d expected %0d", q, s);
        end
        part = q;
        if (r % 5 == 0) begin
          @(negedge clk);
          checks++;
          if (rdy || q != token_t'(s)) begin failures++; $display("FAIL: not held"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
