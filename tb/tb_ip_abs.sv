// tb_ip_abs -- absolute-value core: random signed values and the edge cases
// 0, -1, +-1020 (largest Sobel magnitude); result one cycle after Enable.
module tb_ip_abs;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en = 0, rdy;
  token_t a = '0, q;
  int checks = 0, failures = 0;

  ip_abs dut (.*);

  initial begin
    static int vals [5] = '{0, -1, 1020, -1020, 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int v;
      v = (n < 5) ? vals[n] : int'($urandom_range(0, 4000)) - 2000;
      a  = token_t'(v);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      a  = token_t'($urandom);
      checks++;
      if (!rdy || q != token_t'((v < 0) ? -v : v)) begin
        failures++;
        $display("FAIL: |%0d| gave %0d", v, $signed(q));
      end
      @(negedge clk);
      checks++;
      if (rdy || q != token_t'((v < 0) ? -v : v)) begin failures++; $display("FAIL: not held"); end
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
