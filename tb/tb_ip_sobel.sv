// tb_ip_sobel -- Sobel core against the 3x3 vertical-edge kernel computed
// here on a full neighbourhood (corner and edge pixels of the kernel are
// +-1 and +-2, the centre column 0): random and extreme pixels, result one
// cycle after Enable with Ready, held while Enable is low.
module tb_ip_sobel;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   en = 0, rdy;
  token_t a [6] = '{default: '0};
  token_t q;
  int checks = 0, failures = 0;

  ip_sobel dut (.*);

  function automatic int kernel(byte unsigned nb [3][3]);
    int kx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int s = 0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) s += kx[r][c] * int'(nb[r][c]);
    return s;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      byte unsigned nb [3][3];
      int e;
      token_t held;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        nb[r][c] = (n < 4) ? ((n % 2 == c / 2) ? 8'd255 : 8'd0) : byte'($urandom);
      a = '{token_t'(nb[0][0]), token_t'(nb[0][2]), token_t'(nb[1][0]),
            token_t'(nb[1][2]), token_t'(nb[2][0]), token_t'(nb[2][2])};
      e = kernel(nb);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!rdy || $signed(q) != e) begin
        failures++;
        $display("FAIL: sobel %0d rdy %0b, expected %0d", $signed(q), rdy, e);
      end
      held = q;
      a = '{default: token_t'($urandom)};
      @(negedge clk);
      checks++;
      if (rdy || q != held) begin failures++; $display("FAIL: output not held without Enable"); end
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
