// tb_write_unit -- write unit of a VSUM node (outputs: own loop channel
// ED_8, final channel ED_11 to OUT). Results are offered at random, the
// channels report full at random. Checked: a result is written only when
// every selected channel has room (blocking write), it goes to the loop
// channel in rows 0..H-2 and to the OUT channel in row H-1, each result once
// and in order, and 'res_take' matches the write.
module tb_write_unit;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_bus_t  cb = '0;
  logic       start = 0, res_valid = 0, res_take, busy;
  token_t     res = '0;
  token_t     out_data [2];
  logic [1:0] out_wr, out_full = '0;
  int checks = 0, failures = 0, n_block = 0;

  write_unit #(.KIND(NK_VSUM)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_word(logic s, param_t d, logic u);
    @(negedge clk);
    cb.shift = s; cb.data = d; cb.update = u;
    @(negedge clk);
    cb = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      int hh, ww, j, i, n;
      hh = $urandom_range(1, 5);
      ww = $urandom_range(1, 6);
      bus_word(1'b1, param_t'(hh), 1'b0);
      bus_word(1'b1, param_t'(ww), 1'b0);
      bus_word(1'b0, '0, 1'b1);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      j = 0; i = 0; n = 0;
      while (n < hh * ww) begin
        logic [1:0] sel;
        res_valid = (run == 0) || ($urandom_range(0, 3) != 0);
        res       = token_t'('h5000 + run * 64 + n);
        out_full  = (run == 0) ? 2'b00 : 2'($urandom_range(0, 3));
        #1;
        sel = {j == hh - 1, j != hh - 1};
        if (dut.valid && res_valid) begin
          check(res_take == ((sel & out_full) == 0), "write does not follow channel full flags");
          if (!res_take) n_block++;
        end else begin
          check(!res_take, "result taken without an iteration or without a result");
        end
        if (res_take) begin
          check(out_wr == sel, $sformatf("wrote %b, expected %b at (%0d,%0d)", out_wr, sel, j, i));
          check(out_data[sel[1]] == res, "written data differs from the result");
          n++;
          if (i == ww - 1) begin i = 0; j++; end else i++;
        end else begin
          check(out_wr == '0, "channel written without a result taken");
        end
        @(negedge clk);
      end
      res_valid = 1'b0;
      repeat (2) @(negedge clk);
      check(!busy, "still busy after the last iteration");
    end
    check(n_block > 0, "blocking write never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
