// tb_read_unit -- read unit of a VSUM node (three input channels: ZERO,
// own loop, ABS) fed from queue models that go empty at random. Parameters
// come over the control bus. Checked for every iteration: that operands are
// offered only when every channel the schedule needs holds a token
// (blocking read), that exactly those channels are popped, and that operand 0
// comes from ZERO in row 0 and from the loop channel afterwards, operand 1
// always from ABS, in order.
module tb_read_unit;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_bus_t  cb = '0;
  logic       start = 0, arg_take = 0, arg_valid, busy;
  token_t     in_data [3] = '{default: '0};
  logic [2:0] in_empty = '1, in_read;
  token_t     arg [2];
  token_t     q [3][$];
  logic [2:0] avail = '0;
  int checks = 0, failures = 0, n_block = 0;

  read_unit #(.KIND(NK_VSUM)) dut (.*);

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

  // present the queue heads on the channel outputs
  task automatic drive_channels();
    for (int p = 0; p < 3; p++) begin
      in_empty[p] = !(avail[p] && q[p].size() > 0);
      in_data[p]  = (q[p].size() > 0) ? q[p][0] : '0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      int hh, ww, j, i, n;
      hh = $urandom_range(1, 5);
      ww = $urandom_range(1, 6);
      for (int k = 0; k < ww; k++) q[0].push_back(token_t'('h1000 + run * 64 + k));
      for (int k = 0; k < (hh - 1) * ww; k++) q[1].push_back(token_t'('h2000 + run * 64 + k));
      for (int k = 0; k < hh * ww; k++) q[2].push_back(token_t'('h3000 + run * 64 + k));
      bus_word(1'b1, param_t'(hh), 1'b0);
      bus_word(1'b1, param_t'(ww), 1'b0);
      bus_word(1'b0, '0, 1'b1);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      j = 0; i = 0; n = 0;
      while (n < hh * ww) begin
        logic [2:0] need;
        avail    = 3'($urandom_range(0, 7)) | ((run == 0) ? 3'b111 : 3'b000);
        arg_take = (run == 0) || ($urandom_range(0, 3) != 0);
        drive_channels();
        #1;
        need = {1'b1, j != 0, j == 0};
        if (dut.valid) begin
          check(arg_valid == ((need & in_empty) == 0), "arg_valid does not follow the needed channels");
          if (!arg_valid) n_block++;
        end else begin
          check(!arg_valid, "operands offered without a scheduled iteration");
        end
        if (arg_valid && arg_take) begin
          check(in_read == need, $sformatf("popped %b, expected %b at (%0d,%0d)", in_read, need, j, i));
          check(arg[0] == q[j == 0 ? 0 : 1][0], $sformatf("operand 0 %h at (%0d,%0d)", arg[0], j, i));
          check(arg[1] == q[2][0], $sformatf("operand 1 %h at (%0d,%0d)", arg[1], j, i));
          for (int p = 0; p < 3; p++) if (need[p]) void'(q[p].pop_front());
          n++;
          if (i == ww - 1) begin i = 0; j++; end else i++;
        end else begin
          check(in_read == '0, "channel popped without a read");
        end
        @(negedge clk);
      end
      avail = '0;
      drive_channels();
      repeat (2) @(negedge clk);
      check(!busy, "still busy after the last iteration");
      check(q[0].size() == 0 && q[1].size() == 0 && q[2].size() == 0, "tokens left in channels");
    end
    check(n_block > 0, "blocking read never happened");
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
