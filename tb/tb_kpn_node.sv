// tb_kpn_node -- a complete SOBEL node: six input channels (queue models
// that go empty at random) and one output channel (full at random), with
// Height/Width loaded over the control bus. Channel k holds, in order, the
// k-th Sobel operand of every iteration, built here from a random image; the
// node's output must be the vertical-edge gradient of every interior pixel,
// in row-major order. Also checked: 'running' spans the run and 'done'
// pulses once, a second run with other parameters works, and both the
// blocking read and the blocking write were exercised.
module tb_kpn_node;
  import kpn_pkg::*;
  import edge_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_bus_t  cb = '0;
  token_t     in_data [6] = '{default: '0};
  logic [5:0] in_empty = '1, in_read;
  token_t     out_data [1];
  logic [0:0] out_wr, out_full = '0;
  logic       running, done;

  token_t q [6][$];
  int     exp_q [$];
  logic [5:0] avail = '0;
  int checks = 0, failures = 0, n_rd_block = 0, n_wr_block = 0, n_done = 0;
  img_t img;

  kpn_node #(.KIND(NK_SOBEL)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive_channels();
    for (int p = 0; p < 6; p++) begin
      in_empty[p] = !(avail[p] && q[p].size() > 0);
      in_data[p]  = (q[p].size() > 0) ? q[p][0] : '0;
    end
  endtask

  task automatic bus(logic s, param_t d, logic u, logic st);
    @(negedge clk);
    cb.shift = s; cb.data = d; cb.update = u; cb.start = st;
    @(negedge clk);
    cb = '0;
  endtask

  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    static int dj [6] = '{-1, -1, 0, 0, 1, 1};
    static int di [6] = '{-1,  1, -1, 1, -1, 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 5; run++) begin
      int hh, ww, cyc, got;
      hh = $urandom_range(1, 6);
      ww = $urandom_range(1, 8);
      make_image(img, hh, ww, run % 3);
      for (int j = 1; j <= hh; j++)
        for (int i = 1; i <= ww; i++) begin
          for (int k = 0; k < 6; k++) q[k].push_back(token_t'(img[j + dj[k]][i + di[k]]));
          exp_q.push_back((int'(img[j-1][i+1]) + 2 * int'(img[j][i+1]) + int'(img[j+1][i+1]))
                        - (int'(img[j-1][i-1]) + 2 * int'(img[j][i-1]) + int'(img[j+1][i-1])));
        end
      bus(1'b1, param_t'(hh), 1'b0, 1'b0);
      bus(1'b1, param_t'(ww), 1'b0, 1'b0);
      bus(1'b0, '0, 1'b1, 1'b0);
      bus(1'b0, '0, 1'b0, 1'b1);
      check(running, "node not running after start");
      got = 0;
      for (cyc = 0; cyc < 1000 && running; cyc++) begin
        for (int k = 0; k < 6; k++) avail[k] = (run == 0) || ($urandom_range(0, 7) != 0);
        out_full = (run == 0) ? 1'b0 : 1'($urandom_range(0, 2) == 0);
        drive_channels();
        #1;
        if (in_read != 0) begin
          check(in_read == 6'h3f, "not all six operands read together");
          for (int k = 0; k < 6; k++) void'(q[k].pop_front());
        end else if (dut.u_read.valid) n_rd_block++;
        if (out_wr[0]) begin
          check(exp_q.size() > 0 && $signed(out_data[0]) == exp_q[0],
                $sformatf("gradient %0d expected %0d", $signed(out_data[0]), exp_q[0]));
          if (exp_q.size() > 0) void'(exp_q.pop_front());
          got++;
        end else if (dut.u_write.valid && dut.u_write.res_valid) n_wr_block++;
        @(negedge clk);
      end
      avail = '0; drive_channels();
      @(negedge clk);
      check(got == hh * ww, $sformatf("%0d results for %0d pixels", got, hh * ww));
      check(!running && n_done == run + 1, "done not signalled once");
      if (running) begin
        failures++;
        $display("FAIL: node hangs");
        break;
      end
    end
    check(n_rd_block > 0, "blocking read never happened");
    check(n_wr_block > 0, "blocking write never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
