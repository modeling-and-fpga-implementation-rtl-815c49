// tb_cpn_ctrl -- control-bus controller with a model of six nodes that stay
// running for a random time after each start. Checked: parameter words
// appear on the bus one cycle after they are offered, in order; 'update'
// comes only when no node runs, is followed by 'start' in the next cycle, and
// is never issued without a request; a request made while the network runs
// is served after the run ('run_done'); requests during a wait are merged;
// 'busy' and 'req_pending' follow the requests.
module tb_cpn_ctrl;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       param_valid = 0, run_req = 0, busy, req_pending, run_done;
  param_t     param_data = '0;
  ctrl_bus_t  cb;
  logic [5:0] node_running = '0;
  int checks = 0, failures = 0;
  int n_req = 0, n_start = 0, n_done = 0, n_deferred = 0, n_merged = 0;
  int left [6] = '{default: 0};
  bit pend_model = 0, prev_update = 0, prev_valid = 0, prev_req = 0;
  param_t prev_data = '0;

  cpn_ctrl #(.NNODES(6)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      param_valid = ($urandom_range(0, 3) == 0);
      param_data  = param_t'($urandom);
      run_req     = ($urandom_range(0, 19) == 0);
      #1;
      // bus checks for this cycle
      check(cb.shift == prev_valid && (!prev_valid || cb.data == prev_data),
            "parameter word not forwarded one cycle later");
      if (cb.update) check(node_running == 0, "update while a node runs");
      check(cb.start == prev_update, "start not in the cycle after update");
      if (run_req) begin
        n_req++;
        if (node_running != 0) n_deferred++;
        if (req_pending) n_merged++;
      end
      if (cb.update) begin
        check(pend_model, "update without a request");
        pend_model = prev_req;   // a request in the cycle before waits on
      end
      check(req_pending == pend_model, "req_pending differs from the requests made");
      if (run_done) n_done++;
      prev_valid  = param_valid;
      prev_data   = param_data;
      prev_update = cb.update;
      prev_req    = run_req;
      @(negedge clk);
      if (run_req) pend_model = 1'b1;
      // node model: started nodes run for a while
      for (int k = 0; k < 6; k++) begin
        if (left[k] > 0) left[k]--;
        node_running[k] = (left[k] > 0);
      end
      if (prev_update) begin   // start was on the bus in the cycle just ended
        n_start++;
        for (int k = 0; k < 6; k++) begin
          left[k] = $urandom_range(1, 40);
          node_running[k] = 1'b1;
        end
      end
      check(busy == (pend_model || node_running != 0 || dut.state != 0), "busy");
    end
    check(n_deferred > 0, "no request made during a run");
    check(n_merged > 0, "no request merged");
    check(n_start > 20 && n_done >= n_start - 1, $sformatf("%0d starts, %0d done", n_start, n_done));
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
