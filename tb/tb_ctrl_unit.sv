// tb_ctrl_unit -- node control unit against a small reference model: a start
// is passed on to the units only while idle; the node runs from the cycle
// after the start until read side, write side and result register are all
// empty; 'done' pulses once at that point; the execution unit is enabled
// only while running.
module tb_ctrl_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, rd_busy = 0, wr_busy = 0, res_valid = 0;
  logic unit_start, exec_run, running, done;
  int checks = 0, failures = 0, n_runs = 0;
  bit m_run = 0, m_done = 0;

  ctrl_unit dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    static int left = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // stimulus for this cycle
      start = !m_run && ($urandom_range(0, 3) == 0);
      if (m_run) begin
        if (left > 0) left--;
        rd_busy   = (left > 0) || ($urandom_range(0, 3) == 0 && left > 0);
        wr_busy   = (left > 0) || ($urandom_range(0, 7) == 0);
        res_valid = (left > 0) && ($urandom_range(0, 1) == 0);
      end else begin
        rd_busy = 1'b0; wr_busy = 1'b0; res_valid = 1'b0;
      end
      #1;
      check(unit_start == (start && !m_run), "unit start");
      check(exec_run == m_run && running == m_run, "run state");
      check(done == m_done, "done pulse");
      @(negedge clk);
      // model update at the clock edge just passed
      m_done = 1'b0;
      if (!m_run && start) begin
        m_run = 1'b1;
        left = $urandom_range(1, 12);
      end else if (m_run && !rd_busy && !wr_busy && !res_valid) begin
        m_run = 1'b0;
        m_done = 1'b1;
        n_runs++;
      end
      // units become busy as soon as they are started
      if (m_run && left > 0) begin rd_busy = 1'b1; wr_busy = 1'b1; end
    end
    check(n_runs > 50, "too few runs completed");
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
