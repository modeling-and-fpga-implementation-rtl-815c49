// tb_exec_unit -- execution unit of an ABS node between a random operand
// source and a random result sink: every operand gives exactly one result,
// in order, |x| of it; the unit fires only with 'run' high; with operands
// always there and the sink always ready it fires every cycle, and a result
// is available one cycle after its operands were taken.
module tb_exec_unit;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   run = 0, arg_valid = 0, arg_take, res_valid, res_take = 0;
  token_t arg [1] = '{default: '0};
  token_t res;
  int checks = 0, failures = 0;
  int src [$], exp_q [$];
  int n_in = 0, n_out = 0, n_fire_full = 0, n_stall = 0;

  exec_unit #(.KIND(NK_ABS)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 600; k++) src.push_back(int'($urandom_range(0, 4000)) - 2000);
    for (int cyc = 0; cyc < 3000 && n_out < 600; cyc++) begin
      bit quiet;
      quiet     = (cyc < 200);
      run       = (cyc < 100) ? (cyc >= 20) : (cyc % 97 != 0);
      arg_valid = (n_in < 600) && (quiet || $urandom_range(0, 2) != 0);
      arg[0]    = (n_in < 600) ? token_t'(src[n_in]) : '0;
      res_take  = 1'b0;
      #1;
      res_take  = res_valid && (quiet || $urandom_range(0, 2) != 0);
      #1;
      if (!run) begin
        checks++;
        if (arg_take) begin failures++; $display("FAIL: fired while not running"); end
      end
      if (res_take) begin
        checks++;
        if (exp_q.size() == 0 || res != token_t'(exp_q[0])) begin
          failures++;
          $display("FAIL: result %0d", $signed(res));
        end
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        n_out++;
      end
      if (arg_take) begin
        int v;
        v = src[n_in];
        exp_q.push_back((v < 0) ? -v : v);
        n_in++;
        if (quiet && cyc >= 40) n_fire_full++;
      end else if (arg_valid && run) n_stall++;
      @(negedge clk);
      // one cycle after the take the result is there
      if (exp_q.size() > 0) begin
        checks++;
        if (!res_valid) begin failures++; $display("FAIL: no result one cycle after firing"); end
      end
    end
    checks++;
    if (n_out != 600) begin failures++; $display("FAIL: %0d results of 600", n_out); end
    checks++;
    if (n_fire_full < 150) begin failures++; $display("FAIL: not one firing per cycle (%0d)", n_fire_full); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: never held back by the sink"); end
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
