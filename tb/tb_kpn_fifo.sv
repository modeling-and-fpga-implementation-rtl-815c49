// tb_kpn_fifo -- random writes and reads on a 5-word FIFO (not a power of
// two, so pointer wrap-around is exercised), compared with a queue model:
// fall-through data, empty and full flags, and that a write while full and a
// read while empty are never requested by this test.
module tb_kpn_fifo;
  localparam int unsigned W = 16, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         wr = 0, rd = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_empty = 0;

  kpn_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      // check state of this cycle against the model
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D)) begin
        failures++;
        $display("FAIL: flags empty=%0b full=%0b with %0d stored", empty, full, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data !== model[0]) begin
          failures++;
          $display("FAIL: head %h expected %h", rd_data, model[0]);
        end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // choose this cycle's operations; bias fill level by phase
      wr = !full  && ($urandom_range(0, 99) < ((n / 300) % 2 == 1 ? 75 : 30));
      rd = !empty && ($urandom_range(0, 99) < ((n / 300) % 2 == 1 ? 30 : 75));
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL: full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
