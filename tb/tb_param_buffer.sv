// tb_param_buffer -- parameter double buffer: words shifted in reach the
// register file only on 'update', in order (first word sent = P1); shifting
// during a "run" leaves the register file alone; a shift in the update cycle
// waits for the next update.
module tb_param_buffer;
  localparam int unsigned PW = 16, NUM = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic shift = 0, update = 0;
  logic [PW-1:0] data = '0;
  logic [PW-1:0] p [NUM];
  logic [PW-1:0] exp_p [NUM];
  logic [PW-1:0] sent [$];
  int checks = 0, failures = 0;

  param_buffer #(.PW(PW), .NUM(NUM)) dut (.*);

  task automatic check_p(string what);
    for (int k = 0; k < NUM; k++) begin
      checks++;
      if (p[k] !== exp_p[k]) begin
        failures++;
        $display("FAIL %s: P%0d = %0d, expected %0d", what, k + 1, p[k], exp_p[k]);
      end
    end
  endtask

  // stimulus is applied at the falling edge, sampled at the rising edge
  task automatic send(logic [PW-1:0] v);
    @(negedge clk);
    shift = 1'b1; data = v; sent.push_back(v);
    @(negedge clk);
    shift = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < NUM; k++) exp_p[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check_p("after reset");
    for (int round = 0; round < 20; round++) begin
      int n;
      n = $urandom_range(NUM, NUM + 2);
      for (int k = 0; k < n; k++) begin
        send(PW'($urandom));
        repeat ($urandom_range(0, 2)) @(posedge clk);
        check_p("while shifting");   // register file must not move
      end
      @(negedge clk);
      update = 1'b1;
      if (round % 4 == 3) begin       // a shift in the update cycle
        shift = 1'b1; data = PW'($urandom);
      end
      for (int k = 0; k < NUM; k++) exp_p[k] = sent[sent.size() - NUM + k];
      @(negedge clk);
      update = 1'b0;
      if (shift) begin sent.push_back(data); shift = 1'b0; end
      check_p("after update");
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
