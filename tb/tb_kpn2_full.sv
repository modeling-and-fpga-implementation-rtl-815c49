// tb_kpn2_full -- the edge-detection network at its default sizes (512-word
// channels) on the three target sizes of the reported measurements:
// 58x60, 40x45 and 180x110 (read as Height x Width), the last being the
// largest target, the whole high-resolution image. Each target is one run,
// issued the way the host does it: send the parameters, run, collect the
// results, repeat. Every column sum is compared with the reference model,
// and each run's time is checked against the document's N(2M+1)+12 cycles
// for an N x M target and reported as targets per second at 66 MHz.
module tb_kpn2_full;
  import kpn_pkg::*;
  import edge_ref_pkg::*;

  localparam int NT = 3;
  localparam int TH [NT] = '{58, 40, 180};
  localparam int TW [NT] = '{60, 45, 110};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               param_valid = 1'b0;
  logic [PARAM_W-1:0] param_data = '0;
  logic               run_req = 1'b0;
  logic               busy, req_pending, run_done;
  logic               pix_valid = 1'b0;
  logic [PIX_W-1:0]   pix_data = '0;
  logic               pix_ready;
  logic               res_valid;
  logic [TOKEN_W-1:0] res_data;
  logic               res_ready = 1'b1;

  kpn2_edge_detect dut (
    .clk, .rst_n, .param_valid, .param_data, .run_req, .busy, .req_pending,
    .run_done, .pix_valid, .pix_data, .pix_ready, .res_valid, .res_data,
    .res_ready
  );

  int checks = 0, failures = 0;
  byte unsigned pix_q [$];
  int unsigned  exp_q [$];
  img_t img;

  always @(posedge clk) begin
    if (pix_valid && pix_ready) void'(pix_q.pop_front());
    pix_valid <= (pix_q.size() > 0);
    if (pix_q.size() > 0) pix_data <= pix_q[0];
  end

  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    int unsigned e;
    checks++;
    e = (exp_q.size() > 0) ? exp_q.pop_front() : 32'hdead_beef;
    if (res_data !== e) begin
      failures++;
      $display("FAIL: column sum %0d, expected %0d", res_data, e);
    end
  end

  longint cyc = 0, t_start = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.cb.start) t_start = cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      int unsigned took, lim;
      make_image(img, TH[t], TW[t], (t == 1) ? 1 : 0);
      for (int j = 0; j < TH[t] + 2; j++)
        for (int i = 0; i < TW[t] + 2; i++) pix_q.push_back(img[j][i]);
      for (int c = 1; c <= TW[t]; c++) exp_q.push_back(col_sum(img, TH[t], c));
      @(posedge clk);
      param_valid <= 1'b1; param_data <= PARAM_W'(TH[t]);
      @(posedge clk);
      param_data <= PARAM_W'(TW[t]);
      @(posedge clk);
      param_valid <= 1'b0;
      run_req <= 1'b1;
      @(posedge clk);
      run_req <= 1'b0;
      @(posedge clk iff run_done);
      took = int'(cyc - t_start);
      lim  = doc_cycles(TH[t], TW[t]);
      $display("target %0dx%0d: %0d cycles (document: %0d), %0d targets/s at 66 MHz",
               TH[t], TW[t], took, lim, 66_000_000 / took);
      checks++;
      if (took > lim) begin
        failures++;
        $display("FAIL: slower than N(2M+1)+12");
      end
      repeat (3) @(posedge clk);
      checks++;
      if (exp_q.size() != 0 || pix_q.size() != 0) begin
        failures++;
        $display("FAIL: %0d results missing, %0d pixels left", exp_q.size(), pix_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
