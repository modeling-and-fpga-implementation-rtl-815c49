// tb_sched_pipe -- the three-stage schedule pipeline, on two schedules:
// the write side of INIT (which of the six Sobel operand channels a pixel
// goes to) and the read side of VSUM (partial sum from ZERO in row 0, from
// its own loop afterwards). The expected order and masks are computed by
// brute force from the loop program: a pixel (j,i) goes to channel k if it
// is operand k of some Sobel iteration. Consumption ('advance') is random.
// Also checked: the first iteration appears three cycles after 'start', and
// 'busy' drops after the last one.
module tb_sched_pipe;
  import kpn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 0, adv_a = 0, adv_b = 0;
  param_t     h = '0, w = '0;
  logic       val_a, val_b, busy_a, busy_b;
  port_mask_t m_a, m_b;
  idx_t       j_a, i_a, j_b, i_b;
  int checks = 0, failures = 0;

  sched_pipe #(.KIND(NK_INIT), .IS_READ(1'b0)) dut_a (
    .clk, .rst_n, .start, .h, .w, .advance(adv_a),
    .valid(val_a), .mask(m_a), .j(j_a), .i(i_a), .busy(busy_a));
  sched_pipe #(.KIND(NK_VSUM), .IS_READ(1'b1)) dut_b (
    .clk, .rst_n, .start, .h, .w, .advance(adv_b),
    .valid(val_b), .mask(m_b), .j(j_b), .i(i_b), .busy(busy_b));

  function automatic port_mask_t init_mask(int j, int i, int hh, int ww);
    port_mask_t m;
    int dj [6] = '{-1, -1, 0, 0, 1, 1};
    int di [6] = '{-1,  1, -1, 1, -1, 1};
    m = '0;
    for (int js = 1; js <= hh; js++)
      for (int is = 1; is <= ww; is++)
        for (int k = 0; k < 6; k++)
          if (js + dj[k] == j && is + di[k] == i) m[k] = 1'b1;
    return m;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      int hh, ww, ja, ia, jb, ib, na, nb, cyc;
      hh = $urandom_range(1, 6);
      ww = $urandom_range(1, 7);
      @(negedge clk);
      h = param_t'(hh); w = param_t'(ww);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // latency: nothing in stage 3 for two cycles, an iteration in the third
      check(!val_a && !val_b && busy_a && busy_b, "pipeline not filling after start");
      @(negedge clk);
      check(!val_a && !val_b, "stage 3 valid too early");
      @(negedge clk);
      check(val_a && val_b, "first iteration not in stage 3 three cycles after start");
      ja = 0; ia = 0; jb = 0; ib = 0; na = 0; nb = 0; cyc = 0;
      while ((busy_a || busy_b) && cyc < 2000) begin
        adv_a = val_a && (run < 2 || $urandom_range(0, 2) != 0);
        adv_b = val_b && (run < 2 || $urandom_range(0, 2) != 0);
        if (adv_a) begin
          check(j_a == idx_t'(ja) && i_a == idx_t'(ia), $sformatf("INIT order: got (%0d,%0d) expected (%0d,%0d)", j_a, i_a, ja, ia));
          check(m_a == init_mask(ja, ia, hh, ww), $sformatf("INIT mask at (%0d,%0d): %b expected %b", ja, ia, m_a, init_mask(ja, ia, hh, ww)));
          na++;
          if (ia == ww + 1) begin ia = 0; ja++; end else ia++;
        end
        if (adv_b) begin
          port_mask_t e;
          e = '0; e[0] = (jb == 0); e[1] = (jb != 0); e[2] = 1'b1;
          check(j_b == idx_t'(jb) && i_b == idx_t'(ib), "VSUM order");
          check(m_b == e, $sformatf("VSUM read mask at (%0d,%0d): %b", jb, ib, m_b));
          nb++;
          if (ib == ww - 1) begin ib = 0; jb++; end else ib++;
        end
        @(negedge clk);
        adv_a = 1'b0; adv_b = 1'b0;
        cyc++;
      end
      check(na == (hh + 2) * (ww + 2), $sformatf("INIT iterations %0d", na));
      check(nb == hh * ww, $sformatf("VSUM iterations %0d", nb));
    end
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
