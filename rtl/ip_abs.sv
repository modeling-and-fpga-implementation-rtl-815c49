// ip_abs -- absolute value of a signed token, as an IP core with Enable/Ready
// and a registered output: one comparison with zero, a negation and an
// addition (two's complement: -x = ~x + 1).
// Timing: result valid and 'rdy' high the cycle after 'en'; 'q' holds
// while 'en' is low.
module ip_abs
  import kpn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  token_t a,
  output token_t q,
  output logic   rdy
);
  token_t mag;
  assign mag = a[TOKEN_W-1] ? (~a + 1'b1) : a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      rdy <= 1'b0;
    end else begin
      rdy <= en;
      if (en) q <= mag;
    end
  end

endmodule
