// ip_vsum -- one step of the vertical (column) sum: partial sum plus the
// next pixel of the column, one addition, as an IP core with Enable/Ready and
// a registered output.
// a[0] is the partial column sum, a[1] the absolute edge value.
// Timing: result valid and 'rdy' high the cycle after 'en'; 'q' holds
// while 'en' is low. Sums wrap at TOKEN_W bits (no saturation).
module ip_vsum
  import kpn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  token_t a [2],
  output token_t q,
  output logic   rdy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      rdy <= 1'b0;
    end else begin
      rdy <= en;
      if (en) q <= a[0] + a[1];
    end
  end

endmodule
