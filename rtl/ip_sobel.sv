// ip_sobel -- Sobel operator for vertical edges, as an IP core with
// Enable/Ready and a registered output.
//
// Operands are the six neighbours of the centre pixel, in the argument order
// of the edge-detection program: a[0]=p(j-1,i-1), a[1]=p(j-1,i+1),
// a[2]=p(j,i-1), a[3]=p(j,i+1), a[4]=p(j+1,i-1), a[5]=p(j+1,i+1).
// The result is the horizontal gradient
//     q = (a[1] + 2*a[3] + a[5]) - (a[0] + 2*a[2] + a[4])
// as a signed two's-complement token. The document says only that the core
// uses additions, one subtraction and shifts; the 1-2-1 kernel is the usual
// Sobel kernel and this design's reading. Operands are unsigned pixels in the
// low PIX_W bits of a token.
// Timing: when 'en' is high the result is registered; 'q' is valid and 'rdy'
// is high in the next cycle. 'q' holds its value while 'en' is low.
module ip_sobel
  import kpn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  token_t a [6],
  output token_t q,
  output logic   rdy
);
  logic signed [PIX_W+3:0] left, right;

  always_comb begin
    left  = $signed({4'b0, a[0][PIX_W-1:0]}) + ($signed({4'b0, a[2][PIX_W-1:0]}) <<< 1)
          + $signed({4'b0, a[4][PIX_W-1:0]});
    right = $signed({4'b0, a[1][PIX_W-1:0]}) + ($signed({4'b0, a[3][PIX_W-1:0]}) <<< 1)
          + $signed({4'b0, a[5][PIX_W-1:0]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      rdy <= 1'b0;
    end else begin
      rdy <= en;
      if (en) q <= token_t'(signed'(right - left));
    end
  end

endmodule
