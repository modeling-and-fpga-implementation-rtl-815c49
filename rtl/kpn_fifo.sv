// kpn_fifo -- a finite FIFO channel between two nodes of the process network.
//
// The producer side has Write/Full, the consumer side Empty/Read, as in the
// node structure of the design. The FIFO is first-word-fall-through: while
// 'empty' is low, 'rd_data' already shows the oldest token, so an execution
// unit can take its operands straight from the FIFO outputs without an extra
// cycle. A write and a read in the same cycle are both accepted when the FIFO
// is neither full nor empty. Writing when full or reading when empty is a
// protocol error, caught by assertions and ignored by the logic.
//
// The default size, 512 words of 32 bits, is the size of one block RAM FIFO of
// the target FPGA; the design uses one such FIFO per channel. DEPTH need not be
// a power of two. The memory is read asynchronously (distributed-RAM style),
// which is this design's choice to obtain the fall-through behaviour simply.
module kpn_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  // producer side
  input  logic             wr,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  // consumer side
  input  logic             rd,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [CW-1:0]    count;

  logic do_wr, do_rd;
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Blocking write / blocking read: the nodes must never do either.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr && full))
    else $error("kpn_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd && empty))
    else $error("kpn_fifo: read while empty");

endmodule
