// write_unit -- communication part of a node, output side.
//
// At every iteration of the node's local schedule the write unit stores the
// result of the execution unit into each output channel the schedule selects
// (INIT sends one pixel to up to six channels at once; VSUM sends a column
// sum either back to its own loop channel or, in the last row, to OUT).
//
// Blocking write: the result is written, and taken from the execution unit
// ('res_take'), only in a cycle in which the schedule pipeline holds an
// iteration, the result is valid, and none of the selected channels is full.
// Otherwise the node waits. All selected channels are written in the same
// cycle. Like the read unit it has its own parameter copy and its own
// three-stage schedule pipeline, which runs independently of the read side.
module write_unit
  import kpn_pkg::*;
#(
  parameter node_kind_e  KIND = NK_SOBEL,
  parameter int unsigned NOUT = n_out(KIND)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_bus_t       cb,
  input  logic            start,
  // result from the execution unit
  input  token_t          res,
  input  logic            res_valid,
  output logic            res_take,
  // output channels
  output token_t          out_data [NOUT],
  output logic [NOUT-1:0] out_wr,
  input  logic [NOUT-1:0] out_full,
  output logic            busy
);
  param_t     p [NUM_PARAMS];
  port_mask_t mask;
  logic       valid;
  logic [NOUT-1:0] sel;

  param_buffer #(.PW(PARAM_W), .NUM(NUM_PARAMS)) u_params (
    .clk, .rst_n, .shift(cb.shift), .data(cb.data), .update(cb.update), .p
  );

  sched_pipe #(.KIND(KIND), .IS_READ(1'b0)) u_sched (
    .clk, .rst_n, .start, .h(p[0]), .w(p[1]),
    .advance(res_take),
    .valid, .mask, .j(), .i(), .busy
  );

  assign sel      = mask[NOUT-1:0];
  assign res_take = valid && res_valid && ((sel & out_full) == '0);
  assign out_wr   = res_take ? sel : '0;

  always_comb begin
    for (int q = 0; q < NOUT; q++) out_data[q] = res;
  end

endmodule
