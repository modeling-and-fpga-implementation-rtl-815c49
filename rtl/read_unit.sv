// read_unit -- communication part of a node, input side.
//
// At every iteration of the node's local schedule the read unit takes one
// token from each input channel the schedule selects, and hands the tokens to
// the execution unit as the operands of the node's function. Which channel
// feeds which operand is fixed per node kind (kpn_pkg::arg_of_port); for VSUM
// the first operand comes from ZERO in the first row and from the node's own
// loop channel afterwards.
//
// Blocking read: operands are offered ('arg_valid') only when the schedule
// pipeline holds an iteration and none of its selected channels is empty. The
// tokens are taken, and the FIFOs popped ('in_read'), in the cycle the
// execution unit accepts them ('arg_take'). The operands are the FIFO outputs
// themselves (fall-through FIFOs), so reading adds no latency to the data
// path. The unit keeps its own copy of the parameters (param_buffer) and its
// own three-stage schedule pipeline (sched_pipe); 'start' comes from the
// node's control unit.
module read_unit
  import kpn_pkg::*;
#(
  parameter node_kind_e  KIND = NK_SOBEL,
  parameter int unsigned NIN  = n_in(KIND),
  parameter int unsigned NARG = n_args(KIND)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_bus_t       cb,
  input  logic            start,
  // input channels
  input  token_t          in_data [NIN],
  input  logic [NIN-1:0]  in_empty,
  output logic [NIN-1:0]  in_read,
  // operands to the execution unit
  output token_t          arg [NARG],
  output logic            arg_valid,
  input  logic            arg_take,
  output logic            busy
);
  param_t     p [NUM_PARAMS];
  port_mask_t mask;
  logic       valid;
  logic [NIN-1:0] sel;

  param_buffer #(.PW(PARAM_W), .NUM(NUM_PARAMS)) u_params (
    .clk, .rst_n, .shift(cb.shift), .data(cb.data), .update(cb.update), .p
  );

  sched_pipe #(.KIND(KIND), .IS_READ(1'b1)) u_sched (
    .clk, .rst_n, .start, .h(p[0]), .w(p[1]),
    .advance(arg_valid && arg_take),
    .valid, .mask, .j(), .i(), .busy
  );

  assign sel       = mask[NIN-1:0];
  assign arg_valid = valid && ((sel & in_empty) == '0);
  assign in_read   = (arg_valid && arg_take) ? sel : '0;

  always_comb begin
    for (int a = 0; a < NARG; a++) arg[a] = '0;
    for (int q = 0; q < NIN; q++) begin
      if (sel[q]) arg[arg_of_port(KIND, q)] = arg[arg_of_port(KIND, q)] | in_data[q];
    end
  end

endmodule
