// kpn_node -- one process of the network in hardware.
//
// A node has three parts: communication (read unit and write unit),
// computation (execution unit wrapping the IP core) and control (control
// unit). KIND selects the process: its iteration space, its local schedules
// and its core (see kpn_pkg). Input channels are read through Empty/Read,
// output channels written through Write/Full; all units receive the common
// control bus. Read and write sides run their schedules independently; the
// only coupling is the one result register of the execution unit.
//
// Timing: 'start' on the control bus while the node is idle starts a run
// with the parameters loaded by the last 'update'. Three cycles later the
// first iteration is in both schedule pipelines; with operands available and
// room in the outputs the node then fires once per cycle. 'running' stays
// high until the last result of the run has been written; 'done' pulses
// once then.
module kpn_node
  import kpn_pkg::*;
#(
  parameter node_kind_e  KIND = NK_SOBEL,
  parameter int unsigned NIN  = n_in(KIND),
  parameter int unsigned NOUT = n_out(KIND),
  parameter int unsigned NARG = n_args(KIND)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_bus_t       cb,
  // input channels
  input  token_t          in_data [NIN],
  input  logic [NIN-1:0]  in_empty,
  output logic [NIN-1:0]  in_read,
  // output channels
  output token_t          out_data [NOUT],
  output logic [NOUT-1:0] out_wr,
  input  logic [NOUT-1:0] out_full,
  // status
  output logic            running,
  output logic            done
);
  token_t arg [NARG];
  token_t res;
  logic   arg_valid, arg_take, res_valid, res_take;
  logic   rd_busy, wr_busy, unit_start, exec_run;

  ctrl_unit u_ctrl (
    .clk, .rst_n, .start(cb.start), .rd_busy, .wr_busy, .res_valid,
    .unit_start, .exec_run, .running, .done
  );

  read_unit #(.KIND(KIND), .NIN(NIN), .NARG(NARG)) u_read (
    .clk, .rst_n, .cb, .start(unit_start),
    .in_data, .in_empty, .in_read,
    .arg, .arg_valid, .arg_take, .busy(rd_busy)
  );

  exec_unit #(.KIND(KIND), .NARG(NARG)) u_exec (
    .clk, .rst_n, .run(exec_run),
    .arg, .arg_valid, .arg_take,
    .res, .res_valid, .res_take
  );

  write_unit #(.KIND(KIND), .NOUT(NOUT)) u_write (
    .clk, .rst_n, .cb, .start(unit_start),
    .res, .res_valid, .res_take,
    .out_data, .out_wr, .out_full, .busy(wr_busy)
  );

endmodule
