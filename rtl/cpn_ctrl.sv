// cpn_ctrl -- driver of the network's common control bus.
//
// The host talks to the network through this block. Parameter words
// ('param_valid'/'param_data', Height first, then Width) are forwarded, one
// per cycle, to the shift registers of all units; this may happen at any
// time, also during a run. A run request ('run_req') is remembered and served
// only when no node is running any more: the controller then issues 'update'
// (all units copy their shift registers into their register files at once)
// and, one cycle later, 'start'. So parameters change only between two runs,
// and each new parameter set begins a new run; a run never sees a mix of old
// and new values. Requests made while one is already waiting are merged into
// it (the shift registers hold only the latest set anyway).
//
// Timing: the bus is registered, so a parameter word reaches the shift
// registers one cycle after it is offered. A request seen in cycle t with the
// network idle gives 'update' in t+2 and 'start' in t+3. 'busy' is high from
// the request until the run has completed; 'run_done' pulses for one cycle
// when all nodes have finished. 'req_pending' is high while a request waits
// for its 'update'; the host must not shift in the next parameter set while
// it is high, nor in the cycle in which it raises 'run_req', or the waiting
// request would run with the new values.
module cpn_ctrl
  import kpn_pkg::*;
#(
  parameter int unsigned NNODES = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic              param_valid,
  input  param_t            param_data,
  input  logic              run_req,
  output logic              busy,
  output logic              req_pending,
  output logic              run_done,
  // network side
  output ctrl_bus_t         cb,
  input  logic [NNODES-1:0] node_running
);
  typedef enum logic [1:0] {S_IDLE, S_UPDATE, S_START, S_RUN} state_e;
  state_e state;
  logic   pending, shift_q;
  param_t data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pending  <= 1'b0;
      shift_q  <= 1'b0;
      data_q   <= '0;
      run_done <= 1'b0;
    end else begin
      shift_q  <= param_valid;
      if (param_valid) data_q <= param_data;
      run_done <= 1'b0;
      if (run_req) pending <= 1'b1;
      case (state)
        S_IDLE: if (pending && node_running == '0) begin
                  state   <= S_UPDATE;
                  pending <= run_req;   // a request in this very cycle waits
                end
        S_UPDATE: state <= S_START;
        S_START:  state <= S_RUN;
        S_RUN:    if (node_running == '0) begin
                    state    <= S_IDLE;
                    run_done <= 1'b1;
                  end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign cb.shift  = shift_q;
  assign cb.data   = data_q;
  assign cb.update = (state == S_UPDATE);
  assign cb.start  = (state == S_START);
  assign busy        = pending || (state != S_IDLE);
  assign req_pending = pending;

endmodule
