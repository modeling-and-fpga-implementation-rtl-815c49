// ctrl_unit -- control part of a node.
//
// It keeps the node's run state and makes the other three units work
// together: a 'start' from the control bus is passed to the read and write
// units (restarting their schedule pipelines with the newly loaded
// parameters) only while the node is idle; the execution unit may fire only
// while the node runs; and the node's run ends when both schedule pipelines
// have finished and no result is left in the execution unit. 'running' is
// high from the cycle after the accepted start to the cycle in which the last
// result has been written; 'done' pulses for one cycle at that end.
// A start that arrives while the node runs is a protocol error (the network
// controller never sends one) and is ignored.
module ctrl_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic rd_busy,
  input  logic wr_busy,
  input  logic res_valid,
  output logic unit_start,
  output logic exec_run,
  output logic running,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN} state_e;
  state_e state;

  assign unit_start = start && (state == S_IDLE);
  assign exec_run   = (state == S_RUN);
  assign running    = (state == S_RUN);

  logic finished;
  assign finished = (state == S_RUN) && !rd_busy && !wr_busy && !res_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) state <= S_RUN;
        S_RUN:  if (finished) begin
                  state <= S_IDLE;
                  done  <= 1'b1;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("ctrl_unit: start while running");

endmodule
