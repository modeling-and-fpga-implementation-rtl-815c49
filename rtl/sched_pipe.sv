// sched_pipe -- three-stage control pipeline holding a node's local schedule.
//
// Each read unit and each write unit of a node owns one. It walks the node's
// iteration space (a two-level loop nest whose bounds depend on the run-time
// parameters h = Height and w = Width) and, for every iteration, delivers the
// mask of channel ports to use:
//
//   stage 1  iteration counter (j,i)
//   stage 2  registered (j,i)
//   stage 3  registered port-select mask, computed from stage 2 with the
//            schedule functions of kpn_pkg (read or write side by IS_READ)
//
// The stages form an elastic pipeline: an entry moves on whenever the next
// stage is empty or is being emptied, and stage 3 is emptied by 'advance'
// (the unit completed that iteration's read or write). Because the schedule
// does not depend on data, all pipelines of the network fill in parallel right
// after 'start', so the pipeline adds its three cycles once per run, not once
// per node. 'start' loads the counter from the current h and w and flushes the
// pipeline. 'busy' is high from the cycle after 'start' until the last
// iteration has left stage 3. The document fixes the three stages; how the
// work is split among them is this design's choice.
module sched_pipe
  import kpn_pkg::*;
#(
  parameter node_kind_e KIND    = NK_SOBEL,
  parameter bit         IS_READ = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  param_t     h,
  input  param_t     w,
  input  logic       advance,
  output logic       valid,     // stage 3 holds an iteration
  output port_mask_t mask,      // ports to use in that iteration
  output idx_t       j,         // that iteration's indices
  output idx_t       i,
  output logic       busy
);
  bounds_t b;
  assign b = node_bounds(KIND, h, w);

  // stage 1
  logic c_valid;
  idx_t cj, ci;
  // stage 2
  logic v2;
  idx_t j2, i2;
  // stage 3
  logic v3;
  idx_t j3, i3;
  port_mask_t m3;

  logic s3_free, s2_move, s2_free, s1_move;

  assign s3_free = !v3 || advance;
  assign s2_move = v2 && s3_free;
  assign s2_free = !v2 || s2_move;
  assign s1_move = c_valid && s2_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0;
      cj <= '0; ci <= '0;
      v2 <= 1'b0; j2 <= '0; i2 <= '0;
      v3 <= 1'b0; j3 <= '0; i3 <= '0; m3 <= '0;
    end else if (start) begin
      c_valid <= 1'b1;
      cj <= b.j_lo;
      ci <= b.i_lo;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      // stage 1: loop counter
      if (s1_move) begin
        if (ci == b.i_hi) begin
          ci <= b.i_lo;
          if (cj == b.j_hi) c_valid <= 1'b0;
          else              cj <= cj + 1'b1;
        end else begin
          ci <= ci + 1'b1;
        end
      end
      // stage 2
      if (s1_move) begin
        v2 <= 1'b1; j2 <= cj; i2 <= ci;
      end else if (s2_move) begin
        v2 <= 1'b0;
      end
      // stage 3
      if (s2_move) begin
        v3 <= 1'b1; j3 <= j2; i3 <= i2;
        m3 <= IS_READ ? read_sel(KIND, j2)
                      : write_sel(KIND, j2, i2, h, w);
      end else if (advance) begin
        v3 <= 1'b0;
      end
    end
  end

  assign valid = v3;
  assign mask  = m3;
  assign j     = j3;
  assign i     = i3;
  assign busy  = c_valid || v2 || v3;

  a_advance_valid: assert property (@(posedge clk) disable iff (!rst_n) advance |-> v3)
    else $error("sched_pipe: advance without iteration");

endmodule
