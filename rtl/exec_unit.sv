// exec_unit -- computation part of a node: a wrapper around the node's IP
// core.
//
// The wrapper fires the core ('Enable') when the read unit offers a complete
// set of operands, the node's control unit allows it ('run') and the previous
// result has been, or is now being, taken by the write unit. The core's
// 'Ready' marks a new result, which the wrapper keeps valid until the write
// unit takes it. Every core registers its output, so the execution unit adds
// one clock cycle to the data path and no combinational path runs from an
// input FIFO to an output FIFO. One operation can be in flight per node; with
// a result taken every cycle the node fires every cycle.
//
// Cores by node kind: SOBEL -> ip_sobel, ABS -> ip_abs, VSUM -> ip_vsum.
// The remaining three functions are too small for a core of their own and are
// built here with the same registered-output timing: ZERO produces the
// constant 0 (the initial column sum), INIT (ReadTarget) takes the pixel from
// the pixel stream and keeps its PIX_W bits, OUT (WriteVSUMResult) passes the
// final column sum to the result stream.
module exec_unit
  import kpn_pkg::*;
#(
  parameter node_kind_e  KIND = NK_SOBEL,
  parameter int unsigned NARG = n_args(KIND)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   run,
  // operands from the read unit
  input  token_t arg [NARG],
  input  logic   arg_valid,
  output logic   arg_take,
  // result to the write unit
  output token_t res,
  output logic   res_valid,
  input  logic   res_take
);
  logic fire, core_rdy, held;

  assign fire     = run && arg_valid && (!res_valid || res_take);
  assign arg_take = fire;

  generate
    case (KIND)
      NK_SOBEL: begin : g_core
        ip_sobel u_core (.clk, .rst_n, .en(fire), .a(arg), .q(res), .rdy(core_rdy));
      end
      NK_ABS: begin : g_core
        ip_abs u_core (.clk, .rst_n, .en(fire), .a(arg[0]), .q(res), .rdy(core_rdy));
      end
      NK_VSUM: begin : g_core
        ip_vsum u_core (.clk, .rst_n, .en(fire), .a(arg), .q(res), .rdy(core_rdy));
      end
      default: begin : g_core
        token_t q;
        logic   r;
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            q <= '0;
            r <= 1'b0;
          end else begin
            r <= fire;
            if (fire) begin
              case (KIND)
                NK_ZERO: q <= '0;
                NK_INIT: q <= token_t'(arg[0][PIX_W-1:0]);
                default: q <= arg[0];
              endcase
            end
          end
        end
        assign res      = q;
        assign core_rdy = r;
      end
    endcase
  endgenerate

  // A result stays valid from the core's Ready until the write unit takes it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= 1'b0;
    else        held <= (core_rdy || held) && !res_take;
  end
  assign res_valid = core_rdy || held;

endmodule
