// kpn2_edge_detect -- parameterized process network for the vertical edge
// detection of a rectangular target (the edge-detection part of a low-speed
// obstacle-detection application), in hardware.
//
// For a target of Height x Width pixels the network computes, for every
// column i, the sum over the rows j of |Sobel_x| at pixel (j,i) of the target
// interior; the host supplies the target with a one-pixel border, i.e.
// (Height+2) x (Width+2) pixels in row-major order, and receives Width column
// sums. Height and Width are run-time parameters that may differ from run to
// run.
//
// Structure: six nodes joined by eleven FIFO channels,
//   INIT  --ED_1..ED_6--> SOBEL --ED_7--> ABS --ED_10--> VSUM --ED_11--> OUT
//   ZERO  --ED_9--> VSUM,   VSUM --ED_8--> VSUM (partial column sums)
// plus the control-bus controller. Each node runs its own local schedule
// (no global scheduler); blocking reads on empty channels and blocking writes
// on full channels give the data-driven, deterministic behaviour of a Kahn
// process network.
//
// Host protocol: shift in Height and then Width ('param_valid'/'param_data';
// allowed at any time, also during a run, except while 'req_pending' is high
// and in the cycle of 'run_req'), then raise 'run_req' for one cycle. The run
// starts as soon as the previous run has completed. Stream the pixels on 'pix_*'
// (valid/ready; 'pix_ready' depends on 'pix_valid') and collect the results
// on 'res_*' (valid/ready; 'res_valid' depends on 'res_ready'). 'run_done'
// pulses when the run is complete.
//
// Parameters must satisfy 1 <= Height, Width and the channel sizes must fit
// the target: FIFO_DEPTH >= 2*Width + 3 (the first Sobel operand channel must
// hold two rows and three pixels before SOBEL can fire) and FIFO_DEPTH >=
// Width (the loop channel ED_8 holds one row of partial sums). With the
// default 512-word channels Width may be up to 254.
module kpn2_edge_detect
  import kpn_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  // host: parameters and run control
  input  logic               param_valid,
  input  logic [PARAM_W-1:0] param_data,
  input  logic               run_req,
  output logic               busy,
  output logic               req_pending,
  output logic               run_done,
  // target pixels in
  input  logic               pix_valid,
  input  logic [PIX_W-1:0]   pix_data,
  output logic               pix_ready,
  // column sums out
  output logic               res_valid,
  output logic [TOKEN_W-1:0] res_data,
  input  logic               res_ready
);
  localparam int unsigned NED = 11;

  ctrl_bus_t cb;
  logic [5:0] node_running;

  // channel ED_e uses index e-1
  logic            ed_wr    [NED];
  token_t          ed_wdata [NED];
  logic            ed_full  [NED];
  logic            ed_rd    [NED];
  token_t          ed_rdata [NED];
  logic            ed_empty [NED];

  for (genvar e = 0; e < NED; e++) begin : g_ed
    kpn_fifo #(.WIDTH(TOKEN_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr(ed_wr[e]), .wr_data(ed_wdata[e]), .full(ed_full[e]),
      .rd(ed_rd[e]), .rd_data(ed_rdata[e]), .empty(ed_empty[e])
    );
  end

  cpn_ctrl #(.NNODES(6)) u_cpn_ctrl (
    .clk, .rst_n,
    .param_valid, .param_data, .run_req, .busy, .req_pending, .run_done,
    .cb, .node_running
  );

  // ---------------- INIT (PS_1): pixel stream -> ED_1..ED_6 ----------------
  token_t         init_in  [1];
  logic [0:0]     init_rd;
  token_t         init_out [6];
  logic [5:0]     init_wr, init_full;

  assign init_in[0] = token_t'(pix_data);
  assign pix_ready  = init_rd[0];
  for (genvar k = 0; k < 6; k++) begin : g_init_out
    assign ed_wr[k]    = init_wr[k];
    assign ed_wdata[k] = init_out[k];
    assign init_full[k] = ed_full[k];
  end

  kpn_node #(.KIND(NK_INIT)) u_init (
    .clk, .rst_n, .cb,
    .in_data(init_in), .in_empty(~pix_valid), .in_read(init_rd),
    .out_data(init_out), .out_wr(init_wr), .out_full(init_full),
    .running(node_running[0]), .done()
  );

  // ---------------- ZERO (PS_2): -> ED_9 ----------------
  token_t     zero_in [1];
  logic [0:0] zero_rd;
  token_t     zero_out [1];
  logic [0:0] zero_wr;

  assign zero_in[0] = '0;   // ZERO has no input channel; its schedule never reads
  assign ed_wr[8]    = zero_wr[0];
  assign ed_wdata[8] = zero_out[0];

  kpn_node #(.KIND(NK_ZERO)) u_zero (
    .clk, .rst_n, .cb,
    .in_data(zero_in), .in_empty(1'b1), .in_read(zero_rd),
    .out_data(zero_out), .out_wr(zero_wr), .out_full(ed_full[8]),
    .running(node_running[1]), .done()
  );

  // ---------------- SOBEL (PS_3): ED_1..ED_6 -> ED_7 ----------------
  token_t     sobel_in [6];
  logic [5:0] sobel_empty, sobel_rd;
  token_t     sobel_out [1];
  logic [0:0] sobel_wr;

  for (genvar k = 0; k < 6; k++) begin : g_sobel_in
    assign sobel_in[k]    = ed_rdata[k];
    assign sobel_empty[k] = ed_empty[k];
    assign ed_rd[k]       = sobel_rd[k];
  end
  assign ed_wr[6]    = sobel_wr[0];
  assign ed_wdata[6] = sobel_out[0];

  kpn_node #(.KIND(NK_SOBEL)) u_sobel (
    .clk, .rst_n, .cb,
    .in_data(sobel_in), .in_empty(sobel_empty), .in_read(sobel_rd),
    .out_data(sobel_out), .out_wr(sobel_wr), .out_full(ed_full[6]),
    .running(node_running[2]), .done()
  );

  // ---------------- ABS (PS_4): ED_7 -> ED_10 ----------------
  token_t     abs_in [1];
  logic [0:0] abs_rd;
  token_t     abs_out [1];
  logic [0:0] abs_wr;

  assign abs_in[0]   = ed_rdata[6];
  assign ed_rd[6]    = abs_rd[0];
  assign ed_wr[9]    = abs_wr[0];
  assign ed_wdata[9] = abs_out[0];

  kpn_node #(.KIND(NK_ABS)) u_abs (
    .clk, .rst_n, .cb,
    .in_data(abs_in), .in_empty(ed_empty[6]), .in_read(abs_rd),
    .out_data(abs_out), .out_wr(abs_wr), .out_full(ed_full[9]),
    .running(node_running[3]), .done()
  );

  // ---------------- VSUM (PS_5): ED_9, ED_8, ED_10 -> ED_8, ED_11 ----------------
  token_t     vsum_in [3];
  logic [2:0] vsum_empty, vsum_rd;
  token_t     vsum_out [2];
  logic [1:0] vsum_wr, vsum_full;

  assign vsum_in[0] = ed_rdata[8];  assign vsum_empty[0] = ed_empty[8];  assign ed_rd[8] = vsum_rd[0];
  assign vsum_in[1] = ed_rdata[7];  assign vsum_empty[1] = ed_empty[7];  assign ed_rd[7] = vsum_rd[1];
  assign vsum_in[2] = ed_rdata[9];  assign vsum_empty[2] = ed_empty[9];  assign ed_rd[9] = vsum_rd[2];
  assign ed_wr[7]  = vsum_wr[0];  assign ed_wdata[7]  = vsum_out[0];  assign vsum_full[0] = ed_full[7];
  assign ed_wr[10] = vsum_wr[1];  assign ed_wdata[10] = vsum_out[1];  assign vsum_full[1] = ed_full[10];

  kpn_node #(.KIND(NK_VSUM)) u_vsum (
    .clk, .rst_n, .cb,
    .in_data(vsum_in), .in_empty(vsum_empty), .in_read(vsum_rd),
    .out_data(vsum_out), .out_wr(vsum_wr), .out_full(vsum_full),
    .running(node_running[4]), .done()
  );

  // ---------------- OUT (PS_6): ED_11 -> result stream ----------------
  token_t     out_in [1];
  logic [0:0] out_rd;
  token_t     out_out [1];
  logic [0:0] out_wr;

  assign out_in[0]    = ed_rdata[10];
  assign ed_rd[10]    = out_rd[0];
  assign res_valid    = out_wr[0];
  assign res_data     = out_out[0];

  kpn_node #(.KIND(NK_OUT)) u_out (
    .clk, .rst_n, .cb,
    .in_data(out_in), .in_empty(ed_empty[10]), .in_read(out_rd),
    .out_data(out_out), .out_wr(out_wr), .out_full(~res_ready),
    .running(node_running[5]), .done()
  );

endmodule
