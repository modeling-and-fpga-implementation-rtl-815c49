// kpn_pkg -- shared types, sizes and local schedules of the parameterized
// edge-detection process network (KPN2).
//
// The network has six processes (nodes). Each node fires once per point of
// its own iteration space, which is a function of the two run-time parameters
// Height and Width. The local schedule of a node says, for every iteration
// (j,i), from which input channels its read unit takes a token and to which
// output channels its write unit stores the result. Those schedules follow
// the nested-loop program of the edge detector:
//
//   INIT : j=0..H+1, i=0..W+1   read pixel p(j,i) from the pixel stream
//   ZERO : i=0..W-1             produce the initial column sum 0
//   SOBEL: j=1..H,   i=1..W     s = sobel(p(j-1,i-1), p(j-1,i+1), p(j,i-1),
//                                         p(j,i+1), p(j+1,i-1), p(j+1,i+1))
//   ABS  : j=1..H,   i=1..W     a = |s|
//   VSUM : j=0..H-1, i=0..W-1   v(i) = v(i) + a(j,i), v(i) from ZERO at j=0
//                               and from its own previous row otherwise
//   OUT  : i=0..W-1             emit v(i)
//
// Channel numbering ED_1..ED_11 and which node each joins follow the
// network graph of the design; the exact conditions below are derived from
// the index expressions of the program (ED_k carries argument k of SOBEL for
// k=1..6). Everything here is combinational and only used at elaboration or
// inside the read/write units' control pipelines.
package kpn_pkg;

  // Token: one value carried by a channel. The FIFO memories are 32 bits wide.
  parameter int unsigned TOKEN_W  = 32;
  // Pixel width of the grey-level input image.
  parameter int unsigned PIX_W    = 8;
  // Width of one parameter word on the control bus (Height or Width).
  parameter int unsigned PARAM_W  = 16;
  // Number of parameters held by every unit: P1 = Height, P2 = Width.
  parameter int unsigned NUM_PARAMS = 2;
  // Largest number of channel ports on one side of a node (SOBEL reads 6,
  // INIT writes 6).
  parameter int unsigned MAX_PORTS = 6;

  typedef logic [TOKEN_W-1:0]   token_t;
  typedef logic [PARAM_W-1:0]   param_t;
  typedef logic [MAX_PORTS-1:0] port_mask_t;
  // Iteration counters need one bit more than a parameter (loops run to H+1).
  typedef logic [PARAM_W:0]     idx_t;

  typedef enum logic [2:0] {
    NK_INIT  = 3'd0,   // PS_1, ReadTarget
    NK_ZERO  = 3'd1,   // PS_2, ZERO
    NK_SOBEL = 3'd2,   // PS_3, SOBEL
    NK_ABS   = 3'd3,   // PS_4, ABS_F
    NK_VSUM  = 3'd4,   // PS_5, VSUM
    NK_OUT   = 3'd5    // PS_6, WriteVSUMResult
  } node_kind_e;

  // The common control bus. 'shift' moves 'data' into every unit's parameter
  // shift register; 'update' copies all shift registers to the register files
  // in parallel; 'start' begins a run with the register-file values.
  typedef struct packed {
    logic   shift;
    param_t data;
    logic   update;
    logic   start;
  } ctrl_bus_t;

  // Bounds of a two-level loop nest (inclusive).
  typedef struct packed {
    idx_t j_lo;
    idx_t j_hi;
    idx_t i_lo;
    idx_t i_hi;
  } bounds_t;

  // Number of input-channel ports of a node. INIT's one input is the
  // external pixel stream; ZERO has no input, one port is kept so that the
  // arrays are never empty and its select mask is always zero.
  function automatic int unsigned n_in(node_kind_e k);
    case (k)
      NK_SOBEL: return 6;
      NK_VSUM:  return 3;   // 0: ED_9 (ZERO), 1: ED_8 (own loop), 2: ED_10 (ABS)
      default:  return 1;
    endcase
  endfunction

  // Number of output-channel ports. OUT's one output is the external result
  // stream.
  function automatic int unsigned n_out(node_kind_e k);
    case (k)
      NK_INIT:  return 6;   // ED_1 .. ED_6
      NK_VSUM:  return 2;   // 0: ED_8 (own loop), 1: ED_11 (OUT)
      default:  return 1;
    endcase
  endfunction

  // Number of operands of the node's function.
  function automatic int unsigned n_args(node_kind_e k);
    case (k)
      NK_SOBEL: return 6;
      NK_VSUM:  return 2;
      default:  return 1;
    endcase
  endfunction

  // Which operand an input port feeds.
  function automatic int unsigned arg_of_port(node_kind_e k, int unsigned p);
    case (k)
      NK_SOBEL: return p;
      NK_VSUM:  return (p == 2) ? 1 : 0;
      default:  return 0;
    endcase
  endfunction

  // Iteration space of a node for parameters h (Height) and w (Width).
  function automatic bounds_t node_bounds(node_kind_e k, param_t h, param_t w);
    bounds_t b;
    idx_t hh, ww;
    hh = idx_t'(h);
    ww = idx_t'(w);
    case (k)
      NK_INIT:          b = '{j_lo: '0, j_hi: hh + 1, i_lo: '0, i_hi: ww + 1};
      NK_SOBEL, NK_ABS: b = '{j_lo: 1,  j_hi: hh,     i_lo: 1,  i_hi: ww};
      NK_VSUM:          b = '{j_lo: '0, j_hi: hh - 1, i_lo: '0, i_hi: ww - 1};
      default:          b = '{j_lo: '0, j_hi: '0,     i_lo: '0, i_hi: ww - 1};
    endcase
    return b;
  endfunction

  // Input ports read in row j of the iteration space.
  function automatic port_mask_t read_sel(node_kind_e k, idx_t j);
    port_mask_t m;
    m = '0;
    case (k)
      NK_INIT, NK_ABS, NK_OUT: m[0] = 1'b1;
      NK_SOBEL:                m[5:0] = 6'b11_1111;
      NK_VSUM: begin
        m[0] = (j == 0);        // first row: initial sum from ZERO
        m[1] = (j != 0);        // later rows: partial sum from own loop
        m[2] = 1'b1;            // pixel from ABS
      end
      default: m = '0;          // ZERO reads nothing
    endcase
    return m;
  endfunction

  // Output ports written at iteration (j,i).
  function automatic port_mask_t write_sel(node_kind_e k, idx_t j, idx_t i,
                                           param_t h, param_t w);
    port_mask_t m;
    idx_t hh, ww;
    hh = idx_t'(h);
    ww = idx_t'(w);
    m  = '0;
    case (k)
      NK_INIT: begin
        // p(j,i) is SOBEL argument k at SOBEL iteration (js,is), 1<=js<=H,
        // 1<=is<=W, where (js,is) = (j+1,i+1), (j+1,i-1), (j,i+1), (j,i-1),
        // (j-1,i+1), (j-1,i-1) for k = 1..6.
        m[0] = (j + 1 <= hh)           && (i + 1 <= ww);
        m[1] = (j + 1 <= hh)           && (i >= 2);
        m[2] = (j >= 1) && (j <= hh)   && (i + 1 <= ww);
        m[3] = (j >= 1) && (j <= hh)   && (i >= 2);
        m[4] = (j >= 2)                && (i + 1 <= ww);
        m[5] = (j >= 2)                && (i >= 2);
      end
      NK_VSUM: begin
        m[0] = (j + 1 <  hh);   // not last row: back to own loop (ED_8)
        m[1] = (j + 1 == hh);   // last row: final column sum to OUT (ED_11)
      end
      default: m[0] = 1'b1;
    endcase
    return m;
  endfunction

endpackage
