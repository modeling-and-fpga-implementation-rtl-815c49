// edge_ref_pkg -- reference model of the edge-detection network for the
// testbenches, written directly from the loop program (not from the RTL):
// for every column i = 1..W of a (H+2) x (W+2) target,
//   out(i-1) = sum_{j=1..H} | (p(j-1,i+1) + 2 p(j,i+1) + p(j+1,i+1))
//                           - (p(j-1,i-1) + 2 p(j,i-1) + p(j+1,i-1)) |
// Images are generated from a seed so that no data files are needed.
package edge_ref_pkg;

  parameter int MAXD = 260;   // largest target side + border the testbenches use

  typedef byte unsigned img_t [MAXD][MAXD];

  // Fill p with (h+2) x (w+2) pixels. mode 0: random; mode 1: vertical bars
  // (strong vertical edges); mode 2: smooth ramp.
  function automatic void make_image(ref img_t p, input int h, input int w,
                                     input int mode);
    for (int j = 0; j < h + 2; j++)
      for (int i = 0; i < w + 2; i++)
        case (mode)
          0:       p[j][i] = byte'($urandom_range(0, 255));
          1:       p[j][i] = ((i / 3) % 2 == 1) ? 8'd250 : 8'd5;
          default: p[j][i] = byte'((i * 7 + j * 3) % 256);
        endcase
  endfunction

  function automatic int unsigned col_sum(ref img_t p, input int h, input int c);
    int unsigned s;
    int g;
    s = 0;
    for (int j = 1; j <= h; j++) begin
      g = (int'(p[j-1][c+1]) + 2 * int'(p[j][c+1]) + int'(p[j+1][c+1]))
        - (int'(p[j-1][c-1]) + 2 * int'(p[j][c-1]) + int'(p[j+1][c-1]));
      s += (g < 0) ? -g : g;
    end
    return s;
  endfunction

  // Clock cycles the document gives for one N x M target: N(2M+1)+12.
  function automatic int unsigned doc_cycles(int n, int m);
    return n * (2 * m + 1) + 12;
  endfunction

endpackage
