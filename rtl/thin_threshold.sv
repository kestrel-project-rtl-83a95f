// thin_threshold: edge thinning and thresholding of a 5x5 gradient window.
//
// Input is a 5x5 window whose elements are the four 9-bit directional
// gradients of each pixel. For each direction d, the five gradients g_d along
// the line of direction d through the centre are examined: if the centre's
// g_d is not the largest of the five (ties count as largest) the pixel is not
// an edge in that direction; if it is, the five g_d are summed and the pixel
// is an edge in that direction when the sum exceeds `threshold`. The pixel is
// an edge if it is one in any direction. This is the description's
// thinning/threshold step; taking the neighbours along the same line as the
// gradient is this design's reading of it.
//
// Interface: win[k][j][d] (row, column, direction), threshold (12 bits, from a
// control register), edge_o (1 bit). Combinational.
module thin_threshold
  import kestrel_pkg::*;
#(
  parameter int unsigned G_W = 9
) (
  input  logic [4:0][4:0][3:0][G_W-1:0] win,
  input  logic [G_W+2:0]                threshold,
  output logic                          edge_o
);
  function automatic logic dir_edge(input logic [4:0][G_W-1:0] g,
                                    input logic [G_W+2:0] thr);
    logic          is_max;
    logic [G_W+2:0] sum;
    is_max = 1'b1;
    sum    = '0;
    for (int i = 0; i < 5; i++) begin
      if (i != 2 && g[i] > g[2]) is_max = 1'b0;
      sum += (G_W+3)'(g[i]);
    end
    return is_max && (sum > thr);
  endfunction

  always_comb begin
    logic [4:0][G_W-1:0] lh, lv, ld, la;
    for (int i = 0; i < 5; i++) begin
      lh[i] = win[2][i][DIR_H];
      lv[i] = win[i][2][DIR_V];
      ld[i] = win[i][i][DIR_DIAG];
      la[i] = win[i][4-i][DIR_ANTI];
    end
    edge_o = dir_edge(lh, threshold) || dir_edge(lv, threshold)
          || dir_edge(ld, threshold) || dir_edge(la, threshold);
  end
endmodule
