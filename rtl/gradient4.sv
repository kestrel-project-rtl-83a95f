// gradient4: four-direction gradient of a 5x5 window (combinational).
//
// For each of the four lines of five pixels through the window centre
// (horizontal, vertical, the top-left/bottom-right diagonal and the
// top-right/bottom-left diagonal) the gradient is found as the description
// gives it: locate the largest of the five pixels; if it is one of the two
// on the left (line start), subtract the minimum of the centre and the two on
// the right; if one of the two on the right, subtract the minimum of the
// centre and the two on the left; if it is the centre, subtract the minimum of
// the other four. Ties pick the earliest position (design choice). Each
// difference is truncated to its top 9 bits (drop IN_W-9 low bits), so the
// 18-bit blurred pixel becomes a 36-bit vector of four gradients.
//
// Interface: win[k][j] (row k, column j, [2][2] centre), grad[d] with
// d = kestrel_pkg::grad_dir_e (0 H, 1 V, 2 diagonal, 3 anti-diagonal).
module gradient4
  import kestrel_pkg::*;
#(
  parameter int unsigned IN_W = 18,
  parameter int unsigned G_W  = 9
) (
  input  logic [4:0][4:0][IN_W-1:0] win,
  output logic [3:0][G_W-1:0]       grad
);
  function automatic logic [G_W-1:0] line_grad(input logic [4:0][IN_W-1:0] p);
    logic [IN_W-1:0] mx, mn, d;
    int unsigned     pos;
    mx  = p[0];
    pos = 0;
    for (int i = 1; i < 5; i++) begin
      if (p[i] > mx) begin
        mx  = p[i];
        pos = i;
      end
    end
    if (pos < 2) begin
      mn = p[2];
      if (p[3] < mn) mn = p[3];
      if (p[4] < mn) mn = p[4];
    end else if (pos > 2) begin
      mn = p[2];
      if (p[0] < mn) mn = p[0];
      if (p[1] < mn) mn = p[1];
    end else begin
      mn = p[0];
      if (p[1] < mn) mn = p[1];
      if (p[3] < mn) mn = p[3];
      if (p[4] < mn) mn = p[4];
    end
    d = mx - mn;
    return d[IN_W-1 -: G_W];
  endfunction

  always_comb begin
    logic [4:0][IN_W-1:0] lh, lv, ld, la;
    for (int i = 0; i < 5; i++) begin
      lh[i] = win[2][i];
      lv[i] = win[i][2];
      ld[i] = win[i][i];
      la[i] = win[i][4-i];
    end
    grad[DIR_H]    = line_grad(lh);
    grad[DIR_V]    = line_grad(lv);
    grad[DIR_DIAG] = line_grad(ld);
    grad[DIR_ANTI] = line_grad(la);
  end
endmodule
