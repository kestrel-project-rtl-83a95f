// gauss_blur: 5x5 Gaussian filter kernel (pure combinational datapath).
//
// Takes one 5x5 window of 16-bit gray pixels (from frame_window) and returns
// the blurred centre pixel. Each pixel is multiplied by its weight from the
// 1-4-7-4-1 / 4-16-26-16-4 / 7-26-41-26-7 kernel (sum 273) using shifts and
// adds only: x1, x4, x16 are shifts, x7 = (p<<3) - p, x26 = (p<<4)+(p<<3)+(p<<1),
// x41 = (p<<5)+(p<<3)+p. The 25 products are summed (the sum is 9 bits wider
// than the input). Division by 273 is a multiplication by the 13-bit constant
// 1111000001111b (1/273 ~= that x 2^-21) followed by a right shift.
//
// The description shifts by 13 to obtain an "18b range" result. With 16-bit
// inputs a shift of 13 would leave 25 significant bits, so this design shifts
// by NORM_SHIFT = 19 instead: the output is the normalised pixel times 4
// (two fractional bits) in 18 bits, saturated at 2^18-1 (the constant is a
// hair above 1/273, which can exceed the range by a few counts at full white).
//
// Interface: win (5x5x16), blur (18 bits). No clock: the description runs it
// feed-forward at the slow pixel clock; register around it as needed.
module gauss_blur
  import kestrel_pkg::*;
#(
  parameter int unsigned IN_W       = 16,
  parameter int unsigned OUT_W      = 18,
  parameter int unsigned NORM_SHIFT = 19
) (
  input  logic [4:0][4:0][IN_W-1:0] win,
  output logic [OUT_W-1:0]          blur
);
  localparam int unsigned SW = IN_W + 9;        // weighted-sum width
  localparam int unsigned PWID = SW + 13;       // after the reciprocal multiply

  function automatic logic [SW-1:0] weigh(input logic [IN_W-1:0] p, input int unsigned w);
    logic [SW-1:0] x;
    x = SW'(p);
    case (w)
      1:       return x;
      4:       return x << 2;
      7:       return (x << 3) - x;
      16:      return x << 4;
      26:      return (x << 4) + (x << 3) + (x << 1);
      41:      return (x << 5) + (x << 3) + x;
      default: return SW'(w) * x;
    endcase
  endfunction

  logic [SW-1:0]   sum;
  logic [PWID-1:0] prod;
  logic [PWID-1:0] norm;

  always_comb begin
    sum = '0;
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 5; j++)
        sum += weigh(win[k][j], GAUSS_W[k][j]);
    prod = PWID'(sum) * PWID'(GAUSS_RECIP);
    norm = prod >> NORM_SHIFT;
    blur = (norm > PWID'({OUT_W{1'b1}})) ? {OUT_W{1'b1}} : norm[OUT_W-1:0];
  end
endmodule
