// bayer_gray: Bayer-mosaic to grayscale conversion at a quarter of the pixel rate.
//
// The camera sends raw 10-bit pixels scanline by scanline; even lines
// alternate B,G and odd lines alternate G,R (row 0 is a B/G line, column 0 a
// B or G pixel, as in the sensor's colour-filter map). One scanline buffer
// plus one register on its input and one on its output form a 2x2 moving
// window. On every odd line, at every odd column, the window holds one
// complete B,G / G,R cell and one luminance value is produced:
//     Y = (307*R + 302*G1 + 302*G2 + 113*B) >> 4
// i.e. 0.3 R + 0.295 G1 + 0.295 G2 + 0.11 B of the description in fixed
// point with weights scaled by 1024 (summing to exactly 1024); the >>4 leaves
// the result 64x the input scale, so the 10-bit input becomes a 16-bit output
// (0..65472). A 1920x1080 frame becomes 960x540 gray pixels.
//
// Interface: pix_valid/pix_data/pix_sof (sof marks the first pixel of a
// frame; no back-pressure), gray_valid/gray_data out. gray_valid is a one-cycle
// pulse one clock after the pixel that completes a cell. LINE_W is the raw
// line length. One clock domain with valid strobes stands in for the
// described 100 MHz in / 25 MHz out clock pair (a design choice).
module bayer_gray
  import kestrel_pkg::*;
#(
  parameter int unsigned LINE_W = 1920
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic        pix_sof,
  input  logic [9:0]  pix_data,
  output logic        gray_valid,
  output logic [15:0] gray_data
);
  localparam int unsigned CW = $clog2(LINE_W + 1);

  logic [CW-1:0] col_q;
  logic          row_odd_q;
  logic [CW-1:0] col;
  logic          row_odd;
  logic [9:0]    up, up_prev, cur_prev;
  logic          cell_done;
  logic [20:0]   acc;

  // Position of the incoming pixel.
  always_comb begin
    col     = pix_sof ? '0 : col_q;
    row_odd = pix_sof ? 1'b0 : row_odd_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col_q     <= '0;
      row_odd_q <= 1'b0;
    end else if (pix_valid) begin
      if (col == CW'(LINE_W - 1)) begin
        col_q     <= '0;
        row_odd_q <= ~row_odd;
      end else begin
        col_q     <= col + 1'b1;
        row_odd_q <= row_odd;
      end
    end
  end

  line_buffer #(.WIDTH(10), .DEPTH(LINE_W)) u_lb (
    .clk (clk),
    .rst (rst),
    .en  (pix_valid),
    .din (pix_data),
    .dout(up)
  );

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      cur_prev <= pix_data;
      up_prev  <= up;
    end
  end

  // Window: B = up_prev, G1 = up, G2 = cur_prev, R = pix_data.
  assign cell_done = pix_valid && row_odd && col[0];
  always_comb begin
    acc = 21'(GRAY_KR * pix_data) + 21'(GRAY_KG * up) + 21'(GRAY_KG * cur_prev)
        + 21'(GRAY_KB * up_prev);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gray_valid <= 1'b0;
      gray_data  <= '0;
    end else begin
      gray_valid <= cell_done;
      if (cell_done) gray_data <= acc[19:4];
    end
  end
endmodule
