// edge_pipeline: one camera channel's edge detector (a simplified Canny).
//
// Raw Bayer pixels go through four passes, each a streaming stage:
//   bayer_gray      2x2 Bayer cell -> 16-bit luminance (RAW_W x RAW_H in,
//                   quarter size out)
//   frame_window    5x5 window of gray pixels  -> gauss_blur     (18-bit)
//   frame_window    5x5 window of blurred      -> gradient4      (4 x 9 bits)
//   frame_window    5x5 window of gradients    -> thin_threshold (1 bit)
//   edge_packer     bits -> 32-bit words, each line padded to 8-word groups
// The kernels are combinational between the window registers, one stage per
// pass; valid/ready links the windows so the padding steps that replicate
// frame edges can stall the stage before. The grayscale stage cannot be
// stalled (the camera does not wait): its output is at most one pixel every
// other clock on odd lines and none on even lines, which leaves room for the
// padding of the next stage, but the frame's final padding lines need the
// camera's vertical blanking. A gray pixel refused by the first window sets the
// sticky `overflow` flag.
//
// Line storage at 1080p follows the description's budget: 1 raw line for
// the grayscale cell, 4 lines each of 16/18-bit pixels for the blur and the
// gradient, and 4 lines of 36-bit gradient vectors for thinning.
//
// Interface: camera stream in; word stream with byte addresses out (to an
// AXI burst writer); threshold and base address from control registers.
// stall_count counts clocks in which a window refused a ready upstream pixel.
module edge_pipeline #(
  parameter int unsigned RAW_W = 1920,
  parameter int unsigned RAW_H = 1080
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic        pix_sof,
  input  logic [9:0]  pix_data,
  input  logic [11:0] threshold,
  input  logic [31:0] base,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_addr,
  output logic [31:0] out_data,
  output logic        frame_done,
  output logic        overflow,
  output logic [31:0] stall_count
);
  localparam int unsigned IMG_W = RAW_W / 2;
  localparam int unsigned IMG_H = RAW_H / 2;

  logic        gray_valid;
  logic [15:0] gray_data;

  logic                      w1_in_ready, w1_valid, w1_ready, w1_last;
  logic [4:0][4:0][15:0]     w1_win;
  logic [17:0]               blur;

  logic                      w2_valid, w2_ready, w2_last;
  logic [4:0][4:0][17:0]     w2_win;
  logic [3:0][8:0]           grad;

  logic                      w3_valid, w3_ready, w3_last;
  logic [4:0][4:0][35:0]     w3_win;
  logic                      edge_bit;

  bayer_gray #(.LINE_W(RAW_W)) u_gray (
    .clk, .rst, .pix_valid, .pix_sof, .pix_data,
    .gray_valid, .gray_data
  );

  frame_window #(.PW(16), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_blur (
    .clk, .rst,
    .in_valid (gray_valid), .in_ready(w1_in_ready), .in_data(gray_data),
    .out_valid(w1_valid), .out_ready(w1_ready), .out_win(w1_win), .out_last(w1_last)
  );

  gauss_blur u_blur (.win(w1_win), .blur(blur));

  frame_window #(.PW(18), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_grad (
    .clk, .rst,
    .in_valid (w1_valid), .in_ready(w1_ready), .in_data(blur),
    .out_valid(w2_valid), .out_ready(w2_ready), .out_win(w2_win), .out_last(w2_last)
  );

  gradient4 u_grad (.win(w2_win), .grad(grad));

  frame_window #(.PW(36), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_win_thin (
    .clk, .rst,
    .in_valid (w2_valid), .in_ready(w2_ready), .in_data(grad),
    .out_valid(w3_valid), .out_ready(w3_ready), .out_win(w3_win), .out_last(w3_last)
  );

  thin_threshold u_thin (.win(w3_win), .threshold(threshold), .edge_o(edge_bit));

  edge_packer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_pack (
    .clk, .rst, .base,
    .in_valid (w3_valid), .in_ready(w3_ready), .in_bit(edge_bit),
    .out_valid, .out_ready, .out_addr, .out_data, .frame_done
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      overflow    <= 1'b0;
      stall_count <= '0;
    end else begin
      if (gray_valid && !w1_in_ready) overflow <= 1'b1;
      if ((w1_valid && !w1_ready) || (w2_valid && !w2_ready) || (w3_valid && !w3_ready))
        stall_count <= stall_count + 1'b1;
    end
  end
endmodule
