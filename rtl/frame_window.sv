// frame_window: 5x5 neighbourhood generator with edge-pixel replication.
//
// Feeds the per-pixel 5x5 filters of the edge-detection pipeline. Pixels of
// an IMG_W x IMG_H frame arrive in raster order. Four chained scanline
// buffers hold the four previous lines; a 5-deep shift register of column
// vectors holds the last five columns. For every input pixel the window is
// centred two lines and two columns behind it.
//
// Frame edges follow the description's choice to "repeat the pixel on the
// edge": the module walks an extended (IMG_H+2) x (IMG_W+2) grid. At the two
// extra columns of each line and on the two extra lines at the end of the
// frame it inserts padding steps itself (in_ready is low during them), which
// repeat the last pixel of the line, resp. the last line. At the top and left
// border the missing rows/columns are replaced by the first real one. The
// output therefore has exactly IMG_W x IMG_H windows, one per pixel, in raster
// order.
//
// Handshake: valid/ready on both sides. A step (a real pixel, or a padding
// step) happens only when the output register is free or being drained.
// Latency: the window for pixel (y,x) appears on the step that consumes
// pixel (y+2, x+2) (or its padding stand-in), registered, one clock later.
// out_last flags the window of the frame's last pixel.
//
// out_win[k][j] is row k (0 = top) and column j (0 = left); [2][2] is the
// centre. Line buffers are IMG_W+2 deep (a design choice that keeps the
// padding columns in the same circular buffer).
module frame_window #(
  parameter int unsigned PW    = 16,
  parameter int unsigned IMG_W = 960,
  parameter int unsigned IMG_H = 540
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [PW-1:0]            in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [4:0][4:0][PW-1:0]  out_win,
  output logic                     out_last
);
  localparam int unsigned XW = $clog2(IMG_W + 2);
  localparam int unsigned YW = $clog2(IMG_H + 2);

  logic [XW-1:0] c;
  logic [YW-1:0] r;
  logic          real_px, can_step, step, produce;
  logic [PW-1:0] s, hold_q;
  logic [4:0][PW-1:0] v;              // column vector of this step, [4] = newest row
  logic [3:0][PW-1:0] lb_out;
  logic [4:0][PW-1:0] sr [4];         // previous four column vectors, sr[3] newest
  logic [4:0][4:0][PW-1:0] win_next;

  assign real_px  = (r < YW'(IMG_H)) && (c < XW'(IMG_W));
  assign can_step = !out_valid || out_ready;
  assign in_ready = real_px && can_step;
  assign step     = can_step && (real_px ? in_valid : 1'b1);
  assign produce  = (r >= YW'(2)) && (c >= XW'(2));

  // Sample of this step, already clamped to the frame.
  always_comb begin
    if (real_px)                s = in_data;
    else if (r >= YW'(IMG_H))   s = lb_out[0];   // repeat the line above
    else                        s = hold_q;      // repeat the last pixel of the line
  end

  // Four chained scanline buffers.
  for (genvar i = 0; i < 4; i++) begin : g_lb
    line_buffer #(.WIDTH(PW), .DEPTH(IMG_W + 2)) u_lb (
      .clk (clk),
      .rst (rst),
      .en  (step),
      .din ((i == 0) ? s : lb_out[(i == 0) ? 0 : i - 1]),
      .dout(lb_out[i])
    );
  end

  always_comb begin
    v[4] = s;
    v[3] = lb_out[0];
    v[2] = lb_out[1];
    v[1] = lb_out[2];
    v[0] = lb_out[3];
  end

  // Window assembly with top/left clamping.
  always_comb begin
    logic [4:0][PW-1:0] cols [5];
    int unsigned jsel, ksel;
    for (int j = 0; j < 4; j++) cols[j] = sr[j];
    cols[4] = v;
    for (int k = 0; k < 5; k++) begin
      for (int j = 0; j < 5; j++) begin
        ksel = k;
        jsel = j;
        if (r < YW'(4) && (k < 4 - int'(r))) ksel = 4 - int'(r);
        if (c < XW'(4) && (j < 4 - int'(c))) jsel = 4 - int'(c);
        win_next[k][j] = cols[jsel][ksel];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c         <= '0;
      r         <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (step) begin
        out_valid <= produce;
        out_last  <= (r == YW'(IMG_H + 1)) && (c == XW'(IMG_W + 1));
        if (c == XW'(IMG_W + 1)) begin
          c <= '0;
          r <= (r == YW'(IMG_H + 1)) ? '0 : r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (step) begin
      hold_q  <= s;
      sr[0]   <= sr[1];
      sr[1]   <= sr[2];
      sr[2]   <= sr[3];
      sr[3]   <= v;
      out_win <= win_next;
    end
  end

endmodule
