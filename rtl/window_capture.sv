// window_capture: the "window of focus" grabber with double buffering.
//
// Instead of writing whole frames to DRAM, software asks for a W x H window
// of one camera, starting at (x0, y0), keeping every step-th pixel of every
// step-th line, to be placed at an aligned memory address. As the scanlines
// stream in, matching raw pixels are widened from 10 to 16 bits (zero
// extended), paired into 32-bit words (first pixel in the low half) and
// handed, with their byte address, to a burst writer on the cache-coherent
// port. The window is stored packed: pixel (i, j) of the window is at
// base + 2*(i*W + j). W must be a multiple of 16 so every 8-word burst is
// one whole 32-byte cache line.
//
// Two buffers (base0/base1) implement the described "option 2" ownership
// protocol: the hardware always writes one buffer and the software owns the
// other. A swap request sets `swap_pending`; at the next frame start the
// hardware hands over the buffer it has just filled and starts writing the
// other one, then clears `swap_pending`. Software polls until it is clear and
// reads `write_buf` to learn which buffer is now its own (the other one).
//
// Geometry and enable are sampled at the start of each frame. The camera does
// not wait: if the writer cannot take a word it is dropped and `overflow` is
// set (sticky). `frames` counts completed windows.
//
// Interface: camera stream (pix_valid, pix_sof, pix_data), configuration,
// swap_req, word stream out (valid/ready/addr/data), status.
module window_capture #(
  parameter int unsigned LINE_W = 1920
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic        pix_sof,
  input  logic [9:0]  pix_data,
  input  logic        enable,
  input  logic [11:0] x0,
  input  logic [11:0] y0,
  input  logic [11:0] width,
  input  logic [11:0] height,
  input  logic [3:0]  step,
  input  logic [31:0] base0,
  input  logic [31:0] base1,
  input  logic        swap_req,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_addr,
  output logic [31:0] out_data,
  output logic        write_buf,
  output logic        swap_pending,
  output logic        overflow,
  output logic [15:0] frames
);
  localparam int unsigned CW = $clog2(LINE_W + 1);

  // Per-frame configuration.
  logic        en_q;
  logic [11:0] x0_q, y0_q, w_q, h_q;
  logic [3:0]  step_q;
  logic [31:0] base_q;

  logic [CW-1:0] col;       // column of the next pixel
  logic [11:0]   row;       // row of the next pixel
  logic [11:0]   xcnt, ycnt;
  logic [3:0]    xph, yph;
  logic          half;      // a pixel waits in the low half
  logic [15:0]   low_pix;
  logic [21:0]   word_idx;
  logic          in_frame;  // current frame is being captured

  logic [CW-1:0] pcol;
  logic [11:0]   prow;
  logic          row_sel, col_sel, take, row_end;
  logic [3:0]    stp;

  assign pcol    = pix_sof ? '0 : col;
  assign prow    = pix_sof ? '0 : row;
  assign stp     = (step == 4'd0) ? 4'd1 : step;
  // Selection uses the configuration of the current frame, which for the
  // first pixel of a frame is the live configuration.
  assign row_sel = (pix_sof ? enable : (en_q && in_frame))
                && (prow >= (pix_sof ? y0 : y0_q))
                && (pix_sof ? (height != 12'd0) : ((ycnt < h_q) && (yph == 4'd0)));
  assign col_sel = (12'(pcol) >= (pix_sof ? x0 : x0_q))
                && (xcnt < (pix_sof ? width : w_q)) && (xph == 4'd0);
  assign take    = pix_valid && row_sel && col_sel;
  assign row_end = (pcol == CW'(LINE_W - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      en_q <= 1'b0; x0_q <= '0; y0_q <= '0; w_q <= '0; h_q <= '0;
      step_q <= 4'd1; base_q <= '0;
      col <= '0; row <= '0; xcnt <= '0; ycnt <= '0; xph <= '0; yph <= '0;
      half <= 1'b0; low_pix <= '0; word_idx <= '0; in_frame <= 1'b0;
      write_buf <= 1'b0; swap_pending <= 1'b0; overflow <= 1'b0; frames <= '0;
      out_valid <= 1'b0; out_addr <= '0; out_data <= '0;
    end else begin
      if (swap_req) swap_pending <= 1'b1;
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (pix_valid) begin
        if (pix_sof) begin
          // Frame start: sample configuration, perform a pending swap.
          logic wb;
          wb = write_buf ^ (swap_pending || swap_req);
          write_buf    <= wb;
          swap_pending <= 1'b0;
          en_q   <= enable;
          x0_q   <= x0;
          y0_q   <= y0;
          w_q    <= width;
          h_q    <= height;
          step_q <= stp;
          base_q <= wb ? base1 : base0;
          in_frame <= enable;
          ycnt <= '0;
          yph  <= '0;
          xcnt <= '0;
          xph  <= '0;
          half <= 1'b0;
          word_idx <= '0;
        end

        // Horizontal phase inside the window.
        if (row_sel && 12'(pcol) >= (pix_sof ? x0 : x0_q) && xcnt < (pix_sof ? width : w_q)) begin
          xph <= (xph == (pix_sof ? stp : step_q) - 4'd1) ? 4'd0 : xph + 4'd1;
          if (xph == 4'd0) xcnt <= xcnt + 1'b1;
        end

        if (take) begin
          if (!half) begin
            low_pix <= {6'd0, pix_data};
            half    <= 1'b1;
          end else begin
            half <= 1'b0;
            if (!out_valid || out_ready) begin
              out_valid <= 1'b1;
              out_data  <= {6'd0, pix_data, low_pix};
              out_addr  <= (pix_sof ? (write_buf ^ (swap_pending || swap_req) ? base1 : base0)
                                    : base_q) + 32'({word_idx, 2'b00});
            end else begin
              overflow <= 1'b1;
            end
            word_idx <= word_idx + 1'b1;
          end
        end

        // Line and frame bookkeeping.
        if (row_end) begin
          col  <= '0;
          row  <= prow + 1'b1;
          xcnt <= '0;
          xph  <= '0;
          if (in_frame || (pix_sof && enable)) begin
            if (prow >= (pix_sof ? y0 : y0_q)) begin
              yph <= (yph == (pix_sof ? stp : step_q) - 4'd1) ? 4'd0 : yph + 4'd1;
              if (row_sel) begin
                ycnt <= ycnt + 1'b1;
                if (ycnt + 1'b1 == h_q) begin
                  in_frame <= 1'b0;
                  frames   <= frames + 1'b1;
                end
              end
            end
          end
        end else begin
          col <= pcol + 1'b1;
          if (pix_sof) row <= '0;
        end
      end
    end
  end
endmodule
