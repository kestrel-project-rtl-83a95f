// edge_packer: packs the 1-bit edge map into 32-bit words for main memory.
//
// Edge bits of an IMG_W x IMG_H image arrive in raster order. Thirty-two
// consecutive bits of a line form one word, the leftmost pixel in bit 0. A
// line that does not fill its last word is zero-filled. Every line is then
// padded with zero words up to a multiple of 8 words (one 32-byte cache line),
// as the description asks, so a 960-pixel line occupies 32 words (128 bytes)
// and the 960x540 map takes 69,120 bytes. Each word carries its byte address
//     base + 4 * (row * LINE_WORDS + word)
// with `base` sampled at the first pixel of each frame. Because every line is
// a whole number of 8-word groups, the output can be sent as full 8-beat
// bursts without write masking.
//
// Handshake: valid/ready in and out; in_ready is low while a word waits and
// while pad words are emitted. frame_done pulses for one clock when the last word of a
// frame is loaded into the output register.
module edge_packer #(
  parameter int unsigned IMG_W = 960,
  parameter int unsigned IMG_H = 540
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] base,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_bit,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_addr,
  output logic [31:0] out_data,
  output logic        frame_done
);
  localparam int unsigned DATA_WORDS = (IMG_W + 31) / 32;
  localparam int unsigned LINE_WORDS = ((DATA_WORDS + 7) / 8) * 8;
  localparam int unsigned XW = $clog2(IMG_W + 1);
  localparam int unsigned YW = $clog2(IMG_H + 1);
  localparam int unsigned WW = $clog2(LINE_WORDS + 1);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [WW-1:0] w;
  logic [31:0]   shreg, word;
  logic [31:0]   base_q, line_addr;
  logic          padding, out_free, take, last_x, last_word;

  assign out_free  = !out_valid || out_ready;
  assign in_ready  = out_free && !padding;
  assign take      = in_valid && in_ready;
  assign last_x    = (x == XW'(IMG_W - 1));
  assign last_word = (w == WW'(LINE_WORDS - 1));
  assign line_addr = ((x == '0 && y == '0 && w == '0 && !padding) ? base : base_q)
                   + 32'(y) * 32'(LINE_WORDS * 4);

  always_comb begin
    word = shreg;
    word[x[4:0]] = in_bit;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x          <= '0;
      y          <= '0;
      w          <= '0;
      shreg      <= '0;
      padding    <= 1'b0;
      out_valid  <= 1'b0;
      out_addr   <= '0;
      out_data   <= '0;
      base_q     <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        if (x == '0 && y == '0 && w == '0) base_q <= base;
        shreg <= word;
        if (x[4:0] == 5'd31 || last_x) begin
          out_valid <= 1'b1;
          out_data  <= word;
          out_addr  <= line_addr + 32'(w) * 32'd4;
          shreg     <= '0;
          w         <= w + 1'b1;
        end
        if (last_x) begin
          x <= '0;
          if (last_word) begin
            w <= '0;
            if (y == YW'(IMG_H - 1)) begin
              y          <= '0;
              frame_done <= 1'b1;
            end else begin
              y <= y + 1'b1;
            end
          end else begin
            padding <= 1'b1;
          end
        end else begin
          x <= x + 1'b1;
        end
      end else if (padding && out_free) begin
        out_valid <= 1'b1;
        out_data  <= '0;
        out_addr  <= line_addr + 32'(w) * 32'd4;
        if (last_word) begin
          w       <= '0;
          padding <= 1'b0;
          if (y == YW'(IMG_H - 1)) begin
            y          <= '0;
            frame_done <= 1'b1;
          end else begin
            y <= y + 1'b1;
          end
        end else begin
          w <= w + 1'b1;
        end
      end
    end
  end
endmodule
