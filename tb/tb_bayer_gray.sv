// tb_bayer_gray: streams two random Bayer frames (B/G rows even, G/R rows
// odd) with random gaps and checks every grayscale output against
// (307 R + 302 G1 + 302 G2 + 113 B) >> 4 computed here from the frame, the
// output count (a quarter of the pixels) and the one-clock latency.
module tb_bayer_gray;
  localparam int unsigned W = 12;
  localparam int unsigned H = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic pix_valid = 1'b0, pix_sof = 1'b0;
  logic [9:0] pix_data = '0;
  logic gray_valid;
  logic [15:0] gray_data;
  int checks = 0, failures = 0;
  int unsigned expq [$];
  int lat_pending = 0, lat_d = 0;
  logic [9:0] img [H][W];

  bayer_gray #(.LINE_W(W)) dut (.clk, .rst, .pix_valid, .pix_sof, .pix_data,
                                .gray_valid, .gray_data);

  always #5 clk = ~clk;

  // Output checker with latency check: a result must follow its cell by one clock.
  always @(posedge clk) begin
    if (!rst) begin
      if (gray_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("unexpected output %h", gray_data);
        end else begin
          if (gray_data !== 16'(expq[0])) begin
            failures++;
            $display("gray mismatch got %0d want %0d", gray_data, expq[0]);
          end
          void'(expq.pop_front());
        end
      end
      checks++;
      if (gray_valid !== (lat_d == 1)) begin
        failures++;
        $display("latency error");
      end
      lat_d = lat_pending;
      lat_pending = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[r][c] = 10'($urandom);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(0, 2) == 0) begin
            @(negedge clk);
            pix_valid = 1'b0;
            pix_sof   = 1'b0;
          end
          @(negedge clk);
          pix_valid = 1'b1;
          pix_sof   = (r == 0 && c == 0);
          pix_data  = img[r][c];
          if (r % 2 == 1 && c % 2 == 1) begin
            expq.push_back((307 * img[r][c] + 302 * img[r-1][c] + 302 * img[r][c-1]
                            + 113 * img[r-1][c-1]) >> 4);
            lat_pending = 1;
          end
        end
      end
      @(negedge clk);
      pix_valid = 1'b0;
      pix_sof = 1'b0;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d outputs missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
