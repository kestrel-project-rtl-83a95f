// tb_frame_window: streams three random frames through the 5x5 window
// generator with random input gaps and random output back-pressure, and
// compares every window with one built here by clamping coordinates to the
// frame (edge-pixel replication). Also checks the window count, out_last and
// that padding steps were inserted (in_ready low while input was offered).
module tb_frame_window;
  localparam int unsigned PW = 8;
  localparam int unsigned W  = 7;
  localparam int unsigned H  = 6;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_valid = 1'b0, in_ready;
  logic [PW-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b0, out_last;
  logic [4:0][4:0][PW-1:0] out_win;
  int checks = 0, failures = 0;
  int pad_stalls = 0;
  logic [PW-1:0] img [3][H][W];
  int oframe = 0, opix = 0;

  frame_window #(.PW(PW), .IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_win, .out_last
  );

  always #5 clk = ~clk;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Output checker.
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      int y, x;
      y = opix / W;
      x = opix % W;
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++) begin
          checks++;
          if (out_win[k][j] !== img[oframe][clampi(y - 2 + k, 0, H - 1)][clampi(x - 2 + j, 0, W - 1)]) begin
            failures++;
            if (failures < 10) $display("frame %0d pixel (%0d,%0d) win[%0d][%0d] = %h", oframe, y, x, k, j, out_win[k][j]);
          end
        end
      checks++;
      if (out_last !== (opix == W * H - 1)) failures++;
      opix++;
      if (opix == W * H) begin
        opix = 0;
        oframe++;
      end
    end
    if (!rst && in_valid && !in_ready) pad_stalls++;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    for (int f = 0; f < 3; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[f][r][c] = PW'($urandom);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 3; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 2) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_data  = img[f][r][c];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
    @(negedge clk) in_valid = 1'b0;
    repeat (200) @(posedge clk);
    checks++;
    if (oframe != 3) begin
      failures++;
      $display("only %0d frames out", oframe);
    end
    checks++;
    if (pad_stalls == 0) begin
      failures++;
      $display("padding never stalled the input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
