// tb_window_capture: streams raw frames (40 x 20) and captures a 16 x 4
// window at (5,3) with every 2nd pixel and line, then a 16 x 2 window at
// (0,0) with no decimation. Every output word must hold the two expected
// pixels (zero-extended to 16 bits, first in the low half) at base + 4*k of
// the buffer the hardware is writing. Also checks the swap protocol (a
// request during a frame takes effect at the next frame start, pending then
// clears), the frame counter and the overflow flag when the writer stalls.
module tb_window_capture;
  localparam int unsigned LW = 40;
  localparam int unsigned LH = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic pix_valid = 1'b0, pix_sof = 1'b0;
  logic [9:0] pix_data = '0;
  logic enable = 1'b0;
  logic [11:0] x0 = '0, y0 = '0, width = '0, height = '0;
  logic [3:0] step = 4'd1;
  logic [31:0] base0 = 32'h1000_0000, base1 = 32'h2000_0000;
  logic swap_req = 1'b0;
  logic out_valid, out_ready = 1'b1;
  logic [31:0] out_addr, out_data;
  logic write_buf, swap_pending, overflow;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  logic [9:0] img [LH][LW];
  logic [31:0] exp_addr [$], exp_data [$];

  window_capture #(.LINE_W(LW)) dut (
    .clk, .rst, .pix_valid, .pix_sof, .pix_data, .enable, .x0, .y0, .width, .height,
    .step, .base0, .base1, .swap_req, .out_valid, .out_ready, .out_addr, .out_data,
    .write_buf, .swap_pending, .overflow, .frames
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks += 2;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("unexpected word %h @%h", out_data, out_addr);
      end else begin
        if (out_addr !== exp_addr[0] || out_data !== exp_data[0]) begin
          failures++;
          if (failures < 10) $display("word %h @%h want %h @%h", out_data, out_addr, exp_data[0], exp_addr[0]);
        end
        void'(exp_addr.pop_front());
        void'(exp_data.pop_front());
      end
    end
  end

  task automatic expect_window(int wx, int wy, int ww, int wh, int st, logic [31:0] b);
    int k;
    k = 0;
    for (int i = 0; i < wh; i++)
      for (int j = 0; j < ww; j += 2) begin
        exp_addr.push_back(b + 32'(4 * k));
        exp_data.push_back({6'd0, img[wy + i*st][wx + (j+1)*st], 6'd0, img[wy + i*st][wx + j*st]});
        k++;
      end
  endtask

  task automatic send_frame(bit gaps);
    for (int r = 0; r < LH; r++)
      for (int c = 0; c < LW; c++) img[r][c] = 10'($urandom);
    for (int r = 0; r < LH; r++)
      for (int c = 0; c < LW; c++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 3) == 0) begin
          pix_valid = 1'b0;
          @(negedge clk);
        end
        pix_valid = 1'b1;
        pix_sof   = (r == 0 && c == 0);
        pix_data  = img[r][c];
      end
    @(negedge clk);
    pix_valid = 1'b0;
    pix_sof = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    enable = 1'b1; x0 = 12'd5; y0 = 12'd3; width = 12'd16; height = 12'd4; step = 4'd2;
    // Frame 1 into buffer 0 (expected values are queued as the frame is built).
    fork
      send_frame(1);
      begin
        @(posedge pix_sof);
        expect_window(5, 3, 16, 4, 2, base0);
      end
    join
    checks += 2;
    if (write_buf !== 1'b0) failures++;
    if (frames != 16'd1) failures++;
    // Swap request between frames: frame 2 goes to buffer 1.
    @(negedge clk) swap_req = 1'b1;
    @(negedge clk) swap_req = 1'b0;
    checks++;
    if (!swap_pending) failures++;
    x0 = 12'd0; y0 = 12'd0; width = 12'd16; height = 12'd2; step = 4'd1;
    fork
      send_frame(0);
      begin
        @(posedge pix_sof);
        expect_window(0, 0, 16, 2, 1, base1);
      end
    join
    checks += 3;
    if (write_buf !== 1'b1) failures++;
    if (swap_pending) failures++;
    if (frames != 16'd2) failures++;
    checks++;
    if (exp_addr.size() != 0) begin failures++; $display("%0d words missing", exp_addr.size()); end
    checks++;
    if (overflow) failures++;
    // Writer stalled: words are dropped and overflow is flagged.
    out_ready = 1'b0;
    send_frame(0);
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
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
