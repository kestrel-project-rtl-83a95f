// tb_line_buffer: checks that the scanline buffer returns, before every
// write, the sample written exactly DEPTH writes earlier, with writes spaced
// irregularly. Expected values come from a reference queue.
module tb_line_buffer;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 37;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  line_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst, .en, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 20 * DEPTH; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        en = 1'b0;
        continue;
      end
      din = WIDTH'($urandom);
      en  = 1'b1;
      if (hist.size() == DEPTH) begin
        checks++;
        if (dout !== hist[0]) begin
          failures++;
          if (failures < 10) $display("mismatch at write %0d: got %h want %h", n, dout, hist[0]);
        end
        void'(hist.pop_front());
      end
      hist.push_back(din);
    end
    @(negedge clk) en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
