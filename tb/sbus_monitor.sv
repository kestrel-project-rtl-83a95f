// sbus_monitor: testbench decoder for an SBUS line. Waits for a start bit,
// samples 25 bytes of 12 bits mid-bit (CLK_DIV clocks per bit), checks the
// start, even-parity and stop bits, and appends the data bytes of each frame
// (MSB first on the wire) to `frames`. `invert` tells it the line polarity.
module sbus_monitor #(
  parameter int CLK_DIV = 1000
) (
  input logic clk,
  input logic rst,
  input logic invert,
  input logic line
);
  logic [7:0] frames [$][25];
  int framing_errors = 0;

  initial begin
    @(negedge rst);
    forever begin
      logic [7:0] fr [25];
      do @(posedge clk); while ((invert ? ~line : line) != 1'b0);
      repeat (CLK_DIV / 2) @(posedge clk);
      for (int b = 0; b < 25; b++) begin
        logic [11:0] bits;
        for (int i = 0; i < 12; i++) begin
          bits[i] = invert ? ~line : line;
          repeat (CLK_DIV) @(posedge clk);
        end
        for (int i = 0; i < 8; i++) fr[b][7-i] = bits[1+i];
        if (bits[0] !== 1'b0 || bits[9] !== ^fr[b] || bits[11:10] !== 2'b11) framing_errors++;
      end
      frames.push_back(fr);
    end
  end
endmodule
