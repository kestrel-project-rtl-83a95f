// dshot_monitor: testbench decoder for a DShot line. Measures each high
// pulse (T0H clocks = 0, T1H = 1, anything else is a timing error), checks
// that pulses within a frame start BIT_CYC apart, and appends every 16-bit
// frame to `frames`.
module dshot_monitor #(
  parameter int BIT_CYC = 167,
  parameter int T0H     = 63,
  parameter int T1H     = 125
) (
  input logic clk,
  input logic rst,
  input logic line
);
  logic [15:0] frames [$];
  int timing_errors = 0;

  initial begin
    int cyc, rise, prev_rise, width, nbits;
    logic [15:0] sh;
    cyc = 0;
    nbits = 0;
    prev_rise = 0;
    sh = '0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      cyc++;
      if (line) begin
        rise = cyc;
        width = 0;
        while (line) begin
          width++;
          @(posedge clk);
          cyc++;
        end
        if (width != T0H && width != T1H) timing_errors++;
        if (nbits > 0 && rise - prev_rise != BIT_CYC) timing_errors++;
        sh = {sh[14:0], (width == T1H)};
        prev_rise = rise;
        nbits++;
        if (nbits == 16) begin
          frames.push_back(sh);
          nbits = 0;
        end
      end
    end
  end
endmodule
