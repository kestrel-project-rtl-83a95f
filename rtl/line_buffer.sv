// line_buffer: scanline delay for a streaming image pipeline.
//
// Each time `en` is high one sample `din` is stored and `dout` presents the
// sample that was stored DEPTH enables earlier, i.e. the pixel at the same
// column of the previous scanline. This is the "read address = write address
// - line length" scheme of the design: with a circular buffer of exactly one
// line the read and write pointer coincide, so a single counter serves both.
// The read is prefetched one step ahead into a register, so the memory sees a
// registered (block-RAM style) read port and `dout` is valid combinationally
// before the next `en`. Several instances are chained for taller windows.
//
// Interface: clk, rst (synchronous, clears the pointer only), en, din, dout.
// Timing: dout is valid at any cycle and changes only on the cycle after en.
// Until DEPTH samples have been written, dout holds whatever the memory held.
// Width and depth defaults (18 bits, 1920) follow the description's example
// of one 18-bit channel of a 1920-sample scanline in one 36 kb block RAM.
module line_buffer #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 1920
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr, ptr_next;
  logic [WIDTH-1:0] rd_q;

  always_comb begin
    ptr_next = (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= ptr_next;
    end
  end

  // Memory write and prefetching read (no reset on the array: block RAM).
  always_ff @(posedge clk) begin
    if (en) begin
      mem[ptr] <= din;
      rd_q     <= mem[ptr_next];
    end
  end

  assign dout = rd_q;

  initial begin
    assert (DEPTH >= 2) else $error("line_buffer: DEPTH must be at least 2");
  end
endmodule
