// sdp_lutram: simple-dual-port LUT RAM, one synchronous write port and one
// asynchronous read port (the distributed-RAM primitive of the target FPGA).
// DEPTH x WIDTH, no reset of the contents; a read of the address being
// written returns the old word until the clock edge.
module sdp_lutram #(
  parameter int unsigned WIDTH = 11,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
