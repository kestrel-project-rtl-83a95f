// sbus_regfile: the SBUS sender's 32 x 11-bit register file.
//
// Built, as the description proposes, from two simple-dual-port LUT RAMs
// that are written together: every write goes to both copies, and each copy
// has its own read port. The sender can therefore read two different
// registers in the same cycle, which it needs because one SBUS data byte
// mixes bits of two consecutive 11-bit servo channels.
//
// Register use: 0-15 servo channels, 16 flags byte, 17 sender commands,
// 18-31 unused. The processor writes 32-bit words; only bits [10:0] are kept.
//
// Interface: write port (we, waddr, wdata[31:0]) in the register clock
// domain; read ports a and b are asynchronous (combinational).
module sbus_regfile (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  waddr,
  input  logic [31:0] wdata,
  input  logic [4:0]  raddr_a,
  output logic [10:0] rdata_a,
  input  logic [4:0]  raddr_b,
  output logic [10:0] rdata_b
);
  logic [20:0] unused_upper;
  assign unused_upper = wdata[31:11];   // "write at 32b and ignore upper bits"

  sdp_lutram #(.WIDTH(11), .DEPTH(32)) u_ram_a (
    .clk, .we, .waddr, .wdata(wdata[10:0]), .raddr(raddr_a), .rdata(rdata_a)
  );
  sdp_lutram #(.WIDTH(11), .DEPTH(32)) u_ram_b (
    .clk, .we, .waddr, .wdata(wdata[10:0]), .raddr(raddr_b), .rdata(rdata_b)
  );
endmodule
