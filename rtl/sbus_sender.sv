// sbus_sender: repeats Futaba SBUS frames built from a processor-written
// register file, so the processor only updates values and never bit-bangs.
//
// A frame is 25 bytes: the start byte 0x0F, 22 data bytes carrying sixteen
// 11-bit servo channels, the flags byte (register 16, bits [7:0]) and the end
// byte 0x00. The channels are packed back to back: channel i occupies bits
// 11*i .. 11*i+10 of a 176-bit field, and data byte k holds bits 8k..8k+7, so
// a byte draws from at most two consecutive channels, read through the two
// ports of sbus_regfile. (The start/end byte values and this channel packing
// are the usual SBUS conventions; the description only calls the packing an
// interleave in a weird byte order.)
//
// Each byte goes out as 12 bits at 100 kbit/s: a start bit, eight data bits
// (MSB first, as the description states; MSB_FIRST=0 gives LSB first), an even
// parity bit and two stop bits. The UART level is then inverted, as SBUS is,
// unless command bit 1 disables the inversion. A counter-based state machine
// steps once per bit tick (CLK_DIV clocks of the logic clock, standing in for
// the described 100 kHz clock). While the end byte is sent the command
// register (17) is reread, and the new value applies from the end of that
// frame (so the end byte keeps its polarity); bit 0 enables sending. While disabled the line
// idles and the command register is polled each bit time, once it has been
// written after reset (the LUT RAM itself has no reset). Frames are
// separated by GAP_BITS idle bit times.
//
// Interface: regfile write port (from the AXI-GP slave), tx_o, frames (count
// of completed frames), busy (a frame is in flight).
module sbus_sender #(
  parameter int unsigned CLK_DIV   = 1000,   // 100 MHz / 100 kHz
  parameter int unsigned GAP_BITS  = 400,    // 3 ms frame + 4 ms gap = 7 ms period
  parameter bit          MSB_FIRST = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_we,
  input  logic [4:0]  reg_waddr,
  input  logic [31:0] reg_wdata,
  output logic        tx_o,
  output logic        busy,
  output logic [15:0] frames
);
  localparam logic [7:0] START_BYTE = 8'h0F;
  localparam logic [7:0] END_BYTE   = 8'h00;
  localparam logic [4:0] REG_FLAGS  = 5'd16;
  localparam logic [4:0] REG_CMD    = 5'd17;
  localparam int unsigned DW = $clog2(CLK_DIV);
  localparam int unsigned GW = $clog2(GAP_BITS + 1);

  typedef enum logic {S_GAP, S_SEND} state_e;
  state_e state;

  logic [DW-1:0] div;
  logic          tick;
  logic [GW-1:0] gap_cnt;
  logic [4:0]    byte_idx;   // 0..24
  logic [3:0]    bit_idx;    // 0..11
  logic [11:0]   shreg;      // UART-level bits, [0] goes out next
  logic          line;       // UART level (1 = idle/mark)
  logic [1:0]    cmd_q;      // [0] enable, [1] disable inversion
  logic [1:0]    cmd_rd_q;   // command word reread during the end byte
  logic          cmd_seen;   // register 17 has been written since reset
  logic [4:0]    raddr_a, raddr_b;
  logic [10:0]   rdata_a, rdata_b;
  logic [7:0]    next_byte;
  logic [4:0]    next_idx;

  sbus_regfile u_regs (
    .clk, .we(reg_we), .waddr(reg_waddr), .wdata(reg_wdata),
    .raddr_a, .rdata_a, .raddr_b, .rdata_b
  );

  // Bit-rate tick.
  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else     div <= (div == DW'(CLK_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign tick = (div == DW'(CLK_DIV - 1));

  // Index of the byte loaded at the next byte boundary.
  assign next_idx = (state == S_SEND) ? byte_idx + 5'd1 : 5'd0;

  // Register-file read addresses and the byte they produce.
  always_comb begin
    int unsigned k, lo, sh;
    logic [21:0] pair;
    raddr_a   = REG_CMD;
    raddr_b   = 5'd0;
    next_byte = START_BYTE;
    k  = 0;
    lo = 0;
    sh = 0;
    if (next_idx >= 5'd1 && next_idx <= 5'd22) begin
      k  = int'(next_idx) - 1;
      lo = (8 * k) / 11;
      sh = 8 * k - 11 * lo;
      raddr_a = 5'(lo);
      raddr_b = (lo < 15) ? 5'(lo + 1) : 5'(lo);
    end else if (next_idx == 5'd23) begin
      raddr_a = REG_FLAGS;
    end
    pair = {rdata_b, rdata_a} >> sh;
    unique case (next_idx)
      5'd0:    next_byte = START_BYTE;
      5'd23:   next_byte = rdata_a[7:0];
      5'd24:   next_byte = END_BYTE;
      default: next_byte = pair[7:0];
    endcase
  end

  function automatic logic [11:0] frame_bits(input logic [7:0] b, input bit msb_first);
    logic [7:0] d;
    d = b;
    if (msb_first) for (int i = 0; i < 8; i++) d[i] = b[7-i];
    // [0] start (0), [8:1] data in send order, [9] even parity, [11:10] stop (1).
    return {2'b11, ^b, d, 1'b0};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_GAP;
      gap_cnt  <= '0;
      byte_idx <= '0;
      bit_idx  <= '0;
      shreg    <= '1;
      line     <= 1'b1;
      cmd_q    <= 2'b00;
      cmd_rd_q <= 2'b00;
      cmd_seen <= 1'b0;
      frames   <= '0;
    end else begin
      if (reg_we && reg_waddr == REG_CMD) cmd_seen <= 1'b1;
      if (tick) begin
      unique case (state)
        S_GAP: begin
          line <= 1'b1;
          if (!cmd_q[0]) begin
            if (cmd_seen) cmd_q <= rdata_a[1:0];   // poll the command register
          end else if (gap_cnt >= GW'(GAP_BITS - 1)) begin
            state    <= S_SEND;
            byte_idx <= 5'd0;
            bit_idx  <= 4'd1;
            shreg    <= frame_bits(next_byte, MSB_FIRST) >> 1;
            line     <= 1'b0;                // start bit of the start byte
          end else begin
            gap_cnt <= gap_cnt + 1'b1;
          end
        end
        S_SEND: begin
          if (bit_idx == 4'd12) begin
            // Byte boundary: load the next byte or end the frame.
            if (byte_idx == 5'd24) begin
              state   <= S_GAP;
              gap_cnt <= '0;
              line    <= 1'b1;
              frames  <= frames + 1'b1;
              cmd_q   <= cmd_rd_q;           // takes effect between frames
            end else begin
              if (next_idx == 5'd24) cmd_rd_q <= rdata_a[1:0];   // reread commands
              byte_idx <= next_idx;
              bit_idx  <= 4'd1;
              shreg    <= frame_bits(next_byte, MSB_FIRST) >> 1;
              line     <= 1'b0;
            end
          end else begin
            line    <= shreg[0];
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        default: state <= S_GAP;
      endcase
      end
    end
  end

  assign busy = (state == S_SEND);
  assign tx_o = cmd_q[1] ? line : ~line;
endmodule
