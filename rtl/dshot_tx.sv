// dshot_tx: DShot-600 motor-controller output that resends one register.
//
// A DShot frame is 16 bits sent MSB first: an 11-bit throttle value, a
// telemetry-request bit and a 4-bit checksum. Every bit lasts 1.67 us
// (BIT_CYC = 167 clocks at 100 MHz); the line is high for 0.625 us
// (T0H = 63 clocks, 62.5 rounded up) for a 0 and 1.25 us (T1H = 125 clocks)
// for a 1, and low for the rest of the bit. Between frames the line stays low
// for GAP_CYC clocks. The checksum is the usual DShot one, the XOR of the
// three nibbles of the 12-bit {throttle, telemetry} word; the description
// names a 4-bit CRC without giving it.
//
// The value is sampled at the start of each frame, so the processor can
// rewrite it at any time; with enable low the line is held low ("no sending:
// low voltage continuous") after the current frame finishes.
//
// Interface: value[11:0] = {throttle[10:0], telemetry}, enable, dshot_o,
// frames (count of frames sent). Timing in logic clocks as above.
module dshot_tx #(
  parameter int unsigned BIT_CYC = 167,
  parameter int unsigned T0H     = 63,
  parameter int unsigned T1H     = 125,
  parameter int unsigned GAP_CYC = 500
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic [11:0] value,
  output logic        dshot_o,
  output logic [15:0] frames
);
  localparam int unsigned CW = $clog2((BIT_CYC > GAP_CYC ? BIT_CYC : GAP_CYC) + 1);

  typedef enum logic {S_GAP, S_BITS} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;
  logic [15:0]   shreg;
  logic          high_phase;

  function automatic logic [15:0] dshot_frame(input logic [11:0] v);
    logic [3:0] crc;
    crc = v[3:0] ^ v[7:4] ^ v[11:8];
    return {v, crc};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_GAP;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      frames  <= '0;
    end else begin
      unique case (state)
        S_GAP: begin
          if (cnt >= CW'(GAP_CYC - 1)) begin
            if (enable) begin
              state   <= S_BITS;
              cnt     <= '0;
              bit_idx <= '0;
              shreg   <= dshot_frame(value);
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_BITS: begin
          if (cnt == CW'(BIT_CYC - 1)) begin
            cnt   <= '0;
            shreg <= shreg << 1;
            if (bit_idx == 4'd15) begin
              state  <= S_GAP;
              frames <= frames + 1'b1;
            end else begin
              bit_idx <= bit_idx + 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_GAP;
      endcase
    end
  end

  assign high_phase = shreg[15] ? (cnt < CW'(T1H)) : (cnt < CW'(T0H));
  assign dshot_o    = (state == S_BITS) && high_phase;
endmodule
