// kestrel_pkg: shared types and constants of the Kestrel programmable-logic design.
//
// Holds the control-register bundle that the AXI4-Lite register block hands
// to the glue senders and the camera-channel logic, the register map offsets,
// and the fixed constants of the image pipeline (Gaussian weights, the 1/273
// normalisation constant, the grayscale weights). Numbers that come from the
// design description are marked as such; the register map itself is this
// design's own choice.
package kestrel_pkg;

  // ---------------- image pipeline constants ----------------
  // 5x5 Gaussian weights, sum 273 (from the design description).
  localparam int unsigned GAUSS_W [5][5] = '{
    '{1,  4,  7,  4, 1},
    '{4, 16, 26, 16, 4},
    '{7, 26, 41, 26, 7},
    '{4, 16, 26, 16, 4},
    '{1,  4,  7,  4, 1}
  };
  localparam int unsigned GAUSS_SUM = 273;
  // 1/273 ~= 1111000001111b * 2^-21 (13-bit constant, from the description).
  localparam logic [12:0] GAUSS_RECIP = 13'b1111000001111;

  // Grayscale weights 0.3 R, 0.295 G1, 0.295 G2, 0.11 B scaled by 1024
  // (307 + 302 + 302 + 113 = 1024), then >> 4 so 10-bit pixels land in 16 bits.
  localparam int unsigned GRAY_KR = 307;
  localparam int unsigned GRAY_KG = 302;
  localparam int unsigned GRAY_KB = 113;

  // Gradient directions, index into the 4 x 9-bit gradient vector.
  typedef enum logic [1:0] {
    DIR_H    = 2'd0,   // along a row
    DIR_V    = 2'd1,   // along a column
    DIR_DIAG = 2'd2,   // top-left to bottom-right
    DIR_ANTI = 2'd3    // top-right to bottom-left
  } grad_dir_e;

  // ---------------- glue outputs ----------------
  localparam int unsigned NUM_RC_LINES = 4;

  // ---------------- control registers ----------------
  typedef struct packed {
    // glue
    logic [NUM_RC_LINES-1:0]       line_is_sbus;  // 1: line carries SBUS, 0: DShot
    logic [NUM_RC_LINES-1:0]       line_enable;   // 0: line held low
    logic [NUM_RC_LINES-1:0][11:0] dshot_value;   // {throttle[10:0], telemetry}
    // window of focus
    logic        win_enable;
    logic [11:0] win_x0;
    logic [11:0] win_y0;
    logic [11:0] win_width;    // output pixels per line (multiple of 16)
    logic [11:0] win_height;   // output lines
    logic [3:0]  win_step;     // decimation: keep every win_step-th pixel/line
    logic [31:0] win_base0;    // byte address of buffer 0 (32-byte aligned)
    logic [31:0] win_base1;    // byte address of buffer 1 (32-byte aligned)
    // edge detection
    logic        edge_enable;
    logic [11:0] edge_threshold;
    logic [31:0] edge_base;    // byte address of the edge bitmap (32-byte aligned)
  } ctrl_t;

  // Byte offsets on the AXI-GP slave.
  localparam logic [11:0] REG_SBUS_BASE   = 12'h000; // 32 words: SBUS regs 0..31
  localparam logic [11:0] REG_DSHOT_BASE  = 12'h100; // 4 words
  localparam logic [11:0] REG_LINE_CFG    = 12'h110; // [3:0] enable, [7:4] is_sbus
  localparam logic [11:0] REG_WIN_CTRL    = 12'h120; // [0] enable, [7:4] step
  localparam logic [11:0] REG_WIN_ORIGIN  = 12'h124; // [11:0] x0, [27:16] y0
  localparam logic [11:0] REG_WIN_SIZE    = 12'h128; // [11:0] width, [27:16] height
  localparam logic [11:0] REG_WIN_BASE0   = 12'h12C;
  localparam logic [11:0] REG_WIN_BASE1   = 12'h130;
  localparam logic [11:0] REG_WIN_SWAP    = 12'h134; // write: request swap
  localparam logic [11:0] REG_WIN_STATUS  = 12'h138; // read: [0] buffer hw writes, [1] swap pending
  localparam logic [11:0] REG_EDGE_CTRL   = 12'h140; // [0] enable, [27:16] threshold
  localparam logic [11:0] REG_EDGE_BASE   = 12'h144;
  localparam logic [11:0] REG_STATUS      = 12'h148; // read: [15:0] frames, [16] overflow
  localparam logic [11:0] REG_RC_COUNT    = 12'h14C; // read: [15:0] SBUS frames, [16] busy
  localparam logic [11:0] REG_DSHOT_COUNT = 12'h150; // read: 4 words, [15:0] frames per line
  localparam logic [11:0] REG_WIN_FRAMES  = 12'h160; // read: [15:0] windows completed
  localparam logic [11:0] REG_BURSTS      = 12'h164; // read: [15:0] ACP, [31:16] HP bursts
  localparam logic [11:0] REG_EDGE_STALLS = 12'h168; // read: padding stall cycles

endpackage
