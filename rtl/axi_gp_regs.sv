// axi_gp_regs: control and status registers on an AXI4-Lite slave.
//
// The processor reaches the programmable logic through its general-purpose
// AXI master ports, which make only single reads and writes; this block is
// the slave behind one of them. Writes to offsets 0x000-0x07C go to the SBUS
// register file (word index = register number, bits [10:0] kept); the other
// offsets are the registers of kestrel_pkg (DShot values, output-line
// configuration, window-of-focus geometry and buffers, edge-detector
// threshold and base address) and, read-only, the status word and activity
// counters (frames sent per RC protocol, windows, bursts per port, padding
// stalls). Writing any value to REG_WIN_SWAP requests a
// window-buffer swap (one-clock pulse on swap_req); REG_WIN_STATUS and
// REG_STATUS are read-only. The register map is this design's own.
//
// AXI4-Lite handshake: a write is taken when AWVALID and WVALID are both high
// and no response is pending (AWREADY = WREADY for that one cycle); BRESP is
// always OKAY. A read is taken when ARVALID is high and no read data is
// pending; RDATA is returned the next clock. WSTRB is honoured per byte on
// the ordinary registers. Reads of the SBUS area return 0 (write-only, the
// RAM's second port belongs to the sender). All registers reset to 0 except
// win_step (1).
module axi_gp_regs
  import kestrel_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // AXI4-Lite slave
  input  logic [11:0] s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [11:0] s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // register outputs
  output ctrl_t       ctrl,
  output logic        sbus_we,
  output logic [4:0]  sbus_waddr,
  output logic [31:0] sbus_wdata,
  output logic        swap_req,
  // status inputs
  input  logic        win_buf,
  input  logic        win_swap_pending,
  input  logic [15:0] edge_frames,
  input  logic        overflow,
  input  logic        axi_error,
  // activity counters (read-only)
  input  logic [15:0] sbus_frames,
  input  logic        sbus_busy,
  input  logic [NUM_RC_LINES-1:0][15:0] dshot_frames,
  input  logic [15:0] win_frames,
  input  logic [15:0] acp_bursts,
  input  logic [15:0] hp_bursts,
  input  logic [31:0] edge_stalls
);
  logic        wr_take, rd_take;
  logic [11:0] waddr;
  logic [31:0] wmask;

  assign wr_take   = s_awvalid && s_wvalid && !s_bvalid;
  assign rd_take   = s_arvalid && !s_rvalid;
  assign s_awready = wr_take;
  assign s_wready  = wr_take;
  assign s_arready = rd_take;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;
  assign waddr     = {s_awaddr[11:2], 2'b00};

  always_comb begin
    for (int i = 0; i < 4; i++) wmask[8*i +: 8] = {8{s_wstrb[i]}};
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [31:0] m);
    return (old & ~m) | (nw & m);
  endfunction

  // SBUS register-file write port.
  assign sbus_we    = wr_take && (waddr < 12'h080);
  assign sbus_waddr = waddr[6:2];
  assign sbus_wdata = s_wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl          <= '0;
      ctrl.win_step <= 4'd1;
      s_bvalid      <= 1'b0;
      swap_req      <= 1'b0;
    end else begin
      swap_req <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_take) begin
        logic [31:0] cur;
        s_bvalid <= 1'b1;
        unique case (waddr)
          REG_DSHOT_BASE + 12'h0: begin
            cur = merge({20'd0, ctrl.dshot_value[0]}, s_wdata, wmask);
            ctrl.dshot_value[0] <= cur[11:0];
          end
          REG_DSHOT_BASE + 12'h4: begin
            cur = merge({20'd0, ctrl.dshot_value[1]}, s_wdata, wmask);
            ctrl.dshot_value[1] <= cur[11:0];
          end
          REG_DSHOT_BASE + 12'h8: begin
            cur = merge({20'd0, ctrl.dshot_value[2]}, s_wdata, wmask);
            ctrl.dshot_value[2] <= cur[11:0];
          end
          REG_DSHOT_BASE + 12'hC: begin
            cur = merge({20'd0, ctrl.dshot_value[3]}, s_wdata, wmask);
            ctrl.dshot_value[3] <= cur[11:0];
          end
          REG_LINE_CFG: begin
            cur = merge({24'd0, ctrl.line_is_sbus, ctrl.line_enable}, s_wdata, wmask);
            ctrl.line_enable  <= cur[3:0];
            ctrl.line_is_sbus <= cur[7:4];
          end
          REG_WIN_CTRL: begin
            cur = merge({24'd0, ctrl.win_step, 3'd0, ctrl.win_enable}, s_wdata, wmask);
            ctrl.win_enable <= cur[0];
            ctrl.win_step   <= cur[7:4];
          end
          REG_WIN_ORIGIN: begin
            cur = merge({4'd0, ctrl.win_y0, 4'd0, ctrl.win_x0}, s_wdata, wmask);
            ctrl.win_x0 <= cur[11:0];
            ctrl.win_y0 <= cur[27:16];
          end
          REG_WIN_SIZE: begin
            cur = merge({4'd0, ctrl.win_height, 4'd0, ctrl.win_width}, s_wdata, wmask);
            ctrl.win_width  <= cur[11:0];
            ctrl.win_height <= cur[27:16];
          end
          REG_WIN_BASE0: ctrl.win_base0 <= merge(ctrl.win_base0, s_wdata, wmask);
          REG_WIN_BASE1: ctrl.win_base1 <= merge(ctrl.win_base1, s_wdata, wmask);
          REG_WIN_SWAP:  swap_req <= 1'b1;
          REG_EDGE_CTRL: begin
            cur = merge({4'd0, ctrl.edge_threshold, 15'd0, ctrl.edge_enable}, s_wdata, wmask);
            ctrl.edge_enable    <= cur[0];
            ctrl.edge_threshold <= cur[27:16];
          end
          REG_EDGE_BASE: ctrl.edge_base <= merge(ctrl.edge_base, s_wdata, wmask);
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_take) begin
        s_rvalid <= 1'b1;
        unique case ({s_araddr[11:2], 2'b00})
          REG_DSHOT_BASE + 12'h0: s_rdata <= {20'd0, ctrl.dshot_value[0]};
          REG_DSHOT_BASE + 12'h4: s_rdata <= {20'd0, ctrl.dshot_value[1]};
          REG_DSHOT_BASE + 12'h8: s_rdata <= {20'd0, ctrl.dshot_value[2]};
          REG_DSHOT_BASE + 12'hC: s_rdata <= {20'd0, ctrl.dshot_value[3]};
          REG_LINE_CFG:   s_rdata <= {24'd0, ctrl.line_is_sbus, ctrl.line_enable};
          REG_WIN_CTRL:   s_rdata <= {24'd0, ctrl.win_step, 3'd0, ctrl.win_enable};
          REG_WIN_ORIGIN: s_rdata <= {4'd0, ctrl.win_y0, 4'd0, ctrl.win_x0};
          REG_WIN_SIZE:   s_rdata <= {4'd0, ctrl.win_height, 4'd0, ctrl.win_width};
          REG_WIN_BASE0:  s_rdata <= ctrl.win_base0;
          REG_WIN_BASE1:  s_rdata <= ctrl.win_base1;
          REG_WIN_STATUS: s_rdata <= {30'd0, win_swap_pending, win_buf};
          REG_EDGE_CTRL:  s_rdata <= {4'd0, ctrl.edge_threshold, 15'd0, ctrl.edge_enable};
          REG_EDGE_BASE:  s_rdata <= ctrl.edge_base;
          REG_STATUS:     s_rdata <= {14'd0, axi_error, overflow, edge_frames};
          REG_RC_COUNT:   s_rdata <= {15'd0, sbus_busy, sbus_frames};
          REG_DSHOT_COUNT + 12'h0: s_rdata <= {16'd0, dshot_frames[0]};
          REG_DSHOT_COUNT + 12'h4: s_rdata <= {16'd0, dshot_frames[1]};
          REG_DSHOT_COUNT + 12'h8: s_rdata <= {16'd0, dshot_frames[2]};
          REG_DSHOT_COUNT + 12'hC: s_rdata <= {16'd0, dshot_frames[3]};
          REG_WIN_FRAMES: s_rdata <= {16'd0, win_frames};
          REG_BURSTS:     s_rdata <= {hp_bursts, acp_bursts};
          REG_EDGE_STALLS: s_rdata <= edge_stalls;
          default:        s_rdata <= '0;
        endcase
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (rst)
    s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (rst)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
