// kestrel_top: programmable-logic side of the Kestrel UAV flight board.
//
// The board pairs a dual-core ARM running Linux (mission planning) with FPGA
// fabric that takes every job the processor cannot do in hard real time.
// This top holds the two halves of that fabric:
//
//  * RC glue. Four output lines, each independently either a DShot-600 motor
//    command (dshot_tx, one per line) or a copy of the SBUS servo stream
//    (sbus_sender with its 16-channel register file). Both resend their
//    register contents forever, so the processor only writes new values.
//  * One camera channel. Raw Bayer pixels feed the window-of-focus grabber
//    (window_capture, written through the cache-coherent port so the window
//    lands in L2) and the edge detector (edge_pipeline, written through a
//    high-performance port as a 1-bit-per-pixel map).
//
// Everything is controlled through axi_gp_regs, an AXI4-Lite slave on a
// general-purpose port. One clock drives the whole design; the slower rates
// of the description (100 kHz SBUS bit clock, 25 MHz gray-pixel clock) are
// clock enables and valid strobes derived from it, a design choice. The
// default timing parameters assume a 100 MHz clock. The camera receiver
// (MIPI CSI-2), the processor system with its AXI ports, the DDR3 memory and
// the clock generation are outside this design; their signals are ports.
//
// Ports: clk, rst (synchronous, active high); AXI4-Lite slave s_*; camera
// pixel stream cam_*; AXI4 write masters acp_* (window) and hp_* (edges);
// rc_out[3:0] to the RC connectors.
module kestrel_top
  import kestrel_pkg::*;
#(
  parameter int unsigned RAW_W         = 1920,
  parameter int unsigned RAW_H         = 1080,
  parameter int unsigned SBUS_CLK_DIV  = 1000,
  parameter int unsigned SBUS_GAP_BITS = 400,
  parameter int unsigned DSHOT_BIT_CYC = 167,
  parameter int unsigned DSHOT_T0H     = 63,
  parameter int unsigned DSHOT_T1H     = 125,
  parameter int unsigned DSHOT_GAP_CYC = 500
) (
  input  logic        clk,
  input  logic        rst,
  // AXI4-Lite slave (processor general-purpose master)
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
  // camera pixel stream (from the CSI-2 receiver)
  input  logic        cam_valid,
  input  logic        cam_sof,
  input  logic [9:0]  cam_data,
  // AXI4 write master to the cache-coherent port (window of focus)
  output logic [31:0] acp_awaddr,
  output logic [7:0]  acp_awlen,
  output logic [2:0]  acp_awsize,
  output logic [1:0]  acp_awburst,
  output logic [3:0]  acp_awcache,
  output logic [2:0]  acp_awprot,
  output logic [4:0]  acp_awuser,
  output logic        acp_awvalid,
  input  logic        acp_awready,
  output logic [31:0] acp_wdata,
  output logic [3:0]  acp_wstrb,
  output logic        acp_wlast,
  output logic        acp_wvalid,
  input  logic        acp_wready,
  input  logic [1:0]  acp_bresp,
  input  logic        acp_bvalid,
  output logic        acp_bready,
  // AXI4 write master to a high-performance port (edge map)
  output logic [31:0] hp_awaddr,
  output logic [7:0]  hp_awlen,
  output logic [2:0]  hp_awsize,
  output logic [1:0]  hp_awburst,
  output logic [3:0]  hp_awcache,
  output logic [2:0]  hp_awprot,
  output logic [4:0]  hp_awuser,
  output logic        hp_awvalid,
  input  logic        hp_awready,
  output logic [31:0] hp_wdata,
  output logic [3:0]  hp_wstrb,
  output logic        hp_wlast,
  output logic        hp_wvalid,
  input  logic        hp_wready,
  input  logic [1:0]  hp_bresp,
  input  logic        hp_bvalid,
  output logic        hp_bready,
  // RC output lines
  output logic [NUM_RC_LINES-1:0] rc_out
);
  ctrl_t       ctrl;
  logic        sbus_we, swap_req;
  logic [4:0]  sbus_waddr;
  logic [31:0] sbus_wdata;
  logic        sbus_tx, sbus_busy;
  logic [15:0] sbus_frames;
  logic [NUM_RC_LINES-1:0] dshot_o;
  logic [NUM_RC_LINES-1:0][15:0] dshot_frames;

  logic        win_valid, win_ready, win_buf, win_pending, win_overflow;
  logic [31:0] win_addr, win_data;
  logic [15:0] win_frames;

  logic        edge_valid, edge_ready, edge_frame_done, edge_overflow;
  logic [31:0] edge_addr, edge_data, edge_stalls;
  logic [15:0] edge_frames;
  logic        hp_in_ready;

  logic        acp_err, hp_err;
  logic [15:0] acp_bursts, hp_bursts;

  axi_gp_regs u_regs (
    .clk, .rst,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .ctrl, .sbus_we, .sbus_waddr, .sbus_wdata, .swap_req,
    .win_buf, .win_swap_pending(win_pending), .edge_frames,
    .overflow(win_overflow || edge_overflow), .axi_error(acp_err || hp_err),
    .sbus_frames, .sbus_busy, .dshot_frames, .win_frames, .acp_bursts, .hp_bursts,
    .edge_stalls
  );

  // ---------------- RC glue ----------------
  sbus_sender #(.CLK_DIV(SBUS_CLK_DIV), .GAP_BITS(SBUS_GAP_BITS)) u_sbus (
    .clk, .rst, .reg_we(sbus_we), .reg_waddr(sbus_waddr), .reg_wdata(sbus_wdata),
    .tx_o(sbus_tx), .busy(sbus_busy), .frames(sbus_frames)
  );

  for (genvar i = 0; i < NUM_RC_LINES; i++) begin : g_line
    dshot_tx #(
      .BIT_CYC(DSHOT_BIT_CYC), .T0H(DSHOT_T0H), .T1H(DSHOT_T1H), .GAP_CYC(DSHOT_GAP_CYC)
    ) u_dshot (
      .clk, .rst,
      .enable (ctrl.line_enable[i] && !ctrl.line_is_sbus[i]),
      .value  (ctrl.dshot_value[i]),
      .dshot_o(dshot_o[i]),
      .frames (dshot_frames[i])
    );

    always_ff @(posedge clk) begin
      if (rst) rc_out[i] <= 1'b0;
      else if (!ctrl.line_enable[i]) rc_out[i] <= 1'b0;
      else rc_out[i] <= ctrl.line_is_sbus[i] ? sbus_tx : dshot_o[i];
    end
  end

  // ---------------- camera channel ----------------
  window_capture #(.LINE_W(RAW_W)) u_window (
    .clk, .rst,
    .pix_valid(cam_valid), .pix_sof(cam_sof), .pix_data(cam_data),
    .enable(ctrl.win_enable), .x0(ctrl.win_x0), .y0(ctrl.win_y0),
    .width(ctrl.win_width), .height(ctrl.win_height), .step(ctrl.win_step),
    .base0(ctrl.win_base0), .base1(ctrl.win_base1), .swap_req,
    .out_valid(win_valid), .out_ready(win_ready), .out_addr(win_addr), .out_data(win_data),
    .write_buf(win_buf), .swap_pending(win_pending), .overflow(win_overflow),
    .frames(win_frames)
  );

  axi_burst_writer #(.AWCACHE(4'b1111), .AWUSER(5'b00001)) u_acp_wr (
    .clk, .rst,
    .in_valid(win_valid), .in_ready(win_ready), .in_addr(win_addr), .in_data(win_data),
    .m_awaddr(acp_awaddr), .m_awlen(acp_awlen), .m_awsize(acp_awsize),
    .m_awburst(acp_awburst), .m_awcache(acp_awcache), .m_awprot(acp_awprot),
    .m_awuser(acp_awuser), .m_awvalid(acp_awvalid), .m_awready(acp_awready),
    .m_wdata(acp_wdata), .m_wstrb(acp_wstrb), .m_wlast(acp_wlast),
    .m_wvalid(acp_wvalid), .m_wready(acp_wready),
    .m_bresp(acp_bresp), .m_bvalid(acp_bvalid), .m_bready(acp_bready),
    .resp_error(acp_err), .bursts(acp_bursts)
  );

  edge_pipeline #(.RAW_W(RAW_W), .RAW_H(RAW_H)) u_edges (
    .clk, .rst,
    .pix_valid(cam_valid), .pix_sof(cam_sof), .pix_data(cam_data),
    .threshold(ctrl.edge_threshold), .base(ctrl.edge_base),
    .out_valid(edge_valid), .out_ready(edge_ready), .out_addr(edge_addr),
    .out_data(edge_data), .frame_done(edge_frame_done),
    .overflow(edge_overflow), .stall_count(edge_stalls)
  );

  // With edge output disabled the map is computed and discarded.
  assign edge_ready = ctrl.edge_enable ? hp_in_ready : 1'b1;

  axi_burst_writer #(.AWCACHE(4'b0011), .AWUSER(5'b00000)) u_hp_wr (
    .clk, .rst,
    .in_valid(edge_valid && ctrl.edge_enable), .in_ready(hp_in_ready),
    .in_addr(edge_addr), .in_data(edge_data),
    .m_awaddr(hp_awaddr), .m_awlen(hp_awlen), .m_awsize(hp_awsize),
    .m_awburst(hp_awburst), .m_awcache(hp_awcache), .m_awprot(hp_awprot),
    .m_awuser(hp_awuser), .m_awvalid(hp_awvalid), .m_awready(hp_awready),
    .m_wdata(hp_wdata), .m_wstrb(hp_wstrb), .m_wlast(hp_wlast),
    .m_wvalid(hp_wvalid), .m_wready(hp_wready),
    .m_bresp(hp_bresp), .m_bvalid(hp_bvalid), .m_bready(hp_bready),
    .resp_error(hp_err), .bursts(hp_bursts)
  );

  always_ff @(posedge clk) begin
    if (rst) edge_frames <= '0;
    else if (edge_frame_done) edge_frames <= edge_frames + 1'b1;
  end
endmodule
