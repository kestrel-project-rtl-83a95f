// tb_kestrel_top: end-to-end test of the whole design at reduced sizes
// (32 x 16 raw frames, SBUS bit = 4 clocks, DShot bit = 20 clocks).
//
// Through the AXI4-Lite port it programs 16 SBUS channels, the flags and the
// command word, three DShot values, the line modes (line 0 SBUS, lines 1-3
// DShot), a 16 x 4 window of focus and the edge detector. It then streams
// camera frames and checks, against values computed here: the window pixels
// in the buffer memory behind the coherent port, the edge bitmap behind the
// high-performance port (edge_ref_pkg), the decoded SBUS frames on line 0
// and DShot frames on lines 2 and 3. Mechanisms exercised and counted: SBUS
// frames, DShot frames, 8-beat bursts on both ports, a window-buffer swap
// through the request/acknowledge protocol, padding stalls in the edge
// pipeline, a line switching from DShot to SBUS, and the overflow flag when
// the coherent port stops accepting writes. Each must happen at least once.
module tb_kestrel_top;
  import kestrel_pkg::*;
  import edge_ref_pkg::*;

  localparam int RW = 32, RH = 16;
  localparam int SDIV = 4, SGAP = 10;
  localparam int DBIT = 20, DT0 = 7, DT1 = 14, DGAP = 30;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [11:0] awaddr = '0, araddr = '0;
  logic awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0] wstrb = 4'hF;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  logic cam_valid = 1'b0, cam_sof = 1'b0;
  logic [9:0] cam_data = '0;
  logic [31:0] acp_awaddr, acp_wdata, hp_awaddr, hp_wdata;
  logic [7:0] acp_awlen, hp_awlen;
  logic [2:0] acp_awsize, hp_awsize, acp_awprot, hp_awprot;
  logic [1:0] acp_awburst, hp_awburst, acp_bresp, hp_bresp;
  logic [3:0] acp_awcache, hp_awcache, acp_wstrb, hp_wstrb;
  logic [4:0] acp_awuser, hp_awuser;
  logic acp_awvalid, acp_awready, acp_wlast, acp_wvalid, acp_wready, acp_bvalid, acp_bready;
  logic hp_awvalid, hp_awready, hp_wlast, hp_wvalid, hp_wready, hp_bvalid, hp_bready;
  logic [3:0] rc_out;
  logic acp_stall = 1'b0;
  logic sbus_invert = 1'b1;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_swap = 0, n_mode_switch = 0, n_overflow = 0;
  logic [31:0] stalls_seen = 0;

  kestrel_top #(
    .RAW_W(RW), .RAW_H(RH), .SBUS_CLK_DIV(SDIV), .SBUS_GAP_BITS(SGAP),
    .DSHOT_BIT_CYC(DBIT), .DSHOT_T0H(DT0), .DSHOT_T1H(DT1), .DSHOT_GAP_CYC(DGAP)
  ) dut (
    .clk, .rst,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready),
    .cam_valid, .cam_sof, .cam_data,
    .acp_awaddr, .acp_awlen, .acp_awsize, .acp_awburst, .acp_awcache, .acp_awprot,
    .acp_awuser, .acp_awvalid, .acp_awready, .acp_wdata, .acp_wstrb, .acp_wlast,
    .acp_wvalid, .acp_wready, .acp_bresp, .acp_bvalid, .acp_bready,
    .hp_awaddr, .hp_awlen, .hp_awsize, .hp_awburst, .hp_awcache, .hp_awprot,
    .hp_awuser, .hp_awvalid, .hp_awready, .hp_wdata, .hp_wstrb, .hp_wlast,
    .hp_wvalid, .hp_wready, .hp_bresp, .hp_bvalid, .hp_bready,
    .rc_out
  );

  axi_mem_model acp_mem (
    .clk, .rst, .stall(acp_stall), .random_ready(1'b1),
    .awaddr(acp_awaddr), .awlen(acp_awlen), .awvalid(acp_awvalid), .awready(acp_awready),
    .wdata(acp_wdata), .wstrb(acp_wstrb), .wlast(acp_wlast), .wvalid(acp_wvalid),
    .wready(acp_wready), .bresp(acp_bresp), .bvalid(acp_bvalid), .bready(acp_bready)
  );
  axi_mem_model hp_mem (
    .clk, .rst, .stall(1'b0), .random_ready(1'b1),
    .awaddr(hp_awaddr), .awlen(hp_awlen), .awvalid(hp_awvalid), .awready(hp_awready),
    .wdata(hp_wdata), .wstrb(hp_wstrb), .wlast(hp_wlast), .wvalid(hp_wvalid),
    .wready(hp_wready), .bresp(hp_bresp), .bvalid(hp_bvalid), .bready(hp_bready)
  );

  sbus_monitor #(.CLK_DIV(SDIV)) mon_sbus (.clk, .rst, .invert(sbus_invert), .line(rc_out[0]));
  dshot_monitor #(.BIT_CYC(DBIT), .T0H(DT0), .T1H(DT1)) mon_d2 (.clk, .rst, .line(rc_out[2]));
  dshot_monitor #(.BIT_CYC(DBIT), .T0H(DT0), .T1H(DT1)) mon_d3 (.clk, .rst, .line(rc_out[3]));

  always #5 clk = ~clk;

  task automatic axi_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1; wdata = d; wvalid = 1'b1; bready = 1'b1;
    @(posedge clk);
    while (!(awready && wready)) @(posedge clk);
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    @(posedge clk);
    while (!bvalid) @(posedge clk);
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic axi_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b1;
    @(posedge clk);
    while (!arready) @(posedge clk);
    @(negedge clk) arvalid = 1'b0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(negedge clk) rready = 1'b0;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int raw [];
  task automatic send_frame(int f);
    raw = new[RW * RH];
    for (int r = 0; r < RH; r++)
      for (int c = 0; c < RW; c++)
        raw[r*RW + c] = $urandom_range(0, 60)
          + ((r >= 3 + f && r < 10 + f && c >= 5 + 3*f && c < 20 + 3*f) ? 800 : 100);
    for (int r = 0; r < RH; r++) begin
      for (int c = 0; c < RW; c++) begin
        @(negedge clk);
        cam_valid = 1'b1;
        cam_sof   = (r == 0 && c == 0);
        cam_data  = 10'(raw[r*RW + c]);
      end
      @(negedge clk);
      cam_valid = 1'b0;
      cam_sof   = 1'b0;
      repeat (6) @(negedge clk);
    end
    repeat (700) @(negedge clk);
  endtask

  task automatic check_window(int x0, int y0, int w, int h, logic [31:0] base, string tag);
    int bad;
    bad = 0;
    for (int i = 0; i < h; i++)
      for (int j = 0; j < w; j += 2) begin
        logic [31:0] want;
        want = {6'd0, 10'(raw[(y0+i)*RW + x0+j+1]), 6'd0, 10'(raw[(y0+i)*RW + x0+j])};
        if (acp_mem.read_word(base + 4 * (i * (w / 2) + j / 2)) !== want) bad++;
      end
    check(bad == 0, $sformatf("%s: %0d window words wrong", tag, bad));
  endtask

  task automatic check_edges(logic [31:0] base, int thr, string tag);
    logic [31:0] words [$];
    int edges, bad;
    edge_words(raw, RW, RH, thr, words, edges);
    bad = 0;
    foreach (words[i]) if (hp_mem.read_word(base + 4 * i) !== words[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d edge words wrong (%0d edge pixels)", tag, bad, edges));
    check(edges > 0, $sformatf("%s: no edges in the reference", tag));
  endtask

  logic [10:0] ch [16];
  logic [7:0] flags;
  logic [11:0] dv [4];

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // --- program the glue ---
    for (int i = 0; i < 16; i++) begin
      ch[i] = 11'($urandom);
      axi_write(12'(4 * i), {21'd0, ch[i]});
    end
    flags = 8'h03;
    axi_write(12'h040, {24'd0, flags});
    axi_write(12'h044, 32'h1);                       // SBUS enable, inverted
    for (int i = 1; i < 4; i++) begin
      dv[i] = {11'($urandom_range(48, 2047)), 1'b0};
      axi_write(REG_DSHOT_BASE + 12'(4 * i), {20'd0, dv[i]});
    end
    axi_write(REG_LINE_CFG, 32'h1F);                 // all enabled, line 0 SBUS
    // --- program the camera channel ---
    axi_write(REG_WIN_ORIGIN, {4'd0, 12'd2, 4'd0, 12'd4});
    axi_write(REG_WIN_SIZE,   {4'd0, 12'd4, 4'd0, 12'd16});
    axi_write(REG_WIN_BASE0, 32'h0001_0000);
    axi_write(REG_WIN_BASE1, 32'h0002_0000);
    axi_write(REG_WIN_CTRL, 32'h11);                 // enable, step 1
    axi_write(REG_EDGE_BASE, 32'h0008_0000);
    axi_write(REG_EDGE_CTRL, {4'd0, 12'd40, 15'd0, 1'b1});

    // --- frame 1: window into buffer 0 ---
    send_frame(0);
    check_window(4, 2, 16, 4, 32'h0001_0000, "frame 1");
    check_edges(32'h0008_0000, 40, "frame 1");
    axi_read(REG_WIN_STATUS, d);
    check(d[1:0] == 2'b00, "status before swap");

    // --- swap protocol: request, wait for acknowledge, frame 2 into buffer 1 ---
    axi_write(REG_WIN_SWAP, 32'h1);
    axi_read(REG_WIN_STATUS, d);
    check(d[1] == 1'b1, "swap pending after request");
    send_frame(1);
    axi_read(REG_WIN_STATUS, d);
    check(d[1:0] == 2'b01, "swap acknowledged, hardware now on buffer 1");
    if (d[1:0] == 2'b01) n_swap++;
    check_window(4, 2, 16, 4, 32'h0002_0000, "frame 2");
    check_edges(32'h0008_0000, 40, "frame 2");
    axi_read(REG_STATUS, d);
    check(d[15:0] == 16'd2, $sformatf("edge frame count %0d", d[15:0]));
    check(d[16] == 1'b0, "no overflow yet");

    // --- glue outputs so far ---
    check(mon_sbus.frames.size() >= 2, $sformatf("%0d SBUS frames", mon_sbus.frames.size()));
    check(mon_sbus.framing_errors == 0, "SBUS framing");
    foreach (mon_sbus.frames[f]) begin
      logic [175:0] field;
      int bad;
      for (int i = 0; i < 16; i++) field[11*i +: 11] = ch[i];
      bad = 0;
      if (mon_sbus.frames[f][0] !== 8'h0F) bad++;
      for (int k = 0; k < 22; k++) if (mon_sbus.frames[f][k+1] !== field[8*k +: 8]) bad++;
      if (mon_sbus.frames[f][23] !== flags) bad++;
      if (mon_sbus.frames[f][24] !== 8'h00) bad++;
      check(bad == 0, $sformatf("SBUS frame %0d: %0d bytes wrong", f, bad));
    end
    check(mon_d2.frames.size() >= 2 && mon_d3.frames.size() >= 2, "DShot frames on lines 2 and 3");
    check(mon_d2.timing_errors == 0 && mon_d3.timing_errors == 0, "DShot pulse timing");
    foreach (mon_d2.frames[f])
      check(mon_d2.frames[f] == {dv[2], dv[2][3:0] ^ dv[2][7:4] ^ dv[2][11:8]}, "DShot line 2 value");
    foreach (mon_d3.frames[f])
      check(mon_d3.frames[f] == {dv[3], dv[3][3:0] ^ dv[3][7:4] ^ dv[3][11:8]}, "DShot line 3 value");

    // --- mode switch: line 1 from DShot to SBUS ---
    axi_write(REG_LINE_CFG, 32'h3F);
    begin
      int same;
      same = 0;
      @(negedge clk);
      repeat (2000) begin
        @(negedge clk);
        if (rc_out[1] === rc_out[0]) same++;
      end
      check(same == 2000, "line 1 follows the SBUS stream after the switch");
      if (same == 2000) n_mode_switch++;
    end

    // --- activity counters read back over AXI-Lite, against the bus side ---
    axi_read(REG_BURSTS, d);
    check(d == {16'(hp_mem.bursts), 16'(acp_mem.bursts)}, "burst counters match the ports");
    axi_read(REG_EDGE_STALLS, d);
    stalls_seen = d;

    // --- overflow: coherent port stops accepting ---
    acp_stall = 1'b1;
    send_frame(2);
    send_frame(3);
    axi_read(REG_STATUS, d);
    check(d[16] == 1'b1, "overflow flagged when the coherent port stalls");
    if (d[16]) n_overflow++;
    acp_stall = 1'b0;

    // --- mechanisms ---
    $display("mechanisms: sbus_frames=%0d dshot_frames=%0d acp_bursts=%0d hp_bursts=%0d swaps=%0d pad_stalls=%0d mode_switches=%0d overflows=%0d",
             mon_sbus.frames.size(), mon_d2.frames.size() + mon_d3.frames.size(),
             acp_mem.bursts, hp_mem.bursts, n_swap, stalls_seen,
             n_mode_switch, n_overflow);
    check(mon_sbus.frames.size() > 0, "mechanism: SBUS frame");
    check(mon_d2.frames.size() > 0, "mechanism: DShot frame");
    check(acp_mem.bursts > 0, "mechanism: coherent-port burst");
    check(hp_mem.bursts > 0, "mechanism: HP-port burst");
    check(n_swap > 0, "mechanism: buffer swap");
    check(stalls_seen > 0, "mechanism: edge padding stall");
    check(n_mode_switch > 0, "mechanism: line mode switch");
    check(n_overflow > 0, "mechanism: overflow");
    check(acp_mem.protocol_errors == 0 && hp_mem.protocol_errors == 0, "AXI burst framing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
