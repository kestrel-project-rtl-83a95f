// tb_kestrel_full: one complete operation of the design at its default
// sizes: a full 1920 x 1080 raw camera frame with a 256 x 256 window of focus
// at (832, 412), the 960 x 540 edge map, and the RC glue at 100 MHz timing
// (SBUS 100 kbit/s, DShot-600). Checks every window word in the memory behind
// the coherent port, every edge-map word against edge_ref_pkg, the SBUS
// frames sent meanwhile on line 0 and the DShot frames on lines 1-3.
module tb_kestrel_full;
  import kestrel_pkg::*;
  import edge_ref_pkg::*;

  localparam int RW = 1920, RH = 1080;
  localparam int SDIV = 1000;
  localparam int DBIT = 167, DT0 = 63, DT1 = 125;
  localparam int WX = 832, WY = 412, WW = 256, WH = 256;

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
  logic sbus_invert = 1'b1;

  int checks = 0, failures = 0;

  kestrel_top dut (
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
    .clk, .rst, .stall(1'b0), .random_ready(1'b1),
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
  dshot_monitor #(.BIT_CYC(DBIT), .T0H(DT0), .T1H(DT1)) mon_d1 (.clk, .rst, .line(rc_out[1]));
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
          + ((r >= 300 + f && r < 700 + f && c >= 500 + 3*f && c < 1400 + 3*f) ? 800 : 100)
          + ((((r / 64) + (c / 64)) % 2 == 1) ? 60 : 0);
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
      repeat (280) @(negedge clk);
    end
    repeat (30000) @(negedge clk);
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
    axi_write(REG_WIN_ORIGIN, {4'd0, 12'(WY), 4'd0, 12'(WX)});
    axi_write(REG_WIN_SIZE,   {4'd0, 12'(WH), 4'd0, 12'(WW)});
    axi_write(REG_WIN_BASE0, 32'h0001_0000);
    axi_write(REG_WIN_BASE1, 32'h0002_0000);
    axi_write(REG_WIN_CTRL, 32'h11);                 // enable, step 1
    axi_write(REG_EDGE_BASE, 32'h0008_0000);
    axi_write(REG_EDGE_CTRL, {4'd0, 12'd40, 15'd0, 1'b1});

    // --- one full frame: window into buffer 0, edge map ---
    send_frame(0);
    check_window(WX, WY, WW, WH, 32'h0001_0000, "frame");
    check_edges(32'h0008_0000, 40, "frame");
    axi_read(REG_STATUS, d);
    check(d[15:0] == 16'd1, $sformatf("edge frame count %0d", d[15:0]));
    check(d[16] == 1'b0, "no overflow");
    axi_read(REG_WIN_STATUS, d);
    check(d[1:0] == 2'b00, "window status");

    // --- RC glue during the frame ---
    check(mon_sbus.frames.size() >= 1, $sformatf("%0d SBUS frames", mon_sbus.frames.size()));
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
    check(mon_d1.frames.size() >= 2 && mon_d2.frames.size() >= 2 && mon_d3.frames.size() >= 2,
          "DShot frames on lines 1-3");
    check(mon_d1.timing_errors == 0 && mon_d2.timing_errors == 0 && mon_d3.timing_errors == 0,
          "DShot pulse timing");
    foreach (mon_d1.frames[f])
      check(mon_d1.frames[f] == {dv[1], dv[1][3:0] ^ dv[1][7:4] ^ dv[1][11:8]}, "DShot line 1 value");
    foreach (mon_d3.frames[f])
      check(mon_d3.frames[f] == {dv[3], dv[3][3:0] ^ dv[3][7:4] ^ dv[3][11:8]}, "DShot line 3 value");
    check(acp_mem.protocol_errors == 0 && hp_mem.protocol_errors == 0, "AXI burst framing");
    $display("sbus_frames=%0d dshot_frames=%0d acp_bursts=%0d hp_bursts=%0d pad_stalls=%0d",
             mon_sbus.frames.size(), mon_d1.frames.size() + mon_d2.frames.size() + mon_d3.frames.size(),
             acp_mem.bursts, hp_mem.bursts, dut.u_edges.stall_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
