// tb_axi_gp_regs: drives the AXI4-Lite slave with single writes and reads
// (address and data sometimes a cycle apart, responses sometimes held off)
// and checks: read-back of every read/write register against a model that
// applies the byte strobes, the ctrl outputs, SBUS-area writes appearing on
// the register-file port, the one-clock swap request, the status registers
// and the reset values.
module tb_axi_gp_regs;
  import kestrel_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [11:0] awaddr = '0, araddr = '0;
  logic awvalid = 1'b0, wvalid = 1'b0, bready = 1'b0, arvalid = 1'b0, rready = 1'b0;
  logic [31:0] wdata = '0;
  logic [3:0] wstrb = '0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  ctrl_t ctrl;
  logic sbus_we, swap_req;
  logic [4:0] sbus_waddr;
  logic [31:0] sbus_wdata;
  logic win_buf = 1'b1, win_pend = 1'b0, overflow = 1'b1, axi_error = 1'b0;
  logic [15:0] edge_frames = 16'h1234;
  logic [15:0] sbus_frames = 16'h0A0B, win_frames = 16'h0C0D;
  logic [15:0] acp_bursts = 16'h1111, hp_bursts = 16'h2222;
  logic        sbus_busy = 1'b1;
  logic [NUM_RC_LINES-1:0][15:0] dshot_frames = {16'h0404, 16'h0303, 16'h0202, 16'h0101};
  logic [31:0] edge_stalls = 32'hDEAD_0042;
  int checks = 0, failures = 0;
  int sbus_writes = 0, swaps = 0;
  logic [4:0] last_sbus_addr;
  logic [31:0] last_sbus_data;

  axi_gp_regs dut (
    .clk, .rst,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready), .ctrl, .sbus_we, .sbus_waddr, .sbus_wdata, .swap_req,
    .win_buf, .win_swap_pending(win_pend), .edge_frames, .overflow, .axi_error,
    .sbus_frames, .sbus_busy, .dshot_frames, .win_frames, .acp_bursts, .hp_bursts,
    .edge_stalls
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (sbus_we) begin
      sbus_writes++;
      last_sbus_addr = sbus_waddr;
      last_sbus_data = sbus_wdata;
    end
    if (swap_req) swaps++;
  end

  task automatic axi_write(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s);
    @(negedge clk);
    awaddr = a; awvalid = 1'b1;
    if ($urandom_range(0, 1)) @(negedge clk);
    wdata = d; wstrb = s; wvalid = 1'b1;
    bready = ($urandom_range(0, 1) == 1);
    @(posedge clk);
    while (!(awready && wready)) @(posedge clk);
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    if (!bready) begin
      @(negedge clk);
      bready = 1'b1;
    end
    @(posedge clk);
    while (!bvalid) @(posedge clk);
    checks++;
    if (bresp !== 2'b00) failures++;
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic axi_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1; rready = 1'b0;
    @(posedge clk);
    while (!arready) @(posedge clk);
    @(negedge clk);
    arvalid = 1'b0;
    if ($urandom_range(0, 1)) @(negedge clk);
    rready = 1'b1;
    @(posedge clk);
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(negedge clk) rready = 1'b0;
  endtask

  function automatic logic [31:0] apply(logic [31:0] old, logic [31:0] nw, logic [3:0] s,
                                        logic [31:0] keep);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = s[i] ? nw[8*i +: 8] : old[8*i +: 8];
    return r & keep;
  endfunction

  localparam int NREG = 12;
  localparam logic [11:0] ADDR [NREG] = '{REG_DSHOT_BASE, REG_DSHOT_BASE + 12'h4,
    REG_DSHOT_BASE + 12'h8, REG_DSHOT_BASE + 12'hC, REG_LINE_CFG, REG_WIN_CTRL,
    REG_WIN_ORIGIN, REG_WIN_SIZE, REG_WIN_BASE0, REG_WIN_BASE1, REG_EDGE_CTRL, REG_EDGE_BASE};
  localparam logic [31:0] KEEP [NREG] = '{32'hFFF, 32'hFFF, 32'hFFF, 32'hFFF, 32'hFF,
    32'hF1, 32'h0FFF_0FFF, 32'h0FFF_0FFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'h0FFF_0001,
    32'hFFFF_FFFF};

  initial begin
    logic [31:0] model [NREG];
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // reset values
    for (int i = 0; i < NREG; i++) begin
      model[i] = (ADDR[i] == REG_WIN_CTRL) ? 32'h10 : 32'h0;
      axi_read(ADDR[i], d);
      checks++;
      if (d !== model[i]) begin failures++; $display("reset %h = %h", ADDR[i], d); end
    end
    for (int n = 0; n < 300; n++) begin
      int i;
      logic [31:0] v;
      logic [3:0] s;
      i = $urandom_range(0, NREG - 1);
      v = $urandom;
      s = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'hF;
      axi_write(ADDR[i], v, s);
      model[i] = apply(model[i], v, s, KEEP[i]);
      axi_read(ADDR[$urandom_range(0, NREG - 1)], d);
      i = $urandom_range(0, NREG - 1);
      axi_read(ADDR[i], d);
      checks++;
      if (d !== model[i]) begin
        failures++;
        if (failures < 10) $display("reg %h = %h want %h", ADDR[i], d, model[i]);
      end
    end
    // ctrl outputs follow the registers
    checks += 6;
    if (ctrl.dshot_value[2] !== model[2][11:0]) failures++;
    if ({ctrl.line_is_sbus, ctrl.line_enable} !== model[4][7:0]) failures++;
    if (ctrl.win_x0 !== model[6][11:0] || ctrl.win_y0 !== model[6][27:16]) failures++;
    if (ctrl.win_height !== model[7][27:16]) failures++;
    if (ctrl.edge_threshold !== model[10][27:16]) failures++;
    if (ctrl.edge_base !== model[11]) failures++;
    // SBUS area
    axi_write(12'h044, 32'hABCD_1234, 4'hF);
    checks += 3;
    if (sbus_writes != 1) failures++;
    if (last_sbus_addr !== 5'd17) failures++;
    if (last_sbus_data !== 32'hABCD_1234) failures++;
    // swap request
    axi_write(REG_WIN_SWAP, 32'h1, 4'hF);
    checks++;
    if (swaps != 1) failures++;
    // status
    axi_read(REG_WIN_STATUS, d);
    checks++;
    if (d !== 32'h1) failures++;
    win_pend = 1'b1; win_buf = 1'b0;
    axi_read(REG_WIN_STATUS, d);
    checks++;
    if (d !== 32'h2) failures++;
    axi_read(REG_STATUS, d);
    checks++;
    if (d !== 32'h0001_1234) begin failures++; $display("status %h", d); end
    // activity counters
    axi_read(REG_RC_COUNT, d);
    checks++;
    if (d !== 32'h0001_0A0B) failures++;
    for (int i = 0; i < NUM_RC_LINES; i++) begin
      axi_read(REG_DSHOT_COUNT + 12'(4 * i), d);
      checks++;
      if (d !== {16'd0, dshot_frames[i]}) failures++;
    end
    axi_read(REG_WIN_FRAMES, d);
    checks++;
    if (d !== 32'h0000_0C0D) failures++;
    axi_read(REG_BURSTS, d);
    checks++;
    if (d !== 32'h2222_1111) failures++;
    axi_read(REG_EDGE_STALLS, d);
    checks++;
    if (d !== 32'hDEAD_0042) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
