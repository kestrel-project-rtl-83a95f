// tb_axi_burst_writer: pushes 12 groups of 8 words (each group at its own
// 32-byte aligned address) with random gaps, while an AXI slave model stalls
// AWREADY, WREADY and BVALID at random. Checks each burst's address, length,
// size, type, strobes, WLAST on the eighth beat only, the data in order, the
// burst counter, and that a SLVERR response sets resp_error. Also checks that
// one burst with no stalls takes 1 + 8 cycles from AWVALID to the last beat.
module tb_axi_burst_writer;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_valid = 1'b0, in_ready;
  logic [31:0] in_addr = '0, in_data = '0;
  logic [31:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic [3:0] awcache; logic [2:0] awprot; logic [4:0] awuser;
  logic awvalid, awready = 1'b0;
  logic [31:0] wdata; logic [3:0] wstrb; logic wlast, wvalid, wready = 1'b0;
  logic [1:0] bresp = 2'b00; logic bvalid = 1'b0, bready;
  logic resp_error; logic [15:0] bursts;
  int checks = 0, failures = 0;
  logic [31:0] exp_data [$];
  logic [31:0] exp_addr [$];
  bit stall = 1'b1;
  int aw_time, last_time;

  axi_burst_writer #(.AWCACHE(4'b1111), .AWUSER(5'b00001)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_addr, .in_data,
    .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize), .m_awburst(awburst),
    .m_awcache(awcache), .m_awprot(awprot), .m_awuser(awuser), .m_awvalid(awvalid),
    .m_awready(awready), .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast),
    .m_wvalid(wvalid), .m_wready(wready), .m_bresp(bresp), .m_bvalid(bvalid),
    .m_bready(bready), .resp_error(resp_error), .bursts(bursts)
  );

  always #5 clk = ~clk;

  // Slave model.
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    int nburst;
    nburst = 0;
    @(negedge rst);
    forever begin
      // address
      @(negedge clk);
      awready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      @(posedge clk);
      if (awvalid && awready) begin
        aw_time = cyc;
        checks += 6;
        if (awaddr !== exp_addr[0]) begin failures++; $display("awaddr %h want %h", awaddr, exp_addr[0]); end
        void'(exp_addr.pop_front());
        if (awlen !== 8'd7) failures++;
        if (awsize !== 3'd2) failures++;
        if (awburst !== 2'b01) failures++;
        if (awcache !== 4'b1111) failures++;
        if (awuser !== 5'b00001) failures++;
        @(negedge clk) awready = 1'b0;
        for (int beat = 0; beat < 8; ) begin
          wready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;
          @(posedge clk);
          if (wvalid && wready) begin
            checks += 3;
            if (wdata !== exp_data[0]) begin failures++; $display("wdata %h want %h", wdata, exp_data[0]); end
            void'(exp_data.pop_front());
            if (wstrb !== 4'hF) failures++;
            if (wlast !== (beat == 7)) failures++;
            if (beat == 7) last_time = cyc;
            beat++;
          end
          @(negedge clk);
        end
        wready = 1'b0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        bvalid = 1'b1;
        bresp  = (nburst == 5) ? 2'b10 : 2'b00;
        @(posedge clk);
        while (!bready) @(posedge clk);
        @(negedge clk) bvalid = 1'b0;
        nburst++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int g = 0; g < 12; g++) begin
      logic [31:0] a;
      a = 32'h2000_0000 + 32'($urandom_range(0, 4095)) * 32;
      exp_addr.push_back(a);
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        while ($urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1;
        in_addr  = a + 32'(4 * w);
        in_data  = $urandom;
        exp_data.push_back(in_data);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (400) @(posedge clk);
    // One unstalled burst for the cycle count.
    stall = 1'b0;
    exp_addr.push_back(32'h3000_0000);
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      in_valid = 1'b1; in_addr = 32'h3000_0000 + 32'(4 * w); in_data = $urandom;
      exp_data.push_back(in_data);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (100) @(posedge clk);
    checks += 4;
    if (bursts != 16'd13) begin failures++; $display("bursts %0d", bursts); end
    if (!resp_error) begin failures++; $display("error response not seen"); end
    if (exp_data.size() != 0) begin failures++; $display("%0d words not written", exp_data.size()); end
    if (last_time - aw_time != 8) begin failures++; $display("burst took %0d", last_time - aw_time); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
