// tb_sbus_sender: programs 16 random servo channels, the flags and the
// command register, then decodes the serial line independently: each frame's
// 300 bits are sampled mid-bit, checked for start bit, even parity and two
// stop bits, and the 25 bytes compared with 0x0F, the channel field packed
// here as a 176-bit vector, the flags and 0x00. Checks the frame period
// ((300 + GAP_BITS) bit times), that a channel rewritten while running shows
// up in a later frame, that clearing command bit 1's inversion-disable is
// honoured, and that clearing bit 0 stops the frames.
module tb_sbus_sender;
  localparam int unsigned DIV = 4;
  localparam int unsigned GAP = 10;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic reg_we = 1'b0;
  logic [4:0] reg_waddr = '0;
  logic [31:0] reg_wdata = '0;
  logic tx_o, busy;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  logic [10:0] ch [16];
  logic [7:0] flags;
  bit invert = 1'b1;
  int cyc = 0;
  int frames_ok = 0;
  int last_start = -1;

  sbus_sender #(.CLK_DIV(DIV), .GAP_BITS(GAP)) dut (
    .clk, .rst, .reg_we, .reg_waddr, .reg_wdata, .tx_o, .busy, .frames
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_waddr = 5'(a); reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  function automatic logic [7:0] exp_byte(int k);
    logic [175:0] f;
    if (k == 0) return 8'h0F;
    if (k == 23) return flags;
    if (k == 24) return 8'h00;
    for (int i = 0; i < 16; i++) f[11*i +: 11] = ch[i];
    return f[8*(k-1) +: 8];
  endfunction

  // Line decoder: runs forever, checks every frame it sees.
  initial begin
    @(negedge rst);
    forever begin
      logic u;
      int start;
      bit ok;
      // wait for a start bit (UART level 0)
      do begin
        @(posedge clk);
        u = invert ? ~tx_o : tx_o;
      end while (u != 1'b0);
      start = cyc;
      ok = 1;
      if (last_start >= 0) begin
        checks++;
        if (start - last_start != (300 + GAP) * DIV) begin
          failures++;
          $display("frame period %0d cycles", start - last_start);
        end
      end
      last_start = start;
      repeat (DIV / 2) @(posedge clk);
      for (int b = 0; b < 25; b++) begin
        logic [11:0] bits;
        logic [7:0] d;
        for (int i = 0; i < 12; i++) begin
          bits[i] = invert ? ~tx_o : tx_o;
          repeat (DIV) @(posedge clk);
        end
        for (int i = 0; i < 8; i++) d[7-i] = bits[1+i];   // MSB first
        checks += 4;
        if (bits[0] !== 1'b0) begin failures++; ok = 0; end
        if (bits[9] !== ^d) begin failures++; ok = 0; end
        if (bits[11:10] !== 2'b11) begin failures++; ok = 0; end
        if (d !== exp_byte(b)) begin
          failures++;
          ok = 0;
          if (failures < 10) $display("byte %0d = %h want %h bits %b", b, d, exp_byte(b), bits);
        end
      end
      if (ok) frames_ok++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 16; i++) begin
      ch[i] = 11'($urandom);
      wr(i, {$urandom} | 32'hFFFF_F800 & $urandom);   // upper bits are ignored
      ch[i] = reg_wdata[10:0];
    end
    flags = 8'($urandom);
    wr(16, {24'd0, flags});
    wr(17, 32'h1);                   // enable, inverted line
    checks++;
    if (busy) failures++;
    // Let two frames pass, then change a channel between frames.
    wait (frames == 16'd2);
    ch[5] = 11'h5A5;
    wr(5, 32'h5A5);
    wait (frames == 16'd4);
    // Disable inversion: applies after the frame in which it is reread.
    wr(17, 32'h3);
    wait (frames == 16'd5);
    invert = 1'b0;
    last_start = -1;
    wait (frames == 16'd7);
    wr(17, 32'h0);                   // stop (and inverted idle again)
    wait (frames == 16'd8);
    invert = 1'b1;
    repeat (3 * (300 + GAP) * DIV) @(posedge clk);
    checks += 3;
    if (frames != 16'd8) begin failures++; $display("frames %0d after stop", frames); end
    if (frames_ok < 7) begin failures++; $display("only %0d clean frames", frames_ok); end
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (300 + GAP) * DIV) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
