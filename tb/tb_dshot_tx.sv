// tb_dshot_tx: decodes the DShot line by measuring every high pulse: the
// width must be exactly T0H or T1H clocks, the rising edges of a frame BIT_CYC
// apart, and 16 pulses form a frame {throttle, telemetry, checksum} whose
// checksum must be the XOR of the three nibbles, computed here. Runs with the
// DShot-600 timing at 100 MHz (167/63/125 clocks), changes the value while
// running and checks that the line stays low once disabled.
module tb_dshot_tx;
  localparam int unsigned BIT = 167, T0 = 63, T1 = 125, GAP = 500;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic enable = 1'b0;
  logic [11:0] value = '0;
  logic dshot_o;
  logic [15:0] frames;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] rx [$];

  dshot_tx #(.BIT_CYC(BIT), .T0H(T0), .T1H(T1), .GAP_CYC(GAP)) dut (
    .clk, .rst, .enable, .value, .dshot_o, .frames
  );

  always #5 clk = ~clk;

  // Pulse decoder.
  initial begin
    int rise, prev_rise, width, nbits;
    logic [15:0] sh;
    prev_rise = -100000;
    nbits = 0;
    @(negedge rst);
    forever begin
      @(posedge clk);
      cyc++;
      if (dshot_o) begin
        rise = cyc;
        width = 0;
        while (dshot_o) begin
          width++;
          @(posedge clk);
          cyc++;
        end
        checks++;
        if (width != T0 && width != T1) begin
          failures++;
          $display("pulse width %0d", width);
        end
        if (nbits > 0) begin
          checks++;
          if (rise - prev_rise != BIT) begin
            failures++;
            $display("bit spacing %0d", rise - prev_rise);
          end
        end
        sh = {sh[14:0], (width == T1)};
        nbits++;
        prev_rise = rise;
        if (nbits == 16) begin
          rx.push_back(sh);
          nbits = 0;
        end
      end
    end
  end

  function automatic logic [15:0] expect_frame(logic [11:0] v);
    logic [3:0] c;
    c = v[11:8] ^ v[7:4] ^ v[3:0];
    return {v, c};
  endfunction

  initial begin
    logic [11:0] v1, v2;
    v1 = {11'd1046, 1'b0};
    v2 = {11'd48, 1'b1};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    value = v1;
    enable = 1'b1;
    wait (frames == 16'd3);
    @(negedge clk) value = v2;
    wait (frames == 16'd6);
    @(negedge clk) enable = 1'b0;
    repeat (3 * (16 * BIT + GAP)) @(posedge clk);
    checks += 3;
    if (frames != 16'd6) begin failures++; $display("frames %0d", frames); end
    if (rx.size() != 6) begin failures++; $display("%0d frames decoded", rx.size()); end
    if (dshot_o) failures++;
    for (int i = 0; i < rx.size(); i++) begin
      checks++;
      if (rx[i] !== expect_frame(i < 3 ? v1 : v2)) begin
        failures++;
        $display("frame %0d = %h want %h", i, rx[i], expect_frame(i < 3 ? v1 : v2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * (16 * BIT + GAP)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
