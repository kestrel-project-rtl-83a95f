// tb_edge_packer: feeds two frames of random edge bits (40 x 3, so a line
// has one full and one partial word and is padded to 8 words) with random
// gaps and random output back-pressure. Checks every word's data and address
// against base + 4*(row*8 + word), pad words zero, the word count, that the
// base is taken per frame, and frame_done.
module tb_edge_packer;
  localparam int unsigned W = 40;
  localparam int unsigned H = 3;
  localparam int unsigned LINE_WORDS = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [31:0] base = 32'h1000_0000;
  logic in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic out_valid, out_ready = 1'b0, frame_done;
  logic [31:0] out_addr, out_data;
  int checks = 0, failures = 0, nwords = 0, ndone = 0;
  bit bits [2][H][W];
  logic [31:0] exp_addr [$], exp_data [$];

  edge_packer #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst, .base, .in_valid, .in_ready, .in_bit,
    .out_valid, .out_ready, .out_addr, .out_data, .frame_done
  );

  always #5 clk = ~clk;
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks += 2;
      nwords++;
      if (exp_addr.size() == 0) failures++;
      else begin
        if (out_addr !== exp_addr[0]) begin
          failures++;
          if (failures < 10) $display("addr %h want %h", out_addr, exp_addr[0]);
        end
        if (out_data !== exp_data[0]) begin
          failures++;
          if (failures < 10) $display("data %h want %h", out_data, exp_data[0]);
        end
        void'(exp_addr.pop_front());
        void'(exp_data.pop_front());
      end
    end
    if (!rst && frame_done) ndone++;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      logic [31:0] b;
      b = 32'h1000_0000 + 32'(f) * 32'h0001_0000;
      for (int r = 0; r < H; r++) begin
        for (int w = 0; w < LINE_WORDS; w++) begin
          logic [31:0] d;
          d = '0;
          for (int i = 0; i < 32; i++)
            if (w * 32 + i < W) begin
              bits[f][r][w*32+i] = $urandom_range(0, 1);
              d[i] = bits[f][r][w*32+i];
            end
          exp_addr.push_back(b + 32'(4 * (r * LINE_WORDS + w)));
          exp_data.push_back(d);
        end
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_bit   = bits[f][r][c];
          if (r == 0 && c == 0) base = 32'h1000_0000 + 32'(f) * 32'h0001_0000;
          else base = 32'hDEAD_0000;   // must not be used mid-frame
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (100) @(posedge clk);
    checks += 2;
    if (nwords != 2 * H * LINE_WORDS) begin
      failures++;
      $display("%0d words", nwords);
    end
    if (ndone != 2) begin
      failures++;
      $display("%0d frame_done", ndone);
    end
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
