// tb_edge_pipeline: end-to-end check of the edge detector on two 32 x 16 raw
// frames (16 x 8 gray). The testbench computes the expected edge map on its
// own, pass by pass: Bayer-cell luminance, 5x5 Gaussian with edge-pixel
// replication and 7695/2^19 normalisation, four-direction gradients (top 9
// of 18 bits), thinning and threshold, then packing into 32-bit words with
// each line padded to 8 words. Every output word and address is compared.
// The frames hold a bright rectangle over noise so both edge and non-edge
// pixels occur. Also checks frame_done, no overflow, and that the padding
// steps stalled the pipeline at least once.
module tb_edge_pipeline;
  localparam int RW = 32, RH = 16;
  localparam int GW = RW / 2, GH = RH / 2;
  localparam int LINE_WORDS = 8;
  localparam int WT [5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7},
                               '{4,16,26,16,4}, '{1,4,7,4,1}};

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic pix_valid = 1'b0, pix_sof = 1'b0;
  logic [9:0] pix_data = '0;
  logic [11:0] threshold = 12'd40;
  logic [31:0] base = 32'h0800_0000;
  logic out_valid, out_ready = 1'b1, frame_done, overflow;
  logic [31:0] out_addr, out_data, stall_count;
  int checks = 0, failures = 0, ndone = 0, edges = 0;
  logic [31:0] exp_addr [$], exp_data [$];

  int raw [RH][RW];
  int gray [GH][GW];
  int blr [GH][GW];
  int grd [GH][GW][4];
  bit edg [GH][GW];

  edge_pipeline #(.RAW_W(RW), .RAW_H(RH)) dut (
    .clk, .rst, .pix_valid, .pix_sof, .pix_data, .threshold, .base,
    .out_valid, .out_ready, .out_addr, .out_data, .frame_done, .overflow, .stall_count
  );

  always #5 clk = ~clk;
  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks += 2;
      if (exp_addr.size() == 0) failures++;
      else begin
        if (out_addr !== exp_addr[0] || out_data !== exp_data[0]) begin
          failures++;
          if (failures < 10) $display("word %h @%h want %h @%h", out_data, out_addr, exp_data[0], exp_addr[0]);
        end
        void'(exp_addr.pop_front());
        void'(exp_data.pop_front());
      end
    end
    if (!rst && frame_done) ndone++;
  end

  function automatic int cl(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic int line_grad(int p[5]);
    int pos, mn;
    pos = 0;
    for (int i = 1; i < 5; i++) if (p[i] > p[pos]) pos = i;
    mn = 1 << 30;
    for (int i = 0; i < 5; i++)
      if ((pos < 2 && i >= 2) || (pos > 2 && i <= 2) || (pos == 2 && i != 2))
        if (p[i] < mn) mn = p[i];
    return (p[pos] - mn) >> 9;
  endfunction

  task automatic build_reference();
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++)
        gray[y][x] = (307 * raw[2*y+1][2*x+1] + 302 * raw[2*y][2*x+1]
                    + 302 * raw[2*y+1][2*x] + 113 * raw[2*y][2*x]) >> 4;
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        longint s;
        s = 0;
        for (int k = 0; k < 5; k++)
          for (int j = 0; j < 5; j++) s += WT[k][j] * gray[cl(y-2+k, GH-1)][cl(x-2+j, GW-1)];
        s = (s * 7695) >> 19;
        blr[y][x] = (s > 262143) ? 262143 : int'(s);
      end
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        int lh[5], lv[5], ld[5], la[5];
        for (int i = 0; i < 5; i++) begin
          lh[i] = blr[y][cl(x-2+i, GW-1)];
          lv[i] = blr[cl(y-2+i, GH-1)][x];
          ld[i] = blr[cl(y-2+i, GH-1)][cl(x-2+i, GW-1)];
          la[i] = blr[cl(y-2+i, GH-1)][cl(x+2-i, GW-1)];
        end
        grd[y][x][0] = line_grad(lh);
        grd[y][x][1] = line_grad(lv);
        grd[y][x][2] = line_grad(ld);
        grd[y][x][3] = line_grad(la);
      end
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        edg[y][x] = 0;
        for (int d = 0; d < 4; d++) begin
          int g[5], s;
          bit mx;
          for (int i = 0; i < 5; i++) begin
            int yy, xx;
            case (d)
              0: begin yy = y; xx = x - 2 + i; end
              1: begin yy = y - 2 + i; xx = x; end
              2: begin yy = y - 2 + i; xx = x - 2 + i; end
              default: begin yy = y - 2 + i; xx = x + 2 - i; end
            endcase
            g[i] = grd[cl(yy, GH-1)][cl(xx, GW-1)][d];
          end
          mx = 1;
          s = 0;
          for (int i = 0; i < 5; i++) begin
            if (g[i] > g[2]) mx = 0;
            s += g[i];
          end
          if (mx && s > int'(threshold)) edg[y][x] = 1;
        end
        if (edg[y][x]) edges++;
      end
    for (int y = 0; y < GH; y++)
      for (int w = 0; w < LINE_WORDS; w++) begin
        logic [31:0] d;
        d = '0;
        for (int i = 0; i < 32; i++) if (w * 32 + i < GW) d[i] = edg[y][w*32+i];
        exp_addr.push_back(base + 32'(4 * (y * LINE_WORDS + w)));
        exp_data.push_back(d);
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 2; f++) begin
      int rx0, ry0;
      rx0 = 6 + 4 * f;
      ry0 = 4 + 2 * f;
      for (int r = 0; r < RH; r++)
        for (int c = 0; c < RW; c++)
          raw[r][c] = $urandom_range(0, 60)
                    + ((r >= ry0 && r < ry0 + 7 && c >= rx0 && c < rx0 + 14) ? 800 : 100);
      build_reference();
      for (int r = 0; r < RH; r++) begin
        for (int c = 0; c < RW; c++) begin
          @(negedge clk);
          pix_valid = 1'b1;
          pix_sof   = (r == 0 && c == 0);
          pix_data  = 10'(raw[r][c]);
        end
        @(negedge clk);
        pix_valid = 1'b0;
        pix_sof = 1'b0;
        repeat (8) @(negedge clk);        // horizontal blanking
      end
      repeat (600) @(negedge clk);        // vertical blanking
    end
    checks += 5;
    if (ndone != 2) begin failures++; $display("frame_done %0d", ndone); end
    if (overflow) begin failures++; $display("overflow"); end
    if (stall_count == 0) begin failures++; $display("no stall"); end
    if (exp_addr.size() != 0) begin failures++; $display("%0d words missing", exp_addr.size()); end
    if (edges == 0 || edges == 2 * GW * GH) begin failures++; $display("edges %0d", edges); end
    $display("edges marked: %0d of %0d, stalls %0d", edges, 2 * GW * GH, stall_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
