// tb_thin_threshold: random gradient windows and thresholds. The reference
// marks an edge when, for some direction, the centre gradient is the largest
// of the five along that direction's line and the five sum above the
// threshold. Hand cases check a ridge that passes and one whose centre is
// not the maximum.
module tb_thin_threshold;
  logic [4:0][4:0][3:0][8:0] win;
  logic [11:0] threshold;
  logic edge_o;
  int checks = 0, failures = 0, edges_seen = 0;

  thin_threshold dut (.win, .threshold, .edge_o);

  function automatic bit ref_edge();
    bit e;
    e = 0;
    for (int d = 0; d < 4; d++) begin
      int g[5], sum;
      bit mx;
      for (int i = 0; i < 5; i++) begin
        case (d)
          0: g[i] = win[2][i][0];
          1: g[i] = win[i][2][1];
          2: g[i] = win[i][i][2];
          default: g[i] = win[i][4-i][3];
        endcase
      end
      mx = 1;
      sum = 0;
      for (int i = 0; i < 5; i++) begin
        if (g[i] > g[2]) mx = 0;
        sum += g[i];
      end
      if (mx && sum > int'(threshold)) e = 1;
    end
    return e;
  endfunction

  task automatic check_one();
    bit want;
    want = ref_edge();
    #1;
    checks++;
    if (edge_o !== want) begin
      failures++;
      if (failures < 10) $display("edge %0b want %0b", edge_o, want);
    end
    if (edge_o) edges_seen++;
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++)
          for (int d = 0; d < 4; d++) win[k][j][d] = 9'($urandom_range(0, 511) >> $urandom_range(0, 4));
      threshold = 12'($urandom_range(0, 1500));
      check_one();
    end
    // Vertical ridge in the horizontal gradient: centre 100, neighbours 50.
    win = '0;
    for (int i = 0; i < 5; i++) win[2][i][0] = (i == 2) ? 9'd100 : 9'd50;
    threshold = 12'd299;
    check_one();
    checks++;
    if (edge_o !== 1'b1) failures++;
    threshold = 12'd300;
    check_one();
    checks++;
    if (edge_o !== 1'b0) failures++;
    // Centre not the maximum: no edge whatever the threshold.
    win[2][3][0] = 9'd101;
    threshold = 12'd0;
    check_one();
    checks++;
    if (edge_o !== 1'b0) failures++;
    checks++;
    if (edges_seen < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
