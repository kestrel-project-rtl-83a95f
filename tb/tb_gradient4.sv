// tb_gradient4: random and structured windows through the four-direction
// gradient. The reference sorts out the position of the (first) maximum on
// each line of five and applies the left/right/centre rule, then keeps the
// top 9 of 18 bits. Structured cases (a step edge, a ramp, a single bright
// centre) check the rule's three branches with hand-worked values.
module tb_gradient4;
  logic [4:0][4:0][17:0] win;
  logic [3:0][8:0] grad;
  int checks = 0, failures = 0;

  gradient4 dut (.win, .grad);

  function automatic int ref_grad(int p[5]);
    int pos, mx, mn;
    pos = 0;
    for (int i = 1; i < 5; i++) if (p[i] > p[pos]) pos = i;
    mx = p[pos];
    mn = 1 << 30;
    for (int i = 0; i < 5; i++) begin
      if (pos < 2 && i >= 2 && p[i] < mn) mn = p[i];
      if (pos > 2 && i <= 2 && p[i] < mn) mn = p[i];
      if (pos == 2 && i != 2 && p[i] < mn) mn = p[i];
    end
    return (mx - mn) >> 9;
  endfunction

  task automatic check_all();
    int lh[5], lv[5], ld[5], la[5];
    int e[4];
    for (int i = 0; i < 5; i++) begin
      lh[i] = win[2][i];
      lv[i] = win[i][2];
      ld[i] = win[i][i];
      la[i] = win[i][4-i];
    end
    e[0] = ref_grad(lh);
    e[1] = ref_grad(lv);
    e[2] = ref_grad(ld);
    e[3] = ref_grad(la);
    #1;
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (int'(grad[d]) != e[d]) begin
        failures++;
        if (failures < 10) $display("dir %0d got %0d want %0d", d, grad[d], e[d]);
      end
    end
  endtask

  task automatic expect_h(int want);
    #1;
    checks++;
    if (int'(grad[0]) != want) begin
      failures++;
      $display("hand case: H gradient %0d want %0d", grad[0], want);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++) win[k][j] = 18'($urandom);
      check_all();
    end
    // Step edge: left columns bright (max at left) -> 200000 - 1000 over 512.
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 5; j++) win[k][j] = (j < 2) ? 18'd200000 : 18'd1000;
    expect_h((200000 - 1000) >> 9);
    // Ramp rising to the right (max at right): min of centre and left two.
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 5; j++) win[k][j] = 18'(10000 + 50000 * j);
    expect_h((210000 - 10000) >> 9);
    // Bright centre, uneven sides: max at centre, min of the other four.
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 5; j++) win[k][j] = 18'(30000 + 1000 * j);
    win[2][2] = 18'd250000;
    expect_h((250000 - 30000) >> 9);
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
