// tb_gauss_blur: random and flat 5x5 windows through the Gaussian kernel.
// The reference multiplies by the integer weights, scales by 7695/2^19 and
// saturates at 18 bits; for flat windows the result must also be within one
// 0.2% of 4x the pixel value (the kernel is normalised; 7695/2^21 is
// 0.17% above 1/273).
module tb_gauss_blur;
  localparam int WT [5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7},
                               '{4,16,26,16,4}, '{1,4,7,4,1}};
  logic [4:0][4:0][15:0] win;
  logic [17:0] blur;
  int checks = 0, failures = 0;

  gauss_blur dut (.win, .blur);

  task automatic check_one();
    longint sum, norm;
    sum = 0;
    for (int k = 0; k < 5; k++)
      for (int j = 0; j < 5; j++) sum += longint'(WT[k][j]) * longint'(win[k][j]);
    norm = (sum * 7695) >>> 19;
    if (norm > 262143) norm = 262143;
    #1;
    checks++;
    if (longint'(blur) != norm) begin
      failures++;
      if (failures < 10) $display("blur %0d want %0d", blur, norm);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++) win[k][j] = 16'($urandom);
      check_one();
    end
    for (int n = 0; n < 500; n++) begin
      logic [15:0] v;
      longint d;
      v = (n == 0) ? 16'hFFFF : 16'($urandom);
      for (int k = 0; k < 5; k++)
        for (int j = 0; j < 5; j++) win[k][j] = v;
      check_one();
      d = longint'(blur) - 4 * longint'(v);
      checks++;
      if (d < -1 || d > (4 * longint'(v)) / 500 + 1) begin
        failures++;
        $display("flat %0d -> %0d", v, blur);
      end
    end
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
