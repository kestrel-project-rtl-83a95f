// tb_sbus_regfile: writes random 32-bit words to random registers and checks
// that both read ports return the low 11 bits of the last write to the
// addressed register, with the two ports reading different registers.
module tb_sbus_regfile;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [4:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [31:0] wdata = '0;
  logic [10:0] rdata_a, rdata_b;
  logic [10:0] model [32];
  int checks = 0, failures = 0;

  sbus_regfile dut (.clk, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(i); wdata = $urandom; model[i] = wdata[10:0];
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 5'($urandom);
      wdata = $urandom;
      raddr_a = 5'($urandom);
      raddr_b = 5'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[raddr_a]) failures++;
      if (rdata_b !== model[raddr_b]) failures++;
      @(posedge clk);
      if (we) model[waddr] = wdata[10:0];
    end
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
