// axi_mem_model: behavioural AXI4 write slave standing in for the processor
// system's memory ports in testbenches. Accepts INCR bursts, stores every
// byte written (honouring WSTRB) in a sparse memory, checks that each burst
// has AWLEN+1 beats with WLAST on the last one only, and answers OKAY after a
// short delay. `stall` holds AWREADY low (to provoke back-pressure);
// `random_ready` throttles WREADY at random.
module axi_mem_model (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  input  logic        random_ready,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [7:0] mem [int unsigned];
  int bursts = 0;
  int protocol_errors = 0;

  function automatic logic [31:0] read_word(int unsigned a);
    logic [31:0] d;
    for (int i = 0; i < 4; i++) d[8*i +: 8] = mem.exists(a + i) ? mem[a + i] : 8'h00;
    return d;
  endfunction

  function automatic bit has_word(int unsigned a);
    return mem.exists(a);
  endfunction

  initial begin
    awready = 1'b0;
    wready  = 1'b0;
    bvalid  = 1'b0;
    bresp   = 2'b00;
    forever begin
      int unsigned a;
      int n;
      @(negedge clk);
      awready = !stall && !rst;
      @(posedge clk);
      if (awvalid && awready) begin
        a = awaddr;
        n = int'(awlen) + 1;
        @(negedge clk);
        awready = 1'b0;
        for (int beat = 0; beat < n; ) begin
          wready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
          @(posedge clk);
          if (wvalid && wready) begin
            for (int i = 0; i < 4; i++) if (wstrb[i]) mem[a + i] = wdata[8*i +: 8];
            if (wlast !== (beat == n - 1)) protocol_errors++;
            a += 4;
            beat++;
          end
          @(negedge clk);
        end
        wready = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        bvalid = 1'b1;
        @(posedge clk);
        while (!bready) @(posedge clk);
        @(negedge clk);
        bvalid = 1'b0;
        bursts++;
      end
    end
  end
endmodule
