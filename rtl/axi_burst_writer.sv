// axi_burst_writer: AXI4 write master that turns a word stream into full bursts.
//
// Producers in the camera channel hand over 32-bit words together with their
// byte address. Words collect in a FIFO; once BURST_LEN of them are present
// the writer issues one INCR burst of BURST_LEN beats at the address of the
// first, all byte strobes set, and waits for the write response before the
// next burst. Producers guarantee that each group of BURST_LEN words is
// contiguous and starts on a BURST_LEN*4-byte boundary (8 words = one 32-byte
// cache line). Writing whole lines with no masked bytes is what the
// cache-coherent port requires, and bursting is what the high-performance
// ports are for.
//
// The PS-side ports (HP and ACP) are not part of this design; AWCACHE and
// AWUSER are parameters so one instance can mark its writes coherent
// (AWCACHE=1111b, AWUSER[0]=1, the usual setting for the coherency port) and
// another plain. resp_error latches any non-OKAY response; bursts counts them.
//
// Interface: in_valid/in_ready/in_addr/in_data; AXI4 AW, W and B channels.
// Timing: one burst takes 1 AW cycle + BURST_LEN W cycles + the B latency.
module axi_burst_writer #(
  parameter int unsigned BURST_LEN  = 8,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter logic [3:0]  AWCACHE    = 4'b0011,
  parameter logic [4:0]  AWUSER     = 5'b00000
) (
  input  logic        clk,
  input  logic        rst,
  // word stream
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_addr,
  input  logic [31:0] in_data,
  // AXI4 write address
  output logic [31:0] m_awaddr,
  output logic [7:0]  m_awlen,
  output logic [2:0]  m_awsize,
  output logic [1:0]  m_awburst,
  output logic [3:0]  m_awcache,
  output logic [2:0]  m_awprot,
  output logic [4:0]  m_awuser,
  output logic        m_awvalid,
  input  logic        m_awready,
  // AXI4 write data
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wlast,
  output logic        m_wvalid,
  input  logic        m_wready,
  // AXI4 write response
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  // status
  output logic        resp_error,
  output logic [15:0] bursts
);
  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  localparam int unsigned BW = $clog2(BURST_LEN);

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_RESP} state_e;
  state_e state;

  logic [63:0]   fifo [FIFO_DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic [BW-1:0] beat;
  logic          push, pop;

  assign in_ready = (count < (AW+1)'(FIFO_DEPTH));
  assign push     = in_valid && in_ready;
  assign pop      = (state == S_DATA) && m_wready;

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= {in_addr, in_data};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      state      <= S_IDLE;
      beat       <= '0;
      resp_error <= 1'b0;
      bursts     <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
      unique case (state)
        S_IDLE: if (count >= (AW+1)'(BURST_LEN)) state <= S_ADDR;
        S_ADDR: if (m_awready) begin
          state <= S_DATA;
          beat  <= '0;
        end
        S_DATA: if (m_wready) begin
          beat <= beat + 1'b1;
          if (beat == BW'(BURST_LEN - 1)) state <= S_RESP;
        end
        S_RESP: if (m_bvalid) begin
          state  <= S_IDLE;
          bursts <= bursts + 1'b1;
          if (m_bresp != 2'b00) resp_error <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign m_awaddr  = fifo[rd_ptr][63:32];
  assign m_awlen   = 8'(BURST_LEN - 1);
  assign m_awsize  = 3'd2;          // 4 bytes per beat
  assign m_awburst = 2'b01;         // INCR
  assign m_awcache = AWCACHE;
  assign m_awprot  = 3'b000;
  assign m_awuser  = AWUSER;
  assign m_awvalid = (state == S_ADDR);
  assign m_wdata   = fifo[rd_ptr][31:0];
  assign m_wstrb   = 4'hF;
  assign m_wlast   = (state == S_DATA) && (beat == BW'(BURST_LEN - 1));
  assign m_wvalid  = (state == S_DATA);
  assign m_bready  = (state == S_RESP);

  // AXI rules: a valid that is not accepted holds its payload.
  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr));
  a_w_stable: assert property (@(posedge clk) disable iff (rst)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata) && $stable(m_wlast));
endmodule
