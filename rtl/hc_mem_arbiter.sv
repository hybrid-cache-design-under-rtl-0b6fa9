// hc_mem_arbiter: shares the line-wide main-memory port among N caches.
//
// Each client presents a request (valid, write, address, write data) and holds it until its
// one-cycle ready. When the port is free the arbiter grants the lowest-numbered requesting
// client (client 0 first, the data cache in this system) and then forwards that client's
// request to memory and the memory's ready and read data back to it alone, until the
// transfer completes. Granting takes one cycle; the port is free again in the cycle after
// a ready. The reference design only implies that both caches reach the same main memory; the fixed
// priority and the handshake are this design's choices.
module hc_mem_arbiter #(
  parameter int unsigned N      = 2,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LINE_W = 512,
  localparam int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      c_valid,
  input  logic [N-1:0]      c_we,
  input  logic [ADDR_W-1:0] c_addr  [N],
  input  logic [LINE_W-1:0] c_wdata [N],
  output logic [N-1:0]      c_ready,
  output logic [LINE_W-1:0] c_rdata,
  output logic              m_valid,
  output logic              m_we,
  output logic [ADDR_W-1:0] m_addr,
  output logic [LINE_W-1:0] m_wdata,
  input  logic              m_ready,
  input  logic [LINE_W-1:0] m_rdata
);
  logic             busy_q;
  logic [SEL_W-1:0] sel_q;

  always_comb begin
    m_valid = busy_q && c_valid[sel_q];
    m_we    = c_we[sel_q];
    m_addr  = c_addr[sel_q];
    m_wdata = c_wdata[sel_q];
    c_ready = '0;
    c_ready[sel_q] = busy_q && m_ready;
    c_rdata = m_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      sel_q  <= '0;
    end else if (busy_q) begin
      if (m_ready) busy_q <= 1'b0;
    end else begin
      for (int i = N - 1; i >= 0; i--)
        if (c_valid[i]) begin
          busy_q <= 1'b1;
          sel_q  <= SEL_W'(i);
        end
    end
  end
endmodule
