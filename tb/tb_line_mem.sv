// tb_line_mem: behavioural model of the non-volatile main memory, for testbenches only.
//
// Serves whole-line reads and writes with the held-request / one-cycle-ready handshake of
// the caches. Every access takes LAT cycles (29 cycles of the 240 MHz cache clock is about
// the 48 cycles at 400 MHz of the phase-change main memory). Lines never written read as
// a fixed pattern of their address (word at byte address a holds a ^ 32'h5A5A_1234), so a
// testbench can predict them. Written lines are kept in an associative array. It counts
// reads and writes.
module tb_line_mem #(
  parameter int unsigned LINE_W = 512,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LAT    = 29
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [LINE_W-1:0] req_wdata,
  output logic              req_ready,
  output logic [LINE_W-1:0] rsp_rdata,
  output int unsigned       n_reads,
  output int unsigned       n_writes
);
  localparam int unsigned LINE_BYTES = LINE_W / 8;
  logic [LINE_W-1:0] store [logic [ADDR_W-1:0]];
  int unsigned cnt;

  function automatic logic [LINE_W-1:0] pattern(input logic [ADDR_W-1:0] a);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = 32'(a + ADDR_W'(4 * w)) ^ 32'h5A5A_1234;
    return l;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 0;
      req_ready <= 1'b0;
      rsp_rdata <= '0;
      n_reads   <= 0;
      n_writes  <= 0;
    end else begin
      req_ready <= 1'b0;
      if (req_valid && !req_ready) begin
        if (cnt + 1 >= LAT) begin
          cnt       <= 0;
          req_ready <= 1'b1;
          if (req_we) begin
            store[req_addr] = req_wdata;
            n_writes <= n_writes + 1;
          end else begin
            rsp_rdata <= store.exists(req_addr) ? store[req_addr] : pattern(req_addr);
            n_reads <= n_reads + 1;
          end
        end else cnt <= cnt + 1;
      end
    end
  end
  initial assert (LINE_BYTES >= 4);
endmodule
