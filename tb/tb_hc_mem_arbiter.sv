// tb_hc_mem_arbiter: two clients share one main-memory model through the arbiter. Each
// client issues random line reads and writes to its own address range and checks read data
// against its own reference, so a response routed to the wrong client or a request lost is
// caught. Directed part: when both request in the same cycle, client 0 must be served first.
module tb_hc_mem_arbiter;
  localparam int LINE_W = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] c_valid = 0, c_we = 0, c_ready;
  logic [31:0] c_addr [2];
  logic [LINE_W-1:0] c_wdata [2], c_rdata;
  logic m_valid, m_we, m_ready;
  logic [31:0] m_addr;
  logic [LINE_W-1:0] m_wdata, m_rdata;
  int unsigned n_rd, n_wr;
  hc_mem_arbiter #(.N(2), .LINE_W(LINE_W)) dut (.*);
  tb_line_mem #(.LINE_W(LINE_W), .LAT(5)) u_mem (
    .clk, .rst_n, .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr), .req_wdata(m_wdata),
    .req_ready(m_ready), .rsp_rdata(m_rdata), .n_reads(n_rd), .n_writes(n_wr));

  int checks = 0, failures = 0, conflicts = 0;
  int done_order [$];
  logic [LINE_W-1:0] ref_l [2][16];
  bit written [2][16];

  function automatic logic [LINE_W-1:0] pat(input logic [31:0] a);
    return {32'(a + 4) ^ 32'h5A5A_1234, a ^ 32'h5A5A_1234};
  endfunction

  task automatic xfer(input int c, input logic we, input int line);
    logic [31:0] a;
    a = 32'(c * 32'h1000 + line * 8);
    c_addr[c] = a; c_we[c] = we; c_wdata[c] = {$urandom, $urandom}; c_valid[c] = 1;
    do @(posedge clk); while (!c_ready[c]);
    if (we) begin ref_l[c][line] = c_wdata[c]; written[c][line] = 1; end
    else begin
      checks++;
      if (c_rdata !== (written[c][line] ? ref_l[c][line] : pat(a))) begin
        failures++; $display("FAIL client %0d line %0d", c, line);
      end
    end
    done_order.push_back(c);
    #1 c_valid[c] = 0;
  endtask

  always @(posedge clk) if (c_valid == 2'b11) conflicts++;

  initial begin
    for (int c = 0; c < 2; c++) begin c_addr[c] = 0; c_wdata[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: simultaneous requests, client 1 listed first
    fork
      xfer(1, 0, 3);
      xfer(0, 0, 3);
    join
    checks++;
    if (done_order[0] != 0) begin failures++; $display("FAIL priority"); end
    // random concurrent traffic
    fork
      for (int i = 0; i < 200; i++) begin
        repeat ($urandom_range(3)) @(negedge clk);
        xfer(0, 1'($urandom), $urandom_range(15));
      end
      for (int i = 0; i < 200; i++) begin
        repeat ($urandom_range(3)) @(negedge clk);
        xfer(1, 1'($urandom), $urandom_range(15));
      end
    join
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflicts exercised"); end
    checks++;
    if (n_rd + n_wr != 402) begin failures++; $display("FAIL memory saw %0d transfers", n_rd + n_wr); end
    $display("conflict cycles %0d, transfers %0d", conflicts, n_rd + n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
