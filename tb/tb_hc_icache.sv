// tb_hc_icache: the instruction cache is hc_hybrid_cache with every way non-volatile, LRU
// replacement and a read-only port. Checked here on a 1 KB, 2-way copy: fetched words equal
// memory, hits take the 2-cycle STT-RAM read latency, misses take at least the memory
// latency, and a power outage costs nothing: the backup finishes without memory traffic and
// every line cached before the outage still hits afterwards (its content is non-volatile).
module tb_hc_icache;
  import hc_pkg::*;
  localparam int WAYS = 2, BYTES = 1024, SETS = BYTES / (WAYS * 64), MEM_LAT = 29;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid = 0, req_ready, m_valid, m_we, m_ready, pwr_fail = 0, backup_done;
  logic [31:0] req_addr = 0, rdata, m_addr;
  logic [511:0] m_wdata, m_rdata;
  cache_ev_t ev;
  int unsigned n_rd, n_wr;
  hc_hybrid_cache #(.CACHE_BYTES(BYTES), .WAYS(WAYS), .NV_WAYS(WAYS), .POLICY(POL_LRU)) dut (
    .clk, .rst_n, .cpu_req_valid(req_valid), .cpu_req_we(1'b0), .cpu_req_addr(req_addr),
    .cpu_req_wdata(32'h0), .cpu_req_be(4'h0), .cpu_req_pc(req_addr), .cpu_req_ready(req_ready),
    .cpu_rsp_rdata(rdata), .mem_req_valid(m_valid), .mem_req_we(m_we), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_req_ready(m_ready), .mem_rsp_rdata(m_rdata),
    .theta_wi(16'sd0), .theta_cm(8'd0), .pwr_fail, .backup_done, .ev);
  tb_line_mem #(.LAT(MEM_LAT)) u_mem (.clk, .rst_n, .req_valid(m_valid), .req_we(m_we),
    .req_addr(m_addr), .req_wdata(m_wdata), .req_ready(m_ready), .rsp_rdata(m_rdata),
    .n_reads(n_rd), .n_writes(n_wr));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic fetch(input logic [31:0] a, output int lat, output logic hit);
    req_addr <= a; req_valid <= 1;
    lat = 0;
    forever begin
      @(negedge clk);
      if (req_ready) break;
      lat++;
    end
    hit = ev.hit;
    check(rdata == (a ^ 32'h5A5A_1234), $sformatf("fetch %h data %h", a, rdata));
    @(posedge clk);
    req_valid = 0;
  endtask

  initial begin
    int lat, cyc;
    logic h;
    int unsigned wr0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    // Sequential code of 2 * SETS lines (fills the cache), then a loop over it again.
    for (int l = 0; l < 2 * SETS; l++) begin
      fetch(32'(l * 64 + 8), lat, h);
      check(!h && lat >= MEM_LAT, $sformatf("cold miss latency %0d", lat));
    end
    for (int l = 0; l < 2 * SETS; l++) begin
      fetch(32'(l * 64 + 12), lat, h);
      check(h && lat == 2, $sformatf("hit latency %0d", lat));
    end
    // Outage: nothing to back up.
    wr0 = n_wr;
    pwr_fail <= 1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!backup_done && cyc < 10000);
    check(backup_done, "backup done");
    check(cyc <= SETS * 4, $sformatf("backup took %0d cycles", cyc));
    check(n_wr == wr0, "no write-back");
    @(posedge clk);
    pwr_fail <= 0;
    repeat (3) @(posedge clk);
    for (int l = 0; l < 2 * SETS; l++) begin
      fetch(32'(l * 64 + 16), lat, h);
      check(h && lat == 2, "line survived the outage");
    end
    // Conflict misses: a third line per set evicts the least recently used one.
    for (int l = 2 * SETS; l < 3 * SETS; l++) fetch(32'(l * 64), lat, h);
    for (int l = 0; l < SETS; l++) begin
      fetch(32'(l * 64), lat, h);
      check(!h, "LRU line was replaced");
    end
    check(n_wr == 0, "read-only cache never writes memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
