// tb_hc_system_full: hc_system at its default sizes (32 KB 4-way data cache with one
// non-volatile way and the WI policy, 32 KB 2-way non-volatile instruction cache) taken
// through one complete operation: instruction fetches and data loads/stores with misses,
// hits at the section latencies (2 cycles, 8 for a store into the STT-RAM way), a conflict
// eviction with write-back, one power outage from the outage controller with backup, and
// the read-back of every stored word after the supply returns. Theta_wi is the image
// processing setting (10).
module tb_hc_system_full;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        d_valid = 0, d_we = 0, d_ready, i_valid = 0, i_ready;
  logic [31:0] d_addr = 0, d_wdata = 0, d_pc = 0, d_rdata, i_addr = 0, i_rdata;
  logic        m_valid, m_we, m_ready, cpu_halt, backup_done;
  logic [31:0] m_addr;
  logic [511:0] m_wdata, m_rdata;
  logic [15:0] outage_cnt;
  cache_ev_t   d_ev, i_ev;
  int unsigned mem_rd, mem_wr;
  logic [31:0] cfg_start = 32'hFFFF_FFFF;

  hc_system dut (
    .clk, .rst_n,
    .d_req_valid(d_valid), .d_req_we(d_we), .d_req_addr(d_addr), .d_req_wdata(d_wdata),
    .d_req_be(4'hF), .d_req_pc(d_pc), .d_req_ready(d_ready), .d_rsp_rdata(d_rdata),
    .i_req_valid(i_valid), .i_req_addr(i_addr), .i_req_ready(i_ready), .i_rsp_rdata(i_rdata),
    .mem_req_valid(m_valid), .mem_req_we(m_we), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_req_ready(m_ready), .mem_rsp_rdata(m_rdata),
    .theta_wi(16'sd10), .theta_cm(8'd10),
    .cfg_outage_start(cfg_start), .cfg_outage_period(32'd1000), .cfg_outage_max(16'd1),
    .ext_pwr_fail(1'b0), .cpu_halt, .backup_done, .outage_cnt, .d_ev, .i_ev);

  tb_line_mem u_mem (.clk, .rst_n, .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_ready(m_ready), .rsp_rdata(m_rdata),
    .n_reads(mem_rd), .n_writes(mem_wr));

  int checks = 0, failures = 0;
  int unsigned n_wb = 0, n_nvw = 0, n_loss = 0;
  always_ff @(posedge clk) begin
    if (d_ev.writeback) n_wb <= n_wb + 1;
    if (d_ev.nv_write)  n_nvw <= n_nvw + 1;
    if (d_ev.pwr_loss)  n_loss <= n_loss + 1;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic d_access(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          input logic [31:0] pc, output logic [31:0] rd, output int lat,
                          output logic hit);
    d_valid <= 1'b1; d_we <= we; d_addr <= a; d_wdata <= wd; d_pc <= pc;
    lat = 0;
    forever begin @(negedge clk); if (d_ready) break; lat++; end
    rd = d_rdata; hit = d_ev.hit;
    @(posedge clk);
    d_valid = 1'b0;
  endtask

  task automatic fetch(input logic [31:0] a);
    i_valid <= 1'b1; i_addr <= a;
    do @(negedge clk); while (!i_ready);
    check(i_rdata == (a ^ 32'h5A5A_1234), $sformatf("fetch %h", a));
    @(posedge clk);
    i_valid = 1'b0;
  endtask

  // 128 sets of 64-byte lines: addresses 8 KB apart fall in the same set.
  localparam int unsigned STRIDE = 32'h2000;

  initial begin
    logic [31:0] rd;
    int lat, cyc;
    logic h;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    fetch(32'h0010_0000);
    fetch(32'h0010_0004);
    // Store to three lines of set 1 (write-intensive PC -> volatile section), then hits.
    for (int i = 0; i < 3; i++) begin
      d_access(1'b1, 32'(64 + i * STRIDE), 32'hA000_0000 + 32'(i), 32'h2000, rd, lat, h);
      check(!h, "cold store misses");
    end
    d_access(1'b0, 32'(64), 0, 32'h2000, rd, lat, h);
    check(h && lat == 2 && rd == 32'hA000_0000, $sformatf("load hit, latency %0d", lat));
    d_access(1'b1, 32'(64 + 4), 32'hB000_0000, 32'h2000, rd, lat, h);
    check(h && lat == 2, $sformatf("store hit into SRAM, latency %0d", lat));
    // A fourth store evicts the least recently used dirty volatile line: write-back.
    d_access(1'b1, 32'(64 + 3 * STRIDE), 32'hA000_0003, 32'h2000, rd, lat, h);
    check(!h && n_wb == 1, "conflict miss wrote a dirty line back");
    // Teach a read-only PC: repeated read-only use of lines makes their predictor read
    // intensive; then a new line from that PC goes to the STT-RAM way.
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 4; i++) d_access(1'b0, 32'(128 + i * STRIDE), 0, 32'h1000, rd, lat, h);
    d_access(1'b1, 32'(128 + 4 * STRIDE), 32'hC000_0000, 32'h1000, rd, lat, h);
    d_access(1'b1, 32'(128 + 4 * STRIDE), 32'hC000_0001, 32'h1000, rd, lat, h);
    check(h && lat == 8 && n_nvw > 0, $sformatf("store hit into STT-RAM, latency %0d", lat));
    // Power outage from the controller.
    cfg_start = 32'd10;   // the controller counts from reset, so this fires at once
    cyc = 0;
    while (!backup_done && cyc < 100000) begin @(posedge clk); cyc++; end
    check(backup_done, "backup finished");
    @(posedge clk);
    check(outage_cnt == 1, $sformatf("one outage counted (%0d)", outage_cnt));
    $display("backup took %0d cycles, %0d write-backs in all", cyc, n_wb);
    while (cpu_halt) @(posedge clk);
    @(posedge clk);
    check(n_loss == 1, "volatile content lost once");
    // Everything stored must read back; the STT-RAM line still hits.
    d_access(1'b0, 32'(128 + 4 * STRIDE), 0, 32'h1000, rd, lat, h);
    check(h && rd == 32'hC000_0001, "non-volatile line survived");
    d_access(1'b0, 32'(64), 0, 32'h2000, rd, lat, h);
    check(!h && rd == 32'hA000_0000, "volatile line refetched from memory");
    d_access(1'b0, 32'(68), 0, 32'h2000, rd, lat, h);
    check(rd == 32'hB000_0000, "second word");
    for (int i = 1; i < 4; i++) begin
      d_access(1'b0, 32'(64 + i * STRIDE), 0, 32'h2000, rd, lat, h);
      check(rd == 32'hA000_0000 + 32'(i), $sformatf("store %0d kept", i));
    end
    fetch(32'h0010_0008);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
