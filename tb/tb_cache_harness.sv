// tb_cache_harness: drives one hc_hybrid_cache with a main-memory model and checks it.
//
// Used by tb_hc_hybrid_cache once per policy. It runs
//   1. a directed fill of one set: in an empty cache the first lines of a set land in the
//      lowest ways of the section the policy starts with (invalid ways are used first):
//      all ways under LRU, the volatile ways under WI, the non-volatile ways under CM;
//      hit latencies are checked against the section latencies
//      (2 cycles for reads, 2 cycles SRAM writes, 8 cycles STT-RAM writes);
//   2. random traffic over more lines than the cache holds, with "read-mostly" addresses
//      issued from one group of PCs and "write-mostly" addresses from another, so the
//      policies learn; every read is compared with a flat reference memory;
//   3. power outages between requests: pwr_fail is raised, backup_done awaited, the supply
//      restored; every later read must still return the last written value, which holds
//      only if the backup wrote back every dirty volatile line and kept the non-volatile ones.
// It counts the cache events (hits, misses, write-backs, migration swaps, backup swaps,
// non-volatile writes) and reports checks and failures through its outputs.
module tb_cache_harness
  import hc_pkg::*;
#(
  parameter policy_e     POLICY      = POL_WI,
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned NV_WAYS     = 1,
  parameter int unsigned N_OPS       = 3000,
  parameter int unsigned N_LINES     = 40,
  parameter int          THETA_WI    = 10,
  parameter int unsigned THETA_CM    = 4,
  parameter int unsigned SEED        = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_swap,
  output int unsigned n_bk_swap,
  output int unsigned n_wb,
  output int unsigned n_nv_fill,
  output int unsigned n_outage
);
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_W     = 512;
  localparam int unsigned SETS       = CACHE_BYTES / (WAYS * LINE_BYTES);

  logic        req_valid, req_we, req_ready;
  logic [31:0] req_addr, req_wdata, req_pc, rsp_rdata;
  logic [3:0]  req_be;
  logic        m_valid, m_we, m_ready;
  logic [31:0] m_addr;
  logic [LINE_W-1:0] m_wdata, m_rdata;
  logic        pwr_fail, backup_done;
  cache_ev_t   ev;
  int unsigned mem_rd, mem_wr;

  hc_hybrid_cache #(.CACHE_BYTES(CACHE_BYTES), .WAYS(WAYS), .NV_WAYS(NV_WAYS),
                    .POLICY(POLICY)) dut (
    .clk, .rst_n,
    .cpu_req_valid(req_valid), .cpu_req_we(req_we), .cpu_req_addr(req_addr),
    .cpu_req_wdata(req_wdata), .cpu_req_be(req_be), .cpu_req_pc(req_pc),
    .cpu_req_ready(req_ready), .cpu_rsp_rdata(rsp_rdata),
    .mem_req_valid(m_valid), .mem_req_we(m_we), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_req_ready(m_ready), .mem_rsp_rdata(m_rdata),
    .theta_wi(COST_W'(THETA_WI)), .theta_cm(CNT_W'(THETA_CM)),
    .pwr_fail, .backup_done, .ev);

  tb_line_mem #(.LINE_W(LINE_W)) u_mem (
    .clk, .rst_n, .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_ready(m_ready), .rsp_rdata(m_rdata),
    .n_reads(mem_rd), .n_writes(mem_wr));

  // Reference memory: word address -> value; untouched words hold the memory pattern.
  logic [31:0] ref_mem [int unsigned];
  int unsigned n_hit, n_miss, n_evict, n_loss;

  function automatic logic [31:0] ref_word(input logic [31:0] a);
    logic [31:0] wa;
    wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : (wa ^ 32'h5A5A_1234);
  endfunction

  always_ff @(posedge clk) if (rst_n) begin
    if (ev.swap)     n_swap    <= n_swap + 1;
    if (ev.bk_swap)  n_bk_swap <= n_bk_swap + 1;
    if (ev.writeback) n_wb     <= n_wb + 1;
    if (ev.hit)      n_hit     <= n_hit + 1;
    if (ev.miss)     n_miss    <= n_miss + 1;
    if (ev.evict)    n_evict   <= n_evict + 1;
    if (ev.pwr_loss) n_loss    <= n_loss + 1;
    if (ev.nv_write && !ev.swap && !ev.bk_swap && !ev.hit) n_nv_fill <= n_nv_fill + 1;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("[%m] FAIL %s", msg);
    end
  endtask

  // One request; returns read data and the cycles from presentation to ready.
  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                        input logic [31:0] pc, output logic [31:0] rdata, output int lat,
                        output logic was_hit);
    req_valid <= 1'b1;
    req_we    <= we;
    req_addr  <= addr;
    req_wdata <= wdata;
    req_be    <= 4'hF;
    req_pc    <= pc;
    // lat counts the cycles from the edge that accepts the request to the edge that
    // completes it; the request is held until that edge has passed.
    lat = 0;
    forever begin
      @(negedge clk);
      if (req_ready) break;
      lat++;
    end
    rdata   = rsp_rdata;
    was_hit = ev.hit;
    @(posedge clk);
    req_valid = 1'b0;
    if (we) ref_mem[{addr[31:2], 2'b00}] = wdata;
  endtask

  task automatic outage();
    int cyc;
    int unsigned losses;
    losses = n_loss;
    pwr_fail <= 1'b1;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!backup_done && cyc < 200000);
    check(backup_done, "backup finished");
    @(posedge clk);
    pwr_fail <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    check(n_loss == losses + 1, "volatile content dropped once when the supply returns");
    n_outage++;
  endtask

  initial begin
    logic [31:0] rd, a, d, pc;
    int lat, op, n_fill;
    logic h;
    n_fill = (POLICY == POL_LRU) ? int'(WAYS) :
             (POLICY == POL_CM)  ? int'(NV_WAYS) : int'(WAYS - NV_WAYS);
    done = 0; checks = 0; failures = 0;
    n_swap = 0; n_bk_swap = 0; n_wb = 0; n_nv_fill = 0; n_outage = 0;
    n_hit = 0; n_miss = 0; n_evict = 0; n_loss = 0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0; req_pc = 0;
    pwr_fail = 0;
    void'($urandom(SEED));
    @(posedge rst_n);
    @(posedge clk);

    // 1. Directed fill of set 0 and section latencies. LRU may use every way; WI starts with
    //    its predictors at "weakly write intensive" (volatile section), CM with its table at
    //    "non-volatile", so only that section is filled.
    for (int i = 0; i < n_fill; i++) begin
      a = 32'(i * SETS * LINE_BYTES);
      access(1'b0, a, 0, 32'h100, rd, lat, h);
      check(!h && rd == ref_word(a), "first access misses and returns memory data");
    end
    for (int i = 0; i < n_fill; i++) begin
      a = 32'(i * SETS * LINE_BYTES);
      access(1'b0, a, 0, 32'h100, rd, lat, h);
      check(h && rd == ref_word(a), "second read hits");
      check(lat == 2, $sformatf("read hit latency %0d, expected 2", lat));
      access(1'b1, a + 4, 32'hC0DE_0000 + 32'(i), 32'h100, rd, lat, h);
      check(h, "write hit");
      check(lat == ((POLICY == POL_CM || i >= int'(WAYS - NV_WAYS)) ? 8 : 2),
            $sformatf("write hit latency %0d in way %0d", lat, i));
    end

    // 2./3. Random traffic with outages.
    for (op = 0; op < int'(N_OPS); op++) begin
      int unsigned line, word;
      logic wr, write_mostly;
      line = $urandom_range(N_LINES - 1);
      word = $urandom_range(LINE_BYTES / 4 - 1);
      write_mostly = line[0];
      // Read-mostly lines: 1 write in 16; write-mostly lines: 3 writes in 4.
      wr = write_mostly ? ($urandom_range(3) != 0) : ($urandom_range(15) == 0);
      a  = 32'(line * LINE_BYTES + word * 4);
      pc = write_mostly ? 32'h0000_2000 + 32'(line[3:1]) * 4 : 32'h0000_1000 + 32'(line[3:1]) * 4;
      d  = $urandom;
      access(wr, a, d, pc, rd, lat, h);
      if (!wr) check(rd == ref_word(a), $sformatf("op %0d read %h got %h exp %h", op, a, rd, ref_word(a)));
      if (op % 500 == 499) outage();
    end
    // After the last outage every line must still read back correctly.
    outage();
    for (int l = 0; l < int'(N_LINES); l++) begin
      a = 32'(l * LINE_BYTES + 4);
      access(1'b0, a, 0, 32'h1000, rd, lat, h);
      check(rd == ref_word(a), $sformatf("after outage read %h got %h", a, rd));
    end
    done = 1;
  end
endmodule
