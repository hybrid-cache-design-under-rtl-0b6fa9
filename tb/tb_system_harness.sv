// tb_system_harness: runs one reduced hc_system end to end, for tb_hc_system.
//
// A data-side driver issues random loads and stores over more lines than the data cache
// holds ("read-mostly" lines from one group of PCs, "write-mostly" lines from another) and
// compares every load with a reference memory; an instruction-side driver fetches a loop of
// code larger than the instruction cache and compares every word with memory. Both stop
// presenting new requests while cpu_halt is high, like a CPU that saves its state. The
// outage controller cuts the supply OUTAGES times; a last outage comes from ext_pwr_fail,
// after which every data line is read back. Events are counted for the caller.
module tb_system_harness
  import hc_pkg::*;
#(
  parameter policy_e     POLICY   = POL_WI,
  parameter int unsigned NV_WAYS  = 1,
  parameter int unsigned N_OPS    = 3000,
  parameter int unsigned N_LINES  = 40,
  parameter int unsigned OUTAGES  = 3,
  parameter int          THETA_WI = 10,
  parameter int unsigned THETA_CM = 4,
  parameter int unsigned SEED     = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned cnt [16]
);
  // Indices into cnt.
  localparam int D_HIT = 0, D_MISS = 1, D_EVICT = 2, D_WB = 3, D_VWR = 4, D_NVWR = 5,
                 D_SWAP = 6, D_BKSWAP = 7, D_LOSS = 8, I_HIT = 9, I_MISS = 10,
                 CONFLICT = 11, HALT_STALL = 12, OUTAGE = 13, EXT_OUTAGE = 14, NV_FILL = 15;

  localparam int unsigned LINE_W = 512;
  localparam logic [31:0] I_BASE = 32'h0010_0000;

  logic        d_valid, d_we, d_ready, i_valid, i_ready;
  logic [31:0] d_addr, d_wdata, d_pc, d_rdata, i_addr, i_rdata;
  logic        m_valid, m_we, m_ready;
  logic [31:0] m_addr;
  logic [LINE_W-1:0] m_wdata, m_rdata;
  logic        ext_fail, cpu_halt, backup_done;
  logic [15:0] outage_cnt;
  cache_ev_t   d_ev, i_ev;
  int unsigned mem_rd, mem_wr;

  hc_system #(.D_CACHE_BYTES(1024), .D_NV_WAYS(NV_WAYS), .D_POLICY(POLICY),
              .I_CACHE_BYTES(512)) dut (
    .clk, .rst_n,
    .d_req_valid(d_valid), .d_req_we(d_we), .d_req_addr(d_addr), .d_req_wdata(d_wdata),
    .d_req_be(4'hF), .d_req_pc(d_pc), .d_req_ready(d_ready), .d_rsp_rdata(d_rdata),
    .i_req_valid(i_valid), .i_req_addr(i_addr), .i_req_ready(i_ready), .i_rsp_rdata(i_rdata),
    .mem_req_valid(m_valid), .mem_req_we(m_we), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_req_ready(m_ready), .mem_rsp_rdata(m_rdata),
    .theta_wi(COST_W'(THETA_WI)), .theta_cm(CNT_W'(THETA_CM)),
    .cfg_outage_start(32'd20000), .cfg_outage_period(32'd30000),
    .cfg_outage_max(16'(OUTAGES)),
    .ext_pwr_fail(ext_fail), .cpu_halt, .backup_done, .outage_cnt, .d_ev, .i_ev);

  tb_line_mem #(.LINE_W(LINE_W)) u_mem (
    .clk, .rst_n, .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_ready(m_ready), .rsp_rdata(m_rdata),
    .n_reads(mem_rd), .n_writes(mem_wr));

  logic [31:0] ref_mem [int unsigned];
  logic halt_q, d_done;

  function automatic logic [31:0] ref_word(input logic [31:0] a);
    logic [31:0] wa;
    wa = {a[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : (wa ^ 32'h5A5A_1234);
  endfunction

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("[%m] FAIL %s", msg);
    end
  endtask

  always_ff @(posedge clk) if (rst_n) begin
    halt_q <= cpu_halt;
    if (d_ev.hit)       cnt[D_HIT]    <= cnt[D_HIT] + 1;
    if (d_ev.miss)      cnt[D_MISS]   <= cnt[D_MISS] + 1;
    if (d_ev.evict)     cnt[D_EVICT]  <= cnt[D_EVICT] + 1;
    if (d_ev.writeback) cnt[D_WB]     <= cnt[D_WB] + 1;
    if (d_ev.v_write)   cnt[D_VWR]    <= cnt[D_VWR] + 1;
    if (d_ev.nv_write)  cnt[D_NVWR]   <= cnt[D_NVWR] + 1;
    if (d_ev.nv_write && !d_ev.hit && !d_ev.swap && !d_ev.bk_swap)
                        cnt[NV_FILL]  <= cnt[NV_FILL] + 1;
    if (d_ev.swap)      cnt[D_SWAP]   <= cnt[D_SWAP] + 1;
    if (d_ev.bk_swap)   cnt[D_BKSWAP] <= cnt[D_BKSWAP] + 1;
    if (d_ev.pwr_loss)  cnt[D_LOSS]   <= cnt[D_LOSS] + 1;
    if (i_ev.hit)       cnt[I_HIT]    <= cnt[I_HIT] + 1;
    if (i_ev.miss)      cnt[I_MISS]   <= cnt[I_MISS] + 1;
    if (dut.c_valid == 2'b11) cnt[CONFLICT] <= cnt[CONFLICT] + 1;
    if (cpu_halt && !halt_q && !ext_fail) cnt[OUTAGE] <= cnt[OUTAGE] + 1;
    if (cpu_halt && !halt_q && ext_fail)  cnt[EXT_OUTAGE] <= cnt[EXT_OUTAGE] + 1;
    if (cpu_halt && (d_valid || i_valid)) cnt[HALT_STALL] <= cnt[HALT_STALL] + 1;
  end

  // Data side. A request presented while cpu_halt is high simply waits for the restore.
  task automatic d_access(input logic we, input logic [31:0] a, input logic [31:0] wd,
                          input logic [31:0] pc, output logic [31:0] rd);
    while (cpu_halt) @(posedge clk);
    d_valid <= 1'b1; d_we <= we; d_addr <= a; d_wdata <= wd; d_pc <= pc;
    do @(negedge clk); while (!d_ready);
    rd = d_rdata;
    @(posedge clk);
    d_valid = 1'b0;
    if (we) ref_mem[{a[31:2], 2'b00}] = wd;
  endtask

  initial begin
    logic [31:0] rd, a, d, pc;
    done = 0; d_done = 0; checks = 0; failures = 0;
    for (int i = 0; i < 16; i++) cnt[i] = 0;
    d_valid = 0; d_we = 0; d_addr = 0; d_wdata = 0; d_pc = 0; ext_fail = 0;
    void'($urandom(SEED));
    @(posedge rst_n);
    @(posedge clk);
    for (int op = 0; op < int'(N_OPS); op++) begin
      int unsigned line, word;
      logic wr, wm;
      line = $urandom_range(N_LINES - 1);
      word = $urandom_range(15);
      wm = line[0];
      wr = wm ? ($urandom_range(3) != 0) : ($urandom_range(15) == 0);
      a  = 32'(line * 64 + word * 4);
      pc = (wm ? 32'h2000 : 32'h1000) + 32'(line[3:1]) * 4;
      d  = $urandom;
      d_access(wr, a, d, pc, rd);
      if (!wr) check(rd == ref_word(a), $sformatf("load %h got %h exp %h", a, rd, ref_word(a)));
    end
    // Wait until the controller has made all its outages, then one from the supply monitor.
    while (outage_cnt < 16'(OUTAGES) || cpu_halt) @(posedge clk);
    ext_fail <= 1'b1;
    @(posedge clk);
    while (!backup_done) @(posedge clk);
    ext_fail <= 1'b0;
    @(posedge clk);
    for (int l = 0; l < int'(N_LINES); l++) begin
      a = 32'(l * 64 + 4);
      d_access(1'b0, a, 0, 32'h1000, rd);
      check(rd == ref_word(a), $sformatf("after outages load %h got %h", a, rd));
    end
    d_done = 1;
  end

  // Instruction side: a loop over 24 lines of code (the instruction cache holds 8).
  initial begin
    int unsigned k;
    i_valid = 0; i_addr = 0; k = 0;
    @(posedge rst_n);
    @(posedge clk);
    while (!d_done) begin
      logic [31:0] ia;
      ia = I_BASE + 32'((k % 384) * 4 * 4);  // every fourth word of 24 lines
      k++;
      while (cpu_halt) @(posedge clk);
      i_valid <= 1'b1; i_addr <= ia;
      do @(negedge clk); while (!i_ready);
      check(i_rdata == (ia ^ 32'h5A5A_1234), $sformatf("fetch %h got %h", ia, i_rdata));
      @(posedge clk);
      i_valid = 1'b0;
    end
    done = 1;
  end
endmodule
