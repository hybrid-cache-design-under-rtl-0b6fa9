// tb_workload_harness: runs one application kernel through the data port of a reduced
// hc_system (2 KB data cache, 4 ways) and checks its result, for tb_hc_workloads.
//
// The kernels are executed by this testbench acting as the CPU: every load and store of the
// program goes through the cache, with a distinct PC per program site, so the policies see
// the access pattern of the real program:
//   APP 0  AES-shaped cipher: 32 blocks of 16 state words; per block 10 rounds of
//          substitution through a 256-entry read-only table (S-box-like), a byte
//          permutation of the state and a key addition from a read-only round-key table.
//          It has the read/modify/overwrite state and the read-only table of AES, but is
//          not AES (no column mixing);
//   APP 1  3x3 convolution of a 40x40 image (one word per pixel): input and kernel
//          read-only, output write-only;
//   APP 2  top-down merge sort of 512 words: split copies into two temporary arrays, then
//          merge back into the input array.
// The thresholds are the per-application settings (theta_wi 100 / 10 / -2, theta_cm
// 8 / 10 / 150). With PERIOD > 0 the outage controller cuts the supply every PERIOD
// cycles after each backup. The result in memory is compared with a reference computed
// here; statistics (cycles, misses, write-backs, SRAM and STT-RAM writes, swaps, outages)
// are returned to the caller.
module tb_workload_harness
  import hc_pkg::*;
#(
  parameter int          APP     = 0,
  parameter policy_e     POLICY  = POL_WI,
  parameter int unsigned NV_WAYS = 1,
  parameter int unsigned PERIOD  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned cycles,
  output int unsigned n_miss,
  output int unsigned n_access,
  output int unsigned n_wb,
  output int unsigned n_vwr,
  output int unsigned n_nvwr,
  output int unsigned n_swap,
  output int unsigned n_outage
);
  localparam int          THETA_WI = (APP == 0) ? 100 : (APP == 1) ? 10 : -2;
  localparam int unsigned THETA_CM = (APP == 0) ? 8 : (APP == 1) ? 10 : 150;

  logic        d_valid, d_we, d_ready, i_ready;
  logic [31:0] d_addr, d_wdata, d_pc, d_rdata, i_rdata;
  logic        m_valid, m_we, m_ready, cpu_halt, backup_done;
  logic [31:0] m_addr;
  logic [511:0] m_wdata, m_rdata;
  logic [15:0] outage_cnt;
  cache_ev_t   d_ev, i_ev;
  int unsigned mem_rd, mem_wr;
  logic        running;

  hc_system #(.D_CACHE_BYTES(2048), .D_NV_WAYS(NV_WAYS), .D_POLICY(POLICY),
              .I_CACHE_BYTES(512)) dut (
    .clk, .rst_n,
    .d_req_valid(d_valid), .d_req_we(d_we), .d_req_addr(d_addr), .d_req_wdata(d_wdata),
    .d_req_be(4'hF), .d_req_pc(d_pc), .d_req_ready(d_ready), .d_rsp_rdata(d_rdata),
    .i_req_valid(1'b0), .i_req_addr(32'h0), .i_req_ready(i_ready), .i_rsp_rdata(i_rdata),
    .mem_req_valid(m_valid), .mem_req_we(m_we), .mem_req_addr(m_addr),
    .mem_req_wdata(m_wdata), .mem_req_ready(m_ready), .mem_rsp_rdata(m_rdata),
    .theta_wi(COST_W'(THETA_WI)), .theta_cm(CNT_W'(THETA_CM)),
    .cfg_outage_start(32'(PERIOD)), .cfg_outage_period(32'(PERIOD)),
    .cfg_outage_max(PERIOD > 0 ? 16'hFFFF : 16'h0),
    .ext_pwr_fail(1'b0), .cpu_halt, .backup_done, .outage_cnt, .d_ev, .i_ev);

  tb_line_mem u_mem (.clk, .rst_n, .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .req_ready(m_ready), .rsp_rdata(m_rdata),
    .n_reads(mem_rd), .n_writes(mem_wr));

  always_ff @(posedge clk) if (rst_n && running) begin
    cycles <= cycles + 1;
    if (d_ev.miss)      n_miss <= n_miss + 1;
    if (d_ev.writeback) n_wb   <= n_wb + 1;
    if (d_ev.v_write)   n_vwr  <= n_vwr + 1;
    if (d_ev.nv_write)  n_nvwr <= n_nvwr + 1;
    if (d_ev.swap)      n_swap <= n_swap + 1;
    if (d_ev.pwr_loss)  n_outage <= n_outage + 1;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 5) $display("[%m] FAIL %s", msg);
    end
  endtask

  // One load or store of the program; a halted CPU waits for the supply.
  task automatic st(input logic [31:0] a, input logic [31:0] v, input logic [31:0] pc);
    while (cpu_halt) @(posedge clk);
    d_valid <= 1'b1; d_we <= 1'b1; d_addr <= a; d_wdata <= v; d_pc <= pc;
    do @(negedge clk); while (!d_ready);
    @(posedge clk);
    d_valid = 1'b0;
    n_access++;
  endtask
  task automatic ld(input logic [31:0] a, input logic [31:0] pc, output logic [31:0] v);
    while (cpu_halt) @(posedge clk);
    d_valid <= 1'b1; d_we <= 1'b0; d_addr <= a; d_pc <= pc;
    do @(negedge clk); while (!d_ready);
    v = d_rdata;
    @(posedge clk);
    d_valid = 1'b0;
    n_access++;
  endtask

  // ---------------------------------------------------------------- AES-shaped cipher
  localparam logic [31:0] A_SBOX = 32'h0001_0000, A_RK = 32'h0001_1000,
                          A_IN = 32'h0002_0000, A_OUT = 32'h0003_0000, A_ST = 32'h0004_0000;
  localparam int A_BLOCKS = 32;
  function automatic logic [7:0] sbox_f(input int i);
    return 8'((i * 167 + 99) ^ (i >> 3));
  endfunction
  function automatic logic [7:0] rk_f(input int r, input int i);
    return 8'(r * 29 + i * 13 + 7);
  endfunction
  function automatic logic [7:0] in_f(input int b, input int i);
    return 8'(b * 31 + i * 17 + 3);
  endfunction

  task automatic run_aes();
    logic [31:0] v, s;
    logic [7:0] st_ref [16], tmp [16];
    for (int i = 0; i < 256; i++) st(A_SBOX + 32'(i * 4), 32'(sbox_f(i)), 32'h100);
    for (int r = 0; r < 10; r++) for (int i = 0; i < 16; i++)
      st(A_RK + 32'((r * 16 + i) * 4), 32'(rk_f(r, i)), 32'h104);
    for (int b = 0; b < A_BLOCKS; b++) for (int i = 0; i < 16; i++)
      st(A_IN + 32'((b * 16 + i) * 4), 32'(in_f(b, i)), 32'h108);
    for (int b = 0; b < A_BLOCKS; b++) begin
      for (int i = 0; i < 16; i++) begin
        ld(A_IN + 32'((b * 16 + i) * 4), 32'h200, v);
        st(A_ST + 32'(i * 4), v, 32'h204);
      end
      for (int r = 0; r < 10; r++) begin
        for (int i = 0; i < 16; i++) begin          // add key and substitute
          ld(A_ST + 32'(i * 4), 32'h210, s);
          ld(A_RK + 32'((r * 16 + i) * 4), 32'h214, v);
          ld(A_SBOX + 32'(32'(s[7:0] ^ v[7:0]) * 4), 32'h218, v);
          st(A_ST + 32'(i * 4), v, 32'h21C);
        end
        for (int i = 0; i < 16; i++) begin          // permute (row shift)
          ld(A_ST + 32'(((i * 5) % 16) * 4), 32'h220, v);
          tmp[i] = v[7:0];
        end
        for (int i = 0; i < 16; i++) st(A_ST + 32'(i * 4), 32'(tmp[i]), 32'h224);
      end
      for (int i = 0; i < 16; i++) begin
        ld(A_ST + 32'(i * 4), 32'h230, v);
        st(A_OUT + 32'((b * 16 + i) * 4), v, 32'h234);
      end
    end
    // reference
    for (int b = 0; b < A_BLOCKS; b++) begin
      for (int i = 0; i < 16; i++) st_ref[i] = in_f(b, i);
      for (int r = 0; r < 10; r++) begin
        for (int i = 0; i < 16; i++) st_ref[i] = sbox_f(int'(st_ref[i] ^ rk_f(r, i)));
        for (int i = 0; i < 16; i++) tmp[i] = st_ref[(i * 5) % 16];
        st_ref = tmp;
      end
      for (int i = 0; i < 16; i++) begin
        ld(A_OUT + 32'((b * 16 + i) * 4), 32'h300, v);
        check(v == 32'(st_ref[i]), $sformatf("cipher block %0d byte %0d", b, i));
      end
    end
  endtask

  // ---------------------------------------------------------------- convolution
  localparam logic [31:0] C_IMG = 32'h0005_0000, C_K = 32'h0006_0000, C_OUT = 32'h0007_0000;
  localparam int C_W = 40;
  function automatic int pix_f(input int x, input int y);
    return (x * 7 + y * 13) % 256;
  endfunction
  function automatic int k_f(input int i);
    return (i % 3) - 1 + ((i / 3) == 1 ? 2 : 0);
  endfunction

  task automatic run_conv();
    logic [31:0] v, k;
    int acc;
    for (int y = 0; y < C_W; y++) for (int x = 0; x < C_W; x++)
      st(C_IMG + 32'((y * C_W + x) * 4), 32'(pix_f(x, y)), 32'h400);
    for (int i = 0; i < 9; i++) st(C_K + 32'(i * 4), 32'(k_f(i)), 32'h404);
    for (int y = 1; y < C_W - 1; y++) for (int x = 1; x < C_W - 1; x++) begin
      acc = 0;
      for (int j = 0; j < 9; j++) begin
        ld(C_IMG + 32'(((y + j / 3 - 1) * C_W + x + j % 3 - 1) * 4), 32'h410, v);
        ld(C_K + 32'(j * 4), 32'h414, k);
        acc += int'(v) * int'(signed'(k));
      end
      st(C_OUT + 32'((y * C_W + x) * 4), 32'(acc), 32'h418);
    end
    for (int y = 1; y < C_W - 1; y++) for (int x = 1; x < C_W - 1; x++) begin
      acc = 0;
      for (int j = 0; j < 9; j++) acc += pix_f(x + j % 3 - 1, y + j / 3 - 1) * k_f(j);
      ld(C_OUT + 32'((y * C_W + x) * 4), 32'h500, v);
      check(v == 32'(acc), $sformatf("pixel %0d,%0d", x, y));
    end
  endtask

  // ---------------------------------------------------------------- merge sort
  localparam logic [31:0] M_ARR = 32'h0008_0000, M_L = 32'h0009_0000, M_R = 32'h000A_0000;
  localparam int M_N = 512;

  task automatic msort(input int lo, input int n);
    logic [31:0] v, a, b;
    int nl, i, j, k;
    if (n < 2) return;
    nl = n / 2;
    msort(lo, nl);
    msort(lo + nl, n - nl);
    // split: copy both halves out
    for (int t = 0; t < nl; t++) begin
      ld(M_ARR + 32'((lo + t) * 4), 32'h600, v);
      st(M_L + 32'((lo + t) * 4), v, 32'h604);
    end
    for (int t = nl; t < n; t++) begin
      ld(M_ARR + 32'((lo + t) * 4), 32'h608, v);
      st(M_R + 32'((lo + t) * 4), v, 32'h60C);
    end
    // merge back
    i = 0; j = nl; k = 0;
    while (i < nl || j < n) begin
      if (i < nl) ld(M_L + 32'((lo + i) * 4), 32'h610, a);
      if (j < n)  ld(M_R + 32'((lo + j) * 4), 32'h614, b);
      if (j >= n || (i < nl && a <= b)) begin
        st(M_ARR + 32'((lo + k) * 4), a, 32'h618); i++;
      end else begin
        st(M_ARR + 32'((lo + k) * 4), b, 32'h61C); j++;
      end
      k++;
    end
  endtask

  task automatic run_sort();
    logic [31:0] v, prev;
    longint sum_in, sum_out;
    sum_in = 0; sum_out = 0;
    for (int i = 0; i < M_N; i++) begin
      v = (32'(i) * 32'd2654435761) >> 8;
      sum_in += v;
      st(M_ARR + 32'(i * 4), v, 32'h700);
    end
    msort(0, M_N);
    prev = 0;
    for (int i = 0; i < M_N; i++) begin
      ld(M_ARR + 32'(i * 4), 32'h704, v);
      check(v >= prev, $sformatf("sorted at %0d", i));
      prev = v;
      sum_out += v;
    end
    check(sum_in == sum_out, "sort kept every element");
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; cycles = 0; n_miss = 0; n_access = 0; n_wb = 0;
    n_vwr = 0; n_nvwr = 0; n_swap = 0; n_outage = 0; running = 0;
    d_valid = 0; d_we = 0; d_addr = 0; d_wdata = 0; d_pc = 0;
    @(posedge rst_n);
    @(posedge clk);
    running = 1;
    case (APP)
      0:       run_aes();
      1:       run_conv();
      default: run_sort();
    endcase
    running = 0;
    if (PERIOD > 0) check(n_outage > 0, "outages happened");
    done = 1;
  end
endmodule
