// hc_system: single-level cache hierarchy of an intermittently powered embedded processor.
//
// Between a CPU (outside this design) and a non-volatile main memory (outside this design)
// sit a hybrid data cache (32 KB, 4 ways, NV_WAYS of them STT-RAM, write-back, replacement
// policy D_POLICY) and a fully non-volatile instruction cache (32 KB, 2 ways, all STT-RAM).
// Both share the memory port through hc_mem_arbiter, the data cache first. The power outage
// controller (or an external supply monitor, ext_pwr_fail) starts the backup: cpu_halt tells
// the CPU to stop fetching and save its registers into its non-volatile shadow registers,
// both caches finish their current request and back up their volatile content, and
// backup_done reports that the whole hierarchy is safe. The instruction cache has no
// volatile ways, so its backup is a walk over its sets without any work.
//
// Interfaces: the data and instruction ports follow the hc_hybrid_cache CPU handshake
// (request held until the one-cycle ready). The instruction port is read-only; its fetch
// address doubles as the PC. The memory port carries whole 64-byte lines with the same
// held-request / one-cycle-ready handshake. theta_wi / theta_cm are the per-application
// policy thresholds; cfg_* program the outage controller.
//
// The cache sizes, associativities, latencies, the fully non-volatile instruction cache and
// the outage controller settings follow the design description. Defaults: one non-volatile
// way in four (25 %) with the WI policy, the configuration the evaluation found best under a
// continuous supply; 50 % / 75 % and the LRU / CM policies are parameter settings. The
// instruction cache's LRU policy, the shared memory port and the signal-level interfaces
// are this design's choices.
//
// Lint note: rst_n resets the flip-flops asynchronously and also disables the caches'
// handshake assertion, which is sampled on the clock; a linter reports it as used both ways.
module hc_system
  import hc_pkg::*;
#(
  parameter int unsigned D_CACHE_BYTES = 32768,
  parameter int unsigned D_WAYS        = 4,
  parameter int unsigned D_NV_WAYS     = 1,
  parameter policy_e     D_POLICY      = POL_WI,
  parameter int unsigned I_CACHE_BYTES = 32768,
  parameter int unsigned I_WAYS        = 2,
  parameter int unsigned LINE_BYTES    = 64,
  parameter int unsigned ADDR_W        = 32,
  localparam int unsigned LINE_W       = LINE_BYTES * 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // data port
  input  logic                     d_req_valid,
  input  logic                     d_req_we,
  input  logic [ADDR_W-1:0]        d_req_addr,
  input  logic [31:0]              d_req_wdata,
  input  logic [3:0]               d_req_be,
  input  logic [31:0]              d_req_pc,
  output logic                     d_req_ready,
  output logic [31:0]              d_rsp_rdata,
  // instruction port
  input  logic                     i_req_valid,
  input  logic [ADDR_W-1:0]        i_req_addr,
  output logic                     i_req_ready,
  output logic [31:0]              i_rsp_rdata,
  // main memory
  output logic                     mem_req_valid,
  output logic                     mem_req_we,
  output logic [ADDR_W-1:0]        mem_req_addr,
  output logic [LINE_W-1:0]        mem_req_wdata,
  input  logic                     mem_req_ready,
  input  logic [LINE_W-1:0]        mem_rsp_rdata,
  // configuration
  input  logic signed [COST_W-1:0] theta_wi,
  input  logic [CNT_W-1:0]         theta_cm,
  input  logic [31:0]              cfg_outage_start,
  input  logic [31:0]              cfg_outage_period,
  input  logic [15:0]              cfg_outage_max,
  // power
  input  logic                     ext_pwr_fail,
  output logic                     cpu_halt,
  output logic                     backup_done,
  output logic [15:0]              outage_cnt,
  output cache_ev_t                d_ev,
  output cache_ev_t                i_ev
);
  logic ctrl_fail, pwr_fail, d_bk_done, i_bk_done;

  logic [1:0]        c_valid, c_we, c_ready;
  logic [ADDR_W-1:0] c_addr  [2];
  logic [LINE_W-1:0] c_wdata [2];
  logic [LINE_W-1:0] c_rdata;

  assign pwr_fail    = ctrl_fail || ext_pwr_fail;
  assign cpu_halt    = pwr_fail;
  assign backup_done = d_bk_done && i_bk_done;

  hc_outage_ctrl u_outage (
    .clk, .rst_n, .cfg_start(cfg_outage_start), .cfg_period(cfg_outage_period),
    .cfg_max(cfg_outage_max), .backup_done, .pwr_fail(ctrl_fail), .outage_cnt);

  hc_hybrid_cache #(
    .CACHE_BYTES(D_CACHE_BYTES), .WAYS(D_WAYS), .NV_WAYS(D_NV_WAYS),
    .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W), .POLICY(D_POLICY)
  ) u_dcache (
    .clk, .rst_n,
    .cpu_req_valid(d_req_valid), .cpu_req_we(d_req_we), .cpu_req_addr(d_req_addr),
    .cpu_req_wdata(d_req_wdata), .cpu_req_be(d_req_be), .cpu_req_pc(d_req_pc),
    .cpu_req_ready(d_req_ready), .cpu_rsp_rdata(d_rsp_rdata),
    .mem_req_valid(c_valid[0]), .mem_req_we(c_we[0]), .mem_req_addr(c_addr[0]),
    .mem_req_wdata(c_wdata[0]), .mem_req_ready(c_ready[0]), .mem_rsp_rdata(c_rdata),
    .theta_wi, .theta_cm, .pwr_fail, .backup_done(d_bk_done), .ev(d_ev));

  hc_hybrid_cache #(
    .CACHE_BYTES(I_CACHE_BYTES), .WAYS(I_WAYS), .NV_WAYS(I_WAYS),
    .LINE_BYTES(LINE_BYTES), .ADDR_W(ADDR_W), .POLICY(POL_LRU)
  ) u_icache (
    .clk, .rst_n,
    .cpu_req_valid(i_req_valid), .cpu_req_we(1'b0), .cpu_req_addr(i_req_addr),
    .cpu_req_wdata(32'h0), .cpu_req_be(4'h0), .cpu_req_pc(i_req_addr),
    .cpu_req_ready(i_req_ready), .cpu_rsp_rdata(i_rsp_rdata),
    .mem_req_valid(c_valid[1]), .mem_req_we(c_we[1]), .mem_req_addr(c_addr[1]),
    .mem_req_wdata(c_wdata[1]), .mem_req_ready(c_ready[1]), .mem_rsp_rdata(c_rdata),
    .theta_wi, .theta_cm, .pwr_fail, .backup_done(i_bk_done), .ev(i_ev));

  hc_mem_arbiter #(.N(2), .ADDR_W(ADDR_W), .LINE_W(LINE_W)) u_arb (
    .clk, .rst_n, .c_valid, .c_we, .c_addr, .c_wdata, .c_ready, .c_rdata,
    .m_valid(mem_req_valid), .m_we(mem_req_we), .m_addr(mem_req_addr),
    .m_wdata(mem_req_wdata), .m_ready(mem_req_ready), .m_rdata(mem_rsp_rdata));
endmodule
