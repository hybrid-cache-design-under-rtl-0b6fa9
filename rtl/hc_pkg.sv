// hc_pkg: types and constants shared by the hybrid volatile/non-volatile cache.
//
// The cache splits every set into volatile (SRAM) ways and non-volatile (STT-RAM) ways.
// Volatile ways are the low way indices 0 .. WAYS-NV_WAYS-1, non-volatile ways the high ones.
// Three replacement policies are supported: plain LRU, the write-intensity predictor policy
// (WI: a 256-entry table of four-state predictors and a per-line cost field, read hit -1,
// write hit +24) and the confidence-based migration policy (CM: a 256-entry one-bit placement
// table and per-line read/write intensity counters plus a confidence field capped at three).
// The numbers 256, 24 and 3 and the four predictor states follow the policy descriptions;
// the PC hash, the field widths and the encodings are this design's own choices.
package hc_pkg;

  typedef enum logic [1:0] {
    POL_LRU = 2'd0,
    POL_WI  = 2'd1,
    POL_CM  = 2'd2
  } policy_e;

  // Four write-intensity states, ordered from most read-intensive to most write-intensive.
  typedef enum logic [1:0] {
    WI_READ        = 2'd0,
    WI_WEAK_READ   = 2'd1,
    WI_WEAK_WRITE  = 2'd2,
    WI_WRITE       = 2'd3
  } wi_state_e;

  localparam int unsigned PT_ENTRIES  = 256;  // predictor / placement table entries
  localparam int unsigned PT_IDX_W    = 8;
  localparam int unsigned COST_W      = 16;   // signed WI cost field
  localparam int unsigned CNT_W       = 8;    // CM ric / wic counters
  localparam int unsigned CONF_W      = 2;    // CM confidence, capped at CONF_MAX
  localparam int unsigned CONF_MAX    = 3;
  localparam int          WI_WRITE_INC = 24;  // cost added on a write hit
  localparam int          WI_READ_DEC  = 1;   // cost removed on a read hit

  // Per-line replacement metadata. All of it is volatile: it is reset after a power outage.
  typedef struct packed {
    logic [1:0]          age;   // LRU rank inside the set, 0 = most recently used
    logic signed [COST_W-1:0] cost;
    logic [CNT_W-1:0]    ric;
    logic [CNT_W-1:0]    wic;
    logic [CONF_W-1:0]   conf;
  } line_meta_t;

  // How a victim or swap candidate is ranked inside a section.
  typedef enum logic [1:0] {
    SEL_LRU = 2'd0,   // oldest LRU rank
    SEL_EQ1 = 2'd1,   // argmin wic + conf * theta_cm  (volatile section)
    SEL_EQ2 = 2'd2    // argmin ric + conf * theta_cm  (non-volatile section)
  } sel_mode_e;

  // One-cycle event strobes of a cache, for statistics and tests.
  typedef struct packed {
    logic hit;        // request served from the cache
    logic miss;       // request needed a line fill
    logic evict;      // a valid line was replaced on a miss
    logic writeback;  // a dirty line was written to main memory
    logic v_write;    // a write into a volatile way (hit, fill or swap)
    logic nv_write;   // a write into a non-volatile way (hit, fill or swap)
    logic swap;       // a CM migration swap finished during normal operation
    logic bk_swap;    // a CM confidence swap finished during a backup
    logic pwr_loss;   // volatile ways and all line metadata were lost
  } cache_ev_t;

  // Hash of the PC of the instruction that caused an access into the 256-entry tables:
  // the word-address bits [9:2] folded with bits [17:10] by exclusive-or.
  function automatic logic [PT_IDX_W-1:0] pc_hash(input logic [31:0] pc);
    return pc[9:2] ^ pc[17:10];
  endfunction

  // Saturating signed cost update of the WI policy.
  function automatic logic signed [COST_W-1:0] cost_update(input logic signed [COST_W-1:0] c,
                                                           input logic is_write);
    logic signed [COST_W+1:0] s;
    s = is_write ? (COST_W+2)'(c) + (COST_W+2)'(WI_WRITE_INC)
                 : (COST_W+2)'(c) - (COST_W+2)'(WI_READ_DEC);
    if (s > (COST_W+2)'(2**(COST_W-1) - 1)) return {1'b0, {(COST_W-1){1'b1}}};
    if (s < -(COST_W+2)'(2**(COST_W-1)))    return {1'b1, {(COST_W-1){1'b0}}};
    return s[COST_W-1:0];
  endfunction

endpackage
