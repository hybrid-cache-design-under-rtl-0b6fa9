// hc_hybrid_cache: write-back set-associative cache whose sets mix volatile and non-volatile
// ways, with architecture-aware replacement and a power-outage backup sequence.
//
// Organisation. CACHE_BYTES of data in WAYS-way sets of LINE_BYTES lines. In every set the
// ways 0 .. WAYS-NV_WAYS-1 form the volatile (SRAM) section and the upper NV_WAYS ways the
// non-volatile (STT-RAM) section; tags and valid/dirty flags follow the volatility of their
// data (hc_tag_array), all per-line policy metadata is volatile (hc_meta_array).
//
// Policies (parameter POLICY):
//   POL_LRU  victim is the least recently used way of the whole set;
//   POL_WI   a miss looks up the write-intensity predictor of its hashed PC and places the
//            line in the volatile section for the two write-intensive states, otherwise in
//            the non-volatile one; LRU inside the section. Per-line cost: read hit -1, write
//            hit +24. On eviction the placing predictor moves towards write intensive when
//            cost >= theta_wi, otherwise towards read intensive;
//   POL_CM   a miss places the line in the section named by the previous-placement bit of
//            its hashed PC; victims by Eq. 1 (volatile) / Eq. 2 (non-volatile), see
//            hc_victim_sel. Read hits count ric, write hits wic. A counter reaching theta_cm
//            in its suitable section (ric in NV, wic in volatile) resets and raises conf
//            (capped at 3); reaching it in the unsuitable section swaps the line with the
//            Eq. 1 / Eq. 2 candidate of the other section. The set (here: the whole cache)
//            is blocked until the swap is finished.
//
// Power outage. While pwr_fail is high the cache stops accepting requests once the current
// one has finished, then walks all sets: with POL_CM it first swaps, as long as possible, the
// most confident valid volatile line with the least confident non-volatile line when the
// former's confidence is higher; then every valid volatile line counts as evicted for the
// policy tables and every dirty volatile line is written back. backup_done then stays high
// until pwr_fail falls (supply restored); in that cycle the volatile ways and all per-line
// metadata are lost (ev.pwr_loss), the non-volatile lines and the policy tables survive.
//
// CPU interface: one request at a time. Hold cpu_req_* stable from cpu_req_valid until the
// one-cycle cpu_req_ready, which also carries cpu_rsp_rdata. A hit completes HIT latency
// cycles after the request is first seen idle: V_RD_LAT / NV_RD_LAT for reads, V_WR_LAT /
// NV_WR_LAT for writes, depending on the section of the hit way. A miss writes back a dirty
// victim, reads the line from memory, and completes the section's write latency after the
// fill data arrived. A CM swap occupies the cache for max(read) + max(write) latency cycles
// after the hit that triggered it. Memory interface: whole lines, mem_req_* held from
// mem_req_valid to the one-cycle mem_req_ready (read data in mem_rsp_rdata).
//
// From the design description: the section split, write-back, the latencies (2/2 cycles SRAM,
// 2/8 cycles STT-RAM), the three policies with their constants, swapping instead of evicting
// on CM migration, blocking during a swap, the backup order, the volatility of metadata and
// tables. This design's own choices: the line size, the CPU/memory handshakes, the PC hash,
// counter widths, invalid-first victims, blocking the whole cache rather than one set, the
// swap cost, completing a miss without a second lookup, resetting the triggering counter of
// a migrated line, and modelling the power loss at the moment power returns.
//
// Lint notes: with NV_WAYS = WAYS (the instruction cache) there are no volatile ways and the
// comparisons against VOL_WAYS are constant; that is intended. The predictor's state output
// (wi_state) and the victim selector's found flag (vic_found) are left unread: placement uses
// only the predictor's place_nv decision, and a section on a miss is never empty. The low two
// address bits are unused because the port works on 32-bit words.
module hc_hybrid_cache
  import hc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned NV_WAYS     = 1,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned ADDR_W      = 32,
  parameter policy_e     POLICY      = POL_WI,
  parameter int unsigned V_RD_LAT    = 2,
  parameter int unsigned V_WR_LAT    = 2,
  parameter int unsigned NV_RD_LAT   = 2,
  parameter int unsigned NV_WR_LAT   = 8,
  localparam int unsigned LINE_W     = LINE_BYTES * 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU side
  input  logic                     cpu_req_valid,
  input  logic                     cpu_req_we,
  input  logic [ADDR_W-1:0]        cpu_req_addr,
  input  logic [31:0]              cpu_req_wdata,
  input  logic [3:0]               cpu_req_be,
  input  logic [31:0]              cpu_req_pc,
  output logic                     cpu_req_ready,
  output logic [31:0]              cpu_rsp_rdata,
  // main-memory side
  output logic                     mem_req_valid,
  output logic                     mem_req_we,
  output logic [ADDR_W-1:0]        mem_req_addr,
  output logic [LINE_W-1:0]        mem_req_wdata,
  input  logic                     mem_req_ready,
  input  logic [LINE_W-1:0]        mem_rsp_rdata,
  // policy thresholds (set per application)
  input  logic signed [COST_W-1:0] theta_wi,
  input  logic [CNT_W-1:0]         theta_cm,
  // power outage
  input  logic                     pwr_fail,
  output logic                     backup_done,
  output cache_ev_t                ev
);
  localparam int unsigned SETS     = CACHE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W    = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W    = $clog2(SETS);
  localparam int unsigned TAG_W    = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned WORD_W   = OFF_W - 2;
  localparam int unsigned WAY_W    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned VOL_WAYS = WAYS - NV_WAYS;
  localparam int unsigned RD_MAX   = (V_RD_LAT > NV_RD_LAT) ? V_RD_LAT : NV_RD_LAT;
  localparam int unsigned WR_MAX   = (V_WR_LAT > NV_WR_LAT) ? V_WR_LAT : NV_WR_LAT;
  localparam int unsigned SWAP_LAT = RD_MAX + WR_MAX;
  localparam logic [WAYS-1:0] VOL_MASK = WAYS'((2**VOL_WAYS) - 1);
  localparam logic [WAYS-1:0] NV_MASK  = ~VOL_MASK;

  typedef enum logic [3:0] {
    S_IDLE, S_HIT, S_EVICT, S_WB, S_FILL, S_FILL_WR, S_SWAP,
    S_BK_SET, S_BK_WAY, S_BK_WB, S_OFF
  } state_e;

  state_e                 st_q;
  logic [7:0]             cnt_q;
  logic                   we_q;
  logic [ADDR_W-1:0]      addr_q;
  logic [31:0]            wdata_q;
  logic [3:0]             be_q;
  logic [PT_IDX_W-1:0]    pidx_q;
  logic [IDX_W-1:0]       set_q;
  logic [WAY_W-1:0]       way_q, way2_q;
  logic [WAY_W-1:0]       bkw_q;
  logic                   swap_bk_q;   // swap belongs to the backup walk
  logic                   swap_wic_q;  // migrated line reached theta_cm with wic (else ric)
  logic [LINE_W-1:0]      line_q;

  // ------------------------------------------------------------------ arrays
  logic [IDX_W-1:0]  rd_set;
  logic [WAYS-1:0]   t_valid, t_dirty;
  logic [TAG_W-1:0]  t_tag  [WAYS];
  logic [PT_IDX_W-1:0] t_pidx [WAYS];
  logic              tw_en;
  logic [WAYS-1:0]   tw_mask, tw_valid, tw_dirty;
  logic [TAG_W-1:0]  tw_tag  [WAYS];
  logic [PT_IDX_W-1:0] tw_pidx [WAYS];
  logic [LINE_W-1:0] d_line [WAYS];
  logic [WAYS-1:0]   dw_mask;
  logic [LINE_W-1:0] dw_line [WAYS];
  line_meta_t        m_rd [WAYS];
  line_meta_t        m_wr [WAYS];
  logic              mw_en;
  logic              pwr_loss;

  hc_tag_array #(.WAYS(WAYS), .NV_WAYS(NV_WAYS), .SETS(SETS), .TAG_W(TAG_W),
                 .PIDX_W(PT_IDX_W)) u_tags (
    .clk, .rst_n, .rd_set,
    .rd_valid(t_valid), .rd_dirty(t_dirty), .rd_tag(t_tag), .rd_pidx(t_pidx),
    .wr_en(tw_en), .wr_set(set_q), .wr_mask(tw_mask), .wr_valid(tw_valid),
    .wr_dirty(tw_dirty), .wr_tag(tw_tag), .wr_pidx(tw_pidx), .pwr_loss);

  hc_data_array #(.WAYS(WAYS), .SETS(SETS), .LINE_W(LINE_W)) u_data (
    .clk, .rd_set, .rd_line(d_line), .wr_set(set_q), .wr_mask(dw_mask), .wr_line(dw_line));

  hc_meta_array #(.WAYS(WAYS), .SETS(SETS)) u_meta (
    .clk, .rst_n, .rst_all(pwr_loss), .rd_set, .rd_meta(m_rd),
    .wr_en(mw_en), .wr_set(set_q), .wr_meta(m_wr));

  // ------------------------------------------------------------------ policy tables
  logic [PT_IDX_W-1:0] req_pidx;
  logic                wi_place_nv, cm_place_nv;
  wi_state_e           wi_state;
  logic                wi_upd_en, wi_upd_wr, cm_wr_en, cm_wr_nv;
  logic [PT_IDX_W-1:0] tbl_upd_idx;

  assign req_pidx = pc_hash(cpu_req_pc);

  hc_wi_predictor #(.ENTRIES(PT_ENTRIES)) u_wi (
    .clk, .rst_n, .rd_idx(req_pidx), .rd_state(wi_state), .place_nv(wi_place_nv),
    .upd_en(wi_upd_en), .upd_idx(tbl_upd_idx), .upd_write_int(wi_upd_wr));

  hc_cm_table #(.ENTRIES(PT_ENTRIES)) u_cm (
    .clk, .rst_n, .rd_idx(req_pidx), .rd_nv(cm_place_nv),
    .wr_en(cm_wr_en), .wr_idx(tbl_upd_idx), .wr_nv(cm_wr_nv));

  // ------------------------------------------------------------------ lookup
  logic [IDX_W-1:0]  req_set;
  logic [TAG_W-1:0]  req_tag;
  logic              hit;
  logic [WAY_W-1:0]  hit_way;

  assign req_set = cpu_req_addr[OFF_W +: IDX_W];
  assign req_tag = cpu_req_addr[ADDR_W-1 -: TAG_W];
  assign rd_set  = (st_q == S_IDLE) ? req_set : set_q;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (t_valid[w] && t_tag[w] == req_tag && !hit) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
  end

  function automatic logic is_nv(input logic [WAY_W-1:0] w);
    return int'(w) >= VOL_WAYS;
  endfunction

  function automatic logic [7:0] access_lat(input logic [WAY_W-1:0] w, input logic wr);
    if (is_nv(w)) return wr ? 8'(NV_WR_LAT) : 8'(NV_RD_LAT);
    return wr ? 8'(V_WR_LAT) : 8'(V_RD_LAT);
  endfunction

  // Placement section and victim of a miss.
  logic              place_nv;
  logic [WAYS-1:0]   vic_mask;
  sel_mode_e         vic_mode;
  logic [WAY_W-1:0]  vic_way;
  logic              vic_found;

  always_comb begin
    unique case (POLICY)
      POL_WI:  place_nv = wi_place_nv;
      POL_CM:  place_nv = cm_place_nv;
      default: place_nv = 1'b0;
    endcase
    if (NV_WAYS == 0)        place_nv = 1'b0;
    if (NV_WAYS == WAYS)     place_nv = 1'b1;
    if (POLICY == POL_LRU) begin
      vic_mask = '1;
      vic_mode = SEL_LRU;
    end else begin
      vic_mask = place_nv ? NV_MASK : VOL_MASK;
      vic_mode = (POLICY == POL_CM) ? (place_nv ? SEL_EQ2 : SEL_EQ1) : SEL_LRU;
    end
  end

  hc_victim_sel #(.WAYS(WAYS)) u_vic (
    .valid(t_valid), .meta(m_rd), .mask(vic_mask), .mode(vic_mode), .theta_cm,
    .way(vic_way), .found(vic_found));

  // Swap partner of a CM migration: the hit line moves to the other section.
  logic [WAYS-1:0]   swp_mask;
  sel_mode_e         swp_mode;
  logic [WAY_W-1:0]  swp_way;
  logic              swp_found;

  assign swp_mask = is_nv(way_q) ? VOL_MASK : NV_MASK;
  assign swp_mode = is_nv(way_q) ? SEL_EQ1 : SEL_EQ2;

  hc_victim_sel #(.WAYS(WAYS)) u_swp (
    .valid(t_valid), .meta(m_rd), .mask(swp_mask), .mode(swp_mode), .theta_cm,
    .way(swp_way), .found(swp_found));

  // Backup pair: most confident valid volatile line, least confident non-volatile line.
  logic [WAY_W-1:0]  bk_vway, bk_nway;
  logic              bk_vfound, bk_nfound;

  always_comb begin
    bk_vway = '0; bk_nway = '0; bk_vfound = 1'b0; bk_nfound = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (w < VOL_WAYS) begin
        if (t_valid[w] && (!bk_vfound || m_rd[w].conf > m_rd[bk_vway].conf)) begin
          bk_vfound = 1'b1;
          bk_vway   = WAY_W'(w);
        end
      end else begin
        if (!bk_nfound || m_rd[w].conf < m_rd[bk_nway].conf) begin
          bk_nfound = 1'b1;
          bk_nway   = WAY_W'(w);
        end
      end
    end
  end

  // ------------------------------------------------------------------ helpers
  logic [WORD_W-1:0] word_q;
  assign word_q = addr_q[OFF_W-1:2];

  function automatic logic [LINE_W-1:0] merge(input logic [LINE_W-1:0] line,
                                              input logic [WORD_W-1:0] word,
                                              input logic [31:0] data, input logic [3:0] be);
    logic [LINE_W-1:0] r;
    r = line;
    for (int b = 0; b < 4; b++)
      if (be[b]) r[int'(word)*32 + b*8 +: 8] = data[b*8 +: 8];
    return r;
  endfunction

  // LRU touch of one way: it becomes rank 0, younger lines age by one.
  function automatic void lru_touch(ref line_meta_t m [WAYS], input logic [WAY_W-1:0] w);
    logic [1:0] old;
    old = m[w].age;
    for (int i = 0; i < WAYS; i++)
      if (m[i].age < old) m[i].age = m[i].age + 2'd1;
    m[w].age = '0;
  endfunction

  // Hit metadata update and CM threshold decision.
  line_meta_t  hit_meta [WAYS];
  logic        hit_migrate;
  logic        hit_by_wic;

  always_comb begin
    line_meta_t m;
    for (int i = 0; i < WAYS; i++) hit_meta[i] = m_rd[i];
    hit_migrate = 1'b0;
    hit_by_wic  = we_q;
    lru_touch(hit_meta, way_q);
    m      = hit_meta[way_q];
    m.cost = cost_update(m.cost, we_q);
    if (we_q) m.wic = (m.wic == '1) ? m.wic : m.wic + 1'b1;
    else      m.ric = (m.ric == '1) ? m.ric : m.ric + 1'b1;
    if (POLICY == POL_CM) begin
      if (we_q && m.wic >= theta_cm) begin
        if (!is_nv(way_q)) begin
          m.wic  = '0;
          m.conf = (m.conf == CONF_W'(CONF_MAX)) ? m.conf : m.conf + 1'b1;
        end else begin
          hit_migrate = 1'b1;
        end
      end
      if (!we_q && m.ric >= theta_cm) begin
        if (is_nv(way_q)) begin
          m.ric  = '0;
          m.conf = (m.conf == CONF_W'(CONF_MAX)) ? m.conf : m.conf + 1'b1;
        end else begin
          hit_migrate = 1'b1;
        end
      end
    end
    hit_meta[way_q] = m;
  end

  // Fill metadata: fresh line at rank 0 with cleared policy fields.
  line_meta_t fill_meta [WAYS];
  always_comb begin
    for (int i = 0; i < WAYS; i++) fill_meta[i] = m_rd[i];
    lru_touch(fill_meta, way_q);
    fill_meta[way_q].cost = '0;
    fill_meta[way_q].ric  = '0;
    fill_meta[way_q].wic  = '0;
    fill_meta[way_q].conf = '0;
  end

  // Swap metadata: exchange the two entries, clear the counter that triggered a migration.
  line_meta_t swap_meta [WAYS];
  always_comb begin
    for (int i = 0; i < WAYS; i++) swap_meta[i] = m_rd[i];
    swap_meta[way2_q] = m_rd[way_q];
    swap_meta[way_q]  = m_rd[way2_q];
    if (!swap_bk_q) begin
      if (swap_wic_q) swap_meta[way2_q].wic = '0;
      else            swap_meta[way2_q].ric = '0;
    end
  end

  // ------------------------------------------------------------------ control
  logic [7:0] hit_lat;
  assign hit_lat = access_lat(hit_way, cpu_req_we);

  always_comb begin
    cpu_req_ready = 1'b0;
    cpu_rsp_rdata = d_line[way_q][int'(word_q)*32 +: 32];
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {addr_q[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    mem_req_wdata = d_line[way_q];
    backup_done   = (st_q == S_OFF);
    pwr_loss      = (st_q == S_OFF) && !pwr_fail;
    tw_en   = 1'b0;
    tw_mask = '0;
    tw_valid = t_valid;
    tw_dirty = t_dirty;
    for (int i = 0; i < WAYS; i++) begin
      tw_tag[i]  = t_tag[i];
      tw_pidx[i] = t_pidx[i];
      dw_line[i] = d_line[i];
      m_wr[i]    = m_rd[i];
    end
    dw_mask   = '0;
    mw_en     = 1'b0;
    wi_upd_en = 1'b0;
    wi_upd_wr = 1'b0;
    cm_wr_en  = 1'b0;
    cm_wr_nv  = 1'b0;
    tbl_upd_idx = t_pidx[way_q];
    ev = '0;
    ev.pwr_loss = pwr_loss;

    unique case (st_q)
      S_HIT: if (cnt_q == 0) begin
        cpu_req_ready = 1'b1;
        ev.hit = 1'b1;
        mw_en  = 1'b1;
        for (int i = 0; i < WAYS; i++) m_wr[i] = hit_meta[i];
        if (we_q) begin
          dw_mask[way_q]  = 1'b1;
          dw_line[way_q]  = merge(d_line[way_q], word_q, wdata_q, be_q);
          tw_en           = 1'b1;
          tw_mask[way_q]  = 1'b1;
          tw_dirty[way_q] = 1'b1;
          ev.nv_write = is_nv(way_q);
          ev.v_write  = !is_nv(way_q);
        end
      end
      S_EVICT: if (t_valid[way_q]) begin
        ev.miss   = 1'b1;
        ev.evict  = 1'b1;
        wi_upd_en = (POLICY == POL_WI);
        wi_upd_wr = (m_rd[way_q].cost >= theta_wi);
        cm_wr_en  = (POLICY == POL_CM);
        cm_wr_nv  = is_nv(way_q);
      end else begin
        ev.miss   = 1'b1;
      end
      S_WB, S_BK_WB: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        if (st_q == S_BK_WB) mem_req_wdata = d_line[bkw_q];
        mem_req_addr  = (st_q == S_BK_WB)
                      ? {t_tag[bkw_q], set_q, {OFF_W{1'b0}}}
                      : {t_tag[way_q], set_q, {OFF_W{1'b0}}};
        ev.writeback  = mem_req_ready;
        if (st_q == S_BK_WB && mem_req_ready) begin
          tw_en           = 1'b1;
          tw_mask[bkw_q]  = 1'b1;
          tw_dirty[bkw_q] = 1'b0;
        end
      end
      S_FILL: mem_req_valid = 1'b1;
      S_FILL_WR: if (cnt_q == 0) begin
        cpu_req_ready   = 1'b1;
        cpu_rsp_rdata   = line_q[int'(word_q)*32 +: 32];
        dw_mask[way_q]  = 1'b1;
        dw_line[way_q]  = line_q;
        tw_en           = 1'b1;
        tw_mask[way_q]  = 1'b1;
        tw_valid[way_q] = 1'b1;
        tw_dirty[way_q] = we_q;
        tw_tag[way_q]   = addr_q[ADDR_W-1 -: TAG_W];
        tw_pidx[way_q]  = pidx_q;
        mw_en           = 1'b1;
        for (int i = 0; i < WAYS; i++) m_wr[i] = fill_meta[i];
        ev.nv_write = is_nv(way_q);
        ev.v_write  = !is_nv(way_q);
      end
      S_SWAP: if (cnt_q == 0) begin
        dw_mask[way_q]   = 1'b1;
        dw_mask[way2_q]  = 1'b1;
        dw_line[way_q]   = d_line[way2_q];
        dw_line[way2_q]  = d_line[way_q];
        tw_en            = 1'b1;
        tw_mask[way_q]   = 1'b1;
        tw_mask[way2_q]  = 1'b1;
        tw_valid[way_q]  = t_valid[way2_q];
        tw_valid[way2_q] = t_valid[way_q];
        tw_dirty[way_q]  = t_dirty[way2_q];
        tw_dirty[way2_q] = t_dirty[way_q];
        tw_tag[way_q]    = t_tag[way2_q];
        tw_tag[way2_q]   = t_tag[way_q];
        tw_pidx[way_q]   = t_pidx[way2_q];
        tw_pidx[way2_q]  = t_pidx[way_q];
        mw_en            = 1'b1;
        for (int i = 0; i < WAYS; i++) m_wr[i] = swap_meta[i];
        ev.swap     = !swap_bk_q;
        ev.bk_swap  = swap_bk_q;
        ev.nv_write = 1'b1;
        ev.v_write  = 1'b1;
      end
      S_BK_WAY: if (t_valid[bkw_q]) begin
        tbl_upd_idx = t_pidx[bkw_q];
        wi_upd_en   = (POLICY == POL_WI);
        wi_upd_wr   = (m_rd[bkw_q].cost >= theta_wi);
        cm_wr_en    = (POLICY == POL_CM);
        cm_wr_nv    = 1'b0;
      end
      default: ;
    endcase
  end

  // Backup walk: after the last volatile way of a set go to the next set, after the last
  // set power off.
  logic bk_last_way, bk_last_set;
  assign bk_last_way = (int'(bkw_q) + 1 >= VOL_WAYS);
  assign bk_last_set = (int'(set_q) == SETS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      cnt_q      <= '0;
      we_q       <= 1'b0;
      addr_q     <= '0;
      wdata_q    <= '0;
      be_q       <= '0;
      pidx_q     <= '0;
      set_q      <= '0;
      way_q      <= '0;
      way2_q     <= '0;
      bkw_q      <= '0;
      swap_bk_q  <= 1'b0;
      swap_wic_q <= 1'b0;
      line_q     <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: begin
          if (pwr_fail) begin
            set_q <= '0;
            bkw_q <= '0;
            st_q  <= S_BK_SET;
          end else if (cpu_req_valid) begin
            we_q    <= cpu_req_we;
            addr_q  <= cpu_req_addr;
            wdata_q <= cpu_req_wdata;
            be_q    <= cpu_req_be;
            pidx_q  <= req_pidx;
            set_q   <= req_set;
            if (hit) begin
              way_q <= hit_way;
              cnt_q <= hit_lat - 8'd1;
              st_q  <= S_HIT;
            end else begin
              way_q <= vic_way;
              st_q  <= S_EVICT;
            end
          end
        end
        S_HIT: begin
          if (cnt_q != 0) cnt_q <= cnt_q - 8'd1;
          else if (hit_migrate && swp_found) begin
            way2_q     <= swp_way;
            swap_bk_q  <= 1'b0;
            swap_wic_q <= hit_by_wic;
            cnt_q      <= 8'(SWAP_LAT - 1);
            st_q       <= S_SWAP;
          end else st_q <= S_IDLE;
        end
        S_EVICT: st_q <= (t_valid[way_q] && t_dirty[way_q]) ? S_WB : S_FILL;
        S_WB:    if (mem_req_ready) st_q <= S_FILL;
        S_FILL:  if (mem_req_ready) begin
          line_q <= we_q ? merge(mem_rsp_rdata, word_q, wdata_q, be_q) : mem_rsp_rdata;
          cnt_q  <= access_lat(way_q, 1'b1) - 8'd1;
          st_q   <= S_FILL_WR;
        end
        S_FILL_WR: begin
          if (cnt_q != 0) cnt_q <= cnt_q - 8'd1;
          else            st_q  <= S_IDLE;
        end
        S_SWAP: begin
          if (cnt_q != 0) cnt_q <= cnt_q - 8'd1;
          else            st_q  <= swap_bk_q ? S_BK_SET : S_IDLE;
        end
        S_BK_SET: begin
          if (POLICY == POL_CM && VOL_WAYS > 0 && NV_WAYS > 0 && bk_vfound && bk_nfound &&
              m_rd[bk_vway].conf > m_rd[bk_nway].conf) begin
            way_q     <= bk_vway;
            way2_q    <= bk_nway;
            swap_bk_q <= 1'b1;
            cnt_q     <= 8'(SWAP_LAT - 1);
            st_q      <= S_SWAP;
          end else if (VOL_WAYS == 0) begin
            if (int'(set_q) == SETS - 1) st_q <= S_OFF;
            else set_q <= set_q + 1'b1;
          end else begin
            bkw_q <= '0;
            st_q  <= S_BK_WAY;
          end
        end
        S_BK_WAY: begin
          if (t_valid[bkw_q] && t_dirty[bkw_q]) st_q <= S_BK_WB;
          else if (!bk_last_way) bkw_q <= bkw_q + 1'b1;
          else if (!bk_last_set) begin
            set_q <= set_q + 1'b1;
            st_q  <= S_BK_SET;
          end else st_q <= S_OFF;
        end
        S_BK_WB: if (mem_req_ready) begin
          if (!bk_last_way) begin
            bkw_q <= bkw_q + 1'b1;
            st_q  <= S_BK_WAY;
          end else if (!bk_last_set) begin
            set_q <= set_q + 1'b1;
            st_q  <= S_BK_SET;
          end else st_q <= S_OFF;
        end
        S_OFF: if (!pwr_fail) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------ checks
  // The CPU must hold its request stable until it is completed.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (cpu_req_valid && !cpu_req_ready) |=> cpu_req_valid && $stable(cpu_req_addr) &&
                                            $stable(cpu_req_we);
  endproperty
  a_req_stable: assert property (p_req_stable);

  initial begin
    assert (SETS * WAYS * LINE_BYTES == CACHE_BYTES) else $error("size is not WAYS*LINE*2^k");
    assert (NV_WAYS <= WAYS) else $error("NV_WAYS must not exceed WAYS");
    assert (LINE_BYTES >= 8) else $error("line must hold at least two words");
  end
endmodule
