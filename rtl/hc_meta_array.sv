// hc_meta_array: per-line replacement metadata of the hybrid cache.
//
// For every line it keeps the LRU rank (0 = most recently used), the WI cost field and the CM
// read/write intensity counters and confidence (hc_pkg::line_meta_t). All of these fields are
// kept volatile, as in the evaluated configuration, so a power loss resets them to their
// initial values: counters, cost and confidence zero, LRU rank equal to the way index (a
// valid ranking, so LRU keeps working after the loss). Interface: combinational read of a
// set; write of a whole set at the clock edge; rst_all (power-on or power loss) resets every
// set in one cycle. The whole-set write and one-cycle reset are this design's choices.
module hc_meta_array
  import hc_pkg::*;
#(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned SETS  = 128,
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rst_all,
  input  logic [IDX_W-1:0] rd_set,
  output line_meta_t   rd_meta [WAYS],
  input  logic         wr_en,
  input  logic [IDX_W-1:0] wr_set,
  input  line_meta_t   wr_meta [WAYS]
);
  line_meta_t meta_q [SETS][WAYS];

  function automatic line_meta_t init_meta(input int unsigned way);
    line_meta_t m;
    m      = '0;
    m.age  = 2'(way);
    return m;
  endfunction

  always_comb
    for (int w = 0; w < WAYS; w++) rd_meta[w] = meta_q[rd_set][w];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) meta_q[s][w] <= init_meta(w);
    end else if (rst_all) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) meta_q[s][w] <= init_meta(w);
    end else if (wr_en) begin
      for (int w = 0; w < WAYS; w++) meta_q[wr_set][w] <= wr_meta[w];
    end
  end

  initial assert (WAYS <= 4) else $error("the LRU rank field holds at most four ways");
endmodule
