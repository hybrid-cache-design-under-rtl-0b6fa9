// hc_victim_sel: picks the replacement victim or the migration partner inside one section.
//
// Combinational. Only ways whose mask bit is set are candidates. An invalid candidate is
// always taken first (lowest way index). Among valid candidates the rank depends on mode:
//   SEL_LRU  the oldest line (highest LRU rank), used by LRU and inside a WI section;
//   SEL_EQ1  argmin(wic + conf * theta_cm), the least write-intensive line of the volatile
//            section (CM policy, Equation 1 of the policy description);
//   SEL_EQ2  argmin(ric + conf * theta_cm), the least read-intensive line of the
//            non-volatile section (CM policy, Equation 2).
// Ties go to the lowest way index. found is low when the mask is empty.
// The two CM equations and LRU inside a section follow the policy descriptions; taking an
// invalid line first and the tie rule are this design's choices.
module hc_victim_sel
  import hc_pkg::*;
#(
  parameter int unsigned WAYS = 4,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]  valid,
  input  line_meta_t       meta [WAYS],
  input  logic [WAYS-1:0]  mask,
  input  sel_mode_e        mode,
  input  logic [CNT_W-1:0] theta_cm,
  output logic [WAY_W-1:0] way,
  output logic             found
);
  localparam int unsigned SCORE_W = 2*CNT_W + 2;

  function automatic logic [SCORE_W-1:0] score(input line_meta_t m, input sel_mode_e md,
                                               input logic [CNT_W-1:0] th);
    logic [SCORE_W-1:0] base;
    base = (md == SEL_EQ2) ? SCORE_W'(m.ric) : SCORE_W'(m.wic);
    return base + SCORE_W'(m.conf) * SCORE_W'(th);
  endfunction

  always_comb begin
    logic               inv_found;
    logic [WAY_W-1:0]   inv_way;
    logic [SCORE_W-1:0] best;
    logic [SCORE_W-1:0] s;
    inv_found = 1'b0;
    inv_way   = '0;
    found     = 1'b0;
    way       = '0;
    best      = '0;
    s         = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (mask[w]) begin
        if (!valid[w] && !inv_found) begin
          inv_found = 1'b1;
          inv_way   = WAY_W'(w);
        end
        if (mode == SEL_LRU) s = SCORE_W'(meta[w].age);
        else                 s = score(meta[w], mode, theta_cm);
        // LRU keeps the highest rank, the CM equations the lowest score.
        if (!found || (mode == SEL_LRU ? (s > best) : (s < best))) begin
          found = 1'b1;
          way   = WAY_W'(w);
          best  = s;
        end
      end
    end
    if (inv_found) way = inv_way;
  end
endmodule
