// hc_cm_table: previous-placement table of the confidence-based migration (CM) policy.
//
// ENTRIES one-bit entries, indexed by the hashed PC of the instruction that missed. Each bit
// records the section a line placed by that PC was in when it was last evicted (1 =
// non-volatile, 0 = volatile); a miss places its line in the section the bit names.
// Lookup is combinational (rd_idx -> rd_nv); a write (wr_en, wr_idx, wr_nv) takes effect at
// the clock edge. The table is meant to be non-volatile: only the power-on reset rst_n sets
// it, to "non-volatile". The table itself follows the policy description; the reset value is
// this design's choice. It matters: a line leaves the non-volatile section only when a fill
// placed there evicts it, so a table starting at "volatile" could never name the
// non-volatile section. Starting at "non-volatile", first placements go there, lines that
// turn out write-intensive migrate to the volatile section, and their evictions from there
// teach the table "volatile".
module hc_cm_table #(
  parameter int unsigned ENTRIES = 256,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_nv,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_nv
);
  logic [ENTRIES-1:0] bits_q;

  assign rd_nv = bits_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     bits_q <= '1;
    else if (wr_en) bits_q[wr_idx] <= wr_nv;
  end
endmodule
