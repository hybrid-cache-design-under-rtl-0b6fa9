// hc_wi_predictor: prediction table of the write-intensity (WI) replacement policy.
//
// ENTRIES four-state predictors (read intensive, weakly read intensive, weakly write
// intensive, write intensive), indexed by the hashed PC of the instruction that missed.
// Lookup (combinational): the state of entry rd_idx; place_nv is high in the two
// read-intensive states, i.e. the missing line goes to the non-volatile section, otherwise
// to the volatile one. Update (at the clock edge, when upd_en): the entry that placed an
// evicted line moves one state towards write intensive when the line's cost was at least the
// threshold (upd_write_int high) and one state towards read intensive otherwise, saturating at
// both ends. The table is meant to be non-volatile, so only the power-on reset rst_n touches
// it; it then holds weakly write intensive, so early misses fill the volatile section.
// The states, the 256 entries and the update rule follow the policy description; the reset
// state is this design's reading of "initially all data goes to the volatile section".
module hc_wi_predictor
  import hc_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_idx,
  output wi_state_e        rd_state,
  output logic             place_nv,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  logic             upd_write_int
);
  wi_state_e tbl [ENTRIES];

  assign rd_state = tbl[rd_idx];
  assign place_nv = (rd_state == WI_READ) || (rd_state == WI_WEAK_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= WI_WEAK_WRITE;
    end else if (upd_en) begin
      unique case (tbl[upd_idx])
        WI_READ:       tbl[upd_idx] <= upd_write_int ? WI_WEAK_READ  : WI_READ;
        WI_WEAK_READ:  tbl[upd_idx] <= upd_write_int ? WI_WEAK_WRITE : WI_READ;
        WI_WEAK_WRITE: tbl[upd_idx] <= upd_write_int ? WI_WRITE      : WI_WEAK_READ;
        WI_WRITE:      tbl[upd_idx] <= upd_write_int ? WI_WRITE      : WI_WEAK_WRITE;
        default:       tbl[upd_idx] <= WI_WEAK_WRITE;
      endcase
    end
  end
endmodule
