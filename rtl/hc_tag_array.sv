// hc_tag_array: tag array with valid and dirty flags of the hybrid cache.
//
// Each set holds WAYS entries {valid, dirty, tag, pc index}. The pc index is the hashed PC of
// the miss that placed the line; the replacement policies need it when the line is evicted.
// Ways 0 .. WAYS-NV_WAYS-1 are volatile (SRAM), the rest non-volatile (STT-RAM): the tag and
// flag entries share the volatility of the data they describe, so a power loss clears the
// valid and dirty flags of the volatile ways only, while non-volatile entries stay valid.
// Interface: combinational read of a whole set; a write port that updates any subset of the
// ways of one set (way mask) at the clock edge, so two ways can be exchanged in one write;
// pwr_loss is a one-cycle strobe that drops every volatile entry. rst_n is the power-on reset
// of a blank chip and clears all flags.
// The hybrid split follows the design; the flag reset on power-on and the one-cycle clear are
// this design's choices (a real SRAM simply loses its content).
//
// Lint note: when every way is non-volatile (NV_WAYS = WAYS) the power-loss loop over the
// volatile ways is empty and its comparison constant; that is intended.
module hc_tag_array #(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned NV_WAYS = 1,
  parameter int unsigned SETS    = 128,
  parameter int unsigned TAG_W   = 19,
  parameter int unsigned PIDX_W  = 8,
  localparam int unsigned IDX_W  = $clog2(SETS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IDX_W-1:0]     rd_set,
  output logic [WAYS-1:0]      rd_valid,
  output logic [WAYS-1:0]      rd_dirty,
  output logic [TAG_W-1:0]     rd_tag   [WAYS],
  output logic [PIDX_W-1:0]    rd_pidx  [WAYS],
  input  logic                 wr_en,
  input  logic [IDX_W-1:0]     wr_set,
  input  logic [WAYS-1:0]      wr_mask,
  input  logic [WAYS-1:0]      wr_valid,
  input  logic [WAYS-1:0]      wr_dirty,
  input  logic [TAG_W-1:0]     wr_tag   [WAYS],
  input  logic [PIDX_W-1:0]    wr_pidx  [WAYS],
  input  logic                 pwr_loss
);
  localparam int unsigned VOL_WAYS = WAYS - NV_WAYS;

  logic [WAYS-1:0]   valid_q [SETS];
  logic [WAYS-1:0]   dirty_q [SETS];
  logic [TAG_W-1:0]  tag_mem  [SETS][WAYS];
  logic [PIDX_W-1:0] pidx_mem [SETS][WAYS];

  always_comb begin
    rd_valid = valid_q[rd_set];
    rd_dirty = dirty_q[rd_set];
    for (int w = 0; w < WAYS; w++) begin
      rd_tag[w]  = tag_mem[rd_set][w];
      rd_pidx[w] = pidx_mem[rd_set][w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
      end
    end else if (pwr_loss) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < VOL_WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          dirty_q[s][w] <= 1'b0;
        end
    end else if (wr_en) begin
      for (int w = 0; w < WAYS; w++)
        if (wr_mask[w]) begin
          valid_q[wr_set][w] <= wr_valid[w];
          dirty_q[wr_set][w] <= wr_dirty[w];
        end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int w = 0; w < WAYS; w++)
        if (wr_mask[w]) begin
          tag_mem[wr_set][w]  <= wr_tag[w];
          pidx_mem[wr_set][w] <= wr_pidx[w];
        end
  end

  initial assert (NV_WAYS <= WAYS) else $error("NV_WAYS must not exceed WAYS");
endmodule
