// hc_data_array: line storage of the hybrid cache, one memory per way.
//
// Ways 0 .. WAYS-NV_WAYS-1 are the volatile SRAM section, the remaining ways the STT-RAM
// section. Logically both are plain memories; their different access latencies are applied
// by the cache controller, and the loss of volatile content is expressed by the valid flags
// in hc_tag_array, so this array needs no reset. Interface: combinational read of all ways
// of one set; at the clock edge every way whose wr_mask bit is set is written with its own
// line of wr_line, all in the same set, so a migration swap writes both lines at once (the
// two sections are separate banks). The per-way banking is this design's choice.
module hc_data_array #(
  parameter int unsigned WAYS   = 4,
  parameter int unsigned SETS   = 128,
  parameter int unsigned LINE_W = 512,
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic              clk,
  input  logic [IDX_W-1:0]  rd_set,
  output logic [LINE_W-1:0] rd_line [WAYS],
  input  logic [IDX_W-1:0]  wr_set,
  input  logic [WAYS-1:0]   wr_mask,
  input  logic [LINE_W-1:0] wr_line [WAYS]
);
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [LINE_W-1:0] mem [SETS];
    assign rd_line[w] = mem[rd_set];
    always_ff @(posedge clk)
      if (wr_mask[w]) mem[wr_set] <= wr_line[w];
  end
endmodule
