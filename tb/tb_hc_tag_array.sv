// tb_hc_tag_array: checks the hybrid tag array. Random masked writes are mirrored in a
// reference model and every set is read back; a power-loss strobe must clear valid and dirty
// of the volatile ways (0 .. WAYS-NV_WAYS-1) only, leaving non-volatile entries intact.
module tb_hc_tag_array;
  localparam int WAYS = 4, NV = 2, SETS = 8, TAG_W = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_set, wr_set;
  logic [WAYS-1:0] rd_valid, rd_dirty, wr_mask, wr_valid, wr_dirty;
  logic [TAG_W-1:0] rd_tag [WAYS], wr_tag [WAYS];
  logic [7:0] rd_pidx [WAYS], wr_pidx [WAYS];
  logic wr_en, pwr_loss;
  hc_tag_array #(.WAYS(WAYS), .NV_WAYS(NV), .SETS(SETS), .TAG_W(TAG_W)) dut (.*);

  logic [WAYS-1:0] rv [SETS], rdy [SETS];
  logic [TAG_W-1:0] rt [SETS][WAYS];
  logic [7:0] rp [SETS][WAYS];
  int checks = 0, failures = 0;

  task automatic compare_all();
    for (int s = 0; s < SETS; s++) begin
      rd_set = 3'(s);
      #1;
      checks++;
      if (rd_valid !== rv[s] || rd_dirty !== rdy[s]) begin
        failures++; $display("FAIL flags set %0d", s);
      end
      for (int w = 0; w < WAYS; w++) if (rv[s][w]) begin
        checks++;
        if (rd_tag[w] !== rt[s][w] || rd_pidx[w] !== rp[s][w]) begin
          failures++; $display("FAIL tag set %0d way %0d", s, w);
        end
      end
    end
  endtask

  initial begin
    wr_en = 0; pwr_loss = 0; wr_set = 0; wr_mask = 0; wr_valid = 0; wr_dirty = 0; rd_set = 0;
    for (int w = 0; w < WAYS; w++) begin wr_tag[w] = 0; wr_pidx[w] = 0; end
    for (int s = 0; s < SETS; s++) begin rv[s] = 0; rdy[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all();
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        wr_en = 1; wr_set = 3'($urandom); wr_mask = 4'($urandom);
        wr_valid = 4'($urandom); wr_dirty = 4'($urandom);
        for (int w = 0; w < WAYS; w++) begin wr_tag[w] = 10'($urandom); wr_pidx[w] = 8'($urandom); end
        for (int w = 0; w < WAYS; w++) if (wr_mask[w]) begin
          rv[wr_set][w] = wr_valid[w]; rdy[wr_set][w] = wr_dirty[w];
          rt[wr_set][w] = wr_tag[w];   rp[wr_set][w] = wr_pidx[w];
        end
        @(negedge clk);
        wr_en = 0;
      end
      compare_all();
      @(negedge clk);
      pwr_loss = 1;
      @(negedge clk);
      pwr_loss = 0;
      for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS - NV; w++) begin
        rv[s][w] = 0; rdy[s][w] = 0;
      end
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
