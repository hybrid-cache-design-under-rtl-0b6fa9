// tb_hc_data_array: checks the per-way line storage. Random lines are written through random
// way masks (including two ways at once, as a swap does) and all sets and ways are compared
// with a reference copy.
module tb_hc_data_array;
  localparam int WAYS = 4, SETS = 8, LINE_W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_set, wr_set;
  logic [LINE_W-1:0] rd_line [WAYS], wr_line [WAYS];
  logic [WAYS-1:0] wr_mask;
  hc_data_array #(.WAYS(WAYS), .SETS(SETS), .LINE_W(LINE_W)) dut (.*);
  logic [LINE_W-1:0] ref_l [SETS][WAYS];
  int checks = 0, failures = 0;
  initial begin
    wr_mask = 0; wr_set = 0; rd_set = 0;
    for (int w = 0; w < WAYS; w++) wr_line[w] = 0;
    // fill everything first so every entry is defined
    for (int s = 0; s < SETS; s++) begin
      @(negedge clk);
      wr_set = 3'(s); wr_mask = '1;
      for (int w = 0; w < WAYS; w++) begin
        wr_line[w] = {$urandom, $urandom}; ref_l[s][w] = wr_line[w];
      end
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_set = 3'($urandom); wr_mask = 4'($urandom);
      for (int w = 0; w < WAYS; w++) begin
        wr_line[w] = {$urandom, $urandom};
        if (wr_mask[w]) ref_l[wr_set][w] = wr_line[w];
      end
    end
    @(negedge clk);
    wr_mask = 0;
    for (int s = 0; s < SETS; s++) begin
      rd_set = 3'(s);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (rd_line[w] !== ref_l[s][w]) begin failures++; $display("FAIL set %0d way %0d", s, w); end
      end
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
