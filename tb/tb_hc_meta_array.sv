// tb_hc_meta_array: checks the per-line policy metadata store. After reset every line must
// hold zero counters and the LRU rank of its way index; whole-set writes must read back; the
// rst_all strobe (power loss) must restore the initial values everywhere.
module tb_hc_meta_array;
  import hc_pkg::*;
  localparam int WAYS = 4, SETS = 8;
  logic clk = 0, rst_n = 0, rst_all = 0, wr_en = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_set = 0, wr_set = 0;
  line_meta_t rd_meta [WAYS], wr_meta [WAYS];
  hc_meta_array #(.WAYS(WAYS), .SETS(SETS)) dut (.*);
  line_meta_t ref_m [SETS][WAYS];
  int checks = 0, failures = 0;

  task automatic init_ref();
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      ref_m[s][w] = '0; ref_m[s][w].age = 2'(w);
    end
  endtask
  task automatic compare_all();
    for (int s = 0; s < SETS; s++) begin
      rd_set = 3'(s);
      #1;
      for (int w = 0; w < WAYS; w++) begin
        checks++;
        if (rd_meta[w] !== ref_m[s][w]) begin failures++; $display("FAIL set %0d way %0d", s, w); end
      end
    end
  endtask

  initial begin
    for (int w = 0; w < WAYS; w++) wr_meta[w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    init_ref();
    compare_all();
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 3'($urandom);
      for (int w = 0; w < WAYS; w++) begin
        wr_meta[w] = line_meta_t'({$urandom, $urandom});
        ref_m[wr_set][w] = wr_meta[w];
      end
    end
    @(negedge clk);
    wr_en = 0;
    compare_all();
    @(negedge clk);
    rst_all = 1;
    @(negedge clk);
    rst_all = 0;
    init_ref();
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
