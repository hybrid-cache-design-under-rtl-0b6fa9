// tb_hc_cm_table: checks the CM previous-placement table: all entries "non-volatile" after
// reset, random writes mirrored in a reference and every entry compared afterwards.
module tb_hc_cm_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] rd_idx = 0, wr_idx = 0;
  logic rd_nv, wr_en = 0, wr_nv = 0;
  hc_cm_table dut (.*);
  logic ref_b [256];
  int checks = 0, failures = 0;
  task automatic check_all();
    for (int i = 0; i < 256; i++) begin
      rd_idx = 8'(i);
      #1;
      checks++;
      if (rd_nv !== ref_b[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) ref_b[i] = 1;
    check_all();
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 8'($urandom); wr_nv = 1'($urandom);
      ref_b[wr_idx] = wr_nv;
    end
    @(negedge clk);
    wr_en = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
