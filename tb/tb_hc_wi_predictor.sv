// tb_hc_wi_predictor: checks the 256-entry write-intensity prediction table. All entries
// start weakly write intensive (placement: volatile). Random updates are mirrored in a
// reference of four-state saturating counters (0 read intensive .. 3 write intensive; an
// update with cost >= threshold moves up, else down); the state and the placement decision
// (non-volatile in the two read-intensive states) are compared after every update.
module tb_hc_wi_predictor;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] rd_idx = 0, upd_idx = 0;
  wi_state_e rd_state;
  logic place_nv, upd_en = 0, upd_write_int = 0;
  hc_wi_predictor dut (.*);
  int ref_s [256];
  int checks = 0, failures = 0;

  task automatic check_entry(input int i);
    rd_idx = 8'(i);
    #1;
    checks++;
    if (int'(rd_state) != ref_s[i] || place_nv != (ref_s[i] <= 1)) begin
      failures++; $display("FAIL entry %0d state %0d exp %0d", i, rd_state, ref_s[i]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin ref_s[i] = 2; check_entry(i); end
    for (int n = 0; n < 3000; n++) begin
      int i;
      i = $urandom_range(15);          // a few entries, so they saturate both ways
      @(negedge clk);
      upd_en = 1; upd_idx = 8'(i); upd_write_int = 1'($urandom);
      if (upd_write_int) ref_s[i] = (ref_s[i] == 3) ? 3 : ref_s[i] + 1;
      else               ref_s[i] = (ref_s[i] == 0) ? 0 : ref_s[i] - 1;
      @(negedge clk);
      upd_en = 0;
      check_entry(i);
    end
    for (int i = 0; i < 256; i++) check_entry(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
