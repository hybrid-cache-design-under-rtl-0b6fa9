// tb_hc_hybrid_cache: self-checking test of the hybrid data cache under all three policies.
//
// Three small caches (1 KB, 4 sets of 4 ways) run side by side through tb_cache_harness:
// LRU with one non-volatile way, WI with one and CM with two. Each checks hit latencies,
// read data against a reference memory through random traffic and five power outages.
// On top, the mechanisms each policy is built around must have happened: write-backs and
// outages everywhere, placements into the non-volatile section under WI (the predictor
// learnt that some PCs are read-intensive), migration swaps and backup swaps under CM.
module tb_hc_hybrid_cache;
  import hc_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        done   [3];
  int unsigned chk    [3], fail [3], swp [3], bks [3], wb [3], nvf [3], outg [3];

  tb_cache_harness #(.POLICY(POL_LRU), .NV_WAYS(1), .SEED(11)) h_lru (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_swap(swp[0]),
    .n_bk_swap(bks[0]), .n_wb(wb[0]), .n_nv_fill(nvf[0]), .n_outage(outg[0]));
  tb_cache_harness #(.POLICY(POL_WI), .NV_WAYS(1), .SEED(22)) h_wi (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_swap(swp[1]),
    .n_bk_swap(bks[1]), .n_wb(wb[1]), .n_nv_fill(nvf[1]), .n_outage(outg[1]));
  tb_cache_harness #(.POLICY(POL_CM), .NV_WAYS(2), .SEED(33)) h_cm (
    .clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_swap(swp[2]),
    .n_bk_swap(bks[2]), .n_wb(wb[2]), .n_nv_fill(nvf[2]), .n_outage(outg[2]));

  int checks = 0, failures = 0;

  task automatic expect_true(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks   += chk[i];
      failures += fail[i];
      $display("cache %0d: checks=%0d failures=%0d swaps=%0d backup_swaps=%0d writebacks=%0d nv_fills=%0d outages=%0d",
               i, chk[i], fail[i], swp[i], bks[i], wb[i], nvf[i], outg[i]);
      expect_true(wb[i] > 0, "dirty lines were written back");
      expect_true(outg[i] == 7, "all outages handled");
    end
    expect_true(nvf[0] > 0, "LRU filled non-volatile ways");
    expect_true(nvf[1] > 0, "WI placed read-intensive data in the non-volatile section");
    expect_true(swp[1] == 0 && bks[1] == 0, "WI never swaps");
    expect_true(swp[2] > 0, "CM migrated lines between sections");
    expect_true(nvf[2] > 0, "CM placed lines in the non-volatile section");
    expect_true(bks[2] > 0, "CM moved confident lines into the non-volatile section on backup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired: done %b%b%b checks %0d %0d %0d", done[0], done[1], done[2], chk[0], chk[1], chk[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
