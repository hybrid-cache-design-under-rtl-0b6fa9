// tb_hc_system: end-to-end test of the cache hierarchy at reduced sizes (1 KB data cache,
// 512 B instruction cache). Two systems run side by side through tb_system_harness: one
// with the WI policy and one of four data ways non-volatile (the default configuration),
// one with the CM policy and two of four. Each runs data and instruction traffic through
// three controller outages and one external outage with data checking. Every mechanism of
// the design must have happened at least once, otherwise it counts as a failure: data hits
// and misses, evictions, write-backs, volatile and non-volatile writes, placements into the
// non-volatile section, instruction hits and misses, both caches competing for memory,
// requests stalled by a halted CPU, controller and external outages, loss of the volatile
// content, CM migration swaps and CM backup swaps.
module tb_hc_system;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        done [2];
  int unsigned chk [2], fail [2];
  int unsigned cnt [2][16];

  tb_system_harness #(.POLICY(POL_WI), .NV_WAYS(1), .SEED(5)) h_wi (
    .clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .cnt(cnt[0]));
  tb_system_harness #(.POLICY(POL_CM), .NV_WAYS(2), .SEED(6)) h_cm (
    .clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .cnt(cnt[1]));

  localparam string NAMES [16] = '{"data hits", "data misses", "evictions", "write-backs",
    "volatile writes", "non-volatile writes", "migration swaps", "backup swaps",
    "volatile content lost", "instruction hits", "instruction misses", "memory conflicts",
    "halted requests", "controller outages", "external outages", "non-volatile fills"};

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    for (int s = 0; s < 2; s++) begin
      checks += chk[s];
      failures += fail[s];
      $display("system %0d (%s): checks=%0d failures=%0d", s, s == 0 ? "WI" : "CM", chk[s], fail[s]);
      for (int i = 0; i < 16; i++) begin
        $display("  %-22s %0d", NAMES[i], cnt[s][i]);
        // swaps only exist under CM
        if (i == 6 || i == 7) begin
          if (s == 0) continue;
        end
        checks++;
        if (cnt[s][i] == 0) begin
          failures++;
          $display("FAIL system %0d: %s never happened", s, NAMES[i]);
        end
      end
      checks++;
      if (cnt[s][13] != 3 || cnt[s][14] != 1 || cnt[s][8] != 4) begin
        failures++;
        $display("FAIL system %0d: outage count", s);
      end
    end
    checks++;
    if (cnt[0][6] != 0 || cnt[0][7] != 0) begin failures++; $display("FAIL WI swapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
