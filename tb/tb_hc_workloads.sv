// tb_hc_workloads: the three evaluated applications (an AES-shaped cipher, a 3x3 image
// convolution and merge sort, see tb_workload_harness) run on a reduced system (2 KB data
// cache) for every replacement policy (LRU, WI, CM), once with a stable supply and once with
// an outage every 40,000 cycles: 18 runs side by side, with one of four data ways
// non-volatile. Setting NV_MAX to 3 adds the 50 % and 75 % configurations (54 runs; the
// build then takes several minutes). Each run checks its program's result in memory; the run's cycles, misses,
// write-backs, SRAM / STT-RAM writes, swaps and outages are printed as a table.
module tb_hc_workloads;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NV_MAX = 1;
  localparam int N = 3 * 3 * NV_MAX * 2;
  logic        done [N];
  int unsigned chk [N], fail [N], cyc [N], miss [N], acc [N], wb [N], vwr [N], nvwr [N],
               swp [N], outg [N];

  for (genvar a = 0; a < 3; a++) begin : g_app
    for (genvar p = 0; p < 3; p++) begin : g_pol
      for (genvar nv = 1; nv <= NV_MAX; nv++) begin : g_nv
        for (genvar s = 0; s < 2; s++) begin : g_sup
          localparam int I = ((a * 3 + p) * NV_MAX + (nv - 1)) * 2 + s;
          tb_workload_harness #(.APP(a), .POLICY(policy_e'(p)), .NV_WAYS(nv),
                                .PERIOD(s == 0 ? 0 : 40000)) h (
            .clk, .rst_n, .done(done[I]), .checks(chk[I]), .failures(fail[I]),
            .cycles(cyc[I]), .n_miss(miss[I]), .n_access(acc[I]), .n_wb(wb[I]),
            .n_vwr(vwr[I]), .n_nvwr(nvwr[I]), .n_swap(swp[I]), .n_outage(outg[I]));
        end
      end
    end
  end

  localparam string APPS [3] = '{"cipher", "convolution", "merge sort"};
  localparam string POLS [3] = '{"LRU", "WI", "CM"};
  int checks = 0, failures = 0;

  initial begin
    logic all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end while (!all);
    $display("%-11s %-3s %-3s %-6s %9s %8s %7s %6s %7s %7s %5s %4s", "app", "pol", "nv%",
             "supply", "cycles", "accesses", "misses", "wb", "sram_wr", "sttr_wr", "swaps", "outg");
    for (int i = 0; i < N; i++) begin
      int a, p, nv, s;
      s = i % 2; nv = (i / 2) % NV_MAX + 1; p = (i / (2 * NV_MAX)) % 3; a = i / (6 * NV_MAX);
      checks += chk[i];
      failures += fail[i];
      $display("%-11s %-3s %-3d %-6s %9d %8d %7d %6d %7d %7d %5d %4d", APPS[a], POLS[p], nv * 25,
               s ? "outage" : "stable", cyc[i], acc[i], miss[i], wb[i], vwr[i], nvwr[i], swp[i], outg[i]);
      checks++;
      if (chk[i] == 0) begin failures++; $display("FAIL run %0d checked nothing", i); end
      // only CM migrates
      checks++;
      if ((p != 2) && swp[i] != 0) begin failures++; $display("FAIL run %0d swapped", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
