// tb_hc_outage_ctrl: checks the outage schedule. With first outage at cycle 40, period 100
// and at most 3 outages, and a backup that takes 7 cycles, pwr_fail must rise at cycles
// 41, 41+1+7+1+100+... as worked out below, exactly three times, and never again.
module tb_hc_outage_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] cfg_start = 40, cfg_period = 100;
  logic [15:0] cfg_max = 3, outage_cnt;
  logic backup_done = 0, pwr_fail;
  hc_outage_ctrl dut (.*);
  int checks = 0, failures = 0;
  int cyc = 0, rises = 0, rise_at [4];
  logic pf_d = 0;
  int bk_cnt = 0;

  // Backup model: backup_done is raised 7 cycles after pwr_fail and stays while pwr_fail.
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pf_d <= pwr_fail;
    if (pwr_fail && !pf_d) begin
      if (rises < 4) rise_at[rises] <= cyc;
      rises <= rises + 1;
    end
    if (pwr_fail) bk_cnt <= bk_cnt + 1; else bk_cnt <= 0;
    backup_done <= pwr_fail && bk_cnt >= 6;
  end

  initial begin
    @(negedge clk);
    rst_n = 1;
    repeat (1000) @(posedge clk);
    checks++; if (rises != 3) begin failures++; $display("FAIL %0d outages", rises); end
    checks++; if (outage_cnt != 3) begin failures++; $display("FAIL count %0d", outage_cnt); end
    // The counter runs cycles 0..40 after reset, so pwr_fail is high from cycle 41 on
    // (observed one cycle later through pf_d); it stays high 8 cycles (7 + the cycle
    // backup_done is seen), then 101 running cycles pass before the next rise.
    checks++; if (rise_at[0] != 42) begin failures++; $display("FAIL first at %0d", rise_at[0]); end
    checks++; if (rise_at[1] - rise_at[0] != 8 + 101) begin
      failures++; $display("FAIL spacing %0d", rise_at[1] - rise_at[0]); end
    checks++; if (rise_at[2] - rise_at[1] != 8 + 101) begin
      failures++; $display("FAIL spacing %0d", rise_at[2] - rise_at[1]); end
    checks++; if (pwr_fail) begin failures++; $display("FAIL still failing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
