// tb_hc_victim_sel: compares the victim selector with an independent reference on random
// sets: invalid candidates first (lowest index), then the oldest LRU rank or the smallest
// wic + conf*theta (Eq. 1) / ric + conf*theta (Eq. 2), ties to the lowest index. Also a few
// directed cases worked out by hand.
module tb_hc_victim_sel;
  import hc_pkg::*;
  localparam int WAYS = 4;
  logic [WAYS-1:0] valid, mask;
  line_meta_t meta [WAYS];
  sel_mode_e mode;
  logic [CNT_W-1:0] theta_cm;
  logic [1:0] way;
  logic found;
  hc_victim_sel #(.WAYS(WAYS)) dut (.*);
  int checks = 0, failures = 0;

  task automatic expect_way(input int exp_way, input logic exp_found, input string msg);
    #1;
    checks++;
    if (found !== exp_found || (exp_found && int'(way) != exp_way)) begin
      failures++; $display("FAIL %s: got %0d/%b exp %0d/%b", msg, way, found, exp_way, exp_found);
    end
  endtask

  initial begin
    for (int w = 0; w < WAYS; w++) meta[w] = '0;
    // Directed: Eq. 1 with theta 8: way1 wic=5 conf=0 -> 5; way0 wic=0 conf=1 -> 8.
    valid = 4'b1111; mask = 4'b0011; mode = SEL_EQ1; theta_cm = 8;
    meta[0].wic = 0; meta[0].conf = 1; meta[1].wic = 5; meta[1].conf = 0;
    expect_way(1, 1, "eq1 directed");
    // Eq. 2 in ways 2,3: way2 ric=3 conf=2 -> 19; way3 ric=20 conf=0 -> 20.
    mask = 4'b1100; mode = SEL_EQ2;
    meta[2].ric = 3; meta[2].conf = 2; meta[3].ric = 20; meta[3].conf = 0;
    expect_way(2, 1, "eq2 directed");
    // an invalid way wins
    valid = 4'b0111;
    expect_way(3, 1, "invalid first");
    mask = 4'b0000;
    expect_way(0, 0, "empty mask");
    // Random against reference.
    for (int i = 0; i < 2000; i++) begin
      int best, bw, iv;
      valid = 4'($urandom); mask = 4'($urandom);
      mode = sel_mode_e'($urandom_range(2)); theta_cm = 8'($urandom_range(1, 150));
      for (int w = 0; w < WAYS; w++) begin
        meta[w].age = 2'($urandom); meta[w].ric = 8'($urandom); meta[w].wic = 8'($urandom);
        meta[w].conf = 2'($urandom_range(3)); meta[w].cost = 16'($urandom);
      end
      iv = -1; bw = -1; best = 0;
      for (int w = 0; w < WAYS; w++) if (mask[w]) begin
        int sc;
        if (!valid[w] && iv < 0) iv = w;
        if (mode == SEL_LRU) sc = meta[w].age;
        else if (mode == SEL_EQ1) sc = meta[w].wic + meta[w].conf * theta_cm;
        else sc = meta[w].ric + meta[w].conf * theta_cm;
        if (bw < 0 || (mode == SEL_LRU ? sc > best : sc < best)) begin bw = w; best = sc; end
      end
      expect_way(iv >= 0 ? iv : bw, bw >= 0, $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
