// tb_am_core: self-checking test of the pattern-matching array.
// A 64-pattern bank is loaded with random patterns (random don't-care bits
// included).  Events of random hits arrive on random buses and clocks; an
// independent reference model in this file works out which patterns reach
// the majority threshold.  The roads read out must be exactly those, in
// ascending address order, one per clock while road_hold is low, and
// ev_done must follow the last one.  Thresholds 8, 7, 6, 5 and 4 are used,
// and road_hold is exercised.
module tb_am_core;
  localparam int NPATT = 64, NLAYER = 8, SSW = 15, NTERN = 3;
  localparam int AW = $clog2(NPATT);
  logic clk = 0, rst = 1;
  logic                         cfg_we = 0;
  logic [AW-1:0]                cfg_addr = '0;
  logic [NLAYER-1:0][SSW-1:0]   cfg_ss = '0;
  logic [NLAYER-1:0][NTERN-1:0] cfg_dc = '0;
  logic [3:0]                   threshold = 4'd8;
  logic [NLAYER-1:0]            hit_valid = '0;
  logic [NLAYER-1:0][SSW-1:0]   hit_ss = '0;
  logic ev_end = 0, road_hold = 0;
  logic road_valid, ev_done, busy;
  logic [AW-1:0] road_addr;
  int checks = 0, failures = 0;

  am_core #(.NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference copy of the bank and of the per-layer match state
  logic [SSW-1:0]   ref_ss [NPATT][NLAYER];
  logic [NTERN-1:0] ref_dc [NPATT][NLAYER];
  bit               ref_hit [NPATT][NLAYER];

  function automatic bit ref_match(int p, int l, logic [SSW-1:0] h);
    for (int b = 0; b < SSW; b++) begin
      if (b < NTERN && ref_dc[p][l][b]) continue;
      if (ref_ss[p][l][b] != h[b]) return 0;
    end
    return 1;
  endfunction

  int total_roads = 0, held_cycles = 0;

  task automatic run_event(int thr, bit use_hold);
    int exp_q[$];
    int got_q[$];
    int t, first, last;
    threshold = 4'(thr);
    foreach (ref_hit[p, l]) ref_hit[p][l] = 0;
    // 12 clocks of hits; each bus carries a hit with probability 1/2
    for (int c = 0; c < 12; c++) begin
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) begin
        hit_valid[l] = ($urandom_range(0, 1) == 1);
        hit_ss[l]    = SSW'($urandom_range(0, 15));
        if (hit_valid[l])
          for (int p = 0; p < NPATT; p++)
            if (ref_match(p, l, hit_ss[l])) ref_hit[p][l] = 1;
      end
    end
    @(negedge clk); hit_valid = '0; ev_end = 1;
    @(negedge clk); ev_end = 0;
    for (int p = 0; p < NPATT; p++) begin
      int n = 0;
      for (int l = 0; l < NLAYER; l++) n += ref_hit[p][l];
      if (n >= thr) exp_q.push_back(p);
    end
    // collect roads until ev_done
    t = 0; first = -1; last = -1;
    while (1) begin
      @(posedge clk); #1;
      if (road_valid) begin
        got_q.push_back(int'(road_addr));
        if (first < 0) first = t;
        last = t;
      end
      if (ev_done) break;
      t++;
      if (use_hold) begin
        road_hold = ($urandom_range(0, 2) == 0);
        if (road_hold) held_cycles++;
      end
    end
    road_hold = 0;
    check(got_q.size() == exp_q.size(),
          $sformatf("thr %0d: %0d roads, expected %0d", thr, got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i], $sformatf("road %0d: %0d expected %0d", i, got_q[i], exp_q[i]));
    if (!use_hold && exp_q.size() > 0)
      check(first == 0 && last == exp_q.size() - 1,
            $sformatf("roads not one per clock from the first readout clock (%0d..%0d)", first, last));
    total_roads += exp_q.size();
    repeat (2) @(negedge clk);
    check(!busy, "busy after clear");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // load the bank
    for (int p = 0; p < NPATT; p++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = AW'(p);
      for (int l = 0; l < NLAYER; l++) begin
        ref_ss[p][l] = SSW'($urandom_range(0, 15));
        ref_dc[p][l] = ($urandom_range(0, 1) == 1) ? NTERN'($urandom_range(0, 7)) : '0;
        cfg_ss[l] = ref_ss[p][l];
        cfg_dc[l] = ref_dc[p][l];
      end
    end
    @(negedge clk); cfg_we = 0;
    @(negedge clk);
    for (int e = 0; e < 10; e++) run_event(8 - (e % 5), e >= 5);
    check(total_roads > 20, $sformatf("too few roads exercised: %0d", total_roads));
    check(held_cycles > 0, "road_hold never used");
    $display("roads %0d, held clocks %0d", total_roads, held_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
