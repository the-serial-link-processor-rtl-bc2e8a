// tb_ambslp: end-to-end test of the AM board at reduced size
// (4 mezzanines x 16 AM chips of 16 patterns, 16-word input FIFOs).
// Patterns are loaded into all 64 chips.  Six events of hits are sent on
// the twelve input links back to back; an independent model of the
// pattern matching works out the roads of every chip in every event, and
// the decoded road links must deliver exactly those roads (chip number,
// address order per chip, right road link) and one end-of-event word per
// event and link.  On the way every mechanism of the board is made to
// happen and counted:
//   - the event hold: links wait with data queued while an event finishes
//   - road back-pressure: hold lines raised by the road mergers
//   - a remapped bus (bus 0 reads link 8 in event 2)
//   - hit injection by the host in place of link 5 (event 3)
//   - a corrupted word detected on an input link and dropped (event 4)
//   - the spy on a road link, read back through the registers
//   - input FIFO overflow while a link waits (at the end)
module tb_ambslp;
  import slp_pkg::*;
  localparam int NPATT = 16, NLAYER = 8, SSW = 15, NTERN = 3, NLAMB = 4, NCHIP = 16, NOUT = 4;
  localparam int NLI = 12, NCH = NLAMB * NCHIP, NRL = NLAMB * NOUT, AW = $clog2(NPATT);
  localparam int FD = 16, SD = 8, NEV = 6;
  logic clk = 0, rst = 1;
  link_word_t [NLI-1:0]          tx;
  logic [NLI-1:0][39:0]          tx_code, hit_link, corrupt = '0;
  logic [NRL-1:0][39:0]          road_link;
  link_word_t [NRL-1:0]          mon_word;
  logic [NRL-1:0][3:0]           mon_err;
  logic                          host_we = 0;
  logic [8:0]                    host_addr = 0;
  logic [31:0]                   host_wdata = 0, host_rdata;
  logic                          cfg_we = 0;
  logic [5:0]                    cfg_chip = 0;
  logic [AW-1:0]                 cfg_addr = 0;
  logic [NLAYER-1:0][SSW-1:0]    cfg_ss = 0;
  logic [NLAYER-1:0][NTERN-1:0]  cfg_dc = 0;
  logic [3:0]                    threshold = 4'd5;
  logic [NCH-1:0]                chip_busy;
  logic [NLAMB-1:0]              link_error;
  logic [NRL-1:0][15:0]          hold_cycles;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NLI; l++) begin : g_tx
    link_enc32 u_enc (.clk, .rst, .word_i(tx[l]), .code_o(tx_code[l]));
  end
  assign hit_link = tx_code ^ corrupt;

  ambslp #(.NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN), .NLAMB(NLAMB),
           .NCHIP(NCHIP), .NOUT(NOUT), .NLINK_IN(NLI), .FIFO_DEPTH(FD), .SPY_DEPTH(SD)) dut (.*);

  // The road links leave the board through one register stage, so the monitor
  // leaves reset one clock after the board does.
  logic mon_rst = 1;
  always @(posedge clk) mon_rst <= rst;
  for (genvar o = 0; o < NRL; o++) begin : g_mon
    link_dec32 u_mon (.clk, .rst(mon_rst), .code_i(road_link[o]), .word_o(mon_word[o]), .err_o(mon_err[o]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host_write(logic [8:0] a, logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(logic [8:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = a; #1; d = host_rdata;
  endtask

  // ---------------------------------------------------------------- model
  logic [SSW-1:0] pat [NCH][NPATT][NLAYER];
  int ev_hits [NEV][NLI][$];       // hit values per event and link
  int map [NEV][NLAYER];
  int thr [NEV];

  function automatic void expected(int e, int c, ref int q[$]);
    q.delete();
    for (int p = 0; p < NPATT; p++) begin
      int n;
      n = 0;
      for (int l = 0; l < NLAYER; l++) begin
        bit m;
        m = 0;
        foreach (ev_hits[e][map[e][l]][i]) if (SSW'(ev_hits[e][map[e][l]][i]) == pat[c][p][l]) m = 1;
        n += int'(m);
      end
      if (n >= thr[e]) q.push_back(p);
    end
  endfunction

  // ---------------------------------------------------------------- monitor
  int got [NEV][NCH][$];
  int link_ev [NRL];
  int n_roads = 0;
  always @(posedge clk) if (!mon_rst)
    for (int o = 0; o < NRL; o++) begin
      if (mon_err[o] != 0) begin failures++; $display("FAIL: road link %0d decode error", o); end
      if (is_data(mon_word[o])) begin
        int c;
        c = int'(mon_word[o].data[22:17]);
        checks++;
        if (c / (NCHIP / NOUT) != o || link_ev[o] >= NEV) begin
          failures++; $display("FAIL: road of chip %0d on link %0d", c, o);
        end else got[link_ev[o]][c].push_back(int'(mon_word[o].data[16:0]));
        n_roads++;
      end
      if (is_ee(mon_word[o])) link_ev[o]++;
    end

  // ---------------------------------------------------------------- stimulus
  task automatic send_event(int e, int inject_link, bit corrupt_one);
    int n [NLI];
    for (int l = 0; l < NLI; l++) n[l] = (l == inject_link) ? 0 : $urandom_range(2, 6);
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      corrupt = '0;
      for (int l = 0; l < NLI; l++) begin
        tx[l] = IDLE_WORD;
        if (c < n[l]) begin
          int v;
          v = $urandom_range(0, 15);
          tx[l] = '{k: 4'b0000, data: 32'(v)};
          if (corrupt_one && l == 11 && c == 0) corrupt[l] = 40'h1 << 33;
          else ev_hits[e][l].push_back(v);
        end else if (c == 7 && l != inject_link) tx[l] = EE_WORD;
      end
    end
    @(negedge clk);
    corrupt = '0;
    for (int l = 0; l < NLI; l++) tx[l] = IDLE_WORD;
    if (inject_link >= 0) begin
      host_write(9'h001, {8'h0, 4'b0000, 4'(inject_link), 16'(1 << inject_link)});
      for (int i = 0; i < 4; i++) begin
        int v;
        v = $urandom_range(0, 15);
        host_write(9'h002, 32'(v));
        ev_hits[e][inject_link].push_back(v);
      end
      host_write(9'h001, {8'h0, 4'b0001, 4'(inject_link), 16'(1 << inject_link)});
      host_write(9'h002, {24'h0, K23_7});
      host_write(9'h001, 32'h0);
    end
  endtask

  int n_events_ok = 0, n_remap = 0, n_inject = 0, n_err_seen = 0, n_spy = 0, n_ovf = 0;
  int n_hold = 0, n_stall = 0;

  initial begin
    logic [31:0] d;
    for (int l = 0; l < NLI; l++) tx[l] = IDLE_WORD;
    for (int o = 0; o < NRL; o++) link_ev[o] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // patterns: values 0..15 per layer
    for (int c = 0; c < NCH; c++)
      for (int p = 0; p < NPATT; p++) begin
        @(negedge clk);
        cfg_we = 1; cfg_chip = 6'(c); cfg_addr = AW'(p);
        for (int l = 0; l < NLAYER; l++) begin
          pat[c][p][l] = SSW'($urandom_range(0, 15));
          cfg_ss[l] = pat[c][p][l];
        end
      end
    @(negedge clk); cfg_we = 0;
    threshold = 4'd3;
    for (int e = 0; e < NEV; e++) begin
      thr[e] = 3;
      for (int b = 0; b < NLAYER; b++) map[e][b] = b;
    end
    map[2][0] = 8;
    // events 0, 1 back to back
    send_event(0, -1, 0);
    send_event(1, -1, 0);
    wait (link_ev[0] >= 2);
    host_write(9'h000, 32'h7654_3218);  // bus 0 reads link 8
    send_event(2, -1, 0);
    wait (link_ev[0] >= 3);
    host_write(9'h000, 32'h7654_3210);
    n_remap++;
    send_event(3, 5, 0);
    n_inject++;
    send_event(4, -1, 1);
    send_event(5, -1, 0);
    for (int o = 0; o < NRL; o++) wait (link_ev[o] == NEV);
    repeat (5) @(negedge clk);
    for (int e = 0; e < NEV; e++) begin
      bit ok;
      ok = 1;
      for (int c = 0; c < NCH; c++) begin
        int q[$];
        expected(e, c, q);
        if (got[e][c] != q) begin
          ok = 0;
          $display("FAIL: event %0d chip %0d: %0d roads, expected %0d", e, c, got[e][c].size(), q.size());
        end
      end
      check(ok, $sformatf("roads of event %0d", e));
      if (ok) n_events_ok++;
    end
    // counters and spy
    host_read(9'h105, d); check(d == NEV, $sformatf("output event counter %0d", d));
    host_read(9'h106, d); check(int'(d) == n_roads, "output road counter");
    host_read(9'h00A, d); check(d == NEV, $sformatf("input event counter %0d", d));
    host_read(9'h00B, d); n_stall = int'(d);
    host_read(9'h008, d); n_err_seen = int'(d);
    host_read(9'h104, d);
    begin
      logic [31:0] w, k;
      host_write(9'h101, (d - 1) % SD);
      host_read(9'h102, w); host_read(9'h103, k);
      check(k == 1 && w[7:0] == K23_7, "newest spy entry of road link 0 is end of event");
      n_spy++;
    end
    for (int o = 0; o < NRL; o++) n_hold += int'(hold_cycles[o]);
    check(link_error == '0, "mezzanine link error");
    // overflow: link 11 floods after its end of event while link 0 holds
    // the event open
    @(negedge clk);
    for (int l = 1; l < NLI; l++) tx[l] = EE_WORD;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      for (int l = 0; l < NLI; l++) tx[l] = IDLE_WORD;
      tx[11] = '{k: 4'b0000, data: 32'(i)};
    end
    @(negedge clk); tx[11] = IDLE_WORD;
    host_read(9'h009, d); n_ovf = int'(d);

    $display("events %0d, roads %0d, hold clocks %0d, stall clocks %0d, remaps %0d, injections %0d, errors %0d, spy reads %0d, overflows %0d",
             n_events_ok, n_roads, n_hold, n_stall, n_remap, n_inject, n_err_seen, n_spy, n_ovf);
    check(n_roads > 50, "too few roads");
    check(n_hold > 0, "road back-pressure never happened");
    check(n_stall > 0, "event hold never happened");
    check(n_err_seen > 0, "link error never detected");
    check(n_ovf > 0, "FIFO overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
