// tb_ambslp_full: one complete operation of the AM board at its default
// size: 4 mezzanines x 16 AM chips x 128000 patterns (8.2 million
// patterns), 12 input links, 16 road links, 4k-word FIFOs.
// The whole pattern bank of every chip is loaded, through the pattern-load
// port, with patterns computed from a hash of (chip, address, layer).  One
// event is then sent: for a handful of chosen patterns six or seven of
// their eight layer values are sent as hits, mixed with random hits, on the
// eight hit links; the majority threshold is 6.  An independent model
// evaluates all 8.2 million patterns against the hits, and the decoded road
// links must deliver exactly those roads, with one end-of-event word on
// every road link.
module tb_ambslp_full;
  import slp_pkg::*;
  localparam int NPATT = 128000, NLAYER = 8, SSW = 15, NLI = 12, NCH = 64, NRL = 16;
  logic clk = 0, rst = 1;
  link_word_t [NLI-1:0]       tx;
  logic [NLI-1:0][39:0]       hit_link;
  logic [NRL-1:0][39:0]       road_link;
  link_word_t [NRL-1:0]       mon_word;
  logic [NRL-1:0][3:0]        mon_err;
  logic                       host_we = 0;
  logic [8:0]                 host_addr = 0;
  logic [31:0]                host_wdata = 0, host_rdata;
  logic                       cfg_we = 0;
  logic [5:0]                 cfg_chip = 0;
  logic [16:0]                cfg_addr = 0;
  logic [NLAYER-1:0][SSW-1:0] cfg_ss = 0;
  logic [NLAYER-1:0][2:0]     cfg_dc = 0;
  logic [3:0]                 threshold = 4'd6;
  logic [NCH-1:0]             chip_busy;
  logic [3:0]                 link_error;
  logic [NRL-1:0][15:0]       hold_cycles;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NLI; l++) begin : g_tx
    link_enc32 u_enc (.clk, .rst, .word_i(tx[l]), .code_o(hit_link[l]));
  end
  ambslp dut (.*);
  // The road links leave the board through one register stage.
  logic mon_rst = 1;
  always @(posedge clk) mon_rst <= rst;
  for (genvar o = 0; o < NRL; o++) begin : g_mon
    link_dec32 u_mon (.clk, .rst(mon_rst), .code_i(road_link[o]), .word_o(mon_word[o]), .err_o(mon_err[o]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pattern of (chip, address, layer): a 15-bit hash; every 16th pattern
  // has its three lowest bits as don't care
  function automatic logic [SSW-1:0] pat_ss(int c, int p, int l);
    logic [31:0] h;
    h = 32'(c) * 32'h9E37_79B1 ^ 32'(p) * 32'h85EB_CA77 ^ 32'(l) * 32'hC2B2_AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return h[SSW-1:0];
  endfunction
  function automatic logic [2:0] pat_dc(int p);
    return (p % 16 == 5) ? 3'b111 : 3'b000;
  endfunction

  int hits [NLAYER][$];
  int got [NCH][$];
  int link_ee [NRL];
  always @(posedge clk) if (!mon_rst)
    for (int o = 0; o < NRL; o++) begin
      if (mon_err[o] != 0) begin failures++; $display("FAIL: road link %0d decode error", o); end
      if (is_data(mon_word[o])) got[int'(mon_word[o].data[22:17])].push_back(int'(mon_word[o].data[16:0]));
      if (is_ee(mon_word[o])) link_ee[o]++;
    end

  initial begin
    int total;
    for (int l = 0; l < NLI; l++) tx[l] = IDLE_WORD;
    for (int o = 0; o < NRL; o++) link_ee[o] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // load 64 x 128000 patterns
    cfg_we = 1;
    for (int c = 0; c < NCH; c++) begin
      for (int p = 0; p < NPATT; p++) begin
        @(negedge clk);
        cfg_chip = 6'(c); cfg_addr = 17'(p);
        for (int l = 0; l < NLAYER; l++) begin
          cfg_ss[l] = pat_ss(c, p, l);
          cfg_dc[l] = pat_dc(p);
        end
      end
    end
    @(negedge clk); cfg_we = 0;
    $display("bank loaded at %0t", $time);
    // hits: layers of chosen patterns, and random hits
    for (int t = 0; t < 12; t++) begin
      int c, p, skip;
      c = $urandom_range(0, NCH - 1);
      p = $urandom_range(0, NPATT - 1);
      skip = $urandom_range(0, NLAYER - 1);
      for (int l = 0; l < NLAYER; l++)
        if (l != skip && !(t % 3 == 0 && l == (skip + 1) % NLAYER))
          hits[l].push_back(int'(pat_ss(c, p, l)));
    end
    for (int l = 0; l < NLAYER; l++)
      for (int i = 0; i < 4; i++) hits[l].push_back($urandom_range(0, 32767));
    for (int l = 0; l < NLAYER; l++) hits[l].shuffle();
    // send: links 0..7 carry the hits, links 8..11 only end the event
    for (int c = 0; c <= 16; c++) begin
      @(negedge clk);
      for (int l = 0; l < NLI; l++) begin
        tx[l] = IDLE_WORD;
        if (l < NLAYER && c < hits[l].size()) tx[l] = '{k: 4'b0000, data: 32'(hits[l][c])};
        else if (c == 16) tx[l] = EE_WORD;
      end
    end
    @(negedge clk);
    for (int l = 0; l < NLI; l++) tx[l] = IDLE_WORD;
    for (int o = 0; o < NRL; o++) wait (link_ee[o] == 1);
    $display("roads read out at %0t", $time);
    // reference: every pattern of every chip against the hits
    total = 0;
    for (int c = 0; c < NCH; c++) begin
      int q[$];
      q.delete();
      for (int p = 0; p < NPATT; p++) begin
        int n;
        logic [SSW-1:0] care;
        care = ~SSW'(pat_dc(p));
        n = 0;
        for (int l = 0; l < NLAYER; l++) begin
          logic [SSW-1:0] s;
          s = pat_ss(c, p, l);
          foreach (hits[l][i])
            if (((SSW'(hits[l][i]) ^ s) & care) == 0) begin n++; break; end
        end
        if (n >= 6) q.push_back(p);
      end
      check(got[c] == q, $sformatf("chip %0d: %0d roads, expected %0d", c, got[c].size(), q.size()));
      total += q.size();
    end
    check(total >= 12, $sformatf("only %0d roads", total));
    check(link_error == '0, "link error");
    $display("roads %0d", total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
