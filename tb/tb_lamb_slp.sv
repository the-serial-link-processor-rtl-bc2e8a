// tb_lamb_slp: self-checking test of one mezzanine (16 AM chips of 8
// patterns each, 4 road links, mezzanine number 1).
// Every chip gets its own random patterns; the same hits reach all chips.
// For each of four events an independent model lists the roads of every
// chip.  Road link o must carry exactly the roads of chips 4o..4o+3, each
// tagged with chip number 16 + c, in address order per chip, then one
// end-of-event word.
module tb_lamb_slp;
  import slp_pkg::*;
  localparam int NPATT = 8, NLAYER = 8, SSW = 15, NTERN = 3, NCHIP = 16, NOUT = 4;
  localparam int AW = $clog2(NPATT), LAMB = 1;
  logic clk = 0, rst = 1;
  link_word_t [NLAYER-1:0]      bus_word;
  logic [NLAYER-1:0][39:0]      hit_code;
  logic [NOUT-1:0][39:0]        road_code;
  logic                         cfg_we = 0;
  logic [3:0]                   cfg_chip = '0;
  logic [AW-1:0]                cfg_addr = '0;
  logic [NLAYER-1:0][SSW-1:0]   cfg_ss = '0;
  logic [NLAYER-1:0][NTERN-1:0] cfg_dc = '0;
  logic [3:0]                   threshold = 4'd5;
  logic [NCHIP-1:0]             chip_busy;
  logic                         link_error;
  logic [NOUT-1:0][15:0]        hold_cycles;
  link_word_t [NOUT-1:0]        mon_word;
  logic [NOUT-1:0][3:0]         mon_err;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NLAYER; l++) begin : g_bus
    link_enc32 u_enc (.clk, .rst, .word_i(bus_word[l]), .code_o(hit_code[l]));
  end
  lamb_slp #(.NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN), .NCHIP(NCHIP),
             .NOUT(NOUT), .LAMB_ID(LAMB)) dut (.*);
  for (genvar o = 0; o < NOUT; o++) begin : g_mon
    link_dec32 u_mon (.clk, .rst, .code_i(road_code[o]), .word_o(mon_word[o]), .err_o(mon_err[o]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [SSW-1:0] ref_ss [NCHIP][NPATT][NLAYER];
  bit             ref_hit [NCHIP][NPATT][NLAYER];
  int got [NCHIP][$];
  int got_ee [NOUT];

  always @(posedge clk) if (!rst)
    for (int o = 0; o < NOUT; o++) begin
      if (mon_err[o] != 0) begin failures++; $display("FAIL: link %0d decode error", o); end
      if (is_data(mon_word[o])) begin
        int id, c;
        id = int'(mon_word[o].data[22:17]);
        c  = id - LAMB * NCHIP;
        checks++;
        if (c < 0 || c >= NCHIP || c / (NCHIP / NOUT) != o) begin
          failures++; $display("FAIL: chip %0d on link %0d", id, o);
        end else got[c].push_back(int'(mon_word[o].data[16:0]));
      end
      if (is_ee(mon_word[o])) got_ee[o]++;
    end

  int total = 0;
  initial begin
    for (int l = 0; l < NLAYER; l++) bus_word[l] = IDLE_WORD;
    for (int o = 0; o < NOUT; o++) got_ee[o] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < NCHIP; c++)
      for (int p = 0; p < NPATT; p++) begin
        @(negedge clk);
        cfg_we = 1; cfg_chip = 4'(c); cfg_addr = AW'(p);
        for (int l = 0; l < NLAYER; l++) begin
          ref_ss[c][p][l] = SSW'($urandom_range(0, 15));
          cfg_ss[l] = ref_ss[c][p][l];
        end
      end
    @(negedge clk); cfg_we = 0;
    for (int e = 0; e < 4; e++) begin
      foreach (ref_hit[c, p, l]) ref_hit[c][p][l] = 0;
      for (int c = 0; c < NCHIP; c++) got[c].delete();
      for (int t = 0; t < 10; t++) begin
        @(negedge clk);
        for (int l = 0; l < NLAYER; l++) begin
          bus_word[l] = '{k: 4'b0000, data: 32'($urandom_range(0, 15))};
          for (int c = 0; c < NCHIP; c++)
            for (int p = 0; p < NPATT; p++)
              if (ref_ss[c][p][l] == bus_word[l].data[SSW-1:0]) ref_hit[c][p][l] = 1;
        end
      end
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) bus_word[l] = EE_WORD;
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) bus_word[l] = IDLE_WORD;
      for (int o = 0; o < NOUT; o++) wait (got_ee[o] == e + 1);
      for (int c = 0; c < NCHIP; c++) begin
        int exp_q[$];
        exp_q.delete();
        for (int p = 0; p < NPATT; p++) begin
          int n;
          n = 0;
          for (int l = 0; l < NLAYER; l++) n += ref_hit[c][p][l];
          if (n >= int'(threshold)) exp_q.push_back(p);
        end
        check(got[c] == exp_q, $sformatf("event %0d chip %0d: %0d roads, expected %0d",
              e, c, got[c].size(), exp_q.size()));
        total += exp_q.size();
      end
      wait (chip_busy == '0);
      @(negedge clk);
    end
    check(total > 20, $sformatf("too few roads (%0d)", total));
    check(!link_error, "link error flagged");
    $display("roads %0d", total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
