// tb_am_chip: self-checking test of one AM chip through its serial ports.
// 32 patterns are loaded; each event sends random hits on the eight coded
// hit buses, each bus ending with its end-of-event word at a different
// clock.  The coded road output is decoded here and must hold, in address
// order, exactly the roads an independent model finds, each tagged with the
// chip number, then one end-of-event word.  road_hold is toggled in some
// events.  A corrupted word on one bus must be counted as an error and
// must not set any layer.
module tb_am_chip;
  import slp_pkg::*;
  localparam int NPATT = 32, NLAYER = 8, SSW = 15, NTERN = 3, AW = $clog2(NPATT);
  localparam logic [5:0] ID = 6'd37;
  logic clk = 0, rst = 1;
  link_word_t [NLAYER-1:0]      bus_word;
  logic [NLAYER-1:0][39:0]      hit_code, hit_line;
  logic [NLAYER-1:0][39:0]      corrupt = '0;
  logic [39:0]                  road_code;
  logic                         road_hold = 0;
  logic                         cfg_we = 0;
  logic [AW-1:0]                cfg_addr = '0;
  logic [NLAYER-1:0][SSW-1:0]   cfg_ss = '0;
  logic [NLAYER-1:0][NTERN-1:0] cfg_dc = '0;
  logic [3:0]                   threshold = 4'd6;
  logic [NLAYER-1:0][7:0]       err_count;
  logic                         busy;
  link_word_t                   road_word;
  logic [3:0]                   road_err;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NLAYER; l++) begin : g_bus
    link_enc32 u_enc (.clk, .rst, .word_i(bus_word[l]), .code_o(hit_code[l]));
  end
  assign hit_line = hit_code ^ corrupt;
  am_chip #(.NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN), .CHIP_ID(ID)) dut (
    .clk, .rst, .hit_code(hit_line), .road_code, .road_hold, .cfg_we, .cfg_addr, .cfg_ss,
    .cfg_dc, .threshold, .err_count, .busy);
  link_dec32 u_mon (.clk, .rst, .code_i(road_code), .word_o(road_word), .err_o(road_err));

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

  logic [SSW-1:0]   ref_ss [NPATT][NLAYER];
  logic [NTERN-1:0] ref_dc [NPATT][NLAYER];
  bit               ref_hit [NPATT][NLAYER];

  function automatic bit ref_match(int p, int l, logic [SSW-1:0] h);
    for (int b = 0; b < SSW; b++)
      if (!(b < NTERN && ref_dc[p][l][b]) && ref_ss[p][l][b] != h[b]) return 0;
    return 1;
  endfunction

  int got[$];
  int got_ee = 0;
  always @(posedge clk) if (!rst) begin
    if (road_err != 0) begin failures++; $display("FAIL: road link decode error"); end
    if (is_data(road_word)) begin
      checks++;
      if (road_word.data[22:17] != ID) begin failures++; $display("FAIL: chip number"); end
      got.push_back(int'(road_word.data[16:0]));
    end
    if (is_ee(road_word)) got_ee++;
  end

  always @(negedge clk) road_hold = busy && ($urandom_range(0, 3) == 0);

  int total = 0;

  initial begin
    for (int l = 0; l < NLAYER; l++) bus_word[l] = IDLE_WORD;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NPATT; p++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = AW'(p);
      for (int l = 0; l < NLAYER; l++) begin
        ref_ss[p][l] = SSW'($urandom_range(0, 7) << 3 | $urandom_range(0, 7));
        ref_dc[p][l] = ($urandom_range(0, 2) == 0) ? 3'b111 : 3'b000;
        cfg_ss[l] = ref_ss[p][l]; cfg_dc[l] = ref_dc[p][l];
      end
    end
    @(negedge clk); cfg_we = 0;
    for (int e = 0; e < 8; e++) begin
      int ee_at[NLAYER];
      int exp_q[$];
      threshold = 4'(7 - e % 4);
      foreach (ref_hit[p, l]) ref_hit[p][l] = 0;
      got.delete();
      for (int l = 0; l < NLAYER; l++) ee_at[l] = $urandom_range(5, 15);
      for (int c = 0; c <= 15; c++) begin
        @(negedge clk);
        corrupt = '0;
        for (int l = 0; l < NLAYER; l++) begin
          bus_word[l] = IDLE_WORD;
          if (c == ee_at[l]) bus_word[l] = EE_WORD;
          else if (c < ee_at[l] && $urandom_range(0, 1) == 1) begin
            // half the hits are taken from a stored pattern, so roads occur
            bus_word[l] = '{k: 4'b0000, data: {17'h0, ($urandom_range(0, 1) == 1) ?
                            ref_ss[$urandom_range(0, 3)][l] : SSW'($urandom_range(0, 63))}};
            if (e == 3 && l == 2 && c == 1) corrupt[l] = 40'h00_0000_0001 << 20;  // corrupt it
            else
              for (int p = 0; p < NPATT; p++)
                if (ref_match(p, l, bus_word[l].data[SSW-1:0])) ref_hit[p][l] = 1;
          end
        end
      end
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) bus_word[l] = IDLE_WORD;
      corrupt = '0;
      exp_q.delete();
      for (int p = 0; p < NPATT; p++) begin
        int n;
        n = 0;
        for (int l = 0; l < NLAYER; l++) n += ref_hit[p][l];
        if (n >= int'(threshold)) exp_q.push_back(p);
      end
      wait (got_ee == e + 1);
      check(got.size() == exp_q.size(), $sformatf("event %0d: %0d roads, expected %0d", e, got.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got.size(); i++)
        check(got[i] == exp_q[i], $sformatf("road %0d: %0d expected %0d", i, got[i], exp_q[i]));
      total += exp_q.size();
      wait (!busy);
      @(negedge clk);
    end
    check(err_count[2] != 0, "corrupted word not counted");
    check(total > 10, $sformatf("too few roads (%0d)", total));
    $display("roads %0d, errors on bus 2: %0d", total, err_count[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
