// tb_ambslp_input: self-checking test of the board's input side
// (12 links, 8 buses, 16-word FIFOs, 8-word spy).
// Events of random hit words, each closed by an end-of-event word, arrive
// on all links at random clocks.  Every bus must carry exactly the words of
// the link the map selects, in order, then end of event, and nothing of the
// next event until event_done.  Also checked: a remapped bus, words injected
// by the host in place of a link, the spy contents read back through the
// registers, the event and stall counters, and FIFO overflow counting when
// a link floods its FIFO while the event is held.
module tb_ambslp_input;
  import slp_pkg::*;
  localparam int NL = 12, NB = 8, FD = 16, SD = 8;
  logic clk = 0, rst = 1;
  link_word_t [NL-1:0]     tx;
  logic [NL-1:0][39:0]     in_code;
  logic [NB-1:0][39:0]     bus_code;
  link_word_t [NB-1:0]     bus_word;
  logic [NB-1:0][3:0]      bus_err;
  logic event_done = 0;
  logic host_we = 0;
  logic [7:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NL; l++) begin : g_tx
    link_enc32 u_enc (.clk, .rst, .word_i(tx[l]), .code_o(in_code[l]));
  end
  ambslp_input #(.NLINK(NL), .NBUS(NB), .FIFO_DEPTH(FD), .SPY_DEPTH(SD)) dut (.*);
  for (genvar b = 0; b < NB; b++) begin : g_mon
    link_dec32 u_mon (.clk, .rst, .code_i(bus_code[b]), .word_o(bus_word[b]), .err_o(bus_err[b]));
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

  task automatic host_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_addr = a; #1; d = host_rdata;
  endtask

  int map [NB];
  int sent [NL][$];          // data words sent per link in this event
  int got [NB][$];
  int bus_ee [NB];
  bit after_ee_data = 0;

  always @(posedge clk) if (!rst)
    for (int b = 0; b < NB; b++) begin
      if (bus_err[b] != 0) begin failures++; $display("FAIL: bus %0d decode error", b); end
      if (is_data(bus_word[b])) begin
        if (bus_ee[b] > 0) after_ee_data = 1;
        got[b].push_back(int'(bus_word[b].data));
      end
      if (is_ee(bus_word[b])) bus_ee[b]++;
    end

  task automatic run_event(int e, int inject_link);
    for (int l = 0; l < NL; l++) sent[l].delete();
    for (int b = 0; b < NB; b++) begin got[b].delete(); bus_ee[b] = 0; end
    after_ee_data = 0;
    // up to 12 words per link, at random clocks
    fork
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        for (int l = 0; l < NL; l++) begin
          tx[l] = IDLE_WORD;
          if (l == inject_link) continue;
          if (c == 19) tx[l] = EE_WORD;
          else if ($urandom_range(0, 2) == 0 && sent[l].size() < 12) begin
            tx[l] = '{k: 4'b0000, data: {8'(l), 8'(e), 16'(sent[l].size())}};
            sent[l].push_back(int'(tx[l].data));
          end
        end
      end
      if (inject_link >= 0) begin
        host_write(8'h01, {8'h0, 4'b0000, 4'(inject_link), 16'(1 << inject_link)});
        for (int i = 0; i < 5; i++) begin
          host_write(8'h02, {8'(inject_link), 8'(e), 16'(i)});
          sent[inject_link].push_back({8'(inject_link), 8'(e), 16'(i)});
        end
        host_write(8'h01, {8'h0, 4'b0001, 4'(inject_link), 16'(1 << inject_link)});
        host_write(8'h02, {24'h0, K23_7});
        host_write(8'h01, 32'h0);
      end
    join
    @(negedge clk);
    for (int l = 0; l < NL; l++) tx[l] = IDLE_WORD;
    for (int b = 0; b < NB; b++) wait (bus_ee[b] == 1);
    // the event is held until event_done
    repeat (20) @(negedge clk);
    check(!after_ee_data, $sformatf("event %0d: words passed before event_done", e));
    for (int b = 0; b < NB; b++)
      check(got[b] == sent[map[b]], $sformatf("event %0d bus %0d: %0d words, expected %0d from link %0d",
            e, b, got[b].size(), sent[map[b]].size(), map[b]));
    @(negedge clk); event_done = 1;
    @(negedge clk); event_done = 0;
  endtask

  initial begin
    logic [31:0] d;
    for (int l = 0; l < NL; l++) tx[l] = IDLE_WORD;
    for (int b = 0; b < NB; b++) map[b] = b;
    repeat (3) @(negedge clk);
    rst = 0;
    host_read(8'h00, d);
    check(d == 32'h7654_3210, $sformatf("map reset value %h", d));
    run_event(0, -1);
    // bus 0 now reads link 9, bus 5 reads link 2
    map[0] = 9; map[5] = 2;
    host_write(8'h00, 32'h7624_3219);
    run_event(1, -1);
    // link 3 replaced by host words; spy on link 4
    host_write(8'h03, 32'd4);
    run_event(2, 3);
    map[3] = 3;
    // spy holds the last 8 non-idle words of link 4: its data words then EE
    host_read(8'h07, d);
    for (int j = 0; j < SD; j++) begin
      int k;
      logic [31:0] w, kf;
      // j-th newest entry
      host_write(8'h04, 32'((int'(d) - 1 - j + SD) % SD));
      host_read(8'h05, w);
      host_read(8'h06, kf);
      k = sent[4].size() - j + 1;   // entry j >= 1 is data word k-1
      if (j == 0) check(kf == 32'h1 && w[7:0] == K23_7, "spy newest entry is end of event");
      else if (k > 0) check(w == 32'(sent[4][k - 1]) && kf == 0, $sformatf("spy entry %0d: %h/%h expected %h", j, w, kf, sent[4][k - 1]));
    end
    // the counters
    host_read(8'h0A, d); check(d == 3, $sformatf("events counted %0d", d));
    // flood link 11 while the next event is held: overflow
    run_event(3, -1);
    // an empty event on all links, then link 11 floods while it is held
    @(negedge clk);
    for (int l = 0; l < NL; l++) tx[l] = EE_WORD;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) tx[l] = IDLE_WORD;
      tx[11] = '{k: 4'b0000, data: 32'(i)};
    end
    @(negedge clk); tx[11] = IDLE_WORD;
    repeat (5) @(negedge clk);
    host_read(8'h09, d); check(d > 0, "overflow not counted");
    host_read(8'h0B, d); check(d > 0, "stall not counted");
    host_read(8'h08, d); check(d == 0, "decode errors counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
