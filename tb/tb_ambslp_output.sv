// tb_ambslp_output: self-checking test of the board's output side
// (16 road links, 8-word spy).
// Road words and end-of-event words arrive on the 16 links at random
// clocks.  Each output link must repeat its input one clock later, bit for
// bit; event_done must pulse exactly once per event, on the clock after the
// last end-of-event word is decoded; the road and event counters and the
// spy must agree with what was sent.
module tb_ambslp_output;
  import slp_pkg::*;
  localparam int NL = 16, SD = 8;
  logic clk = 0, rst = 1;
  link_word_t [NL-1:0]  tx;
  logic [NL-1:0][39:0]  in_code, out_code, prev_in;
  logic event_done;
  logic host_we = 0;
  logic [7:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  for (genvar l = 0; l < NL; l++) begin : g_tx
    link_enc32 u_enc (.clk, .rst, .word_i(tx[l]), .code_o(in_code[l]));
  end
  ambslp_output #(.NLINK(NL), .SPY_DEPTH(SD)) dut (.*);

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

  int dones = 0, last_ee_clock = 0, clock = 0, done_clock = 0;
  always @(posedge clk) begin
    clock++;
    if (!rst) begin
      checks++;
      if (out_code != prev_in) begin failures++; $display("FAIL: output is not the input one clock later"); end
      if (event_done) begin dones++; done_clock = clock; end
    end
    prev_in <= in_code;
  end

  int roads = 0;
  logic [31:0] last_spy [$];
  initial begin
    logic [31:0] d;
    for (int l = 0; l < NL; l++) tx[l] = IDLE_WORD;
    repeat (3) @(negedge clk);
    rst = 0;
    host_write(8'h00, 32'd6);  // spy on link 6
    for (int e = 0; e < 5; e++) begin
      int ee_at[NL];
      int last;
      last = 0;
      for (int l = 0; l < NL; l++) begin
        ee_at[l] = $urandom_range(3, 25);
        if (ee_at[l] > last) last = ee_at[l];
      end
      for (int c = 0; c <= 25; c++) begin
        @(negedge clk);
        for (int l = 0; l < NL; l++) begin
          tx[l] = IDLE_WORD;
          if (c == ee_at[l]) tx[l] = EE_WORD;
          else if (c < ee_at[l] && $urandom_range(0, 1) == 1) begin
            tx[l] = '{k: 4'b0000, data: {8'(l), 8'(e), 16'(c)}};
            roads++;
            if (l == 6) last_spy.push_back(tx[l].data);
          end
          if (l == 6 && c == ee_at[l]) last_spy.push_back(EE_WORD.data);
        end
        if (c == last) last_ee_clock = clock;
      end
      @(negedge clk);
      for (int l = 0; l < NL; l++) tx[l] = IDLE_WORD;
      repeat (5) @(negedge clk);
      check(dones == e + 1, $sformatf("event %0d: %0d event_done pulses", e, dones));
      // a word set before clock N is coded at N, decoded at N+1, event_done
      // is set at N+2 and seen by the monitor at N+3 (last_ee_clock = N-1)
      check(done_clock == last_ee_clock + 4, $sformatf("event_done at %0d, last end of event at %0d",
            done_clock, last_ee_clock));
    end
    host_read(8'h05, d); check(d == 5, "event counter");
    host_read(8'h06, d); check(int'(d) == roads, $sformatf("road counter %0d, sent %0d", d, roads));
    host_read(8'h04, d);
    for (int j = 0; j < SD && j < last_spy.size(); j++) begin
      logic [31:0] w;
      host_write(8'h01, 32'((int'(d) - 1 - j + SD) % SD));
      host_read(8'h02, w);
      check(w == last_spy[last_spy.size() - 1 - j], $sformatf("spy entry %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(logic [7:0] a, logic [31:0] dd);
    @(negedge clk); host_we = 1; host_addr = a; host_wdata = dd;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_read(logic [7:0] a, output logic [31:0] dd);
    @(negedge clk); host_addr = a; #1; dd = host_rdata;
  endtask
endmodule
