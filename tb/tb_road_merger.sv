// tb_road_merger: self-checking test of road_merger with four sources.
// Each source stands for an AM chip: per event it sends a random number of
// road words (tagged with its number and a sequence count) as fast as its
// hold line allows, then one end-of-event word.  The merged, decoded output
// must carry every road exactly once, in order per source, followed by
// exactly one end-of-event word per event, and must not lose or add words.
// The four sources together offer four words per clock, so the hold lines
// must be used; the output must run at one road per clock while roads are
// queued.
module tb_road_merger;
  import slp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  link_word_t [N-1:0] src_word;
  logic [N-1:0][39:0] src_code;
  logic [N-1:0] hold;
  logic [39:0] out_code;
  logic [N-1:0][7:0] err_count;
  logic [15:0] hold_cycles;
  link_word_t out_word;
  logic [3:0] out_err;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_src
    link_enc32 u_enc (.clk, .rst, .word_i(src_word[i]), .code_o(src_code[i]));
  end
  road_merger #(.NIN(N)) dut (.clk, .rst, .in_code(src_code), .hold, .out_code,
                              .err_count, .hold_cycles);
  link_dec32 u_mon (.clk, .rst, .code_i(out_code), .word_o(out_word), .err_o(out_err));

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

  int remaining[N];
  bit ee_sent[N];
  int seq[N];
  int next_exp[N];
  int got_roads = 0, got_ee = 0, sent_roads = 0, busy_clocks = 0, out_clocks = 0;
  bit in_event = 0;

  // sources
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      src_word[i] = IDLE_WORD;
      // source 3 sends slowly, so queues run empty while others end
      if (!rst && in_event && !hold[i] && !(i == 3 && $urandom_range(0, 2) != 0)) begin
        if (remaining[i] > 0) begin
          src_word[i] = '{k: 4'b0000, data: {8'(i), 24'(seq[i])}};
          seq[i]++; remaining[i]--; sent_roads++;
        end else if (!ee_sent[i]) begin
          src_word[i] = EE_WORD;
          ee_sent[i] = 1;
        end
      end
    end
  end

  // monitor
  always @(posedge clk) if (!rst) begin
    if (out_err != 0) begin failures++; $display("FAIL: output decode error"); end
    if (is_data(out_word)) begin
      int s;
      s = int'(out_word.data[31:24]);
      checks++;
      if (s >= N || int'(out_word.data[23:0]) != next_exp[s]) begin
        failures++; $display("FAIL: road %h out of order", out_word.data);
      end else next_exp[s]++;
      got_roads++;
      out_clocks++;
    end else if (is_ee(out_word)) got_ee++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin src_word[i] = IDLE_WORD; seq[i] = 0; next_exp[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 0; e < 6; e++) begin
      int total, t0, t1;
      total = 0;
      for (int i = 0; i < N; i++) begin
        remaining[i] = (e == 2 && i != 1) ? 0 : $urandom_range(0, 40);
        ee_sent[i] = 0; total += remaining[i];
      end
      @(negedge clk); in_event = 1;
      t0 = got_roads;
      wait (got_ee == e + 1);
      @(negedge clk); in_event = 0;
      check(got_roads - t0 == total, $sformatf("event %0d: %0d roads out, %0d in", e, got_roads - t0, total));
      repeat (10) @(negedge clk);
      check(got_ee == e + 1, "exactly one end-of-event word per event");
    end
    for (int i = 0; i < N; i++) check(next_exp[i] == seq[i], $sformatf("source %0d roads lost", i));
    check(hold_cycles > 0, "hold never raised");
    check(err_count == '0, "input decode errors");
    $display("roads %0d, hold clocks %0d", got_roads, hold_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
