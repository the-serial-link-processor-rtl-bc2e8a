// tb_spy_buffer: self-checking test of spy_buffer (3 links, 8 entries).
// Random words, idle words among them, pass on three links; the spy follows
// one link at a time.  The buffer must hold the last 8 non-idle words of the
// selected link at the right places, the write pointer must wrap, and
// nothing may be recorded while frozen.
module tb_spy_buffer;
  import slp_pkg::*;
  localparam int NL = 3, D = 8;
  logic clk = 0, rst = 1;
  link_word_t [NL-1:0] words;
  logic [1:0] sel = 0;
  logic freeze = 0;
  logic [2:0] rd_index = 0, wr_ptr;
  link_word_t rd_word;
  logic [31:0] n_recorded;
  int checks = 0, failures = 0;
  link_word_t model [D];
  int mptr = 0, mcount = 0;

  spy_buffer #(.NLINK(NL), .DEPTH(D)) dut (.*);
  always #50 clk = ~clk;

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

  initial begin
    for (int l = 0; l < NL; l++) words[l] = IDLE_WORD;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if (i % 100 == 0) sel = 2'(($urandom_range(0, NL - 1)));
      freeze = (i % 100) >= 80;
      for (int l = 0; l < NL; l++) begin
        words[l].k = 4'b0000;
        words[l].data = $urandom;
        if ($urandom_range(0, 3) == 0) words[l] = IDLE_WORD;
      end
      if (!freeze && words[sel] != IDLE_WORD) begin
        model[mptr] = words[sel];
        mptr = (mptr + 1) % D;
        mcount++;
      end
      @(posedge clk); #1;
      check(int'(wr_ptr) == mptr, "write pointer");
      check(int'(n_recorded) == mcount, "record count");
      for (int j = 0; j < D; j++) begin
        rd_index = 3'(j); #1;
        if (mcount >= D) check(rd_word == model[j], $sformatf("entry %0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
