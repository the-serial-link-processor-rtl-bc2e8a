// tb_sync_fifo: self-checking test of sync_fifo (16 words deep here).
// Random pushes and pops are checked against a queue model: data order,
// count, empty and full.  Pushing into a full FIFO must be refused and
// flagged on overflow; a push and a pop together on a full FIFO both happen.
module tb_sync_fifo;
  localparam int W = 36, D = 16;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, overflows = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      bit exp_ovf;
      int bias;
      @(negedge clk);
      check(int'(count) == model.size(), $sformatf("count %0d model %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(dout == model[0], "head word");
      bias = (i / 500) % 2 == 0 ? 3 : 1;   // alternate filling and draining
      push = ($urandom_range(0, 3) < bias);
      pop  = ($urandom_range(0, 3) >= bias) && !empty;
      din  = {$urandom, 4'($urandom)};
      exp_ovf = push && model.size() == D && !pop;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push && !exp_ovf) model.push_back(din);
      #1;
      check(overflow == exp_ovf, "overflow flag");
      if (exp_ovf) overflows++;
    end
    check(overflows > 0, "overflow never exercised");
    $display("overflows %0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
