// road_merger: merges the road streams of several AM chips onto one output
// serial link of the mezzanine.
//
// Each of the NIN input links is decoded and its road words are queued in a
// small FIFO (idle words and words with a decode error are dropped).  While a queue holds HOLD_AT words or
// more, the hold line back to that chip is raised; the queue has room for
// the words already on their way.  Each clock the merger sends one road from
// the queues in round-robin order.  End-of-event words are kept in step: the
// merger sends one end-of-event word when every queue has one at its head,
// and removes them all.  Output words are 8b/10b coded again.
//
// The mezzanine has 16 AM chips and 4 road links, so each link serves four
// chips; how the chips share a link is not described, and this merger,
// its hold lines and its queue sizes are this design's own.
// Timing: an input word reaches its queue two clocks after it is on the
// input pins, and a merged word is on the output pins two clocks after it
// is at the head of its queue.
module road_merger
  import slp_pkg::*;
#(
  parameter int unsigned NIN     = 4,
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned HOLD_AT = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NIN-1:0][39:0]  in_code,
  output logic [NIN-1:0]        hold,
  output logic [39:0]           out_code,
  output logic [NIN-1:0][7:0]   err_count,
  output logic [15:0]           hold_cycles
);
  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned SW = (NIN > 1) ? $clog2(NIN) : 1;

  link_word_t [NIN-1:0]         in_word, head;
  logic [NIN-1:0][3:0]          in_err;
  logic [NIN-1:0]               push, pop, empty, full, ovf;
  logic [NIN-1:0][QW:0]         count;
  logic [NIN-1:0]               head_ee;
  logic [SW-1:0]                rr;
  link_word_t                   out_word;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    link_dec32 u_dec (.clk, .rst, .code_i(in_code[i]), .word_o(in_word[i]), .err_o(in_err[i]));
    assign push[i] = in_err[i] == '0 && (in_word[i].k == 4'b0000 || is_ee(in_word[i]));
    sync_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(QDEPTH)) u_q (
      .clk, .rst, .push(push[i]), .din(in_word[i]), .pop(pop[i]), .dout(head[i]),
      .empty(empty[i]), .full(full[i]), .count(count[i]), .overflow(ovf[i])
    );
    assign hold[i]    = count[i] >= (QW+1)'(HOLD_AT);
    assign head_ee[i] = !empty[i] && is_ee(head[i]);
  end

  // choose: a road from the first non-empty queue at or after rr whose head
  // is a road; otherwise an end-of-event word when all heads are one
  always_comb begin
    logic found;
    pop      = '0;
    out_word = IDLE_WORD;
    found    = 1'b0;
    for (int j = 0; j < NIN; j++) begin
      int i;
      i = (int'(rr) + j) % NIN;
      if (!found && !empty[i] && !head_ee[i]) begin
        found    = 1'b1;
        pop[i]   = 1'b1;
        out_word = head[i];
      end
    end
    if (!found && &head_ee) begin
      pop      = '1;
      out_word = EE_WORD;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr          <= '0;
      err_count   <= '0;
      hold_cycles <= '0;
    end else begin
      rr <= (int'(rr) == NIN - 1) ? '0 : rr + 1'b1;
      for (int i = 0; i < NIN; i++)
        if (in_err[i] != '0 && err_count[i] != 8'hFF) err_count[i] <= err_count[i] + 1'b1;
      if (|hold && hold_cycles != 16'hFFFF) hold_cycles <= hold_cycles + 1'b1;
    end
  end

  link_enc32 u_enc (.clk, .rst, .word_i(out_word), .code_o(out_code));

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) ovf == '0);
endmodule
