// link_dec32: 8b/10b decoder for one serial link, word wide.
//
// Each clock it takes one aligned 40-bit coded word (byte 0 in bits [39:30])
// and returns the 32-bit word, its four K flags and a per-byte error flag.
// A byte is in error when its symbol is not a valid code or has the wrong
// running disparity; this is the error detection that motivates the use of
// 8b/10b on the links.  Word alignment on commas belongs to the
// deserializer in front of this block, which is not part of this RTL.
// Timing: registered outputs, one clock of latency.  Reset sets RD-.
module link_dec32
  import slp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [39:0] code_i,
  output link_word_t  word_o,
  output logic [3:0]  err_o
);
  logic       rd_q, rd_d;
  link_word_t word_d;
  logic [3:0] err_d;

  always_comb begin
    logic        rd;
    logic [10:0] r;
    rd = rd_q;
    for (int b = 0; b < 4; b++) begin
      r = DEC_ROM[{rd, code_i[39 - 10*b -: 10]}];
      word_d.data[8*b +: 8] = r[7:0];
      word_d.k[b]           = r[8];
      err_d[b]              = r[9];
      rd = r[10];
    end
    rd_d = rd;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q   <= 1'b0;
      word_o <= IDLE_WORD;
      err_o  <= '0;
    end else begin
      rd_q   <= rd_d;
      word_o <= word_d;
      err_o  <= err_d;
    end
  end
endmodule
