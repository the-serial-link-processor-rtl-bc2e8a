// link_enc32: 8b/10b encoder for one serial link, word wide.
//
// Each clock it takes one 32-bit word with four K flags and produces the
// 40-bit coded word that a serializer sends (byte 0 in bits [39:30], sent
// first).  The running disparity is carried from byte to byte inside the word
// and kept in a register from word to word.  The link's use of 8b/10b, so
// that a 32-bit word travels as 40 bits, is taken from the system
// description; the coding is the standard IBM code.
// Timing: registered output, one clock of latency.  During reset the output
// is an idle word coded from RD-, so the line is valid from the start.
module link_enc32
  import slp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  link_word_t  word_i,
  output logic [39:0] code_o
);
  logic        rd_q;
  logic [39:0] code_d;
  logic        rd_d;

  // code one word starting from running disparity rd; returns {rd, code}
  function automatic logic [40:0] enc_word(link_word_t w, logic rd);
    logic [10:0] r;
    logic [39:0] c;
    for (int b = 0; b < 4; b++) begin
      r = ENC_ROM[{rd, w.k[b], w.data[8*b +: 8]}];
      c[39 - 10*b -: 10] = r[9:0];
      rd = r[10];
    end
    return {rd, c};
  endfunction

  localparam logic [40:0] RESET_CODE = enc_word(IDLE_WORD, 1'b0);

  assign {rd_d, code_d} = enc_word(word_i, rd_q);

  always_ff @(posedge clk) begin
    if (rst) begin
      {rd_q, code_o} <= RESET_CODE;
    end else begin
      rd_q   <= rd_d;
      code_o <= code_d;
    end
  end
endmodule
