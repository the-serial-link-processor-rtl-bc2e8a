// tb_link_codec: self-checking test of link_enc32 and link_dec32.
// 1. Two words with hand-worked codes (standard 8b/10b tables), one sent at
//    RD+ and one at RD-, check the encoder bit for bit; also the idle word
//    sent during reset.
// 2. 2000 random words (data and control) go through encoder and decoder;
//    the decoder must return each word unchanged, with no error, after two
//    clocks.
// 3. Single bit flips on the line must raise the decoder's error flag within
//    the flipped word or the idle word after it (K28.5 always carries
//    disparity, so a running-disparity error shows there at the latest).
module tb_link_codec;
  import slp_pkg::*;
  logic        clk = 0, rst = 1;
  link_word_t  tx;
  logic [39:0] code, line;
  link_word_t  rx;
  logic [3:0]  err;
  int checks = 0, failures = 0;
  logic follow = 0;
  logic [39:0] flip = '0;
  wire [39:0] dline = follow ? (code ^ flip) : line;

  link_enc32 u_enc (.clk, .rst, .word_i(tx), .code_o(code));
  link_dec32 u_dec (.clk, .rst, .code_i(dline), .word_o(rx), .err_o(err));

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

  localparam logic [39:0] EXP0 = 40'b0011111010_0110001011_1010101010_0101010101;
  // K28.5 D0.0 D0.0 D0.0 from RD-
  localparam logic [39:0] RESET_IDLE = 40'b0011111010_0110001011_0110001011_0110001011;
  localparam logic [39:0] EXP1 = 40'b1100000101_1001110100_1010101010_0101010101;

  link_word_t sent[$];

  initial begin
    line = '0;
    tx = IDLE_WORD;
    repeat (3) @(posedge clk);
    check(code == RESET_IDLE, $sformatf("reset code %b", code));
    rst <= 0;
    // --- known codes
    @(negedge clk); tx = '{k: 4'b0001, data: 32'h4AB500BC};
    // the reset idle word leaves the encoder at RD+
    @(negedge clk); check(code == EXP1, $sformatf("code at RD+ %b", code));
    @(negedge clk); check(code == EXP0, $sformatf("code at RD- %b", code));
    tx = IDLE_WORD;
    // --- round trip
    for (int i = 0; i < 2000; i++) begin
      link_word_t w;
      w.data = $urandom;
      case ($urandom_range(0, 3))
        0: w = IDLE_WORD;
        1: w = EE_WORD;
        default: w.k = 4'b0000;
      endcase
      @(negedge clk);
      tx = w;
      line = code;
      sent.push_back(w);
      if (sent.size() > 2) begin
        link_word_t e;
        e = sent.pop_front();
        check(rx == e && err == 4'b0, $sformatf("round trip %h/%b got %h/%b err %b",
              e.data, e.k, rx.data, rx.k, err));
      end
    end
    // --- single bit errors: the line follows the encoder, one word flipped
    follow = 1;
    for (int t = 0; t < 50; t++) begin
      logic seen;
      int bitpos;
      @(negedge clk);
      tx.k = 4'b0000; tx.data = $urandom;
      bitpos = $urandom_range(0, 39);
      @(negedge clk); tx = IDLE_WORD; flip = 40'd1 << bitpos;
      @(negedge clk); flip = '0;
      seen = (err != 0);
      repeat (2) begin
        @(negedge clk);
        seen |= (err != 0);
      end
      check(seen, $sformatf("bit flip at %0d not detected", bitpos));
      // resynchronise running disparity after the error
      rst = 1; @(negedge clk); rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
