// slp_pkg: types, constants and 8b/10b coding functions shared by the
// Serial Link Processor blocks.
//
// Every serial link in the system carries one 32-bit word per word clock.
// Each word is four bytes, each byte 8b/10b coded, so a word travels as
// 40 bits (byte 0 first).  A byte with its K flag set is a control
// character; this design uses three of them in byte 0 of a word:
//   K28.5 (0xBC)  idle / comma word, sent whenever there is nothing to send
//   K23.7 (0xF7)  end of event
// Hit words and road words have no K flag.  The choice of control characters
// and the word layouts below are this design's own; the 8b/10b code itself
// (5b/6b and 3b/4b sub-blocks, running disparity) is the standard one.
package slp_pkg;

  // ---------------------------------------------------------------- words
  typedef struct packed {
    logic [3:0]  k;     // per-byte control flag, bit i for byte i
    logic [31:0] data;  // byte 0 is data[7:0]
  } link_word_t;

  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K23_7 = 8'hF7;

  localparam link_word_t IDLE_WORD = '{k: 4'b0001, data: {24'h0, K28_5}};
  localparam link_word_t EE_WORD   = '{k: 4'b0001, data: {24'h0, K23_7}};

  function automatic logic is_data(link_word_t w);
    return w.k == 4'b0000;
  endfunction

  function automatic logic is_ee(link_word_t w);
    return w.k == 4'b0001 && w.data[7:0] == K23_7;
  endfunction

  // Road word: bits [16:0] pattern address inside a chip, bits [22:17] the
  // number of the chip on the board (LAMB * 16 + position).
  localparam int unsigned ROAD_ADDR_W = 17;
  localparam int unsigned CHIP_ID_W   = 6;

  // ---------------------------------------------------------------- 8b/10b
  // Codes are written abcdei_fghj with 'a' as bit 9; rd = 0 is RD-, 1 is RD+.

  function automatic int disp(logic [9:0] v, int n);
    return 2 * $countones(v) - n;
  endfunction

  // 5b/6b code for running disparity RD- (x = EDCBA)
  function automatic logic [5:0] enc6_neg(logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b code for RD-, data characters (y = HGF); y = 7 gives the primary P7
  function automatic logic [3:0] enc4d_neg(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // 3b/4b code for RD-, control characters
  function automatic logic [3:0] enc4k_neg(logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;
      3'd2: return 4'b1010;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  // Encode one byte.  Returns {rd_out, code[9:0]}.
  function automatic logic [10:0] enc8b10b(logic [7:0] d, logic k, logic rd);
    logic [4:0] x;
    logic [2:0] y;
    logic [5:0] c6;
    logic [3:0] c4;
    logic       rd1, rd2, a7;
    x = d[4:0];
    y = d[7:5];
    c6 = (k && x == 5'd28) ? 6'b001111 : enc6_neg(x);
    if (rd && (disp({4'b0, c6}, 6) != 0 || (!k && x == 5'd7))) c6 = ~c6;
    rd1 = (disp({4'b0, c6}, 6) != 0) ? ~rd : rd;
    a7 = (y == 3'd7) && (k ||
         (!rd1 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
         ( rd1 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4 = k ? enc4k_neg(y) : (a7 ? 4'b0111 : enc4d_neg(y));
    if (rd1 && (disp({6'b0, c4}, 4) != 0 || y == 3'd3 || k)) c4 = ~c4;
    rd2 = (disp({6'b0, c4}, 4) != 0) ? ~rd1 : rd1;
    return {rd2, c6, c4};
  endfunction

  // 6b -> 5b lookup, both disparities.  Returns {found, x}.
  function automatic logic [5:0] dec6(logic [5:0] c6);
    case (c6)
      6'b000101: return {1'b1, 5'd23};
      6'b000110: return {1'b1, 5'd8};
      6'b000111: return {1'b1, 5'd7};
      6'b001001: return {1'b1, 5'd27};
      6'b001010: return {1'b1, 5'd4};
      6'b001011: return {1'b1, 5'd20};
      6'b001100: return {1'b1, 5'd24};
      6'b001101: return {1'b1, 5'd12};
      6'b001110: return {1'b1, 5'd28};
      6'b010001: return {1'b1, 5'd29};
      6'b010010: return {1'b1, 5'd2};
      6'b010011: return {1'b1, 5'd18};
      6'b010100: return {1'b1, 5'd31};
      6'b010101: return {1'b1, 5'd10};
      6'b010110: return {1'b1, 5'd26};
      6'b010111: return {1'b1, 5'd15};
      6'b011000: return {1'b1, 5'd0};
      6'b011001: return {1'b1, 5'd6};
      6'b011010: return {1'b1, 5'd22};
      6'b011011: return {1'b1, 5'd16};
      6'b011100: return {1'b1, 5'd14};
      6'b011101: return {1'b1, 5'd1};
      6'b011110: return {1'b1, 5'd30};
      6'b100001: return {1'b1, 5'd30};
      6'b100010: return {1'b1, 5'd1};
      6'b100011: return {1'b1, 5'd17};
      6'b100100: return {1'b1, 5'd16};
      6'b100101: return {1'b1, 5'd9};
      6'b100110: return {1'b1, 5'd25};
      6'b100111: return {1'b1, 5'd0};
      6'b101000: return {1'b1, 5'd15};
      6'b101001: return {1'b1, 5'd5};
      6'b101010: return {1'b1, 5'd21};
      6'b101011: return {1'b1, 5'd31};
      6'b101100: return {1'b1, 5'd13};
      6'b101101: return {1'b1, 5'd2};
      6'b101110: return {1'b1, 5'd29};
      6'b110001: return {1'b1, 5'd3};
      6'b110010: return {1'b1, 5'd19};
      6'b110011: return {1'b1, 5'd24};
      6'b110100: return {1'b1, 5'd11};
      6'b110101: return {1'b1, 5'd4};
      6'b110110: return {1'b1, 5'd27};
      6'b111000: return {1'b1, 5'd7};
      6'b111001: return {1'b1, 5'd8};
      6'b111010: return {1'b1, 5'd23};
      default: return 6'b0;
    endcase
  endfunction

  // 4b -> 3b lookup for data characters, both disparities.  Returns {found, y}.
  function automatic logic [3:0] dec4d(logic [3:0] c4);
    case (c4)
      4'b0001: return {1'b1, 3'd7};
      4'b0010: return {1'b1, 3'd4};
      4'b0011: return {1'b1, 3'd3};
      4'b0100: return {1'b1, 3'd0};
      4'b0101: return {1'b1, 3'd2};
      4'b0110: return {1'b1, 3'd6};
      4'b0111: return {1'b1, 3'd7};
      4'b1000: return {1'b1, 3'd7};
      4'b1001: return {1'b1, 3'd1};
      4'b1010: return {1'b1, 3'd5};
      4'b1011: return {1'b1, 3'd0};
      4'b1100: return {1'b1, 3'd3};
      4'b1101: return {1'b1, 3'd4};
      4'b1110: return {1'b1, 3'd7};
      default: return 4'b0;
    endcase
  endfunction

  // 4b -> 3b lookup for K28.y after a 6b block that left RD-.  Returns {found, y}.
  function automatic logic [3:0] dec4k_neg(logic [3:0] c4);
    case (c4)
      4'b1011: return {1'b1, 3'd0};
      4'b0110: return {1'b1, 3'd1};
      4'b1010: return {1'b1, 3'd2};
      4'b1100: return {1'b1, 3'd3};
      4'b1101: return {1'b1, 3'd4};
      4'b0101: return {1'b1, 3'd5};
      4'b1001: return {1'b1, 3'd6};
      4'b0111: return {1'b1, 3'd7};
      default: return 4'b0;
    endcase
  endfunction

  // Decode one symbol.  Returns {rd_out, err, k, byte[7:0]}.  The symbol is
  // looked up in the code tables, then re-encoded with the current running
  // disparity: any difference is a code or disparity error.
  function automatic logic [10:0] dec8b10b(logic [9:0] s, logic rd);
    logic [5:0]  c6, r6;
    logic [3:0]  c4, r4;
    logic        k;
    logic [10:0] re;
    logic        err, rdo;
    c6 = s[9:4];
    c4 = s[3:0];
    if (c6 == 6'b001111 || c6 == 6'b110000) begin
      k  = 1'b1;
      r6 = {1'b1, 5'd28};
      r4 = dec4k_neg(c6 == 6'b001111 ? ~c4 : c4);
    end else begin
      r6 = dec6(c6);
      r4 = dec4d(c4);
      k  = (c4 == 4'b0111 || c4 == 4'b1000) &&
           (r6[4:0] == 5'd23 || r6[4:0] == 5'd27 || r6[4:0] == 5'd29 || r6[4:0] == 5'd30);
    end
    re  = enc8b10b({r4[2:0], r6[4:0]}, k, rd);
    err = !(r6[5] && r4[3]) || (re[9:0] != s);
    if (!err)                     rdo = re[10];
    else if ($countones(s) > 5)   rdo = 1'b1;
    else if ($countones(s) < 5)   rdo = 1'b0;
    else                          rdo = rd;
    return {rdo, err, k, r4[2:0], r6[4:0]};
  endfunction

  // Lookup tables built at elaboration from the functions above, so that a
  // coder or decoder is one table read per byte.
  //   ENC_ROM[{rd, k, byte}]  = {rd_out, code}
  //   DEC_ROM[{rd, symbol}]   = {rd_out, err, k, byte}
  typedef logic [10:0] rom_t [2048];
  typedef logic [10:0] erom_t [1024];

  function automatic erom_t build_enc_rom();
    erom_t t;
    for (int i = 0; i < 1024; i++) t[i] = enc8b10b(i[7:0], i[8], i[9]);
    return t;
  endfunction

  function automatic rom_t build_dec_rom();
    rom_t t;
    for (int i = 0; i < 2048; i++) t[i] = dec8b10b(i[9:0], i[10]);
    return t;
  endfunction

  localparam erom_t ENC_ROM = build_enc_rom();
  localparam rom_t  DEC_ROM = build_dec_rom();

endpackage
