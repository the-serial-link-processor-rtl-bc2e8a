// am_chip: the Associative Memory chip with serialized I/O (AMchip05).
//
// The chip has one serial input bus per detector layer and a single serial
// output bus for roads; every bus carries 32-bit words, 8b/10b coded into
// 40 bits.  Each input bus is decoded; a hit word (no K flag) carries its
// super-strip in bits [SSW-1:0] and goes to the pattern-matching array
// (am_core) on the clock it arrives.  An end-of-event word marks that bus
// done; once all buses are done the array reads out its roads.  Each road
// leaves as a word holding {CHIP_ID, pattern address} (bits [22:17] and
// [16:0]); after the last road the chip sends an end-of-event word, and idle
// words fill the rest.  road_hold from the board pauses the road output.
//
// The serializer/deserializer macros (bought IP with comma detection and
// word alignment) are not part of this RTL: the ports carry the aligned
// 40-bit parallel words that those macros exchange with the logic.  The
// word formats, the per-bus end-of-event handshake and road_hold are this
// design's own choices.  Bus decode errors are counted per bus in
// err_count (saturating); a word with a decode error is ignored.
//
// Timing: a hit word on the pins reaches the layer flip-flops two clocks
// later (decoder register, then the array); a road leaves the array one
// clock after readout begins and is on the pins one clock after that.
module am_chip
  import slp_pkg::*;
#(
  parameter int unsigned NPATT   = 128000,
  parameter int unsigned NLAYER  = 8,
  parameter int unsigned SSW     = 15,
  parameter int unsigned NTERN   = 3,
  parameter logic [CHIP_ID_W-1:0] CHIP_ID = '0,
  localparam int unsigned AW     = $clog2(NPATT),
  localparam int unsigned CW     = $clog2(NLAYER + 1)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NLAYER-1:0][39:0]      hit_code,
  output logic [39:0]                  road_code,
  input  logic                         road_hold,
  input  logic                         cfg_we,
  input  logic [AW-1:0]                cfg_addr,
  input  logic [NLAYER-1:0][SSW-1:0]   cfg_ss,
  input  logic [NLAYER-1:0][NTERN-1:0] cfg_dc,
  input  logic [CW-1:0]                threshold,
  output logic [NLAYER-1:0][7:0]       err_count,
  output logic                         busy
);
  link_word_t [NLAYER-1:0]      bus_word;
  logic [NLAYER-1:0][3:0]       bus_err;
  logic [NLAYER-1:0]            hit_valid, bus_ee, ee_seen;
  logic [NLAYER-1:0][SSW-1:0]   hit_ss;
  logic                         ev_end, road_valid, ev_done;
  logic [AW-1:0]                road_addr;
  link_word_t                   out_word;

  for (genvar l = 0; l < NLAYER; l++) begin : g_bus
    link_dec32 u_dec (.clk, .rst, .code_i(hit_code[l]), .word_o(bus_word[l]),
                      .err_o(bus_err[l]));
    assign hit_valid[l] = is_data(bus_word[l]) && bus_err[l] == '0;
    assign hit_ss[l]    = bus_word[l].data[SSW-1:0];
    assign bus_ee[l]    = is_ee(bus_word[l]) && bus_err[l] == '0;
  end

  // end of event once every bus has delivered its end-of-event word
  assign ev_end = &(ee_seen | bus_ee) && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      ee_seen   <= '0;
      err_count <= '0;
    end else begin
      ee_seen <= ev_end ? '0 : (ee_seen | bus_ee);
      for (int l = 0; l < NLAYER; l++)
        if (bus_err[l] != '0 && err_count[l] != 8'hFF) err_count[l] <= err_count[l] + 1'b1;
    end
  end

  am_core #(.NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN)) u_core (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_ss, .cfg_dc, .threshold,
    .hit_valid, .hit_ss, .ev_end, .road_hold,
    .road_valid, .road_addr, .ev_done, .busy
  );

  always_comb begin
    if (road_valid)   out_word = '{k: 4'b0000, data: 32'({CHIP_ID, ROAD_ADDR_W'(road_addr)})};
    else if (ev_done) out_word = EE_WORD;
    else              out_word = IDLE_WORD;
  end

  link_enc32 u_enc (.clk, .rst, .word_i(out_word), .code_o(road_code));
endmodule
