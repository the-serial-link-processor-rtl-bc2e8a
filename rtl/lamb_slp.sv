// lamb_slp: the Local Associative Memory Board (LAMBSLP), a mezzanine that
// carries NCHIP AM chips.
//
// The hit buses that arrive from the motherboard are repeated by fan-out
// buffers to every AM chip, so all chips see the same hits on the same
// clock; here the fan-out is plain wiring.  The road outputs of the chips
// are merged in groups of NCHIP/NOUT onto the NOUT road links that go back
// to the motherboard.  Chip c of mezzanine LAMB_ID carries the number
// LAMB_ID*NCHIP + c, which it puts into each road word.
//
// From the document: 16 AM chips per mezzanine, 4 road links per mezzanine,
// fanned-out serial hit buses.  This design's own: the road merger (see
// road_merger) and the parallel pattern-load port with a chip select, which
// stands in for the chip programming path of the board.
// Timing: a hit word reaches every chip on the same clock; see am_chip and
// road_merger for the latencies of the road path.
module lamb_slp
  import slp_pkg::*;
#(
  parameter int unsigned NPATT   = 128000,
  parameter int unsigned NLAYER  = 8,
  parameter int unsigned SSW     = 15,
  parameter int unsigned NTERN   = 3,
  parameter int unsigned NCHIP   = 16,
  parameter int unsigned NOUT    = 4,
  parameter int unsigned LAMB_ID = 0,
  localparam int unsigned AW     = $clog2(NPATT),
  localparam int unsigned CW     = $clog2(NLAYER + 1),
  localparam int unsigned CSW    = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NLAYER-1:0][39:0]      hit_code,
  output logic [NOUT-1:0][39:0]        road_code,
  input  logic                         cfg_we,
  input  logic [CSW-1:0]               cfg_chip,
  input  logic [AW-1:0]                cfg_addr,
  input  logic [NLAYER-1:0][SSW-1:0]   cfg_ss,
  input  logic [NLAYER-1:0][NTERN-1:0] cfg_dc,
  input  logic [CW-1:0]                threshold,
  output logic [NCHIP-1:0]             chip_busy,
  output logic                         link_error,
  output logic [NOUT-1:0][15:0]        hold_cycles
);
  localparam int unsigned PER = NCHIP / NOUT;

  logic [NCHIP-1:0][39:0]                chip_road;
  logic [NCHIP-1:0]                      chip_hold;
  logic [NCHIP-1:0][NLAYER-1:0][7:0]     chip_err;
  logic [NOUT-1:0][PER-1:0][7:0]         merge_err;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    am_chip #(
      .NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN),
      .CHIP_ID(CHIP_ID_W'(LAMB_ID * NCHIP + c))
    ) u_chip (
      .clk, .rst, .hit_code, .road_code(chip_road[c]), .road_hold(chip_hold[c]),
      .cfg_we(cfg_we && cfg_chip == CSW'(c)), .cfg_addr, .cfg_ss, .cfg_dc, .threshold,
      .err_count(chip_err[c]), .busy(chip_busy[c])
    );
  end

  for (genvar o = 0; o < NOUT; o++) begin : g_out
    road_merger #(.NIN(PER)) u_merge (
      .clk, .rst,
      .in_code(chip_road[o*PER +: PER]),
      .hold(chip_hold[o*PER +: PER]),
      .out_code(road_code[o]),
      .err_count(merge_err[o]),
      .hold_cycles(hold_cycles[o])
    );
  end

  assign link_error = (chip_err != '0) || (merge_err != '0);
endmodule
