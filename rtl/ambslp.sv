// ambslp: the Associative Memory board of the Serial Link Processor, top
// level.  It finds track candidates ("roads") among the hits of one event.
//
// Hits of the twelve detector-layer links enter the input side
// (ambslp_input), wait in derandomizing FIFOs and are sent, one event at a
// time, on NLAYER hit buses to NLAMB mezzanines (lamb_slp).  There every AM
// chip sees every hit and compares it with all its patterns at once.  After
// the end of the event each chip sends its roads; each mezzanine merges them
// onto NOUT road links, and the output side (ambslp_output) passes all
// NLAMB*NOUT road links on to the track-fitting board and signals when the
// event is complete, so that the next event can start.  Every link carries
// 32-bit words as 40-bit 8b/10b code words, one per clock.
//
// Ports:
//   hit_link    NLINK_IN coded input links (from the backplane connector)
//   road_link   NLAMB*NOUT coded road links (to the backplane connector)
//   host_*      VME register access; host_addr[8] = 0 selects the input
//               side, 1 the output side (register maps in those modules)
//   cfg_*       pattern load: chip number (mezzanine * NCHIP + chip),
//               pattern address, pattern; threshold is the majority
//               threshold of every chip
//   chip_busy, link_error, hold_cycles   status
//
// From the document: 12 input links, 16 road links, 4 mezzanines of 16 AM
// chips, 8 layers per AM chip, 4k-word input FIFOs, 8b/10b links,
// 128000 patterns per final AM chip.  This design's own: the event
// hand-off between the output and input side, the host and pattern-load
// ports (stand-ins for the VME bus and the chip programming path), and the
// single word clock for the whole board.  The serializers and transceivers
// of the links are outside: the ports carry aligned parallel code words.
module ambslp
  import slp_pkg::*;
#(
  parameter int unsigned NPATT      = 128000,
  parameter int unsigned NLAYER     = 8,
  parameter int unsigned SSW        = 15,
  parameter int unsigned NTERN      = 3,
  parameter int unsigned NLAMB      = 4,
  parameter int unsigned NCHIP      = 16,
  parameter int unsigned NOUT       = 4,
  parameter int unsigned NLINK_IN   = 12,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned SPY_DEPTH  = 1024,
  localparam int unsigned AW        = $clog2(NPATT),
  localparam int unsigned CW        = $clog2(NLAYER + 1),
  localparam int unsigned CSW       = (NCHIP > 1) ? $clog2(NCHIP) : 1,
  localparam int unsigned LSW       = (NLAMB > 1) ? $clog2(NLAMB) : 1
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [NLINK_IN-1:0][39:0]         hit_link,
  output logic [NLAMB*NOUT-1:0][39:0]       road_link,
  input  logic                              host_we,
  input  logic [8:0]                        host_addr,
  input  logic [31:0]                       host_wdata,
  output logic [31:0]                       host_rdata,
  input  logic                              cfg_we,
  input  logic [LSW+CSW-1:0]                cfg_chip,
  input  logic [AW-1:0]                     cfg_addr,
  input  logic [NLAYER-1:0][SSW-1:0]        cfg_ss,
  input  logic [NLAYER-1:0][NTERN-1:0]      cfg_dc,
  input  logic [CW-1:0]                     threshold,
  output logic [NLAMB*NCHIP-1:0]            chip_busy,
  output logic [NLAMB-1:0]                  link_error,
  output logic [NLAMB*NOUT-1:0][15:0]       hold_cycles
);
  logic [NLAYER-1:0][39:0]     bus_code;
  logic [NLAMB*NOUT-1:0][39:0] lamb_road;
  logic                        event_done;
  logic [31:0]                 rdata_in, rdata_out;

  ambslp_input #(
    .NLINK(NLINK_IN), .NBUS(NLAYER), .FIFO_DEPTH(FIFO_DEPTH), .SPY_DEPTH(SPY_DEPTH)
  ) u_in (
    .clk, .rst, .in_code(hit_link), .bus_code, .event_done,
    .host_we(host_we && !host_addr[8]), .host_addr(host_addr[7:0]), .host_wdata,
    .host_rdata(rdata_in)
  );

  for (genvar m = 0; m < NLAMB; m++) begin : g_lamb
    lamb_slp #(
      .NPATT(NPATT), .NLAYER(NLAYER), .SSW(SSW), .NTERN(NTERN),
      .NCHIP(NCHIP), .NOUT(NOUT), .LAMB_ID(m)
    ) u_lamb (
      .clk, .rst, .hit_code(bus_code), .road_code(lamb_road[m*NOUT +: NOUT]),
      .cfg_we(cfg_we && (NLAMB == 1 || cfg_chip[LSW+CSW-1 -: LSW] == LSW'(m))),
      .cfg_chip(cfg_chip[CSW-1:0]), .cfg_addr, .cfg_ss, .cfg_dc, .threshold,
      .chip_busy(chip_busy[m*NCHIP +: NCHIP]), .link_error(link_error[m]),
      .hold_cycles(hold_cycles[m*NOUT +: NOUT])
    );
  end

  ambslp_output #(.NLINK(NLAMB*NOUT), .SPY_DEPTH(SPY_DEPTH)) u_out (
    .clk, .rst, .in_code(lamb_road), .out_code(road_link), .event_done,
    .host_we(host_we && host_addr[8]), .host_addr(host_addr[7:0]), .host_wdata,
    .host_rdata(rdata_out)
  );

  assign host_rdata = host_addr[8] ? rdata_out : rdata_in;
endmodule
