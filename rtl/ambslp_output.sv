// ambslp_output: the output side of the AM board (AMBSLP), the logic of its
// output FPGA.
//
// The NLINK road links from the mezzanines arrive here and are sent on,
// unchanged and one clock later, to the backplane connector towards the
// track-fitting board.  Each link is also decoded, to count roads and
// decode errors, to feed a spy buffer, and to see the end of each event:
// when every link has delivered its end-of-event word, event_done pulses
// for one clock, which lets the input side start the next event.
//
// Host (VME) registers at host_addr:
//   0x00 RW spy: [3:0] link spied on, [4] freeze
//   0x01 RW spy read index;  0x02 R spy word data;  0x03 R spy K flags
//   0x04 R  spy write pointer
//   0x05 R  events completed  0x06 R roads seen  0x07 R decode errors
//   0x08 R  words recorded by the spy
//
// From the document: 16 road links from the mezzanines to the connector
// (4 per mezzanine) and spying through VME.  This design's own: the
// event_done hand-off and the register layout.
module ambslp_output
  import slp_pkg::*;
#(
  parameter int unsigned NLINK     = 16,
  parameter int unsigned SPY_DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NLINK-1:0][39:0]    in_code,
  output logic [NLINK-1:0][39:0]    out_code,
  output logic                      event_done,
  input  logic                      host_we,
  input  logic [7:0]                host_addr,
  input  logic [31:0]               host_wdata,
  output logic [31:0]               host_rdata
);
  localparam int unsigned SPW = $clog2(SPY_DEPTH);
  localparam int unsigned LW  = (NLINK > 1) ? $clog2(NLINK) : 1;

  link_word_t [NLINK-1:0]  rx_word;
  logic [NLINK-1:0][3:0]   rx_err;
  logic [NLINK-1:0]        ee_seen, rx_ee;
  logic [3:0]              spy_sel;
  logic                    spy_freeze;
  logic [SPW-1:0]          spy_index, spy_wr;
  link_word_t              spy_word;
  logic [31:0]             spy_n, n_events, n_roads, n_err;
  logic                    all_ee;

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    link_dec32 u_dec (.clk, .rst, .code_i(in_code[l]), .word_o(rx_word[l]), .err_o(rx_err[l]));
    assign rx_ee[l] = is_ee(rx_word[l]);
  end

  assign all_ee = &(ee_seen | rx_ee);

  // the road links pass through one register stage, reset or not
  always_ff @(posedge clk) out_code <= in_code;

  always_ff @(posedge clk) begin
    if (rst) begin
      ee_seen    <= '0;
      event_done <= 1'b0;
      n_events   <= '0;
      n_roads    <= '0;
      n_err      <= '0;
    end else begin
      int unsigned nr;
      event_done <= all_ee;
      ee_seen    <= all_ee ? '0 : (ee_seen | rx_ee);
      if (all_ee) n_events <= n_events + 1;
      nr = 0;
      for (int l = 0; l < NLINK; l++) nr += int'(is_data(rx_word[l]) && rx_err[l] == '0);
      n_roads <= n_roads + nr;
      if (rx_err != '0) n_err <= n_err + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      spy_sel    <= '0;
      spy_freeze <= 1'b0;
      spy_index  <= '0;
    end else if (host_we) begin
      case (host_addr)
        8'h00: begin
          spy_sel    <= host_wdata[3:0];
          spy_freeze <= host_wdata[4];
        end
        8'h01: spy_index <= host_wdata[SPW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    host_rdata = '0;
    case (host_addr)
      8'h00: host_rdata = {27'h0, spy_freeze, spy_sel};
      8'h01: host_rdata = 32'(spy_index);
      8'h02: host_rdata = spy_word.data;
      8'h03: host_rdata = 32'(spy_word.k);
      8'h04: host_rdata = 32'(spy_wr);
      8'h05: host_rdata = n_events;
      8'h06: host_rdata = n_roads;
      8'h07: host_rdata = n_err;
      8'h08: host_rdata = spy_n;
      default: ;
    endcase
  end

  spy_buffer #(.NLINK(NLINK), .DEPTH(SPY_DEPTH)) u_spy (
    .clk, .rst, .words(rx_word), .sel(spy_sel[LW-1:0]), .freeze(spy_freeze),
    .rd_index(spy_index), .rd_word(spy_word), .wr_ptr(spy_wr), .n_recorded(spy_n)
  );
endmodule
