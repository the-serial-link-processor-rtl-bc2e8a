// ambslp_input: the input side of the AM board (AMBSLP), the logic of its
// input FPGA.
//
// NLINK serial links bring hits from the backplane connector.  Each link is
// 8b/10b decoded and its words are written into a derandomizing FIFO
// (FIFO_DEPTH words per link); idle words and words with a decode error are
// dropped.  From the FIFOs the hits are sent on NBUS hit buses, each fanned
// out to every AM chip.  Bus b carries the words of link map[b], so one link
// may feed several buses, and a link no bus selects is still read and kept
// in step.  Events are kept whole: once a link has passed on its
// end-of-event word it waits until the AM chips have sent all roads of the
// event (event_done from the output side) and every other link has reached
// the end of the event too; meanwhile the next event waits in the FIFOs.
//
// Host (VME) access, as 32-bit registers at host_addr:
//   0x00 RW  bus-to-link map, 4 bits per bus (bus 0 in bits [3:0]);
//            reset value: bus b reads link b
//   0x01 RW  injection: [15:0] links whose input is replaced by host
//            words, [19:16] link written by 0x02, [23:20] K flags of the word
//   0x02 W   write one word into the FIFO of the link chosen in 0x01
//   0x03 RW  spy: [3:0] link spied on, [4] freeze
//   0x04 RW  spy read index;  0x05 R spy word data;  0x06 R spy K flags;
//   0x07 R   spy write pointer
//   0x08 R   decode errors   0x09 R FIFO overflows
//   0x0A R   events sent     0x0B R clocks a link waited with data queued
//   0x0C R   words recorded by the spy
//
// From the document: 12 input links, 4k-word derandomizing FIFO per link,
// fan-out of the hits to all AM chips, spy and hit injection through VME.
// This design's own: the map, the register layout, the event hand-off
// and the drop rules.
// Timing: a word reaches its FIFO two clocks after it is on the input pins
// and leaves on the bus pins two clocks after it reaches the FIFO head.
module ambslp_input
  import slp_pkg::*;
#(
  parameter int unsigned NLINK      = 12,
  parameter int unsigned NBUS       = 8,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned SPY_DEPTH  = 1024
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NLINK-1:0][39:0]    in_code,
  output logic [NBUS-1:0][39:0]     bus_code,
  input  logic                      event_done,
  input  logic                      host_we,
  input  logic [7:0]                host_addr,
  input  logic [31:0]               host_wdata,
  output logic [31:0]               host_rdata
);
  localparam int unsigned FW  = $clog2(FIFO_DEPTH);
  localparam int unsigned SPW = $clog2(SPY_DEPTH);

  link_word_t [NLINK-1:0]     rx_word, head;
  logic [NLINK-1:0][3:0]      rx_err;
  logic [NLINK-1:0]           push, pop, empty, full, ovf, wait_q;
  logic [NLINK-1:0][FW:0]     count;
  link_word_t [NLINK-1:0]     fifo_in;
  link_word_t [NBUS-1:0]      bus_word;

  logic [NBUS-1:0][3:0]       map_q;
  logic [15:0]                inj_en;
  logic [3:0]                 inj_link, inj_k;
  logic [3:0]                 spy_sel;
  logic                       spy_freeze;
  logic [SPW-1:0]             spy_index, spy_wr;
  link_word_t                 spy_word;
  logic [31:0]                spy_n;
  logic [31:0]                n_err, n_ovf, n_events, n_stall;
  logic                       done_pending, release_ev;
  logic                       inj_push;

  assign inj_push = host_we && host_addr == 8'h02;

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    link_dec32 u_dec (.clk, .rst, .code_i(in_code[l]), .word_o(rx_word[l]), .err_o(rx_err[l]));
    always_comb begin
      if (inj_en[l]) begin
        push[l]    = inj_push && inj_link == 4'(l);
        fifo_in[l] = '{k: inj_k, data: host_wdata};
      end else begin
        push[l]    = rx_err[l] == '0 && (rx_word[l].k == 4'b0000 || is_ee(rx_word[l]));
        fifo_in[l] = rx_word[l];
      end
    end
    sync_fifo #(.WIDTH($bits(link_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst, .push(push[l]), .din(fifo_in[l]), .pop(pop[l]), .dout(head[l]),
      .empty(empty[l]), .full(full[l]), .count(count[l]), .overflow(ovf[l])
    );
    assign pop[l] = !empty[l] && !wait_q[l];
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    always_comb begin
      bus_word[b] = IDLE_WORD;
      for (int l = 0; l < NLINK; l++)
        if (map_q[b] == 4'(l) && pop[l]) bus_word[b] = head[l];
    end
    link_enc32 u_enc (.clk, .rst, .word_i(bus_word[b]), .code_o(bus_code[b]));
  end

  // the next event may start once every link is at the end of this one and
  // the AM chips have finished it
  assign release_ev = &wait_q && (done_pending || event_done);

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_q       <= '0;
      done_pending <= 1'b0;
      n_events     <= '0;
      n_stall      <= '0;
      n_err        <= '0;
      n_ovf        <= '0;
    end else begin
      for (int l = 0; l < NLINK; l++)
        if (pop[l] && is_ee(head[l])) wait_q[l] <= 1'b1;
      if (release_ev) begin
        wait_q       <= '0;
        done_pending <= 1'b0;
        n_events     <= n_events + 1;
      end else if (event_done) begin
        done_pending <= 1'b1;
      end
      if ((wait_q & ~empty) != '0) n_stall <= n_stall + 1;
      for (int l = 0; l < NLINK; l++) begin
        if (rx_err[l] != '0) n_err <= n_err + 1;
      end
      if (ovf != '0) n_ovf <= n_ovf + 1;
    end
  end

  // ---------------------------------------------------------------- host
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int b = 0; b < NBUS; b++) map_q[b] <= 4'(b);
      inj_en     <= '0;
      inj_link   <= '0;
      inj_k      <= '0;
      spy_sel    <= '0;
      spy_freeze <= 1'b0;
      spy_index  <= '0;
    end else if (host_we) begin
      case (host_addr)
        8'h00: for (int b = 0; b < NBUS && b < 8; b++) map_q[b] <= host_wdata[4*b +: 4];
        8'h01: begin
          inj_en   <= host_wdata[15:0];
          inj_link <= host_wdata[19:16];
          inj_k    <= host_wdata[23:20];
        end
        8'h03: begin
          spy_sel    <= host_wdata[3:0];
          spy_freeze <= host_wdata[4];
        end
        8'h04: spy_index <= host_wdata[SPW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    host_rdata = '0;
    case (host_addr)
      8'h00: for (int b = 0; b < NBUS && b < 8; b++) host_rdata[4*b +: 4] = map_q[b];
      8'h01: host_rdata = {8'h0, inj_k, inj_link, inj_en};
      8'h03: host_rdata = {27'h0, spy_freeze, spy_sel};
      8'h04: host_rdata = 32'(spy_index);
      8'h05: host_rdata = spy_word.data;
      8'h06: host_rdata = 32'(spy_word.k);
      8'h07: host_rdata = 32'(spy_wr);
      8'h08: host_rdata = n_err;
      8'h09: host_rdata = n_ovf;
      8'h0A: host_rdata = n_events;
      8'h0B: host_rdata = n_stall;
      8'h0C: host_rdata = spy_n;
      default: ;
    endcase
  end

  spy_buffer #(.NLINK(NLINK), .DEPTH(SPY_DEPTH)) u_spy (
    .clk, .rst, .words(rx_word), .sel(spy_sel[$clog2(NLINK)-1:0]), .freeze(spy_freeze),
    .rd_index(spy_index), .rd_word(spy_word), .wr_ptr(spy_wr), .n_recorded(spy_n)
  );
endmodule
