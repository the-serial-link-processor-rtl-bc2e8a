// spy_buffer: a circular record of the words passing on one selected link,
// read back by the host through the board's VME interface.
//
// While not frozen, every non-idle word of the selected link (sel) is
// written at the write pointer, which then advances and wraps, so the buffer
// always holds the latest DEPTH words.  The host reads any entry by index
// (rd_index, combinational rd_word).  Spying on the data flow through VME
// is a function the document gives; depth, word selection and freeze are
// this design's own.
module spy_buffer
  import slp_pkg::*;
#(
  parameter int unsigned NLINK = 12,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SW   = (NLINK > 1) ? $clog2(NLINK) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  link_word_t [NLINK-1:0]  words,
  input  logic [SW-1:0]           sel,
  input  logic                    freeze,
  input  logic [AW-1:0]           rd_index,
  output link_word_t              rd_word,
  output logic [AW-1:0]           wr_ptr,
  output logic [31:0]             n_recorded
);
  link_word_t mem [DEPTH];
  link_word_t w;

  assign w       = words[sel];
  assign rd_word = mem[rd_index];

  always_ff @(posedge clk) begin
    if (!freeze && w != IDLE_WORD) mem[wr_ptr] <= w;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      n_recorded <= '0;
    end else if (!freeze && w != IDLE_WORD) begin
      wr_ptr     <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      n_recorded <= n_recorded + 1;
    end
  end
endmodule
