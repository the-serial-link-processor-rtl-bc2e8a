// am_core: the pattern-matching array of the Associative Memory chip.
//
// The bank holds NPATT patterns.  A pattern is one coarse-resolution hit
// ("super-strip", SSW bits) per detector layer for NLAYER layers; the lowest
// NTERN bits of each layer word can be stored as "don't care" (ternary CAM
// bits), which gives patterns of variable resolution.  Every layer has its
// own input bus.  A hit on bus l is compared with the layer-l word of every
// pattern at once; where it matches, that pattern's layer flip-flop is set,
// and it stays set until the end of the event, so hits may arrive on the
// buses in any order and at any time.  A pattern whose count of set layer
// flip-flops reaches the programmable majority threshold is a road.
// After end of event the priority encoder sends out the roads, lowest
// address first, one per clock; then all layer flip-flops are cleared.
//
// Follows the document: CAM compare per pattern and layer, latching layer
// flip-flops cleared only at end of event, majority over the layers with a
// programmable threshold, ternary bits, priority encoder, 8 layers, 3
// ternary bits of a 15-bit word.  This design's own choices: the threshold
// test is "at least thr layers"; the don't-care bits are the lowest bits of
// the word; roads are read out after the end of event, not during it; the
// bank is written through a simple parallel port.
//
// Interface and timing (one clock):
//   cfg_we/cfg_addr/cfg_pat  write one pattern (any time outside readout)
//   hit_valid[l]/hit_ss[l]   one hit per bus per clock; the flip-flops are
//                            set on the clock edge that samples the hit
//   ev_end                   one-clock pulse once every bus has finished the
//                            event; readout starts on the next clock
//   road_hold                while high no road is sent
//   road_valid/road_addr     registered, one road per clock at most
//   ev_done                  one-clock pulse after the last road; the layer
//                            flip-flops are clear on the following clock
module am_core #(
  parameter int unsigned NPATT  = 128000,
  parameter int unsigned NLAYER = 8,
  parameter int unsigned SSW    = 15,
  parameter int unsigned NTERN  = 3,
  localparam int unsigned AW    = $clog2(NPATT),
  localparam int unsigned CW    = $clog2(NLAYER + 1)
) (
  input  logic                         clk,
  input  logic                         rst,
  // pattern bank write port
  input  logic                         cfg_we,
  input  logic [AW-1:0]                cfg_addr,
  input  logic [NLAYER-1:0][SSW-1:0]   cfg_ss,
  input  logic [NLAYER-1:0][NTERN-1:0] cfg_dc,
  input  logic [CW-1:0]                threshold,
  // hit buses
  input  logic [NLAYER-1:0]            hit_valid,
  input  logic [NLAYER-1:0][SSW-1:0]   hit_ss,
  input  logic                         ev_end,
  // road output
  input  logic                         road_hold,
  output logic                         road_valid,
  output logic [AW-1:0]                road_addr,
  output logic                         ev_done,
  output logic                         busy
);
  typedef struct packed {
    logic [NLAYER-1:0][SSW-1:0]   ss;
    logic [NLAYER-1:0][NTERN-1:0] dc;
  } pattern_t;

  typedef enum logic [1:0] {S_MATCH, S_READ, S_CLEAR} state_t;

  pattern_t          bank  [NPATT];
  logic [NLAYER-1:0] layer_ff [NPATT];
  logic              sent  [NPATT];
  state_t            state;

  assign busy = (state != S_MATCH);

  // ternary compare of one stored layer word with one hit
  function automatic logic cam_match(logic [SSW-1:0] stored, logic [NTERN-1:0] dc,
                                     logic [SSW-1:0] hit);
    logic [SSW-1:0] care;
    care = ~SSW'(dc);
    return ((stored ^ hit) & care) == '0;
  endfunction

  function automatic logic majority(logic [NLAYER-1:0] f, logic [CW-1:0] thr);
    int unsigned n = 0;
    for (int l = 0; l < NLAYER; l++) n += int'(f[l]);
    return n >= int'(thr);
  endfunction

  // pattern bank (memory, not reset)
  always_ff @(posedge clk) begin
    if (cfg_we) bank[cfg_addr] <= '{ss: cfg_ss, dc: cfg_dc};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_CLEAR;
      road_valid <= 1'b0;
      road_addr  <= '0;
      ev_done    <= 1'b0;
    end else begin
      road_valid <= 1'b0;
      ev_done    <= 1'b0;
      case (state)
        S_MATCH: begin
          // CAM compare on every pattern and layer; matches latch
          if (|hit_valid) begin
            for (int p = 0; p < NPATT; p++)
              for (int l = 0; l < NLAYER; l++)
                if (hit_valid[l] && cam_match(bank[p].ss[l], bank[p].dc[l], hit_ss[l]))
                  layer_ff[p][l] <= 1'b1;
          end
          if (ev_end) state <= S_READ;
        end
        S_READ: begin
          // priority encoder: lowest road not yet sent
          if (!road_hold) begin
            logic found;
            found = 1'b0;
            for (int p = 0; p < NPATT; p++) begin
              if (!found && !sent[p] && majority(layer_ff[p], threshold)) begin
                found        = 1'b1;
                sent[p]     <= 1'b1;
                road_addr   <= AW'(p);
              end
            end
            road_valid <= found;
            if (!found) begin
              ev_done <= 1'b1;
              state   <= S_CLEAR;
            end
          end
        end
        default: state <= S_MATCH;
      endcase
    end
    // end of event (and reset): clear all layer flip-flops and sent flags
    if (rst || state == S_CLEAR) begin
      for (int p = 0; p < NPATT; p++) begin
        layer_ff[p] <= '0;
        sent[p]     <= 1'b0;
      end
    end
  end

  // no hit may arrive while the previous event is being read out
  a_no_hit_in_readout: assert property (@(posedge clk) disable iff (rst)
    state != S_MATCH |-> hit_valid == '0);
endmodule
