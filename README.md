# Serial Link Processor: an Associative Memory board for track finding

A particle detector's silicon tracker produces thousands of hits per event.
Finding which hits could belong to one track is a combinatorial problem that
CPUs cannot solve within a trigger's latency. An Associative Memory (AM) solves
it by brute-force parallelism. It stores a bank of precomputed coarse tracks
("patterns"). Each pattern holds one coarse hit position ("super-strip") per
detector layer. Every incoming hit is compared with every pattern at the same
time. A pattern that has seen a matching hit on enough layers is reported as a
*road*: a track candidate, which a downstream track fitter then resolves at
full resolution.

This RTL models the AM board of the Serial Link Processor. Its defining idea is
that all data movement uses 2 Gb/s serial links carrying 8b/10b-coded 32-bit
words, not wide parallel buses:

* 12 hit links enter the board;
* 8 hit buses are fanned out to every AM chip;
* each chip sends roads back on a single serial output;
* 16 road links leave the board.

## Structure

```
 hit_link[12] --> ambslp_input --(8 coded hit buses, fanned out)--+--> lamb_slp #0 --4 road links--+
                  (decode, 4k FIFOs,                               +--> lamb_slp #1 --4------------+
                   event hold, map,                                +--> lamb_slp #2 --4------------+
                   injection, spy)                                 +--> lamb_slp #3 --4------------+
                        ^                                                                          |
                        |  event_done                                                              v
                        +------------------------------------ ambslp_output <----------------------+
                                                              (pass-through, event end, spy) --> road_link[16]

 lamb_slp = 16 x am_chip + 4 x road_merger (4 chips per road link)
 am_chip  = 8 x link_dec32 + am_core + link_enc32
```

| module | role |
|---|---|
| `ambslp` | top level: the board |
| `ambslp_input` | input FPGA logic: link decode, derandomizing FIFOs, event hold, bus map, host injection, spy |
| `lamb_slp` | mezzanine: 16 AM chips, hit fan-out, 4 road links |
| `road_merger` | merges the road streams of 4 chips onto one link |
| `am_chip` | AM chip with serial I/O |
| `am_core` | the pattern-matching array |
| `ambslp_output` | output FPGA logic: road link pass-through, end-of-event detection, spy |
| `link_enc32`, `link_dec32` | 8b/10b encoder and decoder for 32-bit words |
| `sync_fifo`, `spy_buffer` | FIFO, circular spy memory |
| `slp_pkg` | word types, control characters, 8b/10b tables |

## The pattern-matching array (`am_core`)

This is the heart of the design. Its main parameters are:

* `NPATT` patterns (default 128000, the final chip's capacity);
* `NLAYER` = 8 layers;
* `SSW` = 15-bit super-strips;
* `NTERN` = 3 ternary bits.

Each pattern row holds one `SSW`-bit word per layer. A row also has one
*layer flip-flop* per layer and a majority unit.

* **Compare.** A hit on bus *l* is compared, in the same clock, with the
  layer-*l* word of every pattern. The lowest `NTERN` bits of a stored word
  can be marked "don't care" (ternary CAM bits). A wide don't-care field makes
  a pattern coarser, so one bank can mix patterns of several resolutions.
* **Latch.** A match sets that pattern's layer flip-flop. Only end of event
  clears it. So the layers of an event may arrive in any order, interleaved,
  and spread over many clocks. The array never needs all hits of a track at
  once, and this is what makes the combinatorics disappear.
* **Majority.** A pattern is a road when at least `threshold` of its layer
  flip-flops are set. `threshold` is programmable; with 8 layers, 6 or 7
  tolerates detector inefficiency.
* **Priority encoder.** After end of event the roads leave in ascending
  address order, one per clock. Then all flip-flops are cleared in one clock.

Timing: a hit sampled at clock *t* has set its flip-flops at *t+1*. After
`ev_end`, the first road is valid one clock later. After the last road,
`ev_done` pulses and the array is ready again two clocks later.

`road_hold` pauses readout without losing anything. An assertion checks that no
hit arrives during readout; the board's event hold guarantees this.

The loops over `NPATT` sit inside clocked blocks and run only when hits arrive
or during readout. A simulator therefore pays for the full array only on those
clocks. In synthesis the loops unroll into the parallel compare array and the
priority chain.

## Links and words

Every link carries one 32-bit word plus 4 K (control) flags per clock. The word
is 8b/10b coded into 40 bits, byte 0 first, in bits [39:30]. The running
disparity is carried across bytes and words.

The decoder looks each 10-bit symbol up in the code tables, then re-encodes the
result with its current running disparity. Any difference flags a code error or
a disparity error. Words with errors are dropped and counted.

Both directions are precomputed at elaboration into lookup tables in `slp_pkg`.
`ENC_ROM` has 1024 entries indexed by {disparity, K, byte}. `DEC_ROM` has 2048
entries indexed by {disparity, symbol}. Each coder or decoder is then one table
read per byte. This matters because the board has over 500 decoders.

Word formats (defined in `slp_pkg`):

| word | K flags | content |
|---|---|---|
| idle | `0001` | K28.5 (comma) in byte 0 |
| end of event | `0001` | K23.7 in byte 0 |
| hit | `0000` | super-strip in bits [14:0] |
| road | `0000` | chip number in bits [22:17] (mezzanine*16 + chip), pattern address in bits [16:0] |

The serializers, deserializers, comma alignment and transceivers are outside
the RTL. The ports carry the aligned parallel 40-bit code words, and an encoder
output drives a decoder input directly.

## Event flow and back-pressure

Serial links have no ready signal, so flow control is arranged in two places.

1. **Event hold (input side).** A link passes words from its 4k-word FIFO to
   the buses until it passes its end-of-event word. It then waits. The next
   event starts only when two things are true:
   * every link has reached the end of the event;
   * the output side has seen end-of-event on all 16 road links (`event_done`).

   Meanwhile later events queue in the FIFOs. A push into a full FIFO is
   dropped and counted.
2. **Road hold (mezzanine).** Each road merger queues the roads of its 4 chips,
   8 words per chip. It raises a chip's hold line at 4 queued words; that leaves
   room for the words already in the chip's and link's pipeline registers. It
   sends one road per clock in round-robin order. It sends one end-of-event word
   once all 4 chips have sent theirs.

An AM chip starts readout when every one of its 8 buses has delivered
end-of-event. It ends its road stream with its own end-of-event word.

## Host registers

The host (VME) port, `host_*`, is a plain synchronous register port.
`host_addr[8]` selects the side: 0 is the input side, 1 is the output side.

**Input side:**

| address | access | content |
|---|---|---|
| 0x00 | RW | bus-to-link map, 4 bits per bus; reset: bus *b* reads link *b* |
| 0x01 | RW | injection: [15:0] links replaced by host words; [19:16] target link; [23:20] K flags |
| 0x02 | W | push one word into the target link's FIFO |
| 0x03 | RW | spy: [3:0] link, [4] freeze |
| 0x04 | RW | spy read index |
| 0x05 | R | spy word |
| 0x06 | R | spy K flags |
| 0x07 | R | spy write pointer |
| 0x08 | R | decode errors |
| 0x09 | R | FIFO overflows |
| 0x0A | R | events completed |
| 0x0B | R | clocks a link waited with data queued |
| 0x0C | R | spy word count |

**Output side:**

| address | access | content |
|---|---|---|
| 0x00 | RW | spy: [3:0] link, [4] freeze |
| 0x01 | RW | spy read index |
| 0x02 | R | spy word |
| 0x03 | R | spy K flags |
| 0x04 | R | spy write pointer |
| 0x05 | R | events |
| 0x06 | R | roads |
| 0x07 | R | decode errors |
| 0x08 | R | spy word count |

Patterns are loaded through the `cfg_*` port: chip number, address and the
8 layer words with their don't-care bits. `threshold` is common to all chips.

## How far to trust it, and where it departs

**Taken from the system description:**
* the board's link counts: 12 in, 16 out, 4 per mezzanine;
* 4 mezzanines of 16 chips;
* 8 layer buses per chip;
* 4k-word FIFOs per input link;
* 8b/10b with 32-bit words;
* 128000 patterns per chip;
* the array's organisation: per-layer CAM compare, flip-flops held until end of
  event, programmable majority, ternary bits, priority encoder;
* 15-bit super-strips with 3 ternary bits.

The last item comes from the previous chip generation. The final chip's word
width is not specified.

**This design's own choices:**
* the control characters and word layouts;
* the event hold and `event_done` hand-off;
* the road merger and its hold lines;
* the bus-to-link map;
* the register maps and spy depth (1024);
* readout after, not during, the event;
* "at least threshold" as the majority rule;
* don't-care bits being the lowest bits;
* one clock for the whole board, one word per clock per link.

**Not modelled:**
* serializer/deserializer macros and FPGA transceivers;
* PRBS link self-test;
* the VME protocol;
* the JTAG and FPGA path that programs the chips;
* clock oscillator and fan-out buffers;
* the other boards of the tracking system.

Stand-in ports replace each of these where they would connect.

## Simulating

Every module and testbench is plain SystemVerilog. Compile the package first.
Any testbench builds the same way:

```
verilator --binary --timing --assert -Irtl rtl/slp_pkg.sv rtl/*.sv tb/tb_am_core.sv \
          --top-module tb_am_core && ./obj_dir/Vtb_am_core
```

Each testbench prints `TB_RESULT checks=N failures=M` and finishes.

| testbench | what it checks |
|---|---|
| `tb_am_core` | array against a reference model; thresholds 4 to 8; hold; one road per clock |
| `tb_am_chip` | one chip through coded links; corrupted input word |
| `tb_link_codec` | hand-worked code words; 2000-word round trip; single-bit error detection |
| `tb_road_merger`, `tb_lamb_slp` | merging, ordering, hold, routing of chips to links |
| `tb_ambslp_input`, `tb_ambslp_output` | event hold, map, injection, spy, counters, overflow |
| `tb_sync_fifo`, `tb_spy_buffer` | FIFO and spy |
| `tb_ambslp` | whole board, end to end, at 16 patterns per chip and 16-word FIFOs |
| `tb_ambslp_full` | one complete operation at the default size |

`tb_ambslp` makes every board mechanism happen and counts it: event hold, road
back-pressure, remapping, injection, error detection, spy and FIFO overflow.

`tb_ambslp_full` runs the board at its default size. It loads all 8,192,000
patterns, one per clock through the `cfg_*` port, which takes 8.2 million
clocks. It then sends one event at threshold 6 and checks every road against a
model. With verilator it builds in under a minute and runs in under
three minutes.

To change sizes, override the parameters of `ambslp`: `NPATT`, `NLAYER`, `SSW`,
`NTERN`, `NLAMB`, `NCHIP`, `NOUT`, `NLINK_IN`, `FIFO_DEPTH` and `SPY_DEPTH`. A
hit word's super-strip field and the road word's 17-bit address field bound
`SSW` and `NPATT`.
