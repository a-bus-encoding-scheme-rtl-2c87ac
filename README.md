# Crosstalk-free instruction bus with a deassembler and an assembler

On a long, wide on-chip bus the worst delays come from two neighbouring wires
switching in opposite directions in the same cycle: one rises while the other
falls. The coupling capacitance between them then counts several times over
(the 3C and 4C cases), and the slowest wire sets the clock period of the whole
bus. This RTL removes every such transition from a 128-bit instruction bus
between a memory module and a processor's prefetch unit. It does not widen the
code space the way classic crosstalk codes do. Instead, it sometimes spends a
slot of the bus on a harmless filler pattern:

* the bus is cut into **channels** (4 channels of 32 bits by default);
* before a **data segment** goes onto a channel, it is compared with what that
  channel carried in the previous cycle. If the change would make an opposite
  switching pair, the segment moves to the next channel. The channel it left
  carries a **NOP segment**, which is all zeros;
* a NOP segment can follow any pattern and be followed by any pattern without
  opposite switching, because every wire either stays put or moves toward 0.
  A segment therefore waits at most one cycle;
* segments that no longer fit on the last channel go out in the next cycle.

This costs some bus cycles. A processor's fetch runs well ahead of what it
commits, so the prefetch buffer absorbs the lost slots and execution hardly
slows down. In the workload test below the penalty is a few hundredths of a
percent of the cycles.

The design follows the deassembler/assembler scheme of "A Bus-Encoding Scheme
for Crosstalk Elimination in High-Performance Processor Design". It is an
independent RTL implementation. The sections below name the choices this RTL
makes where the scheme leaves details open.

## The wires: channels, distinction wires, separation wires

With `BUS_W = 128` and `CH_W = 32` the physical bus has 135 wires, numbered
here from the most significant:

```
134..103  channel 1 (word bits 127..96)
102       Wd1   distinction wire of channel 1   (1 = data segment, 0 = NOP)
101       Ws1   separation wire, constant 0
100..69   channel 2 (word bits 95..64)
68        Wd2
67        Ws2
66..35    channel 3
34        Wd3
33        Ws3
32..1     channel 4 (word bits 31..0)
0         Wd4
```

In general there are `BUS_W + 2N - 1` wires for `N = BUS_W/CH_W` channels.
That is 7 extra wires at 32-bit channels and 15 at 16-bit channels. The
functions in `xt_pkg` compute the positions.

Why the boundaries stay clean:

* **Separation wire.** It never switches, so neither of its neighbours can
  form an opposite pair with it. It isolates the first wire of channel i+1
  from what is on its left.
* **Distinction wire.** Each is needed because a data segment of all zeros
  looks exactly like a NOP. It sits between the last data wire of its channel
  (call it α) and the separation wire. The pair (α, Wd) can only take the
  values 00 (NOP: α = 0, Wd = 0), 01 and 11 (data: Wd = 1). Among these three
  values, no change from one to another flips the two wires in opposite
  directions: that would need 10 as one end of the change. So the distinction
  wire needs no encoding of its own.
* **Inside a channel.** The deassembler's checks keep each channel clean.

`NOP_ONES = 1` selects the mirror-image encoding. NOP becomes all ones, the
distinction wire is 1 for NOP and 0 for data, and the separation wires sit
at 1. The (α, Wd) pair then takes only 11, 00 and 10. All modules take the
parameter, and the testbenches cover both settings.

## Sending end: `xt_deassembler`

This is the part with the most logic. Each channel `i` has:

* a **data register** holding the segment now on channel `i`, whether data or
  NOP. These registers drive the bus directly;
* one **cross detector** (`xt_cross_detector`) per candidate segment `j ≤ i`.
  It flags an opposite switching pair between the data register and candidate
  `j`. All N(N+1)/2 detectors (10 for four channels) work in parallel;
* **select logic with two multiplexers** (`xt_sel_logic`). From the detector
  outputs it picks the segment for this channel or a NOP segment (first
  multiplexer), and the matching distinction-wire value (second multiplexer).

Segments keep their order, and a segment can only move to a later channel or
to a later cycle. Channel `i` can therefore only ever carry window segments
`0..i`, which is why it has only `i+1` detectors. The select logic is a chain.
Channel `i` learns from channel `i-1` how many segments have been placed so
far (`placed_in`). The next segment in line is that one. It goes onto channel
`i` if it exists and its detector for channel `i` is clear. Otherwise channel
`i` carries NOP, and the same segment is offered to channel `i+1`.

Example with four channels, where the first segment `A` of the new word
conflicts with what channels 1 and 2 carry:

```
channel      1     2     3     4
this cycle   NOP   NOP   A     B      (C, D deferred)
next cycle   C     D     ...          (first in the window again)
```

The deferred segments stay at the front of a **segment queue** of `2N`
entries, and the next word is appended behind them. The window of a cycle is
the first `N` queued segments. In the worst case segment 1 conflicts with every
channel, so a whole cycle carries only NOPs. The cycle after it can carry the
full window, because nothing conflicts with an all-NOP bus. This means the
scheme at most doubles the transfer time.

Handshake and timing (choices of this RTL):

* `in_valid`/`in_ready`/`in_data`: a word is taken while the queue holds at
  most `N` segments. With no conflicts, one word per cycle flows through.
* A word taken at clock edge *k* is on the bus after edge *k+1*.
* `sent_cnt`, `nop_cnt` and `deferred_cnt` describe what the next edge puts
  on the bus.
* Reset empties the queue and puts NOP on every channel.

Storage is `N·CH_W` bits of data registers (128 bits by default), N
distinction bits, and the segment queue of `2N·CH_W` bits.

## Receiving end: `xt_assembler`

The assembler reads the N distinction wires. For every channel it counts the
NOP segments on the channels before it. That count is how many positions the
segment moves left, which packs the data segments back together in their
original order. The packed segments are appended to the incomplete
instruction left from the previous cycle (a small buffer queue of
`INSTR_W/CH_W - 1` segments). Every complete group of `INSTR_W/CH_W`
segments is one instruction, with its first segment in the most significant
bits.

Outputs are registered. `out_cnt` instructions appear on `out_instr[0..]`
one cycle after the bus word, and `out_nops` counts the removed NOP segments.
With 32-bit channels and 32-bit instructions every segment is a whole
instruction and the buffer queue stays empty. With 16-bit or 8-bit channels,
or with 64-bit data words (`INSTR_W = 64`), instructions span cycles.

The bus has no stall wire, so the assembler always accepts.

## Prefetch buffer and flow control: `xt_prefetch_buffer`

This is a circular buffer of 32 instructions, chosen for this RTL because the
scheme does not size it. It takes up to four instructions per cycle from the
assembler and hands up to four per cycle to the processor on demand:

* `pop_req` asks for instructions;
* `pop_cnt = min(pop_req, avail)` of them leave at the edge;
* `head_data` shows the oldest entries.

Since nothing can stop the bus, the buffer tells the memory side when it may
start another word. `fetch_en` is high while at least `HEADROOM` entries are
free. In the top, `HEADROOM = 4 ×` (instructions per word) = 16. This covers
everything that can still arrive: two words in the deassembler queue, the new
word, the word on the bus and the assembler's output register. An assertion
(`a_no_overflow`) checks that the buffer never overflows. `fetch_en` is a side
signal of this RTL, not part of the encoded bus.

## Top: `xt_bus_system`

```
mem_valid/mem_ready/mem_data ──► xt_deassembler ──► bus_wires[134:0] ──► xt_assembler ──► xt_prefetch_buffer ──► issue_*
                         ▲                                                                        │
                         └──────────────────────────── fetch_en ◄──────────────────────────────────┘
```

* `mem_ready` is the deassembler's ready gated with `fetch_en`.
* `bus_wires` is brought out so the physical wires can be observed.
* The `stat_*` outputs expose the counts of sent, NOP and deferred segments,
  the instructions completed, and the prefetch buffer's fill level.
* Two assertions guard the scheme. `a_crosstalk_free` checks that no two
  adjacent bus wires switch in opposite directions between consecutive
  cycles. `a_nops_removed` checks that the assembler removes at least the NOP
  segments the deassembler inserted.

Latency without conflicts: a word taken at edge *k* is on the bus after
*k+1* and leaves the assembler after *k+2*. Its instructions can be issued in
the cycle after *k+3*.

The memory array and the processor are not part of the RTL. They connect
through the `mem_*` and `issue_*` ports. The analog behaviour of the wires
(their crosstalk-dependent delay) is not modelled either. The RTL only
guarantees the switching patterns that make the wires fast.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| `BUS_W`    | 128     | data bits per transfer |
| `CH_W`     | 32      | channel width; must divide `BUS_W` and `INSTR_W` (4, 8, 16, 32 tested) |
| `INSTR_W`  | 32      | instruction (or data word) width rebuilt by the assembler |
| `NOP_ONES` | 0       | 0: NOP = all 0, Wd = 1 for data; 1: NOP = all 1, Wd = 0 for data |
| `PF_DEPTH` | 32      | prefetch buffer entries, a power of two ≥ 16 |
| `ISSUE`    | 4       | instructions the processor may take per cycle |

The defaults are the main configuration of the scheme: a 128-bit instruction
bus with 32-bit channels and 32-bit instructions, feeding a four-issue
processor. Only `PF_DEPTH` and the flow control are this RTL's own sizing.

## Files

| file | contents |
|------|----------|
| `rtl/xt_pkg.sv` | default sizes, wire-position functions |
| `rtl/xt_cross_detector.sv` | opposite-switching detector for one channel |
| `rtl/xt_sel_logic.sv` | per-channel select logic and its two multiplexers |
| `rtl/xt_deassembler.sv` | sending end |
| `rtl/xt_assembler.sv` | receiving end |
| `rtl/xt_prefetch_buffer.sv` | prefetch instruction buffer with `fetch_en` |
| `rtl/xt_bus_system.sv` | top |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_xt_workload` and `tb_xt_data_bus` |
| `tb/xt_*_checker.sv`, `tb/xt_workload_runner.sv`, `tb/xt_tb_pkg.sv` | testbench helpers |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb_xt_cross_detector`: directed cases (0101→1010, NOP in and out,
  same-direction switching) and 20,000 random pairs. It compares against a
  wire-by-wire reference.
* `tb_xt_sel_logic`: every `placed_in`/`win_cnt` combination with random
  detector flags, for two channel positions and both NOP encodings.
* `tb_xt_deassembler`: runs 128/32 with all-0 NOP and 128/16 with all-1 NOP.
  A cycle-accurate reference model predicts every bus value. Independently
  of that model, the bus is decoded by its distinction wires and must return
  the words in order, and no adjacent wire pair may switch in opposite
  directions. It also checks:
  * the one-cycle latency;
  * one word per cycle on a conflict-free stream;
  * the all-NOP worst-case cycle followed by the full word;
  * that NOP insertion, deferral, an all-NOP cycle and back-pressure each
    happen.
* `tb_xt_assembler`: runs 32-, 16- and 8-bit channels with 32-bit
  instructions, and 32-bit channels with 64-bit words. Random NOP masks
  (including data segments equal to the NOP pattern) check the instruction
  count, order, values and NOP count one cycle later.
* `tb_xt_prefetch_buffer`: random multi-entry push and pop against a queue
  model, plus fill and drain phases, the `fetch_en` threshold and the
  push-to-pop latency.
* `tb_xt_bus_system` runs end to end at the default sizes with no parameter
  overrides: 3,000 words, i.e. 12,000 instructions. It covers:
  * an instruction-like program with hostile 0101/1010 words mixed in;
  * a phase with the processor stalled so that `fetch_en` throttles fetch;
  * program order at the processor, the bus rule, the *k+3* latency and
    full-rate streaming;
  * counts of NOP insertion, deferral, all-NOP cycles, back-pressure,
    throttling and processor starvation.
* `tb_xt_workload`: a processor model commits on average 1.6 instructions per
  cycle, 40% of the fetch rate. It consumes 16,000 instruction-like words
  through a 32-bit-channel and a 16-bit-channel system. Two matching systems
  carry a program that never switches and so never loses a slot. Typical
  results:
  * about 6.4% of the bits form opposite pairs on a plain bus;
  * the penalty is a few cycles out of about 9,900 (around 0.01–0.04%) with
    32-bit channels, and 0 with 16-bit channels.

  The test fails above 2%. Smaller channels lose less, because a conflict
  blocks a smaller slot.

  A fifth system runs the same kind of stream at full rate, with the processor
  taking four instructions per cycle. This shows the cost that the prefetch
  slack normally hides: 4,000 words need about 7,400 cycles, since most 32-bit
  segments of such a stream conflict with their predecessor. The encoded bus
  has no coupling toggles. It has about 1.46 times as many transitions as a
  plain bus has coupling plus transition toggles, because every inserted NOP
  adds a swing to zero and back. So the scheme's gain is in the worst-case
  wire delay, not in switching activity, at least for this synthetic stream.
  The stream is synthetic: no real benchmark binaries are included.

* `tb_xt_data_bus`: the top as a data bus, with `INSTR_W = 64` and
  `ISSUE = 2` (two read ports). 2,000 transfers of data-like 64-bit words
  check order, the bus rule, NOP insertion, deferral and words split across
  two bus cycles.

Run one testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/xt_pkg.sv tb/tb_xt_bus_system.sv --top-module tb_xt_bus_system -o sim
./obj_dir/sim
```

Replace `tb_xt_bus_system` with any other `tb_*` module. All testbenches finish
in under a second of simulation time.

## Where this RTL goes beyond or departs from the scheme

* **Input handshake and segment queue.** The scheme says only that segments
  that do not fit move to the next cycle. The 2N-entry queue, the ready rule
  and the registered bus outputs are this RTL's choices. The queue adds
  storage beyond the 128 bits the scheme counts for the data registers.
* **Select logic.** The scheme gives the inputs and outputs of the per-channel
  select logic and multiplexers but not their insides. The in-order chain here
  is the simplest logic that reproduces its shifting rule. The
  distinction-wire multiplexer is driven from the select result, which gives
  the same value as driving it from the detectors.
* **Idle channels.** Channels with no segment to send carry NOP segments.
* **Assembler.** Its outputs are registered, giving one cycle of latency.
  Within an instruction the first segment is the most significant.
* **Prefetch buffer.** Its depth, pointer structure and `fetch_en` flow
  control are not specified by the scheme.
* **Switching activity.** The scheme reports fewer total toggles than a plain
  bus. On the synthetic full-rate stream of `tb_xt_workload` this RTL shows
  more transitions than a plain bus (about 1.46 times its coupling plus
  transition toggles), with no coupling toggles. The difference comes from
  NOP insertion on a stream that conflicts often. Real instruction traces
  were not available to compare against.
* **Not modelled.**
  * The wires' analog delay.
  * The memory array and the processor core.
  * A separate bus for writes: the data-bus test covers the read direction
    only.
