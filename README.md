# Associative-memory pattern-recognition board

This RTL describes a board that finds candidate particle tracks by
*associative memory*. Tracking detectors are divided into layers. Each layer
is cut into coarse bins called superstrips. A **pattern** is a list of one
superstrip per layer, the path a real track could take. The board stores about
a million such patterns in 128 associative memory chips. Every detector hit
that enters the board goes to all patterns at the same time. A pattern that
finds hits in enough of its layers is a **road**. The board sends the road's
address back out, so that later stages can fetch the full-resolution hits and
fit the track.

Searching all patterns in parallel turns the combinatorial track search into
a linear, data-driven process. The cost of a hit is one clock cycle, however
many patterns it touches.

The design follows the architecture of the AMBFTK board and its AMchip04 test
chip, built for the ATLAS FastTracker (FTK) trigger. The sizes are those of
that prototype: 8 layers, 18-bit layer words and 8000 patterns per chip. There
are 32 chips on each of 4 LAMB mezzanines, 12 input links and 16 output links.
The published description gives the block structure and these numbers, but
not the protocols. Event framing, word formats, handshakes, arbitration and
latencies are this design's own choices. Each is marked as such below and in
the header comment of its file.

## Hierarchy

```
ambftk                         board top
├── input_fifo      x12        one per input link, also writable by VME
├── hit_distributor            event sequencer, hit fan-out to all chips
└── lamb            x4         local associative memory board
    ├── am_chip     x32        one associative memory chip
    │   ├── am_bank            pattern array + per-layer match flip-flops
    │   ├── majority           matched-layer count >= threshold
    │   └── fischer_tree       readout of fired patterns, one per cycle
    └── road_collector x4      merges the roads of 8 chips onto one output link
am_pkg                         shared constants and types
```

## Inside one chip

The chip is the core of the design.

**Pattern array (`am_bank`).** Each of the `NPATT` patterns stores one 18-bit
word per layer. There are 8 layer buses, one per detector layer. In every
cycle, the word on each bus that carries a hit is compared with that layer's
word in every pattern. An equal word sets the pattern's flip-flop for that
layer. The flip-flops only ever get set during an event, so the order of the
hits does not matter: a pattern remembers which of its layers have been seen.
`init` clears all the flip-flops at the start of an event. A pattern also has
a *loaded* flag, cleared by reset and set when the pattern is written. An
unwritten pattern can never match.

In the silicon, each layer word is a row of 18 full-custom CAM cells (4
NAND-type and 14 NOR-type) with a set/reset latch on the match line. Here it
is the equality compare plus the flip-flop that this circuit computes.

**Majority (`majority`).** For each pattern, the 8 layer flip-flops are
counted. The pattern *fires* when the count reaches `threshold`, the required
number of layers. A threshold of 0 fires nothing. The threshold is an input
and should be held constant during an event.

**Readout (`fischer_tree`).** The chip reads fired patterns out through a
binary tree. This follows the Fischer-tree readout of the original chip; the
modified form used there is not published, so the tree here is a plain one.

A pattern is *waiting* when it has fired and has not yet been read in this
event. The waiting flags are the leaves of a binary OR tree, padded to 8192
leaves. Starting at the root, the search goes to the left child whenever that
subtree has a waiting leaf, which finds the lowest waiting address in 13
steps. That address is loaded into the output register, and its read flag is
set in the same cycle. Each road therefore comes out once per event, and a
backlog drains at one road per cycle.

Roads can leave while hits are still arriving. The first road of an event can
therefore have a higher address than later ones. Roads that are waiting
together come out in ascending order.

**Chip timing.** Suppose a hit on the bus in cycle *t* completes a pattern.
The layer flip-flop is set at the end of cycle *t*, the pattern fires in
cycle *t+1*, and its address is in the output register (`road_valid`) in
cycle *t+2*. `busy` is high while any fired road is unread.

## The board

### Link words

Each serial link runs at 2 Gbit/s, which is a 20-bit word at 100 MHz: 16 data
bits and 4 redundancy bits. The transceivers are outside this RTL. The ports
carry the decoded word as `am_pkg::link_word_t`:

| field  | bits | meaning |
|--------|------|---------|
| `ctrl` | 1    | control word (stands for the link's control characters) |
| `data` | 16   | hit superstrip, road word, or control code |

The control word `ctrl=1, data=16'hE0E0` is the **end-of-event (EOE)** marker.
Other control words on the hit links are discarded.

### Input side

- There are 12 input links. Each writes into its own `input_fifo` (512 words
  by default).
- A VME write port (`vme_wr`, `vme_link`, `vme_word`) can download words into
  any FIFO, so hits can be injected without the links.
- A link cannot be throttled. A word that finds its FIFO full is dropped, and
  the sticky `fifo_overflow` bit of that link is set.
- If a link word and a VME word arrive at the same FIFO in the same cycle,
  the link word is kept and the collision also sets `fifo_overflow`.
- Links 0 to 7 carry the hits of layers 0 to 7. The 16-bit hit is
  zero-extended to the 18-bit layer word, so bits 17:16 of stored pattern
  words must be 0 for a match.
- Links 8 to 11 are buffered only. Their words are offered on the `aux_*`
  valid/ready ports. On the original board these four links are routed
  separately from the eight hit links, and their use is not documented.

### Event sequencing (`hit_distributor`)

An event is the hits of every layer up to that layer's EOE word. The
distributor cycles through four states:

1. **INIT**: one-cycle `init` to every chip, which clears the match
   flip-flops and readout flags.
2. **RUN**: each cycle, every layer that has not yet reached its EOE pops one
   word and drives it, registered, onto its layer bus. The bus goes to all 128
   chips. The layers are independent: a layer with few hits stops early and
   the others keep going.
3. **DRAIN**: after the last layer's EOE, the distributor waits 4 cycles. By
   then the last hits have set their flip-flops and every chip with unread
   roads shows `busy`.
4. **END**: `event_end` stays high until every output link has sent its EOE.
   The distributor then counts the event in `events_done` and returns to
   INIT.

Words of the next event can already wait in the FIFOs. Events do not overlap
inside the chips.

### Road collection (`lamb`, `road_collector`)

- A LAMB holds 32 chips on shared layer buses. Its chips are split into 4
  groups of 8, and each group has a `road_collector` driving one output link.
- Board output link `4*L + g` carries group `g` of LAMB `L`.
- The collector serves its chips round-robin. Each road becomes one word:
  `data = {chip index within the group [2:0], pattern address [12:0]}`. At the
  default sizes this fills the 16 data bits exactly.
- After `event_end`, once no chip in its group is busy, the collector sends
  one EOE word and raises `done`.
- The output is a registered valid/ready port (`out_valid`, `out_word`,
  `out_ready`). It carries one word per cycle while `out_ready` is high.

**Board latency.** A hit that leaves an input FIFO reaches the chips one
cycle later. A road it completes appears on the output link three cycles
after that. A hit that arrives on a link needs one more cycle, to pass
through its FIFO.

### Pattern loading

The published description says only that the patterns are preloaded. This
design adds a direct write port for one pattern per cycle: `pat_wr`,
`pat_lamb`, `pat_chip`, `pat_addr` and `pat_data`, where `pat_data` holds the
8 layer words.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `am_pkg` | `NLAYER` | 8 | AMchip04 layer count |
| `am_pkg` | `SS_W` | 18 | 18 CAM cells per layer word |
| `am_pkg` | `NPATT_CHIP` | 8000 | AMchip04 pattern count |
| `am_pkg` | `LINK_DATA_W` | 16 | data bits per link word |
| `ambftk` | `NIN` | 12 | input links |
| `ambftk` | `NLAMB`, `OUT_PER_LAMB`, `CHIPS_PER_LAMB` | 4, 4, 32 | board layout (16 output links) |
| `ambftk` | `FIFO_DEPTH` | 512 | this design's choice |
| `hit_distributor` | `DRAIN` | 4 | this design's choice (must be at least 2) |

The final chip was to hold about 80,000 patterns, or 10 million per board.
Setting `NPATT=80000` gives that size. The road word then needs 17 + 3 bits,
more than a link word carries, and an elaboration-time assertion in
`road_collector` reports it. A different road format would be needed.

## Departures and limits

- **Storage as flip-flops.** The pattern array is written as an ordinary
  array with parallel compare, so synthesis produces about 1.15 Mbit of
  registers and 64,000 comparators per chip. The real chip uses full-custom
  CAM cells with current-race and selective-precharge match lines. This RTL
  models their function, not their circuits, area or power.
- **No ternary or variable-resolution bits.** The AMchip04 has further
  functional elements that are not described in detail. All 18 bits of a layer
  word compare exactly.
- **Not modelled:** the serial transceivers and the coding of their 4
  redundancy bits; the VME slave, which is replaced by a plain write port; the
  high-speed connector and auxiliary board; and power regulation.
- **Timing closure** at 100 MHz has not been evaluated. The `majority` and
  `fischer_tree` stages are combinational across all 8000 patterns, with no
  pipelining.

## Simulation

Every testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. To build and run
one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/am_pkg.sv tb/tb_ambftk.sv --top-module tb_ambftk -Mdir obj_tb_ambftk
./obj_tb_ambftk/Vtb_ambftk
```

| testbench | what it checks |
|---|---|
| `tb_am_bank` | every layer flip-flop against a reference model, over random hits; init; unloaded patterns |
| `tb_majority` | every threshold 0 to 8 against a popcount |
| `tb_fischer_tree` | ascending, unique readout; one per cycle; back-pressure; late-firing patterns |
| `tb_am_chip` | roads of random events against a model; 2-cycle latency; 1 road/cycle drain |
| `tb_am_chip_8k` | full 8000-pattern chip: 4000 single-pattern events, then 4000 roads in one event read in 4000 cycles |
| `tb_input_fifo` | ordering, link/VME writes, overflow on full and on collision |
| `tb_hit_distributor` | hit order and event membership, discarded control words, EOE handling, coll_done handshake |
| `tb_road_collector` | road words, round-robin order, EOE held back by busy chips, back-pressure |
| `tb_lamb` | per-link roads of a reduced LAMB against a model; 3-cycle latency |
| `tb_ambftk` | reduced board end to end (2 LAMBs of 4 chips, 32 patterns each). Events arrive over the links and over VME, with random output stalls, 7-of-8-layer roads, several roads per chip and roads merged from several chips; an aux link is read and overflowed. Each of these is counted and must occur. |
| `tb_ambftk_full` | the board at full default size (128 chips x 8000 patterns): two events, roads checked on all 16 links |

The full-size testbench compiles in under a minute and runs in about a
second, because the array compare is only evaluated in cycles that carry
hits.
