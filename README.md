# Direct-encode priority encoder for CAM match lines

A content-addressable memory compares a search key with every stored word at
once. Several words may match, and the memory must report the address of the
one with the highest priority (here: the lowest address). That job falls to a
priority encoder with one input per word. The encoder sits on the critical
path of every search, so its latency sets how fast the CAM can answer.

The usual encoder works in two steps. First a resolver turns the match vector
into a one-hot vector. Then a plain encoder turns that vector into a binary
address. The design here does both at once. A tree of small 4-input encoders
produces address bits directly, and "look-ahead" signals (does anything below
this node match?) pick which subtree's bits reach the output. The RTL
describes one 256-input sub-block encoder, `pe256`. In a full CAM, many of
these sit beside the cell arrays and feed a chip-level encoder.

## The trick: a 4-to-2 encoder that may be wrong

Every node of the tree uses the same 4-to-2 gate (`pe_enc4to2`). Input 0 has
the highest priority:

    a[1] = ~in[0] & ~in[1]
    a[0] = ~in[0] & (in[1] | ~in[2])

| in[3:0] (x = any) | a |
|-------------------|---|
| `xxx1`            | 0 |
| `xx10`            | 1 |
| `x100`            | 2 |
| `1000`            | 3 |
| `0000`            | 3 (wrong, no match) |

The gate never looks at `in[3]`. It assumes at least one input is 1, so it
cannot tell "only input 3" from "nothing". That is safe because of how the
level above chooses. It only takes bits from a child whose look-ahead says
that child has a match. A child with no match may put any value on its
outputs, and nobody reads it. This simplification keeps each gate small and
lightly loaded. The same rule holds at every level, including the top one.
When `match` is 0, `addr` is meaningless (it reads all ones).

## The tree

Four levels of fan-in four give 4^4 = 256 inputs and 8 address bits:

    level 1  ml[4g+3:4g] ──► pe_enc4to2 ──► 2 bits per group of 4 lines
    level 2  4 groups    ──► pe_level   ──► 4 bits per 16-line block (pe16)
    level 3  4 blocks    ──► pe_level   ──► 6 bits per 64 lines
    level 4  4 × 64      ──► pe_level   ──► 8 bits, addr[7:0]

A level (`pe_level`) receives, from each of its four children, a look-ahead
bit `la[i]` and the child's address `a_low[i]`. It does two things with them:

* it encodes the four look-ahead bits with the same simplified 4-to-2 gate.
  That gives the two new high address bits, which say which child wins.
* it lets those look-ahead bits arbitrate a shared bus (`pe_tri_bus`). Only
  the winning child drives its low address bits onto the bus. Enable `i` is
  on when `la[i]` is 1 and no lower-numbered `la` is 1. Enable 3 is on when
  `la[0..2]` are all 0, so exactly one enable is always on. An assertion
  checks that the enables are one-hot.

In silicon, the bus is a wire driven by tri-state inverters. Here it is an
AND-OR multiplexer with one-hot selects, which gives the same result without
internal tri-states. All signals are active high. The inversions of the real
drivers are not modelled.

The output address is therefore `{winner at level 4, winner at level 3,
winner at level 2, 4-to-2 result of the winning group}`. The only "resolve"
work is the short look-ahead chain that picks one child per level.

## The look-ahead path: domino and set-dominant latch

The look-ahead signals decide every selection, so they are the fast path. In
the circuit they are the only dynamic (domino) logic. The address bits are
static CMOS. The RTL models that split logically:

* `pe_wired_or`: a precharged wired-OR node, one pull-down per input, with no
  foot transistor. Its value is `node_n = ~(eval & |in)`. It is high during
  precharge (`eval = 0`) and falls during evaluation when any input is 1.
* `pe_la_sdl`: each 16-line block splits its lines over two wired-OR nodes of
  eight. The two nodes are merged into the dynamic look-ahead `la_dyn`
  (1 = some match). `la_dyn` returns to 0 in every precharge.
* In the same module, a set-dominant latch (SDL) turns `la_dyn` into
  `la_static`, which feeds the static gates. The latch is transparent while
  `eval` is 1 and holds while `eval` is 0. So precharging the domino node does
  not make the static logic downstream toggle again. This latch is
  intentional. It is the only storage in the design.
* Levels 3 and 4 build their look-ahead the same way. They take a domino OR of
  the four children's `la_dyn` and add their own SDL (`pe_la_sdl` with
  `W = 4`). Inside a 16-line block, the four group look-aheads that steer the
  level-2 bus are plain static ORs of four lines.

## Interface and timing of `pe256`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `eval`      | in  | 1     | domino clock (the latch's delayed clock): 1 = evaluate, 0 = precharge |
| `ml`        | in  | 256   | match lines, `ml[0]` highest priority |
| `addr`      | out | 8     | index of the lowest-numbered set line; valid when `match` = 1 |
| `match`     | out | 1     | some line is set; latched, holds through precharge |
| `match_dyn` | out | 1     | same, dynamic: 0 during precharge |

An operation takes one `eval` cycle:

1. Apply `ml` while `eval` is 0.
2. Raise `eval`. `addr`, `match` and `match_dyn` become valid within the same
   evaluate phase. The RTL has no clock-cycle latency.
3. Lower `eval`. `match_dyn` falls. `match` keeps its value even if `ml`
   already changes for the next search. `addr` is static logic and follows
   `ml`.

There is no reset. The latches are rewritten in every evaluate phase. The
tree is purely combinational and could be pipelined between levels, but no
pipeline registers are included.

## Modules

| file | role |
|------|------|
| `rtl/pe256.sv`      | top: 16 × `pe16` plus levels 3..`LEVELS` of `pe_level` and `pe_la_sdl` |
| `rtl/pe16.sv`       | 16-to-4 block: four `pe_enc4to2`, one `pe_level`, one `pe_la_sdl` |
| `rtl/pe_level.sv`   | one tree level: 4-to-2 encoding of look-aheads plus the bus |
| `rtl/pe_tri_bus.sv` | look-ahead arbitration of four drivers and the shared bus |
| `rtl/pe_enc4to2.sv` | simplified 4-to-2 priority encoder |
| `rtl/pe_la_sdl.sv`  | split-node domino look-ahead with set-dominant latch |
| `rtl/pe_wired_or.sv`| precharged wired-OR node (logic value only) |
| `rtl/pe_pkg.sv`     | shared sizes |

`pe256` has one parameter, `LEVELS` (default 4). It gives 4^LEVELS inputs and
2·LEVELS address bits. `LEVELS` must be at least 2, because the bottom of the
tree is built from 16-line blocks.

## What is modelled and what is not

The RTL captures the logic function and the structure of the encoder: the
simplified equations, the four-level fan-in-4 tree, look-ahead arbitration of
a shared bus at every level, the domino look-ahead split into two wired-OR
nodes of eight, and a latch as the dynamic-to-static interface. These choices
are this implementation's own:

* the bus is a multiplexer instead of tri-state inverters, and polarities are
  positive throughout;
* one `eval` input stands for both the domino clock and the latch's delayed
  clock;
* the enable equations of the bus drivers, and the group-match ORs inside the
  16-line block;
* the upper-level look-ahead, built as domino OR plus latch like the 16-line
  block's.

Left out: the match-line sense amplifiers (`ml` are their digital outputs),
the CAM arrays and their peripheral circuits, and the chip-level encoder that
would merge many 256-input blocks. Its size and interface are not defined
here; it would take `addr` and `match` from each block. Electrical behaviour
is outside RTL: delay (about 1.2–1.6 ns for the 256-input encoder in the
original transistor-level design), energy, precharge timing and keepers.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against an independent reference (a scan for the first set bit, or a direct
formula), has a watchdog, and ends with a `TB_RESULT checks=N failures=M`
line.

* `tb_pe_enc4to2`: all 16 inputs, including the all-zero case (must give 3).
* `tb_pe_tri_bus`, `tb_pe_level`: all look-ahead patterns with random data.
* `tb_pe_wired_or`, `tb_pe_la_sdl`: precharge and evaluate behaviour, an input
  that rises late during evaluation, and the latch holding through precharge
  while the inputs change.
* `tb_pe16`: all single-line patterns, plus random patterns of varied
  density.
* `tb_pe256`: the full 256-input design with default parameters. It runs all
  256 single-line patterns, none, all, and 3000 random patterns whose density
  ranges from one line in four to one line in 1024. In each evaluate phase it
  checks `addr`, `match` and `match_dyn`. In each precharge it checks that
  `match` holds and `match_dyn` is low. It counts, and requires at least one
  of each: searches with several matches, searches with no match, latch holds,
  and, at each of the four levels, winners that are not in the level's first
  child (so an empty child with a wrong 4-to-2 value had to be skipped).
* `tb_pe256_sizes`: the same tree at `LEVELS` = 2, 3 and 5 (16, 64 and 1024
  lines), with every single-line pattern and random patterns.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

    verilator --binary --timing --assert -Irtl -Itb rtl/pe_pkg.sv tb/tb_pe256.sv \
        --top-module tb_pe256 -Mdir obj_pe256
    ./obj_pe256/Vtb_pe256

Replace `pe256` with any other module name to run its testbench. Each run
takes well under a second. `verilator --lint-only -Wall` reports two known
kinds of warning:

* signals that are unused by design: `in[3]` of the 4-to-2 gate, `la[3]` of
  the bus arbiter, and the enable vector inside `pe_level`;
* a "no latch detected" note on the set-dominant latch when it is inlined into
  larger blocks. The latch is real, and the tests check that it holds.

Synthesis infers the intended latches. It keeps 16 of the 21 written for the
256-input encoder. No level reads the static look-ahead of its last child, so
those five latches have no load and are removed. What remains is 12 in the
16-line blocks, 3 at level 3, and the one at level 4 that drives `match`.
