# Fast-search anti-collision for RFID passive tags: reader-side RTL

When a reader talks to several passive tags at once, their replies collide. In
this scheme a frame slot is split into four minislots, so in one *read cycle*
four tags answer at the same time, each on its own link. The reader then
has to do two things before the next read cycle arrives:

1. **Throw away corrupted replies.** Each reply carries a CRC-16. A reply
   whose CRC does not match leaves an empty (zero) slot.
2. **Identify the four tags in a fixed order, in one step.** A binary-tree
   search normally takes one query per tree level. Here the tree has only four
   leaves, so the whole decision fits in one clock. Six comparators address a
   small lookup table. The table gives the order of the four IDs, smallest
   first. The identified tags are then sent out one per system clock, and each
   is killed (silenced) in the same clock.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, in a single clock
domain.

## Block structure

```
anticollision_top
├── tag_clock_gen        read-cycle tick: 1 system clock in TAG_DIV (4)
├── first_subsystem      error detection, 4 links in parallel
│   ├── crc_remover      input register: {status, ID} | CRC split
│   ├── crc_checker  x4  recompute CRC-16, compare, set status bit
│   └── status_checker x4  slot = ID, or 0 on error
└── second_subsystem     identification
    ├── fast_search      6 comparators -> 64-entry order table -> word muxes
    └── read_kill        serialise 4 tags, 1 per clock, with kill word
```

`anticol_pkg` holds the sizes and the CRC function. Each file in `rtl/` has one
module and starts with a comment giving its interface and timing.

## Message format and CRC

A received message is 33 bits wide:

| bits    | field      | meaning                                        |
|---------|------------|------------------------------------------------|
| [32]    | status bit | sent as 0                                      |
| [31:16] | tag ID     | 16 bits                                        |
| [15:0]  | CRC        | CRC-16 of bits [32:16]                         |

The CRC uses the generator x^16 + x^12 + x^5 + 1 (0x1021) with preset 0x0000.
It is computed MSB first, with no reflection and no final inversion (the
"XMODEM" variant). Because the preset is zero, the leading zero status bit
does not change it. Some reference values:

| ID   | message     | CRC  |
|------|-------------|------|
| 00C8 | 0_00C8_5844 | 5844 |
| 0005 | 0_0005_50A5 | 50A5 |
| 0010 | 0_0010_1231 | 1231 |
| EA60 | 0_EA60_93DF | 93DF |
| 0014 | 0_0014_52B5 | 52B5 |

`crc_checker` unrolls the bit-serial XOR/shift recurrence into one
combinational XOR network. This lets all four links be checked in the same
clock. On a mismatch the status bit becomes 1. `status_checker` then replaces
the slot with zero and strips the status bit. The inverted status bit travels
on as a per-slot `ok` flag. This lets the output stage tell an emptied slot
from a real tag whose ID happens to be 0000.

## The fast-search lookup table

`fast_search` is the core of the design. For every pair of slots (i, j) with
i < j, a full-width comparator gives one decision bit, `in_id[i] > in_id[j]`.
A set bit means slot j goes before slot i. With four slots that makes six bits:

| bit | 0     | 1     | 2     | 3     | 4     | 5     |
|-----|-------|-------|-------|-------|-------|-------|
| pair| (0,1) | (0,2) | (0,3) | (1,2) | (1,3) | (2,3) |

The six bits address a 64-entry table. Each entry holds four 2-bit slot
numbers: the slot of rank 0 (smallest) up to rank 3. Four 16-bit multiplexers
then pick whole IDs out of the slots. The ID width only affects the
comparators and the multiplexers, not the number of steps. Everything is
registered once, so the sorted result (`dataout`) appears one clock after the
slots are presented.

The table is not stored as data. It is computed during elaboration
(`build_table`). For each address and each slot i, the rank of i is the number
of slots that go before it:

    rank(i) = #{ j < i : bit(j,i) = 0 } + #{ j > i : bit(i,j) = 1 }

The entry then gets `order[rank(i)] = i`. Only 24 of the 64 addresses are
orderings that a set of IDs can produce. The other 40 are cyclic (a > b > c > a)
and can never occur; they hold whatever the formula gives. Equal IDs produce a
0 decision bit, so ties keep slot order (the lower slot first). Emptied slots
are the value zero, so they sort first. The `ok` flags follow their IDs through
the same multiplexers.

The module takes `NS` (2 to 6 slots) as a parameter and builds a table of
2^(NS(NS-1)/2) entries. Four slots is the configuration the scheme is built
around.

## Read-cycle timing

There is one clock, the system clock. The tag clock, which marks one read
cycle, is a one-cycle tick from `tag_clock_gen` every `TAG_DIV` system clocks.
The tick appears on `msg_ready`. The four messages are sampled at a rising
edge where `msg_ready` and `msg_valid` are both high. A tick with `msg_valid`
low is an idle read cycle and starts nothing.

Counting edges from the sampling edge E:

| edge   | what becomes visible                                    |
|--------|---------------------------------------------------------|
| E      | packets and received CRCs registered (`crc_remover`)    |
| E+1    | `active`, `active_ok`, `active_valid` pulse             |
| E+2    | `dataout` (sorted), `dataout_ok`, `dataout_valid` pulse |
| E+3..6 | `tag_out` / `tag_kill`, one tag per edge, smallest first|

`read_kill` sends the first tag at the edge that loads it, and `busy` covers
the other three. With `TAG_DIV` = 4 = number of slots, consecutive read
cycles therefore give an unbroken stream of one tag per clock. `TAG_DIV` must
be at least `NS`. The top checks this with an elaboration-time assertion, and
`read_kill` checks with a concurrent assertion that no read cycle is loaded
while tags are still waiting.

`tag_kill` is 17 bits: `{kill, ID}`, for example `1_0005` for tag 0005. The kill
bit is 0 for a slot emptied by a CRC error, so no tag is killed for it. Such a
slot still takes its place in the stream (as ID 0000) and keeps the timing
fixed.

## Top-level ports

| port                  | dir | width   | meaning                                   |
|-----------------------|-----|---------|-------------------------------------------|
| `clk`, `rst_n`        | in  | 1       | system clock, synchronous active-low reset|
| `msg[4]`              | in  | 33 each | received messages of the four links       |
| `msg_valid`           | in  | 1       | `msg` holds a read cycle                  |
| `msg_ready`           | out | 1       | tag clock tick: `msg` is sampled now      |
| `calc_crc[4]`         | out | 16 each | recalculated CRCs (observation)           |
| `pkt_chk[4]`          | out | 17 each | packets with updated status bit (obs.)    |
| `active[4]`, `active_ok`, `active_valid` | out | 16 each, 4, 1 | checked slots |
| `dataout[4]`, `dataout_ok`, `dataout_valid` | out | 16 each, 4, 1 | sorted slots |
| `tag_busy`            | out | 1       | tags of the read cycle still waiting      |
| `tag_out`, `tag_out_valid` | out | 16, 1 | identified tag, one per clock         |
| `tag_kill`            | out | 17      | `{kill, ID}` sent to the tags             |

The intermediate results are outputs so that each stage can be watched. A
build for a device would leave them unconnected.

Parameters of `anticollision_top`: `NS` = 4 (slots per read cycle), `IDW` = 16
(ID width), `TAG_DIV` = 4 (system clocks per read cycle). The CRC width is
fixed at 16, and the CRC function handles packets up to 64 bits.

## Where this RTL makes its own choices

The scheme fixes the following: the four-slot read cycle, the 16-bit ID, the
CRC-16 check, the status bit, emptied slots set to zero, ascending order
through a lookup table and word-wide multiplexing in one read cycle, and
serial output at one tag per clock with the kill in the same clock. The
following are choices of this implementation:

- **One clock domain.** The tag clock is a clock-enable tick with a 4:1 ratio.
  The original scheme hands the sorted tags over on the falling edge of a
  separate tag clock. Here every register uses the rising system-clock edge,
  and the hand-over takes one system clock.
- **Parallel links with a valid/ready handshake.** All four messages are
  presented at once, and they are sampled only on the tick.
- **Pipeline depth.** There are three register stages before the serial
  output.
- **Internals of the fast search.** The comparator addressing, the table
  contents and the tie rule are this design's.
- **CRC details.** The status bit is set to 1 on a CRC mismatch. The CRC covers
  the status bit too. The polynomial and preset are the ones that reproduce
  the reference values above.
- **Valid flags.** The `ok`/`kill` flag is the design's own, and so is
  `tag_out_valid`.
- **Not in the RTL.** The radio link is not part of it: powering the tags, the
  reader's Reset and frame commands, the tags' contention for minislots, and
  the frame returned column by column. The design starts at the decoded
  messages.

The original implementation was reported on a Spartan-3E (xc3s500e-4) at
261 MHz, using 100 bonded I/Os. That I/O count implies a narrower external
interface than four parallel 33-bit messages, and that interface is not
reproduced. This top has 441 port bits. Only 170 of them are functional:
messages, control, and the serial output. Coarse generic synthesis gives
about 314 flip-flops. Timing on a device has not been evaluated.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare
against reference models in `tb/anticol_tb_pkg.sv`. The CRC model there is
plain polynomial long division, and the sort model is an insertion sort.

| testbench               | what it covers                                               |
|-------------------------|--------------------------------------------------------------|
| `crc_checker_tb`        | reference CRC values, random packets, random single-bit errors |
| `status_checker_tb`     | slot zeroing and `ok` flag                                   |
| `crc_remover_tb`        | field split, capture/hold, `pkt_valid`                       |
| `first_subsystem_tb`    | 300 read cycles with corrupted messages, 2-clock latency     |
| `fast_search_tb`        | all 24 orderings, ties, zero slots, random IDs               |
| `read_kill_tb`          | serial order, kill word, back-to-back and gapped loads       |
| `second_subsystem_tb`   | sort + serialise, latencies                                  |
| `tag_clock_gen_tb`      | tick period and phase after reset                            |
| `anticollision_top_tb`  | end to end at default parameters, 400 read cycles, some idle |

`anticollision_top_tb` starts with two reference read cycles:

- 00C8, 0005, 0010, EA60, which must come out as 0005, 0010, 00C8, EA60;
- 00D0, 0006, 0014, EA6C.

Random read cycles follow. The testbench checks every stage (CRCs, status
bits, slots, sorted IDs, serial tags) against the
reference at the exact edge given in the timing table. It also counts each
mechanism and fails if any of them never happened: CRC error, reordering,
equal IDs, idle read cycle, back-to-back read cycles, and kill issued.

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To run one
with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv rtl/anticol_pkg.sv tb/anticol_tb_pkg.sv \
  tb/anticollision_top_tb.sv --top-module anticollision_top_tb -o sim
./obj_dir/sim
```

Replace `anticollision_top_tb` with any other testbench name; `-y` lets Verilator
find the modules by file name. Every run takes well under a second.
