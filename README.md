# Fast bitmap Aho-Corasick string matching engine

This engine scans a byte stream for many patterns at once, as intrusion
detection and anti-virus software must. It walks an Aho-Corasick (AC)
automaton. To save memory, each state stores its goto edges as a 256-bit
*bitmap* plus one pointer, not 256 pointers ("bitmap AC"). The cost is that
finding the child for byte `c` means counting the ones below bit `c`, which
is slow. Two shortcuts avoid that count most of the time:

* **Root indexing.** Most steps of an AC automaton start at, or fall back
  to, the root. At the root the engine consumes **two bytes per lookup**
  through small index tables and a root `NEXT` table.
* **Pre-hashing.** Every non-root state has a 32-bit *bit vector* that
  summarises which bytes could keep the automaton off the root. One cycle
  tells whether the next byte certainly sends the automaton back to the root
  ("no hit"). If so, the root-index lookup, started in parallel, supplies the
  next state. Only on a "hit" does the 8-cycle bitmap step run.

The architecture is the one of the thesis *Automaton Based String Matching
Hardware with Root-Indexing and Pre-Hashing Techniques: Design,
Implementation and Evaluation* (internal-SRAM version, one or two engines). The
register map, bus, buffer sizes and some corner-case behaviour are this
implementation's own. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Blocks

```
            bus (addr/data/we/re), irq
                     |
             +---------------+  control, root_state, no_text, ...   +---------+
             | sm_controller |------------------------------------->| sm_fsm  |
             | regs, 2 text  |<-------------------------------------|         |
             | bufs, 2 result|   fetch, commit, upd                 +---------+
             | bufs, state   |                                 en |   ^ over/hit/failure
             | tables, cur   |  c0,c1 (data), cur_state            v   |
             | state         |------+-------------+-----------------+---------+
             +---------------+      |             |                 |
                ^   ^   bitmap      v             v                 v
   ri_next -----+   |        root_indexing   pre_hashing       bitmap_ac
   (state#)         |        IDX1/IDX2/NEXT  bit vectors       popcount
   ac_offset -------+-------------------------------------------- offset
```

| File | Role |
|---|---|
| `rtl/sm_pkg.sv` | state type, FSM state and update enums, bus map, state-record layout |
| `rtl/root_indexing_unit.sv` | two-byte root lookup, index mode (2 cycles) or direct mode (1 cycle) |
| `rtl/pre_hashing_unit.sv` | per-state bit vectors and the 1-cycle hit / no-hit test |
| `rtl/bitmap_ac_unit.sv` | bitmap check, then a count of ones below the byte over 8 cycles |
| `rtl/sm_fsm.sv` | control FSM (IDLE, FETCH, MATCH, ROOT_MATCH, SET_ROOT_IDX, AC_MATCH, SET_AC) |
| `rtl/sm_controller.sv` | bus slave, buffers, automaton tables, current state, match recording |
| `rtl/fast_bitmap_ac_top.sv` | the engine: the five blocks wired together |
| `rtl/sm_dual_engine.sv` | top level: two engines with common tables behind one bus |

## The automaton in memory

All tables are built offline from the pattern set and written over the bus.
`tb/ac_ref_pkg.sv` contains a complete builder that shows every rule.

**State record** (controller, one per state, 11 bus words at
`{state, word}`):

| word | content |
|---|---|
| 0..7 | 256-bit bitmap: bit `c` set when the state has a goto edge on byte `c` (word 0 = bits 31:0) |
| 8 | base: index in the next-state table of this state's first child |
| 9 | failure state |
| 10 | bit 31 = match flag, bits 15:0 = matched pointer (pattern id reported on a match) |

**Next-state table** (controller): the children of each state, stored
contiguously in byte order. The child on byte `c` is at
`base + popcount(bitmap[c-1:0])`.

**Root index tables** (root-indexing unit):

* `IDX1[b]`: 0 if no pattern starts with `b`, otherwise the rank of `b`
  (1, 2, ...) among the bytes that start a pattern.
* `IDX2[b]`: the same ranking over the bytes that appear at position 1 *or*
  position 2 of a pattern. The second table must include the entries of the
  first: after a first byte that leads nowhere, the second byte may itself
  start a pattern.
* `NEXT[{IDX1[b0], IDX2[b1]}]` = the AC state reached from the root after
  `b0 b1`. In **direct mode** the table is addressed by `{b0, b1}` itself.
  That suits a root with many children, skips the IDX step and saves a
  cycle. The two modes need different `NEXT` contents. With 8-bit codes the
  table has 65,536 entries of 16 bits in both modes.

Example with patterns TEST, THE and HE: `IDX1` gives H=1, T=2; `IDX2` gives
E=1, H=2, T=3. `NEXT[{2,1}]` ("TE") = state 2, `NEXT[{2,2}]` ("TH") = 5 and
`NEXT[{2,3}]` ("TT") = 1.

**Pre-hash bit vector** (pre-hashing unit, one per state): for the state and
every *non-root* state on its failure chain, each goto byte `c` sets bit
`c mod 32` (its low five bits, one-hot). A clear bit for the next byte
proves that no state on the chain has an edge on it, so the automaton returns
to the root before consuming it. Leaving the root out of the chain keeps the
vectors sparse. A set bit may be a false positive (for example `A` and `a`
share their low five bits), which costs time but never correctness.

## One matching step

The FSM starts every step in `MATCH` with the current state `s` and the next
two bytes `c0 c1`:

1. **`s` is the root:** launch the root-indexing unit only, then wait in
   `ROOT_MATCH`. `SET_ROOT_IDX` sets `s = NEXT(c0,c1)` and consumes 2 bytes.
2. **`s` is not the root:** launch all three units together. After one
   cycle the pre-hash answer arrives:
   * **no hit** → `ROOT_MATCH` → `SET_ROOT_IDX`, with the root lookup
     already in flight. The result is the state after `c0 c1` from the root.
     This is exact, because the no-hit proves that `c0` falls back to the
     root.
   * **hit** → `AC_MATCH`: wait for the bitmap unit.
     * goto edge found → `SET_AC`: `s = next[base + offset]`, consume 1 byte.
     * no edge, failure state not the root → `SET_AC`: `s = fail(s)`,
       consume nothing, back to `MATCH` (pre-hash again on the same byte).
     * no edge, failure state is the root → `SET_ROOT_IDX` with the
       root-index result: consume 2 bytes.

The worked example, patterns TEST/THE/HE over `TESTTHEUSHER`, runs as
`0 -TE-> 2 -S-> 3 -T-> 4 -TH-> 5 -E-> 6 -US-> 0 -HE-> 8 -R-> 0`. That is
eight steps for twelve bytes, against twelve for plain AC.

**One byte left.** A two-byte lookup is impossible on the last byte of a
buffer. At the root that byte goes through the bitmap unit with the root's
own bitmap; if the root has no edge on it, the state stays at the root.
Elsewhere, a no-hit (or a failure to the root) first moves the state to the
root without consuming the byte.

**Matches.** Whenever a step that consumed bytes lands on a state whose
match flag is set, the controller appends `{matched pointer, position of the
last byte}` to the result buffer of the text buffer being scanned. A state
whose output set holds several patterns (THE also contains HE) reports one
pointer. The table builder chooses which; the reference builder takes the
longest. A root-index step never lands on the state after its first byte,
so a **one-byte pattern** is missed when that byte is the first of a root
pair. Patterns of two or more bytes are always reported: after one byte
from the root the automaton is at depth ≤ 1.

## Timing

| Operation | Cycles |
|---|---|
| root-indexing unit, index mode (en → over) | 2 |
| root-indexing unit, direct mode | 1 |
| pre-hashing unit | 1 |
| bitmap AC unit, edge found | 8 (32 bits counted per cycle) |
| bitmap AC unit, no edge | 1 |
| FSM `MATCH` launch | 1 |
| FSM `SET_*` (commit, then `set_over`) | 2 |

So a root step costs 5 cycles per 2 bytes in index mode and 4 in direct mode.
A pre-hash no-hit step also costs 5: the root lookup starts in the same cycle
as the hash and is ready when the FSM enters `ROOT_MATCH`. A bitmap step that
finds an edge costs 11 cycles per byte, because the 8-cycle count starts in
the MATCH cycle and is followed by the 2 SET cycles. The thesis's
throughput estimates (3.52 Gb/s best case at 220 MHz with two engines) count
only the 2-cycle root lookup and the 8-cycle bitmap step. The FSM overhead
above comes on top. At the same 220 MHz, the two engines of this RTL would reach
1.41 Gb/s on pattern-free text in index mode and 1.76 Gb/s in direct mode.
Removing the overhead would need the SET states folded into the
wait states, which this RTL does not do.

## Controller, buffers and the bus

Word-addressed bus: `bus_addr[23:20]` selects a region and `bus_addr[19:0]`
is the word offset. Writes take effect on the clock edge where `bus_we` is
high. Read data appears on `bus_rdata` the cycle after `bus_re`.

| Region | Content |
|---|---|
| 0 | registers (below) |
| 1, 2 | text buffer 0 / 1, 4 bytes per word, byte 0 in bits 7:0 |
| 3, 4 | result buffer 0 / 1 (read): `{pointer[15:0], position[15:0]}` |
| 5 | state records, offset `{state, word[3:0]}` |
| 6 | next-state table |
| 7, 8, 9 | root `IDX1`, `IDX2`, `NEXT` |
| 10 | pre-hash bit vectors, offset = state |

| Reg | Name | Meaning |
|---|---|---|
| 0 | CTRL | bit 0 enable, bit 1 direct root-index mode |
| 1, 2 | LEN0, LEN1 | bytes in text buffer 0 / 1 |
| 3 | TEXT_RDY | write 1 to mark a buffer ready (also clears its done bit); reads the ready bits |
| 4 | STATUS | bits 1:0 done (write 1 to clear), bits 3:2 result overflow |
| 5, 6 | MCOUNT0, MCOUNT1 | results stored for buffer 0 / 1 |
| 7 | STATE | current automaton state (read only) |

`irq` is high while any done bit is set. The two text buffers form a ping-pong
pair. While one is scanned, software fills the other and marks it ready.
The engine then takes the buffer after the one it scanned last. The automaton
state is *not* reset between buffers, so a pattern may span two buffers.
Starting a buffer clears its result count. A buffer with more than
`RES_DEPTH` matches keeps the first `RES_DEPTH` and sets its overflow bit.
All tables may be rewritten while the engine runs. A mode switch needs the
`NEXT` table reloaded first.

### Two engines

`sm_dual_engine` is the top level. It holds two engines, each with its own
registers, text buffers, result buffers and `irq` bit, so two independent
streams are scanned at the same time. In regions 0 to 4, bit 19 of the
address selects engine 0 or 1. A write to a table region (5 to 10) goes to
both engines, so their tables are always identical; these regions cannot be
read back through the top level. Each engine keeps its own copy of the
tables. The thesis instead shares one copy through the second port of the
dual-port RAMs. Behaviour is the same, at twice the table memory.

Host sequence: write the tables → write text and `LENx` → set `CTRL.enable`
→ write `TEXT_RDY` → on `irq` read `STATUS`, `MCOUNTx` and the results, then
clear the done bit.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `STATE_W` (package) | 16 | the thesis also gives a 32-bit variant |
| `NUM_STATES` | 4096 | automaton states; chosen to fit about 2.4 Mbit of block RAM together with the root `NEXT` table |
| `ACNEXT_DEPTH` | 4096 | next-state table entries (one per non-root state) |
| `BV_W` | 32 | pre-hash vector bits; 8 and 16 also work |
| `IDX_W` | 8 | root index code width (at most 8) |
| `TEXT_BYTES` | 2048 | bytes per text buffer |
| `RES_DEPTH` | 256 | results per result buffer |

The engine at its defaults holds 4096 states. That fits a few hundred
patterns of typical signature length, but not the 1000-signature anti-virus
set the thesis evaluates. Raise `NUM_STATES` and `ACNEXT_DEPTH` (up to
65,536 with 16-bit states) if memory allows.
The two-engine top level has the same parameters, passed to both engines.
It holds every memory twice, about 5.1 Mbit at the defaults.

## Departures and own choices

* The thesis doubles throughput with a second engine on the other port of
  the dual-port RAMs, and gives no further detail. Here the two engines hold
  private copies of the tables, written together, and the split of
  registers and buffers by address bit 19 is this implementation's own.
* The root lookup covers two bytes. One passage of the thesis mentions four
  bytes, but the unit description and the throughput figures use two.
* The pre-hash tests only the first of the two bytes. This is the single-byte
  suffix rule of the algorithm, and the only reading under which a no-hit is
  safe.
* The hash uses the low five bits for a 32-bit vector. The thesis describes
  the low four bits with a 16-bit vector.
* In the control-flow diagram the arcs back to MATCH also carry a `text_rdy=0`
  term. It is not implemented; waiting for text happens in FETCH.
* The single-byte tail, the commit/`set_over` handshake, the bus and register
  map, the result format, buffer sizes, asynchronous table reads in the
  controller, and carrying the state across buffers are all this
  implementation's choices.
* The external-DRAM variant, the host CPU and driver, and the board
  peripherals are outside this RTL.

## Verification

Each block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`:

* `tb_root_indexing_unit`: the worked-example codes, random IDX/NEXT contents
  in both modes, and latencies of 2 and 1 cycles.
* `tb_pre_hashing_unit`: the 16-bit worked example (E and H hit, G no-hit)
  and random 32-bit vectors, all with a 1-cycle result.
* `tb_bitmap_ac_unit`: random bitmaps of several densities; the offset is
  compared with a reference count, the latency is 8 cycles for an edge and
  1 for no edge, and a busy unit can be restarted.
* `tb_sm_fsm`: every FSM arc, launch pulse and update kind.
* `tb_sm_controller`: registers, table-write forwarding, every commit kind,
  result recording, irq, ping-pong, an empty buffer and overflow.
* `tb_fast_bitmap_ac_top`: the whole engine at default sizes. Tables come
  from `ac_ref_pkg` for the worked example, where the state sequence is
  checked, and for a random set of 43 patterns. Text is random, back-to-back
  buffers carry the state across, and the run covers a result overflow, the
  cycle cost in index and direct mode, and direct mode after a `NEXT`
  reload. Results and final states are compared with a plain byte-by-byte AC
  automaton. It also counts each mechanism (root step, no-hit, hit, goto,
  failure to a non-root state, failure to the root, false positive, tail,
  direct mode, ping-pong, overflow, irq) and fails if any never occurs.
* `tb_sm_dual_engine`: the two-engine top level at default sizes. Tables are
  written once to both engines. Each engine runs its own text at the same
  time: the worked example on both, random ping-pong streams, an overflow,
  the cycle cost (two 400-byte buffers finish in 1000 cycles in index mode
  and 800 in direct mode, the same as one), and direct mode. Each engine is
  checked against the reference automaton and counts every mechanism above.
  The test also checks that both engines were matching in the same cycles.
* `tb_workload_bitvector`: 250 random patterns of 4 to 14 bytes (about 2060
  states) on three engines with 8-, 16- and 32-bit pre-hash vectors. All
  three scan the same two 2048-byte buffers and are checked against the
  reference. Because a hit at a wider vector is also a hit at a narrower one,
  the test checks that hits and scan time never decrease as the vector
  shrinks. It also prints the hit share, typically about 76 %, 70 % and 66 %
  of the steps taken off the root.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sm_pkg.sv tb/ac_ref_pkg.sv tb/tb_sm_dual_engine.sv \
  --top-module tb_sm_dual_engine
./obj_dir/Vtb_sm_dual_engine
```

The end-to-end test builds its tables and text itself and needs no data
files. It runs in about a second.
