# Completion detectors for a delay-insensitive on-chip link

A clockless link cannot use a clock edge to tell the receiver that data is
valid. It has to encode the data so that the wires themselves show when a
whole word has arrived, and the receiver then needs a *completion detector*
(CD) that recognises a complete codeword. This RTL implements such a link and
a family of completion detectors for the codes it can use:

* a **dual-rail** CD: two wires per bit, one XOR per bit;
* **3-of-6**, **2-of-7** and **1-of-4** CDs: a codeword is complete when
  exactly *m* of its *n* wires are high. Each of these detectors counts the
  high wires with a small tree of full adders and compares the count with *m*.

The link moves single-rail data to dual rail, carries it across the
interconnect in 3-of-6 code, and turns it back into dual rail and single rail
at the far end. The 2-of-7 and 1-of-4 detectors are not on that path. They
are built as stand-alone blocks beside it.

Everything is combinational SystemVerilog. There is no clock, no reset and no
state.

## Data path

```
            sender side                       |  interconnect |            receiver side
data_in ─┐                                    |               |
req_in ──┴─ sr2dr ──(DATA_W dual-rail bits)── dr_to_36 ×NSYM ── link (NSYM×6) ── c36_to_dr ×NSYM ──(dual rail)── dr2sr ─┬─ data_out
                                   per 4 bits:  dr_cd + encode     3-of-6 wires    cd36 + decode                 dr_cd   └─ ack_out
```

`NSYM = DATA_W/4`. Each 4-bit group travels as one 3-of-6 symbol on six
wires, so an 8-bit word uses 12 link wires where dual rail would need 16.

| stage | module | what it does |
|---|---|---|
| single → dual rail | `sr2dr` | while `valid` (the request) is high, bit *i* raises `t` for a one or `f` for a zero; while it is low, all rails are low (the spacer) |
| dual rail → 3-of-6 | `dr_to_36` | a dual-rail CD watches the four incoming bits; only when all four have arrived does it drive the codeword of their value, otherwise all six outputs stay low |
| 3-of-6 detection | `cd36` | counts high wires with adders; `done` when the count is 3 |
| 3-of-6 → dual rail | `c36_to_dr` | once `cd36` fires on one of the 16 used codewords, raises one rail per bit with the decoded value |
| dual rail → single | `dr2sr` | a dual-rail CD over the whole word gives `valid`; `data` shows the true rails, and is zero until `valid` |
| top | `async_comm_top` | wires the above and places `cd27` and `cd14` beside them |

## Signalling and timing

The link uses four-phase, return-to-zero signalling. All wires low is the
*spacer*, which separates two codewords. A sender drives the top like this:

1. put the word on `data_in` and hold it;
2. raise `req_in`;
3. wait for `ack_out` to rise. `data_out` is then valid and equals `data_in`;
4. lower `req_in`;
5. wait for `ack_out` to fall. The whole path is then back to the spacer.

`ack_out` is the receiver's dual-rail completion signal. Because the design is
purely combinational, in zero-delay simulation `ack_out` follows `req_in` in
the same time step. In silicon the delay is whatever the wires and gates take.
The protocol does not depend on that delay, and that independence is the
point of the encoding. `sym_done` and `sym_count` show, for each link symbol,
its 3-of-6 detector output and its count of high wires.

Deferred assertions in `async_comm_top` check two link rules during
simulation:

* each link symbol holds either 0 or exactly 3 high wires;
* `ack_out` is never high while `req_in` is low.

## How the m-of-n detectors count

An m-of-n codeword is complete when exactly *m* wires are high. During a
four-phase transfer the count of high wires rises monotonically from 0 to *m*
and then falls back to 0. So comparing the count with *m* detects arrival. The
count comes from a tree of full adders (`full_adder.sv`). A "half adder" in
the trees below is a full adder whose carry-in is tied low.

**3-of-6 (`cd36`).** Two full adders each reduce three wires, 0–2 and 3–5, to
a sum bit (weight 1) and a carry (weight 2). A half adder adds the two sum
bits, which gives `count[0]` and a carry. A third full adder adds the two
weight-2 carries and that carry, which gives `count[1]` and `count[2]`.
`done = (count == 3)`. That is four adder cells and one 3-bit compare.

**2-of-7 (`cd27`).** This is the classic seven-to-three counter:

* full adders on wires 0–2 and 3–5;
* a third full adder adds their two sum bits and wire 6, which gives `count[0]`;
* a fourth adds the three weight-2 carries, which gives `count[1]` and `count[2]`.

`done = (count == 2)`.

**1-of-4 (`cd14`).** A full adder on wires 0–2 and a half adder with wire 3
give `count[0]`. A half adder on the two carries gives `count[1]` and
`count[2]`. `done = (count == 1)`.

**Dual rail (`dr_cd`).** For one bit, "exactly one of two wires high" is an
XOR. For a word, the per-bit XORs go through an AND tree.

All detectors test for *exactly* *m*. A pattern with more than *m* wires high
is not a codeword, and `done` stays low for it. Each detector brings out its
`count`, so a wrong-weight fault on the wires can be seen.

Code properties, for choosing a code:

| code | wires | codewords | data bits used here | wire transitions per symbol (up + down) |
|---|---|---|---|---|
| dual rail, 1 bit | 2 | 2 | 1 | 2 |
| 1-of-4 | 4 | 4 | 2 | 2 |
| 3-of-6 | 6 | 20 | 4 | 6 |
| 2-of-7 | 7 | 21 | 4 | 4 |

## The 3-of-6 code assignment

The 3-of-6 code has 20 codewords and the link uses 16 of them. Value *v*
maps to the *v*-th six-bit pattern of weight 3, taken in increasing numeric
order:

| value | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | A | B | C | D | E | F |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| codeword (hex) | 07 | 0B | 0D | 0E | 13 | 15 | 16 | 19 | 1A | 1C | 23 | 25 | 26 | 29 | 2A | 2C |

The codewords 31, 32, 34 and 38 are unused. On one of them, `cd36` raises
`done` but `c36_to_dr` produces no dual-rail output, so the word never
completes at the receiver.

`async_cd_pkg` builds this table at elaboration with a constant function,
`CODE36`. Change the function to use a different assignment. The
testbenches carry their own hand-written copy of the table, so they must be
changed with it.

## Files

| file | content |
|---|---|
| `rtl/async_cd_pkg.sv` | `dr_bit_t` (a `{t, f}` rail pair), code sizes, the `CODE36` table, `enc36`/`dec36` |
| `rtl/full_adder.sv` | adder cell used by the m-of-n detectors |
| `rtl/dr_cd.sv`, `rtl/cd36.sv`, `rtl/cd27.sv`, `rtl/cd14.sv` | completion detectors |
| `rtl/sr2dr.sv`, `rtl/dr_to_36.sv`, `rtl/c36_to_dr.sv`, `rtl/dr2sr.sv` | code converters |
| `rtl/async_comm_top.sv` | the link plus the stand-alone 2-of-7 and 1-of-4 detectors; parameter `DATA_W` (default 8, must be a multiple of 4) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
A watchdog stops it if it hangs.

* `tb_cd36`, `tb_cd27`, `tb_cd14` apply every wire pattern and compare
  `count` and `done` with a bit count. They then replay transfers in which
  the wires of each codeword rise one by one in random order. `done` must
  stay low until the last wire arrives and drop at the first wire that
  returns to zero.
* `tb_dr_cd`, `tb_dr_to_36` and `tb_c36_to_dr` are exhaustive over their
  inputs. `tb_dr_to_36` and `tb_c36_to_dr` also show that a partly arrived
  symbol produces nothing downstream.
* `tb_sr2dr` and `tb_dr2sr` cover all 8-bit values. `tb_dr2sr` also uses
  random arrival order and illegal both-rails-high pairs.
* `tb_async_comm_top` runs the full four-phase handshake at the default size
  for all 256 words. It checks the data, the codewords on the link and the
  return to spacer. It also counts that every codeword appeared on every
  symbol, and that each detector reported both done and not done.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/async_cd_pkg.sv tb/tb_async_comm_top.sv --top-module tb_async_comm_top
./obj_dir/Vtb_async_comm_top
```

## Choices made here and limits

These parts are this design's own choices:

* **Data width.** `DATA_W = 8`.
* **Rail polarity.** `t` carries a one.
* **The spacer-based four-phase protocol.**
* **The code assignment.**
* **The adder-tree arrangements.** The principle of counting the high wires
  with adders is the one the detectors are designed around.

**Detectors hold no state.** A detector built from Muller C-elements would
keep `done` high until every wire had returned to zero. Here `done` falls at
the first wire that drops. For four-phase signalling that is enough, because
the sender only waits for `ack_out` to fall. A receiver that must see the
*complete* spacer before the next word should also check that `count == 0`.

**No hazard analysis.** The RTL describes the logic functions. It says nothing
about hazard freedom or isochronic forks. A gate-level implementation of a
truly delay-insensitive link needs that analysis on top.

**Delay insensitivity is only partly simulated.** Zero-delay simulation of
the top cannot skew individual link wires. The unit testbenches of the
detectors and converters cover staggered arrival instead.

**Stand-alone detectors.** The 2-of-7 and 1-of-4 detectors have no matching
encoders or decoders here, because no link using those codes is specified.
