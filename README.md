# Two-character-stride NFA regular-expression matcher (2C-NFA)

Signature-based intrusion detection scans packet payloads for regular
expressions. On an FPGA the classic approach builds one flip-flop per
character of every expression (a non-deterministic finite automaton, NFA,
laid out in logic) and feeds it one byte per clock. This design consumes
**two bytes per clock**, and gives every *pair* of consecutive expression
characters a **single** state register. A one-byte-per-state NFA needs one
register per character. Pairing halves that count for plain strings. The
byte comparisons are not done with comparators. They are read from a small
memory, one bit per character class.

The RTL here holds two example expressions, `kl(mn|op)qr` and
`cde*f*(g*hij|kl*m*)nop`. Together they use every building block of the
method. `reme_top` replicates the matching engine `N_LANES` times (default 7)
over independent byte streams. One lane moves 16 bits per clock, which is
4.16 Gbit/s at 260 MHz. Seven lanes at 250 MHz give 28 Gbit/s.

## From expression to circuit

An expression is compiled by hand (or by a generator) in three steps:

1. Cut it at `(`, `)` and `|` into subexpressions.
2. Cut each subexpression into **groups**. A group holds two non-star
   characters, each with its star if it has one. Only the last group of a
   subexpression may hold a single character.
3. Give each group a module of one of six types and chain the modules.

| type | group   | module      | state registers | notes |
|------|---------|-------------|-----------------|-------|
| T1   | `ab`    | `t1_module` | 1 (complete)    | lookahead input `la` |
| T2   | `a`     | `t2_module` | 0               | final group only |
| T3   | `a*b`   | `t3_module` | 2 (A loop, complete) | lookahead input `la` |
| T4   | `a*`    | `t4_module` | 1 (A loop)      | may be empty: input passes through |
| T5   | `ab*`   | `t5_module` | 1 (complete)    | lookahead input `la` |
| T6   | `a*b*`  | `t6_module` | 2 (A loop, B loop) | may be empty: input passes through |

`cde*f*(g*hij|kl*m*)nop` becomes
`cd`(T1) `e*f*`(T6) ( `g*h`(T3) `ij`(T1) | `kl*`(T5) `m*`(T4) ) `no`(T1) `p`(T2).
That is 9 registers for 14 characters (`nfa_cdefghijklmnop`).
`kl(mn|op)qr` becomes four T1 groups, so 4 registers for 8 characters
(`nfa_klmnopqr`). An alternation is the OR of its branches' outputs. The
first group's predecessor input is all ones, so a match may start at any
byte.

## The three-byte window

Two bytes arrive per clock, but a match can start at an even or an odd
stream offset. `window_gen` therefore presents a three-byte window

    window t = ( byte 2t, byte 2t+1, byte 2t+2 )      positions w0 w1 w2

Consecutive windows advance by two and overlap by one byte. Every pair of
neighbouring bytes then lies completely inside one window. Pairs that start
at an even offset sit at w0-w1, and pairs that start at an odd offset sit at
w1-w2. All three positions must be classified in the same cycle, so the
engine holds three copies of the class memory (`char_classifier`).

## Reach vectors: how the modules talk

The hardest part of the design is what a single state bit per pair can mean.
Each module takes and produces a 4-bit **reach vector** (`reme_pkg::reach_t`).
It is indexed by the window boundaries:

    b0 | w0 | b1 | w1 | b2 | w2 | b3
    (b0 = after byte 2t-1, b1 = after 2t, b2 = after 2t+1, b3 = after 2t+2)

Bit k of a module's output `d` means "the expression, up to and including
this group, may have matched ending at boundary k". Inside a window the
modules chain combinationally. A group can start at any boundary its
predecessor reached, so a T1 `ab` completes:

* at b2 when `a b` sits at w0 w1 and the predecessor reached b0;
* at b3 when `a b` sits at w1 w2 and the predecessor reached b1.

Boundaries b2 and b3 are b0 and b1 of the next window. A module needs no
more than that across clock edges, and one register per group stores it.
But one bit cannot say *which* of the two boundaries was reached. The next
window reads the bit back as follows:

* **b0**, directly (`d[0] = s`);
* **b1** only when w0 belongs to the group's **last** class. This is a
  lookbehind: if the group really ended after w0, then w0 is its last
  character.

Two extra rules keep the ambiguity from producing wrong matches:

* **Lookahead (`la`).** A completion at b2 is stored only when w2 belongs to
  a class the *successor* can start with. If it does not, the successor
  cannot continue from b2, and storing the bit would only feed the b1
  reading with a false value. The lookahead of a group is the union of the
  first classes that can follow it, skipping over groups that may be empty.
  For example, after `cd` in the second expression that is `e f g h k`.
* **No lookahead after a star.** T4 and T6 end in a loop, so the next byte
  may be another loop character, and they have no `la` input. Their loop
  registers are exact under the same read-back rule. A loop that reached b2
  and continues at w2 also reaches b3, and one that reached b3 implies w2 is
  a loop byte.

A final group must not report the same match twice, so it stores only its
b3 completion (`la` tied to 0). Its `d[1]` and `d[2]` are the match flags
for bytes 2t and 2t+1.

**Exactness.** For the two expressions here, every reported match is a real
match and every real match is reported. The testbenches check this over
random streams against a plain one-byte-per-step NFA. In general it is not
guaranteed. If a group's last class overlaps the first class of its
successor, the two readings of the register can both look plausible, and a
false positive is possible. Example: `ab` followed by `bd` (expression
`abbd`) on the input `abbbd`. False negatives cannot occur, because every
rule above only removes readings that are impossible. An expression set
where this matters needs disjoint boundary classes or a second register for
that group.

## Engine pipeline and timing

`reme_engine` is one lane:

1. `window_gen`: one pair per `in_valid` cycle (`in_pair[0]` first). The
   window of pair t is emitted after pair t+1 arrives.
2. Three `char_classifier` ROMs, 256 x 64 bits, with a registered read like
   a block RAM. Column k is the class bit of class k. In `reme_pkg`, class k
   is the single byte `'c'+k` (k = 0..15), and the remaining 48 columns are
   unused. To retarget the engine to another expression set, change
   `class_row()` and the expression modules.
3. The expression circuits update their registers once per valid window.
   Their match flags are registered at the output.

Interface: `out_valid` pulses once per window. `match[r][0]` and
`match[r][1]` mean that expression r (0 = `kl(mn|op)qr`,
1 = `cde*f*(g*hij|kl*m*)nop`) has a match ending at stream byte 2t or 2t+1.
`out_valid` for window t is high after the second clock edge following the
edge that accepted pair t+1. Throughput is one window, or two bytes, per
clock with no gaps. There is no back-pressure. The last pair of a stream is
examined only after one more pair has been sent, so send any filler byte
pair to flush it. Reset (`rst_n`, asynchronous, active low) clears every
state register and the window buffer.

`reme_top` instantiates `N_LANES` engines that share only the clock and
reset. Each lane has its own `in_valid`, `in_pair`, `out_valid` and `match`.

## Where this RTL departs from the method or fills gaps

* **Expression set.** The method was evaluated on sets of 569, 719 and 1052
  expressions drawn from the Snort rules. Those need 6222 to 10530 states and
  6 to 11 classifier sets of 64 classes per engine. The expressions are not
  available, so the engine carries the two worked examples. The classifier
  width (64) and the lane count (7) follow the evaluated configuration.
* **Module circuits.** Each module's behaviour is defined by the 3-byte
  patterns it must recognise. The gate-level form here (reach vectors,
  in-window loop unrolling, read-back rules) is this design's own. It
  implements those patterns: e.g. T1's `A B any` and `any A B`, with the
  neighbour's character replacing `any` where a neighbour exists.
* **Lookahead on T5.** The method gives `ab*` no lookahead. Here T5 takes the
  successor's first class as lookahead. A `b` at w2 needs none, because it
  completes the group again at b3. Tie `la` to 1 to get the lookahead-free
  form.
* **T2 has no register.** Its completion at b3 is found again in the next
  window from the predecessor's register.
* **Handshake, latency, reset, match encoding** are this design's choices.

## Files

| file | content |
|------|---------|
| `rtl/reme_pkg.sv` | widths, window and reach types, class table function |
| `rtl/window_gen.sv` | 2-byte shifted 3-byte window |
| `rtl/char_classifier.sv` | 256 x 64 class ROM |
| `rtl/t1_module.sv` .. `rtl/t6_module.sv` | the six group types |
| `rtl/nfa_klmnopqr.sv`, `rtl/nfa_cdefghijklmnop.sv` | the two expression circuits |
| `rtl/reme_engine.sv` | one lane |
| `rtl/reme_top.sv` | `N_LANES` lanes |
| `tb/regex_ref_pkg.sv` | reference one-byte-per-step NFAs, random stream helpers |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog.

* `tb_t1_module` .. `tb_t6_module` put the group behind a one-character
  prefix `x`, drive the predecessor reach exactly, and compare `d[1..3]`
  with a character-level NFA of `x<group>` over 4000 random windows.
* `tb_nfa_*` drive class words directly. They use 20000 windows of a stream
  made only of the expression's own characters plus inserted complete
  matches. They require matches that end on both even and odd bytes.
* `tb_window_gen` and `tb_char_classifier` check window contents, idle
  cycles, the full class table and the read latency.
* `tb_reme_engine` runs a full lane at one pair per clock. It checks every
  flag, the rate (one result per clock) and the latency.
* `tb_reme_top` runs the default 7-lane top. Three lanes run gap-free and
  four have random idle cycles. It requires that both expressions, both end
  parities, every group type and both branches of each alternation produce
  matches, and that idle input and out-of-step lanes occur.

To simulate, for example, the top with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_reme_top \
      rtl/reme_pkg.sv tb/regex_ref_pkg.sv rtl/t?_module.sv rtl/window_gen.sv \
      rtl/char_classifier.sv rtl/nfa_*.sv rtl/reme_engine.sv rtl/reme_top.sv \
      tb/tb_reme_top.sv
    ./obj_dir/Vtb_reme_top

The other testbenches build the same way with their module's files.

## Adding an expression

Group it as above and instantiate one module per group. Connect `pre` to the
OR of the predecessors' `d` (all ones for the first group). Connect `a` and
`b` to `{cm2[k], cm1[k], cm0[k]}` of the group's classes. Connect `la` to the
OR of the successor's possible first classes at w2 (0 for the final group).
Take `match = d_final[2:1]`. Then give every new class a column in
`class_row()`. Check the exactness condition above for the new boundaries.
