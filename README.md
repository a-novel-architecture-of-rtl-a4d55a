# ETI-coded serial link

Serializing a parallel on-chip bus onto a single wire saves area and crosstalk,
but it raises the number of bit transitions on the wire, and every transition
costs switching energy. Transition inversion coding (TIC) lowers that count: it
counts the transitions in each data word and, when there are too many, inverts
every second bit, which turns most transitions into non-transitions. The price
of plain TIC is an extra flag bit per word that tells the receiver to undo the
inversion, and the flag bit itself adds latency and transitions.

Embedded transition inversion (ETI) coding drops the flag bit. The inversion is
signalled in the *timing* of the line: for an inverted word the data edge of the
word's last bit is sent half a bit late. The receiver samples the line twice
per bit, and a phase detector tells whether the last edge came on time or late.
The wire carries exactly one bit period per data bit.

This repository holds synthesizable SystemVerilog for the whole link, from
parallel bus to parallel bus, with a self-checking testbench for every block.

```
 par_in ──► serializer ──► eti_encoder ════ line ════► eti_decoder ──► deserializer ──► par_out
 (M bits)   (M:1 select)   check_transition             two line flip-flops              (M bits)
                           word_buffer                  alexander_pd
                           b2_inversion                 decision_decoder
                           phase_encoder                word_buffer, b2_inversion
```

## The coding rule

A data word is WL bits long (8 by default), sent MSB first; call its bits
b1 b2 … b8 in sending order. Nt is the number of neighbouring pairs that differ,
0 to WL-1. The decision bit is `db = (Nt >= NTH)` with NTH = WL/2 = 4.

When `db` is set, the second bit of every pair is inverted: be1 = b1,
be2 = !b2, be3 = b3, be4 = !b4, and so on. Inverting every other bit flips the
"differs" status of every neighbouring pair, so a word with Nt transitions
leaves with WL-1-Nt; with the threshold at 4, no coded 8-bit word has more than
3 transitions between its own bits. The operator is its own inverse, and the
receiver applies the same one.

Example: `10010101` has 6 transitions, so it is inverted; flipping bits 2, 4, 6
and 8 gives `11000000`, with one transition.

Only transitions inside a word are counted. The first bit of a word is never
inverted, but with an even WL the last bit of an inverted word is, so the edge
between two words can appear or vanish. The decision does not take it into
account.

## The line: half-bit slots and the three phase paths

The part of the design that takes the most care is the line waveform. `clk` runs
at twice the bit rate, and every bit occupies two clock cycles, a *first half*
and a *second half*. A toggle flip-flop in `eti_link` makes `bit_en`, high on
every other clock; all bit-rate logic at both ends advances only on those
edges.

The second half of a bit always carries the coded bit. The first half is chosen
by `phase_encoder` along one of three paths (type `phase_path_e` in `eti_pkg`):

| path | when | first half | seen on the line |
|---|---|---|---|
| plain | word not inverted, or any bit but the last | the bit | edges only at bit boundaries (in phase with the bit clock) |
| shift | last bit of an inverted word, different from the bit before | the previous bit | the edge arrives half a bit late; the last bit is half as wide |
| special | last bit of an inverted word, equal to the bit before | the complement | a half-bit pulse, whose trailing edge is the late edge |

In both non-plain cases the first half is the complement of the bit, and there
is an edge in the middle of the last bit. No other bit of the stream ever has a
mid-bit edge. That is the whole signalling rule. The special path is needed
because a word whose last two coded bits are equal has no edge that could be
delayed. It costs two extra transitions for such a word. In random data it is
the more common of the two non-plain paths, because a word with many
transitions usually has b7 ≠ b8, and after inversion those two bits are equal.

The price of the scheme is line bandwidth: the wire must pass half-bit pulses,
so it needs twice the bandwidth of an uncoded link at the same bit rate, even
though the number of bits sent stays the same.

## Receiver

`eti_decoder` samples the line on every clock with two flip-flops, so at each
bit-period edge it holds both halves of the bit just received. The second-half
sample is the coded bit. `alexander_pd` keeps the second-half sample of the
previous bit (S5) and forms two flags:

* `s5s6` = S5 ⊕ S6: an edge at the bit boundary (data and clock in phase);
* `s6s7` = S6 ⊕ S7: an edge in the middle of the bit (data half a bit late).

`decision_decoder` latches `s6s7` at the last bit of each word; that is the
word's decision bit. Because the decision is known only after the last bit,
the coded bits wait in a one-word `word_buffer` and then pass through
`b2_inversion` with that decision bit, which restores the original word.
`deserializer` reassembles the M-bit bus word as a tree of log2(M) 1:2
stages. Each stage runs at half the rate of the one before. It holds the first
word of a pair and passes the pair on as one word of twice the width when the
second word arrives. The halved rates are enables on the one clock, not
divided clocks.

The receiver has no frame-sync symbol. Both ends share clock and reset, and the
receiver's frame counter starts at an offset (`RX_POS_RESET`) that `eti_link`
computes from the fixed transmitter latency. Another receiver would need its
own word-alignment method.

## Transmitter pipeline

`serializer` takes an M-bit word into its input flip-flops whenever its 3-bit
select counter wraps (M = 8), and sends it MSB first. `check_transition`
keeps its own count of the bit position within a word. Its first-bit mark
clears the adder and the previous-bit flip-flop, and the XOR of each bit with
the previous one is added. The word also enters `word_buffer` in parallel. When the last bit has
been counted, the decision bit is ready just as the same word starts to leave
the buffer, and `b2_inversion` codes it. `eti_pre_encoder` is this group of
three blocks, and `eti_encoder` adds the phase encoder.

## Interface and timing of `eti_link`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock at twice the bit rate, shared by both ends |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `par_in` | in | M | bus word, taken in the clock where `load` is high |
| `load` | out | 1 | one clock in every 2·M; words are taken back to back |
| `par_out`, `par_valid` | out | M, 1 | received word, valid for one clock |
| `line` | out | 1 | the coded wire |
| `tx_path`, `tx_db`, `rx_db`, `nt`, `s5s6`, `s6s7` | out | | observation of both coders |

Parameters: `M` (bus width per link, default 8, a power of two), `WL` (word
length, default 8, and M must be a multiple of WL), `NTH` (threshold, default
WL/2).

* Throughput: one M-bit word every M bit periods (2·M clocks).
* Latency: a word taken at clock edge t appears at t + 2·(M + 2·WL + 3 + log2 M),
  which is 60 clocks at the defaults. Most of it is the two one-word buffers.
* After reset the line idles low, and the receiver delivers all-zero words
  until the first real word arrives.

With `M = 16, WL = 8` a 16-bit bus is carried as two 8-bit words per frame,
each with its own decision bit.

## Measured switching activity

These are line transitions over 200 words, on the default link, with the same
bits sent uncoded for comparison (from `tb_eti_patterns`):

| data | coded | uncoded |
|---|---|---|
| random | 719 | 771 |
| alternating 0x55 | 402 | 1599 |
| alternating 0xAA | 403 | 1600 |
| counting | 755 | 823 |
| constant | 0 / 1 | 0 / 1 |

Over 400 words of mixed data, `tb_eti_link` counts 1262 coded against 1488
uncoded transitions. The special-path pulses are included in these counts.
The coded counts also include the few bits of the following words that are
already on the line when the last counted word is delivered. The random
figures vary a little with the simulator's random seed.

## How far it has been checked

* Every module has its own testbench, which compares it with values computed
  independently in the testbench. The vectors include the worked examples of
  the coding description.
* The end-to-end checker follows every half-bit slot of the line, every
  recovered decision bit, and every delivered word with its exact arrival
  clock. It runs for 400 words at M = 8 and for 300 frames at M = 16. It
  requires the plain, inverted, at-threshold, shift-path and special-path cases
  each to occur.
* Each testbench was also run against a copy of its module with one deliberate
  bug, for example a wrong threshold comparison, the wrong bit of a pair
  inverted, or no special-path pulse. Every one of those runs failed.
* `eti_decoder` asserts during simulation that a mid-bit edge never appears
  outside the last bit of a word.
* Not checked: timing closure, behaviour with a real forwarded clock and
  skew, and recovery from bit errors on the line. A corrupted mid-bit edge
  flips the decision for a whole word, and a lost word alignment is never
  regained.

## Where this design makes its own choices

The published description of the scheme names its blocks and gives the coding
equations. It leaves the following open, and they are decided here:

* **One clock at twice the bit rate** instead of a bit clock and its inverse.
  It gives the same half-bit resolution from one clock edge.
* **The special path** is defined as an inverted word whose last two coded bits
  are equal, and it is sent as a half-bit complement pulse. The description
  says only that such a path exists and also creates a phase difference.
* **Sampling points and decision rule** of the phase detector: one sample in
  each half-bit slot, decision = mid-bit edge at the last bit. A published
  phase-detector waveform shows `s5s6 = 1, s6s7 = 0` next to a set decision
  bit, without saying which bit it samples. That reading is not reproduced
  here: in this design those flag values mean an edge aligned with the bit
  boundary.
* **Threshold** Nt ≥ WL/2, following the coding equation (`>=`). One sentence
  of the description says "exceeds".
* **Receiver buffering**: the decoder holds one word, like the encoder, so that
  its inversion can use a decision bit found at the word's end.
* **Deserializer**: the 1:2 stages run on enables of halving frequency. The
  description has a clock divided by two at each level; the enables keep a
  single clock domain.
* **MSB-first order, back-to-back loading, reset values, receiver
  alignment**: none of them is specified.
* A worked example in the description gives `10110001` 3 transitions. By the
  definition it has 4, and 4 is used here. At 4 the word is inverted.

## Files

* `rtl/eti_pkg.sv`: the phase-path type.
* `rtl/serializer.sv`, `check_transition.sv`, `word_buffer.sv`,
  `b2_inversion.sv`, `eti_pre_encoder.sv`, `phase_encoder.sv`,
  `eti_encoder.sv`: the transmitter.
* `rtl/alexander_pd.sv`, `decision_decoder.sv`, `eti_decoder.sv`,
  `deserializer.sv`: the receiver.
* `rtl/eti_link.sv`: the top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/eti_link_env.sv` is the shared end-to-end checker. It has a reference
  model of the line waveform, of the decision bits and of the output words
  with their exact arrival clock, and it counts how often each mechanism
  occurred. `tb_eti_link` runs it at the default size; `tb_eti_link_m16` runs
  the 16-bit bus with two words per frame. `tb_eti_patterns` runs the activity
  measurements above.

Every testbench ends by printing `TB_RESULT checks=N failures=F`.

## Simulating

From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/eti_pkg.sv tb/tb_eti_link.sv \
          --top-module tb_eti_link -Mdir obj_link -o sim
./obj_link/sim
```

Replace `tb_eti_link` with any other testbench name. Each run takes well under
a second. Every module also passes `verilator --lint-only -Wall` on its own
(add `rtl/eti_pkg.sv` first).
