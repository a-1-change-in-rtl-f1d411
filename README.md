# 1-change-in-4 delay-insensitive interchip link

A delay-insensitive (DI) link never assumes how long a wire takes: every
transition is answered by a transition coming back. That makes the round trip
over the board the limit on speed, so the fewest transitions per bit wins.
Classic dual-rail signalling spends four transitions per bit: data up,
acknowledge up, data down, acknowledge down. The 1-change-in-4 (1c4) code sends
**two bits with one transition on one of four data lines**, answered by one
transition on a shared request wire. That is seven pins (four lines, the
request, two power) for two bits, in place of two separate dual-rail links.

This repository holds synthesizable SystemVerilog for both ends of such a link
(sender and receiver), the 2-to-1 serializer and 1-to-2 deserializer that let
two data pairs share the lines, and self-checking testbenches. The design is a
clocked model of the asynchronous circuits: every handshake step is kept, but
each state element is a flip-flop (see "Clocked model" below).

## The code

A codeword is four lines `C3 C2 C1 C0`:

* `D1 = C2 ^ C3`, `D0 = C1 ^ C3`: the middle lines carry the data, and `C3`
  says whether they are stored inverted;
* `C0` fixes the parity. Words with an odd number of ones are *odd-phase*
  words, the others *even-phase*.

Each 2-bit value therefore has four codewords, two of each phase:

| value | odd words  | even words |
|-------|------------|------------|
| 00    | 0001, 1110 | 0000, 1111 |
| 01    | 0010, 1101 | 0011, 1100 |
| 10    | 0100, 1011 | 0101, 1010 |
| 11    | 0111, 1000 | 0110, 1001 |

Consecutive words alternate between the phases, and each word differs from the
previous one in exactly one line. Which line flips depends only on the old and
the new value, never on the codeword itself:

    line to flip = old value XOR new value
      line 0 (C0)  value repeats          (parity only)
      line 1 (C1)  only D0 changes
      line 2 (C2)  only D1 changes
      line 3 (C3)  both bits change       (the word becomes inverted/uninverted)

Because exactly one line changes, the receiver recognises a new word by its
parity alone, whatever the skew between lines, and it can decode it from the
levels (no memory of the previous word is needed). Example: starting from
`0000`, the values 00 00 10 01 10 01 00 11 01 00 give the words
0001 0000 0100 1100 0100 1100 1110 0110 0010 0000.

## Link protocol

The link is a two-phase handshake with the receiver active. The receiver sets
`wi` high to ask for an odd word and low to ask for an even word; the sender
answers by flipping one line so that the parity of `wo` equals `wi`. After
reset `wo = 0000` (even) and the receiver asks for an odd word, so `wi` starts
high. Seen from outside, `wi` behaves like an acknowledge that is the
complement of the parity of the last word received.

Inside each end, data travels as four-phase channels: a value as a 1-of-4 code
(`bit i` set means value `i`) or as two dual-rail bits (`t` rail high = 1, `f`
rail high = 0, both low = no data), followed by acknowledge-high, data
withdrawn, acknowledge-low.

## Sender (`sender`)

                +------+ line req +-----+  wo[3:0]
    di -------->| xbar |--------->| tog |----------+-----> to receiver
    (1-of-4)    +------+          +-----+          |
                   ^ c1, c0          ^ si          v
                   |                 |         +------+
                   +-----------------|---------| Dec1 |
                                     |         +------+
                                  +-----+  so     |
                   wi ----------->| CE  |<--------+
                                  +-----+

**Butterfly (`xbar`, `xbar_cell`).** Turns the new value (1-of-4) and the
previous value (two dual-rail bits) into a 1-of-4 request for the line to flip.
The XOR of the two values is done by routing: two tiers of 2x2 switch blocks,
the first swapping neighbouring lines (0↔1, 2↔3) when the previous D0 is 1,
the second swapping the halves (0↔2, 1↔3) when the previous D1 is 1. Each
output of a block is a state-holding gate that rises when a data line and its
control rail are both high and falls only when all four of the block's inputs
are low. Acknowledges are plain wires back from the toggle stage.

**Toggle stage (`tog`).** Holds the lines. Each of the four slices runs

    loop { wait ti;  to := 1;
           wait si == parity(so);   u := ~so;        -- prime
           wait !ti;  to := 0;
           wait si != parity(so);   so := u }        -- toggle

It acknowledges the butterfly and primes the new line value first, and only
flips the line once the request has been withdrawn *and* the link asks for the
next phase. The request and link sides never overlap, which gives one full
word of slack. The wait `si == parity(so)` confirms that the previous flip has
taken effect before priming again.

**Decoder Dec1 (`dec`, `E_RESET = 0`).** The previous value is not stored: it
is decoded back from the lines that were actually sent. A mismatch between a
stored copy and the lines would otherwise persist, because lines are only ever
flipped, never rewritten. The decoder accepts only words of the phase held in
its state bit `e` (1 = odd). One set of gates serves both phases because
flipping `C0` turns an even word into an odd one:

    s0p  = ~e ^ C0
    D0=0: (C3 == C1) & (s0p != C2)      D0=1: (C3 != C1) & (s0p == C2)
    D1=0: (C3 == C2) & (s0p != C1)      D1=1: (C3 != C2) & (s0p == C1)

Its control is

    loop { outputs := decode(lines, e);  wait ci;  e := ~so;   -- outputs clear
           wait !ci;  so := e }                               -- ask for next phase

After reset `e = 0`, so the all-zero start-up word decodes as value 00 and the
butterfly has valid control at once.

**C-element.** The toggle stage's phase request `si` is the C-element of
Dec1's `so` and the link request `wi`. A line flips only when the local
decoder has released the previous value *and* the receiver wants a new word.

## Receiver (`receiver`)

**Buffer (`link_buf`).** One 4-bit register in front of the decoder. It is
open while the decoder asks for a word of the other phase than the one it
holds, and it closes as soon as a word of the requested phase arrives. Its
link request is the complement of the parity of the held word, so it has no
request wire of its own. The sender can therefore put the next word on the
lines while the decoder still works on the previous one.

**Decoder Dec2 (`dec`, `E_RESET = 1`).** The same decoder, reset to accept odd
words. It ignores the start-up word and raises its request one clock after
reset. Its two dual-rail bits become a 1-of-4 value through four AND terms.

## Serializer and deserializer (`ser`, `des`)

Two data pairs share the four lines, one riding in odd words and the other in
even words. The decoders' phase signals steer them:

* `codd = parity & e` is high while an odd word is decoded;
* `ceven = ~parity & ~e` is high while an even word is decoded.

Both fall when the decoded value is acknowledged.

* `ser` sends `in_odd` while Dec1 holds an even word (the next word is odd),
  and `in_even` while it holds an odd word. The phase signal falls as soon as
  the sender acknowledges. Each side therefore keeps its selection in a
  three-state machine (IDLE → SEL → ACKED → IDLE) until the four-phase
  handshake with the sender has finished.
* `des` gates the receiver's 1-of-4 output with Dec2's `codd` / `ceven` onto
  `out_odd` / `out_even`. Value and phase signal rise and fall together, so no
  storage is needed. The acknowledge back is the OR of the two output
  acknowledges.

## Top level (`link_top`)

`link_top` chains `ser → sender → (board) → receiver → des`. The two ends are
meant for separate pad groups joined by board traces, so the top leaves the
link open:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `in_odd[3:0]`, `in_odd_ack` | in / out | pair sent in odd words, 1-of-4, four-phase |
| `in_even[3:0]`, `in_even_ack` | in / out | pair sent in even words |
| `tx_wo[3:0]`, `tx_wi` | out / in | sender pads: lines out, request in |
| `rx_wo[3:0]`, `rx_wi` | in / out | receiver pads: lines in, request out |
| `out_odd[3:0]`, `out_odd_ack` | out / in | values received in odd words |
| `out_even[3:0]`, `out_even_ack` | out / in | values received in even words |

Connect `tx_wo → rx_wo` and `rx_wi → tx_wi`. Any delay per wire is allowed.
After reset the first value sent is the one on `in_odd`, and values then
alternate between the two input channels.

## Clocked model

The original link is built from quasi-delay-insensitive transistor circuits:
C-elements, generalized C-elements and weak keepers, with no clock. Here every
state variable of those handshake sequences is a flip-flop on one clock, and
each handshake step takes one clock. The consequences:

* The handshake order, the code, the decoder equations, the reset phases and
  the block structure are those of the asynchronous design. The speed is not:
  with zero trace delay and an immediate environment, one word (two bits)
  takes **11 clocks**.
* Timing is still not assumed. Every wait is on a level, so any number of
  clocks of delay on any link wire (or internal wire) is tolerated. A word
  period is never shorter than the round trip: the fastest line's delay plus
  the request wire's delay.
* Only one line changes per word, so a receiver in another clock domain sees a
  consistent word. The design does not, however, contain synchronizers: in
  `link_top` both ends share one clock.
* Signals are active high. The transistor circuits use active-low versions of
  many of them.
* The internal nodes of the toggle slice (a C-element and three gC-elements)
  and of the decoder control (two gC-elements) are not modelled one by one.
  Each slice is written as its handshake sequence, with its reset at the start
  of the loop (lines 0000, nothing primed).

## Where this design makes its own choices

* **Clock and reset.** A single clock and a synchronous active-low reset.
  Reset values are: lines 0000, Dec1 expecting even words, Dec2 expecting odd
  words, C-element output low, and buffer 0000.
* **Receive buffer.** Only its role is defined: a two-phase buffer whose
  acknowledge is a parity tree and which lets the sender run one word ahead.
  The open/close rule above is the simplest circuit that does this. A
  transparent-latch version would be faster in silicon.
* **Serializer and deserializer.** Only their role and their control by the
  phase signals are defined. The channel formats (two 1-of-4 four-phase
  channels on each side), the selection state machine and which pair goes
  first are choices.
* **Butterfly tier order.** The first tier follows the previous D0 and the
  second the previous D1. This gives line = old XOR new, which matches the
  code table.
* **Not modelled.** I/O pads and ESD structures, electrical behaviour, speed
  and power.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
watchdog limit. With Verilator 5:

    verilator --binary --timing --assert rtl/c1c4_pkg.sv tb/link_top_tb.sv \
        --top-module link_top_tb -y rtl -o sim && obj_dir/sim

Replace `link_top_tb` with any testbench in `tb/`.

| testbench | what it checks |
|-----------|----------------|
| `c_element_tb` | set on 11, clear on 00, hold otherwise |
| `xbar_cell_tb` | straight and swapped routing; output held until all inputs are low; acknowledges |
| `xbar_tb` | all 16 old/new value pairs give line old^new, two clocks after valid inputs |
| `tog_tb` | only the requested line flips; no flip before the request is withdrawn and the link asks; parity and `se` |
| `dec_tb` | all 16 words in both phases against `D1=C2^C3, D0=C1^C3`; `e`/`so` sequence; start-up of both variants; `codd`/`ceven` |
| `sender_tb` | example sequence above word by word; 400 random values; one line per word; lines held while the receiver waits; all four lines used |
| `link_buf_tb` | opens only on request, closes on the new word, holds while the sender runs ahead; `wi` |
| `receiver_tb` | values in order; start-up word ignored; phase signals alternate; slow consumer |
| `ser_tb` | strict alternation odd/even pair; order per channel; a pair waiting for its phase |
| `des_tb` | steering and acknowledge for every value and phase |
| `link_top_tb` | end to end, 5 runs of 600 values: no delay, a fixed random delay per wire, and a new random delay for every transition (0–12 clocks); 11-clock word period at zero delay |

`link_top_tb` also counts each mechanism and fails if one never happened:
every line flipped, inverted words, the sender running ahead of the decoder,
a slow consumer holding the link, the serializer holding a pair back, and runs
with trace delays. It also checks that no word period is shorter than the round
trip. It runs at the default size, since the design has no size parameters.

The modules carry assertions for the channel rules: 1-of-4 codes at most one
hot, dual-rail bits never both high, one line change per clock on the lines
and in the buffer, and the serializer never selecting both pairs.
Run with `--assert` to enable them.

## Files

* `rtl/c1c4_pkg.sv`: types (`code_t`, `onehot4_t`, `dr_t`), parity and
  decoder functions
* `rtl/c_element.sv`, `rtl/xbar_cell.sv`, `rtl/xbar.sv`, `rtl/tog.sv`,
  `rtl/dec.sv`: sender building blocks
* `rtl/sender.sv`, `rtl/link_buf.sv`, `rtl/receiver.sv`: the two link ends
* `rtl/ser.sv`, `rtl/des.sv`, `rtl/link_top.sv`: serializer, deserializer, top
* `tb/*_tb.sv`: one self-checking testbench per module
