# GALS clock activation and a shared ring bus for SFQ logic

In single flux quantum (SFQ) logic a clock pulse and a data pulse are the
same physical thing: a short voltage pulse carrying one flux quantum. This
design uses that to avoid a global clock network. Every bus between two
blocks carries one extra line, and the pulse on that line *is* the
receiving block's clock. A block without incoming data gets no clock and
does nothing. The same idea gives a cheap shared bus: packets carry a
destination tag and their own clock line around a ring, and a block only
acts on a packet whose tag matches the block's hard-wired identifier.

The RTL models this at pulse level. It has four point-to-point links
built from 64-bit, 8-stage SFQ shift registers, plus a four-node circular
tagged bus. They sit side by side in `gals_sfq_top`.

## How pulses are modelled

SFQ circuits have no voltage levels to sample, so this RTL uses a
*time base*, `clk`. Each rising edge is one step, roughly one gate or
transmission-line-stage delay. An SFQ pulse is a signal that is high for
exactly one step. A logical one is a pulse within a clock period, and a
logical zero is no pulse.

`clk` is not a clock of the modelled circuit. It only makes time discrete
so that a standard simulator and synthesis tool can handle the model. The
SFQ clocks of the design (`clk_p`, `clk_out`, `a_tx_clk`, …) are ordinary
pulse signals, and each module's header comment states its delays in
steps. `rst_n` is a synchronous active-low reset that clears all stored
flux. Real SFQ circuits start empty at power-up; the reset exists because
the simulator starts with random values.

Read "clock period" in this description as the time between two pulses on a
block's own SFQ clock. That time is a number of steps and need not be
constant.

## The SFQ flip-flop (`sfq_dff`)

Everything that stores data is built from `sfq_dff`. An SFQ flip-flop
behaves unlike a CMOS flip-flop:

* A data pulse sets the stored flux quantum.
* A clock pulse reads it out destructively. There is an output pulse one
  step later if the bit was set, and the bit is then cleared.
* A second data pulse in the same period finds the bit already set and is
  absorbed. This models the escape junction. As a result, a spurious pulse
  from a shared input corrupts at most one period, which is the property
  that lets several drivers share one line.
* A data pulse in the same step as the clock pulse counts as arriving just
  after it. The old bit is read out and the new one is stored. This
  ordering is what makes a one-step-delay pipeline safe to hold, and it is
  a modelling choice.

## Clock distribution

* `htree_clock` is a zero-skew binary tree of splitters. Each splitter adds
  one step. For 64 × 8 = 512 flip-flops there are 9 levels, so every leaf
  pulses 9 steps after the root.
* `concurrent_clock` is a clock line that runs along the pipeline in the
  same direction as the data, one step per stage. Stage *k* is clocked *k*
  steps after stage 0. That is the same delay a word needs to travel from
  stage *k−1* to stage *k*, so each clock wave moves every word exactly one
  stage.
* `counterflow_clock` runs the other way: the pulse enters at the last
  stage and reaches stage *k* after *DEPTH−1−k* steps. Every stage is
  clocked before the stage that feeds it, so no word can race through two
  stages, whatever the delays. The price is a longer minimum period: 3
  steps instead of 2.
* `ring_oscillator` is a local clock source that pulses every `PERIOD`
  steps while enabled. It is modelled as a step counter.

The three shift registers use these trees. `htree_shift_register` gives each
of its 512 flip-flops its own H-tree leaf. `concurrent_shift_register`
clocks each 64-bit row from one tap of the concurrent line, and
`counterflow_shift_register` does the same with the counterflow line. All
three bring out
`clk_out`, the clock of the last stage. The word that clock reads out
appears on `q` one step later, and it is the word that entered 8 clock
pulses earlier.

## The four GALS links (the part that needs care)

In every link the transmitter is an H-tree shift register clocked by its
own local source (a top-level input). What differs is how the receiver
gets its clock. The hard part is relative timing. A word must reach the
receiver's first stage **at or after** the receiver clock pulse that empties
that stage, and **before** the next one. In each link the data path is
therefore given a delay that matches the clock path. This is the "add
delay to the data path" remedy for links whose clock is slower than
their data.

Times below are relative to a transmitter clock pulse at step 0. At the
defaults the receiver clock pulses at step 22 in links A and B and at
step 21 in link C.

| | Link A | Link B | Link C |
|---|---|---|---|
| Receiver | H-tree register | concurrent register | H-tree register |
| Receiver clock | transmitter's last-stage clock, after a 4-step line (`CLK_LINK_DELAY`) | activation pulse, after a 3-step delay line (`ACT_LINE_DELAY`) | local `ring_oscillator`, switched on by the activation pulse (`activated_clock_source`) |
| Clock path | 9 (tx tree) + 4 + 9 (rx tree) | 9 + 2 (clock follows data) + 1 (gate) + 3 | 9 + 2 + 1 + 9 (rx tree) |
| Data path delay | `CLK_LINK_DELAY + 9` = 13 | `ACT_LINE_DELAY + 3` = 6 | 9 + 3 = 12 |
| Empty words | kept | dropped | kept |
| Extra clock pulses | none | none | yes, after the last word |

**Link A** (`H-tree → H-tree`). The receiver is clocked once for every
transmitter clock. It needs no clock source of its own, and its clock does
not have to be skew-free relative to the transmitter's.

**Link B** (clock gated by data). `clock_activation` is a clocked AND-OR
gate. It ORs every data pulse the transmitter sends in a period into one
stored quantum. The transmitter's clock, delayed two steps so that it
*follows* the data, reads that quantum out. The result is one activation
pulse per word that contains at least one `1`. That pulse, after the delay
line, is the concurrent clock of the receiver. The receiver is therefore
clocked exactly as often as non-empty words arrive and is idle otherwise.
Two consequences follow:

* Empty words disappear.
* A word leaves the receiver only when eight more non-empty words have
  come in behind it.

**Link C** (activation switches on a local source). Here the activation
pulse only starts the receiver's own oscillator, and the timing rule is
looser: the activation only has to come first. The source starts in phase
with the activation. After the last activation it runs for `RUN_PERIODS`
more pulses, then stops. The default is `DEPTH + 1` = 9, which is enough
to push the last word of a burst out of the 8-stage receiver. Empty words
are clocked through like any other, and pulses after the last word are the
unneeded clocks this approach costs. The receiver's clock is free-running
while on. The link-C transmitter must therefore be clocked every
`OSC_PERIOD` steps (default 16) while it sends, or data and receiver clock
drift apart.

**Link D** (`H-tree → counterflow`) is link A with a counterflow receiver.
The bundled clock, after the same 4-step line, enters the receiver's last
stage at step 13. It reaches the first stage 7 steps later, at step 20.
The data lines get `CLK_LINK_DELAY + DEPTH − 1` = 11 steps, so words
arrive at step 21, one step behind that wave. The receiver's `clk_out` is
at step 13 and `q` at step 14.

The minimum spacing between transmitter clock pulses is 2 steps for links A
and B and 3 steps for link D.

## The shared ring bus (`ring_bus`, `bus_interface`)

A packet (`sfq_pkg::ring_pkt_t`) is `{clk, tag, data}`:

* `clk` is the extra line of the GALS scheme and marks a valid packet.
* `tag` is a 2-bit destination.
* `data` is a 64-bit word.

`NODES` = 4 interfaces are connected in a circle by 2-step
transmission-line segments. Each interface has a hard-wired identifier
`ID`, so checking the tag is a fixed pattern match rather than a
general comparator. Each interface handles a packet arriving on `up` as
follows:

1. It stores `data` in its input register `rx_data`. Every block on the
   way sees every word.
2. If `tag == ID`, it raises `match` for one step in the same step that
   `rx_data` updates. The block behind the interface can use this pulse as
   a write enable, a handshake or its clock. The packet then leaves the
   ring.
3. Otherwise it forwards the packet on `down` one step later.

The local device offers a packet on `inj` and holds it until `inj_ready` is
high. `inj_ready` is high in every step in which no packet is being
forwarded, including the step in which a packet was just taken off. The
bus never merges two packets onto one line, so injection needs no arbiter.

Because the ring is closed, a block can reach the block before it
(*N−1* hops), and a packet addressed to its own sender goes all the way
round. A packet taken at step *t* raises `match` at its destination at step
*t + hops·(SEG_DELAY+1) + 1*. A tag that names no block would circulate
forever. `bus_interface` asserts that offered tags are below `NODES`.

## Top level and parameters

`gals_sfq_top` brings out each link's transmitter clock and data and its
receiver clock and data. Link C also has `c_osc_on`. The ring has
`inj`/`inj_ready` and `node_data`/`node_match` per node, which are the
ports of the functional blocks that would sit on the bus.

| Parameter | Default | Origin |
|---|---|---|
| `WIDTH` | 64 | register and bus width of the reference examples |
| `DEPTH` | 8 | register depth of the reference examples |
| `NODES` | 4 | chosen; the tag width in `sfq_pkg` allows up to 4 |
| `CLK_LINK_DELAY` | 4 | chosen |
| `ACT_LINE_DELAY` | 3 | chosen |
| `OSC_PERIOD` | 16 | chosen |
| `RUN_PERIODS` | 9 | chosen (`DEPTH + 1`) |
| `SEG_DELAY` | 2 | chosen |

The ring's data and tag widths come from `sfq_pkg` (`DATA_W`,
`RING_NODES`), not from top parameters. To change them, edit the package.

## What follows the reference design, and what does not

Taken from the design this RTL implements:

* the extra clock line per bus;
* receivers clocked from the transmitter's clock (H-tree to H-tree);
* the AND-OR activation gate driving a concurrent receiver through a
  delay line;
* both ways of using the activation signal (as the clock, or to start a
  local source);
* the freedom to clock each receiving block by its own scheme: H-tree,
  concurrent or counterflow;
* the 64 × 8 register sizes with H-tree and concurrent clocking;
* the tagged packets on a circular bus with hard-wired identifiers, every
  input register storing every word, and a control pulse on a match;
* rejection of repeated pulses inside one period.

Choices made here where the reference is silent:

* all delays in steps;
* the data-in-clock-step ordering of the flip-flop;
* reading "AND-OR" as a clocked OR-then-read gate;
* how the activated clock source switches off;
* removing packets at their destination, and injecting only into free slots;
* the number of ring nodes and the packet layout;
* the counterflow register and link D, which put a named receiver option
  into the same setting as link A;
* the reset.

Not modelled:

* analog behaviour (pulse shape, timing margins, bias currents, jitter);
* energy-efficient bias networks;
* the chip-to-chip bump links of multi-chip modules (only a delay would
  remain);
* a receiving block run asynchronously, with the incoming clock pulse as
  its handshake;
* the functional blocks themselves (such as a memory controller) that would
  use the ring.

The step model keeps the *order* of events faithful but not their
picosecond spacing. Timing conclusions, such as whether a link meets its
clock/data rule, hold only for the step delays chosen here.

## Files and simulation

`rtl/` holds one module per file plus `sfq_pkg.sv`. `tb/tb_<module>.sv`
is a self-checking testbench for each module. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_gals_sfq_top`
runs the whole design at its default size. It drives all four links with
60 words each, including empty words and a gap long enough to stop link C's
clock source, and random ring traffic. It checks every output against
expectations computed from the link structure, and it counts that each
mechanism occurs: gated clocks, source start/stop and extra pulses,
absorbed double pulses, ring matches, waits, wrap-around and stored
passing data.

```sh
verilator --binary --timing --assert --timescale 1ns/1ps \
    --top-module tb_gals_sfq_top -y rtl -y tb +libext+.sv -Irtl \
    rtl/sfq_pkg.sv tb/tb_gals_sfq_top.sv -o sim
./obj_dir/sim
```

Use the same command with another `tb_<module>` to test one block. The
full-size top testbench runs in a few seconds.
