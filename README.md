# MPSK modulator from flip-flops and a multiplexer

An M-ary phase-shift-keyed (M-PSK) signal is normally made with an I/Q
modulator: a DAC sets two weights, two multipliers scale a carrier and its
90-degree copy, and an adder sums them. Every one of those parts is analog,
so the I and Q branches never match exactly; the result is amplitude and
phase imbalance that bends the constellation and raises the error rate.

This design removes the analog arithmetic. It makes all M phase-shifted
versions of the carrier at once, as square waves, with a small tree of
toggle flip-flops, and then simply *selects* one of them per data symbol
with a multiplexer. Every symbol is the same full-swing logic signal, so the
amplitude cannot be imbalanced, and the phase steps are fixed by clock edges
rather than by analog weights. The remaining phase error comes only from the
different flip-flop delays along the paths of the tree. A band-pass filter
(or the filtering of a class-D power stage) then turns the square wave into
a sinusoid; an optional mixer moves it to another frequency.

The RTL follows the article "Generation of MPSK Signal Using Logic Circuits"
(8-PSK, built there from 7476 JK flip-flops, a 74151 multiplexer and 7493
counters). The default configuration here is that 8-PSK circuit.

## The idea: square roots of unity by frequency division

The M-PSK phases 2πm/M are the M-th roots of unity. For M = 2^K they can be
found by taking square roots K times: the two square roots of 1 are
e^{j0} and e^{jπ}; the square roots of each of those give the four
quarter-turn phases, and so on. Taking a square root of a unit phasor halves
its angle (and adds a second root half a turn away).

A toggle flip-flop does exactly that to a square wave: it halves the
frequency, so a delay that was a fraction of the input period becomes the
same time but half the fraction of the output period. Its Q and Q' outputs
are the "two roots", half a turn apart. Cascading K such steps as a binary
tree gives 2^K square waves at f0/2^K whose phases are all multiples of
360/M degrees.

## The multi-phase ripple counter (`mprc`)

This is the part that needs the closest reading. It looks like a ripple
counter, except that *both* outputs of every flip-flop clock a flip-flop of
the next stage, so the circuit grows as a binary tree.

Node names follow the published schematic: node Q(s)(i) is the i-th signal
of stage s, and flip-flop FF(s)(i) is the one clocked by node Q(s)(i).

```
stage 0      stage 1          stage 2                  stage 3 (carriers)
clk_in=Q01 → FF01 ─Q → Q11 → FF11 ─Q → Q21 → FF21 ─Q → Q31, ─Q' → Q35
                  └Q'→ Q12 ↘     └Q'→ Q23 → FF23 ─Q → Q33, ─Q' → Q37
                         FF12 ─Q → Q22 → FF22 ─Q → Q32, ─Q' → Q36
                              └Q'→ Q24 → FF24 ─Q → Q34, ─Q' → Q38
```

General rule: FF(s)(i) drives Q(s+1)(i) from Q and Q(s+1)(i + 2^s) from Q'.
A K-stage tree has 2^K − 1 flip-flops (7 for 8-PSK). All flip-flops are
JK flip-flops wired as toggles (J = K = 1) and switch on the **falling**
edge of their clock node.

Starting from all flip-flops at 0 (the asynchronous clear `rst_n` does
this), every last-stage node Q(K)(m) runs at f0/M with a 50 % duty cycle,
and Q(K)(m) **leads** Q(K)(1) by exactly m − 1 periods of `clk_in`, i.e. by
(m − 1)·360/M degrees. The output port is ordered by phase:
`carrier[m]` = Q(K)(m+1), phase m·360/M. For 8-PSK, with one row per
`clk_in` period (sampled half a period after the falling edge) and
`carrier[7]` on the left:

```
11110000  <- state right after the clear
01111000
00111100
00011110
00001111
10000111
11000011
11100001
11110000  <- repeats every 8 input clocks
```

Each carrier is the one to its left delayed by one input clock, so each
carrier leads the one to its right by 45 degrees.

Two points to keep in mind:

* **The start state matters.** The tree only produces this phase
  numbering from the all-zero state. Without a clear, a flip-flop that
  powers up at 1 swaps which node is which phase (the set of phases is still
  complete). Keep `rst_n` low until `clk_in` runs, and give it a falling
  edge: the clear is asynchronous and edge-sensitive in simulation.
* **The clocks ripple.** In RTL every node settles in the same time step as
  the input clock edge. In hardware, carrier m arrives K flip-flop delays
  after the edge along its own path, and differences between those paths
  are the phase error of the modulator. The bench build of this circuit in
  TTL showed RMS phase errors of 0.57 to 1.14 degrees at a 5 kHz carrier.
  For synthesis and timing analysis, each flip-flop output is a generated
  clock; declare them as such.

## Selecting the phase (`carrier_mux`)

An M-to-1 multiplexer passes `carrier[symbol]` to `mpsk_out`, with its
complement on `mpsk_out_n` (the two outputs of a 74151). Symbol m therefore
transmits phase m·360/M, as in s(t) = cos(2π f_c t + 2π m/M). It is
combinational: when the symbol changes, the output can switch in the middle
of a carrier half-cycle, which is the phase jump of PSK itself.

## Where the symbols come from

`mpsk_transmitter` has two data sources, chosen with `data_src`:

* `data_src = 0` — **serial data** (`serial_in`, sampled on the rising edge
  of `bit_clk`) grouped into K-bit symbols by `serial_to_parallel`. The first
  bit of each group is the symbol's MSB. Groups are counted from the clear;
  there is no framing. A new symbol appears on the edge that samples its
  last bit and is held for K bit periods; `symbol_load` marks it.
* `data_src = 1` — **test pattern** from `data_pattern_gen`: a binary
  counter clocked on the falling edge of `carrier[DATA_CARRIER]` divides the
  carrier by 2^DATA_DIV_BITS (256 by default, two 4-bit counters in the
  original circuit) and its next K bits are the symbol, so the output steps
  through phases 0, 45, 90 … 315 degrees, each for 256 carrier periods, and
  wraps. Because the data clock is derived from the carrier, the carrier is
  an exact multiple of the symbol rate. `pattern_step` marks each step.

## Top level and ports

`mpsk_transmitter` (parameters `K` = 3, `DATA_DIV_BITS` = 8,
`DATA_CARRIER` = 0; M = 2^K):

| port | dir | width | meaning |
|---|---|---|---|
| `clk_in` | in | 1 | high-frequency clock f0; carriers run at f0/M |
| `rst_n` | in | 1 | active-low asynchronous clear of every flip-flop |
| `data_src` | in | 1 | 0 serial data, 1 test pattern |
| `bit_clk`, `serial_in` | in | 1 | serial data and its clock |
| `mpsk_out`, `mpsk_out_n` | out | 1 | modulated square wave and complement |
| `carrier` | out | M | all carriers; `carrier[0]` is the phase reference |
| `symbol` | out | K | symbol in use (multiplexer select) |
| `symbol_load`, `pattern_step` | out | 1 | new serial symbol / test-pattern step |

The carrier frequency is fixed at f0/M. If the wanted carrier cannot be
reached that way, a mixer stage after `mpsk_out` shifts it. The band-pass
filter, the mixer with its local oscillator, the class-D power amplifier and
the clock oscillator are analog or external and are not part of the RTL;
they connect to `mpsk_out` and `clk_in`.

## What follows the original circuit and what is a choice here

Taken from the original: the flip-flop tree with its node numbering,
falling-edge toggling and all-zero start; the M-to-1 multiplexer with true
and inverted outputs; serial-to-parallel conversion ahead of the select
lines; the test-pattern counter clocked by a carrier with 16 × 16 division
and three symbol bits; 8-PSK as the main configuration.

Chosen here: the asynchronous clears (the original counters have their
resets grounded); `carrier[m]` wired to multiplexer input m so that symbol m
means phase m·360/M (the original wiring of carriers to multiplexer inputs
is not reproduced); the serial-to-parallel bit order, clock edge and
holding register; a synchronous counter in place of the 7493 ripple chain
(same count sequence); carrier 0 as the test-pattern clock; the `data_src`
switch that puts both data sources in one netlist; no multiplexer strobe
input (the original ties it to its enabled level).

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_mprc` — trees of K = 1…4: clear state, period M, 50 % duty cycle and
  the m·360/M phase lead of every carrier, before and after a second clear.
* `tb_carrier_mux` — every select value of an 8- and a 16-way multiplexer
  with one-hot and random carrier patterns.
* `tb_serial_to_parallel` — random bits, K = 3 and 2: symbol contents, bit
  order, one load per K bits, symbol held between loads.
* `tb_data_pattern_gen` — symbol = (falling edges / 2^DIV_BITS) mod M and
  the step strobe, over 2.5 wraps of the default counter.
* `tb_mpsk_transmitter` — the whole 8-PSK transmitter at default
  parameters, end to end: test-pattern mode through all symbols and the wrap,
  then serial mode, then back. Each sample checks that the output is the
  carrier the expected symbol selects. In every symbol period `phase_meter`
  (a model of a sampling phase meter: cycle from two rising edges of the
  output, shift from an output rising edge to the next reference rising edge,
  phase = shift/cycle·360) measures the output against `carrier[0]` with
  160 samples per carrier cycle, and a table of RMS phase error per ideal
  phase is printed. In this zero-delay model every error is 0.00 degrees.
* `tb_mpsk_orders` — the transmitter built as BPSK, QPSK and 16-PSK, with
  every phase measured.

To run one with plain Verilator (5.x):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/mpsk_pkg.sv \
    tb/tb_mpsk_transmitter.sv --top-module tb_mpsk_transmitter
./obj_dir/Vtb_mpsk_transmitter
```

The full 8-PSK run (8 × 2048 input clocks plus the serial part) takes well
under a second.

## Limits

* The RTL has no propagation delays, so it cannot show the phase imbalance
  that the flip-flop paths cause in hardware; it shows the ideal phases.
* The flip-flops are clocked by other flip-flops' outputs (ripple clocking),
  as in the original. This is intended, but it needs generated-clock
  constraints in an FPGA or ASIC flow, and on an FPGA the phase steps will
  carry the skew of the clock routing.
* The serial input has no framing: the receiver side must agree on which
  bit starts a symbol, counted from the clear.
