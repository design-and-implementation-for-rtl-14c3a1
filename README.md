# Viterbi decoder for a space-time trellis code (4-state QPSK, two transmit antennas)

Space-time trellis coding sends one QPSK symbol from each of two transmit
antennas at every step. The pair of symbols is a function of the current and
the previous pair of information bits, so the receiver can treat the received
sequence as a walk through a trellis and recover the bits with the Viterbi
algorithm. This gives diversity against fading as well as coding gain.

This repository holds the SystemVerilog of such a link:

* the encoder for the 4-state delay-diversity code;
* a Viterbi decoder that processes one trellis step per clock. Its survivor
  memory is a combinational **permutation network** that is driven forward, in
  the manner of **modified register exchange**. The decoder needs no
  trace-back and no LIFO reordering. Its latency is the truncation length
  T = 20 steps, and it stores N·T decisions;
* an optional area-reduced survivor memory. Its network spans only T/M
  stages, at the price of M extra clocks per segment.

## The code

Each step takes two bits, c1 and c2. Each bit has a shift register of one
stage. Every tap is multiplied by a coefficient in Z4, and the products are
summed modulo 4 for each antenna. The generator sequences are

    g1 = [(0,2), (2,0)]     g2 = [(0,1), (1,0)]

so that, with symbol index k standing for the QPSK point exp(jπk/2):

    x1(t) = 2·c1(t-1) + c2(t-1)      (antenna 1 repeats the previous pair)
    x2(t) = 2·c1(t)   + c2(t)        (antenna 2 sends the current pair)

Example: the inputs 10, 01, 11, 00, 01 give the symbol pairs 02, 21, 13, 30, 01.
The trellis state is the previous input pair. This has three useful results:

* there are 4 states;
* every state can be reached from every state;
* the branch from state s to state u carries the label (x1, x2) = (s, u).

The third point matters most for the hardware. **The state a survivor passes
through at step t is the decoded input pair of step t.** The survivor memory
therefore only has to find a state, not separate decision bits. The
generators and the code structure are in `rtl/sttc_pkg.sv`. The functions
there compute the labels from the generator table, not from this closed form.

## Decoder pipeline

```
 r, h ──► bmu ──► acs_array ──► smu_pn (or smu_pn_seg) ──► decoded {c1,c2}
         1 clk     1 clk          T steps + 1 clk
```

**Branch metrics (`bmu`).** For each of the 16 labels the unit computes
Σ_j |r_j − h_j1·x1 − h_j2·x2|² over the receive antennas. The channel gains h
are known and held for a frame (quasi-static fading). A gain times a QPSK point
is a 90° rotation, so the hypotheses need no multipliers; only the squares do.
Branch metrics are 2 bits wide. To get there, the unit subtracts the smallest
distance of the step from all 16 distances, shifts right by `BM_SHIFT`, and
saturates at 3. With 2 bits the metric is close to a hard decision, and
`BM_SHIFT` must suit the signal level: with gains of about ±40 to ±60 per
component, 9 is reasonable.

**Add-compare-select and path metrics (`acs_unit`, `acs_array`).** Each of
the 4 states has its own ACS unit (the fully parallel form), so one trellis
step takes one clock. Each unit compares four candidates (path metric + branch
metric) with a chain of two-way compare-selects. Path metrics are 8-bit two's
complement numbers that are never rescaled. They wrap, and two metrics are
compared by the sign of their wrapped difference (modulo normalization). This
is exact as long as all metrics lie within 128 of each other. Here the
spread is 16 at the start of a frame (the initial offset) and at most 3 after
the first step. Every state can be reached from the best state through one
branch, and no branch metric exceeds 3. On a tie the
lower-numbered predecessor wins. At `frame_start`, state 0 starts at 0 and the
other states at `PM_INIT` (16), because the encoder starts in state 0. The
array also outputs the best state, which is the state with the smallest
metric.

**Survivor memory (`smu_pn`).** This is the part that needs the most care.
The unit keeps the last T decision vectors in a window. Each vector holds 4
decisions of 2 bits; a decision names the surviving predecessor of its state.
Over the window lies a network of T columns of 4:1 multiplexers, one
multiplexer per state per column:

```
 column 0 (oldest)          column k                  column T (newest)
 label[0][s] = s     label[k+1][u] = label[k][ dec_k[u] ]    label[T][best] → output
```

Column 0 is loaded with the state numbers. In each later column, the
multiplexer of state u copies the label of u's surviving predecessor, so a
label travels forward along the survivor paths, as in register exchange. The
label that reaches the best state at the newest end is the state, T steps
back, on the most likely path. Because of the property above, this label is
the decoded pair. The whole trace happens in one clock as combinational
logic. The unit needs no separate trace-back phase and no LIFO, because
symbols come out in order.

Why the forward direction works: the decisions of a column form a map from
states to predecessor states. Trace-back applies these maps from the best
state backwards. The network builds, for every end state, the composition of
the maps in the other direction. Both give the same state at column 0.

Timing: the symbol of step t leaves T + 3 clocks after step t entered, when
steps arrive on every clock. The first output of a frame follows its step
T + 1, because the window must first hold T real steps after the start state.

**Area-reduced survivor memory (`smu_pn_seg`, `SMU_SEG` = M > 1).** The
network is cut to L = T/M stages. Each time L decision vectors have arrived,
the short network computes two things for every end state u:

* the state at the start of the segment on u's survivor (its origin);
* the L states it passes through.

Registers keep these results for the last M + 1 segments. A walk then follows
the origins from the newest best state back through M segments, one lookup per
clock, so it takes M clocks. It ends at the end state of the oldest stored
segment. That segment's stored L states are its decoded symbols, and they
leave one per clock. Every symbol therefore rests on at least T steps of
history. The network shrinks by a factor of M. Symbols come out in bursts of L,
and the first symbol of a burst appears M + 1 clocks after the step that
completed the newest segment. The walk must end before the next segment
completes, so M < L is required. The default is M = 4 and L = 5.

## Interfaces

All blocks share one clock and an active-low asynchronous reset. Inputs
arrive with a `valid` strobe, and there is no back-pressure. The types are in
`sttc_pkg`:

* `sym_t`: a 2-bit pair or QPSK index;
* `state_t`: a 2-bit state;
* `cplx_t`: a struct `{re, im}`, each an 8-bit signed value.

| `sttc_top` port | meaning |
|---|---|
| `tx_frame_start`, `tx_valid`, `tx_data[1:0]` | Encoder input {c1,c2}. `frame_start` clears the shift registers. |
| `tx_sym_valid`, `tx_sym[2]` | Antenna symbol indices, one clock later. |
| `rx_frame_start`, `rx_valid`, `rx_r[N_R]`, `rx_h[N_R][2]` | One received sample per receive antenna, with the frame's channel gains. |
| `rx_out_valid`, `rx_out_data[1:0]` | Decoded pairs, in order. |

The decoder does not see the end of a frame. The sender appends tail steps
with input 00 that drive the encoder back to state 0: at least T tail steps
for `smu_pn`, and at least T + T/M for `smu_pn_seg`. A `frame_start` restarts
the path metrics and the survivor memory's output count.

| parameter | default | meaning |
|---|---|---|
| `N_R` | 1 | receive antennas |
| `BM_W` | 2 | branch metric width |
| `BM_SHIFT` | 9 | distance scaling before saturation |
| `PM_W` | 8 | path metric width |
| `PM_INIT` | 16 | start metric of states other than 0 |
| `T` | 20 | truncation length (decoding window) |
| `SMU_SEG` | 1 | 1: full network; M > 1: segmented network |

The branch metric width, the path metric width and the window length follow
the published sizing of this decoder. `N_R`, `BM_SHIFT`, `PM_INIT`, the sample
width, the tie rule, the handshake, the default M and the segment bookkeeping
are choices of this design.

## Choices this design makes

The published decoder fixes the code, the pipeline order, the survivor
memory scheme and the widths above. The following points are settled here
instead:

* **Branch-metric reduction.** Subtracting the step minimum, then shifting
  and saturating, is one way to reach 2 bits. Other scalings are possible.
* **ACS form.** All 4 states have their own ACS unit. A four-way compare is
  built as a chain of two-way compares.
* **Tie rule.** On equal metrics the lower-numbered predecessor and the
  lower-numbered best state win.
* **Decisions.** Each decision is the 2-bit number of the surviving
  predecessor. Every state has all four states as predecessors, so this number
  is also the multiplexer select of the survivor network.
* **Segment bookkeeping.** In `smu_pn_seg`, the M + 1 segment registers, the
  walk of one lookup per clock and the burst output are this design's way of
  spending M clocks instead of network stages.
* **Receive antennas.** `N_R` is a parameter. The default of 1 is this
  design's choice.
* **Framing.** The `frame_start` strobes, the valid-only handshake and the
  start metrics are this design's choice.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`. The expected values come
from reference models in `tb/sttc_ref_pkg.sv`, written from the equations and
not from the RTL:

* an encoder in the delay-diversity form;
* distances computed with a full complex multiply;
* a Viterbi search with unbounded integer path metrics and an explicit
  trace-back.

The decoder and end-to-end tests compare the hardware output with that
reference symbol for symbol. This includes noisy frames, where the decoded
data differs from the sent data. In noiseless frames the decoded data must
equal the sent data. The tests also check:

* the latencies stated above;
* that the 8-bit metrics wrap many times without harm;
* that each testbench catches a deliberate fault in its block.

The following have not been done:

* no bit-error-rate curves were measured;
* nothing was synthesized for an FPGA target, so clock rates are unknown.

A T-column combinational network is a long path: 20 multiplexer levels, plus
the best-state selection.

Known limits:

* The survivor memory relies on the state being equal to the last input pair.
  Codes with more memory per register (8 or more states) would need the
  decoded bits carried through the network alongside the state, and
  predecessor tables in `acs_array`.
* The reduction of branch metrics to 2 bits discards soft information. To keep
  more, widen `BM_W` (and `PM_W` with it).
* Ties are broken deterministically, not at random.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sttc_pkg.sv tb/sttc_ref_pkg.sv tb/tb_sttc_top.sv --top-module tb_sttc_top
./obj_dir/Vtb_sttc_top
```

The `-y` options let Verilator find the other modules by file name. Every
testbench ends with `TB_RESULT checks=N failures=M`. Replace
`tb_sttc_top` (both times) with `tb_sttc_encoder`, `tb_bmu`, `tb_acs_unit`,
`tb_acs_array`, `tb_smu_pn`, `tb_smu_pn_seg`, `tb_sttc_decoder` or
`tb_sttc_stream` to run another test.
`tb_sttc_top` runs the whole link at the default parameters: five frames of
1000 steps, with fresh channel gains per frame and alternating noiseless and
noisy frames. It reports how often each mechanism occurred: metric wrap,
metric saturation, steps the trellis had to correct, and frame restarts.
`tb_sttc_decoder` runs the full and the segmented survivor memory side by side.
`tb_sttc_stream` is the long run: one unbroken frame of 500,020 steps through
a noisy channel, one million decoded bits, each checked against the reference.
It prints the count of bit errors against the sent data and takes some seconds.

## Files

| file | content |
|---|---|
| `rtl/sttc_pkg.sv` | constants, types, generator table, label and rotation functions |
| `rtl/sttc_encoder.sv` | space-time trellis encoder |
| `rtl/bmu.sv` | branch metric unit |
| `rtl/acs_unit.sv` | one add-compare-select element, modulo comparison |
| `rtl/acs_array.sv` | 4 parallel ACS units and the path metric registers |
| `rtl/smu_pn.sv` | permutation-network survivor memory (latency T) |
| `rtl/smu_pn_seg.sv` | segmented permutation-network survivor memory |
| `rtl/sttc_decoder.sv` | decoder pipeline |
| `rtl/sttc_top.sv` | encoder and decoder side by side |
