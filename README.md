# Pipelined soft-decision Viterbi decoder, 64 states, rate 1/2

This is a streaming decoder for a rate 1/2 convolutional code with constraint length 7
(64 trellis states). It takes one pair of 3-bit soft values per clock and returns one decoded
bit per clock, a fixed 64 pairs later. The pair can be interrupted at any time with a valid
signal.

Each stage finishes its work in one clock, and registers separate the stages:

* branch metrics,
* add-compare-select over all 64 states,
* survivor memory,
* traceback.

The traceback part is split into two walkers that run at the same time on different blocks of
the survivor memory:

* a *traceback pointer* finds a reliable starting state;
* a *decoder* turns an older block into bits.

Neither walker ever waits for the other.

Next to the decoder are the encoders it pairs with:

* a generic rate 1/2 encoder, used for the decoder's code and also set up as a small
  three-stage example;
* a three-stage rate 1/3 encoder;
* an output switch per encoder, which sends the code bits out serially;
* a branch metric unit for rate 1/3 soft triples.

The design follows a paper on an area-efficient pipelined Viterbi decoder for wireless
receivers. That paper fixes the block structure, the 64-state trellis, the port widths and the
four-block survivor memory. It leaves many details open. The section
"Sources of the design choices" below lists which parts come from the paper and which were
chosen here.

## Block structure

```
             soft0,soft1 (3b each)
                   |
               +-------+   bm[4] x 4b   +-----+      +-----------+  dec[64], best  +---------------------------+
 in_valid ---> |  bmu  | -------------> | reg | ---> | acs_unit  | --------------> |      traceback_unit       | --> out_bit
               +-------+                +-----+      | 64 states |                 |  survivor_mem  4 x 16 col |     out_valid
                                                     +-----------+                 |  tb_pointer   tb_decoder  |
                                                                                   +---------------------------+
```

| file | role |
|---|---|
| `rtl/viterbi_pkg.sv` | Constants (K = 7, 64 states, widths, generators) and trellis helper functions. |
| `rtl/bmu.sv` | Branch metrics of the four code symbols. Combinational. |
| `rtl/acs_unit.sv` | 64 add-compare-select cells, renormalisation and the minimum-metric (best) state. |
| `rtl/survivor_mem.sv` | 64 columns x 64 decision bits. One write port and two bit-read ports. |
| `rtl/tb_pointer.sv` | Traceback pointer. |
| `rtl/tb_decoder.sv` | Decoding pointer with its bit-reversal double buffer. |
| `rtl/traceback_unit.sv` | Block/column counters and the schedule that ties memory and both pointers together. |
| `rtl/viterbi_decoder.sv` | The complete decoder. |
| `rtl/conv_enc_r12.sv` | Rate 1/2 encoder. Parameterised: defaults K = 3, V1 = S0^S2, V2 = S0^S1^S2. |
| `rtl/conv_enc_r13.sv` | Rate 1/3 encoder. Taps (1,1,1), (0,1,1), (1,0,1). |
| `rtl/output_switch.sv` | Encoder output switch. Sends the N code bits of each message bit out serially, V1 first, and paces the encoder. |
| `rtl/bmu_r13.sv` | Half branch metric unit for rate 1/3 correlation metrics. |
| `rtl/viterbi_codec.sv` | Top level. Holds the rate 1/2 encoder (set to the decoder's code) with its output switch, the decoder, and side by side the rate 1/3 encoder with its own output switch and the rate 1/3 branch metric unit. |

## Code and trellis conventions

These conventions are used by every block. Mixing them up is the easiest way to break the
design.

* **Generators.** G0 = 171 and G1 = 133 (octal) give the code bits V1 and V2. The most
  significant generator bit taps the newest message bit.
* **State.** A state is the last six message bits, with the newest in bit 0. On message bit
  `u`, state `s` moves to `s' = {s[4:0], u}`.
* **Predecessors.** State `s'` has two predecessors, `{d, s'[5:1]}` for d = 0 and d = 1. The
  decision bit `dec[s']` stores which of the two survived.
* **Branch label.** The encoder window of that branch is `{d, s'}`, so the expected symbol of
  every branch is a function of `(s', d)` alone (`viterbi_pkg::branch_sym`).
* **Decoded bit.** The message bit of a trellis step is bit 0 of the state reached in that
  step. Tracing back from a state therefore yields one decoded bit per step without any
  further lookup.

To change the code, edit `K`, `G0` and `G1` in `viterbi_pkg`. The memory and traceback widths
follow from `NSTATE`. One exception: the metric widths assume a spread of path metrics below
128, which holds for K = 7 with 3-bit soft inputs. The end-to-end testbenches also hard-code
the 171/133 encoder, as an independent reference.

## Branch metrics

The received soft values use offset binary: 0 is a confident 0 and 7 is a confident 1. The
distance of a value `x` to an expected 0 is `x`. To an expected 1 it is `7 - x`, which for
3 bits is `x XOR 111`: each soft value is XORed with the expected code bit, the soft form of
counting differing bits. A branch metric is the sum of the two distances, 0 to 14, in 4 bits.

The unit only adds up two of the four metrics, `bm[00]` and `bm[01]`. The other two are
complements: `bm[11] = 14 - bm[00]` and `bm[10] = 14 - bm[01]`. This is the symmetry
`bm(c) = -bm(~c)` of antipodal metrics, restated for non-negative distances.

`bmu_r13` applies the same idea to a rate 1/3 code with signed correlation metrics. It forms
`Bm(0,y,z) = -A +/- B +/- C` for the four words whose first bit is 0. The other four are the
negations, which a following ACS would take by subtracting instead of adding. The repository
has no rate 1/3 ACS or traceback, so `bmu_r13` is a stand-alone unit.

## Add-compare-select and renormalisation

On every valid step, each of the 64 cells does the following:

1. Adds the two incoming branch metrics to the 8-bit path metrics of its predecessors.
2. Keeps the smaller sum. On a tie it keeps predecessor d = 0.
3. Emits the decision bit.

A 63-node compare tree over the new metrics finds the best state (lowest index on ties). It
comes out as an 8-bit value `best`, and the traceback uses its low 6 bits.

**Renormalisation.** Path metrics only grow. When every new metric has its MSB set, the MSB is
cleared in all of them, which subtracts 128 from each and keeps every comparison unchanged.
This needs one 64-input AND and no subtractor in the loop.

This is safe because:

* the metric spread in this trellis is at most 6 x 14 = 84, plus one branch;
* the minimum stays below 128 after a clear;
* so the maximum stays below 128 + 98 < 256.

**Reset.** Reset gives state 0 a metric of 0 and every other state 64. The decoder therefore
assumes that the encoder starts in the zero state.

## Survivor memory and the traceback schedule

This section describes the part of the design that is hardest to follow.

The survivor memory holds 64 columns, each the 64-bit decision vector of one trellis step. The
columns form four blocks of 16, used as a ring. Every valid step writes one column. A block
therefore lasts 16 valid steps, and during a block every unit moves exactly one column per
step:

| while block `p` is written | activity |
|---|---|
| block `p`   | written by the ACS, column 0 to 15 |
| block `p-1` | walked by the **traceback pointer**, column 15 down to 0 |
| block `p-2` | waits; the traceback pointer already knows its end state |
| block `p-3` | walked by the **decoder**, column 15 down to 0, which produces its 16 bits in reverse |

The traceback pointer starts at the best state of the newest column of block `p-1`. The
`traceback_unit` latches that state when it writes the last column of a block. After 16 steps
the pointer holds the state the survivor path passes through at the end of block `p-2`. That
state is where the decoder starts one block later, when block `p-2` has become `p-3`.

The decoder writes its reversed bits into one half of a 2 x 16-bit buffer. At the same time it
reads the other half, filled during the previous block, in forward order into `out_bit`. The
block whose bits leave is `p-4`, the block whose columns are being overwritten right now.

The two walkers read different blocks through separate read ports. As a result:

* the decoder never waits for the traceback;
* the unit needs no stall logic;
* four blocks is exactly the memory this schedule needs.

**Consequences for a user:**

* **Fixed latency.** The bit of column `n` leaves on the clock edge that writes column
  `n + 64`.
* **Traceback depth.** A bit is decoded from a path traced back 16 to 31 steps from a best
  state. That is enough to correct isolated errors, and the testbenches correct dozens of
  inverted code bits. It is, however, shorter than the common rule of 5 x K = 35 steps, so
  error performance on a noisy channel will be below that of a decoder with a deeper
  traceback. A deeper traceback needs a larger `BLK` (depth `BLK` to `2*BLK-1`) at the cost
  of memory and latency.
* **Flushing.** Bits only come out while columns go in. To flush the last 64 bits of a
  message, send 64 more symbols, for example a zero tail through the encoder.
* **Block count.** `NBANK` must stay 4: the schedule is built for four blocks, and the unit
  stops at elaboration otherwise.

## Interface and timing of `viterbi_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid` | in | 1 | a soft pair is present |
| `soft0`, `soft1` | in | 3 | soft values of V1 and V2 (0 = confident 0, 7 = confident 1) |
| `out_valid`, `out_bit` | out | 1 | decoded bit |
| `renorm` | out | 1 | status: the ACS renormalised on this step |

**Pipeline.** The branch metrics are registered, the ACS registers its decisions, and the
traceback unit writes them one clock later.

**Latency.** With uninterrupted input, the decoded bit of a pair appears 67 clocks after the
pair, with `out_valid` high. The 67 clocks are 3 pipeline clocks plus 64 columns.

**Gaps in `in_valid`.** A gap inserts no trellis step and simply delays everything behind it.
`out_valid` is low for the first 64 pairs after reset.

**Throughput.** One bit per clock.

## Encoders

`conv_enc_r12` is a K-stage shift register with two XOR trees.

* Its defaults are the three-stage example encoder: V1 = S0^S2 and V2 = S0^S1^S2, where S0 is
  the incoming bit.
* The top instantiates it with K = 7 and 171/133, the code the decoder expects.
* Both code bits leave together as `{V1, V2}`, one clock after the message bit.
* `output_switch` then sends the bits of each symbol out serially, V1 first. In the top it
  drives `tx_ser_bit`/`tx_ser_valid` for the rate 1/2 encoder and
  `enc3_ser_bit`/`enc3_ser_valid` for the rate 1/3 encoder.

`conv_enc_r13` is the three-stage rate 1/3 encoder. Its outputs are V1 = u^u1^u2,
V2 = u1^u2 and V3 = u^u2, where u1 and u2 are the two earlier bits. It has the same
one-clock timing.

**Pacing.** A serial line carries N bits per message bit, so the switch paces its encoder.
Its `accept` output (`tx_ready` and `enc3_ready` at the top) is high when:

* no symbol is arriving this cycle, and
* at most two bits of the current symbol remain.

The encoder may take a message bit only in such a cycle. The symbol it produces one clock
later is then loaded exactly as the last bit of the previous symbol leaves. Honouring
`accept` gives one message bit every N clocks and a serial stream with no gaps. An assertion
flags a symbol that arrives too early.

**Loop-back.** A loop-back through the top (`viterbi_codec`) needs only a channel between the
parallel pair `tx_sym` and `rx_soft0`/`rx_soft1`. The noiseless mapping is
`soft = 7 * bit`. The pacing limits the encoder to half rate; the decoder itself accepts a
pair every clock.

## Sources of the design choices

**Taken from the paper:**

* the decomposition into branch metric unit, ACS, memory, traceback and decoder;
* 64 states (K = 7);
* 3-bit soft inputs and 4-bit branch metrics;
* the ACS ports: 64 decisions and an 8-bit state output;
* the traceback ports;
* the survivor length of 64 split into four blocks;
* traceback and decoding running at the same time on different blocks;
* the complement symmetry of the branch metrics and the four rate 1/3 metric equations;
* the two example encoders, including their taps;
* the output switch that sends V1 and then V2.

**Chosen here:**

* **Generators.** The 171/133 generators of the 64-state code. The paper gives generators
  only for its three-stage examples.
* **Metric encoding.** The soft-value encoding and the distance metric.
* **Path metrics.** The 8-bit path-metric width, which matches an 8-bit renormalisation signal
  in the original design.
* **Renormalisation.** The MSB-clearing scheme.
* **ACS details.** The tie rules and the reset metrics.
* **Block size.** 16 columns per block, since 64 split into four blocks gives 16.
* **Schedule.** The exact block schedule and the one-block traceback depth.
* **Output reordering.** The bit-reversal double buffer.
* **Parallel encoder outputs.** The encoders deliver all code bits in parallel, and a separate
  output switch serialises them. The paper describes only the switch's function. Its
  shift-register form and its pacing handshake are this design's own.
* **Pipeline control.** Valid-driven rather than enable-driven.

**Not reproduced:**

* The original traceback appears to be a chain of pipelined register stages. Its structure
  could not be recovered in enough detail, so this design uses the memory-based traceback
  with two concurrent pointers that the paper's text describes.
* The paper's remarks on the ACS's internal adder and comparator arrangement do not describe
  a consistent circuit, so each ACS cell here is a plain two-adder, one-comparator cell.
* The FPGA-specific implementation is not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the module against a
model written independently in the testbench and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_conv_enc_r12`, `tb_conv_enc_r13` | Symbols against explicit XOR equations, with gaps and a reset in the middle of a run. |
| `tb_output_switch` | Serial streams for N = 2 and N = 3 against queued symbols. With the encoder always willing, the stream must have no gaps. |
| `tb_bmu`, `tb_bmu_r13` | Exhaustive over all inputs, including the complement symmetry. |
| `tb_acs_unit` | Decisions and best state against an integer trellis with no renormalisation, over 3000 steps. Renormalisation must occur. |
| `tb_survivor_mem` | Both read ports against a shadow copy, including read-during-write. |
| `tb_tb_pointer`, `tb_tb_decoder` | Walks through random decision blocks against a traced reference. |
| `tb_traceback_unit` | Decisions built around a known message path must return that message exactly 64 columns later, through many turns of the memory ring. |
| `tb_viterbi_decoder` | Encoded random message, noisy channel with isolated inverted code bits, gaps in the input. Checks every bit, the 67-clock latency and the output count. |
| `tb_viterbi_codec` | The whole top at default sizes: its own encoder, a channel model, the decoder, both serial streams, plus both rate 1/3 units. |

The two end-to-end tests count corrected hard errors, input gaps, renormalisations and memory
ring turns. The top-level test also counts cycles in which the encoder waits for its output
switch. A run in which any of these never happens fails.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/viterbi_pkg.sv tb/tb_viterbi_codec.sv --top-module tb_viterbi_codec -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench finishes in well under a second
of host time.

## Size

After generic synthesis the decoder holds:

* 4096 bits of survivor memory;
* 512 bits of path metrics;
* a 32-bit reorder buffer;
* about 120 further flip-flops;
* about 700 word-level cells, most of them in the 64 ACS cells and the compare tree.

The critical path is the ACS loop: add, compare, select and the renormalisation AND. The
compare tree hangs off that loop but is not part of it, and could be given its own pipeline
register if timing requires.
