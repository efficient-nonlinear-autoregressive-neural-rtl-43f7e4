# A small pipelined NARNN predictor for implantable sensors

A closed-loop medical device (for example a glucose sensor driving an insulin
pump) should not act on a sample it has no reason to trust. This design checks
each new sample against a forecast: a nonlinear autoregressive neural network
(NARNN) predicts the next value of a time series from its last 16 values, so a
measurement far from the prediction can be flagged or replaced. The network
has one hidden layer of 5 tanh neurons and a linear output:

    Y = b_o + sum_k wo[k] * tanh( b[k] + sum_j w[k][j] * D[j] )      k = 0..4, j = 0..15

where D[0] is the newest sample and D[15] the oldest. The hardware is built
for area and energy rather than speed. Samples arrive minutes apart, so the
network is evaluated one weight column at a time by five multiply-accumulate
processing elements (PEs), one per neuron. All five PEs share one tanh lookup
table. The parameters sit in a small ROM and pass through a five-entry weight
cache. One prediction takes 107 cycles of processing, plus one cycle to form
the output.

## Number format

Every stored value is a signed 10-bit two's-complement fixed-point number
with 8 fraction bits (Q2.8). This covers measurements, delay states, weights,
biases and tanh outputs. The range is [-2, 1.99609375] in steps of 1/256.
Inputs must therefore be normalised into that range, and the network must be
trained or retrained so that its parameters fit it.

Inside a PE, a product of two Q2.8 values is kept in a 20-bit product
register (Q4.16). The accumulator is 21 bits (Q5.16): the product width plus
one overflow bit. It wraps on overflow. It does not saturate. A hidden sum
must therefore stay within [-16, 16). Training with the weight range above
and inputs of about ±1 leaves a wide margin. The worst case (every weight and
input at -2) does not fit.

## Block structure

    y_in ──► tap delay (16 × Q2.8) ──x──┐
                                        ▼
    ROM {w,b} ──► weight cache (5 w, 5 b) ──► PE0..PE4 ──acc──► tanh LUT ──phi──┐
        ▲                                        ▲  │prod                         │
        │addr                                    └──┼─────── phi (layer 2) ◄────┘
    controller (FSM) ── enables to all blocks        ▼
                                              output accumulator ──► y, y_full

| module | role |
|---|---|
| `narnn_pkg` | widths, the `{w, b}` ROM word struct, controller state enum |
| `narnn_pe` | multiplier, product register, bias mux (`b_load`), operand mux (`layer_sel`), accumulator |
| `narnn_weight_rom` | 85 × 20-bit parameter words, one-cycle synchronous read |
| `narnn_weight_cache` | 5 weight and 5 bias registers, written one entry per cycle |
| `narnn_tap_delay` | 16-sample shift register; `sel` picks the column's tap |
| `narnn_tanh_lut` | shared tanh table and the 5 `phi` registers |
| `narnn_out_acc` | adds the output bias and the five output-layer products |
| `narnn_controller` | the sequencing state machine |
| `narnn_top` | wires them together |

Each PE has two multiplicands. One is the selected delay state `x`, used in
the hidden layer. The other is its own tanh value `phi`, used in the output
layer. Only the operand mux changes between the layers.

## The schedule (the part to read carefully)

The controller has the states S_WAIT, S_LOADB1, S_L1, S_LOAD1, S_TANH, S_LOAD2,
S_L2 and S_OUT. The cycle budget is fixed at 107 processing cycles:

| phase | states | cycles |
|---|---|---|
| hidden layer, 16 columns | (S_LOADB1 or S_LOAD1) ×5, then S_L1 ×1 | 16 × 6 = 96 |
| activation | S_TANH, PE 0..4 in turn | 5 |
| output weights | S_LOAD2 | 5 |
| output products | S_L2 | 1 |
| result | S_OUT (not counted above) | 1 |

A column holds the weights that all five neurons apply to one delay state.
Loading a column takes five cycles because the ROM delivers one word per
cycle. Each ROM word also carries a bias field, so during S_LOADB1 the five
hidden biases enter the cache in the same cycles as column 0. During S_LOAD2
the output bias enters the cache beside the first output weight. No cycles
are spent on biases.

Each PE has two registers in series, a product register and an accumulator.
If all PEs worked in lock-step, each column would need one extra cycle. So
would the tanh phase, which needs all PEs to have finished. The controller
instead staggers each PE behind its own weight:

    column cycle:        0      1      2      3      4      5 (S_L1)   0 (next)
    cache write        w0     w1     w2     w3     w4
    product latch              PE0    PE1    PE2    PE3    PE4
    accumulate                        PE0    PE1    PE2    PE3        PE4

A PE's accumulation of one column overlaps the loading of the next column.
After the last column, PEs 0 to 3 are finished before S_TANH starts. PE 4
finishes in the first S_TANH cycle, and the tanh table reads PE 4 last, in
the fifth cycle. The bias is added in the same step as each PE's column-0
product.

In S_L2 all five PEs latch `wo[k] * phi[k]` together. In S_OUT the output
accumulator adds them to the output bias in a single adder tree. `y_valid`
is registered, so it rises at the **108th rising edge after the edge that
takes the sample**. The result then holds until the next one.

ROM addressing is a prefetch. The controller drives the ROM with the next
value of its word counter. As a result, the ROM output in any cycle is the
word at the current count. The counter advances once per load cycle: words
0 to 79 are read in the hidden layer and words 80 to 84 in S_LOAD2.

## Interface (`narnn_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous reset, active low |
| `y_rdy`, `y_in` | in | 1, 10 | new sample (Q2.8); taken in S_WAIT only, ignored while busy |
| `ready` | out | 1 | controller is in S_WAIT |
| `y_valid` | out | 1 | one-cycle pulse: `y` and `y_full` are new |
| `y` | out | 10 | prediction in Q2.8, floored, clipped to the range |
| `y_full` | out | 24 | prediction with 16 fraction bits, before clipping |
| `y_sat` | out | 1 | `y` is clipped |
| `tanh_sat` | out | 1 | the value being looked up lies beyond the tanh table |
| `state` | out | 3 | controller state, for monitoring |

The sample is shifted into the delay line on the edge that accepts it. The
prediction therefore uses the new sample as D[0]. After reset the delay line
holds zeros, so the first 15 predictions see zeros for samples not yet
received.

Parameters: `N` (neurons, 5) and `TAPS` (16) follow the network size. The
widths are in `narnn_pkg`. `ROM_FILE` names the parameter file, relative to
the directory the simulator runs in.

## Tables

**Parameters (`rtl/narnn_weights.hex`)** hold 85 lines of five hex digits,
each `{w[9:0], b[9:0]}` in Q2.8:

- word `j*5 + k` (j = 0..15, k = 0..4): `w = w[k][j]`. For j = 0, `b` is the
  hidden bias `b[k]`; for other j it is 0.
- word `80 + k`: `w = wo[k]`. For k = 0, `b` is the output bias; for other k
  it is 0.

The file shipped is an example parameter set, not a trained model. It holds
uniform random values: hidden weights in [-0.4, 0.4], hidden biases in
[-0.5, 0.5], output weights in [-1, 1] and an output bias in [-0.3, 0.3], all
rounded to Q2.8. To use a trained network, write its quantised parameters in
this layout. The ROM stands for a user-programmable non-volatile memory.
Programming it is outside this RTL. The file is loaded with `$readmemh`.
Simulators and most FPGA flows honour that, but some synthesis front ends
ignore it and leave an empty ROM. In such a flow, replace `narnn_weight_rom`
with the memory macro or a generated constant table.

**tanh** has 256 entries of 9 bits, computed at elaboration by a constant
function in `narnn_tanh_lut`, so it becomes a constant ROM. Entry `i` is
`round(256 * tanh((i + 0.5) / 64))`. The table covers |x| < 4 in steps of
1/64, using the value at the middle of each step. The lookup divides the
accumulator magnitude by 2^10, which turns 16 fraction bits into steps of
1/64. It clamps the index at 255 and restores the sign, using tanh(-x) =
-tanh(x). Beyond |x| = 4 the table returns 1.0, as 8 fraction bits round
tanh to anyway. `STEP_LOG2` and `ENTRIES` change the resolution and range.

## Where this departs from, or adds to, the source design

The source fixes the block structure, the state names, the 5 PE / 16 tap
size, the Q2.8 format, the product and accumulator widths and the 107-cycle
budget. The following are this design's own choices:

- **Timing:**
  - the per-PE staggered enables;
  - biases riding in the ROM word;
  - the one-cycle ROM read;
  - the extra S_OUT cycle with a registered `y_valid`.
  The source counts 107 cycles to a result. Here the result is registered one
  cycle after those 107 cycles.
- **Tables:** the tanh table's size, step, rounding and saturation. The
  source says only that a table approximates tanh.
- **Arithmetic:**
  - accumulator wrap-around;
  - output flooring and clipping;
  - the 24-bit `y_full`.
- **Handshake and reset:**
  - the `y_rdy`/`ready` handshake, where samples offered while busy are
    dropped;
  - zeroed delay states after reset;
  - synchronous active-low reset.
- **Not built:**
  - a port for writing the parameter memory;
  - power gating.

## How far it is verified

Each module has a self-checking testbench in `tb/` that compares it with a
model written independently in the testbench:

- `tb_narnn_pe`: random operands and enables, exact product and wrapping
  accumulator. It tests the default Q2.8 format and a 14-bit Q4.10 instance
  side by side.
- `tb_narnn_tanh_lut`: edge and random inputs against `$tanh` with the table
  rule above, including saturation.
- `tb_narnn_out_acc`: sum, floor, clipping in both directions.
- `tb_narnn_tap_delay`, `tb_narnn_weight_cache`, `tb_narnn_weight_rom`: storage
  behaviour and timing. The ROM test parses the parameter file itself.
- `tb_narnn_controller`: the 107/108 cycle counts, ROM word order, cache
  index and bias enables, each product one cycle after its weight, each
  accumulation one cycle after its product, tanh order, and that samples are
  taken only when idle. The controller also carries concurrent assertions
  for these rules, which every simulation with `--assert` checks.
- `tb_narnn_top`: the whole design at its default size on a 300-sample
  synthetic glucose-like trace. The trace includes spikes and held extremes,
  irregular gaps between samples, and samples offered while busy. Every
  prediction (`y` and `y_full`) must match a bit-exact integer model of the
  network, and every result must arrive at the 108th edge. It counts idle
  waits, ignored samples, delay updates, column loads, layer swaps, tanh
  lookups and tanh saturations, and fails if any of them never happen.

Not verified: the design with trained weights on recorded glucose data.
Output clipping does occur in `tb_narnn_out_acc`, but not with the example
parameters in the end-to-end run.

## Simulating

From the directory that contains `rtl/` and `tb/` (the parameter file is
read by a path relative to it):

    verilator --binary --timing --assert -Irtl rtl/narnn_pkg.sv rtl/narnn_[!p]*.sv rtl/narnn_pe.sv \
        tb/tb_narnn_top.sv --top tb_narnn_top -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run as a failure. Unit testbenches need only the package
and their own module, for example
`verilator --binary --timing -Irtl rtl/narnn_pkg.sv rtl/narnn_pe.sv tb/tb_narnn_pe.sv --top tb_narnn_pe`.

To change the network size, set `N` and `TAPS` on `narnn_top` and supply a
parameter file with `TAPS*N + N` words. The test models in `tb_narnn_top`
and `tb_narnn_controller` use the defaults. To change the number format,
edit `DATA_W`/`FRAC_W` in `narnn_pkg` and requantise the parameter file.
The tanh table follows `FRAC_W` by itself.
