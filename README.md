# A trainable 3-2-1 perceptron for iris recognition

This is a small multilayer perceptron that learns to recognize irises. It
is trained on chip by backpropagation. Each iris reaches the hardware as
a short feature vector: by default, three 8-bit values taken from the
normalized Fourier amplitude spectrum of the unrolled iris image. Each
iris is named by a signature, a number such as 10, 50 or 350. The network
is trained so that its single output approaches the signature of the
iris it sees. In recognition, an output-matching stage maps the output to
the nearest trained signature, or to 0 when no trained iris is close
enough.

Image processing happens before the hardware and is not part of this RTL.
That covers contrast stretching, iris localization, cropping, polar
unrolling, the FFT and the reduction to a few features. The hardware
starts at the feature vector.

The published design that this RTL follows was written in VHDL for an
Altera Mercury FPGA. This RTL keeps its architecture:

- three input nodes, two hidden sigmoid neurons and one output sigmoid
  neuron;
- a random weight generator;
- normalization in front of every neuron;
- a piecewise linear sigmoid;
- a backpropagation stage after the output neuron;
- three operating modes (01, 10 and 11);
- a data bank and an output-result stage.

The publication gives no widths, number formats, timing or matching rule.
All of those are choices made here. They are listed in
[Departures and choices](#departures-and-choices).

## Operating modes

The `mode` input selects what the network does:

| mode | name | what happens |
|------|------|--------------|
| `01` | weight generation | On entering the mode, all 11 weights (8 hidden, 3 output) are loaded from the random generator, one per cycle. `init_done` then rises. Re-entering the mode draws a fresh set. |
| `10` | training | Data bank entries `0 .. train_count-1` are presented in turn, over and over, while the mode stays `10`. Every presentation is a forward pass followed by a weight update. `epochs` counts completed passes. |
| `11` | testing | A feature vector on `test_pix` is taken when `test_valid && test_ready`. It gets a forward pass only; weights never change in this mode. `match_id` then gives the recognized signature, or 0. |
| `00` | idle | Nothing happens. |

A mode change takes effect at the end of the presentation in progress. A
typical session runs in this order:

1. Write the bank.
2. Set mode `01` until `init_done` rises.
3. Set mode `10` until `epochs` reaches the number of passes wanted.
4. Set mode `11` and stream test vectors.

## Datapath of one presentation

```
            data bank ──┐
                        ├─► input nodes ─► hidden layer ─► output layer ─► output result ─► match_id
 test_pix ──────────────┘   (buffer,       (2 neurons,     (1 neuron,        (nearest signature
                             desired d)     own weights)    own weights)      within tolerance)
                                  │               ▲   │         ▲   │
                                  │               │   └──h──────┼───┤
                                  └──────d────────┼─────────────┼───▼
                                                  └── adjusted ─┴─ backpropagation layer
                                                      weights
 random weight generator ──► weight registers of both layers (mode 01)
```

A presentation takes four clock cycles, stepped by `nn_controller`:

| cycle | state | action |
|-------|-------|--------|
| 1 | IDLE | The input nodes load a vector, from the bank (training) or from `test_pix` (testing). |
| 2 | HID | The hidden activations `h` are registered. |
| 3 | OUT | The network output `o` is registered. |
| 4 | UPD | Training only: the adjusted weights from the combinational backpropagation layer are written to both layers. |
| 4 | MATCH | Testing only: the output-result stage compares `o` with the bank signatures. `match_valid` and `match_id` appear one cycle later. |

Each neuron computes its weighted sum and sigmoid in one combinational
cycle, and all the products of a layer are formed in parallel. At the
121.87 MHz the published FPGA build reached:

- weight initialization takes 11 cycles, about 90 ns;
- a training presentation takes 4 cycles, about 33 ns;
- a recognition takes 4 cycles from an accepted vector to `match_valid`;
- with `test_valid` held high, a new test vector is accepted every 4
  cycles, so the seven test vectors of the original trace take 28 cycles.
  That trace spent 700 ns on them.

Nothing here has been timed on an FPGA.

## Number formats

This is the part that most needs care. Widths and scalings are shared
through `iris_pkg`.

| quantity | format | note |
|----------|--------|------|
| feature, pixel | 8 bit unsigned | 0..255 |
| normalized neuron input `n` | 16 bit signed, Q.15 | `n = (v - 134) * 240`, saturated |
| weight | 16 bit signed, Q.10 | 1024 = 1.0. Random start in -1024..1022. Saturates at ±32 |
| weighted sum `A` | 40 bit signed, Q.25 | Q.15 × Q.10 |
| sigmoid argument | Q.8, limited to ±8 | `A >>> 17` |
| hidden activation `h` | 8 bit unsigned | 256 = 1.0 |
| network output `o`, signature `d` | 10 bit unsigned | 1024 = 1.0 |
| deltas | 16 bit signed, Q.10 | |

### Normalization

Each value that enters a neuron first passes through `normalizer`. That
covers each feature in the hidden layer and each hidden activation in the
output layer. The normalizer maps the 0..255 range to -32160..29040, so a
value near the middle of the range becomes a small signed number. The
constants 134 and 240 are not arbitrary. They reproduce every
normalized value printed in the original design's simulation trace:
feature 92 gives -10080, and hidden activation 136 gives 480. Each hidden
neuron has its own three normalizers, six in all, as in that trace.

### Neuron

```
A = Σ n_i · w_i  +  32767 · w_threshold
```

`A` is then reduced to Q.8 and fed to the sigmoid. The threshold is an
extra weight on a constant input of 1.0. Backpropagation trains it like
any other weight.

### Piecewise linear sigmoid

All slopes are powers of two. With `a = |x|`:

```
a ≥ 5         : 1
2.375 ≤ a < 5 : a/32 + 0.84375
1 ≤ a < 2.375 : a/8  + 0.625
0 ≤ a < 1     : a/4  + 0.5
x < 0         : 1 - y(a)
```

The result is evaluated with 12 fraction bits, then cut to the neuron's
output width (8 or 10 bits), saturating at all-ones.

### Backpropagation

`backprop_layer` is purely combinational. It uses gradient descent on
`E = e²/2`. The error is `e = o - d`. The sigmoid derivative is written
as `y(1-y)`. All shifts are arithmetic, so results round toward minus
infinity.

```
delta_o   = (e · (o(1024-o) >> 10)) >>> 10
delta_h_j = (((delta_o · Wo_j) >>> 10) · (h_j(256-h_j) >> 6)) >>> 10
Wo_j'     = sat16(Wo_j   - (delta_o   · nh_j) >>> (15+ETA_SHIFT_O))
Wh_j,i'   = sat16(Wh_j,i - (delta_h_j · n_i)  >>> (15+ETA_SHIFT_H))
```

- `nh_j` and `n_i` are the normalized neuron inputs. The thresholds see
  the constant input 32767.
- `delta_h` uses the output weights from before the update.
- Each layer has its own learning rate: `2^-ETA_SHIFT_O` for the output
  weights and `2^-ETA_SHIFT_H` for the hidden weights. Both are 0.5 by
  default.

### Random weights

`random_weight_gen` is a 10-bit maximal-length LFSR (x¹⁰ + x⁷ + 1). It
produces R in 1..1023, and the weight is `X = -1024 + 2R`. This scales a
0..1024 random source onto [-1024, 1024] with no division, only a
power-of-two scale factor.

## Recognition and the output-result stage

`output_result` compares the network output `o` with the signatures of
the first `train_count` bank entries, all in parallel. It shows the
nearest signature if it lies within `MATCH_TOL` (default 20), and 0
otherwise. Signature 0 is reserved for "no match".

What to expect: the default network is very small. On the eight irises
of the original trace (feature vectors such as (92, 95, 94) → 10 and
(38, 37, 39) → 50), the signatures do not vary smoothly with the
features. After 45 passes the network settles close to their mean. Its
output is 187..197 for every iris, so each one is shown as 200. Trained
further on the first two irises (signatures 10 and 50), it settles near
67, so both are shown as 50. Updates do thin out as training settles:
the first pass changes 77 of its 88 weight values (11 weights times 8
presentations), and the 45th pass changes 57. This is the genuine
behaviour of a 3-2-1 sigmoid network with this arithmetic. The
testbenches check it bit for bit against a reference model. They do not
claim a recognition rate.

## Modules

| module | role |
|--------|------|
| `iris_matching_top` | Top level. Wires everything below. |
| `nn_controller` | Mode sequencer: init counter, 4-cycle presentation FSM, bank index and epoch counter. |
| `random_weight_gen` | LFSR and weight mapping. |
| `data_bank` | DEPTH × (features, signature) register file. Asynchronous read port, and all signatures in parallel. |
| `input_layer` | Input nodes: a buffer of one feature vector and its desired output. |
| `hidden_layer` | N_HID neurons, their normalizers and the N_HID × (N_IN+1) weight registers. |
| `output_layer` | One neuron, its normalizers and its N_HID+1 weight registers. |
| `backprop_layer` | Error, deltas and adjusted weights. |
| `output_result` | Nearest-signature match with tolerance. Registered result. |
| `neuron` | Weighted sum and sigmoid. Combinational. |
| `normalizer` | `(v - 134) * 240`. Combinational. |
| `sigmoid_pwl` | Piecewise linear sigmoid. Combinational. |
| `iris_pkg` | Widths, formats, mode enum and the saturation helper. |

### Parameters of `iris_matching_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `DEPTH` | 8 | Data bank entries, the number of trained irises. |
| `N_IN` | 3 | Input nodes, the features per iris. |
| `N_HID` | 2 | Hidden neurons. |
| `ETA_SHIFT_H` | 1 | Hidden-layer learning rate 2^-ETA_SHIFT_H. |
| `ETA_SHIFT_O` | 1 | Output-layer learning rate 2^-ETA_SHIFT_O. |
| `MATCH_TOL` | 20 | Largest distance between output and signature that still counts as a match. |
| `SEED` | 356 | LFSR start value. |

The layer sizes are free. Weight initialization then takes
`N_HID·(N_IN+1) + N_HID+1` cycles. The output layer always has one
neuron, because the signature coding has no meaning for several outputs.

## Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | Clock, asynchronous active-low reset. |
| `mode` | in | 2 | `mode_e`: 00 idle, 01 init, 10 train, 11 test. |
| `bank_we`, `bank_waddr`, `bank_wpix`, `bank_wsig` | in | 1, log2 DEPTH, N_IN×8, 10 | Bank write port. One entry per cycle. |
| `train_count` | in | log2(DEPTH+1) | Entries used for training and matching. |
| `test_valid` / `test_ready` / `test_pix` | in / out / in | 1, 1, N_IN×8 | Test vector handshake. |
| `match_valid`, `match_id` | out | 1, 10 | One-cycle result strobe, and the recognized signature or 0. |
| `init_done`, `epochs`, `weight_update` | out | 1, 16, 1 | Status. |
| `nn_output`, `desired_output`, `output_error`, `output_delta` | out | 10, 10, 11, 16 | Monitors of the output neuron. |
| `hidden_output`, `hidden_error`, `random_value` | out | N_HID×8, N_HID×16, 10 | Monitors of the hidden layer and the generator. |
| `norm_input_monitor`, `norm_hidden_monitor` | out | N_HID×N_IN×16, N_HID×16 | Normalized inputs of each hidden neuron and of the output neuron. |

## Departures and choices

These points follow the source design:

- the 3-2-1 structure, with sizes that can be changed;
- the sigmoid neurons with a piecewise linear sigmoid;
- the normalization circuit, with its constants recovered from the
  original simulation values;
- the random weights `X = -1024 + 2R` from a 0..1024 source;
- backpropagation of `e = o - d` by gradient descent, adjusting weights
  and thresholds;
- the mode codes 01, 10 and 11;
- a data bank that feeds training;
- an output stage that shows the matched iris's number, or 0.

These points are choices made here:

- all widths and fixed-point formats;
- the LFSR;
- the segments of the sigmoid;
- the learning-rate values (one rate per layer follows the source);
- thresholds as weights on a constant input;
- the bank organisation and its depth of 8;
- the nearest-signature rule and the tolerance;
- the 4-cycle sequencing;
- the idle mode 00;
- the test-vector handshake.

The original simulation trace also shows the output neuron at 134 against
a desired value of 350, with an error of -3. That output scaling could
not be reconstructed. Here the output uses the signature's own unit
instead.

The source says both that testing must follow a weight initialization
and that weights stay unchanged during testing. Here testing always uses
the trained weights, and initialization runs only in mode 01.

## Simulation

Every testbench checks its block against values computed independently.
Each prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_iris_matching_top` | End to end at the default parameters. The eight-iris bank gets 45 training passes (360 presentations), then recognition tests. It then streams the trace's seven test vectors back to back and checks that they take 28 cycles. Finally it trains on a two-iris subset and tests again. Every training output, error, delta and hidden value is checked against a reference model, and so are all latencies. It also counts weight init, updates, epochs, matches, rejections and mode switches, and fails if any of them never happens. |
| `tb_iris_config` | The same flow with 4 inputs, 3 hidden neurons, a 4-entry bank and a hidden-layer learning rate of 1/4. |
| `tb_iris_workload_1000` | A 1000-sample workload at the default parameters. The eight irises plus small random noise give 1000 training vectors, run as 125 batches of 8 through the bank, one pass each. Then 1000 noisy test vectors are matched, and every output is checked against the reference model. It reports the recognition count and the accuracy figure `100 - mean(100·(X-Y)/X)`, where X is the desired signature and Y is the output. Because that mean is signed, errors of opposite sign cancel out, so the figure can exceed 100 % and says little about recognition. On this data the output settles near the mean signature, so 125 of the 1000 samples (the iris whose signature is 200) are recognized and none are rejected. |
| `tb_<block>` | One per module: exhaustive for `normalizer` and `sigmoid_pwl`, randomized for the rest. |

`tb/iris_ref_pkg.sv` holds the reference arithmetic, written directly
from the formulas above with 64-bit integers. To run a testbench with
Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/iris_pkg.sv tb/iris_ref_pkg.sv \
  tb/tb_iris_matching_top.sv --top-module tb_iris_matching_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The full end-to-end run
takes under a second.
