# Memory-free LUT neural network for streaming ECG artefact detection

Most of the time and energy of a neural-network accelerator goes into moving
weights and activations between memories and arithmetic units. This design avoids that.
It runs a small one-dimensional convolutional network without any memory
accesses and without multipliers. Every neuron has its own hardware. Its
weights and bias are folded, at elaboration time, into a small
constant look-up table. Every activation lives in a register next to the
neuron that reads it. On an FPGA the tables map onto the fabric's 6-input LUTs,
so the network needs no block RAM and no DSP slice. It accepts one input sample
per clock and is fully pipelined.

The RTL implements a complete example: a detector for artefacts in a stereo ECG
recording (two signed 16-bit channels at 500 Hz). It gives one clean/artefact
decision for every 64 input samples.

## The central trick: a neuron is a table

A neuron computes

    y = max(0, sum_i w_i * x_i + b)

If its inputs are quantised to a few bits (here 2 bits) and it has only a few
inputs, the number of possible input states is small. A neuron with
N inputs of n_x bits has 2^(N*n_x) states. The neuron is therefore evaluated
for every state ahead of time. The results are reduced to n_y output bits and
stored in an **n-to-m cell**: a table with n = N*n_x address bits and m = n_y
data bits. On an FPGA such a cell costs m * 2^(n-6) six-input LUTs. A 6-to-3
cell is 3 LUTs; a 12-to-2 cell is 128 LUTs.

Two consequences shape the whole design:

* **Weights stay real numbers.** Only the inputs and outputs of a cell are
  quantised. The cell's table can encode any function of its input codes,
  including non-uniform codebooks, a folded batch normalisation or any
  rounding rule.
* **Inputs per cell must stay small**, because the table doubles with every
  added input bit. Wide neurons are therefore split into trees of small
  cells (next section).

In the RTL:

* `lut_cell` is the bare table: `dout = TABLE[addr*N_OUT +: N_OUT]`,
  combinational.
* `lut_neuron` fills a `lut_cell` from the neuron function.
* `lutnn_pkg::neuron_table()` is a constant function that runs at elaboration.
  For each address it splits the address into inputs: input i sits at bits
  `[i*IN_W +: IN_W]`. It looks up each input's value in the input codebook,
  forms `bias + sum weight*value` and applies the ReLU. It then maps the result
  to an `OUT_W`-bit code through the output thresholds. With the default
  codebooks this is a right shift by `SHIFT` with saturation.

### Codebooks

A code does not have to mean the integer it spells. `lut_neuron` takes two
optional parameters:

* `IN_CODEBOOK`: the value that each input code stands for, up to 16 codes.
* `OUT_THRESH`: ascending positive thresholds. The output code is the number of
  thresholds that `max(0, acc)` reaches.

Any codebook quantisation costs nothing extra in hardware; only the table
changes. The defaults are uniform: code k is worth k, and the thresholds are
k * 2^SHIFT. This gives `y = min(max(0, acc) >> SHIFT, 2^m - 1)`, which is
what the ECG network uses, since no trained codebooks are available. If the
outputs of one layer use a codebook, pass the same values as `IN_CODEBOOK` of
the next layer's cells. `tb_lut_neuron` covers a non-uniform example: input
codes worth -2, 0, 3 and 9, thresholds 2, 7 and 20.

**The weights are stand-ins.** No trained network is included.
`lutnn_pkg::neuron_weight(seed, i)` and `neuron_bias(seed)` derive small
integers from a hash of a per-neuron seed: weights in [-2, 5], biases in
[-2, 2]. The slight positive skew keeps the untrained network active through
all its layers. Each neuron's seed follows from its layer's `SEED` parameter
through `child_seed()`.

To run a trained network, replace these two functions, or the whole of
`neuron_table()`, with the trained values or codebooks. No other file changes.
The decisions the design makes today are therefore not meaningful as ECG
diagnoses. They exercise the datapath.

## Splitting wide neurons: depthwise separable neurons

A convolution over C channels with kernel K has C*K inputs per neuron. With
C = 4, K = 3 and 2-bit codes that is a 24-bit address, which is far too large.
`sep_neuron` splits the neuron the depthwise-separable way:

    channel 0 taps 0..K-1 --> [K*2-to-3 cell, ReLU] --\
    channel 1 taps 0..K-1 --> [K*2-to-3 cell, ReLU] ---+--> [C*3-to-2 cell, ReLU] --> y_f
    ...                                             --/

Each sub-neuron sees one channel over the whole kernel and keeps 3 bits. The
pointwise cell combines the channels. With two channels this is exactly two
6-to-3 cells feeding a 6-to-2 cell. With four channels the pointwise cell is
12-to-2. Every filter has its own sub-neurons with their own biases; nothing is
shared between filters except the input window.

`x` packs channel g, tap t at bits `[(g*TAPS+t)*IN_W +: IN_W]`; tap 0 is the
newest sample.

## Streaming convolution: the push register

`push_register` is a shift register that holds the last DEPTH values of a
stream. `taps[0]` is the newest; `taps[k]` is the value pushed k pushes ago.
In front of a layer, it turns the convolution into a plain dense layer.
Every filter reads all K time steps of all channels in parallel, and the
"slide the kernel" part of the convolution is simply the next push.

`conv1d_layer` = push register (one C*2-bit word per time step, depth K) + F
neurons + an output register. `SEPARATED = 1` uses `sep_neuron`. `SEPARATED =
0` uses one `lut_neuron` over all K*C inputs; the input layer uses this because
it has only 2 channels (a 12-to-2 cell). A `STRIDE` of S is implemented by
evaluating only every S-th input: the outputs belong to inputs S-1, 2S-1, ...
after reset. The ECG network uses stride 1 everywhere; the testbench covers
stride 2.

## Pooling and rate reduction

`pool1d` keeps P values per channel in a push register. After every P-th
valid input it outputs their maximum (`POOL_MAX`) or their mean
(`POOL_AVG`). The mean is the sum divided by P and rounded down, so the code
width stays 2 bits. Windows do not overlap, so each pooling stage divides the
sample rate by P.

This matters for two reasons:

* Later layers switch less often.
* Each of their values covers a longer stretch of signal. A kernel of 3 at
  the input sees 6 ms of ECG. After three pooling stages of 4, one step covers
  64 samples (128 ms), and the classifier's window of 4 steps covers about
  0.5 s.

`conv1d_layer` and `pool1d` carry assertions on their stream outputs. An
output must follow an accepted input by exactly two cycles. With a stride or
pool length above 1, two outputs never come back to back.

## The ECG network (`lutnn_ecg_top`)

| stage | block | shape | cells per filter/class |
|---|---|---|---|
| quantizer | `input_quantizer` | 2 ch x 16 bit -> 2 ch x 2 bit, thresholds -16384 / 0 / 16384 | comparators |
| conv0 | `conv1d_layer`, regular | 2 -> 4 filters, K = 3 | one 12-to-2 |
| pool0 | `pool1d`, max | P = 4 | - |
| conv1..conv3 | `conv1d_layer`, separable | 4 -> 4, K = 3 | four 6-to-3 + one 12-to-2 |
| pool1 | `pool1d`, max | P = 4 | - |
| conv4 | `conv1d_layer`, separable | 4 -> 4, K = 3 | four 6-to-3 + one 12-to-2 |
| pool2 | `pool1d`, max | P = 4 | - |
| dense | `dense_classifier` | last 4 pooled steps x 4 ch -> 2 class scores, argmax | four 8-to-3 + one 12-to-2 |

The layer sequence is the one of the reference detector. The widths of 2 bits
between layers and 3 bits inside a separable neuron, the kernel of 3 and the
pooling length of 4 follow the example structures this design is built on. The
following are this design's own choices:

* 4 filters per layer;
* the classifier's window, its tree split and the argmax (ties go to
  class 0);
* the quantizer thresholds.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active-low reset; clears all registers to code 0 |
| `in_valid` | in | 1 | a stereo sample is present this cycle |
| `in_sample[2]` | in | 2 x 16 signed | the two ECG channels |
| `out_valid` | out | 1 | a decision is present |
| `out_class` | out | 1 | 1 = artefact, 0 = clean |
| `out_score[2]` | out | 2 x 2 | the two class scores |

### Timing

* The input can accept a sample every clock. There is no back-pressure
  anywhere; gaps (`in_valid` low) are allowed.
* Every layer has a register at its output, and every stage has a fixed
  latency: the quantizer 1 cycle, each convolution 2 cycles (push register,
  then output register), each pooling stage 2 cycles after its window's last
  input, and the classifier 2 cycles.
* The decision for a block of 64 samples appears **19 cycles** after the
  64th sample of the block has been presented.
* The pooling counters start at reset, so blocks are samples 1..64, 65..128,
  ... of a record. A record of 5575 samples gives 87 decisions; the 7 trailing
  samples stay in the pipeline until more input arrives.
* Reset between records clears all windows. The first outputs of a record
  therefore see zero padding (code 0) for the samples before it.
* At one sample per clock, a 10 MHz clock gives 10 Msamples/s. No timing
  closure on an FPGA has been done for this RTL.

### Size

By the m * 2^(n-6) rule the cells need about:

| part | LUTs |
|---|---|
| conv0 | 512 |
| four separable layers | 2240 |
| classifier | 352 |
| **total** | **about 3100** |

That is before logic optimisation, and well within a small FPGA of 8000 LUTs.
Flip-flops: about 240 for the push registers, plus the pipeline registers.
Nothing is inferred as memory: the tables are constants and synthesise to
logic.

## What is not here

* **Trained weights.** See above.
* **The record buffer.** The reference system feeds recorded ECG in bursts
  from an external flash buffer.
* **Host or board interface logic.** The top's plain stream ports are where
  that logic would connect.
* **The software flow** that converts a trained model into tables.
  `neuron_table()` takes its place.

## Files

`rtl/` holds one module or package per file:

* `lutnn_pkg` (constants, table functions)
* `push_register`
* `lut_cell`
* `lut_neuron`
* `sep_neuron`
* `conv1d_layer`
* `pool1d`
* `input_quantizer`
* `dense_classifier`
* `lutnn_ecg_top`

`tb/` holds a self-checking testbench per block plus `tb_ref_pkg`. That
package evaluates neurons directly with multiplications, so a wrongly built or
wrongly addressed table shows up as a mismatch. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_push_register` | every tap every cycle against a software history, with random gaps, and reset |
| `tb_lut_cell` | all 64 entries of a known table |
| `tb_lut_neuron` | a 6-to-3 and a 12-to-2 neuron at every input state against the equation; ReLU clipping and saturation both occur |
| `tb_sep_neuron` | all 4096 input states of the two-channel separable neuron |
| `tb_conv1d_layer` | a separable 4-channel layer (stride 1) and a regular 2-channel layer (stride 2) on a random stream with gaps; values and the 2-cycle latency. Also two separable layers at the largest practical kernels: K = 5 with 2-bit inputs and K = 10 with 1-bit inputs (10-to-3 cells). |
| `tb_pool1d` | max and average on the same stream; values, latency and the 4:1 output count |
| `tb_input_quantizer` | threshold values, their neighbours and random samples |
| `tb_dense_classifier` | scores, decision and latency; both classes occur |
| `tb_ecg_batch` | 500 records of 5575 samples (2 787 500 samples) streamed one sample per clock; every decision checked. The whole batch must fit in 2 810 000 cycles (0.281 s at 10 MHz) and takes 2 796 000. |
| `tb_lutnn_ecg_top` | see below |

`tb_lutnn_ecg_top` runs the top at its default size on two synthetic records
of 5575 samples each, with a reset between them. The records carry a
baseline, QRS-like spikes and stretches of noise or clipping artefacts, and
the input has random gaps. A behavioural model of the whole network predicts
every decision, both scores and the exact output cycle. The testbench also
requires each of the following to have happened at least once:

* ReLU clipping;
* saturation;
* input gaps;
* the reset between records;
* both decisions.

It also requires exactly one decision per 64 samples of each record.
`tb_lutnn_ecg_top` and `tb_ecg_batch` share the network model and the signal
generator in `tb_ecg_model_pkg`.

Running with Verilator: compile the package, the reference package and the
testbench, and let Verilator find the rest.

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/lutnn_pkg.sv tb/tb_ref_pkg.sv tb/tb_ecg_model_pkg.sv tb/tb_lutnn_ecg_top.sv \
        --top-module tb_lutnn_ecg_top
    ./obj_dir/Vtb_lutnn_ecg_top

Elaboration of the top takes about half a minute, because Verilator evaluates
the 80 000-odd table entries as constant functions. Simulation itself takes a
fraction of a second for `tb_lutnn_ecg_top`, and about 15 s for
`tb_ecg_batch`. Add `--assert` to check the stream assertions.

## Changing it

* **Network dimensions.** These are the constants at the top of `lutnn_pkg`
  and the parameters of `lutnn_ecg_top` (`FILT`, `PL`).
* **Per-layer shifts and seeds.** These are set where `lutnn_ecg_top`
  instantiates each layer.
* **Cell size.** `MAX_CELL_IN` / `MAX_CELL_OUT` in `lutnn_pkg` bound the
  largest cell (12 address bits, 4 data bits). Going beyond about 12 address
  bits makes both the FPGA cost and the elaboration time grow exponentially.
* **Testbench model.** The end-to-end testbench's model hard-codes the top's
  seeds and shifts. Update it together with the top.
