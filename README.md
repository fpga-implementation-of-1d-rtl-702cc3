# Streaming 1D-CNN bearing-fault classifier

This is synthesizable SystemVerilog for a small one-dimensional convolutional
neural network that labels a window of motor vibration as **healthy**,
**ball fault**, **inner-race fault** or **outer-race fault**. The raw
accelerometer samples go in without any feature extraction. The network is
small enough to be fully unrolled in hardware, and every layer works on the
sample stream as it flows past. A 500-sample window is therefore classified
in about as many clock cycles as it has samples: the class is ready 517
cycles after the first sample enters, which is 4.1 µs at 125 MHz.

The RTL reproduces a published FPGA design for this task. It follows that
design's structure, layer sizes, fixed-point formats, and its UART and LED
interface. Where the published description is silent, the choices made here
are stated in the section "Where this RTL makes its own choices" below.

## The network

| stage | operation | output shape |
|---|---|---|
| input | 500 samples, Q8.8 | 1 × 500 |
| conv1 | 8 filters × 3 taps, no bias, no padding | 8 × 498 |
| ReLU + max-pool (2, stride 2) | | 8 × 249 |
| conv2 | 4 filters × 8 channels × 3 taps, no bias | 4 × 247 |
| ReLU + max-pool (2, stride 2) | the 247th value has no partner and is dropped | 4 × 123 |
| flatten | channel-major: input index `f*123 + j` | 492 |
| dense | 10 neurons, bias, ReLU | 10 |
| output | 4 neurons, bias; class = index of the largest | 4 → class |

The trained network ends in softmax. Softmax does not change which output is
largest, so the hardware does only an arg-max ("hardmax"). The convolutions
are cross-correlations: the kernel is not flipped, and tap `k` multiplies
sample `n+k`.

The design holds 5094 trained parameters: 24 conv1 coefficients, 96 conv2
coefficients, 4920 dense weights, 10 dense biases, 40 output weights and
4 output biases.

## Number formats

Everything is two's-complement fixed point with 8 fraction bits at the
interfaces:

| quantity | format | bits |
|---|---|---|
| samples and conv activations | Q8.8 | 16 |
| conv1 coefficients, dense weights, output weights | Q2.8 | 10 |
| conv2 coefficients | Q1.8 | 9 |
| biases | Q8.8 | 16 |
| dense and output-neuron accumulators | Q9.16 | 25 |
| output-layer products | Q.24 | 35 |

Rounding and overflow rules. The reference model in `tb/cnn_ref_pkg.sv`
follows these exactly:

* A convolution sum (Q.16) is brought back to Q8.8 by keeping bits
  `[23:8]`. This is a floor division by 256 followed by a wrap to 16 bits.
  Conv1 truncates each sum once. Conv2 adds the eight full-precision channel
  partials first and truncates once at the end.
* A dense neuron's accumulator starts at `bias << 8`. It adds full-precision
  Q.16 products and wraps at 25 bits.
* The output layer multiplies a Q9.16 dense output by a Q2.8 weight, giving a
  35-bit Q.24 product. It drops 8 bits (floor) and accumulates at 25 bits,
  starting from `bias << 8`.
* Nothing saturates. The original sizing argument is that a trained network's
  values stay well inside these ranges, so narrowing simply wraps.

## How the stream moves through the layers

All stages run at the same time on different parts of the same frame. Only
the final 10-input output layer works sequentially.

**Ring-buffer convolution (`conv3_tap`).** A 3-tap filter needs only the two
previous samples, so each filter keeps a four-entry circular buffer indexed
by a 2-bit pointer that wraps from 3 to 0. It does not store the whole frame.
On the edge that stores a new sample, the same sample and the two older
buffer entries are multiplied and summed. The convolution result is
therefore registered in the same clock that accepts the sample.

**ReLU and pooling (`relu_pool`).** This block has two register stages. The
first clamps negative values to zero. The second keeps a phase bit so that
it pools the pairs (1,2), (3,4), … of each frame, never (2,3). A conv1 value
reaches the pooled output two clocks after it was produced.

**The second layer is split across the first-layer neurons (`single_conv`).**
This is the least obvious part of the structure. Each of the 8 first-layer
neurons contains four more `conv3_tap` units, one per second-layer filter.
Each unit convolves that neuron's own pooled stream with the filter's three
coefficients for this channel. The 32 units produce partial sums.
`conv2_sum` adds, for each of the 4 filters, the 8 partials that belong to
it. It then truncates to Q8.8 and applies ReLU and pooling. Every partial of
a frame is produced on the same clock, so one valid signal serves them all;
assertions in `cnn_core` check this.

**Dense layer in beats (`dense_neuron`).** After the second pooling, the four
filters each deliver one value at the same moment, once every four input
samples. Each of these 123 "beats" carries flat inputs `j`, `123+j`, `246+j`
and `369+j`. Each of the 10 neurons does 4 multiplications and 3 additions
per beat, reading its 4 weights for beat `j` asynchronously from a register
array (a distributed-RAM layout). After beat 122 it registers the ReLU of its
accumulator.

**Output layer (`output_layer`, `hardmax`).** This layer latches the 10 dense
outputs and preloads the four accumulators with their biases. It then adds
one input per clock to all four neurons in parallel, over 10 clocks. One
more clock registers the four values and the arg-max.

### Cycle budget

Edges are counted from the edge that accepts sample 0, with one sample per
clock:

| event | edge |
|---|---|
| first conv1 output registered | 2 |
| last conv1 output (window ending at sample 499) | 499 |
| last pooled conv1 value that conv2 needs (pair of conv1 outputs 494, 495) | 499 |
| conv2 partials / channel sum / ReLU / pool | 500 / 501 / 502 / 503 |
| dense ReLU outputs registered (`fc_valid`) | 504 |
| output layer latches inputs, 10 MAC clocks | 505, 506–515 |
| class and output neurons registered (`cls_valid`) | 516 |

A frame thus takes 517 clock cycles from its first sample to its class. The
published implementation reports 529 cycles, and 514 cycles to the dense
output. It has a few more register stages that are not described in enough
detail to copy. The difference is a fixed pipeline offset and does not
change any value.

Inside `cnn_top`, the frame memory adds three clocks in front of the
pipeline. `cls_valid` is registered 519 clocks after the edge that writes
the last sample, which is 4.15 µs at 125 MHz. The LEDs change one clock
later. At one sample per clock the core could accept a new frame every
~520 clocks; the frame memory, however, refills only from its inputs.

## Getting samples in and results out (`cnn_top`)

* **UART** (`uart_rx`). 9600 baud, 8N1, LSB first. At 125 MHz a bit lasts
  13021 clocks. The line goes through a two-flip-flop synchroniser. The
  start bit is confirmed at mid-bit, and each data bit is sampled at its
  middle. Every sample takes two bytes, high byte first.
* **Parallel port** (`smp_valid`/`smp_data`). This port takes one Q8.8 word
  per strobe. It is for an ADC front end or a test harness.
* **Frame memory** (`input_buffer`). It holds 500 × 16 bits and fills from
  either source. When the 500th sample is written, the memory pulses `start`,
  which clears every pipeline stage. It then reads the frame out at one
  sample per clock. While it does that, `smp_ready` is low and new inputs are
  dropped.
* **Result.** `cls` (0 healthy, 1 ball, 2 inner race, 3 outer race) comes with
  a one-clock `cls_valid` pulse. `out` gives the four output-neuron values
  (Q9.16). `led` is one-hot on the class and is held until the next result.

## Loading the trained parameters

Coefficients, weights and biases are registers inside the layer that uses
them. They are written over one bus: `prm_we`, `prm_sel`, `prm_addr`,
`prm_data`. The low bits of `prm_data` are used. Load them while no frame is
in flight.

| `prm_sel` | group | `prm_addr` fields |
|---|---|---|
| 0 | conv1 coefficient (Q2.8) | `[4:2]` filter, `[1:0]` tap |
| 1 | conv2 coefficient (Q1.8) | `[6:5]` filter, `[4:2]` input channel, `[1:0]` tap |
| 2 | dense weight (Q2.8) | `[12:9]` neuron, `[8:7]` conv2 filter `f`, `[6:0]` position `j`; the weight of flat input `f*123+j` |
| 3 | dense bias (Q8.8) | `[3:0]` neuron |
| 4 | output weight (Q2.8) | `[5:4]` output neuron, `[3:0]` dense input |
| 5 | output bias (Q8.8) | `[1:0]` output neuron |

The enum `prm_sel_e` and the struct `prm_wr_t` in `rtl/cnn_pkg.sv` name these
groups. A PyTorch `Conv1d` weight `[out][in][k]` maps directly onto the
conv2 fields. A `Linear` weight over the flattened `(4,123)` map maps onto
`f = i / 123`, `j = i % 123`.

## Files

| file | contents |
|---|---|
| `rtl/cnn_pkg.sv` | sizes, formats, parameter-bus types |
| `rtl/cnn_top.sv` | UART + frame memory + core + LEDs |
| `rtl/cnn_core.sv` | the layer pipeline |
| `rtl/single_conv.sv` | conv1 neuron with its conv2 partial units |
| `rtl/conv3_tap.sv` | ring-buffer 3-tap convolution |
| `rtl/relu_pool.sv` | ReLU + max-pool (2,2) |
| `rtl/conv2_sum.sv` | conv2 channel adder, truncation, ReLU, pool |
| `rtl/dense_neuron.sv` | one dense neuron |
| `rtl/output_layer.sv` | four output neurons, sequential MAC |
| `rtl/hardmax.sv` | arg-max |
| `rtl/uart_rx.sv` | UART receiver |
| `rtl/input_buffer.sv` | 500-sample frame memory and read-out |
| `tb/cnn_ref_pkg.sv` | bit-exact reference of the whole network, plus a real-arithmetic version |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the ones below |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. A run looks
like this (Verilator 5):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_top \
  -y rtl -y tb +libext+.sv rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_top.sv
./obj_dir/Vtb_cnn_top
```

Leave out `tb/cnn_ref_pkg.sv` for testbenches that do not import it
(`tb_conv3_tap`, `tb_relu_pool`, `tb_conv2_sum`, `tb_dense_neuron`,
`tb_output_layer`, `tb_hardmax`, `tb_uart_rx`, `tb_input_buffer`).

| testbench | what it shows |
|---|---|
| `tb_cnn_top_full` | `cnn_top` at its defaults (125 MHz, 9600 baud). Two frames. The first ends with its last 8 samples sent as 16 bytes over the UART at the real bit rate. Outputs, class, LEDs and the 519-clock latency are checked against the reference. |
| `tb_cnn_top` | End to end with a 16-clock UART bit. Random frames arrive over the parallel port and as 1000 UART bytes, and forced-bias frames drive every class. The testbench counts each mechanism (pointer wrap, ReLU clipping, pool pairs, dropped 247th conv2 value, dense clipping, all four classes, UART bytes, byte merging, samples refused while busy) and fails if any of them never happens. |
| `tb_cnn_core` | Three frames, one with random input gaps. All 10 dense outputs, 4 output neurons and the class are checked, plus the latency (517 / 505 edges). |
| `tb_fpga_accuracy` | 50 frames, each with fresh random parameters, checked bit-exactly. The class also agrees with the same network in real arithmetic on 50 of 50 frames, and the largest output-neuron error is about 0.04. |
| others | one per module, against independent models: values, valid timing, frame boundaries |

All of them pass. None of them takes more than a few seconds.

## How far to trust it

* The reference model in `tb/cnn_ref_pkg.sv` is written from the format
  rules above, separately from the RTL. It is checked bit for bit at every
  layer boundary that the testbenches can see.
* The trained weights and the measured vibration frames are not available.
  Every test therefore uses random parameters in realistic ranges. The
  published output values for the four example inputs (one per class) are
  replayed through `hardmax`, which picks the published classes. They cannot
  be replayed through the whole network.
* The 25-bit neuron registers match the width of the original
  implementation's dense and output neurons. The integer range of Q9.16
  (±256) covers the published output values, which lie between −23 and +8.

## Where this RTL makes its own choices

* The parameter write bus and its address map. The original design keeps
  the parameters in registers that are initialised at build time.
* The bias format is Q8.8, and output weights are Q2.8 like the dense
  weights.
* Conv2 truncates once, after all eight channel partials are added.
* The UART runs 8N1, LSB first, sampling at mid-bit behind a synchroniser.
  Samples arrive high byte first.
* The parallel sample port, and starting as soon as the 500th sample is
  written. Inputs are dropped during the 500-clock read-out.
* Asynchronous active-low reset. Weight arrays are not reset.
* Ties in the arg-max go to the lower class index.
* Latency is 517 cycles per frame instead of 529; see the cycle budget.

## Not included

* Softmax, which the hardware replaces with arg-max by design.
* The analog front end and ADC, and the host-side USB-to-serial converter.
  They are outside the FPGA; `uart_rxd` and the parallel sample port are
  where they would connect.
* Training, and conversion of trained floating-point parameters to the
  formats above. The values are loaded through the parameter bus.
