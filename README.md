# Atrial-fibrillation detector: one systolic MAC array for a whole 1-D CNN

This RTL classifies two-second ECG segments (500 samples at 250 samples/s) as
atrial fibrillation or not, by running a small quantized convolutional network
entirely in fixed point. The main idea is reuse: every layer, the four
convolutions and the three fully connected layers alike, runs on one 27-lane
systolic multiply-accumulate array. A sequencer feeds that array from a
parameter memory and from a pair of ping-pong activation buffers. The design
trades speed for area. One inference takes 34,717 clock cycles. At the
intended 34.6 kHz operating clock that is about 1 s, well inside the 2 s
between segments. At 25.5 MHz it is 1.36 ms, or about 735 inferences/s.

All words are 22-bit two's-complement fixed point.

## The network

| layer | operation | kernel × filters | output (length, channels) | parameters |
|---|---|---|---|---|
| input | | | (500, 1) | |
| conv1 + pool | conv, max-pool /2 | 27 × 3 | (474,3) → (237,3) | 84 |
| conv2 + pool | conv, max-pool /2 | 14 × 10 | (224,10) → (112,10) | 430 |
| conv3 + pool | conv, max-pool /2 | 3 × 10 | (110,10) → (55,10) | 310 |
| conv4 + pool | conv, max-pool /2 | 4 × 10 | (52,10) → (26,10) | 410 |
| fc1 | dense | 260 → 30 | 30 | 7830 |
| fc2 | dense | 30 → 10 | 10 | 310 |
| fc3 | dense | 10 → 1 | 1 | 11 |

That is 9385 parameters in total. The convolutions are "valid" (no padding)
with stride 1. Pooling takes the maximum of each pair of outputs. The hidden
layers use a ReLU. The final sigmoid of the trained network is replaced by a
hard limit: the class bit is the inverted sign bit of the last output, so
`af_detected = (score >= 0)`. The layer table is the function `layer_cfg` in
`rtl/qcnn_pkg.sv`.

## Block structure

```
 ADC ──SPI── external_hardware ──► input_ecg_mem (2 × 500, ping-pong)
                                         │ layer 1 input
 param_bram (9385 × 22) ──weights/bias──►│
                                         ▼
                                 operations_module (27 lanes)
                                         │ y
                                         ▼
 layer_buffer (2 × 2048) ◄── pool_relu ◄─┘        └──► hard_limit ──► af_detected
   │  source memory ──► operations_module (next layer's input)
   │  partial sums  ──► operations_module
 control_fsm: addresses every memory and drives the array through a 3-stage pipeline
```

| file | role |
|---|---|
| `qcnn_pkg.sv` | widths, layer table, saturation, the `beat_t` pipeline control word |
| `qcnn_af_top.sv` | top level; starts an inference whenever a segment is complete |
| `control_fsm.sv` | the loop nest for all layers, and the pipeline registers |
| `operations_module.sv` | the 27-lane systolic MAC array, bias register and bias mux |
| `pool_relu.sv` | ReLU and pair-wise max pooling, applied as results are written |
| `layer_buffer.sv` | two activation memories that swap roles every layer |
| `input_ecg_mem.sv` | two 500-sample banks: one fills while the other is read |
| `param_bram.sv` | parameter memory, loaded through a write port |
| `external_hardware.sv` | SPI reader for the ADC, one sample every 138 clocks |
| `hard_limit.sv` | registers the class bit (inverted sign bit) and the raw score |

## How the array computes a layer

The array has two shift chains of 27 registers, one for weights and one for
inputs. Each lane has a multiplier on its weight and input registers. One
adder chain sums the 27 products. A bias register and a select (`add_bias`)
decide whether the bias joins the sum. A final adder adds a partial sum that
comes either from the buffer or from the array's own previous result. The
output register saturates the result to 22 bits.

**Convolution, one (filter, input channel) pass:**

1. *Weight load, K cycles.* The K kernel taps are shifted into the weight
   chain, tap 0 first. The first shift clears lanes 1–26, so lanes K and above
   hold zero. After loading, lane j holds tap K−1−j.
2. *Streaming, L cycles.* The L samples of the input channel are shifted into
   the input chain, one per cycle. From sample K−1 onwards, lane j holds
   sample n+K−1−j, so the adder chain produces
   `out[n] = Σ_m w[m]·x[n+m]`. That is one output point per cycle. Lanes
   with zero weights contribute nothing, so kernels of 27, 14, 3 and 4 taps
   all use the same hardware.
3. *Accumulation over input channels.* For each output point, the partial sum
   from earlier channels is read back from the destination buffer, added to
   the new sum, and written back. On the last input channel the bias is
   added (select high). The value is then rectified and pooled on the way
   into the buffer.

A filter costs `1 + Cin·(K + L)` cycles: one cycle reads the bias, then one
pass per input channel.

**Fully connected neuron:** the inputs are taken in chunks of at most 27
(weight, input) pairs, and both chains shift together. The first shift of a
chunk clears the weight lanes not used by that chunk. At the end of a chunk,
the chunk's sum is added to the previous chunk's result, which is fed back
from the output register. The last chunk also adds the bias. A neuron costs
`1 + Nin` cycles.

Summed over the layer table, the beats are 34,695. Add 3 idle cycles after
each of the 7 layers and 1 cycle for the done state, and the total is
**34,717 cycles** per inference. The stated target was 1.358 ms at 25.5 MHz,
which is 34,629 cycles. This schedule is 0.25 % longer. Most of the time goes
to conv3 (11,510 cycles), fc1 (7,830), conv2 (7,540) and conv4 (5,910).

### Pipeline

`control_fsm` issues one *beat* per cycle. Each beat carries a control word,
`beat_t`, down three registers:

| stage | what happens |
|---|---|
| 0 | address the parameter memory, and the ECG memory or the source buffer |
| 1 (`s1`) | memory data arrives; shift the chain(s) or load the bias; request the partial sum |
| 2 (`s2`) | partial sum arrives; capture `sat(partial + Σ + bias?)` into `y` |
| 3 (`s3`) | `pool_relu` turns `y` into a buffer write, or `hard_limit` takes the final result |

A capture in stage 2 uses the chain contents from before the clock edge. The
next pass's first weight shift can therefore share that edge, so there are no
bubbles between passes. Between layers there are `DRAIN` (3) idle cycles so
that the two buffers never see two reads in the same cycle while they swap
roles. `layer_buffer` asserts this rule.

### Memory maps

* **Parameters** are stored in exactly the order they are used, layer by
  layer. For each filter or neuron comes its bias, then its weights.
  * Convolution: the weights go input channel by input channel, tap 0 first.
  * Fully connected: the weights go in input-index order.

  `fc3`'s bias is at address 9374. The controller reads the memory with a
  single incrementing pointer.
* **Layer buffers**: numbering the layers from 0 (conv1) to 6 (fc3), layer
  *l* reads memory `(l−1) mod 2` and writes memory `l mod 2` (A = 0, B = 1).
  Layer 0 reads the ECG memory instead.
  * Pooled convolution outputs go to `channel·(Lout/2) + position`. The
    260-element vector that fc1 reads is therefore channel-major.
  * Neuron outputs go to `neuron`.
  * Partial sums of the filter being computed live at `1536 + n`. The
    largest layer output needs 1120 words and the longest row of partial sums
    474, so 2048 words per memory is enough.

### Number format

The format is 22-bit signed with 14 fraction bits (`FRAC_W`).

* Each product is shifted right by 14. This truncates, i.e. rounds toward
  minus infinity.
* The 27 products are summed at 44 bits.
* Every value written to a memory, or fed back, is saturated to 22 bits.
* The ADC's 12-bit offset-binary code is centred and shifted left by 3. Full
  scale then maps to ±1.0.

## Interfaces and timing

The top-level ports of `qcnn_af_top`:

* **Clock and reset:** `clk`, and `rst_n` (asynchronous, active low).
* **Parameter load:** `prm_wr_en`, `prm_wr_addr[13:0]`, `prm_wr_data[21:0]`.
  Write each of the 9385 words once before enabling acquisition. The bias of
  the last layer, for example, can be rewritten between inferences.
* **Acquisition:** `acq_enable` starts the sampler. The SPI pins are
  `spi_cs_n`, `spi_sclk` and `spi_miso`. SCLK idles low, MISO is sampled on
  the rising edge, MSB first, and each frame has 16 bits. The result is the
  last 12 bits received. One frame is read every `SAMPLE_DIV` = 138 clocks.
* **Results:** `busy` is high for the 34,717 cycles of an inference.
  * `result_valid` pulses in its last cycle, together with `af_detected` and
    `score` (the raw 22-bit output of fc3).
  * `ecg_bank` names the bank being processed.
  * `overrun` is a sticky flag. It is set if a segment completes while the
    previous one is still being processed. That segment is skipped. At the
    design rates (1 s per inference, 2 s per segment) this does not happen.

## What is the source design and what is added here

These parts follow the design as published:

* the network and its 9385 parameters;
* the 22-bit word length;
* a single reused 27-multiplier systolic array for both layer types;
* weight and input shift chains, a bias register, and a bias select applied
  on the last input channel;
* accumulation of partial results in a two-memory buffer whose memories
  alternate between layers;
* two ECG segment memories in ping-pong;
* SPI acquisition at 250 samples/s in groups of 500;
* the hard limit made from an inverter on the sign bit;
* the latency target.

These are choices made here, and should be checked against the intended use:

* **Number format:** 14 fraction bits, truncating products, saturation to
  22 bits, and the ADC scaling. The trained network's actual scaling is not
  known.
* **Activation:** a ReLU on all hidden layers. It is a per-layer flag in the
  layer table. Pooling uses a window of 2.
* **Order and layout:** the flatten order (channel-major), the order of
  parameters in memory, the buffer map, and the partial-sum scratch area.
* **Scheduling:** loading the kernel into the chain before each input channel
  is streamed. This is what makes the cycle count match the target. The other
  scheduling details are also choices made here, as are the pipeline and the
  3-cycle drain.
* **Acquisition and loading:** the ADC frame format and SPI mode, the
  parameter write port, and the overrun behaviour.
* **Class meaning:** class 1 is taken to mean atrial fibrillation.

Not provided: the trained weights and the ECG recordings. Accuracy figures
for the original network cannot be reproduced without them. The testbenches
use random parameters and random ADC codes. They check bit-exactness against
a reference model, not classification quality. Timing closure at 25.5 MHz
has not been checked.

## Simulating

Verilator 5 is needed (the testbenches produce width warnings in their check calls, hence `-Wno-fatal`). Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/qcnn_pkg.sv tb/tb_qcnn_af_top.sv --top tb_qcnn_af_top
./obj_dir/Vtb_qcnn_af_top
```

`tb_qcnn_af_top` runs the complete design at its default sizes. It takes
under a second of simulation time.

1. It loads 9385 random parameters.
2. It acquires three segments through a behavioural SPI ADC (`tb/adc_model.sv`)
   at the real sampling divider.
3. It compares each score and class bit with a reference model of the
   quantized network, written in the testbench.
4. It checks the latency, both against the formula above and against the
   1 % band around the 34,629-cycle target.
5. It forces both classes through the last bias.
6. It counts each mechanism: convolution passes, dot-product chunks,
   partial-sum read-back, feedback, bias select, pooling, buffer alternation,
   ECG bank alternation and both classes.

`tb_qcnn_af_overrun` runs the top level with segments arriving every 20,000
cycles. It checks that a segment arriving during an inference sets `overrun`
and is skipped, and that the next segment is processed.

Every other module has its own testbench, `tb/tb_<module>.sv`, built the
same way with `--top tb_<module>`.
