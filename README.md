# Neural nonlinear ADC: a 1-63-6 threshold network in bit-serial arithmetic

A cheap sensor such as an NTC thermistor in a bridge gives a voltage that is a
strongly nonlinear function of temperature. Usually the voltage is digitised
first and linearised afterwards. This design does both in one step. A small
neural network with one hidden layer maps the bridge voltage straight to a
6-bit code that is linear in the measured quantity.

- The hidden layer has 63 neurons with one input each. With a step
  activation, each one is a comparator against its own threshold. The 63
  thresholds sit on the sensor's characteristic, so together they form a
  thermometer code of the physical quantity.
- The output layer has six neurons, one per output bit. Each adds up some of
  the thermometer bits, with alternating signs, and compares the sum with
  zero.

Six independent networks, one per bit, would need 120 hidden neurons. Here
all six bits share one hidden layer of 63 neurons. The hidden neurons used by
a higher bit are a subset of those used by the next lower bit, so the LSB uses
all 63.

Every neuron is computed bit-serially: a serial-parallel multiplier, a
one-bit serial adder as accumulator, and a comparator. This keeps each neuron
to a few dozen flip-flops and gates, so all 69 neurons fit side by side on a
small FPGA. Changing the sensor only changes weights and biases, never the
structure.

## Number format

Inputs, weights and biases are 9-bit sign-magnitude numbers (`nadc_pkg::sm_t`):

| bit 8 | bits 7..0 |
|-------|-----------|
| sign: **1 = plus, 0 = minus** | magnitude, bit weights 4, 2, 1, 1/2, ... 1/32 |

The range is -7.96875 .. +7.96875 in steps of 1/32. Some examples:

| value | code |
|-------|------|
| +0.25 | `1 0000 1000` |
| -3.53125 | `0 0111 0001` |
| +5.78125 | `1 1011 1001` |

Note that the sign convention is the opposite of the usual one. The arithmetic
inside the neuron is two's complement. `sm_to_twos` converts each operand on
its way out of the RAM or ROM into a 9-bit signed integer in units of 1/32.
Products and sums are then in units of 1/1024.

## From 63 comparators to six bits

Hidden neuron `k-1` (k = 1..63) has weight +1.0 and bias `-t(k)`. It outputs 1
exactly when `vin >= t(k)`. With increasing thresholds, the hidden layer
therefore outputs a thermometer code: the lowest `m` neurons are on, where `m`
is the number of thresholds the input has passed. `m` is the output code.

Output bit `b` (b = 0 is the LSB) must be bit `b` of `m`. That bit is 1 when
`floor(m / 2^b)` is odd. The output neuron reads the hidden neurons
`(j+1)*2^b - 1` for `j = 0 .. 2^(6-b)-2`, that is, every `2^b`-th
comparator. It weights them +1, -1, +1, ... and adds a bias of -0.5:

    bit b = H( -0.5 + h[2^b-1] - h[2*2^b-1] + h[3*2^b-1] - ... )

For a thermometer code, the alternating sum is 1 when an odd number of the
selected comparators are on, and 0 otherwise. This gives the fan-ins, MSB to
LSB, of 1, 3, 7, 15, 31 and 63 hidden neurons. Each set is contained in the
next: the MSB uses hidden neuron 31 only, the next bit 15, 31 and 47, and so
on. `nadc_pkg::out_fanin` and `nadc_pkg::out_src` give these two rules.

The published design took its weights from training, and those weights are not
available. Its neuron counts match this construction exactly, so the
construction is used as the default network (`default_hidden_weights`,
`default_output_weights`). With these weights the converter is an exact
nonlinear quantizer. A trained network would only approximate it.

### Default thresholds

No numerical sensor curve is available. The defaults therefore use a concave
stand-in:

    t(k) = floor(k * (384 - 2k) / 64)   input LSBs (1/32 V), k = 1..63

The step between codes shrinks from 6 input LSBs at the bottom to 2 at the
top, which is typical of a thermistor bridge. Inputs below t(1) = 5/32
(negative inputs included) give code 0. Inputs at or above t(63) = 253/32 give
code 63. For a real sensor, put the bridge voltage at each code boundary into
the biases of `HIDDEN_W`. The hidden weight may also differ from 1.0, which
lets a threshold fall between input steps (threshold = -bias/weight).

## The bit-serial neuron (`neuron`)

`neuron` computes y = H(b + sum w_i x_i) in N_IN+1 *terms*. Term 0 multiplies
the bias by a constant +1.0. Term i multiplies input i-1 (from the input RAM)
by weight i (from the weight ROM; word 0 of the ROM is the bias). Each term
takes `ACC_W = 18 + clog2(N_IN+1)` cycles, and terms follow each other
without gaps:

- **Multiplier (`sp_multiplier`).** The weight is the parallel operand. The
  input is shifted in LSB first and sign-extended over all ACC_W cycles. The
  multiplier is a chain of nine `bit_serial_adder` cells, one per weight bit.
  Cell i adds the partial-product bit `w[i] & x`, the previous sum of cell
  i+1 and its own carry. Sums move one cell towards the LSB each cycle, and
  cell 0 emits the product LSB first, one cycle behind its input bit. Two's
  complement is handled in the sign cell. Its three inputs all carry negative
  weight, so its own sum flip-flop is fed back as its middle input. That
  feedback is the sign extension of the running partial sum. After T >= 18
  cycles the output is the exact product modulo 2^T, so it can be added
  directly to a T-bit accumulator.
- **Accumulator.** A second `bit_serial_adder` adds the product stream to a
  circulating ACC_W-bit loop. The loop is the adder's sum flip-flop plus an
  ACC_W-1 bit shift register. During term 0 the loop is read as zero, so no
  clearing is needed. `clr` on the LSB of each word drops the carry of the
  previous word.
- **Activation.** After the last bit, the sum's sign bit is in the adder's
  sum flip-flop. Testing `sum >= 0` is just reading that bit, so y = 1 for a
  non-negative sum (H(0) = 1). The full sum is also output on `net` for test.

The accumulator is wide enough that no sum can overflow (64 * 255 * 255 <
2^23), so the comparison is always exact.

Timing: `start` is sampled while the neuron is idle. `done` pulses
`(N_IN+1)*ACC_W + 2` cycles later (`nadc_pkg::neuron_latency`). Writes to the
input RAM and `start` are ignored while `busy`.

| neuron | N_IN | ACC_W | latency |
|--------|------|-------|---------|
| hidden | 1 | 19 | 40 |
| bit 5 (MSB) | 1 | 19 | 40 |
| bit 0 (LSB) | 63 | 24 | 1538 |

## Layers and one conversion (`neural_adc`)

- `neuron_layer` is a generate loop of NEURONS neurons of the same shape. They
  share a broadcast input write port and `start`. In the top it is the hidden
  layer (63 neurons, 1 input each).
- `adc_output_layer` holds the six output neurons, each with its own fan-in.
  On `start` it captures the 63 hidden outputs. It then spends 63 cycles
  writing them into the output neurons' input RAMs as +1.0 or 0.0. Input
  index j goes to all six neurons in the same cycle, each taking its own
  hidden neuron `out_src(b, j)`. Then it starts the six neurons and waits for
  the slowest one, the LSB.
- `neural_adc` sequences the two layers and does not overlap conversions.

| step | cycles |
|------|--------|
| accept sample, write it into the 63 hidden input RAMs | 1 |
| hidden layer | 40 |
| hand-over | 2 |
| output layer: capture, 63 loads, start, LSB neuron, done | 1603 |
| register code | 1 |
| **sample accepted to `code_valid`** | **1647** |

Ports of `neural_adc`: `vin` (sm_t) with `vin_valid`, taken when `ready`;
`code[5:0]` with a one-cycle `code_valid`; `hidden[62:0]`, the thermometer
code, for test and calibration. Reset `rst_n` is synchronous and active low
in every module. One conversion every 1647 cycles gives 30.4 kS/s at 50 MHz.

The analog front end, i.e. the thermistor bridge and whatever turns its
voltage into `vin` samples, is not part of the RTL. Neither is the DAC used to
watch the output code.

## Reconfiguring

`neural_adc #(.HIDDEN_W(...), .OUTPUT_W(...))` takes new weights.
- `HIDDEN_W[k]` is `{weight, bias}` of hidden neuron k.
- `OUTPUT_W[b]` is the 64-word ROM image of output bit b: word 0 is the bias,
  word j+1 the weight of input j. Words beyond `out_fanin(b)` are ignored.

The wiring from hidden to output neurons is fixed by `out_src`. A network
with a different wiring means editing that one function.

## Where this departs from the original design

- Weights and thresholds are the exact construction described above, not
  trained values. The original network showed small deviations from the
  ideal quantizer (below one LSB). This one has none.
- The sensor characteristic is the formula above, not a measured curve.
- Not given by the original, and chosen here:
  - the accumulator width;
  - the term order (bias first);
  - the start/busy/done and ready/valid handshakes;
  - the 63-cycle hand-over between the layers;
  - the fixed-at-elaboration weight ROM in place of a programmable EEPROM;
  - the choice of which hidden neurons feed each bit.
- The two's complement correction inside the multiplier is this design's own.
  It is the sign cell that feeds back its own sum.
- There is no separate input-scaling stage. A gain or offset of the sensor
  signal is folded into the hidden weights and biases.
- Conversions are sequential. The hidden layer idles while the output layer
  works, although the two could be pipelined.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench:

- `tb_sm_to_twos`: all 512 codes and the worked examples.
- `tb_bit_serial_adder`: random words of 4 to 32 bits, with and without
  gaps.
- `tb_sp_multiplier`: all 4x4-bit signed pairs, and random plus extreme 9x9-bit
  pairs.
- `tb_input_ram`, `tb_weight_rom`: memory contents.
- `tb_neuron`: sums, activation and latency of a 3-input and a 1-input neuron;
  start and writes are ignored while busy.
- `tb_neuron_layer`: 5 neurons with different weights.
- `tb_adc_output_layer`: all 64 thermometer codes, random non-thermometer
  patterns, and latency.
- `tb_neural_adc`: the whole converter at its default size. All 511 input
  values are converted in random order. Each result is checked against the
  ideal quantizer, together with the hidden thermometer code and the
  1647-cycle latency. The test also checks that every output code appears,
  clipping at both ends, negative inputs, a sample offered while busy (it must
  be ignored), and back-to-back conversions.
- `tb_neural_adc_histogram`: the code-density test. It feeds 5000 samples of
  a 5 kHz sine (833 whole periods) at 30 kS/s with a 50 MHz clock, then
  checks:
  - the histogram against the ideal quantizer's;
  - that no code is missing;
  - that every sample is converted within its sampling interval;
  - that the DFT power spectra of the converter output and of the ideal
    output agree in every bin.

  It takes about 30 s.

All testbenches pass.

## Simulating

With Verilator 5 from the repository root, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_neural_adc \
        -y rtl -y tb +libext+.sv rtl/nadc_pkg.sv tb/tb_neural_adc.sv
    ./obj_dir/Vtb_neural_adc

Replace `tb_neural_adc` with any other testbench name. Each testbench ends
with `TB_RESULT checks=N failures=M`. The package must come first on the
command line; the other files are found through `-y`.

## Files

| file | contents |
|------|----------|
| `rtl/nadc_pkg.sv` | number type, widths, latency and wiring functions, default weights |
| `rtl/sm_to_twos.sv` | sign-magnitude to two's complement |
| `rtl/bit_serial_adder.sv` | full adder with sum and carry flip-flops |
| `rtl/sp_multiplier.sv` | two's complement serial-parallel multiplier |
| `rtl/input_ram.sv` | neuron input RAM |
| `rtl/weight_rom.sv` | neuron weight and bias store |
| `rtl/neuron.sv` | bit-serial neuron |
| `rtl/neuron_layer.sv` | layer of identical-shape neurons (hidden layer) |
| `rtl/adc_output_layer.sv` | six output neurons with nested hidden subsets |
| `rtl/neural_adc.sv` | top level |
