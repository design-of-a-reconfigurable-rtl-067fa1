# Reconfigurable autoencoder encoder for a calorimeter trigger front end

A high-granularity calorimeter produces far more trigger data than its
links can carry. In each 25 ns bunch crossing, one detector module delivers
48 trigger-cell charges of 7 bits each: 336 bits. This block cuts that to
48–144 bits with a small neural network. The network is the encoder half of
an autoencoder; the decoder half runs in an FPGA off the detector and
rebuilds the 48-cell image. The network's shape and number formats are
fixed in hardware. Every weight and bias can be programmed, and so can the
set of output bits sent. One chip can therefore serve detector regions whose
occupancy differs by orders of magnitude.

The RTL follows the encoder built into the CMS HGCAL ECON-T trigger
concentrator ASIC. That design publishes its architecture, widths, latency
and radiation-hardening scheme. Many lower-level details are not public;
they were filled in here and are listed under
[Choices made in this implementation](#choices-made-in-this-implementation).

## Data flow

```
tc_code[48] x 7b ─► tc_decompress x48 ─► convertor ─► conv2d_relu ─► dense_relu ─► output_select ─► out_bits
  (float)            (22b fixed)      (8b, share      (8x8 image,     (128 -> 16,     (any of 144
                                       of module sum)  8 filters,      9b outputs)      bits, packed)
                                                       3x3, stride 2)
        ▲                                 ▲                                                   ▲
   TMR reg stage 0                  TMR reg stage 1                                   TMR reg stage 2
```

| step | module | what it does |
|---|---|---|
| decode | `tc_decompress` | 7-bit code {E[3:0], M[2:0]} → `E==0 ? M : {1,M} << (E-1)`, 22 bits |
| normalize | `convertor` | sum of the 48 charges (28 b); each charge becomes `min(255, x·⌊2^36/sum⌋ >> 28)` ≈ 256·x/sum |
| map | `conv2d_relu` (input stage) | cells 0–15 → upper-left 4×4, 16–31 → lower-left, 32–47 → lower-right; upper-right is zero |
| convolve | `conv2d_relu` | 8 filters of 3×3, stride 2, bias, ReLU → 4×4×8 = 128 features |
| dense | `dense_relu` | 128 → 16, bias, ReLU, saturate to 9 bits |
| select | `output_select` | 144-bit mask picks bits; picked bits are packed from bit 0 up |

`ae_encoder_top` connects the chain and holds the configuration in
`tmr_weight_bank`. It takes configuration writes from `i2c_target`.

### Timing

The whole chain is pipelined and accepts one event on every clock (40 MHz
nominal). It has three register stages: at the input, after the convertor,
and at the output. An event captured with `valid_in` at rising edge *k*
appears on `out_bits`, `out_nbits`, `out_sum` and `valid_out` after edge
*k*+2. That is 50 ns at 40 MHz, inside the 100 ns trigger-latency budget. A
cycle without `valid_in` gives a cycle without `valid_out`. Nothing stalls.

Between stages the logic is wide and purely combinational: 48 multipliers
in the convertor, 576 multiply-adds in the convolution, 2048 in the dense
layer. Whether this closes at 40 MHz in a given technology has not been
evaluated.

## Number formats

This is the part most worth reading before changing anything. Every format
is set in `ae_pkg`.

| signal | width | format | range |
|---|---|---|---|
| decoded charge | 22 | unsigned integer | 0 … 245 760 (18 bits used) |
| module sum | 28 | unsigned integer | |
| network input | 8 | unsigned 0.8 | [0, 255/256] |
| weight, bias | 6 | two's complement, 5 fraction bits | [−1, 31/32] |
| hidden feature | 12 | unsigned 4.8 | [0, 16) |
| network output | 9 | unsigned 1.8 | [0, 511/256] |

Inside each layer the sum is exact. In the convolution, input (8 fraction
bits) × weight (5 fraction bits) gives 13 fraction bits, and the bias is
shifted left by 8 to line up. After the sum, ReLU zeroes negative values.
The 5 lowest bits are then dropped by truncation, leaving 8 fraction bits.
The hidden layer has just enough integer bits for the worst case:
9 × 255/256 × 31/32 + 31/32 ≈ 9.65. So the convolution never saturates. The
worst-case hidden value is 2471 (hand-checked in `tb_conv2d_relu`). The
output's single integer bit covers the values the network is trained for.
Anything larger saturates to 511.

The inputs are normalized, so the image carries only the *shape* of the
energy deposit. The module's total charge leaves separately on `out_sum`.

## Convolution layout

- The output of the 8×8 convolution with stride 2 is 4×4. This needs one
  row and one column of zero padding, placed at the bottom and right
  (Keras "same" convention). Output (i, j) of filter f reads image rows
  2i…2i+2 and columns 2j…2j+2; row or column 8 reads as zero.
- Weight order: `w[f*9 + kr*3 + kc]`.
- Feature (flatten) order is channel-last: `feat[(i*4 + j)*8 + f]`.
- Dense weight order: `w[o*128 + feat_index]`.

These orders must match the trained model whose weights are loaded.

## Output selection

The 16 outputs × 9 bits give 144 bits, numbered k = o·9 + b, with b = 0 the
LSB of output o. Mask bit k = 1 sends bit k. Picked bits are packed into
`out_bits[0…]` in increasing k, and `out_nbits` gives the count. Two
typical settings:

- all 144 bits, for high-occupancy modules;
- the top three bits (8:6) of each output, 48 bits, for low occupancy. A
  network trained for 3-bit outputs would be loaded with this mask.

Any other subset works too, including fewer outputs: this is how the
output dimensionality is reconfigured.

## Radiation hardening: two kinds of triplication

The two kinds of state follow different rules.

**Data path (`tmr_datapath_reg`).** Each pipeline register is built three
times, on the same clock, with a bitwise majority voter on its output. Upsets
are masked but not repaired. That is enough here, because every register
takes new data on the next 25 ns crossing.

**Weight storage (`tmr_weight_bank`).** Configuration is written once and
held for a long time, so here upsets must be repaired. Copies A, B and C each
have their own clock (`clk_a/b/c`) and their own next-state logic: keep the
word, or take the write data. Each copy then loads the majority of all three
copies' next values, through a voter of its own. A flipped copy is outvoted
at once, and its next clock edge repairs it. In `ae_encoder_top` the three
clocks are fed from the one `clk` port. Separate clock trees belong to
physical design. A synthesis flow must also be told to keep the three
identical voters apart (they are written separately for that reason).

Two banks are instantiated: 2144 six-bit words for weights and biases, and
18 eight-bit words for the mask. Together they hold 13 008 bits.

## Configuration over I2C

`i2c_target` is an I2C target with 7-bit device address `I2C_ADDR`
(default 0x50). It uses a common register-access protocol:

- write: START, addr+W, register address high byte, low byte, data bytes…
  STOP. The address increments after each byte.
- read: set the address the same way, then repeated START, addr+R, data
  bytes, ending when the controller sends NACK.

The target samples `scl` and `sda_in` with the system clock through two-flop
synchronizers, so `clk` must be several times faster than `scl`.
`sda_oe = 1` pulls SDA low (open drain). There is no clock stretching.

| address | contents |
|---|---|
| 0–71 | convolution weights (bits 5:0) |
| 72–79 | convolution biases |
| 80–2127 | dense weights |
| 2128–2143 | dense biases |
| 2144–2161 | output mask; byte n = mask bits 8n+7 … 8n |

Reads of weights return the 6 stored bits with bits 7:6 zero. After reset,
all weights and the mask are zero, so the output is empty (`out_nbits = 0`)
until the chip is programmed.

## Choices made in this implementation

The network shape, widths, pipeline rate, latency, the two triplication
schemes and the programmable bit selection follow the published design.
The following are this implementation's own choices:

- the 7-bit float format (4-bit exponent, 3-bit mantissa, hidden one);
- normalizing to the module sum through one shared reciprocal, and
  bringing the sum out on `out_sum`;
- the placement of the 48 cells on the 8×8 image (only its shape, with one
  empty quadrant, follows the design);
- the weight binary point (5 fraction bits) and 6-bit biases at the same
  scale;
- padding side, truncation instead of rounding, output saturation;
- flatten order, weight order, mask numbering and packing;
- the placement of the three register stages;
- the I2C protocol, device address and address map;
- asynchronous active-low reset to zero everywhere.

Not included: the rest of the concentrator ASIC (PLL, clock and reset
generation, link serializers, pads, other trigger paths) and the
off-detector decoder network.

## Files

| file | contents |
|---|---|
| `rtl/ae_pkg.sv` | sizes, formats, address map |
| `rtl/ae_encoder_top.sv` | top level |
| `rtl/tc_decompress.sv`, `convertor.sv` | input side |
| `rtl/conv2d_relu.sv`, `dense_relu.sv`, `output_select.sv` | network and output |
| `rtl/tmr_datapath_reg.sv`, `tmr_weight_bank.sv` | triplicated storage |
| `rtl/i2c_target.sv` | configuration interface |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/ae_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/i2c_ctrl_tasks.svh` | I2C controller tasks |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example,
the end-to-end test at full size:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/ae_pkg.sv tb/ae_ref_pkg.sv \
  tb/tb_ae_encoder_top.sv --top-module tb_ae_encoder_top -o sim
./obj_dir/sim
```

Run the other testbenches the same way, swapping in `tb_<module>`.
`tb_i2c_target`, `tb_tmr_datapath_reg` and `tb_tmr_weight_bank` do not need
`tb/ae_ref_pkg.sv`, but listing it does no harm. The end-to-end test takes
about 40 s to build and 20 s to run.

## What the tests cover

- `tb_tc_decompress`: all 128 codes.
- `tb_convertor`: empty, single-hit (including a power-of-two charge that
  hits exactly 256 and must saturate), full-scale and random modules.
- `tb_conv2d_relu`, `tb_dense_relu`: random and hand-worked cases against
  an integer reference; the convolution's hand cases also check the cell
  placement, the empty quadrant and the edge padding. ReLU clamping and output saturation are counted
  and must occur.
- `tb_output_select`: empty, full, 16×3 and random masks.
- `tb_tmr_datapath_reg`, `tb_tmr_weight_bank`: upsets are injected by
  overwriting one copy. The first checks that its voter masks them; the
  second checks masking, and repair after one clock, with three
  phase-shifted clocks.
- `tb_i2c_target`: burst write and read, NACK-terminated read, a foreign
  device address.
- `tb_ae_encoder_top`: the top with default parameters. All 2162 bytes are
  programmed in one I2C burst and samples are read back. About 670 random
  events are then streamed with gaps, and every output bit and the sum are
  checked on the exact cycle due. Along the way the mask switches between
  144 and 48 bits, and upsets hit one data-path register copy and one
  weight-storage copy. The test counts each mechanism (empty module,
  convertor saturation, both ReLUs, output saturation, both output modes,
  gaps, both upset kinds, readback) and fails if one never occurs.

All testbenches pass. Each was also run against a copy of its module with
one deliberate fault, and each caught it. The tests show that the RTL
matches the reference model of the formats above. They cannot show that
those formats match any particular trained network: weights from a
training flow must use the same binary points, padding and orders.
