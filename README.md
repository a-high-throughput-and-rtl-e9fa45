# RRAM convolution tile with encoded data and dynamically quantized A/D conversion

Resistive-RAM crossbars compute matrix-vector products in place: weights sit
in the array as conductances, activations are applied as wordline voltages,
and every bitline current is already a dot product. The cost moves to the
periphery. The analog-to-digital converters, which must digitise every
bitline after every input bit, take most of the energy and area. This RTL
builds one accelerator tile around three ideas that shrink that cost:

1. **Segmented compression encoding (SCE).** Weights and activations are
   recoded so that the stored cell levels and the applied digits are small.
   The crossbars then draw less current, and the bitline sums fit in fewer
   ADC bits.
2. **A 5-bit ADC instead of a 10-bit one.** In the worst case a bitline of a
   128-row array of 2-bit cells, with a sign, needs 10 bits. Real, sparse and
   encoded data almost always stays in a small range around zero. The
   converter keeps the fine LSB, gives up the range, and clips the rare
   outliers.
3. **Dynamic quantization of the MAC schedule.** Partial products of low
   significance are not converted at all. This halves the conversions per
   operation, from 2048 to 1024, which halves the time of an operation.

The crossbars, the DACs, the sample-and-hold circuits and the ADC are analog
parts. Here they are behavioural models that compute the same numbers. Every
digital part around them is synthesizable RTL.

## Data mapping in one MAC unit

A MAC unit (`mac_unit`) owns two 128x128 crossbars, a positive one and a
negative one. Each holds 16 columns of 16-bit signed weights. A weight
occupies eight adjacent bitlines, one 2-bit cell each: cell `b` holds weight
bits `[2b+1:2b]`. The most significant cell sits on the lowest bitline of its
group, so cell `b` of weight column `g` is on bitline `8g + 7 - b`. The 128
activations of the input vector drive the 128 rows.

An activation is applied one digit per *iteration*, least significant first.
There are 16 iterations, `i = 0..15`. In iteration `i` every bitline carries

    BL(i, 8g+7-b) = sum_r digit_i(act[r]) * (G+[r][8g+7-b] - G-[r][8g+7-b])

and the weight of that value in the final dot product is `2**(i + 2b)`.
Shift-and-add (`shift_add_reg`) multiplies each ADC code by that power of two
and adds it into the output register of column `g`. After the last iteration
the 16 output registers hold the 16 dot products. They are 40 bits wide and
signed.

## Encoding the operands

**Weights (`sce_weight_encoder`).** The weight is cut into 2-bit sub-words,
least significant first, and a carry runs upward through them. A sub-word
that is above the middle of its range, with its carry added, becomes a
negative digit. For 2-bit cells the middle is 2; for 4-bit sub-words it is
`1000b`. The negative digit is stored as `2**k - x` in the negative crossbar
and sends a carry of one to the next sub-word. Any other sub-word goes to the
positive crossbar unchanged. Every stored level is then at most half the
cell range. The top sub-word is read as signed, which covers negative
weights. A worked example with 4-bit sub-words: `0010_1110_1001_1100b`
becomes `0011` in the positive crossbar for sub-word 3, and `0001`, `0110`,
`0100` in the negative crossbar for sub-words 2, 1 and 0. The encoder takes
the sub-word width as a parameter, and the testbench checks this example.

**Activations (`csd_encoder`, one per row).** The DACs are 1-bit, so the
activation is recoded into canonic signed digits (CSD): each digit is -1, 0
or +1, and no two non-zero digits are adjacent. A digit of +1 drives the row.
A digit of -1 drives it with the opposite sign, so that row's contribution is
subtracted. For example, `0010_1110_1001_1100b` has 8 ones and becomes
`010-1_00-10_1010_0-100b`, which has 6 non-zero digits. The input is signed
two's complement, and 16 digits always suffice.

Both encodings preserve the value exactly. What they change is the
magnitude of the individual terms that are summed on a bitline.

## The reduced ADC (`adc_model`)

Each MAC has one ADC. All 128 bitlines are sampled and held at once, and the
sampling multiplexer (`sampling_mux`) feeds them to the ADC one per clock. The
ADC has the same LSB as a 10-bit converter (one cell level) but only 5 bits,
so it covers `[-16, 15]`. A value outside that range clips to the nearest end
and raises `adc_sat`. Clipping the range, rather than coarsening the LSB, is
what keeps the common small values exact.

## Dynamic quantization: which conversions run (`dq_scheduler`)

This is the part that sets the timing of the whole design. A partial product
from iteration `i` on cell `b` has significance `2**(i + 2b)`. The scheduler
skips every conversion with `i + 2b <= 14`. For cell `b` that keeps
iterations `i >= 15 - 2b`:

| iteration `i` | cells converted | bitlines converted (of 128) |
|---|---|---|
| 0 | none | 0 (iteration not run at all) |
| 1, 2 | b = 7 | 16 (bitlines 0, 8, 16, ... 120) |
| 3, 4 | b = 6, 7 | 32 (0, 1, 8, 9, ...) |
| 5, 6 | b = 5..7 | 48 |
| ... | ... | ... |
| 13, 14 | b = 1..7 | 112 |
| 15 | all | 128 |

The total is 1024 conversions, exactly half of the 16 x 128 that converting
everything would take. Within an iteration the kept bitlines are visited in
ascending order, one per clock. The next kept bitline is found arithmetically
(step by one inside a group, jump to the next group after the last kept
cell), so there are no idle cycles.

The crossbar is sampled once per iteration. The `sample` strobe for
iteration `i+1` comes in the same cycle as the last conversion of iteration
`i`. The ADC reads the held values through the multiplexer before the clock
edge that replaces them, so the conversions of consecutive iterations run
back to back.

What is skipped is lost. The result is the dot product minus the skipped,
low-order partial products, and minus any clipping. Setting the parameter
`THRESH` to a negative value keeps every conversion. Together with
`ADC_BITS = 10`, that makes the MAC exact, and the MAC testbench uses this
to check the datapath against plain multiplication.

### MAC timing

One clock is one ADC sampling cycle; the converter is meant for 1.28 GS/s.
After `start` the MAC spends one cycle latching the activations and one cycle
sampling the first kept iteration. Then it spends one cycle per conversion,
and one more while the last ADC result reaches the output registers. `done`
rises 1027 cycles after `start` at the default sizes, or 2051 with skipping
disabled.

## The tile (`rram_tile`, top level)

The tile groups 24 MAC units with:

- **eDRAM buffer** (`edram_buffer`): 32 KB, 256-bit words, single port, with
  a one-cycle read latency. It holds feature maps.
- **S+A and output register** (`tile_sa_or`): one 40-bit sum per MAC output.
  It either takes a new MAC result or adds it to the stored sum. Adding
  combines the row slices of a kernel taller than 128 rows, over successive
  commands.
- **Activation unit** (`sigma_unit`): an arithmetic right shift by a
  per-command amount, then ReLU, then saturation to a 16-bit activation.
- **Max-pool unit** (`maxpool_unit`): either stores the new activations or
  keeps the element-wise maximum of the stored ones and the new ones. A
  pooling window is evaluated as a sequence of commands.

A command (`rram_pkg::tile_cmd_t`) has these fields:

- `in_addr`: the first of `ROWS*16/256` eDRAM words holding the activations
  (8 words at the default sizes), 16 activations per word, lowest in bits
  `[15:0]`.
- `out_addr`: where MAC `m` writes its 16 results, as one word at
  `out_addr + m`.
- `accumulate`, `pool` and `writeback`: flags.
- `shift`: the right shift applied by the activation unit.

The controller works through one command in this order:

1. It loads the input register from the eDRAM.
2. It starts all MACs on the same vector.
3. It waits for every MAC.
4. It updates the output register, one MAC per cycle.
5. If `writeback` is set, it runs the activation and pooling units and
   writes one eDRAM word per MAC, one per cycle.

A command takes 1037 cycles at the reduced test size (2 MACs, 32 rows) and
1087 cycles at the default size, which is dominated by the 1024 conversions.

Host ports:

- The eDRAM port and the weight port are honoured only while the tile is
  idle. A weight written through the weight port goes through the SCE
  encoder into the chosen MAC, one weight per cycle.
- A command is taken when `cmd_valid` and `cmd_ready` are both high. `done`
  pulses when the command has finished.
- `conv_count` and `sat_count` count all conversions and all clipped
  conversions since reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_MACS` | 24 | MAC units per tile |
| `ROWS`, `COLS` | 128, 128 | crossbar size |
| `W_BITS`, `A_BITS` | 16, 16 | weight and activation width (`A_BITS` = iterations) |
| `CELL_BITS` | 2 | bits per RRAM cell |
| `ADC_BITS` | 5 | ADC resolution (10 gives the unreduced converter) |
| `THRESH` | 14 | skip conversions with `i + 2b <= THRESH`; negative disables skipping |
| `EDRAM_B`, `BUS_W` | 32768, 256 | eDRAM size in bytes and word width |

The shared constants are in `rtl/rram_pkg.sv`.

## What follows the design and what is added here

These parts follow the design:

- the crossbar size, cell width, weight and activation widths;
- the positive/negative crossbar pair;
- the SCE rule and the CSD recoding of activations;
- the 10-bit worst case and the 5-bit converter;
- the `i + 2b <= 14` rule, with its 1024-conversion schedule and bitline
  order;
- 24 MACs per tile, and a 32 KB, 256-bit eDRAM;
- the set of tile parts: S+A, output register, activation, max pool.

These are choices made here:

- two's complement signs for weights and activations, with a signed top
  sub-word in SCE;
- applying a -1 digit as an inverted row drive;
- clipping in the ADC;
- the 40-bit output registers;
- the overlap of sampling with the last conversion;
- the command format and controller;
- the eDRAM layout;
- accumulate-or-overwrite in S+A;
- ReLU with shift and saturation as the activation function;
- max pooling as a running maximum over commands;
- broadcasting one input vector to all MACs.

Not built:

- the six 1 KB SRAM buffers of a tile, because their role is unspecified;
- the multi-tile chip and its interconnect.

Limits to keep in mind:

- The analog models are ideal. There is no device variation, noise or IR
  drop. Accuracy claims therefore rest only on the arithmetic shown above.
- Accuracy depends on the data. The 5-bit ADC clips much more on dense
  random vectors than on sparse, ReLU-like ones (see the testbench outputs).
- The skipped conversions are the low-order ones, counted from bit 0 of the
  16-bit words. Fixed-point data must therefore sit near the top of the
  range. If 8-bit pixels sit in the low bits, almost the whole product is
  skipped. Scaled by 2**7, a LeNet first-layer run in `tb_lenet_conv1`
  deviates from the exact convolution by about 1% (summed absolute error
  over the pooled outputs).
- Crossbar contents are not reset. Read only programmed cells.
- Verilator reports a SYNCASYNCNET lint note on `rst_n` in `mac_unit` and
  `rram_tile`, because the assertions' `disable iff` samples the
  asynchronous reset. The note is harmless.

A single tile holds 24 x 128 x 16 = 49,152 weights. A small CIFAR-10 network
(about 145k weights) or LeNet (about 431k) therefore needs several tiles, or
reprogramming between layers. Single layers such as the LeNet convolutions
fit in one tile.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference arithmetic, written
independently of the RTL, is in `tb/tb_ref_pkg.sv`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/rram_pkg.sv tb/tb_ref_pkg.sv tb/tb_mac_unit.sv \
      --top-module tb_mac_unit -o sim && ./obj_dir/sim

The testbenches:

- `tb_rram_tile` runs the tile end to end with 2 MACs of 32 rows.
  - It covers weight loading, an overwrite command, an accumulating command
    with write back, and a pooling command.
  - It checks every output against the reference.
  - It counts every mechanism: skipped conversions, ADC clipping,
    accumulation, ReLU zeroing, saturation, and pooling that keeps the old
    value or takes the new one.
- `tb_rram_tile_full` does the same with every parameter at its default:
  24 MACs and 49,152 weights. It takes about 1.5 minutes to build and
  10 seconds to run.
- `tb_lenet_conv1` runs four 2x2 max-pooled windows of the first LeNet layer
  on a synthetic image. It uses 20 channels over two MACs and rows 0..24.
- `tb_mac_unit` compares a default MAC with the reference model, and an
  exact MAC (no skipping, 10-bit ADC) with plain multiplication. It also
  checks the 1027 and 2051 cycle latencies.
- `tb_dq_scheduler` checks the full conversion list, the per-iteration
  counts and the sampling order.
- `tb_csd_encoder` and `tb_sce_weight_encoder` check all 65,536 inputs.
