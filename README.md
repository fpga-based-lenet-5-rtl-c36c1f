# LeNet-5 int8 inference accelerator for a Cyclone V SoC

This is a small handwritten-digit classifier in hardware. A 32x32 grayscale
image goes in and the predicted digit comes out, together with ten signed
32-bit class scores (logits). The network is the classic LeNet-5: two 5x5
convolutions, each followed by 2x2 max pooling, then three fully connected
layers (400 → 120 → 84 → 10).

The design favours a small footprint over speed. Every layer runs on one
controller and one shared three-lane multiply-accumulate (MAC) unit, one
output value at a time. All intermediate results stay in on-chip block RAM.
A full inference takes **454,966 clocks**, which is 9.10 ms at 50 MHz.

The core sits behind a memory-mapped register block on the Cyclone V HPS
lightweight HPS-to-FPGA bridge. The ARM side writes the image, starts the
core, polls for completion and reads back the result. On the DE1-SoC board,
the digit is also shown on the first seven-segment display and on LEDs.

## Hierarchy

```
soc_system_top                 board top: CLOCK_50, KEY, LW-bridge AXI4-Lite slave port, LEDR, HEX0
├── hps_lenet_regs             register slave: CONTROL/STATUS, RESULT, LOGIT[0:9], PIXEL_INPUT[0:1023]
├── lenet_int8_top             inference core: FSM, memories, datapath
│   ├── bram      x3           input image copies (1024 x 8)
│   ├── bram      x3 + x3      feature-map buffers A and B (8192 x 16 each)
│   ├── lenet_param_rom x5     packed int8 weights + biases of conv1, conv2, fc1, fc2, fc3
│   ├── lenet_addr_calc x3     one address generator per MAC lane
│   ├── lenet_mac_array        3 multipliers + adder, lane mask
│   ├── lenet_quantize         bias add, shift, ReLU, 16-bit saturation
│   └── lenet_argmax           index of the largest logit
└── hex_digit_to_7seg          HEX0 decoder
```

`lenet_pkg` holds the shared sizes, the layer enumeration and the function
that fills the parameter ROMs.

The HPS itself (ARM cores, DDR controller, Linux) is hard IP and is not part
of this RTL. In `soc_system_top`, its lightweight bridge is a plain AXI4-Lite
slave port that you connect to the HPS's `h2f_lw_axi_master`. The bridge
puts the register window at physical address `0xFF200000`.

## How one inference is scheduled

This is the part that determines both the timing and the correctness, so it
is described in detail.

### Layer sequence

The main FSM visits the layers in a fixed order:

`IDLE → CONV1 → POOL1 → CONV2 → POOL2 → FC1 → FC2 → FC3 → ARGMAX → DONE → IDLE`

Each layer is a loop over its outputs, with `x` innermost, then `y`, then the
channel (or neuron index for the dense layers). A layer ends when all its
counters reach their last values, for example `out_ch == 5, out_y == 27,
out_x == 27` for conv1.

### Convolution and dense layers: five states per output

Convolutions and fully connected layers use the same sequence for each
output:

| State | Clocks | What happens |
|---|---|---|
| INIT  | 1 | Clears the accumulator and `term_idx`. Puts this output's **bias word** address on the parameter ROM. |
| READ  | 1 | Puts the addresses for terms `term_idx .. term_idx+2` on the activation BRAMs and the parameter ROM. On the first READ, the ROM's output is the bias requested in INIT, which is captured into `bias_reg`. |
| ACCUM | 1 | Activation data and three packed weights are now valid. The MAC array forms the masked sum of three products, registered as `mac_partial_sum_r`. |
| ADD   | 1 | `acc_reg += mac_partial_sum_r`. If `term_idx + 3 >= TERMS`, go to WRITE. Otherwise advance by 3 terms and go back to READ. |
| WRITE | 1 | Requantizes `acc_reg + bias` and writes it to the output feature map (fc3 writes a logit register instead). Then starts the next output or the next layer. |

Each group of three terms costs three clocks: READ, ACCUM and ADD are not
overlapped. One output therefore takes `2 + 3·ceil(TERMS/3)` clocks.

Every memory has a fixed one-clock read latency, so READ always moves to
ACCUM without a handshake.

When `TERMS` is not a multiple of 3 (conv1 has 25 terms, fc1 has 400), the
last group has one or two padding lanes. `valid_mask` switches those lanes
off in the MAC array. The padding ROM slots are zero, and the padding
activation addresses are ignored.

### Pooling: four reads per output

Pooling uses POOL_INIT, then four POOL_READ / POOL_ACCUM pairs (one per pixel
of the 2x2 window, running max in `pool_max_reg`), then POOL_WRITE. That is
10 clocks per output.

### Cycle budget

| Stage | Outputs | Clocks per output | Clocks |
|---|---|---|---|
| start (IDLE with `start`) | 1 | 1 | 1 |
| conv1 | 6·28·28 = 4704 | 1 + 9·3 + 1 = 29 | 136,416 |
| pool1 | 6·14·14 = 1176 | 10 | 11,760 |
| conv2 | 16·10·10 = 1600 | 1 + 50·3 + 1 = 152 | 243,200 |
| pool2 | 16·5·5 = 400 | 10 | 4,000 |
| fc1 | 120 | 1 + 134·3 + 1 = 404 | 48,480 |
| fc2 | 84 | 1 + 40·3 + 1 = 122 | 10,248 |
| fc3 | 10 | 1 + 28·3 + 1 = 86 | 860 |
| argmax | 1 | 1 | 1 |
| **total** | | | **454,966** |

`cycle_count` counts exactly these clocks. The host can read it in
`RESULT[31:8]`.

## Memories and data layout

**Input image.** There are three identical 1024 x 8 BRAMs, one per MAC lane,
so that three pixels can be read per clock. Every host pixel write goes to
all three copies. Pixel `(y, x)` is at address `32·y + x`.

**Feature maps.** Two buffers, A and B, each 8192 x 16 and each replicated
three times for the three lanes. Each layer reads one buffer and writes the
other:

| Layer | Reads | Writes |
|---|---|---|
| conv1 | image | A |
| pool1 | A | B |
| conv2 | B | A |
| pool2 | A | B |
| fc1 | B | A |
| fc2 | A | B |
| fc3 | B | logit registers |

Maps are stored channel-major: address = `ch·H·W + y·W + x`. Because of this
order, pool2's 16x5x5 output is already the flattened 400-vector that fc1
reads at addresses `0..399`. The largest map is conv1's 4704 words.

**Parameter ROMs.** There is one ROM per layer. Each word is 24 bits wide and
holds three int8 values, with lane `l` in bits `[8l+7:8l]`. For each output
(filter or neuron), the ROM holds `ceil(TERMS/3)` weight words followed by
one bias word (bias in lane 0). The ROM depths are therefore:

| ROM | Words |
|---|---|
| conv1 | 6·10 = 60 |
| conv2 | 16·51 = 816 |
| fc1 | 120·135 = 16200 |
| fc2 | 84·41 = 3444 |
| fc3 | 10·29 = 290 |

Term order inside a conv2 filter is `ic·25 + ky·5 + kx`.

**Address generation.** `lenet_addr_calc` builds all convolution and pooling
addresses without dividers. The input channel (`term_idx / 25`) and the
kernel row (`tap / 5`) come from chains of range comparisons. The remainders
come from one subtraction each. Dividers in this path were what limited the
clock rate in an earlier version of this design.

## Arithmetic

- **Pixels** are uint8, zero-extended to 16 bits.
- **Activations** are 16-bit and never negative.
- **Weights and biases** are int8.
- **MAC:** each lane multiplies a 16-bit value by an 8-bit value. The
  accumulator is a signed 32-bit register. Worst-case sums stay well below
  2^31 (fc1: 400 · 32767 · 128 ≈ 1.7·10^9).
- **Requantization** (`lenet_quantize`) after conv1, conv2, fc1 and fc2:
  `out = clamp((acc + bias) >>> SHIFT, 0, 32767)`. This is a bias add, an
  arithmetic shift (rounds toward −∞), ReLU, and saturation to 16 bits.
  There is one shift parameter per layer.
- **Logits** are `acc + bias` from fc3, with no shift and no clamp.
- **Argmax** picks the largest signed logit. On a tie, the lower index wins.

## Host interface (`hps_lenet_regs`)

Byte offsets from the bridge base; all registers are 32-bit words.

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x0000 | CONTROL / STATUS | RW | **Write:** bit0 `start`, bit1 `clear_done`, bit2 `clear_input_loaded` (one-clock pulses). **Read:** bit0 `regs_valid`, bit1 `busy`, bit2 `done`, bit3 `input_loaded`. |
| 0x0004 | RESULT | RO | `[7:0]` predicted digit, `[31:8]` clock count of the last inference |
| 0x0008–0x002C | LOGIT_0..9 | RO | signed int32 class scores |
| 0x0030–0x102C | PIXEL_INPUT[0..1023] | RW | one word per pixel; bits `[7:0]` are written and read back |

How the status bits behave:

- **`done`** is sticky. The core's done pulse sets it; `clear_done` or a new
  `start` clears it.
- **`regs_valid`** means RESULT and the LOGITs hold a complete result. The
  done pulse sets it; `start` clears it.
- **`input_loaded`** is set after 1024 pixel writes since it was last
  cleared. It counts writes, not distinct addresses.

Host sequence: write the 1024 pixels, write `1` to CONTROL, poll STATUS until
bit 2 is set, then read RESULT and LOGIT_0..9. Optionally write `2`
(clear_done) and `4` (clear_input_loaded) before the next image.

Bus details:

- **Writes:** the slave accepts a write when AWVALID and WVALID are both high
  and no write response is pending. BVALID follows one clock later and is
  held until BREADY.
- **Reads:** the slave accepts one read at a time. RVALID comes two clocks
  after the accept (one clock for the pixel BRAM) and is held until RREADY.
- **Responses:** always OKAY. WSTRB is ignored. Unmapped reads return 0, and
  writes to read-only registers are dropped.

Pixel read-back uses the core's lane-0 image copy. It is only meaningful
while conv1 is not running. Pixel writes during an inference overwrite the
image in use.

## Board outputs

- **HEX0** shows the predicted digit (segments active low, bit 0 = segment a).
- **LEDR[0]** lights when the prediction is 0.
- **LEDR[4:1]** show the digit's BCD code, with LEDR[1] as the LSB.
- Both stay dark until the first inference completes.
- **KEY[0]** is the active-low reset.

## Status and departures from the original design

Sizes, memory organisation, packing, state sequence, cycle budget and
register map all follow the original accelerator. The points below are
either filled in here or differ from it:

- **Weights are synthetic.** The original loads trained int8 weights and
  biases from exported hex files; those values are not available. Each ROM
  is instead filled at elaboration by `lenet_pkg::param_value(rom, idx)`, an
  integer hash giving values in −64..63. Weight `t` of output `o` has
  `idx = o·TERMS + t`; the bias of output `o` has `idx = OUTS·TERMS + o`.
  As a result, the hardware is exact but it does not classify real digits
  well. To deploy it, replace the body of the `initial` block in
  `lenet_param_rom` with a `$readmemh` of the trained, packed values, or
  change `param_value`.
- **Shifts are assumed.** The per-layer shifts were tuned for the trained
  network and are not known. The defaults are `SHIFT_CONV1 = 6`,
  `SHIFT_CONV2 = 8`, `SHIFT_FC1 = 9` and `SHIFT_FC2 = 8`. They are top-level
  parameters.
- **Bias scale is assumed.** The bias is added as a plain int8 at
  accumulator scale.
- **Saturation bound.** Activations saturate at 32767 (the 16-bit feature-map
  width) rather than at an int8 bound. This is consistent with the
  magnitude of the original's logits (about 3·10^7).
- **Cycle count in RESULT.** RESULT carries the cycle count in bits
  `[31:8]`. One description of the original leaves these bits unused.
- **Chosen here, not specified:** the AXI4-Lite handshake details, the
  asynchronous active-low reset, the loop order, the ping-pong assignment,
  the feature-map layout and the lane order inside ROM words.
- **Not included:**
  - the HPS subsystem and its software (the web front end and the TCP
    inference server);
  - the image preprocessing (cropping, resizing, padding to 32x32), which
    runs in software;
  - an earlier conv1-only prototype (`conv1_top`) with six parallel MACs,
    which this core supersedes.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one from the repository root
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/lenet_pkg.sv \
          tb/tb_soc_system_full.sv --top-module tb_soc_system_full -Mdir obj_full
obj_full/Vtb_soc_system_full
```

| Testbench | What it covers |
|---|---|
| `tb_soc_system_full` | One inference through the register interface with all parameters at their defaults. Checks the logits, digit, the 454,966-clock count, HEX0 and LEDR against the golden model. |
| `tb_soc_system_top` | Two images back to back through the bus. `SHIFT_CONV1 = 0` so that saturation occurs. Also counts, and requires at least once, each of: ReLU clamping, saturation, masked MAC lanes, writes to both ping-pong buffers, all seven layers, busy/done polling, clear_done, clear_input_loaded and AXI back-pressure. |
| `tb_lenet_int8_top` | The core alone at its defaults: pixel load and read-back, exact total clock count (measured by the core and by the bench) and clocks spent in each layer against the cycle-budget table, one-clock `done`, logits. |
| `tb_lenet_digits` | Classification workload: ten synthetic digit images (0-9 drawn as strokes with random offset, thickness and noise) run back to back on the core; every logit, class and clock count is checked. With the synthetic weights the classes do not match the drawn digits. |
| `tb_hps_lenet_regs` | Register map, flag set and clear rules, pixel path, read-only and unmapped addresses, and AXI handshake rules. The accelerator is emulated by the bench. |
| `tb_bram`, `tb_lenet_param_rom`, `tb_lenet_addr_calc`, `tb_lenet_mac_array`, `tb_lenet_quantize`, `tb_lenet_argmax`, `tb_hex_digit_to_7seg` | Unit tests against independently computed values. |

Helper models in `tb/`:

- `lenet_ref` is a loop-based golden model of the whole network. It shares
  no code with the RTL.
- `axi_lite_host` is a bus master with random skew and back-pressure that
  also checks VALID/READY rules.

A full inference simulates in well under a second once built. Building the
core takes about a minute, mostly to elaborate the ROM contents.
