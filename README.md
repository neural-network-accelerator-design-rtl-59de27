# A precision-flexible CNN accelerator subsystem

This is an accelerator for convolutional network layers, meant to sit next to a CPU in a
system on chip. The host writes a handful of configuration registers and starts a layer. The
accelerator then:

1. pulls the layer's weights and activations from external memory over an AXI4 master;
2. multiplies them in 256 MAC units, as 8-bit, 4-bit or 2-bit signed values;
3. accumulates, rectifies, truncates and pools the results;
4. writes the 8-bit results back to external memory and raises an interrupt.

The design follows the architecture proposed in the thesis *Neural Network Accelerator Design
for System on Chip*. That thesis fixes the block structure: global buffer, DMA, control unit, a
systolic array of four 64-MAC arrays, and an aggregation core. It also fixes the 256 KB
ping-pong buffer, the two-cycle buffer read latency, the three-cycle MAC and its zero skip,
8-bit operands with 16-bit products, and the signed precision-flexible radix-4 Booth
multiplier. Much of the rest is this implementation's own: the dataflow details, the register
map, the buffer layout, the burst handling and the post-processing rules. The sections below
say which parts are which.

## Block structure

```
 host ── cfg bus ──► control_unit ──► dma ◄──► AXI4 master ◄──► external memory
                        │   │            │
                        │   │            ▼ port A
                        │   └────► global_buffer (2 banks x 32768 x 32 bit)
                        │                ▲ port B
                        ▼                │
          systolic_array (4 x mac_array 8x8 of mac_unit) ──► aggregation_core
```

| module | role |
|---|---|
| `dla_top` | Top level. It wires the blocks and brings out the configuration bus, irq, the AXI4 master, two performance counters and the current bank select. |
| `control_unit` | Holds the configuration registers and sequences one layer. |
| `dma` | Moves blocks of 32-bit words between AXI4 and buffer port A, in INCR bursts of at most 16 beats that never cross a 4 KB boundary. |
| `global_buffer` | 256 KB of on-chip RAM in two ping-pong banks, with two ports and a two-cycle read latency. |
| `systolic_array` | Four `mac_array`s working in lock step. |
| `mac_array` | 8 x 8 weight-stationary grid of `mac_unit`s. |
| `mac_unit` | Stationary weight register. Input register with zero skip, then product register, then partial-sum register. |
| `flex_booth_multiplier` | One 8x8, two 4x4 or four 2x2 signed products from the same 8-bit operands. |
| `booth_multiplier` | Signed radix-4 Modified Booth multiplier whose partial products are summed by ripple carry adders. |
| `ripple_carry_adder`, `full_adder` | The adders the multipliers are made of. |
| `aggregation_core` | Accumulation over several vectors, ReLU, shift and saturation to int8, and max/min/average pooling. |
| `dla_pkg` | Enumerations, the register map, the layer configuration word and the DMA command. |

## How a layer runs

The controller is a fixed state machine. A write of 1 to CTRL starts it. It then goes through
five phases:

1. **Load.** The DMA copies `LOAD_LEN` words from external byte address `EXT_SRC` into buffer
   address 0 of the bank on the DMA side. When the transfer is done, the banks are swapped, so
   the compute side now sees the loaded data.
2. **Activate.** The aggregation core's counters are cleared. Precision, convolution mode,
   activation and pooling come straight from the LAYER register.
3. **Weights.** 64 words (256 weights) are read from buffer address `wbase` into the MAC units.
   Byte k of word i goes to unit 4i+k. Within each array, unit index = row x 8 + column, and
   array a holds units 64a to 64a+63.
   When `acc_n` > 1, each of the `acc_n` accumulation steps has its own weight set of 64
   words. Set k sits at `wbase + 64k`. The set for vector v (k = v mod acc_n) is reloaded
   before that vector is issued, at a cost of about 66 cycles per vector. This is what lets
   a kernel longer than 8 terms be split over several vectors.
4. **Vectors.** For each of `nvec` input vectors:
   - the controller reads the vector's words from the buffer and issues them to the array;
   - it waits for the result (ROWS + 2 = 10 cycles later) and for the aggregation core;
   - when the aggregation core delivers a finished result, the controller writes it to the
     buffer at `obase + 8r`. A result is 32 bytes, with lane l in byte l.
5. **Store.** The banks are swapped back. The DMA copies the 8 x (number of results) words to
   external address `EXT_DST`. Then STATUS.done is set and `irq` is raised.

Only one vector is in the array at a time. This keeps the controller simple. The cost is
about 24 cycles per vector (normal mode) where the array alone could take one vector per
cycle. That rate is the first thing to improve when performance matters.

### Register map (configuration bus)

A write happens when `cfg_valid` and `cfg_we` are both set. `cfg_rdata` always shows the
register at `cfg_addr`.

| addr | name | contents |
|---|---|---|
| 0 | CTRL | Write bit 0 = start. Write bit 1 = clear irq. |
| 1 | STATUS | Read only: bit 0 = busy, bit 1 = done. |
| 2 | EXT_SRC | External byte address of the input block. |
| 3 | EXT_DST | External byte address for the results. |
| 4 | LOAD_LEN | Words to load, in bits [15:0]. |
| 5 | LAYER | The layer configuration word (fields below). |
| 6 | WACT_BASE | Buffer word addresses: bits [15:0] = weights, bits [31:16] = activation vectors. |
| 7 | OUT_BASE | Bits [15:0] = buffer word address of the results. Bits [31:16] = number of input vectors. |

The LAYER fields are:

| bits | field | values |
|---|---|---|
| [1:0] | prec | 0 = 2-bit, 1 or 2 = 8-bit, 3 = 4-bit |
| [8] | conv_mode | 0 = normal, 1 = depthwise |
| [9] | relu | 1 = ReLU |
| [11:10] | pool_op | none, max, min, average |
| [15:12] | acc_n | vectors summed per result |
| [19:16] | pool_n | results per pooling window |
| [23:20] | shift | right shift before saturation |

A value of 0 in acc_n or pool_n counts as 1.

### Buffer layout expected by the controller

- **Weights:** 64 words at `wbase`, or `acc_n` sets of 64 words one after another.
- **Normal convolution:** each vector is 2 words (8 activations, one per array row). The same
  vector goes to all four arrays, which hold the weights of different output channels. One
  vector therefore produces 32 output channels.
- **Depthwise convolution:** each vector is 8 words, 2 for each array. Array a filters its own
  channel.
- **Vector v** starts at `abase + v x (2 or 8)`.

The host arranges the data in this order, including any zero padding of the feature map.

## The datapath in detail

### Precision-flexible MACs

An 8-bit operand word carries one of the following, as signed lanes:
- one 8-bit value;
- two 4-bit values (bits [3:0] and [7:4]);
- four 2-bit values.

The flexible multiplier runs one 8x8, two 4x4 and four 2x2 Booth multipliers side by side. A
2-bit select code picks whose products form the 16-bit output. Inside a MAC unit the lane
products are added together into a single 16-bit partial sum. In 4-bit mode a unit therefore
contributes w0·x0 + w1·x1, and in 2-bit mode the sum of four products. This is how the narrow
modes raise throughput without widening the array's outputs.

The Booth multiplier works as follows:
- It recodes the multiplier operand in overlapping 3-bit groups into digits -2..+2.
- Each digit selects 0, ±a or ±2a as a partial product.
- A chain of ripple carry adders sums the partial products.
- The +1 that completes a negation enters as that adder's carry-in.

### MAC unit and the zero skip

A `mac_unit` has three register stages, matching the three cycles per MAC operation:
1. **Input.** The activation is registered, and a zero activation is detected here.
2. **Product.** The product is registered.
3. **Sum.** `psum_in` plus the product is registered.

So `psum_out` appears three clock edges after the activation. For a zero activation the
input register keeps its previous value, so the multiplier inputs do not toggle, and the
product register is loaded with 0. Each skip is reported. `perf_skips` in the top level counts
them.

### Weight-stationary array and the skew

In each 8 x 8 `mac_array`:
- activation x[r] is broadcast along row r;
- partial sums flow down the columns;
- column c therefore computes Σ_r w[r][c]·x[r].

A unit adds its partial sum one stage after the unit above it, so row r must see its
activation r cycles after row 0. The array delays the rows with a skew line. It also delays
the column inputs (`psum_top`) by two cycles. All eight column results then leave together,
exactly ROWS + 2 = 10 cycles after the vector entered.

Partial sums are 16 bits and wrap on overflow; they do not saturate.

### Aggregation core

For each of the 32 lanes (4 arrays x 8 columns), the core:
1. sums `acc_n` consecutive result vectors in 32 bits. This allows dot products longer than 8
   terms, such as a 3x3 kernel over several input channels (with one weight set per step,
   see above);
2. applies ReLU if enabled;
3. shifts right arithmetically by `shift`;
4. saturates to a signed 8-bit value;
5. pools over `pool_n` consecutive results: maximum, minimum, or the average rounded toward
   zero.

The host must order the vectors so that the pixels of one pooling window come one after
another. A finished result appears one cycle after the vector that completes it.

### Global buffer and ping-pong

There are two banks of 32768 x 32-bit words, 256 KB in total. Port A always works on the bank
selected by `bank_sel` and port B on the other, so the DMA and the compute side never collide.
A `swap` pulse exchanges the banks. A read on either port returns its data two cycles later,
with a valid flag.

Because each port sees only one bank, a single load or store can use at most 128 KB. The
16-bit `LOAD_LEN` field does not enforce this: keep it at 32768 words or fewer. The banks are
plain arrays; for silicon, SRAM macros would take their place.

### DMA and AXI

The AXI4 master is 32 bits wide. Bursts are INCR with a 4-byte beat size and all strobes set.
A transfer is cut into bursts of at most 16 beats, and a burst is shortened where it would
cross a 4 KB boundary.

- **Reads:** each beat is written to the buffer as it arrives.
- **Writes:** the burst's words are first read from the buffer into a 16-word register file,
  then the whole burst is sent back to back.

A non-OKAY response sets `dma_error` and the transfer runs to its end. Assertions check that
AW, W and AR hold their values until accepted, and that no burst crosses 4 KB.

## Where this departs from the thesis

- **Dataflow.** The thesis states a weight-stationary dataflow for the MAC arrays, and in
  another place calls the network row-stationary with broadcast. Weight stationary is built
  here. The broadcast survives as the activation vector shared by the four arrays in normal
  convolution.
- **Who feeds the array.** The thesis draws the DMA between the buffer and the systolic array.
  Here the control unit reads buffer port B and feeds the array, and the DMA only connects the
  buffer to external memory.
- **Timing figures not modelled.**
  - The thesis's latency estimate assumes a six-cycle write delay per SRAM write. Writes here
    complete in one cycle.
  - Its six-cycle AXI transaction overhead belongs to the memory system, not to this design.
- **Configuration.** The thesis has the registers configured through the DMA. Here the host
  writes them over a simple register bus.
- **Blocks not built.**
  - The pre-processing unit and the RNN-LSTM core are only named in the thesis, with no
    function given, so they are left out.
  - Fully connected and recurrent layers can still run as matrix-vector products in normal
    mode.
- **Multiplier.** Only the selected multiplier is built: the Modified Booth design. The other
  multipliers the thesis compares it with are left out.
- **MobileNet's first layer.** Its 224 x 224 x 3 input (150528 bytes) is larger than one
  128 KB bank, so it must be loaded in two or more tiles. Its 401408-byte output must likewise
  be stored in several passes. The thesis reaches the same conclusion for the output.
  - Mapping: each output pixel is a 27-term dot product (3 x 3 taps x 3 channels) for 32
    output channels. That is four 8-row vectors, the last zero-padded, with `acc_n` = 4 and
    four weight sets. The 32 output channels fill exactly the 4 x 8 array columns.
  - The thesis estimates 3 cycles per pass of the array. This controller needs about 400
    cycles per output pixel (measured), mostly for reloading weights, so it is far from that rate.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with a model computed in
the testbench:

| testbench | what it checks |
|---|---|
| `tb_ripple_carry_adder` | All 8-bit operands; random 16-bit operands. |
| `tb_booth_multiplier` | All operand pairs at 8, 4 and 2 bits. |
| `tb_flex_booth_multiplier` | All operand pairs in every select code. |
| `tb_mac_unit` | Products in each precision with the exact three-cycle timing, skip pulses and weight reload. |
| `tb_mac_array`, `tb_systolic_array` | Random weights and vectors in all precisions and both convolution modes, with the result latency checked to the cycle. |
| `tb_aggregation_core` | Accumulation, ReLU, shift, saturation and every pooling mode, with one-cycle output timing. |
| `tb_global_buffer` | Bank separation, swaps, the two-cycle read latency and both ports active at once. Reduced depth. |
| `tb_dma` | Random transfers against the AXI memory model with random stalls, multi-burst and across 4 KB, in both directions. |
| `tb_control_unit` | The controller against small models of its neighbours: registers, DMA commands, swaps, weight order, vector contents per mode, result addresses and irq. |
| `tb_dla_top` | Five complete layers at the default size (see below). |
| `tb_mobilenet_c1` | A 16-pixel tile of MobileNet's first layer on the full-size design, checked against a direct convolution. The tile includes the image-edge padding. |

`tb_dla_top` runs the whole accelerator at its default size. Its five layers cover:
- 8-, 4- and 2-bit precision;
- normal and depthwise convolution;
- every pooling mode;
- ReLU and saturation;
- zero activations;
- DMA transfers that split at 4 KB.

It counts how often each of these mechanisms happened, and also bank swaps and interrupts.
Any mechanism that never happened counts as a failure. Results are compared byte by byte in
the external memory model (`tb/axi_mem_model.sv`).

Every testbench ends with a line of the form `TB_RESULT checks=N failures=M` and has a
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/dla_pkg.sv tb/tb_dla_top.sv \
          --top-module tb_dla_top -Mdir obj_dla_top -o sim
./obj_dla_top/sim
```

Substitute any other testbench name. Building the full-size top takes a few minutes, mostly
for the 2 x 128 KB buffer arrays; the simulation itself takes under a second. The sizes are
parameters of `dla_top`: `BUF_DEPTH`, `N_ARR`, `ROWS`, `COLS` and `MAX_BURST`. `ROWS` and
`N_ARR x COLS` must be multiples of four, because weights, vectors and results are packed four
bytes to a word. The 4-bit LAYER fields limit `acc_n`, `pool_n` and `shift` to 15.
