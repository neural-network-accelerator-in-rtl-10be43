# Multi-core neural-network accelerator (FPGA, 18-bit fixed point)

This design evaluates layered feed-forward perceptron networks. It spreads the
neurons of a layer over ten small multiply-accumulate engines ("computing
blocks"). All blocks listen to one shared input bus. Each clock the controller
places one input value on the bus, and every block multiplies that same value
by its own stored weight. So ten neurons grow at once, at ten multiply-adds per
clock. Finished sums leave the blocks one at a time over a second shared bus.
They pass through a single pipelined activation unit that interpolates a lookup
table, and land in a dual-port memory. The next layer reads its inputs from that
memory.

The sizes fit a small Spartan-3 class FPGA (XC3S200, 12 block RAMs, 12 18x18
multipliers):

* 10 computing blocks, each with one 1024 x 18 weight RAM and one multiplier;
* one activation unit (one multiplier, a 64-entry table);
* one 1024 x 18 result memory.

That gives 10240 synapses, 1024 neuron values, and 1330 million multiply-adds
per second at 133 MHz.

```
 data in ──► control_logic ──(input bus: value + weight pointer)──► computing_block × 10
                 ▲   │                                                      │ result registers
                 │   └─► data out                                   output_bus (block 0 first)
                 │                                                          │
           result_memory ◄──────────────── activation_function ◄────────────┘
```

## Number format

Every value is 18-bit two's complement **Q6.12**: 6 integer bits and 12 fraction
bits, so the range is [-32, 32) in steps of 1/4096. Products are kept at their
full 36 bits. The accumulator is 48 bits wide, so a sum cannot overflow within
the 1024-input limit. When a neuron finishes, its sum is shifted right by 12
(truncation toward minus infinity) and saturated to Q6.12.

## How a layer is computed: passes and the weight layout

This is the part you must understand to program the unit.

A layer with `out_count` neurons and `in_count` inputs per neuron runs in
`ceil(out_count / 10)` **passes**.

* Neuron `n` is computed by block `n mod 10` in pass `n / 10`.
* In each pass the controller reads the `in_count` inputs from the result memory
  at `in_base, in_base+1, ...`, one per clock. Each input goes on the bus with a
  weight pointer. All blocks of the pass take it, and `sel` marks which blocks
  take part, so a last pass can be partial.
* Each block looks the pointer up in its own weight RAM. Block `k` must therefore
  hold, for pass `p` of a layer, the weight of input `i` at:

```
    weight address = w_base + p * in_count + i        (in block n mod 10, p = n / 10)
```

So a layer uses `ceil(out_count/10) * in_count` words of every block's weight
RAM. The next layer's `w_base` normally starts where that ends.

Passes follow one another with no gap. While one pass accumulates, the results
of the previous pass drain over the output bus. A layer of `N` neurons with `I`
inputs takes `ceil(N/10) * I` clocks of bus time. After that comes a drain of
about 17 clocks before the next layer may start:

* 3 in the computing block;
* up to 10 waiting for the output bus;
* 3 in the activation unit;
* 1 for the memory write.

### The two waits

* **Stall.** A block has one result register. A finished sum may not arrive
  while the previous one still waits for the output bus. So the controller
  holds back the *last* input of a pass while any result register is full, or
  while an earlier last input is still inside the 3-stage block pipeline. This
  only costs time when a layer has fewer than about 14 inputs. An assertion in
  `computing_block` flags any overwrite.
* **Layer barrier.** A layer may only start once every neuron of the previous
  layer is in memory. A counter goes up by the number of active blocks when a
  pass's last input is issued. It goes down on every memory write from the
  activation unit. The next layer starts when it reaches zero. The `barrier`
  output is high while the controller waits.

## The network map

The controller holds up to 16 layer descriptors (`nna_pkg::map_entry_t`). It
runs them from entry 0 until one has `last` set.

| field       | bits | meaning |
|-------------|------|---------|
| `in_base`   | 10   | memory address of the layer's first input |
| `in_count`  | 11   | inputs per neuron, 1..1024 |
| `out_base`  | 10   | memory address where neuron 0 of the layer is stored |
| `out_count` | 11   | neurons in the layer, at least 1 |
| `w_base`    | 10   | weight address of the layer's first weight (see above) |
| `last`      | 1    | final layer |

Network inputs and all neuron results share the one 1024-word memory. The map
decides where each layer reads and writes. The regions should not overlap
within one layer. There is no bias term: a neuron is the plain weighted sum.
To get a bias, keep a memory word at 1.0 (4096) and include it as an extra
input.

## Computing block (`computing_block`)

The block has three pipeline stages:

1. **Input registers.** The data register, plus the weight RAM read at the
   bus pointer. The RAM's read register is the weight register.
2. **Product register.** Holds the signed 18x18 product.
3. **Accumulate.** An adder feeds back into the accumulator. On a word marked
   `first`, the product replaces the sum instead of adding to it. On a word
   marked `last`, the saturated result goes to the result register, together
   with the neuron address `tag + BLOCK_ID`, and `res.valid` rises.

Splitting multiply and add over two stages costs one clock of latency, but the
throughput stays at one input per clock. `res.valid` rises 3 clocks after the
last bus word and stays high until `grant`.

## Output bus and activation unit

`output_bus` is combinational. Each clock it grants the lowest-numbered block
whose result register is full, and forwards that word. So results drain at one
per clock, in block order.

`activation_function` evaluates a piecewise-linear function over 64 unit-wide
intervals:

```
    y = level[x[17:12]] + (gradient[x[17:12]] * x[11:0]) >>> 12
```

The 6-bit integer part selects the table entry. The 12-bit fraction
interpolates within the interval. The `gradient` entry is the rise across the
interval. The three pipeline stages are:

1. table read, with the fraction registered beside it;
2. product register, with the level delayed one stage;
3. adder and output register.

The latency is 3 clocks, at one result per clock. The output carries the neuron
address and writes the result memory directly.

At power-up the table holds the logistic sigmoid sampled at -32..31. Between
the sample points, linear interpolation stays within about 0.012 of the true
curve; the testbench allows 0.02. Through `lut_*`, any other
function can be loaded one interval at a time: step, ramp, clamp, and so on.

## Host interface (`nn_accelerator`)

All host ports are synchronous. Reset is asynchronous and active low.

| ports | use |
|-------|-----|
| `w_we, w_block, w_addr, w_data` | write one weight of one block (only while idle: writes are not blocked during a run) |
| `lut_we, lut_addr, lut_level, lut_grad` | rewrite one activation interval |
| `map_we, map_addr, map_wdata` | write one layer descriptor (ignored while busy) |
| `in_we, in_addr, in_data` | write a network input into the result memory (ignored while busy) |
| `start`, `busy`, `done` | one-clock `start` pulse runs the whole map; `done` pulses once the last layer is stored |
| `out_addr` → `out_data` | read any memory word, one clock later (while idle) |
| `stall`, `barrier` | status, see above |

A typical sequence:

1. load the map, the weights and the inputs;
2. pulse `start`;
3. wait for `done`;
4. read the output layer.

For the next image, only the inputs change.

## Timing and performance

Measured in simulation at the default size:

* A 16-23-12-25-4 network takes 202 clocks. 155 of them carry bus words, and 4
  are stalls.
* An assumed 64-50-10 digit classifier (8x8 image, 3700 multiply-adds) takes
  405 clocks per image: about 328000 images/s at 133 MHz.
* A 128-input, 80-neuron layer fills all 10240 weight locations. It runs in
  1042 clocks, which is 9.8 multiply-adds per clock.

The clock frequency itself depends on the FPGA implementation and is not
modelled.

## What follows the original design and what is this implementation's choice

These follow the original design:

* the block structure;
* one shared input bus and one priority output bus;
* weights stored in the blocks and addressed by a pointer;
* the pipeline stages of the computing block and of the activation unit;
* Q6.12 data;
* a dual-port result memory;
* the sizes: 10 blocks, 10240 synapses, 1024 neurons.

These are choices made here:

* the map format and its 16-entry depth;
* the assignment of neurons to blocks and the resulting weight layout;
* the first/last flags that restart and close a sum;
* the stall and barrier rules;
* the 48-bit accumulator, truncation and saturation;
* unit-wide activation intervals indexed by the integer bits, and the sigmoid
  power-up table;
* read-first memory behaviour;
* the whole host interface, including loading inputs into the result memory.

The original unit also claims it can run other network types at lower speed.
Only layered feed-forward maps are supported here.

## Files

| file | contents |
|------|----------|
| `rtl/nna_pkg.sv` | widths, sizes, bus and map structs, saturation function |
| `rtl/nn_accelerator.sv` | top level |
| `rtl/control_logic.sv` | network map, sequencer, stall and barrier, host data path |
| `rtl/computing_block.sv` | weight RAM and pipelined multiply-accumulate |
| `rtl/output_bus.sv` | fixed-priority output bus |
| `rtl/activation_function.sv` | table-interpolating activation pipeline |
| `rtl/result_memory.sv` | 1024 x 18 dual-port RAM |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_workloads.sv` |

## Simulating

Each testbench compares against a model of its own and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nna_pkg.sv tb/tb_nn_accelerator.sv \
          --top-module tb_nn_accelerator -Mdir obj && obj/Vtb_nn_accelerator
```

Replace the testbench name to run another one.

* `tb_nn_accelerator` runs the whole unit at its default size. It runs the
  network twice, with the sigmoid and then with a loaded ramp, and compares
  every neuron bit-exactly. It also requires that each mechanism occurs at
  least once: multi-pass layer, partial pass, stall, barrier, output-bus
  contention, saturation, and table switch.
* `tb_workloads` runs the digit-classifier and full-capacity cases above.
* The block testbenches check values, latencies (3 clocks for the block and for
  the activation unit) and one-word-per-clock throughput.

A design change that alters the weight layout or the number format must be
mirrored in the testbench models.
