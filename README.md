# FENet streaming feature extractor (192 channels)

This is SystemVerilog RTL for a feature extractor for intracortical brain-machine interfaces. It takes 192 streams of neural samples. Every bin (for example 150 samples, or 30 ms at 5 kSps) it reduces each channel to a handful of 9-bit features, and a linear decoder downstream turns those features into movement.

The features come from FENet, a small 1D convolutional network:

- Each layer has **two kernels of the same length** that read the same input window.
- The **feature kernel** result is rectified and summed over the bin into a pooling register. That sum becomes one output feature per layer.
- The **traversal kernel** result becomes the next layer's input sample.
- The last layer's traversal result is pooled as well, into an extra terminal feature.

An L-layer model therefore gives L+1 features per channel and bin. The hardware supports up to 7 layers plus the terminal feature.

The core idea is **streaming**. The design never stores a whole bin. Each layer keeps only a circular window as long as its kernel, and computes an output as soon as a stride of new input has arrived and the layer above has room. The 3-layer FENet-66 model (kernels 36/14/16) needs 66 words of memory per channel. A design that buffers the bin and every intermediate activation needs 327.

## Contents

| file | role |
|---|---|
| `rtl/fenet_pkg.sv` | widths, types, micro-operation and state enums, arithmetic helpers |
| `rtl/fenet_top.sv` | the whole chip: serial port, queues, registers, FSMs, weight SRAM, 6 streets |
| `rtl/processing_street.sv` | 4 channel blocks sharing control, activation bus and scan chain |
| `rtl/channel_block.sv` | 8 PEs, their sample queues and one shared 72-bit x 256 SRAM |
| `rtl/pe.sv` | one channel: two data paths, 8 pooling registers, feature shift registers |
| `rtl/mac_datapath.sv` | sign-magnitude MAC into a clamped 16-bit accumulator, shift LReLU |
| `rtl/pe_ctrl.sv` | PE control FSM: micro-operation sequences, SRAM/weight address stepping |
| `rtl/cnn_ctrl.sv` | algorithm FSM: streaming schedule, trimmed padding, loads, bin end, export |
| `rtl/async_queue.sv` | Gray-pointer dual-clock FIFO (channel queues, write queue, feature return) |
| `rtl/channel_sram.sv`, `rtl/weight_sram.sv` | memories written as arrays |
| `rtl/write_queue.sv`, `rtl/config_regs.sv`, `rtl/spi_if.sv` | host access path |
| `tb/tb_*.sv` | one self-checking testbench per module, an end-to-end test and a full-size test |
| `tb/tb_fenet_ref_pkg.sv` | integer reference model of one channel, used by the testbenches |

## The streaming schedule

This is the least obvious part of the design. It lives in `cnn_ctrl`.

### Which outputs a layer computes

A layer with kernel K and stride S receives N input samples in a bin. It produces `N' = floor((N + K - 1) / S)` outputs. Output `i` is

    y[i] = sum over j = 0..K-1 of x[S*(i+1) - 1 - j] * w[j]

Only taps whose index falls inside `0..N-1` are included. Conceptually the bin is zero-padded at both ends, but those padded taps are never multiplied:

- At the start, the kernel **grows**: the first outputs use fewer than K taps.
- In the middle it stays at **full** length.
- At the end of the bin it **shrinks** as the window slides past the last sample.

This rule gives the following counts per channel and bin, for 150-sample bins. Each column is one published model:

| | FENet-66 | FENet-15 | FENet-240 |
|---|---|---|---|
| kernels / stride | 36,14,16 / 2 | 10,5 / 3 | 6 x 40 / 2 |
| MACs with padding (per path x 2) | 9136 | 1250 | 27120 |
| MACs actually performed (x 2) | 7520 | 1176 | 17960 |
| pooling operations | 210 | 91 | 379 |
| words written (input + all layer outputs) | 327 | 222 | 489 |

`tb_cnn_ctrl` checks the last three rows against the schedule the FSM actually issues. The 327 "words written" include the last layer's outputs. The hardware pools those instead of storing them, so it performs 246 SRAM loads per FENet-66 bin.

### Memory partitions

In every channel SRAM, layer `l` owns a circular partition of `K_l` words. The partition starts at the sum of the kernel lengths of the lower layers. The kernel weights use the same base address in the weight SRAM, so one base serves both memories.

During a convolution:

- The activation address starts at the newest sample and steps backwards, wrapping inside the partition.
- The weight address starts at the first tap that is in range and steps forwards.

All kernels together must fit in 256 words. The 256-word weight SRAM sets the same limit.

### Sequencing

A single sequencer serves all layers. Each decision visits the layers from the highest down, so a higher layer always has priority for the shared PE. Running the higher layer first frees room in its partition for the lower layer.

A layer may **convolve** when both of these hold:

- Its next output's newest input has arrived. Near the end of the bin, it is enough that the whole bin has arrived.
- The layer above has room.

"Room" means the layer above has not yet received the input that its own next output needs. Otherwise a new word would overwrite a sample it still needs.

After a convolution come two steps:

1. **update**: the LReLU, and adding to the pool.
2. **load**: writing the traversal result into the next partition. The last layer skips this step.

If no layer can convolve, layer 0 **loads** a new sample row from the channel queues. It does so only when every enabled channel's queue holds a sample.

When every layer has produced all its outputs for the bin, the sequencer **formats** each used pooling register:

1. divide by 2^div with rounding
2. saturate to 9 bits
3. write into the feature register
4. clear

Formatting waits until the previous bin's features have left the scan chain. Then a new bin begins, and the features are shifted out while the new bin is computed.

Each layer's state is reported on `layer_state`. The states are IDLE, LOAD, WAIT_MULT, CONVOLVE, UPDATE, WAIT_RESULT, WAIT_FORMAT and FINISH. WAIT_MULT means the layer is ready but the PE is busy with a higher layer. Single-cycle event outputs mark:

- a wait for the multiplier
- a convolution with a grown kernel
- a convolution with a shrunk kernel
- a format wait
- the end of a bin

## Arithmetic

- **Activations and weights:** 9-bit sign-magnitude, with an 8-bit magnitude that has 6 fractional bits (values up to about ±3.98).
- **Accumulator:** 16-bit two's complement with 8 fractional bits. It **clamps** at ±32767/−32768 instead of wrapping. A product has 12 fractional bits and is truncated by 4 before it is added.
- **Back to 9 bits:** the accumulator is rounded half up (`(acc + 2) >>> 2`) and the magnitude is saturated at 255. This happens before the value is stored as an activation or added to a pool.
- **Leaky ReLU:** implemented by a shift. A negative value x becomes `|x| >> leak`. With leak 0 this is the absolute value, which is how the slope "−1" of the published models is implemented. Slopes −1/2 and −1/64 are leak 1 and 6.
- **Pooling registers:** 22-bit two's complement, saturating.
- **Features:** `(pool + 2^(div-1)) >> div`, saturated to 9-bit sign-magnitude. Each layer has its own `div`, and slot 7 is used for the terminal feature.

Only the two data paths differ between the features and the next-layer activations. They use the same activation and separate weights, `wt_feat` and `wt_trav`.

## Channel hardware

A `pe` holds two `mac_datapath` instances, the intermediate register, 8 pooling registers and 8 feature registers.

The PE control FSM (`pe_ctrl`) broadcasts micro-operations to every PE:

- `CLR`, then one `MAC` per tap
- `LRELU`: latch the rounded traversal result into the intermediate register, and rectify
- `ADD_POOL`
- for formatting: `DIV_POOL`, `ROUND`, `RESTORE`

Timing of a convolution:

- A convolution of n taps takes n + 3 system cycles from request to done.
- The SRAM and the weight SRAM are read one cycle ahead of each `MAC`.
- An update and a format step each take a few cycles.

The feature registers of all channels form one **scan chain**. A multiplexer skips every slot whose layer is unused, and every slot of a powered-down channel, so only live features are shifted out. The order out of the chip is:

- channel 0 first, then channel 1, and so on
- within a channel: feature 0, 1, ..., L−1, then the terminal feature
- street 0 is nearest the output, and the six street chains are joined in series.

## Host interface

The host uses a 4-wire serial port: `cs_n`, `mosi` and `miso`, clocked by `iclk`.

**Frames**

- A frame is 32 bits, MSB first, one bit per `iclk` while `cs_n` is low.
- `cs_n` must be high for at least one cycle between frames.
- Fields: `[31:28]` command, `[27:20]` address, `[15:0]` data.

| command | meaning |
|---|---|
| 1 CFG | write configuration register `address` with `data` |
| 2 WEIGHT | weight word `address`: `data[9]` = 0 traversal / 1 feature kernel, `data[8:0]` value |
| 3 SAMPLE | push `data[8:0]` into the queue of channel `address` |
| 4 READ | take the feature shown in the current status word |

**Status word**

While `cs_n` is high, the design captures a status word that is shifted out on `miso` during the next frame: `{valid, stall, dropped, 20'b0, feature[8:0]}`.

- `dropped` means the previous write frame was refused because its queue was full. The host must resend that frame.
- `stall` is also a pin. It is high while any channel queue is full, and is the back-pressure signal for the data sources.

**Configuration registers** (reset values in brackets)

| address | content |
|---|---|
| 0x00 | run [0]. Clearing it restarts the schedule. |
| 0x01 | number of layers, 1..7 [1] |
| 0x02 | bin length in first-layer strides, up to 2048 [1] |
| 0x10 + 2l | layer l: `[11:8]` stride, `[7:0]` kernel length [1, 1] |
| 0x11 + 2l | layer l: `[12:8]` div, `[2:0]` leak [0, 0]. Index l = 7 holds the terminal feature's leak and div. |
| 0x40 + g | channel enables 16g..16g+15 [all on] |

Configure the model while run is 0, then set run.

## Clocks and reset

- `clk` runs the whole solver.
- `iclk` runs the serial port, the write sides of the channel queues and the write queue, and the read side of the feature return queue.
- The two clocks may be fully asynchronous. Every crossing goes through `async_queue`, which uses Gray pointers and two-flop synchronisers.
- Each domain has its own active-low asynchronous reset, `rst_n` and `irst_n`.

## How this differs from the chip it is modelled on

- **No MAC clock.** The original PE performs each multiplication word-serially with an 8-bit adder on a faster MAC clock, around 21 times the system clock. Here a whole product is formed and added in one system cycle. The arithmetic results are the same, but cycle counts are not comparable: the original needs 5449 system cycles per FENet-66 feature. In this design, a bin costs roughly one system cycle per tap plus a few cycles per output, so the system clock must be proportionally faster.
- The word-serial stall states of the original PE sequence are folded into single steps. These are the shifting states of the LReLU and the multi-cycle round/quantise.
- **The serial protocol, register map, reset values and queue depths** of the write path and the feature return path are this design's own. So is the order in which the street chains are joined.
- **The leaky ReLU is applied to the terminal traversal result too**, using the slot-7 leak.
- **Features saturate.** The original takes a 9-bit slice of the pooling register selected by the divide setting. Here the shifted value is rounded and clamped to the 9-bit range, so an out-of-range feature saturates instead of wrapping.
- **Power domains, level shifters, clock generation and the debug port** are not modelled. A disabled channel holds its state, writes nothing, and is skipped by the scan chain.
- **The SRAMs are arrays.** They have one-cycle read latency and a per-lane write mask.

## Limits

- Kernel lengths of all layers together: at most 256. Every FENet variant with up to six 40-tap layers fits. The original seven 40-tap layers do not fit (280 words).
- Stride 1..15, kernel 1..255, leak shift 0..7, divide shift 0..31.
- Bin length up to 2048 first-layer strides. The bin must be long enough for every layer to produce at least one output.
- The serial address field is 8 bits, so `fenet_top` can be built with up to 256 channels without changing the protocol.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Each has a watchdog. Build any of them with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fenet_pkg.sv tb/tb_fenet_ref_pkg.sv rtl/*.sv tb/tb_fenet_top.sv \
        --top-module tb_fenet_top
    ./obj_dir/Vtb_fenet_top

| testbench | what it checks |
|---|---|
| `tb_fenet_full` | `fenet_top` at full size (192 channels, no parameter overrides). One FENet-66 bin over the serial port; all 768 features compared with the reference model; per-bin schedule counts. About 20 s of simulation time with Verilator. |
| `tb_fenet_top` | 4 channels, four models. FENet-66 over two bins, where the features of the first bin are read late. Then FENet-15 with one channel disabled, the six-layer 40-tap model, and a 3-level Haar wavelet (kernel 2, stride 2). Checks every feature and the schedule counts. It also counts that each mechanism happened: queue stall and resend, waiting for the multiplier, grown and shrunk kernels, format wait, bin completion, channel skip, accumulator clamping. |
| `tb_cnn_ctrl` | the algorithm FSM alone, with random PE latency, sample availability and export space, on FENet-66, FENet-15 and FENet-240. Checks every convolution's taps, weight start and activation start against the window formula, and the per-bin counts in the table above. |
| `tb_pe_ctrl` | micro-operation sequences, the n + 3 cycle convolution latency, address stepping and wrap |
| `tb_pe`, `tb_mac_datapath` | arithmetic against the integer reference, including clamping, LReLU shifts, pool formatting and the scan chain |
| `tb_channel_block`, `tb_processing_street` | queue readiness with a disabled channel, SRAM loads and write-back, one convolution, scan chain across blocks |
| `tb_async_queue`, `tb_channel_sram`, `tb_weight_sram`, `tb_write_queue`, `tb_config_regs`, `tb_spi_if` | the infrastructure blocks |

The reference model in `tb/tb_fenet_ref_pkg.sv` is written independently of the RTL. It works on plain integers, applies the window formula directly to a whole bin, and follows the arithmetic rules listed above.
