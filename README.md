# A layer-per-unit CNN accelerator for handwritten Hangul recognition

This is synthesizable SystemVerilog for an inference engine that takes one 64x64
grey-scale image of a handwritten Hangul character and produces 2,350 class
scores, one for each character of the KS X 1001 Hangul set. The network is a
ten-layer convolutional net: four convolution / max-pooling pairs and two fully
connected layers.

The hardware rests on three ideas:

* **Everything on chip while computing.** The image is copied from off-chip
  memory in bursts before any layer starts. The weights of all layers stay in
  on-chip memory, written once before use. Every intermediate feature map
  lives in an on-chip buffer between the layer that writes it and the layer
  that reads it. Off-chip memory is touched only at the two ends.
* **Unrolled innermost loops fed by partitioned memories.** Each convolution
  and fully connected unit evaluates its innermost loop `U` times in parallel.
  The arrays that loop reads (its input feature maps and its weights) are split
  into `U` independent memories, so `U` operands arrive every cycle. The
  unroll factor and the partition factor are always the same number.
* **32-bit fixed point with 10 fractional bits.** Every value `v` is stored
  as `v * 2^10`. A product of two values is shifted right by 10 to return to
  that format.

## The network

| step | unit | in planes | out planes | in size | window | out size | weights + biases |
|---|---|---|---|---|---|---|---|
| 0 | load (float -> fixed) | - | 1 | - | - | 64x64 | - |
| 1 | C1 convolution | 1 | 64 | 64x64 | 5x5 | 60x60 | 1,664 |
| 2 | P2 max-pool | 64 | 64 | 60x60 | 2x2 / 2 | 30x30 | 0 |
| 3 | C3 convolution | 64 | 64 | 30x30 | 5x5 | 26x26 | 102,464 |
| 4 | P4 max-pool | 64 | 64 | 26x26 | 2x2 / 2 | 13x13 | 0 |
| 5 | C5 convolution | 64 | 128 | 13x13 | 4x4 | 10x10 | 131,200 |
| 6 | P6 max-pool | 128 | 128 | 10x10 | 2x2 / 2 | 5x5 | 0 |
| 7 | C7 convolution | 128 | 256 | 5x5 | 4x4 | 2x2 | 524,544 |
| 8 | P8 max-pool | 256 | 256 | 2x2 | 2x2 / 2 | 1x1 | 0 |
| 9 | F9 fully connected | 256 | 512 | - | - | - | 131,584 |
| 10 | F10 fully connected | 512 | 2,350 | - | - | - | 1,205,550 |
| 11 | store scores | - | - | - | - | - | - |

Every convolution has stride 1, and every output plane is fed by every input
plane:

    X[p][i][j] = f( theta[p] + sum_q sum_u,v  w[p][q][u][v] * X_prev[q][i+u][j+v] )

Max pooling takes `f(max)` over a 2x2 window with stride 2. A fully connected
node is `f(theta[p] + sum_q w[p][q] * X_prev[q])`. In this implementation `f`
is ReLU everywhere except at F10, whose raw scores are returned.

## How a layer unit works

All layer units share one structure. A loop nest is turned into a set of
counters, and one loop iteration is issued every clock cycle. The pipeline has
two stages:

* stage A turns the counters into buffer addresses and reads the buffers;
* stage B, one cycle later, does the arithmetic and writes the result.

A unit is started with a one-cycle `start` pulse. It raises `done` for one
cycle, two cycles after it issued its last iteration.

### Convolution (`conv_layer`)

The loop order is, outermost first:

    for op in output planes
      for (u,v) in mask positions
        for (y,x) in output positions
          for ipc in input-plane groups        // NIN/U groups
            for k in 0..U-1  (unrolled)        // input plane ip = ipc*U + k
              psum[op][y][x] += w[op][ip][u][v] * X[ip][y+u][x+v]

The input-plane loop is innermost and unrolled. Input plane `ip` lives in
partition `ip % U`. Within that partition, the word address is
`(ip / U)*ISZ*ISZ + row*ISZ + col`. This mapping gives all `U` partitions the
same read address, so one address fetches `U` pixels. The weights are
partitioned the same way. Each cycle therefore forms `U` products (`fx_mul`)
and adds them in a tree.

Partial sums are kept in the layer's output buffer, which sits outside the
unit. Every cycle, stage A reads the partial sum of `(op, y, x)` and stage B
writes back the old value plus the tree sum. Two cases are special:

* on the first visit (mask position 0, group 0), the old value is replaced by
  the bias;
* on the last visit, the activation is applied to the value written.

When `NIN > U`, one partial sum is updated in consecutive cycles, once per
input-plane group. The buffer read is then one cycle stale, and stage B takes
the value it wrote in the previous cycle instead (forwarding). With the default
factors every group loop has length 1, so forwarding never happens at full
size. It does happen in the reduced testbench configuration.

Latency: `NOUT * MSK^2 * OSZ^2 * (NIN/U)` iterations, plus 2 cycles.

### Max pooling (`maxpool_layer`)

The loop order is plane, output row, output column, window position. The unit
reads one word per cycle from the preceding convolution's output buffer and
keeps a running maximum. At the last window position it writes `f(max)` into
the next layer's input buffer, at partition `p % OL`, word
`(p / OL)*OSZ^2 + y*OSZ + x`. `OL` is the next layer's unroll factor. For
P8 the outputs are 1x1, so this is exactly the partitioning F9 expects.

Latency: `NPL * OSZ^2 * 4` iterations, plus 2 cycles.

### Fully connected (`fc_layer`)

The loop order is output node `p`, then input group `c`. The input loop is
unrolled `U` times:

* input `q` is in partition `q % U`, word `q / U`;
* weight `w[p][q]` is in partition `q % U`, word `p*(NIN/U) + q/U`.

A register accumulates the tree sums, starting from the bias. After the last
group, `f(acc)` is written to partition `p % OL`, word `p / OL`, of the
destination buffer.

Latency: `NOUT * (NIN/U)` iterations, plus 2 cycles.

### Unroll factors at the defaults

| unit | U | sequential iterations | cycles |
|---|---|---|---|
| C1 | 1 (one input plane) | 5,760,000 | 5,760,002 |
| C3 | 64 | 1,081,600 | 1,081,602 |
| C5 | 64 | 204,800 | 204,802 |
| C7 | 128 | 16,384 | 16,386 |
| F9 | 256 | 512 | 514 |
| F10 | 512 | 2,350 | 2,352 |

The pooling layers take 230,402 (P2), 43,266 (P4), 12,802 (P6) and 1,026 (P8)
cycles, with their 2 cycles of pipeline tail included.

The sequencer adds one cycle per step. A complete recognition measured in
simulation, with random bus stalls, takes 7,364,092 cycles. That is 36.8 ms at
200 MHz, and C1 accounts for 78 % of it. C1 has only one input plane, so
unrolling over input planes gives it no parallelism. The way to speed it up
would be to unroll over output positions instead (see "Departures").

## Number format

`hhr_pkg::fx_t` is a signed 32-bit word with 10 fractional bits (Q21.10).

* **Multiply.** `fx_mul` forms the full 64-bit product and shifts it right
  arithmetically by 10. The result is therefore rounded toward minus infinity.
  The low 32 bits are kept without saturation.
* **Add.** Sums wrap at 32 bits.
* **Input conversion.** `fp2fix` converts each IEEE-754 single from the image
  into `v * 2^10`, truncated toward zero. Zeros and subnormals become 0.
  Magnitudes of 2^21 and above, infinities and NaNs saturate to the largest
  positive or negative code.

## Control and interfaces

`layer_sequencer` runs the twelve steps strictly one after another. For each
step it pulses that step's `go`, then waits for its `done`. The `cycles`
output reports the start-to-done latency of the last run. An assertion in
`hhr_top` checks that no two steps are ever active at the same time.

Because the steps never overlap, a convolution and the pooling layer after it
share the convolution's output buffer. The convolution uses it for
read-modify-write of partial sums; the pooling layer uses it only for reads.

Ports of `hhr_top`:

* **Kernel control.** `start` is a one-cycle pulse. `img_base` is the byte
  address of the 64x64 float image in global memory, and `res_base` the byte
  address that receives the 2,350 scores. The outputs are `busy`, `done` (a
  one-cycle pulse once the scores are written), `cycles` and `step`.
* **Weight stream.** `wl_valid`, `wl_layer` and `wl_data`, where `wl_layer`
  is 0 for C1, 1 for C3, 2 for C5, 3 for C7, 4 for F9 and 5 for F10. Each
  layer takes its words in canonical order: all weights, then all biases.
  Convolution weights go in order `w[op][ip][u][v]` and fully connected
  weights in order `w[p][q]`. Each unit counts the words itself and scatters
  them into its partitions. After the last bias the count wraps to the start,
  so a layer can be reloaded at any time the unit is idle.
* **Global-memory read bus**, used by `burst_loader`: `ar_valid/ar_ready/ar_addr/ar_len`
  and `r_valid/r_ready/r_data/r_last`.
* **Global-memory write bus**, used by `burst_writer`: `aw_valid/aw_ready/aw_addr/aw_len`
  and `w_valid/w_ready/w_data/w_last`.

Both buses are simple valid/ready burst buses in the style of AXI. They are
not full AXI:

* there are no IDs and no write response;
* `*_len` is the number of beats minus 1, and a burst has at most `MAXB` = 256
  beats;
* addresses are byte addresses of 32-bit words;
* only one burst is outstanding at a time.

Assertions check that a request is held stable until it is accepted.

The writer spends two cycles per beat: one to read the buffer, one to present
the beat.

Reset is asynchronous and active low. Buffers and weight memories are not
reset.

## Memory footprint at the defaults

| storage | words |
|---|---|
| weights and biases (six layers) | 2,097,006 |
| image buffer | 4,096 |
| conv output buffers C1/C3/C5/C7 | 230,400 / 43,264 / 12,800 / 1,024 |
| partitioned input buffers C3/C5/C7/F9/F10 | 57,600 / 10,816 / 3,200 / 256 / 512 |
| score buffer | 2,350 |
| total | 2,463,324 words = 78.8 Mbit |

A Kintex UltraScale XCKU115 has 2,160 block RAMs of 36 Kbit, 79.6 Mbit in all.
Holding every weight on chip as a 32-bit word therefore only just fits, before
any loss from the partition shapes. To reach a real device you would narrow the
weight words or move F10's 1.2 million weights off chip.

## Departures and own choices

The network shape, the loop order with the input-plane loop innermost, the rule
that the unroll factor equals the partition factor, the candidate unroll
factors, the 32-bit format with 10 fractional bits, on-chip weights and maps,
and burst loading of the image follow the published design of this
accelerator. Its reported figure is 11.19 ms per character on a Kintex XCKU115
at 200 MHz. This RTL is about 3.3 times slower, almost entirely because of C1.
The following points are choices of this implementation:

* **Per-layer unroll factors.** For each layer, U is the largest factor that
  divides that layer's innermost loop. A faster C1 would unroll or tile its
  output-position loop, for example 10 positions at once over 10 input
  partitions. That scheme is not built.
* **Pooling schedule.** The pooling layers read one word per cycle. They are
  not unrolled.
* **Activation.** `f` is ReLU, and F10 has no activation.
* **Rounding and saturation.** Products round toward minus infinity, sums
  wrap, and the input conversion truncates and saturates.
* **Where float conversion happens.** The float-to-fixed conversion is done
  in hardware while the image is loaded.
* **Plumbing.** The buses, the weight stream, the two-stage pipelines and the
  sequencer handshake are all this design's own.
* **Host side.** The host, the PCIe link and the global memory are outside
  the design. The testbenches use a behavioural memory model
  (`tb/gmem_model.sv`).

## Files

* `rtl/hhr_pkg.sv`: the number format, default network shape and helper
  functions.
* `rtl/fx_mul.sv`: the fixed-point multiplier.
* `rtl/fp2fix.sv`: the float-to-fixed converter.
* `rtl/lane_ram.sv`: the partitioned buffer with synchronous, read-first reads.
* `rtl/conv_layer.sv`, `rtl/maxpool_layer.sv`, `rtl/fc_layer.sv`: the three
  layer units.
* `rtl/burst_loader.sv`, `rtl/burst_writer.sv`: the global-memory movers.
* `rtl/layer_sequencer.sv`: the step controller.
* `rtl/hhr_top.sv`: the whole accelerator.
* `tb/tb_<module>.sv`: a self-checking testbench for each module.
* `tb/hhr_ref_pkg.sv`: a golden model of the network with the same
  arithmetic.
* `tb/gmem_model.sv`: the global-memory model. It stalls at random.
* `tb/hhr_top_env.svh`: the body shared by the two end-to-end tests.
* `tb/tb_hhr_top.sv`: the end-to-end test on a reduced network (36x36 image,
  4/4/8/8 planes, unroll factors chosen so that every loop has two groups).
* `tb/tb_hhr_full.sv`: the end-to-end test at full size.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
They also have a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/hhr_pkg.sv tb/hhr_ref_pkg.sv tb/tb_hhr_top.sv --top-module tb_hhr_top
    ./obj_dir/Vtb_hhr_top

Replace `tb_hhr_top` with any other testbench name. `hhr_ref_pkg.sv` is needed
only by the two end-to-end tests.

The end-to-end tests check the following:

* they stream random weights and place a random float image in the memory
  model;
* they compare every score with the golden model;
* each layer step must take exactly its iteration count plus 3 cycles;
* the bus must have stalled, transfers must have needed several bursts, ReLU
  must have clipped values and all twelve steps must have run;
* in the reduced test, partial sums must have been forwarded.

The full-size test loads all 2.1 million weights and runs about 7.4 million
cycles. It needs a few minutes to compile, because of the 512-wide fully
connected datapath, and about two minutes to run.

To change the network, override the `P_*` parameters of `hhr_top`, as
`tb_hhr_top` does. Each unroll factor must divide its layer's input count, and
the last pooling layer must produce 1x1 planes.
