# Reconfigurable IoT node hardware: a CNN layer accelerator and the configuration interface of a programmable analog array

This RTL covers the two digital pieces of a reconfigurable IoT sensor node:

* **A CNN accelerator for the gateway's processing unit.** It has four reusable layer kernels: convolution, local response normalisation (LRN), max pooling and fully connected. A host runs a whole network (AlexNet, VGG) through them one layer at a time. Every kernel is sized by one unroll factor (`N_CONV`/`S_CONV`, `N_NORM`, `N_POOL`, `N_FC`), chosen in a design-space search against the FPGA's DSP, memory and bandwidth limits. The defaults are the values picked for AlexNet on a Stratix-V D8 board: 64, 8, 2, 1 and 71.
* **The configuration interface of PANDA**, a programmable analog device array. PANDA is a grid of 600 transistor-level cells (24×25) with FPGA-like island routing. Each transistor's width and each routing switch is set by a bit of a 16 KB configuration memory. The memory is loaded over a serial link and can be rewritten byte by byte while the circuit runs, for example to trim an amplifier's offset.

The two parts share no signals. The top module `iot_top` holds them side by side.

## The convolution kernel: convolution as a tiled matrix product

This kernel does most of the work and is the hardest part to follow.

A convolution layer with `Nif` input maps, `K×K` filters and `Nof` output maps becomes a matrix product C = A × B:

* A (M × N) holds the weights: M = `Nof` rows, N = `Nif·K·K` columns.
* B (N × P) holds the inputs. Row n is a (feature, ky, kx) triple and column p is an output position (oy, ox). Each column is the flattened receptive field of one output pixel.
* C (M × P) is the output, feature-major.

B is never built in memory. When a tile of B is fetched, the kernel works out each element's address in the original feature maps, in three steps:

1. A table built once per P-tile holds each column's window origin, `oy·stride − pad` and `ox·stride − pad`.
2. Running counters walk the rows through (fi, ky, kx).
3. Each lane adds the two and does one multiply to form `in_base + fi·H·W + iy·W + ix`.

A lane whose element lies in the zero border, or beyond M, N or P, is disabled and its data are taken as zero. This is the zero padding that makes every dimension a multiple of `N_CONV`.

For each `N_CONV × N_CONV` tile of C, the kernel steps through N in chunks of `N_CONV`, in four phases:

| phase | what happens | cycles (no stalls) |
|---|---|---|
| `S_COLS` | build the column table of the P-tile | `N_CONV` |
| `S_LOADA` | weight tile → `wtile` (row-major), `S_CONV` words/cycle | `N_CONV²/S_CONV` |
| `S_LOADB` | input tile → `itile` (column-major), `S_CONV` words/cycle | `N_CONV²/S_CONV` |
| `S_COMP` | `S_CONV` work-items per cycle, each a length-`N_CONV` dot product | `N_CONV²/S_CONV` |
| `S_WRITE` | rescale, ReLU, write the C tile, `S_CONV` words/cycle | `N_CONV²/S_CONV` |

The loads and `S_COMP` repeat for each chunk of N. `S_COLS` and `S_WRITE` run once per C tile.

During `S_COMP` the kernel does `N_CONV·S_CONV` MACs per cycle (512 at the defaults). The output `mac_fire` is high in exactly those cycles. The compute time of a layer is therefore `pad(M)·pad(N)·pad(P) / (N_CONV·S_CONV)` cycles. The testbenches check this count exactly.

Loading and computing take turns, as the two barriers of a work-group do. Loads take as long as compute, so a layer takes about three times its compute time plus write-back. Overlapping them with double buffering would be a natural next step; it is not done here.

Local storage at the defaults:
* a 64×64 weight tile (8-bit)
* a 64×64 input tile (16-bit)
* 64×64 accumulators (40-bit)

All three are register arrays, because compute reads a full row of `wtile` and eight full columns of `itile` in one cycle.

## The other kernels

* **`lrn_kernel`** normalises across the K neighbouring features:
  `out = in · (1 + α/K · Σ in²)^−β`.
  * Local memory holds a running sum of squares per neuron (`sos`), so the kernel never recomputes the window. A pre-pass adds the first K/2 features.
  * After that, each beat reads three words per neuron for `N_NORM` neurons: the feature entering the window, the one being normalised and the one leaving.
  * When the data return, the kernel adds the entering square, looks up `f1(x0)` in `pwl_unit`, writes the output and subtracts the leaving square.
* **`pwl_unit`** approximates `(1+x)^−0.75` with 20 points at `x_k = 2^(k/3) − 1` (0 to 79.6). Above that range it holds the last value. Its relative error is under 1 % in range. The comment in the file gives the formulas for the tables.
* **`pool_kernel`** does K×K max pooling (K ≤ `KMAX` = 3) with a run-time stride. Each beat produces `N_POOL` neighbouring outputs of one row. A window that hangs over the right or bottom edge takes the maximum of the part that lies inside.
* **`fc_kernel`** computes one output neuron at a time. Each beat reads `N_FC` weights and `N_FC` inputs and adds their `N_FC` products. An output takes `ceil(nin/N_FC)` beats. The output is written once its last beat has returned.
* **`relu_sat`** is the output stage of the convolution and FC kernels. It applies an arithmetic right shift by the layer's `shift` argument, saturates to 16 bits, then applies ReLU if the layer's flag is set.

## Number formats and memory layout

* Data are 16-bit signed. Weights are 8-bit signed, stored one per 16-bit word in the low byte. Accumulators are 40 bits.
* Where the binary point sits is up to the user: each layer's `shift` moves the accumulator back to the data scale.
* LRN is computed entirely in fixed point:
  * data in Q8.8
  * sum of squares in 36 bits, Q16.16
  * α/K as an unsigned 0.32 fraction
  * `f1` in Q1.15
* External memory is one space of 16-bit words at 32-bit word addresses. `cnn_pkg.sv` gives the layouts for features, weights and outputs along with the argument structs (`conv_args_t`, `lrn_args_t`, `pool_args_t`, `fc_args_t`).

## Kernel interfaces and timing

All kernels share the same control and memory conventions:

* **Control.** `start` is sampled while the kernel is idle, together with its `args` struct. `busy` is high until the kernel finishes, and `done` pulses for one cycle at the end.
* **Read port.** The port is a gather port of several lanes: `rd_valid`, a per-lane `rd_addr` and `rd_en`, and `rd_ready`. A request is accepted when `rd_valid && rd_ready`. The data come back on `rd_rdata` exactly one cycle later, flagged by `rd_rvalid`, and an assertion checks this latency. Lanes with `rd_en` low may return anything.
* **Write port.** The port is a scatter port: `wr_valid`, per-lane `wr_addr`, `wr_en` and `wr_data`, and `wr_ready`. A write is accepted when `wr_valid && wr_ready`.
* **Stalls.** A low `ready` stalls the kernel. Kernels that produce a result per beat (LRN, pool) pass results through a two-entry buffer (`res_fifo`). A read is issued only if its result will find room there, so reads can go out every cycle and a write stall back-pressures the reads without losing data.
* **Lane counts.** Conv has `S_CONV` read and `S_CONV` write lanes; LRN has `3·N_NORM` and `N_NORM`; pool has `N_POOL·KMAX²` and `N_POOL`; FC has `2·N_FC` and 1.

Memory arbitration and burst coalescing are outside this design. So are the DDR memory and the host: `iot_top` brings each kernel's ports out separately.

## PANDA configuration interface

`panda_config` contains an SPI slave, a row decoder and a column decoder, the configuration memory and eight test registers. Everything runs on the SPI clock.

A frame is 24 bits, sent MSB first in SPI mode 0 while `cs_n` is low:

| bits | 23 | 22 | 21:14 | 13:8 | 7:0 |
|---|---|---|---|---|---|
| field | 1 = write, 0 = read | 0 = config memory, 1 = test registers | row | column | data |

* **Configuration writes.** The write happens on the 24th rising SCLK edge. The 8-bit row and 6-bit column are decoded into one-hot lines, which select one byte of the 256×64 array.
* **Write-only configuration memory.** The configuration memory cannot be read over SPI; a read of it returns 0. The whole memory is the output `cfg`, which is what would drive the analog cells and switches.
* **Test registers.** They can be written and read back, so the link can be checked. A read returns the register on MISO, one bit per falling edge after the header.
* **Reset.** `panda_rst_n` clears the configuration, which opens every switch.
* **Short frames.** Frames shorter than 24 bits write nothing.

The analog array itself is not RTL: the cells, the passives, the transmission-gate connection and switch blocks, and the pads.

## Where this departs from the accelerator as published, and what is assumed

* **LRN number format.** LRN is computed in fixed point, where the original computes it in 32-bit floating point. Outputs agree with the exact formula within the 1 % of the PWL approximation, as long as the Q8.8 data range is respected.
* **PWL breakpoints.** Breakpoint placement and β = 0.75 are chosen here. Only "20 points, 1 % error" is given.
* **Load/compute overlap.** The convolution loads and computes in turn; there is no overlap. The FC layers are not overlapped with the next image either.
* **Layer arguments.** Stride, border padding, the edge rule of pooling and all argument structs are this design's own.
* **SPI protocol.** The frame format is an assumption. Only the 8 + 6 address bits and the access rules (write-only configuration, read/write test registers) are given. The number of test registers (8) is also assumed.

## Files

* `rtl/`:
  * `cnn_pkg.sv` and `panda_pkg.sv` hold the shared types and the frame layout.
  * There is one module per file.
  * `iot_top.sv` is the top.
* `tb/`:
  * `tb_<module>.sv` is a self-checking testbench for each module.
  * `mem_model.sv` is an external memory that stalls at random.
  * `tb_iot_top.sv` runs a small network end to end at the default parameters. The network is conv 8→16 maps of 12×12, then LRN, a 3×3/2 pool and a 576→10 FC, with SPI configuration in parallel. It counts each mechanism: read and write stalls, zero padding, multi-step accumulation, ReLU clamping, a partial FC beat, overhanging pool windows, configuration rewrite and test-register read.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, for example the whole design:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/cnn_pkg.sv rtl/panda_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/mem_model.sv tb/tb_iot_top.sv --top-module tb_iot_top -o sim
./obj_dir/sim
```

The packages have to come first on the command line. The build takes under a minute. Lint prints width warnings, so keep `-Wno-fatal`. A single kernel needs its own file, the packages, and `tb/mem_model.sv` (plus `rtl/res_fifo.sv`, `rtl/relu_sat.sv` and `rtl/pwl_unit.sv` where they are used).

The unit testbenches override the tile sizes to keep runs short: conv 8/4, FC 8, LRN `MAX_HW` 64, pool `N_POOL` 2. `tb_iot_top` uses the defaults.

## Changing it

* **Retargeting the accelerator.** To retarget to another board, change the parameters of `iot_top`. For example, the DE5-Net AlexNet point is `N_CONV = 32, S_CONV = 4, N_FC = 32`. `N_CONV` must be a multiple of `S_CONV`.
* **Cost of `N_CONV`.** The convolution's register storage grows with `N_CONV²`, and its multipliers with `N_CONV·S_CONV`.
* **Changing β.** A different β needs new `pwl_unit` tables; the formulas are in that file.
