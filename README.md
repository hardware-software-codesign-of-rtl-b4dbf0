# Fully connected layer accelerator with sum-together multipliers

This is a small accelerator that sits on a memory bus. It computes the
multiply-accumulate core of a quantized fully connected (dense) layer:

    out[k] = sum over n of  w[k][n] * x[n]        k < M,  n < N

It works at 16-, 8- or 4-bit integer precision. Its point is that lower
precision means more work per cycle. Each of its 64 processing elements is a
16-bit *sum-together* (ST) multiplier. In one cycle it computes one 16x16
product, or two 8x8 products, or four 4x4 products, and adds the products
together. An int8 layer therefore runs about twice as fast as an int16 one,
and an int4 layer about four times as fast, on the same hardware.

The intended host is a small 32-bit CPU (for example a RISC-V microcontroller
core) in a tiled SoC. The CPU writes a few configuration registers and starts
the accelerator. The accelerator then copies the input vector and the weights
from memory into its own local memories over a 32-bit DMA channel, computes
up to 32 outputs, and writes the 64-bit results back. It then raises a done
pulse. The CPU keeps these steps outside the accelerator:

- bias,
- zero-point correction,
- requantization,
- activation,
- splitting a layer that is too large into several runs.

## Sum-together multiplication and how data must be packed

Everything moves as 16-bit **lines**. How many values one line holds depends
on the configuration code (register `OPTIONS[2:0]`):

| code | mode  | input line B holds            | weight line A holds              | result P (32 bit, signed)                                        |
|------|-------|-------------------------------|----------------------------------|------------------------------------------------------------------|
| 000  | 16x16 | one int16                     | one int16                        | A*B                                                              |
| 100  | 16x8  | one int8 in B[7:0]            | one int16                        | A*B[7:0]                                                         |
| 010  | 8x8   | int8 in B[7:0], B[15:8]       | int8 in A[15:8], A[7:0]          | A[15:8]*B[7:0] + A[7:0]*B[15:8]                                  |
| 011  | 8x4   | int4 in B[3:0], B[11:8]       | int8 in A[15:8], A[7:0]          | A[15:8]*B[3:0] + A[7:0]*B[11:8]                                  |
| 001  | 4x4   | int4 in B[3:0] ... B[15:12]   | int4 in A[15:12] ... A[3:0]      | A[15:12]*B[3:0] + A[11:8]*B[7:4] + A[7:4]*B[11:8] + A[3:0]*B[15:12] |

All fields are two's complement. The pairing is **crossed**: the highest field
of the weight line meets the lowest field of the input line. Software must
therefore pack the two tensors differently:

- **Inputs:** value `x[4l+s]` (4x4 mode) goes into input line `l` at bits
  `[4s+3:4s]`, lowest slot first.
- **Weights:** the matching weight `w[k][4l+s]` goes into weight line `l` at
  bits `[15-4s:12-4s]`, highest slot first.

8x8 and 8x4 work the same way with two slots. Bits a mode does not read (for
example `B[15:8]` in 16x8 mode) are ignored. Slots past the end of a vector
must hold zero in at least one of the two tensors. Unused codes 101 to 111
behave as 16x16. The end-to-end testbench packs plain integer vectors
exactly this way. It checks the results against a plain dot product, so it
also serves as an example of the packing.

## Memory layout and word counts

Addresses and lengths on the DMA side are in 32-bit words. Each word carries
two lines: the low half is the even line and the high half is the odd line.
For `N` inputs at `v` values per line (v = 1, 1, 2, 2, 4 for 16x16, 16x8,
8x8, 8x4, 4x4):

    lines    = ceil(N / v)
    in_words = ceil(lines / 2)          (limited to 128, the input PLM)
    n_out    = M                        (limited to 32,  the output PLM)

The tensors must sit in memory like this:

- **Input vector:** `in_words` consecutive words starting at `IN_ADD`.
- **Weights:** one row of `in_words` words per output. Row `k` starts at
  `W_ADD + k*in_words`. Inside the accelerator, row `k` starts at weight line
  `k * 2*in_words`.
- **Outputs:** `2*M` words starting at `OUT_ADD`. Output `k` is the word pair
  `OUT_ADD+2k` (low 32 bits) and `OUT_ADD+2k+1` (high 32 bits).

The accelerator always computes over all `2*in_words` lines, including the
padding half-line when `lines` is odd. That half-line must therefore also be
zero in one of the two tensors.

## One run, phase by phase

`fc_ctrl` runs the phases strictly one after another. Loading never overlaps
computing. The accelerator therefore works with any memory latency or
bandwidth, at the cost of the load time.

1. **Configure.** The CPU writes the registers and then writes `CMD = 1`.
   `fc_ctrl` captures the configuration and derives `in_words`, `n_out`,
   the mode and the accumulate flag. The CPU may rewrite registers during the
   run without effect.
2. **Load** (`fc_mem_if`):
   - One read request for the input vector.
   - Then one read request per output row of weights.
   - Each 32-bit beat is written into the input or weight PLM as two lines.
   - It takes one word per cycle when the memory keeps up.
3. **Compute** (`fc_core`):
   - For each output `k`, and each 64-line chunk `c` of the vector, it reads
     64 input lines and 64 weight lines in one cycle.
   - It multiplies them in the 64 ST multipliers and sums the 64 results in
     a binary adder tree.
   - It adds the sum to a 64-bit accumulator.
   - After the last chunk of an output, it writes the accumulator to output
     PLM entry `k`.
   - Lanes past the end of the vector are masked to zero, so vector lengths
     need not be multiples of 64.
4. **Store** (`fc_mem_if`). One write request of `2*M` words, then each
   64-bit output as its low and then its high 32-bit half.
5. **Done.** `acc_done` pulses for one cycle. `STATUS` reads `running = 0`
   and `done = 1` until the CPU writes `CMD` again.

### Accumulating across runs (tiling large layers)

With `ACC[0] = 1`, each output starts from the value already in its output
PLM entry instead of from zero. The output PLM keeps its contents between
runs.

A layer with more inputs than the input PLM holds is therefore computed one
output at a time:

- The first input slice runs with `ACC = 0`.
- Each further slice runs with `ACC = 1`, the same `OUT_ADD`, and `IN_ADD`
  and `W_ADD` advanced by the slice length.

A layer with more than 32 outputs is split into groups of up to 32 outputs.
Each group has its own `W_ADD` and `OUT_ADD`. `M` above 32 is clamped to 32.

## The 64-lane datapath and the interleaved PLMs

The input PLM (256 lines) and the weight PLM (8192 lines, 16 kB) are both
`plm_interleaved`. Each one is 64 RAM banks of 16-bit lines. Line `i` is
stored in bank `i mod 64`, at row `i / 64`. This arrangement gives the two
port shapes the datapath needs:

- **Write port.** The even and the odd line of a DMA word fall in neighbouring
  banks of the same row, so both are written in the same cycle.
- **Read port.** Any 64 consecutive lines touch every bank exactly once, even
  when the first line is not a multiple of 64. This matters because weight
  rows are `2*in_words` lines apart.
  - Each bank computes its own row: banks below the start bank read the next
    row.
  - The 64 bank outputs are rotated by `start mod 64`, so that lane `j`
    carries line `start + j`.

The output PLM (`plm_output`, 32 x 64 bit) has three ports:

- a read port for the core (previous partial sums),
- a write port for the core,
- a read port for the memory interface, which returns the low or the high
  32-bit half.

`st_mac_array` holds the 64 `st_multiplier` instances and a combinational
balanced adder tree with a 38-bit result. The core registers this result
before accumulating it.

## Timing

- **Compute.** `fc_core` issues one chunk per cycle without bubbles, also
  from one output to the next. Its `done` is high `n_out * ceil(2*in_words/64)
  + 2` cycles after the cycle in which `start` was sampled. A full 16-bit run
  (256 inputs, 32 outputs) computes in 130 cycles. All PLM reads take one
  cycle.
- **Load.** Loading takes `in_words * (1 + n_out)` beats, plus one request
  handshake per row.
- **Store.** Storing sends at most one word every two cycles, because it
  reads the output PLM one cycle ahead of each beat.

Loading dominates. A full 16-bit run loads 128 input words and 4096 weight
words, 4224 beats in all, against 130 compute cycles.

## Registers

The register slave is APB-style: 8-bit byte address, no wait states,
`pready` tied high. Writes take effect on the access phase
(`psel & penable & pwrite`).

| offset | name          | access | meaning                                                   |
|--------|---------------|--------|-----------------------------------------------------------|
| 0x00   | CMD           | RW     | bit 0 = start (ignored while running); any write clears done |
| 0x04   | STATUS        | RO     | bit 0 running, bit 1 done                                 |
| 0x0C   | DEVID         | RO     | `0x00000FC0` (parameter `DEVID`)                          |
| 0x40   | FLAGS         | RW     | reserved for quantization/activation options, unused      |
| 0x44   | OUT_ADD       | RW     | output word address                                       |
| 0x48   | W_ADD         | RW     | weight word address                                       |
| 0x4C   | IN_ADD        | RW     | input word address                                        |
| 0x50   | N             | RW     | number of input values                                    |
| 0x54   | M             | RW     | number of outputs                                         |
| 0x58   | OFFSET_Q_DATA | RW     | reserved (address of quantization data), unused           |
| 0x5C   | OFFSET_PE     | RW     | reserved (scattered-memory offset), unused                |
| 0x60   | OPTIONS       | RW     | bits [2:0]: mode code from the table above                |
| 0x64   | ACC           | RW     | bit 0: accumulate onto the previous outputs              |

A driver call is:

1. Write `CMD = 0`.
2. Write the address, size, mode and `ACC` registers.
3. Write `CMD = 1`.
4. Poll until `STATUS[1]` is set (or wait for `acc_done`).
5. Write `CMD = 0`.

## DMA channels

The accelerator is the DMA master. It has four channels, each a valid/ready
pair. A transfer happens on a clock edge where both are high. The sender
holds valid and data until the transfer; assertions in `fc_mem_if` check
this.

- `dma_read_ctrl` and `dma_write_ctrl` carry a `dma_info_t` request:
  `{index[31:0], length[31:0], size[2:0]}`. Index and length are in words.
  `size` is always `3'b010` (word).
- `dma_read_chnl` and `dma_write_chnl` carry 32-bit data.

A request is always accepted before its data move. There is only one open
read burst and one open write burst at a time. The system side (DMA engine,
NoC, memory) is not part of this RTL. `tb/dma_mem_model.sv` is a behavioural
stand-in with random stalls.

## How far it follows the reference architecture, and where it does not

These parts follow the reference architecture of this accelerator:

- the ST multiplier and its mode codes,
- 64-fold parallelism with an adder plane,
- the PLM sizes and port shapes,
- the 32-bit memory side and 64-bit outputs,
- the load, compute and store sequence, with the exact weight-row and output
  layouts,
- the configuration register set and most of its offsets,
- the output-stationary loop order,
- leaving bias and requantization to software.

These are this design's own choices:

- **Pipeline and timing.** The reference left scheduling to high-level
  synthesis. Here the core is a three-stage pipeline: PLM read, then
  multiply and adder tree, then accumulate.
- **Bus protocols.** The register bus and the valid/ready channel protocols
  are this design's.
- **Register offsets.** The offsets of `FLAGS`, `OUT_ADD` and `W_ADD`, the
  `DEVID` value and the bits of `STATUS` other than done are chosen here.
- **Accumulate mode.** It adds the previous output **once** per output, which
  is what joining input slices needs. A literal reading of the reference
  loop would add it once per input line.
- **`N` is the number of inputs.** One reference driver call passes `N-1`;
  this RTL does not follow it.
- **Clamping.** `in_words` and `M` are clamped to the PLM capacity.
- **Masked lanes.** Unused lanes of a partial chunk are masked.
- **Signed fields.** Every field is treated as signed.
- **Reset.** Reset is asynchronous and active low and covers control state
  only. Memory contents are not reset.

These parts are not implemented:

- **Quantization.** Output requantization, bias, zero points and activation
  (the `FLAGS` and `OFFSET_Q_DATA` registers are placeholders) are not
  implemented. Outputs are raw 64-bit sums.
- **Scattered-memory access** (`OFFSET_PE`) is not implemented.
- **Clock gating** of idle memories is left to the implementation flow. The
  RTL only gates PLM reads with enables.
- **SoC parts.** The tiled SoC around the accelerator (NoC, DMA engine,
  memory and I/O tiles, CPU) is not part of this RTL.

## Capacity against the anomaly-detection benchmark

The target network is the MLPerf Tiny anomaly-detection autoencoder. It
consists of these fully connected layers:

- 640->128,
- seven 128->128 layers,
- a 128->8 bottleneck,
- 8->128,
- 128->640.

That is 282,376 parameters and 280,576 MACs per inference.

Only the 128->8 bottleneck fits a single run. The other layers need the
tiling described above:

| layer     | calls needed                                                                     |
|-----------|----------------------------------------------------------------------------------|
| 128->128  | 4 (groups of 32 outputs)                                                         |
| 8->128    | 4                                                                                |
| 128->640  | 20                                                                               |
| 640->128  | int16: 3 input slices x 128 outputs = 384; int8: 2 x 128 = 256; int4: 4 groups of 32 |

For the 640->128 layer, the 640 int4 inputs fit the input PLM, so only the
outputs need splitting. The weights of the whole network (565 kB at int16)
are streamed from memory for every call.

`tb_fc_anomaly_detection` runs one whole inference of this network at each
precision. It uses random weights, and between layers it requantises the
outputs with a right shift and saturation. Every output of every layer is
checked. The cycles below run from the start command to the done status.
The memory model withholds its handshakes on 10% of cycles.

| precision | calls | accelerator cycles |
|-----------|-------|--------------------|
| int16     | 437   | 227,997            |
| int8      | 309   | 120,066            |
| int4      | 57    | 52,683             |

Loading dominates these times. Each halving of precision halves the words
to fetch. At int4 the 640-input layer also stops needing one call per output.

`tb_fc_anomaly_detection` runs one whole inference of this network at each
precision. It uses random weights, and between layers it requantises the
outputs with a right shift and saturation. Every output of every layer is
checked. Measured from the start command to the done status, with 10% random
DMA read gaps:

| precision | calls | accelerator cycles |
|-----------|-------|--------------------|
| int16     | 437   | 227,997            |
| int8      | 309   | 120,066            |
| int4      | 57    | 52,683             |

Load time dominates. The words to fetch halve with each halving of
precision, and at int4 the 640-input layer no longer needs one call per
output.

## Files

`rtl/` (one module or package per file):

- `fc_pkg.sv`: shared constants, the mode enum, the `dma_info_t` and
  `conf_info_t` structs.
- `st_multiplier.sv`: the ST multiplier.
- `st_mac_array.sv`: 64 ST multipliers and the adder tree.
- `plm_interleaved.sv`: the banked input and weight PLM.
- `plm_output.sv`: the output PLM.
- `fc_core.sv`: loop control, pipeline and accumulation.
- `fc_mem_if.sv`: DMA load and store.
- `fc_conf_regs.sv`: register file.
- `fc_ctrl.sv`: phase sequencer.
- `fc_accelerator.sv`: top level.

`tb/`:

- One self-checking testbench per module: `tb_<module>.sv`.
- `fc_ref_pkg.sv`: reference functions.
- `dma_mem_model.sv`: behavioural DMA and memory.
- `tb_fc_anomaly_detection.sv`: one full inference of the benchmark network
  at int16, int8 and int4.
- `tb_fc_anomaly_detection.sv`: one full inference of the benchmark network
  at int16, int8 and int4.

`tb_fc_accelerator` runs the top at its default size. It covers every mode,
full PLMs, partial chunks, padding, `M` clamping, tiled 640-input layers with
accumulation, and random DMA stalls. It counts each of these mechanisms and
fails if one never happened. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`.

To simulate one testbench with Verilator 5:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/fc_pkg.sv tb/fc_ref_pkg.sv tb/tb_fc_accelerator.sv \
        --top-module tb_fc_accelerator -o sim
    ./obj_dir/sim

Replace the testbench file and `--top-module` to run another one.
`fc_ref_pkg.sv` is only needed by the testbenches that import it.

Sizes are parameters of `fc_accelerator`:

- `PE_NUM` (lanes, a power of two): 64.
- `MAX_IN_LINES`: 256.
- `MAX_OUT`: 32.
- `MAX_W_LINES`: 8192.

`MAX_IN_LINES` and `MAX_W_LINES` must be multiples of `PE_NUM`.
