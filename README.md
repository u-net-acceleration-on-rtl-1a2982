# Tiled FP16 matrix-multiply engine for U-Net convolutions

Most of the run time of a U-Net diffusion model goes into its convolutions. On
a Zynq-7000, the ARM processor turns each convolution into a matrix product
with im2col, and this engine does the product in the programmable logic:

    Y (M x N) = W (M x K) x X (K x N) + bias (per row)

    M = out_channels
    K = in_channels * kernel_size^2
    N = out_height * out_width

Across a U-Net the shapes swing widely. At high resolution N reaches 4096
while M is at most 128 and K at most 1152. At low resolution N drops to 64 or
256 while M reaches 512 and K 4608. The engine serves every layer with one
configuration by tiling all three dimensions: on-chip storage depends only on
the tile sizes TILE_M x TILE_N x TILE_K (default 256 x 1024 x 16), never on the
layer. Attention scores q x k^T run through the same engine with M = length of
k, K = d_head, N = length of q, and the bias turned off.

The RTL is SystemVerilog (IEEE 1800-2017). It follows a published HLS design
("Version 2" of a Zynq-7000 U-Net accelerator) in its tiling, loop order, tile
sizes, data layout, number format and use of two memory bundles. Everything
below the level of those decisions was chosen for this RTL; the section
"Where this RTL makes its own choices" lists those choices.

## The tiling, and why the weights are stored transposed

```
for m0 in 0, TILE_M, ...  < M          # outermost: output row tiles
  for n0 in 0, TILE_N, ... < N        # output column tiles
    [load bias[m0 +: tm]]              # if bias is on
    for k0 in 0, TILE_K, ... < K      # innermost: accumulate in the output tile
      load W tile (tk x tm) on bundle 0  | in parallel
      load X tile (tk x tn) on bundle 1  |
      output tile += W tile x X tile
    store output tile (tm x tn) on bundle 1
```

`tm = min(TILE_M, M - m0)`, and likewise `tn` and `tk`, so edge tiles are cut
short and any M, K, N from 1 to 65535 works.

The output tile stays on chip until its last K tile, so every weight and input
element is read once per output tile, and every output element is written
exactly once. TILE_K only sets how fine the accumulation steps are. Shrinking
it leaves room for larger TILE_M and TILE_N, which cuts the number of tile
passes. That is why the default uses the small TILE_K of 16.

DRAM time depends mostly on burst length, and a burst needs contiguous
addresses. Input rows are contiguous along N, so an input tile row is TILE_N
elements long. If W were stored M x K, a weight tile row would be only TILE_K
(16) elements long. The two parallel loads would then be badly unbalanced,
with the weight side issuing many short bursts. The weights are therefore kept
in DRAM **transposed, as a K x M array**. A weight tile row then holds TILE_M
contiguous elements, and both bundles move long bursts and finish at about the
same time.

## Memory layout and programming

All data are IEEE binary16 (FP16), row-major, at even byte addresses:

| array  | shape  | element address             |
|--------|--------|-----------------------------|
| W^T    | K x M  | `W_ADDR + 2*(k*M + m)`      |
| X      | K x N  | `X_ADDR + 2*(k*N + n)`      |
| bias   | M      | `B_ADDR + 2*m`              |
| Y      | M x N  | `Y_ADDR + 2*(m*N + n)`      |

The processor loads the weights into shared DRAM once and, per layer, only
writes their addresses into the engine. Registers (AXI4-Lite, 32 bits, byte
offsets):

| offset | name   | meaning                                                    |
|--------|--------|------------------------------------------------------------|
| 0x00   | CTRL   | write bit0=1: start (ignored while busy). Read: bit0 busy, bit1 done, bit2 idle |
| 0x04   | W_ADDR | transposed weights                                         |
| 0x08   | X_ADDR | im2col output                                              |
| 0x0C   | B_ADDR | bias                                                       |
| 0x10   | Y_ADDR | result                                                     |
| 0x14/18/1C | M / K / N | sizes (low 16 bits)                               |
| 0x20   | CFG    | bit0: add bias                                             |

To run a layer, write the seven address and size registers and CFG, write 1 to
CTRL, then poll CTRL until bit1 (done) is set. Starting the next run clears
done. The `irq_done` output pulses at the same moment, for designs that would
rather use an interrupt. If M, K or N is 0, the run finishes without touching
memory.

## Block structure

```
              AXI4-Lite                       bundle 0 (m0_*)     bundle 1 (m1_*)
                 |                               AR/R               AR/R   AW/W/B
             mmio_regs                             |                  |      |
                 | start, addresses, sizes         |                  |      |
             matmul_ctrl ----------------> axi_tile_loader   axi_tile_loader  axi_tile_writer
                 |   tile commands           |       |              |            ^
                 v                        bias buf  weight buf   input buf       |
             tile_compute <------------------+-------+--------------+            |
                 |  read-modify-write                                            |
                 +---------------------> output tile buffer ---------------------+
```

| module            | role |
|-------------------|------|
| `unet_matmul_accel` | top: wiring, buffer address mapping, output-buffer read sharing |
| `mmio_regs`       | AXI4-Lite register file |
| `matmul_ctrl`     | the loop nest above, as a state machine; one phase at a time |
| `axi_tile_loader` | AXI4 burst reader for a 2-D tile (two instances) |
| `axi_tile_writer` | AXI4 burst writer for the output tile |
| `tile_compute`    | LANES FP16 multiply-add lanes over one K tile |
| `fp16_fma`        | FP16 fused multiply-add |
| `tile_ram`        | block-RAM buffer, LANES elements per word, per-lane write enable |
| `mm_pkg`          | types, widths, AXI constants, the burst-length rule |

Buffers at the default sizes:

| buffer | words x width | holds |
|--------|---------------|-------|
| weight | 4096 x 16 bit | W^T tile, `[k][m]` |
| input  | 1024 x 256 bit (16 lanes) | X tile, `[k][n/16]` |
| output | 16384 x 256 bit | partial sums, `[m][n/16]` |
| bias   | 256 x 16 bit | bias slice |

Together they come to 4,526,144 bits. A Zynq-7020, for comparison, has about
4.9 Mbit of block RAM.

## Inside a K tile: the compute lanes

`tile_compute` walks k, then the output row m, then groups of LANES (16)
adjacent columns, one step per clock. Each step does the following:

- reads one weight W[m][k] and broadcasts it to all lanes;
- reads 16 inputs X[k][n..n+15] and the 16 partial sums Y[m][n..n+15];
- writes back `fma(W, X, Y)` for each lane.

The step is a two-stage pipeline: the buffers are read in one clock, and the
result is computed and written in the next. On the first K tile of an output
tile, the partial sums are not read. Each lane starts from `bias[m]`, or from
+0 when bias is off.

Accumulation stays in FP16 and runs in ascending k. The result is therefore
bit-identical to a sequential FP16 dot product, bias first, with one rounding
per multiply-add. The testbenches rely on this to compare bit-exactly.

Only one hazard exists. A step may read an output word that the step just
before it is writing in the same clock. This happens only when the tile is a
single word, for example M = 1 and N <= 16. In that case the last written
value is forwarded (`fwd_hit`).

One K tile takes `tk * tm * ceil(tn/LANES) + 2` clocks. A full tile
(16 x 256 x 1024) is 262,144 clocks. Loading a full K tile moves 4,096 beats
on bundle 0 and 16,384 beats on bundle 1. Storing a full output tile moves
262,144 beats. Load, compute and store do not overlap, so at defaults a layer
is compute bound. Overlapping them with double buffering is the obvious next
step; this design does not do it.

## FP16 multiply-add

`fp16_fma` computes `round(a*b + c)` with a single rounding: round to nearest,
ties to even. Subnormals are fully supported, overflow gives infinity, and any
NaN result is 16'h7E00.

The method is simple to verify. Every FP16 product is a multiple of 2^-48, and
every FP16 value is too. The unit places the 22-bit product and the addend on
one 82-bit fixed-point grid, adds them exactly, finds the leading one and
rounds once. It is combinational; the lane pipeline registers its output.

## AXI traffic

Both bundles are AXI4 masters with 32-bit addresses and 16-bit data, one
element per beat. Bursts are INCR bursts of 2-byte beats. A burst ends at
whichever comes first: the end of the tile row, MAX_BURST beats (256, the
AXI4 limit) or a 4 KiB boundary. The address side issues bursts as fast as
the slave takes them, so several may be outstanding. The data side counts
beats in order, and an assertion checks `rlast` against its own burst count.
Bundle 0 carries weights and bias and only reads. Bundle 1 reads inputs and
writes results. Read and write responses are not checked for errors.

## Where this RTL makes its own choices

The source design fixes the tiling, the loop order, the tile sizes, the
transposed weight layout, FP16, the parallel loading over two bundles and
parameter passing through registers. The rest is this RTL's own:

- the register map and start/done handshake;
- the number of lanes (16) and the loop order inside a K tile;
- 16-bit AXI data, MAX_BURST = 256, 4 KiB splitting, unlimited outstanding reads;
- adding the bias inside the engine, with an enable bit, and fetching it on bundle 0;
- writing results on bundle 1;
- the exact single-rounding FMA. An HLS `half` multiply and add may round twice,
  so results can differ from the original design in the last bit;
- edge-tile handling for sizes that are not tile multiples;
- active-low asynchronous reset of control state. Buffers are not reset.

The earlier "Version 1" of the source design is not part of this RTL. It used
two FPGA images: one kept all weights on chip for high-resolution layers, the
other kept the whole output on chip for low-resolution layers. The processor
side (im2col, GELU, layer norm and the rest of the network), the DRAM and the
Zynq interconnect are outside this RTL. The testbenches model the DRAM.

## Simulation

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mm_pkg.sv tb/fp16_ref_pkg.sv tb/unet_matmul_accel_tb.sv \
    --top-module unet_matmul_accel_tb
./obj_dir/Vunet_matmul_accel_tb
```

Replace the testbench name to run another one. The testbenches are:

| testbench | what it checks |
|-----------|----------------|
| `fp16_fma_tb` | hand-worked cases (ties, subnormals, overflow, signed zeros, NaN/inf) and 50,000 random vectors |
| `tile_ram_tb` | latency, lane enables, read-before-write |
| `tile_compute_tb` | full, partial, accumulating and single-word tiles; clock count per tile |
| `axi_tile_loader_tb` | strided tiles, MAX_BURST and 4 KiB splitting, several bursts outstanding, back-pressure |
| `axi_tile_writer_tb` | placement, untouched gaps between rows, wlast, burst counts, back-pressure |
| `mmio_regs_tb` | every register, byte strobes, start/busy/done |
| `matmul_ctrl_tb` | the exact command sequence of the loop nest, phase ordering, parallel load start |
| `unet_matmul_accel_tb` | four layers end to end at small tiles (8x32x4, 4 lanes, bursts of 8); every mechanism is forced to occur |
| `unet_matmul_accel_full_tb` | default parameters: 256 x 32 x 1024 with bias, all 262,144 outputs checked (about 10 s) |
| `unet_layers_tb` | default parameters, U-Net shapes: high resolution 128 x 1152 x 1024 and 64 x 27 x 4096, low resolution 512 x 576 x 64, attention 256 x 32 x 256 without bias (about 2 minutes) |

The reference model (`tb/fp16_ref_pkg.sv`) computes with `real` and recovers
the exact rounding error of the double-precision sum (the TwoSum algorithm) to
settle ties. It shares no code with the RTL.

The DRAM model (`tb/axi_mem_model.sv`) stalls each handshake at random and
counts protocol errors, such as bursts crossing 4 KiB or a misplaced `wlast`.

## How far to trust it

Every block is checked bit-exactly against an independent model. For each
block, a deliberately broken copy was confirmed to make its testbench fail.

At default parameters the simulated cases are one full output tile with two K
tiles (256 x 32 x 1024) and four U-Net-shaped layers. The largest is
128 x 1152 x 1024, with 72 K tiles and about 151 million multiply-adds. The
biggest high-resolution layer, 128 x 1152 x 4096, was not simulated. It runs
through the same tile paths, four times over.

Timing closure on a real device was not attempted. The FMA is one
combinational stage of about 82-bit width, which likely needs pipelining to
reach typical Zynq clock rates. Deepening it would also require deepening the
forwarding in `tile_compute`.
