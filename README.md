# Backprojection unit for SAR image formation

Synthetic-aperture radar (SAR) forms a ground image from many radar pulses (projections) taken
as an aircraft flies past the scene. Backprojection builds that image in a simple way. For every
pixel `(x, y)` and every projection `u`, it works out how far the pixel is from the radar. That
distance picks one sample `p(t, u)` of the projection's echo, and the sample is added to the
pixel. A pixel outside the radar beam gets nothing:

    f(x, y) = sum over u of  chi(x, y, u) * p( t(x, y, u), u )
    t(x, y, u) = sqrt( X^2 + Y^2 )              (distance in fast-time samples)
    chi = 1  when |Y| <= X * tan(phi)           (pixel inside the beam cone)

No pixel depends on another pixel, and no projection depends on another projection. The image
can therefore be cut into strips along the range axis ("subimages"), with one FPGA node per
strip. Each node then needs only the slice of each projection that reaches its strip, and no
results ever move between nodes. On one node the work is spread in two ways:

- **Across projections.** A chain of `N` adders adds `N` different projections to a pixel as it
  flows past.
- **Across pixels.** A stream of pixels flows through the chain, one per clock.

This RTL is that FPGA node. It has two independent pipelines. Each pipeline holds a
512 × 1024-pixel complex image in a pair of off-chip SRAMs and adds 8 projections per pass over
the image.

## Block structure

```
 host PIO ──► csr ──────────── commands, flight parameters, bank bits ─────────────┐
 host DMA ──► dma_rx ──► projection BlockRAMs of every adder stage                 │
                                                                                   ▼
  bp_pipeline (×PIPES)
   mclk │ tmem_ctrl: SRAM A (source) ─► async_fifo ───────────────────┐
        │            SRAM B (dest.)  ◄─ async_fifo ◄──────────────┐   │
   lclk │                                                         │   ▼ unpack 72→2×36
        │  addr_gen (pixel index) ─► proj_adder 0 ─► … ─► proj_adder N-1 ─► pack 2×36→72
        │                          (dic → proj_bram → sync_fifo → +)
                                                                   │
 readout:  SRAM (latest) ─► async_fifo ─► cmag ─► dma_tx ─► host DMA
```

| Module | Role |
|---|---|
| `bp_top` | Top level. It holds `csr`, `dma_rx`, `PIPES` × `bp_pipeline`, the readout multiplexer, `cmag` and `dma_tx`. |
| `bp_pipeline` | One pipeline. It covers the memory-clock side, two clock-crossing FIFOs, word unpacking and packing, the pixel address generator and the adder chain. |
| `tmem_ctrl` | Memory-clock controller of one SRAM pair. It runs the source and destination address generators, the zero fill and the readout. |
| `proj_adder` | One adder stage: DIC, projection BlockRAM, projection FIFO and complex adder. |
| `dic` | Distance-to-time index calculator. It computes `t` and the beam test `chi`. |
| `isqrt` | Pipelined shift-and-subtract integer square root, one subtractor row per result bit. |
| `proj_bram` | `2^(R+9)` × 32-bit projection memory with one write port and one registered read port. |
| `sync_fifo`, `async_fifo` | Single-clock FIFO, and dual-clock FIFO with Gray-coded pointers. Both have almost-full flags. |
| `addr_gen` | Counter that can be paused and steps through an address range. |
| `pulse_sync` | Toggle synchronizer that carries command and done pulses between the clocks. |
| `cmag` | Complex magnitude `floor(sqrt(re² + im²))`, 36 bits in and 18 bits out. |
| `csr` | Control and status registers on the programmed-I/O bus. |
| `dma_rx`, `dma_tx` | DMA receive controller (DRC) and transmit controller (DXC). |
| `bp_pkg` | Shared widths, pixel/sample structs, flight-parameter struct and register map. |

## Data formats

- **Target pixel** (`pix_t`): complex, 18-bit signed real and imaginary parts. One 72-bit SRAM
  word holds two pixels:
  - Pixel `2a` is in bits `[35:0]`; pixel `2a+1` is in bits `[71:36]`.
  - Within a pixel, the real part is in the low 18 bits.
- **Projection sample** (`smp_t`): complex, 16-bit signed parts, one per 32-bit BlockRAM word.
  The real part is in the low half.
- **Magnitude**: 18-bit unsigned. `sqrt(2)·2^17` still fits.
- **Pixel index**: `p = y·2^X_W + x`, with range column `x` in the low bits and azimuth row `y`
  in the high bits. SRAM word `a` holds pixels `2a` and `2a+1`.
- **Accumulation** wraps around at 18 bits. Samples are sign-extended before the add.

## The processing step and its two clocks

Almost everything runs on `lclk`, the 133 MHz PCI-side clock. The SRAMs and their two address
generators run on `mclk`, the 50 MHz memory clock. In each step, every pixel of the step's row band makes
one round trip:

1. **Read (mclk).** `tmem_ctrl` reads the SRAM that holds the latest image, called the source
   or "A" role. Reads run freely until the A-side crossing FIFO (16 words) is almost full. The
   almost-full level is `16 − SRAM_LAT − 3`. That margin leaves room for the words still inside
   the SRAM's read latency, so the FIFO never overflows.
2. **Unpack (lclk).** A 72-bit word is split into two pixels. Those pixels enter the adder
   chain as a valid/ready stream.
3. **Sample lookup (lclk).** Separately from step 2, a pixel address generator sends the same
   pixel sequence to the DIC of every stage. Each stage's DIC turns the pixel into a fast-time
   index for its own projection `u = UBASE + k`. The index reads the stage's BlockRAM, and the
   sample goes into the stage's projection FIFO. If the pixel fails the beam test, or falls
   outside the stored window of `2^(R+9)` samples, the sample pushed is zero.
   - The DIC cannot stall.
   - The generator therefore pauses whenever any projection FIFO is almost full.
   - The threshold leaves room for every pixel still inside a DIC, which is `C_W + 6` cycles
     plus the chain skew.
4. **Accumulate (lclk).** Stage `k` takes a target pixel only when the head of its projection
   FIFO is present. It adds the two and passes the sum to stage `k+1`. Target pixels and
   samples meet in the same order, so no tags are needed.
5. **Write back (mclk).** Pairs of finished pixels are packed into a word and cross back in the
   B-side FIFO. `tmem_ctrl` writes each word to the other SRAM (the destination, or "B" role)
   as soon as it is available. The step ends after the last write.

After the step, the SRAM roles swap. `csr` keeps one bank bit per pipeline, which flips by
itself when that pipeline's step ends. The bank bits can also be written, but only for a
readout. Writing them between steps breaks the rule in the next section.

**Rate.** The SRAM side moves one word, or two pixels, per memory clock: 100 Mpixel/s at
50 MHz. The adder chain can take 133 Mpixel/s, so the memory clock sets the rate.

**Measured.** A step that sweeps all 2^18 words of the full-size image takes 262,159 memory
clocks, about 5.2 ms. The overhead beyond one word per clock is the fill time of the FIFOs, the
DIC and the adder chain. Each step adds 8 projections per pipeline, and both pipelines run at
once. With narrowing (next section), the full-size test's first pipeline sweeps 242 of the 1024
rows. That step took 61,967 memory clocks for 61,952 words.

**Other operations.** `OP_ZERO` writes zeros to both SRAMs of a pipeline, one word per memory
clock. `OP_READ` streams the latest image, in pixel-index order, through the same A-side FIFO to
the readout path.

## Narrowing a step to the rows the beam reaches

One batch of projections only touches the rows near its own slow-time positions, so sweeping
the whole image would mostly copy pixels unchanged. Each pipeline therefore limits a step to a
band of whole rows. The beam reaches row `y` from projection `u` only if
`|y − u|·DY ≤ Xmax·tan(phi)`. Here `Xmax = RMIN + (2^X_W − 1)·DX` is the range of the farthest
column. The band is:

    w    = (Xmax · TANPHI) >> 16 >> floor(log2 DY)
    band = [UBASE − w, UBASE + N − 1 + w], clipped to the image

- `w` is never below the exact half-width, so no pixel the DIC would hit is left out.
- `DY = 0`, or a beam wider than the DIC's arithmetic range, gives the whole image.
- The three SRAM-side and pixel-side address generators all sweep the same band.

The band grows with range, because the beam widens with distance. A step therefore takes
longer for scenes farther from the radar. In the full-size workload test, the nearest scene
(minimum range 250) sweeps 312 rows. The third scene (minimum range 1250) sweeps 712 rows.

**Why the previous band is added.** Rows outside the band are neither read nor written. They
stay correct only if the two SRAMs of the pair agree there. The SRAM that becomes the
destination still holds the image from before the last step. So it can differ from the source
only in rows inside the last step's band. The swept band is therefore the hull of this step's
band and the last step's band. A zero fill makes the two SRAMs equal and clears the remembered
band.

**Host obligations.** This gives two rules for the host:

- Zero the SRAMs before the first step.
- Do not write the bank bits between steps.

**Timing of the band.** The band is computed from the flight-parameter registers in three
register stages. A step command therefore waits four PCI clocks before starting. Parameters
written just before the command are still used. The band limits then reach the memory clock
as static values, ahead of the synchronised start pulse.

## Distance-to-time index calculator

All flight parameters are in fast-time sample units, so the range sample spacing is 1. This
lets the hardware use integers only:

    X = RMIN + x·DX                   range distance of column x
    Y = (y − u)·DY                    azimuth offset of row y from the pulse at row u
    t = floor(sqrt(X² + Y²)) − T0     index into the stored window
    hit = (|Y| ≤ (X·TANPHI) >> 16)  and  0 ≤ t < 2^(R+9)

- `TANPHI` is the tangent of the beam's half-angle, as an unsigned 2.16 number computed by the
  host.
- `T0` is the fast-time index of BlockRAM word 0. It is the start of the slice of each
  projection that was sent to this node.
- `X` and `Y` saturate at `2^C_W − 1`.
- Two multipliers form the squares and a third forms the beam edge. The beam test runs in
  parallel with the square root.
- Latency is fixed at `C_W + 6` cycles, and the block accepts one pixel per clock.

## Registers and host sequence

32-bit words on the PIO bus. Read data is registered, so it is valid one cycle after `pio_rd`.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CTRL | W | b0 start step, b1 zero SRAMs, b2 start readout, b3 start DMA receive (each bit gives one pulse) |
| 0x01 | STATUS | R | b0 pipelines busy, b1 DMA receive busy, b2 DMA transmit busy, b3 clocks good, b4 a step ended since the last STATUS read |
| 0x02 | CONFIG | R | [7:0] N, [15:8] R, [23:16] PIPES |
| 0x03 | BANK | R/W | bit p: which SRAM of pipeline p holds the latest image |
| 0x04 | RDPIPE | R/W | pipeline read out by the next readout |
| 0x05 | STEPS | R | steps completed |
| 0x10 + 8p + 0 | RMIN | R/W | pipeline p: range of column 0 |
| 0x10 + 8p + 1 | DXDY | R/W | [7:0] DX, [15:8] DY |
| 0x10 + 8p + 2 | TANPHI | R/W | 2.16 tangent of the beam half-angle |
| 0x10 + 8p + 3 | T0 | R/W | fast-time index of BlockRAM word 0 |
| 0x10 + 8p + 4 | UBASE | R/W | row index of the projection loaded into adder stage 0 (signed) |

A host run goes:

1. Reset both clock domains and read CONFIG to learn `N`, `R` and `PIPES`.
2. Write the flight parameters. Write CTRL=2 to zero the SRAMs and poll STATUS b0 until it
   clears.
3. For each batch:
   - Fill the DMA buffer with `PIPES·N·2^(R+9)` 32-bit samples, ordered by pipeline, then
     adder stage, then fast-time index (the last varies fastest).
   - Write CTRL=8. The DRC raises `rx_req` with that length and takes one word per clock.
     Poll STATUS b1.
   - Write UBASE for each pipeline. Write CTRL=1 and poll STATUS b0. BANK has now flipped.
4. For each pipeline, write RDPIPE, then write CTRL=4. The DXC raises `tx_req` with length
   `2^(X_W+Y_W)`. It then sends one magnitude per 32-bit word, zero-extended, in pixel-index
   order, and marks the last word with `tx_last`.

## External interfaces

`bp_top` brings these out as plain ports:

- **SRAMs.** One port per SRAM, `[PIPES][2]`: `addr`, `rd`, `wr`, `wdata` and `rdata`. Read data
  returns `SRAM_LAT` memory clocks after `rd`. A write takes effect at the clock edge where
  `wr` is high.
- **DMA.** A transfer request (`*_req` with a word count), then a valid/ready word stream. The
  FPGA side starts every transfer.
- **PIO.** A simple register strobe bus.
- **`clocks_ok`.** A clock-status input that is only reported in STATUS.

The board's PCI bridge and the SRAM chips are outside this RTL. `tb/sram_model.sv` is a
behavioural model of the SRAM used by the testbenches.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `PIPES` | 2 | pipelines, each with its own SRAM pair and flight parameters |
| `N` | 8 | adder stages (projections per step) per pipeline |
| `R` | 2 | BlockRAM depth `2^(R+9)` = 2048 samples |
| `X_W`, `Y_W` | 9, 10 | image of 512 range × 1024 azimuth pixels = 2^19 pixels, 2^18 SRAM words |
| `C_W` | 20 | DIC arithmetic width |
| `SRAM_LAT` | 2 | SRAM read latency in memory clocks |

The full-size design at the defaults has about 25,100 flip-flop bits and 1.1 Mbit of memory
(BlockRAMs and FIFOs). The two images are held off chip.

## Where this departs from the original design, and what is assumed

- **Coarse narrowing is this design's own.** The original design uses the beam test to
  narrow, coarsely, the pixels examined in each step, but does not say how. This design's
  choices are:
  - the row-band formula;
  - the rule that widens the band by the previous step's band;
  - the host obligations that follow.

  Inside the band, a pixel outside the beam still makes the round trip and gets zero added.
- **No interpolation.** The nearest lower sample is used (`floor`).
- **Overflow wraps.** Accumulation wraps on overflow; it does not saturate.
- **Interface and format choices are this design's own.** This covers:
  - the register map;
  - the DMA buffer order and word formats;
  - the valid/ready handshakes;
  - the SRAM port protocol;
  - the `T0`/`UBASE` parameterisation;
  - the 2.16 tangent format.

  The original design leaves these to its board's vendor interfaces or does not give them.
- **Parity bits hold data.** The memory word is two 32-bit halves, each with four parity
  bits. This design uses all 72 bits as data, which is what lets one word hold two 36-bit
  pixels. No parity is generated or checked.
- **Each pipeline has its own subimage and parameters.** Both pipelines run every step
  together. The host reads their images out one after the other.
- **Tool warnings that remain.** The crossing FIFOs and pulse synchronizers use two-flop
  synchronizers. The tools' reset/clock-domain warnings on them are expected.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog. The references are written
independently of the RTL, in `tb/bp_ref_pkg.sv`: an integer square root, the DIC equations and
the magnitude.

The block tests are:

- `tb_isqrt`, `tb_dic`, `tb_proj_bram`, `tb_sync_fifo`, `tb_async_fifo`, `tb_addr_gen`;
- `tb_proj_adder`, `tb_tmem_ctrl`, `tb_bp_pipeline`;
- `tb_cmag`, `tb_csr`, `tb_dma_rx`, `tb_dma_tx`.

The whole-unit tests are:

- `tb_bp_top` runs the whole unit at a reduced size: 2 pipelines, 4 stages, `R=0`, and a
  16 × 32 image. It plays the host through PIO and the DMA streams and compares every SRAM word
  and every magnitude with a software model. It also checks the step rate. It counts that each
  of these mechanisms happened at least once:
  - the SRAM reader paused by its FIFO;
  - the pixel generator paused by a projection FIFO;
  - an adder stage waiting for its sample;
  - pixels inside and outside the beam;
  - zero fill;
  - bank swaps;
  - DMA stalls;
  - steps narrowed to a band.

  For every step it also checks that each pipeline read a contiguous band of whole rows, each
  word once. The band must hold every row the model saw hit in this step or the last. The
  batches are spaced so that the widening by the previous band matters.
- `tb_bp_top_full` is the same test with every parameter at its default. It runs one step on
  the 2^19-pixel images of both pipelines, over the band of rows the beam reaches. It then
  compares both full images and reads both out, with about 1.6 million checks.
- `tb_bp_workloads` also runs at full size. It uses the geometry of four test scenes, with
  minimum ranges of 250, 500, 1250 and 2750 samples:
  - `DX = DY = 1` and `T0 = RMIN`;
  - `tan(phi) = 0.2`;
  - random projection data.

  Two runs cover the four scenes, one per pipeline, with 3.1 million checks. The steps sweep
  312 rows for the nearest scene and 712 rows for the third, out of 1024.

To simulate with plain Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/bp_pkg.sv tb/bp_ref_pkg.sv tb/tb_bp_top.sv --top-module tb_bp_top
    ./obj_dir/Vtb_bp_top

Block testbenches work the same way. Replace the last file and the top module with, for example,
`tb/tb_dic.sv` and `tb_dic`. Testbenches that use the SRAM model or the reference package find
them through `-y tb`.
