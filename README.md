# MVP: a systolic-array CNN accelerator with a depth-wise and near-memory vector unit

Mobile CNNs such as EfficientNet, MnasNet and MobileNet spend most of their
operations in 1x1 point-wise (PW) convolutions. However, much of their run time
goes to operations that a systolic array handles badly:

- depth-wise (DW) convolution;
- squeeze-and-excitation (SE) scaling;
- pooling and element-wise activation.

These operations do little arithmetic per byte. On a plain weight-stationary
array they either use one column at a time or make an extra round trip through
the on-chip buffer.

MVP keeps the systolic array for PW convolution and adds two small units along
its data path:

- **VU-DW** sits at the array's output. It has one *depth-wise processing
  element* (DWPE) per array column, which is one per output channel. A DWPE
  receives the freshly normalised PW result of its channel one element per
  cycle. It convolves that tile with a small DW kernel while the tile is still
  arriving, so the intermediate feature map never goes back to the buffer.
  While VU-DW works on one tile, the array already computes the next one.
- **PNMU** sits at the array's input. It is a row of *processing-near-memory
  elements* (PNMEs), one per array row, which is one per input channel. Each
  PNME multiplies the byte leaving the unified buffer by its channel's scale
  factor, with an optional ReLU. SE-Scale is then folded into the read for the
  next convolution and costs no separate pass.

The RTL here is the main configuration:

| Part | Size |
|---|---|
| MU (matrix unit) | 64x64 INT8 MAC array |
| Unified buffer (UB) | 512 KB, 8192 x 512 bit |
| Accumulator (ACC) | 128 KB, 512 x 2048 bit, with 64 INT32 adders |
| VU-DW | 64 DWPEs, each with 5 multipliers, a 260-byte input buffer and a 100-byte weight buffer |
| PNMU | 64 PNMEs |
| VU-NA | one NORM/ACT unit shared by the PW and DW paths |
| DMA | one engine to external DRAM |

## Data path

```
 DRAM <-> DMA (main_memory_controller) <-> UB (unified_buffer)
                     |                        |
                     v                        v  one pixel row (64 channels) per cycle
               weight_fifo                  PNMU (64 x pnme)   scale / ReLU / pass
                     |                        |
                     v                        v
                  MU weights <---- systolic_data_setup (row i delayed i cycles)
                     |
             matrix_unit (64x64 mac_pe, weights stationary, partial sums flow down)
                     |  one INT32 row per cycle, de-skewed
                     v
               accumulator (write on the first input-channel tile, add on later ones)
                     |
                     v
                   VU-NA  <------------------------+   DW results have priority
                     | INT8                         |
          +----------+-------------+                |
          | dw_en                  | bypass         |
          v                        v                |
     VU-DW (64 x dwpe) ------------+---> UB         |
          |  INT32 DW results                       |
          +-----------------------------------------+
```

Data layout in the UB:

- A UB row is one pixel of 64 channels. Byte i belongs to channel i, which is
  array row i on the way in and array column i on the way out.
- DW kernels are stored one tap per row. Byte i of the row is channel i's
  weight for that tap.
- SE scale factors take one row, one byte per input channel.

A PW tile is `npix` consecutive UB rows, with at most 512 (the ACC depth). It
streams through the array at one pixel per cycle. Result row p lands in ACC row
p after H + W - 1 cycles.

## How a DWPE addresses its buffers

This is the least obvious part of the design, and the part to read before
changing `rtl/dwpe.sv`.

The problem: the tile arrives one byte per cycle, in row-major order, because
VU-NA emits one pixel per cycle. Yet each cycle the five multipliers must read
five *different* taps of a convolution window. A single buffer cannot do that.
The DW input buffer (DWIB) is therefore split into K = 5 byte-wide slices of
52 entries. Each multiplier owns one slice, and the layout must put the taps a
multiplier reads together into different slices.

**Slice.** Element (r, c) of the tile is written to slice

    s(r, c) = (r + c*KH) mod K

Number the taps of a KH x KW window in column-major order, t = i + j*KH, for
the tap at (row0 + i, col0 + j). Tap t then lives in slice

    s = (row0 + col0*KH + t) mod K

Consecutive taps are consecutive integers mod K. Any K consecutive taps
therefore sit in K different slices, whatever the window position, so they can
be read in one cycle.

**Entry inside a slice.** For a fixed column c, the rows that map to slice s
differ by multiples of K. The entry is

    entry(r, c) = c*RPC + (r + (c*KH mod K)) / K        (integer division)
    RPC         = (IH + 2K - 2) / K                     entries per column

This entry is unique for each element. It also gives the multipliers a simple
address each: the row and column of their own tap.

At K = 5 and 52 entries per slice, a tile is limited to
IW * RPC <= 52. For example, 13x13 (RPC 4) fits, and 10x10 (RPC 3, 30
entries) fits easily.

**Weights and the barrel shifter.** The weight buffer (DWWB) holds 20 words of
5 bytes. Tap t of the kernel is byte `t mod K` of word `t / K`. A 5x5 kernel
therefore fills words 0 to 4, and a 7x7 kernel fits in 10 words.

Pass p of a window reads word p. The multiplier attached to slice m needs the
weight of the tap stored in slice m. That tap is the one with
(base + t) mod K = m, where base is the slice of the window's first tap. So the
weight word is rotated by `base` before it reaches the multipliers. With
stride ST and zero padding PAD at the top and left, the window of output
(row_o, col_o) starts at (ST*row_o - PAD, ST*col_o - PAD). This gives

    base = (ST*(row_o + col_o*KH) - PAD*(1 + KH)) mod K

The document states the shift as ST*(row_o + col_o*KH) plus or minus the
padding, with the sign depending on whether the padding is odd. The formula
above reduces to that rule for padding 1 with kernel heights 2 and 3, and for
padding 2 with a 5x5 kernel. It also stays correct for other combinations, so
the RTL uses it.

**Passes and padding.** A window with KH*KW taps needs P = ceil(KH*KW / K)
cycles:

| Kernel | Passes |
|---|---|
| 3x3 | 2 |
| 5x5 | 5 |
| 7x7 | 10 |

In each pass every multiplier computes its tap's row and column. It feeds a
zero when the tap lies in the padding, beyond the tile's bottom or right edge,
or past the last tap (the unused bytes of the last pass). An adder tree sums
the five products into an INT32 accumulation register. The result is issued
one cycle after the last pass.

**When an output may start.** Outputs are computed in row-major order. Output
(row_o, col_o) starts once the bottom-right element of its window (clipped to
the tile) has been written. Computation thus overlaps the arrival of the tile.

With K = 4, a 4x4 tile, a 2x2 kernel and padding 1, the first full window
(output 5, taps 0, 4, 1, 5) can use all four multipliers in one cycle. This
sets the DWPE's latency: output n is issued at cycle n+1, registered at cycle
n+2. `tb_dwpe` checks exactly this case, together with the rate of one output
every P cycles for larger kernels.

**Edge IFmaps.** A feature map larger than one DW tile is cut into tiles.
The windows along a tile's top and left borders need the last rows of the
tile above and the last columns of the tile to the left. These are the edge
IFmaps. `cfg.eh` and `cfg.ew` say how many top rows and left columns of the
DWPE's tile are edges, and the tile size IH x IW includes them. The DWPE
expects its input in this order:

1. the top `eh` rows, in row-major order;
2. the left `ew` columns of the remaining rows, in row-major order;
3. the interior, in row-major order.

Its write-position counter follows this order, so every element still lands
in the slice and entry given above. The readiness rule counts interior
elements only. A window that lies entirely in the edge area is ready once all
edges are in. A side with edges gets no zero padding; `cfg.pad` applies only
to a side without edges.

Example: a 14x10 map with a 3x3 kernel, split into two tiles of 7 rows.

- The upper tile (7x10, padding 1) produces output rows 0 to 5.
- The lower tile gets the upper tile's rows 5 and 6 as `eh = 2`. Its tile is
  therefore 9x10, with padding 1 only on the left. It produces output rows 6
  to 13.

**Pooling.** With `cfg.pool` the DWPE adds up the whole tile and emits a
single INT32 result. Global average pooling is completed by the VU-NA scale.

All 64 DWPEs of `vu_dw` share one configuration and run in lockstep. The
tile geometry fields are 4 bits wide (up to 15) and kernels can be up to 7x7.
Assertions check that the DWIB and DWWB are large enough for the configured
tile.

## PNMU: scaling on the way out of the buffer

Each PNME has:

- a demultiplexer that steers a UB byte either into its one-byte scale
  register or into the multiplier;
- a multiplier-accumulator that computes `x*s + 2^(shift-1)`, which rounds;
- an arithmetic right shift and saturation to INT8;
- a ReLU comparator;
- an output multiplexer that selects the scaled result or the raw byte.

The output is registered. A tile command with `pnmu_en` first reads
`scale_row`, which loads all 64 scale registers in one cycle. It then streams
its pixels through the scaling. Without `pnmu_en`, bytes pass unchanged.

## Sharing VU-NA and overlapping PW with DW

There is one VU-NA of 64 lanes for both paths. Each lane holds two parameter
sets, one for PW results and one for DW results. Each set has a 16-bit scale,
a 5-bit shift, a 16-bit bias and a ReLU flag:

    y = sat8(((x * scale) >>> shift) + bias),  then optional ReLU

A DW result goes through VU-NA whenever one is ready. The PW drain from the
ACC waits for it (`pw_ready = !dw_valid`). This is the structural stall of
sharing, counted in `cnt_share_stall`. DW results leave every P cycles, so the
PW drain still gets (P-1)/P of the unit's cycles.

The controller ends a tile command as soon as its drain is finished. It then
accepts the next command and loads weights and streams pixels while VU-DW is
still working on the previous tile. Before the next tile may drain into VU-DW,
the controller waits in `WAITDW` until VU-DW is free. These cycles are counted
in `cnt_dw_stall`.

## Controller and commands

The host drives two command ports, both with valid/ready handshakes.

- **DMA commands** (`dma_cmd_t`) copy `len+1` rows between the UB and DRAM
  (DRAM 512-bit word address), or from DRAM into the weight FIFO.
  - Loads pipeline reads up to the free room in the weight FIFO.
  - Stores read the UB, hold the row and write it to DRAM.
  - The DRAM port is a simple in-order request/grant interface.
  - A DMA command waits until no tile is in progress.
- **Tile commands** (`tile_cmd_t`) run one PW tile through these phases:
  1. `LOADW`: H weight rows from the FIFO into the MU (if `load_w`).
  2. `LOADS`: the scale row into the PNMEs (if `pnmu_en`).
  3. `STREAM`: `npix+1` pixel rows.
  4. `WAITMU`: wait for the array to empty.

  Only with `drain` set:

  5. `WAITDW`: wait for VU-DW, if `dw_en`.
  6. `LOADDW`: start VU-DW and load KH*KW weight rows from `dw_w_base`
     (skipped for pooling). Then copy the tile's edge IFmaps from consecutive
     UB rows starting at `dw_edge_base` into VU-DW.
  7. `DRAIN`: send the ACC rows through VU-NA.

  Tiles are used as follows:
  - Input-channel tiles beyond 64 are issued as further commands with
    `accumulate` set and `drain` clear on all but the last.
  - Drained rows go to VU-DW (`dw_en`), or straight to the UB from `out_base`
    (bypass).
  - DW results are written to the UB from the `out_base` of their tile.
  - With `dw_keep`, the PW rows sent to VU-DW are also written to the UB from
    `keep_base`. This is where later tiles take their edge IFmaps from.
    - Edges from the tile above are already consecutive UB rows.
    - Edge columns from the tile to the left must first be gathered into
      consecutive rows, for example with DMA copies.
    - The kept PW rows and the DW results share the UB write port. This costs
      no extra cycles, because both leave VU-NA at one row per cycle.

## Where this design departs from the document

- **Edge IFmaps need some software help.** The hardware keeps PW rows in the
  UB and moves a tile's edges into the DWIB. However, it expects those edges
  in consecutive UB rows, in the order given above. The host sequences the
  tiles and arranges the left-neighbour columns.
- **No im2col-free convolution for k > 1.** Standard convolutions with kernels
  larger than 1x1 are not supported by the sequencer, which streams
  consecutive UB rows.
- **SE-FC and sigmoid are not computed.** The scale factors for SE-Scale are
  read from a UB row, so software (or a previous tile) must place them there.
- **No scratch pad before the PNMU.** PNME input comes from the UB after a DMA
  load, not directly from a DRAM fetch.
- **Own choices where the document is silent:**
  - array weights are loaded row by row by address, without double buffering;
  - outputs are de-skewed inside the matrix unit;
  - DW results have priority in VU-NA;
  - the fixed-point formats of VU-NA and PNME;
  - a 64-row weight FIFO;
  - the command formats;
  - the active-low asynchronous reset, which clears control and pipeline state
    but not memories.
- **Memories are plain arrays.** The UB, ACC, DWIB and DWWB would be SRAM or
  register-file macros in a real implementation.

## Files

| File | Contents |
|---|---|
| `rtl/mvp_pkg.sv` | sizes, command and configuration structs, INT8 saturation |
| `rtl/mvp_top.sv` | the accelerator; DRAM port brought out |
| `rtl/mvp_controller.sv` | tile sequencer |
| `rtl/main_memory_controller.sv` | DMA |
| `rtl/unified_buffer.sv`, `rtl/accumulator.sv`, `rtl/weight_fifo.sv` | storage |
| `rtl/matrix_unit.sv`, `rtl/mac_pe.sv`, `rtl/systolic_data_setup.sv` | systolic array |
| `rtl/vu_na.sv` | shared NORM/ACT unit |
| `rtl/vu_dw.sv`, `rtl/dwpe.sv` | depth-wise unit |
| `rtl/pnmu.sv`, `rtl/pnme.sv` | near-memory scaling |
| `tb/tb_<block>.sv` | self-checking test per block |
| `tb/tb_mvp_top.sv` | end to end at a 16x16 array |
| `tb/tb_mvp_controller.sv` | end to end at an 8x8 array |
| `tb/tb_mvp_top_full.sv` | end to end at the default 64x64 size |
| `tb/dram_model.sv` | behavioural DRAM: random grant, 6-cycle read latency |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a test that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_dwpe \
    rtl/mvp_pkg.sv rtl/dwpe.sv tb/tb_dwpe.sv
./obj_dir/Vtb_dwpe
```

For the whole accelerator, list the package first, then all of `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_mvp_top \
    rtl/mvp_pkg.sv $(ls rtl/*.sv | grep -v mvp_pkg) tb/dram_model.sv tb/tb_mvp_top.sv
./obj_dir/Vtb_mvp_top
```

`tb_mvp_top_full` builds the same way. The model is large (4096 MAC cells), so
expect several minutes of C++ compilation. The simulation itself takes
seconds.

What the end-to-end tests do:

- Load random feature maps, PW and DW weights and a scale row into DRAM.
- Move them into the chip with DMA commands.
- Run four tiles:
  - two PW tiles, each followed by a 5x5 DW convolution with padding 2. The
    second tile overlaps the first tile's DW work and then stalls for it;
  - a PW tile over two accumulated input-channel tiles with SE scaling,
    bypassing VU-DW;
  - a PW tile followed by global pooling;
  - a 14x10 PW + 3x3 DW layer split into two tiles. The lower tile takes its
    edge IFmaps from the kept rows of the upper one, and the result is
    compared with the DW convolution of the whole map.
- Store every result to DRAM and compare it with a reference computed in the
  testbench.
- Check two rates:
  - a 5x5 DW tile produces one output every five cycles;
  - the array returns one result row per cycle.
- Count each mechanism and fail if any never occurred:
  - overlap;
  - DW stall;
  - VU-NA sharing stall;
  - bypass;
  - scale load;
  - accumulation;
  - pooling;
  - DMA loads and stores;
  - weight-FIFO pushes;
  - edge IFmap transfers.

The block tests use independent reference models. Examples:

- the systolic array against a direct matrix product, including its H+W-1
  latency;
- the DWPE against a direct convolution with random data, over kernels from
  1x1 to 5x5, strides 1 and 2, padding 0 to 2 and edge IFmaps on the top,
  the left or both, plus the small 4-multiplier example above.

## Changing the design

Sizes are parameters with the main configuration as defaults:

- `mvp_top`: `H`, `W`, `UB_DEP`, `ACC_DEP`, `WF_DEP`;
- `dwpe` and `vu_dw`: `K`, `IB_BYTES`, `WB_BYTES`.

The command field widths in `mvp_pkg.sv` are sized for the default UB and ACC
depths. Widen them together with the depths.
