# HEVC intra prediction accelerator

An HEVC encoder has to choose one of 35 intra prediction modes for every luma block of 4x4 to
32x32 pixels. The modes are planar, DC and 33 angular directions. The usual way is to predict the
block in each mode, measure how far each prediction is from the original pixels (SAD), add a rate
term, and keep the cheapest mode. In software this "rough mode search" is the hot spot of intra
encoding.

This RTL does the whole search in hardware. It runs all 35 predictions side by side. A host
processor hands over a block, and the accelerator returns the best mode, its cost and its rate
cost. The structure is that of an FPGA accelerator originally produced by high-level synthesis
for a Cyclone V SoC at 100 MHz. It is written here as ordinary synthesizable SystemVerilog.

```
 system memory ──► ORIG DMA ────(32-bit words: CTU pixels)─────────────────┐
               ──► UNFILT1 DMA ─(8-bit above samples)─┐                    │
               ──► UNFILT2 DMA ─(8-bit left samples)──┤                    ▼
 host AXI4-Lite ─► AXI TO CHANNEL ─(32-bit config)──► IP CTRL ─► 35 GET ─► SAD PARALLEL ─► result RAM ─► host
                                                     (filter)   lanes    (SAD, min)      └► irq
```

## How one block is processed

1. **Host side.** The host writes the original 64x64 CTU (once per CTU) and the block's
   unfiltered reference samples into memory. These are 2N+1 samples above (corner first) and 2N+1
   to the left. The host then programs the three DMAs and writes three configuration words.
2. **IP CTRL** (`ip_ctrl`). It decodes the configuration and passes it to SAD PARALLEL. It then
   sends a header beat to the 35 prediction lanes. While the reference samples arrive, it sends
   N+1 reference beats. Each beat carries indices 2b and 2b+1 of both sides. The [1 2 1]
   smoothed samples are computed on the fly. Each lane gets either the smoothed or the raw
   samples, by the HEVC rule:
   - 4x4 blocks and DC use raw samples.
   - Planar uses smoothed samples.
   - An angular mode m uses smoothed samples when min(|m−26|, |m−10|) > threshold.

   The threshold is a field of the configuration word (HEVC uses 7, 1 and 0 for 8x8, 16x16 and
   32x32). Beat b leaves as soon as sample min(2b+2, 2N) has arrived on both channels, so sending
   overlaps reception.
3. **Prediction lanes**. Each lane stores its reference samples in registers, then emits the
   predicted block two pixels per cycle:
   - `get_planar`: mode 0.
   - `get_dc`: mode 1, with the HEVC edge smoothing for N < 32. It starts one cycle later than
     the others, because it first forms the average.
   - `get_pos`: 16 instances, modes 2..9 and 27..34. These are positive angles; the prediction
     interpolates ((32−f)·r[i] + f·r[i+1] + 16) >> 5 along the main reference.
   - `get_neg`: 15 instances, modes 11..25 except 26. These are negative angles, which also read
     the projected side reference: main[x] = side[(x·invAngle + 128) >> 8] for x < 0. Because the
     mode is a parameter, that index is a constant per x. No projected copy is built, and these
     lanes start as early as the others.
   - `get_zero`: modes 10 and 26. The prediction is a straight copy, plus the HEVC edge filter on
     the first column or row for N < 32.
4. **SAD PARALLEL** (`sad_parallel`).
   - **Accumulator preset.** It presets 35 accumulators with `ratecost × lambda`. Ratecost is:
     - 1 for candidate 0,
     - 2 for candidates 1 and 2,
     - 5 for any other mode, or 0 when the block has no candidate (candidate 0 = 63).
   - **Summing.** It takes one beat from all 35 lanes together and adds |orig − pred| for both
     pixels. If some lanes have data and others do not, nothing moves and `stall` is high.
   - **Minimum.** A balanced comparison tree finds the minimum in one cycle. Ties go to the lower
     mode number.
   - **Results.** Three words are written: the best mode's cost at the address of that mode, the
     mode at address 35, and its ratecost at address 36. irq pulses with the last write.

### Scan order and transposition

Modes 2..17 predict "horizontally": the main reference is the left column. Their lanes walk the
block column by column, and the others walk it row by row. Every lane therefore evaluates the
same simple formula: outer counter k, inner counter j in steps of 2. SAD PARALLEL reads the
original block transposed for those 16 lanes, so every lane is compared with the right pixels
even though lanes emit different pixel positions in the same cycle.

## Channels and word formats

All internal channels are valid/ready pairs. Data moves when both are high.

| Channel | Width | Content |
|---|---|---|
| configuration (AXI TO CHANNEL → IP CTRL) | 32 | three words per block, see below |
| UNFILT1 / UNFILT2 (DMA → IP CTRL) | 8 | one above / left reference sample per beat, index 0 (corner) to 2N |
| ORIG (DMA → SAD PARALLEL) | 32 | four CTU pixels per word, raster order, lowest byte first; 1024 words; only when the new-CTU flag is set |
| IP CTRL → each GET lane | 32 | header `{29'b0, log2 N}`, then N+1 beats `{left[2b+1], above[2b+1], left[2b], above[2b]}` |
| GET lane → SAD PARALLEL | 16 | two predicted pixels `{p1, p0}` |

Configuration words:

| Word | Bits |
|---|---|
| 0 | [2:0] log2 N (2..5), [7:3] filter threshold, [13:8] block x in the CTU, [19:14] block y, [20] new CTU follows |
| 1 | [5:0] candidate 0, [11:6] candidate 1, [17:12] candidate 2 (63 = no candidate) |
| 2 | [15:0] lambda |

Result memory (64 × 32 bits, read by the host with one cycle of latency):
- word `best` holds the cost of the best mode,
- word 35 holds the best mode,
- word 36 holds its ratecost.

Other words keep stale values.

### System ports

`intra_acc_top` exposes four groups of ports:
- **DMA registers.** One write port shared by the three DMAs. `csr_addr[2:1]` selects the DMA
  (0 ORIG, 1 UNFILT1, 2 UNFILT2). `csr_addr[0]` selects the register: 0 is the base byte address
  (8-byte aligned), 1 is the length in bytes, and writing the length starts the transfer.
- **Memory.** Three 64-bit read ports to the memory controller, with Avalon-style
  read/waitrequest/readdatavalid signalling. Each DMA keeps one read in flight.
- **Configuration.** An AXI4-Lite write-only slave. Each write is one configuration word, the
  address is ignored and the response is always OKAY.
- **Results.** The result-memory read port, `irq`, `stall` and the DMA busy flags.

The processor, its memory controller, the interrupt PIO and the bus bridges are outside this RTL.

## Timing

Cycles from the first configuration word to irq, measured with the CTU already loaded and no
gaps on the input channels:

| Block | This RTL | Reference design |
|---|---|---|
| 4x4 | 27 | 40 |
| 8x8 | 59 | 68 |
| 16x16 | 171 | 172 |
| 32x32 | 587 | 572 |

Each block time is made of four parts:
- 3 configuration cycles,
- 2N+1 cycles of reference reception (the broadcast overlaps it),
- N²/2 prediction beats,
- about 5 cycles for the comparison tree, the writes and the handshakes.

A whole 64x64 CTU searched exhaustively has 340 blocks:
- The accelerator alone needs 15,772 cycles, which is 15.7 Full HD frames per second at 125 MHz.
- The system testbench, where the DMAs read from a memory model with random wait states and
  latency, measures 20,240 cycles per CTU, which is 12.2 fps.

## Departures from the reference design

- **Reference samples are stored in registers.** The original design keeps them in on-chip
  memories, in two copies. Registers cost area, but allow two reads per cycle without copies.
- **Each mode gets its own reference lane**, already filtered or not. The original sends both
  sets and lets each GET block choose.
- **Strong (bilinear) 32x32 reference smoothing is not implemented.** Only the [1 2 1] filter is.
- **No projected-reference array.** Negative-angle lanes read the projected samples through
  constant index maps instead of building a copy. This, and the overlap of reception with
  sending, makes 4x4 and 8x8 blocks faster than the reference figures. 32x32 is about 3% slower.
  The reason is that prediction waits for all 65 samples per side and the samples arrive at one
  per cycle per side.
- **Configuration takes 3 cycles here, against 14 in the reference design.**
- **The DMA register map, the memory port protocol and the configuration word layout** are this
  design's own. So are the encoding of "no candidate" as 63 and the result word addresses beyond
  "two extra 32-bit words after the mode costs".
- **Luma only.** Chroma intra prediction and the encoder's other stages (transform, quantization,
  reconstruction) are not part of this design.

## Files

- `rtl/intra_pkg.sv`: shared types, the configuration layout, the HEVC angle and inverse-angle
  tables, the filter rule.
- `rtl/ref_loader.sv`, `rtl/pred_scan.sv`: the reference store and scan counters shared by the GET
  lanes.
- `rtl/get_*.sv`, `rtl/ip_ctrl.sv`, `rtl/sad_parallel.sv`, `rtl/ip_acc.sv`: the accelerator.
- `rtl/stream_dma.sv`, `rtl/axi_to_channel.sv`, `rtl/result_ram.sv`, `rtl/intra_acc_top.sv`: the
  system around it.
- `tb/intra_ref_pkg.sv`: an independent behavioural model of HEVC intra prediction and of the mode
  decision. It is written from the standard's formulas, not from the RTL.
- `tb/mem_port_model.sv`: a memory read port with random wait states and latency.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=<n> failures=<n>`.

### Testbenches

- **Prediction lanes** (`tb_get_*`). Every output pixel of several modes and all four sizes is
  compared with the model. These benches also check that output starts within 2 cycles of the
  last reference beat (3 for DC) and runs back to back, and they apply random back-pressure.
- **`tb_ip_ctrl`**. It checks:
  - every lane's reference beats against the filter and the filtered/unfiltered rule,
  - the decoded configuration,
  - that the last beat leaves at most 2 cycles after the last sample.
- **`tb_sad_parallel`**. Lanes are random. It checks the three result words and irq timing, and
  forces stalls by withholding lanes.
- **`tb_ip_acc`**. This is the accelerator end to end. It does four things:
  - Plants the prediction of a target mode in each new CTU, so that several lanes must produce
    the winning cost.
  - Checks the block times above within 10%.
  - Counts CTU loads and reuses, filtered and unfiltered lanes, projected-sample reads, stalls
    and blocks without candidates.
  - Fails if any of those never happens.
- **`tb_intra_acc_top`**. This is the whole system at default sizes:
  - 12 random blocks, then all 340 blocks of one CTU.
  - DMAs run through memory models with wait states, configuration goes through AXI4-Lite, and
    results are read from the result memory.

### Simulating with Verilator

Each testbench compiles on its own. The packages come first, and the other files are found by
name:

```
verilator --binary --timing --top-module tb_intra_acc_top -y rtl -y tb +libext+.sv \
          rtl/intra_pkg.sv tb/intra_ref_pkg.sv tb/tb_intra_acc_top.sv -o sim
./obj_dir/sim
```

`tb_ip_acc` accepts `+long` to run 40 blocks instead of 12. The simulator is two-state, so every
register that is read is reset. The exceptions are the CTU store in SAD PARALLEL and the result
memory, which are memories and are written before they are read.
