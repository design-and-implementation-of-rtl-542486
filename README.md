# Ray-caster volume rendering coprocessor

This is a small hardware accelerator for one step of ray-cast volume rendering:
front-to-back compositing of the samples along one ray. The host program walks a
volume of 16-bit voxels ray by ray and streams each ray's voxels, front to back,
into the coprocessor. The coprocessor does the rest. It maps each voxel value to
a colour and an opacity through a lookup table in SRAM. It blends that sample
into running colour and opacity sums with the standard transparency formula.
Then it hands back one 32-bit pixel word.

The design keeps the original's resources. A voxel input register drives the
SRAM address. A 64K x 32 colour/opacity table sits in board SRAM. The datapath
has one opacity subtractor, four 12 x 8 multipliers and four 12-bit
accumulators. Output buffers let all four results be read in one 32-bit access.

## The compositing arithmetic

For each sample `R` on ray `r`, with colours premultiplied by opacity
(`C* = C·α`):

```
C*_out = C*_in + C*(R) · (1 − α_in)        for R, G and B
α_out  = α_in  + α(R)  · (1 − α_in)
```

After the last sample, the host gets the pixel colour as `C = C*_out / α_out`.
There is no divider in hardware; the host does this division.

### Number formats

| quantity | format | 1.0 is |
|---|---|---|
| voxel | 16-bit unsigned, 0..65535 | – |
| table opacity `α(R)` | 8-bit code 0..128 (129 levels) | 128 |
| table colour `C*(R)` | 8-bit, already multiplied by `α/128` | – |
| accumulators (`ACC_W` = 12) | 8 integer bits, `ACC_W−8` = 4 fraction bits | opacity 2048 |
| `1 − α_in` | `ACC_W` bits, `2048 − acc_a` | 2048 |

Each multiplier forms `(1 − α_in) × component`, which is `ACC_W + 8` bits. The
product is divided by 128 (the opacity code for 1.0) by dropping its low 7 bits.
It is truncated to `ACC_W` bits and added in. The constant 1.0 in the subtractor
is hardwired.

This format guarantees three things:

* The accumulated opacity never passes 1.0, provided every table opacity is
  ≤ 128. Each step adds at most `1 − α_in`. An assertion in `raycast_datapath`
  checks this.
* Colour sums are bounded by 255.9375, so the accumulators need no saturation
  logic.
* After a sample with opacity 128 (fully opaque), `1 − α_in` is zero. Every
  later sample then adds exactly nothing, which is the early-opacity behaviour
  of the algorithm.

  Because of truncation, a run of partly opaque samples stops one LSB short of
  1.0. Only an opacity-128 entry makes a ray exactly opaque.

### The pixel word

The output buffer takes the 8 integer bits of each accumulator
(`acc[ACC_W-1 -: 8]`) and packs them MSB first:

| bits | field |
|---|---|
| 31:24 | R* (premultiplied red) |
| 23:16 | G* |
| 15:8  | B* |
| 7:0   | α, 0..128 |

Map-table words use the same layout, with the colour fields premultiplied.

The host loads the table. For a voxel value `v` with colour `(r, g, b)` and
opacity code `op`, the entry is:

```
{ r·op/128, g·op/128, b·op/128, op }
```

## Operating the coprocessor

One clock runs the whole design (`clk`). The host drives every other input.

1. **Load the map table.** Raise `host_mem_sel`; the bus controller then gives
   the SRAM bus to the host. Write all entries with `host_mem_we`,
   `host_mem_addr` and `host_mem_wdata`, one per clock. `host_mem_rdata` shows
   the word at the current address in the same cycle (asynchronous SRAM read),
   so the host can read the table back. Lower `host_mem_sel` before rendering.
   While the host owns the bus, the table does not follow the voxel register,
   and an assertion flags an accumulate in that state.
2. **For each pixel:**
   * Pulse `clear` for one clock. This zeroes the four accumulators.
   * Write the ray's voxels front to back. Each one is a `voxel_we` with the
     value on `voxel_in`. Writes may come every clock, or with idle cycles
     between them.
   * Each write loads the voxel register, whose output is the SRAM address.
     One clock later the write's accumulate pulse adds the looked-up sample.
     `busy` is high during that clock.
   * When `busy` is low, pulse `pixel_rd`. The packed word appears on
     `pixel_out` one clock later, with `pixel_valid` high for that clock.

Throughput is one voxel per clock. A pixel of `K` samples takes `K + 4` clocks
with this sequence: 2 for the clear, `K` writes, 1 for the final accumulate and
1 for the read. If `clear` and an accumulate pulse fall on the same clock,
`clear` wins.

At the roughly 50 MHz that the asynchronous table SRAM allows, a 128³ volume
needs 2.16 M clocks per view, about 43 ms. The limit in a real system is how
fast the host can deliver voxels, not the datapath.

The render direction is only a question of which voxels the host sends in what
order. The hardware treats all directions the same.

## Modules

| file | role |
|---|---|
| `rtl/rc_pkg.sv` | widths, the opacity constant 128, and the packed `rgba_t` {R,G,B,α} type |
| `rtl/rc_coprocessor.sv` | top level; wires the blocks below |
| `rtl/voxel_input_reg.sv` | voxel register: SRAM address, plus an accumulate pulse one clock after each write |
| `rtl/bus_controller.sv` | gives the SRAM address, write and data lines to the host or the voxel register |
| `rtl/map_memory.sv` | 2^16 x 32 lookup table with asynchronous read and synchronous write |
| `rtl/raycast_datapath.sv` | subtractor, four multipliers, four accumulators; the compositing equations |
| `rtl/opacity_subtractor.sv` | `1.0 − α_in` with 1.0 hardwired |
| `rtl/multiplier.sv` | unsigned `A_W x B_W` product (12 x 8) |
| `rtl/accumulator.sv` | `W`-bit accumulator with synchronous clear and enable |
| `rtl/output_buffer.sv` | packs the accumulators' integer bytes into the 32-bit read word on `rd` |

### Parameters of `rc_coprocessor`

| parameter | default | meaning |
|---|---|---|
| `ACC_W` | 12 | accumulator, subtractor and multiplier width ("standard quality") |
| `VOXEL_W` | 16 | voxel width |
| `MAP_ADDR_W` | 16 | table address width: 65536 entries, 256 KB |

`ACC_W` must be at least 8. Every extra bit above 8 is one more fraction bit.
The 8-bit result word does not change.

## Departures from the original hardware, and choices made here

* **Timing.** In the original, only the voxel register was clocked. Everything
  from it through the SRAM, subtractor, multipliers and adders was
  asynchronous, and each voxel write also clocked the accumulators.

  Here everything is synchronous on one clock. The SRAM-to-accumulator path is
  still combinational. The accumulate pulse is issued one clock after the voxel
  write so that the lookup of the new voxel has settled. Clear is synchronous.
  Reset is asynchronous and active low.
* **Premultiplied table.** The datapath has multipliers only for the
  `(1 − α_in)` weighting. The table therefore stores colours already multiplied
  by their opacity, and filling it that way is the host's job.
* **Fixed point.** The original fixes the sizes (12-bit accumulators and
  subtractor, 12 x 8 multipliers, opacity 0..128). The split of 8 integer plus
  4 fraction bits, the truncating shift by 7, and the choice of which 8
  accumulator bits form the 32-bit read word are this design's.
* **Host bus.** On the board, a PCI bridge in a separate FPGA reached the
  coprocessor's cells and the SRAM, and bus controller chips switched the SRAM
  between the two sides. Neither is designed here. The host side is a set of
  plain ports, and the bus switch is a multiplexer with an explicit
  `host_mem_sel`.
* **Memory.** Only the 64K x 32 half of the board SRAM that holds the table is
  modelled, as a register array with a combinational read.
* **Not included.** Storing the image on the board, direction-independent
  voxel fetch, and carry-select adders were only proposed as later
  improvements of the original. Neither those nor a 16-bit datapath are part of this RTL.

## Verification

Each module has a self-checking bench in `tb/`, named `tb_<module>.sv`, which
prints `TB_RESULT checks=N failures=M`.

Most benches compare with an independent model on random or exhaustive
stimulus:

* `tb_multiplier`: all 8-bit operands.
* `tb_opacity_subtractor`: all legal opacities, at 12 and at 8 bits.
* `tb_map_memory`: the whole 64K table.
* `tb_raycast_datapath`: rays of random premultiplied samples at 12 and 16
  bits. After every sample it compares all four accumulators with a fixed-point
  model, and compares each finished ray with a double-precision compositing.

`tb_render_run.sv` is an end-to-end bench around `rc_coprocessor` at its
default parameters. It renders a sphere volume: voxel value 60000 inside,
10000 outside, radius half the cube. It renders along +Z, −Z, +Y and +X and
checks every pixel word and the cycle timing of `busy` and `pixel_valid`. The
table comes from a formula given in the bench's header.

The bench also checks that each mechanism occurred:

* table writes and read-back;
* bus hand-over both ways;
* clears;
* back-to-back and gapped voxel writes;
* rays that reach full opacity;
* pixel reads.

There are two wrappers:

* `tb_rc_coprocessor`: a 16³ volume with random idle cycles between writes.
* `tb_rc_full`: the full 128³ sphere of radius 64, four directions, 2,162,688
  clocks per direction. It takes about two minutes under Verilator.

The end-to-end bench also reports a relative image error against a double-precision
render, after the host's division by α: Σ per-pixel RGB distance / Σ
reference intensity.

**Accuracy limit.** With the bench's table this error is about 7 % (16³) and
12 % (128³). Almost all of it comes from two 8-bit quantisations. One is the
premultiplied table: a faint sample of opacity 2/128 keeps almost none of its
colour. The other is the 8-bit result word. The 12-bit accumulation itself
matches the fixed-point model exactly.

Accumulator width alone is therefore not what limits image quality here. Any
error figure quoted for 12-bit accumulation describes accumulator precision,
not this 8-bit table-and-result path.

`tb_render_analysis` runs three coprocessors in lockstep, with `ACC_W` = 8,
12 and 16, on a 32³ sphere. It checks every pixel of each. It also measures
image error against width: about 12.4 %, 7.5 % and 7.5 %. Widening the
accumulators past 12 bits buys nothing, because the 8-bit paths dominate.

### Running with plain Verilator

```
verilator --binary --timing --assert --top-module tb_rc_coprocessor \
    -y rtl -y tb +libext+.sv -Irtl rtl/rc_pkg.sv tb/tb_rc_coprocessor.sv
./obj_dir/Vtb_rc_coprocessor
```

Use any `tb_*` module the same way. `rc_pkg.sv` must come first.
