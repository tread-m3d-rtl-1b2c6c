# Output-stationary systolic DNN accelerator for two-tier monolithic 3D

This is synthesizable SystemVerilog for a mobile DNN inference accelerator of
the kind studied in *TREAD-M3D: Temperature-Aware DNN Accelerators for
Monolithic 3D Mobile Systems*. That paper is about choosing an accelerator for a
network and a temperature limit. Its knobs are the systolic array size, the
sizes of the three on-chip SRAMs, how the SRAMs and the array are split across
the two tiers of a monolithic 3D chip, and the clock frequency. The hardware
being tuned is always the same:

* a grid of 8-bit multiply-accumulate processing elements (PEs),
* an IFMAP SRAM that feeds the left edge of the grid,
* a Filter SRAM that feeds the top edge,
* an OFMAP SRAM that receives results from the bottom edge,
* an off-chip LPDDR2 DRAM behind the SRAMs.

The RTL here implements that hardware. Every knob that changes logic or
capacity is a parameter. The defaults are the paper's generic accelerator for
the lowest system energy-delay-area product at 80 °C, the one configuration
meant to run all nine networks it studies:

| parameter | default | meaning |
|---|---|---|
| `ROWS` x `COLS` | 64 x 54 | PE grid (rows x columns), 3456 PEs |
| `IF_KB`, `FL_KB`, `OF_KB` | 256, 256, 8 | IFMAP, Filter, OFMAP SRAM capacity |
| `PARTITION` | `PART_B_WORDLINE` | SRAM words split across the two tiers |
| `LINK` | 1 | register stages on each SRAM-to-array wire |
| intended clock | 800 MHz | a timing target only; nothing in the RTL depends on it |

The SRAM port widths follow from the array size. IFMAP is one byte per row and
Filter and OFMAP are one byte per column, each rounded up to a power of two. That
gives 64, 64 and 64 bytes for the default array, so the IFMAP and Filter SRAMs
hold 4096 words each and the OFMAP SRAM holds 128.

## Block structure

```
              DRAM-side ports (fill operands / read results, any time)
                 |                 |                       |
           +-----------+     +-----------+           +-----------+
           | IFMAP SRAM|     |Filter SRAM|           |OFMAP SRAM |
           |sram_tiered|     |sram_tiered|           |sram_tiered|
           +-----+-----+     +-----+-----+           +-----^-----+
                 | 1 word/cycle    | 1 word/cycle          | 1 word/cycle
            edge_link         edge_link                edge_link
                 |                 |                       |
           skew_buffer       skew_buffer             ofmap_requant
           (lane r +r)       (lane c +c)            (>>> shift, sat8)
                 |                 |                       |
                 |      +----------v----------+            |
                 +----->|   systolic_array    |------------+
                        | ROWS x COLS mac_pe  | bottom edge
                        +----------^----------+
                                   |
                             os_controller  <--- tile command (start ... done)
```

Files, one module or package each:

| file | role |
|---|---|
| `rtl/tread_pkg.sv` | widths, `partition_e`, `pow2_ceil` |
| `rtl/mac_pe.sv` | one PE: signed 8x8 MAC into a 32-bit stationary accumulator, forwards operands right/down |
| `rtl/systolic_array.sv` | the PE grid with active-region masks and a column-shift drain |
| `rtl/skew_buffer.sv` | delays lane i by i cycles to form the diagonal wavefront |
| `rtl/edge_link.sv` | the SRAM-to-array wire as a pipeline stage |
| `rtl/sram_tiered.sv` | dual-port, single-cycle SRAM with Partition A / B-wordline / B-bitline organisation |
| `rtl/os_controller.sv` | tile sequencer |
| `rtl/ofmap_requant.sv` | 32-bit results to int8 OFMAP bytes |
| `rtl/tread_m3d_top.sv` | the accelerator |

## How a tile runs (the part to understand first)

The array uses output-stationary dataflow. PE(r, c) owns output r of filter c
and keeps its partial sum in place while the reduction streams past. Before a
tile starts, the host must lay the operands out in the SRAMs like this:

* IFMAP word `if_base + k` holds, in byte r, the k-th input value needed by
  output pixel r. This is an im2col layout. One word is one reduction step for
  all rows.
* Filter word `fl_base + k` holds, in byte c, the k-th weight of filter c.

A tile computes `OFMAP[r][c] = sat8( (sum_k IF[k][r] * FL[k][c]) >>> out_shift )`
for `r < act_rows` and `c < act_cols`. The controller steps through five
phases:

| phase | cycles | what happens |
|---|---|---|
| CLEAR | 1 | all accumulators zeroed (skipped when `acc_first = 0`) |
| FEED | `k_len` | IFMAP and Filter word k read each cycle |
| WAIT | `LINK + act_rows + act_cols - 1` | wavefront reaches PE(act_rows-1, act_cols-1) |
| DRAIN | `ROWS` | each column shifts down one row per cycle; the bottom edge shows row ROWS-1, then ROWS-2, ... |
| FLUSH | `LINK` | the last OFMAP write crosses its link |

The operand for step k reaches PE(r, c) exactly `1 + LINK + r + c` cycles after
word k is read. That is one cycle of SRAM read, `LINK` cycles of wire, r cycles
in the IFMAP skew buffer and c cycles of forwarding (or the other way round for
the filter operand). The WAIT phase is sized from this, so it shrinks when the
active region is small.

During DRAIN, cycle d presents row `ROWS-1-d` at the bottom edge. It is written
to OFMAP address `of_base + ROWS-1-d` only if that row is active. Rows of a tile
therefore land in OFMAP in natural order, at `of_base .. of_base+act_rows-1`.
Byte c of each word is column c. Bytes of inactive columns are 0, and so are
the padding bytes above `COLS`.

From the clock edge that accepts `start` to the first edge that sees `done`:

```
full tile        : k_len + act_rows + act_cols + ROWS + 2*LINK + 1 cycles
non-final chunk  : k_len + act_rows + act_cols + LINK + 1 cycles
```

For the default array and a 64-step reduction, a full tile takes
64 + 64 + 54 + 64 + 2 + 1 = 249 cycles.

**Idle PEs.** PEs outside the `act_rows x act_cols` corner neither compute nor
forward. This is what a layer does when it has fewer output pixels or filters
than the array. Draining still passes through idle rows, which hold zero.

**Long reductions.** A reduction longer than the operand SRAMs hold (4096 steps
by default, such as a fully connected layer over 25088 inputs) is split into
chunks. The first chunk is issued with `acc_first=1, acc_last=0` and the middle
ones with `0, 0`. The last one is issued with `0, 1` and is the only chunk that
drains. Between chunks the accumulators keep their partial sums, and the DRAM
side refills the SRAMs. `act_rows` and `act_cols` must be the same for every
chunk of a chain.

**Overlap with DRAM.** Every SRAM has a second port for the DRAM side. Operands
for the next tile can be written, and results of the previous tile read, while
a tile computes. The array is never stalled. If the same address is written on
both ports in one cycle, the array side wins.

**Requantisation.** Each bottom-edge accumulator is arithmetically shifted right
by `out_shift` and clipped to [-128, 127]. `ofmap_sat` pulses with any OFMAP
write that clipped.

## SRAM organisation across tiers

`sram_tiered` gives the same port behaviour in all three organisations. Only the
internal structure differs, and with it the silicon timing and power that the
design-space search trades off:

* `PART_A`: the SRAM is an ordinary 2D macro, stacked above the array.
* `PART_B_WORDLINE`: each word is cut along its wordline. The low half of the
  bits is on tier 0 and the high half on tier 1. Each tier has its own wordline
  drivers, and both tiers are accessed on every access.
* `PART_B_BITLINE`: the rows are split between the tiers, chosen by the address
  MSB. Both tiers sense, and a registered tier select drives the output mux.

In Partition B the array itself is folded over the two tiers. Folding is
placement, not logic, and does not appear in the RTL.

## Tile command interface (`tread_m3d_top`)

| signal | dir | width (default) | meaning |
|---|---|---|---|
| `start` | in | 1 | begin a tile; ignored while `busy` |
| `k_len` | in | 13 | reduction steps in this tile or chunk |
| `act_rows`, `act_cols` | in | 7, 6 | active region, 1..ROWS and 1..COLS |
| `if_base`, `fl_base`, `of_base` | in | 12, 12, 7 | SRAM word addresses (wrap modulo depth) |
| `out_shift` | in | 5 | requantisation shift |
| `acc_first`, `acc_last` | in | 1, 1 | chained-chunk control; 1, 1 for a plain tile |
| `busy`, `done`, `ofmap_sat` | out | 1 | status; `done` is a one-cycle pulse |
| `ifd_*`, `fld_*`, `ofd_*` | in/out | en, we, addr, 512-bit wdata/rdata, rvalid | DRAM-side port of each SRAM, read data one cycle after the request |

All command inputs are captured on the `start` edge. The reset is active-low and
asynchronous. It clears the control state and the pipeline valids, but not the
SRAM contents.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tread_pkg.sv tb/tb_tread_m3d_top.sv \
          --top-module tb_tread_m3d_top -j 8
./obj_dir/Vtb_tread_m3d_top
```

| testbench | what it covers |
|---|---|
| `tb_mac_pe` | random MAC, clear, drain, idle behaviour against a reference |
| `tb_systolic_array` | 4x5 grid fed pre-skewed operands; matrix products and drain order; a partial region |
| `tb_skew_buffer`, `tb_edge_link` | exact per-lane / per-stage delays |
| `tb_sram_tiered` | all three partitions against one reference memory, both ports, collisions |
| `tb_os_controller` | phase lengths, addresses, masks, latency formula, chained chunks, start-while-busy |
| `tb_tread_m3d_top` | end-to-end at 6x5 with 1 KB SRAMs (bitline partition): full and partial tiles, saturation, DRAM overlap, back-to-back tiles, a chained reduction, exact latency |
| `tb_tread_m3d_full` | the same sequence on the unmodified default top (64x54, 256/256/8 KB) |
| `tb_ofmap_requant` | shift, saturation, padding bytes and the clip flag |
| `tb_dqn_inference` | a whole Atari DQN inference (84x84x4 input, three convolutions, two fully connected layers) on the default top, 24 tiles, every output checked against a direct convolution |
| `tb_vgg16_slice` | VGG16 layers whose reductions exceed the SRAMs: 2x2 tiles of conv5_1 (K = 4608, 2 chunks each, zero padding) and one tile of fc6 (K = 25088, 7 chunks) |

The full-size builds take two to three minutes of C++ compilation each. The
end-to-end test then runs in under a second and each workload test in about
ten seconds. The testbenches generate their own random operands and compute the
expected results with plain integer arithmetic.

## What this RTL takes from the paper and what it adds

These parts follow the paper:

* the PE grid, with the IFMAP, filter and OFMAP roles of the left, top and
  bottom edges;
* 8-bit data and output-stationary dataflow;
* one SRAM access per cycle, with port widths derived from the array edge;
* the interconnect treated as a pipeline stage of its own, next to the PE and
  SRAM stages;
* the three tier organisations of the SRAMs;
* the default sizes.

These are choices made here, where the paper gives none:

* the 32-bit signed accumulator and signed int8 operands;
* the skew buffers, valid bits and drain-by-shifting;
* the controller, its phases and its cycle count;
* the im2col operand layout;
* the dual-ported SRAMs and their collision rule;
* the shift-and-saturate requantisation;
* chained chunks for long reductions;
* the start/busy/done handshake and the reset behaviour.

Not built:

* **The LPDDR2 DRAM and its controller.** Their interface is not specified, so
  the DRAM-side SRAM ports are left at the top level.
* **Circuit-level parts.** The inter-tier vias and wire repeaters have no logic
  function, and the package is physical.
* **Bank and block organisation inside each SRAM.** That is chosen by a memory
  compiler.
* **The design-space optimizer itself.** It is software.

For scale: the DQN inference keeps the array busy for 40,089 cycles, about
50 µs at 800 MHz. Loading operands through the DRAM side is not counted in
that figure, and it dominates in a real system. The 16.7 ms per-frame latency
target has not been checked against this RTL.
Meeting it depends on clock frequency, DRAM bandwidth and how each layer is
tiled.

Other array and SRAM sizes from the paper's per-network results, such as
22x20 with (16, 16, 16) KB or 248x216 with (8192, 512, 8) KB, are parameter
settings of the same RTL. Only the default configuration has been simulated at
full size.
