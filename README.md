# Multiplexed weight-stationary systolic array for pruned CNNs

Unstructured pruning can remove most of a CNN's weights without hurting
accuracy. The surviving weights are scattered, though. A regular systolic
array then ends up multiplying mostly zeros. This design keeps a plain 64 × 64
weight-stationary array busy with such weights, using three ideas:

1. **Compaction (offline).** The non-zero weights of each column of the
   weight matrix are pushed together into a dense cluster. Each weight keeps
   the number of its original output row, called its *index*.
2. **Column blocks (offline).** The cluster is cut into vertical blocks of
   two heights: a primary height `p` and a secondary height `q = 64 mod p`,
   for example 26 × 1 and 12 × 1. A `p × 1` block is `p` weights that all
   multiply the same input stream, each for a different output row.
3. **Array multiplexing (hardware).** Some PE rows have a 2:1 input
   multiplexer in every column. When a multiplexer row is enabled, the array
   splits there into a separate band with its own input streams. Blocks that
   need different inputs can then run at the same time, stacked in one
   column. For `{26 × 1, 12 × 1}` the array runs as bands of 26, 26 and 12
   rows.

Because the index changes from PE to PE, products in one PE row can no longer
be summed blindly from left to right. So the PEs have no adders. Each PE row
sends its products to a *selection module*. It adds the products that belong
to the same output row and stores each sum at the right place in the output
buffer.

The RTL here is the hardware part: array, multiplexers, controller, selection
modules and buffers. Pruning, compaction, block-size selection and the
placement of the multiplexers are design-time software. They are not part of
the RTL.

## Array and bands

`sa_array` is a K × K grid of `sa_pe` (K = 64). The default multiplexer rows
are 16, 26, 32, 48 and 52, which is 320 multiplexers. This is the union of the
band boundaries that the three block-size sets need:

| block set        | enabled mux rows | bands (rows)        | used for (evaluated networks) |
|------------------|------------------|---------------------|-------------------------------|
| none (64 × 1)    | –                | 0–63                | conventional array            |
| {26 × 1, 12 × 1} | 26, 52           | 0–25, 26–51, 52–63  | VGG-16, VGG-19                |
| {32 × 1}         | 32               | 0–31, 32–63         | PreResNet-110                 |
| {16 × 1}         | 16, 32, 48       | 4 bands of 16       | DenseNet-BC-40, DenseNet-BC-100 |

The mode register (`cfg_band_en`, one bit per row) selects the enabled rows.
Bits for rows without multiplexers, and the bit for row 0, are ignored.
The table describes full rows (the default); see `MUX_MASK` below for
partly populated ones.

**Input slots.** Slot 0 feeds the top row. Slot `s` feeds the `s`-th
multiplexer row counted from the top. With the defaults, slots 1 to 5 are rows
16, 26, 32, 48 and 52. The input buffer has one bank per slot. Each bank entry
is a whole vector of K 8-bit inputs, one per column. All banks are read at the
same vector index `t`. So every band starts on vector `t` in the same cycle.
A disabled slot is read but not used.

**Data flow.** In each column, an input moves down one PE per cycle. Each PE
multiplies it by its stationary signed 8-bit weight and registers the 16-bit
product. All columns of a band get their input in the same cycle. No column
skew is needed, because nothing is added inside the array.

**Tags.** A tag `(valid, t)` enters every band start together with the data
and moves down beside it, one tag per PE. The tag of a PE labels its product
in that cycle. A PE `l` rows below its band start shows vector `t` `l + 1`
cycles after the vector entered. Each PE also knows its band's slot number.
The output buffer needs that slot number.

## Add or store: controller and selection modules

Weights are loaded one PE row per cycle (`wl_*`). Each load carries the
K weights, the K indexes (original output rows) and K presence bits `wv`. An
absent slot gets weight 0. When a row is loaded, `sa_ctrl` computes an
*effective index* for each slot: an absent slot takes the index of its left
neighbour. It also computes one flag per PE:

    add_left[r][c] = (c > 0) && eff_idx[r][c] == eff_idx[r][c-1]

A set flag means "add this product to the run on the left". A clear flag means
"start a new run, which is stored separately". These flags stay in registers
for the whole round.

`sa_sel`, one per PE row, is a segmented parallel-prefix adder (Hillis–Steele
scan, log2 K = 6 levels). The run-start flags stop each partial sum at its run
boundary. After the last level, the last column of each run holds that run's
total. The module registers one write lane per column:

- `wr_en` is set at the run ends that contain at least one present weight;
- `wr_idx` is the run's index;
- `wr_val` is the 32-bit sum.

So a PE row with `n` different output rows produces `n` stores per cycle.

## Output buffer

`sa_obuf` holds a 32-bit accumulator for every pair (output row, vector),
with 2^IDX_W = 512 output rows and D_MAX = 64 vectors. Each store *adds* into
its accumulator. Later rounds can therefore add more column blocks of the same
output rows, and a whole layer is the sum over its rounds. `ob_clr` clears the
buffer at the start of a layer.

Stores from all 64 rows arrive in the same cycle. The buffer has one bank per
band slot, so that two stores never hit the same accumulator:

- **Within a band:** rows at different depths carry different vectors `t`, so
  they write different accumulators.
- **Across bands:** rows at the same depth in different bands carry the same
  `t`. They write different banks.
- **Within a row:** the runs have different indexes, provided the mapping
  follows the rule below.

The read port returns the sum of all banks one cycle after `ob_rd_en`.

**Mapping rule.** Within one PE row, equal indexes must sit in adjacent
columns. Absent slots between them are allowed. Otherwise one row would store
twice to the same accumulator in one cycle. The offline mapper has to respect
this rule. The bench shows one way: when a block would break the rule, it
moves the block to a later round.

## Running a round

All signals are sampled on the rising edge. Reset is synchronous and active
low.

1. `cfg_we` with `cfg_band_en` sets the mode.
2. K cycles of `wl_valid` load the PE rows.
3. `ib_we` writes vector `ib_addr` of slot `ib_slot` into the input buffer, for
   each slot in use.
4. `start` with `d_len` (1 to D_MAX) runs a round over vectors
   0 … `d_len` − 1:
   - the controller reads one vector per cycle and passes the tags along;
   - when nothing is left in flight, it pulses `done`;
   - `busy` is high from the cycle after `start` until `done`;
   - mode and weight writes are ignored while `busy` is high.
5. After the last round of a layer, read Y[i][t] with `ob_rd_*`.

**Round length.** `done` rises `d_len + H + 3` cycles after the edge that
samples `start`. `H` is the height of the tallest enabled band. The 3 extra
cycles are the buffer read, the selection-module register and the end
decision. Loading weights and inputs is not overlapped with computing. The
latency model behind the design charges `(p + D)` per round plus `p` once. This
implementation adds the three extra cycles per round, plus the load time.

A layer whose GEMM width D is larger than D_MAX runs in tiles of D_MAX
vectors. A layer with more than 512 output channels is split into groups of
output rows. CIFAR-100 layers of the networks above have D up to
32 × 32 = 1024 (16 tiles) and at most 512 output channels.

## Parameters

| parameter  | default                | meaning |
|------------|------------------------|---------|
| `K`        | 64                     | array size (K × K PEs) |
| `MUX_ROWS` | rows 16, 26, 32, 48, 52 | rows that have input multiplexers |
| `MUX_MASK` | all ones               | per-PE mask: which columns of those rows keep their multiplexer |
| `IDX_W`    | 9                      | index width; the output buffer has 2^IDX_W rows |
| `D_MAX`    | 64                     | vectors per round (buffer depth) |
| `DATA_W`, `ACC_W` (package) | 8, 32 | operand and accumulator widths |

K, the multiplexer rows and the 8-bit data width come from the source
architecture. IDX_W, D_MAX, the 32-bit accumulators, the signed operands, the
host interface, the per-slot banking of both buffers, the per-PE mask
`MUX_MASK`, the tag pipeline and the prefix-adder structure are this
implementation's own choices.

## Where this implementation departs from the source architecture

- **Multiplexer placement.** The source prunes the five full rows with a
  genetic algorithm, down to 167 multiplexers at scattered positions. Those
  positions are not reproduced. The hardware can still express such a
  placement: `MUX_MASK` has one bit per PE and keeps a multiplexer only where
  both its row (in `MUX_ROWS`) and its bit are set. In a partly populated row,
  the columns without a multiplexer stay in the band above, so one PE row can
  carry two different input vectors. Every PE therefore has its own tag and
  band slot, and the controller never joins neighbours from different bands
  into one run. The mapper has to use the band heights of each column.
- **Block sizes per network.** The source is inconsistent about which block
  set DenseNet uses. The table above follows the multiplexer counts reported
  per network: 2 rows for VGG, 1 for PreResNet, 3 for DenseNet. The hardware
  supports all the modes anyway.
- **Mapping rule.** The output buffer can only take one store per output row
  per PE row per cycle. This is why the adjacency rule above exists. The
  source leaves the store path unspecified.

## Files

| file | contents |
|------|----------|
| `rtl/sa_pkg.sv`   | types, widths, default multiplexer rows, slot helper functions |
| `rtl/sa_pe.sv`    | PE: weight register, multiplier, optional 2:1 input multiplexer |
| `rtl/sa_array.sv` | K × K PE grid, band starts, tag pipeline |
| `rtl/sa_sel.sv`   | selection module (segmented prefix adder per PE row) |
| `rtl/sa_ctrl.sv`  | mode and index registers, add/store flags, round sequencer |
| `rtl/sa_inbuf.sv` | input buffer, one bank per slot |
| `rtl/sa_obuf.sv`  | accumulating output buffer, one bank per slot |
| `rtl/sa_top.sv`   | top level with host interface |
| `tb/*_tb.sv`      | one self-checking testbench per module |
| `tb/sa_top_bench.sv` | end-to-end bench shared by `sa_top_tb` and `sa_top_full_tb` |

## Verification

Every testbench checks itself. Each prints `TB_RESULT checks=N failures=M` and
has a watchdog.

- **`sa_pe_tb`, `sa_sel_tb`, `sa_ctrl_tb`, `sa_inbuf_tb`, `sa_obuf_tb`:** test
  each module against a reference model in the testbench, with random
  stimulus.
- **`sa_array_tb`:** runs the full 64 × 64 array in five modes, with rows 26
  and 48 populated only in even columns. It checks every product, each PE's
  band number and the arrival cycle of each vector.
- **`sa_ctrl_tb`:** also checks the round sequencer's cycle counts.
- **`sa_top_tb`:** a 16 × 16 array with mux rows 4, 6, 8 and 12, where row 6
  has multiplexers only in columns 0 to 9. It plays four
  random pruned layers, one per mode: it compacts them, covers them with
  blocks, places the blocks under the adjacency rule and runs them. It
  compares every output with W · X computed directly, checks every round's
  cycle count, and counts a failure for any mechanism that never happened:
  - band split,
  - mode change,
  - add to neighbour,
  - separate store,
  - absent slot,
  - multi-round accumulation,
  - clear.
- **`sa_top_full_tb`:** does the same with `sa_top` at its default
  parameters. It runs three layers of 128 × 96 weights × 64 vectors in the
  modes {26, 12}, {32} and {16}, taking 27 rounds in all. It runs in about
  3 minutes.

Simulating one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/sa_pkg.sv tb/sa_top_tb.sv --top-module sa_top_tb
    ./obj_dir/Vsa_top_tb

Replace `sa_top_tb` with any other testbench name. Linting the design:

    verilator --lint-only -Wall -y rtl rtl/sa_pkg.sv rtl/sa_top.sv --top-module sa_top

Linting leaves a few unused-signal warnings. They come from PEs without a
multiplexer, whose `x_buf`/`sel_buf` inputs are unused, and from the last row
and the final scan level, whose outputs are not needed.

The output buffer is built from flip-flops, with K × K write lanes. This is
fine for simulation. A chip would need SRAM banks and a store path with fewer
ports.
