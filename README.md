# SparseK: sparse-kernel convolution on a dense scalar x matrix datapath

Pruned CNNs have kernels that are mostly zero. A dense accelerator still feeds
every zero weight through its multipliers. Accelerators that skip zeros
usually need PEs that can each branch on their own operands, and those PEs are
larger and hard to keep evenly loaded.

SparseK takes a different route. It changes what the array is given, not the
processing elements (PEs). The kernel is split into 1 x 1 sub-kernels. A 2-D
convolution of an input map with one 1 x 1 sub-kernel is just the map scaled by
that weight, placed in the output at an offset that depends only on where the
weight sat in the kernel. Sub-kernels that are zero add nothing and are dropped.
The convolution then becomes a list of dense "scalar x whole map" operations,
one per nonzero weight, with their results summed at shifted positions. A plain
dense datapath does exactly that: it multiplies one scalar by a block of the
input map. The only new hardware is a small unit that computes the output
offset of each weight.

This repository holds synthesizable SystemVerilog for that accelerator. The
defaults are an 8 x 8 PE array and 128 KB for each of the kernel, input-map and
output-map buffers. It also holds self-checking testbenches for every unit and
for the whole design.

## The rule behind it

Write the full-mode 2-D convolution of an H x W input map I with an R x S
kernel K as

    O(x, y) = sum_{i<R, j<S} K(i, j) * I(x + i, y + j),   1-R <= x < H,  1-S <= y < W

The output is E x F = (H+R-1) x (W+S-1), and its first element has coordinate
(1-R, 1-S). "Same" and "valid" outputs are crops of this result.

Cut K into sub-kernels K_l of size R_l x S_l whose top-left elements sit at
(r_l, c_l). Then O is the sum of the sub-outputs I * K_l, each placed so that
its first element lands at

    alpha_l = 1 - r_l - R_l,    beta_l = 1 - c_l - S_l

in O's coordinates. A zero sub-kernel contributes nothing. With 1 x 1
sub-kernels (R_l = S_l = 1), I * K_l is K(r, c) times I, and it starts at
(-r, -c). In this design the output buffer stores O from index 0, so input
element (x', y') multiplied by weight K(r, c) is added to the buffer at

    row = x' - r + (R - 1),    column = y' - c + (S - 1)

Example: take a 3 x 3 kernel whose only nonzero weights are at (0, 1) and
(2, 0). The work is 2 passes over the map instead of 9. The first pass lands at
buffer offset (2, 1) and the second at (0, 2).

## Datapath

```
            +-----------+  value  +----------------+  products   +----------+
 KB ------->| controller|-------->| PU (8x8 PEs)   |------------>|          |
 (nonzero   |  loops    |         +----------------+             | AccUnit  |-> scatter xbar -> OB banks
  weights + |           |  r, c, block origin                    | (64 add) |        (write)
  coords)   |           |------> CCU --> bank addresses, mask,   |          |
            +-----------+         rotation                       +----------+
                 |                      |                             ^
                 v                      v                             |
 IB ----- 8x8 block ------------> PU    OB banks (read) --> gather xbar (partial sums)
```

One operation is one nonzero weight times one 8 x 8 block of one input
channel. The pipeline has three stages and issues one operation per cycle:

| stage | what happens |
|-------|--------------|
| T0 | The controller presents a kernel entry and a block index. IB is read. The CCU computes the output position. |
| T1 | The PU multiplies the weight by the 64 block elements. OB is read at the 64 per-bank addresses from the CCU. |
| T2 | The gather crossbar aligns the partial sums with the products. The AccUnit adds them. The scatter crossbar returns the sums to their banks, and OB is written. |

The loop order is: kernel entry (outermost), then block row, then block
column. Every weight visits every block of its input channel. With `nnz`
nonzero weights and `B = ceil(H/8) * ceil(W/8)` blocks per channel, the work
takes `nnz * B` issue cycles, with no bubbles. A dense kernel with the same
loops would take `R * S * C * B` cycles. The ratio between the two is the
speedup from kernel sparsity.

### Output buffer banking and the two crossbars

This is the part that needs the most care. Each weight moves the 8 x 8 product
block to a different offset. So the block that must be read, added and written
back in a cycle can start at any (row, column) of the output map, not just on
the 8 x 8 grid. OB is therefore built from 64 banks:

    output (row, col)  ->  bank (row mod 8, col mod 8),
                           word (row div 8) * ceil(F/8) + (col div 8)

An 8 x 8 block starting at any (ox, oy) touches each bank exactly once, so the
whole block is read and written every cycle without conflicts. Block element
(a, b) belongs to bank ((ox+a) mod 8, (oy+b) mod 8). Moving between block
positions and banks is therefore a 2-D rotation by (ox mod 8, oy mod 8):

* the **scatter crossbar** (`GATHER = 0`) routes the sums from block
  positions to banks;
* a second instance (`GATHER = 1`) does the inverse on the read path, so each
  partial sum meets its product.

From the one output position (ox, oy), the CCU derives everything else:

* each bank's word: a common base `(ox div 8) * ceil(F/8) + (oy div 8)`, plus
  `ceil(F/8)` for banks whose row wrapped, plus 1 for banks whose column
  wrapped;
* a write mask that drops products falling below row E or right of column F;
* the rotation.

### Back-to-back overlap

Operation n+1 reads OB in the same cycle that operation n writes it. When the
imap has a single block per channel, or at the switch from one weight to the
next, the two output blocks can overlap. Each OB bank is write-first: a read of
the word being written in the same cycle returns the new value. That covers
the only hazard distance (one cycle), so the pipeline never stalls.
`perf_fwd` counts the cycles in which this forwarding happened.

## Data formats

Operands are 16-bit signed. Products and partial sums are 32-bit and wrap on
overflow (see `sparsek_pkg.sv`).

**Kernel entry** (`kb_entry_t`, 32 bits, one per nonzero weight):

| field | width | meaning |
|-------|-------|---------|
| `val` | 16 | the weight |
| `ch`  | 8  | input channel, i.e. which imap in IB |
| `r`   | 4  | kernel row, 0..R-1 |
| `c`   | 4  | kernel column, 0..S-1 |

Kernels can be up to 16 x 16, and one job can use up to 256 input channels.

**IB layout:** one word holds an 8 x 8 block, with element (a, b) at index
a*8+b. Block (br, bc) of channel ch is word `ch*B + br*ceil(W/8) + bc`. Edge
blocks must be zero-padded beyond H and W.

**OB read-back:** `ob_rd_addr = (row div 8) * ceil(F/8) + (col div 8)` returns
the aligned output block on `ob_rd_data[a*8+b]` one cycle later.

## Running a job

1. While `busy` is low, write the nonzero kernel entries into KB
   (`kb_wr_*`) and the input blocks into IB (`ib_wr_*`).
2. Drive `cfg` and pulse `start`. The `cfg` fields are:
   * `h`, `w`: imap size;
   * `rm1`, `sm1`: R-1 and S-1;
   * `kb_base`, `kb_count`: the entries of this output channel;
   * `clear`: zero the output map first.
3. Wait for the `done` pulse. The job takes exactly
   `1 + (clear ? ceil(E/8)*ceil(F/8) : 0) + nnz*B + 2` cycles from `start`,
   and `perf_cycles` reports that number.
4. Read the output map block by block.

One job computes one output channel. Input channels that do not fit in IB at
once are split across jobs: run the first with `clear = 1` and the rest with
`clear = 0`, so they accumulate in OB. The same full-mode property lets a large
input map be cut into spatial tiles. Each tile's full-mode result is added to
the output at the tile's offset, with overlapping borders summed. The host does
that addition.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `PX`, `PY` | 8, 8 | PE array, and the IB block and OB bank grid |
| `KB_DEPTH` | 32768 | kernel entries (128 KB) |
| `IB_DEPTH` | 1024 | 8x8 blocks of 16 bits (128 KB) |
| `OB_DEPTH` | 512 | words per OB bank; 64 banks x 32 bits = 128 KB |

The 8 x 8 array and the 128 KB buffers are the configuration of the published
design. Everything else is this implementation's own choice, including:

* the operand and partial-sum widths;
* the entry packing and the memory layouts;
* the OB banking and the crossbar structure;
* the pipeline, the forwarding and the loop order;
* the clear pass;
* the host interface and the counters.

The published description gives only the block diagram and what each unit
does.

Capacity at the defaults:

* **Output map:** one job's full-mode output must satisfy
  `ceil(E/8) * ceil(F/8) <= 512`. For example, a 176 x 176 output fits; a 224 x 224
  VGG16 first-layer map at 3 x 3 (226 x 226) must be split into tiles.
* **Input map:** IB holds `1024 / B` channels, e.g. 20 channels of 56 x 56, or
  all 256 channels of a 13 x 13 map.

## Limits and departures

* **Stride 1 only.** Strided layers (AlexNet conv1, GoogLeNet conv1) would
  have to be computed at stride 1 and subsampled.
* **No data reuse inside the PU.** Each PE gets its operand straight from IB.
  The dense design this derives from can reuse data between neighbouring PEs;
  that optimisation is not modelled.
* **Host-side work.** The host compresses the kernel (drops zeros, builds
  entries). It also tiles large layers and adds the tile borders. There is no
  hardware for these steps.
* **Kernel sparsity only.** Only the kernel is compressed. Zero activations
  still take their place in an 8 x 8 block. Compressing the input map instead
  keeps the kernel whole and multiplies a scalar activation by a kernel
  matrix. Compressing both turns each operation into a Cartesian product of
  two vectors, with a coordinate for every product and bank conflicts in the
  output buffer. Both are different machines and are not part of this one.
* **Memories.** All buffers are plain arrays with one read and one write port
  per bank. They are not SRAM macros.

## Files

* `rtl/sparsek_pkg.sv`: widths, kernel-entry and job-configuration types.
* `rtl/sparsek_top.sv`: the accelerator.
* `rtl/sparsek_ctrl.sv`: loop sequencer, clear pass and KB read-ahead.
* `rtl/ccu.sv`: output-coordinate computation, bank addresses, mask and
  rotation.
* `rtl/pu.sv` and `rtl/pe.sv`: the 8 x 8 multiplier array.
* `rtl/acc_unit.sv`: the 64 accumulation adders.
* `rtl/scatter_crossbar.sv`: rotation crossbar, in both directions.
* `rtl/kernel_buffer.sv`, `rtl/imap_buffer.sv`, `rtl/output_buffer.sv`: the
  three buffers.
* `tb/tb_<module>.sv`: a self-checking testbench for each module.
* `tb/tb_sparsek_top.sv`: end-to-end random convolutions at the default size.
  Each result is checked against a direct convolution, together with the exact
  cycle count of each job. The cases cover:
  * single-block maps (forwarding);
  * ragged edges;
  * 1 x 1 and 7 x 7 kernels;
  * two-job accumulation;
  * a dense kernel;
  * an empty kernel.
* `tb/tb_sparsek_layers.sv`: layer shapes from the evaluated networks:
  * a 16-channel group of VGG16 conv3_2 (56 x 56, 3 x 3);
  * AlexNet conv3, whole (13 x 13 x 256, 3 x 3);
  * the GoogLeNet inception-3a 5 x 5 branch (28 x 28 x 16).

  It prints the cycles used against the cycles a dense kernel would need.
* `tb/tb_sparsek_scale.sv`, with its driver `tb/sparsek_scale_run.sv`: the
  same kind of random convolutions on 4 x 4, 9 x 9 and 16 x 16 PE arrays.
  9 x 9 is included because it is not a power of two.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, name the package and the testbench; the library search paths
(`-y`) find the other modules by file name:

```
verilator --binary --timing --assert -y rtl -y tb \
          rtl/sparsek_pkg.sv tb/tb_sparsek_top.sv -o sim
./obj_dir/sim
```

Replace `tb_sparsek_top` with any other testbench name. All of them run in
well under a minute. The unit testbenches and `tb_sparsek_top` and
`tb_sparsek_layers` use the default parameters. Random stimulus comes from
`$urandom`, so `+verilator+seed+N` together with `+verilator+rand+reset+2`
gives other runs.
