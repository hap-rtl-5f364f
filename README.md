# HAP: a bit-serial GEMM core for adaptive-precision activations

Eight-bit activations in a DNN are mostly small. If a group of activations
is coded relative to its own minimum, it needs far fewer bits than eight.
This core exploits that.

Activations are coded with **dynamic asymmetric re-quantization (DAR)**. The
values of one input channel within a tile form a group of GS = 16 rows. Each
group stores:

- its offsets from a per-group **dynamic zero-point (DZP)**;
- a precision b = ceil(log2(range + 1)), between 1 and 8 bits;
- a 3-bit precision code.

A bit-serial processing array then spends b cycles on a group instead of 8.

The difficulty is that the array multiplies L = 16 groups at once, one per
multiplier lane. An iteration lasts as long as its widest group, so lanes
given narrower groups sit idle. The **reorder engine** fixes this. Before
the groups reach the array, it picks, for each iteration, one group from
each of the L input-channel slices so that their precisions are as close as
possible. The weight rows are reordered with them, so the result does not
change.

The RTL is synthesizable SystemVerilog 2017. All parameter defaults are the
main configuration:

| Parameter | Default | Meaning |
|---|---|---|
| M × N | 16 × 32 | PE array size |
| L | 16 | multipliers per PE |
| B | 8 | maximum precision |
| R | 8 | register-page entries |
| WS_MAX | 3 | widest blending window |
| — | 32 bits | accumulator width |

## Arithmetic: three terms per output

Write a DAR activation as `a = q + Z̃ − Za`:

- `q` is the variable-precision offset;
- `Z̃` is the group's DZP (8 bits);
- `Za` is the layer's static zero-point.

Let the weights be `w`. Each output is then the sum of three terms:

    y[i][j] = P_A + P_D + P_S
    P_A = Σ_k q[i][k] · w[k][j]     variable precision, bit-serial, reordered
    P_D = Σ_k Z̃[k]   · w[k][j]     one DZP per column group, same for all 16 rows
    P_S = −Za · Σ_k w[k][j]         static; computed outside and given on the ps port

**P_A** is computed bit-serially:

- In one cycle, lane l of every PE takes one bit of its group's activation
  and a 4-bit weight slice.
- The L one-bit products are summed in an adder tree.
- The sum is shifted left by the bit position and accumulated.

**P_D** reuses the array:

- The DZP is split into its 8 bits, and bit b goes to array row b with a
  shift of b.
- M = 16 rows hold two 8-bit DZP vectors, those of two tiles.
- After K/L cycles, log2(8) = 3 **aggregation steps** add the 8 rows of each
  group.
- In step s, row r adds the accumulator of row (r − 2^s) mod 8 within its
  group, so that row 0 of each group holds the tile's P_D.
- A multiplexer in front of each accumulator selects between its own shifted
  sum and the neighbour's accumulator.

A layer may have DZPs switched off (`cfg_dzp_en = 0`), in which case the P_D
pass is skipped.

**8-bit weights** serve the output channels kept at higher precision. Each
byte is processed as two 4-bit slices on consecutive cycles:

- the signed upper nibble, shifted by 4 more;
- the unsigned lower nibble.

Whether a slice is sign-extended is the only difference, and a single
`is_signed` bit selects it. With 4-bit weights, the lower nibble of each
stored byte is used, as a signed value.

## The reorder engine

There is one **address generator** and one **register page** per
input-channel slice (submatrix).

**Address generator** (`hap_addr_gen`):

- Reads 3-bit precision codes (precision − 1) from its precision buffer.
- Produces, for each group, the weight-row address and the activation
  address.
- The weight address advances by 1 per group.
- The activation address advances by the group's precision, because a group
  of precision p occupies p bit-plane words.

**Register page** (`hap_reg_page`) has R = 8 entries. Each entry holds:

- a valid bit and a 3-bit precision code (the 4-bit tag);
- a 12-bit weight-row address and a 12-bit activation address (24 bits of
  data).

Free entries are refilled as long as there is input. All pages are filled
together, one entry each per cycle, so they always hold the same number of
entries.

**Matching and precision blending.** Each page decodes its entries into
`pres[b]`, meaning "some entry has precision b". It then forms events
E(b, ws): some entry has a precision in [b − ws + 1, b], for ws = 1..3. The
global check (`hap_global_check`) then:

1. ANDs each event over all 16 pages.
2. For each window size, priority-encodes the highest matched precision g.
3. Takes the smallest window size that has a match. Exact matches win over
   blended ones, and higher precisions over lower ones.

Each page then masks its precisions to [g − 2, g] and dispatches its highest
one there. The iteration runs for g cycles. Lanes whose group is narrower
idle for the cycles above their own precision; their bit positions are
simply not issued.

**Exceptions.** Two cases have no match:

- the pages are full;
- no more input is coming and entries are left.

In both, every page dispatches its highest precision, and the iteration
runs for the largest of them.

**Dispatch.** Associative matching picks, within each page, the
highest-numbered entry with the page's dispatch precision. That entry's
addresses go out and its valid bit is cleared. One iteration can be
dispatched per cycle into a one-deep output register with a valid/ready
handshake.

The pages are flip-flops. All of the matching logic is combinational within
one cycle.

## Buffers and data layout

The buffers are simple dual-port memories with synchronous read (`hap_sram`).
There are 16 banks of each input buffer, one per submatrix:

| Buffer | Word | Depth | Content |
|---|---|---|---|
| activation | 16 bits | 4096 | bit-plane word: bit i of row i's group value, for one bit position of one group; plus one DZP word per input channel |
| weight | 32 × 8 bits | 512 | one weight row (N output columns) per input channel |
| precision | 3 bits | 1024 | precision codes of the groups, tile after tile |
| output | 32 × 32 bits | 32 | result rows of the two tiles of a job |

**Activation groups.** A group of precision p is stored as p consecutive
words, LSB plane first.

**DZP words.** A DZP word holds, for one input channel, both tiles' DZPs.
Bit t·8 + b is bit b of tile t's DZP.

**Submatrices.** Submatrix l covers input channels l·K/L to (l+1)·K/L − 1.

This comes to about 394 KB in total. The reference configuration of the
architecture budgets 640 KB of on-chip SRAM without fixing how it is split;
the split and depths here are this design's choice and are set by the
`*_DEPTH` parameters of `hap_top`.

## Job schedule and timing (`hap_controller`)

A job is two 16-row tiles sharing one weight tile, K input channels by 32
columns. It runs in four steps:

1. **P_D pass** (skipped when DZPs are off). K/L cycles, or 2·K/L with 8-bit
   weights, then 3 aggregation steps. After that, P_D of each tile is
   captured into registers.
2. **For each tile:** clear the accumulators, start the reorder engine on
   the tile's precision codes, and execute every dispatched iteration. An
   iteration of length g takes g cycles, or 2g with 8-bit weights. Iterations
   follow each other without gaps.
3. **Write-back:** 16 rows, one per cycle. Each row is P_A + P_D + P_S.
4. `done` pulses.

With all precisions equal to p, the whole job takes this many cycles,
counting from the cycle after `start` up to and including the cycle in which
`done` rises:

    (dzp_en ? K/L·n + 6 : 0) + 2·(K/L·p·n + 24) − 1      (n = 2 for 8-bit weights, else 1)

The P_D pass adds 6 cycles to its K/L·n:

- 1 cycle to clear;
- 1 cycle of read pipeline;
- 3 aggregation steps;
- 1 cycle to capture.

Per tile, the 24 cycles of overhead are:

- 1 cycle to clear the accumulators;
- 4 cycles to start the reorder engine;
- 3 cycles of pipeline and hand-over (buffer read, accumulate, end of tile);
- 16 cycles of write-back.

Apart from that overhead, a tile costs (p̄/γ + 1/2)·K/L + 3/2 cycles, where:

- p̄ is the average precision;
- γ is the lane utilisation;
- the 1/2 and 3/2 terms are the P_D pass and aggregation, shared by the two
  tiles.

Write-back is not overlapped with the next tile's compute.

**Counters.** The controller counts:

- iterations;
- P_A and P_D cycles;
- aggregation steps;
- busy lane-cycles against available lane-cycles, which gives the lane
  utilisation.

The reorder engine counts exact matches, blended matches, full-page
exceptions and drain exceptions. These counters are for test and profiling.

## Top level and host interface (`hap_top`)

The host loads the input buffers through a write port:

- `host_sel` picks the activation, weight or precision buffer;
- `host_lane` picks the submatrix;
- precision codes use the low 3 data bits.

A job is then configured and started with:

- `cfg_kl = K/L`;
- `cfg_wgt8`, for 8-bit weights;
- `cfg_dzp_en`;
- the weight base and DZP base;
- per tile, the precision-buffer base and one activation base per submatrix;
- `ps`, the P_S term per output column.

Results are read through `ob_re`/`ob_raddr`, one cycle after the request.
Row t·16 + i holds row i of tile t.

## Where this RTL stops

The RTL covers the compute core only:

- **DAR pre-processing happens before the core.** Computing the groups,
  DZPs and precision codes of the activations is outside the core, and so is
  P_S.
- **Weight-channel selection is offline.** Choosing which weight channels
  get 8 bits, and reordering them, is done in advance.
- **No DRAM or DMA.** The host port stands in for them.
- **K is not split across jobs.** A job's K must fit the buffers: up to
  8192 input channels by the weight bank, and fewer when activation
  precisions are high. Larger K needs the partial outputs to be added
  outside.

Choices made here where the architecture leaves freedom, and that a
user may want to change:

- **Per-tile overhead is not hidden.** The 16-cycle write-back and the
  4-cycle reorder-engine start-up are not overlapped with compute. This
  costs 20 of every few hundred cycles of a typical tile.
- **P_D placement.** The P_D pass runs before the two P_A passes, and its
  results wait in registers until write-back.
- **Lockstep pages.** Pages are filled in lockstep, which keeps "pages
  full" a single condition.
- **Entry selection.** A dispatch takes the highest-numbered matching
  entry, and a refill uses the lowest-numbered free entry.
- **Aggregation pattern.** The ring pattern of the aggregation steps is
  this design's. Any pattern that sums 8 rows in 3 steps would do.

Other limits:

- Reset is synchronous and active low.
- All sums wrap at 32 bits.
- The memories are plain arrays and would map onto SRAM macros in a real
  implementation.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>`:

| Testbench | What it covers |
|---|---|
| `tb_hap_pe` | multiplier, sign extension, shift, aggregation mux |
| `tb_hap_pe_array` | row and column broadcast, aggregation ring (small array) |
| `tb_hap_sram` | memory against a model |
| `tb_hap_addr_gen` | address sequences and handshake |
| `tb_hap_reg_page` | worked dispatch example, plus random operations against a model |
| `tb_hap_global_check` | worked example, plus random events against a model |
| `tb_hap_reorder_engine` | every group dispatched exactly once; dispatch rules against a model; full/drain/blend events |
| `tb_hap_controller` | whole core at a reduced size (L = 2, 8 × 3 array), including exact cycle counts |
| `tb_hap_top` | whole core at the default size, five jobs |
| `tb_hap_workloads` | layer GEMMs of ViT-B, DeiT-S, OPT-1.3B and ResNet18/VGG19 at the default size, with utilisation |

`tb_hap_top` runs five jobs at the default size:

- spread precisions;
- close precisions;
- equal precisions;
- 8-bit weights;
- DZP off.

It compares every output with Σ(q + Z̃ − Za)·w. It checks the cycle and
utilisation counters, and requires each mechanism to have occurred. These
mechanisms are:

- exact match;
- blended match;
- full-page exception;
- drain exception;
- 8-bit mode;
- DZP pass;
- DZP off.

`tb_hap_workloads` runs GEMMs with the K of real network layers. The
activation precisions are synthetic: a long-tailed mix with a mean of about
4.4 bits. The table gives the lane utilisation with the reorder engine and
without it (group j of every submatrix in the same iteration):

| Layer | K | Utilisation | Without reordering |
|---|---|---|---|
| DeiT-S attention projection | 384 | 81% | 60% |
| ViT-B attention projection | 768 | 84% | 61% |
| ViT-B attention projection, 8-bit weights | 768 | 84% | 60% |
| ViT-B MLP down-projection | 3072 | 86% | 60% |
| OPT-1.3B attention projection | 2048 | 83% | 60% |
| 3×3×256 convolution (ResNet18/VGG19), DZP off | 2304 | 86% | 60% |


To build and run a testbench, for example:

    verilator --binary --timing --assert -Irtl rtl/hap_pkg.sv rtl/hap_*.sv \
        tb/tb_hap_top.sv --top-module tb_hap_top -Mdir obj_top
    ./obj_top/Vtb_hap_top

The package `hap_pkg.sv` must come first. The full-size test compiles in a
few minutes and runs in seconds.
