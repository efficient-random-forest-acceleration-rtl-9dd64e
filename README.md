# Random forest inference accelerator with pipelined Decision Tree Units

This is synthesizable SystemVerilog for a random-forest inference engine
built for small FPGA edge platforms, such as a Zynq-7020 board. It has two
main ideas:

* **Interleaved tree walking.** Walking a decision tree is a chain of
  dependent steps: read a node, compare one sample feature with the node's
  threshold, pick the child. A Decision Tree Unit (DTU) makes that step a
  five-cycle pipeline: two cycles of Block-RAM read and three cycles of
  floating-point compare. It keeps the pipeline full by walking five trees at
  once, one from each of five *subsets*. The unit reads one node per cycle,
  and each tree moves one level down every five cycles.
* **A 32-bit node word.** Every node, internal or leaf, fits in one word.
  Children and following trees are found through short relative offsets, not
  fixed-size slots, so trees of any shape pack tightly.

The number of DTUs (`N_DTU`, 15 by default) is a synthesis parameter. A
small device can be given fewer units. All DTUs work on the same sample,
each on its own share of the forest. An Accumulator merges their leaf
results into a sum (regression) or a majority vote (classification). The
host loads the trees and samples, and reads the results, through one
AXI4-Lite slave port.

```
             AXI4-Lite
                 |
            axil_slave ---- address decode (region number) ------------+
              |        |                         |                     |
            xregs   sample_buffer          dtu 0 ... dtu N-1 (port A of each tree RAM)
              |        | one sample (N_FEAT x binary16), shared       |
              |        +-------------> dtu 0 ... dtu N-1              |
              |  start / busy               | leaf results            |
              +---------------------> accumulator <-------------------+
```

## Tree memory format

Each DTU has its own dual-port tree memory of `MEM_DEPTH` 32-bit words.
The layout below is what the hardware walks. It has to be produced by
whatever software converts a trained forest.

```
word 0..4   subset headers   [31:1] absolute start address of subset k
                             [0]    1 = this is the last non-empty subset
word 5..    subset 0 trees, then subset 1 trees, ... (any order of subsets
            is allowed; headers hold absolute addresses)

internal node  [31:22] right_rel   address of the right child minus own address
               [21:17] feature     feature index, 0..31
               [16:1]  threshold   IEEE 754 binary16
               [0]     0           isLeaf
leaf node      [31:18] next_rel    address of the next tree's root minus own address
               [17:16] 00          reserved
               [15:2]  result      14-bit float (binary16 without its 2 lowest
                                   mantissa bits), or a class label
               [1]     isLast      1 = last tree of this subset
               [0]     1           isLeaf
```

Trees are stored in pre-order. The left child is always the word right after
its parent, so only the right child needs an offset. The walk is:

* **Internal node.** If `feature_value <= threshold`, go left to
  `addr + 1`. Otherwise go right to `addr + right_rel`.
* **Leaf.** Emit `result`. If `isLast` is 0, continue at
  `addr + next_rel`, the root of the next tree in the same subset.
  Otherwise the subset is finished.

Every leaf of a tree that is not the last in its subset stores the distance
to the same next root, so the distances differ from leaf to leaf.

The offset widths set the tree-size limits. A right offset of 10 bits
(at most 1023) is enough for trees up to depth 9: the largest left subtree
of a depth-9 tree has 511 nodes. A 14-bit next-tree offset allows trees up
to 16383 words.

If a DTU holds fewer than five trees, set bit 0 in the header of the last
subset it uses. The headers after that one are then ignored, whatever they
contain, and those subsets count as finished at once. Spread the trees
evenly over the five subsets (`n` or `n+1` trees each). The run time is set
by the subset that visits the most nodes.

## The DTU pipeline

`dtu` connects three parts:

* `dtu_controller`, which picks the addresses;
* `dtu_node_ram`, a true dual-port memory with a two-cycle read. Port A is
  on the bus and port B belongs to the pipeline;
* `fp16_cmp_pipe`, a three-stage comparator.

A tag (slot, kind, address) and the node word travel down a shift register
beside the data:

| cycle | what happens to one slot |
|---|---|
| t   | controller issues the address (RAM address register) |
| t+1 | RAM array read, output register |
| t+2 | node word available: the feature is chosen from the sample and enters the comparator; a leaf's result is registered towards the Accumulator |
| t+3, t+4 | comparator stages 2 and 3 |
| t+5 | controller sees the comparison and issues this slot's next address |

Because a slot comes back exactly five cycles after it left, the controller
needs no scoreboard. The five slots simply take turns, and every cycle it
handles the slot that is returning.

After `start`, the controller spends cycles 1 to 5 reading header words
0 to 4. Each header returns in its own slot and launches that subset's first
root. A subset that visits `V_k` nodes in total, over all its trees, is
finished at cycle `7 + k + 5*V_k` after the start pulse. `done` pulses at
the maximum of that over k. An empty subset counts `V_k = 0`. The
testbenches check this formula to the cycle.

The comparator treats features and thresholds as binary16. It computes
`a <= b`, with +0 equal to -0 and any NaN comparing false (the sample goes
right). It takes one comparison per cycle:

1. stage 1 registers the operands;
2. stage 2 compares the magnitudes and classifies the operands (signs, zero,
   NaN);
3. stage 3 combines these into the result.

## Results: the Accumulator

Every cycle each DTU may deliver one leaf result, so up to `N_DTU` results
arrive together. `accumulator` is a two-stage pipeline: it converts each
result in the first stage, and in the second adds them through an adder tree
into the running totals.

* **Regression** (CTRL.mode = 0). The 14-bit float (1 sign, 5 exponent and
  8 mantissa bits, bias 15) is turned into an exact signed multiple of
  2^-22: `(256+m) << (e-1)` for normal numbers and `m` for subnormals. These
  values are summed in a 64-bit register. The sum is exact and does not
  depend on order. Read it from SUM_HI:SUM_LO and divide by 2^22 and by the
  number of trees to get the forest's mean prediction. That division is left
  to the host.
* **Classification** (mode = 1). The low `log2(N_CLASSES)` bits of the
  result field are a class label. The Accumulator counts votes per class.
  CLASS returns the class with the most votes, the lowest index winning a
  tie, together with its vote count.

LEAVES counts the results accumulated. After a good run it equals the number
of trees in the enabled DTUs.

## Registers, address map and a run

The AXI4-Lite slave accepts one transaction at a time. Every read has a
fixed internal latency of two cycles. The address space is made of regions
of 2^R bytes, and `addr[R+4:R]` selects the region. R is 16 (64 KiB)
unless a tree memory or the sample buffer is larger. In that case R grows
to fit it, and CONFIG[20:16] reports R to the host.

| region | contents |
|---|---|
| 0 | exchange registers (below) |
| 1 | sample buffer, write only: sample `s`, features `2w` (low half) and `2w+1` (high half) at byte `s*N_FEAT*2 + 4w` |
| 2+d | tree memory of DTU d, word `i` at byte `4i` (read and write) |

| offset | register | meaning |
|---|---|---|
| 0x00 | CTRL | bit 0: write 1 to start; bit 1: mode (1 = classification) |
| 0x04 | STATUS | bit 0 busy, bit 1 done (cleared by the next start) |
| 0x08 | SAMPLE | index of the sample to process |
| 0x0C | DTU_EN | one enable bit per DTU, all ones after reset |
| 0x10/0x14 | SUM_LO/HI | regression sum, signed, units of 2^-22 |
| 0x18 | CLASS | [15:0] majority class, [31:16] its votes |
| 0x1C | LEAVES | leaf results accumulated |
| 0x20 | CYCLES | clock cycles from the start write until done |
| 0x24 | CONFIG | [7:0] N_DTU, [15:8] N_FEAT, [20:16] R |

SAMPLE, DTU_EN and the mode are only accepted while the unit is idle.

A run goes through these steps (`xregs`):

1. Clear the Accumulator and read the selected sample into a register that
   feeds every DTU (1 cycle).
2. Wait for the sample row (1 cycle).
3. Pulse `start` to the enabled DTUs.
4. Wait until no DTU is busy.
5. Wait until the Accumulator pipeline is empty.
6. Latch the results and set done. The `done` output mirrors STATUS.done.

CYCLES equals `6 + max over enabled DTUs of (max_k (7 + k + 5*V_k))`. One
sample is processed per start.

Host sequence: write each DTU's tree image and the samples; then, for each
sample, write SAMPLE (plus DTU_EN and the mode if they change), write
CTRL = 1 or 3, poll STATUS until bit 1 is set, and read SUM or CLASS.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| rf_accel_top | N_DTU | 15 | 1..30 (address map limit); the original evaluation used 1 to 15 |
| | MEM_DEPTH | 8192 | words per DTU tree memory |
| | N_FEAT | 32 | power of two; the 5-bit feature field addresses 32 |
| | SAMPLE_DEPTH | 1024 | samples in the local buffer |
| | N_CLASSES | 16 | classes counted in classification mode |
| axil_slave | READ_LAT | 2 | internal read latency |

The fixed node-word fields (10/5/16 bits internal, 14/14 bits leaf) and the
five subsets are constants in `rf_pkg`.

The defaults fit the evaluated workload: 100 regression trees of depth at
most 9 on 8 features, spread over 15 DTUs. Each DTU gets at most 7 trees,
which need at most 7 x 1023 + 5 = 7166 words. With fewer DTUs, complete
depth-9 trees need a larger `MEM_DEPTH`, up to `ceil(100/N_DTU) x 1023 + 5`
words.

The table below gives simulated compute time per sample for that workload.
The trees are random and nearly complete, so every walk visits 10 nodes.
The time runs from the start write until done is set, and excludes loading
and polling:

| N_DTU | MEM_DEPTH used | largest DTU image (words) | cycles per sample |
|---|---|---|---|
| 1  | 131072 | 81723 | 937 |
| 5  | 32768  | 17275 | 217 |
| 10 | 16384  | 8595  | 117 |
| 15 | 8192   | 6346  | 114 |

Going from 10 to 15 DTUs gains little. The time is set by the DTU whose
busiest subset holds the most trees: with 15 DTUs a unit has 7 trees, so
some subsets still hold 2.

## What follows the original architecture and what is this design's

These points follow the original architecture:

* the set of blocks: DTUs, xRegs, local sample buffer, Accumulator and an
  AXI-lite bus;
* the five-stage DTU split, with two Block-RAM cycles and three comparator
  cycles;
* five subsets, with their start addresses in the first five words and a
  final-subset bit;
* the 32-bit node format with its field widths, and the rule that the left
  child is the next word;
* relative right-child and next-tree addresses, and isLeaf/isLast in the
  low bits;
* a dual-port tree memory with the bus on port A;
* a number of DTUs chosen at synthesis time.

These are choices made here, where the architecture leaves the detail
open:

* binary16 for thresholds and features;
* the 14-bit result read as binary16 without two mantissa bits, and the
  exact bit positions of the result and header fields;
* `<=` sends a sample left;
* NaN and signed-zero handling;
* the register and address maps, the DTU enable mask, and one sample per
  start;
* the wide-row sample buffer and its size;
* the exact fixed-point sum, with the division by the tree count left to
  the host;
* the class-label encoding and tie rule;
* the tree memory depth, and memories written as inferred arrays rather than
  vendor Block-RAM cores;
* asynchronous active-low reset;
* AXI4-Lite slave timing.

Not part of this RTL: the host processor, main memory, DMA engine and AXI
interconnect. They are standard parts of the platform. The DMA's transfers
simply arrive as AXI4-Lite writes.

Limits to be aware of:

* Memories are not cleared by reset. A DTU that is enabled must hold valid
  headers.
* The sample buffer cannot be read back over the bus.
* A leaf exponent of 31 is summed as an ordinary number, not as Inf or NaN.
* The design has been simulated, not placed and routed. Its clock frequency
  and resource use are not characterised.

## Files

`rtl/`:

* `rf_pkg.sv`: node format, decode and encode functions, fixed-point
  conversion, register map, shared types;
* `rf_accel_top.sv`: system top;
* `dtu.sv`, `dtu_controller.sv`, `dtu_node_ram.sv`, `fp16_cmp_pipe.sv`: the
  DTU and its parts;
* `accumulator.sv`, `sample_buffer.sv`, `xregs.sv`, `axil_slave.sv`.

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_forest.svh` builds random trees, lays them out in the node format and
  walks them independently, in real arithmetic, for the expected results and
  cycle counts.
* `tb_axil_master.svh` is an AXI4-Lite master with random handshake delays.
* `tb_top_body.svh` is the end-to-end host model.
  * `tb_rf_accel_top` runs it at reduced size: 4 DTUs, regression and
    classification forests, disabled DTUs, empty subsets. It also counts
    that every mechanism happened: left and right branches, next-tree jumps,
    isLast ends, skipped empty subsets, several DTUs delivering a result in
    the same cycle, both modes, and memory read-back.
  * `tb_rf_accel_full` runs the default size on a 100-tree, depth-9,
    8-feature forest.
  * `tb_rf_workload` runs the same forest on 1, 5, 10 and 15 DTUs side by
    side, through `tb_rf_workload_cfg`.

Simulating with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rf_pkg.sv tb/tb_rf_accel_top.sv --top-module tb_rf_accel_top
./obj_dir/Vtb_rf_accel_top
```

Replace the testbench name to run another one. The unit testbenches take
under a second. The full-size one takes a few seconds, most of it spent
loading the trees over the bus.
