# Bit-pruned, common-expression and memory-aware neural network datapaths

This repository holds SystemVerilog for three independent accelerator
datapaths. Each one makes neural-network inference cheaper by removing work or
memory traffic that a plain multiply-accumulate engine would spend:

1. **DWP (bit-level weight pruning with signed digits).** Weights are recoded
   offline into signed-digit form (digits -1, 0, +1), and only their non-zero
   digits are kept. A processing element (PE) therefore spends clocks on
   essential digits, not on weights. The hardware decodes a one-bit-per-digit
   storage format and accumulates shifted activations per bit position. A
   variant, **DWP-intra**, condenses each weight's own digit list instead of a
   column of digits across weights.
2. **ConvOpt engine (ternary convolutions with shared sub-expressions).** The
   3x3 ternary kernels of a layer are rewritten offline as sums of fewer common
   kernels. Repeated sums of their convolution results are factored out as
   common expressions. The engine evaluates that rewritten form with
   adders and subtractors only.
3. **MIN-k weight memory (compressed networks whose weights do not fit on
   chip).** After weight sharing a layer reads a few hundred distinct weights in
   an order known in advance. Each PE keeps a handful of weight blocks on chip.
   On a miss it picks the block to evict by looking at most k entries ahead in
   that known order, like Belady's MIN but with bounded look-ahead.

The three designs share nothing but clock and reset. `nn_accel_top` places them
side by side and brings out each one's ports, with the prefixes `dwp_`, `dwpi_`,
`cv_` and `mk_`.

## DWP: computing with condensed signed digits

### The weight format

Consider a set of k weights (k = 16, the pruning stride) that multiply k
activations. Each weight is a 16-digit signed-digit number. Arrange the digits
as a k x 16 matrix, one row per weight and one column per bit position.
Bit-level pruning drops zero digits and slides the remaining digits of each
column upward. The matrix becomes k' condensed rows (k' <= k). Each digit then
needs:

* its value, -1, 0 or +1;
* its **activation-selection index** (log2 k = 4 bits), which says which of the
  k activations the digit belongs to.

The value is stored in **one memory bit per digit plus one flag per column**.
This relies on an ordering rule: inside a column, all -1 digits come first,
then all +1 digits, then the padding zeros.

| Column contains | flag | memory bit meaning |
|---|---|---|
| only -1 and 0 | 0 | 1 = -1, 0 = 0 |
| at least one +1 | 1 | 0 = -1, 1 = +1; after the first 1->0 fall the flag clears and 0 = 0 |

`dwp_ternary_decoder` keeps the live flag and the previous bit, and outputs a
`{add, sub}` command per digit (type `tcmd_t` in `dwp_pkg`). It never asserts
both; an assertion checks this.

### Bit positions and the split LSB column

A signed-digit weight needs no sign bit, so 16 lanes have room for 15 digit
columns plus one spare lane. The least significant column usually holds the
most essential digits, so it is spread over **two lanes**:

* lanes 0 and 1 both carry weight 2^0;
* lane j >= 1 carries weight 2^(j-1).

A weight's LSB digit may therefore sit in lane 0 or lane 1.

`dwp_pkg::lane_shift` encodes this rule. It is applied by
`dwp_final_adder_tree`. The testbench helper `tb_dwp_util::shift_of`
re-derives the same rule independently.

### Data path of one PE (`dwp_pe`)

```
 per set s (16 sets):   flag,bit --> 16 decoders --> {add,sub} --+
                         act[s][0..15], idx --------------------> splitter --> 16 lane values (+carry)
 per lane l (16 lanes): sum over the 16 sets + carries --> accumulator X_l over the k' rows
 final adder tree:      sum_l  X_l << lane_shift(l)   --> ReLU --> out_data
```

The splitter (`dwp_splitter`) negates with a one's complement: it sends `~A`
and a carry bit. The lane adder tree (`dwp_lane_adder_tree`) adds the carry
bits, which completes `-A = ~A + 1` without a separate negator per splitter.
Each lane accumulates over the condensed rows of one output.

**Timing.** The PE takes one condensed row per clock, with no stalls.

* `first` starts a new output.
* `set_start` latches the activations and flags of a new group of sets.
* `last` marks the last row.

The result appears with a one-clock `out_valid` in the second clock after the
clock that presents `last`. In other words, an output of k' rows takes k'
clocks, plus two clocks of latency.

`dwp_accel` holds 16 PEs. They receive the same activations and control, and
each has its own weight digits. The testbench checks that all 16 PEs produce
their results in the same clock.

### Reduced-precision modes

`mode` (type `wmode_e`) splits the 16 lanes into independent groups, and the
lane rule above applies inside each group:

| mode | lane groups | weights per row |
|---|---|---|
| `MODE_W16` | one group of 16 | 1 |
| `MODE_W8` | two groups of 8 | 2 |
| `MODE_W4` | four groups of 4 | 4 |

More weights per row means proportionally fewer clocks per output. The 4-bit
mode is the hybrid-precision scheme this design follows. The 8-bit mode is an
extension of it, added here for 8-bit weights.

### DWP-intra (`dwpi_*`)

DWP-intra condenses each weight's digits horizontally: every weight becomes a
short list of essential digits, each tagged with its bit position. It uses the
same one-bit-plus-flag encoding, where the "column" is now the digit list of
one weight.

* **Shifting unit** (`dwpi_shift_unit`): forms `+A`, `-A` or 0 and shifts it
  left by the digit's position.
* **SAA unit** (`dwpi_saa`, shift-and-add): serves 16 weights, one digit of
  each per clock. It adds the 16 shifted values and accumulates them.
* **PE** (`dwpi_pe`): sums 16 SAA units (a plain adder tree, since the shifts
  were already done) and applies ReLU.
* **Accelerator** (`dwpi_accel`): 16 PEs.

Control and latency are the same as for DWP.

## ConvOpt engine

The offline rewrite produces three tables:

* **WB**: the common and filtered kernels, 3x3 ternary, two bits per
  coefficient (`tern_e`).
* **LT, entries 0..nce-1**: the common expressions. Each is a signed sum of up
  to L = 4 earlier results.
* **LT, entries NCE_MAX + o**: the recombination list of original kernel o,
  again a signed sum of up to 4 results.

For one input window held in IB, `convopt_engine` runs three phases. In each
phase, 16 PEs (`convopt_pe`, a signed ternary adder) each take one entry per
clock:

| order | phase | reads | writes | clocks |
|---|---|---|---|---|
| 1 | `ST_CONV` | IB and WB kernel e | TB[e] | ceil(nk/16) |
| 2 | `ST_CE` | LT[e], TB | TB[NK_MAX + e] | ceil(nce/16) |
| 3 | `ST_ACC` | LT[NCE_MAX + o], TB | OB[o] | ceil(no/16) |

The phases always run in the order shown. A phase with no entries still takes
one clock.

**Total run time.** From `start` to `done`, a run takes 2 clocks plus the
clocks of the three phases. For example, 68 kernels, 20 common expressions and
100 outputs take 5 + 2 + 7 + 2 = 16 clocks. The counters `cyc_conv`,
`cyc_ce` and `cyc_acc` report the clocks of each phase.

**Ordering rule for common expressions.** A TB entry written in one clock can
be read from the next clock on. The offline schedule must therefore place a
common expression that uses another one in a later group of 16 entries.

**Loading.** Buffers are loaded one word per clock through `ld_*` before
`start`; loads are ignored while the engine is busy. The method this design
follows overlaps loading with computation, but here the load is a separate
step.

**Buffer sizes and entry formats** are this design's choice:

| buffer / field | size |
|---|---|
| WB (kernels per input channel) | 128 |
| LT common expressions | 128 |
| LT outputs | 512 |
| term of an LT entry | 10 bits: 2-bit sign code + 8-bit TB address |

## MIN-k weight memory

Each `mink_pe` walks its **index sequence**, one entry per clock.

* **Entry format.** An entry is `{last, waddr}`, where `waddr` is the weight's
  off-chip address (block = `waddr / BS`, with BS = 4).
* **Hit.** The PE multiplies the weight by the entry's activation and
  accumulates. On `last`, it emits the sum.
* **Miss.** The PE uses a free slot if one exists. Otherwise
  `mink_selector` picks a victim. Then the PE reads the block through
  `mem_req`/`mem_rvalid` (one beat of 4 weights) and retries the entry.

### Victim choice (`mink_selector`)

The selector keeps:

* `r_p`, the position of the miss;
* `r_q`, the end of the look-ahead window;
* a count per block of how often that block occurs in positions
  (r_p, r_q].

The window survives between misses. As the PE advances, the entry it leaves
behind is subtracted from the counts, so later misses rarely rescan.

On a miss, the selector takes one step per clock:

* exactly one on-chip block has count 0: evict it (**single**);
* several have count 0, the window is shorter than k and entries remain:
  extend the window by one entry (**forward scan**);
* several have count 0 and the window cannot grow: evict one of them,
  chosen by an LFSR (**random**);
* none has count 0: shrink the window from its end (**backward scan**) until
  one has.

The counts are indexed by block number, with 64 counters. A method that keeps
only k counters is also possible. This design indexes by block so that a block
that has just been fetched already has its correct count.

`scan_steps` counts the scan steps, which measure the scanning energy.

### Shared off-chip port (`mink_system`)

`mink_system` lets two PEs share one off-chip port through a round-robin
arbiter:

* a grant is held until the read returns;
* the next grant goes to the other PE if both are waiting.

The memory layout (how weights are placed in off-chip memory) is decided
offline. It reaches the hardware only as the addresses in the index sequence.

## Parameters

Defaults follow the sizes the design was evaluated at.

**DWP and DWP-intra**

| parameter | default |
|---|---|
| PEs | 16 |
| sets per PE | 16 |
| activations per set (k) | 16 |
| bit lanes (B) | 16 |
| activation width | 16 bits |

**ConvOpt**

| parameter | default |
|---|---|
| PEs | 16 |
| kernel elements | 9 |

**MIN-k**

| parameter | default |
|---|---|
| on-chip blocks | 8 |
| block size | 4 weights |
| off-chip blocks | 64 (up to 256 distinct weights) |
| look-ahead k | 16 |
| sequence address width | 22 bits (up to 4M accesses) |

These sizes hold, for example:

* AlexNet's FC6 layer: 252 distinct weights and 2.33M accesses;
* VGG-16 layers after kernel sharing: at most about 65 kernels per input
  channel, and 512 output channels.

The following widths are this design's choice:

| item | width |
|---|---|
| DWP lane accumulator | 32 bits |
| DWP final sum | 48 bits |
| SAA accumulator | 40 bits |
| ConvOpt results | 32 bits |
| MIN-k MAC | 48 bits |

## Where this design departs from the method it implements, and what it leaves out

* **Activation function.** It is ReLU. The method only names "the activation
  function".
* **Outside the RTL.** The on-chip I/O RAMs (embedded DRAM) and the off-chip
  DRAM are not part of the RTL. Their data enters through ports, and the
  testbenches model them.
* **DWP internal buffer.** It is reduced to a holding register for one group
  of sets.
* **MIN-k PE count.** The number of MIN-k PEs (2) and their arbitration are
  this design's choice.
* **MIN-k counter array.** The counters have one entry per block, not k
  entries (see above).
* **ConvOpt loading.** Loading is not overlapped with computation.
* **ConvOpt result storage.** The engine evaluates one window per run and
  keeps only the last window's output buffer.
* **Offline steps.** Signed-digit conversion, pruning and condensation, kernel
  rewriting and memory layout are done offline. Their outputs are the inputs
  of this hardware.

## Simulating

Every file in `rtl/` holds one module or package; `dwp_pkg.sv` and
`convopt_pkg.sv` must be compiled first. Every testbench in `tb/` checks itself
and ends by printing `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert --top-module tb_nn_accel_top \
    rtl/dwp_pkg.sv rtl/convopt_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
    tb/tb_dwp_util.sv tb/tb_nn_accel_top.sv
./obj_dir/Vtb_nn_accel_top
```

`tb_nn_accel_top` runs the whole top at its default sizes:

* three DWP outputs, in 16-, 8- and 4-bit modes;
* two DWP-intra outputs;
* one ConvOpt window with 68 kernels, 20 common expressions and 100 outputs;
* 900 sequence entries on each of two MIN-k PEs.

It compares every result with a value computed in the testbench. It also counts
each mechanism and fails if any of them never happened:

* the decoder rules, including the flag clear;
* the split LSB column;
* both reduced-precision modes;
* negation;
* the common-expression phase;
* the four MIN-k decisions;
* arbitration conflicts.

It runs in about two minutes, most of which is compilation.

Each block has its own testbench with random stimulus and an independent
reference. `tb_mink_selector` compares each eviction against a brute-force
evaluation of the same rules.
