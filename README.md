# SISCA: dot products inside the last-level cache

A CNN layer is mostly multiply-accumulate work on data that already sits in
the last-level cache. This design turns every SRAM subarray of a 32 MB cache
into a small SIMD dot-product engine, so the work happens where the data is:

- The array multiplies: raising two wordlines at once reads the bit-wise AND
  of two rows.
- A Registers-and-Adder-Tree (RAT) beside each subarray turns a sequence of
  those AND rows into the 32-lane dot product of the two rows.
- Only 2-byte partial sums, plus the odd whole row, travel on the cache's
  H-tree.

In the default configuration, 1024 subarrays each compute a 32-term 16-bit
dot product every 16 cycles. Over the whole cache that is 32,768 products
per 16 cycles.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from the
assertions.

| Module | What it is |
|---|---|
| `sisca_pkg` | Sizes, opcodes, packet kinds, saturation helper |
| `lim_subarray` | 512x512-bit SRAM subarray with the dual-wordline AND read and lane-masked writes |
| `rat_unit` | Registers and adder tree: 16 AND rows in, one signed partial sum out |
| `neuron_accumulator` | Home-subarray adder that gathers a neuron's partial sums |
| `sisca_tile` | Subarray + RAT + two accumulators + AND-step sequencer + outbox |
| `shifter_unit` | Per-bank barrel rotator: bit rotation inside operands, or rotation by whole operands |
| `sisca_bank` | 8 tiles, the shifter, the bank controller and the bank's H-tree port |
| `htree_node` | 3-port switch of the H-tree |
| `htree` | Binary tree of switches joining the 128 banks |
| `sisca_llc` | Top level: 128 banks, the H-tree, the command controller and event counters |

## Multiplying with AND reads: weight replicas

Each 512-bit row holds 32 operands of 16 bits (lanes). A 16x16-bit product
is the sum of 256 one-bit terms `a[j] & w[b]`, each with weight `2^(j+b)`.
One AND read delivers 16 terms per lane (512 in the row). The trick is to
choose rows so that 16 reads produce all 256 terms of every lane.

**Weight replicas.** Before a layer runs, every weight row is stored 16
times. Replica `k` has every 16-bit lane rotated left by `k` bits. The
activation row is stored once, unrotated.

**The 16 steps.** In step `k`, the sequencer ANDs the activation row with
replica `k`. Bit `j` of a lane then holds:

    a[j] & w[(j - k) mod 16]      weight 2^(j + ((j - k) mod 16))

Over k = 0..15, each pair `(j, b)` appears exactly once. So the 16 AND rows
contain exactly the 256 terms of each lane's product. No bit ever moves
between lanes or columns during the multiplication: the array only reads.

**Signed operands.** Operands are two's complement. The sign bit of a value
weighs `-2^15`, so a term is negative when exactly one of its two bits is a
sign bit:

- `j = 15` (the activation's sign bit) and `b ≠ 15`, or
- `b = 15` (the weight's sign bit) and `j ≠ 15`.

When both bits are sign bits, the two minus signs cancel and the term is
positive. This is the Baugh-Wooley sign rule applied term by term. No extra
correction rows are needed.

**Cost of the replicas.** They cost 16 rows of weights for every weight row,
and loading them takes one write per replica. `OP_LOAD_W` makes the replicas
with the bank's shifter as the row is written, at one row per cycle.

## The RAT (registers and adder tree)

Within one step the weight of a bit depends only on its column `j` inside the
lane, not on the lane. So the RAT does not build 32 separate multipliers.
For each step it:

1. counts, for each of the 16 column positions, how many of the 32 lanes
   hold a 1 there (16 population counts);
2. shifts each count by `j + ((j - k) mod 16)` and adds or subtracts it;
3. adds that step total to an accumulator register.

Step 0 restarts the accumulator. After step 15 the accumulator holds
`sum over lanes of A*W`, which is the subarray's share of the dot product.

Latency and throughput:

- The exact sum (`psum_full`, 38 bits) is registered one cycle after the
  last step.
- The reduced partial sum follows one cycle later.
- The next product can start at once, so one product per 16 cycles is
  sustained.

**Reduction for the H-tree.** A partial sum is reduced to a 2-byte value:
`psum_full >>> FRAC_BITS`, saturated to 16 bits. The default is
`FRAC_BITS = 8`, i.e. Q8.8 operands.

## Tiles and groups: from partial sums to neurons

One output neuron usually needs more products than one row holds. The worked
mapping is a 3x3x64 kernel, which has 576 weights. At 32 weights per
subarray, one neuron spans 18 subarrays.

**Groups.** Consecutive subarrays form groups of `group_n`. The first
subarray of a group is its **home**.

- Every subarray of a group computes its partial sum at the same time.
- The 17 non-home subarrays send theirs to the home as PSUM packets:
  34 bytes per neuron.
- The home's `neuron_accumulator` adds its own partial sum and the 17
  remote ones, saturating to 16 bits.
- The finished neuron is written into one 16-bit lane of an output row of
  the home subarray.
- With 1024 subarrays, 56 groups work at once (1008 subarrays). The rest
  stay idle.

**Tile.** A `sisca_tile` is one subarray with everything beside it:

- The **sequencer** issues the 16 AND steps, one per cycle.
- **Two accumulators**, chosen by product index mod 2, let the next product
  run while the previous neuron is still being gathered.
- A **one-entry outbox** holds the tile's outgoing packet.

**Subarray port priority.** The tile's single subarray port is shared, from
highest priority to lowest:

1. a row arriving over the H-tree,
2. a finished neuron being written,
3. a plain read or write from the bank,
4. the sequencer's AND step, then a row-move read.

**Stalls.** Two things can hold up a product:

- An AND step that loses the port waits one cycle. This is a *port stall*.
- The last step of a product waits while the outbox still holds the previous
  partial sum. This is an *outbox stall*; it keeps the RAT from overflowing.

Both are counted at the top.

**Timing.** A partial sum reaches the outbox 19 cycles after a product
starts:

- 16 AND steps,
- 1 cycle of read latency,
- 2 RAT stages.

## The bank: shifter and bank operations

A bank holds 8 tiles and one `shifter_unit`. The shifter is a right-rotate-only
barrel rotator with two modes:

- **Bit mode.** It rotates every 16-bit operand by the same amount. A left
  rotation by `k` is done as a right rotation by `16 - k`. This makes the
  weight replicas.
- **Operand mode.** It rotates the whole row by whole operands: lane `i`
  moves to lane `i + amount`. This lets a row of activations slide past
  the weights, so they can be reused for the next output position.

Its output is registered (1 cycle).

The bank controller executes these operations:

| Operation | What it does | Cost |
|---|---|---|
| `WRITE` / `READ` | one row of one tile; writes are lane-masked | 1 cycle each |
| `LOAD_W` | a weight row goes through the shifter 16 times; the replicas land in 16 consecutive rows | 18 cycles |
| `ROT` | every tile in turn reads a row, rotates it by whole operands and writes it back | 3 cycles per tile |

The bank's H-tree port is shared as follows:

- The 8 outboxes are served round robin, one packet per cycle.
- Incoming packets are always accepted.
- Each incoming packet goes to the tile named in it.

## The H-tree

The banks are the leaves of a binary tree of `htree_node` switches, 127 of
them for 128 banks. Nodes are numbered as in a heap: node `n` has children
`2n` and `2n+1`, and bank `b` is leaf `NB + b`.

Each switch:

- has three ports: parent, left and right;
- routes by destination bank: down to the side whose range holds it,
  otherwise up;
- has a 2-entry output queue per port, with valid/ready on every channel;
- arbitrates round robin when two inputs want the same output, and counts
  that as a *conflict*.

The 2-entry queues accept based only on their own fill level. This keeps the
ready signals from forming a combinational chain through the tree.

Timing:

- A packet needs one cycle per switch.
- Two banks under the same lowest switch are 1 cycle apart.
- Banks at opposite ends of 128 are 13 cycles apart.
- Packets between the same pair of banks arrive in order.

A packet carries:

- its kind (partial sum or row),
- the accumulator tag,
- the destination subarray and row,
- a 512-bit payload.

The destination bank travels beside the packet.

## The command interface (`sisca_llc`)

One command runs at a time (`cmd_valid` / `cmd_ready`). `cmd_ready` returns
when every bank is quiet.

| Command | Effect |
|---|---|
| `OP_WRITE` | write `cmd_data` (lanes in `cmd_mask`) to one row of one subarray |
| `OP_READ` | read one row; the data comes back on `rsp_valid` / `rsp_data` |
| `OP_LOAD_W` | write the 16 replicas of `cmd_data` to rows `cmd_row .. cmd_row+15` |
| `OP_ROT` | in every subarray, rotate row `cmd_row` by `cmd_amount` operands |
| `OP_MOVE` | every subarray `g` sends row `cmd_row` to row `cmd_row2` of subarray `(g + cmd_delta) mod 1024` |
| `OP_COMPUTE` | run `n_act x n_wset` dot products in every active subarray (below) |

**`OP_COMPUTE` settings.**

- The mapping comes from `cmd_group_n` (subarrays per neuron) and
  `cmd_n_groups` (number of groups).
- Activation `a` is row `cmd_row + a`.
- Weight set `w` has its replicas at `cmd_row2 + 16*w`.
- Product `p = a*n_wset + w` writes its neuron at operand position
  `cmd_out_lane + p`, counted from lane 0 of row `cmd_out_row` in each home
  subarray.

**When a product starts.** The controller broadcasts product `p` to every
subarray when both of these hold:

- every sequencer is idle;
- the accumulators for tag `p mod 2` are free everywhere.

So the AND steps of one product overlap the gathering of the previous one.

**Counters.** Free-running counters report:

- products started,
- neurons written,
- partial-sum packets,
- row packets,
- port stalls,
- outbox stalls,
- H-tree conflicts.

## Number format

All choices here are configurable parameters:

- **Operands:** 16-bit two's complement. Every lane of a row is one operand.
- **Partial sums:** exact inside the RAT (38 bits), then `>>> FRAC_BITS` and
  saturation to 16 bits. `FRAC_BITS = 8` by default.
- **Neurons:** the saturated sum of the partial sums of the group, 16 bits.
- **Not applied:** bias, activation function and pooling. A layer's output
  is the raw saturated sum.

## What is modelled and what is not

- **The SRAM.** It is a register array with the logic function of the
  dual-wordline read (AND of two rows) and a 1-cycle read. The analog
  sense-amplifier circuit that produces the AND is not modelled. The NOR
  that the same circuit can also give is not used by the accelerator and
  not built.
- **The host and DRAM.** The host CPU, the DRAM, and the normal cache
  function (tags, replacement, coherence) are outside this RTL. The host is
  the command port. Data enters through `OP_WRITE` / `OP_LOAD_W`.
- **This design's own choices.** The sources this design follows give the
  operation order and the sizes, but not the following, which are this
  design's choices:
  - the subarray port priority and the one-entry outbox;
  - two accumulators per tile;
  - the packet format;
  - the 2-entry switch queues and round-robin arbitration;
  - the command set and the product loop of the controller;
  - the fixed-point format.
- **The RAT registers.** The original scheme keeps all 16 AND rows in
  registers and adds them once the last row arrives. Here each row is
  reduced as it arrives, into one accumulator register. The result is the
  same, with far fewer registers. The RAT's latency after the last step is
  two cycles.
- **Where rotation happens.** Operand rotation (`OP_ROT`) goes from each
  subarray to its bank's shifter and back over the bank's internal path. It
  does not go over the cache-wide H-tree. It is still done one subarray
  at a time, so the shifter is shared as intended.
- **Mapping is the host's job.** The hardware does not choose the mapping.
  The command sequence does:
  - which rows hold activations and weights,
  - the group size,
  - when to rotate activation rows,
  - when to move rows between subarrays.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/sisca_pkg.sv \
        tb/tb_sisca_llc.sv --top-module tb_sisca_llc -Mdir obj -o sim
    obj/sim

Replace `sisca_llc` with any other block name to run its testbench.

What the top-level testbenches cover:

- **`tb_sisca_llc`**, at 4 banks of 8 subarrays of 64x64 bits. It runs
  loading, rotation, moves and several `OP_COMPUTE` mappings (groups of 3
  and of 32). It checks every neuron against a reference model. It also
  checks that every counted mechanism happened at least once (stalls,
  conflicts, both packet kinds).
- **`tb_sisca_llc_group`**, with the full 512x512 subarrays and a group of
  18 subarrays (one 576-product neuron, two weight sets), on 4 banks. This
  is the largest configuration simulated.

The full 128-bank cache has the same banks and a deeper tree. It elaborates,
but Verilator generates code for every bank instance separately, so a
128-bank simulation takes very long to compile.

To change sizes, override the parameters of `sisca_llc`:

| Parameter | Meaning | Default |
|---|---|---|
| `ROWS`, `COLS` | subarray size | 512 x 512 |
| `OPW` | operand width | 16 |
| `NB` | banks (a power of two) | 128 |
| `SPB` | subarrays per bank | 8 |
| `PSW` | partial-sum width | 16 |
| `FRAC` | fraction bits | 8 |
