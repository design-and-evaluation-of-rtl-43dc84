# Input-buffered 8x8 cell switch with window selection and a self-routing Benes network

This is a fixed-size-cell (ATM-style) packet switch. It is built to keep hardware cost low:

- **Queues only at the inputs.** No memory has to run N times faster than the line.
- **A self-routing Benes network as the fabric.** No central controller sets it up.
- **A simple selection rule.** Each clock the rule picks at most one cell per input so that no two cells address the same output.

Plain FIFO input queues lose throughput to head-of-line blocking: a cell stuck behind a contended head waits even when its own output is idle. Two devices reduce this loss:

- **Two queues per input.** Each input keeps one queue for the upper half of the outputs (HM) and one for the lower half (LM).
- **A window.** The scheduler may consider any of an input's W oldest cells, in either of its queues. It uses the window to find cells for outputs that no head-of-line cell addresses.

The default configuration is the one used in the design's evaluation and worked example:

- N = 8 ports.
- Window W = 4.
- 64-bit cell payloads.
- One cell per port per clock (100 MHz in the original evaluation).

## Data path

```
 in_cell[0..7]
      |
   +-----+    HM queues (outputs 0-3)     +-------------+
   | AIG |--> 8 x cell_queue ------------>| hol_builder |--HOL1--+
   |     |           |                    +-------------+        |   +---------+   +-----+   +---------------+
   |     |    8 x window_limit (W oldest      ^      ^           +-->| hol_mux |-->| HOL |-->| benes_network |--> out_cell[0..7]
   |     |      cells of each input) ---------+      |           |   | + NOCC  |   | reg |   | 5 stages      |
   |     |           |                    +-------------+        |   +---------+   +-----+   +---------------+
   |     |--> 8 x cell_queue ------------>| hol_builder |--HOL2--+        |
   +-----+    LM queues (outputs 4-7)     +-------------+                 |
                 ^                                                         |
                 +------ dequeue the chosen window cell -------------------+
```

| Block | Module | Role |
|---|---|---|
| AIG | `aig` | Sends each arriving cell to its input's HM queue (destination MSB 0) or LM queue (MSB 1). |
| HM / LM buffers | `cell_queue` (2 x 8 instances) | Pointer-managed circular buffer plus a W-register window; any window cell can be removed. Cells carry an arrival stamp. |
| Input window | `window_limit` (8 instances) | Marks the cells of an input's two queue windows that are among its W oldest cells; only those take part in the selection. |
| HOL1 / HOL2 | `hol_builder` (2 instances) | Step 2: head-of-line vector and occurrence counters for one half of the outputs; fills unaddressed outputs from the windows. |
| MUX + NOCC | `hol_mux` | Step 3: picks HOL1 or HOL2 per input so that the result is a partial permutation. |
| HOL register | in `ib_switch` | Holds the chosen cells for one clock; drives the network. |
| Benes network | `benes_network`, `benes_se` | Recursive 8x8 Benes network, 2·log2N − 1 = 5 stages of 2x2 elements, self-routed. |
| Shared types | `sw_pkg` | `cell_t` (valid, 3-bit destination, 64-bit data), port count, widths. |

## The selection, step by step

The selection is the least obvious part of the design. It works in three steps.

**Step 1 (on arrival).** The AIG looks at the top destination bit of each cell. The cell goes to the HM queue of its input if the bit is 0, otherwise to the LM queue. From then on the two halves are scheduled independently until the last step.

The window still belongs to the input. Each cell is stamped with its arrival number at its input (a 16-bit counter). `window_limit` ranks the cells of the input's two queue windows by stamp and lets only the W oldest take part. In the worked example below, input 0's window {6,5,2,0} becomes HM {2,0} and LM {6,5}. If an input's W oldest cells all went to LM, its HM queue offers nothing that clock, not even its head.

**Step 2 (HOL1 and HOL2, in parallel).** Take one half, say HM:

1. Form HOL1 from the eight queue heads. Count, for each output 0-3, how many heads address it (Nocc).
2. If every output has Nocc ≥ 1, step 2 is done.
3. Otherwise, for each output o with Nocc = 0, search the eligible window cells for a cell addressed to o. A candidate must sit in a queue whose own HOL1 entry addresses an output with Nocc > 1.
4. The first candidate found replaces that entry. The displaced output's counter drops by one, and o's counter becomes 1.

A replacement therefore only ever adds an output to the vector; it never loses one. The search order is:

- outputs in increasing order;
- then inputs from 0;
- then window slots nearest the head first.

HOL2 is built the same way from the LM queues.

**Step 3 (MUX).** Each input now has up to two candidates: its HOL1 entry and its HOL2 entry. The mux does the following:

1. Load one counter per output from the step-2 counters.
2. Visit the inputs in order 0 to 7.
3. At each input, drop a candidate whose output an earlier input has already taken.
4. Of two remaining candidates, pick the one whose output has the smaller counter. On a tie, HOL1 wins.
5. Mark the chosen output as taken. Decrement the counters of both candidates, because this input no longer competes for either output.

An input whose candidates are both taken sends nothing this clock. The result is a partial permutation: no output is addressed twice. An assertion in `ib_switch` checks this every clock.

**Worked example** (window 4; each queue listed head first):

```
input        0      1      2      3      4         5        6      7
HM queue   {2,0}  {1,1}  {2,1}  {0,2}  {1,2,0,3}  {2,0,1}  {0,0}  {0,1}
LM queue   {6,5}  {4,4}  {4,7}  {4,4}  {}         {5}      {6,5}  {5,5}

HOL1 heads    2 1 2 0 1 2 0 0   output 3 missing -> input 4 swaps 1 for its 3
HOL1          2 1 2 0 3 2 0 0
HOL2 heads    6 4 4 4 - 5 6 5   output 7 missing -> input 2 swaps 4 for its 7
HOL2          6 4 7 4 - 5 6 5
step 3        6 1 7 4 3 2 0 5   (a full permutation)
```

Three testbenches replay this example: `tb_hol_builder`, `tb_hol_mux` and `tb_ib_switch`. In `tb_ib_switch` the 32 cells are loaded with the scheduler held, then released for one clock. The eight chosen cells must appear at outputs 0-7 five clocks later.

## The Benes network

`benes_network` is built recursively. An NxN network consists of:

- a column of N/2 elements;
- two N/2 x N/2 networks;
- a second column of N/2 elements.

Input element j sends its upper output to subnetwork input j of the upper half and its lower output to input j of the lower half. Output element j collects output j of both subnetworks. A 2x2 network is a single `benes_se`. For N = 8 this gives 5 stages of 4 elements, which is N·log2N − N/2 = 20 elements.

There is no controller. Stage s (1..2r−1, r = log2 N) steers by one destination bit:

- X_s for s ≤ r−1;
- X_(2r−s) for s ≥ r.

X_1 is the least significant bit. With N = 8 the stages use bits 0, 1, 2, 1, 0. In the recursion, both columns at depth d use bit d−1.

The two kinds of stages use different rules:

- **First r−1 stages: least control routing.** The cell with the smaller destination address controls the element. It goes up if its bit is 0 and down if its bit is 1, and the other cell takes the other output.
- **Last r stages: omega rule.** Each cell goes up or down by its own bit.

**Caveat: not every partial permutation routes.** Bit-permute-complement permutations route cleanly; the testbench checks identity, complement, bit reversal and the shuffles. The permutation (6,1,7,4,3,2,0,5) also routes cleanly. Many other permutations do not: only 21,888 of the 40,320 full 8x8 permutations route without conflict under these rules.

In the last r stages two cells may want the same output of an element. When that happens:

- the cell on the upper input wins;
- the other cell is deflected;
- the deflected cell leaves at a wrong port, flagged by `out_misrouted`, and is lost.

`n_conflict` counts the elements in conflict each clock.

The selection guarantees distinct outputs, not routability. This loss is the largest gap between this design's behaviour and the throughput figures reported for it originally (see below).

## Timing

| Event | Clock edge |
|---|---|
| Cell sampled on `in_cell` and written to its buffer | t |
| Cell enters its queue's window (earliest) | t+1 |
| Cell selected and loaded into the HOL register (earliest) | t+2 |
| Cell leaves the network (4 pipeline registers, one after every stage but the last) | t+6 |

A cell sent into an empty switch therefore appears on `out_cell` 7 clocks after it arrived; `tb_ib_switch` checks this. A new permutation enters the network every clock, so up to 8 cells leave per clock.

Steps 2 and 3 are combinational and take place within one clock. This matches the original design, where selection was much faster than routing.

The original design states the selection as a sequential algorithm: O(W·(N²−N)) steps in the worst case and O(N) in the best. Here its loops are unrolled into logic. For N = 8 and W = 4 that is about 3,600 word-level cells per half. The logic depth grows with W·N², so a much larger switch would need the steps spread over several clocks.

## Interface of `ib_switch`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock; asynchronous active-low reset that empties all queues and registers. |
| `sched_en` | in | 1: select and send a HOL vector this clock. 0: hold (queues only fill). |
| `in_cell[8]` | in | `cell_t` per input: `valid`, `dest` (0-7), `data` (64 bits). |
| `in_drop[8]` | out | The arriving cell was lost because its queue was full. |
| `out_cell[8]` | out | Cell leaving each network output. |
| `out_valid[8]` | out | `out_cell` carries a cell for this output. |
| `out_misrouted[8]` | out | `out_cell` carries a cell for another output (routing conflict); it is lost. |
| `n_replace` | out | Step-2 replacements this clock. |
| `n_idle` | out | Inputs holding cells that sent none this clock. |
| `n_beyond` | out | Window cells held back this clock because their input has W older cells. |
| `n_conflict` | out | Network elements in conflict this clock. |
| `se_crossed[20]` | out | State of every element. Bits 0-3 are stage 1, then the upper subnetwork, then the lower one (same layout, recursively), then the last stage. |

Parameters:

- `W`: window depth, default 4.
- `QDEPTH`: buffer cells per queue behind the window. Default 16; must be a power of two.

The port count and payload width are set in `sw_pkg` (`N_PORTS` = 8, a power of two ≥ 4; `DATA_W` = 64).

## Measured behaviour

`tb_window_sweep` runs six copies of the switch (W = 1, 2, 4, 6, 8, 10) on the same uniform random traffic. The batch columns average ten batches of 800 cells, each batch followed by a drain. Delay includes the 7-clock pipeline. In the saturation run, every input receives a cell on every clock.

| W | Throughput, 800-cell batches | Cell loss (misrouted + dropped) | Mean delay, clocks | Saturation throughput |
|---|---|---|---|---|
| 1 (FIFO) | 0.791 | 0.209 | 31.6 | 0.560 |
| 2 | 0.843 | 0.157 | 22.9 | 0.647 |
| 4 | 0.855 | 0.145 | 18.7 | 0.690 |
| 6 | 0.869 | 0.131 | 17.4 | 0.725 |
| 8 | 0.871 | 0.129 | 16.9 | 0.727 |
| 10 | 0.873 | 0.127 | 16.6 | 0.732 |

With W = 1 each input is a plain FIFO. Its saturation throughput of 0.56 is close to the well-known 0.586 limit of head-of-line blocking, which is a useful sanity check of the queue and window logic.

The trend matches the original evaluation: a window helps, most of the gain comes by W = 4-6, and delay falls with W. At W = 2 the batch throughput is close to the original figure (about 0.88). At larger windows it stays near 0.87, where the original evaluation reports above 0.95 at W = 10.

The original delay figures, 12-14 ns at 100 MHz, are about one clock. They evidently leave out queueing and the network pipeline, so they cannot be compared with the delay column here.

At every window size of 2 or more, about 100 cells per 800 are lost to routing conflicts, which the selection does not prevent. The original evaluation also does not state its queue sizes or exactly how loss was counted.

`tb_matching` compares one selection with the best possible one. In each of 100 trials, every input holds four cells with random destinations. The cells the switch sends in one clock are compared with a maximum matching of inputs to outputs over the same 32 cells. The selection equalled the maximum in 47 of 100 trials; the original evaluation reports more than 20%. On average it sent 7.27 cells where 7.86 were possible. It never exceeded the maximum, which would indicate a counting error.

## Choices made where the design is silent

- Queue depth (16 cells + W window registers per queue), drop-on-full, and the one-cell-per-clock window refill.
- The window limit is built from arrival stamps compared modulo 2^16. Only cells already in a queue's window are ranked, so for a clock after a window has shrunk, a slightly newer cell can become eligible.
- The step-2 search order, the step-3 visiting order and tie rule, and decrementing both step-3 counters after each input. These reproduce the worked example exactly; other readings were not needed for it.
- The handling of routing conflicts (upper input wins; the loser is deflected and flagged).
- The pipeline registers inside the network (4 clocks for N = 8). This is consistent with a routing latency of about four clock periods across 80-166 MHz in the original measurements.
- The `sched_en` hold input, the reset, and the event-count outputs.

Not modelled: the physical memories (the design suggests dual-ported SRAM or DDR SDRAM for the buffers) and any clock-rate or area figure. Those depend on a technology the design does not fix.

## Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ib_switch \
    -y rtl -y tb +libext+.sv rtl/sw_pkg.sv tb/tb_ib_switch.sv
./obj_dir/Vtb_ib_switch
```

| Testbench | What it covers |
|---|---|
| `tb_aig` | Random split checks. |
| `tb_cell_queue` | Against a list model, including removals from mid-window, drops and stamps. |
| `tb_window_limit` | Ranks against unwrapped arrival numbers, including stamp wrap-around. |
| `tb_hol_builder` | Example plus order-independent properties on random windows. |
| `tb_hol_mux` | Example plus a reference model and permutation properties. |
| `tb_benes_se` | Exhaustive over destination pairs and valid flags. |
| `tb_benes_network` | Example with element states, BPC permutations, random permutations with latency and conservation checks. |
| `tb_ib_switch` | End to end at default size: latency, the worked example, and random traffic at several loads against a per-(input, output) FIFO scoreboard. It also checks that every mechanism occurred: replacement, idle input, window limit, conflict, drop, hold, HM and LM. |
| `tb_window_sweep` | The table above. |
| `tb_matching` | One selection against a maximum matching over random windows. |

Cells are reordered within an input's queue by the window, but never within one (input, output) pair. The scoreboard relies on this.
