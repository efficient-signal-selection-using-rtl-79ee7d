# Fine-grained trace and scan buffer for post-silicon debug

Once a chip comes back from the fab, its internal state is almost invisible.
A common fix is a trace buffer: a small on-chip memory that stores the values
of a few selected flip-flops every cycle. Debug software then works out, or
*restores*, the values of many other flip-flops from those. The buffer's width
limits how many flip-flops can be stored per cycle. Earlier schemes split that
width in two:

- a few **trace** signals, stored every cycle;
- one long **scan** chain of shadow flip-flops, each dumped only once every
  many cycles.

This design splits the width more finely. Each buffer column gets its own
shadow scan chain, and chains have different lengths. A chain of length L
observes L flip-flops and stores each of them once every L cycles, so its
*dumping period* is T = L. A chain of length 1 is an ordinary trace signal.
Important control flip-flops go on short chains. Flip-flops that matter less
go on long chains, where they cost fewer buffer bits per cycle. The default
build has an 8-bit buffer and observes 30 flip-flops.

Choosing which flip-flop goes on which chain is a pre-silicon software step
(see "Not in the RTL"). The hardware takes the chosen flip-flops as a wired
input vector.

## Partitioning the buffer width

Four numbers describe the architecture:

| symbol | parameter | meaning |
|---|---|---|
| bw | `BW` | buffer width: the number of columns, which is also the number of chains |
| ω | `OMEGA` | number of trace slots (chains of length 1) |
| α | `ALPHA` | number of partitions that share the other `BW-OMEGA` columns |
| φ | `STEP_OP`, `STEP_K` | step function that gives each partition's chain length from the previous one |

Each partition has `(BW-OMEGA)/ALPHA` chains, all of the same length. Lengths
start from l₀ = 1 and follow l_p = φ(l_{p-1}). Two kinds of step are supported:

- additive: φ(x) = k + x (`STEP_ADD`);
- multiplicative: φ(x) = k · x (`STEP_MUL`).

`BW-OMEGA` must be a non-zero multiple of `ALPHA`, unless `OMEGA = BW`.
This is checked when the design is elaborated.

The defaults are `BW=8, OMEGA=2, ALPHA=3, STEP_MUL, STEP_K=2`. Columns
therefore have lengths 1, 1, 2, 2, 4, 4, 8, 8, so flip-flops can be given
periods T = 1, 2, 4 or 8. The whole dump pattern repeats every
T_c = lcm(all lengths) = 8 cycles (`fg_debug_pkg::dump_lcm`).

The package `fg_debug_pkg` does all of this arithmetic at elaboration time:
`part_len`, `chain_len`, `sig_offset`, `num_signals`.

## What a buffer row contains

This section matters most when you decode a dump.

**Column order.** Buffer column c is driven by chain c. The trace slots come
first. The partitions follow, shortest chains first.

**Input order.** `sig_i` is filled in the same order. Chain c owns bits
`sig_offset(c) … sig_offset(c)+chain_len(c)-1`. Position 0 of a chain is the
flip-flop dumped in the capture cycle. Position k is dumped k cycles later.

**Recording a period.** Recording runs one row per clock cycle, counted
n = 0, 1, 2, … from the start. Every chain captures in row 0, then every L rows
after that:

- Position 0 goes straight into the buffer in the capture row.
- Positions 1…L-1 are copied into L-1 shadow flip-flops in that same row.
- In the next L-1 rows the shadow register shifts out one value per row.

All L values that a chain dumps in one period are therefore taken at the same
instant.

**Decoding rule.** Row n, column c, where the chain has length L, holds:

```
sig[ sig_offset(c) + (n mod L) ]  as it was in row  n - (n mod L)
```

**Example.** Take a 2-bit buffer with chains of length 2 (flip-flops A, C) and
length 3 (B, D, E). It records:

| row | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| column 0 | A₀ | C₀ | A₂ | C₂ | A₄ | C₄ | A₆ | C₆ |
| column 1 | B₀ | D₀ | E₀ | B₃ | D₃ | E₃ | B₆ | D₆ |

**Overflow.** The buffer is circular. After an overflow it holds the last
`DEPTH` rows, and `wr_ptr_o` points at the oldest one. The row number stored
at address a is:

```
n = rows_o - DEPTH + ((a - wr_ptr_o) mod DEPTH)     (once wrapped_o = 1)
n = a                                               (otherwise)
```

## Blocks

- **`scan_chain`**: one column.
  - With `LEN=1` it is a wire: a trace slot.
  - Otherwise it has `LEN-1` shadow flip-flops and a multiplexer. In the
    capture cycle the multiplexer passes position 0 straight through.
    Otherwise it passes the head of the shadow register.
- **`scan_partition`**: `NCH` chains of one length sharing one phase counter.
  - The counter counts recorded cycles modulo `LEN`. Phase 0 is the capture
    cycle.
  - `clr_i` forces phase 0. `adv_i` moves the counter and the chains on by one
    recorded cycle.
  - With `LEN=1` there is no counter.
- **`trace_buffer`**: a `W × DEPTH` memory array.
  - It writes at a wrapping pointer and keeps a count of rows written.
  - Reads are synchronous, with one cycle of latency.
  - An assertion checks that the pointer always equals the row count modulo
    `DEPTH`.
- **`fg_debug_top`**: contains everything else.
  - It holds one partition of trace slots and `ALPHA` scan partitions,
    generated from the package arithmetic.
  - It has the start/stop control and the trace buffer.

## Interface and timing of `fg_debug_top`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start_i` | in | 1 | pulse: empties the buffer, sets every phase to 0, and starts recording with the next cycle |
| `stop_i` | in | 1 | pulse, e.g. an error trigger: the row of this cycle is the last one recorded |
| `sig_i` | in | N_SIG | observed flip-flops, in the order described above (30 at the defaults) |
| `capturing_o` | out | 1 | recording is active |
| `rows_o` | out | 32 | rows recorded since start |
| `wr_ptr_o` | out | log2 DEPTH | next write address, which is also the oldest row once wrapped |
| `wrapped_o` | out | 1 | the buffer has overflowed |
| `rd_en_i`, `rd_addr_i` | in | 1, log2 DEPTH | read request |
| `rd_data_o`, `rd_valid_o` | out | BW, 1 | read data, one cycle after the request |

While recording, the buffer takes one row every clock cycle, with no gaps. A
row is sampled at a rising edge. It contains the values `sig_i` had at that
edge: directly for position 0 and trace slots, and through the shadow
flip-flops for the other positions.

## Evaluated configurations

Each benchmark circuit was evaluated with its own partitioning, using buffers
of 8, 16 and 32 bits by 4096 rows. The RTL builds every one of them by
parameter override:

| circuit | bw | ω | α | φ | chain lengths | observed flip-flops |
|---|---|---|---|---|---|---|
| s5378 | 8 / 16 / 32 | 4 / 8 / 8 | 1 / 4 / 3 | 1+ / 2· / 1+ | 2 / 2,4,8,16 / 2,3,4 | 12 / 68 / 80 |
| s9234 | 8 / 16 / 32 | 4 / 8 / 12 | 4 / 4 / 4 | 2· / 2· / 2+ | 2,4,8,16 / 2,4,8,16 / 3,5,7,9 | 34 / 68 / 132 |
| s15850 | 8 / 16 / 32 | 2 / 2 / 8 | 3 / 7 / 6 | 2· / 1+ / 1+ | 2,4,8 / 2…8 / 2…7 | 30 / 72 / 116 |
| s38584 | 8 / 16 / 32 | 2 / 4 / 8 | 3 / 3 / 3 | 2+ / 2+ / 1+ | 3,5,7 / 3,5,7 / 2,3,4 | 32 / 64 / 80 |
| s38417 | 8 / 16 / 32 | 2 / 8 / 16 | 3 / 4 / 4 | 2· / 2· / 2+ | 2,4,8 / 2,4,8,16 / 3,5,7,9 | 30 / 68 / 112 |
| s35932 | 8 / 16 / 32 | 4 / 8 / 16 | 1 / 1 / 1 | 1+ | 2 | 12 / 24 / 48 |

The default build (8 bits, ω=2, α=3, doubling) is exactly the s15850 and
s38417 8-bit configuration. The small example above uses `BW=2, OMEGA=0,
ALPHA=2, STEP_ADD, STEP_K=1`.

## Where this design makes its own choices

The architecture fixes these points:

- the partitioning;
- the chain lengths and dumping periods;
- the capture-then-shift behaviour, including direct dumping of the first
  flip-flop in the capture cycle;
- the buffer sizes.

The following are choices of this design:

- the column and input ordering;
- the start/stop control;
- restarting all phases at start, so that row 0 is a capture row of every
  chain;
- circular recording with overflow;
- the separate synchronous read port and the status outputs;
- reset values (control state is cleared, the memory array is not);
- limiting φ to the forms k+x and k·x. These are the only forms used in the
  evaluated configurations.

The memory is written as a plain array. A real chip would map it onto an SRAM
macro of the same shape.

## Not in the RTL

- **Signal selection.** This is a greedy algorithm run on the netlist before
  tape-out. It scores each candidate flip-flop f on each chain length T by its
  restoration power:

  T · (P₀(f)·δ(S∪{f_T},0) + P₁(f)·δ(S∪{f_T},1))

  Here δ is the number of extra states that could be restored over T_c
  cycles. Ties are broken by connectivity. The algorithm is software; its
  result is the wiring of `sig_i`.
- **State restoration.** Forward and backward implication over the dumped
  values, and the restoration ratio, are computed off-chip by debug software.
- **The circuit under debug.** Its flip-flops arrive on `sig_i`.

## Verification

Every testbench drives random flip-flop values and predicts each buffer entry
from its own record of those values. Chain lengths are recomputed in the
testbench from the partitioning rules rather than taken from the package.

| testbench | what it covers |
|---|---|
| `tb_scan_chain` | length-3 chain and a trace slot, with stall cycles |
| `tb_scan_partition` | 2×length-4 partition, including capture timing and restarts via `clr_i` |
| `tb_trace_buffer` | 16-row buffer: overflow, pointer and count, read latency, clear |
| `tb_fg_debug_top` | default size (8×4096); details below |
| `tb_two_chain_example` | the 2-bit example above, checked entry by entry against its table |
| `tb_buffer_configs` | all 18 evaluated configurations above at 4096 rows, side by side, each overflowed and read back in full |

`tb_fg_debug_top` makes two recording runs:

- a short run, after which it checks that the buffer stays frozen after
  `stop_i`;
- a run longer than the buffer, read back in full through the overflow
  mapping.

It also counts trace-slot dumps, captures, shadow shifts, wrap, freeze,
restart, and one row per cycle. It fails if any of these never happened.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fg_debug_top \
  -y rtl -y tb +libext+.sv rtl/fg_debug_pkg.sv tb/tb_fg_debug_top.sv
./obj_dir/Vtb_fg_debug_top
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To try
another configuration, override the parameters of `fg_debug_top`, or add a
`fg_cfg_check` instance to `tb_buffer_configs`.
