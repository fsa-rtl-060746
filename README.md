# FSA: a systolic-array DNN accelerator that recomputes the work of faulty PEs

A permanent fault in one processing element (PE) of a systolic array corrupts
every result that passes through it. The usual fixes add spare rows or columns
of PEs and bypass links inside the array. FSA leaves the array alone.
Instead:

- each faulty PE's multiply-accumulate (MAC) is switched off, so the PE
  contributes zero and the rest of the array keeps its timing;
- a separate **re-computing module (RCM)** computes the missing dot products
  next to the array, from the same on-chip input buffers;
- the RCM writes each recomputed value into the faulty PE's partial-sum
  register before the array unloads its results.

The RCM is a chain of small **re-computing units (RUs)**. Each RU has one MAC
and one result register. With enough RUs the recomputation hides completely
behind the array's own run time. With fewer RUs it costs some extra cycles.
Either way the result is exact, whatever the number and placement of faults.

This repository holds synthesizable SystemVerilog for the whole accelerator,
at the published size:

- a 256 x 256 PE array running output-stationary (OS), weight-stationary (WS)
  or input-stationary (IS) dataflow;
- 64 KB activation and weight buffers, each built from 256 FIFOs;
- a 192 KB output buffer;
- a fault detection table;
- an RCM with 256 RUs.

Recomputation is implemented for the OS dataflow, the only dataflow the
published evaluation uses. Under WS and IS the array runs, and faulty PEs add
zero, but nothing restores their products (see *Departures and limits*).

## The re-computing module

This is the least obvious part of the design, so it comes first.

### What has to be recomputed

In OS, PE(x, y) accumulates `C[x][y] = sum_k A[x][k] * W[k][y]`.

- Activation FIFO x holds row x of A.
- Weight FIFO y holds column y of W.

The RCM therefore recomputes a faulty PE by reading those two FIFOs, one
entry per cycle, for N cycles. The data never crosses the array.

### Parts

| part | module | role |
|---|---|---|
| fault detection table | `fsa_fault_table` | Filled by the self-test, one (x, y) per faulty PE. Keeps a list for the RCM and a one-bit-per-PE map that switches off the PEs' MACs. Duplicate reports are dropped. |
| RCM buffer controller | `fsa_rcm_ctrl` | Hands table entries to RUs and steps the FIFO reads. |
| RU array and data bus | `fsa_ru_array`, `fsa_ru` | The data bus gives every RU its operands through an N:1 activation mux and an N:1 weight mux. RUs whose faulty PEs share a row or column receive the same value (multicast). |

### Rounds

Work is done in rounds of N cycles:

1. **Dispatch.** Before a round, the controller walks the RUs, one per cycle,
   RU 0 first. Each healthy RU gets the next table entry in its *shadow
   target* register. Dispatch for round r+1 runs during round r, and round 0
   is dispatched as soon as the fault table is complete (`bist_done`). So
   dispatch never delays anything, as long as `N_RU <= N`.
2. **Compute.** In step t of the round (t = 0 .. N-1), every FIFO presents
   entry t. Each RU multiplies the activation of its PE's row by the weight of
   its PE's column and accumulates.
3. **Hand-off.** At the last step, each RU moves its finished sum, tagged with
   the PE's coordinates, into its *chain register*. The shadow target becomes
   the working target, and the next round starts immediately.
4. **Shift-out.** The chain registers form a shift path towards RU 0. RU 0
   presents one correction per cycle to the array, whose row and column
   decoders write it into the faulty PE's partial-sum register. Shifting out
   one round's results overlaps with computing the next round.

Two kinds of RU are skipped:

- A **faulty RU** (`ru_faulty`) gets no work. Its chain register is bypassed
  by a wire, so the chain just gets shorter.
- An **idle RU** (no fault left for it) does not clock its registers and drops
  `ru_pwr_en`. `rcm_pwr_en` is low when the table is empty. These are the
  enables for power gating; the power switches themselves are not part of
  the RTL.

### Latency

Use these symbols:

- K: faulty PEs;
- n: healthy RUs;
- R = ceil(K/n): rounds;
- m: corrections in the last round (n if n divides K, else K mod n).

The RCM takes **N·R + m + 1 cycles** from `start` to `done`. This matches the
published estimate of N·K/n + n (or + K mod n), plus one cycle for the done
handshake.

The OS array needs 3N-1 cycles to compute and then N cycles to drain. The
drain must not start before the last correction has been written, so the
sequencer inserts **stall** cycles when needed:

```
run time (start to done) = max(4N-1, N*R + m + N + 2)
```

With N = 256 and 256 healthy RUs, there are no stall cycles for up to
509 faulty PEs (two rounds). Beyond that, every additional round of 256
faults adds 256 cycles.

| faulty PEs (N = 16) | 16 RUs | 4 RUs |
|---|---|---|
| 0 %  | 1.00 | 1.00 |
| 5 %  | 1.00 | 1.31 |
| 10 % | 1.00 | 2.09 |
| 15 % | 1.14 | 2.85 |
| 20 % | 1.34 | 3.63 |
| 25 % | 1.55 | 4.41 |
| 30 % | 1.76 | 5.38 |

These are run times normalised to the fault-free 4N-1, measured by
`tb_fsa_fault_ratio` on a 16 x 16 array. The two columns mirror the
256-RU and 64-RU configurations: one RU per column, and a quarter of that.

## Computing array and dataflows

`fsa_array` is an N x N grid of `fsa_pe` with one-way links. Operands go
right on the 8-bit horizontal links. Weights, stationary operands and partial
sums go down on the 24-bit vertical links. Each PE has:

- a horizontal operand register;
- a vertical operand register;
- a 24-bit partial-sum register;
- a MAC.

Operands and sums advance one PE per cycle.

**OS.**

- Row i is fed A[i][0..N-1] and column j is fed W[0..N-1][j], each skewed by
  its index.
- PE(i,j) accumulates C[i][j], and the last product lands after 3N-1 cycles.
- `drain` then shifts each column down one row per cycle into the output
  buffer, bottom row first.
- A faulty PE keeps the zero it was cleared to until the RCM overwrites it.

**WS / IS.**

- For N cycles, `preload` shifts the stationary operand down the columns.
  Weights for WS, activations for IS; the FIFOs are read last entry first.
- The other operand then streams in from the left, skewed, and partial sums
  flow down.
- Column j delivers result r in compute cycle r+N+j+1. Each column has its
  own output-buffer bank, so it writes the result as it arrives.
- A faulty PE passes the partial sum from above unchanged.
- IS runs the same hardware with the roles of A and W swapped. The output
  buffer's read port swaps row and column, so results are always read as
  C[row][col].

## Buffers

| buffer | module | size (default) | organisation |
|---|---|---|---|
| activation | `fsa_input_buffer` of `fsa_input_fifo` | 256 FIFOs x 256 x 8 bit = 64 KB | one FIFO per array row |
| weight | same | 64 KB | one FIFO per array column |
| output | `fsa_output_buffer` | 256 banks x 256 x 24 bit = 192 KB | one bank per array column |

A FIFO is appended by the loader. It is read by position, without popping,
through two ports: one for the array edge, one for the RCM. `buf_clear` empties
it for the next tile. Each FIFO holds N entries, so one run multiplies an
N x N tile by an N x N tile. Larger layers are cut into tiles by the host.

## Using the top level (`fsa_top`)

1. Report faulty PEs with `bist_we` / `bist_loc` (`x` = row, `y` = column).
   `bist_clear` empties the table. Pulse `bist_done` when finished, and set
   `ru_faulty` for any faulty RUs.
2. Pulse `buf_clear`, then push N times. Each push writes element f of
   `act_push_data` / `wgt_push_data` into FIFO f:

   | dataflow | activation push k | weight push k |
   |---|---|---|
   | OS | `act_push_data[i] = A[i][k]` | `wgt_push_data[j] = W[k][j]` |
   | WS | `act_push_data[c] = A[k][c]` | `wgt_push_data[j] = W[k][j]` |
   | IS | `act_push_data[r] = A[r][k]` | `wgt_push_data[c] = W[c][k]` |

3. Set `dataflow` (`DF_OS`, `DF_WS`, `DF_IS`) and pulse `start` while `ready`
   is high.
4. `done` pulses after 4N-1 cycles (OS, no stall) or 4N cycles (WS/IS).
   `stall` is high while the drain waits for the RCM.
5. Read C[i][j] with `out_rd_row = i`, `out_rd_col = j`. The data arrives one
   cycle later on `out_rd_data`.

The fault table and the RU assignment survive between runs. After a run, the
controller dispatches round 0 again by itself.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 256 | array size; also the FIFO depth and the tile size |
| `N_RU` | 256 | number of RUs (the 64-RU configuration is `N_RU = 64`); must not exceed `N` |
| `MAX_FAULTS` | `N*N` | fault table capacity |

Data types are in `fsa_pkg`:

- signed 8-bit activations and weights;
- signed 24-bit partial sums, which hold 256 products of two 8-bit values
  without overflow;
- 16-bit coordinates.

## Departures and limits

The following follow the published architecture:

- array size, link widths, buffer sizes and RU counts;
- the FIFO-per-row/column buffers;
- switching off faulty PEs and overwriting their registers;
- the RU structure (MAC, register, MUX/DEMUX chain, faulty-RU bypass);
- the round-based OS workflow and its latency;
- power-gating of the RCM and of idle RUs.

The following are this design's own choices:

- the number format;
- the host interface and operand layouts;
- non-destructive FIFO reads;
- the dispatch scheme with shadow targets, and the separate accumulator and
  chain register in each RU (needed so an RU can shift one result out while
  computing the next);
- the chain direction;
- the row/column-decoded correction port;
- the banked output buffer;
- the drain stall;
- the WS/IS preload path and timing.

Not implemented:

- **Recomputation in WS and IS.** The published description has the RCM
  search the weight FIFO for a faulty PE's weight (about N(N+1)/2 cycles on
  average) and add the products into the outputs through the array's adders.
  It does not say how those adders receive them. Here, WS/IS results lack the
  products of faulty PEs. The RCM is not started in those dataflows.
- **The built-in self-test, off-chip memory and power switches.** The self-test
  and off-chip memory are outside the design; the power switches are physical
  parts. The top level brings the fault-table write port, the buffer push
  ports and the power-gating enables out instead.

## Files

`rtl/`:

- `fsa_pkg.sv`: types and widths;
- `fsa_pe.sv`, `fsa_array.sv`: PE and computing array;
- `fsa_input_fifo.sv`, `fsa_input_buffer.sv`, `fsa_output_buffer.sv`: buffers;
- `fsa_fault_table.sv`: fault table;
- `fsa_ru.sv`, `fsa_ru_array.sv`, `fsa_rcm_ctrl.sv`, `fsa_rcm.sv`: RCM;
- `fsa_top.sv`: top level.

`tb/` has one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_fsa_fault_ratio.sv`, the fault-ratio sweep above.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends a testbench that hangs. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fsa_pkg.sv tb/tb_fsa_top.sv \
          --top-module tb_fsa_top -Mdir obj_top -o sim
./obj_top/sim
```

The testbenches run at reduced sizes (N = 4 to 16). They check:

- every result against a product computed in the testbench;
- cycle counts against the latency formulas above;
- in `tb_fsa_top`, that each mechanism actually occurred: masking, correction,
  stall, multi-round recomputation, RU bypass, RCM and RU gating, multicast,
  duplicate fault reports, WS, IS and dataflow switching.

Two handshake rules are checked by assertions in the RTL, so any testbench
that breaks them reports an error (build with `--assert`):

- `fsa_rcm_ctrl` must only see `start` while `ready` is high;
- `fsa_top` must never receive a correction once the drain has begun.

The largest array simulated is 16 x 16. At the default 256 x 256, Verilator
needs about 3.5 minutes and 7 GB just to elaborate and lint the array. Nothing
at full size has been simulated. To simulate larger sizes, override `N` and
`N_RU` on `fsa_top`.
