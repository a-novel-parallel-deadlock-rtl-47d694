# Parallel hardware deadlock detection unit

In a multiprocessor system-on-chip, processors hold and request shared
hardware resources (DMA engines, codecs, bus interfaces). When every
resource has a single unit, the system is deadlocked exactly when the
resource allocation graph (processors and resources as nodes, request
edges from processor to resource, grant edges from resource to processor)
contains a cycle. Software cycle detection takes time proportional to the
size of the graph and competes for the CPU. This design answers the
question in hardware: the graph is held as a matrix, and every row and
every column of that matrix is examined in parallel, once per clock cycle,
until the answer is known.

## The matrix and the reduction

Row `i` stands for processor `p_i`, column `j` for resource `q_j`. Each
element holds one of three values, coded on two bits:

| element | meaning                         | code (`cell_t`) |
|---------|---------------------------------|-----------------|
| `r`     | `p_i` requests `q_j`            | `2'b10` (`CELL_REQ`)   |
| `g`     | `q_j` is granted to `p_i`       | `2'b01` (`CELL_GRANT`) |
| `0`     | no edge                         | `2'b00` (`CELL_ZERO`)  |

A column holds at most one `g` (one unit per resource). A row or column
that contains only `r`s or only `g`s is a node with edges in one direction
only, a sink or a source, and cannot lie on a cycle: its elements can be
removed. Removing them may turn further rows or columns into sinks or
sources. Repeating until nothing changes leaves either an empty matrix (no
deadlock) or a remainder in which every non-empty row and column holds both
an `r` and a `g`; there every node has an outgoing edge, so a cycle
exists, and the remainder is exactly the set of edges the deadlock
involves (plus any edges trapped between cycles).

The test for one line is two OR gates and an XOR: OR together the request
bits of the line, OR together the grant bits, and XOR the two. The result
is 1 when the line holds one kind of element only. All `M` row tests and
`N` column tests are done in the same cycle on the same matrix, and an
element is cleared if its row **or** its column is reducible.

Example (two processors DSP, VSP; resources IcP, PCI, WI):

```
        IcP PCI WI                iteration 1: column WI holds only g -> cleared
  DSP    g   r   0                iteration 2: nothing reducible
  VSP    r   g   g                result: deadlock, 2 iterations
```

Removing the request VSP -> PCI gives no deadlock in 3 iterations
(PCI and WI columns go first, then both rows, then an empty check).

## Architecture

```
   +-------------+-------------+-- ... --+--------------+
   | matrix cell | matrix cell |         | weight cell  |  row i: OR/XOR of the N elements
   +-------------+-------------+         +--------------+
   |     ...     |             |         |     ...      |
   +-------------+-------------+-- ... --+--------------+
   | weight cell | weight cell |         | decide cell  | --> busy, done, deadlock, steps
   +-------------+-------------+-- ... --+--------------+
     column j: OR/XOR of the M elements
```

* `ddu_matrix_cell` – a two-bit register per element. It loads the
  allocation matrix when a run starts and clears itself when, during a run,
  its row's or its column's weight cell reports "reducible".
* `ddu_weight_cell` – the OR/OR/XOR test of one line; also reports whether
  the line still holds anything.
* `ddu_decide_cell` – ORs all `M + N` reducible signals, keeps the unit
  stepping while anything was reducible, counts iterations and, in the
  first iteration that reduces nothing, decides: deadlock if any row is
  still non-empty.
* `ddu` – the `M x N` array of the above (`M = N = 50` by default).
* `rag_matrix` – the system's current allocation state, changed by
  request / grant / release events.
* `ddu_top` – `rag_matrix` feeding `ddu`; the unit as an SoC peripheral.
* `ddu_pkg` – the element and event types and the default sizes.

Area grows with `M x N` (one two-bit register and a few gates per
element, plus `M + N` OR trees); the time per iteration is one OR tree of
depth `log2(max(M, N))`, an XOR, and the clear logic.

## Timing of a detection run

```
clk edge        0          1          2   ...   s
detect_start  __/‾‾\_____________________________
busy          _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\___
done          ‾‾‾‾\__________________________/‾‾‾   (held until next start)
```

* At edge 0 the matrix cells copy the allocation matrix (`load`).
* Each following edge evaluates one iteration and clears the reducible
  lines.
* At edge `s` the first iteration that found nothing reducible registers
  the result: `done = 1`, `deadlock`, and `steps = s`. `steps` counts that
  final iteration too, so the two-processor example above reports 2 (with
  deadlock) and 3 (without), and an empty matrix reports 1.
* `detect_start` while `busy` is ignored. Events may keep changing the
  allocation state during a run; the run works on the copy taken at edge 0.
* After the run, the `lambda` output holds what could not be reduced.

### How many iterations

Each reducing iteration empties at least one row or column, so a run ends
within `M + N + 1` cycles; `ddu_decide_cell` asserts this. Typical graphs
need only a few iterations: the four-processor example below needs 2. The
worst case is a long chain of requests and grants that ends in a cycle:
only the open end of the chain can be removed, one node per iteration, and a
`k x k` chain of this kind takes `2k - 3` iterations (97 cycles at 50 x 50,
exercised in `tb_ddu_top`). The method is often quoted with a bound of
`min(M, N)` iterations; that bound does not hold for this case, and the
counter is sized for `M + N + 1`.

## Allocation state and events (`rag_matrix`)

| `ev_op`      | effect on each resource `j` set in `ev_res_mask`, for processor `ev_proc` |
|--------------|---------------------------------------------------------------------------|
| `EV_REQUEST` | element becomes `r` if it was `0` (an element already `g` is left alone)   |
| `EV_GRANT`   | element becomes `g`, unless another processor holds `q_j`: then it is unchanged and `ev_error` pulses |
| `EV_RELEASE` | element becomes `0` (release of a grant or withdrawal of a request)        |
| `EV_NOP`     | nothing                                                                    |

A processor index of `M` or more is refused with `ev_error`. One event is
applied per clock; the mask lets a processor request, take or release
several resources at once. An event is visible in `state` one cycle later,
so a `detect_start` in the next cycle includes it. An assertion checks that
no column ever holds two grants.

## Example: four processors, four resources

Four PowerPC processors share FFT, MPEG, PCI and a wireless interface
(columns q0..q3). The sequence

1. MPC750-1 requests and is granted FFT and MPEG;
2. MPC750-3 requests FFT and PCI and is granted PCI;
3. MPC750-2 requests FFT and PCI;
4. MPC750-1 releases FFT;
5. FFT is granted to MPC750-2

ends in the cycle MPC750-2 → PCI → MPC750-3 → FFT → MPC750-2. Only the
last state is deadlocked. The unit removes MPC750-1's row and the MPEG
column in the first iteration, finds nothing more in the second, and
reports the deadlock after 2 cycles, with the four cycle edges left in
`lambda`. In the reference system the processors and the unit ran at
83.3 MHz, so detection takes 24 ns against roughly 16,000 processor cycles
for a software search.

## Where this RTL departs from or adds to the method

* **Interface.** The unit was placed on the system bus of the SoC; no bus
  protocol is defined here. `ddu_top` exposes plain event and control ports
  that a bus slave or an operating-system driver would drive.
* **Event interface, refusal of double grants, reset to an empty matrix,
  the `start/busy/done` handshake and the `lambda` output** are this
  design's choices.
* **Step counting** includes the final, non-reducing iteration (as in the
  worked examples); a table of worst-case step counts for the method uses a
  count one lower for its smallest case.
* **Iteration bound**: `M + N + 1`, not `min(M, N)` (see above).
* **Gate-level timing** (about 4 ns per iteration at 50 x 50 in a 0.3 µm
  library) is not reproduced; the design is plain synthesizable RTL.

## Files

| file | contents |
|------|----------|
| `rtl/ddu_pkg.sv` | `cell_t`, `ev_op_t`, default sizes `DDU_M = DDU_N = 50` |
| `rtl/ddu_matrix_cell.sv`, `rtl/ddu_weight_cell.sv`, `rtl/ddu_decide_cell.sv` | the three cell types |
| `rtl/ddu.sv` | the detection array |
| `rtl/rag_matrix.sv` | allocation state |
| `rtl/ddu_top.sv` | top level |
| `tb/ddu_ref_pkg.sv` | reference models: graph-based cycle test (repeatedly removes nodes with no outgoing edge), software reduction, random matrices, chain-into-cycle generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ddu_sizes` |
| `tb/ddu_size_check.sv` | drives one array of a given size for `tb_ddu_sizes` |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on a
watchdog if it hangs.

* `tb_ddu_matrix_cell`, `tb_ddu_weight_cell`, `tb_ddu_decide_cell` – random
  and directed stimulus against small models of each cell.
* `tb_rag_matrix` – the four-processor event sequence and random events,
  including refused grants and out-of-range processors.
* `tb_ddu` (5 x 5) – the worked examples, the example's five states, an
  empty matrix, a chain into a cycle (7 iterations) and 400 random legal
  matrices. Each run is compared with the graph model (deadlock), the
  software reduction (iteration count, elements left), and the cycle count
  from start to `done`.
* `tb_ddu_sizes` – arrays of 2 x 3, 5 x 5, 7 x 7 and 10 x 10 side by side
  (helper `tb/ddu_size_check.sv`), random matrices against the reference
  models plus the chain into a cycle; the largest iteration counts seen are
  3, 7, 11 and 17.
* `tb_ddu_top` – the full 50 x 50 design with default parameters: the
  four-processor example (deadlock in 2 cycles), some 6,000 random events
  with about 280 detection runs (both outcomes, starts and events during
  runs, refused grants), and the 97-iteration chain. It counts each
  mechanism and fails if one never occurred. It runs in under a second of
  simulation time once built.

Running one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ddu_pkg.sv tb/ddu_ref_pkg.sv tb/tb_ddu_top.sv --top-module tb_ddu_top
./obj_dir/Vtb_ddu_top
```

For the cell testbenches, leave out `tb/ddu_ref_pkg.sv` if the testbench
does not import it. Sizes are changed through the `M` and `N` parameters
of `ddu` or `ddu_top` (or `DDU_M`/`DDU_N` in `ddu_pkg` for the default).
