# Vector-deductive fault simulation with faults as addresses

This is a hardware single stuck-at fault simulator for combinational circuits.
It contains no gate-level evaluation of the circuit under test. Every element of
the circuit is described by a table, and the simulation is a chain of memory reads.

- The fault-free value of an element's output is a read of its truth vector.
  The element's input word is the read address.
- The list of faults that reach the element's output is built one coordinate at a
  time. Coordinate `j` is one read of a precomputed *deductive vector*. The read
  address is made of bit `j` of each input's fault list.

So the fault lists are not operands of set operations, as they are in classic
deductive simulation. They are addresses. The only precomputed structure is the
*matrix of deductive vectors* (MDV) of each element type. Hardware builds the MDV
from the element's truth vector.

## The deductive vector

Take an element with `N` inputs and truth vector `Q`. Bit `a` of `Q` is the
output for input word `a`. Suppose the element sits on input set `x`. A single
fault elsewhere in the circuit flips some subset `a` of its inputs (bit `k` of
`a` set = input `k` flipped). That fault reaches the output exactly when
`Q[x xor a] != Q[x]`. The deductive vector for input set `x` is that predicate for
every `a`:

    D_x[a] = Q[x xor a] xor Q[x]

The method reaches this result in two steps:

1. Modify the truth vector by the current output: `L = Q xor {Q[x],...,Q[x]}`.
2. Permute it with row `x` of a permutation matrix `H`: `D_x[j] = L[H[x][j]]`.

`H` is built by a quadrant recursion. The 1x1 matrix is `[0]`. To go from size
`s` to size `2s`:

- The first quarter is kept.
- The second quarter is `H[r][s+j] = (2s-1) - H[r][s-1-j]`.
- The third quarter is a copy of the second.
- The fourth quarter is a copy of the first.

After `N` levels, `H[r][c] = r xor c`. The hardware builds `H` this way, one level
per clock (`hmatrix_synth`), and does not rely on the closed form. The testbench
checks the closed form.

Vectors below are written address 0 first, as strings. Examples:

- 2-input NAND: `Q = 1110`. On input set `10`, `L = 0001` and `D = 0100`.
  Only fault combination `01` reaches the output, i.e. a fault on the input that is 0.
- XOR `0110` and XNOR `1001` both give `D = 0110` on every input set.
- 3-input `11001100` depends on its middle input only. It gives `00110011` on every set.

An element that ignores one of its inputs is just a truth vector that does not
depend on that bit. A 2-input slot can therefore hold an inverter or a buffer.
The deductive vector then ignores faults on the unused input automatically.

## The sequencer: one memory block

`mdv_memory` holds, per element type, `2^N` deductive vectors of `2^N` bits. It
has two addresses:

- The **Vector address** is the element's input set. It selects `D_x`.
- The **Bit address** is `{f_{N-1}[j], ..., f_0[j]}`: coordinate `j` of the `N`
  input fault vectors. It selects one bit of `D_x`.

The bit read back is coordinate `j` of the output fault vector. `vd_sequencer`
steps `j` through the coordinates, issuing one read per clock. Worked example, a
NAND on input set `10`: the input pairs `11 11 01 00 00 10 01 01 01 10 01 00`
read back `0 0 1 0 0 0 1 1 1 0 1 0`.

## Circuit simulation: the fault table

`vd_fault_sim` runs a whole circuit. The netlist is a table of elements. Each
entry has an output line, `N` input lines and a type. One test set runs as follows:

1. **Prepare.** The fault table (`fault_table`) holds one fault vector per line,
   one coordinate per line. It is reset to the identity: each line carries only
   its own fault. The primary inputs (lines `0..NPI-1`) take the test set.
2. **Per element, in table order:**
   - the input word reads the truth vector (`q_memory`), which gives the fault-free
     value of output line `o`;
   - the sequencer forms coordinates `0..o-1` of row `o`;
   - coordinate `o` is set to 1, because a line's own fault always shows on it.
     Lines are numbered so that every output is above its inputs, so coordinates
     above `o` are always zero. Only the lower half of the table is ever read.
3. **Detect.** The faults detected are the union of the primary-output rows. A
   fault detected on line `j` is the stuck-at of the inverse of `j`'s fault-free
   value.
4. **Coverage.** `coverage_acc` merges the detected faults into a per-line
   coverage matrix:
   - `COV_SA0` or `COV_SA1` when one stuck-at of the line has been detected;
   - `COV_BOTH` (written `x`) when both have;
   - `cov_complete` rises when every line in use is `x`.

The method is exact for single stuck-at faults on the listed lines, reconvergent
fanout included. A fault that reaches several inputs of an element reads the
deductive bit for that whole combination. Fanout branches are not separate fault
sites unless the netlist gives them their own lines, e.g. through buffer elements.

## Configuring and running

The conventions are:

- Input `k` of an element drives bit `k` of both its input word and its Bit address.
- Bit `i` of `test_vec` drives line `i`.

To configure and run the simulator:

1. **Element types.** Pulse `cfg_q_we` with `cfg_q_type` and `cfg_q_vec`. The
   vector is stored, and `mdv_synth` then writes that type's matrix:
   - the MDV of each type is built by the hardware, with no external tables;
   - `busy` stays high for `N + 2^N + 3` clocks;
   - a new type can be loaded between test sets. This rebuilds its matrix.
2. **Netlist.** While idle, pulse `cfg_el_we` for each element with its index,
   output line, input lines and type. Then set `cfg_num_elems`, `cfg_num_lines`
   and `cfg_po_mask`.
3. **Coverage.** `cov_clear` empties the coverage matrix.
4. **Test set.** Pulse `start` with `test_vec`. `done` pulses when the set is
   finished. After that, the following hold until the next start:
   - `line_values`
   - `detected`
   - `test_count` (faults detected by this set)
   - `total_count` (distinct faults so far)
   - `cov`

## Timing

- All memories read synchronously, one clock of latency. One coordinate is read
  per clock.
- An element with output line `o` takes `o + 4` clocks: fetch, value, `o` reads
  and a write.
- A test set takes `3 + sum(o + 4)` clocks from the clock that takes `start` to `done`.
  - For c17 on the default build this is 72 clocks.
  - In general it is about half of `lines x lines` reads, one per clock.
- `hmatrix_synth` takes `N` clocks.
- `mdv_synth` writes one deductive vector per clock.

## Modules

| module | role |
|---|---|
| `vd_pkg` | coverage code `cov_t`, controller states |
| `hmatrix_synth` | recursive builder of the permutation matrix `H` |
| `dv_synth` | combinational operator `D_x = (Q xor Q[x])` permuted by `H` row `x` |
| `mdv_synth` | builds `H`, then writes all `2^N` deductive vectors of one type |
| `mdv_memory` | deductive-vector matrices; Vector address + Bit address -> 1 bit |
| `q_memory` | truth vectors; input word -> fault-free output bit |
| `vd_sequencer` | steps the coordinates, forming bit addresses from the input fault vectors |
| `fault_table` | per-line fault vectors, diagonal preparation, output-row union |
| `coverage_acc` | coverage matrix, counts, completeness |
| `vd_fault_sim` | top: netlist table and controller wiring all of the above |

## Parameters and sizes

The defaults fit c17 and circuits of the same size:

| parameter | default | meaning |
|---|---|---|
| `N` | 2 | element inputs |
| `NTYPES` | 4 | element types held at once (at least 2) |
| `LINES` | 12 | lines, i.e. fault coordinates |
| `ELEMS` | 7 | elements |
| `NPI` | 5 | primary inputs |
| `ONTHEFLY` | 0 | 1: form each deductive vector on demand, no stored matrices |

Memory grows as `NTYPES x 2^N x 2^N` bits for the matrices and `NTYPES x 2^N`
for the truth vectors. That is 64 + 16 bits at the defaults, 256 + 32 at `N = 3`,
and 64 Ki bits per type at `N = 8`. At `N = 16` it would be 512 MiB per type,
which is why wide register-level elements are impractical to store whole.

The fault table is `LINES x LINES` flip-flops. Simulation time grows with
`LINES^2 / 2`.

## Design choices beyond the method

These are choices of this implementation, not part of the method:

- A programmable netlist table and several element types in one memory. The
  method's own example uses one type (NAND).
- Registered memory reads and a one-read-per-clock sequencer.
- Topological line numbering as the processing rule.
- The union over several primary outputs.
- The count outputs.
- Asynchronous active-low reset of the control state.
- The memory block returns one bit per read, and the output fault vector is
  assembled serially, one coordinate per clock. A wider read that returns
  several coordinates at once is not built.

In the second-quarter rule of the `H` recursion, the mirrored column is taken as
`s-1-j`. This is the reading that makes every row a permutation, and it matches
the known rows of the 3-input matrix.

## On-the-fly deductive vectors (`ONTHEFLY = 1`)

The stored matrix costs `2^N x 2^N` bits per type. That is the weak point for
wide elements. The alternative is to form only the one deductive vector an
element needs, at the moment it is needed.

With `ONTHEFLY = 1` the top does not build `mdv_synth` or `mdv_memory`:

- a Q-vector write only builds `H` (`N` clocks);
- while an element is fetched, `dv_synth` forms `D_x` from the element's whole
  Q-vector and row `x` of `H`, all coordinates in parallel, into a register;
- the sequencer reads that register with the same one-clock latency.

Per-test timing is therefore identical in both modes. Memory per type drops to
the Q-vector alone. In exchange, the `H` matrix (`2^N x 2^N x N` flip-flops) and
a `2^N`-way permutation network are added. The default remains the
stored-matrix sequencer.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_hmatrix_synth`: every entry against `r xor c` at `N = 3` and `2`; rows are
  permutations; 3-input rows 4 and 5; level timing.
- `tb_dv_synth`: all 2-input truth vectors and sets against
  `Q[x xor a] xor Q[x]`; the NAND, XOR/XNOR and 3-input examples above.
- `tb_mdv_synth`: full matrices at `N = 3` (including `10000001` and
  `11001100`), write counts and clock count.
- `tb_mdv_memory`, `tb_q_memory`: random contents, address roles, latency.
- `tb_vd_sequencer`: the NAND worked example, random matrices and coordinate
  counts, reads per element, `count + 1` clock latency.
- `tb_fault_table`, `tb_coverage_acc`: models of the table and the coverage matrix.
- `tb_vd_fault_sim`: the top at default parameters. It runs two circuits:
  - c17 (ISCAS-85; six NANDs on lines 0-10), on 11111 and then all 32 test sets;
  - twenty random 7-element, 12-line circuits with mixed and reloaded element types.

  Every result is compared with serial fault injection (flip one line,
  re-simulate, compare outputs), including the clock count. c17 reaches
  complete coverage: 22 of 22 line faults. The test also counts how often each
  mechanism occurs, and fails if any of them never happens:
  - matrix synthesis;
  - reconvergent reads (both inputs faulty);
  - faults blocked and passed by an element;
  - skipped upper-half coordinates;
  - undetected faults;
  - coverage completion and clear.
- `tb_vd_fault_sim_n3`: the top built for 3-input elements (16 lines, 10
  elements), against the same serial reference.
- `tb_vd_fault_sim_otf`: the same checks with `ONTHEFLY = 1`.

To run one with Verilator, for example the top:

    verilator --binary --timing -Irtl -y rtl rtl/vd_pkg.sv tb/tb_vd_fault_sim.sv \
        --top-module tb_vd_fault_sim --Mdir obj
    ./obj/Vtb_vd_fault_sim

Replace the testbench name for the others. The package file must come first.

## Limits

- Combinational circuits only. There is no sequential-element handling.
- Only single stuck-at faults on lines.
- Circuits larger than `LINES` / `ELEMS` need the parameters raised. The fault
  table, and the per-test time, grow quadratically with `LINES`.
- Lines must be numbered topologically. The hardware does not check this: an
  element whose input line is at or above its own output line gives wrong
  fault lists.
