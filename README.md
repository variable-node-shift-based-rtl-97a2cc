# Variable-node-shift PGDBF decoder for QC-LDPC codes

Probabilistic gradient-descent bit flipping (PGDBF) is a hard-decision LDPC decoder for the binary
symmetric channel. In every iteration it computes, for each variable node, an energy

    E = (v xor y) + (number of unsatisfied checks the node is in)

where `v` is the node's current value and `y` its received bit. The nodes whose energy equals the
largest energy in the word are candidates for a flip, and each candidate flips only with
probability p0. That randomness is what makes PGDBF decode much better than plain GDBF. A usual
implementation pays for it with a random bit generator and an AND gate in every variable node unit.

This design removes the random source altogether. It uses the variable-node-shift architecture
(VNSA), which applies to quasi-cyclic codes:

* Each base column of the code has Z variable node units (VNUs). A fraction p0 of them are
  **type 1**: they flip when their energy equals the maximum. The rest never flip.
* After every iteration each unit passes its updated value and its received bit to the next unit
  of the same column, from position j to position (j+1) mod Z. A given variable node therefore
  visits a different unit in each iteration. Whether it may flip is decided by the type of the unit
  it currently sits in, so the flip is "random" from the node's point of view.
* All base columns rotate together. Every circulant shift of the code is therefore offset by the
  same amount, and the fixed connection networks still give each node its own checks. Only the
  check node unit that computes a given check changes: it moves by one position per iteration as
  well.

The decoder does one full iteration per clock cycle. All N variable node units, all M check node
units and the maximum finder work in parallel (flooding schedule).

## Two variants

| `IMPRECISE` | name | non-flipping unit | maximum taken over |
|---|---|---|---|
| 0 (default) | VNSA-PGDBF | type 2: registers, XOR and energy adder; passes `v` on unchanged | all N energies |
| 1 | VNSA-IM-PGDBF | type 3: the two registers only | the p0·N type-1 energies |

The imprecise variant saves the energy logic of 30 % of the units and makes the maximum finder
smaller. Its maximum can be below the true maximum, namely when only nodes in type-3 units hold
the largest energy. Those nodes cannot flip anyway, so the type-1 nodes at the lower level flip
instead. This variant has been reported to decode better than the precise one on the (3,6) test code
for p0 ≥ 0.6. With `P0_PCT = 100` every unit is type 1, and the same RTL
is a deterministic GDBF decoder on the VNSA.

## Default configuration

| parameter | default | meaning |
|---|---|---|
| `Z` | 54 | circulant size |
| `NC` | 24 | base columns (N = NC·Z = 1296) |
| `NR` | 12 | base rows (M = NR·Z = 648) |
| `DV` | 3 | variable degree; check degree DC = DV·NC/NR = 6 |
| `P0_PCT` | 70 | p0 in percent; round(0.7·54) = 38 type-1 units per column |
| `ITMAX` | 300 | iteration limit |
| `IMPRECISE` | 0 | 0: VNSA-PGDBF, 1: VNSA-IM-PGDBF |

These are the sizes of a regular (3,6), rate-1/2, length-1296 QC-LDPC code, the design's main
test code. **The code itself is a substitute.** The base matrix of the original test code is not
available, so `vnsa_pkg` generates one of the same shape from two formulas:

    base row of circulant e (0..DV-1) of base column i:  (i + e·(1 + 4·floor(i/NR))) mod NR
    circulant shift:                                      (e·i² + 2^e·i + 3e) mod Z

For the default sizes, and for DV = 4 at the same length, this base graph has no 4-cycles. The
formulas need NC to be a multiple of NR. To decode a different code, replace `base_row` and
`base_shift` in `rtl/vnsa_pkg.sv`. The rest of the RTL reads the code only through these two
functions and the two search functions derived from them.

The placement of the type-1 units is also this design's own choice. In base column i, position j
is type 1 when `(m_i·j + 7i + 3) mod Z < round(p0·Z)`, where m_i is the (i mod 8)-th integer coprime
with Z. This gives exactly round(p0·Z) type-1 units in each column, and the placement differs from
column to column.

## Interface and timing (`vnsa_pgdbf_decoder`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: load `y_in` and start decoding |
| `y_in` | in | N | received word; bit `i*Z+j` is node j of base column i |
| `codeword` | out | N | current tentative word, natural order |
| `busy` | out | 1 | decoding in progress |
| `done` | out | 1 | finished; stays high until the next `start` |
| `success` | out | 1 | finished because every parity check holds |
| `iters` | out | ⌈log2(ITMAX+1)⌉ | iterations performed |

Let `start` be sampled at clock edge 0. The word is loaded into the B (value) and C (received bit)
registers of all units at edge 0. Iteration k completes at edge k+1. Before each iteration the
syndrome of the current word is checked. Decoding stops when the syndrome is zero (`success = 1`)
or when `ITMAX` iterations are done (`success = 0`). `done` then rises at edge `iters + 2`. A
`start` while busy restarts decoding.

After k iterations, node j of a column sits at position (j+k) mod Z. The controller keeps k mod Z,
and a combinational rotator (`column_rotator`) puts the word back in natural order at the output.
The loading scheme, the handshake, the reset and this output rotator are this design's own
choices.

## Module map

| file | role |
|---|---|
| `vnsa_pgdbf_decoder.sv` | top: unit chains per base column, wiring of all parts |
| `vnu_type1.sv` | flipping unit: B, C, `v xor y`, energy adder, `E == Emax`, flip XOR |
| `vnu_type2.sv` | non-flipping unit that still reports its energy |
| `vnu_type3.sv` | non-flipping unit of the imprecise variant: B and C only |
| `check_node_array.sv` | connection network 1, M check node units, connection network 2 |
| `cnu.sv` | check node unit: XOR of DC inputs |
| `max_finder.sv` | maximum energy (one OR per energy level) |
| `syndrome_check.sv` | NOR over all check values |
| `decode_ctrl.sv` | load, iteration counter, stop rule, rotation offset |
| `column_rotator.sv` | un-rotates the tentative word for the output |
| `vnsa_pkg.sv` | code construction, unit placement, widths |

Energies range from 0 to DV+1, so they are `ceil(log2(DV+2))` bits wide (3 bits for DV = 3). The
maximum finder uses this small range. For each level t it ORs `E >= t` over all inputs, and the
maximum is the highest level whose OR is set. Any other maximum circuit can replace it.

## Departures and limits

* The code is a generated substitute with the published sizes (see above). Error-rate results for
  the original code will not carry over exactly.
* The original placement of the type-1 units and the original maximum-finder circuit are not
  published. Both are this design's own choices.
* The reported synthesis results (90 nm area, power, 370–400 MHz) come from a standard-cell flow
  that is not part of this RTL. No timing constraints are given here. The critical path runs
  from the B registers through the connection networks, the CNUs, the energy adders and the
  maximum finder, then back through the comparators to the next unit's B register.
* Other codes used in published evaluations of this architecture need their own parameters and base matrix. The
  (4,8) length-1296 code only needs `DV = 4`. The (4,34), Z = 140, length-9520 code needs
  NC = 68 and NR = 8, which the generated base matrix cannot provide.

## Simulation

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Build one
with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/vnsa_pkg.sv tb/tb_vnsa_pgdbf_decoder.sv \
        --top-module tb_vnsa_pgdbf_decoder -Mdir obj -o sim && obj/sim

* `tb_vnsa_pgdbf_decoder` runs both variants at full size, plus the deterministic GDBF
  configuration (`P0_PCT = 100`). It compares them clock by clock with
  a plain PGDBF model written from the algorithm, working in natural node order. The model lets
  node j of column i flip in iteration k when position (j+k) mod Z of that column is type 1. It
  checks the tentative word, the iteration count and the maximum energy every cycle, and at the
  end `done`, `success` and the latency. It also makes sure that each mechanism happens at least
  once: a stop on zero syndrome, a stop at the iteration limit, flips, a maximum-energy node held
  back by a non-flipping unit, an imprecise maximum below the true one, and runs longer than Z
  iterations.
* `tb_vnsa_pgdbf_full` does the same for one decoder with all parameters at their defaults.
* `tb_vnsa_dv4` does the same for the (4,8) length-1296 code (`DV = 4`).
* The other testbenches each cover one unit. `tb_check_node_array` also checks the property the
  architecture rests on: rotating every base column by one position rotates every base row of
  the check vector by one position.

A random received word is the all-zero codeword with random bit errors. Testbench loops use
variables as bounds so that Verilator does not unroll them; with the full-size netlist, unrolled
loops make the generated C++ very large.
