# Zero-aliasing space compaction for BIST of the ISCAS 85 c432

A built-in self-test (BIST) response path has to shrink the outputs of the
module under test (MUT) before they can be compared against a stored
fault-free reference. A *space compactor* turns the MUT's k output lines
into a few lines, ideally one. A *time compactor* then folds that bit stream
into a short signature. The risk is *aliasing*: a fault shows at the MUT
outputs, but the compacted result equals the fault-free one.

The approach here builds the space compactor as a small tree of ordinary
gates (AND/NAND, OR/NOR, XOR/XNOR). The gates are chosen at design time so
that every single stuck-line fault the test set detects at the MUT outputs
is still detected at the compactor output. The MUT itself is not changed.
This repository gives synthesizable SystemVerilog for the hardware of that
scheme, built around the worked example: the ISCAS 85 **c432** benchmark
(36 inputs, 7 outputs), compacted to a single line.

The scheme comes from M. A. Hossain, *On a New Graph Theory Approach to
Designing Zero-aliasing Space Compressors for Built-in Self-testing*
(M.A.Sc. thesis, University of Ottawa, 2006). The c432 compaction trees,
the 3-stage pattern generator, the fault-injection select code and the
overall data flow follow that work. Everything else listed under
"Design choices" below is this implementation's own.

## How the compaction trees are chosen

Choosing the gates is a design-time procedure run in software. None of it
is hardware, but it explains why the gates look the way they do:

1. Fault-simulate the MUT with its test set. Then, for every pair of
   output lines, try merging the pair with each gate family. A pair is
   *incompatible* for a family if merging it loses any detected fault.
2. Treat the incompatible pairs as a graph. Split the graph repeatedly
   around non-adjacent vertex pairs, taking the pair with the largest
   degree complement first and discarding contained subgraphs. This yields
   the *maximal compatibility classes* (MCCs): the largest sets of lines
   that one gate of that family can merge.
3. Merge the largest MCC with its gate. Keep going with the remaining lines
   and classes, and XOR whatever is left. Fault-simulate the MUT plus the
   tree. Accept the stage only if coverage is still 100 %, then repeat on
   the new, narrower output set.

XOR is the safe default: any single error on an XOR input always reaches
the output. AND and OR merge more lines per gate but can hide errors. An
AND whose other inputs are 0 hides the error, and so does an OR whose
other inputs are 1. AND/OR classes are therefore admitted only where the
test set never hides a fault that way.

For c432 the procedure found no XOR-incompatible pairs. Line 421 is
incompatible with every other line for AND and for OR. The other lines form
four-line AND and OR classes. Two trees came out, both with compaction
ratio 1/7.

## The c432 compactors (`c432_compactor_t1`, `c432_compactor_t2`)

The lines keep their netlist numbers: the c432 outputs are 223, 329, 370,
421, 430, 431 and 432, and the new lines are 433 to 436.

| line | tree #1                   | tree #2                   |
|------|---------------------------|---------------------------|
| 433  | AND(223, 329, 370, 430)   | OR(223, 329, 370, 431)    |
| 434  | XOR(431, 432)             | XOR(421, 430)             |
| 435  | OR(421, 433)              | XOR(432, 433)             |
| 436  | XOR(434, 435) = output    | XOR(434, 435) = output    |

Both trees are purely combinational and use four gates each. The merger
gate is `merge_gate`, an N-input gate whose type is a parameter.
`bist_pkg::c432_resp_t` carries the seven outputs, with 223 in the top bit.
The internal lines 433 to 435 are brought out as ports so that they can be
observed. With the parameter `FAULT_INJ = 1`, each of the lines 433 to 436
gets a fault-injection multiplexer, driven by the 2-bit selects in `fi_int`
(`fi_int[0]` is line 433). The default `FAULT_INJ = 0` builds the bare
four-gate tree and ignores `fi_int`.

What the trees guarantee, and what they do not:

- In tree #1, any single error on 431 or 432 always flips 436. In tree #2,
  the same holds for 421, 430 and 432. The testbenches check this for all
  128 response words.
- The lines that go through the AND (tree #1) or the OR (tree #2) are only
  safe for the test set the tree was designed with. The original work
  reports 100 % coverage with the compactor using a 75-vector compacted
  test set, but it does not give the c432 responses to those vectors.
  The one response table it does give is for a different set of
  51 vectors. Under that set, the testbenches find that stuck-at faults on
  the seven compactor inputs stay visible as follows:
  - tree #1: 12 of 14 (223 stuck-at-1 and 329 stuck-at-1 are masked by the
    AND);
  - tree #2: 13 of 14 (370 stuck-at-0 is masked by the OR).

  This is expected behaviour and not a defect: a tree is zero-aliasing only
  for the test set it was built for.
- Faults in the compactor itself: under the same 51 responses, all 8
  stuck-at faults on lines 433 to 436 change line 436 for both trees, so
  the compactor adds no undetectable fault of its own.

## The BIST session (`c432_bist_top`)

```
 pattern source ──mut_in──▶ [ c432, outside ] ──mut_resp──▶ fault-injection mux
   (LFSR or external                                             │ 7 lines
    vector store)                                                ▼
                                                         space compactor (tree #1/#2)
                                                                 │ line 436
                                                                 ▼
            ref_signature ──▶ comparator ◀── signature ◀── signature analyzer
                               │
                             pass / done
```

The c432 netlist is not part of this design. It sits between the `mut_in`
outputs and the `mut_resp` inputs of the top.

- **Pattern source.** When `mode = 0`, a 36-stage LFSR (`lfsr_tpg`) loaded
  with `seed` applies pseudorandom patterns. When `mode = 1`, deterministic
  vectors arrive on `ext_pattern`. The top asks for vector number
  `pattern_index` and expects it in the same cycle (a ROM read
  combinationally, for instance).
- **Fault injection.** A `fault_inject_mux` sits on each of the seven
  response lines, with a 2-bit select per line in `fi_sel`: `00` or `11`
  passes the line, `01` forces stuck-at-1, `10` forces stuck-at-0. The
  compactor lines 433 to 436 get the same multiplexers, selected by
  `fi_int`. With them, a detection can be shown in silicon without an
  external fault simulator. `FAULT_INJ` (default 1) removes all of these
  multiplexers when set to 0.
- **Time compactor.** `signature_analyzer` divides the stream on line 436
  by h(X) = X^16 + X^12 + X^5 + 1, first bit as the highest power. The
  signature is the remainder.
- **Comparator.** `signature_comparator` compares the signature with the
  stored fault-free `ref_signature`.
- **Controller.** `bist_controller` sequences the session.

Session timing, counting clock edges from the edge that sees `start`:

| edge        | what happens                                                    |
|-------------|-----------------------------------------------------------------|
| 0           | seed loaded, signature and verdict cleared, `num_patterns` latched |
| 1 … N       | pattern k = 0 … N−1 applied during the cycle before edge k+1; the signature shifts in that pattern's bit 436 |
| N+1         | comparator captures `signature == ref_signature`                |
| N+2 onwards | `done` = 1 and `pass` valid, held until the next `start`         |

`busy` is high from edge 1 up to edge N+1. A `start` during a session is
ignored. One pattern is applied per clock; the MUT and the compactor must
settle within one cycle.

## Pattern generator (`lfsr_tpg`)

`lfsr_tpg` is a Fibonacci LFSR. Stage `q[0]` (Q1) takes the XOR of the
stages selected by `TAPS`, and every other stage takes the bit of the stage
before it. The defaults are the 3-stage generator of the original work:
Q1 ← Q2 ⊕ Q3 with seed 111, which runs 111, 011, 001, 100, 010, 101, 110
(Q1 Q2 Q3) and repeats after 7 clocks. The c432 top uses 36 stages with
feedback from stages 36 and 25, from the primitive trinomial x^36 + x^25 + 1,
so the period is 2^36 − 1. An all-zero state locks up the register, and an
assertion flags it.

## Design choices and departures

- The signature register width and polynomial, the 36-stage LFSR
  polynomial, the 16-bit pattern counter, the asynchronous active-low
  reset and the controller's phases are this design's choices. The
  original work leaves them open.
- The signature register is written so that its state *is* the remainder
  e(X) mod h(X). This follows the polynomial-division description of
  signature analysis; the exact tap wiring of a drawn LFSR was not used.
- AND and OR are used rather than NAND and NOR, as in the published trees.
  Either form gives the same coverage.
- Fault injection covers the seven lines entering the compactor and the
  compactor's four lines. The original work injects faults on every wire,
  including those inside the MUT, which needs the MUT netlist.
- `TREE` (default 1) selects tree #1 or tree #2. Both are published with
  the same compaction ratio.

## Not included

- The c432 itself, and any other benchmark circuit.
- Compactors for the other ISCAS 85 and ISCAS 89 circuits. Their merge
  structure was never published, only gate counts, fan-in and compaction
  ratios. For example, c2670 compacts 140 lines to 3 and the others
  compact to 1.
- The design-time software that finds incompatible pairs and
  compatibility classes and builds the trees.
- Fault injection on wires inside the c432, and the small example circuit
  drawn with the fault-injection set-up, whose gate types are not given.

## Files

`rtl/` holds one module or package per file:

- `bist_pkg.sv`: gate and fault-select enums, `c432_resp_t`
- `merge_gate.sv`: N-input AND/NAND/OR/NOR/XOR/XNOR merger
- `c432_compactor_t1.sv`, `c432_compactor_t2.sv`: the two c432 trees
- `fault_inject_mux.sv`: stuck-at fault injection per wire
- `lfsr_tpg.sv`: pattern generator
- `signature_analyzer.sv`: serial signature register
- `signature_comparator.sv`: verdict against the reference signature
- `bist_controller.sv`: session sequencing
- `c432_bist_top.sv`: the whole response path

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
the following:

- `tb_c432_bist_top_tree2.sv`: the end-to-end test with tree #2. A second
  top built with `FAULT_INJ = 0` runs alongside it and must give the
  fault-free result whatever the fault selects say.
- `c432_resp_model.sv`: a simulation stand-in for the c432. For the 51
  recorded vectors in `c432_table51.hex` it returns the recorded
  responses. Each line of that file holds the 36-bit vector followed by
  the 7 outputs. For any other vector it returns a fixed parity function
  of the inputs, which is *not* the c432.

`tb_c432_bist_top.sv` runs the top at its default parameters. It covers the
51-vector deterministic session (pass, and fail against a wrong reference),
all 14 stuck-at faults on the response lines, all 8 on the compactor
lines, pseudorandom sessions with and without a fault, restarts and mode
switches. It also runs pseudorandom sessions of 75, 80, 124 and 2752
patterns, the c432 test lengths for which the compacted circuit was
evaluated. It checks every applied pattern, every compacted bit, the
signature, the verdict and the N+2 timing against values it computes
independently.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

Run from the repository root, since the testbenches read
`tb/c432_table51.hex` by that relative path:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
    tb/tb_c432_bist_top.sv --top-module tb_c432_bist_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*.sv` and its module name to run another test.
All testbenches finish in well under a second.
