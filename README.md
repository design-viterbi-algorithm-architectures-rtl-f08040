# Fault-detecting compare-select-add datapath for look-ahead Viterbi decoders

A Viterbi decoder spends most of its logic and all of its critical loop in the
add-compare-select recursion that updates the path metrics. When the decoder
uses M-step look-ahead, the recursion is reordered as *compare-select-add*
(CSA): two competing path metrics are compared, the smaller one is kept, and
branch metrics are then added to it. This block is where a transient upset or
a permanent defect does the most damage, because a wrong metric is fed back
and silently steers every later decision.

This RTL implements the CSA step, and its parallel form (PCSA), with two kinds
of concurrent error detection:

* **Signature-based checking.** Every register carries a parity signature, the
  multiplexers are duplicated, and the adders are self-checking. Each unit
  reports errors the cycle its result comes out.
* **Recomputation with encoded operands.** Every operation is computed twice
  on the same adder slices. The second pass uses shifted operands (RESO) or
  rotated operands (RERO), so a faulty slice corrupts different result bits in
  the two passes, and the two passes disagree.

In an M-step look-ahead decoder these units sit in the branch-metric
precomputation stage. There, the metrics of parallel trellis paths are
compared and the survivor is extended by the metric of the next step, with a
pipeline register every two steps. The ports use the names `pm1`, `pm2` for
the two compared metrics and `bm_a`, `bm_b` for the two added ones. The units
compute the same thing whichever metrics are fed to them.

The top level, `viterbi_architecture`, puts all six protected units side by
side on one set of metric inputs, so that their cost and detection behaviour
can be compared directly. It also has fault-injection inputs for
error-detection experiments.

## What every unit computes

Every unit takes two path metrics `pm1`, `pm2` and two branch metrics `bm_a`,
`bm_b`, all `W` = 16 bits wide, and returns

```
dec  = (pm2 is smaller)          -- decision bit for the survivor memory
out1 = min(pm1, pm2) + bm_a
out2 = min(pm1, pm2) + bm_b
```

Metrics are unsigned numbers modulo 2^16. The comparison uses the sign bit of
`pm1 - pm2`, which makes it a modulo comparison. It stays correct when metrics
wrap round, as long as two competing metrics differ by less than 2^15. With
this scheme no metric normalisation is needed. Equal metrics select `pm1`
(`dec = 0`).

| unit       | structure                                            | protection                                     |
|------------|------------------------------------------------------|------------------------------------------------|
| `csa_unit` | subtractor → multiplexer → 2 adders                  | parity on registers, duplicated mux, self-checking adders |
| `pcsa_unit`| subtractor ‖ 4 adders → 2 multiplexers               | same as `csa_unit`                              |
| `reco_csa` | subtractor → multiplexer ┃ 2 adders                  | two passes, RESO or RERO (parameter `ENC`)     |
| `reco_pcsa`| subtractor ‖ 4 adders ┃ 2 multiplexers               | two passes, RESO or RERO (parameter `ENC`)     |

(→ sequential, ‖ in parallel, ┃ sub-pipeline register)

PCSA removes the adder from behind the comparison. The four sums
`pm1+bm_a, pm2+bm_a, pm1+bm_b, pm2+bm_b` are formed while the subtractor
compares, and the compare result only drives the multiplexers. The cost is
twice the adders.

## Signature-based units (`csa_unit`, `pcsa_unit`)

Each unit has a single pipeline stage between an input register bank and an
output register bank. All registers are `par_reg` instances. They store the
word plus a signature supplied by the writer, and they flag any stored word
whose signature disagrees. The signature is an `S`-bit interleaved even
parity, computed by `sig_gen`: bit `k` is the XOR of data bits `i` with
`i mod S = k`. The default is `S = 1`, plain parity; the top-level parameter
`SIG_W` selects a wider one. The error output
(CSA-ERROR / PCSA-ERROR) is the OR of these checks:

1. **Input registers.** The four metric registers check their signatures. The
   signatures are generated where the words enter the datapath, in the top
   level.
2. **Subtractor and adders.** These are `sc_adder` instances. Each bit slice
   computes its sum twice: once with the true ripple carry and once with the
   complemented carry. In a healthy slice the two sums are complements of each
   other, so together they form a two-rail code word. A chain of two-pair
   two-rail checkers (`two_rail_checker`) folds the `N` pairs into one pair,
   and a non-complementary final pair raises the error. The sum that leaves
   the adder is always the one made with the original carry. Each slice also
   checks that its carry-out with carry-in 0 is not above its carry-out with
   carry-in 1.
3. **Multiplexers.** Each multiplexer has a duplicate driven by the same
   fault-free select, and the two outputs are compared by XOR. The unit's own
   decision register takes the primary multiplexer's select.
4. **Output registers.** The signature written with each sum is predicted, not
   recomputed from the sum:
   `sig(x + y) = sig(x) ^ sig(y) ^ sig(carries)`, using the carries that the
   adder exports. The rule holds group by group, because every sum bit is
   `x_i ^ y_i ^ c_i`. A sum bit that goes wrong after the adder, or inside the
   register, therefore shows up as a signature error in the output register.

Errors from the combinational stage are registered together with the result.
`err` is therefore valid in the same cycle as `out_valid`. After that the
output registers keep checking their contents for as long as they hold them.

**Timing.** The operands are captured on the edge where `in_valid` is high.
The results are written on the next edge. One new operation can start every
cycle.

## Recomputing units (`reco_csa`, `reco_pcsa`, `enc_adder`)

### Encodings

`enc_adder` is a ripple adder built from explicit one-bit slices. Its
operands arrive already encoded:

* **RESO** (recompute with shifted operands): `E = W + K` slices. Pass 0
  uses `x`, pass 1 uses `x << K`. The low `K` slices hold zeros in both
  operands, so no carry can enter the data and a plain chain is enough.
  Decoding is `>> K`. The default is `K = 1`.
* **RERO** (recompute with rotated operands): `E = W + 1` slices. Each
  operand gets a guard zero on top, `{0, x}`, and pass 1 rotates it left by
  `K` (default `W/2 = 8`). The carry out of the top slice wraps round into
  slice 0 (end-around carry), so the rotated operands are added as if they had
  never been split. The guard slice holds a zero in both operands, so it can
  never pass a carry on. The ring therefore never carries all the way round,
  and in pass 0 the guard slot receives the carry-out. Decoding is a rotate
  right by `K`.

For subtraction the caller complements only the data bits of the second
operand, not the guard bits, and asks for a carry-in. The carry-in is added
at the slice that holds operand bit 0: slice 0 in pass 0, slice `K` in
pass 1.

Why this detects faults: a slice `j` that is broken in both passes corrupts
result bit `j` in pass 0. In pass 1 it corrupts bit `j-K` (RESO), bit
`(j-K) mod (W+1)` (RERO), or a bit that decoding discards. The decoded results
of the two passes can therefore never be damaged the same way. The testbench
for `enc_adder` checks this for randomly chosen slices.

*Circuit note.* In the RERO build the end-around carry is a combinational
loop in the netlist, and lint tools report it (for Verilator, `UNOPTFLAT`).
The loop is never active, because the guard slice always breaks it. Keeping
the loop is what lets one set of slices serve both passes. Timing analysis
should treat it as a false path.

### Sub-pipelining

Each recomputing unit is cut into two halves by a register, and every
operation goes through each half twice:

| cycle | half 1                     | half 2                   |
|-------|----------------------------|--------------------------|
| 1     | operation *n*, original    | –                        |
| 2     | operation *n*, encoded     | operation *n*, original  |
| 3     | operation *n+1*, original  | operation *n*, encoded   |

* In `reco_csa`, half 1 is the subtractor and the multiplexer, and half 2 is
  the two adders.
* In `reco_pcsa`, half 1 is the subtractor and the four adders, and half 2 is
  the two multiplexers.

The multiplexers select encoded words, so a stuck multiplexer bit is caught by
the recomputation too.

After each half's second pass, its decoded result is compared with the
decoded first-pass result saved from the cycle before:

* half 1 compares the subtractor difference;
* half 2 compares both sums and the decision.

Any mismatch sets `err`. The outputs are the first-pass results.

**Handshake and timing.** An operation is accepted on an edge where
`in_valid && in_ready`. `in_ready` is low in the cycle after an acceptance, so
one operation is accepted at most every two cycles. Counting the accepting
edge as the first, the outputs, `dec` and `err` are written on the fourth
edge. `out_valid` is high for one cycle.

## Top level: `viterbi_architecture`

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 16      | metric width |
| `SIG_W`   | 1       | signature bits per register in the CSA and PCSA units |
| `K_RESO`  | 1       | shift amount of the RESO units |
| `K_RERO`  | 8       | rotation amount of the RERO units |

* **Inputs:** `clk`, `rst` (synchronous, active high), `in_valid`, `pm1`,
  `pm2`, `bm_a`, `bm_b`.
* **Handshake:** `in_ready` is the AND of the recomputing units' ready
  signals. All six units accept the same operations.
* **Outputs per unit** `<u>` ∈ {`csa`, `pcsa`, `reso`, `rero`, `preso`,
  `prero`}: `<u>_valid`, `<u>_out1`, `<u>_out2`, `<u>_dec`, `<u>_err`.
* **`err_any`** is high in any cycle in which some unit presents a result with
  its error flag set.
* **Latency:** the signature-based units answer after two edges and the
  recomputing units after four. Each unit has its own valid strobe.

The branch metric unit and the survivor path memory of a complete decoder
are not part of this RTL. Branch metrics enter as ports, and the `dec` bits
are what a survivor memory would store.

### Fault-injection inputs

Tie all of these to zero in normal use.

| input | effect |
|-------|--------|
| `par_flip[3:0]` | inverts bit 0 of the generated signature of `{bm_b, bm_a, pm2, pm1}` |
| `csa_fi`, `pcsa_fi` (`W+1` bits) | bits `[W:1]` flip the sum of one adder (the `bm_a` adder, or `pm1+bm_a` in PCSA); bit 0 flips the primary multiplexer select |
| `reso_fi`, `rero_fi`, `preso_fi`, `prero_fi` | each set bit inverts the sum of that slice of one adder in both passes, modelling a permanent fault |

Every injection input is captured together with the operands, so each fault
belongs to exactly one operation. A fault is invisible when it cannot change
the result. Two cases:

* flipping the select when `pm1 == pm2`;
* a fault in a PCSA adder whose sum is not selected.

## Verification

Each module has a self-checking testbench in `tb/`. The testbench compares
against a reference model written in the testbench and prints
`TB_RESULT checks=N failures=M`.

* `two_rail_checker_tb`: all 16 input combinations.
* `sc_adder_tb`: sums, carry-out, no false alarms, and the parity-prediction
  identity, on random and corner operands.
* `par_reg_tb`: storage, holding, reset, and detection of wrong signatures,
  with 1-bit and 4-bit signatures.
* `sig_gen_tb`: signatures of widths 1, 2 and 4, and the prediction rule
  through an adder.
* `csa_unit_tb`, `pcsa_unit_tb`: a random stream with one operation per cycle,
  with 2-bit and 4-bit signatures. Checks the results, the latency, no false
  alarms, and detection of each injected fault kind.
* `enc_adder_tb`: add and subtract in both passes for RESO and RERO, the
  guard-slot carry-out, and detection of single-slice faults.
* `reco_csa_tb`, `reco_pcsa_tb`: both encodings side by side, with random
  gaps in the input. Checks the results, the one-in-two acceptance rate, the
  latency, and slice-fault detection.
* `viterbi_architecture_tb`: the whole design at its default parameters.
  About 2,700 operations with about 1,700 injected faults. Every unit's
  results and error flags are checked. The testbench counts, and requires at
  least once, each of these mechanisms:
  * `pm1` wins, `pm2` wins, and a tie;
  * a comparison across the modulo wrap;
  * an operation held back by `in_ready`;
  * detection of every injectable fault kind in every unit.

To simulate with Verilator (5.x), for example the whole design:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/vit_pkg.sv tb/viterbi_architecture_tb.sv \
  --top-module viterbi_architecture_tb
./obj_dir/Vviterbi_architecture_tb
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; for a single
block, name its testbench instead. The design has no memories or data files.

## Where this design makes its own choices

The published description fixes the structure of the units: which registers
carry signatures, where the duplicated multiplexers and XOR comparisons are,
the adder count of CSA and PCSA, the complemented-carry recomputation inside
the self-checking adder, and the half-and-half sub-pipelining of the
recomputing units. It also fixes the 16-bit metric width. The following are
choices of this RTL:

* **Signatures:** interleaved even parity, one bit by default, predicted
  through the adders from their carries. Multi-bit signatures are mentioned
  in the source but their code is not defined there; interleaving is the
  choice made here, because it predicts through an adder.
* **Self-checking adder:**
  * The checker tree is a linear chain of two-rail checkers.
  * The per-slice carry check is an addition of this RTL.
  * An older self-checking adder (two-rail checkers around four full adders
    and two multiplexers per bit) is mentioned only as the design being
    improved on, and is not built.
* **Recomputation:**
  * The amounts `K` (shift 1, rotate 8) are choices of this RTL.
  * The guard-bit construction of RERO is a choice of this RTL.
  * Where to split each unit into halves is a choice of this RTL.
  * "Variants of RERO" are named in the source but not described. Only plain
    RERO is built.
* **Comparison:** modulo comparison, ties go to `pm1`.
* **Control:** reset, the valid/ready handshake, and all latencies.
* **Top level:**
  * The top-level port list is a choice of this RTL.
  * So is the arrangement of all six variants side by side.
  * So is the fault-injection interface.
* **Out of scope:**
  * A complete decoder. The convolutional code, trellis, branch-metric
    computation and survivor-memory organisation are not specified, so the
    BMU and SPM are left out.
  * A 3-to-8 line decoder, which the source presents only as the existing
    system it compares against.

## Files

| file | content |
|------|---------|
| `rtl/vit_pkg.sv` | metric width, `enc_e` encoding type |
| `rtl/two_rail_checker.sv` | two-pair two-rail checker |
| `rtl/sc_adder.sv` | self-checking ripple-carry adder |
| `rtl/sig_gen.sv` | interleaved-parity signature generator |
| `rtl/par_reg.sv` | register with signature and checker |
| `rtl/csa_unit.sv`, `rtl/pcsa_unit.sv` | signature-protected CSA and PCSA |
| `rtl/enc_adder.sv` | RESO / RERO adder slice array |
| `rtl/reco_csa.sv`, `rtl/reco_pcsa.sv` | recomputing CSA and PCSA |
| `rtl/viterbi_architecture.sv` | top level |
| `tb/*_tb.sv` | one testbench per module |
