# A self-repairing full adder built on competing LUT configurations

This design is a small circuit that finds its own permanent faults and
works around them, with no test vectors and no outside help. Its logic lives
on a fabric of 4-input LUTs, so it can change its wiring to avoid a damaged
resource. A physical defect, such as an LUT input pin stuck at 0 or 1, is
repaired by moving the logic onto other LUTs or pins. The function stays
the same.

The function is never designed again from scratch. Every change the
repair makes is a rearrangement that keeps the function intact:

* permute a LUT's input pins (and its truth table with them);
* exchange the physical positions of two LUTs;
* cross two placements of the same logic.

The search only moves through physically different layouts of a circuit
that is known to be correct.

Nobody gives the repair a target fitness value. Fitness comes from
**consensus**. Several functionally identical but physically different
configurations take turns on the hardware. Each keeps a discrepancy count.
A configuration is faulty only when its count stands out from the rest of
the population. The test is relative, so a fault that hurts everybody a
little does not send every configuration into repair.

The system has three layers:

* **Functional Elements (FEs).** Three copies of a full adder, each on its
  own 4-LUT fabric: two active in duplex and one cold spare.
* **Autonomic Element (AE).** It compares the two active FEs. It also
  checks itself against a stored checksum table. Its own logic sits on a
  12-LUT fabric, so it can be repaired as well.
* **Autonomic Supervisor (AS).** It holds five alternative placements of the
  AE logic. It rates them by consensus-based evaluation (CBE), rotates them
  onto the AE fabric and breeds repaired offspring for the ones that stand
  out.

The same competitive scheme is also built in its plainer **Duplex mode**
(`cbe_duplex`). Two reconfigurable regions, L and R, each hold one
configuration drawn from a pool of ten. The two run side by side on live
data, and a discrepancy detector scores their disagreement. It is also
built in **TMR mode** (`cbe_tmr`), with three regions and a majority vote.
Both subsystems sit beside the full adder in the top level, each with its
own ports.

## Genotype and LUT fabric

A configuration (`oes_pkg::gene_t` arrays) is a list of LUT genes in
*logic order*. Each gene has:

| field     | width | meaning |
|-----------|-------|---------|
| `slot`    | 4     | physical LUT position the gene is placed on |
| `src[0:3]`| 4 x 5 | source of input pins A1..A4: `0..N_IN-1` are fabric inputs, `N_IN+g` is the output of gene `g` |
| `content` | 16    | truth table, indexed `{A4,A3,A2,A1}` (A1 is the LSB) |

A gene may only read fabric inputs or genes with a lower number. This
keeps every configuration combinational and loop-free, however the
operators rearrange it. A separate output select picks which sources drive
the fabric outputs.

`lut_fabric` evaluates a chromosome. Defects are attached to *physical*
positions: `stuck_mask[slot][pin]` forces input pin `pin` of the LUT at
`slot` to `stuck_val[slot][pin]`. The fault stays where it is when the logic
moves, and this is what makes repair by relocation possible.

Parameters: `N_IN` (6), `N_OUT` (6), `N_LUT` (16). The 4-bit slot field
limits a fabric to 16 LUTs. The FE instances use 3/2/4 and the AE uses 4/4/12.

## Genetic operators (all function-preserving)

All three are combinational modules that take a chromosome and return a
new one.

* **`ga_mutation`.** Exchanges the sources of two input pins (`pin_a`,
  `pin_b`) of gene `idx`. It also permutes that gene's truth table
  (`oes_pkg::permute_content`), so the LUT computes the same function of
  the same signals. A signal moved off a stuck pin, or onto an unused
  address bit of a damaged table, can hide the fault.
* **`ga_cell_swap`.** Exchanges the `slot` fields of genes `idx_a` and
  `idx_b`. Logic order, sources and contents stay with the genes. Every
  reference to a gene follows it automatically, because sources name genes
  and not slots. The function is unchanged and the two LUTs change places
  on the silicon.
* **`ga_pmx`.** Partially matched crossover on the slot permutation of two
  parents. For genes at and above the cut point `cp`, the slots are
  exchanged position by position. Slots duplicated below the cut are then
  remapped through the exchange pairs until no duplicate remains (a chain
  of at most `N_LUT` steps). Both children stay valid placements of the
  same logic.

  For slot orders `A = 0 1 2 3 4 5 6 7` and `B = 0 3 4 6 7 2 1 5` with
  the cut at 4, the exchange pairs are (4,7), (5,2), (6,1) and (7,5). The
  resolved children are `A' = 0 6 4 3 7 2 1 5` and `B' = 0 3 2 1 4 5 6 7`.

Mutation and cell swap change one gene or two. PMX can move many genes at
once, using a second configuration that works.

## Consensus-based evaluation (`cbe_unit`)

This is the least conventional part. Each of the `POP` individuals has:

* a discrepancy value `DV`;
* a count of the evaluations in its current evaluation window of `E`;
* one of four health states: **Pristine**, **Suspect**, **Under Repair**,
  **Refurbished**.

Every evaluation updates the evaluated individual at once:

* A discrepancy adds `weight` to its DV, saturating. The AS uses weight 1,
  which counts discrepant evaluations. The Duplex subsystem passes a
  score.
* A Pristine individual that shows a discrepancy becomes Suspect. Clean
  evaluations keep Pristine and Suspect where they are.

The real verdicts are taken when the **sliding window** closes: `Q`
individuals have finished a window of `E` evaluations since the last
verdict. All DVs form one column `X`, so the diagonal of the hat matrix
`X(XᵀX)⁻¹Xᵀ` becomes `H_ii = DV_i² / Σ DV_j²`, with mean `1/POP`. Each
individual that has finished its window is judged without any division:

| from | to | condition |
|------|----|-----------|
| Pristine, Suspect, Refurbished | Under Repair | `POP·DV_i² > K_R·ΣDV²` |
| Under Repair | Refurbished | `POP·DV_i² ≤ K_O·ΣDV²` |
| any | unchanged | otherwise |

Only the judged individuals restart their DV and count. The rest keep
accumulating.

How the rule behaves:

* An individual that is the *only* one with discrepancies has leverage 1 and
  is caught at once.
* If all individuals err alike, nobody's leverage exceeds `K_R/POP`, so none
  is condemned. They stay Suspect.
* A repaired individual whose DV is back at zero (with `Σ = 0`) meets the
  `≤` test and becomes Refurbished.

Defaults: `POP=5`, `E=8`, `Q=2`, `K_R=2`, `K_O=1`, `DV_W=12`. The port
`window_done` pulses once per sliding window. `clr_valid`/`clr_idx` clear
the DV of an individual that the AS has just replaced by an offspring.

## Autonomic Element (`ae_unit`)

The AE logic is a chromosome on a 12-LUT fabric (`oes_pkg::ae_reference(k)`):

* **CED**: genes 0 and 1, two XORs comparing the sum and carry of the two
  active FEs.
* **Evaluator**: gene 2, OR of the two XORs.
* **Actuator**: gene 3, an XOR with one input tied low. It buffers the
  Evaluator onto `fe_dv`.
* **Checksum**: genes 4–7, a 4-to-2 compressor that adds the four signals
  above into a 3-bit count `{cout, carry, sum}`.

Outside the fabric is the **CS-LUT**, 16 entries × 4 bits: a valid flag and
the 3-bit checksum expected for each combination of the four FE output
bits. One pulse on `init_start` runs the *compute-checksum step*: 16
cycles, `busy` high, each combination swept through the fabric and
written to the table. The AE is assumed fault-free during this step.

In operation, the running checksum is compared with the table entry for
the current FE outputs, by XORs into an OR. A mismatch raises `ae_dv`.

A fault in the CED, the Evaluator, the Actuator, the compressor or the
table entry changes one side and not the other, so it shows as `ae_dv`.
`cs_stuck_mask/val` inject stuck bits into the table. `fe_dv` and `ae_dv`
are combinational.

Placement `k` of the AE logic puts gene `g` on slot `(g + 2k) mod 12`. The
five placements compute the same thing on different LUTs. A stuck pin in
one physical slot therefore hurts only the placements that use that slot
(and pin) for a signal that matters. This difference is what the consensus
feeds on.

## Functional Elements and their switching logic (`fe_manager`)

The three FE fabrics all receive the same input `{cin, b, a}`. The manager
drives three modes:

1. **CED** (mode 0). FEs `act_a` and `act_b` are compared by the AE. The
   output is `act_a`'s result.

   On `fe_dv` with `ae_dv` low, the result is flagged bad (`out_ok = 0`) and
   the manager switches to TMR. With `ae_dv` high the AE blames itself, and
   the FE discrepancy is left to the AS.

2. **TMR** (mode 1). The spare joins, and the output is the bitwise
   majority of the three.

   The first input on which exactly one FE disagrees isolates that FE. The
   other two become the active pair, and the faulty one becomes "standby
   under repair". If `TMR_WIN` (16) inputs go by without a culprit, the
   discrepancy is taken as transient and CED resumes.

3. **REPAIR** (mode 2). The good pair serves results in CED. In the
   background, the faulty FE's fabric is loaded with candidates bred from
   its own configuration:
   * mutation and cell swap, each with probability 1/2, at least one
     applied;
   * no population and no crossover.

   Each candidate is compared with the agreed output of the pair:
   * After `E_FE` (32) agreements in a row it is accepted. The repaired FE
     becomes the new cold spare and the manager returns to CED.
   * A candidate that disagrees is scored by the streak it reached. The
     better of it and its parent breeds the next candidate.

`out_data = {carry, sum}` is registered, one cycle after the input. The
counters `n_tmr`, `n_repair` and `n_candidates` count TMR entries, finished
repairs and candidates tried. An assertion checks that the three FE roles
stay distinct in CED.

## Autonomic Supervisor (`as_unit`)

The AS holds the population of five AE configurations (initially
placements 0–4) and a `cbe_unit`. Each accepted input is one evaluation of
the loaded configuration `cur`, scored by `ae_dv`.

The loaded configuration is replaced by the next one in round-robin order:

* when it shows a discrepancy;
* when it finishes its evaluation window;
* at random, with the reintroduction rate `LAMBDA_R/256` (102/256 ≈ 0.4).

A reload takes effect at the clock edge after the evaluation that caused
it.

If the configuration about to be loaded is **Under Repair** and has shown a
discrepancy since it was last bred (`DV > 0`), an offspring replaces it:

* mutation, cell swap and PMX are each applied with probability 1/2, and
  mutation is forced if none was drawn;
* the PMX mate is the winner of a size-2 tournament (lower DV wins). Only
  child A' is kept.

The offspring's DV is cleared, and the CBE decides at its next window
whether it is Refurbished. A clean offspring is left alone, so a good
repair is not bred away. Random choices come from xorshift generators
(`rng32`). An assertion checks that every offspring's slots are still a
permutation. `n_reload` and `n_evolution` count reloads and offspring.

An AE configuration that is Under Repair is in *self-repair mode*. While
it is loaded, the top ignores its `fe_dv` and the FEs keep running. FE
handling resumes when a healthy configuration is loaded.

## Duplex-mode competitive reconfiguration (`cbe_duplex`, `cbe_half`)

`cbe_duplex` is the scheme without the FE/AE layering, for any circuit of
up to 6 inputs, 6 outputs and 16 LUTs. Each region is a `lut_fabric` with
its own fault inputs, so the two halves never share a physical resource.

On every input:

* Both regions compute. The **discrepancy detector** compares them.
* The score is the Hamming distance of the two output words
  (`HAMMING = 1`), or their arithmetic difference `|L − R|`
  (`HAMMING = 0`, "bit-weight").
* The same outcome and score are charged to *both* resident
  configurations. Nobody is blamed yet.

The resolution comes from pairing over time:

* A faulty configuration collects DV with whatever partner it meets.
* A healthy one collects DV only while paired with a faulty one.
* After enough rotations the faulty ones stand out.

Each half is a `cbe_half`: a pool of `POP=10` configurations with its own
`cbe_unit`. It rotates and breeds under the same rules as the AS:

* replace on a discrepancy, at window end, or at rate `LAMBDA_R`;
* breed a still-discrepant Under Repair configuration when it comes up.

The crossover mate is drawn from the same half. Crossover is skipped when
the mate is itself Under Repair.

Set-up: pulse `init` once after reset, with `base` holding one mapped
configuration and `outsel` holding its output selection. Configuration `k`
of each pool is `base` with every LUT moved `k` positions on. The ten
configurations therefore use the 16 LUTs differently, and a single stuck
pin hits only some of them.

Timing: one input per cycle. `out_y` is L's result, registered with
`out_valid` one cycle later. `out_ok` is low when the halves disagreed.

Each half judges its own pool. A healthy R configuration that was paired
with faulty L ones can therefore be sent to repair once. It comes back
Refurbished at its next clean window.

### TMR mode (`cbe_tmr`)

Three regions, each with its own pool of ten and its own `cbe_half`, run
the same input. The output is the bitwise majority. Each region is scored
by its Hamming distance to the vote.

Unlike Duplex mode, the vote points at the culprit, so only the
disagreeing region's configuration is charged. With a single faulty
region, every voted result is right, and repair goes on in the
background. `out_ok` is low whenever some region disagreed with the vote.

## Top level (`oes_top`)

`oes_top` wires one FE group, its AE and the AS together. It has no
parameters.

* After reset, the AE's compute-checksum step runs and `in_ready` stays low
  for 16 cycles.
* Then one input per cycle is accepted (`in_valid && in_ready`). The result
  follows a cycle later on `out_valid`/`out_data`/`out_ok`.
* A configuration load is an immediate register update, with no bitstream
  and no reconfiguration port.

Fault-injection inputs:

* `fe_stuck_mask/val[fe][slot][pin]` and `ae_stuck_mask/val[slot][pin]`
  inject permanent stuck-at faults on LUT input pins;
* `cs_stuck_mask/val` injects stuck entries in the checksum table.

Tie them all to 0 for a healthy device.

Observation outputs:

* FE roles and mode;
* AE placement, states and DVs;
* `ae_window_done`;
* counters for TMR entries, FE repairs and candidates, AE reloads and AE
  offspring.

The `cd_*` ports reach the `cbe_duplex` instance unchanged. It shares only
the clock and reset with the full adder. The `ct_*` ports do the same for
the `cbe_tmr` instance.

Without the Duplex subsystem, the full adder synthesizes with a generic
flow to about 11.5k cells and 3.6k flip-flop bits. Most of it is the AS's
population storage and the combinational operators. A synthesis tool must
allow the PMX remapping loop to unroll (`N_LUT` passes over `N_LUT` genes).

## Sizes

* Each FE fabric has 3 inputs, 2 outputs and 4 LUTs. The full adder needs 2
  LUTs (XOR3 and MAJ3), so each FE has two spare LUTs and unused pins to
  repair into.
* The AE logic uses 8 of its 12 LUTs.
* The AS population is 5, and the FE group is 2 active FEs plus 1 spare.

The MCNC circuits `z4ml` (7 inputs, 4 outputs, 8 LUTs), `cm85a` (11 inputs,
3 outputs, 12 LUTs) and `cm138a` (6 inputs, 8 outputs, 10 LUTs) do not fit
this FE. They also need an AE and checksum table sized for their output
width. A Duplex region or a standalone `lut_fabric` at its defaults (6
inputs, 6 outputs, 16 LUTs) can hold `z4ml` in its 6-input form, but not
`cm85a`, `cm138a` or `2x-decod`. Holding `2x-decod` needs a wider slot
field. The benchmark netlists themselves are not included.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_oes_top rtl/oes_pkg.sv tb/tb_oes_top.sv
./obj_dir/Vtb_oes_top
```

Substitute any of:

| testbench | what it checks |
|-----------|----------------|
| `tb_lut_fabric` | full adder, a stuck pin and its relocation, random chromosomes against a reference model |
| `tb_ga_mutation` | a directed pin exchange, then function preserved for random genes and pin pairs |
| `tb_ga_cell_swap` | slots exchanged, function preserved |
| `tb_ga_pmx` | the worked crossover example above; random parents give permutations |
| `tb_cbe_unit` | every state transition, sliding windows, a pervasive fault |
| `tb_ae_unit` | checksum sweep timing, FE_DV/AE_DV for all 16 inputs, a fabric fault and its repair, a table fault |
| `tb_fe_manager` | CED → TMR → isolation → repair → spare, and a transient |
| `tb_as_unit` | rotation, CBE verdict, breeding, refurbishment |
| `tb_cbe_duplex` | Duplex mode on a 2-bit adder: detector scores (both schemes) against a model, a stuck pin in L, repair, healthy configurations never condemned |
| `tb_cbe_tmr` | TMR mode on the same adder: vote always right with one faulty region, flags against a model, only affected configurations repaired |
| `tb_oes_top` | the whole device at its defaults |

`tb_oes_top` runs two phases. First it injects a stuck pin into FE0's
carry LUT and checks that FE0 is detected, isolated by TMR, repaired and
made the spare. Then it injects a stuck pin that only AE placement 4 uses
and checks that the AS flags it, breeds offspring and gets one
Refurbished. Every result flagged `out_ok` must equal `a + b + cin`.

In parallel it runs the Duplex and TMR subsystems on a 2-bit adder, each
with a stuck pin in one region. It checks that discrepancies are flagged,
that configurations go to repair and that configurations come back
Refurbished.

Each mechanism is counted, and one that never happened counts as a
failure. The test finishes in about a second.

## Where this departs from, or goes beyond, the source design

* **One FE group, and repair by register load.** The system is meant to
  have many FE types, each with its own AE, placed in columns of an FPGA
  and reconfigured through partial bitstreams over JTAG, with bus macros
  between layers. Here there is one full-adder group, configuration is a
  register, and the layers are joined by plain wires.
* **Packed slot numbers.** The genotype keeps logic order, physical
  position, four input sources and the LUT content. Column and row are
  packed into one 4-bit slot number, and a source names a gene rather than
  a position.
* **Own parameter values.** `E`, `Q`, `K_R`, `K_O`, `E_FE`, `TMR_WIN` and
  the acceptance rule of FE repair were chosen here. The reintroduction
  rate 0.4 is one of the values the CBE experiments use.
* **Indexed checksum table.** The CS-LUT is indexed directly by the FE
  output bits instead of being searched in parallel. Its fourth bit is a
  valid flag.
* **Own breeding policy.** Breeding only when a still-discrepant Under
  Repair individual is loaded, round-robin rotation and keeping only one
  PMX child are choices made here.
* **PMX example.** The textbook PMX resolution of the source's crossover
  example gives children `0 6 4 3 7 2 1 5` and `0 3 2 1 4 5 6 7`. A printed
  example shows different middle genes. This RTL follows the algorithm as
  described, which always yields valid permutations.
* **Duplex and TMR mode details.** The source forms one consensus over
  the whole population. Here each region forms its own. The source seeds its pools
  with input permutation and cell swapping. Here LUT positions are rotated
  instead. The source crosses at CLB boundaries with a two-point
  crossover. Here PMX is used, which keeps every offspring a valid
  placement in this genotype.
* **TMR mode charging.** In TMR mode only the region that differs from
  the vote is charged. This is this design's reading of the
  Hamming-to-majority scoring.
* **Not included: the MCNC benchmark netlists.** The tests use a 2-bit
  adder mapped by hand.
