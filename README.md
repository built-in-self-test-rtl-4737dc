# Built-in self-test for the DSP slices of a Virtex-4-class FPGA

The hard DSP slices of an FPGA (a multiplier, an adder/subtractor and a
few hundred multiplexers and flip-flops each) can be tested without
external equipment. The surrounding programmable logic is configured as
test pattern generators (TPGs) and output response analysers (ORAs). All
slices of the device run the same stimulus at the same time, and each
slice's output is compared with the outputs of two neighbours that should
give the same answer. A single pass/fail bit comes out of a carry-chain OR
of all comparators. The test time does not depend on the size of the array.
The slices are reconfigured five times (different pipelining, control-pin
polarity and B-input source), and seven 1,024-cycle test sequences are run
across those five configurations.

This repository holds synthesizable SystemVerilog for this scheme: the
TPG, the ORAs, and the array that wires them to the slices. It also holds
an RTL model of the DSP slice itself, so that the whole test can be
simulated, including fault injection. It follows a published BIST approach
for Virtex-4 DSPs. The details that approach leaves
open were filled in here. They are listed under
[Departures and choices](#departures-and-choices).

## The array

```
            column k (one of N_COLS)                 ORA sets (48 ORAs each)
  TPG 0 ─┬─► tile N-1 : s1 ─► P ─┬──────────────► (N-1,1): s1[N-1] vs s1[N-2]
         │             s0 ─► P ─┼─┬────────────► (N-1,0): s0[N-1] vs s0[N-2]
  TPG 1 ─┼─► tile N-2 ...       │ │
         │    ...               │ │
  TPG 0 ─┼─► tile 1             │ │  ► (1,s): tile 1 vs tile 0   (bottom enable)
  TPG 1 ─┴─► tile 0 : s1, s0    └─┴► (0,s): tile 0 vs tile N-1  (bottom enable)
```

* **Tiles and cascades.** A tile is two slices: s0 at the bottom and s1
  above it. The two slices share the tile's C port. The P result and the B
  operand cascade upwards: from s0 to s1, and from s1 to s0 of the tile
  above. The bottom tile's cascade inputs are not connected (tied to 0).
* **Two TPGs.** The two TPGs are identical and drive alternate rows:
  tile 0, 2, 4 … from TPG 1 and tile 1, 3, 5 … from TPG 0. A fault inside
  one TPG therefore makes neighbouring rows disagree instead of escaping.
  Both slices of a tile hang off the same TPG, because the cascade tests
  need the two slices of a tile to work together.
* **Two circular comparison chains.** In every column, ORA set (t, s)
  compares slice s of tile t with slice s of tile t−1. Tile 0 wraps around
  to tile N−1. So s0 slices are only compared with s0 slices, and s1 with
  s1. Each slice is watched by two ORA sets, against two different
  neighbours. This matters in the cascade tests: there a slice's result
  legitimately depends on the slice below, so a plain "compare with the
  next slice" ring would see a fault twice in one comparator and miss it.
  Because every slice is in two comparisons, the readback flags also
  locate a fault: the faulty slice is the one shared by the two failing
  sets.
* **Bottom enables.** In the cascade sequences the bottom tile reads its
  unconnected cascade inputs, so it disagrees with every other tile
  without being faulty. The two ORA sets that watch tile 0 have a separate
  enable from the TPG that drives tile 0. The TPG drops that enable while
  slice 0 reads its cascade inputs (group 3 of the cascade test onwards).
* **OR chain.** Each ORA cell is one LUT plus one flip-flop. The LUT forms
  `XNOR(a, b) AND flag`, so a single mismatch clears the flag until the
  next start. The carry multiplexer of the same logic cell forwards the
  chain when the flag is set and forces a 1 when it is clear. All cells
  of all sets form one chain, and its end is `fail`. If the device passes,
  no readback is needed; the individual flags (`ora_pass`) are only for
  diagnosis.

## The slice under test (`dsp_slice`)

```
 A(18) ─► [0-2 regs] ─┬──────────────── A:B (sext 48) ──► X ─┐
 B(18)/BCIN ─► [0-2] ─┴► Booth/Wallace ─► row0 ─[M]──────► X │
                                        └► row1 ─[M]──────► Y ├─► CLA1: X+Y+CIN ─► ⊕SUB ─┐
 C(48) ─► [C] ────────────────────────────────────────────► Y │                          │
                                                       C ───► Z ┘                         ▼
 PCIN, PCIN>>>17, P, P>>>17 ─────────────────────────────► Z ─────────► CLA2: Z + (·) + SUB ─► [P] ─► P, PCOUT
```

`P = Z ± (X + Y + CARRYIN)`, where the sign is chosen by SUBTRACT.

* OPMODE is 7 bits: X in bits 1:0, Y in 3:2, Z in 6:4. The codes are in
  `dsp_bist_pkg`. X selects 0, M (row 0), P or A:B. Y selects 0, M (row 1)
  or C. Z selects 0, PC, P, C, PC>>>17 or P>>>17.
* The multiplier encodes B in radix-4 Booth form, giving nine partial
  products. A carry-save tree reduces them to two rows, and the slice's
  own adder adds those rows (through X and Y). So a multiply always goes
  through the adder, and the adder is also reachable directly.
* The adder/subtractor is two 48-bit carry look-ahead adders in series.
  The first forms X+Y+CIN. Its sum is inverted when SUBTRACT is high and
  added to Z by the second adder, which takes SUBTRACT as its carry-in.
  That two-stage split is why the adder test treats the two stages
  separately.
* Configuration bits (`dsp_cfg_t`):
  * A and B registers: 0, 1 or 2.
  * C, M, P and control registers: 0 or 1 each.
  * `ctrl_low`: all 17 control pins are active low.
  * `b_cascade`: B comes from BCIN instead of the B port.
* The 17 control pins are:
  * 8 clock enables: A, B, C, M, P, OPMODE, the SUBTRACT register
    ("cinsub") and CARRYIN.
  * 7 synchronous resets: A, B, C, M, P, OPMODE/SUBTRACT and CARRYIN.
  * SUBTRACT and CARRYIN themselves.
* `gsr` clears every register. It models the state a freshly configured
  device starts in.

Latency of A×B from the A/B pins to P: A/B registers + M register + P
register (0 to 4 cycles). Each register adds exactly one cycle.

## The test sequences

Every sequence is 1,024 cycles, split into four groups of 256.

| group | multiplier | adder, cycle 1 / cycle 2 | cascade slice 1 / slice 0 |
|---|---|---|---|
| 1 | A×B (5×3) | P=Z(C) / P=X(P)+Y(C), CARRYIN | A:B+Z(PC) / Z(C) |
| 2 | A×B (3×5) | P=Y(C) / P=X(P)+Z(C), SUBTRACT | A:B+Z(PC>>17) / Z(C) |
| 3 | A×B+C (5×3), random CE/RST | P=Z(C) / P=Y(C)+Z(P), CARRYIN, random CE/RST | Z(C) / A:B+Z(PC) |
| 4 | A:B+C (3×5), random CE/RST | P=Y(C) / P=Y(C)+Z(P>>17), SUBTRACT, random CE/RST | Z(C) / A:B+Z(PC>>17) |

* **Multiplier patterns.** The low 8 bits of the TPG's 10-bit counter are
  split 5+3. In "5×3" the five MSBs go to A and the three LSBs go to B.
  In "3×5" the three LSBs go to A and the five MSBs go to B. Each field is
  repeated from bit 0 upwards to fill 18 bits. Running both orders makes
  sure the 5-bit field reaches the Booth-encoded port, whichever port that
  is in the silicon.
* **Adder vectors (`adder_tpg`).** An adder vector is 97 bits: two 48-bit
  operands and one carry-in or subtract bit. The only 48-bit paths into
  the adder are the C port and the P register, so each vector takes two
  cycles:
  1. The first cycle loads the low operand into P through Y or Z.
  2. The second cycle presents the high operand on C while P feeds X or Z.
     The 97th bit is applied to CARRYIN (groups 1 and 3: first adder stage)
     or SUBTRACT (groups 2 and 4: second stage).

  The vectors come from a twisted ring of 50 flip-flops: a 49-bit shift
  register and one flip-flop whose inverted output feeds the register
  back. From each ring state:
  * `A_i = XNOR(S_i, S_i+1) XOR S_48`
  * `B_i = S_i+1`
  * carry-in = the inverted flip-flop

  The ring has 2×50 = 100 states. This generator is the known CLA test set
  of 2·(N+1) vectors, extended by one flip-flop to 2·(N+2) vectors, which
  is reported to give full single stuck-at coverage of a CLA. 100 vectors take 200 of a
  group's 256 cycles; the ring then simply wraps.
* **Weighted random controls (`ctrl_lfsr`).** Two LFSRs (15 and 17 bits)
  drive the clock enables and resets in groups 3 and 4 of the multiplier
  and adder tests:
  * each enable is the OR of two LFSR bits, so it is on about 3/4 of the
    time;
  * each reset is the AND of three bits, so it is on about 1/8 of the time.

  Outside those groups all enables are on and all resets off.
* **Cascade.** The two slices of a tile get different OPMODEs, so the PC
  path, the 17-bit shift of PC and (depending on the configuration) the B
  cascade are exercised between adjacent slices.

### Configurations

| config | pipeline registers | control pins | B of s0 / s1 | sequences run |
|---|---|---|---|---|
| 1 | all 0 | active high | direct / direct | #1 multiplier |
| 2 | all 1 | active high | direct / direct | #2 multiplier, #3 adder |
| 3 | A, B = 2, others 1 | active low | direct / direct | #4 multiplier, #5 adder |
| 4 | P = 1, others 0 | active high | direct / cascade | #6 cascade |
| 5 | P = 1, others 0 | active low | cascade / direct | #7 cascade |

`dsp_bist_pkg::bist_config(n, s)` returns the configuration bits of
slice s in configuration n. `config_runs` and `config_mode` give the
sequences to run in each configuration. For the active-low configurations
the TPG must be told (`ctrl_low`) so that it inverts its control outputs.
Configuration 1 is the only way to reach the unregistered paths. The adder
test needs the P register, so it cannot run there.

## Using the top level (`dsp_bist_top`)

Parameters:
* `N_COLS` (default 1): number of DSP columns.
* `N_TILES` (default 16): tiles per column, at least 3.

The default is 32 slices, the smallest device of the family.

One test step:

1. Hold `rst` for a cycle after power-up.
2. Set `cfg0` and `cfg1` to the configuration bits of the s0 and s1
   slices. Set `ctrl_low` to match them and `mode` to the sequence.
   Keep all of these stable while the sequence runs.
3. Pulse `start` for one cycle. This clears all slice registers, sets all
   ORA flags and starts both TPGs.
4. `done` rises 1,025 cycles after the `start` edge. Wait a few more
   cycles for the slices' pipelines to empty (the ORAs stay enabled).
   Then read `fail` (1 = some ORA saw a mismatch). Optionally read
   `ora_pass[col][tile][slice]` for diagnosis.

The complete test is the seven steps of the configuration table.

## Modules

| file | contents |
|---|---|
| `rtl/dsp_bist_pkg.sv` | widths, OPMODE codes, control and configuration structs, the five configurations |
| `rtl/dsp_bist_top.sv` | the array: TPGs, tiles, ORA chains, OR chain |
| `rtl/tpg.sv` | TPG: 10-bit counter, pattern mapping, control pins, ORA enables |
| `rtl/opmode_fsm.sv` | IDLE → G1…G4 → DONE sequencer and the OPMODE table |
| `rtl/adder_tpg.sv` | the 50-stage twisted-ring adder test generator |
| `rtl/ctrl_lfsr.sv` | weighted random enables and resets |
| `rtl/ora_set.sv`, `rtl/ora_cell.sv` | 48-bit comparator set, one ORA bit |
| `rtl/dsp_tile.sv` | two slices with shared C and the in-tile cascades |
| `rtl/dsp_slice.sv` | the slice under test |
| `rtl/booth_mult.sv` | 18×18 Booth/Wallace multiplier to two rows |
| `rtl/dsp_addsub.sv`, `rtl/cla_adder.sv` | two-stage adder/subtractor and its CLA |

Each module opens with a comment on its function, interface and timing.

## Simulation

Every `tb/tb_<module>.sv` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches need
only Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dsp_bist_top \
    -y rtl -y tb +libext+.sv rtl/dsp_bist_pkg.sv tb/tb_dsp_bist_top.sv
./obj_dir/Vtb_dsp_bist_top
```

`tb_dsp_bist_top` runs the top at its default size (16 tiles, 32 slices)
and takes about a second. It does the following:

* **Fault-free run.** Runs the seven sequences of the five configurations
  and checks that each one takes 1,025 cycles and reports pass, with every
  ORA flag set.
* **Fault injection.** Uses `force` to inject four stuck-at faults:
  * a multiplier row bit, found by the multiplier sequence;
  * a first-stage adder bit in the bottom tile, found by the adder
    sequence;
  * a bit of the in-tile P cascade, missed by the multiplier sequence and
    found by the cascade sequence of configuration 4;
  * a bit of the B cascade between tiles, found by the cascade sequence of
    configuration 5.

  For each fault it checks that the two ORA sets watching the faulty slice
  fail, which locates it.
* **Mechanism counts.** Counts how often each mechanism occurs, and fails
  if any never does: each sequence type, random resets, disabled enables,
  both 17-bit shifts, the B cascade, and the bottom enable masking a real
  disagreement of the bottom tile.

Two more array-level testbenches:

* **`tb_dsp_bist_two_col`** builds two columns of 16 tiles (64 slices, an
  LX60-class array). It runs the seven sequences fault-free and checks all
  128 ORA sets. Then it injects a fault into the second column and checks
  that the OR chain, which now runs through both columns, reports it. It
  also checks that only the two ORA sets watching that slice fail.
* **`tb_dsp_bist_fault_cov`** measures fault coverage on a small array
  (4 tiles). It takes one slice in the middle of the array and forces each
  of 48 stuck-at faults in turn onto the multiplier rows, the adder stages,
  the multiplexer outputs, the P register and the cascade output. It runs
  all seven sequences for every fault. It prints each sequence's own
  coverage and the cumulative coverage, and fails if any fault goes
  undetected. The result:

  | sequence | configuration | test       | own   | cumulative |
  |----------|---------------|------------|-------|------------|
  | 1        | 1             | multiplier | 58.3% | 58.3%      |
  | 2        | 2             | multiplier | 79.2% | 79.2%      |
  | 3        | 2             | adder      | 58.3% | 83.3%      |
  | 4        | 3             | multiplier | 83.3% | 87.5%      |
  | 5        | 3             | adder      | 58.3% | 87.5%      |
  | 6        | 4             | cascade    | 68.8% | 100%       |
  | 7        | 5             | cascade    | 64.6% | 100%       |

  These numbers are for this fault list on this RTL model. They do not
  stand in for the coverage of configuration-memory faults on a real
  device.

The block testbenches check the following against reference arithmetic
written separately in each testbench:

* the CLA, the adder/subtractor and the Booth multiplier, including all
  512 5×3 and 3×5 patterns;
* the slice: every datapath, feedback, the cascades, the latency of each
  register setting, clock enable and reset, and active-low pins;
* the ring generator: the exact 100-vector sequence, the period and that
  all vectors are distinct;
* the LFSRs: the exact sequence, maximal period and weights;
* the OPMODE table, cycle by cycle;
* the TPG outputs, cycle by cycle;
* the ORA flag and chain behaviour.

## Departures and choices

These points are not fixed by the published description. They are this
design's choices.

* **The slice is a model.** The real slice is hard silicon whose internals
  are not published. This model has the slice's documented ports, widths,
  multiplexer inputs, shifts and register options. Inside, it has the most
  likely structure: a modified Booth/Wallace multiplier and a two-stage
  CLA adder. The following details follow the usual DSP48 conventions
  rather than a published source:
  * the OPMODE encoding;
  * the meaning of the 17 control pins;
  * zero inputs on the X and Z multiplexers;
  * arithmetic (sign-extending) 17-bit shifts;
  * P feedback always taken from the P register, even when the P port
    bypasses it.

  A single `ctrl_low` bit inverts all control pins together; the tested
  configurations never need anything finer.
* **Multiplier rows** are 48 bits wide. This keeps the sum of the two rows
  exact over the full adder width; the slice's 36-bit product halves are
  only the significant part.
* **Which port is Booth-encoded** (B here), the CLA group size (4 bits),
  and the tree shape are free choices. The test runs both 5×3 and 3×5, so
  it does not depend on which port is encoded.
* **TPG details:**
  * 5×3 means "five bits on A".
  * The low operand goes on C first.
  * SUBTRACT carries the 97th bit in group 4 as well as group 2.
  * CARRYIN and SUBTRACT stay low in the multiplier and cascade tests.
  * LFSR lengths, polynomials, seeds and weights are free choices.
  * The bottom enable is dropped from group 3 of the cascade test to the
    end of the sequence. This range is derived from when slice 0 reads its
    cascade inputs.
  * The shift direction of the ring, and the ring's last bit as the common
    XOR input of the A operand, are this design's reading of the generator.
* **Neighbour pairing and chain order:** ORA (t, s) compares tile t with
  tile t−1, and the OR chain runs column by column, tile by tile, with s0
  before s1.
* **Several columns** are all driven by the same two TPGs, and each
  column has its own two comparison chains. The default is one column.
* **Reset:** `rst` idles the TPGs. `start` stands for the global reset
  that follows a configuration download.

## Limits

* **Configuration handling.** Downloading configurations, partial
  reconfiguration and readback belong to the FPGA's configuration port.
  They are represented only by the `cfg0`/`cfg1`/`start` inputs and the
  `ora_pass` output.
* **Faults not modelled.** Faults in the configuration memory of a real
  device (the faults the published evaluation injected) have no
  counterpart in this RTL. Neither do the frequency and test-time figures
  of placed-and-routed devices.
* **Sub-array testing.** Large devices are tested half an array at a time
  to keep the clock rate up. That is two runs of this same logic; no extra
  hardware is modelled.
* **Array size.** The default array holds the smallest device (32
  slices). Larger devices need `N_COLS`/`N_TILES` raised: 64 slices for
  an LX60-class part, 192 for an SX35-class part, up to 512. The
  device-specific column layouts are not modelled. The testbenches
  simulate the default size, a 64-slice two-column array and a 4-tile
  array. Larger sizes have not been simulated.
