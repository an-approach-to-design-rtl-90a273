# MRLG: a multifunctional 4x4 reversible logic gate, and a 16-function logic unit built from one

A reversible gate has as many outputs as inputs and maps input vectors to
output vectors one-to-one, so no information is lost and the inputs can be
reconstructed from the outputs. The MRLG (Multifunctional Reversible Logic
Gate) is a 4-input, 4-output reversible gate chosen so that, with its inputs
tied to the operands, their complements or constants, a single instance
yields every one of the sixteen Boolean functions of two variables.

This repository describes the gate and that 16-function logic unit in
synthesizable SystemVerilog. The gate was originally designed as a
transistor-level circuit (static CMOS with 49 transistors, and pass-transistor
logic with 20, in a 180 nm process). The RTL here captures its logic
function only: it has no notion of supply voltage, delay or power.

## The gate

Inputs `(A, B, C, D)`, outputs `(P, Q, R, S)`:

| output | equation            | reading                                  |
|--------|---------------------|------------------------------------------|
| P      | A                   | A passes through (it is the control)     |
| Q      | AB ⊕ A'C            | 2:1 multiplexer: B if A = 1, else C      |
| R      | B ⊕ AC              | B, toggled by C when A = 1               |
| S      | B ⊕ AC ⊕ D          | R ⊕ D                                    |

Why it is reversible: split on A, which is copied to P.

* A = 0: `(Q, R, S) = (C, B, B ⊕ D)`, so `C = Q`, `B = R`, `D = S ⊕ R`.
* A = 1: `(Q, R, S) = (B, B ⊕ C, B ⊕ C ⊕ D)`, so `B = Q`, `C = R ⊕ Q`, `D = S ⊕ R`.

Each half is a bijection on three bits, so the whole gate is a permutation of
the 16 input vectors. Example: `ABCD = 1101` gives `PQRS = 1110`.

Full truth table (ABCD → PQRS), computed from the equations:

| ABCD | PQRS | ABCD | PQRS |
|------|------|------|------|
| 0000 | 0000 | 1000 | 1000 |
| 0001 | 0001 | 1001 | 1001 |
| 0010 | 0100 | 1010 | 1011 |
| 0011 | 0101 | 1011 | 1010 |
| 0100 | 0011 | 1100 | 1111 |
| 0101 | 0010 | 1101 | 1110 |
| 0110 | 0111 | 1110 | 1100 |
| 0111 | 0110 | 1111 | 1101 |

## Sixteen functions from one gate

A two-variable function is named here by its truth-table column: bit 3 is its
value for `AB = 00`, bit 2 for `01`, bit 1 for `10`, bit 0 for `11`. In the
usual numbering F1 (false) … F16 (true), function Fn has code `n - 1`. So
`fsel = 4'b0001` is AND, `4'b0110` XOR, `4'b1110` NAND, `4'b1111` true.

Eight ways of driving the gate inputs (configurations a–h) cover all sixteen
functions; each function takes one gate output:

| cfg | gate A | gate B | gate C | gate D | P  | Q       | R      | S        |
|-----|--------|--------|--------|--------|----|---------|--------|----------|
| a   | A      | B      | 0      | 1      | A  | AB      | B      | B'       |
| b   | A      | 0      | B      | 1      | A  | A'B     | AB     | (AB)'    |
| c   | A      | B      | 1      | 1      | A  | A'+B    | A⊕B    | A⊙B      |
| d   | B      | A      | 1      | 1      | B  | A+B'    | A⊕B    | A⊙B      |
| e   | A'     | B      | 1      | 1      | A' | A+B     | A⊙B    | A⊕B      |
| f   | B'     | A      | 0      | 1      | B' | AB'     | A      | A'       |
| g   | A'     | B'     | 0      | 1      | A' | A'B'    | B'     | B        |
| h   | 0      | 0      | 0      | 1      | 0  | 0       | 0      | 1        |

| F  | code | function | cfg, output | F   | code | function | cfg, output |
|----|------|----------|-------------|-----|------|----------|-------------|
| F1 | 0000 | 0        | h, P        | F9  | 1000 | A'B'     | g, Q        |
| F2 | 0001 | AB       | a, Q        | F10 | 1001 | A⊙B      | c, S        |
| F3 | 0010 | AB'      | f, Q        | F11 | 1010 | B'       | a, S        |
| F4 | 0011 | A        | a, P        | F12 | 1011 | A+B'     | d, Q        |
| F5 | 0100 | A'B      | b, Q        | F13 | 1100 | A'       | e, P        |
| F6 | 0101 | B        | a, R        | F14 | 1101 | A'+B     | c, Q        |
| F7 | 0110 | A⊕B      | c, R        | F15 | 1110 | (AB)'    | b, S        |
| F8 | 0111 | A+B      | e, Q        | F16 | 1111 | 1        | h, S        |

The logic unit (`mrlg_logic16`) turns the code into a configuration and an
output choice, drives the four gate inputs through small multiplexers that
pick A, B, A', B', 0 or 1, and returns the chosen output as `f`. The other
three gate outputs are not needed for that function; they are brought out on
`gate_out` so the gate's full behaviour can be observed.

## Where this design departs from, or adds to, the original gate

* **Logic only.** The transistor-level CMOS and pass-transistor circuits,
  and their measured delay (roughly 0.5 ns to 13 ns averages) and power
  (about 16 µW to 1.4 mW between 1.5 V and 3 V), are outside RTL.
* **Function select and multiplexers are this design's own.** The original
  work shows the eight input configurations and which output gives which
  function, but not how a function is selected. The truth-table-column code
  is a natural choice: it makes `f == fsel[3 - {A,B}]`.
* **Complemented operands.** Configurations e, f and g need A' and B'. The
  original description speaks of applying A, B, 0 or 1; here the complements
  come from plain inverters in front of the gate.
* **Configuration e.** For inputs `A', B, 1, 1` the equations give
  `R = A⊙B` and `S = A⊕B`; the table above follows the equations. The logic
  unit never takes R or S from configuration e (configuration c supplies
  both XOR and XNOR), so this has no effect on `f`.
* **Reversibility at system level.** Only the MRLG itself is reversible. The
  steering multiplexers, the inverters, the output multiplexer and the
  fan-out of A and B to them are ordinary irreversible logic, and in the
  logic unit three of the four gate outputs are unused for any one function.
* **Purely combinational.** No clock, register or reset anywhere.

## Files

| file                   | contents                                                       |
|------------------------|----------------------------------------------------------------|
| `rtl/mrlg.sv`          | the 4x4 gate                                                   |
| `rtl/mrlg_pkg.sv`      | enums and the function → configuration → input-source tables   |
| `rtl/mrlg_logic16.sv`  | the 16-function logic unit around one gate                     |
| `rtl/mrlg_top.sv`      | top: a bare gate beside the logic unit                         |
| `tb/tb_mrlg.sv`        | gate: all 16 vectors, one-to-one check, inverse, worked example |
| `tb/tb_mrlg_logic16.sv`| logic unit: all 16 × 4 cases, gate inputs and outputs, random order |
| `tb/tb_mrlg_top.sv`    | end-to-end: all functions and configurations, gate sweeps and cross-check |

### Top-level ports (`mrlg_top`)

| port          | dir | width | meaning                                             |
|---------------|-----|-------|-----------------------------------------------------|
| `gate_in`     | in  | 4     | bare gate inputs `{A,B,C,D}`, A in bit 3            |
| `gate_out`    | out | 4     | bare gate outputs `{P,Q,R,S}`, P in bit 3           |
| `op_a`, `op_b`| in  | 1     | logic unit operands                                 |
| `fsel`        | in  | 4     | function code (truth-table column, see above)       |
| `f`           | out | 1     | result                                              |
| `lu_gate_in`  | out | 4     | inputs the logic unit applies to its gate           |
| `lu_gate_out` | out | 4     | all four outputs of the logic unit's gate           |

All outputs are combinational functions of the inputs. There are no
parameters.

## Verification

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. References are written independently of
the RTL (the gate reference and its inverse are written per value of A; the
logic unit is checked against the truth-table column of the code).
`tb_mrlg_top` also counts how often each configuration a–h and each function
was exercised and fails if any was never used, and checks that the bare
gate, fed the inputs the logic unit applied to its own gate, reproduces that
gate's outputs.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/mrlg_pkg.sv tb/tb_mrlg_top.sv \
          --top-module tb_mrlg_top -Mdir obj_dir -o sim
./obj_dir/sim
```

Replace `tb_mrlg_top` by `tb_mrlg` or `tb_mrlg_logic16` for the block tests.
Each finishes in well under a second.

## Changing it

* To choose a different configuration or output for a function, edit
  `fn_map` in `rtl/mrlg_pkg.sv` (and the expected configuration in the two
  testbenches that check gate inputs).
* To add an input source, extend `src_e` and `src_value` in the package.
* The gate equations live only in `rtl/mrlg.sv`.
