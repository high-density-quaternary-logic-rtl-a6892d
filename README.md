# Quaternary logic array for parallel rule matching

A forward-chaining production system spends most of its time on one job.
It has to find which rules have a left-hand side that is satisfied by the
current working memory. Here a left-hand side is a conjunction of elements,
`C1 & C3 & C4 & C6 -> A3`. The working memory is the set of elements that are
currently present. A rule is satisfied when every element it names is present.
When the rules are fixed, this test can be built directly into silicon. Each
rule becomes one row of transistors. Each element becomes a column driven from
working memory. All rules are then evaluated at once, in the time one
transistor takes to discharge its row.

This design halves that array by working in base 4. Neighbouring elements are
paired, so C(2i-1) and C(2i) form pair *i*. Each pair becomes one four-valued
digit, both in working memory and in every rule. A single transistor then
compares a working-memory digit with a rule digit. The digit of the rule is
stored as the transistor's implanted threshold voltage. An array for R rules
over E elements needs R·E/2 cells instead of R·E.

The SystemVerilog here is a digital model of that array. It is sized like the
test chip: 15 rules over 26 elements, with 13 cells per rule. It also has
behavioural models of the analog literal circuit that each cell is built from.

## The quaternary code

For the pair (x(2i-1), x(2i)) of presence bits, the digit is

| pair present | neither | only C(2i-1) | only C(2i) | both |
|---|---|---|---|---|
| digit X(i) | 0 | 1 | 2 | 3 |

In code this is `X = {x(2i), x(2i-1)}`. A rule's digit Y(i) uses the same code
for the elements the rule names. Pair *i* of a rule is satisfied when every
element that Y requires is present in X:

| Y \ X | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| 0 (rule names neither) | match | match | match | match |
| 1 (names C(2i-1)) | – | match | – | match |
| 2 (names C(2i)) | – | – | match | match |
| 3 (names both) | – | – | – | match |

Rows 0, 2 and 3 are *threshold literals*: the pair matches when X ≥ Y. One
NMOS transistor tests this when the threshold is placed between the voltage
levels. Row 1 matches X ∈ {1,3}, which is not a range. Its condition is simply
x(2i-1) = 1. So every column runs two lines down the array: the quaternary
line, which carries X(i), and a binary line, which carries x(2i-1). When the
array is built, each cell's gate is wired to one of them:

| Y | gate line | threshold | conducts (mismatch) when |
|---|---|---|---|
| 0 | quaternary | 5.5 V | never |
| 1 | binary x(2i-1) | 2.5 V | x(2i-1) = 0 |
| 2 | quaternary | 2.5 V | X < 2 |
| 3 | quaternary | 0.9 V | X < 3 |

The voltage levels are inverted. Quaternary 0, 1, 2 and 3 are 5.0, 3.3, 1.7
and 0.0 V. Binary 0 and 1 are 5.0 and 0.0 V. The depletion loads have a
threshold of −3.0 V.

A rule is a row of cells on one line, which a depletion load pulls high. A
cell that sees a mismatch conducts and pulls the line low. The line is a
wired-OR of mismatches, so it stays high only if every pair matches. That is
the logical AND of the per-pair results.

### Digital form of a four-level line

Simulators have no four-level wire. In the RTL a quaternary line is a 3-bit
thermometer code, `qla_pkg::qline_t`. Bit k−1 is set when X ≥ k. In
electrical terms, bit k−1 says that the line voltage is below the threshold
that a digit-k cell compares against. A cell with Y = 2 looks at bit 1 and a
cell with Y = 3 looks at bit 2. Bit 0 (X ≥ 1) exists for completeness, but no
cell uses it, because Y = 1 takes the binary line instead.

## Blocks

| module | what it is |
|---|---|
| `qla_pkg` | types (`quat_t`, `qline_t`, `mv_t`), voltage levels and thresholds, conversions |
| `quat_encoder` | one working-memory pair → quaternary line (`X>=1` = OR, `X>=2` = x(2i), `X=3` = AND) |
| `match_cell` | one single-transistor cell; parameter `Y` is the rule digit; output `pull_down` = mismatch |
| `rule_line` | NQ cells on one line; parameter `RULE` is the rule's element bits; output `match` |
| `literal_cell_model` | behavioural DC model of the analog literal circuit, with voltages as millivolt codes |
| `qla_chip` | top: NE/2 encoders, NR rule lines and two stand-alone test literals (X^33, X^23) |

`qla_chip` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `wm` | in | NE | working memory; `wm[e-1]` = element C(e) present |
| `match` | out | NR | `match[h]` = rule h+1 satisfied |
| `lit33_vin`, `lit23_vin` | in | 13 | gate voltage of the test literal circuits, in mV |
| `lit33_vout`, `lit23_vout` | out | 13 | their output node voltage, in mV |

Parameters: `NE` = 26 elements, `NR` = 15 rules, and `RULES`. `RULES` is a
packed `[NR-1:0][NE-1:0]` array, and word h holds the element bits of rule
h+1. The rules are mask-programmed on silicon, which is why they are a
parameter and not a loadable memory. `rule_line` derives each cell's digit as
`Y(i) = {RULE[2i+1], RULE[2i]}` during elaboration.

The default contents are:

- Rules 1–3 are the textbook example: `C1&C5`, `C2&C4&C5` and
  `C1&C3&C4&C6`. With working memory {C1, C3, C4, C6}, only rule 3 is
  satisfied. It is satisfied through x1 · X2^33 · X3^23.
- Rule 4 programs all 13 cells, with digits 1, 2, 3, 1, 2, 3, …
- Rules 5–15 are arbitrary examples. Replace them with your own rule base.

There is no clock and no reset. The whole design is combinational. On silicon,
a result settles when the slowest rule line has discharged. For a 13-cell line
loaded with about 2 pF in a 10 µm NMOS process, the estimated worst case is
about 1.4 µs. This design does not model that delay.

### Test literals

The test chip also carries two lone literal circuits, X^33 (Y = 3) and X^23
(Y = 2), with their own pins for measuring DC transfer curves.
`literal_cell_model` reproduces them as ideal switches. Its output is VDD
(5000 mV) while the input is at or below the implanted threshold, and
`V_OL_MV` (default 0) above it. Voltages are unsigned 13-bit millivolt codes
rather than `real`, so the top stays synthesizable.

## Where this departs from the source design

- **Output polarity.** `match = 1` means the rule line is high, which happens
  only when all of its cells are off. The source design's level tables put
  binary 0 at 5 V, so on silicon a matched line may be labelled logical 0.
  The circuit behaviour is identical; only the label is a choice made here.
- **Encoders.** The encoder circuit (inverters and pass transistors that
  select one of four voltages) is reduced to its logic function. The
  encoders are placed in the top so that the chip takes plain binary
  working-memory bits. The test chip's count of 210 transistors (15 rows × (13
  cells + 1 load)) suggests that its encoders were off-chip.
- **Electrical detail.** The analog behaviour is not modelled: no slopes, no
  line delay and no threshold spread. The literal model is an ideal step.
- **Rule contents.** The test chip's programmed rules are unknown, so rules
  4–15 are examples.
- **Not built.** The following parts are not built:
  - The working memory and the rule interpreter. They belong to the host
    production system, which picks a satisfied rule and applies its actions.
    Their signals are the ports `wm` and `match`.
  - The binary (one cell per element) array, which serves only as a point of
    comparison. The testbenches use its rule, `(rule & ~wm) == 0`, as their
    reference.

## Sizes

| case | needed | built (defaults) | fits |
|---|---|---|---|
| textbook example: 3 rules, 6 elements | 9 cells | 15 × 13 = 195 cells | yes |
| measured rule: 13 cells on one line | 13 cells | 13 cells per rule | yes |
| large system: 1000 rules, 1000 elements | 500,000 cells | 195 cells | no; set `NE`/`NR` |

The array is fully parameterised. The largest size simulated is 300 rules
over 300 elements (45,000 cells). At 1000 × 1000, verilator takes a very long
time to elaborate the array.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_quat_encoder` | all four pairs against the code table |
| `tb_match_cell` | one cell per Y, all X: the 4×4 match table |
| `tb_rule_line` | four rules (all-cells, example, single-element digits, empty): own element sets, single-element removals, 2000 random memories vs. the subset test |
| `tb_literal_cell_model` | digital levels against the match table; a 0–6 V DC sweep, where each output must fall within 10 mV above its threshold |
| `tb_qla_chip` | default chip, end to end: the example, every rule with each element removed, 20,000 random memories, and a test-literal sweep. It counts rule matches, mismatches decided by a binary-line cell, an X^23 cell and an X^33 cell, unprogrammed cells ignoring present elements, and steps with several rules matched. Any count of zero is a failure. |
| `tb_qla_example` | a 3-rule, 6-element chip with the textbook rules: the example memory, its internal digits (1, 3, 2), and all 64 memories |
| `tb_qla_large` | 300 × 300 array with rules from an LCG: 200 rule sets, removals, a full memory and 200 random memories |

To run one with plain verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/qla_pkg.sv rtl/*.sv \
    tb/tb_qla_chip.sv --top-module tb_qla_chip -Mdir obj
./obj/Vtb_qla_chip
```

`qla_pkg.sv` must come first. `tb_qla_large` takes about a minute to build;
the others take seconds.
