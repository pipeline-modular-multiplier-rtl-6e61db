# Pipelined modular multiplier, LSB-first

This design computes `R = (A * B) mod P`, the core operation of modular
exponentiation in public-key cryptography. No precomputed constants are needed,
unlike the Barrett and Montgomery methods. There is also no double-width
product to reduce afterwards. Instead, the multiplier `B` is scanned one bit at
a time from its least significant end, and the running result is reduced
modulo `P` at every step. Because of that, no value ever grows beyond one bit
more than the modulus.

Each bit of `B` gets its own pipeline stage. A new operand set `(A, B, P)` can
enter on every clock. Each set carries its own modulus. After the pipeline
fills, one result leaves per clock.

## The recurrence

Write `B = sum b_i 2^i` for `i = 0 .. NB-1`. Then `A*B mod P` is the modular
sum of the terms `b_i * (2^i A mod P)`. The pipeline carries two residues,
both always below `P`:

| quantity | meaning | update |
|---|---|---|
| `r_i` | partial remainder, `2^i A mod P` | `r_0 = A`, `r_i = 2 r_(i-1) mod P` |
| `R_i` | intermediate remainder, the product of `A` with the low `i+1` bits of `B` | `R_0 = A & b_0`, `R_i = (R_(i-1) + (r_i & b_i)) mod P` |

The result is `R_(NB-1)`. Here `x & b` means "`x` if the bit `b` is 1, else 0".

Each update needs only one conditional subtraction:

* `2 r_(i-1)` is below `2P` whenever `r_(i-1) < P`.
* `R_(i-1) + r_i` is below `2P` because both terms are below `P`.

For this to hold, the inputs must satisfy `1 <= P` and `A < P`. The design
does not check this. `P` does not have to be odd.

Example with `A = 14`, `B = 13 = 1101b`, `P = 15`:

* `R_0 = 14`
* `r_1 = 28 - 15 = 13`; `b_1 = 0`, so `R_1 = 14`
* `r_2 = 26 - 15 = 11`; `b_2 = 1`, so `R_2 = (14 + 11) - 15 = 10`
* `r_3 = 22 - 15 = 7`; `b_3 = 1`, so `R_3 = 17 - 15 = 2`

Check: `182 mod 15 = 2`.

## The two arithmetic cells

**Partial remainder former (`prf`).** This cell reduces any `x < 2P` to
`x mod P`.

* A `W+1`-bit adder computes `x + ~P + 1`, which is `x - P` in two's complement
  (`~P` is the bitwise inverse of `P`, and the `+1` enters as the carry-in).
* The adder's carry out `T` is 1 exactly when `x >= P`. Its complement `Sn`
  marks a negative difference.
* An AND-OR multiplexer passes the difference when `T = 1` and passes `x`
  unchanged when `Sn = 1`.

When a stage forms `r_i`, the input is `r_(i-1)` shifted left one bit. That
shift is only wiring in the stage.

**Modular adder (`addmp`).** A plain adder forms `R_(i-1) + r_i`, and a `prf`
reduces the sum. It has two adders in series, so it is the longest path in a
stage. It sets the clock period.

**AND row (`and_blk`).** This row of AND gates forms `x & b_i`.

## Pipeline organisation

`pmm_pipeline` generates `NB` stages. Example default: `NB = 4`.

| stage | logic | registers written at the end of the stage |
|---|---|---|
| 1 | AND row (`A & b_0`), former (`2A mod P`) | `RegB.1`, `Regr.1` (`r_1`), `RegR.0` (`R_0`), `RegP.1` |
| k = 2 .. NB-1 | AND row (`r_(k-1) & b_(k-1)`), modular adder (`R_(k-1)`), former (`r_k`) | `RegB.k`, `Regr.k`, `RegR.(k-1)`, `RegP.k` |
| NB | AND row, modular adder | `RegR` (`R_(NB-1)`, the result) |

The registers carry these values between stages:

* **`RegP.k`** carries each set's modulus, so consecutive sets may use
  different moduli.
* **`RegB.k`** keeps only the bits of `B` not used yet. It loses one bit per
  stage (`NB-k` bits in stage `k`), and the bit a stage needs is always bit 0
  of its register.
* **Input registers.** `RegA`, `RegB` and `RegP` sit in front of stage 1.

## Clocking and timing

The two register groups use opposite clock edges:

* **Input registers:** `RegA`, `RegB` and `RegP` load on the **falling** edge
  of `clk`.
* **Buffer registers:** all other registers load on the **rising** edge.

So an operand set at the ports is sampled half a period before the rising edge
that moves it into stage 1. If a set is driven after rising edge `c`:

* it is in `RegR.0` after rising edge `c+1`;
* its result is in `RegR` (`r`, with `out_valid`) after rising edge `c+NB`.

`K` sets issued back to back take `NB + K - 1` clock periods instead of `NB*K`
without pipelining. For the example below that is 7 periods against 16. There
is no stall input. The pipeline advances on every clock, and `in_valid` only
marks which slots hold data.

The four-set example with `P = 15` shows the contents of `RegR.0..RegR.3` after
each clock pulse. The test bench checks every cell of this table:

| set (A, B, P) | CP1 | CP2 | CP3 | CP4 | CP5 | CP6 | CP7 |
|---|---|---|---|---|---|---|---|
| RegR.0 | 14 | 11 | 10 | 4 | | | |
| RegR.1 | | 14 | 11 | 0 | 12 | | |
| RegR.2 | | | 10 | 11 | 0 | 13 | |
| RegR.3 (result) | | | | 2 | 9 | 5 | 13 |

The sets are (14, 13, 15), (11, 9, 15), (10, 11, 15) and (4, 7, 15). The
results 2, 9, 5 and 13 are 182, 99, 110 and 28 mod 15.

## Interface of `pmm_pipeline`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears every register |
| `in_valid` | in | 1 | `a`, `b`, `p` hold an operand set (sampled on the falling edge) |
| `a` | in | `W` | multiplicand, `A < P` |
| `b` | in | `NB` | multiplier |
| `p` | in | `W` | modulus, `P >= 1` |
| `out_valid` | out | 1 | `r` holds a result |
| `r` | out | `W` | `(A*B) mod P` |
| `stage_rem` | out | `NB x W` | `RegR.0 .. RegR.(NB-1)`, the intermediate remainders, for observation |

Parameters:

* `W`: width of `A`, `P` and all remainders. Default 5.
* `NB`: width of `B` and number of stages. Default 4. `NB >= 2` is required.

The defaults are the example design's bus widths, held in `pmm_pkg`. Any
`W >= 1` works. `NB` may differ from `W`. For full modular exponentiation it
would normally equal `W`.

## Design choices and deviations

Taken from the original design:

* the recurrence and its bit order;
* the per-stage split into an AND row, a former and a modular adder;
* the register set and the modulus travelling with each set;
* the shrinking `RegB.k`;
* falling-edge input registers and rising-edge buffer registers;
* the example sizes and the structure of both arithmetic cells.

Choices made here:

* `in_valid` / `out_valid` bits travel through the pipeline.
* An asynchronous active-low reset clears all registers.
* The stage count is a parameter instead of four hand-drawn stages.
* The `+1` carry-in of the former is wired inside `prf` rather than being an
  input.
* The modulus enters as `P`, and its inverse `~P` is formed inside. A
  simulation of the original fed the negated modulus instead.
* Operands with `A >= P` or `P = 0` are not supported and are not checked.
  With `A >= P` the single conditional subtraction is no longer enough.

Timing note: because the input registers use the other clock edge, the path
from `RegA`/`RegP` through stage 1 gets only half a clock period. Stage 1
holds one former and no modular adder, which makes it the shortest stage.
If the falling-edge registers are not wanted, change their `always_ff` to
`posedge`. Latency from the ports then grows by half a cycle to `NB + 1`
rising edges. Update the test benches' expected cycle accordingly.

## Verification

Each test bench compares against values it computes independently with the
`%` operator or its own model, and prints
`TB_RESULT checks=N failures=M`.

| test bench | what it covers |
|---|---|
| `tb_prf` | every `P` in 1..31 and every `x < 2P`: result, `T`, `Sn` |
| `tb_addmp` | every `P` in 1..31 and every pair of residues |
| `tb_and_blk` | every `a` and both values of `b` |
| `tb_pmm_pipeline` | default size. It replays the four-set example and checks each cell of the table above and the 4-cycle latency and 7-cycle total. It then streams all 7936 legal sets (all `P <= 31`, `A < P`, all `B`) with random idle cycles and alternating moduli, checking each result and its arrival exactly `NB` cycles after sampling. It also resets with the pipeline full. It counts, and requires at least once: former subtracting and passing, modular adder subtracting and passing, `b_i` of 0 and 1, idle cycles, and modulus changes between sets. |
| `tb_pmm_pipeline_wide` | `W = NB = 32`. It streams 20 000 random sets and corner cases (`P = 1`, `P = 2^32-1`, `A = P-1`, `B = 0`/all ones) against 64-bit arithmetic, one per clock. |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pmm_pkg.sv tb/tb_pmm_pipeline.sv --top-module tb_pmm_pipeline -o sim
./obj_dir/sim
```

Each test bench finishes in well under a second.

## Files

Everything below is in `rtl/`:

* `pmm_pkg.sv`: default sizes
* `prf.sv`: partial remainder former
* `addmp.sv`: modular adder
* `and_blk.sv`: AND row
* `pmm_pipeline.sv`: the pipeline (top)

Test benches are in `tb/`.
