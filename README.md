# Constant arithmetic as sums of small tables

This RTL builds four arithmetic operators in which one operand, or the
modulus, is a constant known when the circuit is built:

| operator | function | default configuration |
|---|---|---|
| `const_mult` | `p = a * C` | 10-bit `a`, `C = 2^183 - 1` |
| `mod_mult`   | `r = (a * b) mod P` | `P = 4051`, 12-bit `a`, `b` |
| `mod_reduce` | `r = a mod P` | 270-bit `a`, `P = 241` |
| `const_div`  | `q = a / D`, `r = a mod D` | 64-bit `a`, `D = 241` |

They all use one idea, taken from the short paper *Efficient Arithmetic on
FPGA*. Split the variable operands into short sub-vectors `a_i` (and `b_j`)
and write the operation as a sum of terms

    AO = sum_i  A_i * B_i * C_i

where every `C_i` is a constant. A term then depends on only a few input bits,
typically 5 or 6. So it is not built as a multiplier. It is stored as a
constant table, and on an FPGA each output bit of that table is one LUT. The
tables' outputs are added by a balanced tree of adders. For modular
operations, a final compare-and-subtract step brings the sum into `[0, P)`.
Everything is combinational: there is no clock, no reset and no register.

`arith_top` places the four operators side by side. They share no signals.

## The three stages

### 1. Term tables (`lut_term`)

`lut_term` is a ROM with `2^KIN` entries of `OW` bits. Entry `e` is
`arith_pkg::term_value(OP, e, ...)`, a constant function that runs only
during elaboration. It uses 512-bit arithmetic, enough for a 183-bit constant
times a 10-bit operand and for a 270-bit operand. The table kinds (`term_op_e`)
are listed below. `s` is the term's weight exponent and `k` is the constant:

| kind | entry for input `x` | used by |
|---|---|---|
| `TERM_CMUL`   | `(x * k) << s` | `const_mult` |
| `TERM_MODRED` | `(x * 2^s) mod k` | `mod_reduce` |
| `TERM_MODMUL` | `(a * b * 2^s) mod k` with `x = {b, a}` | `mod_mult` |
| `TERM_DIVQ`   | `floor(x * 2^s / k)` | `const_div` |
| `TERM_DIVR`   | `(x * 2^s) mod k` | `const_div` |

If an entry does not fit in `OW` bits, elaboration fails with `$error`.

The sub-vector width `M` sets the number of inputs of each output bit. The
method aims for 5-input functions, because two 5-input functions that share
their inputs fit in one dual-output 6-input LUT. So `M = 5` by default for the
three single-operand operators. In `mod_mult` a table takes one sub-vector of
each operand, so it has `2M` inputs. The default `M = 3` gives 6-input tables,
one full LUT per output bit. When the operand width is not a multiple of `M`,
the most significant sub-vector is narrower (`arith_pkg::chunk_width`).

The tables are plain ROM arrays. Mapping them onto LUTs, including packing two
5-input functions into one dual-output LUT, is left to the synthesis tool.
The original method uses its own architecture-aware mapping heuristics. They
are not described in enough detail to reproduce, so that LUT-level
optimisation is not part of this RTL.

### 2. Parallel addition network (`adder_tree`, `parallel_adder`)

`adder_tree` adds `N` operands of `W` bits into `W + clog2(N)` bits. Level
`k` holds `ceil(N / 2^k)` partial sums of `W + k` bits. Each one adds two
neighbouring sums of level `k - 1`; when that level has an odd count, its last
sum is copied through. All adders of a level work side by side, so the depth
is `clog2(N)` adders rather than `N - 1`.

Each adder is a `parallel_adder`, a carry-select adder split at `W/2`. It adds
the lower half once. It adds the upper half twice in parallel, once with carry
0 and once with carry 1. The lower half's carry out then picks one of the two
upper results, so both halves of the sum are computed at the same time. The
source asks for an adder that computes "higher and lower-order bits
simultaneously" without giving its structure. This carry-select split is one
reading of that.

### 3. Correction (`mod_correct`)

A sum of `NMULT` residues, each below `P`, is below `NMULT * P`. `mod_correct`
compares the sum with every multiple `j*P`, `j = 1 .. NMULT-1`, in parallel. It
also forms every difference `s - j*P`. The largest `j` whose comparison holds
gives the quotient `q = floor(s/P)` and the residue `r = s - q*P`. An input of
`NMULT * P` or more gives a wrong result. The operators size `NMULT` so that
this cannot happen.

## The four operators

**`const_mult`.** `a` is cut into `M`-bit sub-vectors. Table `i` holds
`a_i * C * 2^(M*i)`. The low `M` bits of every table but the first are zero,
so those tables store only the bits above `M`. The adder tree sums the upper
parts, and the first table's low `M` bits are concatenated below the sum
without any addition. There is no correction. For special-form constants such as
`2^183 - 1`, the table bits repeat in long runs, and synthesis folds them
away. The constant itself is not split.

**`mod_mult`.** Both operands are cut into `M`-bit sub-vectors. Every pair
`(i, j)` has a table of `a_i * b_j * 2^(M*(i+j)) mod P`. By default that is
`4 x 4 = 16` tables of 64 entries. The 16 residues are summed, and
`mod_correct` with `NMULT = 16` reduces the sum. The operands may be any value
of their width, not only values below `P`.

**`mod_reduce`.** Table `i` holds `a_i * 2^(M*i) mod P`. At the default size
there are 54 tables of 8-bit residues. They are summed, and `mod_correct`
with `NMULT = 54` reduces the sum in one step.

**`const_div`.** The source does not say how division is decomposed. This
design uses the identity

    a = sum_i a_i 2^(M i),   a_i 2^(M i) = Q_i * D + R_i,   0 <= R_i < D
    =>  a / D = sum Q_i + floor(sum R_i / D),   a mod D = (sum R_i) mod D

Each sub-vector has two tables: the partial quotient `Q_i` (`WA` bits) and the
partial residue `R_i`. Two adder trees sum the two sets side by side. The
residue sum is below `NCH * D`, where `NCH` is the number of sub-vectors.
`mod_correct` splits it into a small quotient (at most `NCH - 1`) and the
final residue. A last `parallel_adder` adds the small quotient to the summed
partial quotients. The true quotient fits in `WA` bits, so the upper bits of
the quotient sum and the carry out of that adder are always zero. Lint reports
these bits as unused. That is expected.

## Parameters and size

| module | parameter | default | notes |
|---|---|---|---|
| `const_mult` | `WA`, `WC`, `C`, `M` | 10, 183, `2^183-1`, 5 | evaluated: 7–10-bit variables; constants of 29–183 bits |
| `mod_mult`   | `P`, `M` | 4051, 3 | evaluated: P = 241, 491, 997, 2011, 4051 |
| `mod_reduce` | `WA`, `P`, `M` | 270, 241, 5 | evaluated: 168 and 270 bits, five moduli |
| `const_div`  | `WA`, `D`, `M` | 64, 241, 5 | evaluated: 16–64 bits; D = 5, 11, 13, 23, 47, 113, 241 |
| `arith_top`  | `CM_*`, `MM_P`, `MR_*`, `DV_*` | as above | passed through |

The constants are parameters, so each value gives a different circuit. At the
defaults the tables hold 67,104 ROM bits in all:

- `const_mult`: 12,192.
- `mod_mult`: 12,288.
- `mod_reduce`: 13,824.
- `const_div`: 28,800.

A synthesis tool turns each ROM into logic. No LUT counts or delays have been
measured for this RTL. The published figures for the method come from a
different, LUT-level mapping flow, so they do not carry over.

Some choices are this design's own, because the source does not fix them:

- which configuration is the default;
- the sub-vector width `M = 3` for modular multiplication;
- for a 5-input mapping of modular multiplication, `M = 2` (4-input pair
  tables), since equal-width sub-vectors cannot give exactly 5 inputs;
- the carry-select split;
- comparing against all multiples in parallel in `mod_correct`;
- the whole quotient/residue decomposition of division;
- the assumption that modular reduction uses the same five moduli as modular
  multiplication. The source says "five moduli" and quotes only `P = 241`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with the same operation written with SystemVerilog's `*`, `/`
and `%`:

| testbench | what it checks |
|---|---|
| `tb_lut_term` | every entry of one table of each kind |
| `tb_parallel_adder` | random and corner sums at widths 16, 7 and 1 |
| `tb_adder_tree` | trees of 16, 5 and 1 operands |
| `tb_mod_correct` | every legal input for `P = 241`, and a sweep for `P = 4051` |
| `tb_const_mult` | every 10-bit `a` times `2^183-1`, and a `2^29-3` instance |
| `tb_mod_mult` | 20,000 random pairs mod 4051, and all pairs mod 241 |
| `tb_mod_reduce` | 270-bit mod 241 and 168-bit mod 997, random and corner values |
| `tb_const_div` | 64-bit / 241 and 16-bit / 5, random and corner values |
| `tb_arith_top` | the top at its default parameters, end to end |
| `tb_workloads` | all 49 configurations listed in the parameter table, each with 5-input and with 6-input tables |

`tb_arith_top` also counts each mechanism and fails if one never happens:

- a multiple of the modulus was subtracted, in `mod_mult`, `mod_reduce` and
  `const_div`;
- a sum was already in range, in the same three operators;
- a carry-select upper half took the carry-in-1 result.

It steers some dividends so that the division's final adder must carry.
`tb_workloads` does not cover the non-special constants in the multiplication
results, because their values are not known. Every testbench prints
`TB_RESULT checks=N failures=M`.

To run a testbench with Verilator 5:

    verilator --binary --timing -Irtl rtl/arith_pkg.sv tb/tb_arith_top.sv \
        --top-module tb_arith_top -Mdir obj_arith_top
    ./obj_arith_top/Vtb_arith_top

Swap in any other `tb_*.sv`. Put `arith_pkg.sv` first, since every module
imports it. `-Irtl` lets Verilator find the other modules by file name.
`tb_workloads` elaborates 98 operator instances and takes about a minute to build.

## Changing it

- **A new constant, modulus or divisor.** Override the parameter. The tables
  regenerate at elaboration. The widths follow from the parameters: `clog2(P)`
  for residues and `WA + WC` for products.
- **A different LUT size.** Change `M`: 6 suits plain 6-input LUTs, and 4 suits
  4-input LUTs. In `mod_mult` each table has `2M` inputs.
- **Pipelining.** Nothing is registered. The natural cut points are after the
  tables, between adder-tree levels, and before `mod_correct`.
- **Very small constants.** `mod_correct` needs `P >= 2`. `const_mult` needs
  `WA + WC <= 512` because of the package's table width `WIDE`; widen `WIDE`
  if you need more.
