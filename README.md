# Residue number system multiplier with single-residue fault detection

This design multiplies two integers held in a residue number system (RNS). It
is built almost entirely from one repeated part: a 5-bit, two-level
multiplexer unit whose data inputs are hard-wired ("programmed") with
constants. Five such units multiply the five residues in parallel. No carry
passes between the channels. Ten more units, programmed differently, form a
mixed-radix converter. The converter reports when the product lies outside
the legitimate range. That happens when the product overflowed, or when one
product residue is wrong because of a fault in one channel.

The whole design is combinational: no clock, no reset and no state.

## Number system

An integer X is represented by its remainders `x_i = X mod m_i` for a set of
pairwise coprime moduli. The moduli here are

| channel | modulus | role |
|---|---|---|
| 0 | 17 | non-redundant |
| 1 | 19 | non-redundant |
| 2 | 23 | non-redundant |
| 3 | 25 | non-redundant |
| 4 | 29 | redundant |

Every modulus fits in 5 bits, so every cell has the same size.

- Legitimate range: `[0, 17·19·23·25) = [0, 185725)`, about 17.5 bits.
- Total range: `[0, 185725·29) = [0, 5386025)`.

Multiplication works channel by channel: `z_i = |x_i · y_i|_(m_i)`. The
redundant residue `z_4` carries no range of its own. It exists so that the
result can be checked.

These constants live in `rtl/rns_pkg.sv` (`MODULI`, `N_NONRED`, `N_RED`,
`RES_W`).

## The multiplexer unit (`mod_m_unit`)

A modulo-m function of two residues u and v is a table with m × m entries. The
unit stores that table as wiring, in two levels of multiplexers:

- **First level.** There is one multiplexer per value r of v. Each has m data
  inputs. Input `D_(j+1)` is tied to the constant `f(j, r)`. All of these
  multiplexers select with u through a single shared decoder. So multiplexer
  r outputs `f(u, r)`. For the multiplier this is `|r·u|_m`.
- **Second level.** One multiplexer selects with v through its own decoder.
  Its input `D_(r+1)` is the output of first-level multiplexer r. It therefore
  delivers `f(u, v)`.

For the multiplier, the row r = 0 is the constant 0. Its first-level
multiplexer is left out, and the second level's `D_1` is tied to 0. That gives
m multiplexers in all: m−1 in the first level and one in the second.

The parameter `OP` chooses what is programmed:

| `OP` | function | used by |
|---|---|---|
| `OP_MUL` | `\|u·v\|_M` | the five multiplier channels |
| `OP_MRC` | `\|(u−v)·P⁻¹\|_M` | the converter cells |
| `OP_ADD` | `\|u+v\|_M` | available, unused in the top |
| `OP_SUB` | `\|u−v\|_M` | available, unused in the top |

The row v = 0 of `OP_MRC` depends on u. For that function the unit therefore
builds a first-level multiplexer 0 as well, m+1 multiplexers in all. A
generate condition decides this from the programmed table.

The constants are computed at elaboration by `rns_pkg::unit_value`. The
inverse comes from `rns_pkg::mod_inverse`. No table file is read.

### Decoder and multiplexer cells

- **`mux_decoder`** turns the 5-bit selector into M lines. Selector bit 4 is
  the most significant bit. Line `d[k]` is high exactly when the selector
  equals k. The lines come in pairs (d[0]/d[1], d[2]/d[3], …). Each pair shares
  the decode of the upper four bits and is split by bit 0. In the original
  transistor circuit, this sharing saves pass transistors.
- **`pass_mux`** places the data word of the one active line on the output.
  The original is an array of nMOS pass transistors. Here it is an AND-OR, so
  the output is 0 when no line is active.

## The fault detector (`mixed_radix_checker`)

This is the least obvious part of the design.

### Mixed-radix digits

Any X below the total range can be written in mixed radix:

    X = a_1 + a_2·m_1 + a_3·m_1·m_2 + a_4·m_1·m_2·m_3 + a_5·m_1·m_2·m_3·m_4,   0 ≤ a_i < m_i

The top digit a_5 is non-zero exactly when X ≥ 17·19·23·25. The legitimacy
test is therefore a single comparison with zero. With five digits the whole
check is:

    illegitimate = (a_5 != 0)

### Computing the digits from residues

The digits can be found from the residues without any binary arithmetic.
Let `s(1,k) = x_k`. Then repeat:

    a_p      = s(p,p)
    s(p+1,k) = |(s(p,k) − a_p) · m_p⁻¹|_(m_k)      for k > p

Each step removes the lowest digit and divides by its radix, in every higher
channel at once. Laid out in hardware, this is a triangle of cells:

    row 1:  4 cells  (columns 2..5), constant m_1⁻¹ = 17⁻¹
    row 2:  3 cells  (columns 3..5), constant m_2⁻¹ = 19⁻¹
    row 3:  2 cells  (columns 4..5), constant m_3⁻¹ = 23⁻¹
    row 4:  1 cell   (column 5),     constant m_4⁻¹ = 25⁻¹

The digits come out along the diagonal. a_1 is x_1 itself. a_5 leaves the
last cell after four cells in series.

Each cell is a `mod_m_unit` with `OP_MRC`, `M = m_k` and `P = m_p`. Its u input
is the value coming down column k. Its v input is the digit a_p of that row.
The generate loop `g_row[p]` holds the values entering row p.

Counting units: 5 multipliers plus 10 cells makes 15 copies of the same
structure.

### Why one wrong residue is always caught

Suppose X is legitimate and residue i is replaced by a wrong value. The
number the residues now describe is `X + c·(M_T/m_i)` for some c in
`1..m_i−1`, taken modulo the total range `M_T = 5386025`.

- For the redundant channel, `M_T/m_i` equals 185725. The result is therefore
  at least 185725.
- For a non-redundant channel, `M_T/m_i` is larger than 185725, because
  29 > m_i.

Either way the result falls in the illegitimate range, and a_5 ≠ 0. This
works because the redundant modulus is larger than every non-redundant one.

### What the flag cannot tell you

- **Overflow or fault?** The flag cannot tell them apart. It also assumes the
  two do not happen together.
- **Which residue?** The flag does not say which residue is wrong. Locating
  and correcting it needs a second redundant modulus. This design has only
  one, so it detects errors and does not correct them.
- **Wrapped products.** Two legitimate operands can give a product above the
  total range. The hardware sees only `|X·Y| mod 5386025`. If that value falls
  back below 185725, the flag stays low. The end-to-end testbench counts these
  cases separately. About 4% of random operand pairs drawn from the whole
  legitimate range wrap this way.
- **Faults in the checker.** Faults inside the checker itself are not
  detected.

## Top level (`rns_multiplier`)

| port | dir | type | meaning |
|---|---|---|---|
| `x[5]` | in | 5-bit residues | multiplicand, `x[i] mod MODULI[i]` |
| `y[5]` | in | 5-bit residues | multiplier |
| `z[5]` | out | 5-bit residues | product residues |
| `mr_digit[5]` | out | 5-bit digits | mixed-radix digits a_1..a_5 of the product, `mr_digit[0]` least significant |
| `illegitimate` | out | bit | a_5 ≠ 0: overflow or a single faulty residue |

Inputs must be valid residues, that is, below their modulus. A selector code at
or above the modulus selects nothing, and that multiplexer level gives 0.

For a product within the legitimate range, `mr_digit` also gives its binary
value through the mixed-radix formula above. No binary/residue converters are
included. The operands must arrive as residues, and the product leaves as
residues and mixed-radix digits.

Hierarchy:

    rns_multiplier
      g_ch[0..4].u_mul        mod_m_unit (OP_MUL, M = 17,19,23,25,29)
      u_checker               mixed_radix_checker
        g_row[p].g_col[k].g_cell.u_cell   mod_m_unit (OP_MRC)
    mod_m_unit
      u_dec_u, u_dec_v        mux_decoder
      g_row[r].g_mux.u_mux    pass_mux  (first level)
      u_mux_out               pass_mux  (second level)

The original circuit's delay is roughly 160 ns through one multiplier channel
in 1.2 µm nMOS. The RTL itself carries no timing.

## Relation to the original design

These parts follow the original design:

- the moduli set and the 5-bit cells;
- the two-level multiplexer multiplier, with one shared first-level decoder
  and its own second-level decoder;
- the decoder function and its paired lines;
- the pass-transistor multiplexer array, modelled as logic;
- the triangular mixed-radix array;
- the rule that a non-zero redundant digit flags the result.

These are choices made in this implementation:

- **Converter cells.** Each cell gets a first-level multiplexer for v = 0,
  because `(u−0)·P⁻¹` is not constant. The original calls the cell identical to
  the multiplier without addressing this row.
- **Invalid selector codes.** Selector codes with no table row give output 0.
  In the transistor circuit the output would float.
- **Wiring of the detector.** The detector takes the five product residues
  directly, combinationally.
- **Extra functions.** `OP_ADD` and `OP_SUB` are provided because the structure
  is meant to serve any two-input modular function. The top does not use them.
- **Transistor detail.** Transistor sizing, the inverting buffers on the
  decoder lines, and the layout are not modelled.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. With Verilator 5, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/rns_pkg.sv tb/tb_rns_multiplier.sv --top-module tb_rns_multiplier
    ./obj_dir/Vtb_rns_multiplier

Replace the testbench name to run the others.

| testbench | what it checks |
|---|---|
| `tb_mux_decoder` | all 32 selector codes, for M = 25, 17, 29 |
| `tb_pass_mux` | every line with random programmed words, plus no line active |
| `tb_mod_m_unit` | every residue pair: multipliers for all five moduli, two converter cells, adder, subtractor |
| `tb_mixed_radix_checker` | digits and flag for 3000 numbers spread over the total range; 2000 single-residue errors on legitimate numbers, each of which must be flagged |
| `tb_rns_multiplier` | end to end at the default configuration (see below) |

`tb_rns_multiplier` covers:

- 2000 random products, checked against integer arithmetic;
- zero operands;
- products just below and just above the 185725 boundary;
- 500 injected faults, made by forcing one channel's product residue to a
  wrong value; every fault must raise the flag.

It counts legitimate, overflowing, wrapped and faulty cases, and fails if any
kind of case never occurred.

To change the moduli, edit `MODULI`, `N_NONRED` and `N_RED` in `rns_pkg`. Keep
the moduli ascending and pairwise coprime, each below 32, and every redundant
modulus above every non-redundant one. The testbenches have the current
moduli written into them.
