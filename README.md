# GF(2^m) arithmetic units: serial and parallel, in three bases

Error-control codes and many ciphers compute in the binary extension field
GF(2^m). In that field addition is a carry-free XOR, but multiplication,
squaring and especially inversion take real hardware. How much hardware, and
how many clocks, depends on two choices:

* **the basis** in which an element's m bits are written: the *standard*
  (polynomial) basis `1, α, α², …`, a *normal* basis `β, β², β⁴, …`, or the
  *dual* basis of the standard one;
* **serial or parallel**: one result bit per clock from a small circuit, or the
  whole result in one clock from an m-times larger one.

This repository is a library of small, self-contained SystemVerilog units that
cover those trade-offs, from a one-XOR serial adder to three different
inverters. Every unit is parameterised by the field degree `M` and the field
polynomial `P`. The defaults are GF(2^4) with `p(x) = x^4 + x + 1`, the field
used by all the worked examples the units were checked against. A top module,
`gf_ops_top`, places all the units side by side.

Field elements are m-bit vectors. In the standard basis bit `i` is the
coefficient of `α^i`. The polynomial is written with its `x^m` bit set, so
`5'b10011` is `x^4 + x + 1`.

## The units at a glance

| Unit | Module | Basis | Style | Clocks per result |
|---|---|---|---|---|
| Adder | `gf_ser_add` | any | serial | m |
| Adder | `gf_par_add` | any | parallel | 1 |
| General multiplier | `gf_ser_std_mul` | standard | serial, streaming | m (one bit per clock) |
| Constant multiplier | `gf_fixed_ser_mul` | standard | serial | m, plus m to shift out |
| General multiplier, cell array | `gf_par_std_mul` | standard | parallel | combinational |
| General multiplier, AND + XOR arrays | `gf_par_andxor_mul` | standard | parallel | combinational |
| Constant multiplier | `gf_fixed_par_mul` | standard | parallel | combinational |
| Squarer / square root | `gf_square`, `gf_sqrt` | standard | parallel | combinational |
| Massey-Omura multiplier | `gf_ser_nb_mul` | normal | serial | m |
| Massey-Omura multiplier | `gf_par_nb_mul` | normal | parallel | combinational |
| Berlekamp multiplier | `gf_dual_mul` | dual × standard | serial | m |
| Polynomial multiplier Z·G(x) | `gf_dual_poly_mul` | dual × standard | serial | m |
| Inverter, multiply-square loop | `gf_inv_std` | standard | sequential | m − 1 |
| Inverter, product of squares | `gf_inv_nb` | normal | sequential | m − 1 |
| Inverter / divider, two LFSRs | `gf_inv_shift` | standard | serial | up to 2^m − 2 shifts |
| Log/antilog table unit | `gf_log_alu` | exponent | table look-up | 1 |
| Multiplier by address counting | `gf_log_cnt_mul` | exponent | sequential | j + 1 |

`gf_pkg` holds the shared defaults and the elaboration-time functions that
turn `M` and `P` into constant matrices and product masks. `gf_nb_f` is the
"function f" block shared by the two Massey-Omura multipliers.

## Standard basis

### Constant matrices: squarer, square root, constant multipliers

Squaring, taking a square root and multiplying by a constant are all linear
maps over GF(2). Each is therefore a fixed m × m bit matrix and costs only XOR
gates. The package computes the matrices while the design elaborates:

* squarer: column j is `(x^j)^2 mod p`. For GF(2^4) this gives
  `d0 = b0^b2, d1 = b2, d2 = b1^b3, d3 = b3`.
* square root: `sqrt(B) = B^(2^(m-1))`, so column j is x^j squared m − 1 times.
  For GF(2^4): `d0 = b0^b1, d1 = b2^b3, d2 = b1, d3 = b3`.
* multiplication by a constant A (`gf_fixed_par_mul`): column j is
  `A·x^j mod p`. The default `A = x^3 + x^2 = α^6` gives
  `d0 = b1^b2, d1 = b1^b3, d2 = b0^b2, d3 = b0^b1^b3`.

### Two parallel general multipliers

`gf_par_std_mul` is a regular array of m × m identical cells, each one AND
and one XOR. Row i carries `B·x^i mod p` on its column lines. Between rows the
lines move up one place and the line falling off the top is fed back at the
taps of p(x). The cell in row i, column j adds `a_i & (B·x^i)_j` to the sum
running down column j. The delay grows linearly with m.

`gf_par_andxor_mul` forms all m² products `a_i b_j` at once. Output bit k is
then the XOR of the products for which `x^(i+j) mod p` has a 1 at position k.
For GF(2^4) the four XOR groups have 4, 7, 6 and 5 terms. The delay is one AND
plus a logarithmic XOR tree: about half that of the cell array, for the same
gate count.

Both are combinational. In `gf_ops_top` they sit between operand and result
registers, so a product takes one clock.

### The streaming serial multiplier (`gf_ser_std_mul`)

This is the unit whose timing needs the most care. It has m identical cells,
one per coefficient. Cell j holds a latch for `a_j`, a bit `p_j` of the field
polynomial, and one flip-flop `r_j`:

    r_j <= r_(j-1) ^ (b & a_j) ^ (r_(m-1) & p_j)        r_(-1) = 0

One clock computes `R <- R·x mod p + b·A`. With B fed most significant bit
first, R holds `A·B mod p` after m clocks (Horner's rule). The top cell's bit
`r_(m-1)` goes to every cell and does the modulo reduction. `p_in` supplies
the polynomial, so one instance serves any field of degree m. Tie it to a
constant when the field is fixed.

The unit streams one bit per clock on every port with no gaps. A free-running
counter cuts time into m-clock slots, starting at the first clock after reset:

| Slot | a_in | b_in | cells | d_out |
|---|---|---|---|---|
| n | A word n, MSB first | B word n−1 | product n−1 | product n−2 |
| n+1 | A word n+1 | B word n, MSB first | product n | product n−1 |
| n+2 | … | … | … | product n, MSB first |

In more detail: A goes through a shift register and is copied into the cell
latches at the start of the next slot. B passes one input flip-flop, so the
cells use each B bit one clock after it arrives. The finished product is
loaded in parallel into the output register D and shifted out MSB first.
`d_first` marks its first bit. Counting clock edges from the first edge after
reset as 0, the MSB of product n is on `d_out` right after edge `2m+1+n·m`.
The m-clock lead of A over B, the cell equation and the output register follow
the published circuit. The slot counter, the clearing of R at the start of each
word and the exact one-clock offsets are this implementation's.

### The constant serial multiplier (`gf_fixed_ser_mul`)

With A and p(x) fixed, the serial multiplier shrinks to one m-bit register and
a few XORs. For `A = x^3 + x^2`, `p = x^4 + x + 1`:

    D0 <= D3   D1 <= D0 ^ D3   D2 <= D1 ^ b   D3 <= D2 ^ b

Pulse `clear`, send B MSB first for m clocks, then read `d` in parallel, or
raise `shift_out` to take it out serially MSB first on `d_out`. While
`shift_out` is high both the feedback and the B input are gated off. Gating
the B input is this implementation's choice.

## Normal basis: the Massey-Omura multipliers

In a normal basis `{β, β², β⁴, …, β^(2^(m-1))}` squaring is a cyclic shift:
`A² = [a_(m-1), a_0, …, a_(m-2)]`. The last coordinate of a product,
`d_(m-1)`, is a fixed XOR of some products `a_i b_j`, called f. Because
`(AB)^(2^s) = A^(2^s)·B^(2^s)`, the same f applied to A and B rotated by s
positions gives `d_(m-1-s)`. So:

* `gf_ser_nb_mul` has one f block and two rotating registers, and produces
  `d_(m-1), d_(m-2), …, d_0`, one per clock. Load the operands serially with
  `ld` high, sending `a_(m-1)` first, for m clocks. `d_out` comes straight
  from the registers: in the first clock after loading it is `d_(m-1)`.
* `gf_par_nb_mul` has m copies of f, copy s wired to the operands rotated by
  s, and is combinational.

**Which normal basis.** The polynomial `x^4 + x + 1` is not a normal
polynomial: its root α has trace 0, and `α, α², α⁴, α⁸` are linearly
dependent. The units keep the field polynomial and use `β = α^NB_EXP` as the
normal element, with default `NB_EXP = 7` (a root of `x^4 + x^3 + 1`). f then
has nine terms:

    f = a0b1 + a1b0 + a0b3 + a3b0 + a1b3 + a3b1 + a2b3 + a3b2 + a2b2

The term set is computed while the design elaborates. The package builds the
basis vectors `β^(2^i)` in the standard basis, inverts that matrix over GF(2)
by Gaussian elimination, and keeps the terms that reach the last coordinate.
Any `M`, `P` and `NB_EXP` for which `β` is normal will work. For a `β` that is
not normal the matrix is singular and the result is meaningless; nothing checks
this during elaboration. The GF(2^8) polynomial `x^8 + x^5 + x^3 + x + 1` with
`NB_EXP = 127` gives the smallest possible f for m = 8, with 21 terms. A
testbench covers that configuration.

In a normal basis the element 1 is all ones, and the product of the all-ones
vector with anything is that thing. The testbenches use this as a sanity check.

## Dual basis: the Berlekamp multiplier

The dual basis `{λ_k}` is defined by the trace. Coordinate k of Z is
`z'_k = Tr(Z·α^k)`. In `gf_dual_mul`, Z (dual coordinates) is in a shift
register and G (standard basis) is in a parallel register. Coordinate k of the
product W = Z·G is

    w'_k = Tr(Z·G·α^k) = XOR_j ( g_j & z'_(j+k) )

so each clock needs only m ANDs and an XOR tree over the register. Multiplying
Z by α moves every coordinate down one place (`z'_k <- z'_(k+1)`) and fills
the top with `Tr(Z·α^m) = XOR_j p_j z'_j`, which is `z'_0 ^ z'_1` for
`x^4 + x + 1`.

Usage: shift Z in with `z_ld`, sending `z'_0` first, for m clocks. Load G with
`g_ld`. Then raise `en` for m clocks. After the k-th `en` clock the registered
output `w` holds `w'_k`. The result is in the dual basis. The operands are in
two different bases, and converting between bases is outside these units.

`gf_dual_poly_mul` shares the Z register among `NCOEF` AND/XOR arrays, one
per coefficient `G_i` of a polynomial G(x). In m clocks it produces every
coefficient of Z·G(x), as used in encoders whose generator polynomial is not
fixed. `NCOEF` defaults to 4. For a fixed G(x) the AND gates could be removed;
this version keeps the G registers so that G(x) can change.

## Inversion, three ways

* **Multiply-square loop (`gf_inv_std`).** `β^-1 = β^(2^m - 2)`, and
  `2^m − 2` is binary `11…10`. The loop `R <- (R·β)²`, with R starting at 1,
  gives `β², β⁶, β¹⁴, …`. After m − 1 clocks it holds the inverse. It costs one
  general multiplier (`gf_par_std_mul`) plus a squarer.
* **Product of squares (`gf_inv_nb`).** `β^-1 = β²·β⁴·…·β^(2^(m-1))`. In the
  normal basis the squares come free from a rotating register, and one
  parallel Massey-Omura multiplier accumulates them: m − 1 clocks. The
  published drawing was read as this product of squares; the separate
  rotating square register is this implementation's reading of it.
* **Two LFSRs (`gf_inv_shift`).** Registers A = 1 and B = β are both
  multiplied by α every clock. Their ratio stays 1/β. When B reaches 1, A is
  the inverse. There is no multiplier and no comparator beyond a fixed
  pattern detector, but it takes up to 2^m − 2 shifts plus one clock to see
  B = 1. Starting A at any element `num` instead of 1 gives `num/β`, so the
  same circuit divides. `cycles` reports the number of shifts made.

All three use a start / busy / done handshake. `done` pulses for one clock
and the result stays valid until the next `start`. Zero has no inverse. The
first two return 0 for 0 naturally. The shift inverter would never stop, so
it detects β = 0 at start and returns 0.

An inverter based on Euclid's algorithm (three (m+2)-bit registers, about 4m
clocks) is sometimes used too. It is not included, because its register use
and comparison logic are not specified here.

## Log/antilog tables (`gf_log_alu`)

Every nonzero element is a power `α^k`. Two tables of m bits × 2^m words hold
`k -> α^k` (antilog) and `α^k -> k` (log). With them, multiplication,
inversion and division become addition or subtraction of exponents modulo
2^m − 1. `op` selects the operation:

* 0: MUL
* 1: INV of b
* 2 or 3: DIV a/b

The result is registered, one clock. Both tables are filled while the design
elaborates, by stepping `α^k` one multiplication by α at a time. A zero
operand gives 0. `err` flags inversion of zero and division by zero.

`gf_log_cnt_mul` multiplies without an adder. It takes the operands as
exponents i and j and loads an address counter with i. The counter then counts
up j times, modulo 2^m − 1, and the antilog table gives `α^(i+j)` at the final
address. It is small but slow: `done` comes j + 1 clocks after `start`.

## Top level

`gf_ops_top` instantiates every unit once, in one field (`M`, `P`, `NB_EXP`,
`A_CONST`, `NCOEF`). The units share only clock and asynchronous active-low
reset. Each unit's ports come out with a prefix: `sadd_`, `padd_`, `smul_`,
`fsmul_`, `pmul_`, `lin_`, `snb_`, `pnb_`, `dual_`, `dpoly_`, `sinv_`, `ninv_`,
`shinv_`, `log_`, `lcnt_`. The top adds operand and result registers around the
combinational units. A result appears on the clock after the one in which
`pmul_en`, `lin_en` or `pnb_en` loaded the operands.

## What follows the published circuits and what does not

Taken from the published designs: the cell and array structures, the cycle
counts (m for the serial multipliers, m − 1 for the loop inverters, at most
2^m − 1 for the shift inverter), the feedback taps, the worked GF(2^4)
matrices and the bit orders (B most significant bit first, the normal-basis
product `d_(m-1)` first, the dual-basis product `w'_0` first).

Choices made in this implementation:

* the normal element `α^7`, as described above;
* reset, all control handshakes and load/enable signals, the zero-operand
  behaviour, and the framing counter of the streaming multiplier;
* generating every constant matrix from the parameters instead of
  hard-wiring the GF(2^4) case;
* the exact routing inside the parallel cell array, which was built as the
  row-by-row scheme described above;
* the reading of the normal-basis inverter drawing as a product of squares.

Addition in the logarithmic representation is not included. It needs a
table of `1 + α^k` (a Zech logarithm table) that is not specified here.

## Verification

Each unit has a self-checking testbench, `tb/tb_<module>.sv`. Every testbench
prints `TB_RESULT checks=N failures=F` and ends the run itself, with a
watchdog in case the design hangs. The expected values come from
`tb/gf_ref_pkg.sv`. That package is a separate behavioural model: a full
polynomial product reduced from the top down, exhaustive-search inverses,
traces by repeated squaring, and normal-basis conversion by search. It shares
no code with the design.

Coverage:

* GF(2^4) is tested exhaustively: all 16 elements, or all 256 operand pairs.
* Several units also run in GF(2^8) with `x^8 + x^4 + x^3 + x^2 + 1`, and the
  normal-basis units in GF(2^5).
* `tb_gf256_nb` runs the normal-basis multipliers and inverter in GF(2^8)
  with `x^8 + x^5 + x^3 + x + 1`.
* Cycle counts are checked where they are specified: m − 1 clocks for the loop
  inverters, the exact shift count of the LFSR inverter, and the output clock
  of the streaming multiplier.
* The three inverters and the counting multiplier carry an assertion,
  `a_done_not_busy`: out of reset, `done` and `busy` are never high together.
  Run with `--assert` to enable it.

`tb_gf_ops_top` drives the whole top level at its default parameters. Each
round it computes a/b in several independent ways and requires them to agree:

* three inverters followed by the parallel and serial multipliers;
* the log-table divider;
* the shift-register divider.

Each round also runs the results through both adders, and exercises the dual,
polynomial, Massey-Omura, constant, square and square-root units. The
testbench counts certain events and fails if any never happened:

* a modulo reduction;
* an exponent wrap-around;
* a zero operand;
* a full-length LFSR inversion;
* an inversion of 1;
* the constant multiplier's shift-out mode;
* a division through the LFSR inverter;
* a wrap of the counting multiplier's address counter.

The testbenches were written alongside the design, so they check the
documented behaviour of each unit rather than an outside specification.
Worst-case timing and gate area were not evaluated.

### Running a testbench with Verilator

From the repository root, for example:

    verilator --binary --timing -Irtl -Itb rtl/gf_pkg.sv tb/gf_ref_pkg.sv \
        tb/tb_gf_ops_top.sv --top-module tb_gf_ops_top -Mdir obj_top
    ./obj_top/Vtb_gf_ops_top

Replace `tb_gf_ops_top` with any other `tb_*` module. Verilator finds the
units through `-Irtl`. For lint only:
`verilator --lint-only -Wall -Irtl rtl/gf_pkg.sv rtl/gf_ops_top.sv`.

### Changing the field

Set `M` and `P` on any unit, for example
`gf_par_std_mul #(.M(8), .P(9'h11d))`. The package functions support
`M` up to 16 (`gf_pkg::MAXM`). The log tables grow as 2^M words, so keep `M`
moderate for `gf_log_alu`. For the normal-basis units also choose an
`NB_EXP` whose power of α is a normal element. For `gf_fixed_ser_mul` and
`gf_fixed_par_mul`, `A_CONST` is the constant multiplier.
