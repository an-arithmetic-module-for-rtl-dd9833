# Digit-serial function evaluation with the E-method

This RTL evaluates polynomials and rational functions of one argument,

    R(x) = (p0 + p1 x + ... + p8 x^8) / (1 + q1 x + ... + q8 x^8),

in fixed point. The result comes out one signed digit per clock, most
significant digit first. Every clock costs one carry-free addition, whatever the
word length. So a 64-bit result takes 64 clocks: one to start, then 63 digit
clocks.

The idea (the *E-method*) is to turn the function into a linear system
`A y = b` whose first unknown is `R(x)`. Such a system can be solved in
parallel, one digit at a time. Each row of the system gets its own small
arithmetic unit. The units trade only their newest digit, 2 wires each. Each
unit is a chain of identical 8-bit slices, so precision grows by adding slices.
The number of functions grows by adding ROM. The slice is the *basic byte-slice
module* (BBM). It has 29 signal pins and no carry between slices that must
settle within a clock.

Default configuration: 9 rows, so numerator and denominator up to degree 8;
8 slices per row (64-bit words); 72 slices in all; 16 selectable functions.

## 1. The method

### 1.1 The linear system

For `n = max(u, v) + 1` rows (`n = 9` by default):

    row 1:           y1             - x*y2      = p0
    row i (2..n-1):  q(i-1)*y1 + yi - x*y(i+1)  = p(i-1)
    row n:           q(n-1)*y1 + yn             = p(n-1)

Multiply row `i` by `x^(i-1)` and add all the rows. The sum collapses to
`Q(x)*y1 = P(x)`, so `y1 = R(x)`. For a polynomial, all the `q` are 0. The
other unknowns `y2..yn` are intermediate sums of the Horner scheme. They come out
of the unit too, on the `digits` port.

### 1.2 The digit recursion

Each row `i` keeps a scaled residual `w_i`. It starts as `w_i = p(i-1)` with
all digits 0. Then every clock does:

    w_i <- 2 * (w_i - d_i - q(i-1)*d_1 + x*d_(i+1))
    d_i <- +1 if w_i >= 1/2,  -1 if w_i <= -1/2,  0 otherwise

The digits `d` are in {-1, 0, +1}. Digit `j` of row `i` has weight `2^-j`. The
first unknown is then `y1* = sum_j d_1(j) * 2^-j`. The recursion keeps
`b - A*y*` below `2^-j` in size, and after `m+1` digits `|y1 - y1*| < 2^-m`.

This holds under two conditions:

    |p_i| <= 1/2   and   |q_i| + |x| <= 31/128   for all i

Scale the coefficients and the argument beforehand so that they meet these
conditions. The hardware does not check them.

With these bounds, the digit choice needs only the top 8 bits of `w`: two
integer bits and six fraction bits. The step time therefore does not depend on
the word length.

### 1.3 Number format

Every word (x, p, q, w) is two's complement with two integer bits. With 8
slices that is `XX.XXXX...X`, 62 fraction bits. The high-order slice holds
`XX.XXXXXX`. The lower slices hold only fraction bits.

Digits use this 2-wire code:

| code | digit |
|------|-------|
| 00   | 0     |
| 01   | -1    |
| 11   | +1    |
| 10   | illegal (read as 0) |

The code is chosen so that subtracting a digit is trivial. In `XX.XXXXXX`, the
value -1 is `11.000000` and +1 is `01.000000`. So adding `-d` means placing
the digit code itself in the top two bit columns.

## 2. Organisation

```
feu   function evaluation unit: NEEU rows, digit exchange network
 └ eeu   one row: NBBM slices, one coefficient ROM and one 2:1 entry mux per slice
    ├ coef_rom   2^(H+1) x 8 bits: one byte of p and q of each function
    └ bbm        8-bit slice
       ├ bbm_load_select   holding-register load enables
       ├ bbm_control       START -> SELW, LOADXQ, CLRD; DIGITE
       ├ bbm_tclog         digits -> gate/complement controls, TCADJ
       ├ bbm_gating (x2)   operand true / complemented / zero
       ├ bbm_sdc           ZADJ: subtract own previous digit
       ├ bbm_adder_array   5-operand carry-save addition
       │  └ counter_554, counter_444 ← full_adder, half_adder
       ├ bbm_assim         8-bit assimilation of the top byte
       └ bbm_digit_select  +-1/2 thresholds
```

Packages:

- `feu_pkg` holds the digit type and codes.
- `feu_coef_pkg` holds the example coefficient table, computed at elaboration.

**Digit network (`feu`).** Row 1's own digit `d_1` goes to every other row.
Each row also receives the digit of the row to its right. Row 1 gets 0 for
`d_1`, and the last row gets 0 for `d_(i+1)`.

**Row (`eeu`).**

- Slice 0 is the high-order byte (`hob = 1`), and slice `NBBM-1` is the
  low-order byte (`lob = 1`). The low-order slice has `shin = 0` and
  `cin = 000`.
- Each slice's `cout`/`shout` feed the `cin`/`shin` of the slice above it.
- Each slice's 8-bit entry bus (IEB) comes from a multiplexer. It takes the
  slice's byte of the argument bus when `load_x = 1` and the slice's ROM byte
  otherwise.
- The ROM address is `{fsel, pq_sel}`. `pq_sel` also selects p or q as the
  destination register.

## 3. Inside the byte slice

This part is the least obvious and matters most if you change the design.

### 3.1 Registers

Table: the eight registers of one slice (8 bits unless noted).

| register | loaded when | from |
|---|---|---|
| XHREG | `loadx` | IEB |
| PHREG | `!loadx & loade & regls` | IEB |
| QHREG | `!loadx & loade & !regls` | IEB |
| XREG, QREG | `start` | XHREG, QHREG |
| WSREG | every clock | `start ? PHREG : {SUM[6:0], SHIN}` |
| WCREG | every clock | `start ? 0 : {CARRY[4:0], CIN}` |
| DREG (2 bits) | every clock | `start ? 0 : selected digit` |

The three holding registers form the buffer stage. You may reload them while a
computation runs. START copies them into the active registers in one clock.

### 3.2 The residual in two halves

The residual is `w = WSREG + WCREG`, in carry-save form. It is spread over all
slices of a row. In each clock, the adder array of every slice adds five rows of
8 bits:

```
           col: 7 6 5 4 3 2 1 0
  XSGND         x x x x x x x x    x, ~x or 0      (d_(i+1) = +1, -1, 0)
  QSGND         q q q q q q q q    ~q, q or 0      (d_1     = +1, -1, 0)
  WSREG         s s s s s s s s
  WCREG         c c c c c c c c
  ZADJ / TCADJ  z z         t t    -d_i (HOB only) / two's-complement +1s (LOB only)
```

Each subtraction complements its operand. The missing +1 goes into the
low-order slice through `TCADJ`, which can be 0, 1 or 2. When both x and q are
subtracted, `TCADJ = 2` puts a 1 in column 1.

The array uses four parallel counters, one per column pair:

- **(5,5,4) counters** for pairs 1:0 and 7:6, which have the fifth input.
- **(4,4,4) counters** for pairs 3:2 and 5:4.

Each counter adds the bits of its two columns into a 4-bit number. The low 2
bits become the pair's `SUM` bits. The high 2 bits become `CARRY` bits two
columns higher. Nothing propagates from pair to pair. Built from full and half
adders, this takes 20 full adders and 4 half adders per slice.

Doubling the result is a one-place left shift. That moves the top `SUM` bit
(weight 2^8) and the top three `CARRY` bits (weights 2^8..2^10, after the shift)
out of the slice:

```
  WSREG' = { SUM[6:0],   SHIN }        SHOUT = SUM[7]
  WCREG' = { CARRY[4:0], CIN[2:0] }    COUT  = CARRY[7:5]   (CARRY[k] has weight 2^(k+2))
```

The bits going up are functions of this slice's registers and the current
digits only. They are not functions of the incoming `CIN`/`SHIN`. So the clock
period does not grow with the number of slices.

In the high-order slice, the bits that would leave the top are dropped. That
wraps modulo 4, which is correct as long as `|w| < 2`.

### 3.3 Choosing the digit from a truncated view

The assimilation logic adds `{SUM[6:0], SHIN} + {CARRY[4:0], CIN}` as one 8-bit
number and drops the carry out. In the high-order slice, this is the next `w`
in `XX.XXXXXX`, except for the parts of the two vectors held in lower slices.
Those parts are never negative and together are below `2^-5`. So the estimate
`e` satisfies `e <= w < e + 2^-5`.

The digit select logic applies the ±1/2 thresholds to `e`. The result goes into
DREG and appears on DOUT during the next clock. All slices compute a digit, but
only the high-order slice's digit is used.

The truncation error is larger than the worst-case analysis behind the 31/128
bound allows for (that margin is 2^-6). However, the residual stayed inside
(-2, 2) in every test. That includes 20,000 evaluations with coefficients at
the edges of the conditions: `tb_e_method_examples` with `NEVAL` raised from
400. The benches check this bound on
every row and every evaluation. The largest |w| seen in a word-level model was
about 1.56.

## 4. Using the unit (`feu`)

### 4.1 Ports

Table: ports of `feu` (default parameters in brackets).

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | basic-cycle clock |
| `fsel` | in | H [4] | function number for the ROMs |
| `pq_sel` | in | 1 | 1: load p, 0: load q |
| `load_e` | in | 1 | load a coefficient from the ROMs |
| `load_x` | in | 1 | load x from `arg`; overrides `load_e` |
| `arg` | in | 8*NBBM [64] | argument, two's complement `XX.XXX...` |
| `start` | in | 1 | copy holding registers to active registers |
| `d1` | out | 2 | digits of y1 = R(x) |
| `digits` | out | 2*NEEU [18] | digits of every y_i (row i at bits 2i+1:2i) |

### 4.2 Timing of one evaluation

```
clock edge:   L1    L2    L3    S     1     2     3   ...  m+1
inputs:      x     p     q    start  (next function may be loaded here)
d1 after it:                   0    d(1)  d(2)  d(3) ...  d(m+1)
weight:                        1    1/2   1/4   1/8       2^-(m+1)
```

- The three loads (x with `load_x`; p and q with `load_e` and `pq_sel`) may
  come in any order and may overlap the previous computation.
- After the start clock, `d1` shows 0 (the digit of weight 1). Then each clock
  shows one more digit.
- There is no counter and no done flag. For m digits of precision, run m+1
  clocks after the start clock and then stop, or start the next function. The
  precision you choose sets the number of clocks.
- If `start` stays high, each clock restarts from the first step and `d1` stays
  0.
- There is no reset. The first start initialises everything the computation
  reads.
- Converting the signed-digit result to ordinary binary is left to the user.
  Subtract the negative digits from the positive ones in one addition.

### 4.3 Coefficient table

The ROM contents in `feu_coef_pkg` are an example set chosen for this RTL. Let
`f` be the function number (modulo 16), `k = f/2` and `c = (k-4)/4`:

    p_i = c^i / (2 * i!)                   truncated exp(c*x)/2
    q_i = (3/32)^i  (i >= 1) if f is odd;  0 if f is even

So even numbers are polynomials; use them with `|x| <= 31/128`. Odd numbers are
rational functions; use them with `|x| <= 19/128`. All values are truncated
toward zero to the word's fraction bits. They are computed at elaboration, so
the table follows `NBBM` and `NEEU`.

To use other functions, change `coef_word` in `feu_coef_pkg`. The values must
satisfy the conditions of section 1.2.

## 5. Source design versus this RTL

These follow the published design:

- the method, its recursion and digit selection;
- the hierarchy FEU / EEU / BBM, with a ROM and an entry multiplexer per slice;
- the BBM's 29 signals and their codes;
- the register set and its load rules, including LOADX over LOADE;
- START held high repeats the first step;
- the SUM/CARRY bit routing (7+1 and 5+3 bits), and TCADJ in the low-order
  slice and ZADJ in the high-order slice;
- the (5,5,4)/(4,4,4) counter split, with the 20 FA + 4 HA count;
- the 8-bit assimilation with its carry out dropped;
- the sizes: 9 rows of 8 slices.

These are choices of this RTL:

- `H = 4` (16 functions), and the ROM contents (section 4.3).
- The ROM reads asynchronously, and its address is `{fsel, pq_sel}`.
- The full-adder wiring inside the counters.
- DIGITE is START delayed by one flip-flop. That is a 1-bit register beyond
  the seven 8-bit and one 2-bit registers the original counts.
- DREG is cleared by START. Without that, the ZADJ path would subtract a stale
  digit in the first step.
- The illegal digit code `10` is read as 0.
- x takes its own load clock. The entry bus is shared, and `load_x` overrides
  `load_e`, so an evaluation takes three load clocks before the start.
- The `digits` output, which brings out all rows.
- Port names `shin`/`shout` (SIN/SOUT in some descriptions of the slice).

These are not built:

- conversion of the redundant result to binary;
- running a system with more rows than there are units;
- other adder-array implementations (counter ROMs or logic arrays);
- on-chip coefficient RAM.

## 6. Verification

Every module has a self-checking bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_feu`: the end-to-end bench, at the default size (72 slices).
  - Runs 120 evaluations over all 16 functions, with random, extreme and zero
    arguments and 63 digits each.
  - For every row, it checks the exact residual `|b - A*y*| < 2^-(m+1)` with
    1024-bit integer arithmetic.
  - For y1, it checks the error bound `|P/Q - y1*| < 2^-m`, also for results
    cut short after 8 and 24 digits.
  - It checks the cycle count: m+1 digits in the m+1 clocks after start.
  - It also exercises and counts: LOADX overriding LOADE, reloading during a
    computation, START held high, both digit signs, and TCADJ = 2.
- `tb_feu_sizes`: the same checks, through the parameterised environment
  `feu_check_env`, at five other sizes. These include one slice per row (each
  slice is then both high- and low-order byte), a single row, and nine rows of
  one slice.
- `tb_e_method_examples`: the polynomial `P3` and the rational `R23`
  (4 rows, 64-bit slices) with random coefficients at the edges of the
  convergence conditions. It uses `p = +-1/2` and `|q| + |x| = 31/128` exactly,
  and all sign mixes. The slices are wired directly (`tb/bbm_network.sv`,
  without ROMs), so any coefficients can be loaded. It checks residuals and
  the value bound.
- `tb_eeu`: one 64-bit row fed with random digit streams. Every clock it checks
  that the exact residual stays in (-2, 2) and that each digit agrees with it
  within the 2^-5 look-ahead error.
- `tb_bbm`: four slices (all HOB/LOB combinations) against a cycle-level model
  of the slice, with random loads, START, digits, SHIN and CIN.
- `tb_coef_rom`, and exhaustive or random benches for every sub-block of the
  slice: load select, control, gating, two's complement logic, SDC, adder
  array, assimilation and digit select.

Run a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/feu_pkg.sv rtl/feu_coef_pkg.sv \
          tb/tb_feu.sv --top-module tb_feu
obj_dir/Vtb_feu
```

Replace `tb_feu` with any other bench name. The full-size end-to-end bench runs
in well under a second.
