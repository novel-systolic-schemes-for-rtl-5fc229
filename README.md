# Systolic serial-parallel multipliers at full input rate

A serial-parallel multiplier takes one factor, X, one bit per clock (LSB
first) and holds the other, A, in parallel. It costs one small cell per bit
pair of A and needs no wide adders, so it suits long operands. The classic
version has two drawbacks. X is broadcast to every cell, so it is not
systolic. And after each X it must be fed a whole word of zeros to push the
high half of the product out, so the serial input is busy only half the
time.

This RTL holds two multipliers that remove both drawbacks:

* **`mba_mult`**: A is signed and arrives already recoded into radix-4
  Modified Booth digits w_j in {-2..2}. Each cell adds w_j·X.
* **`x3_mult`**: A is unsigned plain binary. Each cell takes one bit pair of
  A and adds 0, X, 2X or 3X, so A needs no recoding. 3X is built on the fly
  by a serial adder as X comes in.

In both, X travels through the array and is never broadcast. Words of X
follow each other with only one or two zero bits between them, not a whole
zero word, so a new multiplication starts every word time. The high half of
each product is *downloaded* out of the cells while the next word is
already being multiplied. `spmult_top` puts the two units side by side. They
share only the clock.

## Arithmetic

With K = N/2 cells, cell j owns weight 4^j of A:

    A·X = Σ_j  d_j · X · 4^j,
      d_j = a[2j-1] + a[2j] - 2a[2j+1]      (Booth unit, a[-1] = 0)
      d_j = a[2j]   + 2a[2j+1]              (3X unit)

2X is X one clock late. For the Booth unit a negative term is formed as the
complement of X or 2X plus one. The plus one comes from seeding the cell's
carry with 1 at the start of each word.

The word length L is the number of clocks one X occupies on the input:

| unit | word on `x` | L | why the zero bits |
|---|---|---|---|
| Booth | M bits of X, 1 zero bit | M+1 | the last bit of 2X needs one more clock |
| 3X | M bits of X, 2 zero bits | M+2 | 3X is two bits longer than X |

`r` is raised with the last zero bit of each word. The product has L+N bits.
The Booth product is two's complement; the 3X product is unsigned.

## The array

```
          x, r  ──►  cell 0 ──► cell 1 ──► ... ──► cell K-1        (X, 3X, R: one register per cell)
   p_l  ◄── sum ◄──  cell 0 ◄── cell 1 ◄── ... ◄── cell K-1        (partial sums: one register per cell)
   p_h  ◄── msp_adder ◄── download chain, one stage per cell, shifting towards cell 0
```

The array comes from retiming the broadcast form. In the broadcast form X
reaches every cell in the same clock, and two registers sit on the sum path
between cells, because neighbouring cells differ in weight by 4. Taking one
register off every sum link and putting one on every X link keeps the
arithmetic the same. Cell j then sees bit i of X in clock i+j, and its
result still reaches cell 0 at the right weight. The X register of cell j
also holds X one clock late, which is cell j's 2X bit and cell j+1's X bit,
so one X line serves both. The 3X unit sends 3X alongside X in the same
way. It is generated once, by `x3_gen`, at the input.

Cell 0's sum output is the low L bits of the product (the LSP), one bit per
clock.

## Word boundaries and the download (the subtle part)

The sum path and X run in opposite directions, and each cell starts a word
one clock later than the cell before it. So at a word boundary cell j-1 is
already on the next word when the last two sum bits of the finished word
arrive from cell j. In the same clock, cell j-1's own carry still holds its
last carry of the finished word. Those two sum bits and that carry, taken
over all cells, are exactly the high part of the product (the MSP) in
carry-save form. Cell j's pair carries weight 2^(L+2j):

    MSP = Σ_j 4^j · (s_a,j + 2·s_b,j + c_j)     [- Σ_j 4^j·neg_j for the Booth unit]

Each cell therefore does the following, with R as its clock reference (R
reaches cell j in clock L-1+j, with the last bit of the word):

| clock at cell j | adder input from cell j+1 | carry into the adder | download chain stage j loads |
|---|---|---|---|
| R (last bit of word) | sum from j+1 | own carry | shifts |
| R+1 (1st bit of next word) | forced 0 | 1 if w_j<0, else 0 | s_a (sum from j+1), own carry c_j, ~neg_j |
| R+2 (2nd bit of next word) | forced 0 | own carry | s_b (sum from j+1), 0, 1 |
| other clocks | sum from j+1 | own carry | shifts from stage j+1 |

The input switch is driven by the OR of R delayed by one clock and by two
clocks.

The download chain moves one cell per clock towards cell 0. Loading moves
one cell per clock the other way, so the bits of the MSP leave cell 0 in
order. Bit k of the MSP leaves 2k clocks after the load started. The chain
has two streams (sum and carry) in the 3X unit and three in the Booth unit.
`msp_adder`, a bit-serial adder at cell 0, turns the streams into binary
MSP bits on `p_h`.

An MSP takes N clocks to leave. The next download begins one word later, so
**L >= N is required**: M >= N-1 for the Booth unit and M >= N-2 for the 3X
unit. An assertion at simulation start checks this. The serial operand must be
at least about as long as the parallel one. For a shorter X, pad it with
zeros.

### Sign correction in the Booth unit

A negative partial product is a two's complement number whose sign bits
continue above bit L-1. The cells never see those bits, because the next
word has already started. Their sum is -Σ_j neg_j·4^j·2^L, a constant that
depends only on A.

The Booth cell supplies this constant through a third chain stream: ~neg_j
in the even position of pair j and 1 in the odd position, which together
form ~N for N = Σ neg_j·4^j. `msp_adder` starts each MSP with carry 1. This
adds -N, and the product comes out exact modulo 2^(L+N). Because the adder
has three inputs, its carry can reach 2 and is two bits wide. This
correction is this design's own choice. The 3X unit has no negative terms
and does not need it.

## Interface and timing

Both units have the same interface: `clk`, a synchronous active-high `rst`,
the parallel factor, `x`, `r`, `p_l`, `p_h` and `ph_first`. The parallel
factor is `digits` (an array of `spmult_pkg::booth_digit_t`) on the Booth
unit and `a[N-1:0]` on the 3X unit. Count as clock 0 the clock in which bit 0
of a word is on `x`:

* `p_l` carries product bit i (i = 0..L-1) in clock i+1.
* `p_h` carries product bit L+k (k = 0..N-1) in clock L+2+k.
* `ph_first` is high in clock L+2.

Words may follow each other with no idle clock, one product per L clocks.
Idle clocks (x = 0, r = 0) may also be inserted between words. The
parallel factor must stay constant from reset on. To change it, apply the
new value and assert `rst` for a clock.

A Booth digit is three wires, `{neg, two, nz}`: complement, use 2X, digit is
non-zero. The cell's generator (`mb_cell`) is a 2:1 mux (X or 2X), an AND
(zero digit) and an XOR (negative digit). The usual recoding of a two's
complement A is neg = a[2j+1], nz = (d_j != 0), two = (|d_j| = 2). This
gives the digit "-0" (neg = 1, nz = 0) for a bit triple 111, and the cells
handle it correctly. No recoder is included; the testbenches contain one.

Two assertions check the R protocol: R must come with a zero bit (Booth
unit), or with the second of two zero bits (3X unit).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` (`MBA_N`, `X3_N` on the top) | 32 | bits of A; even |
| `M` (`MBA_M`, `X3_M` on the top) | 32 | bits of X |

Neither default is fixed by a specification; both are chosen here. The
only constraint is L >= N. The hardware grows with N only: K cells of 8
flip-flops each plus a 3-4 flip-flop adder (and a 2 flip-flop 3X
generator). M changes only the word length. After synthesis at the
defaults, the Booth unit has 115 flip-flops and the 3X unit 114.

## Files

| file | content |
|---|---|
| `rtl/spmult_pkg.sv` | `booth_digit_t` |
| `rtl/spmult_top.sv` | both units side by side |
| `rtl/mba_mult.sv`, `rtl/mba_cell.sv`, `rtl/mb_cell.sv` | Booth unit, its cell, the partial product generator |
| `rtl/x3_mult.sv`, `rtl/x3_cell.sv`, `rtl/x3_gen.sv` | 3X unit, its cell, the 3X serial adder |
| `rtl/msp_adder.sv` | serial adder for the downloaded MSP, shared by both units |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/mba_mult_run.sv`, `tb/x3_mult_run.sv` | stimulus and checker used by the unit and top testbenches |

## Verification

Every testbench compares results with values it computes itself as
integers, and ends with a `TB_RESULT checks=... failures=...` line.

* `tb_spmult_top` runs both units at their default size (N = M = 32) at the
  same time. It uses 8 values of A per unit (corner values and random) and
  16 words each, mostly back to back with some idle gaps. It checks every
  product bit and the clock of `ph_first`. It also counts that back-to-back
  words, idle gaps, downloads, negative digits, the digit -0, and all four
  3X selections each occurred.
* `tb_mba_mult` and `tb_x3_mult` run the default size and the tightest legal
  size (L = N). At that size each MSP leaves just as the next one is
  downloaded. They also run a long serial operand (N = 64, M = 192).
* The cell testbenches check the arithmetic of one cell word by word: the
  sum bits emitted plus 2^L·(final carry − neg) equals d·X plus the sum
  bits the cell had to add. They also check the download loads and the
  chain shifting. `tb_mb_cell`, `tb_x3_gen` and `tb_msp_adder` check their
  blocks against the arithmetic they implement.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/spmult_pkg.sv \
          tb/tb_spmult_top.sv --top-module tb_spmult_top
obj_dir/Vtb_spmult_top
```

## What follows the source design and what does not

Taken from the source design:

* both multipliers and their arithmetic
* the retimed, systolic arrays: one X line serving X and 2X, and R
  travelling with the data
* the word formats: one zero bit with R for the Booth unit, two zero bits
  with R on the second for the 3X unit
* seeding the carry with 1 for negative Booth digits
* the download of two sum bits and one carry per cell, through a single
  switch driven by two successive clocks of R via an OR gate
* a serial adder that converts the MSP to binary

Choices made here:

* **Download chain.** It is a chain of one stage per stream per cell that
  moves one cell per clock. This is what makes the progressive download
  come out in order.
* **Sign correction.** The Booth unit has a third correction stream and a
  two-bit carry in `msp_adder`.
* **3X distribution.** 3X is generated once at the input and passed along
  the array.
* **Carry restart.** The carry restarts through a mux in the first clock of
  a word. This lets the old carry be downloaded in that clock.
* **Interface details.** The digit encoding, the synchronous reset, the
  `ph_first` marker, and the L >= N rule.

The Booth unit uses 8 flip-flops per cell. The source's per-bit cost
comparison counts 9 delay elements per cell.

Not included:

* the Booth recoder, which the source also leaves out
* the non-systolic broadcast forms, which serve only as the starting point
  of the retiming
* a way to load a new A for each word in the middle of a stream
