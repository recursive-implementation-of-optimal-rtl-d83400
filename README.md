# Logarithmic-time integer multipliers built from carry-save trees

Multiplying two N-bit integers means adding up N² one-bit partial products.
An array multiplier adds them row by row, so its delay grows linearly with N.
The multipliers here add them in a tree of carry-save adders instead. All
intermediate results stay in carry-save form, so no addition ever waits for a
carry to ripple. The depth of the tree grows with log N, and only one
carry-propagating addition is made, at the very end.

Two multipliers are provided:

* **2M** (`mult2m`) is the main design: the regular one, meant for layout and
  fabricated as 8-, 16- and 32-bit chips. It splits X in halves, then splits
  each half again, until every piece is one bit. Each level adds the two
  half-products with one carry-save adder. Seen column by column, that
  becomes a **linear array of bit-convolvers (LABC)**. Each bit-convolver is
  a binary tree that sums one product column and passes carry bits to the
  next column.
* **3M** (`mult3m`) uses the three-multiplication recursion, better known as
  Karatsuba. The combining additions are done in carry-save form. It needs
  less area asymptotically, but it is less regular.

The default configuration is a 32 x 32 2M multiplier. It is combinational
like the prototype chips, with an optional period-1 pipeline. Beside it sits a
32 x 32 3M multiplier.

## The bit-convolver: one product column

Column k of an X (N bits) by Y (M bits) product contains the N partial
products `a_i = X_i & Y_(k-i)`, i = 0..N-1. A product is 0 when `k-i` is not
a bit position of Y. The column also receives two carry vectors C1 and C2 from
column k-1, each S = N/2 - 1 bits long. Every carry bit has weight 2^k here,
the same as the column's own products. The column produces two sum bits
s1, s2 of weight 2^k and two carry vectors D1, D2 of S bits for column k+1:

    sum(a) + |C1| + |C2| = s1 + s2 + 2*(|D1| + |D2|)          (|V| = number of ones)

The column is a binary tree with two kinds of cell:

* **mu2** (leaf) is two AND gates. At position (i, j) it outputs
  `X_i & Y_j` and `X_(i+1) & Y_(j-1)`. Both have weight 2^(i+j), so the leaf
  output is already a carry-save pair. A column of N products has N/2
  leaves.
* **csa4** (inner node) takes the two sum pairs of its subtrees (four bits)
  and one bit of each carry vector. It returns one sum pair for its parent
  and one bit of each outgoing carry vector:

      s10 + s20 + s11 + s21 + c1 + c2 = s1 + s2 + 2*(d1 + d2)

  It is made of two full adders (`csa`):

      csa(s10, s20, s11) -> (d1, t)
      csa(t,   s21, c1 ) -> (d2, s1)
      s2 = c2

  So d1 depends only on the subtree sums, and d2 depends on c1, which comes
  from the neighbouring column's d1. A carry therefore crosses at most one
  column within a tree level and never ripples. Every level costs two
  full-adder delays, however wide the product.

There are N/2 - 1 csa4 nodes, one per carry bit, which is why the carry
vectors have S bits. The carry bits are numbered in the same order as a
recursive split: `D = {D_low, d_mid, D_high}`. The low subtree owns indices
0..S/2-1, the root owns index (S-1)/2, and the high subtree owns the rest.
This is the tree's in-order numbering. Column k+1 uses the same numbering, so
the carry produced by the node at some tree position enters the node at the
same position one column up. Both nodes are at the same level of their trees.

The full adder is written in selector form: when a+b is odd, carry = c and
sum = not c; otherwise carry = a and sum = c.

For N = 32 a column has 16 leaves, 15 csa4 nodes in 4 levels, and 15-bit carry
vectors. The column delay is one AND gate plus 2·log2(N/2) full adders: 4, 6,
8, 10 and 12 full-adder delays for N = 8, 16, 32, 64 and 128.

## The array and its boundaries (`labc`)

`labc` places M+N bit-convolvers side by side, one per product bit, and chains
the carry vectors from column k to column k+1. Bit k of the two result
vectors `sum1`, `sum2` is the sum pair of column k, and
`sum1 + sum2 = X*Y` exactly.

The carries into column 0 (`cin1`, `cin2`) and out of the last column
(`cout1`, `cout2`) are ports:

* in the multiplier, `cin` is tied to 0 and `cout` is always 0, because the
  product fits in M+N bits;
* driven freely, they give the fully observable logic-test configuration, or
  let arrays be chained into a larger modular multiplier. In general,
  `X*Y + |cin1| + |cin2| = sum1 + sum2 + 2^(M+N)·(|cout1| + |cout2|)`.

N (the width of X, and the number of inputs of every column) must be a power
of two, at least 4. M is free.

## Final conversion (`final_adder`)

The carry-save pair becomes a binary number through a Brent–Kung
parallel-prefix carry-lookahead adder of width M+N, about 2·log2(M+N) prefix
levels deep. The design only needs some log-time lookahead adder here; the
Brent–Kung network is a choice of this implementation.

## Pipelining (`PIPELINE = 1`)

With `PIPELINE = 1`, each csa4 registers its two sum outputs. Carries are not
registered. A carry made at tree level L is ready in the same cycle as the
sums of level L-1 that feed level L, which is exactly when the neighbouring
column's level-L node needs it. The multiplier then accepts one operation
per clock, and its result appears log2(N/2) cycles later (4 cycles at N = 32).
`out_valid` follows a valid shift register, which `rst_n` (asynchronous,
active low) clears. The data registers have no reset.

When a pipelined `labc` or `bit_convolver` is driven directly, a boundary
carry for tree level L must arrive L-1 cycles after the operands it belongs
to. The multiplier ties these carries to 0, so it never meets this rule.

## The 3M multiplier (`mul3m`, `mult3m`)

`mul3m` splits both N-bit operands at H = floor(N/2) and forms three
sub-products with recursive instances of itself:

    V = X1·Y1      W = X0·Y0      U = (X1+X0)·(Y1+Y0)
    P = V·2^(2H) + (U − V − W)·2^H + W

* X1+X0 and Y1+Y0 come from carry-lookahead adders (`final_adder`). They are
  one bit wider than the halves, so odd sizes occur. The recursion stops at
  N ≤ 3, where the small product is formed directly.
* Each sub-product returns as a carry-save pair. The combining adder
  (`cs_compress`) reduces eleven vectors to one pair with rows of full adders:
  * the V, U and W pairs at their shifts;
  * the bitwise inverses of the V and W pairs at shift H;
  * the constant 4, which completes the four two's-complement negations.
* A carry-save pair holds its value only modulo 2^width. After the
  subtractions it may carry a hidden multiple of 2^width. Each sub-multiplier
  therefore works at the width of the part of its parent's result that it can
  reach: PW-H bits for V and U, PW bits for W. The top level uses PW = 2N.
  `mult3m`'s final adder works modulo 2^(2N), which removes the hidden term.

With `PIPELINE = 1` (top-level `PIPELINE3`), each recursion level registers
its input sums, together with the operand halves, and its combining-adder
output. V and W are delayed to line up with U, the widest and therefore
slowest sub-product. The multiplier accepts one operation per clock. Its
latency is `mult_pkg::mul3m_latency(N)`, two cycles per recursion level
along the U chain: 8 cycles at N = 16 and 10 at N = 32. `out_valid` and
`rst_n` work as in 2M. The register placement is this implementation's
choice.

Differences from the ideal 3M scheme:

* The input adders propagate carries, so the delay is O(log² N) gate levels,
  not O(log N).
* The wide sub-product vectors make the area larger than O(N²).

## Module hierarchy

```
multipliers_top            both multipliers, side by side (m2_*, m3_* ports)
├── mult2m                 2M multiplier: labc + final_adder + valid pipeline
│   ├── labc               M+N columns, carry vectors chained
│   │   └── bit_convolver  one column, recursive tree (N/2 mu2, N/2-1 csa4)
│   │       ├── mu2        leaf: two AND gates
│   │       └── csa4       node: two csa cells
│   │           └── csa    full adder, selector form
│   └── final_adder        Brent–Kung carry-lookahead adder
└── mult3m                 3M multiplier: mul3m + final_adder
    └── mul3m              recursive three-multiplication core
        ├── final_adder    X1+X0, Y1+Y0
        ├── cs_compress    carry-save combining adder (recursive 3:2 layers)
        └── delay_line     pipeline registers and latency balancing
mult_pkg                   latency functions shared by the multipliers
```

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `multipliers_top`, `mult2m`, `labc` | `N` | 32 | width of X (column tree inputs); power of two ≥ 4 |
| | `M` | 32 | width of Y |
| | `PIPELINE` | 0 | 1 = register every tree level |
| `multipliers_top`, `mult3m` | `N3` (`N` in `mult3m`) | 32 | operand width of the 3M multiplier |
| | `PIPELINE3` (`PIPELINE` in `mult3m`) | 0 | 1 = pipelined 3M |
| `bit_convolver` | `N`, `PIPELINE` | 32, 0 | column inputs, pipelining |
| `final_adder` | `W` | 64 | adder width (≥ 2) |
| `mul3m` | `N`, `PW`, `PIPELINE` | 32, 2N, 0 | operand width, result width, pipelining |

The 32 x 32 default synthesizes (as a word-level netlist before technology
mapping) to about 5,500 cells for the 2M multiplier and 5,800 for the 3M.

## Simulating

Every file holds one module, or the package, named like the file. List
`rtl/mult_pkg.sv` first on the command line; the other files are found through
`-y`. Testbenches in `tb/` are
self-checking and print `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module multipliers_top_tb rtl/mult_pkg.sv tb/multipliers_top_tb.sv
./obj_dir/Vmultipliers_top_tb
```

| testbench | what it checks |
|---|---|
| `csa_tb`, `mu2_tb`, `csa4_tb` | cells, exhaustively; csa4 invariant and the no-ripple property |
| `bit_convolver_tb` | column invariant at N = 4 (exhaustive), 8, 32; pipelined latency |
| `labc_tb` | 8x8 exhaustive, 32x32 and 5x16 with random boundary carries, pipelined stream |
| `final_adder_tb` | 64-bit and 13-bit adders, corners and random |
| `mult2m_tb` | 32x32 products; pipelined 16x16 and 8x4 streams with bubbles and reset |
| `mul3m_tb`, `mult3m_tb` | 3M at N = 3, 4, 8 (exhaustive), 5, 13, 16, 32; pipelined streams at N = 8, 16, 32 with latency and valid checks |
| `multipliers_top_tb` | both multipliers end to end, combinational and pipelined; counts column carries, back-to-back results of both, bubbles, reset, 3M pair wrap-around |
| `multipliers_full_tb` | the top at its default parameters, 5,000 products each |
| `prototypes_tb` | the test-chip configurations: 8x8 exhaustive, 16x16, 8-by-16, 64x64, 2x4 logic-test array with all carry-ins, 3x32 strip with inputs at 0 |

All references are computed with the simulator's own integer multiply and
add. Nothing is compared against the RTL itself.

## What is and is not modelled

* The cells are represented by their logic functions. The original circuits
  are precharged dynamic NMOS gates, with completion detection from
  complementary outputs. Neither is modelled, and neither are wire delays or
  the choice between L-tree and V-tree layouts.
* The wiring of the two full adders inside csa4, the carry numbering, the
  leaf boundary zeros, the final adder's prefix network, the pipeline
  registers, the valid flag and the reset are choices of this
  implementation. Each satisfies the stated invariants, and the testbenches
  check it.
* The array has one column for every product bit, M+N in all; the last
  column receives only carries. The layout generator this design follows
  counts M columns. A full product needs M+N-1 columns, and here the
  complete product is built.
* The 3M multiplier follows the recurrence and keeps its intermediate
  results in carry-save form. Its input adders, split point, base case and
  width rule are this implementation's own, with the cost in delay and area
  described above.
* Verilator, when it lints `bit_convolver`, `cs_compress` or `mul3m` alone as
  a top-level module, reports the outputs of their recursive
  self-instances as undriven. When instantiated, they elaborate and simulate
  correctly.
