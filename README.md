# Montgomery modular multiplier on a dual-logic-level array multiplier

Public-key cryptography spends most of its time in modular multiplication,
`A * B mod N`. Montgomery's method avoids dividing by `N`: it computes
`A * B * R^-1 mod N` with `R = 2^K`, choosing a quotient from the least
significant digit of the running value so that the "division" becomes an exact
shift. This design implements that operation for a 32-bit odd modulus, with
every product formed by a combinational **dual-logic-level (DLL) multiplier**:
an array multiplier built from a single kind of two-output cell that presents
the XOR and the AND of its inputs at the same time.

```
             +-------------------- dll_montgomery (K = 32) -------------------+
 a, b  ----> | operand regs --+                                              |
 n, n' ----> |                v                                              |
 start ----> |  FSM ---> operand mux ---> dll_mult (K x K, combinational) --+ |
             |   |                                                          | |
             |   +--> T = A*B --> Q = T*N' mod R --> U = (T + Q*N) / R ---- + |
             |                                          |                     |
             |                               U >= N ? U - N : U  ---> result  |
 busy, done <-                                                                |
             +----------------------------------------------------------------+
```

## Files

| File | What it is |
|---|---|
| `rtl/dll_ha.sv` | XOR/AND cell: sum `x^y` and carry `x&y` |
| `rtl/dll_fa.sv` | three-input cell: two XOR/AND cells with their carries ORed |
| `rtl/dll_mult.sv` | `W x W` unsigned DLL multiplier, `2W`-bit product, default `W = 32` |
| `rtl/dll_mm_pkg.sv` | package: default width `MM_K = 32`, controller state type |
| `rtl/dll_montgomery.sv` | top: Montgomery multiplier, default `K = 32` |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The DLL cells

The multiplier uses only two building blocks.

* **`dll_ha`, the XOR/AND cell.** Two bits in, two results out: the XOR is the
  sum bit, which stays in the current column, and the AND is the carry, which
  moves one column to the left. This is a half adder. The cell is described as
  a "multiplexer" that performs both operations. In this RTL that means both
  results are always present; nothing is selected.
* **`dll_fa`, the third-layer cell.** A second XOR/AND cell takes the first
  cell's XOR and a third bit. The two AND outputs can never both be 1, so one
  OR gate merges them into the carry. This is a full adder made of two half
  adders. The carry path is short (AND, then OR). The sum path goes through
  both XORs.

## The multiplier array (`dll_mult`)

The multiplier is described in three layers and `2W-1` *parts*. A part is a
column of bits of equal weight: 3 parts for 2 bits, 7 for 4 bits, 63 for
32 bits.

1. **Layer 1:** AND gates form all `W*W` partial products
   `pp[i][j] = a[j] & b[i]`, of weight `i+j`.
2. **Layer 2:** XOR/AND cells add a part's first two bits.
3. **Layer 3:** full cells (`dll_fa`) handle the parts that have a third bit.

The 2 x 2 case makes the idea concrete. It has four outputs and three parts:

```
part 0:  c0 = a0 b0
part 1:  (c1, k) = XOR/AND(a0 b1, a1 b0)
part 2:  (c2, c3) = XOR/AND(a1 b1, k)
```

The published 2 x 2 circuit passes `k` through an OR gate on its way to
part 2. In a 2 x 2 multiplier the other input of that gate is always 0, so
this RTL leaves the gate out.

Each wider size uses the same cells, arranged as a carry-save array:

* Row `i` adds partial-product row `i` to the sum and carry bits left by row
  `i-1`.
* No carry travels sideways within a row. A row's carries go down into the
  next row, one column to the left.
* Row `i` finishes product bit `c[i]`.
* After the last row, the upper `W` bits still hold a sum vector and a carry
  vector. One carry chain of the same cells adds them.
* The carry out of that chain is brought out as `cout`. It is always 0 in a
  correct multiplier, because `a*b < 2^(2W)`.

```
row 0:   pp0,W-1 ... pp0,2  pp0,1  pp0,0 ----------------------> c0
row 1:   HA      ... HA     HA     (pass)                 -----> c1
row 2:   FA      ... FA     FA     HA                     -----> c2
 ...
row W-1: FA      ... FA     FA     HA                     -----> c[W-1]
chain:   HA  FA  FA ... FA  HA  (ripple, LSB on the right) ----> c[2W-1:W], cout
```

The longest path runs through `W-1` rows and then the `W`-cell chain, about
`2W` cells: 63 cells for 32 bits. That matches the published 32-bit figure of
65 logic levels from an input to `c[63]`. For W = 32 the array has 960 full
cells and 63 half cells.

`dll_mult` is purely combinational: `a`, `b` in; `c`, `cout` out. It checks at
elaboration that `W >= 2`.

## The Montgomery controller (`dll_montgomery`)

This design uses a single digit that is a whole 32-bit word. Montgomery's
reduction then takes three products and one correction, and each gets one
clock cycle on the shared multiplier:

| State | Multiplier operands | Registered result |
|---|---|---|
| `ST_MUL_AB` | `A`, `B` | `T = A*B` (64 bits) |
| `ST_MUL_Q` | `T mod 2^K`, `N'` | `Q = low K bits of the product` |
| `ST_MUL_QN` | `Q`, `N` | `U = (T + Q*N) >> K` (K+1 bits) |
| `ST_CORRECT` | — | `result = U >= N ? U - N : U`, `done` |

Why this works:

* `N' = -N^-1 mod 2^K`. So `T + Q*N` is divisible by `2^K`, and the shift is
  exact.
* If `A, B < N`, then `U < 2N`. One conditional subtraction therefore fully
  reduces the result.
* The additions and the subtraction around the multiplier are ordinary `+`
  and `-`. Only the products go through the DLL array.

### Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `start` | in | 1 | capture `a`, `b`, `n`, `n_prime` and begin (ignored while `busy`) |
| `a`, `b` | in | K | operands, each `< n` |
| `n` | in | K | odd modulus |
| `n_prime` | in | K | `-n^-1 mod 2^K`, computed by the user |
| `busy` | out | 1 | an operation is running |
| `done` | out | 1 | one-cycle pulse: `result` is valid |
| `result` | out | K | `a * b * 2^-K mod n`, held until the next `done` |

Timing and use:

* Latency: `done` goes high 4 cycles after the edge that captured `start`.
* Throughput: a new `start` is accepted in the cycle after `done`, so one
  multiplication every 5 cycles.
* Clock period: each cycle holds one pass through the 32-bit array.
* Computing `n_prime`: Newton's iteration `x <- x*(2 - n*x) mod 2^K`, started
  at `x = n`, gives `n^-1` in 4 iterations for K = 32. Negate the result to
  get `n_prime`.
* Conversion: to get plain modular products, convert operands into Montgomery
  form (`x*R mod n`) and back, as usual.

The module contains three concurrent assertions:

* The multiplier never sets `cout`.
* The low word of `T + Q*N` is zero. This fails if `n_prime` is wrong.
* Every result is below `n`.

## How far it follows the published design

The following come from the published description:

* the two cells;
* the layer and part organisation;
* the 2 x 2 circuit;
* the 32-bit width;
* the definition of the Montgomery product.

The following are this design's own choices:

* **How the parts are chained for more than 2 bits.** Only the 2 x 2 circuit
  is described in detail. Wider versions are said to work "the same way". The
  carry-save rows plus final chain are one consistent reading, and their depth
  matches the reported logic levels. The published 32-bit version also shows
  eleven 64-bit internal signals (`s1`..`s11`) whose role is not given. This
  RTL does not reproduce them.
* **How the Montgomery multiplier uses the DLL multiplier.** The published
  description gives only the formula. The word-level reduction on one shared
  multiplier, the user-supplied `N'`, the handshake, the 4-cycle latency and
  the reset behaviour are all choices made here.
* **The DLL as an architecture.** Functionally, it is an unsigned array
  multiplier. The published FPGA figures (42.2 ns, about 2000 LUTs) are for the
  32-bit multiplier on a Xilinx part. They are not targets this RTL was checked
  against.
* **Scope.** The carry-save Montgomery variants (full and semi carry-save)
  mentioned as earlier work are not part of this design.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_dll_ha`, `tb_dll_fa`: exhaustive truth tables.
* `tb_dll_mult`:
  * `W = 2`, `W = 3` and `W = 4`, exhaustive;
  * `W = 32`, corner cases, walking ones, and 20 000 random pairs.
  * Every product is compared with the simulator's `*`, and `cout` must be 0.
* `tb_dll_montgomery`: the top at its default `K = 32`, over about 4 000
  operations, with moduli of every size.
  * Reference: results are compared with a bit-serial (radix-2) Montgomery
    reference, which is a different algorithm from the RTL's.
  * Identity: the testbench also checks `result * 2^K = A*B (mod N)` with wide
    arithmetic.
  * Timing and handshake: it checks the 4-cycle latency and that `busy` stays
    high during an operation.
  * Coverage: it counts how often the final correction was and was not needed,
    how often a `start` given while busy was ignored, and how many operations
    ran back to back. It fails if any of these never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/dll_mm_pkg.sv rtl/dll_ha.sv rtl/dll_fa.sv rtl/dll_mult.sv rtl/dll_montgomery.sv \
  tb/tb_dll_montgomery.sv --top-module tb_dll_montgomery
./obj_dir/Vtb_dll_montgomery
```

Swap in the other testbench name for the other blocks. Each run takes well
under a second.

## Changing the width

`K` (top) and `W` (multiplier) are ordinary parameters. `K` defaults to
`dll_mm_pkg::MM_K`. Any `K >= 2` works:

* The array grows as `K^2` cells.
* Its delay grows as `2K` cells.

For moduli of RSA size, a full `K x K` array becomes impractical. A
digit-serial version would reuse a 32-bit `dll_mult` over several words. That
version is not part of this design.

Lint notes:

* `dll_mult` declares an unused carry vector in row 0 so that every row has the
  same shape. Verilator reports it as unused.
* The assertions use `rst_n` synchronously, while the flops reset
  asynchronously. Verilator notes this mix of uses. It is intended.
