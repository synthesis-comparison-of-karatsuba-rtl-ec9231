# Karatsuba polynomial multiplier (8x8, combinational)

An unsigned integer multiplier that replaces the schoolbook grid of partial
products with the Karatsuba trick, expressed as a product of polynomials.
Each operand is cut into coefficients; the product needs one small
multiplication per coefficient plus one per *pair* of coefficients, then
a handful of additions and subtractions. With two coefficients per operand
(the default, 8x8 bits) that is three small products instead of four.

The block is purely combinational: `p = a * b` settles one propagation delay
after `a` and `b` change. There is no clock, reset or handshake.

## The idea in one page

Read an operand of `N*W` bits as a polynomial in `x = 2^W`:

    a = a_{N-1} x^{N-1} + ... + a_1 x + a_0        (each a_i is W bits)
    b = b_{N-1} x^{N-1} + ... + b_1 x + b_0

The product `C(x) = A(x) B(x)` has `2N-1` coefficients `c_0 .. c_{2N-2}`, and
`a*b = C(2^W)`. The schoolbook route to the `c_i` takes `N^2` coefficient
products. Karatsuba's route uses auxiliary products instead:

    D_i     = a_i * b_i                       i = 0 .. N-1
    D_{p,q} = (a_p + a_q) * (b_p + b_q)       every pair q > p >= 0

and then

    c_i = sum over pairs with p+q = i of ( D_{p,q} - D_p - D_q )
          + D_{i/2}                            (only when i is even)

Each bracket `D_{p,q} - D_p - D_q` equals the cross term `a_p b_q + a_q b_p`,
so the formula rebuilds exactly the schoolbook coefficient. At the two ends
no pair exists, which gives `c_0 = D_0` and `c_{2N-2} = D_{N-1}`.

For the default `N = 2`, `W = 4` (8-bit operands, 4-bit halves):

    D_0 = a_0 b_0,   D_1 = a_1 b_1,   D_{0,1} = (a_0 + a_1)(b_0 + b_1)
    p   = D_1 * 2^8 + (D_{0,1} - D_0 - D_1) * 2^4 + D_0

Worked example at `N = 2`, `W = 4`: `a = 0xB7` (183), `b = 0x5C` (92).
`a_1 = 11, a_0 = 7, b_1 = 5, b_0 = 12`. `D_1 = 55`, `D_0 = 84`,
`D_{0,1} = 18 * 17 = 306`, so `c_1 = 306 - 84 - 55 = 167` and
`p = 55*256 + 167*16 + 84 = 16836 = 183 * 92`.

For `N = 3` the count is 6 products (3 squares, 3 pairs) instead of 9, and
the middle coefficient `c_2 = D_{0,2} - D_0 - D_2 + D_1` is the one case that
mixes a pair term with a square term.

## Structure

    a ──┐ split into N x W-bit coefficients
    b ──┤
        ▼
    kara_aux_products    N multipliers W x W          -> D_i
                         N(N-1)/2 pair adders (W+1 bits)
                         N(N-1)/2 multipliers (W+1)x(W+1) -> D_{p,q}
        ▼
    kara_coeff_combine   adder/subtractor network     -> c_0 .. c_{2N-2}
        ▼
    kara_recombine       sum of c_i << (i*W)          -> p (2*N*W bits)

| File | Role |
|---|---|
| `rtl/kara_pkg.sv` | pair count, pair numbering, coefficient width |
| `rtl/kara_digit_mult.sv` | one coefficient-sized multiplication |
| `rtl/kara_aux_products.sv` | all `D_i` and `D_{p,q}` in parallel |
| `rtl/kara_coeff_combine.sv` | the `c_i` formula above |
| `rtl/kara_recombine.sv` | evaluation at `x = 2^W` |
| `rtl/karatsuba_mult.sv` | top level: split, the three stages, product |

### Ports of `karatsuba_mult`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a` | in | `N*W` | multiplicand, unsigned |
| `b` | in | `N*W` | multiplier, unsigned |
| `p` | out | `2*N*W` | product |

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 2 | coefficients per operand (must be at least 2) |
| `W` | 4 | bits per coefficient |

Coefficient `i` of an operand is its bit field `[i*W +: W]`.

## Where the widths come from (the subtle part)

The only places a wrong width breaks the result are these three:

* **Pair sums.** `a_p + a_q` can reach `2^(W+1) - 2`, so it is kept at `W+1`
  bits and `D_{p,q}` is `2W+2` bits wide. Dropping that carry gives wrong
  products for roughly half of all inputs.
* **Coefficients `c_i`.** The subtractions can go negative part way through
  (`D_{p,q} - D_p` before `+ ...`), but the final `c_i` is a sum of at most
  `N` products of W-bit numbers and is never negative. The network therefore
  works modulo `2^CW` with `CW = 2W + 2 + clog2(N)` (11 bits at the
  defaults), and the wrap-around cancels out. `CW` is deliberately a little
  larger than the tightest bound.
* **Recombination.** `c_i` is wider than `W`, so neighbouring shifted
  coefficients overlap and real carries flow between them. The sum is formed
  in a working width that holds the top coefficient fully shifted, then cut
  to `2*N*W` bits. Since `a*b < 2^(2NW)`, nothing of value is lost.

## Design choices and departures

* **How the 8x8 operands are split.** The scheme works for any number of
  coefficients; the default of two 4-bit halves is this design's choice,
  the one that matches the classic "three half-size multiplications"
  description. `N = 3` or `N = 4` are available by parameter (9x9 with
  `W = 3`, 16x16 with `W = 4`, and so on).
* **The small multiplications** are written as a plain unsigned `*` on
  `W`- and `(W+1)`-bit operands and left to synthesis. Only one level of the
  Karatsuba scheme is applied; the small products are not themselves split
  again.
* **Unsigned only.** Signed operands would need a sign-magnitude wrapper or
  a signed variant of the split.
* **Combinational, no registers.** For a pipelined use, register the
  outputs of `kara_aux_products` and/or `kara_coeff_combine`; both sit on
  clean stage boundaries.
* **Full 16-bit product.** `255 * 255 = 65025` needs all 16 output bits, so
  none are dropped.
* **Reference results.** A synthesis of an 8x8 Karatsuba multiplier of this
  kind on a Xilinx Spartan-2 (xc2s200, speed grade -6) was reported at 26
  slices, 45 four-input LUTs and a 12.338 ns combinational path, against 38
  slices / 73 LUTs / 15.656 ns for a plain array multiplier and 62 slices /
  113 LUTs / 27.340 ns for a Nikhilam-sutra (Vedic) multiplier. Those two
  comparison multipliers are not part of this RTL. The figures depend on the
  small-multiplier mapping and the tools; they have not been reproduced with
  this code.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_kara_digit_mult` | 4x4 and 5x5 products, exhaustive, against repeated addition |
| `tb_kara_aux_products` | `D_i`, `D_{p,q}` for N=2/W=4 (exhaustive) and N=3/W=3 (random); pair-sum carry must occur |
| `tb_kara_coeff_combine` | `c_i` against the schoolbook convolution, and against the raw formula mod `2^CW` for arbitrary `D` values |
| `tb_kara_recombine` | random full-width `c_i` against `sum c_i 2^(iW)` |
| `tb_karatsuba_mult` | end to end: 8x8 and 9x9 (N=3) exhaustive, 16x16 (N=4) random plus corners, and 2178 x 5423 = 11811294 at N=2, W=7; counts pair-sum carries, overlapping coefficients and mixed even coefficients, each must occur |
| `tb_karatsuba_mult_full` | the default 8x8 instance, no parameters overridden, all 65,536 operand pairs |

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/kara_pkg.sv tb/tb_karatsuba_mult.sv --top-module tb_karatsuba_mult
    ./obj_dir/Vtb_karatsuba_mult

All testbenches finish in well under a second. The design has no timing to
check in simulation: the testbenches compare values only, and path delay
has to come from synthesis of the target technology.
