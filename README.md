# Array multipliers with on-the-fly conversion

An n x n array multiplier normally ends with a carry-propagate adder that merges the
carry-save rows into the final 2n-bit product. That last adder is slow (its delay grows with n)
and costs area. The multipliers here do without it. The full adder / half adder array delivers
the low n+1 product bits already assimilated. It leaves the high n-1 columns as carry-sum pairs
`(a_i, b_i)`. A small AND-XOR network then converts those pairs into product bits while the array
is still producing them. Each pair leaves the array one full-adder delay after the one above it.
The converter does one step per arriving pair, so only a single AND-XOR level remains after the
last pair. The total delay is one NOT-AND level, n adder cells and one AND-XOR level, roughly
(n+1) full-adder delays.

Two multipliers are provided, both purely combinational and parameterised by the width `N`
(default 5, the size of the worked example this design follows):

* `otf_mult_signed`: two's complement operands, 2N-bit two's complement product;
* `otf_mult_unsigned`: unsigned operands, 2N-bit product.

`otf_mult_top` puts the two side by side with separate ports (`xs, ys -> zs` and
`xu, yu -> zu`).

## Module map

```
otf_mult_top
 |- otf_mult_signed    pp_gen (SIGNED=1) -> csa_array (SIGNED=1) -> otf_conv
 `- otf_mult_unsigned  pp_gen (SIGNED=0) -> csa_array (SIGNED=0) -> otf_conv
csa_array and otf_conv are built from full_adder and half_adder cells.
otf_pkg holds the functions that size and order the array's columns.
```

| module | ports | what it does |
|---|---|---|
| `pp_gen` | `x[N]`, `y[N]` -> `pp[2N][N]` | elementary products, grouped by column and row |
| `csa_array` | `pp`, `hx`, `hy` -> `zlo[N+1]`, `a[N-1]`, `b[N-1]` | carry-save reduction: z_0..z_N and the carry-sum pairs |
| `otf_conv` | `a[N-1]`, `b[N-1]` -> `zhi[N-1]` | on-the-fly conversion: z_{N+1}..z_{2N-1} |
| `otf_mult_signed` / `otf_mult_unsigned` | `x[N]`, `y[N]` -> `z[2N]` | the complete multipliers, `z = {zhi, zlo}` |

Bit `i-1` of `a`/`b` is pair `i`, which belongs to column `2N-i`. Pair 1 is the most
significant. `zhi[m]` is product bit `z_{N+1+m}`. Nothing is clocked, so there is no reset and no
latency in cycles. Put registers around a multiplier if you need a pipeline stage.

## The two's complement product matrix

The signed multiplier uses the Baugh-Wooley method, as extended by Blankenship, so that every
partial product bit is positive. For X = x4..x0 and Y = y4..y0 (N = 5) the product bits are
arranged as follows. Overbars are inversions and `x4|y4` is a logical OR:

```
col:     9      8      7      6      5      4      3     2     1     0
row 0: x4|y4  x4|y4  x4~y3  x4~y2  x4~y1  x4~y0  x3y0  x2y0  x1y0  x0y0
row 1:               ~x3y4  x3y3   x3y2   x3y1   x2y1  x1y1  x0y1
row 2:                      ~x2y4  x2y3   x2y2   x1y2  x0y2
row 3:                             ~x1y4  x1y3   x0y3
row 4:                                    ~x0y4
                                          x4
                                          y4
```

Row k is L-shaped. It holds x_0..x_{N-1-k} times y_k and then x_{N-1-k} times
y_{k+1}..y_{N-1}. In general, term x_i*y_j sits in column i+j and row min(j, N-1-i). A term with
exactly one sign bit is taken with the other bit inverted. The sign-by-sign term becomes
`x_{N-1}|y_{N-1}` in both top columns, and `x_{N-1}` and `y_{N-1}` are added once each in
column N-1. Modulo 2^{2N} these corrections add up to the exact signed product:
`-(x4 + y4 - x4*y4)*2^8` equals `(x4|y4)*(2^9 + 2^8)`.

`pp_gen` emits these terms as `pp[c][row]`. Slots past a column's term count are 0. It does not
emit the two loose correction bits. The array adds them itself with a dedicated half adder (below).
The unsigned generator uses plain AND terms, with x_{N-1}y_{N-1} alone in column 2N-2 and
nothing in column 2N-1.

## The array: columns reduced to bits and pairs

`csa_array` works column by column. The inputs of column c are its products, in row order,
followed by the carries of every cell in column c-1. A chain of cells reduces them:

* if an odd number of reductions is needed, the chain starts with a half adder on two products;
  otherwise it starts with a full adder on three;
* every later full adder takes the running sum, the next product and the next carry. When one of
  those lists is empty it takes two from the other;
* columns 0..N end in one bit, which is product bit z_c. Columns N+1..2N-1 stop at two bits:
  `a_i` is the chain's last sum, or the column's only product, and `b_i` is the input left over,
  always a carry.

Each cell's carry goes to column c+1 and its sum goes down the chain. In the signed array, the
half adder on `x_{N-1}, y_{N-1}` feeds its sum as the last product of column N-1. Its carry goes
in as the third carry of column N.

For N = 5 this rule gives the array cell for cell:

| column | cells, top to bottom | leaves |
|---|---|---|
| 1 | HA(x1y0, x0y1) | z1 |
| 2 | HA(x2y0, x1y1), FA(+x0y2, +carry) | z2 |
| 3 | HA(x3y0, x2y1), FA(+x1y2, +c), FA(+x0y3, +c) | z3 |
| 4 | FA(x4~y0, x3y1, x2y2), FA(+x1y3, +c), FA(+~x0y4, +c), FA(+HA(x4,y4).sum, +c) | z4 |
| 5 | FA(x4~y1, x3y2, x2y3), FA(+~x1y4, +c), FA(+c, +HA(x4,y4).carry), FA(+c, +c) | z5 |
| 6 | HA(x4~y2, x3y3), FA(+~x2y4, +c), FA(+c, +c) | pair 4 = (sum, carry) |
| 7 | HA(x4~y3, ~x3y4), FA(+c, +c) | pair 3 = (sum, carry) |
| 8 | HA(x4\|y4, c) | pair 2 = (sum, carry) |
| 9 | none | pair 1 = (x4\|y4, carry) |

That is 14 full adders and 7 half adders, 21 cells. The longest path through the array is 5
cells. With this rule the longest path stays at exactly N cells for every N from 4 to 64, in both
the signed and the unsigned version. The cell totals for larger N are:

| N | signed array FA + HA | unsigned array FA + HA |
|---|---|---|
| 4 | 8 + 5 | 6 + 6 |
| 8 | 44 + 13 | 42 + 14 |
| 16 | 212 + 29 | 210 + 30 |
| 32 | 932 + 61 | 930 + 62 |
| 64 | 3908 + 125 | 3906 + 126 |

The signed array always has (N-1)^2 + N cells. How those cells split between full and half
adders differs from the usual estimate of (N-1)^2 full adders plus N half adders. The N = 5
drawing this design follows already has 14 + 7 rather than 16 + 5.

The unsigned array is the same arrangement without the sign half adder. Its top column holds
only the carry from column 2N-2, so pair 1 is `(0, carry)`. At N = 5 it has the 20 cells of the
drawn array, with the same number of cells in each column. In columns 4 and 5 its half adder
sits at the top of the chain rather than lower down; the function is the same.

## On-the-fly conversion

Each pair is first split by a half adder: `s_i = a_i ^ b_i` and `c_i = a_i & b_i`. The value of
the high part is the sum of `s_i` at the column's weight plus `c_i` one column higher. A carry
enters column 2N-i when some lower pair m generates one (`c_m`) and every pair between them
propagates it (`s`). Since `s_j` and `c_j` are never both 1, these cases exclude each other.
The carry can therefore be written as an XOR of AND terms:

```
z_{2N-i} = s_i ^ c_{i+1} ^ s_{i+1}c_{i+2} ^ s_{i+1}s_{i+2}c_{i+3} ^ ... ^ s_{i+1}..s_{N-2}c_{N-1}
```

`otf_conv` evaluates this as a recurrence over the pairs, one step per pair:

```
k_{i,1} = 1             k_{i,j} = k_{i,j-1} & s_{i+j-1}          j = 2 .. N-1-i
t_{i,0} = s_i           t_{i,j} = t_{i,j-1} ^ (k_{i,j} & c_{i+j})  j = 1 .. N-1-i
z_{2N-i} = t_{i,N-1-i}
```

Step j of bit 2N-i needs only pair i+j. Pairs leave the array from the top down, each about one
full-adder delay after the previous one, so every step is done by the time the next pair
arrives. When the last pair (i = N-1, column N+1) appears, `z_{N+1} = s_{N-1}` is immediate and
every other bit needs one more AND-XOR. For N = 5:

```
z6 = s4
z7 = s3 ^ c4
z8 = (s2 ^ c3) ^ s3c4
z9 = ((s1 ^ c2) ^ s2c3) ^ s2s3c4
```

The converter uses N-1 half adders and (N-1)(N-2)/2 AND-XOR steps. It also needs
(N-2)(N-3)/2 ANDs for the k terms. The carry out of the top pair, `c_1`, is dropped, because the
product is exact in 2N bits.

## Delay and area, as estimated for this structure

The delay model counts the elementary product gate (t_NOT-AND), N full adders and the final
AND-XOR:

```
t ≈ t_NOT-AND + N*t_FA + t_AND-XOR ≈ (N+1) t_FA
```

This uses t_NOT-AND + t_AND-XOR ≤ t_FA, because the slowest path of a full adder is a three-input
XOR. An array that drives a conventional on-the-fly converter of the Montuschi-Ciminiera kind
takes at least (N+2)t_FA + t_NOT-AND.

In NAND2-equivalent units (AND 1.3, XOR 1.5, FA 7.5, HA 5.0), the area estimate for the new
structure is

```
N^2 K_AND + (N-1)^2 K_FA + N K_HA + (N-1)(N-2)/2 (K_AND + K_XOR)
```

Against `N^2 K_AND + (2N^2 - 3N + 1) K_FA` for the comparison design, this formula gives about
65% of its area at N = 4 (117 against 178 units) and about 63% at N = 64 (40,881 against 65,332). These are estimates from the gate model, not
synthesis results of this RTL.

## Parameters and sizes

`N` is an `int` parameter on every module, with a default of 5. Widths 4, 5, 8, 16 and 32 are
simulated. N = 64 elaborates and lints cleanly, but it was not simulated, because its C++ model
is large (about 145 MB of generated source) and slow to compile. N must be at least 3.
`csa_array` and `pp_gen` also take `SIGNED` (1: two's complement arrangement, 0: unsigned).

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. The results are
compared with independent arithmetic (the simulator's `*` operator or value sums), never with a
second copy of the logic.

| testbench | what it covers |
|---|---|
| `tb_full_adder`, `tb_half_adder` | all input combinations |
| `tb_pp_gen` | N = 5, all 1024 operand pairs. The weighted sum of the products equals x*y (signed and unsigned), and individual terms of the matrix above are checked |
| `tb_csa_array` | N = 5 and 8, both arrangements, 20000 random column inputs. The array preserves the weighted value |
| `tb_otf_conv` | N = 5 and 8, all pair patterns. Output equals the top bits of the pairs' sum, and the N = 5 `z9` formula |
| `tb_otf_mult_signed`, `tb_otf_mult_unsigned` | N = 4, 5 and 8, exhaustive |
| `tb_otf_mult_top` | the top at its defaults, exhaustive on both multipliers, and counts the cases it exercised: negative operands, (-16)*(-16), sign correction active, a carry from the lowest pair converted through every pair, a carry out of the top pair, 31*31 |
| `tb_otf_mult_sizes` | the top at N = 4, 8, 16, 32. Corner operands in every combination and 3000 random pairs per width |

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/otf_pkg.sv \
          tb/tb_otf_mult_top.sv --top-module tb_otf_mult_top
./obj_dir/Vtb_otf_mult_top
```

Substitute any other testbench name. Most compile and run in seconds. `tb_otf_mult_sizes` takes
a few minutes to compile because of its 32-bit instances.

## Choices this design makes

* No registers, clock or reset. The structure is a combinational multiplier and its speed is
  stated in gate delays.
* The column and chain rule for N other than 5 is this design's own. It reproduces the N = 5
  array exactly, with the same carry of the sign half adder entering the third cell of
  column 5, and it keeps the array depth at N cells. A different rule could place cells
  differently at larger N.
* Both arrays share one parameterised `csa_array`, and both multipliers share `pp_gen` and
  `otf_conv`.
* The full adder's carry is written as a majority function. Only its sum path (a three-input
  XOR) matters to the delay estimate.
