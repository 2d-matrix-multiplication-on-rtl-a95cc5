# A 3D systolic array for floating-point matrix multiplication

This RTL multiplies two N x N floating-point matrices, C = A·B, on a
three-dimensional systolic array. A conventional (planar) output-stationary
array has one multiply-accumulate cell per element of C. Here each of those
cells becomes a **stack of five cells along a third axis (Z)**. Each cell in
the stack does one *atomic* step of the multiply-accumulate `c + a·b`:

| plane (Z) | atomic operation        | module             |
|-----------|-------------------------|--------------------|
| 1         | mantissa multiplication | `mant_mul_plane`   |
| 2         | exponent addition       | `exp_add_plane`    |
| 3         | mantissa alignment      | `mant_align_plane` |
| 4         | mantissa addition       | `mant_add_plane`   |
| 5         | result normalization    | `normalize_plane`  |

The operand streams A and B move only in the X-Y plane. A stack reads them and
passes them on to its neighbour without changing them. The partial sums of C
move only along Z, inside a stack. No partial result ever crosses the X-Y
plane. Because of this, the clock period is set by the slowest *atomic* step
(the period called t3 below), not by a whole floating-point multiply-add.

The array has `5·N²` cells. It finishes one N x N product in
**T3 = 3N + M − 3 cycles**, where M = 5 is the number of planes. A planar array
needs 3N − 2 cycles, but each of its cycles is a full multiply-add. The RTL
meets this cycle count exactly, and the testbenches check it.

## Dataflow in the X-Y plane

Stacks are indexed (i, j): row i = 0 is the top row and column j = 0 is the
left column.

* Row i of A enters at the right (+X) edge of row i and moves one stack left
  per cycle.
* Column j of B enters at the bottom (row N−1) of column j and moves one stack
  up per cycle.
* Each stack registers the A word, the B word and a 3-bit tag
  (`valid/first/last`) that travels with A, and forwards them.

The host gives one column of A and one row of B per cycle, all lanes together.
Inside the top module, `operand_skew` delays row i of A by N−1−i cycles and
column j of B by N−1−j cycles. As a result, a(i,k) and b(k,j) meet in stack
(i,j) in cycle

    t(i,j,k) = k + (N−1−i) + (N−1−j)        (cycle 0 = first column presented)

Stack (N−1,N−1) gets its first pair in cycle 0. Stack (0,0) gets its last pair
in cycle 3N−3. That pair then takes five more cycles through the planes, so
`done` is high in cycle 3N−3+5 = 3N+M−3. For N = 3 that is cycle 11.

## Inside a stack: accumulating at one term per cycle

This is the part that needs the most care. The molecular operation
`c ← c + a·b` runs once per k, and the latency formula above allows a new k in
every cycle. Suppose alignment (plane 3) lined each product up against the
*normalized* running sum from plane 5. The sum would then need three cycles to
come back round before the next term could be aligned, and the array could not
take a term every cycle.

The design avoids that loop as follows:

* **Plane 3** keeps `emax`, the largest product exponent seen since the first
  term of the current c. Zero products are ignored.
  * `emax` depends only on the products' exponents, and those are already known
    in plane 3. So the loop that updates it is one compare inside one
    register.
  * For each term, plane 3 shifts the 48-bit significand product right by
    `emax − e_product` and makes it signed.
  * It also tells plane 4 how far the running sum must be shifted right,
    because `emax` may just have grown.
* **Plane 4** holds the running sum in an unnormalized 57-bit two's-complement
  accumulator scaled by `emax`: `acc ← (acc >>> acc_shift) + addend`. On the
  first term it loads the addend instead. This is a one-cycle loop.
* **Plane 5** normalizes on every cycle, but writes its output register and
  pulses `c_valid` only for the term tagged `last`. It takes the magnitude,
  finds the leading one, shifts it to the hidden-bit position and sets the
  exponent to `emax + lead − 46`.

Planes 1 and 2 are plain pipeline stages. Plane 1 multiplies the 24-bit
significands and forms the sign and a zero flag. Plane 2 computes
`ea + eb − 127` in an 11-bit signed field. The field is wide so that products
outside the word's range reach plane 5 intact.

Accumulator layout: 46 fraction bits, 2 integer bits for one product, 8 guard
bits and a sign bit. Sums of up to 256 terms therefore cannot overflow. The top
module asserts N ≤ 256 (`MAX_TERMS` in `fp3d_pkg`).

## Number format and accuracy

The architecture only says the elements are floating-point numbers. This RTL
uses the IEEE-754 binary32 bit layout (sign, 8-bit biased exponent, 23-bit
fraction), with these simplifications:

* An exponent field of 0 means zero. Subnormal inputs are treated as zero, and
  results below 2^−126 become a signed zero.
* The all-ones exponent is an ordinary exponent. There is no Inf or NaN.
  Results of 2^128 or more saturate to the largest magnitude (exponent and
  fraction all ones).
* Rounding is truncation. Truncation happens when a product or the running sum
  is shifted right in alignment, and once more in normalization.

Results are therefore not bit-identical to a sequence of IEEE binary32
multiply-adds. Two things hold:

* A dot product of small integers is exact.
* For other inputs the error stays within about 2^−22·|c| + 2^−40·Σ|a·b|. The
  testbenches use this bound.

To change the format, edit `EXP_W`/`FRAC_W` in `fp3d_pkg`. The testbench helper
`tb_fp_pkg` follows those constants.

## Host interface (`systolic3d_mm`)

| port              | dir | meaning |
|-------------------|-----|---------|
| `clk`, `rst_n`    | in  | one clock (period t3); asynchronous active-low reset |
| `in_valid`        | in  | `a_col`/`b_row` hold column k of A and row k of B |
| `a_col[N]`        | in  | `a_col[i] = a(i,k)` (`fp_t`) |
| `b_row[N]`        | in  | `b_row[j] = b(k,j)` (`fp_t`) |
| `c_mat[N][N]`     | out | c(i,j), held until stack (i,j) finishes its next product |
| `c_valid[N][N]`   | out | one-cycle pulse when c(i,j) is final |
| `done`            | out | pulse when all of C is final (this is `c_valid[0][0]`) |

Protocol:

* Present k = 0 … N−1 in order, in cycles where `in_valid` is high. A counter
  counts the valid cycles modulo N and marks k = 0 and k = N−1.
* The host may leave idle cycles between columns. Each idle cycle delays the
  result by one cycle.
* The next product may start in the cycle after the previous product's last
  column.
* If products are issued back to back, the stacks near (N−1,N−1) finish the
  next product before stack (0,0) finishes the current one. In that case,
  collect each element on its `c_valid` pulse. Reading `c_mat` at `done` is
  safe only if at least 2N−2 idle cycles separate the products.

## Files

`rtl/`:

* `fp3d_pkg.sv`: the number format, the plane count (`PLANES = 5`), the
  accumulator sizes and the struct passed from each plane to the next.
* `systolic3d_mm.sv` (top): the k counter, two `operand_skew` instances and the
  N x N grid of `cell_stack`.
* `cell_stack.sv`: the X-Y forwarding registers and the five planes.
* `mant_mul_plane.sv`, `exp_add_plane.sv`, `mant_align_plane.sv`,
  `mant_add_plane.sv`, `normalize_plane.sv`: one module per plane.
* `operand_skew.sv`: per-lane delay lines. Lane N−1 is a wire on purpose.

`tb/`:

* One self-checking testbench per module (`tb_<module>.sv`).
* `tb_fp_pkg.sv`: converts words to and from `real` and generates random
  operands.
* `mm_checker.sv`: plays the host and keeps score for the whole array.
* `tb_systolic3d_mm.sv`: the end-to-end test at the default size, N = 3.
* `tb_systolic3d_mm_sweep.sv`: the same checks at N = 8 and N = 25.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and then finishes.
A watchdog stops it if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        --top-module tb_systolic3d_mm -y rtl -y tb +libext+.sv -Irtl -Itb \
        rtl/fp3d_pkg.sv tb/tb_fp_pkg.sv tb/tb_systolic3d_mm.sv
    ./obj_dir/Vtb_systolic3d_mm

To run another testbench, replace `tb_systolic3d_mm` with its name. The N = 25
sweep takes a few minutes to compile, because the array has 625 stacks. The
testbenches use only two-state logic and `$urandom`.

What the whole-array tests cover:

* The exact 3x3 example: (1..9 row-major) times (9..1).
* Random exact integer products.
* Random products, including ones whose exponents span 2^±60, so that the
  running sum is realigned inside a stack.
* Zero operands and an all-zero row.
* Results that saturate and results that flush to zero.
* Isolated products, where the 3N+M−3 latency is checked on `done`.
* Back-to-back products.
* Products with idle host cycles between columns.

Each of these cases is counted, and a case that never happens counts as a
failure.

## Where this RTL goes beyond or departs from the architecture

* **Taken from the architecture:**
  * the N x N grid of five-plane stacks and the order of the planes;
  * A moving along X, B along Y and c along Z;
  * the staggered operand streams;
  * the cell count 5N² and the latency 3N+M−3.
* **Design choices made here:**
  * the number format, rounding, saturation and flush-to-zero;
  * the running-maximum-exponent accumulation (above);
  * the valid/first/last tag and the host protocol;
  * the skew buffers at the array edge;
  * the reset style.
* **Row A staggering.** The drawing of the 3D array shows only the B columns
  staggered. For the streams to meet, A rows must be staggered too, so this RTL
  staggers both.
* **Not built:**
  * fault tolerance by bypassing a faulty cell through row, column or layer
    reconfiguration, which is named but not specified;
  * solving products larger than the array by partitioning;
  * combining arrays into a macropipeline;
  * the host memory and its buses.

  At the default N = 3, only problems up to 3 x 3 fit in one pass. N is a
  parameter and works up to 256.
* **Planes are fixed at five.** Arrays with fewer, coarser planes (M = 1…4)
  appear in the architecture's latency and area comparisons. They would need a
  different split of the arithmetic and are not parameterized here. The planar
  arrays used as baselines (a hexagonal array and an N x N mesh) are not
  included.

## Size

Coarse synthesis with yosys of the default N = 3 array gives about 1 900
word-level cells, each multiplier or adder counting as one cell. It also gives
3 350 flip-flop bits.

Per stack:

* one 24x24 multiplier;
* three adders or subtractors for exponents;
* two barrel shifters;
* a 57-bit adder;
* a leading-one detector and the normalization shifter.
