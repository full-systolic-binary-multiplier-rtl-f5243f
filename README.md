# Full systolic binary multiplier

A binary multiplier built from one cell type only. The cell is a registered
full adder with an AND gate in front of it, and the cells are placed in a
regular array where every wire joins two neighbours and passes through a
register. No signal crosses more than one cell between clock edges. The clock
period is therefore one full-adder delay plus a short local wire, whatever
the operand width. A new multiplication can start on every clock. The price
is latency: a product takes about 3N cycles (unsigned) or 4N cycles (two's
complement) to come out.

The default configuration is an 8 x 8 two's complement multiplier with
parallel inputs and outputs. It has 99 array cells, and its output is a
16-bit product on every clock after a 31-cycle latency. Setting a parameter
turns it into the unsigned parallel-I/O multiplier. The width `N` can be any
value from 2 up.

## The elemental processor (`sm_ep`)

Each cell computes `A*B + C + S` on single bits and registers everything it
passes on:

| output | value                           | registers | goes to              |
|--------|---------------------------------|-----------|----------------------|
| `co`   | carry of `ai&bi + ci + si`      | 1         | east neighbour       |
| `so`   | sum of `ai&bi + ci + si`        | 2         | north-east neighbour |
| `ao`   | `ai`                            | 1         | north neighbour      |
| `bo`   | `bi`                            | 1         | east neighbour       |

The sum has two registers because it moves diagonally. A diagonal hop must
take as long as one hop north plus one hop east, or the sum bit would reach
its next cell one cycle ahead of the carry it has to be added to.

## The array (`sm_array`)

Cell EP(i,j) sits in column i and row j:

* Multiplicand bit `A_i` enters column i at the bottom and moves up one row
  per clock.
* Multiplier bit `B_j` enters row j at the left and moves right one column
  per clock.

So EP(i,j) forms the partial product `A_i*B_j`, of weight 2^(i+j). Its
carry, of weight i+j+1, goes east to EP(i+1,j). Its sum, of weight i+j, goes
north-east to EP(i+1,j-1), the cell of the same weight in the row above. The
sums leaving the top row are the product bits `O_k`.

Each row adds one partial-product row to the running total with a carry that
ripples sideways. The total so far stays below 2^(2N), so row j never needs
more than 2N-j cells. The bottom row has no sum or carry coming in, so its N
cells only form the products. That gives (3N^2+N)/2 - 1 cells: 25 for N = 4
and 99 for N = 8. The carry out of the last cell of each row is always zero
and is left unconnected. Inputs on the edge of the array that receive no
data are tied to 0.

### The skewed schedule

This is the part that needs care. Take cycle 0 as the cycle in which `A_0`
and `B_{N-1}` are applied:

* `a[i]` must be applied in cycle i (least significant bit first);
* `b[j]` must be applied in cycle N-1-j (most significant bit first);
* EP(i,j) evaluates in cycle i + N-1-j;
* product bit `o[k]` is valid in cycle k+N+1 (least significant bit first).

Each operand bit reaches a cell in the same cycle as the carry from the west
and the sum from the south-west. The last cell, EP(2N-1,0), evaluates in
cycle 3N-2, so a product takes 3N-1 evaluation cycles (11 for a 4 x 4). The
last product bit leaves two sum registers later. A second multiplication may
start in cycle 1 with its own skew. The two never meet, because every
datum moves one step per clock along its own diagonal wavefront.

## Parallel I/O: register chains (`sm_delay`)

To feed the array from parallel words and collect a parallel result, each bit
gets a chain of D registers:

| signal         | chain length | unsigned total for N = 8 |
|----------------|--------------|--------------------------|
| `A_i`          | i            | 28                       |
| `B_j`          | N-1-j        | 28                       |
| product bit k  | 2N-1-k       | 120                      |

The total is 3N^2 - 2N registers (176 for N = 8). With these chains the
unsigned multiplier (`SIGNED_OPS = 0`) gives a product 3N clock edges after
its operands.

## Two's complement operation

The array only multiplies unsigned numbers. Signed operands are therefore
handled in sign + modulus form, using |A*B| = |A|*|B| and
sgn(A*B) = sgn(A) xor sgn(B):

```
a_in -> sm_tc2sm -> delay N-1 -------------.
                                             sm_array -> 2N x sm_sm2tc_cell -> deskew 2N-1-k -> p_out
b_in -> sm_tc2sm -> delay 2(N-1-j) --------'                 ^
sign(a_in) xor sign(b_in) -> delay 2N -----------------------'
```

### Input converter (`sm_tc2sm`)

For a negative x, the converter computes the modulus as (x xor s) + s, with
s = x[N-1]:

* Bit 0 passes straight through.
* The carry of the "+ s" moves up one bit per clock through a register.
* Each inverted bit is delayed to meet its carry, so modulus bit k comes out
  in cycle k.
* The top modulus bit is the final carry. It is only set for the most
  negative input, whose modulus 2^(N-1) needs all N bits.

The converter has one full adder's worth of logic per stage. Its registers
do two jobs: they pipeline the conversion, and they produce exactly the
least-significant-bit-first skew the array needs on `a`.

### Aligning the multiplier

The array wants `b` most significant bit first, but the converter delivers
it least significant bit first. Both operands therefore go through a
converter, and the array starts N-1 cycles later than it would for unsigned
data:

* the multiplicand lanes get N-1 extra registers each;
* multiplier lane j gets 2(N-1-j) extra registers.

This keeps one cell of logic per clock everywhere. The cost is N-1 cycles of
latency and 2N(N-1) alignment registers. A combinational input converter on
`b` would avoid both, but it would put an N-bit ripple into the clock period.

### Output converter (`sm_sm2tc_cell`)

The array delivers the modulus of the product least significant bit first.
Negating a number bit-serially is simple: bit k of `0 - d` is d_k xor
(any lower bit was one). Each cell holds one product bit and computes:

* `dout = di xor ci`;
* `co = sgn and (di or ci)`, registered for the next cell;
* the sign, registered and passed on with the bits.

For a positive product, `ci` stays 0 and the bits pass through unchanged.
One cell per product bit sits between the array and the output chains. The
sign enters the first cell in cycle 2N, together with modulus bit 0.

### Timing of `sm_mult` (`SIGNED_OPS = 1`)

Operands are sampled at a rising edge. `p_out` holds their product, and
`out_valid` repeats their `in_valid`, 4N-1 rising edges later (31 for N = 8).
A product can be issued every cycle. The 16-bit result covers the full range,
including (-128)*(-128) = 16384. At N = 8 the design has 831 datapath
registers before synthesis trims the unused ones:

* 495 in the array;
* 56 in the converters;
* 112 for alignment;
* 16 on the sign path;
* 32 in the output cells;
* 120 in the output chains.

The valid flag adds another 31.

## Interface of the top level `sm_mult`

| port        | dir | width | meaning                                            |
|-------------|-----|-------|----------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                                 |
| `rst_n`     | in  | 1     | asynchronous active-low reset of the valid pipeline |
| `in_valid`  | in  | 1     | operands are to be multiplied                      |
| `a_in`      | in  | N     | multiplicand                                       |
| `b_in`      | in  | N     | multiplier                                         |
| `out_valid` | out | 1     | `p_out` holds a product                            |
| `p_out`     | out | 2N    | product                                            |

| parameter    | default | meaning                                              |
|--------------|---------|------------------------------------------------------|
| `N`          | 8       | operand width                                        |
| `SIGNED_OPS` | 1       | 1: two's complement, latency 4N-1; 0: unsigned, latency 3N |

## Where this RTL departs from the original design, and what it adds

* **Multiplier alignment in signed mode.** How the least-significant-bit-first
  converter output is matched to the array's most-significant-bit-first
  multiplier input is this design's choice (see above). As a result, the
  signed latency is 4N-1 cycles rather than the 3N of the unsigned
  arrangement.
* **Valid flag.** `in_valid`/`out_valid` and the reset are additions. The
  original design has no handshake and no reset. The datapath registers
  still have no reset: after power-up they flush themselves within one
  latency, and `out_valid` marks the real products.
* **Clocking.** The original prototype used a two-phase clock. Here every
  register is a rising-edge D flip-flop.
* **Uniform cells.** All cells are full `sm_ep` cells. Cells on the array edge
  whose inputs are tied to 0 are left for synthesis to simplify, which
  matches the original's reduced edge cells in effect.
* **Not included: one's complement operands.** The original notes that
  these reduce to sign + modulus with an XOR of the sign into every bit.
  They are not supported: operands are two's complement or unsigned.
* **Not included: ripple converter.** The ripple-carry two's complement
  converter, which the original offers as the slow alternative to the
  systolic one, is not included.
* **Not applicable: physical results.** The physical results of the original
  work (about 40 MHz and 9 mm^2 in a 1.5 um standard-cell process, about
  2 mm^2 for a full-custom layout) are properties of those layouts. This RTL
  does not reproduce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a fixed number of
cycles.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_sm_ep`             | all 16 input patterns, then random inputs; carry and operands after 1 cycle, sum after 2 |
| `tb_sm_delay`          | depths 0, 1 and 7 against the input history |
| `tb_sm_array`          | at N = 4 and N = 8 (through the helper `sm_array_checker`): every unsigned product, streamed one per cycle with the required skew; each product bit taken exactly in cycle k+N+1; cell count (3N^2+N)/2-1 |
| `tb_sm_tc2sm`          | all 256 8-bit inputs: sign in the same cycle, modulus bit k exactly k cycles later |
| `tb_sm_sm2tc_cell`     | one cell against its equations, and an 8-cell chain turning random sign/modulus pairs into two's complement |
| `tb_sm_mult`           | default configuration: all 65,536 signed products at full rate with idle cycles; latency 4N-1; counts every sign combination, the most negative operand, zero with a negative sign, idle cycles and back-to-back issue, and fails if any never happened |
| `tb_sm_mult_unsigned`  | `SIGNED_OPS = 0`: all 65,536 unsigned products; latency 3N; 3N^2-2N chain registers |

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/smul_pkg.sv \
          tb/tb_sm_mult.sv --top-module tb_sm_mult
./obj_dir/Vtb_sm_mult
```

The simulator is two-state, so registers without reset start at arbitrary
values. The testbenches ignore outputs until the pipeline has filled.

## Files

* `rtl/smul_pkg.sv`: array geometry (cells per row, cell count) and timing
  helpers.
* `rtl/sm_ep.sv`: the cell.
* `rtl/sm_array.sv`: the systolic array.
* `rtl/sm_delay.sv`: register chain.
* `rtl/sm_tc2sm.sv`: systolic two's complement to sign + modulus converter.
* `rtl/sm_sm2tc_cell.sv`: sign + modulus to two's complement bit cell.
* `rtl/sm_mult.sv`: the top level, parallel I/O, signed or unsigned.
* `tb/`: one testbench per module, plus `sm_array_checker.sv`, a test
  helper that drives one array.
