# Bit-plane FIR filter array

A FIR filter computes

    y_i = c_0*x_i + c_1*x_(i-1) + ... + c_(k-1)*x_(i-k+1)

This array never builds a multiplier. Each coefficient is split into its
bits, c_t = sum_j 2^j * c_t^j, so the filter becomes

    y_i = sum_j 2^j * ( sum_t c_t^j * x_(i-t) )

Each inner sum is an FIR filter whose coefficients are single bits. It
needs only AND gates and adders. The array stacks one such one-bit filter
per coefficient bit: these are the **bit-planes**. The running sum flows
down through all of them in carry-save form, with one register stage per
row. No carry ever ripples along a row, except in one final adder at the
bottom. The result is a very regular grid of identical cells, pipelined
at every row. It accepts one input sample and delivers one output word
per clock.

The default size has 3 coefficients (k_C = 3) of 4 bits (m = 4), a
5-bit input (n = 5), 9 cells per row (l_0 = 9) and a 13-bit output
y^0..y^12. That is 12 rows of 9 cells.

## The cell

Every cell (`bp_cell`) takes one input bit x, one coefficient bit c and two
incoming bits a, b:

    sum   = a ^ b ^ (x & c)
    carry = a&b | a&(x&c) | b&(x&c)

In other words, it is a full adder whose third input is the partial-product
bit x&c. x runs vertically through a column of cells and c runs horizontally
through a row. The cell has no register.

## One bit-plane

A bit-plane (`bit_plane`) is k_C rows of l_0 cells. Plane j multiplies the
input word by bit j of each coefficient. The top row uses bit j of c_2, the
next row c_1 and the bottom row c_0. Each row is a carry-save adder:

- A cell's sum goes straight down to the cell below.
- A cell's carry goes down and one column to the left, into the next more
  significant position. This is the factor 2 of a carry.
- The carry out of the leftmost column falls off the array. A plane
  therefore works modulo 2^l_0 in its own bit weights.

Each row's sum and carry vectors are registered.

Inside a plane, the input word reaches all k_C rows in the same cycle: it is
broadcast, not pipelined. This broadcast is what makes the array
"semi-systolic". It is also what turns the rows into an FIR filter: a word
that starts in the top row in cycle τ picks up

    c_2^j * x(τ) + c_1^j * x(τ+1) + c_0^j * x(τ+2)

as it moves down. That is one output of a transposed-form FIR filter with
one-bit coefficients.

## Between bit-planes: the factor 1/2

Plane j+1 has twice the weight of plane j. The array does not shift the new
partial products left. It shifts the running sum right instead, once per
plane:

- The **sum vector** moves one column towards the least significant end.
- Its lowest bit leaves the array as output bit **y^j**. That bit is final:
  nothing of lower weight will come along any more.
- The **carry vector** goes straight down. Its own factor 2 and the 1/2
  cancel.
- The most significant sum bit is copied into the top column that the
  shift has freed. This sign-extends the sum vector.

Because of this shift, column i of every plane always holds input bit x^i,
so the input bits feed the same columns in every plane. The columns above
the input width (5..8 by default) get the input's sign bit.

After the last plane the same shift happens once more:

- the lowest sum bit becomes y^(m-1), and
- the vector merging adder (`vma`) adds the shifted sum vector and the
  carry vector into y^m..y^(m+l_0-1).

This 9-bit addition is the only carry-propagating adder in the design. It is
combinational and fed straight from the last row's registers.

## Keeping the samples aligned

Plane j works on a running sum k_C*j cycles after plane 0 did. It must see
the same samples that plane 0 saw. The input therefore travels down a bus
with k_C registers per plane (`delay_line`), and each plane reads the bus
at its top.

The low output bits appear early: y^j is ready when plane j finishes. Each
one passes through (m-1-j)*k_C registers, so that the whole word appears in
the same cycle.

## Timing

- One sample in and one output word out per clock, with no stalls.
- A running sum passes m*k_C = 12 register stages.
- Sample x_i, applied in the cycle before clock edge e, is first part of
  the output visible just after edge e + (m-1)*k_C, which is 9 clocks with
  the defaults. The oldest sample of the same output went in k_C-1 edges
  earlier.
- The coefficients are static inputs. After a change, the next m*k_C
  outputs mix old and new coefficients.
- Reset is synchronous and active low, and clears every register.
  Following reset, the filter behaves as if all earlier samples were zero.

## Number format, and what the sign extension does

The input is two's complement and the coefficients are unsigned.

Copying the sum vector's top bit is an exact sign extension only for a
plain binary number. The running sum here is a carry-save pair, which has
no single sign bit. Simulation of the default array shows the following:

- **The low 11 bits y^0..y^10 are always the exact two's complement
  result.** 11 bits is the full range the filter can produce:
  |y| <= 3 * 16 * 15 = 720, and n + m + ceil(log2 k_C) = 11.
- **y^11 and y^12 are not reliable** for negative results. In random
  streams they disagree with the sign about 2.5% of the time. With the most
  negative input and the largest coefficients (y = -720) they disagree
  every time.

So use `y[10:0]` as the signed result. This is confirmed only by simulation
and only for the default size. It does not hold in general: in some other
sizes that were tried, some of the low bits were wrong too. For the
smallest array (2 coefficients of 2 bits, 2-bit input, 4 cells per row) all
6 output bits are exact.

Setting `SIGN_EXT = 0` zero-fills instead of sign-extending, in both places:

- the upper input columns, and
- the freed sum column.

The array is then an exact **unsigned** filter on all l_0 + m output bits.
The testbench checks this up to the maximum 3 * 31 * 15 = 1395.

## Parameters of `bp_fir_array`

| name       | default | meaning                                           |
|------------|---------|---------------------------------------------------|
| `KC`       | 3       | number of coefficients k_C (rows per bit-plane)   |
| `M`        | 4       | coefficient width m (number of bit-planes)        |
| `N`        | 5       | input width n                                     |
| `L0`       | 9       | cells per row l_0; output width is `L0 + M`       |
| `SIGN_EXT` | 1       | 1: sign extension as described; 0: unsigned array |

`L0` must be larger than `N`. With the default `L0 = N + M`, the top
columns leave room for the sum to grow over all planes.

Ports: `clk`, `rst_n`, `x[N-1:0]`, `coef[KC]` (each `[M-1:0]`, with
`coef[t]` = c_t) and `y[L0+M-1:0]`.

The default array holds 12 x 9 = 108 cells and 279 register bits:

- 216 bits of row registers,
- 45 bits in the input bus,
- 18 bits in the low-output delay chains.

Synthesis keeps 259 of them. It removes bits that are constant or never
read. Examples are the carries of the very first row, which has no
incoming bits and so always produces zero carries, and the leftmost
carries inside a plane, which are dropped.

## Which cells matter for the high output bits

An error in a cell can reach an output bit only along sum connections
(same weight, next row) and carry connections (one weight up, next row).
A cell of weight w in row r of an array with R rows therefore reaches the
carry-save pair of output weight k exactly when

    0 <= k - w <= R - r

Note that rows are counted from 0 at the top, and the final adder acts as
row R. This rule is the **error significance map** of the array. It marks
the cells that must be fault-free if output bits from weight k up are to
stay correct. Cells outside the map may give wrong results: the error then
stays below weight k in the carry-save result. It can still reach y^k
through the carry chain of the final adder.

For the smallest array (2 coefficients x 2 bits, 4 rows of 4 cells), the
maps for y^5 .. y^2 (one group per row, top row first, most significant
column left) are:

    y^5: 1110  1100  1100  1000        y^4: 1111  1110  1110  1100
    y^3: 1111  1111  0111  0110        y^2: 0111  0111  0011  0011

`tb_error_significance` measures these maps on the RTL by fault
injection. It holds each sum and carry output of each cell at 0 and then
at 1, and checks whether the weight-k pair entering the final adder ever
changes. The measured maps agree with the rule above and with the maps
listed here, cell for cell. It also counts the cell/bit pairs that change
y^k only through the final adder's carries. The RTL itself contains no
fault-injection or redundancy logic.

## Departures and choices

- **Vector merging adder:** only its place and job are defined for this
  array. It is written as a single `+`, which synthesis maps to whatever
  adder it likes.
- **Registers:** their placement is read from the structure: one register
  after every row, k_C per plane on the input bus, and one per row on the
  low-output chains. There is no register on the input pins or after the
  final adder.
- **Reset style, number format and the `SIGN_EXT` option** are this
  design's choices.

## Files

| file                    | content                                        |
|-------------------------|------------------------------------------------|
| `rtl/bp_fir_array.sv`   | top: planes, inter-plane shift, buses, VMA     |
| `rtl/bit_plane.sv`      | one bit-plane, k_C registered carry-save rows  |
| `rtl/bp_cell.sv`        | the AND + full-adder cell                      |
| `rtl/vma.sv`            | vector merging adder                           |
| `rtl/delay_line.sv`     | shift register for the input bus and y chains  |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_bp_fir_variants` and `tb_error_significance` |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. Each also has a watchdog that stops it after a fixed number of
cycles. With Verilator 5:

    verilator --binary --timing -Irtl -Itb tb/tb_bp_fir_array.sv \
        --top-module tb_bp_fir_array -Mdir obj_top -o sim
    ./obj_top/sim

Replace the name to run another testbench. Each simulation finishes in
well under a second.

To build another size, override the parameters of `bp_fir_array`. The
exactness statements above were checked only for the sizes the
testbenches use. For any other size, rerun `tb_bp_fir_array` with its
localparams changed to match.

- `tb_bp_fir_array`: the filter at its default size. It runs 20,000
  samples: random data, impulses, and both full-scale extremes, with 50
  coefficient sets. Every output's low 11 bits are checked at the exact
  latency. The testbench counts negative results, sum-MSB copies,
  final-adder carry-outs, coefficient reloads and both extreme results,
  and fails if any of them never happens. It reads a few internal signals
  of the top for these counts.
- `tb_bp_fir_variants`: the smallest array (2 coefficients x 2 bits, all
  coefficient sets) with all 6 bits checked, and the unsigned
  (`SIGN_EXT = 0`) default array with all 13 bits checked.
- `tb_error_significance`: the fault-injection measurement of the error
  significance maps described above. It uses `force` on cell outputs.
- `tb_bit_plane`: one plane with new random inputs every cycle. It checks
  `sum_out + 2*carry_out` modulo 2^9 against the integer sum of the row
  products.
- `tb_bp_cell`, `tb_vma`, `tb_delay_line`: exhaustive or random unit
  checks.
