# Multiplexer-based unsigned multipliers (8x8 and 12x12)

An unsigned multiplication X * Y is the sum of X shifted to the position of
every 1 bit of Y. This design takes the bits of Y two at a time. A 2-bit digit
of Y can only be worth 0, 1, 2 or 3 times X. So each digit drives the select
lines of a 4x1 multiplexer, and that multiplexer picks one of four values
computed once for all digits: 0, X, 2X or 3X. The multiplexer outputs are the
partial products, each already worth digit * X. A small tree of adders then sums
them at their bit weights.

All multiplexers switch in parallel, so every partial product is ready after one
multiplexer delay. An array multiplier instead forms and adds one partial-product
row per bit of Y. Here, half as many partial products reach the adders, and the
only extra arithmetic is the one adder that forms 3X.

Two sizes are provided:

| module         | operands | multiplexers | multiplexer width | adders                                  | product |
|----------------|----------|--------------|-------------------|-----------------------------------------|---------|
| `multi_8_mux`  | 8 x 8    | 4            | 10 bits           | 3X adder, 2 pair adders, 1 final adder  | 16 bits |
| `multi_12_mux` | 12 x 12  | 6            | 14 bits           | 3X adder, 3 pair adders, 1 final 3-input adder | 24 bits |

Both are purely combinational. They have no clock, no registers and no reset.
The result follows the inputs after the combinational delay.

## The four multiples (`multiple_gen`)

The multiplexer inputs for select codes 00, 01, 10 and 11 are:

- **00 → 0.** The input is tied to zero.
- **01 → X.** X is padded with two zero MSBs.
- **10 → 2X.** This is X with a zero appended as LSB, which is wiring only.
- **11 → 3X.** One binary adder adds the (N+1)-bit operands `{0,X}` and
  `{X,0}` into an (N+2)-bit sum.

N+2 bits hold 3X for any N-bit X (3 * 255 = 765 < 1024 and 3 * 4095 = 12285 <
16384). That is why the multiplexers are 10 bits wide for N = 8 and 14 bits
wide for N = 12. The 3X adder is shared by every multiplexer. It is the only
adder in front of the multiplexers.

Each multiplier also brings 2X out on port `D` (9 bits for 8x8, 13 bits for
12x12). It shows the doubled multiplicand as an observable field. Because 2X is
pure wiring, synthesis reports `D` as wired straight to `X`.

## Summing the partial products: bit positions

This is the part that is easy to get wrong. Multiplexer *i* handles digit
`Y[2i+1:2i]`, so its output has weight 4^i. The adders pair the multiplexers
and shift within each pair, never by more than the adder can hold.

**8x8 (`multi_8_mux`)**, with multiplexer outputs m0..m3 of 10 bits each:

```
pair0 = {000, m0} + {0, m1, 00}          13-bit adder  (m0 in bits 9:0, m1 in bits 11:2)
pair1 = {000, m2} + {0, m3, 00}          13-bit adder
S     = {000, pair0} + {pair1[11:0], 0000}   16-bit adder
```

A pair sum is at most 3X + 4 * 3X = 15 * 255 = 3825, so bit 12 of a pair sum
is always zero. Pair 1 is cut to 12 bits before it is shifted by four, and
nothing is lost.

**12x12 (`multi_12_mux`)**, with multiplexer outputs m0..m5 of 14 bits each:

```
pair_k = {000, m(2k)} + {0, m(2k+1), 00}     17-bit adders, k = 0, 1, 2
S      = pair0 + (pair1 << 4) + (pair2[15:0] << 8)   24-bit three-operand adder
```

Here a pair sum is at most 15 * 4095 = 61425 < 2^16, so again the top bit of
a pair sum is always zero.

## Modules

All modules are in `rtl/`, one per file.

| file               | contents |
|--------------------|----------|
| `mux_mult_pkg.sv`  | `sel_e` enumeration of the select codes (`SEL_ZERO`, `SEL_X1`, `SEL_X2`, `SEL_X3`) and `num_digits(n)`, the number of 2-bit digits of an n-bit operand |
| `mux4x1.sv`        | 4x1 multiplexer: `sel` (type `sel_e`), `data_in[4]`, `data_out`; parameter `WIDTH` (default 10) |
| `multiple_gen.sv`  | X → x1 = X, x2 = 2X, x3 = 3X, all N+2 bits; parameter `N` (default 8) |
| `binary_adder.sv`  | `sum = a + b` modulo 2^WIDTH; parameter `WIDTH` (default 13, the 8x8 pair adder) |
| `adder3.sv`        | `sum = a + b + c` modulo 2^WIDTH; parameter `WIDTH` (default 24) |
| `multi_8_mux.sv`   | 8x8 multiplier, ports `X[7:0]`, `Y[7:0]`, `D[8:0]`, `S[15:0]` |
| `multi_12_mux.sv`  | 12x12 multiplier, ports `X[11:0]`, `Y[11:0]`, `D[12:0]`, `S[23:0]` |
| `mux_mult_top.sv`  | both multipliers side by side: `x8, y8 → d8, s8` and `x12, y12 → d12, s12` |

The two multipliers share no logic. The top simply places them next to each
other.

## Choices made in this implementation

The architecture fixes the following, and the RTL keeps to it:

- the 0 / X / 2X / 3X multiplexer inputs;
- the widths of the multiplexers and of the 8x8 adders;
- the number of multiplexers and adders for each size;
- the bit positions of the 8x8 tree.

Beyond that, the RTL makes these choices of its own:

- **Adders are behavioural.** They are written as `+`, and synthesis picks the
  carry structure. No particular adder type (ripple, carry-lookahead) is
  implied.
- **The last 12x12 adder takes three operands.** The 12x12 version has three
  pair adders and "one more" adder to finish the sum. With three pair sums left,
  that adder is built as a single three-operand adder. Synthesis may turn it
  into a carry-save stage plus one adder.
- **The 12x12 tree follows the 8x8 pattern.** No block diagram exists for the
  12x12 version. Its multiplexer pairing and bit positions repeat the 8x8
  pattern.
- **Operands are unsigned.** No signed (two's-complement) mode is provided.
- **`D` is 2X.** The doubled multiplicand is the value shown in the reference
  simulation, for example D = 26 for X = 13.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_mux4x1`        | all four select codes with random data, at 10 and 14 bits |
| `tb_multiple_gen`  | every X for N = 8 and N = 12: x1 = X, x2 = 2X, x3 = 3X |
| `tb_binary_adder`  | carry-chain corner cases and random operands, at 13 and 16 bits |
| `tb_adder3`        | corner cases, random operands, and operands shaped like the 12x12 pair sums |
| `tb_multi_8_mux`   | the eight reference operand pairs (13x11 = 143 … 255x255 = 65025), then all 65,536 operand pairs |
| `tb_multi_12_mux`  | the eight reference pairs (12x661 = 7932 … 4095x4095 = 16769025); every Y against edge values of X and the reverse; 300,000 random pairs |
| `tb_mux_mult_top`  | both multipliers at once at default configuration: reference pairs, directed and 50,000 random pairs (details below) |

`tb_mux_mult_top` also counts, for each of the 10 multiplexers, how often it
took each of its four select cases. A case that never occurs counts as a
failure. It likewise checks that products reaching the top result bit occur.

Expected values always come from integer multiplication inside the testbench,
never from the design. Each testbench was also run against a deliberately broken
copy of its module and reported failures. The faults were:

- a wrong multiplexer leg;
- 2X instead of 3X;
- an adder that drops its carries;
- a missing third operand;
- a wrong shift in the tree;
- a miswired top.

What is not verified: timing and area. The reference results for this
architecture were measured on an FPGA. No timing or resource figure is claimed
for this RTL.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -y rtl -y tb rtl/mux_mult_pkg.sv tb/tb_multi_8_mux.sv \
          --top-module tb_multi_8_mux -o sim
./obj_dir/sim
```

Replace `tb_multi_8_mux` with any other testbench name. The package must be
listed first. Verilator finds every other module through `-y`. Each testbench
finishes in well under a second of wall time.

## Changing the size

`multiple_gen`, `mux4x1`, `binary_adder` and `adder3` are parameterized. The two
multipliers, however, spell out their own adder trees, because the 8-bit and
12-bit trees differ in the last stage.

To build another even size N, copy `multi_12_mux` and set:

- `N`;
- the multiplexer width N+2;
- the pair width N+5;
- one pair adder per two multiplexers;
- a final adder that sums pair k shifted left by 4k.

Check the pair-sum bound (15 * (2^N - 1) < 2^(N+4)) before cutting a pair sum.
