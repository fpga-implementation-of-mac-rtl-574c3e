# Vedic multiply-accumulate unit

A multiply-accumulate (MAC) unit computes `acc <= acc + a*b` once per clock.
Its speed is set almost entirely by the multiplier. This design builds the
multiplier by the Urdhva Tiryagbhyam ("vertically and crosswise") rule of
Vedic arithmetic. An N x N product is assembled from four N/2 x N/2 products,
each built the same way, down to 2 x 2 multipliers. All partial products
are formed in parallel, and the tree grows regularly with the operand width.
The accumulate adder is a ripple adder made of DKG reversible gates.

Default configuration, as published: 64-bit unsigned operands, a 64 x 64
Vedic multiplier, a 128-bit DKG adder and a 128-bit accumulator register.

```
   a[63:0]   b[63:0]
      |         |
  +---v---------v---+
  | vedic_mul (64)  |  combinational
  +--------+--------+
           | product[127:0]
  +--------v--------+
  | dkg_adder (128) |<------------+
  +--------+--------+             |
           |                      |
  +--------v--------+             |
  | accumulator(128)|-------------+---> mac_output[127:0]
  +-----------------+
```

## The multiplier tree

### The 2 x 2 leaf (`vedic2`)

The leaf applies the rule directly with four AND gates and two half adders:

- the vertical product `a0b0` is bit 0;
- the two crosswise products `a1b0` and `a0b1` go into half adder HA1, which gives bit 1 and a carry;
- the vertical product `a1b1` and that carry go into half adder HA2, which gives bits 2 and 3.

### One level up (`vedic_combine`)

Split both N-bit operands into halves of H = N/2 bits. Four sub-products are
needed:

| name | product | kind |
|------|---------|------|
| q0 | aL x bL | vertical, low |
| q1 | aH x bL | crosswise |
| q2 | aL x bH | crosswise |
| q3 | aH x bH | vertical, high |

Then `a*b = q3*2^N + (q1 + q2)*2^H + q0`. The combining stage works as follows:

1. **Low quarter.** `q0[H-1:0]` is already final and becomes `sum[H-1:0]`.
2. **Middle term.** Three numbers overlap at weight 2^H: `q1`, `q2` and the
   upper half of `q0`. A 3:2 carry-save adder reduces them to a sum vector
   and a carry vector, with no carry propagation. A Kogge-Stone
   parallel-prefix adder then resolves the pair into the (N+1)-bit middle
   term `m`, which is always below 2^(N+1). Its low H bits become
   `sum[N-1:H]`.
3. **High half.** A second Kogge-Stone adder adds `m[N:H]` to `q3` and gives
   `sum[2N-1:N]`.

Both Kogge-Stone adders have a carry-out port. It is always 0, because the
exact results fit the adder widths, so it is left unconnected.

The published design specifies a carry-save adder for this combination, with
its final adder stage replaced by a Kogge-Stone adder. How the carry-save
stage and the two additions are divided into bit ranges is this
implementation's own reading of that structure.

### The whole tree (`vedic_mul`)

For N = 64 the tree has six levels:

- 1024 `vedic2` leaves;
- then 256, 64, 16, 4 and 1 `vedic_combine` stages, at sizes 4, 8, 16, 32 and 64 bits.

The module builds the tree level by level in a generate loop, not by a module
instantiating itself. Level k works on operand blocks of S = 2^k bits. It
holds the products `p[i][j] = a[S*i +: S] * b[S*j +: S]`. Each stage at
level k reads four products of level k-1:

- `q0 = p[2i][2j]`
- `q1 = p[2i+1][2j]`
- `q2 = p[2i][2j+1]`
- `q3 = p[2i+1][2j+1]`

The instances are exactly those of the recursive description. N must be a
power of two and at least 2.

## The accumulate adder (`dkg_gate`, `dkg_adder`)

A DKG gate is a reversible 4-in/4-out gate: every input pattern maps to a
distinct output pattern. With its first input `a` tied to 0 it acts as a full
adder:

```
p = b                    (garbage)
q = c                    (garbage)
r = b(c^d) ^ cd = carry
s = b ^ c ^ d   = sum
```

`dkg_gate` implements the complete gate. For `a = 1` it uses the standard
DKG equations `q = a'c + ad'` and `r = (a^b)(c^d) ^ cd`. This design never
uses that case.

`dkg_adder` chains W such gates as a ripple-carry adder:

- bit i receives `0, x[i], y[i], carry[i]`;
- `r` carries into bit i+1 and `s` is the sum bit;
- the two garbage outputs of each gate stay unconnected.

In the MAC the adder is 128 bits wide. Its carry in is 0 and its carry out
is unused.

Note on logic: these are ordinary CMOS gates that compute the DKG function.
Synthesis flattens them like any other logic. Whatever the gate's low-power
argument is, it does not carry over to a standard-cell or FPGA
implementation.

## Timing and control (`accumulator`, `vedic_mac`)

- **Throughput.** One product is accumulated per clock. The multiplier and
  the adder are combinational. `a` and `b` must therefore settle a full
  multiply-plus-add delay before the rising edge.
- **Latency.** The product of the inputs present at an edge appears on
  `mac_output` just after that edge. With `a` and `b` held, `k` edges after
  reset give `mac_output = k*a*b`. For example, `a = 28, b = 18` gives 504,
  1008, 1512, ... and 4032 after 8 clocks.
- **Reset.** `reset` is synchronous and active high. It clears the sum to 0.
- **Overflow.** The 128-bit sum wraps modulo 2^128. No overflow flag exists.

Ports of `vedic_mac #(N = 64)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, rising edge |
| reset | in | 1 | synchronous clear, active high |
| a | in | N | multiplicand, unsigned |
| b | in | N | multiplier, unsigned |
| mac_output | out | 2N | accumulated sum of products |

The unit was also characterised at operand widths of 2, 4, 8, 16 and 32
bits. Setting `N` to one of these builds that smaller MAC. All internal
widths follow from N.

## Where this design departs from, or fills in, the published one

- **No pipeline.** Pipelining the multiplier is mentioned as a goal, but no
  pipeline stages are specified. The multiplier here is fully combinational.
- **Reset.** The reset polarity and its synchronous behaviour are this
  design's choice.
- **First result.** The first product appearing one edge after reset is
  released is this design's choice.
- **128 x 128 size.** A 128 x 128 multiplier is mentioned in passing. The
  main configuration is 64 x 64 operands with a 128-bit accumulator, and that
  is the default. `N = 128` elaborates but has not been simulated.
- **Half adder and adder internals.** The half adder and the 3:2 carry-save
  adder are the textbook circuits. The Kogge-Stone adder is the textbook
  radix-2 prefix network.
- **Signedness.** Operands are unsigned. Signed operation is not described.
- **FPGA figures.** The published delay figures for a Spartan-3 FPGA
  (7.3 ns at 2 bits up to 46.7 ns at 64 bits) are not modelled or
  reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and includes a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_dkg_gate` | all 16 inputs; checks reversibility (all outputs distinct) and full-adder behaviour |
| `tb_half_adder`, `tb_vedic2` | exhaustive |
| `tb_carry_save_adder` | W = 4 exhaustive, W = 64 random; checks `x+y+z == s + 2c` |
| `tb_kogge_stone_adder` | W = 8 exhaustive with carry in; W = 1; W = 65 and 128 random plus full carry chains |
| `tb_dkg_adder` | 4 bits exhaustive; 128 bits random plus full carry ripple |
| `tb_vedic_mul` | N = 4 and 8 exhaustive; N = 16, 32 and 64 random plus 0, 1 and all-ones |
| `tb_accumulator` | load every edge, synchronous reset with non-zero data |
| `tb_vedic_mac` | full 64-bit default; see below |
| `tb_vedic_mac_widths` | N = 2, 4, 8, 16 and 32 side by side against a reference, with resets and wrap-around |

`tb_vedic_mac` runs the design at its defaults in three phases:

1. the `28 x 18` sequence, checked clock by clock;
2. 400 clocks of random operands with resets in between;
3. all-ones operands, so the 128-bit sum wraps.

It counts resets, accumulations and wrap-arounds, and fails if any of them
never occurred. Each testbench was also run against a deliberately broken
copy of its module, and each one detected the fault.

## Simulating

Verilator 5 compiles any testbench directly. Every module lives in a file of
its own name, so `-y rtl` finds them:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl tb/tb_vedic_mac.sv --top-module tb_vedic_mac -Mdir obj_mac
./obj_mac/Vtb_vedic_mac
```

The 64-bit tree holds several thousand module instances (1024 leaves, 341 combining stages and their adders). Verilator needs about a minute
to build it and a fraction of a second to run the test. `tb_vedic_mac_widths`
builds five MACs and takes a few minutes to compile.

## Files

| file | content |
|------|---------|
| `rtl/vedic_mac.sv` | top: multiplier, adder, accumulator |
| `rtl/vedic_mul.sv` | N x N multiplier tree |
| `rtl/vedic_combine.sv` | one tree level: carry-save adder + Kogge-Stone adders |
| `rtl/vedic2.sv`, `rtl/half_adder.sv` | 2 x 2 leaf and its half adder |
| `rtl/carry_save_adder.sv` | 3:2 compressor |
| `rtl/kogge_stone_adder.sv` | parallel-prefix adder |
| `rtl/dkg_gate.sv`, `rtl/dkg_adder.sv` | reversible gate and the ripple adder built from it |
| `rtl/accumulator.sv` | accumulator register |
