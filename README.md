# Vedic multiply-accumulate unit with a reversible DKG adder

This is a 64-bit multiply-accumulate (MAC) unit in SystemVerilog. The multiplier
uses the *Urdhva Tiryagbhyam* rule of Vedic arithmetic, which means "vertically
and crosswise". It computes the product of two numbers from four smaller
products: the two low halves multiplied together and the two high halves
multiplied together (the vertical products), plus each low half times the other
high half (the crosswise products). Adders then shift these four products into
place and combine them. Applied recursively, this builds a 64x64 multiplier out
of 1024 identical 2x2 cells and a few layers of plain adders. It needs no Booth
recoding, no shifting of partial products and no sequential control.

At the two widest levels of the multiplier, and in the accumulator path, the
adders are made of **DKG gates**. A DKG gate is a 4-input, 4-output reversible
gate: each input pattern gives its own output pattern, so no information is
lost. With one control input tied low, the gate works as a full adder.

```
 a[63:0] ─┐        ┌────────────────────┐  product[127:0]  ┌──────────────────┐ sum[127:0] ┌──────────────────┐
          ├───────►│ 64x64 Vedic        ├─────────────────►│ 128-bit DKG adder├───────────►│ 129-bit          ├──► mac_out[128:0]
 b[63:0] ─┘        │ multiplier         │                  │ (2 x 64-bit)     │  carry     │ accumulator      │
                   └────────────────────┘                  └──────────────────┘───────────►│ (register)       │
                                                                  ▲                        └────────┬─────────┘
                                                                  └──────── mac_out[127:0] ─────────┘
```

## Using the MAC (`vedic_mac`)

| port      | dir | width  | meaning |
|-----------|-----|--------|---------|
| `clk`     | in  | 1      | clock; `a*b` is added on every rising edge |
| `rst`     | in  | 1      | synchronous, active-high clear of the accumulator |
| `a`, `b`  | in  | N      | unsigned operands |
| `mac_out` | out | 2N+1   | `[2N-1:0]` running sum, `[2N]` sticky wrap flag |

The parameter is `N`, the operand width. Its default is 64, and it must be a
power of two.

Timing:

- The unit has one register, the accumulator. Everything else is
  combinational.
- On each rising edge with `rst` low, the accumulator takes
  `mac_out[2N-1:0] + a*b`.
- The product of the operands present at an edge is visible in `mac_out` right
  after that edge, so the latency is one clock.
- There is no enable input. To stop accumulating, hold `a` or `b` at zero.
- To accumulate K products from zero, hold `rst` for one edge, then present one
  operand pair per clock for K clocks.
- After ten clocks with `a = 0x12345678` and `b = 0x78945612`, the unit reads
  `mac_out = 0x55bed11b0507ec60` (ten times the product). The testbenches
  check this example and one other.

The top bit, `mac_out[2N]`, is a sticky flag. The 2N-bit adder sums the
product and the low 2N bits of the accumulator. Its carry-out sets bit 2N, which
then stays set until reset. Only the low 2N bits go back into the adder. So the
running sum wraps modulo 2^(2N), and bit 2N tells you it has wrapped. The
register is 2N+1 bits wide, as in the original block diagram. The rule that bit
2N is sticky is this design's own.

## The recursive multiplier (`vedic_mult`)

This is the core of the design and the least obvious part. To multiply N-bit
numbers, split each operand into halves of H = N/2 bits and form four
products with H x H multipliers:

| name | product        | role                    |
|------|----------------|-------------------------|
| q0   | `a_lo * b_lo`  | vertical, low (weight 1)        |
| q1   | `a_lo * b_hi`  | crosswise (weight 2^H)         |
| q2   | `a_hi * b_lo`  | crosswise (weight 2^H)         |
| q3   | `a_hi * b_hi`  | vertical, high (weight 2^N)     |

Three N-bit adders combine them. The carry out of each adder matters:

1. **Adder 1**: `s1 = q1 + q2`. Its carry out is `ca1`, with weight 2^(N+H).
2. **Adder 2**: `s2 = s1 + {H'b0, q0[N-1:H]}`. This adds the upper half of the
   low product to the crosswise sum. Its carry out is `ca2`.
3. The low N bits of the product come straight out:
   `p[H-1:0] = q0[H-1:0]` and `p[N-1:H] = s2[H-1:0]`.
4. **Adder 3**: `p[2N-1:N] = q3 + {(H-1)'b0, ca1|ca2, s2[N-1:H]}`. This adds the
   upper half of `s2` to the high product, together with the carry of weight
   2^(N+H).

`ca1` and `ca2` are never both 1. If `ca1` is 1, then `s1` is at most
2^N - 2^(H+2) + 2, which leaves room for the H-bit addend without a carry. So
their OR is exactly the carry into bit H of adder 3. The carry out of adder 3 is
always 0, because the product fits in 2N bits.

The recursion stops at `vedic_2x2`, which applies the same rule to single
bits:

- vertically: `q0 = a0&b0`;
- crosswise: a half adder on `a1&b0` and `a0&b1` gives `q1` and a carry;
- vertically again: a half adder on `a1&b1` and that carry gives `q2` and `q3`.

The adder type depends on the level, through the parameter `DKG_FROM`
(default 32):

| level          | adders                                  |
|----------------|-----------------------------------------|
| 4x4, 8x8, 16x16 | ripple-carry adders of full adders (`rca_adder`) |
| 32x32, 64x64    | DKG parallel adders (`dkg_adder`)        |

The 64x64 multiplier therefore holds 1024 2x2 cells, 1008 ripple-carry adders
and 15 DKG adders. Generic gate-level synthesis gives about 31k two-input gates
for the whole MAC, plus 129 flip-flops. Every adder is a ripple adder, so the
critical path runs through the carry chains of all five adder levels and then
the 128-bit accumulator adder. The design saves area, not delay.

## DKG gate and the reversible adder (`dkg_gate`, `dkg_adder`)

The gate's outputs are:

```
P = B
Q = ~A&C | A&~D
R = (A^B)&(C^D) ^ C&D
S = B^C^D
```

- With `A = 0`, `S` is the sum of B, C and D and `R` their carry: a full adder.
- With `A = 1`, `S` is the difference bit of B - C - D and `R` its borrow: a
  full subtractor.
- `P` and `Q` are "garbage" outputs. They keep the mapping reversible and are
  not used.

`dkg_adder` chains WIDTH gates with `A = 0`: bit i takes `B = x[i]`,
`C = y[i]` and `D` = the carry from bit i-1. The default WIDTH is 64. The MAC's
128-bit adder is two such 64-bit adders, with the low adder's carry feeding the
high one's carry input.

Both ripple adders keep each bit's carry in its own generate scope. The chain
is therefore a series of distinct nets, not one vector that depends on itself,
and Verilator does not report false combinational loops.

## Where this design departs from the source

- **Carry out of adder 2.** The source's multiplier diagrams draw only the
  carry of adder 1 (`Ca`) into adder 3. Adder 2 can also carry out, and
  dropping that carry gives wrong products. This design ORs the two carries;
  see above.
- **4x4 and 8x8 levels.** The source draws the 2x2 cell and the 16x16, 32x32
  and 64x64 levels. It describes the 8x8 product as a set of column equations.
  Here the 4x4 and 8x8 levels reuse the four-quadrant scheme. The product is
  the same, and the 8x8 level is checked against all 65,536 operand pairs.
- **Clocking, reset and the top accumulator bit** are this design's choices.
  The source gives only the block diagram and the 129-bit width.
- **Not built:**
  - the 32x32 variants with carry-save and Kogge-Stone adders, which the
    source only compares against;
  - the Booth, array and serial multipliers, which are background only;
  - the 4:2 and 7:2 compressors. They are named as a way to add many bits at
    once, but nothing in the proposed multiplier says where they go or how they
    are built.
- **Operands are unsigned.**

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_half_adder`, `tb_full_adder`, `tb_vedic_2x2`, `tb_dkg_gate` | exhaustive; the DKG test checks adder mode, subtractor mode and that the gate is reversible |
| `tb_rca_adder`, `tb_dkg_adder` | corner cases and 2000 random vectors. The DKG test starts with a published 64-bit example: `ef123fffff8dffff + dffff13fffff32ff + 1 = cf12313fff8d32ff`, carry 1 |
| `tb_vedic_mult` | the 8x8 multiplier exhaustively, including the worked example `10110110 x 11011001 = 1001101001000110`; the 64x64 multiplier on corner cases and 3000 random pairs, many of them mostly ones to force long carries |
| `tb_mac_accumulator` | the load, the reset and the sticky carry bit |
| `tb_vedic_mac` | the full 64-bit MAC at its default size, against a cycle-by-cycle model, as described below |
| `tb_vedic_mac_32` | the MAC with N = 32 on the same two examples, checking the exact 64-bit results |

`tb_vedic_mac` runs these cases:

- the two ten-clock examples: `0x12345678 x 0x78945612 -> 0x55bed11b0507ec60` and
  `305419896^2 -> 932813128726508160`;
- 2000 clocks of random operands, some of them large;
- resets in the middle of a run;
- maximum operands, which make the sum wrap.

It also counts how often carries crossed between the two 64-bit adder halves,
how often the sum wrapped, and how many resets it applied. It fails if any of
these never happened.

`vedic_mult` also holds two assertions, active in simulation with `--assert`:
the carries `ca1` and `ca2` are never both set, and adder 3 never carries out.

Each testbench was also run against a copy of its module with one deliberate
fault, such as a dropped carry or a cut carry chain, and every one of them
failed.

Simulating with Verilator, for example the MAC:

```
verilator --binary --timing --assert -Irtl -y rtl tb/tb_vedic_mac.sv --top-module tb_vedic_mac
./obj_dir/Vtb_vedic_mac
```

The `-y rtl` option lets Verilator find each submodule in `rtl/<name>.sv`. All
the testbenches together run in a few seconds.

## Known lint messages

- Verilator reports the unused garbage outputs (`P`, `Q`) of the DKG gates.
- When `vedic_mult` is linted alone as the top, Verilator also reports
  `q0..q3` as undriven. This comes from how Verilator handles a module that
  instantiates itself, and the module's header comment explains it. The
  message does not appear when `vedic_mult` is linted inside `vedic_mac`.

## Files

`rtl/`, one module per file:

- `vedic_mac` (top)
- `mac_accumulator`
- `vedic_mult`
- `vedic_2x2`
- `dkg_adder`
- `dkg_gate`
- `rca_adder`
- `full_adder`
- `half_adder`

`tb/` has a `tb_<module>` testbench for each module, plus `tb_vedic_mac_32`.
