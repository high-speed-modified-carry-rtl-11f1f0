# Four-operand carry-save adder built from 2-to-1 multiplexers

This design adds four unsigned `WIDTH`-bit numbers, `A + B + C + D`, in one
combinational pass. It uses the classic carry-save structure: two rows of
full adders with no carries between neighbours, then one ripple-carry row.
What sets it apart is the full adder cell. Every full adder, in all three
rows, is made of three 2-to-1 multiplexers and two inverters. It uses no XOR
or AND/OR gates. The aim is a smaller and faster adder, mainly on FPGAs,
where a 2-to-1 multiplexer maps well onto a lookup-table input.

The default size is 64-bit operands. The design was also evaluated at 8 bits,
and any `WIDTH` of 2 or more works.

## The multiplexer full adder (`mux_full_adder`)

The cell is built around the propagate signal `p = x ^ y`. Three multiplexers
make the outputs. Each has inputs `a`, `b`, select `s` and output `y`, and
passes `a` when `s = 0`:

| mux | select | `a` (s=0) | `b` (s=1) | output |
|-----|--------|-----------|-----------|--------|
| M1  | `x`    | `y`       | `~y`      | `p = x ^ y` |
| M2  | `p`    | `cin`     | `~cin`    | `sum`  |
| M3  | `p`    | `x`       | `cin`     | `cout` |

The carry rule needs a word of explanation. If `x == y`, then `p = 0` and the
carry is decided without `cin`: it is 1 exactly when both inputs are 1, which
is `x`. If `x != y`, then `p = 1`, exactly one input is 1, and the carry out
equals the carry in. So a carry arriving at a cell passes through M3 only, one
multiplexer delay. This matters most in the ripple row.

**Departure in M3.** The published block diagram of this cell draws M3 with
`a = p`, `b = x` and select `cin`. Its own equations and truth table give the
table above instead. The drawn version is not a full adder: `x=0, y=1, cin=0`
would give a carry of 1. This RTL follows the equations. The testbench's fault
copy of the cell uses the drawn wiring, and the truth-table test rejects it.

## The four-operand adder (`mux_csa4`)

```
 a  b  c            row 1: csa_row     s1, c1   (c1 weighs twice)
 s1 d  c1<<1        row 2: csa_row     s2, c2   (0 enters at bit 0)
 s2>>1 | c1[W-1]    row 3: ripple_stage with c2, carry in 0
```

Bit by bit, with `W = WIDTH`:

- **Row 1.** Adder `i` adds `a[i]`, `b[i]` and `c[i]`. It gives `s1[i]` and `c1[i]`.
- **Row 2.** Adder `i` adds `s1[i]`, `d[i]` and `c1[i-1]`. A constant 0 takes the
  place of `c1[-1]`. It gives `s2[i]` and `c2[i]`.
- **Output bit 0.** `sum[0] = s2[0]`. Nothing else has weight 1.
- **Row 3.** This is a ripple-carry adder with carry in 0. Its stage `k` has weight
  `2^(k+1)`, for `k = 0 .. W-1`. It adds `c2[k]` and the carry from stage `k-1`.
  The third input is `s2[k+1]`, except at the top stage.
- **The top carry of row 1.** Row 2 has no column for `c1[W-1]`. It goes down
  to the top stage of row 3, where it takes the place of the missing `s2[W]`.
  This wire is easy to lose when the design is changed. The end-to-end tests
  count how often it is 1.
- **The result.** The stages of row 3 give `sum[W:1]`, and the carry out of its
  top stage is `cout`. `{cout, sum}` is the full `W+2`-bit sum. The largest
  possible sum, `4·(2^W − 1)`, fits in `W+2` bits, so nothing overflows.

The two carry-save rows cost two full-adder delays, whatever the width. The
critical path is the ripple row's `W`-long carry chain: one M3 multiplexer per
bit, plus the M1 that computes each bit's `p` ahead of time.

## Modules

| module | what it is | parameters |
|--------|------------|------------|
| `mux_csa4` | top: four-operand adder | `WIDTH` = 64 |
| `csa_row` | `WIDTH` full adders side by side, no carry between them; `x+y+z == s + 2·co` | `WIDTH` = 64 |
| `ripple_stage` | `WIDTH`-bit ripple-carry adder with carry in and carry out | `WIDTH` = 64 |
| `mux_full_adder` | the three-multiplexer full adder | none |
| `mux21` | 2-to-1 multiplexer, `y = s ? b : a` | none |

Ports of the top:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b`, `c`, `d` | in | `WIDTH` | unsigned operands |
| `sum` | out | `WIDTH+1` | bits `WIDTH..0` of the sum |
| `cout` | out | 1 | bit `WIDTH+1` of the sum |

## Timing and interface

The design is fully combinational. It has no clock, no registers and no reset,
and it has no handshake: the outputs follow the inputs after the
combinational delay. To pipeline it, register the operands and `{cout, sum}`
around `mux_csa4`. A register between row 2 and row 3 is the natural cut.

## Choices not fixed by the original description

- **Operand width.** The indices of the generic drawing run to `N`, which
  suggests `N+1` bits. The 8-bit drawing uses bits 7..0 with outputs
  `SUM[8:0]` and `Cout`. The RTL follows the 8-bit drawing: `WIDTH`-bit
  operands give `WIDTH+2` result bits.
- **Signedness.** Operands are unsigned. Signed operands would need the usual
  sign extension, which is not built.
- **The 2-to-1 multiplexer.** Its select polarity was inferred, as described
  above. It is written as a conditional expression, and synthesis chooses the
  gates. On an FPGA, synthesis will normally merge the three multiplexers of a
  cell, and cells next to each other, into lookup tables, so the netlist does
  not keep the multiplexer structure unless you constrain it to.
- **The ripple stage's carry in** is a port, so that the stage can be used on
  its own. The top ties it to 0.
- **Results not reproduced.** The delay, power and logic-element counts
  reported for the original FPGA implementation come from a vendor flow. This
  RTL does not reproduce them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_mux21` | all 8 input combinations |
| `tb_mux_full_adder` | the 8 truth-table rows, for `sum`, `cout` and the internal `p` |
| `tb_csa_row` | per bit, parity and majority; as numbers, `x+y+z == s+2·co` (64 bits, 2005 vectors) |
| `tb_ripple_stage` | `{cout,s} == x+y+cin`, including a carry that runs from bit 0 to `cout` (64 bits) |
| `tb_mux_csa4` | end to end at `WIDTH = 8`, 50,005 vectors |
| `tb_mux_csa4_full` | end to end at the default `WIDTH = 64`, 20,005 vectors |

The end-to-end tests compare `{cout, sum}` with `a+b+c+d` worked out in
`WIDTH+2` bits. They mix random words, all-ones words, all-ones-but-one-bit
words and one-hot words. They also count three events and fail if any of them
never happens:

- the row-1 top carry is 1;
- the ripple row carries through every bit;
- `cout` is 1.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_mux_csa4_full.sv \
          --top-module tb_mux_csa4_full
./obj_dir/Vtb_mux_csa4_full
```

Use the same command for any other testbench, with its name in both places.
To try another width, change `localparam int W` in `tb/tb_mux_csa4.sv`, which
passes it to the adder as `WIDTH`.
