# A 32-bit ALU with a Vedic multiplier, and the adders around it

This design is a combinational 32-bit ALU. Its main feature is a 32x32
multiplier built the Vedic way, by *Urdhva-Tiryagbhyam* ("vertically and
crosswise"). Each operand is cut in half. The four half-size products are
formed in parallel: lo·lo, hi·hi, hi·lo and lo·hi. They are then added with
one carry-save row and a parallel-prefix adder. Each half-size product is
built the same way, down to a 2x2 multiplier of AND gates and half adders. So
the whole multiplier is a regular tree of identical stages, and its depth grows
with log2 of the width.

The ALU sits beside a family of adders that share one full adder cell:

- ripple carry
- carry increment
- carry bypass
- a 16-bit adder made of rippled 4-bit look-ahead blocks
- Brent-Kung and Kogge-Stone prefix adders
- two 8-bit carry select adders

The design also has a small built-in test setup. A bit-swapping LFSR feeds
patterns to three 8-bit adders under test.

Everything is plain synthesizable SystemVerilog. The only flip-flops are the
16 bits of the LFSR.

## Parts and hierarchy

```
vedic_alu_top
├── alu32                      32-bit ALU, 11 operations, 64-bit result
│   ├── arith_unit             add / subtract / multiply
│   │   ├── rca (32)           addition: ripple chain of full_adder cells
│   │   ├── subtractor (32)    a + ~b + 1 on an rca
│   │   └── vedic_mul32        ─┐
│   │       ├── vedic_mul16 x4   │ each level: four half-size multipliers
│   │       │   └── vedic_mul8 x4│ + one vedic_combine
│   │       │       └── vedic_mul4 x4
│   │       │           └── vedic_mul2 x4 (AND gates + half_adder)
│   │       └── vedic_combine  3:2 carry-save row + 64-bit prefix adder
│   │                          (brent_kung_adder or kogge_stone_adder)
│   └── logic_unit             AND OR XOR NAND NOR XNOR NOT BUF
├── rca (32)                   ripple carry adder
├── cina (32)                  carry increment adder: 4 x rca(8) + 3 x increment_circuit
├── cbya (32)                  carry bypass adder: 4 x rca(8) with skip multiplexers
├── cla_ripple (16)            4 x cla4, carries rippled
└── lfsr_adder_bench           bs_lfsr (16) driving rca(8), csla_fa(8), csla_bec_ks(8)
                               csla_bec_ks = kogge_stone_adder x2 + bec
```

`alu_pkg` holds the shared enums:

- `fa_style_e` is the full adder cell style.
- `adder_kind_e` is the prefix network used in the multiplier.
- `arith_op_e`, `logic_op_e` and `alu_op_e` are the opcodes.

The three parts of the top do not interact. Each has its own ports:

- The ALU has its own operand ports.
- The four 32/16-bit adders share one set of operand ports. This makes it easy
  to compare them.
- The LFSR test setup has its own clock-driven outputs.

## The Vedic multiplier

### One level

Let `N` be the width and `H = N/2`. `vedic_combine` receives the four H·H
products `ll`, `hl`, `lh` and `hh`. Each is N bits wide. It forms three
2N-bit terms:

```
x = {hh, ll}                      vertical products, side by side
y = {0^H, hl, 0^H}                crosswise product, shifted by H
z = {0^H, lh, 0^H}                crosswise product, shifted by H
```

The two vertical products never overlap, so they fit in one term. That leaves
three terms to add, not four.

One row of 3:2 carry-save cells reduces the three terms to a sum vector and a
carry vector:

- `s = x^y^z`
- `c = maj(x,y,z) << 1`

This is the "Wallace" step. A single 2N-bit prefix adder then gives `p = s +
c`. The carry out of the top bit is always 0, because an N x N product fits in
2N bits.

`ADDER` chooses the prefix network for every level at once:

- `ADD_BRENT_KUNG` is the default. It has about 2·log2(2N) levels and few
  cells.
- `ADD_KOGGE_STONE` has log2(2N) levels and the most cells and wires.

In synthesis at 32 bits, the whole Brent-Kung multiplier is about 5.7k
word-level cells. Most of them sit in the 256 2x2 leaves and 64 4x4 stages.

### The levels

There is one module per size: `vedic_mul4`, `vedic_mul8`, `vedic_mul16` and
`vedic_mul32`. They are not a single self-instantiating module. Each is four
instances of the next smaller size plus one `vedic_combine`. The leaf
`vedic_mul2` computes:

```
p0 = a0·b0
{c1, p1} = a1·b0 + a0·b1          half adder
{p3, p2} = a1·b1 + c1             half adder
```

All four products of a level are independent. So the critical path is one
2x2 leaf, then one combine stage per level: a carry-save cell plus a prefix
adder of 8, 16, 32 and then 64 bits. There is no long chain of partial-product
rows as in an array multiplier.

The operands are unsigned. The product is exact, at 64 bits for 32x32.

## The ALU

`alu32` has this interface:

```
a, b : 32-bit operands
op   : 4-bit alu_op_e
y    : 64-bit result
flag : 1-bit flag
```

That makes 133 port bits. All of it is combinational. A result is valid one
propagation delay after the inputs settle.

| op  | name    | y                        | flag               |
|-----|---------|--------------------------|--------------------|
| 0x0 | OP_ADD  | {32'b0, a + b}           | carry out          |
| 0x1 | OP_SUB  | {32'b0, a − b}           | borrow (a < b)     |
| 0x2 | OP_MUL  | a · b (64 bits)          | 0                  |
| 0x8 | OP_AND  | {32'b0, a & b}           | 0                  |
| 0x9 | OP_OR   | {32'b0, a \| b}          | 0                  |
| 0xA | OP_XOR  | {32'b0, a ^ b}           | 0                  |
| 0xB | OP_NAND | {32'b0, ~(a & b)}        | 0                  |
| 0xC | OP_NOR  | {32'b0, ~(a \| b)}       | 0                  |
| 0xD | OP_XNOR | {32'b0, ~(a ^ b)}        | 0                  |
| 0xE | OP_NOT  | {32'b0, ~a}              | 0                  |
| 0xF | OP_BUF  | {32'b0, a}               | 0                  |

How `op` is decoded:

- Bit 3 picks the logical unit. Its bits 2:0 are the `logic_op_e`.
- With bit 3 clear, bits 1:0 are the `arith_op_e`.
- Codes 0x3 to 0x7 are not in the set. Code 0x3 gives 0. Codes 0x4 to 0x6
  repeat add, subtract and multiply.

The arithmetic unit computes all three results in parallel and selects one:

- Addition uses a 32-bit ripple chain of full adder cells.
- Subtraction uses a second chain on `~b` with carry-in 1.
- Multiplication uses `vedic_mul32`.

`arith_unit` and `alu32` take a `WIDTH` parameter. It may be 32, 16, 8 or 4,
the sizes for which a multiplier level exists.

## The adders

### Full adder cell

`full_adder` has two styles with the same truth table:

- `FA_CONV` computes `sum = a^b^cin` and `cout = majority(a, b, cin)`. It uses
  two XOR gates.
- `FA_MUX` is the modified cell. It uses a single XOR, `p = a^b`, and two 2:1
  multiplexers: `sum = p ? ~cin : cin` and `cout = p ? cin : a`.

`FA_MUX` is the default everywhere. Every adder built from full adder cells
(`rca`, `cina`, `cbya`, `csla_fa`, `subtractor`) has a `STYLE` parameter, so
the two cells can be compared in the same adder.

### Carry increment adder (`cina`)

The 32 bits are split into four 8-bit ripple blocks:

- Block 0 gets the real carry-in.
- Blocks 1 to 3 get carry-in 0. So all four blocks add at the same time.
  Each gives a temporary sum `sum1` and a temporary carry `cy`.
- Each higher block then has an `increment_circuit`. It is a chain of 8 half
  adders that adds the carry `c[k]` of the block below to `sum1`.
- The block's carry-out is `c[k+1] = chain_carry | cy`.

The OR is exact, because the two terms cannot both be 1. If an 8-bit block
produces `cy = 1`, its sum is at most `0xFE`. Adding 1 to that cannot carry.

The slow path is therefore one 8-bit ripple, followed by three 8-bit
half-adder chains.

### Carry bypass adder (`cbya`)

This uses four 8-bit ripple blocks. Each block also computes `skip`, the AND of
its 8 propagate bits. When every bit propagates, a 2:1 multiplexer passes the
block's carry-in straight to its carry-out. Otherwise the ripple carry-out is
used, and in that case it does not depend on the carry-in. The block size of 8
is a choice made here, to match the carry increment adder.

### Look-ahead (`cla4`, `cla_ripple`)

`cla4` writes its four carries as two-level sums of products of `g`, `p` and
`cin`. `cla_ripple` chains `WIDTH/4` of them (16 bits by default), with
rippled carries between blocks. Look-ahead is kept to 4 bits because the fan-in
grows with every further bit.

### Prefix adders

Both prefix adders fold the carry-in into bit 0's generate.

- `brent_kung_adder` is written as an up-sweep followed by a down-sweep in one
  `always_comb`. Use it with power-of-two widths.
- `kogge_stone_adder` is a generate array of `log2(WIDTH)` levels.

### Carry select adders (8 bits)

Both split the word into two 4-bit halves. The low half's carry-out then
selects the high half's result.

- `csla_fa` computes the high half twice with ripple adders, once with
  carry-in 0 and once with carry-in 1.
- `csla_bec_ks` uses Kogge-Stone adders. It computes the high half only with
  carry-in 0. A binary to excess-1 converter (`bec`, which computes x+1 with
  no adder) forms the carry-in-1 result from it. This is the fastest of the
  8-bit adders in the original comparison.

## Bit-swapping LFSR test setup

`bs_lfsr` is a 16-bit Fibonacci LFSR. It shifts towards the MSB on every clock
where `en` is high, with polynomial x^16+x^14+x^13+x^11+1. The sequence has
the maximal period of 65535, and the testbench checks this.

The last stage `q[15]` drives a row of 2:1 multiplexers:

- When `q[15]` is 0, the output pairs (1,0), (3,2) … (13,12) are swapped.
- When `q[15]` is 1, the bits pass straight.

The goal of the swap is fewer bit transitions between patterns, and so less
switching power in the circuit under test.

`lfsr_adder_bench` feeds the patterns to three adders:

- `pattern[7:0]` and `pattern[15:8]` are the addends.
- The LFSR's feedback bit is the carry-in.

Each adder returns a 9-bit `{cout, sum}`. The reset is asynchronous, active
low, and loads the seed `16'hACE1`. The pattern changes on the clock edge
where `en` is high, and the sums follow combinationally.

## How far to trust it, and where it departs from the source

These parts follow the original description closely:

- the operation set of the ALU
- the Vedic multiplier built from the 2-bit to 32-bit levels and Brent-Kung
  adders
- the carry increment adder: its 8-bit ripple blocks, carry-in 0 for the upper
  blocks, half-adder increment circuits, and the OR of carries
- the rippled 4-bit CLAs
- the 16-bit bit-swapping LFSR with 2:1 multiplexers
- the 8-bit adder comparison setup

These choices are this design's own, where the description says nothing:

- The opcode encoding, the 4-bit opcode and the `flag` output. They were
  chosen so that the ALU's port count is 133 bits, which equals the I/O count
  reported for the original implementation.
- A 64-bit result, so that the full product is kept.
- "Wallace" is read as one 3:2 carry-save row. The final adder is 2N bits
  wide.
- Addition uses the ripple "full adder" and not a prefix adder. Prefix adders
  appear only inside the multiplier.
- Brent-Kung is the default adder in the multiplier. Its adders are described
  both as Brent-Kung and as Kogge-Stone, so `ADDER` offers both.
- The internals of the carry bypass adder, and its 8-bit block.
- The 4+4 split of the carry select adders.
- For the LFSR: the polynomial, the swap rule, the seed and the reset style.
  Using the feedback bit as the adders' carry-in is also a choice.
- The MUX arrangement inside the one-XOR full adder.
- Sharing the adder operands in the top.

These parts are not included:

- A 32x32 divider. It appears in the original only by name, with no
  algorithm, operand format or outputs.
- Floating-point arithmetic. No format or datapath is described.
- The transistor-level full adder styles (pass-transistor and 2-T logic).
  Their logic function is the full adder cell above.

Timing numbers, LUT counts and delays of the original FPGA implementation are
not reproduced. The RTL is technology-independent.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one:

- compares against values computed with the simulator's own operators, or
  with an independent model of the LFSR
- prints `TB_RESULT checks=N failures=M`
- has a watchdog

Build and run one testbench with Verilator 5, from the folder that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/alu_pkg.sv \
          tb/tb_vedic_alu_top.sv --top-module tb_vedic_alu_top -Mdir obj
./obj/Vtb_vedic_alu_top
```

`tb_vedic_alu_top` runs the whole design at its default sizes, in three
threads:

- 1500 ALU operations covering every opcode, including 20 x 10 = 200
- 1500 additions on all four stand-alone adders, every fourth one an
  all-propagate word
- 3000 LFSR patterns through the three 8-bit adders

It counts how often each mechanism occurred and fails if any never did:

- every opcode
- an add carry
- a subtract borrow
- a carry crossing a whole increment block
- a bypassed block
- swapped and straight patterns
- an 8-bit carry

The multiplier and adder testbenches check both full adder styles or both
prefix networks. The multiplier testbenches use random operands plus corner
cases. The 4x4 multiplier is checked exhaustively. `tb_bs_lfsr` checks the
generator cycle by cycle against a model and measures its period.

## Changing it

- For another ALU width, set `WIDTH` on `alu32` to 4, 8, 16 or 32.
- To use the Kogge-Stone network in the multiplier, set
  `.ADDER(alu_pkg::ADD_KOGGE_STONE)` on `vedic_mulN`.
- To build an adder from the conventional cell, set
  `.STYLE(alu_pkg::FA_CONV)`.
- `cina` and `cbya` take `WIDTH` and `BLOCK`. `WIDTH` must be a multiple of
  `BLOCK`.
- `cla_ripple` takes `WIDTH`, a multiple of 4.
- `bs_lfsr` takes `WIDTH`, `SEED` and `TAPS`. `TAPS` is a mask of the stages
  XORed into the feedback. Give it a maximal-length polynomial for any new
  width.
