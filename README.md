# WCBM: a 64-bit Wallace-tree, carry-save, radix-8 Booth multiplier

This is a 64 x 64 -> 128-bit unsigned integer multiplier. It is built to be a
fast multiplication unit inside public-key crypto coprocessors (RSA, ECC and
similar). It gets its speed from three ideas, one per clocked phase:

1. **Radix-8 Booth recoding** splits the multiplier operand into 3-bit digits
   in the range -4..+4. A 64-bit operand then needs 22 partial products
   instead of 64.
2. **A Wallace tree of carry-save adders (CSAs)** adds the 22 partial products
   in 7 levels of full adders. There is no carry propagation until the end:
   the tree's output is a redundant pair of vectors, a sum and a carry.
3. **A Kogge-Stone adder (KSA)** turns that pair into the ordinary 128-bit
   product in log2 time.

Each phase has registers at its end, so the clock period is set by the
slowest single phase. A small finite-state machine steps through the
phases. The architecture, its block names and its sizes (22 partial
products, a 7-level tree, 128-bit vectors, the port list) follow the paper
*"Radix-8 Design Alternatives of Fast Two Operands Interleaved Multiplication
with Enhanced Architecture"*. That paper calls the design WCBM.
The handshake, the encodings and other details the paper leaves open are
choices made here; they are listed in
[Where this RTL goes beyond the paper](#where-this-rtl-goes-beyond-the-paper).

## Interface and timing

`booth_mul #(N = 64)`:

| port     | dir | width | meaning                                             |
|----------|-----|-------|-----------------------------------------------------|
| `clk`    | in  | 1     | clock, all registers on the rising edge             |
| `reset`  | in  | 1     | synchronous, active high; clears the FSM and `sum`  |
| `enable` | in  | 1     | start request; keep it high to hold the result      |
| `x`      | in  | N     | multiplicand (unsigned)                             |
| `y`      | in  | N     | multiplier, the operand that is Booth-recoded       |
| `sum`    | out | 2N    | product `x * y`                                     |
| `ack`    | out | 1     | `sum` is valid                                      |
| `ready`  | out | 1     | idle; a new operation may start                     |

One operation:

```
edge            E0          E1          E2          E3          E4 ...
state      SET_RESET   BOOTH_MUL   CSA_TREE      KSA        OUTPUT   OUTPUT ...
ready          1           0           0           0           0
enable     1 (sampled)     x           x           x        keep 1 to hold
register   x,y captured  22 PPs      vs,vc        sum
ack            0           0           0           0           1        1
```

* When `ready` is high, raising `enable` starts an operation. `x` and `y`
  are captured on that edge (E0), so the operand pins are free afterwards.
* `ack` goes high three clocks after the accepting edge, with `sum` valid.
* While `enable` stays high the unit stays in `OUTPUT`: `ack` stays high and
  `sum` is held. When `enable` goes low, the unit returns to `SET_RESET` on the
  next edge and `ready` rises. `sum` keeps the old product until the next
  operation writes over it.
* `reset` aborts an operation from any state. It clears `sum` to 0.

A new operation can therefore start every 5 clocks at best: accept, three
phases, one clock in `OUTPUT` with `enable` low. The unit is not pipelined
across operations. Each phase's registers are loaded only once per
operation, in the paper's sequence of states.

## Radix-8 Booth partial products (`booth_pp_gen`, `booth_r8_encoder`)

The multiplier `y` is read in overlapping 4-bit windows
`{y[3i+2], y[3i+1], y[3i], y[3i-1]}`, with `y[-1] = 0`. Each window gives one
digit `d_i = -4*y[3i+2] + 2*y[3i+1] + y[3i] + y[3i-1]`:

| window      | digit | window      | digit |
|-------------|-------|-------------|-------|
| 0000, 1111  | 0     | 1000        | -4    |
| 0001, 0010  | +1    | 1001, 1010  | -3    |
| 0011, 0100  | +2    | 1011, 1100  | -2    |
| 0101, 0110  | +3    | 1101, 1110  | -1    |
| 0111        | +4    |             |       |

The operands are unsigned. The top window must therefore see a 0 above bit
63 of `y`, so that its digit is never negative. That is why `ceil((N+1)/3)`
windows are needed: 22 for N = 64 and 11 for N = 32, the counts the paper
gives. `y` is zero-padded to 66 bits for this.

Each `booth_r8_encoder` decodes its window into a sign and a one-hot choice of
`x`, `2x`, `3x` or `4x`:

* `2x` and `4x` are just wires.
* `3x = 2x + x` is the one multiple that needs an adder (the "hard multiple").
  It is computed once, by a 66-bit KSA in `booth_pp_gen`, and shared by all
  22 encoders.
* For a negative digit the encoder outputs the two's complement of the
  chosen multiple (invert and add one) as a 67-bit signed value.

`booth_pp_gen` sign-extends each 67-bit value to 128 bits and shifts it left
by `3i`. Only the sum of all 22 partial products, modulo 2^128, is
meaningful. That sum equals `x * y` exactly, because the product fits in
128 bits.

## The carry-save Wallace tree (`wallace_csa_tree`, `csa`)

A `csa` is a row of independent full adders. It turns three vectors into a
sum vector (`x ^ y ^ c`) and a carry vector (the majority of the three bits).
The carry vector has weight 2^(i+1) at bit i. `csa` outputs the carry vector
unshifted, and the tree shifts it left by one place when it passes it on.

The tree uses the plain Wallace rule. At each level the operands are taken
in threes, and each triple goes into a CSA. The one or two operands left
over go on to the next level unchanged. The operand count per level is:

```
22 -> 15 -> 10 -> 7 -> 5 -> 4 -> 3 -> 2        7 levels (the multiplier)
10 ->  7 ->  5 -> 4 -> 3 -> 2                  5 levels (NOP = 10)
```

The level counts and the wiring are computed at elaboration
(`wcbm_pkg::csa_tree_levels`, `csa_count_at`), so `NOP` and `W` are free
parameters. The 22-operand instance has 20 CSAs of 128 bits.

**Why carries out of the top bit can be dropped.** The tree works modulo
2^128, and so does the final adder, whose carry out is discarded. The sum
vector and the carry vector can each be close to 2^128, so adding them can
produce a 129th bit. But the true total is `x * y < 2^128`, so any carry out
of bit 127, at any level, is a whole multiple of 2^128 and does not change
the result. The paper discusses the same point (the "extra bit" of a
redundant result). The same point is what makes its Karatsuba variants hard:
there, partial results are shifted against each other before the final
addition, so some carries out of a sub-product must be kept and others
dropped. That is not an issue for this single, unsplit tree.

## The Kogge-Stone adder (`ksa`)

`ksa #(W)` computes `{cout, sum} = x + y + cin` in three stages:

1. **Pre-processing:** per bit, `p = x ^ y` and `g = x & y`.
2. **Prefix network:** `ceil(log2(W+1))` levels. At level k, each position
   combines its (G, P) pair with that of the position 2^k below it:
   `G = G_hi | P_hi & G_lo`, `P = P_hi & P_lo`.
3. **Sum:** `s[i] = p[i] ^ c[i]`. The carry `c[i]` is the prefix generate of
   all positions below i.

`cin` is merged in as the generate of an extra position below bit 0. The
multiplier uses a 128-bit KSA for the final addition (8 prefix levels) and a
66-bit one for `3x`.

## Controller (`wcbm_ctrl`)

The controller has five states: `ST_SET_RESET`, `ST_BOOTH_MUL`,
`ST_CSA_TREE`, `ST_KSA` and `ST_OUTPUT`. Their names come from the paper's
state diagram and are defined in `wcbm_pkg::wcbm_state_e`.

Outputs:

* one load strobe per phase: `ld_operands`, `ld_pp`, `ld_tree`, `ld_sum`;
* `ready`, which is high in `ST_SET_RESET`;
* `ack`, which is high in `ST_OUTPUT`.

Once started, the three phase states advance unconditionally. A concurrent
assertion checks that order.

## Files and hierarchy

```
booth_mul                  top: registers + datapath wiring   (rtl/booth_mul.sv)
├── wcbm_ctrl              5-state controller
├── booth_pp_gen           22 partial products
│   ├── ksa (W=66)         3x = 2x + x
│   └── booth_r8_encoder   x22, one per radix-8 digit
├── wallace_csa_tree       22 -> 2, 7 levels
│   └── csa (W=128)        x20
└── ksa (W=128)            final carry-propagate adder
wcbm_pkg                   state enum, group/level-count functions
```

Parameters and their defaults:

* `booth_mul.N = 64`. The other sizes derive from it: `NPP = ceil((N+1)/3)`
  and `W = 2N`.
* `csa.W` and `ksa.W` default to 64, the width of the paper's stand-alone
  adders.
* `wallace_csa_tree` defaults to `NOP = 22` and `W = 128`.

`booth_mul` also elaborates at other widths, for example `N = 32` gives 11
partial products and a 5-level tree. Only N = 64 is simulated end to end.

## Simulating

Every `tb/tb_<module>.sv` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
          rtl/wcbm_pkg.sv tb/tb_booth_mul.sv --top-module tb_booth_mul
./obj_dir/Vtb_booth_mul
```

Replace `tb_booth_mul` with any other testbench name. Each testbench has a
watchdog that fails the run if it hangs.

| testbench              | what it checks                                                                 |
|------------------------|--------------------------------------------------------------------------------|
| `tb_csa`               | bitwise xor/majority, and `x+y+c == vs + 2*vc`; random and corner cases, 64 and 5 bits |
| `tb_ksa`               | 64/128/7-bit sums against `+`; full-width carry ripples; 7-bit exhaustive        |
| `tb_booth_r8_encoder`  | all 16 windows x many multiplicands against `d*x` computed arithmetically       |
| `tb_booth_pp_gen`      | each of the 22 partial products and their sum mod 2^128; the 32-bit instance; NPP = 22 / 11 |
| `tb_wallace_csa_tree`  | `vs+vc` against the operand sum for 22x128 and 10x16 trees; depth 7 and 5       |
| `tb_wcbm_ctrl`         | state sequence, strobes, hold, release, and reset abort from every state        |
| `tb_booth_mul`         | full 64-bit unit; see below                                                     |

`tb_booth_mul` runs at the default parameters. It multiplies the paper's
sample pair, 123456789 x 987654321 = 121932631112635269. It also runs
corner cases (0, 1, all-ones, 2^63, alternating patterns) and 300 random
pairs. For each operation it checks:

* that `ack` comes exactly 3 clocks after the accepting edge;
* that `ready` is low while the unit is busy;
* that the result is held while `enable` stays high;
* that the unit returns to ready when `enable` is released.

It also aborts operations with `reset`, and checks that no `ack` follows
and that `sum` is cleared.

The testbench counts how often five mechanisms occurred: negative Booth
digits, 3x multiples, a dropped carry out of the final KSA, a held result,
and an abort. It fails if any of them never happened.

## How far to trust it

* All blocks pass their testbenches under Verilator. They also elaborate
  cleanly with a second SystemVerilog front end (slang) and synthesise with
  Yosys. The 64-bit unit needs about 2000 flip-flop bits after synthesis.
* The product is checked against the simulator's own 128-bit
  multiplication, for random and corner-case operands.
* Timing, area and power have not been measured here. The paper reports
  14.103 ns critical path (90.83 MHz), 14,249 logic elements and 217.56 mW
  on an Altera Cyclone IV EP4CGX22CF19C7. This RTL is written for clarity
  (full sign extension, explicit two's-complement negation) and has not been
  tuned to match those figures.

## Where this RTL goes beyond the paper

The paper gives the structure and the sizes but not these details. They
were chosen here:

* **Handshake:** what `enable`, `ready` and `ack` mean, the condition on each
  FSM arc (start on `enable`, hold while `enable` is high), and one clock
  per phase.
* **Reset:** synchronous and active high. It clears `sum`.
* **Number format:** unsigned operands. The paper's sample run is unsigned.
* **Operand roles:** `y` is Booth-recoded and `x` is the multiplicand.
* **Negative multiples:** formed as full two's complements inside each
  encoder.
* **Sign handling:** each partial product is fully sign-extended to 128
  bits. No sign-encoding trick is used to shorten the rows.
* **Tree shape:** the Wallace grouping takes triples in index order and
  passes leftovers on. This reproduces the paper's level counts: 7 levels
  for 22 operands, and 10-7-5-4-3-2 for its 10-operand example.
* **KSA carry-in:** merged as an extra prefix position.

Not included: the paper also describes alternative designs that it only
compares with the final one. These are a sequential (one partial product
per clock) radix-8 Booth multiplier at 32 and 64 bits; three
Karatsuba-based 64-bit multipliers (CSA Wallace tree, KSA-based, and
comparator-based correction of the "mid-carry"); and the 64-bit
generate/propagate magnitude comparator used by the last of these. None of
them is part of this design.
