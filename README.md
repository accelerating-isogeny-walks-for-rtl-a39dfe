# Carry-save isogeny-walk evaluators

An isogeny-based verifiable delay function (VDF) is evaluated by pushing one
elliptic-curve point through a long, fixed chain of 4-isogenies. Each step
needs a handful of multiplications modulo a 1506-bit prime p, and the steps
cannot overlap, because each step uses the previous step's result. So the
quantity that matters is the latency of one step, not the throughput.

At 1506 bits a carry-propagating adder is a 1506-full-adder chain. This design
therefore never propagates carries. Every field element is kept in
**carry-save (CS) form**: a pair of integers (c, s) whose sum is the value. An
addition of two CS numbers is then two rows of full adders, whatever the width.
The hard part is the modular reduction, because the value of a CS number is
never known. It is done here with a small lookup table on the top few bits.

Two evaluators are built from the same arithmetic units:

* **FAVE** is fully unrolled. A combinational 4-isogeny datapath sits between
  a register bank's output and input, so one isogeny step is taken per clock
  cycle. This is the "resourceful attacker" design: very large, with a
  critical path of about three modular multiplications.
* **FITER** is serial. A register file feeds one modular adder, subtractor and
  multiplier. A multiplexer picks one result per clock cycle. One isogeny step
  is a 14-instruction program, so it takes 14 cycles.

The top, `isogeny_vdf_top`, holds both side by side, each with its own ports.

## Carry-save numbers and widths

A value x is carried as `x_c` and `x_s`, both M bits wide, with `x = x_c + x_s`.
The shares are not reduced individually. Each is simply below 2^M, so the
value lies below 2^(M+1) and is only known modulo p. Outputs of the modular
units are congruent to the exact result. They are not the canonical residue.
To read a result, add the two shares and reduce modulo p once, outside the
design.

Basic integer blocks:

| module    | computes | output shares |
|-----------|----------|---------------|
| `csa`     | one row of full adders (3 → 2 operands) | W and W+1 bits |
| `cs_add`  | a + b, two CSA rows | W+2 bits |
| `cs_sub`  | a_c + a_s + ~b_c + ~b_s + K + 2, three CSA rows, modulo 2^WO | WO bits |
| `cs_mul`  | a·b as a_c·b_c + a_c·b_s + a_s·b_c + a_s·b_s, merged by two CSA rows | 2M+2 bits |
| `cs_sqr`  | a² as a_c² + a_s² + 2·a_c·a_s, merged by one CSA row | 2M+2 bits |

## Reducing a CS number with a lookup table (`cs_red`)

This is the central trick. The input is an (M+I)-bit CS number. The output is an
M-bit CS number congruent to it modulo P.

1. Take bits [M+I-1 : M-1] of each share: the top I+1 bits, starting one bit
   *below* the M-bit boundary. Add the two fields with a small (I+1)-bit adder.
   Call the sum k. Only this adder propagates a carry, over I+1 bits.
2. Look up S = k·2^(M-1) mod P in a table indexed by k.
3. Add the two (M-1)-bit low parts and S in one CSA row.

The two low parts are below 2^(M-1) and S is below 2^M. So in bit position M-1
only S can have a 1, the carry out of that column is always 0, and both
output shares are M bits wide. The sum is congruent to the input because
k·2^(M-1) was only replaced by its residue.

The table is computed at elaboration by a constant function, with one entry
per possible k, so nothing needs to be loaded. The sum of two (I+1)-bit fields
ranges up to 2^(I+2) - 2, so by default (`WRAP = 0`) the table has 2^(I+2) - 1
entries.

Where the true value T of the input is known to lie in [2^(M-1), 2^(M+I)),
`WRAP = 1` drops the adder's carry and keeps 2^(I+1) entries. This is exact:
T mod 2^(M+I) = T, and k·2^(M-1) only changes by a multiple of 2^(M+I). The
lower bound makes sure the dropped carry never turns a small value into a
wrap-around. Shares that are each exact also qualify.

Settings used:

| unit | input width | I | WRAP | table entries |
|------|-------------|---|------|---------------|
| `fp_add` (after `cs_add`) | M+2 | 2 | 1 | 8 |
| `fp_sub` (after `cs_sub`) | M+3 | 3 | 1 | 16 |
| `fp_mul`, `fp_sqr` (after Montgomery reduction) | M+1 | 1 | 0 | 7 |

Worked example, with P = 61 and M = 6: the shares 56 and 75 give k = 1 + 2 = 3
and S = 3·32 mod 61 = 35. Then 24 + 11 + 35 = 22 + 48 in CS form, which is
70 ≡ 9 (mod 61). `tb_cs_red` checks exactly this case.

## Subtraction without a sign (`fp_sub`)

A CS number has no sign bit that can be read cheaply. So the subtractor adds
an offset large enough that the result can never be negative:

    a - b + 3P  =  a_c + a_s + ~b_c + ~b_s + 3P + 2   (mod 2^(M+3))

Each share of b is complemented at M+3 bits, which costs one inverter per bit.
The two +1s of the two's complements are folded into the constant. The six
operands are summed in three CSA rows. Since b < 2^(M+1) ≤ 3P, the true value
lies in [0, 2^(M+3)). The wrap-around from the complements therefore vanishes
modulo 2^(M+3), and `cs_red` with I = 3 and WRAP = 1 returns M-bit shares.

This needs 3P ≥ 2^(M+1) + 2^(M-1), i.e. P above about 0.84·2^M. That holds for
any prime close to 2^M. `fp_sub` checks it with an assertion at start of
simulation.

## Multiplication and the Montgomery domain (`fp_mul`, `fp_sqr`, `cs_mont_red`)

A modular product is computed in three steps:

1. The integer product (2M+2-bit shares).
2. A Montgomery reduction to (M+1)-bit shares, with R = 2^(M+3).
3. `cs_red` with I = 1 down to M-bit shares.

`cs_mont_red` reduces each share on its own, so nothing has to be carried
between the shares:

    q_k = (x_k mod R) · (-P^-1 mod R) mod R
    r_k = (x_k + q_k·P) / R

The division is exact, so it is only a bit slice. Each r_k is below
P + 2^(M-1). -P^-1 mod R is found at elaboration by Newton iteration.

The product is a·b·R^-1 mod P. So **all operands live in the Montgomery
domain**: the host loads x·R mod P instead of x, and multiplies results by R^-1
(or runs a Montgomery product with 1) when reading them. Additions and
subtractions need no change. Both evaluators assume their inputs are already
converted, including the kernel points.

## The 4-isogeny datapath (`iso4_eval`)

For a point (X : Z) and the kernel x-coordinates w0 (order 2) and w1 (order 4),
the image point is

    X' = X · (X·w0 - Z) · (X·w1 - Z)^2
    Z' = Z · (X - w0·Z) · (X - w1·Z)^2

The square accounts for the second order-4 kernel point, which has the same
x-coordinate. This is four levels, all combinational, in carry-save form:

1. Four multipliers: X·w0, X·w1, Z·w0, Z·w1.
2. Four subtractors: the four differences.
3. Two multipliers (X·(X·w0 - Z) and Z·(X - w0·Z)) and two squarers.
4. Two final multipliers.

In total that is eight multipliers, two squarers, four subtractors and ten
reduction stages. The critical path is about three modular multiplications
plus one subtraction.

X and Z are CS pairs. The kernel points are plain M-bit integers: they come
from outside precomputed, so their save share is zero. That keeps the
kernel-point input at 2·M bits per step.

## FAVE: one isogeny step per clock

`fave_ctrl` decodes a 3-bit opcode (`vdf_pkg::fave_op_e`). `fave_regbank`
holds the point P (CS form), the kernel pair and an output register.
`iso4_eval` sits between them.

| opcode | effect, at the next clock edge |
|--------|--------------------------------|
| `FAVE_LDP`     | P ← (p0_x, p0_z) |
| `FAVE_LDW`     | (w0, w1) ← (w0_in, w1_in) |
| `FAVE_ISO`     | P ← φ4(P) using the stored (w0, w1) |
| `FAVE_ISO_LDW` | `FAVE_ISO`, and load the next kernel pair in the same cycle |
| `FAVE_OUT`     | output register ← P; `out_valid` rises |
| `FAVE_NOP`     | nothing |

A walk of n steps is `LDP`, `LDW` with the first pair, then n-1 `ISO_LDW` each
carrying the next pair, then one `ISO` and one `OUT`. That is one step per
cycle with the kernel points streamed in at 2·M bits per cycle. `ins_valid`
low is a NOP. A synchronous active-low reset clears every register.

## FITER: one modular operation per clock

An instruction (`vdf_pkg::fiter_ins_t`, 19 bits) has these fields:

* `op`: NOP, ADD, SUB, MUL or OUT.
* `dst`, `src_a`, `src_b`: register addresses.
* `ld_en`, `ld_addr`: a load of the `ld_data` port.

There are 16 registers. The register file reads `src_a` and `src_b`. The
adder, subtractor and multiplier all compute, and `fiter` muxes the one named
by `op` into `dst` at the clock edge. The load writes `ld_data` (a plain M-bit
value) into `ld_addr` in the same cycle. This lets the next kernel pair arrive
while the current step runs. A square is a MUL with `src_a == src_b`. OUT
copies `src_a` to the output register, with `out_valid` one cycle later.

One isogeny step is the following program. The registers hold X in r0, Z in r1,
the current kernel pair in wa/wb, and temporaries in r4–r7.

    MUL r4, r1, wa   ; Z·w0       (load next w0)
    MUL r5, r1, wb   ; Z·w1       (load next w1)
    MUL r6, r0, wa   ; X·w0
    MUL r7, r0, wb   ; X·w1
    SUB r4, r0, r4   ; X - Z·w0
    SUB r5, r0, r5   ; X - Z·w1
    SUB r6, r6, r1   ; X·w0 - Z
    SUB r7, r7, r1   ; X·w1 - Z
    MUL r4, r1, r4   ; Z·(X - Z·w0)
    MUL r5, r5, r5   ; (X - Z·w1)^2
    MUL r6, r0, r6   ; X·(X·w0 - Z)
    MUL r7, r7, r7   ; (X·w1 - Z)^2
    MUL r1, r4, r5   ; Z'
    MUL r0, r6, r7   ; X'

The next step alternates between two kernel-pair register pairs. A write to a
register and a load into the same register in one cycle is illegal; an
assertion in `fiter_ctrl` catches it.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 1506 (`vdf_pkg::M_DEFAULT`) | bit length of p |
| `P` | 2^1506 − 257 | the prime |
| `NREGS` | 16 | FITER registers |

1506 bits is the field size of the 128-bit-security parameter set the design
targets. No concrete prime is fixed for it here. The default P is the largest
prime below 2^1506 that is 7 mod 8, which allows 2-power isogenies. Any odd P
with 0.84·2^M ≤ P < 2^M works. Every unit takes M and P, so smaller fields
(the tests use M = 40 and M = 89) need only parameter overrides.

## Departures and known limits

* **Over Fp only.** There is no Fp² arithmetic. Kernel points and coordinates
  are Fp elements.
* **Multiplier trees are left to synthesis.** The sub-products in `cs_mul`,
  `cs_sqr` and `cs_mont_red` are written with `*`. The merge of the
  sub-products is written out as CSA rows. A synthesis tool builds each `*` as
  a multiplier with its own final carry-propagate adder. The same goes for the
  addition x_k + q_k·P in `cs_mont_red`. So synthesized timing is that of
  conventional multipliers, not of a pure CS tree. Replace those expressions
  with a Wallace or Dadda compressor that stops at two rows to get the
  carry-free critical path.
* **Simple Montgomery reduction.** The per-share reduction uses more logic
  than an optimised CS Montgomery reducer. Its output bound is
  2P + 2^M rather than 2P. The following `cs_red` stage (7-entry table)
  absorbs this.
* **Subtraction table.** The subtraction is reduced with I = 3 (16 entries)
  rather than I = 2, because the M+3-bit offset sum needs it.
* **Instruction sets, register count, reset and the streaming `ISO_LDW`
  opcode are this design's own.**
* **No conversion logic.** Montgomery-domain conversion and the final
  canonical reduction are left to the host.
* **Size.** At M = 1506, FAVE alone holds ten 1506-bit modular multipliers
  and squarers. Expect synthesis and elaboration of the full-size design to
  take a long time.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench:

* drives random operands;
* checks the result modulo P against a reference worked out with wide integer
  arithmetic in `tb/tb_util_pkg.sv`;
* prints `TB_RESULT checks=N failures=N`;
* has a watchdog.

The block tests use M = 89 (P = 2^89 − 1) and M = 40 (P = 2^40 − 585), plus
the P = 61 example for `cs_red`. Timing is checked as well:

* `tb_fave` checks one step per cycle.
* `tb_fiter` checks 14 cycles per step.

`tb_isogeny_vdf_top` runs the top at its default parameters (M = 1506):

* FAVE walks 16 steps streamed and again with separate load and evaluate
  instructions.
* FITER walks 3 steps.

It compares both against a reference walk. It also counts each mechanism:
point load, kernel load, streamed evaluation, separate evaluation, output,
FITER add/sub/mul/square/load/out. A mechanism that never happened counts as
a failure.

Simulating with Verilator, from the repository root:

    verilator --binary --timing --assert -y rtl \
      rtl/vdf_pkg.sv tb/tb_util_pkg.sv tb/tb_fp_mul.sv \
      --top-module tb_fp_mul -o sim
    ./obj_dir/sim

Replace `tb_fp_mul` with any testbench name. `-y rtl` lets Verilator find
each module in the file of the same name. The full-size top test takes
about half a minute to build and under a second to run.

## Files

* `rtl/vdf_pkg.sv`: widths, default prime, opcodes and instruction structs.
* `rtl/csa.sv`, `cs_add.sv`, `cs_sub.sv`, `cs_mul.sv`, `cs_sqr.sv`: CS integer
  arithmetic.
* `rtl/cs_red.sv`, `cs_mont_red.sv`: the two reductions.
* `rtl/fp_add.sv`, `fp_sub.sv`, `fp_mul.sv`, `fp_sqr.sv`: modular units.
* `rtl/iso4_eval.sv`: the 4-isogeny datapath.
* `rtl/fave*.sv`, `rtl/fiter*.sv`: the two evaluators.
* `rtl/isogeny_vdf_top.sv`: the top.
* `tb/`: testbenches and `tb_util_pkg.sv`, which holds the reference models.
