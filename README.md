# Digit-serial redundant-basis multipliers: PS-I, PS-II, PS-III

Finite field arithmetic for elliptic curve cryptography and error control
coding spends most of its time in multiplication. In a *redundant basis* (RB)
an element of GF(2^m) is written as an N-bit vector over powers of an N-th
root of unity, with N > m. The price is a few extra bits. The gain is that
squaring becomes a bit permutation, modular reduction disappears, and
multiplication becomes a **cyclic convolution** over GF(2):

    c_k = XOR over i of  a_i AND b_((k - i) mod N)          k = 0 .. N-1

or, written with rotations, `C = XOR_i a_i · B^(i)`, where `B^(i)` is B rotated
by i places towards the higher bit indices. Mathematically this is
multiplication in GF(2)[x]/(x^N + 1).

This RTL computes that product digit-serially and offers three systolic
structures for it. All three share one throughput. They differ in pipeline
registers, latency and critical path:

| structure | module        | register stages        | latency (clocks) | critical path      | flip-flops, N=10 Q=2 |
|-----------|---------------|------------------------|------------------|--------------------|----------------------|
| PS-I      | `rb_mult_ps1` | one per unit (D)       | Q + D + 1        | AND + XOR          | 168                  |
| PS-II     | `rb_mult_ps2` | one per 2 units        | Q + ceil(D/2) + 1| AND + 2 XOR        | 112                  |
| PS-III    | `rb_mult_ps3` | two per unit           | Q + D + 2        | one gate           | 221                  |

Here D = N/Q is the number of units. Every structure accepts a new operand pair
every Q clocks, back to back. Latency counts from the clock edge that accepts
the pair to the cycle in which `out_valid` is high. The flip-flop counts come
from a coarse synthesis of the default configuration.

## The digit schedule

The N bits of A are cut into D = N/Q groups of Q consecutive bits. Group j
holds a_(jQ) .. a_(jQ+Q-1) and belongs to unit j. A multiplication takes Q
*digit cycles*, t = 0 .. Q-1. In digit cycle t:

* the operand register holds `B^(t)`, and is rotated by one place each clock;
* unit j takes bit a_(jQ+t) and the operand rotated by a further jQ places,
  `B^(jQ+t)`, and ANDs them;
* the D products are XORed along the chain into one partial product word.

The accumulator XORs the Q partial product words together. Over the Q cycles
every index i = jQ + t occurs exactly once, so the sum is `XOR_i a_i · B^(i)`,
which is the RB product. The "digit" applied per clock is the set of D bits
{a_t, a_(Q+t), a_(2Q+t), ...}: one bit from each group.

The rotations by jQ places cost nothing in hardware: they are wiring. The
rotation by one place per clock is a register loop. Rotation direction is
fixed by the convolution above: bit i moves to bit (i+1) mod N.

## Modules

### Bit-permutation module (`rb_bpm`)

This module captures (a, b) on an edge where `in_valid && in_ready`. For the
next Q clocks it presents three outputs:

* `b_t`: the rotating B register, which is the S-I node of the flow graph;
* `digit[j] = a_(jQ+t)`: bit 0 of each group of an A register whose groups
  shift down by one place per clock, so no multiplexer is needed;
* a tag `{valid, first, last}` of type `rb_pkg::rb_tag_t`.

`in_ready` is high when the module is idle or in its last digit cycle. That is
why consecutive multiplications need no idle clock between them.

### Partial product generation (`rb_ppgu`, `rb_ppgm`)

A PPGU holds G pairs of an AND cell and an XOR cell, followed by registers.
Cell k works on `b_in` rotated by kQ places (the S-II wiring):

    p_out <= p_in ^ (a_in[0] & b_in) ^ (a_in[1] & rot(b_in, Q)) ^ ...
    b_out <= rot(b_in, G*Q)

Both the partial sum and the operand are registered. This is the feed-forward
cut-set between two units, so the critical path is one unit and not the whole
chain. The first unit of a chain (`FIRST = 1`) has no incoming partial sum.

`rb_ppgm` chains ceil(D/GROUP) units:

* **PS-I** is GROUP = 1.
* **PS-II** is GROUP = 2. Two neighbouring units are merged behind one
  register stage, which halves the pipeline registers and the pipeline depth.
  The last merged unit holds fewer cells when D is not a multiple of GROUP.
  With the defaults there are 5 units as 2 + 2 + 1.
* A larger GROUP reduces the registers further at the cost of a longer XOR
  chain.

Unit s sees a digit cycle s clocks after unit 0. Its digit bits are therefore
delayed by s clocks: this is the staggered input of the systolic array.

### PS-III unit (`rb_ppgu3`, `rb_ppgm3`)

PS-III adds a cut-set inside each unit. The product `m_q <= a & b_in` is
registered before it is XORed into the partial sum `p_out <= p_in ^ m_q`. In
any clock a unit therefore does the AND for one digit cycle and the XOR for
the previous one. The longest path is then a single gate.

The partial sum now reaches unit s one clock after its operand does. The
operand still advances one unit per clock, so the schedule stays consistent.
The tag travels with the operand and gets one more register at the end of the
chain.

### Finite field accumulator (`rb_ffa`)

This module has N bit-level accumulation cells: `acc <= (first ? 0 : acc) ^ p`.
On the `last` digit cycle the completed sum is loaded into the output register
`c`, and `out_valid` pulses for one clock. `c` holds its value until the next
result.

### Top (`rb_multiplier_top`)

The top places the three structures side by side on shared operand inputs and
a shared handshake. `c[0..2]` and `out_valid[2:0]` are the results of PS-I,
PS-II and PS-III. The top exists to compare the three structures. To use a
single one, instantiate its `rb_mult_ps*` module directly.

## Interface and timing (each `rb_mult_ps*`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous active-low reset (control state and tags; data registers are not reset) |
| `in_valid`  | in  | 1     | operand pair offered; `a` and `b` are sampled only on the accepting edge |
| `in_ready`  | out | 1     | pair accepted on this edge if `in_valid` |
| `a`, `b`    | in  | N     | operands, RB coordinates, bit i = coefficient of the i-th basis element |
| `c`         | out | N     | product, valid from the `out_valid` cycle until the next result |
| `out_valid` | out | 1     | one-clock pulse per product, in order of acceptance |

Parameters: `N` (default 10) and `Q` (default 2). N must be a multiple of Q.
PS-II also has `GROUP` (default 2).

Two settings mark the limits:

* Q = 1 gives a bit-parallel multiplier with one product per clock.
* Q = N gives a single bit-serial unit.

For a field GF(2^m) used in cryptography, N is the RB length chosen for that m.
The RTL is generic in N.

## What is specified and what is chosen here

These parts follow the described architecture:

* the three-module organisation (bit permutation, partial product generation,
  accumulation);
* the AND / XOR / register cells of each unit;
* the staggered systolic inputs;
* merging two units per register stage in PS-II;
* the register between AND and XOR in PS-III.

These are this design's own choices:

* **Sizes.** N = 10 and Q = 2 (five units) are taken from a 10-bit simulation
  of the design. No field size is fixed.
* **Digit schedule.** Each unit gets one bit of its Q-bit group per clock, and
  the operand rotates by one place per clock. This is read from the signal
  flow graph. The exact recursive decomposition formula is not restated here.
* **Interface.** The valid/ready handshake, the tags, the accumulator clear on
  `first`, the held output register and the reset scheme are all this design's
  own.
* **PS-II critical path.** PS-II is described as having the same critical path
  as PS-I. This implementation XORs the two products of a merged unit in
  series, so its path is one XOR longer than PS-I.
* **PS-III register cells.** The two register cells of a PS-III unit are taken
  to be the product and partial-sum registers. The operand register between
  units is kept as in PS-I, which makes PS-III the largest of the three here.
* **Latency.** The latency figures above are those of this RTL.

Not included: conversion between the redundant basis and a polynomial or
normal basis, and the choice of N for a given m. Neither is specified.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
values computed from the definitions in `tb_rb_ref_pkg`: a plain double-loop
cyclic convolution and plain rotations. Each ends by printing
`TB_RESULT checks=… failures=…`.

* `tb_rb_bpm`, `tb_rb_ppgu`, `tb_rb_ppgu3`, `tb_rb_ppgm`, `tb_rb_ppgm3` and
  `tb_rb_ffa` check the units clock by clock, including their latencies.
  `tb_rb_ppgm` also runs GROUP = 3, i.e. three units merged per stage.
* `tb_rb_mult_ps1/2/3` stream 2000 random products per structure. The first
  product is a = 0000001111, b = 1000101010, whose RB product is 1110000001.
  Each test checks every result and its latency, and enforces at most one pair
  per Q clocks.
* `tb_rb_multiplier_top` runs all three structures at the default parameters
  on 3000 products. It counts the mechanisms and fails if any never occurs:
  back-to-back products, products after idle clocks, requests held off by
  `in_ready`, and overlapping products in the pipeline.
* `tb_rb_sizes` runs the top through `tb_rb_top_harness` at
  N/Q = 35/5, 24/8, 12/1, 163/163 and 233/1. This covers an odd unit count for
  PS-II and both the bit-parallel and bit-serial limits.

To run a test with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/rb_pkg.sv tb/tb_rb_ref_pkg.sv tb/tb_rb_multiplier_top.sv \
        --top-module tb_rb_multiplier_top -o sim
    ./obj_dir/sim

Substitute any other testbench name. The simulations finish in a few seconds.
