# Multiprecision multipliers for elliptic-curve arithmetic on FPGAs

Public-key schemes over the NIST prime-field elliptic curves spend almost all
their time multiplying 192- to 521-bit integers modulo a prime. On a
Virtex-II class FPGA the scarce resource for this is not logic but the
internal 18x18 multiplier blocks: an XC2V6000 has 144 of them. This RTL
builds several ways of composing a long multiplication from those blocks, so
that their cost in blocks, logic and cycles can be compared and the best one
used as the kernel of a modular multiplier:

* **divide-and-conquer** units that trade multiplier blocks for adders: three
  half-width products per level, so 64, 128 and 256 bits cost 12, 36 and 108
  blocks;
* a **broadcast** unit that trades time for blocks: eight 32-bit multipliers
  (32 blocks) produce a 256x256-bit product in eight steps through a
  four-stage pipeline;
* a **Montgomery modular multiplier** that uses the broadcast unit three times
  per modular product, so no division is ever needed;
* 64-bit **host streams** that feed the broadcast unit at the rate a 64-bit,
  one-word-per-clock host bus allows: eight beats in and eight beats out per
  product, matching the unit's eight cycles per product;
* the simple 32- and 64-bit units the composites are compared against.

All of it is synthesizable SystemVerilog in `rtl/`, one module per file, with a
self-checking testbench for each module in `tb/`.

## The units at a glance

| Unit | Module | Operands | 18x18 blocks | Timing |
|---|---|---|---|---|
| 18x18 signed multiplier block | `mult18x18s` | 18 x 18 signed | 1 | combinational |
| A: 32-bit from blocks | `mul32_dsp` | 32 | 4 | combinational |
| B: 64-bit from blocks | `mul64_dsp` | 64 | 16 | combinational |
| C: 64-bit in logic only | `mul64_lut` | 64 | 0 | combinational |
| D, E, F: divide-and-conquer | `dc_mul` (W = 64, 128, 256) | W | 12, 36, 108 | combinational |
| G: broadcast | `bcast_mul` (W = 32, N = 8) | 256 | 32 | 1 product / 8 cycles, latency 11 |
| Montgomery modular multiplier | `montgomery_mul` | 256 | 32 | 40 cycles per product; 255 cycles per new modulus |
| Host input | `operand_loader` | 64-bit beats | 0 | 8 beats per operand pair |
| Host output | `result_unloader` | 64-bit beats | 0 | 8 beats per product, 3 result slots |
| Shift-add baseline | `shiftadd_mul` (W = 32, 64) | W | 0 | W cycles |
| Radix-4 Booth baseline | `booth_mul` (W = 32, 64) | W | 0 | W/2+1 cycles |
| Classical digit-serial baseline | `knuth_mul` (W = 32, 64) | W | 0 | up to (W/8)^2 + 1 cycles |
| The whole bank | `mpmul_top` | 256 | see below | |

All operands are unsigned except those of the 18x18 block itself.

## The broadcast multiplier (`bcast_mul`)

This is the unit that makes 256-bit (and, at other parameters, 512-bit)
products fit in the block budget, and the one whose timing takes the most
care.

Operand A is held in a register as N words of W bits (8 x 32). In step j,
word j of B is *broadcast* to all N lane multipliers; lane i forms
A_i * B_j, a 2W-bit product. The N lane products of one step form the
product A * B_j, which has to be added into a running sum at weight
2^(W*j). The four pipeline stages are:

1. **multiply**: the N lane products are registered;
2. **sum P0 + P1**: P0 is the low halves of the lane products laid side by
   side (N*W bits), P1 the high halves laid side by side, one word higher.
   P0 + (P1 << W) is exactly A * B_j, (N+1)*W bits;
3. **accumulate**: acc = (P0 + P1) + (acc >> W), or just P0 + P1 in the first
   step of an operation. The shift right by one word is how the weight
   2^(W*j) is applied without a wide shifter;
4. **shift out**: the low word of acc is final after each step and is
   shifted into the result register.

After the last step acc holds the top N+1 words, and the product is
`{acc, the N-1 words shifted out}`.

Timing, counting the edge that samples `start` as edge 0: the operands are
captured at edge 0, the N steps enter stage 1 at edges 1..N, and `done` is
high (with `p` valid and held) after edge N+3, which is 11 for N = 8.
`ready` rises again in the cycle the last step issues, so the next operation
can start right behind the previous one and the two overlap in the pipeline:
one 256-bit product every 8 cycles. A `start` while `ready` is low is a
protocol error (an assertion reports it).

The lanes use the divide-and-conquer unit of width W, so at W = 32 each lane
is the 4-block unit A (8 x 4 = 32 blocks). At W = 128, N = 4 the same module
is a 512-bit multiplier from four 128-bit lanes of 36 blocks each, which
uses exactly all 144 blocks of an XC2V6000. The testbench runs both shapes.

## Divide-and-conquer units (`dc_mul`)

With a = a1*2^H + a0 and b = b1*2^H + b0 (H = W/2):

    z0 = a0*b0        z2 = a1*b1        m = |a0 - a1| * |b1 - b0|
    z1 = z0 + z2 + s*m        (s = +1 or -1, the sign of (a0-a1)*(b1-b0))
    a*b = z2*2^W + z1*2^H + z0

z1 equals a0*b1 + a1*b0, so it is never negative. Because the middle product
works on absolute differences, all three sub-products are exactly H bits
wide and every level reuses the same half-width unit; the sum form
(a0+a1)(b0+b1) would need H+1-bit multipliers. The module instantiates itself
recursively down to the 32-bit leaf `mul32_dsp`, so the block count is
4 * 3^(log2(W/32)): 12, 36, 108 for 64, 128, 256 bits. It is purely
combinational; `mpmul_top` registers its operands and products. W must be 32
times a power of two.

Linting `dc_mul` on its own as the top level, Verilator does not expand the
recursion and reports `z0`, `z2`, `m` undriven. Inside any parent, and in
simulation, the recursion is expanded and those warnings do not appear.

## Montgomery multiplier (`montgomery_mul`)

For an odd modulus p, R = 2^256 and n' = -p^-1 mod R, the unit computes
r = a * b * R^-1 mod p as

    T = a * b                      multiplication 1
    m = (T mod R) * n' mod R       multiplication 2, low half kept
    t = (T + m*p) / R              multiplication 3, then drop 256 zero bits
    r = t - p if t >= p, else t

so a modular product costs three plain multiplications and no division. The
three run one after another on the unit's own broadcast multiplier. With
`start` sampled at edge 0, `done` is high after edge 40.

Only a, b and p come from the host. n' is computed inside when a modulus is
loaded (`load`): starting from inv = 1 and s = p (s tracks p*inv mod R), each
of 255 cycles checks bit i of s and, if it is set, sets bit i of inv and adds
p << i to s. Afterwards p*inv = 1 mod R and n' = -inv. `mod_ready` is high
after edge 255 counted from the load edge; a `start` before that is ignored.
a and b must be below p. Results stay in the Montgomery domain (a*b*R^-1);
converting into and out of it is the caller's job.

## Host streams (`operand_loader`, `result_unloader`)

The host bus carries 64 bits per clock, so a 256-bit operand needs four
beats and a pair eight: the same eight cycles the broadcast unit needs per
product. The loader collects beats (a first, then b, least significant word
first) and offers the pair with valid/ready. It takes the first beat of the
next pair in the same cycle the current pair leaves, so a full-speed stream
loses no cycles.

The broadcast unit cannot be stalled once started, so its product must
always have somewhere to go. The unloader has three result slots; an
operation reserves one when it starts (`reserve`, allowed while
`can_reserve`) and frees it when the last of its eight output beats has left.
An operation holds its slot about 20 cycles (11 in the multiplier, then 8
beats), which is why three slots keep one product per 8 cycles flowing.
When the host holds `out_ready` low, the slots fill, the loader's complete
pair waits, and the input stream stalls; nothing is lost. In `mpmul_top` the
real bus's two directions are shown as two separate streams.

## Baseline units

`shiftadd_mul` retires one multiplier bit per cycle; `booth_mul` recodes the
zero-extended multiplier into W/2+1 radix-4 Booth digits in {-2..+2} and
retires two bits per cycle into a signed accumulator; `knuth_mul` is the
classical multiprecision algorithm (TAOCP Algorithm M) on 8-bit digits, one
digit product per cycle, skipping a zero multiplier digit in one cycle. All
three use the same start/busy/done handshake: `start` while `busy` is low,
`done` pulses for one cycle with the product, which is held.

## The bank (`mpmul_top`)

`mpmul_top` puts one of each unit side by side; they do not depend on one
another. Shared 256-bit operand buses `a` and `b` feed:

* units A to F through an input register (`in_valid`) and an output register:
  all six products appear together, with `out_valid`, two edges later, and a
  new pair can be given every cycle. Each unit uses the low bits it needs;
* the Montgomery unit (`mm_load`, `mm_modulus`, `mm_start`, ...);
* the six baseline units (`seq_start`; results in `seq_p[]`, indexed by
  `mpmul_pkg::seq_unit_e`).

The broadcast unit G sits between the host streams `h_in_*` and `h_out_*`.

As a whole the bank uses 4 + 16 + 12 + 36 + 108 + 32 + 32 = 240 multiplier
blocks, more than one XC2V6000 has: it is a harness that holds every unit
for comparison and test, not a single-chip configuration. Any one of the
units fits on its own.

## What fits

| Operation | Fits the defaults? | Why |
|---|---|---|
| 192-, 224-, 256-bit products (NIST P-192, P-224, P-256) | yes | units F and G take 256-bit operands; shorter ones are zero-extended |
| 256-bit Montgomery product | yes | `montgomery_mul` at W = 256 |
| 384-bit and 521-bit products | not at the defaults | `bcast_mul` with N = 12 (384 bits) or N = 17 (544 bits) on the same 32-bit lanes (four blocks each); both shapes are tested in `tb_bcast_mul` |
| 512-bit broadcast product on four 128-bit lanes | with `bcast_mul #(.W(128), .N(4))` | 144 blocks; tested in `tb_bcast_mul` |
| 512-bit divide-and-conquer product | with `dc_mul #(.W(512))` only | 324 blocks, more than any Virtex-II has; tested in `tb_dc_mul` |

## Where this design fills in details

The unit list, the block counts, the three-products-per-level structure, the
broadcast unit's lanes, steps and four stages, the cost of three
multiplications per Montgomery product, and the 64-bit/4-beats-per-operand
host rate are the design as specified. The following are this design's own
choices:

* the 16-bit digit split inside units A and B, and the plain partial-product
  array inside C;
* the subtractive (absolute-difference) middle term in `dc_mul`;
* treating A to F as combinational, with registers in the bank;
* which operand the broadcast unit broadcasts (B), the start/ready/done
  handshake, and back-to-back issue;
* everything about the Montgomery unit's organisation: one shared
  multiplier, the in-unit computation of n', 40 cycles per product;
* the valid/ready streams, word order, three result slots and slot
  reservation of the host interface;
* all internals of the baseline units, which are known only by name
  (shift-add, Booth, Knuth): one bit, two bits and one digit per cycle;
* asynchronous active-low reset everywhere.

Not built: the elliptic-curve point addition and point multiplication (only
their operation counts are known: two squarings, 12 multiplications, seven
additions and two shifts per addition), and the board around the FPGAs
(crosspoint, memories, the PCI-X protocol itself).

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends
with `$finish`. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/mpmul_pkg.sv \
        tb/tb_mpmul_top.sv --top-module tb_mpmul_top
    ./obj_dir/Vtb_mpmul_top

Replace `tb_mpmul_top` by any other `tb_<module>`. All testbenches take well
under a minute.

What the testbenches check:

* every product against wide multiplication done in the testbench, with
  random operands biased towards zero words, all-ones words and equal halves;
* the latency of every sequential unit, in edges, and the broadcast unit's
  rate of one product per 8 cycles when issued back to back;
* the Montgomery result through its defining property, r < p and
  r * 2^256 = a * b (mod p), for the NIST P-256 prime and random moduli,
  including results that need the final subtraction;
* `tb_mpmul_top` runs the whole bank at its only size for 3400 cycles with
  random traffic on every port and fails unless each mechanism happened at
  least once: back-to-back operand pairs, overlapped broadcast operations,
  negative, positive and zero middle terms in the 256-bit divide-and-conquer
  split, negative Booth digits, skipped zero digits in the classical unit,
  a baseline start ignored by a busy unit, an input stream stall, output
  back-pressure, a change of Montgomery modulus and a final subtraction.
* `tb_bcast_mul` also runs the broadcast unit as a 384-bit (N = 12) and a
  544-bit (N = 17) multiplier on 32-bit lanes, the shapes for the P-384 and
  P-521 operands, through the helper `tb/bcast_mul_driver.sv`.
* `tb_nist_workloads` runs the operand sizes of the NIST P-192, P-224 and
  P-256 curves through `mpmul_top`: products on the 256-bit
  divide-and-conquer unit and on the broadcast unit through the host
  streams, and Montgomery products modulo each of the three primes.

## Files

* `rtl/mpmul_pkg.sv`: shared widths and the index of the baseline units;
* `rtl/<module>.sv`: one module each, as in the table above;
* `tb/tb_<module>.sv`: the testbench of each module;
* `tb/tb_nist_workloads.sv`: the NIST-size workloads on the whole bank;
* `tb/bcast_mul_driver.sv`: a checker for one broadcast unit of any shape,
  used by `tb_bcast_mul`.
