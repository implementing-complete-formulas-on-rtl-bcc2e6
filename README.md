# Elliptic-curve scalar multiplication with complete formulas

This core computes k·P on any short Weierstrass curve y² = x³ + a·x + b of
prime order over a prime field of up to 522 bits. The curve, the prime and
the operand length are runtime inputs, and there is no fixed-curve logic.

The main idea is to use a single set of *complete* projective addition
formulas for every group operation. These formulas (Renes, Costello and
Batina, 2016) give the correct sum for any two points of a prime-order curve:
- equal points, so one formula also doubles;
- the point at infinity;
- a point and its negative.

The controller therefore needs no special cases and no branches on data. Each
scalar bit costs exactly one addition and one doubling, and both run the same
fixed sequence of field operations. This makes the core regular against
simple power analysis, and it also keeps the hardware small.

The field arithmetic is done by three Montgomery processors. They share one
dual-port block RAM and work on 17-bit words, a size chosen to suit FPGA
multiplier blocks.

## Block structure

```
                 host port (idle only)
                        |
   +--------------------+----------------------------+
   |          main_mem: 1024 x 17 bit, 2 ports       |
   +----------+------------------------+-------------+
       port A |                        | port B
        mem_xfer (xa)              mem_xfer (xb)
          |   \______________  _______/   |
          |        load/read \/           |
       mont_proc MM0   mont_proc MM1   mont_proc MM2
          \__________________|________________/
                     ecc_ctrl  (+ add_schedule, scalar_shr)
```

| file | block |
|---|---|
| `rtl/ecc_pkg.sv` | Shared widths, the memory map, the operation and operand encodings. |
| `rtl/ecc_core.sv` | Top level. Holds the memory, the two transfer machines, the three processors and the controller, plus the host port. |
| `rtl/mont_proc.sv` | Montgomery processor. Local operand memories and two 17×17 multipliers. Computes MUL (FIOS Montgomery product), ADD (A+B) and SUB (A−B+4p), none of them reduced. |
| `rtl/main_mem.sv` | True dual-port RAM, 1024 × 17 bits, one-cycle read-first ports. |
| `rtl/mem_xfer.sv` | Transfer state machine for one memory port. It streams one big word from memory into one or more processors, streams a result back, or fetches a single word. |
| `rtl/add_schedule.sv` | The complete-addition formulas written as 14 steps of up to three operations (a table). |
| `rtl/scalar_shr.sv` | 17-bit shift register. It hands the controller the scalar bits, or the bits of p−2, least significant first. |
| `rtl/ecc_ctrl.sv` | Main state machine: pre-processing, the bit loop, inversion and post-processing. |

The opening comment of each file describes its interface and timing.

## Numbers and the Montgomery domain

A field element occupies a *big word*: `nwords` little-endian 17-bit words,
and at most 32 of them.

The Montgomery radix is r = 2^(17·nwords). It must satisfy
17·nwords ≥ bits(p) + 6. For example:
- P-256 uses 16 words;
- P-384 uses 23 words;
- P-521 uses 31 words;
- a 522-bit prime uses all 32.

A Montgomery product returns A·B·r⁻¹ mod p. There is no final conditional
subtraction, so the result is only guaranteed to be below 2p, and only when
A·B < r·p.

Additions and subtractions are not reduced at all:
- ADD returns the plain sum A + B;
- SUB returns A − B + 4p. This is never negative as long as B < 4p.

This *lazy reduction* is the part of the design most worth understanding
before you change anything. Between two multiplications the formulas chain
up to two additions and subtractions. The schedule was checked by interval
analysis (every operand range pushed through all 40 operations, over
repeated additions). With r ≥ 64·p every value stays below 7p, which is
under the 4p limit for SUB's second operand where that matters, and keeps
every product within A·B < r·p.

With only 5 spare bits (r ≥ 32·p) the ranges grow without bound under this
subtraction scheme. That is why the core needs 6 spare bits. Since 32 words
give 544 bits, primes of up to 522 bits still fit.

Zero is stored as 4p, which is a valid representative. The result
coordinates come out below 2p, and the host reduces them with one
comparison.

## The addition schedule

The formulas take 12 general multiplications, 2 multiplications by the
curve constant `a`, 3 by `3b`, and 23 additions and subtractions. The table
in `add_schedule.sv` spreads these over the three processors in 14 steps:

- Steps 0–4 form the cross products (X1+Y1)(X2+Y2) and the like, together
  with the additions that feed them.
- Step 5 runs `3b·t2` and `a·t2` on MM0 and MM1 while MM2 subtracts.
- Steps 6–12 finish the formulas. The multiplications by `a` and `3b` and
  the final cross products are paired so that both large processors stay
  busy.
- Step 13 writes X3, Y3 and Z3.

Every operand of a step is read before any result of that step is written.
As a result, the output point may overwrite an input point. This is how
doubling works: P = Q = result = R0.

Operands are named relative to three *point bases*: P, Q and OUT. The
controller sets these per addition, so one table serves three uses:
- the real addition (OUT = R2);
- the dummy addition (OUT = R1);
- the doubling.

## Running one step

Memory has only two ports, so only two processors can receive operands at
the same time. Each step therefore runs as follows:

1. Transfer machine xa (port A) loads A and B of MM0. At the same time, xb
   (port B) loads A and B of MM1.
2. MM0 and MM1 start.
3. While MM0 and MM1 compute, xa and xb load MM2's two operands in parallel,
   one operand each. A processor has two load ports so that this takes one
   pass. MM2 then starts.
4. When all three processors are idle, xa stores MM0's result and xb stores
   MM1's. Then xa stores MM2's.

These are the latencies with s = nwords:

| action | cycles |
|---|---|
| MUL | s·(s+3) + 1 |
| ADD / SUB | s + 1 |
| load of one operand | s + 1 |
| store of a result | s |
| fetch of one word | 2 |

## The scalar loop and the inversion

The controller runs a right-to-left double-and-add-always loop with three
point registers:
- R0 is always doubled;
- the sum R2 + R0 goes to R2 when the bit is 1, and to the dummy register
  R1 when the bit is 0.

R2 starts at the point at infinity, and the result ends in R2.

The scalar is fetched into `scalar_shr` one 17-bit word at a time. It holds
up to 1088 bits in two big words, which leaves room for a blinded scalar.

Pre-processing has three steps:
- it converts P into the Montgomery domain by three parallel products with
  r² mod p;
- it builds zero as 1 − 1 + 4p;
- it builds R2 = (0 : 2·r : 0).

Post-processing inverts Z by Fermat's little theorem, Z^(p−2). The
controller streams the bits of p−2 through the same shift register,
subtracting 2 from p word by word with a borrow. For every bit, MM0 forms the
product and MM1 the square, in parallel. The product is kept only when the
bit is 1, so the inversion is also regular. Two final products give the
affine x and y.

## Host protocol and memory map

While `busy` is low, the host owns memory port B through
`host_we/host_addr/host_wdata`. The address is 32·big_word + word index.
`host_rdata` returns the word addressed in the previous cycle.

Before a run, the host writes these big words:

| big word | contents |
|---|---|
| 0 | p |
| 1 | p' = −p⁻¹ mod 2¹⁷ (word 0 only) |
| 2 | a·r mod p |
| 3 | 3b·r mod p |
| 4 | r² mod p |
| 5 | the integer 1 |
| 9, 10, 11 | X, Y, Z of P (Z = 1 for an affine point) |
| 30, 31 | k, least significant word first |

Big word 6 holds zero, which the core writes itself; 7 and 8 are unused. Big words 12–29 are the
registers R1 and R2 and the temporaries t0–t11.

To start a run, pulse `start` for one cycle with `nwords` and `k_bits`. When
`done` pulses, x is in big word 12 and y in big word 13, both below 2p. The
testbenches contain a complete host sequence, including p' by Newton
iteration (see `tb/tb_ecc_full.sv`).

## Cycle counts

All counts are measured in simulation with full-length random scalars
(`tb_ecc_fields`). The published counts are for the reference implementation,
which runs at 165 MHz.

| field | words | point addition | published | k·P | published | ratio |
|---|---|---|---|---|---|---|
| 192 | 12 | 2183 | 1895 | 885,813 | 728,508 | 1.22 |
| 224 | 14 | 2677 | 2311 | 1,270,035 | 1,036,294 | 1.23 |
| 256 | 16 | 3223 | 2774 | 1,748,609 | 1,421,392 | 1.23 |
| 320 | 20 | 4447 | 3902 | 3,028,937 | 2,498,655 | 1.21 |
| 384 | 23 | 5494 | 4874 | 4,487,269 | 3,744,883 | 1.20 |
| 512 | 31 | 8814 | 7994 | 9,640,021 | 8,188,059 | 1.18 |
| 521 | 31 | 8814 | 7994 | 9,798,664 | 8,331,987 | 1.18 |

A doubling costs the same as an addition. The design is 18–23% slower than
the published counts, for two reasons:
- Each step waits for MM2 before any result is stored. In the published
  design MM2 runs unsynchronized with the other two processors.
- Operands are reloaded from main memory for every operation, even when a
  processor already holds them.

## Where the design departs from the published one

- **Spare bits.** The design needs 6 spare bits instead of 5 (see the
  lazy-reduction section). The largest prime is still 522 bits, because 32
  words hold 544 bits.
- **Step barrier.** MM2 is synchronized at every step, which costs cycles but
  keeps the controller simple.
- **Processor internals.** The Montgomery processor is a plain word-serial
  FIOS loop, one inner iteration per cycle. It is not the published
  three-stage pipelined processor, and its cycle counts differ.
- **Schedule.** The 14-step table was derived from the sequential formulas.
  It keeps the published pairing of operations where that is known: the
  first products, the cross products, and the `3b·t2` / `a·t2` pair.
- **Inversion.** The inversion computes both the product and the square for
  every exponent bit, so it is constant time.
- **Host interface.** The host interface, the reset (synchronous, active
  low) and the memory map are this design's own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. To
build one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecc_core.sv --top-module tb_ecc_core
./obj_dir/Vtb_ecc_core +verilator+rand+reset+2
```

| testbench | what it checks |
|---|---|
| `tb_ecc_core` | End to end, against an independent affine reference (`tb/ecc_ref_pkg.sv`). Random curves over 2^61−1 with short and 40-bit scalars, P-256 with a short scalar, and a 522-bit prime at 32 words. It also counts each mechanism: real and dummy additions, doublings, addition to infinity, scalar word fetches, both inversion bit values, and MM2 loading while the others compute. It fails if any of them never happens. |
| `tb_ecc_fields` | Full-length random scalars on random curves at 192, 224, 256, 320, 384, 512 and 521 bits, against the reference, with cycle counts checked against the published ones. |
| `tb_ecc_full` | The unmodified top on P-256 with the full 256-bit scalar n−1. The expected result is −G = (Gx, p−Gy). Also checks the total cycle count. |
| `tb_mont_proc` | The processor at 4, 16 and 31 words (including the 521-bit prime): all three operations, the output bounds and the exact cycle counts. |
| `tb_add_schedule` | Runs the table on integers and compares it with the formulas. |
| `tb_ecc_ctrl` | The controller alone, with stand-in processors. |
| `tb_mem_xfer` | The transfer machine. |
| `tb_main_mem` | The memory. |
| `tb_scalar_shr` | The shift register. |

To use another curve, copy the `run` task of `tb_ecc_core`. It computes every
constant the core needs from p, a, b and the point.
