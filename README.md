# ECM phase 1 on an FPGA: one modular product per clock for 32 curves

The elliptic curve method (ECM) finds small prime factors of mid-size
integers. In a number field sieve it has to factor a very large number of
cofactors of about 125 bits, so its throughput per unit of hardware matters
most. This RTL computes **phase 1** of ECM: for each of 32 curves it
multiplies a base point P0 by a fixed scalar k, the product of all prime
powers up to the bound B1 = 960. It uses Montgomery's x-only ladder. The
server then takes a gcd of the resulting z coordinate with n.

The main idea is a fully pipelined, digit-parallel arithmetic core. It has
one Montgomery multiplier and two modular adder/subtractors, and none of
them ever compares a value with n. The multiplier accepts a new product on
every clock cycle. Its latency is long, so 32 independent curves are
interleaved to keep it full. A phase 1 for 32 curves takes 439,425 cycles at
the default parameters, which is 13,732 cycles per curve.

## Arithmetic without comparisons

Every number is kept modulo **2n**, not modulo n. It lies in [0, 2n), and
no unit ever subtracts n to bring a value down into [0, n). Two units make
this work:

* **Montgomery multiplication mod 2n** (`mont_mult`). It computes
  x·y·R⁻¹ mod 2n with R = 2·b^8 = 2^137 and b = 2^17. If x, y < 2n, the
  result is again < 2n.
* **Addition/subtraction divided by 4** (`addsub_mod2n`). It computes
  (a ± b)/4 mod 2n. Making the raw sum divisible by 4 needs only its two low
  bits and bits 0 and 1 of n. The division by 4 is then a shift.

The adder divides by 4, so every value is stored as v·2^4·R mod n. Take two
such values and add or subtract each pair: each result is then scaled by
2^2·R. Their Montgomery product is scaled by 2^4·R again. The datapath
follows one rule: **every multiplier operand passes through an
add/sub**. A single value (a24, x_{P−Q}, M1, M2, M8) goes through an
add/sub with the other input forced to zero. The one exception is M2−M1
(see below).

The modulus must be odd and **below 2^134**. Operands < 2n then have a top
17-bit digit below b/2, and the single halving step at the end of the
multiplier needs this to keep its result < 2n. A modulus just under 2^135
still satisfies 4n < R but can give results ≥ 2n. The 125-bit cofactors
this design targets are well inside the bound.

## The Montgomery multiplier

Radix b = 2^17 matches the 17×17 unsigned multipliers of FPGA DSP slices.
An operand has d = 8 digits, or 136 bits. The loop over the digits of x is
unrolled into 8 stage circuits. Each stage contains two 17×136 row products
(`row_mult`), and each row is a chain of 8 multiply-add cells (`dsp_mac`).

The multiplier uses "tail tailoring", with two precomputed constants:

* n' = −n⁻¹ mod b;
* ns~ = ⌊n·n'/b⌋ + 1.

The scaled modulus n·n' has Montgomery constant 1. Iterations 0 to 6
therefore need no multiplication by n':

```
u_i = (A + x_i*y) mod b
A   = (A + x_i*y)/b + u_i*ns~
```

The last iteration uses the true modulus, so A gains no extra digit:

```
u = ((A + x_7*y) mod b) * n' mod b      -- nprime_mult, 4 stages, 17-bit truncated
A = (A + x_7*y + u*n) / b               -- A < 3n
```

A final correction (`mm_correction`) adds n when A is odd and halves the
result, giving a value below 2n. This halving is where the factor 2 in
R = 2·b^8 comes from.

Pipeline, measured from the operands at the input:

| part | cycles |
|---|---|
| iteration 0 (A = 0) | 3 |
| iterations 1..6 | 4 each |
| iteration 7 (row, 4-stage n' product, u·n row, add) | 8 |
| correction | 2 |
| **total** | **37** |

The modulus n, ns~ and n' travel through the pipeline next to the operands.
Up to 24 bits of tag also travel with them: the datapath uses the tag for
the curve number and the write-back address. Any mix of moduli can
therefore be in flight at once.

## The mod-2n adder/subtractor

This unit (`addsub_mod2n`) has four register stages.

1. S = A ± B, in two's complement.
2. Three values are formed in parallel:
   * V = S, plus 2n for a subtraction, so that V lies in [0, 4n];
   * c0 = n if S is odd, otherwise 0;
   * c0 + 2n.

   The same stage computes the control bit RedMod. If bit 1 of n is set,
   RedMod = S[1] xor sub. Otherwise it is S[1] xor sub xor S[0].
3. T = V + (RedMod ? c0 + 2n : c0). T is now a multiple of 4 and below 7n.
4. The output is T >> 2, which is below 2n.

The test for RedMod is on **bit 1** of n. Bit 0 of an odd n is always 1,
so it could not select between the two cases.

## Phase-1 datapath (`ecm_phase1`)

Four working RAM banks, A, B, C and D, each hold two 136-bit locations per
curve. A and B feed add/sub 1; C and D feed add/sub 2. No multiplexer sits
in front of the add/subs, so where each value is stored is fixed by which
add/sub must combine it. The multiplier's x input selects add/sub 1 or 2.
Its y input selects add/sub 1, add/sub 2 or the bypass straight from RAM D.
When both inputs select the same add/sub, the product is a squaring.
Separate RAMs hold n, ns~ and n' per curve. They are read together with the
operands.

Timing of one micro-operation, issued at cycle 0:

* cycle 1: RAM read data;
* cycle 5: add/sub results and the delayed D bypass at the multiplier;
* cycle 42: the product is written back to every bank named in the
  micro-operation.

A second path writes the A/B add/sub output (M2−M1) into bank D. A later
product reads it through the D bypass, so it is not divided by 4 a second
time. The D write port takes, in order of priority: the batch load, this
M2−M1 save, then the product.

## Ladder schedule and memory map

Each bit of k makes one ladder step for every curve. A step computes the
double of one point and the sum of both points. P is stored in A0/B0 and Q
in C0/D0. The key bit decides which one is doubled; call it D, and call the
other one S. The ten products fall into three groups. Each group depends
only on the groups before it:

| group | products |
|---|---|
| I | M1 = (xD−zD)², M2 = (xD+zD)², M3 = (xD−zD)(xS+zS), M4 = (xD+zD)(xS−zS) |
| II | M7 = (M3+M4)², M8 = (M3−M4)², M5 = M1·M2, M6 = (M2−M1)·a24 |
| III | M9 = x_{P−Q}·M8, M10 = (M2−M1)(M1+M6) |

The new double is (M5 : M10) and the new sum is (M7 : M9). `ecm_ctrl`
issues group I for curves 0..31, then group II for all curves, then group
III. That is 4+4+2 products per curve, or 320 cycles per ladder step. A
result is read no sooner than 2·32−1 = 63 cycles after its product was
issued, and the datapath needs only 42, so the pipeline never stalls.

Where the eight locations of a curve are used over one step:

| location | contents over one step |
|---|---|
| A0 | xP → M3 → new xP |
| A1 | M2 → M6 |
| B0 | zP → M4 → M8 → new zP |
| B1 | M1 |
| C0 | xQ → M1 (copy) → new xQ |
| C1 | a24 (constant) |
| D0 | zQ → M2−M1 → new zQ |
| D1 | x_{P−Q} = x_P0 (constant) |

Whether the new double and sum go to P or to Q depends on the key bit. The
ladder keeps P − Q = P0 at every step. P starts as 2P0 and Q as P0, so Q
ends as k·P0.

## Talking to the server (`load_unload`)

The server link is a 32-bit stream with valid/ready handshakes in each
direction. Each 136-bit number is sent as 5 words, least significant word
first.

**Input.** The server sends a batch of 32 data sets, one per curve. Each set
holds 8 numbers in this order:

1. x_2P0
2. z_2P0
3. x_P0
4. z_P0
5. a24 = (a+2)/4
6. n
7. ns~
8. n'

The points and a24 are in the scaled form v·2^4·R mod n, so P0 normalised
to z = 1 gives z_P0 = 2^4·R mod n. n' sits in the low 17 bits of its
number.

**Output.** The result is x_Q and then z_Q for each curve, in the same
scaled form. The server finishes the job: it removes the 2^4·R factor,
computes gcd(z_Q, n), and supplies all the precomputed values above.

Words pass through a 512-deep FIFO and the serial/parallel converter. They
fill a RAM buffer of 10·32 numbers: 256 for the next batch and 64 for the
previous results. The next batch and the previous results therefore move
while the engine runs. The engine pauses only for the 256-cycle copy of a
batch into the working RAMs and the 64-cycle save of the results.

## Parameters

| parameter | default | where |
|---|---|---|
| `DIG_W` digit width | 17 | `ecm_pkg` |
| `ND` digits | 8 (136 bits) | `ecm_pkg` |
| `NC` curves in flight | 32 | `ecm_pkg` |
| `IO_W` server word | 32 | `ecm_pkg` |
| `B1` phase-1 bound | 960 (k has 1374 bits) | `ecm_phase1`, `ecm_ctrl`, `k_rom` |
| `KW` scalar ROM width | 1536 | `ecm_ctrl`, `k_rom` |
| `FIFO_DEPTH` | 512 | `ecm_phase1`, `load_unload` |

The value of k is computed during elaboration. It is the product of p^e
over the primes p ≤ B1, where p^e is the largest power of p not above B1.
No table file is used.

For 32 curves, a phase 1 lasts (bits(k) − 1) · 10 · NC + 65 cycles, which
is 439,425 cycles at the defaults. The schedule needs 2·NC − 1 > 42, so the
ladder needs NC ≥ 22 curves.

## Departures from the original architecture, and limits

* **Digit-parallel, not digit-skewed.** The original architecture sends each
  digit one cycle after the previous one through a horizontal DSP pipeline.
  Here every row product takes its whole operand in one cycle and registers
  once. The algorithm and the per-iteration structure are unchanged, but the
  timing is slower than on a DSP-mapped layout.
* **RAMs** are written as plain 136-bit arrays with a registered read. They
  are not built from 34-bit block RAMs with retiming registers.
* **Modulus bound** n < 2^134 (see above).
* **Scalar:** the exponents are chosen against B1 (p^e ≤ B1). This gives
  about 13,750 cycles per curve for a phase 1.
* **Results:** both x_Q and z_Q are returned, although the gcd needs only
  z_Q. This lets a user check the point.
* **Not included:**
  * the server software (curve generation, constants, gcd);
  * phase 2 of ECM;
  * an on-chip processor for the precomputations.
* The memory map, the order of products within a group, the micro-operation
  format, the data set order and all handshakes are choices of this design.

## Files

| file | role |
|---|---|
| `rtl/ecm_pkg.sv` | sizes, `word_t`, the micro-operation struct `uop_t` |
| `rtl/dsp_mac.sv` | 17×17 multiply-add cell with carry in/out |
| `rtl/row_mult.sv` | 17×136 row product from 8 cells |
| `rtl/nprime_mult.sv` | 4-stage truncated 17×17 product mod 2^17 |
| `rtl/mm_correction.sv` | A/2 mod n |
| `rtl/mont_mult.sv` | the 37-stage Montgomery multiplier |
| `rtl/addsub_mod2n.sv` | (a ± b)/4 mod 2n |
| `rtl/ram_bank.sv` | one-write, one-read RAM |
| `rtl/k_rom.sv` | the scalar k, computed at elaboration |
| `rtl/ecm_ctrl.sv` | ladder sequencer |
| `rtl/sync_fifo.sv` | valid/ready FIFO |
| `rtl/serpar.sv` | 32 ↔ 136-bit conversion |
| `rtl/load_unload.sv` | FIFOs, converter, batch/result buffer, copy sequencing |
| `rtl/ecm_phase1.sv` | top level |

Each module has a testbench `tb/tb_<module>.sv`.

* `tb/tb_ecm_phase1.sv` runs two batches with B1 = 10.
* `tb/tb_ecm_phase1_full.sv` runs the top with all defaults and 134-bit
  moduli.
* `tb/tb_ecm_phase1_shark.sv` runs the same with 125-bit moduli, the
  cofactor size the design targets.
* All three use `tb/ecm_tb_env.sv`, which models the server: it draws
  random odd moduli of a given bit length (at most 134), random curves and
  points, and computes the reference ladder in software.

Results are checked projectively: x_hw·z_ref ≡ z_hw·x_ref (mod n). Both
coordinates must also be < 2n and not both zero. The environment also
checks the phase-1 cycle count. It counts every mechanism of the datapath
and fails if one never happened:

* each product group and squarings;
* the D bypass and the M2−M1 save;
* zeroed inputs and both key-bit values;
* batch copies, result saves and output backpressure;
* a batch loaded while a run was in progress.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ecm_pkg.sv \
    tb/tb_ecm_phase1_full.sv --top-module tb_ecm_phase1_full -j 8
./obj_dir/Vtb_ecm_phase1_full
```

Replace the testbench name to run any other test. Every testbench ends by
printing `TB_RESULT checks=<n> failures=<m>`. The full-size run simulates
about 440,000 cycles in about one second.
