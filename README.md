# NTT polynomial multiplier for Streamlined NTRU Prime (sntrup761)

This design multiplies two polynomials in the sntrup761 ring

    R/q = Z_q[x] / (x^p - x - 1),   p = 761,  q = 4591

which is the most expensive operation in NTRU Prime key generation, encapsulation
and decapsulation. It uses the number-theoretic transform (NTT). The modulus
x^761 - x - 1 and the prime 4591 have no structure that an NTT can use directly.
So the product is first computed exactly over the integers, as a cyclic
convolution, and only then reduced.

The convolution runs in three independent *lanes*, one per prime
(15361, 12289 and 7681). Each lane has its own butterfly and its own data bank.
All three lanes run the same schedule in lockstep, so at any clock their
butterflies need the same power of their own root of unity. This design's main
feature follows from that: the three twiddle tables share **one merged
42-bit-wide ROM** with a single address bus, instead of three 14-bit ROMs with
three copies of the address logic. An optional **half-depth** form of that ROM
stores only 256 of the 512 words. It rebuilds the other half from the identity
ω^(n+256) = −ω^n.

## From a ring product to three 512-point NTTs

Each operand has 761 coefficients, so the plain product has 1521 terms. The
product is computed as a cyclic convolution of length 1536 = 3 × 512. That
length is long enough that nothing wraps around, so the cyclic result equals
the linear one.

**Good's index map.** Because 3 and 512 are coprime, an index k in 0..1535
corresponds one-to-one to the pair (k mod 3, k mod 512). Coefficient k of an
operand is stored at row `k mod 3` and column `k mod 512`. In the variables
y (row) and z (column), the length-1536 convolution becomes a product modulo
(y^3 − 1)(z^512 − 1). Each operand is therefore three z-polynomials of length
512, and the remaining 775 slots are loaded with zeros.

**Per prime.**
1. Forward 512-point NTT of all six z-polynomials (three per operand).
2. At each of the 512 NTT points, multiply the two length-3 y-polynomials
   modulo y^3 − 1. This is a 3-point cyclic convolution:
   c_k = Σ_i a_i · b_((k−i) mod 3).
   The inverse transform's factor 1/512 is folded into this step.
3. Inverse NTT of the three product polynomials.

**Exact integers from three primes.** Operands are centred (|c| ≤ 2295), so a
convolution coefficient has magnitude at most 761 · 2295² ≈ 4.0·10⁹. The three
primes have the product Q = 15361 · 12289 · 7681 ≈ 1.45·10¹². Q/2 is far above
that bound, so each coefficient can be recovered exactly from its three
residues (Chinese remainder theorem, CRT) as a signed value in (−Q/2, Q/2).
This holds for both products that NTRU Prime needs, R/q × R/3 and R/q × R/q.

**Final reduction.** Since x^761 = x + 1, a term C_k with k ≥ 761 folds onto
positions k−761 and k−760. For these degrees one fold is enough:

    c_i = C_i + C_(i+761) + C_(i+760)  (the last term only for i ≥ 1)   mod 4591

The result is given in the centred range −2295..2295.

## The NTT schedule (the part that needs the most care)

The forward transform uses Cooley–Tukey butterflies, with input in natural
order and output in bit-reversed order. The inverse uses Gentleman–Sande
butterflies, with input in bit-reversed order and output in natural order. The
pointwise step only pairs equal positions, so the bit-reversed order in between
does no harm, and no permutation pass is needed.

Forward layer L (L = 0..8) has half-block length `len = 256 >> L`. Butterfly j
(0..255) belongs to block `b = j / len` and pairs these two words:

    addr0 = 2·len·b + (j mod len),   addr1 = addr0 + len

    x = a + ω^e·b,   y = a − ω^e·b,   e = bitrev_L(b) · len

Here bitrev_L reverses the low L bits of b. The tree behind this: block b of
layer L holds the residue modulo z^(2len) − ω^(2e). Splitting it with
r = ω^e gives the residues modulo z^len − r and z^len + r. After layer 8, output
word b holds f(ω^bitrev9(b)). Layer 4, for example, reads twiddle exponents
224, 16, 144, 80, 208, 48, 176, 112, 240 in consecutive blocks.

The inverse runs layers 8 down to 0 with the same address pairs and the
following butterfly:

    x = a + b,   y = (a − b) · ω^(−e),   ROM address (512 − e) mod 512

So the forward transform reads ROM words 0..255 and the inverse reads mostly
words 256..511. Both halves of the table are used.

Each lane completes one butterfly per clock. A result is written back two
clocks after its command is issued. The controller therefore inserts two idle
clocks after each layer, so no read overtakes a pending write. It does the same
after the pointwise phase.

## The merged twiddle ROM (`twiddle_rom`)

Word n is {ω₂ⁿ mod 7681, ω₁ⁿ mod 12289, ω₀ⁿ mod 15361}. Each field is a signed
14-bit two's-complement value, centred in ±(q−1)/2. The roots are:

| lane | prime | ω (primitive 512-th root) |
|------|-------|---------------------------|
| 0 | 15361 | 5301 = 7^30  |
| 1 | 12289 | 3400 = 11^24 |
| 2 | 7681  | 4055 = 13^15 |

Each root is g^((q−1)/512) for the smallest g that gives order exactly 512.
The table is computed at elaboration by modular exponentiation in `ntt_pkg`.
No data file is involved. To use other roots, change `W0..W2` in the package.
The forward and inverse transforms stay consistent because both read the same
table.

Reads are synchronous, like a block RAM: data arrives one clock after the
address. With `HALF_STORE = 1` only words 0..255 are stored. Address bit 8 then
selects a negation of all three fields. The negation sits before the output
register, so both forms have the same latency. The half form trades half the
ROM bits for three 14-bit negators in the read path.

## Datapath and control

```
               in_coef (valid/ready)
                     |
              +-------------+  cmd (op, addr0, addr1, k, coef)   +-----------------+
 start ------>|  ntt_ctrl   |---------------------------------->| ntt_lane  q0    |--+
 done  <------|             |---------------------------------->| ntt_lane  q1    |--+-- rd_data
              +-------------+---------------------------------->| ntt_lane  q2    |--+    |
                     | tw_addr (9)                               +-----------------+       |
                     v                                             ^ 14-bit field each      v
              +-------------+  42-bit word                         |                  crt_unit
              | twiddle_rom |--------------------------------------+                       |
              +-------------+                                                        poly_reduce
                                                                                          |
                                                                        out_valid / out_idx / out_coef
```

* **`ntt_lane`** has a three-stage command pipeline:
  1. Issue: bank read addresses, with the twiddle address issued in the same
     clock.
  2. Compute: the butterfly, the pointwise unit, or the input conversion.
  3. Write back.

  Its `coef_bank` holds 3072 × 14 bits: operand A (later the product) in words
  0..1535 and operand B in words 1536..3071. Row r of an operand starts at
  word r·512. The bank has two read ports and two write ports, so a butterfly
  reads and writes both of its words in one clock. Everything is computed in
  place.
* **`butterfly`** works on residues in [0, q). Its one modular multiplication is
  a 14 × 14-bit product reduced by Barrett's method (`mod_barrett`), followed by
  one conditional subtraction. The output is registered.
* **`pointwise_conv3`** is combinational. For one index k it computes three
  products, a Barrett reduction, the multiplication by 512⁻¹, and a second
  reduction. Each point takes six clocks: three reads of (a_k, b_k) into a
  buffer, then three writes of c_k over operand A.
* **`crt_unit`** uses Garner's form:
  * v₀ = r₀
  * v₁ = (r₁ − v₀)·q₀⁻¹ mod q₁
  * v₂ = (r₂ − v₀ − q₀v₁)·(q₀q₁)⁻¹ mod q₂
  * X = v₀ + q₀v₁ + q₀q₁v₂

  The full 41-bit X is only used for the sign test (X > (Q−1)/2). X mod 4591
  comes from the small digits with constants reduced in advance. A negative X
  subtracts Q mod 4591.
* **`poly_reduce`** adds the two or three fold terms of each output coefficient
  as they stream past, then emits the centred result.
* **`ntt_ctrl`** sequences the phases LOAD → FWD (6 NTTs) → PW → INV (3 NTTs)
  → OUT. For output i it reads C_i, C_(i+761) and C_(i+760) at Good positions
  (k mod 3, k mod 512). It tags the first and last term of each output.

## Interface and timing (`ntt_mult`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse while `busy` is low to begin |
| `busy` | out | 1 | high from start until done |
| `done` | out | 1 | one-clock pulse after the last output |
| `in_valid`, `in_ready`, `in_coef` | in/out/in | 1/1/13 | 761 coefficients of a, then 761 of b, signed and centred (\|c\| ≤ 2295; R/3 values −1/0/1 also work) |
| `out_valid`, `out_idx`, `out_coef` | out | 1/10/13 | 761 beats, index 0..760 in order, centred product coefficient; no back-pressure |

The parameter `TW_HALF_STORE` (default 0) selects the half-depth twiddle ROM.

Latency from `start` to `done` is 29,332 clocks plus one clock for every
clock in which `in_ready` is high and `in_valid` is low:

* 1 clock to leave the idle state
* 3072 clocks to load the two operands
* 9 NTTs × 9 layers × (256 + 2) clocks
* 3074 clocks for the pointwise phase
* 2282 output reads
* 5 clocks of pipeline flush and the `done` register

Input ports are used only during the first ~3100 clocks. Outputs appear during
the last ~2300 clocks.

## Where this follows the source design and where it does not

These parts follow the source design:
* The ring and its parameters.
* Good's 3 × 512 split and the three primes.
* One butterfly and one data bank per prime, with the three lanes in lockstep.
* Cooley–Tukey forward and Gentleman–Sande inverse butterflies.
* The merged 42-bit twiddle ROM of 512 signed 14-bit triples, and the
  half-storage rule ROM[i+256] = −ROM[i].
* The step order: load, NTT, pointwise product, inverse NTT, CRT, reduction.
* The centred output range.

These are this design's own choices:
* The module ports and handshakes.
* The choice of roots of unity.
* Barrett reduction with unsigned residues. The source design mentions a signed
  19 × 33-bit multiplication in its reducer.
* The two-read/two-write in-place bank map and the command pipeline.
* Folding 1/512 into the pointwise step.
* Computing the y-dimension as a direct 3-term convolution.
* Garner's CRT form.
* The streaming fold.

The source design has a "reloading" step between the pointwise product and the
inverse NTT. Here it is not needed, because the products are written in place
and read directly by the inverse transform. The cycle count above belongs to
this design. The clock-frequency and FPGA-resource figures reported for the
source design were not reproduced. This RTL is written for simulation and
generic synthesis, and has no FPGA primitives.

Only sntrup761 is supported. The constants p and q appear in `ntt_pkg`, in the
folding offsets of `ntt_ctrl`, and in the mod-q constants of `crt_unit`. sntrup653
would fit in the 1536-slot convolution if those constants were changed.
sntrup857 would not fit, because its product has 1713 terms.

## Files

| file | content |
|------|---------|
| `rtl/ntt_pkg.sv` | constants, command type, elaboration-time modular arithmetic |
| `rtl/ntt_mult.sv` | top level |
| `rtl/ntt_ctrl.sv` | phase sequencer and address / twiddle-exponent generation |
| `rtl/twiddle_rom.sv` | merged (optionally half-depth) twiddle ROM |
| `rtl/ntt_lane.sv` | one prime's pipeline |
| `rtl/coef_bank.sv` | 2R2W coefficient memory |
| `rtl/butterfly.sv` | CT/GS modular butterfly |
| `rtl/pointwise_conv3.sv` | product modulo y^3 − 1 with 1/512 scaling |
| `rtl/crt_unit.sv` | three-prime CRT, mod-4591 result |
| `rtl/poly_reduce.sv` | x^761 − x − 1 folding and centring |
| `rtl/mod_barrett.sv` | combinational Barrett reducer |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ntt_mult_half` |

## Verification and simulation

Every testbench computes its expected values on its own and prints
`TB_RESULT checks=N failures=M`. Each one also has a watchdog.

* `tb_ntt_mult` runs the top at its default parameters. It does four
  multiplications:
  * random R/q × R/3
  * random R/q × R/q
  * all coefficients +2295 on both sides (the largest product magnitude)
  * random ±2295 against all −2295

  The input is throttled at random. Every output coefficient is compared with
  a schoolbook product that the testbench folds modulo x^761 − x − 1. The
  exact latency is checked. The testbench counts each mechanism and fails if
  one never occurs: input stalls, zero padding, forward and inverse
  butterflies, the pointwise product, the inter-layer gaps, upper-half
  twiddles, both CRT signs, and three-term folds.
* `tb_ntt_mult_half` runs the same test with `TW_HALF_STORE = 1`.
* `tb_ntt_ctrl` checks every command against a schedule that the testbench
  rebuilds on its own. It also checks for read-after-write hazards.
* `tb_ntt_lane` checks one lane against direct polynomial evaluation, in this
  order: load, pointwise, forward NTT, inverse NTT.
* The leaf testbenches (`tb_butterfly`, `tb_twiddle_rom`, `tb_coef_bank`,
  `tb_pointwise_conv3`, `tb_crt_unit`, `tb_poly_reduce`) use random and
  extreme operands against 64-bit integer models.

To simulate with Verilator 5, run this from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
          rtl/ntt_pkg.sv tb/tb_ntt_mult.sv --top-module tb_ntt_mult -o sim
./obj_dir/sim
```

Replace `tb_ntt_mult` with any other testbench name. The full-size end-to-end
test runs in well under a second.
