# Compact R-LWE encryption with a two-lane schoolbook polynomial multiplier

Ring-LWE public-key encryption spends almost all of its time multiplying
polynomials in Z_q[x]/(x^n + 1). This design computes those products with the
plain O(n^2) schoolbook method. That method needs no twiddle factors and no
reordering, and one multiplier is enough. Two observations make it twice as
fast:

1. **Noise is small.** One operand of every product is either Gaussian noise
   (sigma = 4.51) or the secret key drawn from the same distribution. After a
   bound it lies in [-31, 31]. It is therefore stored as 6 bits (a sign bit and
   a 5-bit magnitude) instead of a 13-bit residue. Each product becomes
   13 x 5 = 18 bits, and the modular reduction after it gets cheaper.
2. **One multiplier gives two products.** Two 5-bit magnitudes are packed into
   one operand as `{b_hi, 13'b0, b_lo}`. A single 23 x 13 multiplication (one
   25 x 18 DSP slice on a 7-series FPGA) then returns `a*b_lo` in bits 17..0 and
   `a*b_hi` in bits 35..18, with no carry between them. Two output coefficients
   are accumulated side by side, so one full product takes n^2/2 clock cycles
   instead of n^2.

Parameters are n = 256 and q = 7681 (13-bit coefficients), the usual
medium-security R-LWE set. All RAM sizes and counters follow from `N`.

## The scheme

| operation | computes |
|---|---|
| key (input) | public key `a` (uniform) and `p`; secret key `r2` (small) |
| encryption | `c1 = a*e1 + e2`, `c2 = p*e1 + e3 + ENCODE(m)`, where `e1, e2, e3` are fresh Gaussian samples |
| decryption | `m' = DECODE(c1*r2 + c2)` |

Every multiplication has one full operand (`a`, `p` or `c1`) and one small
operand (`e1` or `r2`). That is why the multiplier can use the reduced width.

## The multiply-accumulate unit (`spma`)

`spma` computes `d = a*b + c`. Here `a` and `c` are 13-bit residues and `b` is
in 6-bit sign/magnitude form. In the ring, x^n = -1. A product `a[j]*b[k]` that
lands on x^(j+k) with j + k >= n therefore comes back at x^(j+k-n) with its
sign flipped.

The unit walks the outer index i = 0, 2, 4, ..., n-2. Lane 1 builds `d[i]` and
lane 2 builds `d[i+1]`. For each inner index j = 0..n-1 it reads:

* `a[j]`;
* `b1 = b[(i - j) mod n]` and `b2 = b[(i + 1 - j) mod n]`, which needs two read
  ports on the b memory;
* `c[i]` when j = 0 and `c[i+1]` when j = 1, through one shared port. Both are
  held until the row's first accumulation.

The per-product work is:

```
p_lo, p_hi = unpack( {|b2|, 13'b0, |b1|} * a[j] )    dual_mult
m1, m2     = p_lo mod q, p_hi mod q                  mod_q_reduce x2
neg1       = (j > i)   XOR sign(b1)                  wrap sign XOR sample sign
neg2       = (j > i+1) XOR sign(b2)
sum1       = (sum1 + (neg1 ? q - m1 : m1)) mod q     spma_acc_lane x2
sum2       = (sum2 + (neg2 ? q - m2 : m2)) mod q
```

On j = 0 the lane adds the product to `c` instead of to the old sum. This
starts the row at `c[i]` without costing a cycle. The sum is at most
(q - 1) + q < 2^14. One comparison and one multiplexer therefore finish the
reduction, and the sum register is 14 bits wide.

### Pipeline and timing

`spma_ctrl` issues one (i, j) pair per clock, and the stages are:

| cycle | stage |
|---|---|
| T   | addresses to the a, b, c memories (synchronous read) |
| T+1 | read data; c hold registers; the negate flags are formed |
| T+2 | multiplier operand registers |
| T+3 | 36-bit product register |
| T+4 | both reduced products registered |
| T+5 | sums updated; after j = n-1, `d_we` with `d[i]`, `d[i+1]` |

A first/last tag travels down the pipeline with each pair. Because of that,
rows follow each other with no gap. A whole multiplication takes
**n^2/2 + 6 = 32774 cycles** from `start` to `done`. `done` comes one cycle
after the last write. The memories must return data one cycle after the
address, as a block RAM does.

### Reduction modulo 7681 (`mod_q_reduce`)

q = 2^13 - 2^9 + 1, so t*q can be formed with shifts and adds. The unit first
takes the quotient estimate t = x[17] + x[17:13]. It then computes
y = x - ((t << 13) + t - (t << 9)). For every 18-bit x this result lies in
[0, 3q), and two conditional subtractions of q finish the job. The testbench
checks this exhaustively over all 2^18 inputs.

## The encryption/decryption datapath (`rlwe_top`)

```
 rng -> cdt_sampler -+-> RAM1 (e1)     ---------------+
                     +-> RAM2 (e2, e3) -> to Z_q --+  |
 a / p (pk port) ----------------------------> spma (encryption) -> +ENCODE(m) on pass 2 -> RAM3 (c1, c2)
                                                                                              |
 r2 (sk port) ---------------------------------------> spma (decryption) <---- c1, c2 --------+
                                                            |
                                                       RAM4 (c) -> decode -> msg_out
```

* **Sampling.** The CDT sampler draws 3n samples, one per clock, from one
  32-bit `rng` word each. Sample k goes to RAM1 (e1) for k < n. The rest go to
  RAM2, with e2 at 0..n-1 and e3 at n..2n-1.
* **Encryption.** One `spma` runs twice. Pass 0 computes `a*e1 + e2` into RAM3
  [0, n). Pass 1 computes `p*e1 + e3` and adds `ENCODE(m[k])` (floor(q/2) for
  a 1) to each coefficient on its way into RAM3 [n, 2n). The `c` operand comes
  from RAM2 and is mapped to a residue on the way in (-v becomes q - v).
* **Decryption.** A second `spma` reads `c1` (as `a`) and `c2` (as `c`) from
  RAM3 and `r2` (as `b`) from the external key memory. It writes
  `c1*r2 + c2` to RAM4. A pass of n cycles then decodes each coefficient:
  a 1 when q/4 < v < 3q/4.
* **Control.** `rlwe_ctrl` runs one operation at a time. A start command
  arriving while it is busy is ignored.

**Cycle counts (n = 256):**
* Encryption: 3n + 1 + 2(n^2/2 + 7) = 66319 cycles from `start_enc` to
  `enc_done`.
* Decryption: n^2/2 + n + 9 = 33033 cycles from `start_dec` to `dec_done`.

### CDT sampler

The table holds the cumulative distribution of |x| for the discrete Gaussian
with sigma = 4.51, bounded to [-31, 31]:

```
rho(x) = exp(-x^2 / (2 sigma^2)),  S = rho(0) + 2 * sum_{x=1..31} rho(x)
CDT[k] = round(2^31 * (rho(0) + 2 * sum_{x=1..k} rho(x)) / S),  k = 0..30
```

Bits 30..0 of `rng` form a fraction r. The magnitude is the number of entries
with r >= CDT[k]. All 31 comparisons run in parallel, so every sample takes
one cycle whatever its value. Bit 31 of `rng` is the sign. A zero magnitude is
always returned with sign 0.

## Interfaces of the top

| port | meaning |
|---|---|
| `start_enc`, `start_dec` | one-cycle commands; `busy` stays high until `enc_done` / `dec_done` pulses |
| `rng[31:0]` | a fresh random word every clock during sampling; sample k uses the k-th word after `start_enc` |
| `msg[N-1:0]` | message, held stable during encryption |
| `msg_out[N-1:0]` | decrypted message, valid from `dec_done` |
| `pk_rd_en`, `pk_sel`, `pk_addr`, `pk_data` | external public-key memory: `a` when `pk_sel = 0`, `p` when 1; data one cycle after the read |
| `sk_rd_en`, `sk_addr1/2`, `sk_data1/2` | external secret-key memory with two read ports; 6-bit sign/magnitude `r2` |
| `ct_rd_en`, `ct_addr`, `ct_data` | read port of RAM3 (c1 at 0..n-1, c2 at n..2n-1) while no decryption runs |

Reset is active low and asynchronous. It clears the control and valid state
but not the datapath or memory contents.

## How far this follows the published design, and where it departs

These parts are taken directly from the published description:
* the reduced 6-bit noise format;
* the `{b, 13'b0, a}` operand packing;
* the mod-7681 reduction steps;
* the sign rule `wrap XOR sign` with the q - m multiplexer;
* the 14-bit accumulators;
* the two-lane loop order;
* the block structure of the encryption/decryption datapath.

The following are this design's own choices:

* **Pipeline depth and streaming.** The published SPMA needs 34177 cycles for
  n = 256. That is about 11 cycles more per pair of rows than this version,
  which streams rows back to back (32774 cycles). In the same way, the
  reported encryption and decryption take 69654 and 34436 cycles, against
  66319 and 33033 here. Decryption is the SPMA time plus about n cycles in
  both.
* **One sampler and one SPMA for encryption.** The prose description also
  mentions three samplers and two multipliers. The block diagram and the
  one-DSP resource figure show one of each, used in turn, and that is what is
  built.
* **Field order in the packed operand.** Lane 1 (b1) sits in the low field.
  The published pseudo-code is not consistent on this point. Either order
  gives the same results.
* **Reduction input width.** The reduction input is 18 bits, as its own bit
  indices require (7680 * 31 > 2^17).
* **Encoding and decoding.** ENCODE and DECODE use the usual threshold rule.
  The source names these functions without defining them.
* **Sampler details.** The table precision (31 bits), the parallel comparison
  and the 32-bit random input are this design's own.
* **Memories and ports.** RAM ports, read timing and the key/ciphertext ports
  are this design's own.
* **Key generation and the random source.** Neither is part of the design.
  Keys and random words come in through ports.
* **Fixed modulus.** The reduction is specific to q = 7681. Another modulus
  needs a new `mod_q_reduce`.
* **Power-of-two N.** `N` must be a power of two, because addresses wrap by
  truncation.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends with
a `TB_RESULT checks=... failures=...` line.

* `tb_mod_q_reduce`: all 2^18 inputs.
* `tb_dual_mult`: random and corner products and the 2-cycle latency.
* `tb_spma_acc_lane`: random rows against an integer model, including sums
  that hit q exactly.
* `tb_spma_ctrl`: every address and sign of two full runs.
* `tb_spma`: four full n = 256 multiplications against a direct negacyclic
  convolution, with the 32774-cycle latency checked. The operands are random,
  all -31 with a = q-1, b = 0, and b = x.
* `tb_cdt_sampler`: every table boundary and 20000 random words against a
  table recomputed from exp(), plus an empirical sigma check.
* `tb_poly_ram`, `tb_poly_add`, `tb_rlwe_encode`, `tb_rlwe_decode`: port
  behaviour, exhaustive or random.
* `tb_rlwe_ctrl`: the phase sequence with stand-in multipliers.
* `tb_rlwe_top`: two full encrypt/decrypt rounds at the default size.
  * It makes a key pair (p = r1 - a*r2) and recomputes e1, e2, e3 from the
    random words it feeds.
  * It checks every coefficient of c1 and c2, the decrypted message, and both
    cycle counts.
  * It counts negative samples, a negative zero, wrapped products, both
    encryption passes, and decoded 0 and 1 bits.

## Simulating

The package `rlwe_pkg.sv` must come first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rlwe_pkg.sv rtl/*.sv tb/tb_rlwe_top.sv --top-module tb_rlwe_top
./obj_dir/Vtb_rlwe_top
```

Swap in any other testbench and its module. The full-size end-to-end run
simulates about 200k cycles and takes a few seconds.

## Files

| file | content |
|---|---|
| `rtl/rlwe_pkg.sv` | constants (n, q, widths), types, sign/magnitude helpers |
| `rtl/rlwe_top.sv` | encryption/decryption datapath |
| `rtl/rlwe_ctrl.sv` | operation sequencer |
| `rtl/spma.sv` | two-lane multiply-accumulate unit |
| `rtl/spma_ctrl.sv` | SPMA loop counters, addresses and wrap signs |
| `rtl/dual_mult.sv` | packed double multiplier |
| `rtl/mod_q_reduce.sv` | shift/add reduction modulo 7681 |
| `rtl/spma_acc_lane.sv` | signed modular accumulator |
| `rtl/cdt_sampler.sv` | constant-time Gaussian sampler |
| `rtl/poly_ram.sv` | 2-read/2-write coefficient RAM |
| `rtl/poly_add.sv`, `rtl/rlwe_encode.sv`, `rtl/rlwe_decode.sv` | coefficient adder, message encoder and decoder |
