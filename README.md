# Kyber polynomial datapath: SHAKE-fed samplers and a configurable NTT core

CRYSTALS-Kyber is a lattice-based (Module-LWE) key-encapsulation mechanism.
Nearly all of its work is arithmetic on polynomials of 256 coefficients modulo
q = 3329 in the ring Z_q[X]/(X^256 + 1). The coefficients come from two
samplers fed by the Keccak permutation:

- the public matrix **A** is sampled uniformly with SHAKE128 and rejection
  sampling, directly in the NTT domain;
- secrets and errors are sampled from a centered binomial distribution (CBD)
  with SHAKE256.

Products are computed with the number-theoretic transform (NTT):
f·g = INTT(NTT(f) ∘ NTT(g)).

This RTL implements that datapath as dedicated hardware, with no processor.
It has four parts:

- one Keccak core with a serial-in/parallel-out input buffer and a
  parallel-in/serial-out output buffer;
- a binomial sampler that handles η = 2 and η = 3;
- a constant-time rejection sampler;
- an NTT core built around a *configurable butterfly*. The same unit runs
  Cooley-Tukey butterflies for the NTT, Gentleman-Sande butterflies for the
  inverse NTT, and multiply-accumulate steps for point-wise multiplication.

A polynomial cache and a compress/decompress unit complete it.

One `start` of the top module `kyber_top` computes one matrix-vector entry of
Kyber:

```
s     = CBD_eta( SHAKE256(sigma || nonce) )        normal domain
a_hat = Parse( SHAKE128(rho || j || i) )           NTT domain
t     = INTT( a_hat o NTT(s) )                     normal domain
```

The result is then read out word by word, raw, compressed or decompressed.
The full KEM sequencing (KeyGen, Encaps, Decaps with their SHA3 hashing,
encoding and re-encryption check) is **not** part of this RTL. See
"Limits" below.

## Data flow and timing of one operation

```
 sigma,nonce ─┐                ┌──────────────┐   words    ┌─────────────────────────┐
 rho,j,i ─────┼─► keccak_core ─┤ cbd_sampler  ├──────────► │ ntt_core                │
              │   SIPO │ PISO  │ rej_sampler  ├─► poly_cache ─(B stream)─►  2 RAM     │
              │  f[1600] 1 rnd/cyc └──────────┘            │  addr gen, twiddle ROM  │
              │                                            │  2 configurable b'flies │
              │                                            └──────────┬──────────────┘
              │                                                       ▼
              │                                   compress_unit ─► rd_data
```

| phase | what runs | cycles (η = 2) |
|---|---|---|
| 1 | SHAKE256 → CBD → s written into the NTT core | ≈ 160 |
| 2 | NTT(s) **in parallel with** SHAKE128 → rejection sampler → a_hat into the cache | ≈ 700 (sampling-bound) |
| 3 | point-wise multiplication, a_hat streamed from the cache | 1284 |
| 4 | INTT including the 1/128 scaling | 611 |

In simulation a whole operation takes 2762 cycles for η = 2 and 2826 cycles
for η = 3. Sampling a_hat always consumes exactly 4 output blocks of
SHAKE128 (672 bytes), whatever the seed, so phase 2 has a fixed length.

## The configurable butterfly (`butterfly.sv`)

Each unit has one modular multiplier followed by a reduction, one modular
adder and one modular subtractor. A 2-bit `mode` changes how the operands
reach them:

| mode | use | a | b |
|---|---|---|---|
| 0 | NTT, Cooley-Tukey | u + w·v | u − w·v |
| 1 | INTT, Gentleman-Sande | u + v | (u − v)·w |
| 2 | point-wise | u + v·w | v·w |

The unit is fully pipelined: one operation per cycle, results 3 cycles
later. The stages are:

1. input registers;
2. a subtract for GS, then multiply and reduce;
3. add or subtract into the output registers.

The reduction (`mod_reduce.sv`) is Barrett reduction with m = ⌊2^24/q⌋ =
5039. Because 2^24 − m·q < q, one conditional subtraction is enough for any
24-bit product.

Using CT butterflies for the forward transform and GS butterflies for the
inverse means neither transform needs a bit-reversal pass. The NTT leaves its
output in Kyber's bit-reversed order, and the INTT takes that order and
returns normal order.

## The NTT core (`ntt_core.sv`): two RAM blocks, two coefficients per word

This is the part that needs the most care.

**Memory layout.** The polynomial sits in two simple dual-port RAMs of 64
words × 24 bits. Each word holds two neighbouring coefficients,
word m = {c[2m+1], c[2m]}. Word m is stored in RAM block `parity(m)` at
index m[6:1].

**Why two butterflies per cycle never conflict.** Every cycle the core runs
two butterflies: one on the even and one on the odd coefficients of two
words, lo = j/2 and hi = (j+len)/2, where j is even. This works for every
butterfly span len ≥ 2. The two word addresses differ in exactly one bit
(len/2 is a power of two), so they always have different parity and sit in
different RAM blocks. Each cycle the core therefore reads one word from each
block, and three cycles later writes one word to each block, in place.
`ntt_addr_gen.sv` computes lo, hi and the twiddle index from (stage, pair
index). The twiddle index is:

- 2^l + group for the NTT;
- 2^(l+1) − 1 − group for the INTT.

The INTT uses the twiddle −ζ. GS then gives b = (v − u)·ζ, as in the Kyber
specification.

**Schedule.** Each layer issues 64 read pairs back to back. The core then
waits 4 cycles (RAM read plus butterfly latency) for the last write-back
before the next layer starts, because the next layer may read a word that
was just written. The INTT ends with one pass that multiplies every
coefficient by 128⁻¹ = 3303 (mode 2, w = 3303). That pass handles one word
per cycle, so it takes 128 cycles.

**Point-wise (base) multiplication.** In the NTT domain Kyber multiplies
degree-1 pairs modulo X² − γ_m, with γ_m = 17^(2·bitrev7(m)+1). The core
takes the second operand as a stream of words (`pw_b_*`). For each word it
chains three dependent mode-2 steps on the two butterflies:

```
step 1:  U0: t1 = a1·b1           U1: t2 = a0·b1
step 2:  U0: t3 = t1·γ            U1: c1 = t2 + a1·b0
step 3:  U0: c0 = t3 + a0·b0
```

Each step starts on the cycle the previous result appears, and the next
word is read during the write-back. That gives about 10 cycles per word.

**Cycle counts.** These are measured in `tb_ntt_core`, from `start` to
`done`. The published architecture this design follows reports the second
column.

| operation | this RTL | published |
|---|---|---|
| NTT | 479 | 474 |
| INTT (with scaling) | 611 | 602 |
| point-wise multiplication | 1284 | 1,289 |

The published NTT is 7 layers × 64 cycles plus a few cycles of overhead. Its
INTT is 128 cycles longer, which is the scaling pass at two coefficients per
cycle. This is why the arithmetic unit here has two butterflies working on
two-coefficient words.

`twiddle_rom.sv` holds the 128 twiddles 17^bitrev7(k) mod q and the 128
constants γ_m. Both tables are computed from these formulas when the design
is elaborated.

## Sampling units

**Keccak core (`keccak_core.sv`, `keccak_round.sv`).**

- Input: the message arrives as 64-bit lanes into the SIPO buffer. The core
  then XORs the block into the state with SHAKE padding: 0x1F after the
  message and 0x80 in the last byte of the rate.
- Permutation: Keccak-f[1600] runs one round per cycle, so 24 cycles per
  permutation.
- Output: the PISO buffer takes a whole rate block at once (168 bytes for
  SHAKE128, 136 for SHAKE256) and shifts it out one byte per cycle with
  valid/ready. The next permutation starts as soon as the PISO is loaded.
  For a consumer that takes a byte every cycle, the stream therefore has no
  gaps after the first byte, which comes 26 cycles after the last lane.
- Limit: the message must be shorter than the rate. This covers Kyber's
  33- and 34-byte sampler inputs.

**Binomial sampler (`cbd_sampler.sv`).** It makes two samples per cycle:

- η = 2: from 8 bits, (b0+b1) − (b2+b3) and (b4+b5) − (b6+b7);
- η = 3: from 12 bits, each sum takes three bits.

One adder tree serves both cases: a select input adds the third bit of
each sum when η = 3. Samples are stored in [0, q). A 24-bit bit buffer
matches the byte stream to the 8- or 12-bit consumption. For η = 2 it makes
128 words (256 samples) in 130 cycles.

**Rejection sampler (`rej_sampler.sv`).**

- Every 3 bytes give two 12-bit candidates, and both are tested against q in
  the same cycle.
- Accepted values are packed two per word and written into the cache.
- The sampler always consumes `ROUNDS` Keccak blocks, so its time does not
  depend on the data. It keeps the first 256 accepted values and sets `fail`
  if there were fewer.

The probability of having too few accepted values depends on ROUNDS:

| ROUNDS | output bits | candidates | probability of < 256 accepted |
|---|---|---|---|
| 3 | 4,032 | 336 | 0.0083 |
| **4 (default)** | 5,376 | 448 | 2.2·10⁻³² |
| 5 | 6,720 | 560 | 2.3·10⁻⁷⁹ |

`tb_kyber_rounds` builds the top with 3, 4 and 5 blocks side by side, plus
1 block to force the failure path. One operation then takes 2594, 2762 and
2930 cycles. The time grows by exactly 168 cycles (one block of bytes) per
extra round and does not depend on the seed.

## Other blocks

- `poly_cache.sv`: NPOLY polynomials (default 25) of 128 words in one RAM,
  addressed by {polynomial, word}. The default fills 10 kB of SRAM together
  with the NTT core's 384 bytes. The top uses polynomial 0 for a_hat.
- `compress_unit.sv`: combinational Kyber Compress_q(x, d) =
  round(2^d·x/q) mod 2^d and Decompress_q(x, d) = round(q·x/2^d), for
  d = 1..11, on both coefficients of a word. d = 0 passes the word through
  unchanged. The division by q is a multiplication by ⌈2^35/q⌉ followed by
  a shift, which is exact for every input here.
- `dp_ram.sv`: the memory primitive, with one synchronous write port and one
  synchronous read port. Synthesis maps it onto SRAM macros.
- `kyber_pkg.sv`: constants, coefficient and word types, the operation
  enums, the Keccak round-constant LFSR, and modular add/subtract helpers.

## Top-level interface (`kyber_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| start | in | 1 | begin one operation (ignored while busy) |
| rho, sigma | in | 256 | seeds, byte k at bits 8k+7:8k |
| nonce, idx_i, idx_j | in | 8 | PRF nonce and matrix position |
| eta3 | in | 1 | 0: η = 2, 1: η = 3 |
| busy / done | out | 1 | running / one-cycle end pulse |
| fail, n_rejected | out | 1, 9 | rejection-sampling failure, rejected candidates |
| rd_en, rd_addr | in | 1, 7 | read result word (while idle) |
| rd_decomp, rd_d | in | 1, 4 | compress (0) or decompress (1) with d bits; d = 0 raw |
| rd_data | out | 24 | {c[2m+1], c[2m]}, one cycle after rd_en |

Parameters: `REJ_ROUNDS` (default 4) and `NPOLY` (default 25).

## How far to trust it, and where it departs from the published design

Verified in simulation against independent behavioural models
(`tb/kyber_ref_pkg.sv`):

- SHAKE128/256 known answers, and multi-block output under back-pressure;
- the NTT, INTT and base multiplication, plus INTT(NTT(f) ∘ NTT(g)) against
  schoolbook negacyclic multiplication;
- CBD and uniform parsing;
- end to end, `t` against the schoolbook product s · INTT(a_hat) computed
  from the model's own SHAKE output.

Each testbench has also been shown to fail on a deliberately broken copy of
its block. Nothing has been synthesised for timing or run on hardware.

These are choices of this RTL where the published description gives no
detail:

- the two-butterfly arithmetic unit, chosen to match the published cycle
  counts;
- the parity banking of the RAMs;
- the drain between layers;
- the mode-2 function and the base-multiplication schedule;
- Barrett reduction;
- the Keccak round-per-cycle datapath, 64-bit input and 8-bit output;
- the sampler buffers and word packing;
- the cache size and organisation;
- the reset style;
- the controller in `kyber_top` and its single-entry operation.

The published 65-nm design has 95–104 kGE of logic and 10–24 kB of SRAM at
200 MHz. Those numbers describe the complete coprocessor and are not claims
about this RTL.

## Limits

- No KEM-level controller: KeyGen, Encaps and Decaps are not sequenced. The
  SHA3-256/512 hashing, byte encoding/decoding, error-polynomial addition
  and the re-encryption check are not implemented. `kyber_top` computes one
  matrix entry per start.
- The Keccak core absorbs single-block messages only.
- SRAM macros are modelled as arrays.
- No side-channel countermeasures. Only the rejection sampler's running time
  is independent of the data.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. For example, the end-to-end test at the default
parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/kyber_pkg.sv tb/kyber_ref_pkg.sv rtl/*.sv tb/tb_kyber_top.sv \
  --top-module tb_kyber_top -Mdir obj_top -o sim
./obj_top/sim
```

For a block test, replace `tb_kyber_top` with one of these:

- `tb_ntt_core`, which also prints the cycle counts;
- `tb_keccak_core`;
- `tb_cbd_sampler`;
- `tb_rej_sampler`;
- `tb_butterfly`;
- `tb_mod_reduce`;
- `tb_twiddle_rom`;
- `tb_ntt_addr_gen`;
- `tb_poly_cache`;
- `tb_compress_unit`;
- `tb_kyber_rounds`, which also needs `tb/kyber_top_checker.sv` on the
  command line.

The end-to-end test runs three operations (η = 2, 3, 2), reads each result
raw, compressed and decompressed, and counts these mechanisms:

- rejected candidates;
- Keccak block reloads;
- sampling overlapped with the NTT;
- both η settings;
- the three NTT-core operations.

It fails if any of them never occurred.
