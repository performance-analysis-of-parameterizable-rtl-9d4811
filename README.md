# A width-parameterised HQC key-encapsulation accelerator

HQC is a code-based key-encapsulation mechanism. Its cost is almost entirely
polynomial multiplication in F2[X]/(X^n - 1), with n = 17,669 bits for HQC-1.
In every one of these products one operand is **sparse**: a vector of fixed
Hamming weight w or w_r (66 or 75 for HQC-1). The product is therefore just
the XOR of w rotated copies of the dense operand. This design builds the whole
KEM (key generation, encapsulation and decapsulation) around one such
sparse x dense multiplier. Its datapath width **W** is a synthesis parameter:
the dense operand is kept as ceil(n/W) words of W bits, and the multiplier
handles one word per cycle.

Three ideas carry the design:

* **Words, not bits.** A rotation by s bits is a word offset, floor(s/W),
  plus an intra-word shift, s mod W. The word offset costs nothing; it only
  changes an address. The intra-word shift takes two neighbouring words A and
  B, shifts the 2W-bit value {A,B} and keeps the upper W bits.
* **A two-stage rotator.** The intra-word shift is split into a coarse shift
  by multiples of 2^ceil(k/2) (k = log2 W) and a fine shift by the rest, with
  a register in between. Each stage is then a roughly sqrt(W)-way multiplexer
  instead of a W-way one. This keeps the clock period flat as W grows from 128
  to 1024.
* **An accumulator in distributed RAM.** The partial products are summed in a
  LUT-RAM with two read ports and one write port, not in block RAM. A wide,
  shallow memory (large W, small ceil(n/W)) costs little in LUTs, but many
  block RAMs.

The rest of the design shares these units, plus one constant-weight sampler,
one encoder and one decoder, across the three operations. A small program
sequencer drives them. SHAKE256 is not part of the RTL: the design talks to an
external SHAKE256 core through a simple stream port.

Defaults: HQC-1 (n = 17,669, n1 = 46, n2 = 384, w = 66, w_r = 75,
k = 128 bits), W = 128, and the single-multiplier ("standard") encryption
schedule. The HQC-3 and HQC-5 sets, W = 256/512/1024, and a two-multiplier
("parallel") encryption are parameter settings. All of these have been
simulated end to end.

## Block map

```
                 +-------------------------- hqc_top ------------------------------+
 cmd/keys/msg -->| step sequencer (program per operation)                          |
                 |    |            |              |               |                |
 xof_* <-------->|  XOF port   fixed_weight_gen  encoder        decoder            |
 (SHAKE256)      |    |        (bitmap memory)   rs_encoder     rm_decoder         |
                 |    |            |              rm_encoder     rs_decoder         |
                 |    v            v              |               ^                |
                 |  poly_ram x5: H S U V T   position lists L0 L1 L2                |
                 |        |  two read ports        |                               |
                 |        v                        v                               |
                 |  poly_mult: A/B regs -> barrel_rotator -> XOR -> acc_lutram      |
                 |  (second poly_mult when PARALLEL=1)                             |
 host port <---->| direct word access to the polynomial memories                   |
                 +------------------------------------------------------------------+
```

| File | What it is |
|---|---|
| `rtl/hqc_pkg.sv` | shared types, GF(2^8) arithmetic, RS generator polynomial, operation and memory enums |
| `rtl/barrel_rotator.sv` | two-stage pipelined rotator, {A,B} << s, upper W bits |
| `rtl/acc_lutram.sv` | 2-read, 1-write accumulator memory with a one-cycle clear |
| `rtl/poly_mult.sv` | sparse x dense multiplier mod X^n - 1 |
| `rtl/poly_ram.sv` | polynomial memory, ceil(n/W) words, 2 asynchronous reads, 1 write |
| `rtl/fixed_weight_gen.sv` | constant-weight word sampler with bitmap duplicate detection |
| `rtl/rs_encoder.sv`, `rtl/rm_encoder.sv`, `rtl/encoder.sv` | Reed–Solomon LFSR, RM(1,7) row selection, and the W-bit output wrapper |
| `rtl/rm_decoder.sv`, `rtl/rs_decoder.sv`, `rtl/decoder.sv` | Hadamard-transform RM decoder, RS decoder, and the W-bit input wrapper |
| `rtl/hqc_top.sv` | the unified accelerator |

## The multiplier (`poly_mult`): how a product is formed

This is the part that takes the most care to follow.

**Operands.** The dense polynomial a sits in a caller's memory of
D = ceil(n/W) words. Word j holds bits jW … jW+W-1, and the bits above n in
the last word are zero. The sparse polynomial is a list of `weight` bit
positions, which the multiplier reads one by one.

**One position s.** Let q = floor(s/W) and r = s mod W. Then a·X^s, before
reduction, is a sequence of D+1 words. Word j of it is the upper half of
({a[j], a[j-1]} << r), with a[-1] = a[D] = 0. The multiplier reads a[j] and
a[j-1] on the memory's two read ports into registers A and B. It feeds {A,B}
through the rotator, reads accumulator word q+j, XORs, and writes the sum
back. One word goes in per cycle. The rotator's register and the
read-modify-write add a short pipeline. Per position, the schedule is 1
fetch cycle (the position is read and split into q and r), D+1 issue cycles
and 2 drain cycles.

**Wrap-around.** n is not a multiple of W (17,669 = 138·128 + 5). So the
reduction X^n = 1 does not line up with word boundaries, and a copy cannot
simply wrap to word 0. Instead, the shifted copies are accumulated
**unreduced** into an accumulator of 2D words. That covers every bit up to
2n. After the last position, a **fold pass** of D cycles reads accumulator
word i and the saved neighbour word, takes the bits at positions ≥ n that
belong to word i, and XORs them back in. It then masks the last word to n
bits. The fold needs the accumulator's second read port; the accumulation
needs only one.

**Clearing.** Each accumulator word has a valid flag. A word whose flag is
clear reads as zero. `start` clears all flags in one cycle, so the memory
never needs a clearing pass.

**Latency.** From the `start` cycle to the `done` pulse:

    weight · (ceil(n/W) + 4) + ceil(n/W) + 2  cycles

This is the published formula w·(3 + ceil(n/W)) + ceil(n/W) + w + 2, cycle for
cycle. The published design spends its D trailing cycles on clearing the
accumulator; here they are the fold pass. For HQC-5 (n = 57,637, weight 131)
this gives 60,058 / 30,358 / 15,442 / 8,050 cycles at W = 128 / 256 / 512 /
1024. `tb_poly_mult_hqc5` measures all four. The published table agrees for
the first three and lists 8,070 for W = 1024, which is 20 cycles more than the
same formula gives.

**Read ports.** After `done`, the product is readable word by word on
`res_addr`/`res_data` (combinational) until the next `start`. The dense
operand and the position list must not change while `busy` is high.

## The rotator (`barrel_rotator`)

Input: {A,B} (2W bits) and a shift s of k = log2 W bits. Let L = ceil(k/2) and
R = 2^L. Stage 1 computes {A,B} << (s[k-1:L]·R) and registers it, together
with s[L-1:0]. Stage 2 shifts the registered value by s[L-1:0] and outputs the
upper W bits. Stage 2 is combinational into the accumulator write, so the
result lands in the accumulator one cycle after the operands enter stage 1.

## Constant-weight sampling (`fixed_weight_gen`)

x, y, r1, r2 and e are vectors of exact weight. They come from 32-bit random
words in two steps:

1. for i = 0 … wt-1: pos[i] = i + floor(rnd[i] · (n - i) / 2^32);
2. for i = wt-1 down to 0: if pos[i] equals a position already kept
   (a later index), replace it by i.

Step 2 is a single pass with an n-bit **bitmap** held in a memory of 32-bit
words. The position is split into a word address and a bit. The bitmap word is
read, the position (or i) is emitted and its bit is set. A replacement i can
never clash with a later entry, because entry j ≥ i+1 is at least j. A third
pass clears only the bitmap words that were touched, so the next run starts
from zero. The bitmap is zeroed once after reset. Without XOF stalls, a
vector takes 3·wt + 1 cycles: 226 for w_r = 75. The published generator reports
440 / 625 / 865 cycles for HQC-1/3/5. Those figures were measured on a
different schedule and do not say which weight or XOF time they include.

## Encoder and decoder

**Encoding** is a shortened Reed–Solomon code over GF(2^8), polynomial
x^8+x^4+x^3+x^2+1, concatenated with a duplicated Reed–Muller RM(1,7) code.

* `rs_encoder` is a systematic LFSR with one constant GF multiplier per
  generator coefficient. The coefficients of g(x) = ∏(x − α^i),
  i = 1 … n1−k, are computed at elaboration. It takes one message byte per
  cycle and produces the codeword KB+1 cycles after `start`.
* `rm_encoder` maps a byte to a 128-bit codeword. It XORs the rows of the
  generator matrix selected by the byte's bits; bit t of the codeword is
  m7 ⊕ parity(m[6:0] & t).
* `encoder` repeats each codeword n2/128 times. It collects the 128-bit
  pieces into W-bit words and offers them on a valid/ready stream, so any W
  that is a multiple of 128 works.

**Decoding** reverses this.

* `decoder` cuts W-bit words of v − u·y into 128-bit pieces.
* `rm_decoder` sums the n2/128 copies as ±1 values and runs a seven-stage
  fast Hadamard transform, one stage per cycle. It takes the entry with the
  largest magnitude: the index gives message bits 6:0 and the sign gives
  bit 7.
* `rs_decoder` computes the syndromes, runs Berlekamp–Massey and finds the
  error evaluator. It then does a Chien search with Forney correction, over
  the message positions only.

For HQC-1 the RM stage needs 3+8 cycles per symbol (46 symbols) and the RS
stage then needs n1 + 3t + KB + 1 = 46 + 45 + 16 + 1 = 108 cycles (t = 15).

## Operations (`hqc_top`)

The sequencer walks a fixed program for each operation. Each step is one of:

* start, absorb into, finish or squeeze a hash;
* sample a sparse vector into position list L0, L1 or L2;
* multiply;
* write the product to a memory;
* add Encode(m) or a sparse vector;
* compare;
* encode, decode, or select the shared secret.

There are five polynomial memories: H, S, U, V and T (scratch).

* **Key generation** (`OP_KEYGEN`, `seed_kem_i`): seed_dk, seed_ek and sigma
  are squeezed from one hash of the seed. Then y and x are sampled from
  seed_dk, and h is expanded from seed_ek. The result is s = x + h·y in
  memory S, plus the seeds on `seed_*_o`/`sigma_o`.
* **Encapsulation** (`OP_ENCAPS`, `msg_i`, `salt_i`, key registers, S):
  1. hek = H(seed_ek ‖ s), then (K, θ) = G(hek ‖ m ‖ salt);
  2. h is expanded again from seed_ek; r2, e and r1 are sampled from θ;
  3. the encoder starts, and runs while the multiplier computes h·r2;
  4. u = h·r2 + r1 goes to U;
  5. v = Encode(m) + s·r2 + e (truncated to n1·n2 bits) goes to V;
  6. `ss_o` = K.
* **Decapsulation** (`OP_DECAPS`, U and V written beforehand through the host
  port, `salt_i`):
  1. y is sampled from seed_dk, and m' = Decode(v − u·y);
  2. the encapsulation steps run again with m', writing into T; T is
     compared word by word with U, then with V;
  3. K̄ = J(hek ‖ sigma ‖ u ‖ v ‖ salt);
  4. `ss_o` is K' if both comparisons matched. Otherwise it is K̄, and
     `reject_o` is set (implicit rejection).

* **Decapsulation from the compressed key** (`OP_DECAPS_SEED`,
  `seed_kem_i`): the decapsulation key is only the 32-byte seed. The
  key-generation program runs first and re-derives seed_dk, seed_ek, sigma and
  s into the key registers and memory S. Then the `OP_DECAPS` program follows.

The public key is always used in its compressed form: h is regenerated from
seed_ek every time, and y from seed_dk.

With `PARALLEL = 1`, a second `poly_mult` computes s·r2 together with h·r2.
Both multipliers see the same weight and position list, so they issue
identical read addresses. They share the memories' address buses; the second
one simply reads memory S. The separate s·r2 step is dropped from the
program. An assertion checks that the two stay in lockstep.

### Interfaces and timing of the top

* **Command:** with `busy` low, pulse `cmd_valid` with `cmd`
  (`OP_KEYGEN`/`OP_ENCAPS`/`OP_DECAPS`/`OP_DECAPS_SEED`) and the operand
  inputs. `busy` then
  stays high, and `done` pulses for one cycle at the end. `key_load_i` (while
  idle) loads seed_ek, seed_dk and sigma.
* **Host port:** while idle, `host_sel`/`host_addr` select a word of a
  memory. `host_rdata` returns it combinationally, and `host_we` writes
  `host_wdata`. The ciphertext is read out of U and V, and written into U
  and V before decapsulation.
* **XOF port:**
  * `xof_init` pulses with a domain byte `xof_dom` to start a new hash
    (1 key seeds, 2 y/x, 3 h, 4 H(ek), 5 G, 6 r2/e/r1, 7 K̄);
  * 32-bit words are absorbed on `xof_in_valid/ready/data`;
  * `xof_final` pulses to end absorbing;
  * 32-bit words are squeezed on `xof_out_valid/ready/data`.

  Both streams may stall for any time. Registers and polynomials are absorbed
  as 32-bit words, least significant first.

### Measured cycle counts

The counts below come from the end-to-end testbenches, with the behavioural
XOF stalling at random. They are compared with the published figures for
unified designs with key compression. The published counts include real
SHAKE256 time; the figures here include only the stalls of the stand-in.
So they are lower bounds for a system with a real hash core, not a like-for-like
comparison.

The decapsulation figure is given twice: first from the stored key
(`OP_DECAPS`), then from the seed (`OP_DECAPS_SEED`).

| configuration | keygen / encaps / decaps / decaps from seed (cycles) | published (kcycles) |
|---|---|---|
| HQC-1, W=128, standard | 10,959 / 24,388 / 36,603 / 47,587 | 12 / 29 / 44 |
| HQC-1, W=256 | 6,802 / 13,843 / 21,226 / 27,456 | 7 / 18 / 29 |
| HQC-1, W=512 | 4,391 / 8,450 / 13,421 / 17,342 | 5 / 13 / 21 |
| HQC-1, W=1024 | 2,763 / 5,881 / 9,645 / 12,427 | 4 / 10 / 17 |
| HQC-1, W=128, PARALLEL=1 | 11,006 / 13,513 / 25,721 / 36,648 | 12 / 18 / 33 |
| HQC-3, W=128 | 31,267 / 70,338 / 103,953 / 135,269 | – |
| HQC-5, W=128 | 65,588 / 143,668 / 211,470 / 275,265 | – |

## Where this design departs from, or fills in, the published one

* **SHAKE256 is outside the design.** The XOF port, the domain bytes, the
  32-bit absorb granularity, and deriving seed_dk/seed_ek/sigma from a single
  hash are this design's own conventions. Outputs are therefore **not
  bit-compatible with the HQC reference implementation**, even with a real
  SHAKE256 attached. To match it, change the absorb/squeeze steps in the
  program in `hqc_top.sv`.
* **Sampling order.** e and r1 are sampled before the first product, not
  during it. The hash is one sequential stream shared with the sampler, so
  only the encoder overlaps with the multiplier.
* **Decoder failure.** The decoder does not signal failure. Only the
  re-encryption comparison decides between K' and K̄.
* **Uncompressed keys.** h and y cannot be loaded in expanded form; they are
  always regenerated from their seeds. So the published "without key
  compression" figures have no exact counterpart here. `OP_DECAPS` (stored s
  and seeds) is the nearest one.
* **W.** W must be a multiple of 128 (an elaboration-time assertion in
  `encoder`).
* **This design's own internal structure.** The published description gives
  only the function of several blocks. In those places this design fills in
  the details itself:
  * the fold pass;
  * the valid-flag clear;
  * the one-position-per-cycle sampler schedule;
  * the Hadamard RM decoder;
  * the RS decoder;
  * the step sequencer and the memory organisation.
* **Cycle counts.** The multiplier matches the published cycle formula
  exactly. Whole operations do not match the published counts (see the table
  above).

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends it with a
failure if it hangs. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/hqc_pkg.sv tb/tb_hqc_top.sv \
          --top-module tb_hqc_top -o sim && ./obj_dir/sim
```

Replace `tb_hqc_top` with any testbench below.

| testbench | what it checks |
|---|---|
| `tb_hqc_top` | default build end to end. It checks s, u, v bit by bit against references computed in the testbench, then decapsulation (accept, equal keys), decapsulation from the seed alone after the stored key has been spoilt, and two tampered ciphertexts (reject, different key). It counts XOF stalls, encoder/multiplier overlap, h regeneration, duplicate replacement, noisy bits, accept, reject and decapsulation from the seed; each must occur. Runs in about a second. |
| `tb_hqc_sets` | the same flow for W = 256/512/1024, HQC-3, HQC-5 and PARALLEL=1 (about a minute). |
| `tb_poly_mult` | products at HQC-1/W=128 and at a small odd size, with the exact latency. |
| `tb_poly_mult_hqc5` | HQC-5 products at W = 128…1024, with the latencies above. |
| `tb_fixed_weight_gen` | positions against a reference, distinctness, 3·wt+1 latency, all three sizes, and forced duplicates. |
| `tb_barrel_rotator`, `tb_acc_lutram`, `tb_poly_ram` | the datapath pieces. |
| `tb_rs_encoder`, `tb_rm_encoder`, `tb_encoder` | encoding against reference encoders. |
| `tb_rm_decoder`, `tb_rs_decoder`, `tb_decoder` | decoding with injected errors up to the correction limit, and latency. |

`tb/xof_model.sv` is a behavioural stand-in for the hash core. It produces
deterministic pseudo-random words that depend on everything absorbed, and it
inserts random stalls. It is **not** SHAKE256 and has no cryptographic
strength; it exists only to drive the data flow.

## Changing parameters

`hqc_top` takes N, N1, N2, WT, WR, KB (message bytes), W and PARALLEL. The
values for the three sets are in the table below.

| set | N | N1 | N2 | WT | WR | KB |
|---|---|---|---|---|---|---|
| HQC-1 | 17669 | 46 | 384 | 66 | 75 | 16 |
| HQC-3 | 35851 | 56 | 640 | 100 | 114 | 24 |
| HQC-5 | 57637 | 90 | 640 | 131 | 149 | 32 |

All memory depths, position-list widths and code tables follow from these
values at elaboration.
